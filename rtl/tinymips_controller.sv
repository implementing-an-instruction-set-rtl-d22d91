// tinymips_controller: the finite-state machine that sequences the TinyMIPS datapath.
//
// Every instruction starts with FETCH (IR := Mem[PC]: pc2A, m2D, ld_ir). EXEC then
// asserts the control points of the instruction's register transfer:
//   addu  R[rd] := R[rs] + R[rt]            s2D, ld_reg
//   subu  R[rd] := R[rs] - R[rt]            comp, s2D, ld_reg
//   lw    R[rt] := Mem[R[rs] + SXim16]      sx_sel, s2A, m2D, rt_sel, ld_reg
//   sw    Mem[R[rs] + SXim16] := R[rt]      b2D, sx_sel, s2A, wrt
//   j     PC := PC[31:28] || addr || 00     i2D, npc_sel = JUMP, ld_pc
//   jr    PC := R[rs]                       s2D, npc_sel = DBUS, ld_pc
//   beq   PC := EQ ? PC + SXim16 : PC + 4   i2D, npc_sel = EQ ? BRANCH : INC, ld_pc
//   bltz  PC := R[rs]<0 ? PC + SXim16 : PC+4  as beq, with the sign of R[rs]
// Instructions that do not change the PC in EXEC finish with INCPC (PC := PC + 4:
// ld_pc). So addu, subu, lw and sw take three cycles and j, jr, beq and bltz two.
// jr passes R[rs] through the adder with operand B = R[rt], which is R0 = 0 in every
// well-formed jr. Any other encoding executes as a no-op (FETCH, EXEC with nothing
// asserted, INCPC). done pulses in the last cycle of each instruction.
//
// The control-point sets of lw, sw and PC+4 and the branch selection follow the
// design; the fetch step, the jr path and the use of a separate PC+4 cycle (read from
// the ';' between the transfers) are this implementation's reading. Moore outputs
// except npc_sel in EXEC, which depends on eq/neg in the same cycle.
module tinymips_controller
  import tinymips_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] op,      // IR.op
  input  logic [5:0] funct,   // IR.funct
  input  reg_idx_t   rt,      // IR.rt
  input  logic       eq,      // R[rs] == R[rt]
  input  logic       neg,     // R[rs] < 0
  output ctrl_t      ctrl,    // control points for this cycle
  output state_t     state,
  output logic       done     // last cycle of an instruction
);

  typedef enum logic [3:0] {
    I_ADDU, I_SUBU, I_LW, I_SW, I_J, I_JR, I_BEQ, I_BLTZ, I_NOP
  } instr_t;

  instr_t instr;
  state_t state_nx;

  always_comb begin
    instr = I_NOP;
    unique case (op)
      OP_RTYPE: begin
        if      (funct == FN_ADDU) instr = I_ADDU;
        else if (funct == FN_SUBU) instr = I_SUBU;
        else if (funct == FN_JR)   instr = I_JR;
      end
      OP_REGIMM: if (rt == RT_BLTZ) instr = I_BLTZ;
      OP_J:      instr = I_J;
      OP_BEQ:    instr = I_BEQ;
      OP_LW:     instr = I_LW;
      OP_SW:     instr = I_SW;
      default:   instr = I_NOP;
    endcase
  end

  always_comb begin
    ctrl     = CTRL_IDLE;
    state_nx = state;
    done     = 1'b0;
    unique case (state)
      S_FETCH: begin
        ctrl.pc2A  = 1'b1;
        ctrl.m2D   = 1'b1;
        ctrl.ld_ir = 1'b1;
        state_nx   = S_EXEC;
      end
      S_EXEC: begin
        state_nx = S_INCPC;
        unique case (instr)
          I_ADDU, I_SUBU: begin
            ctrl.comp   = (instr == I_SUBU);
            ctrl.s2D    = 1'b1;
            ctrl.ld_reg = 1'b1;
          end
          I_LW: begin
            ctrl.sx_sel = 1'b1;
            ctrl.s2A    = 1'b1;
            ctrl.m2D    = 1'b1;
            ctrl.rt_sel = 1'b1;
            ctrl.ld_reg = 1'b1;
          end
          I_SW: begin
            ctrl.b2D    = 1'b1;
            ctrl.sx_sel = 1'b1;
            ctrl.s2A    = 1'b1;
            ctrl.wrt    = 1'b1;
          end
          I_J: begin
            ctrl.i2D     = 1'b1;
            ctrl.npc_sel = NPC_JUMP;
            ctrl.ld_pc   = 1'b1;
          end
          I_JR: begin
            ctrl.s2D     = 1'b1;
            ctrl.npc_sel = NPC_DBUS;
            ctrl.ld_pc   = 1'b1;
          end
          I_BEQ, I_BLTZ: begin
            ctrl.i2D     = 1'b1;
            ctrl.ld_pc   = 1'b1;
            if ((instr == I_BEQ) ? eq : neg) ctrl.npc_sel = NPC_BRANCH;
            else                             ctrl.npc_sel = NPC_INC;
          end
          default: ;
        endcase
        if (ctrl.ld_pc) begin
          state_nx = S_FETCH;
          done     = 1'b1;
        end
      end
      S_INCPC: begin
        ctrl.ld_pc   = 1'b1;
        ctrl.npc_sel = NPC_INC;
        state_nx     = S_FETCH;
        done         = 1'b1;
      end
      default: state_nx = S_FETCH;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= state_nx;
  end

endmodule
