// tinymips_pc_unit: the program counter and its next-PC logic.
//
// Four candidates feed the next-PC multiplexer, selected by npc_sel:
//   NPC_INC    PC + 4
//   NPC_JUMP   PC[31:28] || addr || 00, addr being D[25:0] (the IR driven onto D by i2D)
//   NPC_DBUS   the D bus itself (jr: R[rs] passed through the adder onto D)
//   NPC_BRANCH PC + signEx(D[15:0]) (beq/bltz target; the IR's im16 on D)
// With ld_pc high the PC takes the selected value at the rising clock edge. The branch
// target adds the sign-extended immediate to the branch's own address as a byte offset,
// exactly as the register transfer PC := PC + signEx(im16) reads; the reset address is a
// parameter of this implementation.
module tinymips_pc_unit
  import tinymips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     ld_pc,     // load PC
  input  npc_sel_t npc_sel,   // next-PC source
  input  word_t    d,         // D bus
  output word_t    pc
);

  word_t pc_inc, pc_jump, pc_branch, npc;

  always_comb begin
    pc_inc    = pc + word_t'(4);
    pc_jump   = {pc[31:28], d[25:0], 2'b00};
    pc_branch = pc + {{(XLEN-16){d[15]}}, d[15:0]};
    unique case (npc_sel)
      NPC_INC:    npc = pc_inc;
      NPC_JUMP:   npc = pc_jump;
      NPC_DBUS:   npc = d;
      NPC_BRANCH: npc = pc_branch;
      default:    npc = pc_inc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc <= RESET_PC;
    else if (ld_pc) pc <= npc;
  end

endmodule
