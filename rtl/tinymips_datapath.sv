// tinymips_datapath: the TinyMIPS datapath: PC unit, instruction register, register
// file, sign extender, adder, branch comparator and the two shared buses.
//
// Everything moves over two buses. The A (address) bus is driven by the PC (pc2A) or by
// the adder sum (s2A) and addresses the RAM. The D (data) bus is driven by the RAM
// (m2D), register port B (b2D), the adder sum (s2D) or the IR (i2D); it feeds the RAM's
// write data, the IR, the register file's write port and the next-PC logic. Register
// read selects come straight from IR.rs and IR.rt; the write select is rt or rd
// (rt_sel). The adder computes R[rs] + B or R[rs] - B, B being R[rt] or the
// sign-extended im16.
//
// Interface: ctrl carries every control point for the current cycle; mem_rdata is the
// RAM's read word; abus/dbus go to the RAM; op/funct/rt and the eq/neg conditions go to
// the controller. All state changes at the rising edge of clk; the rest is
// combinational within the cycle. Assertions check that each bus has at most one
// driver in a cycle.
//
// The units, the two buses, their drivers and the control-point names follow the
// original datapath drawing. Building the tri-state drivers as multiplexers and
// reporting the sign of R[rs] for bltz are this implementation's choices.
module tinymips_datapath
  import tinymips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl,        // control points
  input  word_t      mem_rdata,   // RAM read data, put on D by m2D
  output word_t      abus,        // A bus
  output word_t      dbus,        // D bus
  output logic [5:0] op,          // IR.op
  output logic [5:0] funct,       // IR.funct
  output reg_idx_t   rt,          // IR.rt (selects bltz among the REGIMM forms)
  output logic       eq,          // R[rs] == R[rt]
  output logic       neg,         // R[rs] < 0
  output word_t      pc,          // program counter
  output word_t      ir           // instruction register
);

  word_t       reg_a, reg_b, sx, sum;
  reg_idx_t    rs, rd, dsel;
  logic [15:0] im16;

  tinymips_pc_unit #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n,
    .ld_pc  (ctrl.ld_pc),
    .npc_sel(ctrl.npc_sel),
    .d      (dbus),
    .pc     (pc)
  );

  tinymips_ir u_ir (
    .clk, .rst_n,
    .ld_ir (ctrl.ld_ir),
    .d     (dbus),
    .ir    (ir),
    .op    (op),
    .rs    (rs),
    .rt    (rt),
    .rd    (rd),
    .funct (funct),
    .im16  (im16)
  );

  // Register write index: rt for lw, rd for the R-format instructions.
  assign dsel = ctrl.rt_sel ? rt : rd;

  tinymips_regfile u_rf (
    .clk, .rst_n,
    .asel (rs),
    .bsel (rt),
    .dsel (dsel),
    .ld   (ctrl.ld_reg),
    .d    (dbus),
    .a    (reg_a),
    .b    (reg_b)
  );

  tinymips_sext u_xt (
    .im16 (im16),
    .sx   (sx)
  );

  tinymips_alu u_alu (
    .a      (reg_a),
    .b      (reg_b),
    .imm    (sx),
    .sx_sel (ctrl.sx_sel),
    .comp   (ctrl.comp),
    .sum    (sum)
  );

  tinymips_branch_cmp u_cmp (
    .a   (reg_a),
    .b   (reg_b),
    .eq  (eq),
    .neg (neg)
  );

  tinymips_bus #(.N(2), .W(XLEN)) u_abus (
    .en  ({ctrl.s2A, ctrl.pc2A}),
    .src ({sum,      pc}),
    .bus (abus)
  );

  tinymips_bus #(.N(4), .W(XLEN)) u_dbus (
    .en  ({ctrl.i2D, ctrl.s2D, ctrl.b2D, ctrl.m2D}),
    .src ({ir,       sum,      reg_b,    mem_rdata}),
    .bus (dbus)
  );

  // The buses stand for tri-state lines: two drivers at once would be a short.
  a_one_abus_driver: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.s2A, ctrl.pc2A}))
    else $error("A bus has more than one driver");
  a_one_dbus_driver: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.i2D, ctrl.s2D, ctrl.b2D, ctrl.m2D}))
    else $error("D bus has more than one driver");

endmodule
