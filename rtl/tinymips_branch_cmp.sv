// tinymips_branch_cmp: the comparator that reports the branch conditions to the
// controller.
//
// It watches both register read ports. eq is high when R[rs] == R[rt] (the beq
// condition); neg is high when R[rs] < 0 as a signed number, which is its sign bit (the
// bltz condition). The equality signal is the design's EQ; taking the sign for bltz
// straight from port A is this implementation's choice. Purely combinational.
module tinymips_branch_cmp
  import tinymips_pkg::*;
(
  input  word_t a,    // R[rs]
  input  word_t b,    // R[rt]
  output logic  eq,   // R[rs] == R[rt]
  output logic  neg   // R[rs] < 0
);

  assign eq  = (a == b);
  assign neg = a[XLEN-1];

endmodule
