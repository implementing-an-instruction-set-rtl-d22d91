// tinymips_alu: the datapath's single arithmetic unit: operand-B multiplexer,
// complementer ("~") and adder with carry-in.
//
// Operand A is register port A (R[rs]). Operand B is chosen by sx_sel between register
// port B (R[rt]) and the sign-extended immediate. The comp control point inverts B and
// also feeds the adder's carry-in, so one control point turns A + B into A - B
// (A + ~B + 1). That is how addu, subu and the lw/sw address sum R[rs] + SXim16 are
// formed. Purely combinational; overflow is ignored, as addu/subu require.
// The mux, complementer and adder with carry-in are the original units; that comp also
// drives the carry-in is read from their drawn connection.
module tinymips_alu
  import tinymips_pkg::*;
(
  input  word_t a,       // register port A, R[rs]
  input  word_t b,       // register port B, R[rt]
  input  word_t imm,     // sign-extended immediate
  input  logic  sx_sel,  // 1: operand B is imm, 0: operand B is b
  input  logic  comp,    // 1: complement operand B and carry in 1
  output word_t sum
);

  word_t b_mux;
  word_t b_comp;

  always_comb begin
    b_mux  = sx_sel ? imm : b;
    b_comp = comp ? ~b_mux : b_mux;
    sum    = a + b_comp + word_t'(comp);
  end

endmodule
