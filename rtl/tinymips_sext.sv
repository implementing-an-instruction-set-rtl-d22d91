// tinymips_sext: the sign extender ("xt") between the instruction register and the
// adder's operand-B multiplexer.
//
// It widens the 16-bit immediate field of an I-format instruction to a 32-bit word by
// replicating bit 15, giving the SXim16 operand that lw and sw add to R[rs].
// Purely combinational; no clock. Its place between the IR and the operand-B
// multiplexer follows the original datapath; the logic is plain bit replication.
module tinymips_sext
  import tinymips_pkg::*;
(
  input  logic [15:0] im16,  // immediate field, IR[15:0]
  output word_t       sx     // signEx(im16)
);

  assign sx = {{(XLEN-16){im16[15]}}, im16};

endmodule
