// tinymips_ir: the instruction register and its field decode.
//
// At a rising clock edge with ld_ir high the IR takes the word on the D bus (the
// fetched instruction, Mem[PC]). Its fields are wired out by format: op, rs, rt, rd and
// funct (R format) and im16 (I format); the 26-bit jump address (J format) reaches the
// next-PC logic through the D bus when the IR drives it (i2D). rs and rt
// drive the register file's read selects; rt or rd its write select. Reset clears the
// IR, an implementation choice.
module tinymips_ir
  import tinymips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_ir,   // load from the D bus
  input  word_t       d,       // D bus
  output word_t       ir,      // whole instruction
  output logic [5:0]  op,      // IR[31:26]
  output reg_idx_t    rs,      // IR[25:21]
  output reg_idx_t    rt,      // IR[20:16]
  output reg_idx_t    rd,      // IR[15:11]
  output logic [5:0]  funct,   // IR[5:0]
  output logic [15:0] im16     // IR[15:0]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ir <= '0;
    else if (ld_ir) ir <= d;
  end

  assign op    = ir[31:26];
  assign rs    = ir[25:21];
  assign rt    = ir[20:16];
  assign rd    = ir[15:11];
  assign funct = ir[5:0];
  assign im16  = ir[15:0];

endmodule
