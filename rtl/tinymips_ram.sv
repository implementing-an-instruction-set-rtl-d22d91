// tinymips_ram: the unified instruction and data memory on the A and D buses.
//
// A word-organised RAM addressed in bytes: the word at A[AW-1:2] is read
// combinationally (driven onto D by the datapath when m2D is high) so that a fetch or a
// load completes in one cycle, and with wrt high the word on D is written there at the
// rising clock edge. The two low address bits are ignored (word accesses only) and so
// are address bits above AW-1, which makes the memory repeat across the 32-bit space.
// The architected space is 2^32 bytes; the default of 2^30 bytes (2^28 words) is the
// largest array the simulator accepts. The contents are not reset.
module tinymips_ram
  import tinymips_pkg::*;
#(
  parameter int AW = 30            // byte-address bits actually decoded
) (
  input  logic  clk,
  input  word_t addr,              // A bus
  input  word_t wdata,             // D bus
  input  logic  wrt,               // write enable
  output word_t rdata              // Mem[addr]
);

  localparam int DEPTH = 2 ** (AW - 2);

  word_t mem [DEPTH];

  logic [AW-3:0] widx;
  assign widx = addr[AW-1:2];

  always_ff @(posedge clk) begin
    if (wrt) mem[widx] <= wdata;
  end

  assign rdata = mem[widx];

endmodule
