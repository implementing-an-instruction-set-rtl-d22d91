// tinymips_regfile: the 32 x 32-bit general-purpose register file, R0 hard-wired to 0.
//
// Two combinational read ports, A (index Asel, wired to IR.rs) and B (index Bsel, wired
// to IR.rt), and one write port whose data comes from the D bus. When ld is high the
// word d is written into register dsel at the rising clock edge; writes to R0 are
// dropped and R0 always reads as zero. A write is visible on the read ports from the
// next cycle. Reset clears every register, an implementation choice that gives
// simulation a defined start.
module tinymips_regfile
  import tinymips_pkg::*;
#(
  parameter int N_REGS = NREGS,   // number of registers
  parameter int W      = XLEN     // register width
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(N_REGS)-1:0] asel,   // read port A index
  input  logic [$clog2(N_REGS)-1:0] bsel,   // read port B index
  input  logic [$clog2(N_REGS)-1:0] dsel,   // write index
  input  logic                      ld,     // write enable (ld_reg)
  input  logic [W-1:0]              d,      // write data, from the D bus
  output logic [W-1:0]              a,      // R[asel]
  output logic [W-1:0]              b       // R[bsel]
);

  logic [W-1:0] regs [N_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REGS; i++) regs[i] <= '0;
    end else if (ld && dsel != '0) begin
      regs[dsel] <= d;
    end
  end

  assign a = (asel == '0) ? '0 : regs[asel];
  assign b = (bsel == '0) ? '0 : regs[bsel];

endmodule
