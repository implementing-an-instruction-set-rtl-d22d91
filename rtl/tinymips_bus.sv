// tinymips_bus: one shared bus (the A address bus or the D data bus) with several
// enabled drivers.
//
// In the drawn datapath each source reaches a bus through a tri-state driver with its
// own control point (pc2A, s2A on A; m2D, b2D, s2D, i2D on D). Here the drivers are an
// AND-OR multiplexer: the bus carries the OR of every enabled source. The controller
// enables at most one driver at a time (the datapath asserts this); with none enabled
// the bus reads as zero instead of floating. Purely combinational.
module tinymips_bus #(
  parameter int N = 2,    // number of drivers
  parameter int W = 32    // bus width
) (
  input  logic [N-1:0]        en,    // driver enables, at most one high
  input  logic [N-1:0][W-1:0] src,   // driver values
  output logic [W-1:0]        bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++)
      if (en[i]) bus = bus | src[i];
  end

endmodule
