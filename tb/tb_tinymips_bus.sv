// tb_tinymips_bus: checks a four-driver bus: with exactly one enable the bus carries that
// driver's value, with none it reads zero.
module tb_tinymips_bus;
  localparam int N = 4, W = 32;

  logic [N-1:0]        en;
  logic [N-1:0][W-1:0] src;
  logic [W-1:0]        bus;
  int checks = 0, failures = 0;

  tinymips_bus #(.N(N), .W(W)) dut (.en, .src, .bus);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expected;
    int k;
    for (int i = 0; i < 200; i++) begin
      for (int j = 0; j < N; j++) src[j] = $urandom;
      k = i % (N + 1);                   // N means no driver
      en = (k == N) ? '0 : (N'(1) << k);
      expected = (k == N) ? '0 : src[k];
      #1;
      checks++;
      if (bus != expected) begin
        failures++;
        $display("FAIL: en=%b bus=%h expected=%h", en, bus, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
