// tb_tinymips_sext: checks the sign extender on the extreme values and on random
// immediates against an arithmetic reference (signed 16-bit value widened to 32 bits).
module tb_tinymips_sext;
  import tinymips_pkg::*;

  logic [15:0] im16;
  word_t       sx;
  int checks = 0, failures = 0;

  tinymips_sext dut (.im16, .sx);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [15:0] v);
    int expected;
    im16 = v;
    #1;
    expected = int'($signed(v));       // value of the 16-bit two's complement number
    checks++;
    if ($signed(sx) != expected) begin
      failures++;
      $display("FAIL: sext(%h) = %h", v, sx);
    end
  endtask

  initial begin
    try(16'h0000); try(16'h7fff); try(16'h8000); try(16'hffff); try(16'h0001);
    for (int i = 0; i < 200; i++) try(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
