// tb_tinymips_ram: random word writes and reads against an associative-array model, at
// a 4 KiB size. Checks the combinational read, that writes land only with wrt high, that
// the two low address bits are ignored, and read-after-write in the next cycle.
module tb_tinymips_ram;
  import tinymips_pkg::*;

  localparam int AW = 12;

  logic  clk = 1'b0, wrt;
  word_t addr, wdata, rdata;
  word_t model [int];
  int checks = 0, failures = 0, n_wr = 0;

  tinymips_ram #(.AW(AW)) dut (.clk, .addr, .wdata, .wrt, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    wrt = 0; addr = '0; wdata = '0;
    // Fill the memory so every word read later is known.
    for (int i = 0; i < 2 ** (AW - 2); i++) begin
      @(negedge clk);
      addr = word_t'(4 * i); wdata = $urandom; wrt = 1;
      model[i] = wdata;
      @(posedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      idx   = int'($urandom % (2 ** (AW - 2)));
      addr  = word_t'(4 * idx) | word_t'($urandom % 4);
      wdata = $urandom;
      wrt   = ($urandom % 2) == 1;
      #1;
      checks++;
      if (rdata != model[idx]) begin
        failures++;
        $display("FAIL: read %h = %h expected %h", addr, rdata, model[idx]);
      end
      @(posedge clk);
      if (wrt) begin model[idx] = wdata; n_wr++; end
      #1;
      checks++;
      if (rdata != model[idx]) begin
        failures++;
        $display("FAIL: after edge %h = %h expected %h", addr, rdata, model[idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
