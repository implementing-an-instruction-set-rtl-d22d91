// tb_tinymips_regfile: random writes and reads on the 32-entry register file against an
// array model. Checks reset to zero, that R0 ignores writes and reads 0, that a write
// lands only at the clock edge and only with ld high, and both read ports.
module tb_tinymips_regfile;
  import tinymips_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, ld;
  reg_idx_t asel, bsel, dsel;
  word_t    d, a, b;
  word_t    model [32];
  int checks = 0, failures = 0, n_r0 = 0;

  tinymips_regfile dut (.clk, .rst_n, .asel, .bsel, .dsel, .ld, .d, .a, .b);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < 32; r++) begin
      asel = reg_idx_t'(r); bsel = reg_idx_t'(31 - r);
      #1;
      checks++;
      if (a != model[r] || b != model[31 - r]) begin
        failures++;
        $display("FAIL: R[%0d]=%h/%h model %h/%h", r, a, b, model[r], model[31 - r]);
      end
    end
  endtask

  initial begin
    ld = 0; d = '0; dsel = '0; asel = '0; bsel = '0;
    for (int r = 0; r < 32; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_reads();
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      ld   = ($urandom % 4) != 0;
      dsel = reg_idx_t'($urandom);
      if (i % 17 == 0) dsel = '0;
      d    = $urandom;
      asel = dsel; bsel = reg_idx_t'($urandom);
      #1;
      // Before the edge the old value is still visible.
      checks++;
      if (a != model[dsel]) begin failures++; $display("FAIL: early write r%0d", dsel); end
      @(posedge clk);
      if (ld && dsel != 0) model[dsel] = d;
      if (ld && dsel == 0) n_r0++;
      #1;
      checks++;
      if (a != model[asel] || b != model[bsel]) begin
        failures++;
        $display("FAIL: after write r%0d: a=%h exp %h, b(r%0d)=%h exp %h", dsel, a, model[asel], bsel, b, model[bsel]);
      end
    end
    ld = 0;
    check_reads();
    checks++;
    if (n_r0 == 0) begin failures++; $display("FAIL: no R0 write attempted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
