// tb_tinymips_ir: loads random words into the instruction register and checks every
// field against the MIPS field layout, that the IR holds while ld_ir is low, and reset.
module tb_tinymips_ir;
  import tinymips_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, ld_ir;
  word_t       d, ir;
  logic [5:0]  op, funct;
  reg_idx_t    rs, rt, rd;
  logic [15:0] im16;
  word_t       held;
  int checks = 0, failures = 0;

  tinymips_ir dut (.clk, .rst_n, .ld_ir, .d, .ir, .op, .rs, .rt, .rd, .funct, .im16);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_ir = 0; d = '0; held = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (ir != '0) begin failures++; $display("FAIL: reset value %h", ir); end
    #1 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ld_ir = (i % 3) != 2;
      d = $urandom;
      @(posedge clk);
      if (ld_ir) held = d;
      #1;
      checks++;
      if (ir != held || op != held / (2 ** 26) || rs != (held / (2 ** 21)) % 32 ||
          rt != (held / (2 ** 16)) % 32 || rd != (held / (2 ** 11)) % 32 ||
          funct != held % 64 || im16 != held % 65536) begin
        failures++;
        $display("FAIL: ir=%h expected %h fields %h %h %h %h %h %h", ir, held, op, rs, rt, rd, funct, im16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
