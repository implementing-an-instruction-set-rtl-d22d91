// tb_tinymips_alu: checks the adder unit in its four settings (sx_sel x comp) against
// integer arithmetic: A + R[rt], A - R[rt], A + imm, A - imm, modulo 2^32.
module tb_tinymips_alu;
  import tinymips_pkg::*;

  word_t a, b, imm, sum;
  logic  sx_sel, comp;
  int checks = 0, failures = 0;

  tinymips_alu dut (.a, .b, .imm, .sx_sel, .comp, .sum);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned opnd, exp_sum;
    for (int i = 0; i < 400; i++) begin
      a = $urandom; b = $urandom; imm = $urandom;
      if (i < 8) begin a = (i[0]) ? 32'hffff_ffff : 32'h0; b = (i[1]) ? 32'h8000_0000 : 32'h1; end
      sx_sel = i[2]; comp = i[3];
      #1;
      opnd = sx_sel ? longint'(imm) : longint'(b);
      exp_sum = comp ? (longint'(a) - opnd) : (longint'(a) + opnd);
      checks++;
      if (sum != exp_sum[31:0]) begin
        failures++;
        $display("FAIL: a=%h b=%h imm=%h sx_sel=%b comp=%b sum=%h exp=%h", a, b, imm, sx_sel, comp, sum, exp_sum[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
