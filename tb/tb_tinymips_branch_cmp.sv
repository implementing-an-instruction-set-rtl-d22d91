// tb_tinymips_branch_cmp: checks EQ and the R[rs] < 0 condition on equal, unequal
// (including single-bit differences) and negative operands.
module tb_tinymips_branch_cmp;
  import tinymips_pkg::*;

  word_t a, b;
  logic  eq, neg;
  int checks = 0, failures = 0, n_eq = 0, n_neg = 0;

  tinymips_branch_cmp dut (.a, .b, .eq, .neg);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      a = $urandom;
      case (i % 3)
        0: b = a;
        1: b = a ^ (32'h1 << (i % 32));
        default: b = $urandom;
      endcase
      #1;
      checks++;
      if (eq !== (a == b) || neg !== ($signed(a) < 0)) begin
        failures++;
        $display("FAIL: a=%h b=%h eq=%b neg=%b", a, b, eq, neg);
      end
      n_eq += int'(eq); n_neg += int'(neg);
    end
    checks++;
    if (n_eq == 0 || n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
