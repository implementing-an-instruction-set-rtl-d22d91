// tb_tinymips_pc_unit: drives every next-PC source with random D-bus values and checks
// the PC after the clock edge against the register transfers PC + 4,
// PC[31:28] || addr || 00, D, and PC + signEx(im16); also reset and hold (ld_pc low).
module tb_tinymips_pc_unit;
  import tinymips_pkg::*;

  localparam word_t RST = 32'h0040_0000;

  logic     clk = 1'b0, rst_n = 1'b0, ld_pc;
  npc_sel_t npc_sel;
  word_t    d, pc, expected;
  int checks = 0, failures = 0;
  int seen [4];

  tinymips_pc_unit #(.RESET_PC(RST)) dut (.clk, .rst_n, .ld_pc, .npc_sel, .d, .pc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint signed off;
    ld_pc = 0; npc_sel = NPC_INC; d = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (pc != RST) begin failures++; $display("FAIL: reset pc %h", pc); end
    #1 rst_n = 1'b1;
    expected = RST;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      ld_pc   = (i % 5) != 4;
      npc_sel = npc_sel_t'(i % 4);
      d       = $urandom;
      if (i % 7 == 0) d[15] = 1'b1;       // make sure negative offsets occur
      off = longint'($signed(d[15:0]));
      if (ld_pc) begin
        seen[npc_sel]++;
        case (npc_sel)
          NPC_INC:    expected = pc + 32'd4;
          NPC_JUMP:   expected = (pc & 32'hf000_0000) | ((d & 32'h03ff_ffff) * 4);
          NPC_DBUS:   expected = d;
          NPC_BRANCH: expected = word_t'(longint'(pc) + off);
          default:    ;
        endcase
      end
      @(posedge clk);
      #1;
      checks++;
      if (pc != expected) begin
        failures++;
        $display("FAIL: sel=%0d ld=%b d=%h pc=%h expected %h", npc_sel, ld_pc, d, pc, expected);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
