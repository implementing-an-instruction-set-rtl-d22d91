// tb_tinymips_controller: runs every TinyMIPS instruction (both outcomes of beq and bltz,
// and an undefined encoding) through the controller and compares the control points of
// every cycle with a table of the expected register-transfer control points written
// here. Also checks the cycle count per instruction (3 for addu/subu/lw/sw and the
// no-op, 2 for j/jr/beq/bltz) and the done pulse.
module tb_tinymips_controller;
  import tinymips_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [5:0] op, funct;
  reg_idx_t   rt;
  logic       eq, neg;
  ctrl_t      ctrl;
  state_t     state;
  logic       done;
  int checks = 0, failures = 0;

  tinymips_controller dut (.clk, .rst_n, .op, .funct, .rt, .eq, .neg, .ctrl, .state, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctrl_t zero();
    ctrl_t c;
    c = '0;
    c.npc_sel = NPC_INC;
    return c;
  endfunction

  // Expected control points of each cycle of one instruction.
  task automatic expect_seq(input string name, input logic [5:0] o, input logic [5:0] f,
                            input logic [4:0] t, input logic e, input logic n,
                            input ctrl_t exe, input bit has_inc);
    ctrl_t fetch, inc;
    int    ncyc;
    fetch = zero(); fetch.pc2A = 1; fetch.m2D = 1; fetch.ld_ir = 1;
    inc   = zero(); inc.ld_pc = 1; inc.npc_sel = NPC_INC;
    ncyc  = has_inc ? 3 : 2;
    for (int c = 0; c < ncyc; c++) begin
      ctrl_t want;
      @(negedge clk);
      op = o; funct = f; rt = t; eq = e; neg = n;
      #1;
      want = (c == 0) ? fetch : (c == 1) ? exe : inc;
      checks++;
      if (ctrl != want) begin
        failures++;
        $display("FAIL: %s cycle %0d ctrl=%b expected %b", name, c, ctrl, want);
      end
      checks++;
      if (done != (c == ncyc - 1)) begin
        failures++;
        $display("FAIL: %s cycle %0d done=%b", name, c, done);
      end
    end
  endtask

  initial begin
    ctrl_t x;
    op = '0; funct = '0; rt = '0; eq = 0; neg = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    x = zero(); x.s2D = 1; x.ld_reg = 1;
    expect_seq("addu", 6'h00, 6'h21, 5'd3, 0, 0, x, 1);
    x.comp = 1;
    expect_seq("subu", 6'h00, 6'h23, 5'd3, 1, 1, x, 1);
    x = zero(); x.sx_sel = 1; x.s2A = 1; x.m2D = 1; x.ld_reg = 1; x.rt_sel = 1;
    expect_seq("lw", 6'h23, 6'h15, 5'd7, 0, 1, x, 1);
    x = zero(); x.b2D = 1; x.sx_sel = 1; x.s2A = 1; x.wrt = 1;
    expect_seq("sw", 6'h2b, 6'h00, 5'd7, 1, 0, x, 1);
    x = zero(); x.i2D = 1; x.npc_sel = NPC_JUMP; x.ld_pc = 1;
    expect_seq("j", 6'h02, 6'h3f, 5'd31, 0, 0, x, 0);
    x = zero(); x.s2D = 1; x.npc_sel = NPC_DBUS; x.ld_pc = 1;
    expect_seq("jr", 6'h00, 6'h08, 5'd0, 0, 0, x, 0);
    x = zero(); x.i2D = 1; x.ld_pc = 1; x.npc_sel = NPC_BRANCH;
    expect_seq("beq taken", 6'h04, 6'h00, 5'd2, 1, 0, x, 0);
    expect_seq("bltz taken", 6'h01, 6'h00, 5'd0, 0, 1, x, 0);
    x.npc_sel = NPC_INC;
    expect_seq("beq not taken", 6'h04, 6'h00, 5'd2, 0, 1, x, 0);
    expect_seq("bltz not taken", 6'h01, 6'h00, 5'd0, 1, 0, x, 0);
    x = zero();
    expect_seq("bgez (undefined here)", 6'h01, 6'h00, 5'd1, 1, 1, x, 1);
    expect_seq("and (undefined here)", 6'h00, 6'h24, 5'd1, 1, 1, x, 1);
    // Reset in the middle of an instruction returns to fetch.
    @(negedge clk); op = 6'h23; #1;
    @(negedge clk); rst_n = 0; #1;
    checks++;
    if (state != S_FETCH) begin failures++; $display("FAIL: reset state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
