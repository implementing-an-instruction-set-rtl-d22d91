// tb_tinymips_datapath: drives the datapath's control points cycle by cycle, as a
// controller would, over a short program (lw, lw, subu, addu, sw, lw, beq, bltz, j, jr)
// held in a memory model here. Checks the A and D buses during fetch, the register
// contents and stored word after each instruction, the eq/neg conditions and the PC
// after each jump or branch, against values worked out in this testbench.
module tb_tinymips_datapath;
  import tinymips_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  ctrl_t      ctrl;
  word_t      mem_rdata, abus, dbus, pc, ir;
  logic [5:0] op, funct;
  reg_idx_t   rt;
  logic       eq, neg;
  word_t      mem [word_t];
  int checks = 0, failures = 0;

  tinymips_datapath dut (.clk, .rst_n, .ctrl, .mem_rdata, .abus, .dbus, .op, .funct, .rt,
                         .eq, .neg, .pc, .ir);

  always #5 clk = ~clk;
  always_comb mem_rdata = mem.exists(abus >> 2) ? mem[abus >> 2] : 32'h0;
  always @(posedge clk) if (ctrl.wrt) mem[abus >> 2] = dbus;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ctrl_t z();
    ctrl_t c;
    c = '0;
    c.npc_sel = NPC_INC;
    return c;
  endfunction

  task automatic cycle(input ctrl_t c);
    @(negedge clk);
    ctrl = c;
    @(posedge clk);
    #1;
  endtask

  task automatic fetch(input word_t exp_pc);
    ctrl_t c;
    c = z(); c.pc2A = 1; c.m2D = 1; c.ld_ir = 1;
    @(negedge clk);
    ctrl = c;
    #1;
    check(abus == exp_pc, $sformatf("fetch A bus %h expected %h", abus, exp_pc));
    check(dbus == mem[exp_pc >> 2], $sformatf("fetch D bus %h", dbus));
    @(posedge clk);
    #1;
    check(ir == mem[exp_pc >> 2], "IR loaded");
  endtask

  task automatic incpc();
    ctrl_t c;
    c = z(); c.ld_pc = 1;
    cycle(c);
  endtask

  task automatic do_lw();
    ctrl_t c;
    c = z(); c.sx_sel = 1; c.s2A = 1; c.m2D = 1; c.rt_sel = 1; c.ld_reg = 1;
    cycle(c); incpc();
  endtask

  task automatic do_alu(input bit sub);
    ctrl_t c;
    c = z(); c.comp = sub; c.s2D = 1; c.ld_reg = 1;
    cycle(c); incpc();
  endtask

  task automatic do_sw();
    ctrl_t c;
    c = z(); c.b2D = 1; c.sx_sel = 1; c.s2A = 1; c.wrt = 1;
    cycle(c); incpc();
  endtask

  task automatic do_branch(input bit is_beq, output bit cond);
    ctrl_t c;
    c = z(); c.i2D = 1; c.ld_pc = 1;
    @(negedge clk);
    #1;
    cond = is_beq ? eq : neg;
    c.npc_sel = cond ? NPC_BRANCH : NPC_INC;
    ctrl = c;
    @(posedge clk);
    #1;
  endtask

  initial begin
    word_t va, vb;
    bit    cond;
    ctrl = z();
    va = $urandom; vb = $urandom;
    mem[32'h00 >> 2] = {6'h23, 5'd0, 5'd1, 16'h0040};          // lw   r1, 0x40(r0)
    mem[32'h04 >> 2] = {6'h23, 5'd0, 5'd2, 16'h0044};          // lw   r2, 0x44(r0)
    mem[32'h08 >> 2] = {6'h00, 5'd1, 5'd2, 5'd3, 5'd0, 6'h23}; // subu r3, r1, r2
    mem[32'h0c >> 2] = {6'h00, 5'd1, 5'd2, 5'd5, 5'd0, 6'h21}; // addu r5, r1, r2
    mem[32'h10 >> 2] = {6'h2b, 5'd0, 5'd3, 16'h0048};          // sw   r3, 0x48(r0)
    mem[32'h14 >> 2] = {6'h23, 5'd6, 5'd4, 16'hffd0};          // lw   r4, -0x30(r6)
    mem[32'h18 >> 2] = {6'h04, 5'd1, 5'd1, 16'h0010};          // beq  r1, r1, +0x10
    mem[32'h28 >> 2] = {6'h01, 5'd0, 5'd0, 16'h0008};          // bltz r0, +8
    mem[32'h2c >> 2] = {6'h02, 26'(32'h60 >> 2)};              // j    0x60
    mem[32'h60 >> 2] = {6'h00, 5'd4, 5'd0, 5'd0, 5'd0, 6'h08}; // jr   r4
    mem[32'h40 >> 2] = va;
    mem[32'h44 >> 2] = vb;
    mem[32'h4c >> 2] = 32'h80;

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(pc == 0, "reset PC");

    fetch(32'h00); do_lw();
    check(dut.u_rf.regs[1] == va, "lw r1");
    fetch(32'h04); do_lw();
    check(dut.u_rf.regs[2] == vb, "lw r2");
    fetch(32'h08); do_alu(1);
    check(dut.u_rf.regs[3] == va - vb, "subu r3");
    fetch(32'h0c); do_alu(0);
    check(dut.u_rf.regs[5] == va + vb, "addu r5");
    fetch(32'h10); do_sw();
    check(mem[32'h48 >> 2] == va - vb, "sw r3");
    dut.u_rf.regs[6] = 32'h7c;                                 // r6 preset for the negative offset
    fetch(32'h14); do_lw();
    check(dut.u_rf.regs[4] == 32'h80, "lw r4 with a negative offset");
    check(pc == 32'h18, "PC after six instructions");
    fetch(32'h18); do_branch(1, cond);
    check(cond == 1'b1, "beq r1, r1 equal");
    check(pc == 32'h28, $sformatf("beq target %h", pc));
    fetch(32'h28); do_branch(0, cond);
    check(cond == 1'b0, "bltz r0 not negative");
    check(pc == 32'h2c, "bltz falls through");
    fetch(32'h2c);
    begin ctrl_t c; c = z(); c.i2D = 1; c.npc_sel = NPC_JUMP; c.ld_pc = 1; cycle(c); end
    check(pc == 32'h60, $sformatf("j target %h", pc));
    fetch(32'h60);
    begin ctrl_t c; c = z(); c.s2D = 1; c.npc_sel = NPC_DBUS; c.ld_pc = 1; cycle(c); end
    check(pc == 32'h80, $sformatf("jr target %h", pc));
    check(dut.u_rf.regs[0] == 0, "R0 zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
