// tb_tinymips_top: end-to-end test of the TinyMIPS processor at its default sizes.
//
// A program that sums an array with a lw/addu/subu/beq/j loop, stores the sum, then
// exercises bltz (taken and not taken), a write to R0, jr through a loaded address and
// lw/sw with negative and positive offsets, is placed in RAM before reset. A reference
// instruction-set model in this testbench steps one instruction per done pulse; after
// every instruction the PC, all 32 registers and any stored word are compared with it,
// and the cycle count per instruction is checked (3 for addu/subu/lw/sw, 2 for
// j/jr/beq/bltz). Every instruction kind, both outcomes of each branch and every bus
// driver must have been seen at least once.
module tb_tinymips_top;
  import tinymips_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  word_t  pc, ir;
  state_t state;
  logic   done;

  tinymips_top dut (.clk, .rst_n, .pc, .ir, .state, .done);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Instruction encoders (standard MIPS field layout).
  function automatic word_t rtype(input int rs, input int rt, input int rd, input logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic word_t itype(input logic [5:0] opc, input int rs, input int rt, input int imm);
    return {opc, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t jtype(input logic [5:0] opc, input word_t target);
    return {opc, target[27:2]};
  endfunction

  // Reference model state.
  word_t m_regs [32];
  word_t m_pc;
  word_t m_mem [word_t];   // word address (byte address >> 2) -> word

  localparam int RAM_AW = 30;
  localparam word_t HALT = 32'h0000_0058;

  function automatic word_t mread(input word_t byte_addr);
    word_t wa = byte_addr >> 2;
    return m_mem.exists(wa) ? m_mem[wa] : 32'h0;
  endfunction

  task automatic put(input word_t byte_addr, input word_t w);
    m_mem[byte_addr >> 2] = w;
    dut.u_ram.mem[byte_addr[RAM_AW-1:2]] = w;
  endtask

  // Mechanism counters.
  int n_addu, n_subu, n_lw, n_sw, n_j, n_jr;
  int n_beq_t, n_beq_n, n_bltz_t, n_bltz_n, n_r0_wr, n_neg_off;
  int n_pc2A, n_s2A, n_m2D, n_b2D, n_s2D, n_i2D, n_wrt;
  int n_instr;
  word_t array_sum;

  // One reference step; returns expected cycles and the stored address (or '1).
  task automatic iss_step(input word_t inst, output int cyc, output word_t st_addr);
    logic [5:0] opc = inst[31:26];
    int rs = int'(inst[25:21]), rt = int'(inst[20:16]), rd = int'(inst[15:11]);
    word_t sx = {{16{inst[15]}}, inst[15:0]};
    word_t nxt = m_pc + 4;
    word_t wb = '0;
    int wr = 0;
    st_addr = '1;
    cyc = 3;
    if (inst[15]) n_neg_off++;
    case (opc)
      6'h00: begin
        case (inst[5:0])
          6'h21: begin wb = m_regs[rs] + m_regs[rt]; wr = rd; n_addu++; end
          6'h23: begin wb = m_regs[rs] - m_regs[rt]; wr = rd; n_subu++; end
          6'h08: begin nxt = m_regs[rs]; cyc = 2; n_jr++; end
          default: ;
        endcase
      end
      6'h23: begin wb = mread(m_regs[rs] + sx); wr = rt; n_lw++; end
      6'h2b: begin st_addr = m_regs[rs] + sx; m_mem[st_addr >> 2] = m_regs[rt]; n_sw++; end
      6'h02: begin nxt = {m_pc[31:28], inst[25:0], 2'b00}; cyc = 2; n_j++; end
      6'h04: begin
        cyc = 2;
        if (m_regs[rs] == m_regs[rt]) begin nxt = m_pc + sx; n_beq_t++; end
        else n_beq_n++;
      end
      6'h01: begin
        cyc = 2;
        if ($signed(m_regs[rs]) < 0) begin nxt = m_pc + sx; n_bltz_t++; end
        else n_bltz_n++;
      end
      default: ;
    endcase
    if (opc == 6'h00 && (inst[5:0] == 6'h21 || inst[5:0] == 6'h23) && rd == 0) n_r0_wr++;
    if (wr != 0) m_regs[wr] = wb;
    m_pc = nxt;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    n_pc2A += int'(dut.u_ctrl.ctrl.pc2A);
    n_s2A  += int'(dut.u_ctrl.ctrl.s2A);
    n_m2D  += int'(dut.u_ctrl.ctrl.m2D);
    n_b2D  += int'(dut.u_ctrl.ctrl.b2D);
    n_s2D  += int'(dut.u_ctrl.ctrl.s2D);
    n_i2D  += int'(dut.u_ctrl.ctrl.i2D);
    n_wrt  += int'(dut.u_ctrl.ctrl.wrt);
  end

  initial begin : main
    word_t prog [23];
    int    cyc_exp, cyc_seen;
    word_t st_addr;
    word_t inst;
    word_t arr [5];

    for (int i = 0; i < 32; i++) m_regs[i] = '0;
    m_pc = '0;

    prog = '{
      itype(6'h23, 0, 1, 'h100),          // 000 lw   r1, 0x100(r0)   r1 = 1
      itype(6'h23, 0, 6, 'h104),          // 004 lw   r6, 0x104(r0)   r6 = 4
      itype(6'h23, 0, 2, 'h108),          // 008 lw   r2, 0x108(r0)   r2 = count
      rtype(0, 0, 3, 6'h21),              // 00c addu r3, r0, r0      sum = 0
      rtype(0, 0, 4, 6'h21),              // 010 addu r4, r0, r0      ptr = 0
      itype(6'h04, 2, 0, 'h18),           // 014 loop: beq r2, r0, +0x18 (-> 02c)
      itype(6'h23, 4, 5, 'h110),          // 018 lw   r5, 0x110(r4)
      rtype(3, 5, 3, 6'h21),              // 01c addu r3, r3, r5
      rtype(4, 6, 4, 6'h21),              // 020 addu r4, r4, r6
      rtype(2, 1, 2, 6'h23),              // 024 subu r2, r2, r1
      jtype(6'h02, 32'h14),               // 028 j    loop
      itype(6'h2b, 0, 3, 'h200),          // 02c sw   r3, 0x200(r0)
      rtype(0, 1, 7, 6'h23),              // 030 subu r7, r0, r1      r7 = -1
      itype(6'h01, 7, 0, 'h8),            // 034 bltz r7, +8 (taken, -> 03c)
      rtype(1, 1, 8, 6'h21),              // 038 addu r8, r1, r1      skipped
      itype(6'h01, 1, 0, 'h8),            // 03c bltz r1, +8 (not taken)
      rtype(1, 1, 0, 6'h21),              // 040 addu r0, r1, r1      R0 stays 0
      itype(6'h23, 0, 9, 'h10c),          // 044 lw   r9, 0x10c(r0)   r9 = 0x50
      rtype(9, 0, 0, 6'h08),              // 048 jr   r9
      rtype(1, 1, 8, 6'h21),              // 04c addu r8, r1, r1      skipped
      itype(6'h23, 6, 10, -4),            // 050 lw   r10, -4(r6)     r10 = Mem[0]
      itype(6'h2b, 9, 10, 'h1b4),         // 054 sw   r10, 0x1b4(r9)  Mem[0x204]
      jtype(6'h02, HALT)                  // 058 halt: j halt
    };
    for (int i = 0; i < 23; i++) put(word_t'(4 * i), prog[i]);
    put(32'h100, 32'd1);
    put(32'h104, 32'd4);
    put(32'h108, 32'd5);
    put(32'h10c, 32'h50);
    array_sum = '0;
    for (int i = 0; i < 5; i++) begin
      arr[i] = $urandom;
      put(32'h110 + word_t'(4 * i), arr[i]);
      array_sum += arr[i];
    end

    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    cyc_seen = 0;
    forever begin
      @(negedge clk);
      cyc_seen++;
      if (done) begin
        inst = ir;
        check(inst == mread(m_pc), $sformatf("fetched %h at pc %h", inst, m_pc));
        iss_step(inst, cyc_exp, st_addr);
        check(cyc_seen == cyc_exp,
              $sformatf("instr %h took %0d cycles, expected %0d", inst, cyc_seen, cyc_exp));
        cyc_seen = 0;
        n_instr++;
        @(posedge clk);
        #1;
        check(pc == m_pc, $sformatf("pc %h expected %h", pc, m_pc));
        for (int r = 0; r < 32; r++) begin
          word_t got;
          got = dut.u_dp.u_rf.regs[r];
          check(got == m_regs[r], $sformatf("r%0d = %h expected %h", r, got, m_regs[r]));
        end
        check(dut.u_dp.u_rf.regs[0] == '0, "r0 storage must stay zero");
        if (st_addr != '1)
          check(dut.u_ram.mem[st_addr[RAM_AW-1:2]] == mread(st_addr),
                $sformatf("Mem[%h] after sw", st_addr));
        if (m_pc == HALT && n_j > 6) break;
      end
    end

    // Results the program computes, worked out directly.
    check(mread(32'h200) == array_sum, "model sum");
    check(dut.u_ram.mem[32'h200 >> 2] == array_sum, "stored array sum");
    check(dut.u_ram.mem[32'h204 >> 2] == prog[0], "stored word from negative offset load");
    check(dut.u_dp.u_rf.regs[7] == 32'hffff_ffff, "r7 = -1");
    check(dut.u_dp.u_rf.regs[8] == 32'h0, "skipped instructions left r8 alone");

    // Every mechanism happened.
    check(n_addu   > 0, "addu executed");
    check(n_subu   > 0, "subu executed");
    check(n_lw     > 0, "lw executed");
    check(n_sw     > 0, "sw executed");
    check(n_j      > 0, "j executed");
    check(n_jr     > 0, "jr executed");
    check(n_beq_t  > 0, "beq taken");
    check(n_beq_n  > 0, "beq not taken");
    check(n_bltz_t > 0, "bltz taken");
    check(n_bltz_n > 0, "bltz not taken");
    check(n_r0_wr  > 0, "write to R0 dropped");
    check(n_neg_off > 0, "negative immediate");
    check(n_pc2A > 0 && n_s2A > 0, "both A-bus drivers used");
    check(n_m2D > 0 && n_b2D > 0 && n_s2D > 0 && n_i2D > 0, "all D-bus drivers used");
    check(n_wrt > 0, "RAM written");
    $display("instructions=%0d addu=%0d subu=%0d lw=%0d sw=%0d j=%0d jr=%0d beq t/n=%0d/%0d bltz t/n=%0d/%0d r0wr=%0d",
             n_instr, n_addu, n_subu, n_lw, n_sw, n_j, n_jr, n_beq_t, n_beq_n, n_bltz_t, n_bltz_n, n_r0_wr);
    $display("bus drivers: pc2A=%0d s2A=%0d m2D=%0d b2D=%0d s2D=%0d i2D=%0d wrt=%0d",
             n_pc2A, n_s2A, n_m2D, n_b2D, n_s2D, n_i2D, n_wrt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
