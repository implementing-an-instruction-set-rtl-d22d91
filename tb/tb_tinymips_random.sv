// tb_tinymips_random: runs randomly generated TinyMIPS programs on the processor (4 KiB
// RAM) and compares it, instruction by instruction, with a reference instruction-set
// model in this testbench.
//
// Each program has 200 instructions drawn from addu, subu, lw, sw, beq, bltz and j with
// random registers; control transfers only go forward, so every program reaches the
// closing "j self" loop. Loads use any base register (addresses wrap in the 4 KiB RAM),
// stores go to a data area above the code. After every instruction the PC, all
// registers, every stored word and the cycle count (3 or 2) are checked. Ten programs,
// each from reset.
module tb_tinymips_random;
  import tinymips_pkg::*;

  localparam int    RAM_AW = 12;
  localparam int    NINSTR = 200;
  localparam word_t HALT   = word_t'(4 * NINSTR);
  localparam int    NPROG  = 10;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  word_t  pc, ir;
  state_t state;
  logic   done;

  tinymips_top #(.RAM_AW(RAM_AW)) dut (.clk, .rst_n, .pc, .ir, .state, .done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_kind [8];   // addu subu lw sw beq-taken beq-not bltz-taken/not(6,7) ; j counted in 0..
  int n_j = 0;

  word_t m_regs [32];
  word_t m_pc;
  word_t m_mem [2 ** (RAM_AW - 2)];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic word_t widx(input word_t a);
    return (a >> 2) & word_t'(2 ** (RAM_AW - 2) - 1);
  endfunction

  task automatic iss_step(input word_t inst, output int cyc, output word_t st_addr);
    logic [5:0] opc;
    int rs, rt, rd, wr;
    word_t sx, nxt, wb;
    opc = inst[31:26]; rs = int'(inst[25:21]); rt = int'(inst[20:16]); rd = int'(inst[15:11]);
    sx = {{16{inst[15]}}, inst[15:0]};
    nxt = m_pc + 4; wb = '0; wr = 0; st_addr = '1; cyc = 3;
    case (opc)
      6'h00: begin
        if (inst[5:0] == 6'h21) begin wb = m_regs[rs] + m_regs[rt]; wr = rd; n_kind[0]++; end
        if (inst[5:0] == 6'h23) begin wb = m_regs[rs] - m_regs[rt]; wr = rd; n_kind[1]++; end
      end
      6'h23: begin wb = m_mem[widx(m_regs[rs] + sx)]; wr = rt; n_kind[2]++; end
      6'h2b: begin st_addr = m_regs[rs] + sx; m_mem[widx(st_addr)] = m_regs[rt]; n_kind[3]++; end
      6'h02: begin nxt = {m_pc[31:28], inst[25:0], 2'b00}; cyc = 2; n_j++; end
      6'h04: begin
        cyc = 2;
        if (m_regs[rs] == m_regs[rt]) begin nxt = m_pc + sx; n_kind[4]++; end else n_kind[5]++;
      end
      6'h01: begin
        cyc = 2;
        if (m_regs[rs][31]) begin nxt = m_pc + sx; n_kind[6]++; end else n_kind[7]++;
      end
      default: ;
    endcase
    if (wr != 0) m_regs[wr] = wb;
    m_pc = nxt;
  endtask

  function automatic word_t gen(input int i);
    int    kind, rs, rt, rd, fwd;
    word_t target;
    kind = int'($urandom % 100);
    rs = int'($urandom % 32); rt = int'($urandom % 32); rd = int'($urandom % 32);
    fwd = 4 * (1 + int'($urandom % 8));
    target = word_t'(4 * i + fwd);
    if (target > HALT) target = HALT;
    if (kind < 22) return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h21};
    if (kind < 40) return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h23};
    if (kind < 60) begin
      if (rs == 0 || kind < 50) return {6'h23, 5'd0, 5'(rt), 16'(32'h800 + 4 * ($urandom % 512))};
      return {6'h23, 5'(rs), 5'(rt), 16'($urandom)};
    end
    if (kind < 70) return {6'h2b, 5'd0, 5'(rt), 16'(32'h800 + 4 * ($urandom % 512))};
    if (kind < 80) begin
      if (kind < 74) rt = rs;                       // often equal, so often taken
      return {6'h04, 5'(rs), 5'(rt), 16'(target - word_t'(4 * i))};
    end
    if (kind < 92) return {6'h01, 5'(rs), 5'd0, 16'(target - word_t'(4 * i))};
    return {6'h02, target[27:2]};
  endfunction

  initial begin : watchdog
    repeat (NPROG * (3 * NINSTR + 50)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int    cyc_exp, cyc_seen, n_instr;
    word_t st_addr, inst;
    for (int p = 0; p < NPROG; p++) begin
      rst_n = 1'b0;
      for (int w = 0; w < 2 ** (RAM_AW - 2); w++) begin
        if (w < NINSTR)        m_mem[w] = gen(w);
        else if (w == NINSTR)  m_mem[w] = {6'h02, HALT[27:2]};
        else                   m_mem[w] = $urandom;
        dut.u_ram.mem[w] = m_mem[w];
      end
      for (int r = 0; r < 32; r++) m_regs[r] = '0;
      m_pc = '0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      cyc_seen = 0;
      n_instr = 0;
      forever begin
        @(negedge clk);
        cyc_seen++;
        if (done) begin
          inst = ir;
          check(inst == m_mem[widx(m_pc)], $sformatf("fetched %h at %h", inst, m_pc));
          iss_step(inst, cyc_exp, st_addr);
          check(cyc_seen == cyc_exp, $sformatf("%h took %0d cycles", inst, cyc_seen));
          cyc_seen = 0;
          n_instr++;
          @(posedge clk);
          #1;
          check(pc == m_pc, $sformatf("pc %h expected %h", pc, m_pc));
          for (int r = 0; r < 32; r++) begin
            word_t got;
            got = dut.u_dp.u_rf.regs[r];
            check(got == m_regs[r], $sformatf("prog %0d r%0d = %h expected %h", p, r, got, m_regs[r]));
          end
          if (st_addr != '1)
            check(dut.u_ram.mem[widx(st_addr)] == m_mem[widx(st_addr)], "stored word");
          if (m_pc == HALT) break;
        end
      end
    end
    for (int k = 0; k < 8; k++) check(n_kind[k] > 0, $sformatf("instruction kind %0d seen", k));
    check(n_j > 0, "j seen");
    $display("addu=%0d subu=%0d lw=%0d sw=%0d beq t/n=%0d/%0d bltz t/n=%0d/%0d j=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_kind[5], n_kind[6], n_kind[7], n_j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
