// tb_sch_core: self-checking test of the SCH pipeline core.
//
// The core runs with program and data memories modelled in the testbench and
// an I/O port model that delays IN and OUT at random. An instruction-set
// model written independently in this file runs the same programs; the
// final registers, condition code, flag, data memory and the sequence of
// OUT words must agree.
//   * A straight-line program of N instructions must take N + 2 cycles (one
//     instruction per cycle after the pipeline fills).
//   * A taken jump must take two cycles: its own decode slot and the one
//     instruction fetched behind it, which is discarded.
//   * Random programs mix all 30 memory-register and 31 register-register
//     operations, forward conditional jumps, nested calls (up to 4 deep),
//     IN/OUT, and the pipeline is held at random (run_en low and stolen
//     cycles), which must not change any result.
// The reference model reproduces the one visible pipeline effect of the
// design: an indexed address uses X as it was before the previous
// instruction.
module tb_sch_core;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0, run_en = 0, stolen = 0;
  logic [PC_W-1:0] pc;
  word_t instr, d_rdata, d_wdata, io_wdata, io_rdata;
  logic [11:0] d_raddr, d_waddr;
  logic d_we, io_rd, io_wr, io_rdy, flag_set, flag_clr;
  logic [2:0] io_port;
  word_t ra, rb, rx, rp, rm;
  cc_t cc;
  logic ev_retire, ev_flush, ev_bypass, ev_io_stall, ev_stack_ovf;
  logic flag;

  word_t prog [1024];
  word_t dmem [4096];
  word_t dinit [4096];
  int checks = 0, failures = 0;
  int n_bypass, n_flush, n_stall;

  sch_core dut (.clk, .rst_n, .run_en, .stolen, .pc, .instr,
                .d_raddr, .d_rdata, .d_we, .d_waddr, .d_wdata,
                .io_rd, .io_wr, .io_port, .io_wdata, .io_rdata, .io_rdy,
                .flag, .flag_set, .flag_clr,
                .reg_a(ra), .reg_b(rb), .reg_x(rx), .reg_p(rp), .reg_m(rm), .cc,
                .ev_retire, .ev_flush, .ev_bypass, .ev_io_stall, .ev_stack_ovf);

  always #5 clk = ~clk;

  assign instr   = prog[pc];
  assign d_rdata = dmem[d_raddr];

  // I/O model: IN returns 0x1000 + k for the k-th word, OUT words are logged
  int in_count, io_delay;
  word_t outs [$];
  bit io_random;
  assign io_rdy   = (io_delay == 0);
  assign io_rdata = word_t'(16'h1000 + in_count);

  always @(posedge clk) begin
    if (d_we) dmem[d_waddr] <= d_wdata;
    if (flag_set) flag <= 1'b1;
    if (flag_clr) flag <= 1'b0;
    if (ev_bypass) n_bypass++;
    if (ev_flush) n_flush++;
    if (ev_io_stall) n_stall++;
    if ((io_rd || io_wr) && io_rdy) begin
      if (io_rd) in_count <= in_count + 1;
      if (io_wr) outs.push_back(io_wdata);
      io_delay <= io_random ? $urandom_range(0, 3) : 0;
    end else if (io_delay > 0) io_delay <= io_delay - 1;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------- instruction-set model
  word_t  m_a, m_b, m_x, m_xprev;
  logic [31:0] m_acc;
  logic   m_n, m_z, m_c, m_v, m_flag;
  word_t  m_mem [4096];
  logic [9:0] m_stack [4];
  int     m_sp;
  word_t  m_outs [$];
  int     m_in;

  function automatic bit cond(int c);
    case (c)
      0: return 1;  1: return m_z;  2: return !m_z; 3: return m_n;
      4: return !m_n; 5: return m_c; 6: return !m_c; 7: return m_v;
      8: return !m_v; 9: return m_n != m_v; 10: return m_n == m_v;
      11: return !m_z && (m_n == m_v); 12: return m_z || (m_n != m_v);
      13: return m_flag; 14: return !m_flag;
      default: return 0;
    endcase
  endfunction

  function automatic void nz(word_t y);
    m_n = y[15]; m_z = (y == 0); m_v = 0;
  endfunction

  // add/sub with full flags; sub: borrow in C
  function automatic word_t arith(word_t a, word_t b, bit sub, int cin);
    int r, s;
    if (!sub) begin
      r = int'(a) + int'(b) + cin;
      s = int'($signed(a)) + int'($signed(b)) + cin;
      m_c = r > 65535;
    end else begin
      r = int'(a) - int'(b) - cin;
      s = int'($signed(a)) - int'($signed(b)) - cin;
      m_c = r < 0;
    end
    m_n = r[15]; m_z = (r[15:0] == 0); m_v = (s > 32767) || (s < -32768);
    return r[15:0];
  endfunction

  task automatic model_run(int maxsteps, int end_pc);
    int p, steps;
    word_t xbefore;
    p = 0; steps = 0;
    m_xprev = m_x;
    while (p != end_pc && steps < maxsteps) begin
      word_t ir;
      ir = prog[p];
      xbefore = m_x;
      steps++;
      if (ir[15:14] == 2'b00) begin
        p = cond(ir[13:10]) ? int'(ir[9:0]) : p + 1;
      end else if (ir[15:10] == 6'b010000) begin
        m_sp = (m_sp + 1) % 4; m_stack[m_sp] = 10'(p + 1); p = ir[9:0];
      end else if (ir[15:10] == 6'b010001) begin
        p = m_stack[m_sp]; m_sp = (m_sp + 3) % 4;
      end else if (ir[15:12] == 4'b0101) begin
        int n;
        word_t t;
        n = ir[11:8];
        case (ir[4:0])
          1: begin m_b = m_a; nz(m_b); end
          2: begin m_a = m_b; nz(m_a); end
          3: m_x = m_a;
          4: begin m_a = m_x; nz(m_a); end
          5: m_x = m_b;
          6: begin m_b = m_x; nz(m_b); end
          7: begin m_a = m_acc[31:16]; nz(m_a); end
          8: begin m_a = m_acc[15:0]; nz(m_a); end
          9: m_acc[31:16] = m_a;
          10: m_acc[15:0] = m_a;
          11: begin t = m_a; m_a = m_b; m_b = t; end
          12: begin m_a = 0; nz(0); end
          13: begin m_b = 0; nz(0); end
          14: m_acc = 0;
          15: m_a = arith(0, m_a, 1, 0);
          16: begin m_a = ~m_a; nz(m_a); end
          17: m_a = arith(m_a, 1, 0, 0);
          18: m_a = arith(m_a, 1, 1, 0);
          19: begin bit c; c = m_c; m_x = arith(m_x, 1, 0, 0); m_c = c; end
          20: begin bit c; c = m_c; m_x = arith(m_x, 1, 1, 0); m_c = c; end
          21: m_a = arith(m_a, m_b, 0, 0);
          22: m_a = arith(m_a, m_b, 1, 0);
          23: begin if (n != 0) m_c = m_a[16 - n]; m_a = m_a << n; nz(m_a); end
          24: begin if (n != 0) m_c = m_a[n - 1]; m_a = word_t'($signed(m_a) >>> n); nz(m_a); end
          25: begin if (n != 0) m_c = m_a[n - 1]; m_a = m_a >> n; nz(m_a); end
          26: begin m_a = (m_a << n) | word_t'({16'd0, m_a} >> (16 - n)); nz(m_a); end
          27: m_acc = m_acc << n;
          28: m_acc = 32'($signed(m_acc) >>> n);
          29: m_flag = 1;
          30: m_flag = 0;
          default: ;
        endcase
        p++;
      end else if (ir[15:12] == 4'b0110) begin
        if (ir[11]) m_outs.push_back(m_a);
        else begin m_a = word_t'(16'h1000 + m_in); m_in++; end
        p++;
      end else if (ir[15]) begin
        int ea;
        word_t mv;
        longint prod;
        ea = ir[8] ? ((int'(m_xprev) + int'(ir[7:0])) % 4096) : int'(ir[7:0]);
        mv = m_mem[ea];
        prod = longint'($signed(m_a)) * longint'($signed(mv));
        case (ir[14:10])
          0: begin m_a = mv; nz(mv); end
          1: begin m_b = mv; nz(mv); end
          2: begin m_x = mv; nz(mv); end
          3: m_acc[31:16] = mv;
          4: m_acc[15:0] = mv;
          5: m_mem[ea] = m_a;
          6: m_mem[ea] = m_b;
          7: m_mem[ea] = m_x;
          8: m_mem[ea] = m_acc[31:16];
          9: m_mem[ea] = m_acc[15:0];
          10: m_a = arith(m_a, mv, 0, 0);
          11: m_b = arith(m_b, mv, 0, 0);
          12: m_a = arith(m_a, mv, 1, 0);
          13: m_b = arith(m_b, mv, 1, 0);
          14: m_a = arith(m_a, mv, 0, int'(m_c));
          15: m_a = arith(m_a, mv, 1, int'(m_c));
          16: begin m_a = m_a & mv; nz(m_a); end
          17: begin m_a = m_a | mv; nz(m_a); end
          18: begin m_a = m_a ^ mv; nz(m_a); end
          19: void'(arith(m_a, mv, 1, 0));
          20: void'(arith(m_b, mv, 1, 0));
          21: m_x = word_t'(m_x + mv);
          22: m_acc = 32'(prod);
          23: m_acc = m_acc + 32'(prod);
          24: m_acc = m_acc - 32'(prod);
          25: m_mem[ea] = arith(mv, 1, 0, 0);
          26: m_mem[ea] = arith(mv, 1, 1, 0);
          27: begin m_b = m_b & mv; nz(m_b); end
          28: begin m_b = m_b | mv; nz(m_b); end
          29: nz(mv);
          default: ;
        endcase
        p++;
      end else p++;
      // only instructions that reach the execute level move the X history
      if (!(ir[15:14] == 2'b00 || ir[15:11] == 5'b01000)) m_xprev = xbefore;
      else m_xprev = m_x;
    end
    if (p != end_pc) begin
      failures++;
      $display("FAIL model did not reach end");
    end
  endtask

  // ------------------------------------------------------ program builder
  int pgen;
  function automatic word_t rand_alu_instr();
    int k;
    k = $urandom_range(0, 9);
    if (k < 5) begin
      logic [4:0] o;
      o = 5'($urandom_range(0, 29));
      return i_mr(mop_e'(o), 1'($urandom), 8'($urandom));
    end else if (k < 9) begin
      return i_rr(rop_e'($urandom_range(0, 30)), 4'($urandom));
    end else begin
      return $urandom_range(0, 1) ? i_in(3'($urandom)) : i_out(3'($urandom));
    end
  endfunction

  task automatic build_random(output int end_pc);
    int p;
    // four nested subroutines at 800, 850, 900, 950
    for (int s = 0; s < 4; s++) begin
      p = 800 + 50 * s;
      for (int i = 0; i < 6; i++) prog[p++] = rand_alu_instr();
      if (s < 3 && $urandom_range(0, 1)) prog[p++] = i_call(10'(850 + 50 * s));
      prog[p++] = rand_alu_instr();
      prog[p++] = i_ret();
    end
    p = 0;
    while (p < 300) begin
      int k;
      k = $urandom_range(0, 19);
      if (k == 0) prog[p++] = i_call(10'(800 + 50 * $urandom_range(0, 3)));
      else if (k < 4) prog[p++] = i_jmp(cond_e'($urandom_range(0, 15)), 10'((p + $urandom_range(1, 4) > 300) ? 300 : p + $urandom_range(1, 4)));
      else prog[p++] = rand_alu_instr();
    end
    for (int i = 0; i < 8; i++) prog[p + i] = i_rr(R_NOP);
    prog[p] = i_jmp(C_ALW, 10'(p));
    end_pc = p;
  endtask

  task automatic reset_all();
    rst_n = 0; run_en = 0;
    flag = 0; in_count = 0; io_delay = 0; outs.delete();
    repeat (2) @(negedge clk);
    for (int i = 0; i < 4096; i++) begin dinit[i] = 16'($urandom); dmem[i] = dinit[i]; m_mem[i] = dinit[i]; end
    m_a = 0; m_b = 0; m_x = 0; m_acc = 0; m_n = 0; m_z = 0; m_c = 0; m_v = 0; m_flag = 0;
    m_sp = 0; for (int i = 0; i < 4; i++) m_stack[i] = 0; m_outs.delete(); m_in = 0;
    rst_n = 1;
  endtask

  task automatic compare(string tag);
    check({tag, " A"}, ra, m_a);
    check({tag, " B"}, rb, m_b);
    check({tag, " X"}, rx, m_x);
    check({tag, " P"}, rp, m_acc[31:16]);
    check({tag, " MLSB"}, rm, m_acc[15:0]);
    check({tag, " CC"}, cc, {m_n, m_z, m_c, m_v});
    check({tag, " flag"}, flag, m_flag);
    check({tag, " outs"}, outs.size(), m_outs.size());
    for (int i = 0; i < outs.size() && i < m_outs.size(); i++) check({tag, " out"}, outs[i], m_outs[i]);
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 4096; i++) if (dmem[i] != m_mem[i]) bad++;
      check({tag, " dmem words differing"}, bad, 0);
    end
  endtask

  // run the core until pc sits on end_pc with the pipeline drained
  task automatic core_run(int end_pc, bit hold, output int cycles);
    int at_end;
    cycles = 0; at_end = 0;
    while (at_end < 4 && cycles < 20000) begin
      @(negedge clk);
      run_en = hold ? ($urandom_range(0, 3) != 0) : 1'b1;
      stolen = hold ? ($urandom_range(0, 9) == 0) : 1'b0;
      @(posedge clk);
      cycles++;
      if (dut.d_pc == 10'(end_pc) && dut.d_valid) at_end++;
    end
    @(negedge clk); run_en = 0; stolen = 0;
  endtask

  initial begin
    int end_pc, cyc, total_rand;
    n_bypass = 0; n_flush = 0; n_stall = 0;
    // 1. throughput: 100 straight-line instructions then an end loop
    reset_all();
    for (int i = 0; i < 1024; i++) prog[i] = i_rr(R_NOP);
    for (int i = 0; i < 100; i++) prog[i] = i_rr(R_INCA);
    prog[100] = i_jmp(C_ALW, 10'd100);
    @(negedge clk); run_en = 1;
    cyc = 0;
    while (ra != 16'd100 && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    check("100 instructions in 102 cycles", cyc, 102);
    run_en = 0;
    // 2. a taken jump occupies the decode level for one cycle and discards
    //    the one instruction fetched behind it
    reset_all();
    prog[0] = i_rr(R_INCA);
    prog[1] = i_jmp(C_ALW, 10'd5);
    prog[5] = i_rr(R_INCA);
    prog[6] = i_jmp(C_ALW, 10'd6);
    @(negedge clk); run_en = 1;
    cyc = 0;
    while (ra != 16'd2 && cyc < 100) begin @(posedge clk); #1; cyc++; end
    check("2 instructions + jump", cyc, 2 + 2 + 1 + 1);
    run_en = 0;
    // 3. random programs
    total_rand = 0;
    for (int r = 0; r < 40; r++) begin
      for (int i = 0; i < 1024; i++) prog[i] = i_rr(R_NOP);
      reset_all();
      io_random = (r % 2 == 1);
      build_random(end_pc);
      model_run(5000, end_pc);
      core_run(end_pc, r % 3 == 2, cyc);
      total_rand += cyc;
      compare($sformatf("prog%0d", r));
    end
    check("bypasses seen", n_bypass > 0, 1);
    check("flushes seen", n_flush > 0, 1);
    check("io stalls seen", n_stall > 0, 1);
    $display("random programs: %0d cycles, %0d bypasses, %0d flushes, %0d io stall cycles",
             total_rand, n_bypass, n_flush, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
