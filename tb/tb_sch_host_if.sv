// tb_sch_host_if: self-checking test of the host interface. It checks the
// reset pulse, run/halt, that one STEP gives exactly one enabled cycle, that
// a memory request steals exactly one cycle of the right memory with the
// right address and data and returns the word read, and the shared flag set
// and cleared from both sides.
module tb_sch_host_if;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0;
  host_cmd_e h_cmd = H_NONE;
  logic h_cmd_stb = 0, h_req = 0, h_space = 0, h_we = 0, h_ack, h_running, h_flag;
  logic [11:0] h_addr = 0;
  word_t h_wdata = 0, h_rdata;
  logic core_rst_n, run_en, set = 0, clr = 0, p_en, d_en, m_we;
  logic [11:0] m_addr;
  word_t m_wdata;
  word_t pmem [1024];
  word_t dmem [4096];
  int checks = 0, failures = 0;
  int en_cycles, steals;

  sch_host_if dut (.clk, .rst_n, .h_cmd, .h_cmd_stb, .h_req, .h_space, .h_we, .h_addr, .h_wdata,
                   .h_ack, .h_rdata, .h_running, .h_flag, .core_rst_n, .run_en,
                   .sch_flag_set(set), .sch_flag_clr(clr), .p_en, .d_en, .m_we, .m_addr, .m_wdata,
                   .p_rdata(pmem[m_addr[9:0]]), .d_rdata(dmem[m_addr]));

  always #5 clk = ~clk;

  // memory models
  always @(posedge clk) begin
    if (p_en && m_we) pmem[m_addr[9:0]] <= m_wdata;
    if (d_en && m_we) dmem[m_addr] <= m_wdata;
    if (run_en) en_cycles <= en_cycles + 1;
    if (p_en || d_en) steals <= steals + 1;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic cmd(host_cmd_e c);
    @(negedge clk); h_cmd = c; h_cmd_stb = 1;
    @(negedge clk); h_cmd_stb = 0; h_cmd = H_NONE;
  endtask

  task automatic access(logic space, logic we, logic [11:0] a, word_t d, output word_t q);
    @(negedge clk); h_req = 1; h_space = space; h_we = we; h_addr = a; h_wdata = d;
    while (!h_ack) @(negedge clk);
    q = h_rdata;
    h_req = 0;
    @(negedge clk);
  endtask

  initial begin
    word_t q;
    int s0, e0;
    for (int i = 0; i < 1024; i++) pmem[i] = word_t'(i);
    for (int i = 0; i < 4096; i++) dmem[i] = word_t'(i ^ 16'h5A5A);
    en_cycles = 0; steals = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("halted after power-on", run_en, 0);
    // reset pulse: low for exactly the cycle after the command
    @(negedge clk); h_cmd = H_RESET; h_cmd_stb = 1;
    @(posedge clk); #1; check("reset pulse", core_rst_n, 0);
    @(negedge clk); h_cmd_stb = 0; h_cmd = H_NONE;
    @(posedge clk); #1; check("reset released", core_rst_n, 1);
    // single step: exactly one enabled cycle per STEP
    e0 = en_cycles;
    for (int i = 0; i < 5; i++) begin cmd(H_STEP); repeat (3) @(negedge clk); end
    check("steps", en_cycles - e0, 5);
    // run / halt
    cmd(H_RUN);
    check("running", h_running, 1);
    e0 = en_cycles;
    repeat (10) @(negedge clk);
    check("run cycles", en_cycles - e0, 10);
    // load and examine while running: one stolen cycle per access
    s0 = steals;
    access(1'b1, 1'b1, 12'd300, 16'hCAFE, q);
    access(1'b1, 1'b0, 12'd300, 16'h0, q);
    check("data examine", q, 16'hCAFE);
    access(1'b0, 1'b1, 12'd1000, 16'hBEEF, q);
    access(1'b0, 1'b0, 12'd1000, 16'h0, q);
    check("prog examine", q, 16'hBEEF);
    access(1'b1, 1'b0, 12'd4095, 16'h0, q);
    check("data examine 2", q, 16'h0FFF ^ 16'h5A5A);
    check("one steal per access", steals - s0, 5);
    cmd(H_HALT);
    check("halted", h_running, 0);
    @(negedge clk);
    check("halted en", run_en, 0);
    // flag
    cmd(H_SETF); check("host set", h_flag, 1);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; check("sch clr", h_flag, 0);
    @(negedge clk); set = 1; @(negedge clk); set = 0; check("sch set", h_flag, 1);
    cmd(H_CLRF); check("host clr", h_flag, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
