// tb_two_sch: two full-size SCH systems joined by their links, once wire to
// wire and once through a 256-word FIFO module, the two ways of connecting
// processors that the link scheme allows.
//
// Processor A produces a pseudo-random word sequence
// (s <- low 16 bits of s*25173, plus 13849). It first sends BURST words on
// its link port 2, which goes through a FIFO module to port 2 of processor B,
// while B is still halted; the FIFO has to hold them all. It then sends
// STREAM more words on its link port 1, wired straight to port 1 of B, and
// stalls on each word until B takes it. Once B is started it reads the burst
// from port 2 and the stream from port 1, adds every word into a sum in its
// data memory, and sets the shared flag when done. The test checks every
// word B reads against the sequence, the FIFO fill level while B is halted,
// that A stalled while B was not reading, B's sum as read back by its host,
// and that the wire-to-wire transfer rate never beats the 4-cycle word time
// of the link handshake.
module tb_two_sch;
  import sch_pkg::*;

  localparam int BURST = 200, STREAM = 300;
  localparam int K = 25173, C = 13849;
  localparam logic [7:0] SEED = 32, KW = 33, CW = 34, CNT = 35, CNT2 = 36, SUM = 37;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // per-processor host and pin signals, index 0 = A, 1 = B
  host_cmd_e   h_cmd [2];
  logic [1:0]  h_cmd_stb = '0, h_req = '0, h_space = '0, h_we = '0, h_ack, h_running, h_flag;
  logic [11:0] h_addr [2];
  word_t       h_wdata [2], h_rdata [2];
  real         vout [2];
  word_t       dac_code [2];
  logic [1:0]  dac_strobe, subrate_tick;
  logic [15:0] ovr [2], unr [2];
  word_t       xin_data [2][2], xout_data [2][2];
  logic [1:0]  xin_ack [2], xin_ask [2], xin_init_i [2], xin_init_o [2], xin_err_i [2], xin_err_o [2];
  logic [1:0]  xout_ack [2], xout_ask [2], xout_init_i [2], xout_init_o [2], xout_err_i [2], xout_err_o [2];
  logic [1:0]  ev_retire, ev_flush, ev_bypass, ev_io_stall, ev_steal, ev_stack_ovf;
  logic [9:0]  pc [2];

  for (genvar i = 0; i < 2; i++) begin : g_sch
    sch_system u (
      .clk, .rst_n, .h_cmd(h_cmd[i]), .h_cmd_stb(h_cmd_stb[i]), .h_req(h_req[i]), .h_space(h_space[i]),
      .h_we(h_we[i]), .h_addr(h_addr[i]), .h_wdata(h_wdata[i]), .h_ack(h_ack[i]), .h_rdata(h_rdata[i]),
      .h_running(h_running[i]), .h_flag(h_flag[i]),
      .vin(0.0), .vout(vout[i]), .dac_code(dac_code[i]), .dac_strobe(dac_strobe[i]),
      .adc_overruns(ovr[i]), .dac_underruns(unr[i]), .subrate_tick(subrate_tick[i]),
      .xin_data(xin_data[i]), .xin_ack(xin_ack[i]), .xin_ask(xin_ask[i]), .xin_init_i(xin_init_i[i]),
      .xin_init_o(xin_init_o[i]), .xin_err_i(xin_err_i[i]), .xin_err_o(xin_err_o[i]),
      .xout_data(xout_data[i]), .xout_ack(xout_ack[i]), .xout_ask(xout_ask[i]), .xout_init_i(xout_init_i[i]),
      .xout_err_i(xout_err_i[i]), .xout_init_o(xout_init_o[i]), .xout_err_o(xout_err_o[i]),
      .ev_retire(ev_retire[i]), .ev_flush(ev_flush[i]), .ev_bypass(ev_bypass[i]),
      .ev_io_stall(ev_io_stall[i]), .ev_steal(ev_steal[i]), .ev_stack_ovf(ev_stack_ovf[i]), .pc(pc[i])
    );
  end

  // A port 1 -> B port 1, wire to wire
  assign xin_data[1][0]     = xout_data[0][0];
  assign xin_ack[1][0]      = xout_ack[0][0];
  assign xout_ask[0][0]     = xin_ask[1][0];
  assign xin_init_i[1][0]   = xout_init_o[0][0];
  assign xout_init_i[0][0]  = xin_init_o[1][0];
  assign xin_err_i[1][0]    = xout_err_o[0][0];
  assign xout_err_i[0][0]   = xin_err_o[1][0];

  // A port 2 -> FIFO module -> B port 2
  sch_link l_fi (.clk, .rst_n);
  sch_link l_fo (.clk, .rst_n);
  logic [8:0] fifo_count;
  sch_fifo u_fifo (.clk, .rst_n, .count(fifo_count), .in(l_fi), .out(l_fo));
  assign l_fi.data          = xout_data[0][1];
  assign l_fi.ack           = xout_ack[0][1];
  assign l_fi.init_s        = xout_init_o[0][1];
  assign l_fi.err_s         = xout_err_o[0][1];
  assign xout_ask[0][1]     = l_fi.ask;
  assign xout_init_i[0][1]  = l_fi.init_a;
  assign xout_err_i[0][1]   = l_fi.err_a;
  assign xin_data[1][1]     = l_fo.data;
  assign xin_ack[1][1]      = l_fo.ack;
  assign xin_init_i[1][1]   = l_fo.init_s;
  assign xin_err_i[1][1]    = l_fo.err_s;
  assign l_fo.ask           = xin_ask[1][1];
  assign l_fo.init_a        = xin_init_o[1][1];
  assign l_fo.err_a         = xin_err_o[1][1];

  // unused ends: B's outputs and A's inputs stay idle
  assign xin_data[0][0] = '0;  assign xin_data[0][1] = '0;
  assign xin_ack[0]     = '0;  assign xin_init_i[0] = '0;  assign xin_err_i[0] = '0;
  assign xout_ask[1]    = '0;  assign xout_init_i[1] = '0; assign xout_err_i[1] = '0;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic cmd(int i, host_cmd_e c);
    @(negedge clk); h_cmd[i] = c; h_cmd_stb[i] = 1;
    @(negedge clk); h_cmd_stb[i] = 0; h_cmd[i] = H_NONE;
  endtask

  task automatic access(int i, logic space, logic we, int a, word_t d, output word_t q);
    @(negedge clk); h_req[i] = 1; h_space[i] = space; h_we[i] = we; h_addr[i] = 12'(a); h_wdata[i] = d;
    while (!h_ack[i]) @(negedge clk);
    q = h_rdata[i];
    h_req[i] = 0;
    @(negedge clk);
  endtask

  task automatic poke(int i, logic space, int a, word_t d);
    word_t q;
    access(i, space, 1'b1, a, d, q);
  endtask

  // ------------------------------------------------------------ programs
  word_t prog [2][64];
  int plen [2];

  task automatic build();
    int p, l1, l2;
    for (int i = 0; i < 2; i++) for (int a = 0; a < 64; a++) prog[i][a] = i_rr(R_NOP);
    // A: producer
    p = 0;
    prog[0][p++] = i_mr(M_LDA, 0, SEED);
    l1 = p;
    prog[0][p++] = i_mr(M_MPY, 0, KW);
    prog[0][p++] = i_rr(R_TMA);
    prog[0][p++] = i_mr(M_ADDA, 0, CW);
    prog[0][p++] = i_mr(M_STA, 0, SEED);
    prog[0][p++] = i_out(3'd2);
    prog[0][p++] = i_mr(M_DECM, 0, CNT);
    prog[0][p++] = i_jmp(C_NE, 10'(l1));
    l2 = p;
    prog[0][p++] = i_mr(M_MPY, 0, KW);
    prog[0][p++] = i_rr(R_TMA);
    prog[0][p++] = i_mr(M_ADDA, 0, CW);
    prog[0][p++] = i_mr(M_STA, 0, SEED);
    prog[0][p++] = i_out(3'd1);
    prog[0][p++] = i_mr(M_DECM, 0, CNT2);
    prog[0][p++] = i_jmp(C_NE, 10'(l2));
    prog[0][p] = i_jmp(C_ALW, 10'(p));
    p++;
    plen[0] = p;
    // B: consumer
    p = 0;
    l1 = p;
    prog[1][p++] = i_in(3'd2);
    prog[1][p++] = i_mr(M_ADDA, 0, SUM);
    prog[1][p++] = i_mr(M_STA, 0, SUM);
    prog[1][p++] = i_mr(M_DECM, 0, CNT);
    prog[1][p++] = i_jmp(C_NE, 10'(l1));
    l2 = p;
    prog[1][p++] = i_in(3'd1);
    prog[1][p++] = i_mr(M_ADDA, 0, SUM);
    prog[1][p++] = i_mr(M_STA, 0, SUM);
    prog[1][p++] = i_mr(M_DECM, 0, CNT2);
    prog[1][p++] = i_jmp(C_NE, 10'(l2));
    prog[1][p++] = i_rr(R_SETF);
    prog[1][p] = i_jmp(C_ALW, 10'(p));
    p++;
    plen[1] = p;
  endtask

  // -------------------------------------------------------------- monitor
  int seq [BURST + STREAM];
  int n2, n1, fifo_max, a_stalls, first1, last1, min_gap, prev1;
  longint cyc;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (!h_running[1] && int'(fifo_count) > fifo_max) fifo_max = int'(fifo_count);
      if (!h_running[1] && h_running[0] && ev_io_stall[0]) a_stalls++;
      if (g_sch[1].u.io_rd && g_sch[1].u.io_rdy) begin
        if (g_sch[1].u.io_port == 3'd2) begin
          check($sformatf("burst word %0d via FIFO", n2), int'(g_sch[1].u.io_rdata), seq[n2]);
          n2++;
        end else if (g_sch[1].u.io_port == 3'd1) begin
          check($sformatf("stream word %0d wire to wire", n1), int'(g_sch[1].u.io_rdata), seq[BURST + n1]);
          if (n1 == 0) first1 = int'(cyc);
          else if (int'(cyc) - prev1 < min_gap) min_gap = int'(cyc) - prev1;
          prev1 = int'(cyc);
          last1 = int'(cyc);
          n1++;
        end
      end
    end
  end

  initial begin
    int s, sum;
    word_t q;
    cyc = 0; n1 = 0; n2 = 0; fifo_max = 0; a_stalls = 0; min_gap = 1000000; prev1 = 0;
    for (int i = 0; i < 2; i++) begin h_cmd[i] = H_NONE; h_addr[i] = '0; h_wdata[i] = '0; end
    s = 1; sum = 0;
    for (int n = 0; n < BURST + STREAM; n++) begin
      s = (s * K + C) & 32'h0000_FFFF;
      seq[n] = s;
      sum += s;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    build();
    for (int i = 0; i < 2; i++) begin
      cmd(i, H_RESET);
      cmd(i, H_CLRF);
      for (int a = 0; a < plen[i]; a++) poke(i, 1'b0, a, prog[i][a]);
      poke(i, 1'b1, SEED, 16'd1);
      poke(i, 1'b1, KW, word_t'(K));
      poke(i, 1'b1, CW, word_t'(C));
      poke(i, 1'b1, CNT, word_t'(BURST));
      poke(i, 1'b1, CNT2, word_t'(STREAM));
      poke(i, 1'b1, SUM, 16'd0);
    end
    // A alone: the burst fills the FIFO, then A stalls on the wired link
    cmd(0, H_RUN);
    repeat (BURST * 12 + 500) @(negedge clk);
    check("FIFO module holds the whole burst (plus the words in its link registers)",
          fifo_max >= BURST - 2 && fifo_max <= BURST, 1);
    check("A stalls while B does not read", a_stalls > 100, 1);
    check("nothing read by halted B", n1 + n2, 0);
    // start B
    cmd(1, H_RUN);
    while (!h_flag[1]) @(negedge clk);
    check("burst words received", n2, BURST);
    check("stream words received", n1, STREAM);
    access(1, 1'b1, 1'b0, SUM, 16'd0, q);
    check("sum in B's memory", int'(q), sum & 32'h0000_FFFF);
    $display("wire-to-wire stream: %0d words in %0d cycles, closest spacing %0d cycles",
             n1, last1 - first1, min_gap);
    check("no word faster than the 4-cycle handshake", min_gap >= 4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
