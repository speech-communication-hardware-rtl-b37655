// tb_lpc_analysis: workload test, the analysis front end of a linear
// prediction vocoder on the full-size SCH system: 8 kHz input from the A/D
// converter, a 200-sample (25 ms) analysis window advanced by 80 samples
// (10 ms) per frame, and the 11 autocorrelation values R[0..10] that a
// 10-predictor analysis starts from.
//
// Rate generator 0 divides the 5 MHz (200 ns) clock by 625 (8 kHz). The
// program reads the 80 new samples of each frame with IN (the I/O stall
// waits for the converter), keeps 12 bits of each (arithmetic shift right
// by 4), and computes R[k] = sum over n of w[n]*w[n+k] for n = 0..199-k with
// the multiplier-accumulator, one loop per lag in which the lag is the
// offset of an indexed MAC. Each R[k] goes out on link port 1 as two words,
// P then MLSB, and the window is then shifted down by 80 samples. The test
// acts as the acceptor on that link, rebuilds the samples the program read,
// compares every R[k] with its own sum, checks that no A/D sample was lost,
// and measures the processor cycles each frame takes against the 50,000
// cycles of a 10 ms frame.
module tb_lpc_analysis;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0;
  host_cmd_e h_cmd = H_NONE;
  logic h_cmd_stb = 0, h_req = 0, h_space = 0, h_we = 0, h_ack, h_running, h_flag;
  logic [11:0] h_addr = 0;
  word_t h_wdata = 0, h_rdata;
  real vin = 0.0, vout;
  word_t dac_code;
  logic dac_strobe, subrate_tick;
  logic [15:0] ovr, unr;
  word_t xin_data [2], xout_data [2];
  logic [1:0] xin_ask, xin_init_o, xin_err_o, xout_ack, xout_init_o, xout_err_o;
  logic [1:0] xout_ask = 2'b00;
  logic ev_retire, ev_flush, ev_bypass, ev_io_stall, ev_steal, ev_stack_ovf;
  logic [9:0] pc;

  sch_system dut (
    .clk, .rst_n, .h_cmd, .h_cmd_stb, .h_req, .h_space, .h_we, .h_addr, .h_wdata,
    .h_ack, .h_rdata, .h_running, .h_flag,
    .vin, .vout, .dac_code, .dac_strobe, .adc_overruns(ovr), .dac_underruns(unr), .subrate_tick,
    .xin_data, .xin_ack(2'b00), .xin_ask, .xin_init_i(2'b00), .xin_init_o, .xin_err_i(2'b00), .xin_err_o,
    .xout_data, .xout_ack, .xout_ask, .xout_init_i(2'b00), .xout_err_i(2'b00), .xout_init_o, .xout_err_o,
    .ev_retire, .ev_flush, .ev_bypass, .ev_io_stall, .ev_steal, .ev_stack_ovf, .pc
  );
  assign xin_data[0] = '0;
  assign xin_data[1] = '0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic cmd(host_cmd_e c);
    @(negedge clk); h_cmd = c; h_cmd_stb = 1;
    @(negedge clk); h_cmd_stb = 0; h_cmd = H_NONE;
  endtask

  task automatic poke(logic space, int a, word_t d);
    @(negedge clk); h_req = 1; h_space = space; h_we = 1; h_addr = 12'(a); h_wdata = d;
    while (!h_ack) @(negedge clk);
    h_req = 0;
    @(negedge clk);
  endtask

  // ------------------------------------------------------------- layout
  localparam int FS_HZ = 8000, PERIOD = 625, N = 200, L = 80, LAGS = 11, FRAMES = 4;
  localparam int FRAME_CYCLES = 50000;
  localparam int BUF = 256;
  localparam logic [7:0] CNT = 32, NK = 40, RGP = 60, CTL = 61, BNEW = 62, BBASE = 63,
                         LNEW = 64, NKEEP = 65;

  word_t prog [1024];
  int plen;
  function automatic void at(int a, word_t w);
    prog[a] = w;
    if (a >= plen) plen = a + 1;
  endfunction

  task automatic build();
    int p, top, lp;
    for (int i = 0; i < 1024; i++) prog[i] = i_rr(R_NOP);
    plen = 0;
    p = 0;
    at(p++, i_mr(M_LDA, 0, RGP)); at(p++, i_out(IO_RG0));
    at(p++, i_mr(M_LDA, 0, CTL)); at(p++, i_out(IO_RGCTL));
    top = p;                                          // frame: read L new samples
    at(p++, i_mr(M_LDX, 0, BNEW));
    at(p++, i_mr(M_LDA, 0, LNEW));
    at(p++, i_mr(M_STA, 0, CNT));
    lp = p;
    at(p++, i_in(IO_DATA0));
    at(p++, i_rr(R_ASR, 4'd4));
    at(p++, i_mr(M_STA, 1, 0));
    at(p++, i_rr(R_INX));
    at(p++, i_mr(M_DECM, 0, CNT));
    at(p++, i_jmp(C_NE, 10'(lp)));
    for (int k = 0; k < LAGS; k++) begin              // one loop per lag
      at(p++, i_mr(M_LDX, 0, BBASE));
      at(p++, i_mr(M_LDA, 0, NK + k));
      at(p++, i_mr(M_STA, 0, CNT));
      at(p++, i_rr(R_CLP));
      lp = p;
      at(p++, i_mr(M_LDA, 1, 0));
      at(p++, i_mr(M_MAC, 1, 8'(k)));
      at(p++, i_rr(R_INX));
      at(p++, i_mr(M_DECM, 0, CNT));
      at(p++, i_jmp(C_NE, 10'(lp)));
      at(p++, i_rr(R_TPA)); at(p++, i_out(3'd1));
      at(p++, i_rr(R_TMA)); at(p++, i_out(3'd1));
    end
    at(p++, i_mr(M_LDX, 0, BBASE));                   // slide the window
    at(p++, i_mr(M_LDA, 0, NKEEP));
    at(p++, i_mr(M_STA, 0, CNT));
    lp = p;
    at(p++, i_mr(M_LDA, 1, 8'(L)));
    at(p++, i_mr(M_STA, 1, 0));
    at(p++, i_rr(R_INX));
    at(p++, i_mr(M_DECM, 0, CNT));
    at(p++, i_jmp(C_NE, 10'(lp)));
    at(p++, i_jmp(C_ALW, 10'(top)));
  endtask

  // ------------------------------------------ input signal and reference
  int win [N];
  int n_in, n_words, n_frames;
  logic [31:0] r_hw;
  int busy_cycles, busy_mark, busy_max;
  real t;

  // two tones and a slow sweep, well inside full scale
  always @(posedge clk) begin
    t = t + 1.0 / (FS_HZ * PERIOD);
    vin <= 0.45 * $sin(2.0 * 3.141592653589793 * 310.0 * t)
         + 0.25 * $sin(2.0 * 3.141592653589793 * (900.0 + 2000.0 * t) * t);
  end

  // samples the program takes in, kept as the program keeps them
  always @(posedge clk) begin
    if (rst_n && dut.io_rd && dut.io_rdy && dut.io_port == IO_DATA0) begin
      win[N - L + (n_in % L)] = int'($signed(dut.io_rdata)) >>> 4;
      n_in++;
    end
    if (rst_n && h_running && !ev_io_stall) busy_cycles++;
  end

  function automatic logic [31:0] model_r(int k);
    logic [31:0] s;
    s = '0;
    for (int n = 0; n + k < N; n++) s += 32'(win[n] * win[n + k]);
    return s;
  endfunction

  // acceptor on link port 1: ask, take the word on acknowledge, release
  initial begin
    n_words = 0; n_frames = 0; busy_max = 0; busy_mark = 0;
    wait (rst_n);
    forever begin
      @(negedge clk); xout_ask[0] = 1'b1;
      while (!xout_ack[0]) @(negedge clk);
      if (n_words % 2 == 0) r_hw[31:16] = xout_data[0];
      else begin
        r_hw[15:0] = xout_data[0];
        check($sformatf("frame %0d R[%0d]", n_frames, n_words / 2), r_hw, model_r(n_words / 2));
      end
      n_words++;
      xout_ask[0] = 1'b0;
      while (xout_ack[0]) @(negedge clk);
      if (n_words == 2 * LAGS) begin
        // frame done: work since the previous frame ended, then slide the model window
        if (busy_cycles - busy_mark > busy_max) busy_max = busy_cycles - busy_mark;
        busy_mark = busy_cycles;
        for (int n = 0; n < N - L; n++) win[n] = win[n + L];
        n_words = 0;
        n_frames++;
      end
    end
  end

  initial begin
    t = 0.0; n_in = 0; busy_cycles = 0;
    for (int n = 0; n < N; n++) win[n] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmd(H_RESET);
    build();
    for (int i = 0; i < plen; i++) poke(1'b0, i, prog[i]);
    for (int n = 0; n < N; n++) poke(1'b1, BUF + n, 16'd0);
    for (int k = 0; k < LAGS; k++) poke(1'b1, NK + k, word_t'(N - k));
    poke(1'b1, RGP, word_t'(PERIOD));
    poke(1'b1, CTL, 16'd1);
    poke(1'b1, BNEW, word_t'(BUF + N - L));
    poke(1'b1, BBASE, word_t'(BUF));
    poke(1'b1, LNEW, word_t'(L));
    poke(1'b1, NKEEP, word_t'(N - L));
    busy_cycles = 0;
    cmd(H_RUN);
    while (n_frames < FRAMES) @(negedge clk);
    check("frames analysed", n_frames, FRAMES);
    check("samples read", n_in >= FRAMES * L, 1);
    check("no A/D sample lost", ovr, 0);
    $display("busy cycles in the longest frame: %0d of %0d", busy_max, FRAME_CYCLES);
    check("real time: a frame's work fits 10 ms", busy_max > 0 && busy_max < FRAME_CYCLES, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * L * PERIOD + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
