// tb_formant_synth: workload test, a real-time formant synthesizer on the
// full-size SCH system at a 16.4 kHz sampling rate.
//
// The synthesizer has a vocal/nasal canal (impulse-train source through a
// nasal pole/zero pair and five cascaded formant resonators) and a noise
// canal (pseudo-random source through two cascaded resonators); the two
// canal outputs are added and sent to the D/A converter. Each resonator is
// one call of a shared subroutine that works on a 5-word record
// (G, C1, C2, y1, y2) addressed through X:
//     y = G*x + C1*y1 + C2*y2
// with r = exp(-pi*B/fs), C1 = 2*r*cos(2*pi*F/fs), C2 = -r^2 for centre
// frequency F and bandwidth B, and G = (1 - C1 - C2)/2, half the unity-DC-gain
// value so that every G fits a word. The nasal zero is a second subroutine,
//     y = x - C1*x1 - C2*x2
// on a record (1, -C1, -C2, x1, x2, spare) with C1, C2 from the zero's F and
// B. All coefficients are Q14.
// Rate generator 0 divides the 5 MHz (200 ns) clock by 305 (16.39 kHz). The
// test checks that every D/A word equals a bit-exact reference model, that
// the D/A never runs dry (the program keeps real time), and reports the
// processor cycles spent per sample. Part way through, the host rewrites one
// instruction and one parameter while the program runs (it drops the nasal
// zero and changes the pitch period), and the reference follows from the
// sample at which the change takes effect.
module tb_formant_synth;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0;
  host_cmd_e h_cmd = H_NONE;
  logic h_cmd_stb = 0, h_req = 0, h_space = 0, h_we = 0, h_ack, h_running, h_flag;
  logic [11:0] h_addr = 0;
  word_t h_wdata = 0, h_rdata;
  real vout;
  word_t dac_code;
  logic dac_strobe, subrate_tick;
  logic [15:0] ovr, unr;
  word_t xin_data [2], xout_data [2];
  logic [1:0] xin_ask, xin_init_o, xin_err_o, xout_ack, xout_init_o, xout_err_o;
  logic ev_retire, ev_flush, ev_bypass, ev_io_stall, ev_steal, ev_stack_ovf;
  logic [9:0] pc;

  sch_system dut (
    .clk, .rst_n, .h_cmd, .h_cmd_stb, .h_req, .h_space, .h_we, .h_addr, .h_wdata,
    .h_ack, .h_rdata, .h_running, .h_flag,
    .vin(0.0), .vout, .dac_code, .dac_strobe, .adc_overruns(ovr), .dac_underruns(unr), .subrate_tick,
    .xin_data, .xin_ack(2'b00), .xin_ask, .xin_init_i(2'b00), .xin_init_o, .xin_err_i(2'b00), .xin_err_o,
    .xout_data, .xout_ack, .xout_ask(2'b00), .xout_init_i(2'b00), .xout_err_i(2'b00), .xout_init_o, .xout_err_o,
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
  localparam int FS_HZ = 16400, PERIOD = 305, NFORM = 9, NSAMP = 700, NBUSY = 300, PATCH_AT = 350;
  localparam logic [7:0] PTR = 16, PCNT = 30, PPER = 31, AV = 32, SEED = 33, LCGK = 34,
                         LCGC = 35, SUMV = 36, COUNT = 37, RGP = 38, CTL = 39, REC = 64;
  localparam logic [9:0] LOOP = 10, NOVOICE = 16, HAVEV = 17, FORM = 100, ANTI = 112, DONE = 140;
  localparam int PITCH = 100, PITCH2 = 70, AMP = 3000, K = 25173, C = 13849;
  // sections 0-4 vocal formants, 5-6 noise formants, 7 nasal pole, 8 nasal zero
  int fq [NFORM] = '{500, 1500, 2500, 3500, 4500, 2800, 4000, 270, 450};
  int bw [NFORM] = '{60, 90, 120, 150, 200, 300, 400, 100, 100};
  int g [NFORM], c1 [NFORM], c2 [NFORM];

  word_t prog [1024];
  int plen;
  function automatic void at(int a, word_t w);
    prog[a] = w;
    if (a >= plen) plen = a + 1;
  endfunction

  task automatic build();
    int p;
    for (int i = 0; i < 1024; i++) prog[i] = i_rr(R_NOP);
    plen = 0;
    p = 0;
    at(p++, i_mr(M_LDA, 0, RGP)); at(p++, i_out(IO_RG0));
    at(p++, i_mr(M_LDA, 0, CTL)); at(p++, i_out(IO_RGCTL));
    p = LOOP;
    at(p++, i_mr(M_DECM, 0, PCNT));                 // voiced source: impulse train
    at(p++, i_jmp(C_NE, NOVOICE));
    at(p++, i_mr(M_LDA, 0, PPER));
    at(p++, i_mr(M_STA, 0, PCNT));
    at(p++, i_mr(M_LDA, 0, AV));
    at(p++, i_jmp(C_ALW, HAVEV));
    p = NOVOICE;
    at(p++, i_rr(R_CLA));
    p = HAVEV;
    at(p++, i_mr(M_LDX, 0, PTR + 7));                // nasal pole
    at(p++, i_call(FORM));
    at(p++, i_mr(M_LDX, 0, PTR + 8));                // nasal zero
    at(p++, i_call(ANTI));
    for (int k = 0; k < 5; k++) begin                // vocal formants
      at(p++, i_mr(M_LDX, 0, PTR + k));
      at(p++, i_call(FORM));
    end
    at(p++, i_mr(M_STA, 0, SUMV));
    at(p++, i_mr(M_LDA, 0, SEED));                   // noise source: LCG
    at(p++, i_mr(M_MPY, 0, LCGK));
    at(p++, i_rr(R_TMA));
    at(p++, i_mr(M_ADDA, 0, LCGC));
    at(p++, i_mr(M_STA, 0, SEED));
    at(p++, i_rr(R_ASR, 4'd6));
    for (int k = 5; k < 7; k++) begin                // noise canal
      at(p++, i_mr(M_LDX, 0, PTR + k));
      at(p++, i_call(FORM));
    end
    at(p++, i_mr(M_ADDA, 0, SUMV));
    at(p++, i_out(IO_DATA0));
    at(p++, i_mr(M_INCM, 0, COUNT));
    at(p++, i_jmp(C_FS, DONE));
    at(p++, i_jmp(C_ALW, LOOP));
    p = FORM;                                        // one formant, record at X
    at(p++, i_mr(M_MPY, 1, 0));
    at(p++, i_mr(M_LDA, 1, 3));
    at(p++, i_mr(M_MAC, 1, 1));
    at(p++, i_mr(M_LDA, 1, 4));
    at(p++, i_mr(M_MAC, 1, 2));
    at(p++, i_rr(R_ASLP, 4'd2));
    at(p++, i_rr(R_TPA));
    at(p++, i_mr(M_LDB, 1, 3));
    at(p++, i_mr(M_STB, 1, 4));
    at(p++, i_mr(M_STA, 1, 3));
    at(p++, i_ret());
    p = ANTI;                                        // nasal zero, record at X
    at(p++, i_mr(M_STA, 1, 5));
    at(p++, i_mr(M_MPY, 1, 0));
    at(p++, i_mr(M_LDA, 1, 3));
    at(p++, i_mr(M_MAC, 1, 1));
    at(p++, i_mr(M_LDA, 1, 4));
    at(p++, i_mr(M_MAC, 1, 2));
    at(p++, i_mr(M_LDB, 1, 3));
    at(p++, i_mr(M_STB, 1, 4));
    at(p++, i_mr(M_LDB, 1, 5));
    at(p++, i_mr(M_STB, 1, 3));
    at(p++, i_rr(R_ASLP, 4'd2));
    at(p++, i_rr(R_TPA));
    at(p++, i_ret());
    p = DONE;
    at(p++, i_rr(R_CLRF));
    at(p++, i_jmp(C_ALW, DONE + 1));
  endtask

  // ------------------------------------------------------ reference model
  int m_y1 [NFORM], m_y2 [NFORM];
  int m_pcnt, m_seed, peak, n_out, busy_cycles, n_made, busy_at_n, sw;

  function automatic int q16(int v);
    return int'($signed(16'(v)));
  endfunction

  function automatic int reson(int k, int x);
    logic [31:0] acc;
    int y;
    acc = 32'(g[k] * x) + 32'(c1[k] * m_y1[k]) + 32'(c2[k] * m_y2[k]);
    y = int'($signed(acc[29:14]));
    m_y2[k] = m_y1[k];
    m_y1[k] = y;
    return y;
  endfunction

  function automatic int antireson(int k, int x);
    logic [31:0] acc;
    acc = 32'(g[k] * x) + 32'(c1[k] * m_y1[k]) + 32'(c2[k] * m_y2[k]);
    m_y2[k] = m_y1[k];
    m_y1[k] = x;
    return int'($signed(acc[29:14]));
  endfunction

  function automatic int model_sample();
    int v, n, s;
    m_pcnt = q16(m_pcnt - 1);
    v = 0;
    if (m_pcnt == 0) begin m_pcnt = (n_out >= sw) ? PITCH2 : PITCH; v = AMP; end
    v = reson(7, v);
    if (n_out < sw) v = antireson(8, v);
    for (int k = 0; k < 5; k++) v = reson(k, v);
    m_seed = q16(q16(m_seed * K) + C);
    n = m_seed >>> 6;
    for (int k = 5; k < 7; k++) n = reson(k, n);
    s = q16(v + n);
    return s;
  endfunction

  always @(posedge clk) begin
    // work done by the program: cycles it is not held on a full output link,
    // and samples it has handed to the output link
    if (rst_n && h_running && !ev_io_stall) busy_cycles++;
    if (rst_n && dut.io_wr && dut.io_rdy && dut.io_port == IO_DATA0) begin
      n_made++;
      if (n_made == NBUSY) busy_at_n = busy_cycles;
    end
    if (rst_n && dac_strobe) begin
      check("synth sample", int'($signed(dac_code)), model_sample());
      if ($signed(dac_code) > peak) peak = int'($signed(dac_code));
      n_out++;
    end
  end

  initial begin
    real r, th;
    peak = 0; n_out = 0; busy_cycles = 0; n_made = 0; busy_at_n = 0; sw = 1 << 30;
    for (int k = 0; k < NFORM; k++) begin
      r  = $exp(-3.141592653589793 * bw[k] / FS_HZ);
      th = 2.0 * 3.141592653589793 * fq[k] / FS_HZ;
      c1[k] = $rtoi(2.0 * r * $cos(th) * 16384.0);
      c2[k] = -$rtoi(r * r * 16384.0);
      g[k]  = (16384 - c1[k] - c2[k]) / 2;
      if (k == 8) begin                              // zero: 1 - C1 z^-1 - C2 z^-2
        g[k] = 16384; c1[k] = -c1[k]; c2[k] = -c2[k];
      end
      m_y1[k] = 0; m_y2[k] = 0;
      check("coefficients fit a word", (g[k] < 32768) && (c1[k] < 32768) && (c1[k] >= -32768)
            && (c2[k] < 32768) && (c2[k] >= -32768), 1);
    end
    m_pcnt = 1; m_seed = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmd(H_RESET);
    cmd(H_CLRF);
    build();
    for (int i = 0; i < plen; i++) poke(1'b0, i, prog[i]);
    for (int k = 0; k < NFORM; k++) begin
      poke(1'b1, PTR + k, word_t'(REC + 8 * k));
      poke(1'b1, REC + 8 * k + 0, word_t'(g[k]));
      poke(1'b1, REC + 8 * k + 1, word_t'(c1[k]));
      poke(1'b1, REC + 8 * k + 2, word_t'(c2[k]));
      poke(1'b1, REC + 8 * k + 3, 16'd0);
      poke(1'b1, REC + 8 * k + 4, 16'd0);
    end
    poke(1'b1, PCNT, 16'd1);
    poke(1'b1, PPER, word_t'(PITCH));
    poke(1'b1, AV, word_t'(AMP));
    poke(1'b1, SEED, 16'd1);
    poke(1'b1, LCGK, word_t'(K));
    poke(1'b1, LCGC, word_t'(C));
    poke(1'b1, COUNT, 16'd0);
    poke(1'b1, RGP, word_t'(PERIOD));
    poke(1'b1, CTL, 16'd1);
    busy_cycles = 0;
    cmd(H_RUN);
    // Real-time change while the program runs: once the program waits on a
    // full output link, remove the call to the nasal zero and give a new
    // pitch period. The waiting sample is already made, so the change holds
    // from the next one on.
    do @(negedge clk);
    while (!(n_made >= PATCH_AT && dut.io_wr && !dut.io_rdy && dut.io_port == IO_DATA0));
    sw = n_made + 1;
    poke(1'b0, HAVEV + 3, i_rr(R_NOP));
    poke(1'b1, PPER, word_t'(PITCH2));
    check("patched while the program waited on the same sample", n_made + 1, sw);
    check("change lands inside the checked samples", sw < NSAMP - 100, 1);
    while (n_out < NSAMP) @(negedge clk);
    cmd(H_SETF);
    repeat (2 * PERIOD) @(negedge clk);
    check("program stopped on the flag", h_flag, 0);
    check("D/A never ran dry", unr, 0);
    begin
      int per_sample;
      per_sample = busy_at_n / NBUSY;
      $display("busy cycles per sample: about %0d of %0d (%0d filter sections)", per_sample, PERIOD, NFORM);
      $display("largest output sample: %0d", peak);
      check("output is not silent", peak > 200, 1);
      check("real time: work per sample fits the period", per_sample > 0 && per_sample < PERIOD, 1);
    end
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
