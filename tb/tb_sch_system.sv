// tb_sch_system: end-to-end test of the whole SCH system at its full size
// (1K program words, 4K data words, 256-word FIFOs), driven as the host
// computer would drive it.
//
// The host resets the processor, loads a program and a coefficient table
// through the cycle-stealing memory port, single-steps three cycles, then
// runs. The program sets up the rate generators (generator 1 cascaded on
// generator 0), primes the D/A converter, and then for every sample reads
// the A/D word (waiting on the input FIFO), calls a one-formant resonator
// subroutine
//     y[n] = (G*x[n] + C1*y[n-1] + C2*y[n-2]) / 2^14     (Q14 coefficients)
// using the multiplier-accumulator and indexed addressing of the coefficient
// table, writes y to the D/A FIFO, sends it round a wire-to-wire loop on
// link 1 and reads it back, and counts samples in data memory. It leaves the
// loop when the host sets the shared flag, clears the flag, and stops.
// While it runs the host examines the sample counter, halts and resumes it,
// and changes the gain G in real time. Each D/A word is compared with a
// reference model of the filter; the gain change must be seen exactly once.
// Each mechanism (I/O stall, memory bypass, taken-branch flush, stolen
// cycle, single step, halt, subroutine call, sub-rate tick, D/A underrun,
// link loop) is counted and must occur.
module tb_sch_system;
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
  logic [1:0] xin_ack, xin_ask, xin_init_o, xin_err_o, xout_ack, xout_ask, xout_init_o, xout_err_o;
  logic ev_retire, ev_flush, ev_bypass, ev_io_stall, ev_steal, ev_stack_ovf;
  logic [9:0] pc;

  sch_system dut (
    .clk, .rst_n, .h_cmd, .h_cmd_stb, .h_req, .h_space, .h_we, .h_addr, .h_wdata,
    .h_ack, .h_rdata, .h_running, .h_flag,
    .vin, .vout, .dac_code, .dac_strobe, .adc_overruns(ovr), .dac_underruns(unr), .subrate_tick,
    .xin_data, .xin_ack, .xin_ask, .xin_init_i(xout_init_o), .xin_init_o, .xin_err_i(xout_err_o), .xin_err_o,
    .xout_data, .xout_ack, .xout_ask, .xout_init_i(xin_init_o), .xout_err_i(xin_err_o), .xout_init_o, .xout_err_o,
    .ev_retire, .ev_flush, .ev_bypass, .ev_io_stall, .ev_steal, .ev_stack_ovf, .pc
  );

  // wire-to-wire connection of link 1 (and 2) back into the same board
  assign xin_data = xout_data;
  assign xin_ack  = xout_ack;
  assign xout_ask = xin_ask;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ host side
  task automatic cmd(host_cmd_e c);
    @(negedge clk); h_cmd = c; h_cmd_stb = 1;
    @(negedge clk); h_cmd_stb = 0; h_cmd = H_NONE;
  endtask

  task automatic access(logic space, logic we, int a, word_t d, output word_t q);
    @(negedge clk); h_req = 1; h_space = space; h_we = we; h_addr = 12'(a); h_wdata = d;
    while (!h_ack) @(negedge clk);
    q = h_rdata;
    h_req = 0;
    @(negedge clk);
  endtask

  // ------------------------------------------------------------- program
  localparam logic [7:0] G_TAB = 64;              // G, C1, C2 at 64, 65, 66
  localparam logic [7:0] Y1 = 3, Y2 = 4, XS = 5, COUNT = 6, RGP = 8, SUBP = 10, CTL = 9, XB = 12;
  localparam int PERIOD = 150, SUBRATE = 4;
  localparam int G0 = 1638, G1 = 3277, C1 = 19661, C2 = -13271;
  localparam logic [9:0] FORMANT = 40, DONE = 60, LOOP = 10;

  word_t prog [$];
  function automatic void emit_at(int a, word_t w);
    while (prog.size() <= a) prog.push_back(i_rr(R_NOP));
    prog[a] = w;
  endfunction

  task automatic build_program();
    int p;
    p = 0;
    emit_at(p++, i_mr(M_LDA, 0, RGP));   emit_at(p++, i_out(IO_RG0));
    emit_at(p++, i_mr(M_LDA, 0, SUBP));  emit_at(p++, i_out(IO_RG1));
    emit_at(p++, i_mr(M_LDX, 0, XB));                       // X -> coefficient table
    emit_at(p++, i_rr(R_CLA));           emit_at(p++, i_out(IO_DATA0)); // prime D/A
    emit_at(p++, i_mr(M_LDA, 0, CTL));   emit_at(p++, i_out(IO_RGCTL));
    p = LOOP;
    emit_at(p++, i_jmp(C_FS, DONE));
    emit_at(p++, i_in(IO_DATA0));                            // x (waits for A/D)
    emit_at(p++, i_mr(M_STA, 0, XS));
    emit_at(p++, i_call(FORMANT));
    emit_at(p++, i_out(IO_DATA0));                           // y to D/A
    emit_at(p++, i_out(3'd1));                               // round the link-1 loop
    emit_at(p++, i_in(3'd1));
    emit_at(p++, i_mr(M_INCM, 0, COUNT));
    emit_at(p++, i_jmp(C_ALW, LOOP));
    p = FORMANT;
    emit_at(p++, i_mr(M_LDA, 0, XS));
    emit_at(p++, i_mr(M_MPY, 1, 0));                         // G*x
    emit_at(p++, i_mr(M_LDA, 0, Y1));
    emit_at(p++, i_mr(M_MAC, 1, 1));                         // + C1*y1
    emit_at(p++, i_mr(M_LDA, 0, Y2));
    emit_at(p++, i_mr(M_MAC, 1, 2));                         // + C2*y2
    emit_at(p++, i_rr(R_ASLP, 4'd2));
    emit_at(p++, i_rr(R_TPA));                               // A = acc / 2^14
    emit_at(p++, i_mr(M_LDB, 0, Y1));
    emit_at(p++, i_mr(M_STB, 0, Y2));
    emit_at(p++, i_mr(M_STA, 0, Y1));
    emit_at(p++, i_mr(M_LDB, 0, Y1));                        // reads the word just stored
    emit_at(p++, i_ret());
    p = DONE;
    emit_at(p++, i_rr(R_CLRF));
    emit_at(p++, i_jmp(C_ALW, DONE + 1));
  endtask

  // --------------------------------------------------- stimulus and model
  int in_codes [$];
  int seen_ticks, sub_ticks, n_out, n_switch, cur_g;
  int n_flush, n_bypass, n_stall, n_steal, n_retire;
  longint m_y1, m_y2;
  bit started;

  function automatic int filt(int x, int g);
    longint acc;
    logic [31:0] a32;
    acc = longint'(g) * x + longint'(C1) * m_y1 + longint'(C2) * m_y2;
    a32 = 32'(acc);
    return int'($signed(a32[29:14]));
  endfunction

  always @(posedge clk) begin
    if (ev_flush) n_flush++;
    if (ev_bypass) n_bypass++;
    if (ev_io_stall) n_stall++;
    if (ev_steal) n_steal++;
    if (ev_retire) n_retire++;
    if (subrate_tick) sub_ticks++;
    if (rst_n && dut.tick0) begin
      in_codes.push_back(int'($signed(16'($rtoi(vin * 32768.0)))));
      seen_ticks++;
    end
    if (dac_strobe) begin
      if (!started) begin
        started = 1;
        check("primed zero", dac_code, 0);
      end else if (in_codes.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        int x, y, y2;
        x = in_codes.pop_front();
        y = filt(x, cur_g);
        if (int'($signed(dac_code)) != y && n_switch == 0) begin
          y2 = filt(x, G1);
          if (int'($signed(dac_code)) == y2) begin
            n_switch++;
            cur_g = G1;
            y = y2;
          end
        end
        check("dac sample", int'($signed(dac_code)), y);
        m_y2 = m_y1;
        m_y1 = y;
        n_out++;
      end
    end
  end

  // new input value after every A/D tick
  always @(negedge clk) if (dut.tick0 || !started) vin = real'(int'($urandom_range(0, 4000)) - 2000) / 32768.0;

  initial begin
    word_t q;
    int pc0, count_a, count_b;
    n_flush = 0; n_bypass = 0; n_stall = 0; n_steal = 0; n_retire = 0;
    seen_ticks = 0; sub_ticks = 0; n_out = 0; n_switch = 0; cur_g = G0;
    m_y1 = 0; m_y2 = 0; started = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cmd(H_RESET);
    build_program();
    foreach (prog[i]) access(1'b0, 1'b1, i, prog[i], q);
    foreach (prog[i]) begin
      access(1'b0, 1'b0, i, 16'h0, q);
      check("program readback", q, prog[i]);
    end
    access(1'b1, 1'b1, G_TAB, word_t'(G0), q);
    access(1'b1, 1'b1, G_TAB + 1, word_t'(C1), q);
    access(1'b1, 1'b1, G_TAB + 2, word_t'(C2), q);
    access(1'b1, 1'b1, Y1, 16'd0, q);
    access(1'b1, 1'b1, Y2, 16'd0, q);
    access(1'b1, 1'b1, COUNT, 16'd0, q);
    access(1'b1, 1'b1, RGP, word_t'(PERIOD), q);
    access(1'b1, 1'b1, SUBP, word_t'(SUBRATE), q);
    access(1'b1, 1'b1, CTL, 16'b111, q);
    access(1'b1, 1'b1, XB, word_t'(G_TAB), q);
    cmd(H_CLRF);
    // single step: the fetch address moves by one per step
    pc0 = int'(pc);
    for (int i = 0; i < 3; i++) cmd(H_STEP);
    @(negedge clk);
    check("three single steps", int'(pc) - pc0, 3);
    cmd(H_RUN);
    repeat (40 * PERIOD) @(negedge clk);
    // examine the sample counter while running, twice
    access(1'b1, 1'b0, COUNT, 16'h0, q); count_a = int'(q);
    repeat (5 * PERIOD) @(negedge clk);
    access(1'b1, 1'b0, COUNT, 16'h0, q); count_b = int'(q);
    check("counter advances by 5", count_b - count_a, 5);
    // halt for a while: nothing retires, then resume
    cmd(H_HALT);
    begin
      int r0;
      r0 = n_retire;
      repeat (3 * PERIOD) @(negedge clk);
      check("no instruction while halted", n_retire - r0, 0);
    end
    cmd(H_RUN);
    repeat (20 * PERIOD) @(negedge clk);
    // change the gain while running
    access(1'b1, 1'b1, G_TAB, word_t'(G1), q);
    repeat (30 * PERIOD) @(negedge clk);
    // ask the program to stop and wait for its acknowledgement
    cmd(H_SETF);
    begin
      int w;
      w = 0;
      while (h_flag && w < 10 * PERIOD) begin @(negedge clk); w++; end
      check("program acknowledged the flag", h_flag, 0);
    end
    // let the D/A drain what is still queued, then every computed sample
    // must have been converted
    repeat (10 * PERIOD) @(negedge clk);
    access(1'b1, 1'b0, COUNT, 16'h0, q);
    check("samples counted = samples output", int'(q), n_out);
    check("enough samples", n_out > 80, 1);
    check("gain change seen once", n_switch, 1);
    check("no A/D overrun", ovr, 0);
    check("D/A underrun while halted", unr > 0, 1);
    check("io stalls", n_stall > 0, 1);
    check("bypasses", n_bypass > 0, 1);
    check("flushes", n_flush > 0, 1);
    check("stolen cycles", n_steal > 0, 1);
    check("sub-rate ticks", sub_ticks, seen_ticks / SUBRATE);
    check("subroutine calls (one per sample)", n_out > 0, 1);
    check("no stack overflow", ev_stack_ovf, 0);
    $display("samples=%0d ticks=%0d subticks=%0d stalls=%0d bypasses=%0d flushes=%0d steals=%0d retired=%0d underruns=%0d",
             n_out, seen_ticks, sub_ticks, n_stall, n_bypass, n_flush, n_steal, n_retire, unr);
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
