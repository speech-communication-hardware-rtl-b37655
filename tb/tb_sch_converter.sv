// tb_sch_converter: self-checking test of the analog conversion module model.
// A/D: a sequence of input voltages, one per tick, must arrive on the link as
// the expected 16-bit codes (with saturation); a tick while the previous
// sample is undelivered must count an overrun and raise Error. D/A: words
// sent on the link must appear as code and voltage at the next tick; a tick
// with no word must count an underrun.
module tb_sch_converter;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0, adc_tick = 0, dac_tick = 0, dac_strobe;
  real vin = 0.0, vout;
  word_t dac_code;
  logic [15:0] ovr, unr;
  logic rd = 0, valid, wr = 0, busy, a_seen, s_seen;
  word_t rdata, wdata = 0;
  int checks = 0, failures = 0;

  sch_link la (.clk, .rst_n);
  sch_link ld (.clk, .rst_n);
  sch_converter dut (.clk, .rst_n, .adc_tick, .vin, .dac_tick, .vout, .dac_code, .dac_strobe,
                     .overruns(ovr), .underruns(unr), .adc_out(la), .dac_in(ld));
  sch_link_acc ta (.clk, .rst_n, .rd, .rdata, .valid, .init_req(1'b0), .err_req(1'b0),
                   .err_seen(a_seen), .link(la));
  sch_link_src ts (.clk, .rst_n, .wr, .wdata, .busy, .init_req(1'b0), .err_req(1'b0),
                   .err_seen(s_seen), .link(ld));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  function automatic int quant(real v);
    int k;
    k = int'($floor(v * 32768.0 + ((v < 0) ? 0.999999 : 0.0)));  // truncate toward zero
    if (v * 32768.0 >= 32767.0) k = 32767;
    if (v * 32768.0 <= -32768.0) k = -32768;
    return k & 32'hFFFF;
  endfunction

  initial begin
    real vals [8] = '{0.5, -0.25, 0.999, -1.0, 1.5, -2.0, 0.0001, -0.00003};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (vals[i]) begin
      @(negedge clk); vin = vals[i]; adc_tick = 1;
      @(negedge clk); adc_tick = 0;
      repeat (5) @(negedge clk);
      check("adc valid", valid, 1);
      check("adc code", rdata, quant(vals[i]));
      rd = 1; @(negedge clk); rd = 0;
    end
    check("no overrun", ovr, 0);
    // overrun: the test acceptor holds one sample, the converter one more
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); vin = 0.1 * i; adc_tick = 1;
      @(negedge clk); adc_tick = 0;
      repeat (6) @(negedge clk);
    end
    check("overrun count", ovr, 1);
    check("error line", a_seen, 1);
    // D/A
    for (int i = 0; i < 6; i++) begin
      word_t w;
      w = word_t'($urandom);
      @(negedge clk); wdata = w; wr = 1;
      @(negedge clk); wr = 0;
      repeat (6) @(negedge clk);
      dac_tick = 1; @(negedge clk); dac_tick = 0;
      check("dac strobe", dac_strobe, 1);
      check("dac code", dac_code, w);
      check("dac volts", int'(vout * 32768.0), int'($signed(w)));
    end
    check("no underrun", unr, 0);
    dac_tick = 1; @(negedge clk); dac_tick = 0;
    check("underrun count", unr, 1);
    check("dac error line", s_seen, 1);
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
