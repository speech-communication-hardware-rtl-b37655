// sch_converter: behavioural model of the SCH analog conversion module, an
// A/D converter and a D/A converter paced by the I/O board's sampling-rate
// generators. It models the converters' function, not their circuits, and
// is not meant for synthesis.
//
// A/D side: at each `adc_tick` the analog input `vin` (a real value, full
// scale -1.0 .. +1.0) is quantised to a 16-bit two's-complement code and
// offered on the `adc_out` source link. D/A side: at each `dac_tick` the
// word waiting on the `dac_in` acceptor link is converted to `vout` and
// `dac_code`, with `dac_strobe` high for that cycle. A sample that finds the
// previous one still undelivered (overrun) or no word waiting (underrun)
// drives the link's Error line until Init clears it, and is counted on
// `overruns` / `underruns`. The converter is only named by the description,
// which buffers it with FIFO modules; its ports, coding and error rules are
// this design's.
module sch_converter
  import sch_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  adc_tick,
  input  real   vin,
  input  logic  dac_tick,
  output real   vout,
  output word_t dac_code,
  output logic  dac_strobe,
  output logic [15:0] overruns,
  output logic [15:0] underruns,
  sch_link.source   adc_out,
  sch_link.acceptor dac_in
);

  logic  adc_busy, dac_valid, adc_err, dac_err, dac_rd;
  logic  adc_err_seen, dac_err_seen;
  word_t adc_code, dac_word;

  // quantise with saturation
  always_comb begin
    real s;
    s = vin * 32768.0;
    if (s > 32767.0)       adc_code = 16'sh7FFF;
    else if (s < -32768.0) adc_code = 16'sh8000;
    else                   adc_code = word_t'($rtoi(s));
  end

  assign dac_rd = dac_tick && dac_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_err    <= 1'b0;
      dac_err    <= 1'b0;
      dac_code   <= '0;
      dac_strobe <= 1'b0;
      overruns   <= '0;
      underruns  <= '0;
      vout       <= 0.0;
    end else begin
      dac_strobe <= 1'b0;
      if (adc_out.init) adc_err <= 1'b0;
      if (dac_in.init)  dac_err <= 1'b0;
      if (adc_tick && adc_busy) begin
        adc_err  <= 1'b1;
        overruns <= overruns + 1'b1;
      end
      if (dac_tick) begin
        if (dac_valid) begin
          dac_code   <= dac_word;
          dac_strobe <= 1'b1;
          vout       <= real'($signed(dac_word)) / 32768.0;
        end else begin
          dac_err   <= 1'b1;
          underruns <= underruns + 1'b1;
        end
      end
    end
  end

  sch_link_src u_adc (.clk, .rst_n, .wr(adc_tick && !adc_busy), .wdata(adc_code), .busy(adc_busy),
                      .init_req(1'b0), .err_req(adc_err), .err_seen(adc_err_seen), .link(adc_out));
  sch_link_acc u_dac (.clk, .rst_n, .rd(dac_rd), .rdata(dac_word), .valid(dac_valid),
                      .init_req(1'b0), .err_req(dac_err), .err_seen(dac_err_seen), .link(dac_in));

endmodule
