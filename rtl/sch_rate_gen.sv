// sch_rate_gen: programmable sampling-rate generator of the SCH standard I/O
// board.
//
// A down-counter divides its count source by `period` (N >= 1) and emits a
// one-cycle `tick` every N counts, for example N = 625 gives 8 kHz from the
// 5 MHz processor clock. The count source is the clock, or, when `cascade`
// is set, the `tick_in` pulses of another generator, so two generators give
// a sub-rate of the first. `period` = 0 or `en` = 0 stops the generator.
// The board has two such generators, independent and cascadable, as
// published; the counter width and the divide-by-N rule are this design's.
//
// Timing: after `load` (or enabling) the first tick comes N counts later.
module sch_rate_gen
  import sch_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,      // restart the count (period written)
  input  logic [W-1:0] period,
  input  logic         cascade,
  input  logic         tick_in,
  output logic         tick
);

  logic [W-1:0] cnt;
  logic         step;

  assign step = cascade ? tick_in : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (load || !en || period == '0) begin
        cnt <= period - 1'b1;
      end else if (step) begin
        if (cnt == '0) begin
          cnt  <= period - 1'b1;
          tick <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

endmodule
