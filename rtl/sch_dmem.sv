// sch_dmem: SCH data memory, 4K words of 16 bits (the smaller 1K fitting is
// DEPTH=1024), with a host port that takes the memory by cycle stealing.
//
// In each processor cycle the decode level reads one operand (`c_raddr`,
// combinational read, like a static RAM) and the execute level may write one
// result (`c_we`, `c_waddr`, `c_wdata`, at the clock edge): the read happens
// before the write of the same cycle, so a word written in a cycle is seen by
// reads from the next cycle on. When `h_en` is high the host owns the memory
// for the cycle: its address drives the read, its write replaces the core's,
// and `stolen` tells the core to hold its pipeline (its write is then retried
// because the execute level does not advance). Size and cycle stealing follow
// the published description; the two core ports are this design's choice for
// a read cycle and a write cycle inside one 200 ns processor cycle.
module sch_dmem
  import sch_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] c_raddr,
  input  logic          c_we,
  input  logic [AW-1:0] c_waddr,
  input  word_t         c_wdata,
  input  logic          h_en,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  word_t         h_wdata,
  output word_t         rdata,
  output logic          stolen
);

  word_t mem [DEPTH];

  assign stolen = h_en;
  assign rdata  = mem[h_en ? h_addr : c_raddr];

  always_ff @(posedge clk) begin
    if (h_en) begin
      if (h_we) mem[h_addr] <= h_wdata;
    end else if (c_we) begin
      mem[c_waddr] <= c_wdata;
    end
  end

endmodule
