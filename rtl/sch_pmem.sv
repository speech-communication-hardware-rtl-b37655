// sch_pmem: SCH program memory, 1K words of 16 bits, with a host port that
// takes the memory by cycle stealing.
//
// The processor fetches one instruction per cycle from `c_addr` (the PC) and
// reads it combinationally, as from a static RAM, at the end of the fetch
// cycle. The host can load and examine the memory while the processor is
// halted and also while it runs: when `h_en` is high the host owns the single
// address port for that cycle, `stolen` tells the core to hold its pipeline,
// `rdata` carries the host's word and a write (h_we) lands at the clock edge.
// Size and the cycle-stealing access follow the published description; the
// port arrangement is this design's.
module sch_pmem
  import sch_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] c_addr,
  input  logic          h_en,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  word_t         h_wdata,
  output word_t         rdata,
  output logic          stolen
);

  word_t         mem [DEPTH];
  logic [AW-1:0] addr;

  assign stolen = h_en;
  assign addr   = h_en ? h_addr : c_addr;
  assign rdata  = mem[addr];

  always_ff @(posedge clk) begin
    if (h_en && h_we) mem[addr] <= h_wdata;
  end

endmodule
