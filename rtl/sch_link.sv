// sch_link: the 20-line point-to-point connection used between SCH I/O
// modules (I/O board ports, FIFO modules, converters, a second SCH).
//
// One end is the source, the other the acceptor. The lines are sixteen data
// lines driven by the source, Ask driven by the acceptor, Acknowledge driven
// by the source, and the two bidirectional lines Init and Error. The line
// count and directions of data and Ask follow the published description;
// the 4-phase handshake and the wired-OR modelling of the two bidirectional
// lines (each end drives its own copy, both ends see the OR) are this
// design's:
//   1. the acceptor raises ask when it can take a word;
//   2. the source puts the word on data and raises ack;
//   3. the acceptor latches data and drops ask;
//   4. the source drops ack; the word is delivered.
// Data must stay stable while ack is high, and ack may only rise while ask
// is high; both rules are checked by the assertions below.
interface sch_link (
  input logic clk,
  input logic rst_n
);
  import sch_pkg::*;

  word_t data;
  logic  ask;
  logic  ack;
  logic  init_s, init_a;   // Init, as driven by source / acceptor
  logic  err_s,  err_a;    // Error, as driven by source / acceptor

  logic init, err;
  assign init = init_s | init_a;
  assign err  = err_s  | err_a;

  modport source   (output data, ack, init_s, err_s, input ask, init_a, err_a, init, err);
  modport acceptor (input data, ack, init_s, err_s, output ask, init_a, err_a, input init, err);

  a_data_stable: assert property (@(posedge clk) disable iff (!rst_n || init)
                                  ack && $past(ack) |-> data == $past(data));
  a_ack_after_ask: assert property (@(posedge clk) disable iff (!rst_n || init)
                                    $rose(ack) |-> $past(ask));
endinterface
