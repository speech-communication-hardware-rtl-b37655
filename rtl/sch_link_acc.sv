// sch_link_acc: acceptor end of an SCH 20-line link with a one-word receive
// register.
//
// While the receive register is empty the acceptor raises Ask; when the
// source acknowledges, the word is latched, `valid` rises and Ask drops. The
// local side takes the word with `rd` (while `valid` is high), which frees
// the register for the next word. `init_req` drives Init for one cycle and
// Init from either end empties the register; `err_req` drives Error and
// `err_seen` reports Error as driven by the other end. The handshake is this
// design's (see sch_link); the description gives only the line set.
//
// Timing: after a read, ask rises again the next cycle once ack is low.
module sch_link_acc
  import sch_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rd,
  output word_t rdata,
  output logic  valid,
  input  logic  init_req,
  input  logic  err_req,
  output logic  err_seen,
  sch_link.acceptor link
);

  logic ask_q;

  assign link.ask    = ask_q;
  assign link.init_a = init_req;
  assign link.err_a  = err_req;
  assign err_seen    = link.err_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
      valid <= 1'b0;
      ask_q <= 1'b0;
    end else if (link.init) begin
      valid <= 1'b0;
      ask_q <= 1'b0;
    end else begin
      if (ask_q && link.ack) begin
        rdata <= link.data;
        valid <= 1'b1;
        ask_q <= 1'b0;
      end else if (!ask_q && !valid && !link.ack) begin
        ask_q <= 1'b1;
      end
      if (rd && valid) valid <= 1'b0;
    end
  end

endmodule
