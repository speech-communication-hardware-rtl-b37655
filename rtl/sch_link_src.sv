// sch_link_src: source end of an SCH 20-line link with a one-word holding
// register.
//
// The local side writes a word with `wr` while `busy` is low; the word is
// then offered on the link with the 4-phase Ask/Acknowledge handshake (see
// sch_link) and `busy` falls when the acceptor has taken it. `init_req`
// drives the Init line for one cycle and Init from either end empties the
// holding register; `err_req` drives the Error line and `err_seen` reports
// the Error line as driven by the other end. The handshake details are this
// design's; the description gives only the line set.
//
// Timing: a word written in cycle t is acknowledged no earlier than t+1 and
// busy falls one cycle after the acceptor drops ask, so one word takes at
// least four cycles.
module sch_link_src
  import sch_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic wr,
  input  word_t wdata,
  output logic busy,
  input  logic init_req,
  input  logic err_req,
  output logic err_seen,
  sch_link.source link
);

  word_t hold;
  logic  full;
  logic  ack_q;

  assign link.data   = hold;
  assign link.ack    = ack_q;
  assign link.init_s = init_req;
  assign link.err_s  = err_req;
  assign err_seen    = link.err_a;
  assign busy        = full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold  <= '0;
      full  <= 1'b0;
      ack_q <= 1'b0;
    end else if (link.init) begin
      full  <= 1'b0;
      ack_q <= 1'b0;
    end else begin
      if (wr && !full) begin
        hold <= wdata;
        full <= 1'b1;
      end
      if (full && link.ask && !ack_q) ack_q <= 1'b1;
      if (ack_q && !link.ask) begin
        ack_q <= 1'b0;
        full  <= 1'b0;
      end
    end
  end

endmodule
