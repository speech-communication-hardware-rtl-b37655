// sch_fifo: SCH first-in first-out buffer module, 256 words of 16 bits,
// with an acceptor link on its input and a source link on its output.
//
// It sits between two link ends (a converter and the I/O board, or two SCH
// processors) and decouples their timing. The input acceptor asks for words
// while the buffer has room; the output source offers the oldest word while
// the buffer is not empty. Init on either link empties the whole module;
// Error seen on one link is passed on to the other, so a converter overrun
// reaches the processor. Depth follows the published description ("256
// words standard First In-First Out memory modules"); the internal
// organisation (a one-word acceptor register, a circular buffer and a
// one-word source register, so DEPTH + 2 words in flight at most) is this
// design's.
module sch_fifo
  import sch_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic clk,
  input  logic rst_n,
  output logic [$clog2(DEPTH+1)-1:0] count,
  sch_link.acceptor in,
  sch_link.source   out
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  word_t         buf_q [DEPTH];
  logic [AW-1:0] wp, rp;
  word_t         in_data;
  logic          in_valid, in_rd, out_busy, out_wr;
  logic          err_in, err_out;
  logic          flush;

  assign flush  = in.init | out.init;
  assign in_rd  = in_valid && (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_wr = !out_busy && (count != '0);

  always_ff @(posedge clk) begin
    if (in_rd) buf_q[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (flush) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (in_rd)  wp <= wp + 1'b1;
      if (out_wr) rp <= rp + 1'b1;
      count <= count + CW'(in_rd) - CW'(out_wr);
    end
  end

  sch_link_acc u_in (.clk, .rst_n, .rd(in_rd), .rdata(in_data), .valid(in_valid),
                     .init_req(1'b0), .err_req(err_out), .err_seen(err_in), .link(in));
  sch_link_src u_out (.clk, .rst_n, .wr(out_wr), .wdata(buf_q[rp]), .busy(out_busy),
                      .init_req(1'b0), .err_req(err_in), .err_seen(err_out), .link(out));

endmodule
