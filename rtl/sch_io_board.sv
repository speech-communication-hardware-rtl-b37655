// sch_io_board: the SCH standard I/O board: three data sources, three data
// acceptors and two programmable sampling-rate generators.
//
// The processor reaches the board with its IN and OUT instructions over a
// small port bus (io_rd / io_wr, 3-bit io_port, io_rdata / io_wdata). Ports
// 0..2 are the links: IN takes the word held by acceptor n (`io_rdy` low
// until one has arrived), OUT hands a word to source n (`io_rdy` low while
// the previous word is still undelivered). The core holds its pipeline while
// io_rdy is low, so programs pace themselves on the converters. Port 4 and 5
// hold the periods of the two rate generators, port 6 their control (bit 0
// enable 0, bit 1 enable 1, bit 2 generator 1 counts ticks of generator 0),
// and port 7 reads status {src_err, acc_err, acc_valid, src_busy} (3 bits
// each) and, written, pulses Init on the links selected by bits 5..3
// (acceptors) and 2..0 (sources). The board contents (3 + 3 links, two
// independent cascadable generators) follow the published description; the
// port map and the register layout are this design's.
//
// Timing: a transfer completes in the cycle where io_rd/io_wr and io_rdy are
// both high; register reads and writes are always ready.
module sch_io_board
  import sch_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       io_rd,
  input  logic       io_wr,
  input  logic [2:0] io_port,
  input  word_t      io_wdata,
  output word_t      io_rdata,
  output logic       io_rdy,
  output logic       tick0,
  output logic       tick1,
  sch_link.acceptor  in0,
  sch_link.acceptor  in1,
  sch_link.acceptor  in2,
  sch_link.source    out0,
  sch_link.source    out1,
  sch_link.source    out2
);

  word_t      acc_data [3];
  logic [2:0] acc_valid, acc_rd, acc_err;
  logic [2:0] src_busy, src_wr, src_err;
  logic [2:0] init_acc, init_src;
  word_t      period0, period1;
  logic [2:0] rgctl;
  logic       load0, load1;

  always_comb begin
    acc_rd = '0;
    src_wr = '0;
    if (io_port < 3'd3) begin
      acc_rd[io_port[1:0]] = io_rd && acc_valid[io_port[1:0]];
      src_wr[io_port[1:0]] = io_wr && !src_busy[io_port[1:0]];
    end
  end

  always_comb begin
    io_rdy   = 1'b1;
    io_rdata = '0;
    unique case (io_port)
      3'd0, 3'd1, 3'd2: begin
        io_rdy   = io_wr ? !src_busy[io_port[1:0]] : acc_valid[io_port[1:0]];
        io_rdata = acc_data[io_port[1:0]];
      end
      IO_RG0:   io_rdata = period0;
      IO_RG1:   io_rdata = period1;
      IO_RGCTL: io_rdata = {13'd0, rgctl};
      IO_STAT:  io_rdata = {4'd0, src_err, acc_err, acc_valid, src_busy};
      default:  io_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period0  <= '0;
      period1  <= '0;
      rgctl    <= '0;
      load0    <= 1'b0;
      load1    <= 1'b0;
      init_acc <= '0;
      init_src <= '0;
    end else begin
      load0    <= 1'b0;
      load1    <= 1'b0;
      init_acc <= '0;
      init_src <= '0;
      if (io_wr) begin
        unique case (io_port)
          IO_RG0:   begin period0 <= io_wdata; load0 <= 1'b1; end
          IO_RG1:   begin period1 <= io_wdata; load1 <= 1'b1; end
          IO_RGCTL: rgctl <= io_wdata[2:0];
          IO_STAT:  begin init_acc <= io_wdata[5:3]; init_src <= io_wdata[2:0]; end
          default: ;
        endcase
      end
    end
  end

  sch_link_acc u_acc0 (.clk, .rst_n, .rd(acc_rd[0]), .rdata(acc_data[0]), .valid(acc_valid[0]),
                       .init_req(init_acc[0]), .err_req(1'b0), .err_seen(acc_err[0]), .link(in0));
  sch_link_acc u_acc1 (.clk, .rst_n, .rd(acc_rd[1]), .rdata(acc_data[1]), .valid(acc_valid[1]),
                       .init_req(init_acc[1]), .err_req(1'b0), .err_seen(acc_err[1]), .link(in1));
  sch_link_acc u_acc2 (.clk, .rst_n, .rd(acc_rd[2]), .rdata(acc_data[2]), .valid(acc_valid[2]),
                       .init_req(init_acc[2]), .err_req(1'b0), .err_seen(acc_err[2]), .link(in2));

  sch_link_src u_src0 (.clk, .rst_n, .wr(src_wr[0]), .wdata(io_wdata), .busy(src_busy[0]),
                       .init_req(init_src[0]), .err_req(1'b0), .err_seen(src_err[0]), .link(out0));
  sch_link_src u_src1 (.clk, .rst_n, .wr(src_wr[1]), .wdata(io_wdata), .busy(src_busy[1]),
                       .init_req(init_src[1]), .err_req(1'b0), .err_seen(src_err[1]), .link(out1));
  sch_link_src u_src2 (.clk, .rst_n, .wr(src_wr[2]), .wdata(io_wdata), .busy(src_busy[2]),
                       .init_req(init_src[2]), .err_req(1'b0), .err_seen(src_err[2]), .link(out2));

  sch_rate_gen u_rg0 (.clk, .rst_n, .en(rgctl[0]), .load(load0), .period(period0),
                      .cascade(1'b0), .tick_in(1'b0), .tick(tick0));
  sch_rate_gen u_rg1 (.clk, .rst_n, .en(rgctl[1]), .load(load1), .period(period1),
                      .cascade(rgctl[2]), .tick_in(tick0), .tick(tick1));

endmodule
