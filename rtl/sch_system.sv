// sch_system: the SCH signal-processing system, top level.
//
// The SCH processor (sch_core with its 1K-word program memory, 4K-word data
// memory and host interface) is joined to its standard I/O board. Link 0 of
// the board carries the analog path: the A/D side of the conversion module
// feeds a 256-word FIFO module whose output is the board's acceptor 0, and
// the board's source 0 feeds a second FIFO module whose output drives the D/A
// side. Both converters are paced by rate generator 0; the tick of generator
// 1 (which can count generator 0's ticks as a sub-rate) is brought out.
// Links 1 and 2 in each direction are brought out as plain 20-line link
// signals, ready for a wire-to-wire connection to another SCH or a FIFO
// module. The host computer drives the h_* port (reset/run/halt/step,
// memory load and examine by cycle stealing, shared flag).
//
// The arrangement of the board, FIFOs and converters follows the published
// description of the I/O subsystem; which generator paces which converter,
// and the choice of link 0 for the analog path, are this design's. Event
// outputs (ev_*) expose pipeline activity for measurement.
module sch_system
  import sch_pkg::*;
#(
  parameter int unsigned PMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 4096,
  parameter int unsigned FIFO_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // host computer
  input  host_cmd_e   h_cmd,
  input  logic        h_cmd_stb,
  input  logic        h_req,
  input  logic        h_space,
  input  logic        h_we,
  input  logic [DADDR_W-1:0] h_addr,
  input  word_t       h_wdata,
  output logic        h_ack,
  output word_t       h_rdata,
  output logic        h_running,
  output logic        h_flag,
  // analog conversion module
  input  real         vin,
  output real         vout,
  output word_t       dac_code,
  output logic        dac_strobe,
  output logic [15:0] adc_overruns,
  output logic [15:0] dac_underruns,
  output logic        subrate_tick,
  // I/O board links 1 and 2 (index 0 = link 1), acceptor side
  input  word_t       xin_data [2],
  input  logic [1:0]  xin_ack,
  output logic [1:0]  xin_ask,
  input  logic [1:0]  xin_init_i,
  output logic [1:0]  xin_init_o,
  input  logic [1:0]  xin_err_i,
  output logic [1:0]  xin_err_o,
  // I/O board links 1 and 2, source side
  output word_t       xout_data [2],
  output logic [1:0]  xout_ack,
  input  logic [1:0]  xout_ask,
  input  logic [1:0]  xout_init_i,
  output logic [1:0]  xout_init_o,
  input  logic [1:0]  xout_err_i,
  output logic [1:0]  xout_err_o,
  // instrumentation
  output logic        ev_retire,
  output logic        ev_flush,
  output logic        ev_bypass,
  output logic        ev_io_stall,
  output logic        ev_steal,
  output logic        ev_stack_ovf,
  output logic [PC_W-1:0] pc
);

  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  // ---------------------------------------------------------------- host
  logic          core_rst_n, run_en, p_en, d_en, m_we;
  logic [DADDR_W-1:0] m_addr;
  word_t         m_wdata, p_rdata, d_rdata;
  logic          flag_set, flag_clr;

  sch_host_if #(.AW(DADDR_W)) u_host (
    .clk, .rst_n,
    .h_cmd, .h_cmd_stb, .h_req, .h_space, .h_we, .h_addr, .h_wdata,
    .h_ack, .h_rdata, .h_running, .h_flag,
    .core_rst_n, .run_en, .sch_flag_set(flag_set), .sch_flag_clr(flag_clr),
    .p_en, .d_en, .m_we, .m_addr, .m_wdata, .p_rdata, .d_rdata
  );

  // ------------------------------------------------------------ memories
  word_t            instr;
  logic [DAW-1:0]   c_raddr, c_waddr;
  logic             c_we;
  word_t            c_wdata;
  logic             p_stolen, d_stolen;

  sch_pmem #(.DEPTH(PMEM_WORDS), .AW(PC_W)) u_pmem (
    .clk, .c_addr(pc), .h_en(p_en), .h_we(m_we), .h_addr(m_addr[PC_W-1:0]),
    .h_wdata(m_wdata), .rdata(p_rdata), .stolen(p_stolen)
  );
  assign instr = p_rdata;

  sch_dmem #(.DEPTH(DMEM_WORDS), .AW(DAW)) u_dmem (
    .clk, .c_raddr, .c_we, .c_waddr, .c_wdata,
    .h_en(d_en), .h_we(m_we), .h_addr(m_addr[DAW-1:0]), .h_wdata(m_wdata),
    .rdata(d_rdata), .stolen(d_stolen)
  );

  // ---------------------------------------------------------------- core
  logic       io_rd, io_wr, io_rdy;
  logic [2:0] io_port;
  word_t      io_wdata, io_rdata;
  word_t      reg_a, reg_b, reg_x, reg_p, reg_m;
  cc_t        cc;

  assign ev_steal = p_stolen || d_stolen;

  sch_core #(.DAW(DAW)) u_core (
    .clk, .rst_n(core_rst_n), .run_en, .stolen(ev_steal),
    .pc, .instr,
    .d_raddr(c_raddr), .d_rdata, .d_we(c_we), .d_waddr(c_waddr), .d_wdata(c_wdata),
    .io_rd, .io_wr, .io_port, .io_wdata, .io_rdata, .io_rdy,
    .flag(h_flag), .flag_set, .flag_clr,
    .reg_a, .reg_b, .reg_x, .reg_p, .reg_m, .cc,
    .ev_retire, .ev_flush, .ev_bypass, .ev_io_stall, .ev_stack_ovf
  );

  // ------------------------------------------------------------ I/O board
  sch_link l_adc  (.clk, .rst_n);   // converter -> input FIFO
  sch_link l_in0  (.clk, .rst_n);   // input FIFO -> board acceptor 0
  sch_link l_out0 (.clk, .rst_n);   // board source 0 -> output FIFO
  sch_link l_dac  (.clk, .rst_n);   // output FIFO -> converter
  sch_link l_in1  (.clk, .rst_n);
  sch_link l_in2  (.clk, .rst_n);
  sch_link l_out1 (.clk, .rst_n);
  sch_link l_out2 (.clk, .rst_n);

  logic tick0, tick1;

  sch_io_board u_board (
    .clk, .rst_n, .io_rd, .io_wr, .io_port, .io_wdata, .io_rdata, .io_rdy,
    .tick0, .tick1,
    .in0(l_in0), .in1(l_in1), .in2(l_in2),
    .out0(l_out0), .out1(l_out1), .out2(l_out2)
  );
  assign subrate_tick = tick1;

  logic [$clog2(FIFO_WORDS+1)-1:0] fifo_in_count, fifo_out_count;

  sch_fifo #(.DEPTH(FIFO_WORDS)) u_fifo_in  (.clk, .rst_n, .count(fifo_in_count),
                                             .in(l_adc),  .out(l_in0));
  sch_fifo #(.DEPTH(FIFO_WORDS)) u_fifo_out (.clk, .rst_n, .count(fifo_out_count),
                                             .in(l_out0), .out(l_dac));

  sch_converter u_conv (
    .clk, .rst_n, .adc_tick(tick0), .vin, .dac_tick(tick0), .vout, .dac_code, .dac_strobe,
    .overruns(adc_overruns), .underruns(dac_underruns),
    .adc_out(l_adc), .dac_in(l_dac)
  );

  // ------------------------------------------------- external link wiring
  assign l_in1.data   = xin_data[0];
  assign l_in2.data   = xin_data[1];
  assign l_in1.ack    = xin_ack[0];
  assign l_in2.ack    = xin_ack[1];
  assign l_in1.init_s = xin_init_i[0];
  assign l_in2.init_s = xin_init_i[1];
  assign l_in1.err_s  = xin_err_i[0];
  assign l_in2.err_s  = xin_err_i[1];
  assign xin_ask      = {l_in2.ask, l_in1.ask};
  assign xin_init_o   = {l_in2.init_a, l_in1.init_a};
  assign xin_err_o    = {l_in2.err_a, l_in1.err_a};

  assign xout_data[0] = l_out1.data;
  assign xout_data[1] = l_out2.data;
  assign xout_ack     = {l_out2.ack, l_out1.ack};
  assign l_out1.ask   = xout_ask[0];
  assign l_out2.ask   = xout_ask[1];
  assign l_out1.init_a = xout_init_i[0];
  assign l_out2.init_a = xout_init_i[1];
  assign l_out1.err_a  = xout_err_i[0];
  assign l_out2.err_a  = xout_err_i[1];
  assign xout_init_o  = {l_out2.init_s, l_out1.init_s};
  assign xout_err_o   = {l_out2.err_s, l_out1.err_s};

endmodule
