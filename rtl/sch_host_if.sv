// sch_host_if: SCH side of the host-computer connection.
//
// It gives the host computer the controls the description lists: reset,
// run and halt the processor, single-step it one 200 ns cycle at a time,
// load and examine program and data memory both when halted and while
// running, and a flag that host and processor can each set, clear and test.
//
// Commands arrive as a code on `h_cmd` with a one-cycle strobe `h_cmd_stb`:
// RESET clears the core (one-cycle `core_rst_n` pulse) and leaves it halted,
// RUN and HALT set or clear `run_en`, STEP raises `run_en` for exactly one
// cycle while halted, SETF/CLRF write the flag. Memory access uses a 4-phase
// request: the host holds `h_req` with h_space (0 program, 1 data), h_addr,
// h_we and h_wdata; the interface then steals exactly one memory cycle
// (`p_en` or `d_en` high for one cycle, during which the core holds), and
// raises `h_ack` with the word read in `h_rdata` until the host drops h_req.
// The functions follow the published description; the signal set of the
// cable (separate read and write data instead of shared lines), the 4-phase
// request and the command codes are this design's.
module sch_host_if
  import sch_pkg::*;
#(
  parameter int unsigned AW = DADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // host side
  input  host_cmd_e     h_cmd,
  input  logic          h_cmd_stb,
  input  logic          h_req,
  input  logic          h_space,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  word_t         h_wdata,
  output logic          h_ack,
  output word_t         h_rdata,
  output logic          h_running,
  output logic          h_flag,
  // processor side
  output logic          core_rst_n,
  output logic          run_en,
  input  logic          sch_flag_set,
  input  logic          sch_flag_clr,
  output logic          p_en,
  output logic          d_en,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output word_t         m_wdata,
  input  word_t         p_rdata,
  input  word_t         d_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_ACCESS, S_ACK} acc_state_e;
  acc_state_e st;

  logic running, step, space_q, flag_q;

  assign h_running = running;
  assign run_en    = running || step;
  assign h_flag    = flag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_rst_n <= 1'b0;
      running    <= 1'b0;
      step       <= 1'b0;
      flag_q     <= 1'b0;
    end else begin
      core_rst_n <= !(h_cmd_stb && h_cmd == H_RESET);
      step       <= h_cmd_stb && h_cmd == H_STEP && !running;
      if (h_cmd_stb) begin
        unique case (h_cmd)
          H_RESET: running <= 1'b0;
          H_RUN:   running <= 1'b1;
          H_HALT:  running <= 1'b0;
          default: ;
        endcase
      end
      if ((h_cmd_stb && h_cmd == H_SETF) || sch_flag_set)      flag_q <= 1'b1;
      else if ((h_cmd_stb && h_cmd == H_CLRF) || sch_flag_clr) flag_q <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      space_q <= 1'b0;
      m_we    <= 1'b0;
      m_addr  <= '0;
      m_wdata <= '0;
      h_rdata <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (h_req) begin
          st      <= S_ACCESS;
          space_q <= h_space;
          m_we    <= h_we;
          m_addr  <= h_addr;
          m_wdata <= h_wdata;
        end
        S_ACCESS: begin
          st      <= S_ACK;
          h_rdata <= space_q ? d_rdata : p_rdata;
        end
        default: if (!h_req) st <= S_IDLE;
      endcase
    end
  end

  assign p_en  = (st == S_ACCESS) && !space_q;
  assign d_en  = (st == S_ACCESS) &&  space_q;
  assign h_ack = (st == S_ACK);

endmodule
