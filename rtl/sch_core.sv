// sch_core: the SCH processor core, a three-level pipeline that issues one
// 16-bit instruction per 200 ns cycle.
//
//   Level 1, fetch:    the instruction at PC is read from program memory.
//   Level 2, decode:   the instruction is decoded, the data address is formed
//                      (direct: the first 256 words; indexed: X + 8-bit
//                      offset) and the operand is read from data memory.
//                      Jumps, calls and returns are resolved here.
//   Level 3, execute:  ALU, multiplier-accumulator, register and condition
//                      code updates, data memory write, I/O transfer.
//
// The three levels, the register set (A, B, X, P, MLSB, 10-bit PC), the
// 4-bit condition code, the 4-level subroutine stack, the two addressing
// modes and the instruction-group sizes follow the published description.
// The encoding (see sch_pkg), the flag rules, the I/O instructions and the
// hazard handling are this design's:
//   * A taken jump, CALL or RET discards the one instruction fetched behind
//     it (one bubble). A conditional jump sees the condition code that the
//     instruction in the execute level is producing in the same cycle.
//   * A data memory word written by the execute level and read in the same
//     cycle by the decode level is bypassed, so store-then-load is exact.
//   * X is NOT forwarded to the address computation: an indexed access
//     directly after an instruction that changes X uses the old X. This is
//     the one pipeline effect visible to the programmer.
//   * The pipeline holds (nothing changes) when run_en is low (halt, or
//     between single steps), when the host steals a memory cycle, or when an
//     IN finds no word ready / an OUT finds its port busy.
//
// Ports: run_en from the host interface; program memory fetch port; data
// memory read and write ports; I/O port bus (io_rd/io_wr, io_port, io_rdy);
// shared flag; event outputs for instrumentation (retire, flush, bypass,
// io_stall, stolen cycle).
module sch_core
  import sch_pkg::*;
#(
  parameter int unsigned DAW = DADDR_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run_en,
  input  logic            stolen,
  // program memory
  output logic [PC_W-1:0] pc,
  input  word_t           instr,
  // data memory
  output logic [DAW-1:0]  d_raddr,
  input  word_t           d_rdata,
  output logic            d_we,
  output logic [DAW-1:0]  d_waddr,
  output word_t           d_wdata,
  // I/O board
  output logic            io_rd,
  output logic            io_wr,
  output logic [2:0]      io_port,
  output word_t           io_wdata,
  input  word_t           io_rdata,
  input  logic            io_rdy,
  // host/SCH shared flag
  input  logic            flag,
  output logic            flag_set,
  output logic            flag_clr,
  // visible state and events
  output word_t           reg_a,
  output word_t           reg_b,
  output word_t           reg_x,
  output word_t           reg_p,
  output word_t           reg_m,
  output cc_t             cc,
  output logic            ev_retire,
  output logic            ev_flush,
  output logic            ev_bypass,
  output logic            ev_io_stall,
  output logic            ev_stack_ovf
);

  // ------------------------------------------------------------------ state
  logic            advance;
  logic            io_stall;

  // level 2 (decode) registers
  logic            d_valid;
  word_t           d_ir;
  logic [PC_W-1:0] d_pc;

  // level 3 (execute) registers
  logic            e_valid;
  word_t           e_ir;
  logic [DAW-1:0]  e_addr;
  word_t           e_opnd;

  word_t a_q, b_q, x_q;
  cc_t   cc_q;

  assign reg_a = a_q;
  assign reg_b = b_q;
  assign reg_x = x_q;
  assign cc    = cc_q;

  // ------------------------------------------------------- execute level
  logic    e_is_mr, e_is_rr, e_is_io;
  mop_e    e_mop;
  rop_e    e_rop;
  alu_op_e alu_op;
  word_t   alu_a, alu_b, alu_y;
  cc_t     alu_f;
  logic [3:0] shamt;
  logic    wr_a, wr_b, wr_x, xab, upd_nzv, upd_c, mem_we;
  word_t   mem_wd;
  mac_op_e mac_op;
  logic    mac_shl;
  cc_t     cc_next;

  assign e_is_mr = e_ir[15];
  assign e_is_rr = (e_ir[15:12] == 4'b0101);
  assign e_is_io = (e_ir[15:12] == 4'b0110);
  assign e_mop   = mop_e'(e_ir[14:10]);
  assign e_rop   = rop_e'(e_ir[4:0]);
  assign shamt   = e_ir[11:8];

  always_comb begin
    alu_op  = ALU_PASSB;
    alu_a   = a_q;
    alu_b   = e_opnd;
    wr_a    = 1'b0;
    wr_b    = 1'b0;
    wr_x    = 1'b0;
    xab     = 1'b0;
    upd_nzv = 1'b0;
    upd_c   = 1'b0;
    mem_we  = 1'b0;
    mem_wd  = a_q;
    mac_op  = MAC_NONE;
    mac_shl = 1'b0;
    flag_set = 1'b0;
    flag_clr = 1'b0;
    if (e_valid && e_is_mr) begin
      unique case (e_mop)
        M_LDA:  begin wr_a = 1'b1; upd_nzv = 1'b1; end
        M_LDB:  begin wr_b = 1'b1; upd_nzv = 1'b1; end
        M_LDX:  begin wr_x = 1'b1; upd_nzv = 1'b1; end
        M_LDP:  mac_op = MAC_LDP;
        M_LDM:  mac_op = MAC_LDM;
        M_STA:  begin mem_we = 1'b1; mem_wd = a_q; end
        M_STB:  begin mem_we = 1'b1; mem_wd = b_q; end
        M_STX:  begin mem_we = 1'b1; mem_wd = x_q; end
        M_STP:  begin mem_we = 1'b1; mem_wd = reg_p; end
        M_STM:  begin mem_we = 1'b1; mem_wd = reg_m; end
        M_ADDA: begin alu_op = ALU_ADD; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_ADDB: begin alu_op = ALU_ADD; alu_a = b_q; wr_b = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_SUBA: begin alu_op = ALU_SUB; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_SUBB: begin alu_op = ALU_SUB; alu_a = b_q; wr_b = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_ADCA: begin alu_op = ALU_ADC; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_SBCA: begin alu_op = ALU_SBC; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_ANDA: begin alu_op = ALU_AND; wr_a = 1'b1; upd_nzv = 1'b1; end
        M_ORA:  begin alu_op = ALU_OR;  wr_a = 1'b1; upd_nzv = 1'b1; end
        M_XORA: begin alu_op = ALU_XOR; wr_a = 1'b1; upd_nzv = 1'b1; end
        M_CMPA: begin alu_op = ALU_SUB; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_CMPB: begin alu_op = ALU_SUB; alu_a = b_q; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_ADDX: begin alu_op = ALU_ADD; alu_a = x_q; wr_x = 1'b1; end
        M_MPY:  mac_op = MAC_MPY;
        M_MAC:  mac_op = MAC_MAC;
        M_MSU:  mac_op = MAC_MSU;
        M_INCM: begin alu_op = ALU_ADD; alu_a = e_opnd; alu_b = 16'd1; mem_we = 1'b1;
                      mem_wd = alu_y; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_DECM: begin alu_op = ALU_SUB; alu_a = e_opnd; alu_b = 16'd1; mem_we = 1'b1;
                      mem_wd = alu_y; upd_nzv = 1'b1; upd_c = 1'b1; end
        M_ANDB: begin alu_op = ALU_AND; alu_a = b_q; wr_b = 1'b1; upd_nzv = 1'b1; end
        M_ORB:  begin alu_op = ALU_OR;  alu_a = b_q; wr_b = 1'b1; upd_nzv = 1'b1; end
        M_TSTM: upd_nzv = 1'b1;
        default: ;
      endcase
    end else if (e_valid && e_is_rr) begin
      unique case (e_rop)
        R_TAB:  begin alu_b = a_q;   wr_b = 1'b1; upd_nzv = 1'b1; end
        R_TBA:  begin alu_b = b_q;   wr_a = 1'b1; upd_nzv = 1'b1; end
        R_TAX:  begin alu_b = a_q;   wr_x = 1'b1; end
        R_TXA:  begin alu_b = x_q;   wr_a = 1'b1; upd_nzv = 1'b1; end
        R_TBX:  begin alu_b = b_q;   wr_x = 1'b1; end
        R_TXB:  begin alu_b = x_q;   wr_b = 1'b1; upd_nzv = 1'b1; end
        R_TPA:  begin alu_b = reg_p; wr_a = 1'b1; upd_nzv = 1'b1; end
        R_TMA:  begin alu_b = reg_m; wr_a = 1'b1; upd_nzv = 1'b1; end
        R_TAP:  mac_op = MAC_LDP;
        R_TAM:  mac_op = MAC_LDM;
        R_XAB:  xab = 1'b1;
        R_CLA:  begin alu_b = '0; wr_a = 1'b1; upd_nzv = 1'b1; end
        R_CLB:  begin alu_b = '0; wr_b = 1'b1; upd_nzv = 1'b1; end
        R_CLP:  mac_op = MAC_CLR;
        R_NEGA: begin alu_op = ALU_NEG; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        R_NOTA: begin alu_op = ALU_NOT; wr_a = 1'b1; upd_nzv = 1'b1; end
        R_INCA: begin alu_op = ALU_ADD; alu_b = 16'd1; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        R_DECA: begin alu_op = ALU_SUB; alu_b = 16'd1; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        R_INX:  begin alu_op = ALU_ADD; alu_a = x_q; alu_b = 16'd1; wr_x = 1'b1; upd_nzv = 1'b1; end
        R_DEX:  begin alu_op = ALU_SUB; alu_a = x_q; alu_b = 16'd1; wr_x = 1'b1; upd_nzv = 1'b1; end
        R_ABA:  begin alu_op = ALU_ADD; alu_b = b_q; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        R_SBA:  begin alu_op = ALU_SUB; alu_b = b_q; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        R_ASL:  begin alu_op = ALU_ASL; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        R_ASR:  begin alu_op = ALU_ASR; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        R_LSR:  begin alu_op = ALU_LSR; wr_a = 1'b1; upd_nzv = 1'b1; upd_c = 1'b1; end
        R_ROL:  begin alu_op = ALU_ROL; wr_a = 1'b1; upd_nzv = 1'b1; end
        R_ASLP: begin mac_op = MAC_SHIFT; mac_shl = 1'b1; end
        R_ASRP: mac_op = MAC_SHIFT;
        R_SETF: flag_set = advance;
        R_CLRF: flag_clr = advance;
        default: ;
      endcase
    end
  end

  sch_alu u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .cin(cc_q.c), .shamt(shamt),
    .y(alu_y), .flags(alu_f)
  );

  sch_mac u_mac (
    .clk(clk), .rst_n(rst_n), .en(advance), .op(mac_op),
    .a(a_q), .b(e_opnd), .d(e_is_mr ? e_opnd : a_q), .shl(mac_shl), .shamt(shamt),
    .p(reg_p), .mlsb(reg_m)
  );

  always_comb begin
    cc_next = cc_q;
    if (upd_nzv) begin
      cc_next.n = alu_f.n;
      cc_next.z = alu_f.z;
      cc_next.v = alu_f.v;
    end
    if (upd_c) cc_next.c = alu_f.c;
  end

  // I/O transfers happen in the execute level and hold the pipeline while
  // the addressed port is not ready.
  assign io_port  = e_ir[2:0];
  assign io_wdata = a_q;
  assign io_rd    = e_valid && e_is_io && !e_ir[11] && run_en && !stolen;
  assign io_wr    = e_valid && e_is_io &&  e_ir[11] && run_en && !stolen;
  assign io_stall = (io_rd || io_wr) && !io_rdy;
  assign advance  = run_en && !stolen && !io_stall;

  assign d_we    = advance && mem_we;
  assign d_waddr = e_addr;
  assign d_wdata = mem_wd;

  // -------------------------------------------------------- decode level
  logic            d_is_jcc, d_is_call, d_is_ret, d_is_mr;
  logic            taken, redirect;
  logic [PC_W-1:0] target;
  logic [DAW-1:0]  ea;
  logic            bypass;
  word_t           opnd;
  logic            flag_fwd;
  logic [PC_W-1:0] stk_top;
  logic            stk_ovf, stk_unf;
  logic [$clog2(STACK_DEPTH+1)-1:0] stk_level;

  assign d_is_jcc  = d_valid && (d_ir[15:14] == 2'b00);
  assign d_is_call = d_valid && (d_ir[15:10] == 6'b0100_00);
  assign d_is_ret  = d_valid && (d_ir[15:10] == 6'b0100_01);
  assign d_is_mr   = d_valid && d_ir[15];

  // flag as it will be after the instruction now in the execute level
  assign flag_fwd = (e_valid && e_is_rr && e_rop == R_SETF) ? 1'b1 :
                    (e_valid && e_is_rr && e_rop == R_CLRF) ? 1'b0 : flag;

  function automatic logic cond_true(cond_e c, cc_t f, logic fl);
    unique case (c)
      C_ALW: return 1'b1;
      C_EQ:  return f.z;
      C_NE:  return !f.z;
      C_MI:  return f.n;
      C_PL:  return !f.n;
      C_CS:  return f.c;
      C_CC:  return !f.c;
      C_VS:  return f.v;
      C_VC:  return !f.v;
      C_LT:  return f.n ^ f.v;
      C_GE:  return !(f.n ^ f.v);
      C_GT:  return !f.z && !(f.n ^ f.v);
      C_LE:  return f.z || (f.n ^ f.v);
      C_FS:  return fl;
      C_FC:  return !fl;
      default: return 1'b0;
    endcase
  endfunction

  assign taken    = d_is_jcc && cond_true(cond_e'(d_ir[13:10]), cc_next, flag_fwd);
  assign redirect = taken || d_is_call || d_is_ret;
  assign target   = d_is_ret ? stk_top : d_ir[PC_W-1:0];

  // effective address: direct (first 256 words) or X + 8-bit offset
  assign ea      = d_ir[8] ? (x_q[DAW-1:0] + DAW'(d_ir[7:0])) : DAW'(d_ir[7:0]);
  assign d_raddr = ea;
  assign bypass  = d_is_mr && e_valid && mem_we && (e_addr == ea);
  assign opnd    = bypass ? mem_wd : d_rdata;

  sch_call_stack #(.DEPTH(STACK_DEPTH), .AW(PC_W)) u_stack (
    .clk(clk), .rst_n(rst_n),
    .push(advance && d_is_call), .pop(advance && d_is_ret),
    .din(d_pc + 1'b1), .top(stk_top),
    .overflow(stk_ovf), .underflow(stk_unf), .level(stk_level)
  );

  // --------------------------------------------------- pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      d_valid <= 1'b0;
      d_ir    <= '0;
      d_pc    <= '0;
      e_valid <= 1'b0;
      e_ir    <= '0;
      e_addr  <= '0;
      e_opnd  <= '0;
      a_q     <= '0;
      b_q     <= '0;
      x_q     <= '0;
      cc_q    <= '0;
    end else if (advance) begin
      // level 1 -> 2
      pc      <= redirect ? target : pc + 1'b1;
      d_ir    <= instr;
      d_pc    <= pc;
      d_valid <= !redirect;
      // level 2 -> 3 (control-flow instructions finish in level 2)
      e_valid <= d_valid && (d_ir[15] || d_ir[15:13] == 3'b011 || d_ir[15:12] == 4'b0101);
      e_ir    <= d_ir;
      e_addr  <= ea;
      e_opnd  <= opnd;
      // level 3 results
      if (e_valid) begin
        cc_q <= cc_next;
        if (xab) begin
          a_q <= b_q;
          b_q <= a_q;
        end
        if (wr_a) a_q <= alu_y;
        if (wr_b) b_q <= alu_y;
        if (wr_x) x_q <= alu_y;
        if (e_is_io && !e_ir[11]) a_q <= io_rdata;
      end
    end
  end

  assign ev_retire    = advance && e_valid;
  assign ev_flush     = advance && redirect;
  assign ev_bypass    = advance && bypass;
  assign ev_io_stall  = io_stall;
  assign ev_stack_ovf = stk_ovf;

  // An instruction in the execute level never both writes memory and reads
  // an I/O port.
  a_io_mem_excl: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(e_valid && e_is_io && mem_we));

endmodule
