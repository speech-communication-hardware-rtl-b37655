// sch_pkg: shared types, constants and instruction encoders of the SCH
// 16-bit fixed-point signal processor.
//
// The processor has a three-level pipeline, a 1K x 16 program memory, a
// 4K x 16 data memory, the programmer registers A, B, X, P, MLSB and a 10-bit
// PC, a 4-bit condition code and a 4-level subroutine stack. Every instruction
// is one 16-bit word. The instruction groups and their sizes (thirty
// memory-register and thirty-one register-register instructions, direct
// addressing of the first 256 words, indexed addressing with X and an 8-bit
// offset) follow the published description; the bit layout below, the
// opcode numbering and the I/O instructions are this design's own:
//
//   00 cccc tttttttttt      Jcc   target      conditional / unconditional jump
//   0100 00 tttttttttt      CALL  target
//   0100 01 xxxxxxxxxx      RET
//   0101 nnnn xxx ooooo     register-register op o, shift count n
//   0110 d xxxxxxxx ppp     IN A,port (d=0) / OUT A,port (d=1)
//   1 ooooo 0 i aaaaaaaa    memory-register op o; i=1: address X+a, else a
package sch_pkg;

  localparam int unsigned WORD_W  = 16;
  localparam int unsigned PC_W    = 10;   // 1K-word program memory
  localparam int unsigned DADDR_W = 12;   // up to 4K-word data memory
  localparam int unsigned STACK_DEPTH = 4;

  typedef logic [WORD_W-1:0] word_t;

  // Condition code: N Z C V
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } cc_t;

  // Jump conditions (4-bit field)
  typedef enum logic [3:0] {
    C_ALW = 4'd0,  C_EQ = 4'd1,  C_NE = 4'd2,  C_MI = 4'd3,
    C_PL  = 4'd4,  C_CS = 4'd5,  C_CC = 4'd6,  C_VS = 4'd7,
    C_VC  = 4'd8,  C_LT = 4'd9,  C_GE = 4'd10, C_GT = 4'd11,
    C_LE  = 4'd12, C_FS = 4'd13, C_FC = 4'd14, C_NEV = 4'd15
  } cond_e;

  // Memory-register operations (30 of 32 codes used)
  typedef enum logic [4:0] {
    M_LDA  = 5'd0,  M_LDB  = 5'd1,  M_LDX  = 5'd2,  M_LDP  = 5'd3,
    M_LDM  = 5'd4,  M_STA  = 5'd5,  M_STB  = 5'd6,  M_STX  = 5'd7,
    M_STP  = 5'd8,  M_STM  = 5'd9,  M_ADDA = 5'd10, M_ADDB = 5'd11,
    M_SUBA = 5'd12, M_SUBB = 5'd13, M_ADCA = 5'd14, M_SBCA = 5'd15,
    M_ANDA = 5'd16, M_ORA  = 5'd17, M_XORA = 5'd18, M_CMPA = 5'd19,
    M_CMPB = 5'd20, M_ADDX = 5'd21, M_MPY  = 5'd22, M_MAC  = 5'd23,
    M_MSU  = 5'd24, M_INCM = 5'd25, M_DECM = 5'd26, M_ANDB = 5'd27,
    M_ORB  = 5'd28, M_TSTM = 5'd29
  } mop_e;

  // Register-register operations (31 of 32 codes used)
  typedef enum logic [4:0] {
    R_NOP  = 5'd0,  R_TAB  = 5'd1,  R_TBA  = 5'd2,  R_TAX  = 5'd3,
    R_TXA  = 5'd4,  R_TBX  = 5'd5,  R_TXB  = 5'd6,  R_TPA  = 5'd7,
    R_TMA  = 5'd8,  R_TAP  = 5'd9,  R_TAM  = 5'd10, R_XAB  = 5'd11,
    R_CLA  = 5'd12, R_CLB  = 5'd13, R_CLP  = 5'd14, R_NEGA = 5'd15,
    R_NOTA = 5'd16, R_INCA = 5'd17, R_DECA = 5'd18, R_INX  = 5'd19,
    R_DEX  = 5'd20, R_ABA  = 5'd21, R_SBA  = 5'd22, R_ASL  = 5'd23,
    R_ASR  = 5'd24, R_LSR  = 5'd25, R_ROL  = 5'd26, R_ASLP = 5'd27,
    R_ASRP = 5'd28, R_SETF = 5'd29, R_CLRF = 5'd30
  } rop_e;

  // ALU operations
  typedef enum logic [3:0] {
    ALU_PASSB, ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_AND, ALU_OR, ALU_XOR,
    ALU_NOT, ALU_NEG, ALU_ASL, ALU_ASR, ALU_LSR, ALU_ROL
  } alu_op_e;

  // Multiplier-accumulator operations
  typedef enum logic [2:0] {
    MAC_NONE, MAC_MPY, MAC_MAC, MAC_MSU, MAC_CLR, MAC_LDP, MAC_LDM, MAC_SHIFT
  } mac_op_e;

  // I/O board port map for IN/OUT
  localparam logic [2:0] IO_DATA0 = 3'd0;  // link ports 0..2
  localparam logic [2:0] IO_RG0   = 3'd4;  // rate generator 0 period
  localparam logic [2:0] IO_RG1   = 3'd5;  // rate generator 1 period
  localparam logic [2:0] IO_RGCTL = 3'd6;  // bit0 en0, bit1 en1, bit2 cascade
  localparam logic [2:0] IO_STAT  = 3'd7;  // read: {acceptor valid[2:0], source busy[2:0]}

  // Host command codes
  typedef enum logic [2:0] {
    H_NONE, H_RESET, H_RUN, H_HALT, H_STEP, H_SETF, H_CLRF
  } host_cmd_e;

  // ---------------- instruction encoders (used by programs/testbenches) ----
  function automatic word_t i_jmp(cond_e c, logic [PC_W-1:0] t);
    return {2'b00, c, t};
  endfunction
  function automatic word_t i_call(logic [PC_W-1:0] t);
    return {4'b0100, 2'b00, t};
  endfunction
  function automatic word_t i_ret();
    return {4'b0100, 2'b01, 10'd0};
  endfunction
  function automatic word_t i_rr(rop_e o, logic [3:0] n = 4'd1);
    return {4'b0101, n, 3'b000, o};
  endfunction
  function automatic word_t i_in(logic [2:0] p);
    return {4'b0110, 1'b0, 8'd0, p};
  endfunction
  function automatic word_t i_out(logic [2:0] p);
    return {4'b0110, 1'b1, 8'd0, p};
  endfunction
  function automatic word_t i_mr(mop_e o, logic idx, logic [7:0] a);
    return {1'b1, o, 1'b0, idx, a};
  endfunction

endpackage
