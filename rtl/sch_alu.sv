// sch_alu: 16-bit arithmetic/logic unit and shifter of the SCH execution
// level, purely combinational.
//
// It computes y = f(a, b) and a full condition code {N, Z, C, V}; the core
// decides which of the four flags an instruction actually keeps. Add, subtract
// (with or without carry/borrow), the three logic operations, complement,
// negate, and shifts of a by 0..15 places (arithmetic left, arithmetic right,
// logical right, rotate) are provided. The processor is described only as
// having "standard operations as load, store, add, subtract, logical" and
// shift operations with a four-bit condition code; the flag meanings are this
// design's choice: C is the carry out of an addition, the borrow of a
// subtraction (set when a < b unsigned), and the last bit shifted out of a
// shift (unchanged for a shift by 0 and for rotates); V is two's-complement
// overflow of add/subtract and 0 otherwise.
//
// Ports: op, a, b, cin (current C flag), shamt; y, flags. No timing: the
// result settles within the execute cycle.
module sch_alu
  import sch_pkg::*;
(
  input  alu_op_e      op,
  input  word_t        a,
  input  word_t        b,
  input  logic         cin,
  input  logic [3:0]   shamt,
  output word_t        y,
  output cc_t          flags
);

  logic [16:0] sum;
  logic        c_out;
  logic        v_out;

  always_comb begin
    sum   = '0;
    y     = '0;
    c_out = cin;
    v_out = 1'b0;
    unique case (op)
      ALU_PASSB: y = b;
      ALU_ADD, ALU_ADC: begin
        sum   = {1'b0, a} + {1'b0, b} + {16'd0, (op == ALU_ADC) & cin};
        y     = sum[15:0];
        c_out = sum[16];
        v_out = (a[15] == b[15]) && (y[15] != a[15]);
      end
      ALU_SUB, ALU_SBC: begin
        sum   = {1'b0, a} - {1'b0, b} - {16'd0, (op == ALU_SBC) & cin};
        y     = sum[15:0];
        c_out = sum[16];
        v_out = (a[15] != b[15]) && (y[15] != a[15]);
      end
      ALU_NEG: begin
        sum   = 17'd0 - {1'b0, a};
        y     = sum[15:0];
        c_out = sum[16];
        v_out = (a == 16'h8000);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOT: y = ~a;
      ALU_ASL: begin
        y = a << shamt;
        if (shamt != 4'd0) c_out = a[4'(5'd16 - {1'b0, shamt})];
      end
      ALU_ASR: begin
        y = word_t'($signed(a) >>> shamt);
        if (shamt != 4'd0) c_out = a[shamt - 4'd1];
      end
      ALU_LSR: begin
        y = a >> shamt;
        if (shamt != 4'd0) c_out = a[shamt - 4'd1];
      end
      ALU_ROL: y = (a << shamt) | (a >> (5'd16 - {1'b0, shamt}));
      default: y = b;
    endcase
    flags = '{n: y[15], z: (y == '0), c: c_out, v: v_out};
  end

endmodule
