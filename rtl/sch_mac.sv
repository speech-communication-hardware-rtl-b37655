// sch_mac: 16 x 16 signed multiplier-accumulator with its two result
// registers, P (most significant 16 bits) and MLSB (least significant 16).
//
// The SCH execution level contains a single-chip 16 x 16 multiplier-
// accumulator; register A is the first operand and a data memory word the
// second. Each enabled cycle performs one operation on the 32-bit
// accumulator {P, MLSB}:
//   MAC_MPY   {P,MLSB} <= a*b              MAC_MAC  {P,MLSB} <= {P,MLSB} + a*b
//   MAC_MSU   {P,MLSB} <= {P,MLSB} - a*b   MAC_CLR  {P,MLSB} <= 0
//   MAC_LDP   P <= d                       MAC_LDM  MLSB <= d
//   MAC_SHIFT {P,MLSB} shifted left (shl=1) or arithmetic right by shamt
// The operands are two's-complement integers and the full 32-bit product is
// kept, so a Q15 x Q15 product appears as Q30 with its Q15 part in P shifted
// by one place; the shift operation is there to rescale. The accumulator
// wraps modulo 2^32: the guard bits of the commercial part are not modelled,
// which is this design's choice. The subtracting accumulate and the 32-bit
// shift are also this design's choices; the description names only
// multiplication and accumulation.
//
// Timing: one operation per cycle when en=1; results visible the next cycle.
module sch_mac
  import sch_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  mac_op_e  op,
  input  word_t    a,
  input  word_t    b,
  input  word_t    d,
  input  logic     shl,
  input  logic [3:0] shamt,
  output word_t    p,
  output word_t    mlsb
);

  logic signed [31:0] acc, prod, acc_next;

  assign acc  = {p, mlsb};
  assign prod = $signed(a) * $signed(b);

  always_comb begin
    acc_next = acc;
    unique case (op)
      MAC_MPY:   acc_next = prod;
      MAC_MAC:   acc_next = acc + prod;
      MAC_MSU:   acc_next = acc - prod;
      MAC_CLR:   acc_next = '0;
      MAC_LDP:   acc_next = {d, mlsb};
      MAC_LDM:   acc_next = {p, d};
      MAC_SHIFT: acc_next = shl ? (acc <<< shamt) : (acc >>> shamt);
      default:   acc_next = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p    <= '0;
      mlsb <= '0;
    end else if (en) begin
      {p, mlsb} <= acc_next;
    end
  end

endmodule
