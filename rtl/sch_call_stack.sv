// sch_call_stack: return-address stack for subroutine calls, four levels deep
// as in the SCH instruction set.
//
// A CALL pushes its return address, a RET pops it; the top entry is always
// visible on `top` so the decode level can redirect the fetch in the same
// cycle as the RET. Four levels of nesting is the published limit; what
// happens beyond it is not described, so this design keeps the stack as a
// circular buffer (a fifth CALL overwrites the oldest entry, a RET on an
// empty stack returns whatever entry the pointer wraps to) and reports both cases on
// `overflow` / `underflow` for one cycle.
//
// Timing: push/pop take effect at the clock edge; push and pop in the same
// cycle are not allowed (one control-flow instruction per cycle).
module sch_call_stack
  import sch_pkg::*;
#(
  parameter int unsigned DEPTH = STACK_DEPTH,
  parameter int unsigned AW    = PC_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic          pop,
  input  logic [AW-1:0] din,
  output logic [AW-1:0] top,
  output logic          overflow,
  output logic          underflow,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] sp;      // index of the current top entry

  assign top = mem[sp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp        <= '0;
      level     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      overflow  <= 1'b0;
      underflow <= 1'b0;
      if (push) begin
        sp          <= PW'((int'(sp) + 1) % DEPTH);
        mem[PW'((int'(sp) + 1) % DEPTH)] <= din;
        if (level == DEPTH[$clog2(DEPTH+1)-1:0]) overflow <= 1'b1;
        else                                     level <= level + 1'b1;
      end else if (pop) begin
        sp <= PW'((int'(sp) + DEPTH - 1) % DEPTH);
        if (level == '0) underflow <= 1'b1;
        else             level <= level - 1'b1;
      end
    end
  end

  // The core issues at most one control-flow instruction per cycle.
  a_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));

endmodule
