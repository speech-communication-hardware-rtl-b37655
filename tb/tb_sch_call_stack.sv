// tb_sch_call_stack: self-checking test of the 4-level return stack. Nested
// pushes and pops are compared with a queue model; the fifth push reports
// overflow and overwrites the oldest entry, a pop of an empty stack reports
// underflow.
module tb_sch_call_stack;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [PC_W-1:0] din = 0, top;
  logic ovf, unf;
  logic [2:0] level;
  int checks = 0, failures = 0;
  logic [PC_W-1:0] model [$];

  sch_call_stack dut (.clk, .rst_n, .push, .pop, .din, .top, .overflow(ovf), .underflow(unf), .level);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic do_push(logic [PC_W-1:0] v);
    @(negedge clk); push = 1; din = v;
    @(negedge clk); push = 0;
    model.push_back(v);
    if (model.size() > 4) begin
      void'(model.pop_front());
      check("ovf", ovf, 1);
    end else check("ovf", ovf, 0);
    check("top", top, model[$]);
    check("level", level, model.size());
  endtask

  task automatic do_pop();
    @(negedge clk); pop = 1;
    @(negedge clk); pop = 0;
    void'(model.pop_back());
    check("unf", unf, 0);
    if (model.size() > 0) check("top", top, model[$]);
    check("level", level, model.size());
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      int n;
      n = $urandom_range(1, 4);
      for (int i = 0; i < n; i++) do_push(PC_W'($urandom));
      for (int i = 0; i < n; i++) do_pop();
    end
    // overflow: five nested calls, then four returns give the newest four
    for (int i = 0; i < 5; i++) do_push(PC_W'(100 + i));
    for (int i = 0; i < 4; i++) do_pop();
    // underflow
    @(negedge clk); pop = 1;
    @(negedge clk); pop = 0;
    check("unf", unf, 1);
    check("level0", level, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
