// tb_sch_rate_gen: self-checking test of two sampling-rate generators, the
// second cascaded on the first. Tick spacing is measured in clock cycles:
// generator 0 with period N ticks every N cycles, generator 1 with period M
// in cascade ticks every N*M cycles, and every M cycles when not cascaded.
module tb_sch_rate_gen;
  logic clk = 0, rst_n = 0, en0 = 0, en1 = 0, load0 = 0, load1 = 0, cascade = 0;
  logic [15:0] per0 = 0, per1 = 0;
  logic t0, t1;
  int checks = 0, failures = 0;
  int last0, last1, cyc;
  int n0, n1;

  sch_rate_gen g0 (.clk, .rst_n, .en(en0), .load(load0), .period(per0), .cascade(1'b0),
                   .tick_in(1'b0), .tick(t0));
  sch_rate_gen g1 (.clk, .rst_n, .en(en1), .load(load1), .period(per1), .cascade,
                   .tick_in(t0), .tick(t1));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic run(int p0, int p1, logic casc);
    int need;
    @(negedge clk);
    per0 = 16'(p0); per1 = 16'(p1); cascade = casc; en0 = 1; en1 = 1; load0 = 1; load1 = 1;
    @(negedge clk); load0 = 0; load1 = 0;
    last0 = -1; last1 = -1; n0 = 0; n1 = 0;
    need = 0;
    while (n1 < 4) begin
      @(posedge clk); #1;
      if (t0) begin
        if (last0 >= 0) begin check("period0", cyc - last0, p0); end
        last0 = cyc; n0++;
      end
      if (t1) begin
        if (last1 >= 0) check("period1", cyc - last1, casc ? p0 * p1 : p1);
        last1 = cyc; n1++;
      end
    end
  endtask

  initial begin
    cyc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(5, 3, 1'b1);
    run(7, 4, 1'b0);
    run(1, 2, 1'b1);
    run(13, 6, 1'b1);
    // disabled generator stays silent
    @(negedge clk); en0 = 0; en1 = 0;
    repeat (50) begin
      @(posedge clk); #1;
      check("silent", t0 | t1, 0);
    end
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
