// tb_sch_fifo: self-checking test of the 256-word FIFO module between a test
// source and a test acceptor. The source fills the FIFO while the acceptor
// takes nothing: the module must hold 256 words (count = 256) plus one in
// its input and one in its output register before it stops asking. The
// words are then drained in order with random pauses. Init empties the
// module, and Error crosses it in both directions.
module tb_sch_fifo;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0, busy, valid;
  word_t wdata = 0, rdata;
  logic s_init = 0, s_err = 0, a_err = 0, s_seen, a_seen;
  logic [8:0] count;
  int checks = 0, failures = 0;
  word_t sent [$];
  int nsent, nrecv;
  bit take = 0;

  sch_link li (.clk, .rst_n);
  sch_link lo (.clk, .rst_n);
  sch_link_src u_src (.clk, .rst_n, .wr, .wdata, .busy, .init_req(s_init), .err_req(s_err),
                      .err_seen(s_seen), .link(li));
  sch_fifo dut (.clk, .rst_n, .count, .in(li), .out(lo));
  sch_link_acc u_acc (.clk, .rst_n, .rd, .rdata, .valid, .init_req(1'b0), .err_req(a_err),
                      .err_seen(a_seen), .link(lo));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  always @(negedge clk) begin
    rd = take && valid && ($urandom_range(0, 1) == 0);
    if (rd) begin
      check("word", rdata, sent.pop_front());
      nrecv++;
    end
  end

  task automatic send_until_blocked();
    int idle;
    idle = 0;
    while (idle < 40) begin
      @(negedge clk);
      if (!busy) begin
        wr = 1; wdata = 16'($urandom); sent.push_back(wdata); nsent++;
        @(negedge clk); wr = 0; idle = 0;
      end else idle++;
    end
  endtask

  initial begin
    nsent = 0; nrecv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_until_blocked();
    check("count full", count, 256);
    // 256 in the buffer, one in each of its two link registers, one in the
    // test acceptor and one held by the test source
    check("words accepted", nsent, 256 + 2 + 2);
    take = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (!busy) begin
        wr = 1; wdata = 16'($urandom); sent.push_back(wdata); nsent++;
        @(negedge clk); wr = 0;
      end
    end
    while (sent.size() != 0) @(negedge clk);
    check("all received", nrecv, nsent);
    check("count empty", count, 0);
    // Init empties the module
    take = 0;
    for (int i = 0; i < 10; i++) begin
      while (busy) @(negedge clk);
      wr = 1; wdata = 16'(i); @(negedge clk); wr = 0;
    end
    repeat (20) @(negedge clk);
    check("count before init", count != 0, 1);
    s_init = 1; @(negedge clk); s_init = 0;
    repeat (2) @(negedge clk);
    check("count after init", count, 0);
    // Error crosses the FIFO
    s_err = 1; #1; check("err forward", a_seen, 1); s_err = 0;
    a_err = 1; #1; check("err backward", s_seen, 1); a_err = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
