// tb_sch_link: self-checking test of a source end and an acceptor end joined
// by one 20-line link. Words are sent with random pauses on both sides and
// must arrive once each and in order; with both sides always ready a word
// must take exactly four cycles. Init from the acceptor must empty the
// source's holding register, and each end must see the other's Error line.
module tb_sch_link;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0, busy, valid;
  word_t wdata = 0, rdata;
  logic s_init = 0, a_init = 0, s_err = 0, a_err = 0, s_seen, a_seen;
  int checks = 0, failures = 0;
  word_t sent [$];
  int nrecv;
  bit rand_rd = 1;
  bit hold_rd = 0;

  sch_link l (.clk, .rst_n);
  sch_link_src u_src (.clk, .rst_n, .wr, .wdata, .busy, .init_req(s_init), .err_req(s_err),
                      .err_seen(s_seen), .link(l));
  sch_link_acc u_acc (.clk, .rst_n, .rd, .rdata, .valid, .init_req(a_init), .err_req(a_err),
                      .err_seen(a_seen), .link(l));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  // receiver
  always @(negedge clk) begin
    rd = !hold_rd && valid && (!rand_rd || $urandom_range(0, 2) == 0);
    if (rd) begin
      if (sent.size() == 0) check("unexpected", 1, 0);
      else check("word", rdata, sent.pop_front());
      nrecv++;
    end
  end

  initial begin
    int t0;
    nrecv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      while (busy) @(negedge clk);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
      wr = 1; wdata = 16'($urandom); sent.push_back(wdata);
      @(negedge clk); wr = 0;
    end
    while (sent.size() != 0) @(negedge clk);
    check("received", nrecv, 300);
    // throughput with both ends always ready
    rand_rd = 0;
    @(negedge clk);
    t0 = $time;
    for (int i = 0; i < 20; i++) begin
      while (busy) @(negedge clk);
      wr = 1; wdata = 16'(i); sent.push_back(wdata);
      @(negedge clk); wr = 0;
    end
    while (sent.size() != 0) @(negedge clk);
    check("cycles for 20 words", ($time - t0) / 10, 4 * 20);
    // Init from the acceptor discards a word the source holds
    hold_rd = 1;
    @(negedge clk); wr = 1; wdata = 16'hBEEF;          // fills the acceptor
    @(negedge clk); wr = 0;
    repeat (6) @(negedge clk);
    wr = 1; wdata = 16'hDEAD;                          // held by the source
    @(negedge clk); wr = 0;
    repeat (6) @(negedge clk);
    check("busy while acceptor full", busy, 1);
    check("acceptor holds", valid, 1);
    a_init = 1;
    @(negedge clk); a_init = 0;
    check("cleared by init", busy, 0);
    repeat (10) @(negedge clk);
    check("acceptor empty after init", valid, 0);
    check("no word after init", nrecv, 320);
    // Error lines
    s_err = 1; a_err = 0; #1;
    check("acc sees err", a_seen, 1);
    check("src not", s_seen, 0);
    s_err = 0; a_err = 1; #1;
    check("src sees err", s_seen, 1);
    check("acc not", a_seen, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
