// tb_sch_io_board: self-checking test of the standard I/O board. Test link
// ends are attached to all six ports. The test checks that IN waits (io_rdy
// low) until a word arrives and returns it, that OUT delivers words and
// waits while its source is busy, the status and Init register, and that
// the two rate generators tick at the programmed rates, separately and
// cascaded.
module tb_sch_io_board;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0;
  logic io_rd = 0, io_wr = 0, io_rdy, tick0, tick1;
  logic [2:0] io_port = 0;
  word_t io_wdata = 0, io_rdata;
  int checks = 0, failures = 0;

  sch_link li0 (.clk, .rst_n);
  sch_link li1 (.clk, .rst_n);
  sch_link li2 (.clk, .rst_n);
  sch_link lo0 (.clk, .rst_n);
  sch_link lo1 (.clk, .rst_n);
  sch_link lo2 (.clk, .rst_n);

  logic [2:0] s_wr = 0, s_busy, a_rd = 0, a_valid, s_seen, a_seen;
  word_t s_data [3];
  word_t a_data [3];

  sch_link_src ts0 (.clk, .rst_n, .wr(s_wr[0]), .wdata(s_data[0]), .busy(s_busy[0]), .init_req(1'b0),
                    .err_req(1'b0), .err_seen(s_seen[0]), .link(li0));
  sch_link_src ts1 (.clk, .rst_n, .wr(s_wr[1]), .wdata(s_data[1]), .busy(s_busy[1]), .init_req(1'b0),
                    .err_req(1'b1), .err_seen(s_seen[1]), .link(li1));
  sch_link_src ts2 (.clk, .rst_n, .wr(s_wr[2]), .wdata(s_data[2]), .busy(s_busy[2]), .init_req(1'b0),
                    .err_req(1'b0), .err_seen(s_seen[2]), .link(li2));
  sch_link_acc ta0 (.clk, .rst_n, .rd(a_rd[0]), .rdata(a_data[0]), .valid(a_valid[0]), .init_req(1'b0),
                    .err_req(1'b0), .err_seen(a_seen[0]), .link(lo0));
  sch_link_acc ta1 (.clk, .rst_n, .rd(a_rd[1]), .rdata(a_data[1]), .valid(a_valid[1]), .init_req(1'b0),
                    .err_req(1'b0), .err_seen(a_seen[1]), .link(lo1));
  sch_link_acc ta2 (.clk, .rst_n, .rd(a_rd[2]), .rdata(a_data[2]), .valid(a_valid[2]), .init_req(1'b0),
                    .err_req(1'b1), .err_seen(a_seen[2]), .link(lo2));

  sch_io_board dut (.clk, .rst_n, .io_rd, .io_wr, .io_port, .io_wdata, .io_rdata, .io_rdy,
                    .tick0, .tick1, .in0(li0), .in1(li1), .in2(li2),
                    .out0(lo0), .out1(lo1), .out2(lo2));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  // one bus cycle; returns the number of cycles waited for io_rdy
  task automatic bus(logic w, logic [2:0] p, word_t d, output word_t q, output int waited);
    waited = 0;
    @(negedge clk); io_rd = !w; io_wr = w; io_port = p; io_wdata = d;
    #1;
    while (!io_rdy) begin @(negedge clk); waited++; #1; end
    q = io_rdata;
    @(negedge clk); io_rd = 0; io_wr = 0;
  endtask

  task automatic src_send(int n, word_t v);
    @(negedge clk); s_data[n] = v; s_wr[n] = 1;
    @(negedge clk); s_wr[n] = 0;
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    word_t q;
    int w, t_a, t_b, nt1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // IN waits for the word
    fork
      bus(1'b0, 3'd1, 16'd0, q, w);
      begin repeat (10) @(negedge clk); src_send(1, 16'h1234); end
    join
    check("in data", q, 16'h1234);
    check("in waited", w >= 10, 1);
    for (int p = 0; p < 3; p++) begin
      src_send(p, word_t'(16'hA000 + p));
      repeat (6) @(negedge clk);
      bus(1'b0, 3'(p), 16'd0, q, w);
      check("in port", q, 16'hA000 + p);
      check("in no wait", w, 0);
    end
    // OUT delivers; a second OUT waits while the acceptor holds the first word
    for (int p = 0; p < 3; p++) begin
      bus(1'b1, 3'(p), word_t'(16'hB000 + p), q, w);
      check("out no wait", w, 0);
      repeat (6) @(negedge clk);
      check("out delivered", a_valid[p], 1);
      check("out data", a_data[p], 16'hB000 + p);
    end
    fork
      bus(1'b1, 3'd0, 16'hC000, q, w);          // delivered to the link register
      begin repeat (3) @(negedge clk); end
    join
    fork
      bus(1'b1, 3'd0, 16'hC001, q, w);          // held until the acceptor reads
      begin repeat (20) @(negedge clk); a_rd[0] = 1; @(negedge clk); a_rd[0] = 0; end
    join
    check("out waited", w > 10, 1);
    // status: link 1 source drives Error, link 2 acceptor drives Error
    bus(1'b0, IO_STAT, 16'd0, q, w);
    check("status src_err", q[11:9], 3'b100);
    check("status acc_err", q[8:6], 3'b010);
    check("status src_busy", q[0], 1);
    // Init on acceptor 0 through port 7, with a word waiting there
    src_send(0, 16'h5555);
    repeat (8) @(negedge clk);
    bus(1'b0, IO_STAT, 16'd0, q, w);
    check("acc0 valid", q[3], 1);
    bus(1'b1, IO_STAT, 16'b001_000, q, w);
    bus(1'b0, IO_STAT, 16'd0, q, w);
    check("acc0 cleared", q[3], 0);
    // rate generators: 7 cycles, and cascaded x3
    bus(1'b1, IO_RG0, 16'd7, q, w);
    bus(1'b1, IO_RG1, 16'd3, q, w);
    bus(1'b1, IO_RGCTL, 16'b111, q, w);
    bus(1'b0, IO_RG0, 16'd0, q, w);
    check("rg0 readback", q, 7);
    t_a = -1; nt1 = 0;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      if (tick0) begin
        if (t_a >= 0) check("tick0 period", cyc - t_a, 7);
        t_a = cyc;
      end
      if (tick1) begin
        if (nt1 > 0) check("tick1 period", cyc - t_b, 21);
        t_b = cyc; nt1++;
      end
    end
    check("tick1 seen", nt1 > 5, 1);
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
