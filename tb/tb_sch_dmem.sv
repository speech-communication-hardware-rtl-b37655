// tb_sch_dmem: self-checking test of the 4K-word data memory. Random core
// reads and writes are checked against an array model, including a read of
// the word being written in the same cycle (old value expected) and host
// cycles that override the core's write.
module tb_sch_dmem;
  import sch_pkg::*;

  logic clk = 0, c_we = 0, h_en = 0, h_we = 0, stolen;
  logic [11:0] c_raddr = 0, c_waddr = 0, h_addr = 0;
  word_t c_wdata = 0, h_wdata = 0, rdata;
  word_t model [4096];
  int checks = 0, failures = 0;

  sch_dmem dut (.clk, .c_raddr, .c_we, .c_waddr, .c_wdata, .h_en, .h_we, .h_addr, .h_wdata,
                .rdata, .stolen);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    // fill through the host port
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); h_en = 1; h_we = 1; h_addr = 12'(i); h_wdata = 16'($urandom);
      model[i] = h_wdata;
    end
    @(negedge clk); h_en = 0; h_we = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      c_we    = 1'($urandom);
      c_waddr = 12'($urandom);
      c_wdata = 16'($urandom);
      c_raddr = (i % 5 == 0) ? c_waddr : 12'($urandom);
      h_en    = ($urandom_range(0, 7) == 0);
      h_we    = 1'($urandom);
      h_addr  = 12'($urandom);
      h_wdata = 16'($urandom);
      #1;
      check("stolen", stolen, h_en);
      check("read", rdata, model[h_en ? h_addr : c_raddr]);
      if (h_en) begin
        if (h_we) model[h_addr] = h_wdata;
      end else if (c_we) model[c_waddr] = c_wdata;
    end
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
