// tb_sch_pmem: self-checking test of the program memory. The host port fills
// all 1024 words, the fetch port reads them back; a host access during
// fetching must raise `stolen` and return the host's word.
module tb_sch_pmem;
  import sch_pkg::*;

  logic clk = 0, h_en = 0, h_we = 0, stolen;
  logic [9:0] c_addr = 0, h_addr = 0;
  word_t h_wdata = 0, rdata;
  int checks = 0, failures = 0;

  sch_pmem dut (.clk, .c_addr, .h_en, .h_we, .h_addr, .h_wdata, .rdata, .stolen);

  always #5 clk = ~clk;

  function automatic word_t pat(int i);
    return word_t'(i * 40503 + 7);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); h_en = 1; h_we = 1; h_addr = 10'(i); h_wdata = pat(i); c_addr = 10'(1023 - i);
      #1 check("stolen", stolen, 1);
    end
    @(negedge clk); h_en = 0; h_we = 0;
    for (int i = 0; i < 1024; i++) begin
      c_addr = 10'(i); #1;
      check("fetch", rdata, pat(i));
      check("not stolen", stolen, 0);
    end
    // host examine while the fetch address points elsewhere
    @(negedge clk); h_en = 1; h_addr = 10'd5; c_addr = 10'd900; #1;
    check("examine", rdata, pat(5));
    @(negedge clk); h_en = 0; #1;
    check("fetch after", rdata, pat(900));
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
