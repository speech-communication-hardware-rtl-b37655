// tb_sch_mac: self-checking test of the SCH multiplier-accumulator. Random
// operation sequences are run against a 64-bit reference accumulator
// truncated to 32 bits; the result registers P and MLSB are checked after
// every operation, including cycles with the unit disabled.
module tb_sch_mac;
  import sch_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, shl = 0;
  mac_op_e op = MAC_NONE;
  word_t a = 0, b = 0, d = 0, p, m;
  logic [3:0] shamt = 0;
  int checks = 0, failures = 0;
  longint acc;

  sch_mac dut (.clk, .rst_n, .en, .op, .a, .b, .d, .shl, .shamt, .p, .mlsb(m));

  always #5 clk = ~clk;

  initial begin
    longint prod;
    acc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      op    = mac_op_e'($urandom_range(0, 7));
      a     = 16'($urandom);
      b     = 16'($urandom);
      d     = 16'($urandom);
      shl   = 1'($urandom);
      shamt = 4'($urandom);
      en    = ($urandom_range(0, 9) != 0);
      if (i < 20) begin op = MAC_MAC; a = 16'h7FFF; b = 16'h7FFF; en = 1; end
      prod = longint'($signed(a)) * longint'($signed(b));
      if (en) begin
        case (op)
          MAC_MPY:   acc = prod;
          MAC_MAC:   acc = acc + prod;
          MAC_MSU:   acc = acc - prod;
          MAC_CLR:   acc = 0;
          MAC_LDP:   acc = (longint'(d) << 16) | (acc & 64'hFFFF);
          MAC_LDM:   acc = (acc & 64'hFFFF0000) | longint'(d);
          MAC_SHIFT: acc = shl ? (acc << shamt) : (longint'($signed(32'(acc))) >>> shamt);
          default: ;
        endcase
      end
      acc = longint'($signed(32'(acc)));
      @(posedge clk); #1;
      checks++;
      if ({p, m} !== 32'(acc)) begin
        failures++;
        $display("FAIL i=%0d op=%0d en=%0d got %h exp %h", i, op, en, {p, m}, 32'(acc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
