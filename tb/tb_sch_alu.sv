// tb_sch_alu: self-checking test of the SCH ALU. Random operands for every
// operation are compared with a reference model written with plain integer
// arithmetic; flags N, Z, C, V are checked for each.
module tb_sch_alu;
  import sch_pkg::*;

  alu_op_e    op;
  word_t      a, b, y;
  logic       cin;
  logic [3:0] shamt;
  cc_t        f;
  int checks = 0, failures = 0;

  sch_alu dut (.op, .a, .b, .cin, .shamt, .y, .flags(f));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s op=%0d a=%h b=%h cin=%0d sh=%0d: got %h exp %h", what, op, a, b, cin, shamt, got, exp);
    end
  endtask

  initial begin
    int ia, ib, r, ey;
    logic ec, ev;
    for (int i = 0; i < 4000; i++) begin
      op    = alu_op_e'($urandom_range(0, 13));
      a     = 16'($urandom);
      b     = 16'($urandom);
      if (i % 7 == 0) b = a;
      if (i % 11 == 0) a = 16'h8000;
      cin   = 1'($urandom);
      shamt = 4'($urandom);
      #1;
      ia = int'($signed(a));
      ib = int'($signed(b));
      ec = cin; ev = 1'b0;
      case (op)
        ALU_PASSB: ey = int'(b);
        ALU_ADD, ALU_ADC: begin
          r  = int'(a) + int'(b) + ((op == ALU_ADC) ? int'(cin) : 0);
          ey = r & 32'hFFFF; ec = (r > 65535);
          r  = ia + ib + ((op == ALU_ADC) ? int'(cin) : 0);
          ev = (r > 32767) || (r < -32768);
        end
        ALU_SUB, ALU_SBC: begin
          r  = int'(a) - int'(b) - ((op == ALU_SBC) ? int'(cin) : 0);
          ey = r & 32'hFFFF; ec = (r < 0);
          r  = ia - ib - ((op == ALU_SBC) ? int'(cin) : 0);
          ev = (r > 32767) || (r < -32768);
        end
        ALU_NEG: begin ey = (-int'(a)) & 32'hFFFF; ec = (a != 0); ev = (a == 16'h8000); end
        ALU_AND: ey = int'(a & b);
        ALU_OR:  ey = int'(a | b);
        ALU_XOR: ey = int'(a ^ b);
        ALU_NOT: ey = int'(word_t'(~a));
        ALU_ASL: begin ey = (int'(a) * (1 << shamt)) & 32'hFFFF; if (shamt != 0) ec = a[16 - shamt]; end
        ALU_ASR: begin ey = (ia >>> shamt) & 32'hFFFF; if (shamt != 0) ec = a[shamt - 1]; end
        ALU_LSR: begin ey = int'(a) / (1 << shamt); if (shamt != 0) ec = a[shamt - 1]; end
        default: ey = ((int'(a) << shamt) | (int'(a) >> (16 - shamt))) & 32'hFFFF; // ALU_ROL
      endcase
      check("y", y, ey);
      check("n", f.n, (ey >> 15) & 1);
      check("z", f.z, ey == 0);
      check("c", f.c, ec);
      check("v", f.v, ev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
