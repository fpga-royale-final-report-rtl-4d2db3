// Self-checking testbench for alu: random operands for every operation and
// branch condition, compared with values computed here.
module tb_alu;
  import royale_pkg::*;
  alu_op_e op;
  br_e br;
  word_t a, b, ca, cb, res;
  logic taken;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .br, .cmp_a(ca), .cmp_b(cb), .res, .taken);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s a=%h b=%h res=%h", what, a, b, res); end
  endtask

  function automatic longint ad(longint x, longint y);
    return x > y ? x - y : y - x;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      a = $urandom; b = $urandom; ca = $urandom; cb = (n % 5 == 0) ? ca : $urandom;
      if (n % 3 == 0) b = $urandom_range(0, 40);
      op = ALU_ADD;  br = BR_EQ; #1; check(res == word_t'(a + b), "add"); check(taken == (ca == cb), "beq");
      op = ALU_SUB;  br = BR_NE; #1; check(res == word_t'(a - b), "sub"); check(taken == (ca != cb), "bne");
      op = ALU_SLL;  br = BR_LT; #1; check(res == word_t'(a << (b % 32)), "sll");
      check(taken == (int'(ca) < int'(cb)), "blt");
      op = ALU_SRL;  br = BR_GE; #1; check(res == word_t'(a >> (b % 32)), "srl");
      check(taken == (int'(ca) >= int'(cb)), "bge");
      op = ALU_ABS;  br = BR_NONE; #1; check(res == word_t'(ad(a, b)), "abs"); check(!taken, "no branch");
      op = ALU_PASS_B; br = BR_ALWAYS; #1; check(res == b, "pass"); check(taken, "jump");
      begin
        int x1, y1, x2, y2;
        x1 = $urandom_range(0, 8191); y1 = $urandom_range(0, 8191);
        x2 = $urandom_range(0, 8191); y2 = $urandom_range(0, 8191);
        a = (x1 << 16) | y1; b = (x2 << 16) | y2; op = ALU_DIST; #1;
        check(res == word_t'(ad(x1, x2) + ad(y1, y2)), "manhattan");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
