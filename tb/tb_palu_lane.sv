// tb_palu_lane: every lane operation on random and corner-case operands,
// against 64-bit reference arithmetic; modular add/subtract with the Kyber
// and Dilithium moduli on inputs in (-q, q), including the [0, q) -> [0, q)
// property.
module tb_palu_lane;
  import pqc_pkg::*;

  lane_op_e   op;
  word_t      a, b, q, y;
  logic [4:0] shamt;
  logic       ge;

  palu_lane dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sa, sb, p, s, e, qq;
    int qs [2] = '{3329, 8380417};
    for (int t = 0; t < 3000; t++) begin
      a = $urandom; b = $urandom; shamt = 5'($urandom);
      if (t % 10 == 0) a = 32'h8000_0000;
      if (t % 10 == 1) b = 32'hFFFF_FFFF;
      q = qs[t % 2];
      qq = qs[t % 2];
      sa = longint'(signed'(a)); sb = longint'(signed'(b));
      p = sa * sb;
      op = L_ADD;  #1 check(y == word_t'(sa + sb), "add");
      op = L_SUB;  #1 check(y == word_t'(sa - sb), "sub");
      op = L_AND;  #1 check(y == (a & b), "and");
      op = L_XOR;  #1 check(y == (a ^ b), "xor");
      op = L_MULL; #1 check(y == p[31:0], "mul low");
      op = L_MULH; #1 check(y == p[63:32], "mul high");
      op = L_SLL;  #1 check(y == word_t'(longint'(a) << shamt), "sll");
      op = L_SRA;  #1 check(longint'(signed'(y)) == (sa >>> shamt), "sra");
      check(ge == (longint'(a) >= longint'(b)), "unsigned compare");
      // modular add/sub on inputs in (-q, q)
      sa = longint'($urandom_range(0, 2 * q - 2)) - (q - 1);
      sb = longint'($urandom_range(0, 2 * q - 2)) - (q - 1);
      if (t % 3 == 0) begin      // both in [0, q)
        sa = $urandom_range(0, q - 1);
        sb = $urandom_range(0, q - 1);
      end
      a = word_t'(sa); b = word_t'(sb);
      op = L_MADD; #1;
      s = sa + sb;
      e = (s >= qq) ? s - qq : s;
      check(longint'(signed'(y)) == e, "modular add");
      if (t % 3 == 0) check(signed'(y) >= 0 && signed'(y) < qq, "modular add range");
      op = L_MSUB; #1;
      s = sa - sb;
      e = (s < 0) ? s + qq : s;
      check(longint'(signed'(y)) == e, "modular sub");
      if (t % 3 == 0) check(signed'(y) >= 0 && signed'(y) < qq, "modular sub range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
