// tb_pqc_pkg: checks the tables and helper functions of pqc_pkg against
// values derived independently:
//   - ROT_TABLE[k][j] (rotator of PALU j in rxorv k) equals the Keccak rho
//     offset of lane x = 4 - j of plane y = k, computed from the (x,y) walk
//     of the Keccak specification;
//   - kslot maps Keccak lane x to PR5, PR1, PR2, PR3, PR4 (index 4, 0..3);
//   - rotl64 against shifts, for random values and amounts;
//   - arith_op: funct7 = n selects the n-th arithmetic instruction and every
//     other funct7 value decodes to OP_NONE.
module tb_pqc_pkg;
  import pqc_pkg::*;
  import pqc_asm_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v, e;
    int r;
    for (int k = 0; k < 5; k++)
      for (int x = 0; x < 5; x++)
        check(int'(ROT_TABLE[k][4 - x]) == rho_off(x, k), $sformatf("rotation rxorv%0d lane %0d", k, x));
    check(kslot(0) == 4, "kslot 0");
    for (int x = 1; x < 5; x++) check(kslot(x) == x - 1, $sformatf("kslot %0d", x));
    for (int t = 0; t < 1000; t++) begin
      v = {$urandom, $urandom};
      r = $urandom_range(0, 63);
      e = (r == 0) ? v : ((v << r) | (v >> (64 - r)));
      check(rotl64(v, 6'(r)) == e, "rotl64");
    end
    for (int f = 0; f < 128; f++)
      if (f < 18) check(arith_op(7'(f)) == simd_op_e'(int'(OP_ADDV) + f), $sformatf("funct7 %0d", f));
      else        check(arith_op(7'(f)) == OP_NONE, $sformatf("funct7 %0d unused", f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
