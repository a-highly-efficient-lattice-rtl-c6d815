// tb_keccak_unit: checks the Keccak instructions against the Keccak-f[1600]
// specification.
//
// A small register array stands in for PR1..PR5. The testbench loads a random
// state (plane y in row y of the register layout, lane x in file kslot(x)),
// runs the plane-per-plane round program (xorv3 twice, xorrv, rxorv0-4,
// xornavi with immediates 0,3,1,4,2, xorv2rc with the round constant) through
// the unit for all 24 rounds, and compares every lane with a reference
// permutation written from the specification. It also checks single
// instructions: xorv3, xorv2, xorrv against the theta formula, the shufflev
// example of the instruction description (imm = 1 gives rs1[4], rs1[0],
// rs1[1], rs1[2], rs1[3]) and rxorv against the specification's rho offsets.
module tb_keccak_unit;
  import pqc_pkg::*;
  import pqc_asm_pkg::*;

  simd_op_e   op;
  logic [2:0] imm3;
  vec320_t    a, b, c, d, e, y;

  keccak_unit dut (.*);

  int checks = 0, failures = 0;
  vec320_t rf [16];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] lane(input vec320_t v, input int x);
    return v[kslot(x)];
  endfunction

  // execute one instruction on the register array
  task automatic exec(input simd_op_e o, input int rd, input int rs1, input int rs2, input int im);
    op = o; imm3 = 3'(im);
    a = rf[rs1]; b = rf[rs2]; c = rf[(rs1 << 1) & 15];
    if (o == OP_XORNAVI) begin c = rf[11]; d = rf[12]; e = rf[13]; end
    else begin d = '0; e = '0; end
    #1;
    rf[rd] = y;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kstate_t s, r;
    int in_r [5], out_r [5];
    vec320_t v, w;

    // single instructions
    for (int t = 0; t < 20; t++) begin
      for (int p = 0; p < 5; p++) begin
        rf[1][p] = {$urandom, $urandom};
        rf[2][p] = {$urandom, $urandom};
        rf[3][p] = {$urandom, $urandom};
      end
      exec(OP_XORV3, 4, 1, 3, 0);            // rs3 = row 2
      for (int x = 0; x < 5; x++)
        check(lane(rf[4], x) == (lane(rf[1], x) ^ lane(rf[3], x) ^ lane(rf[2], x)), "xorv3");
      exec(OP_XORV2, 5, 1, 3, 0);
      for (int x = 0; x < 5; x++)
        check(lane(rf[5], x) == (lane(rf[1], x) ^ lane(rf[3], x)), "xorv2");
      exec(OP_XORV2RC, 6, 1, 3, 0);
      check(lane(rf[6], 0) == (lane(rf[1], 0) ^ lane(rf[3], 0)), "xorv2rc lane 0");
      for (int x = 1; x < 5; x++) check(lane(rf[6], x) == lane(rf[1], x), "xorv2rc other lanes");
      exec(OP_XORRV, 7, 1, 1, 0);
      for (int x = 0; x < 5; x++)
        check(lane(rf[7], x) == (lane(rf[1], (x + 4) % 5) ^ rol(lane(rf[1], (x + 1) % 5), 1)),
              "xorrv");
      exec(OP_SHUFFLEV, 8, 1, 0, 1);
      check(lane(rf[8], 0) == lane(rf[1], 4) && lane(rf[8], 1) == lane(rf[1], 0) &&
            lane(rf[8], 2) == lane(rf[1], 1) && lane(rf[8], 3) == lane(rf[1], 2) &&
            lane(rf[8], 4) == lane(rf[1], 3), "shufflev imm=1");
      for (int k = 0; k < 5; k++) begin
        exec(OP_RXORV, 9, 1, 3, k);
        for (int x = 0; x < 5; x++)
          check(lane(rf[9], x) == rol(lane(rf[1], x) ^ lane(rf[3], x), rho_off(x, k)),
                $sformatf("rxorv%0d lane %0d", k, x));
      end
    end

    // full permutation
    for (int x = 0; x < 5; x++)
      for (int yy = 0; yy < 5; yy++) s[x][yy] = {$urandom, $urandom};
    r = s;
    for (int ir = 0; ir < 24; ir++) keccak_round(r, ir);
    in_r = '{0, 1, 2, 3, 6};
    for (int yy = 0; yy < 5; yy++)
      for (int x = 0; x < 5; x++) rf[in_r[yy]][kslot(x)] = s[x][yy];
    for (int ir = 0; ir < 24; ir++) begin
      if (ir % 2 == 0) begin in_r = '{0, 1, 2, 3, 6};    out_r = '{15, 4, 8, 7, 14}; end
      else             begin in_r = '{15, 4, 8, 7, 14}; out_r = '{0, 1, 2, 3, 6};   end
      exec(OP_XORV3, 5, in_r[1], in_r[0], 0);
      exec(OP_XORV3, 5, in_r[3], 5, 0);
      exec(OP_XORRV, 5, 5, 5, 0);
      exec(OP_RXORV, 10, in_r[1], 5, 1);
      exec(OP_RXORV, 11, in_r[2], 5, 2);
      exec(OP_RXORV, 12, in_r[3], 5, 3);
      exec(OP_RXORV, 13, in_r[4], 5, 4);
      exec(OP_RXORV, 9,  in_r[0], 5, 0);
      exec(OP_XORNAVI, out_r[0], 9, 10, 0);
      exec(OP_XORNAVI, out_r[1], 9, 10, 3);
      exec(OP_XORNAVI, out_r[2], 9, 10, 1);
      rf[5] = '0;
      rf[5][kslot(0)] = round_const(ir);
      exec(OP_XORV2RC, out_r[0], out_r[0], 5, 0);
      exec(OP_XORNAVI, out_r[3], 9, 10, 4);
      exec(OP_XORNAVI, out_r[4], 9, 10, 2);
    end
    in_r = '{0, 1, 2, 3, 6};
    for (int yy = 0; yy < 5; yy++)
      for (int x = 0; x < 5; x++)
        check(rf[in_r[yy]][kslot(x)] == r[x][yy], $sformatf("permutation lane (%0d,%0d)", x, yy));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
