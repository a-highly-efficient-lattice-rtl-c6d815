// tb_palu: the PALU on every arithmetic instruction class.
//   - the five-instruction signed Montgomery multiplication (mulv, mulvh,
//     mulvm, mulvhf, subv) must give r = a*b*2^-32 mod q with |r| < q, for
//     Kyber and Dilithium moduli;
//   - addv/subv/andv/xorv/sllvi/sravi/addvm/subvm lane by lane;
//   - addvmt: modular add with output order 0,2,4,6,1,3,5,7;
//   - addvti/subvti: lane 2j = rs1[j] op rs1[j+4], lane 2j+1 = rs2[j] op
//     rs2[j+4] (input shuffle 0,8,1,9,.. over the 16 words {rs2, rs1});
//   - cbd2/cbd3 samples from the low 32/48 bits of rs1;
//   - bgeuv: any_ge exactly when some rs1 lane >= rs2 lane (unsigned);
//   - 256-bit results write PR1..PR4, Keccak results PR1..PR5.
module tb_palu;
  import pqc_pkg::*;
  import pqc_asm_pkg::*;

  simd_op_e   op;
  logic [2:0] imm3;
  logic [4:0] shamt;
  vec320_t    a, b, c, d, e, y;
  word_t      fix0, fix1;
  logic [4:0] wmask;
  logic       any_ge;

  palu dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int lane(input vec320_t v, input int i);
    return v[i / 2][32 * (i % 2) +: 32];
  endfunction

  function automatic vec320_t pack(input int v [8]);
    vec320_t r;
    r = '0;
    for (int i = 0; i < 8; i++) r[i / 2][32 * (i % 2) +: 32] = v[i];
    return r;
  endfunction

  task automatic run(input simd_op_e o, input vec320_t ra, input vec320_t rb, output vec320_t r);
    op = o; a = ra; b = rb;
    #1;
    r = y;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int qs [2] = '{3329, 8380417};
    int av [8], bv [8], q, qinv, ev;
    vec320_t va, vb, lo, hi, m, t1, r, s1, s2;
    imm3 = 0; shamt = 0; c = '0; d = '0; e = '0;
    for (int t = 0; t < 400; t++) begin
      q = qs[t % 2];
      qinv = 1;
      for (int k = 0; k < 5; k++) qinv = qinv * (2 - q * qinv);
      fix0 = q; fix1 = qinv;
      for (int i = 0; i < 8; i++) begin
        av[i] = int'($urandom_range(0, 2 * q - 2)) - (q - 1);
        bv[i] = int'($urandom_range(0, q - 1)) - q / 2;
      end
      va = pack(av); vb = pack(bv);
      va[4] = {$urandom, $urandom};
      // Montgomery multiplication
      run(OP_MULV, va, vb, lo);
      check(wmask == 5'b01111, "256-bit write mask");
      run(OP_MULVH, va, vb, hi);
      run(OP_MULVM, lo, '0, m);
      run(OP_MULVHF, m, '0, t1);
      run(OP_SUBV, hi, t1, r);
      for (int i = 0; i < 8; i++) begin
        longint rr, prod;
        rr = lane(r, i);
        prod = longint'(av[i]) * longint'(bv[i]);
        check(modq(rr * (64'sd1 <<< 32) - prod, q) == 0, "Montgomery congruence");
        check(rr > -q && rr < q, "Montgomery range");
      end
      // plain lane operations
      shamt = 5'($urandom);
      for (int i = 0; i < 8; i++) begin av[i] = $urandom; bv[i] = $urandom; end
      va = pack(av); vb = pack(bv);
      run(OP_ADDV, va, vb, r);
      for (int i = 0; i < 8; i++) check(lane(r, i) == av[i] + bv[i], "addv");
      run(OP_SUBV, va, vb, r);
      for (int i = 0; i < 8; i++) check(lane(r, i) == av[i] - bv[i], "subv");
      run(OP_ANDV, va, vb, r);
      for (int i = 0; i < 8; i++) check(lane(r, i) == (av[i] & bv[i]), "andv");
      run(OP_XORV, va, vb, r);
      for (int i = 0; i < 8; i++) check(lane(r, i) == (av[i] ^ bv[i]), "xorv");
      run(OP_SLLVI, va, vb, r);
      for (int i = 0; i < 8; i++) check(lane(r, i) == (av[i] << shamt), "sllvi");
      run(OP_SRAVI, va, vb, r);
      for (int i = 0; i < 8; i++) check(lane(r, i) == (av[i] >>> shamt), "sravi");
      // input shuffling
      run(OP_ADDVTI, va, vb, r);
      for (int i = 0; i < 4; i++) begin
        check(lane(r, 2 * i)     == av[i] + av[i + 4], "addvti even");
        check(lane(r, 2 * i + 1) == bv[i] + bv[i + 4], "addvti odd");
      end
      run(OP_SUBVTI, va, vb, r);
      for (int i = 0; i < 4; i++) begin
        check(lane(r, 2 * i)     == av[i] - av[i + 4], "subvti even");
        check(lane(r, 2 * i + 1) == bv[i] - bv[i + 4], "subvti odd");
      end
      // modular add/sub, plain and output shuffled
      for (int i = 0; i < 8; i++) begin
        av[i] = $urandom_range(0, q - 1);
        bv[i] = $urandom_range(0, q - 1);
      end
      va = pack(av); vb = pack(bv);
      run(OP_ADDVM, va, vb, s1);
      run(OP_ADDVMT, va, vb, s2);
      for (int i = 0; i < 8; i++) begin
        ev = (av[i] + bv[i]) % q;
        check(lane(s1, i) == ev, "addvm");
      end
      for (int k = 0; k < 4; k++) begin
        check(lane(s2, k) == lane(s1, 2 * k), "addvmt even lanes first");
        check(lane(s2, k + 4) == lane(s1, 2 * k + 1), "addvmt odd lanes last");
      end
      run(OP_SUBVM, va, vb, s1);
      run(OP_SUBVMT, va, vb, s2);
      for (int i = 0; i < 8; i++) begin
        ev = (av[i] - bv[i] + q) % q;
        check(lane(s1, i) == ev, "subvm");
      end
      for (int k = 0; k < 4; k++) check(lane(s2, k) == lane(s1, 2 * k), "subvmt");
      // CBD
      va = '0;
      va[0] = {$urandom, $urandom};
      run(OP_CBD2, va, '0, r);
      for (int i = 0; i < 8; i++)
        check(lane(r, i) == int'(va[0][i]) + int'(va[0][8 + i]) - int'(va[0][16 + i]) - int'(va[0][24 + i]), "cbd2");
      run(OP_CBD3, va, '0, r);
      for (int i = 0; i < 8; i++)
        check(lane(r, i) == int'(va[0][i]) + int'(va[0][8 + i]) + int'(va[0][32 + i])
                            - int'(va[0][16 + i]) - int'(va[0][24 + i]) - int'(va[0][40 + i]), "cbd3");
      // bgeuv
      for (int i = 0; i < 8; i++) begin
        av[i] = $urandom_range(0, 999);
        bv[i] = 1000;
      end
      if (t % 2) av[$urandom_range(0, 7)] = 1000 + (t % 4);
      run(OP_BGEUV, pack(av), pack(bv), r);
      check(any_ge == 1'(t % 2), "bgeuv");
      check(wmask == 0, "bgeuv writes nothing");
      // a Keccak instruction uses all five files
      va = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      vb = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      run(OP_XORV2, va, vb, r);
      check(r == (va ^ vb) && wmask == 5'b11111, "xorv2 on 320 bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
