// tb_pqc_simd_top: end-to-end test of the SIMD extension at its default sizes.
//
// The testbench plays the scalar core: it loads a program into the
// instruction SRAM, steps the program counter by the issue count the design
// reports (or takes the bgeuv branch), executes the scalar addi instructions
// itself, serves GPR reads and preloads/reads the data SRAM through the host
// port. The program runs
//   1. a full Keccak-f[1600] permutation (state loaded with lv/lw64, aligned
//      with shufflev, 24 rounds of xorv3/xorrv/rxorv0-4/xornavi/xorv2rc, stored
//      back), compared with a reference permutation, with its cycle count
//      checked against the 404 cycles of the published design;
//   2. a SIMD NTT butterfly for Kyber (lwf, mulv/mulvh/mulvm/mulvhf/subv,
//      addvm/subvm) with dual-issued loads, a load-use stall, output-shuffled
//      addvmt, input-shuffled subvti and cbd2, checked against references;
//   3. bgeuv rejection checks, one not taken and one taken.
// Every mechanism (dual issue, single issue, load-use stall, branch taken and
// not taken, host port access) is counted and must occur.
module tb_pqc_simd_top;
  import pqc_pkg::*;
  import pqc_asm_pkg::*;

  localparam int IAW = 14, DAW = 12;
  localparam int S = 'h100, RCB = 'h400, NA = 'h500, NB = 'h520, NT = 'h540,
                 NO = 'h580, KQ = 'h700, RV = 'h720, RW = 'h740;
  localparam int Q = 3329;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               imem_we;
  logic [IAW-1:0]     imem_waddr;
  word_t              imem_wdata, pc, instr0, instr1, gpr_rdata;
  logic               fetch_valid, stall, dual, br_valid, br_taken;
  logic [1:0]         issue_cnt;
  logic [4:0]         gpr_raddr;
  logic [12:0]        br_offset;
  logic               host_req, host_we, host_gnt;
  logic [DAW-1:0]     host_addr;
  logic [127:0]       host_wdata, host_rdata;
  logic [15:0]        host_be;

  pqc_simd_top dut (.*);

  int checks = 0, failures = 0;
  int n_dual = 0, n_single = 0, n_stall = 0, n_taken = 0, n_not_taken = 0, n_host = 0;
  word_t gpr [32];
  assign gpr_rdata = gpr[gpr_raddr];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- program ----------------
  logic [31:0] prog [$];
  int keccak_start, keccak_end, skip_addr;

  function automatic void emit(input logic [31:0] w);
    prog.push_back(w);
  endfunction

  task automatic build_program();
    // base registers (scalar)
    emit(addi(10, 0, S));
    emit(addi(11, 0, RCB));
    keccak_start = prog.size();
    // load the state, plane y at byte 40*y, lanes aligned as in the register layout
    emit(ld(0, 0, 10, 0));   emit(ld(0, 16, 10, 16));  emit(ld(1, 0, 10, 32));
    emit(ld(1, 1, 10, 40));  emit(kc(K_SHUFFLEV, 0, 0, 0, 4));
    emit(ld(0, 1, 10, 48));  emit(ld(0, 17, 10, 64));
    emit(ld(0, 2, 10, 80));  emit(ld(0, 18, 10, 96));  emit(ld(1, 2, 10, 112));
    emit(ld(1, 3, 10, 120)); emit(kc(K_SHUFFLEV, 2, 2, 0, 4));
    emit(ld(0, 3, 10, 128)); emit(ld(0, 19, 10, 144));
    emit(ld(0, 6, 10, 160)); emit(ld(0, 22, 10, 176)); emit(ld(1, 6, 10, 192));
    emit(kc(K_SHUFFLEV, 6, 6, 0, 4));
    // 24 rounds, two per iteration (rows swap between the two register sets)
    for (int it = 0; it < 12; it++) begin
      int in_r [5], out_r [5];
      for (int h = 0; h < 2; h++) begin
        if (h == 0) begin in_r = '{0, 1, 2, 3, 6};    out_r = '{15, 4, 8, 7, 14}; end
        else        begin in_r = '{15, 4, 8, 7, 14}; out_r = '{0, 1, 2, 3, 6};   end
        emit(kc(K_XORV3, 5, in_r[1], in_r[0], 0));     // rs3 = in_r[2]
        emit(kc(K_XORV3, 5, in_r[3], 5, 0));           // rs3 = in_r[4]
        emit(kc(K_XORRV, 5, 5, 5, 0));
        emit(kc(K_RXORV, 10, in_r[1], 5, 1));
        emit(kc(K_RXORV, 11, in_r[2], 5, 2));
        emit(kc(K_RXORV, 12, in_r[3], 5, 3));
        emit(kc(K_RXORV, 13, in_r[4], 5, 4));
        emit(kc(K_RXORV, 9,  in_r[0], 5, 0));
        emit(kc(K_XORNAVI, out_r[0], 9, 10, 0));
        emit(kc(K_XORNAVI, out_r[1], 9, 10, 3));
        emit(kc(K_XORNAVI, out_r[2], 9, 10, 1));
        emit(ld(1, 5, 11, 8 * (2 * it + h)));
        emit(kc(K_XORV2RC, out_r[0], out_r[0], 5, 0));
        emit(kc(K_XORNAVI, out_r[3], 9, 10, 4));
        emit(kc(K_XORNAVI, out_r[4], 9, 10, 2));
      end
    end
    // store back
    emit(kc(K_SHUFFLEV, 0, 0, 0, 1));
    emit(st(0, 1, 10, 48));  emit(kc(K_SHUFFLEV, 2, 2, 0, 1));
    emit(st(0, 17, 10, 64)); emit(kc(K_SHUFFLEV, 6, 6, 0, 1));
    emit(st(1, 1, 10, 40));
    emit(st(0, 0, 10, 0));   emit(st(0, 16, 10, 16));  emit(st(1, 0, 10, 32));
    emit(st(0, 2, 10, 80));  emit(st(0, 18, 10, 96));  emit(st(1, 2, 10, 112));
    emit(st(1, 3, 10, 120)); emit(st(0, 3, 10, 128));  emit(st(0, 19, 10, 144));
    emit(st(0, 6, 10, 160)); emit(st(0, 22, 10, 176)); emit(st(1, 6, 10, 192));
    keccak_end = prog.size();
    // NTT butterfly: q, q^-1 into FIX, then a + mont(tw*b), a - mont(tw*b)
    emit(addi(12, 0, NA));
    emit(ld(2, 0, 12, 'h100));            // FIX[0] = q   (word at NA+0x100)
    emit(ld(2, 1, 12, 'h104));            // FIX[1] = q^-1
    emit(ld(0, 0, 12, NT - NA));  emit(ld(0, 16, 12, NT - NA + 16));
    emit(ld(0, 1, 12, NB - NA));  emit(ld(0, 17, 12, NB - NA + 16));
    emit(ld(0, 2, 12, 0));        emit(ld(0, 18, 12, 16));
    emit(ld(0, 6, 12, 0));        emit(ar(I_MULV, 15, 0, 1));     // dual
    emit(ld(0, 22, 12, 16));      emit(ar(I_MULVH, 3, 0, 1));     // dual
    emit(ar(I_MULVM, 14, 15, 0));
    emit(ar(I_MULVHF, 13, 14, 0));
    emit(ar(I_SUBV, 12, 3, 13));
    emit(ar(I_ADDVM, 4, 2, 12));
    emit(ar(I_SUBVM, 5, 6, 12));
    emit(st(0, 4, 12, NO - NA));  emit(ar(I_ADDVMT, 7, 4, 5));    // dual
    emit(st(0, 20, 12, NO - NA + 16)); emit(ar(I_SUBVTI, 8, 4, 5)); // dual
    emit(st(0, 5, 12, NO - NA + 32));
    emit(st(0, 21, 12, NO - NA + 48));
    emit(st(0, 7, 12, NO - NA + 64)); emit(st(0, 23, 12, NO - NA + 80));
    emit(st(0, 8, 12, NO - NA + 96)); emit(st(0, 24, 12, NO - NA + 112));
    emit(ld(0, 9, 12, NB - NA));
    emit(ar(I_CBD2, 10, 9, 0));                                   // load-use stall
    emit(st(0, 10, 12, NO - NA + 128)); emit(st(0, 26, 12, NO - NA + 144));
    // bgeuv: values all below kq (not taken), then one at kq (taken)
    emit(addi(13, 0, KQ));
    emit(ld(0, 0, 13, 0));  emit(ld(0, 16, 13, 0));
    emit(ld(0, 3, 13, RV - KQ)); emit(ld(0, 19, 13, RV - KQ + 16));
    emit(ar(I_ANDV, 3, 3, 3));           // identity
    emit(bgeuv(3, 0, 8));                // not taken
    emit(addi(14, 0, 1));                // executed
    emit(ld(0, 3, 13, RW - KQ)); emit(ld(0, 19, 13, RW - KQ + 16));
    emit(ar(I_ANDV, 1, 3, 3));
    emit(bgeuv(3, 0, 8));                // taken: skips the next instruction
    skip_addr = prog.size();
    emit(addi(15, 0, 1));                // skipped
    emit(addi(16, 0, 1));
    emit(32'h0000_0000);                 // end marker
  endtask

  // ---------------- data ----------------
  kstate_t st0, stref;
  int a_v [8], b_v [8], t_v [8], kq_v, v_ok [8], v_bad [8];
  int qinv;

  task automatic host_write(input int byte_addr, input logic [127:0] d, input logic [15:0] be);
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = DAW'(byte_addr >> 4); host_wdata = d; host_be = be;
    @(negedge clk);
    host_req = 0; host_we = 0;
    n_host++;
  endtask

  task automatic host_read(input int byte_addr, output logic [127:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = DAW'(byte_addr >> 4);
    @(negedge clk);
    host_req = 0;
    d = host_rdata;
    n_host++;
  endtask

  function automatic logic [63:0] lane_at(input int i);   // state lane i = x + 5y
    return st0[i % 5][i / 5];
  endfunction

  task automatic write_words32(input int byte_addr, input int v [8]);
    logic [127:0] w0, w1;
    for (int i = 0; i < 4; i++) begin
      w0[32*i +: 32] = v[i];
      w1[32*i +: 32] = v[i + 4];
    end
    host_write(byte_addr, w0, '1);
    host_write(byte_addr + 16, w1, '1);
  endtask

  task automatic read_words32(input int byte_addr, output int v [8]);
    logic [127:0] w0, w1;
    host_read(byte_addr, w0);
    host_read(byte_addr + 16, w1);
    for (int i = 0; i < 4; i++) begin
      v[i]     = w0[32*i +: 32];
      v[i + 4] = w1[32*i +: 32];
    end
  endtask

  // ---------------- run ----------------
  int cycle = 0, t_k0 = -1, t_k1 = -1;
  logic running = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (running && rst_n) begin
      int n;
      n = int'(issue_cnt);
      if (t_k0 < 0 && pc >= 4 * keccak_start && n > 0) t_k0 = cycle;
      if (t_k1 < 0 && pc >= 4 * keccak_end) t_k1 = cycle;
      if (stall) n_stall++;
      if (dual) n_dual++;
      if (n == 1) n_single++;
      // scalar instructions of the issued part of the packet
      for (int k = 0; k < n; k++) begin
        logic [31:0] w;
        w = (k == 0) ? instr0 : instr1;
        if (w[6:0] == 7'b0010011 && w[11:7] != 0)
          gpr[w[11:7]] <= gpr[w[19:15]] + {{20{w[31]}}, w[31:20]};
      end
      if (br_valid) begin
        if (br_taken) n_taken++; else n_not_taken++;
      end
      if (br_taken) pc <= pc + {{19{br_offset[12]}}, br_offset};
      else          pc <= pc + 4 * n;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] w;
    int outv [8], exp_r;
    longint t, e0, e1;
    imem_we = 0; imem_waddr = '0; imem_wdata = '0;
    fetch_valid = 0; pc = '0;
    host_req = 0; host_we = 0; host_addr = '0; host_wdata = '0; host_be = '0;
    for (int i = 0; i < 32; i++) gpr[i] = '0;

    build_program();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = IAW'(i); imem_wdata = prog[i];
    end
    @(negedge clk) imem_we = 0;

    // Keccak state and round constants
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++) st0[x][y] = {$urandom, $urandom};
    stref = st0;
    for (int ir = 0; ir < 24; ir++) keccak_round(stref, ir);
    check(round_const(1) == 64'h0000_0000_0000_8082, "round constant 1");
    for (int i = 0; i < 13; i++) begin
      w = '0;
      w[63:0] = lane_at(2 * i);
      if (2 * i + 1 < 25) w[127:64] = lane_at(2 * i + 1);
      host_write(S + 16 * i, w, '1);
    end
    for (int i = 0; i < 12; i++)
      host_write(RCB + 16 * i, {round_const(2 * i + 1), round_const(2 * i)}, '1);

    // NTT data: q and q^-1 (mod 2^32), coefficients in (-q, q), twiddles in [-q/2, q/2]
    qinv = 1;
    for (int i = 0; i < 5; i++) qinv = qinv * (2 - Q * qinv);   // Newton iteration
    begin
      int prod;
      prod = Q * qinv;
      check(prod == 1, "q * q^-1 = 1 mod 2^32");
    end
    host_write(NA + 'h100, {64'd0, 32'(qinv), 32'(Q)}, '1);
    for (int i = 0; i < 8; i++) begin
      a_v[i] = int'($urandom_range(0, 2 * Q - 2)) - (Q - 1);
      b_v[i] = $urandom;                                        // random bits, also cbd2 input
      t_v[i] = int'($urandom_range(0, Q - 1)) - Q / 2;
    end
    b_v[0] = b_v[0] % Q;                                        // keep one in range too
    write_words32(NA, a_v);
    write_words32(NB, b_v);
    write_words32(NT, t_v);

    // bgeuv data
    kq_v = 645082 * Q;
    for (int i = 0; i < 8; i++) begin
      v_ok[i]  = int'($urandom_range(0, kq_v - 1));
      v_bad[i] = int'($urandom_range(0, kq_v - 1));
    end
    v_bad[$urandom_range(0, 7)] = kq_v;
    begin
      int kv [8];
      for (int i = 0; i < 8; i++) kv[i] = kq_v;
      write_words32(KQ, kv);
    end
    write_words32(RV, v_ok);
    write_words32(RW, v_bad);

    // run the program
    @(negedge clk);
    running = 1; fetch_valid = 1;
    wait (pc >= 4 * (prog.size() - 1));
    @(negedge clk);
    fetch_valid = 0; running = 0;
    repeat (2) @(negedge clk);

    // Keccak result
    for (int i = 0; i < 13; i++) begin
      host_read(S + 16 * i, w);
      check(w[63:0] == stref[(2 * i) % 5][(2 * i) / 5], $sformatf("keccak lane %0d", 2 * i));
      if (2 * i + 1 < 25)
        check(w[127:64] == stref[(2 * i + 1) % 5][(2 * i + 1) / 5],
              $sformatf("keccak lane %0d", 2 * i + 1));
    end
    $display("Keccak-f[1600]: %0d cycles from first load to last store", t_k1 - t_k0);
    check(t_k1 - t_k0 <= 404, "Keccak cycle count within the published 404 cycles");

    // butterfly results
    begin
      int o0 [8], o1 [8], o2 [8], o3 [8], o4 [8];
      int perm [8] = '{0, 2, 4, 6, 1, 3, 5, 7};
      int shin [16] = '{0, 8, 1, 9, 2, 10, 3, 11, 4, 12, 5, 13, 6, 14, 7, 15};
      int cat [16];
      read_words32(NO, o0);
      read_words32(NO + 32, o1);
      read_words32(NO + 64, o2);
      read_words32(NO + 96, o3);
      read_words32(NO + 128, o4);
      for (int i = 0; i < 8; i++) begin
        // a +- tw*b*2^-32 (mod q), results in (-2q, 2q)
        t = longint'(t_v[i]) * longint'(b_v[i]);
        e0 = (longint'(o0[i]) - a_v[i]) * (64'sd1 <<< 32) - t;
        e1 = (longint'(o1[i]) - a_v[i]) * (64'sd1 <<< 32) + t;
        check(modq(e0, Q) == 0 && o0[i] > -2 * Q && o0[i] < 2 * Q, $sformatf("addvm lane %0d", i));
        check(modq(e1, Q) == 0 && o1[i] > -2 * Q && o1[i] < 2 * Q, $sformatf("subvm lane %0d", i));
        check(o2[i] == outv_madd(o0[perm[i]], o1[perm[i]]), $sformatf("addvmt lane %0d", i));
        cat[i] = o0[i];
        cat[i + 8] = o1[i];
      end
      for (int i = 0; i < 8; i++)
        check(o3[i] == cat[shin[i]] - cat[shin[i + 8]], $sformatf("subvti lane %0d", i));
      for (int i = 0; i < 8; i++) begin
        int bits;
        bits = b_v[0];
        exp_r = bits[i] + bits[8 + i] - bits[16 + i] - bits[24 + i];
        check(o4[i] == exp_r, $sformatf("cbd2 lane %0d", i));
      end
    end

    // branch results
    check(gpr[14] == 1, "instruction after a not-taken bgeuv executed");
    check(gpr[15] == 0, "instruction after a taken bgeuv skipped");
    check(gpr[16] == 1, "branch target executed");

    // mechanisms
    $display("dual=%0d single=%0d stall=%0d taken=%0d not_taken=%0d host=%0d",
             n_dual, n_single, n_stall, n_taken, n_not_taken, n_host);
    check(n_dual > 0, "dual issue happened");
    check(n_single > 0, "single issue happened");
    check(n_stall > 0, "load-use stall happened");
    check(n_taken == 1, "bgeuv taken once");
    check(n_not_taken == 1, "bgeuv not taken once");
    check(n_host > 0, "host port used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // modular addition with FIX[0] = q as the design defines it
  function automatic int outv_madd(input int x, input int y);
    int s;
    s = x + y;
    return (s - Q >= 0) ? s - Q : s;
  endfunction

endmodule
