// tb_ntt_workload: complete forward NTTs run through pqc_simd_top at its
// default sizes, with this testbench playing the scalar core (as in
// tb_pqc_simd_top). Two sizes of the same program are run:
//   - Dilithium: one 256-point NTT, q = 8380417, zeta = 1753 (8 layers);
//   - Kyber: the 256 coefficients split into even and odd halves, each a
//     128-point NTT with q = 3329, zeta = 17 (7 layers), run one after the
//     other.
//
// Program (generated here, straight-line code):
//   layers len = N/2 .. 8: butterflies between whole SIMD registers. Each
//     butterfly is lv a, lv b, lv twiddle, Montgomery product r = b*zeta
//     (mulv, mulvh, mulvm, mulvhf, subv), a + r (addv), a - r (subv),
//     sv, sv. The loads of the next butterfly and the stores of the previous
//     one are interleaved with the arithmetic so that they dual-issue.
//   layers len = 4, 2, 1: two registers P, Q (16 coefficients) stay in the
//     register file. Each layer multiplies the upper four lanes of P and Q by
//     their twiddles (lower four lanes by 2^32 mod q, i.e. by one) and
//     applies addvti/subvti, whose input shuffle pairs lanes j and j+4 and
//     interleaves the results so that the next layer again pairs lanes j and
//     j+4. The testbench tracks where every coefficient goes.
// The butterflies multiply before adding (Cooley-Tukey form), a choice of
// this program; the published NTT multiplies after adding. Coefficients are
// not reduced between layers (they stay below 9q in magnitude, far inside
// what the signed Montgomery product tolerates); the result is checked modulo
// q against a plain reference NTT. The Dilithium cycle count, and the sum of
// the two Kyber halves, are compared with the 1750 cycles the published
// design reports for a 256-point NTT.
module tb_ntt_workload;
  import pqc_pkg::*;
  import pqc_asm_pkg::*;

  localparam int IAW = 14, DAW = 12;
  // the transform being run: modulus, primitive 2*NPT-th root of unity, points
  longint Q = 8380417, ZETA = 1753;
  int     NPT = 256, LOGN = 8;
  localparam int POLY = 'h000, TW1 = 'h400, CST = 'h7F0, TW2 = 'h800, TW2B = 'h800 + 1920;

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
  int n_dual = 0, n_single = 0, n_stall = 0;

  word_t gpr [32];
  assign gpr_rdata = gpr[gpr_raddr];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- arithmetic mod Q ----------------
  function automatic longint mulq(input longint a, input longint b);
    return modq(a * b, Q);
  endfunction

  function automatic longint powq(input longint b, input int e);
    longint r;
    r = 1;
    for (int i = 0; i < e; i++) r = mulq(r, b);
    return r;
  endfunction

  function automatic int brv(input int k);
    int r;
    r = 0;
    for (int i = 0; i < LOGN; i++) r |= ((k >> i) & 1) << (LOGN - 1 - i);
    return r;
  endfunction

  // zeta of butterfly block k, plain and in Montgomery form (signed, |z| < q/2)
  function automatic longint zeta_plain(input int k);
    return powq(ZETA, brv(k));
  endfunction

  function automatic int zeta_mont(input int k);
    longint z;
    z = modq(zeta_plain(k) * (64'sd1 <<< 32), Q);
    if (z > Q / 2) z -= Q;
    return int'(z);
  endfunction

  function automatic int r_mont();              // 2^32 mod q: Montgomery "one"
    longint z;
    z = modq(64'sd1 <<< 32, Q);
    if (z > Q / 2) z -= Q;
    return int'(z);
  endfunction

  // ---------------- program ----------------
  logic [31:0] prog [$];
  int tw2 [16][3][2][8];                      // twiddle vectors of the last layers
  int pos [32][8];                            // coefficient held by vector v lane l
  int pair_errors = 0;

  function automatic void emit(input logic [31:0] w);
    prog.push_back(w);
  endfunction

  // 256-bit load/store of row r at byte offset off from GPR base
  function automatic void lv2(ref logic [31:0] q [$], input int r, input int base, input int off);
    q.push_back(ld(0, r, base, off));
    q.push_back(ld(0, 16 + r, base, off + 16));
  endfunction

  function automatic void sv2(ref logic [31:0] q [$], input int r, input int base, input int off);
    q.push_back(st(0, r, base, off));
    q.push_back(st(0, 16 + r, base, off + 16));
  endfunction

  // Montgomery product dst = src * tw, temporaries t0, t1
  function automatic void mont(ref logic [31:0] q [$], input int dst, input int src, input int tw,
                               input int t0, input int t1);
    q.push_back(ar(I_MULV, t0, src, tw));
    q.push_back(ar(I_MULVH, t1, src, tw));
    q.push_back(ar(I_MULVM, t0, t0, 0));
    q.push_back(ar(I_MULVHF, t0, t0, 0));
    q.push_back(ar(I_SUBV, dst, t1, t0));
  endfunction

  // alternate the instructions of two lists, then append what is left
  function automatic void interleave(input logic [31:0] a [$], input logic [31:0] b [$]);
    int n;
    n = (a.size() > b.size()) ? a.size() : b.size();
    for (int i = 0; i < n; i++) begin
      if (i < a.size()) emit(a[i]);
      if (i < b.size()) emit(b[i]);
    end
  endfunction

  task automatic build_program();
    logic [31:0] cq [$], lq [$], nxt [$], prev [$];
    int len, d, k, u, n, s, b0;
    int bu [$], bk [$];
    // bases: x5 = POLY, x6 = TW1, x7 = TW2, x8 = TW2B
    emit(addi(5, 0, POLY));
    emit(addi(6, 0, TW1));
    emit(addi(7, 0, 1024));
    emit(addi(7, 7, 1024));
    emit(addi(8, 7, 1920));
    emit(ld(2, 0, 6, CST - TW1));             // FIX[0] = q
    emit(ld(2, 1, 6, CST - TW1 + 4));         // FIX[1] = q^-1 mod 2^32
    // layers len = 128 .. 8
    for (len = NPT / 2; len >= 8; len >>= 1) begin
      d = len / 8;                            // distance in vectors
      bu = {}; bk = {};
      for (int start = 0; start < NPT; start += 2 * len)
        for (int j = start; j < start + len; j += 8) begin
          bu.push_back(j / 8);
          bk.push_back(NPT / 2 / len + start / (2 * len));
        end
      n = bu.size();
      prev = {};
      for (int i = 0; i <= n; i++) begin
        // loads of butterfly i (set i%2), compute of i-1, stores of i-2
        lq = {};
        if (i < n) begin
          b0 = 7 * (i % 2);
          lv2(lq, b0, 5, 32 * bu[i]);
          lv2(lq, b0 + 1, 5, 32 * (bu[i] + d));
          lv2(lq, b0 + 2, 6, 32 * (bk[i] - 1));
        end
        cq = {};
        nxt = {};
        if (i > 0) begin
          b0 = 7 * ((i - 1) % 2);
          mont(cq, b0 + 5, b0 + 1, b0 + 2, b0 + 3, b0 + 4);
          cq.push_back(ar(I_ADDV, b0 + 6, b0, b0 + 5));
          cq.push_back(ar(I_SUBV, b0 + 5, b0, b0 + 5));
          sv2(nxt, b0 + 6, 5, 32 * bu[i - 1]);
          sv2(nxt, b0 + 5, 5, 32 * (bu[i - 1] + d));
        end
        begin
          logic [31:0] ls [$];
          ls = {prev, lq};
          interleave(cq, ls);
        end
        prev = nxt;
      end
      foreach (prev[i]) emit(prev[i]);
    end
    // layers len = 4, 2, 1 on register pairs
    for (int v = 0; v < 32; v++)
      for (int l = 0; l < 8; l++) pos[v][l] = 8 * v + l;
    for (int g = 0; g < NPT / 16; g++) begin
      int bs, bo, tw_rows [3][2];
      int P, Q2;
      P = 2 * g; Q2 = 2 * g + 1;
      tw_rows = '{'{2, 3}, '{8, 9}, '{10, 11}};
      bs = (g < 10) ? 7 : 8;
      bo = (g < 10) ? 192 * g : 192 * (g - 10);
      // twiddles, tracking the coefficient positions
      for (int ly = 0; ly < 3; ly++) begin
        int ln, np [2][8];
        ln = 4 >> ly;
        for (int h = 0; h < 2; h++) begin
          int v;
          v = (h == 0) ? P : Q2;
          for (int j = 0; j < 4; j++) begin
            int lo, hi;
            lo = pos[v][j]; hi = pos[v][j + 4];
            if (hi != lo + ln || (lo / ln) % 2 != 0) pair_errors++;
            tw2[g][ly][h][j] = r_mont();
            tw2[g][ly][h][j + 4] = zeta_mont(NPT / 2 / ln + (lo - lo % (2 * ln)) / (2 * ln));
          end
        end
        for (int j = 0; j < 4; j++) begin
          np[0][2 * j] = pos[P][j];      np[0][2 * j + 1] = pos[Q2][j];
          np[1][2 * j] = pos[P][j + 4];  np[1][2 * j + 1] = pos[Q2][j + 4];
        end
        pos[P] = np[0];
        pos[Q2] = np[1];
      end
      // code
      lq = {};
      lv2(lq, 0, 5, 32 * P);
      lv2(lq, 1, 5, 32 * Q2);
      for (int h = 0; h < 2; h++) lv2(lq, tw_rows[0][h], bs, bo + 32 * h);
      foreach (lq[i]) emit(lq[i]);
      for (int ly = 0; ly < 3; ly++) begin
        cq = {};
        mont(cq, 6, 0, tw_rows[ly][0], 4, 5);
        mont(cq, 7, 1, tw_rows[ly][1], 4, 5);
        cq.push_back(ar(I_ADDVTI, 0, 6, 7));
        cq.push_back(ar(I_SUBVTI, 1, 6, 7));
        lq = {};
        if (ly == 0)
          for (int l2 = 1; l2 < 3; l2++)
            for (int h = 0; h < 2; h++) lv2(lq, tw_rows[l2][h], bs, bo + 64 * l2 + 32 * h);
        if (ly == 2) begin
          // the stores must follow the last addvti/subvti
          foreach (cq[i]) emit(cq[i]);
          sv2(lq, 0, 5, 32 * P);
          sv2(lq, 1, 5, 32 * Q2);
          foreach (lq[i]) emit(lq[i]);
        end else
          interleave(cq, lq);
      end
    end
    emit(32'h0000_0000);                      // end marker
  endtask

  // ---------------- memory access through the host port ----------------
  task automatic host_write(input int byte_addr, input logic [127:0] d, input logic [15:0] be);
    @(negedge clk);
    host_req = 1; host_we = 1; host_addr = DAW'(byte_addr >> 4); host_wdata = d; host_be = be;
    @(negedge clk);
    host_req = 0; host_we = 0;
  endtask

  task automatic host_read(input int byte_addr, output logic [127:0] d);
    @(negedge clk);
    host_req = 1; host_we = 0; host_addr = DAW'(byte_addr >> 4);
    @(negedge clk);
    host_req = 0;
    d = host_rdata;
  endtask

  task automatic write_vec(input int byte_addr, input int v [8]);
    logic [127:0] w0, w1;
    for (int i = 0; i < 4; i++) begin
      w0[32*i +: 32] = v[i];
      w1[32*i +: 32] = v[i + 4];
    end
    host_write(byte_addr, w0, '1);
    host_write(byte_addr + 16, w1, '1);
  endtask

  task automatic read_vec(input int byte_addr, output int v [8]);
    logic [127:0] w0, w1;
    host_read(byte_addr, w0);
    host_read(byte_addr + 16, w1);
    for (int i = 0; i < 4; i++) begin
      v[i]     = w0[32*i +: 32];
      v[i + 4] = w1[32*i +: 32];
    end
  endtask

  // ---------------- run ----------------
  int cycle = 0, t0 = -1, t1 = -1;
  logic running = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (running && rst_n) begin
      int n;
      n = int'(issue_cnt);
      if (t0 < 0 && n > 0) t0 = cycle;
      if (stall) n_stall++;
      if (dual) n_dual++;
      if (n == 1) n_single++;
      for (int k = 0; k < n; k++) begin
        logic [31:0] w;
        w = (k == 0) ? instr0 : instr1;
        if (w[6:0] == 7'b0010011 && w[11:7] != 0)
          gpr[w[11:7]] <= gpr[w[19:15]] + {{20{w[31]}}, w[31:20]};
      end
      pc <= pc + 4 * n;
    end
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one complete transform: build and load the program and the data, run it,
  // compare; returns the cycle count
  task automatic run_ntt(input string name, output int cyc);
    longint a [256], r [256];
    int v [8], qinv;
    prog.delete();
    pair_errors = 0;
    fetch_valid = 0; running = 0;
    n_dual = 0; n_single = 0; n_stall = 0; t0 = -1;
    for (int i = 0; i < 32; i++) gpr[i] = '0;
    @(negedge clk) pc = '0;

    build_program();
    check(pair_errors == 0, {name, ": butterfly pairs of the last three layers"});
    $display("%s NTT program: %0d instructions", name, prog.size());
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = IAW'(i); imem_wdata = prog[i];
    end
    @(negedge clk) imem_we = 0;

    // constants, input polynomial, twiddle vectors
    qinv = 1;
    for (int i = 0; i < 5; i++) qinv = qinv * (2 - int'(Q) * qinv);
    host_write(CST, {64'd0, 32'(qinv), 32'(Q)}, '1);
    for (int i = 0; i < NPT; i++) a[i] = longint'($urandom_range(0, 32'(Q - 1)));
    for (int vv = 0; vv < NPT / 8; vv++) begin
      for (int l = 0; l < 8; l++) v[l] = int'(a[8 * vv + l]);
      write_vec(POLY + 32 * vv, v);
    end
    for (int k = 1; k < NPT / 8; k++) begin
      for (int l = 0; l < 8; l++) v[l] = zeta_mont(k);
      write_vec(TW1 + 32 * (k - 1), v);
    end
    for (int g = 0; g < NPT / 16; g++)
      for (int ly = 0; ly < 3; ly++)
        for (int h = 0; h < 2; h++)
          write_vec(((g < 10) ? TW2 + 192 * g : TW2B + 192 * (g - 10)) + 64 * ly + 32 * h,
                    tw2[g][ly][h]);

    // reference NTT (Cooley-Tukey, natural order in, bit-reversed order out)
    for (int i = 0; i < NPT; i++) r[i] = a[i];
    begin
      int k;
      k = 0;
      for (int len = NPT / 2; len > 0; len >>= 1)
        for (int start = 0; start < NPT; start += 2 * len) begin
          longint z, t;
          k++;
          z = zeta_plain(k);
          for (int j = start; j < start + len; j++) begin
            t = mulq(z, r[j + len]);
            r[j + len] = modq(r[j] - t, Q);
            r[j] = modq(r[j] + t, Q);
          end
        end
    end

    // run
    @(negedge clk);
    running = 1; fetch_valid = 1;
    wait (pc >= 4 * (prog.size() - 1));
    t1 = cycle;
    @(negedge clk);
    fetch_valid = 0; running = 0;
    repeat (2) @(negedge clk);

    // compare every coefficient, following the tracked positions
    for (int vv = 0; vv < NPT / 8; vv++) begin
      read_vec(POLY + 32 * vv, v);
      for (int l = 0; l < 8; l++) begin
        int c;
        c = pos[vv][l];
        check(modq(longint'(v[l]) - r[c], Q) == 0, $sformatf("%s: coefficient %0d", name, c));
        check(v[l] > -9 * Q && v[l] < 9 * Q, {name, ": coefficient growth bound"});
      end
    end
    cyc = t1 - t0;
    $display("%s NTT: %0d cycles, dual=%0d single=%0d stall=%0d", name, cyc, n_dual, n_single, n_stall);
    check(n_dual > 0 && n_stall > 0, {name, ": dual issue and load-use stalls occur"});
  endtask

  initial begin
    int cyc_d, cyc_k;
    imem_we = 0; imem_waddr = '0; imem_wdata = '0;
    fetch_valid = 0; pc = '0;
    host_req = 0; host_we = 0; host_addr = '0; host_wdata = '0; host_be = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Dilithium: one 256-point NTT
    Q = 8380417; ZETA = 1753; NPT = 256; LOGN = 8;
    run_ntt("Dilithium 256-point", cyc_d);
    check(cyc_d <= 1750, "Dilithium NTT cycle count within the published 1750 cycles");

    // Kyber: 256 coefficients as two 128-point NTTs (even and odd halves);
    // zeta = 17 is a primitive 256th root of unity mod 3329
    Q = 3329; ZETA = 17; NPT = 128; LOGN = 7;
    run_ntt("Kyber 128-point (even half)", cyc_k);
    run_ntt("Kyber 128-point (odd half)", cyc_k);
    $display("Kyber 256 coefficients: %0d cycles for both halves", 2 * cyc_k);
    check(2 * cyc_k <= 1750, "both Kyber halves within the published 1750 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
