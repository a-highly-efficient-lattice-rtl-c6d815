// tb_dual_issue: drives the dual-issue checker with pairs of random
// instructions decoded by simd_decoder and compares n_issue/stall/dual with
// a reference written from the pairing rules:
//   - two instructions issue together only when one is a load/store and the
//     other a computation (no branch), and the second does not read or write
//     a SIMD row, FIX or GPR that the first writes;
//   - the first instruction stalls when it reads the row/FIX of the load still
//     waiting for its data; if only the second does, the first issues alone.
module tb_dual_issue;
  import pqc_pkg::*;
  import pqc_asm_pkg::*;

  word_t      i0, i1;
  logic       valid, pend_valid, pend_pr, pend_fix;
  row_t       pend_row;
  dec_t       d0, d1;
  logic [1:0] n_issue;
  logic       stall, dual;

  simd_decoder u_d0 (.instr(i0), .dec(d0));
  simd_decoder u_d1 (.instr(i1), .dec(d1));
  dual_issue   dut  (.*);

  int checks = 0, failures = 0;
  int cnt_dual = 0, cnt_stall = 0, cnt_single = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s (%h %h)", what, i0, i1); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model: instruction kind and register use, from the generator
  typedef struct {
    int cls;                 // 0 compute, 1 load/store, 2 branch
    int rd_rows [$];
    int wr_row;              // -1 none
    bit fix_rd, fix_wr;
    int gpr_rd [$];
    int gpr_wr;              // -1 none
  } ref_t;

  function automatic void gen(output word_t ins, output ref_t r);
    int rd, rs1, rs2, k, kind;
    rd = $urandom_range(0, 7); rs1 = $urandom_range(0, 7); rs2 = $urandom_range(0, 7);
    r.rd_rows = {}; r.gpr_rd = {}; r.wr_row = -1; r.gpr_wr = -1; r.fix_rd = 0; r.fix_wr = 0;
    kind = $urandom_range(0, 7);
    case (kind)
      0: begin ins = ar(I_ADDV, rd, rs1, rs2); r.cls = 0; r.rd_rows = {rs1, rs2}; r.wr_row = rd; end
      1: begin ins = ar(I_MULVM, rd, rs1, 0); r.cls = 0; r.rd_rows = {rs1}; r.wr_row = rd; r.fix_rd = 1; end
      2: begin ins = kc(K_XORV2, rd, rs1, rs2, 0); r.cls = 0; r.rd_rows = {rs1, rs2}; r.wr_row = rd; end
      3: begin ins = ld(0, rd, rs1, 0); r.cls = 1; r.wr_row = rd; r.gpr_rd = {rs1}; end
      4: begin ins = ld(2, rd, rs1, 0); r.cls = 1; r.fix_wr = 1; r.gpr_rd = {rs1}; end
      5: begin ins = st(0, rs2, rs1, 0); r.cls = 1; r.rd_rows = {rs2}; r.gpr_rd = {rs1}; end
      6: begin ins = addi(rd, rs1, 1); r.cls = 0; r.gpr_rd = {rs1}; if (rd != 0) r.gpr_wr = rd; end
      default: begin ins = bgeuv(rs1, rs2, 8); r.cls = 2; r.rd_rows = {rs1, rs2}; end
    endcase
  endfunction

  function automatic bit reads(input ref_t r, input int row);
    foreach (r.rd_rows[i]) if (r.rd_rows[i] == row) return 1;
    return 0;
  endfunction

  function automatic bit dep(input ref_t a, input ref_t b);
    if (a.wr_row >= 0 && (reads(b, a.wr_row) || b.wr_row == a.wr_row)) return 1;
    if (a.fix_wr && (b.fix_rd || b.fix_wr)) return 1;
    if (a.gpr_wr >= 0) begin
      foreach (b.gpr_rd[i]) if (b.gpr_rd[i] == a.gpr_wr) return 1;
      if (b.gpr_wr == a.gpr_wr) return 1;
    end
    return 0;
  endfunction

  initial begin
    ref_t r0, r1;
    bit lu0, lu1, pair;
    int exp_n;
    for (int t = 0; t < 20000; t++) begin
      gen(i0, r0); gen(i1, r1);
      valid      = ($urandom_range(0, 9) != 0);
      pend_valid = $urandom_range(0, 1);
      pend_pr    = $urandom_range(0, 1);
      pend_fix   = !pend_pr;
      pend_row   = 4'($urandom_range(0, 7));
      #1;
      lu0 = pend_valid && ((pend_pr && reads(r0, pend_row)) || (pend_fix && r0.fix_rd));
      lu1 = pend_valid && ((pend_pr && reads(r1, pend_row)) || (pend_fix && r1.fix_rd));
      pair = ((r0.cls == 0 && r1.cls == 1) || (r0.cls == 1 && r1.cls == 0)) && !dep(r0, r1) && !lu1;
      exp_n = (!valid || lu0) ? 0 : (pair ? 2 : 1);
      check(n_issue == 2'(exp_n), "issue count");
      check(stall == (valid && lu0), "stall");
      check(dual == (exp_n == 2), "dual flag");
      if (exp_n == 2) cnt_dual++; else if (exp_n == 1) cnt_single++; else if (valid) cnt_stall++;
    end
    // every case must have been exercised
    check(cnt_dual > 100 && cnt_single > 100 && cnt_stall > 100, "coverage of dual/single/stall");
    $display("dual=%0d single=%0d stall=%0d", cnt_dual, cnt_single, cnt_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
