// dual_issue: issue decision for a 64-bit fetch packet.
//
// The fetch path delivers two consecutive 32-bit instructions i0 (first in
// program order) and i1. Both issue in the same cycle when one of them is a
// load/store and the other a non-load/store, neither is a branch or jump, and
// i1 does not depend on i0 (i1 reads or writes a SIMD row, a GPR or FIX that
// i0 writes). Otherwise only i0 issues. This rule follows the published
// design; the dependency test on whole rows is this design's choice.
//
// Load-use interlock (this design's choice): load data is written back one
// cycle after the load issues. An instruction that reads the row or FIX entry
// of the load issued in the previous cycle (pend_*) does not issue: with i0
// blocked nothing issues ('stall'), with only i1 blocked i0 issues alone.
// Purely combinational; n_issue is 0, 1 or 2.
module dual_issue
  import pqc_pkg::*;
(
  input  logic       valid,
  input  dec_t       d0,
  input  dec_t       d1,
  input  logic       pend_valid,
  input  logic       pend_pr,      // the pending load writes a SIMD row
  input  row_t       pend_row,
  input  logic       pend_fix,     // the pending load writes FIX
  output logic [1:0] n_issue,
  output logic       stall,
  output logic       dual
);

  function automatic logic reads_row(input dec_t d, input row_t r);
    logic hit;
    hit = d.st_rd_en && (d.st_rd_row == r);
    for (int i = 0; i < 5; i++)
      if (d.pr_rd_en[i] && d.pr_rd_row[i] == r) hit = 1'b1;
    return hit;
  endfunction

  function automatic logic load_use(input dec_t d);
    return pend_valid && ((pend_pr && reads_row(d, pend_row)) || (pend_fix && d.fix_rd));
  endfunction

  function automatic logic depends(input dec_t p, input dec_t n);
    logic dep;
    dep = 1'b0;
    if (p.pr_wr_en && (reads_row(n, p.pr_wr_row) ||
                       (n.pr_wr_en && n.pr_wr_row == p.pr_wr_row)))
      dep = 1'b1;
    if (p.fix_wr && (n.fix_rd || n.fix_wr))
      dep = 1'b1;
    if (p.gpr_wr_en && p.rd != 5'd0 &&
        ((n.gpr_rs1_en && n.rs1 == p.rd) || (n.gpr_rs2_en && n.rs2 == p.rd) ||
         (n.gpr_wr_en && n.rd == p.rd)))
      dep = 1'b1;
    return dep;
  endfunction

  logic mix, pairable;

  assign mix = (d0.cls == CLS_LS  && d1.cls == CLS_ALU) ||
               (d0.cls == CLS_ALU && d1.cls == CLS_LS);
  assign pairable = mix && !depends(d0, d1) && !load_use(d1);

  always_comb begin
    stall = valid && load_use(d0);
    if (!valid || stall) n_issue = 2'd0;
    else if (pairable)   n_issue = 2'd2;
    else                 n_issue = 2'd1;
    dual = (n_issue == 2'd2);
  end

endmodule
