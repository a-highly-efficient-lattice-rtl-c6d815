// pqc_simd_top: SIMD extension of a 4-stage RV32IMC core for lattice-based
// post-quantum cryptography (Kyber, Dilithium, Keccak).
//
// Two instructions are fetched per cycle from the instruction SRAM (64-bit
// fetch at the word address of the core's program counter 'pc'). Both are
// decoded; dual_issue decides whether one or both issue. An issued SIMD
// arithmetic or Keccak instruction reads up to five rows of the PR1..PR5
// register files, runs through the PALU and writes its result at the end of
// the same cycle. An issued SIMD load/store takes its base address from the
// core's general purpose register file (gpr_raddr/gpr_rdata), accesses the
// 64 kB data SRAM through the 128-bit LSU, and load data is written back one
// cycle later. bgeuv reports its outcome on br_valid/br_taken/br_offset.
//
// The scalar RV32IMC pipeline (fetch buffer, GPR file, ALU, multiplier, CSRs,
// controller) is not part of this RTL: it sits outside, drives pc and
// fetch_valid, advances pc by 4 x issue_cnt (or branches), executes the
// instructions of a packet that are not SIMD, and shares the data SRAM through
// the host_* port, which is served whenever the SIMD LSU is idle.
//
// Timing: issue_cnt, stall, dual and the branch outputs are combinational
// from pc and the pending-load state; everything else changes at the rising
// clock edge. rst_n is asynchronous and active low.
module pqc_simd_top
  import pqc_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 40960,
  parameter int unsigned DMEM_BYTES = 65536,
  parameter int unsigned IAW = $clog2(IMEM_BYTES / 4),
  parameter int unsigned DAW = $clog2(DMEM_BYTES / 16)
) (
  input  logic               clk,
  input  logic               rst_n,
  // program load
  input  logic               imem_we,
  input  logic [IAW-1:0]     imem_waddr,
  input  word_t              imem_wdata,
  // fetch / issue
  input  logic               fetch_valid,
  input  word_t              pc,
  output word_t              instr0,
  output word_t              instr1,
  output logic [1:0]         issue_cnt,
  output logic               stall,
  output logic               dual,
  // GPR read for SIMD load/store base addresses
  output logic [4:0]         gpr_raddr,
  input  word_t              gpr_rdata,
  // bgeuv outcome
  output logic               br_valid,
  output logic               br_taken,
  output logic [12:0]        br_offset,
  // data SRAM access of the scalar core
  input  logic               host_req,
  input  logic               host_we,
  input  logic [DAW-1:0]     host_addr,
  input  logic [MEM_W-1:0]   host_wdata,
  input  logic [MEM_W/8-1:0] host_be,
  output logic               host_gnt,
  output logic [MEM_W-1:0]   host_rdata
);

  dec_t d0, d1, alu_d, ls_d;
  logic alu_fire, ls_fire, issue0, issue1;

  // fetch and decode
  instr_sram #(.SIZE_BYTES(IMEM_BYTES)) u_imem (
    .clk(clk), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .pc_w(pc[IAW+1:2]), .instr0(instr0), .instr1(instr1)
  );

  simd_decoder u_dec0 (.instr(instr0), .dec(d0));
  simd_decoder u_dec1 (.instr(instr1), .dec(d1));

  // issue
  logic pend_valid, pend_pr, pend_fix;
  row_t pend_row;

  dual_issue u_issue (
    .valid(fetch_valid), .d0(d0), .d1(d1),
    .pend_valid(pend_valid), .pend_pr(pend_pr), .pend_row(pend_row), .pend_fix(pend_fix),
    .n_issue(issue_cnt), .stall(stall), .dual(dual)
  );

  assign issue0 = (issue_cnt != 2'd0);
  assign issue1 = (issue_cnt == 2'd2);

  // route the issued SIMD instructions to the PALU and the LSU
  always_comb begin
    alu_d    = '0;
    ls_d     = '0;
    alu_fire = 1'b0;
    ls_fire  = 1'b0;
    if (issue0 && d0.simd && d0.cls != CLS_LS)      begin alu_d = d0; alu_fire = 1'b1; end
    else if (issue1 && d1.simd && d1.cls != CLS_LS) begin alu_d = d1; alu_fire = 1'b1; end
    if (issue0 && d0.simd && d0.cls == CLS_LS)      begin ls_d = d0; ls_fire = 1'b1; end
    else if (issue1 && d1.simd && d1.cls == CLS_LS) begin ls_d = d1; ls_fire = 1'b1; end
  end

  // register files
  logic [5:0][3:0] raddr;
  vec320_t [5:0]   rdata;
  vec320_t         palu_y, wb_data;
  logic [NPR-1:0]  palu_wmask, wb_mask;
  logic            wb_en, any_ge;
  row_t            wb_row;
  word_t           fix0, fix1, fix_wdata;
  logic            fix_we, fix_waddr;

  always_comb begin
    for (int i = 0; i < 5; i++) raddr[i] = alu_d.pr_rd_row[i];
    raddr[5] = ls_d.st_rd_row;
  end

  pr_regfile u_pr (
    .clk(clk), .raddr(raddr), .rdata(rdata),
    .wa_en(alu_fire && alu_d.pr_wr_en), .wa_row(alu_d.pr_wr_row), .wa_mask(palu_wmask),
    .wa_data(palu_y),
    .wb_en(wb_en), .wb_row(wb_row), .wb_mask(wb_mask), .wb_data(wb_data)
  );

  fix_regfile u_fix (
    .clk(clk), .rst_n(rst_n), .we(fix_we), .waddr(fix_waddr), .wdata(fix_wdata),
    .fix0(fix0), .fix1(fix1)
  );

  // execute
  palu u_palu (
    .op(alu_d.op), .imm3(alu_d.imm3), .shamt(alu_d.shamt),
    .a(rdata[0]), .b(rdata[1]), .c(rdata[2]), .d(rdata[3]), .e(rdata[4]),
    .fix0(fix0), .fix1(fix1), .y(palu_y), .wmask(palu_wmask), .any_ge(any_ge)
  );

  assign br_valid  = alu_fire && alu_d.op == OP_BGEUV;
  assign br_taken  = br_valid && any_ge;
  assign br_offset = alu_d.bimm;

  // load/store
  logic               lsu_en, lsu_we;
  logic [DAW-1:0]     lsu_addr;
  logic [MEM_W-1:0]   lsu_wdata, mem_rdata;
  logic [MEM_W/8-1:0] lsu_be;

  assign gpr_raddr = ls_d.rs1;

  lsu128 #(.AW(DAW)) u_lsu (
    .clk(clk), .rst_n(rst_n), .issue(ls_fire), .dec(ls_d), .base(gpr_rdata),
    .st_row(rdata[5]),
    .mem_en(lsu_en), .mem_we(lsu_we), .mem_addr(lsu_addr), .mem_wdata(lsu_wdata),
    .mem_be(lsu_be), .mem_rdata(mem_rdata),
    .pend_valid(pend_valid), .pend_pr(pend_pr), .pend_row(pend_row), .pend_fix(pend_fix),
    .wb_en(wb_en), .wb_row(wb_row), .wb_mask(wb_mask), .wb_data(wb_data),
    .fix_we(fix_we), .fix_waddr(fix_waddr), .fix_wdata(fix_wdata)
  );

  // data memory, shared with the scalar core (SIMD LSU first)
  assign host_gnt   = host_req && !lsu_en;
  assign host_rdata = mem_rdata;

  data_sram #(.SIZE_BYTES(DMEM_BYTES)) u_dmem (
    .clk(clk),
    .en(lsu_en || host_req),
    .we(lsu_en ? lsu_we : host_we),
    .addr(lsu_en ? lsu_addr : host_addr),
    .wdata(lsu_en ? lsu_wdata : host_wdata),
    .be(lsu_en ? lsu_be : host_be),
    .rdata(mem_rdata)
  );

endmodule
