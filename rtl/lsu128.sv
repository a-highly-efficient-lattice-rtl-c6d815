// lsu128: the 128-bit load/store unit of the SIMD extension.
//
// Executes lv/sv (128 bits to or from the (PR1,PR2) or (PR3,PR4) half of a
// row, chosen by bit 4 of the register field), lw64/sw64 (64 bits to or from
// PR5) and lwf (32 bits into FIX). The byte address is GPR[rs1] + imm12; lv/sv
// need 16-byte, lw64/sw64 8-byte and lwf 4-byte alignment (checked by
// assertions). A store is sent to memory in its issue cycle with the data of
// store port f and byte enables for its part of the 128-bit word. A load is
// sent in its issue cycle; the memory answers one cycle later, and in that
// cycle the unit drives the register-file write port wb (or the FIX write)
// and reports the pending load on pend_* for the load-use interlock. The
// instruction set and the 128-bit path follow the published design; the
// timing is this design's choice. Verilator reports rst_n as used both
// synchronously and asynchronously: the synchronous use is only the
// 'disable iff' of the alignment assertions, not logic.
module lsu128
  import pqc_pkg::*;
#(
  parameter int unsigned AW = 12     // memory word-address width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               issue,
  input  dec_t               dec,
  input  word_t              base,
  input  vec320_t            st_row,
  // memory port
  output logic               mem_en,
  output logic               mem_we,
  output logic [AW-1:0]      mem_addr,
  output logic [MEM_W-1:0]   mem_wdata,
  output logic [MEM_W/8-1:0] mem_be,
  input  logic [MEM_W-1:0]   mem_rdata,
  // load write-back
  output logic               pend_valid,
  output logic               pend_pr,
  output row_t               pend_row,
  output logic               pend_fix,
  output logic               wb_en,
  output row_t               wb_row,
  output logic [NPR-1:0]     wb_mask,
  output vec320_t            wb_data,
  output logic               fix_we,
  output logic               fix_waddr,
  output word_t              fix_wdata
);

  word_t       addr;
  logic        is_load;
  simd_op_e    p_op;
  logic [3:0]  p_boff;
  logic        p_half, p_fixidx;
  logic [NPR-1:0] p_mask;

  assign addr    = base + {{20{dec.imm12[11]}}, dec.imm12};
  assign is_load = dec.op inside {OP_LV, OP_LW64, OP_LWF};

  // request
  always_comb begin
    mem_en    = issue;
    mem_we    = issue && !is_load;
    mem_addr  = addr[AW+3:4];
    mem_wdata = '0;
    mem_be    = '0;
    if (dec.op == OP_SV) begin
      mem_wdata = dec.rs2[4] ? {st_row[3], st_row[2]} : {st_row[1], st_row[0]};
      mem_be    = '1;
    end else if (dec.op == OP_SW64) begin
      mem_wdata = {st_row[4], st_row[4]};
      mem_be    = addr[3] ? 16'hFF00 : 16'h00FF;
    end
  end

  // pending load
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid <= 1'b0;
      p_op       <= OP_NONE;
      pend_row   <= '0;
      p_boff     <= '0;
      p_half     <= 1'b0;
      p_fixidx   <= 1'b0;
      p_mask     <= '0;
    end else begin
      pend_valid <= issue && is_load;
      p_op       <= dec.op;
      pend_row   <= dec.rd[3:0];
      p_boff     <= addr[3:0];
      p_half     <= dec.rd[4];
      p_fixidx   <= dec.rd[0];
      p_mask     <= (dec.op == OP_LV) ? (dec.rd[4] ? 5'b01100 : 5'b00011) : 5'b10000;
    end
  end

  assign pend_pr  = (p_op != OP_LWF);
  assign pend_fix = (p_op == OP_LWF);

  // write-back
  always_comb begin
    wb_en     = pend_valid && (p_op != OP_LWF);
    wb_row    = pend_row;
    wb_mask   = p_mask;
    wb_data   = '0;
    if (p_op == OP_LV) begin
      if (p_half) begin
        wb_data[2] = mem_rdata[63:0];
        wb_data[3] = mem_rdata[127:64];
      end else begin
        wb_data[0] = mem_rdata[63:0];
        wb_data[1] = mem_rdata[127:64];
      end
    end else begin
      wb_data[4] = p_boff[3] ? mem_rdata[127:64] : mem_rdata[63:0];
    end
    fix_we    = pend_valid && (p_op == OP_LWF);
    fix_waddr = p_fixidx;
    fix_wdata = mem_rdata[32*p_boff[3:2] +: 32];
  end

  // alignment rules of the SIMD loads and stores
  a_align128: assert property (@(posedge clk) disable iff (!rst_n)
    issue && (dec.op inside {OP_LV, OP_SV}) |-> addr[3:0] == 4'd0);
  a_align64: assert property (@(posedge clk) disable iff (!rst_n)
    issue && (dec.op inside {OP_LW64, OP_SW64}) |-> addr[2:0] == 3'd0);
  a_align32: assert property (@(posedge clk) disable iff (!rst_n)
    issue && dec.op == OP_LWF |-> addr[1:0] == 2'd0);

endmodule
