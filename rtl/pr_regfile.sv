// pr_regfile: the SIMD register files PR1..PR5.
//
// Five register files of 16 rows x 64 bits. A SIMD register is one row across
// the files: 256 bits (PR1..PR4) in arithmetic mode and 320 bits (PR1..PR5) in
// Keccak mode. Six read ports (a..f) each return a whole row; a..e feed the
// PALU (rs1, rs2, rs3, rs4, rs5) and f gives the store data. Two write ports
// take a row address and a per-file write mask: port wa carries PALU results,
// port wb carries load data. When both write the same file and row in one
// cycle, wa wins, because an arithmetic result written in the same cycle as a
// load response always comes later in program order.
//
// Reads are combinational, writes happen at the rising clock edge. The files
// have no reset: software loads every register before it reads it. The sizes
// and the port count follow the published design; the published design uses
// latches, this version uses flip-flops.
module pr_regfile
  import pqc_pkg::*;
#(
  parameter int unsigned ROWS  = PR_ROWS,
  parameter int unsigned NRD   = 6
) (
  input  logic                    clk,
  input  logic [NRD-1:0][3:0]     raddr,
  output vec320_t [NRD-1:0]       rdata,
  input  logic                    wa_en,
  input  logic [3:0]              wa_row,
  input  logic [NPR-1:0]          wa_mask,
  input  vec320_t                 wa_data,
  input  logic                    wb_en,
  input  logic [3:0]              wb_row,
  input  logic [NPR-1:0]          wb_mask,
  input  vec320_t                 wb_data
);

  logic [63:0] mem [NPR][ROWS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPR; p++) begin
      if (wb_en && wb_mask[p] && !(wa_en && wa_mask[p] && wa_row == wb_row))
        mem[p][wb_row] <= wb_data[p];
      if (wa_en && wa_mask[p])
        mem[p][wa_row] <= wa_data[p];
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++)
      for (int p = 0; p < NPR; p++)
        rdata[r][p] = mem[p][raddr[r]];
  end

endmodule
