// data_sram: the data memory of the processor, 64 kB with a 128-bit port.
//
// Single port, synchronous: a request (en) with we = 0 returns the addressed
// 128-bit word on rdata in the next cycle; with we = 1 the bytes selected by
// be are written at the clock edge. addr is a word address (byte address
// divided by 16). The size is the one the published design reserves for data;
// the 128-bit width matches its load/store path. Written as an array, which
// synthesis maps to an SRAM macro; no reset, contents start undefined.
module data_sram
  import pqc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536,
  parameter int unsigned AW         = $clog2(SIZE_BYTES / 16)
) (
  input  logic               clk,
  input  logic               en,
  input  logic               we,
  input  logic [AW-1:0]      addr,
  input  logic [MEM_W-1:0]   wdata,
  input  logic [MEM_W/8-1:0] be,
  output logic [MEM_W-1:0]   rdata
);

  localparam int unsigned WORDS = SIZE_BYTES / 16;

  logic [MEM_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int i = 0; i < MEM_W / 8; i++)
          if (be[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end

endmodule
