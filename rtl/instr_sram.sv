// instr_sram: the instruction memory, 40 kB, with a 64-bit fetch.
//
// The memory is split into an even-word and an odd-word bank so that two
// consecutive 32-bit instructions can be read at any word address: fetch word
// address pc_w returns instr0 = word pc_w and instr1 = word pc_w + 1. The
// read is combinational, standing in for the fetch stage and pre-fetch buffer
// of the core, which are not part of this RTL. One 32-bit write port loads the
// program. The size and the 64-bit fetch width follow the published design;
// the bank split and the combinational read are this design's choices.
module instr_sram
  import pqc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 40960,
  parameter int unsigned AW         = $clog2(SIZE_BYTES / 4)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata,
  input  logic [AW-1:0] pc_w,
  output word_t         instr0,
  output word_t         instr1
);

  localparam int unsigned BANK_WORDS = SIZE_BYTES / 8;

  word_t bank_even [BANK_WORDS];
  word_t bank_odd  [BANK_WORDS];

  logic [AW-1:0] pc1;
  logic [AW-2:0] a_even, a_odd;

  always_ff @(posedge clk) begin
    if (we) begin
      if (waddr[0]) bank_odd[waddr[AW-1:1]]  <= wdata;
      else          bank_even[waddr[AW-1:1]] <= wdata;
    end
  end

  // the even bank serves whichever of pc_w, pc_w + 1 is even
  assign pc1    = pc_w + 1'b1;
  assign a_even = pc_w[0] ? pc1[AW-1:1]  : pc_w[AW-1:1];
  assign a_odd  = pc_w[0] ? pc_w[AW-1:1] : pc1[AW-1:1];

  // words past the end of the memory read as zero
  always_comb begin
    word_t we_d, wo_d;
    we_d = (32'(a_even) < BANK_WORDS) ? bank_even[a_even] : '0;
    wo_d = (32'(a_odd)  < BANK_WORDS) ? bank_odd[a_odd]   : '0;
    instr0 = pc_w[0] ? wo_d : we_d;
    instr1 = pc_w[0] ? we_d : wo_d;
  end

endmodule
