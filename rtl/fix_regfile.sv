// fix_regfile: the FIX register file of frequently used constants.
//
// Two rows of 32 bits, written by the lwf instruction and read by the modular
// instructions: FIX[0] holds the modulus q (addvm, subvm, addvmt, subvmt,
// mulvhf) and FIX[1] holds q^-1 mod 2^32 (mulvm). Both rows are always visible
// on the read outputs. The write happens at the rising clock edge; reset
// clears both rows (the reset is this design's choice).
module fix_regfile
  import pqc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic        waddr,
  input  word_t       wdata,
  output word_t       fix0,
  output word_t       fix1
);

  word_t mem [NFIX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem[0] <= '0;
      mem[1] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign fix0 = mem[0];
  assign fix1 = mem[1];

endmodule
