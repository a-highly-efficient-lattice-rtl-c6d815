// shuffle_in: input shuffling in front of the PALU (pre-processing).
//
// The 16 32-bit words of rs1 (words 0..7) and rs2 (words 8..15) are
// interleaved into the order 0,8,1,9,2,10,3,11 | 4,12,5,13,6,14,7,15. The
// first eight become operand a and the last eight operand b of the lanes, so
// addvti/subvti give lane 2j = rs1[j] op rs1[j+4] and lane 2j+1 =
// rs2[j] op rs2[j+4]: the butterfly partners four words apart in one
// register end up side by side. With en low the operands pass straight
// (out_a = in1, out_b = in2), so the network is one row of 2:1 multiplexers
// per word. The order is the one of the published input-shuffling network,
// which is described as built from multiplexers. Purely combinational.
module shuffle_in
  import pqc_pkg::*;
(
  input  logic    en,       // 1: shuffle (addvti/subvti), 0: straight
  input  vec256_t in1,
  input  vec256_t in2,
  output vec256_t out_a,
  output vec256_t out_b
);

  logic [15:0][31:0] src, dst;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      src[i]     = in1[i];
      src[i + 8] = in2[i];
    end
    // position 2j takes word j of its half, position 2j+1 word j + 8
    for (int h = 0; h < 2; h++)
      for (int j = 0; j < 4; j++) begin
        dst[8*h + 2*j]     = src[4*h + j];
        dst[8*h + 2*j + 1] = src[4*h + j + 8];
      end
    for (int i = 0; i < 8; i++) begin
      out_a[i] = en ? dst[i]     : in1[i];
      out_b[i] = en ? dst[i + 8] : in2[i];
    end
  end

endmodule
