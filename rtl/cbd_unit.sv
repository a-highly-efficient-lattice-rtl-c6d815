// cbd_unit: first stage of the cbd2 / cbd3 sampling instructions.
//
// cbd2 takes the low 32 bits of rs1, cbd3 the low 48 bits. Every input bit is
// widened to a 4-bit field {3'b000, bit} and the fields are packed into 32-bit
// words of eight fields: A0 = bits 0..7, A1 = bits 8..15, B0 = bits 16..23,
// B1 = bits 24..31, and for cbd3 also A2 = bits 32..39 and B2 = bits 40..47.
// Two 32-bit additions (the adders of PALU0 and PALU1) form A = A0 + A1 (+ A2)
// and B = B0 + B1 (+ B2); no field overflows because each field sum is at most
// 3. Since a field never exceeds 3, only its low two bits leave the unit
// (lane_a, lane_b); the PALU zero-extends them to 32-bit a and b operands of
// the eight lanes, which subtract them, so lane i returns (in[i] + in[8+i] (+ in[32+i])) - (in[16+i] + in[24+i] (+ in[40+i])).
// The bit grouping follows the published datapath. Purely combinational.
module cbd_unit
  import pqc_pkg::*;
(
  input  logic [47:0] in,
  input  logic        eta3,     // 1: cbd3, 0: cbd2
  output logic [LANES-1:0][1:0] lane_a,   // per-lane A, 0..3
  output logic [LANES-1:0][1:0] lane_b    // per-lane B, 0..3
);

  word_t a0, a1, a2, b0, b1, b2, sa, sb;

  function automatic word_t spread(input logic [7:0] bits);
    word_t w;
    for (int i = 0; i < 8; i++) w[4*i +: 4] = {3'b000, bits[i]};
    return w;
  endfunction

  always_comb begin
    a0 = spread(in[7:0]);
    a1 = spread(in[15:8]);
    b0 = spread(in[23:16]);
    b1 = spread(in[31:24]);
    a2 = eta3 ? spread(in[39:32]) : '0;
    b2 = eta3 ? spread(in[47:40]) : '0;
    sa = a0 + a1 + a2;
    sb = b0 + b1 + b2;
    for (int i = 0; i < 8; i++) begin
      lane_a[i] = sa[4*i +: 2];
      lane_b[i] = sb[4*i +: 2];
    end
  end

endmodule
