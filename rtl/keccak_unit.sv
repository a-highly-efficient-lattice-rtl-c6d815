// keccak_unit: the 320-bit Keccak instructions of the PALU.
//
// Operands are SIMD rows holding one plane of the Keccak state, lane x of the
// plane in register file kslot(x) (PR5, PR1, PR2, PR3, PR4 for x = 0..4).
// With the plane-per-plane Keccak-f[1600] round (theta, rho, pi, chi, iota):
//   xorv3     rd = rs1 ^ rs2 ^ rs3 (rs3 is row rs1<<1)  - column parity C
//   xorv2     rd = rs1 ^ rs2
//   xorv2rc   lane 0 = rs1 ^ rs2, lanes 1..4 = rs1     - iota
//   xorrv     D[x] = C[x-1] ^ ROT(C[x+1], 1) from C = rs1 - theta
//   rxorv k   lane x = ROT(rs1[x] ^ rs2[x], r) with r from the rotation table,
//             row k, PALU 4-x                          - theta + rho
//   xornavi i gathers B[x] = R_x[(x+i) mod 5] from the five rho results
//             R_0..R_4 (rows rs1, rs2, x11, x12, x13) and returns
//             E[x] = B[x] ^ (~B[x+1] & B[x+2])         - pi + chi for plane
//             y = 2i mod 5
//   shufflev i lane x = rs1[(x - i) mod 5]
// The instruction set, the rotation table, the three-operand rs3 = rs1<<1 rule
// and the shufflev order follow the published design. The lane gather of
// xornavi is this design's reading of the pi step; it reproduces the register
// use of the published Keccak program (the result of immediate i is plane
// 2i mod 5). Purely combinational. The 64-bit XORs stand for pairs of the
// 32-bit carry-save adders of the PALU cores.
module keccak_unit
  import pqc_pkg::*;
(
  input  simd_op_e    op,
  input  logic [2:0]  imm3,
  input  vec320_t     a,       // rs1
  input  vec320_t     b,       // rs2
  input  vec320_t     c,       // rs3
  input  vec320_t     d,       // rs4
  input  vec320_t     e,       // rs5
  output vec320_t     y
);

  logic [4:0][63:0] la, lb, lc, ld, le, ly, bb;
  logic [2:0]       k, sh;

  always_comb begin
    // gather operands in Keccak lane order
    for (int x = 0; x < 5; x++) begin
      la[x] = a[kslot(x)];
      lb[x] = b[kslot(x)];
      lc[x] = c[kslot(x)];
      ld[x] = d[kslot(x)];
      le[x] = e[kslot(x)];
    end
    k  = (imm3 > 3'd4) ? 3'd4 : imm3;
    sh = (imm3 >= 3'd5) ? imm3 - 3'd5 : imm3;   // imm mod 5
    bb = '0;
    ly = la;
    unique case (op)
      OP_XORV3:   for (int x = 0; x < 5; x++) ly[x] = la[x] ^ lb[x] ^ lc[x];
      OP_XORV2:   for (int x = 0; x < 5; x++) ly[x] = la[x] ^ lb[x];
      OP_XORV2RC: ly[0] = la[0] ^ lb[0];
      OP_XORRV:
        for (int x = 0; x < 5; x++)
          ly[x] = la[(x + 4) % 5] ^ rotl64(la[(x + 1) % 5], 6'd1);
      OP_RXORV:
        for (int x = 0; x < 5; x++)
          ly[x] = rotl64(la[x] ^ lb[x], ROT_TABLE[k][4 - x]);
      OP_XORNAVI: begin
        bb[0] = la[sh];
        bb[1] = lb[(1 + sh) % 5];
        bb[2] = lc[(2 + sh) % 5];
        bb[3] = ld[(3 + sh) % 5];
        bb[4] = le[(4 + sh) % 5];
        for (int x = 0; x < 5; x++)
          ly[x] = bb[x] ^ (~bb[(x + 1) % 5] & bb[(x + 2) % 5]);
      end
      OP_SHUFFLEV:
        for (int x = 0; x < 5; x++) ly[x] = la[(x + 5 - int'(sh)) % 5];
      default: ly = la;
    endcase
    for (int x = 0; x < 5; x++) y[kslot(x)] = ly[x];
  end

endmodule
