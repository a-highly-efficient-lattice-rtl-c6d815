// pqc_asm_pkg: instruction encoders and reference models for the testbenches.
//
// The encoders build the 32-bit words of the SIMD instructions in the encoding
// of pqc_pkg (custom-0 arithmetic, custom-1 Keccak, custom-2 loads, custom-3
// stores) and of the few scalar instructions the tests use. The reference
// models are written from the Keccak-f[1600] specification (standard rho
// offsets, round constants computed by the LFSR of the specification) and
// from the signed Montgomery reduction, independently of the RTL.
package pqc_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input logic [4:0] rs2,
                                         input logic [4:0] rs1, input logic [2:0] f3,
                                         input logic [4:0] rd, input logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction

  // custom-0 arithmetic: funct7 = index of the instruction in this list
  typedef enum int {
    I_ADDV, I_SUBV, I_ANDV, I_XORV, I_ADDVM, I_SUBVM, I_ADDVMT, I_SUBVMT,
    I_ADDVTI, I_SUBVTI, I_MULV, I_MULVH, I_MULVM, I_MULVHF, I_CBD2, I_CBD3,
    I_SLLVI, I_SRAVI
  } arith_e;

  function automatic logic [31:0] ar(input arith_e f, input int rd, input int rs1, input int rs2);
    return r_type(7'(f), 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0001011);
  endfunction

  function automatic logic [31:0] bgeuv(input int rs1, input int rs2, input int off);
    logic [12:0] b;
    b = 13'(off);
    return {b[12], b[10:5], 5'(rs2), 5'(rs1), 3'd7, b[4:1], b[11], 7'b0001011};
  endfunction

  // custom-1 Keccak: funct3 selects, imm3 in [27:25]
  localparam int K_XORV3 = 0, K_XORRV = 1, K_RXORV = 2, K_XORV2 = 3, K_XORV2RC = 4,
                 K_XORNAVI = 5, K_SHUFFLEV = 6;

  function automatic logic [31:0] kc(input int f3, input int rd, input int rs1,
                                     input int rs2, input int imm3);
    return {4'b0, 3'(imm3), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0101011};
  endfunction

  // loads (custom-2): 0 lv, 1 lw64, 2 lwf ; stores (custom-3): 0 sv, 1 sw64
  function automatic logic [31:0] ld(input int f3, input int rd, input int rs1, input int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i, 5'(rs1), 3'(f3), 5'(rd), 7'b1011011};
  endfunction

  function automatic logic [31:0] st(input int f3, input int rs2, input int rs1, input int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], 7'b1111011};
  endfunction

  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i, 5'(rs1), 3'd0, 5'(rd), 7'b0010011};
  endfunction

  // ---------------- Keccak-f[1600] reference ----------------
  typedef logic [63:0] kstate_t [5][5];   // [x][y]

  function automatic logic [63:0] rol(input logic [63:0] v, input int r);
    if (r == 0) return v;
    return (v << r) | (v >> (64 - r));
  endfunction

  // rho offsets computed as in the specification: (x,y) walks (1,0) -> (y, 2x+3y)
  function automatic int rho_off(input int x, input int y);
    int cx, cy, t, nx;
    if (x == 0 && y == 0) return 0;
    cx = 1; cy = 0;
    for (t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2) / 2) % 64;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return -1;
  endfunction

  // round constants from the LFSR rc(t)
  function automatic logic rc_bit(input int t);
    logic [7:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 8'h01;
    for (int i = 1; i <= t % 255; i++) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
    end
    return r[0];
  endfunction

  function automatic logic [63:0] round_const(input int ir);
    logic [63:0] rc;
    rc = '0;
    for (int j = 0; j <= 6; j++)
      if (rc_bit(j + 7 * ir)) rc[(1 << j) - 1] = 1'b1;
    return rc;
  endfunction

  function automatic void keccak_round(ref kstate_t a, input int ir);
    logic [63:0] c [5], d [5];
    kstate_t b;
    for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
    for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ rol(c[(x + 1) % 5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y][(2 * x + 3 * y) % 5] = rol(a[x][y] ^ d[x], rho_off(x, y));
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x][y] = b[x][y] ^ (~b[(x + 1) % 5][y] & b[(x + 2) % 5][y]);
    a[0][0] = a[0][0] ^ round_const(ir);
  endfunction

  // ---------------- signed Montgomery reduction ----------------
  // returns a * 2^-32 mod q, exact integer (a - m*q) / 2^32
  function automatic longint mont_ref(input longint a, input int qinv, input int q);
    int m;
    m = int'(a) * qinv;          // low 32 bits, signed
    return (a - longint'(m) * longint'(q)) >>> 32;
  endfunction

  function automatic longint modq(input longint v, input longint q);
    longint r;
    r = v % q;
    if (r < 0) r += q;
    return r;
  endfunction

endpackage
