// palu_lane: one 32-bit core of the PALU (cores PALU0..PALU7).
//
// Each core has a 32x32 signed multiplier, a carry-propagate adder, a
// carry-save adder used for XOR, and a shifter. Operands are signed 32-bit
// numbers. Operations (lane_op_e):
//   L_ADD/L_SUB  a + b, a - b
//   L_AND/L_XOR  bitwise logic
//   L_MADD       s = a + b; result s - q when s >= q, else s
//   L_MSUB       s = a - b; result s + q when s < 0, else s
//   L_MULL       low 32 bits of the signed product a*b
//   L_MULH       high 32 bits of the signed product a*b
//   L_SLL/L_SRA  logic left / arithmetic right shift of a by shamt
// The modular add/subtract uses a second adder that forms a+b-q or a-b+q, and a
// multiplexer driven by a sign bit picks the corrected or the plain sum, as in
// the published lane datapath. Which sum's sign bit drives the multiplexer is
// this design's choice (the one that keeps [0, q) inputs in [0, q)). The
// 'ge' output is the unsigned comparison a >= b used by bgeuv.
// Purely combinational.
module palu_lane
  import pqc_pkg::*;
(
  input  lane_op_e    op,
  input  word_t       a,
  input  word_t       b,
  input  word_t       q,
  input  logic [4:0]  shamt,
  output word_t       y,
  output logic        ge
);

  logic signed [63:0] prod;
  word_t              s_add, s_sub, t_add, t_sub;

  assign prod  = $signed(a) * $signed(b);
  assign s_add = a + b;
  assign s_sub = a - b;
  assign t_add = s_add - q;     // a + b + ~q + 1
  assign t_sub = s_sub + q;     // a + ~b + q + 1
  assign ge    = (a >= b);

  always_comb begin
    unique case (op)
      L_ADD:   y = s_add;
      L_SUB:   y = s_sub;
      L_AND:   y = a & b;
      L_XOR:   y = a ^ b;
      L_MADD:  y = t_add[31] ? s_add : t_add;
      L_MSUB:  y = s_sub[31] ? t_sub : s_sub;
      L_MULL:  y = prod[31:0];
      L_MULH:  y = prod[63:32];
      L_SLL:   y = a << shamt;
      L_SRA:   y = word_t'($signed(a) >>> shamt);
      default: y = '0;
    endcase
  end

endmodule
