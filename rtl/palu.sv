// palu: the parallel ALU of the SIMD extension (EX stage).
//
// Ten 32-bit cores. In 256-bit mode cores PALU0..PALU7 each run one palu_lane
// on lane i of the operands; the result goes to PR1..PR4 of the destination
// row. In 320-bit mode all ten cores run one Keccak instruction (keccak_unit)
// and the result goes to PR1..PR5. Around the lanes sit the pre-processing
// stage (input shuffling for addvti/subvti, the CBD bit grouping, the choice of
// FIX[0] or FIX[1] as multiplier operand) and the post-processing stage
// (output shuffling for addvmt/subvmt). bgeuv compares the lanes of rs1 and
// rs2 and raises 'any_ge' when some rs1 lane is >= the rs2 lane (unsigned).
//
// Inputs a..e are the rows rs1, rs2, rs3, rs4, rs5. 'wmask' tells which
// register files take the result (0 for instructions that write nothing).
// The instruction set follows the published design; the operation of each
// instruction on the lanes is described in palu_lane, cbd_unit and
// keccak_unit. Purely combinational: the result is written at the end of the
// cycle the instruction issues in. The published PALU has three core types
// (cores 0-4 with a 64-bit rotator, multiplier, carry-save adder and two
// adders; cores 5-7 without the rotator; cores 8-9 with a carry-save adder
// only) that the Keccak instructions share; here the eight palu_lane instances
// are identical and keccak_unit has its own rotators and logic, a choice of
// this design that does not change any result.
module palu
  import pqc_pkg::*;
(
  input  simd_op_e        op,
  input  logic [2:0]      imm3,
  input  logic [4:0]      shamt,
  input  vec320_t         a,
  input  vec320_t         b,
  input  vec320_t         c,
  input  vec320_t         d,
  input  vec320_t         e,
  input  word_t           fix0,
  input  word_t           fix1,
  output vec320_t         y,
  output logic [NPR-1:0]  wmask,
  output logic            any_ge
);

  vec256_t  va, vb, sia, sib, la, lb, ly, so;
  logic [LANES-1:0][1:0] cba, cbb;
  logic [LANES-1:0] ge;
  lane_op_e lop;
  vec320_t  ky;

  assign va = vec256_t'(a[3:0]);
  assign vb = vec256_t'(b[3:0]);

  shuffle_in  u_sin  (.en(op inside {OP_ADDVTI, OP_SUBVTI}), .in1(va), .in2(vb),
                      .out_a(sia), .out_b(sib));
  cbd_unit    u_cbd  (.in({a[0][47:0]}), .eta3(op == OP_CBD3), .lane_a(cba), .lane_b(cbb));
  keccak_unit u_kec  (.op(op), .imm3(imm3), .a(a), .b(b), .c(c), .d(d), .e(e), .y(ky));

  // pre-processing: lane operation and operand selection
  always_comb begin
    lop = L_ADD;
    la  = sia;
    lb  = sib;
    unique case (op)
      OP_ADDV:   lop = L_ADD;
      OP_SUBV:   lop = L_SUB;
      OP_ANDV:   lop = L_AND;
      OP_XORV:   lop = L_XOR;
      OP_ADDVM,
      OP_ADDVMT: lop = L_MADD;
      OP_SUBVM,
      OP_SUBVMT: lop = L_MSUB;
      OP_ADDVTI: lop = L_ADD;
      OP_SUBVTI: lop = L_SUB;
      OP_MULV:   lop = L_MULL;
      OP_MULVH:  lop = L_MULH;
      OP_MULVM:  begin lop = L_MULL; lb = {LANES{fix1}}; end
      OP_MULVHF: begin lop = L_MULH; lb = {LANES{fix0}}; end
      OP_CBD2,
      OP_CBD3:   begin
        lop = L_SUB;
        for (int i = 0; i < LANES; i++) begin
          la[i] = {30'b0, cba[i]};
          lb[i] = {30'b0, cbb[i]};
        end
      end
      OP_SLLVI:  lop = L_SLL;
      OP_SRAVI:  lop = L_SRA;
      default:   lop = L_ADD;
    endcase
  end

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    palu_lane u_lane (
      .op(lop), .a(la[i]), .b(lb[i]), .q(fix0), .shamt(shamt), .y(ly[i]), .ge(ge[i])
    );
  end

  shuffle_out u_sout (.en(op inside {OP_ADDVMT, OP_SUBVMT}), .in(ly), .out(so));

  // post-processing: output shuffling and mode selection
  always_comb begin
    y      = a;
    wmask  = '0;
    any_ge = 1'b0;
    unique case (op)
      OP_ADDV, OP_SUBV, OP_ANDV, OP_XORV, OP_ADDVM, OP_SUBVM, OP_ADDVTI,
      OP_SUBVTI, OP_MULV, OP_MULVH, OP_MULVM, OP_MULVHF, OP_CBD2, OP_CBD3,
      OP_SLLVI, OP_SRAVI, OP_ADDVMT, OP_SUBVMT: begin
        y[3:0] = so;
        wmask  = 5'b01111;
      end
      OP_XORV3, OP_XORRV, OP_RXORV, OP_XORV2, OP_XORV2RC, OP_XORNAVI,
      OP_SHUFFLEV: begin
        y     = ky;
        wmask = 5'b11111;
      end
      OP_BGEUV: any_ge = |ge;
      default: ;
    endcase
  end

endmodule
