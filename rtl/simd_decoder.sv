// simd_decoder: decodes one 32-bit instruction for the SIMD extension.
//
// SIMD instructions are recognised by their major opcode (custom-0 arithmetic,
// custom-1 Keccak, custom-2 loads, custom-3 stores) and turned into a dec_t:
// the operation, the register-file rows read on ports a..e and f, the row and
// files written, and whether FIX or a general purpose register (GPR) is read
// or written. Any other instruction belongs to the scalar core; for it only
// its class (ALU, load/store, branch/jump) and its GPR use are reported, which
// is what the dual-issue logic needs. SIMD rows are addressed by bits [3:0] of
// a register field; for lv and sv bit 4 chooses the (PR1,PR2) or (PR3,PR4)
// half, so x17 names the upper half of row 1. The three-operand rule rs3 =
// rs1<<1 of xorv3 and the fixed extra sources of xornavi follow the published
// design; the opcode and funct values are this design's own (see pqc_pkg).
// Purely combinational.
module simd_decoder
  import pqc_pkg::*;
(
  input  word_t instr,
  output dec_t  dec
);

  logic [6:0] opc, f7;
  logic [2:0] f3;
  logic [4:0] rd, rs1, rs2;
  logic [4:0] rs1_sh;

  assign opc    = instr[6:0];
  assign f3     = instr[14:12];
  assign f7     = instr[31:25];
  assign rd     = instr[11:7];
  assign rs1    = instr[19:15];
  assign rs2    = instr[24:20];
  assign rs1_sh = {rs1[3:0], 1'b0};

  always_comb begin
    dec            = '0;
    dec.op         = OP_NONE;
    dec.cls        = CLS_ALU;
    dec.rd         = rd;
    dec.rs1        = rs1;
    dec.rs2        = rs2;
    dec.imm3       = instr[27:25];
    dec.shamt      = instr[24:20];
    dec.imm12      = instr[31:20];
    dec.bimm       = {instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
    dec.pr_rd_row  = {rd[3:0], rd[3:0], rs1_sh[3:0], rs2[3:0], rs1[3:0]};
    dec.pr_wr_row  = rd[3:0];
    dec.st_rd_row  = rs2[3:0];

    unique case (opc)
      OPC_CUSTOM0: begin
        if (f3 == F3_BGEUV) begin
          dec.simd     = 1'b1;
          dec.op       = OP_BGEUV;
          dec.cls      = CLS_BR;
          dec.pr_rd_en = 5'b00011;
        end else if (f3 == 3'd0 && arith_op(f7) != OP_NONE) begin
          dec.simd       = 1'b1;
          dec.op         = arith_op(f7);
          dec.pr_wr_en   = 1'b1;
          dec.pr_wr_mask = 5'b01111;
          unique case (dec.op)
            OP_MULVM, OP_MULVHF, OP_CBD2, OP_CBD3, OP_SLLVI, OP_SRAVI:
              dec.pr_rd_en = 5'b00001;
            default:
              dec.pr_rd_en = 5'b00011;
          endcase
          dec.fix_rd = dec.op inside {OP_ADDVM, OP_SUBVM, OP_ADDVMT, OP_SUBVMT,
                                      OP_MULVM, OP_MULVHF};
        end
      end
      OPC_CUSTOM1: begin
        if (f3 != 3'd7) begin
          dec.simd       = 1'b1;
          dec.pr_wr_en   = 1'b1;
          dec.pr_wr_mask = 5'b11111;
          unique case (f3)
            F3_XORV3:   begin dec.op = OP_XORV3;   dec.pr_rd_en = 5'b00111; end
            F3_XORRV:   begin dec.op = OP_XORRV;   dec.pr_rd_en = 5'b00001; end
            F3_RXORV:   begin dec.op = OP_RXORV;   dec.pr_rd_en = 5'b00011; end
            F3_XORV2:   begin dec.op = OP_XORV2;   dec.pr_rd_en = 5'b00011; end
            F3_XORV2RC: begin dec.op = OP_XORV2RC; dec.pr_rd_en = 5'b00011; end
            F3_XORNAVI: begin
              dec.op          = OP_XORNAVI;
              dec.pr_rd_en    = 5'b11111;
              dec.pr_rd_row[2] = XORNAVI_RS3;
              dec.pr_rd_row[3] = XORNAVI_RS4;
              dec.pr_rd_row[4] = XORNAVI_RS5;
            end
            default:    begin dec.op = OP_SHUFFLEV; dec.pr_rd_en = 5'b00001; end
          endcase
        end
      end
      OPC_CUSTOM2: begin
        if (f3 <= 3'd2) begin
          dec.simd       = 1'b1;
          dec.cls        = CLS_LS;
          dec.gpr_rs1_en = 1'b1;
          unique case (f3)
            3'd0: begin
              dec.op         = OP_LV;
              dec.pr_wr_en   = 1'b1;
              dec.pr_wr_mask = rd[4] ? 5'b01100 : 5'b00011;
            end
            3'd1: begin
              dec.op         = OP_LW64;
              dec.pr_wr_en   = 1'b1;
              dec.pr_wr_mask = 5'b10000;
            end
            default: begin
              dec.op     = OP_LWF;
              dec.fix_wr = 1'b1;
            end
          endcase
        end
      end
      OPC_CUSTOM3: begin
        if (f3 <= 3'd1) begin
          dec.simd       = 1'b1;
          dec.cls        = CLS_LS;
          dec.op         = (f3 == 3'd0) ? OP_SV : OP_SW64;
          dec.imm12      = {instr[31:25], instr[11:7]};
          dec.gpr_rs1_en = 1'b1;
          dec.st_rd_en   = 1'b1;
        end
      end
      default: ;
    endcase

    // scalar instructions: class and GPR use only
    if (!dec.simd) begin
      unique case (opc)
        OPC_LOAD:  begin dec.cls = CLS_LS; dec.gpr_rs1_en = 1'b1; dec.gpr_wr_en = 1'b1; end
        OPC_STORE: begin dec.cls = CLS_LS; dec.gpr_rs1_en = 1'b1; dec.gpr_rs2_en = 1'b1; end
        OPC_BRANCH: begin dec.cls = CLS_BR; dec.gpr_rs1_en = 1'b1; dec.gpr_rs2_en = 1'b1; end
        OPC_JAL:   begin dec.cls = CLS_BR; dec.gpr_wr_en = 1'b1; end
        OPC_JALR:  begin dec.cls = CLS_BR; dec.gpr_rs1_en = 1'b1; dec.gpr_wr_en = 1'b1; end
        OPC_LUI, OPC_AUIPC: dec.gpr_wr_en = 1'b1;
        7'b0110011: begin dec.gpr_rs1_en = 1'b1; dec.gpr_rs2_en = 1'b1; dec.gpr_wr_en = 1'b1; end
        default:   begin dec.gpr_rs1_en = 1'b1; dec.gpr_wr_en = 1'b1; end
      endcase
    end
  end

endmodule
