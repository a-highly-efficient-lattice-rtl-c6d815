// tb_simd_decoder: encodes random instructions of every SIMD kind with the
// encoders of pqc_asm_pkg (written from the encoding table, not from the
// decoder) and checks the decoded operation, instruction class, register-file
// rows read and written, write masks, FIX use and immediates. Scalar RV32
// opcodes must decode as non-SIMD with the right class and GPR use.
module tb_simd_decoder;
  import pqc_pkg::*;
  import pqc_asm_pkg::*;

  word_t instr;
  dec_t  dec;

  simd_decoder dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s (instr %h)", what, instr); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rd, rs1, rs2, imm, k;
    simd_op_e o;
    for (int t = 0; t < 2000; t++) begin
      rd = $urandom_range(0, 31); rs1 = $urandom_range(0, 31); rs2 = $urandom_range(0, 31);
      imm = int'($urandom_range(0, 4095)) - 2048;
      // arithmetic
      k = $urandom_range(0, 17);
      instr = ar(arith_e'(k), rd, rs1, rs2); #1;
      o = simd_op_e'(k + 1);
      check(dec.simd && dec.op == o && dec.cls == CLS_ALU, "arith op");
      check(dec.pr_wr_en && dec.pr_wr_row == 4'(rd) && dec.pr_wr_mask == 5'b01111, "arith write");
      check(dec.pr_rd_en[0] && dec.pr_rd_row[0] == 4'(rs1), "arith rs1");
      check(dec.pr_rd_en[1] == !(o inside {OP_MULVM, OP_MULVHF, OP_CBD2, OP_CBD3, OP_SLLVI, OP_SRAVI}), "arith rs2 use");
      check(dec.pr_rd_row[1] == 4'(rs2) && dec.shamt == 5'(rs2), "arith rs2/shamt");
      check(dec.fix_rd == (o inside {OP_ADDVM, OP_SUBVM, OP_ADDVMT, OP_SUBVMT, OP_MULVM, OP_MULVHF}), "fix read");
      check(!dec.fix_wr && !dec.gpr_wr_en, "arith no fix/gpr write");
      // bgeuv
      instr = bgeuv(rs1, rs2, 2 * (imm / 2)); #1;
      check(dec.simd && dec.op == OP_BGEUV && dec.cls == CLS_BR && !dec.pr_wr_en, "bgeuv");
      check(dec.bimm == 13'(2 * (imm / 2)), "bgeuv offset");
      check(dec.pr_rd_en == 5'b00011 && dec.pr_rd_row[0] == 4'(rs1) && dec.pr_rd_row[1] == 4'(rs2), "bgeuv rows");
      // Keccak
      k = $urandom_range(0, 6);
      instr = kc(k, rd, rs1, rs2, t % 8); #1;
      check(dec.simd && dec.op == simd_op_e'(int'(OP_XORV3) + k) && dec.cls == CLS_ALU, "keccak op");
      check(dec.pr_wr_mask == 5'b11111 && dec.pr_wr_row == 4'(rd) && dec.imm3 == 3'(t % 8), "keccak write/imm");
      if (k == K_XORV3)
        check(dec.pr_rd_en == 5'b00111 && dec.pr_rd_row[2] == 4'(2 * rs1), "xorv3 reads rs1<<1");
      if (k == K_XORNAVI)
        check(dec.pr_rd_en == 5'b11111 && dec.pr_rd_row[2] == 4'(XORNAVI_RS3) &&
              dec.pr_rd_row[3] == 4'(XORNAVI_RS4) && dec.pr_rd_row[4] == 4'(XORNAVI_RS5), "xornavi rows");
      // loads
      k = $urandom_range(0, 2);
      instr = ld(k, rd, rs1, imm); #1;
      check(dec.simd && dec.cls == CLS_LS && dec.gpr_rs1_en && dec.rs1 == 5'(rs1), "load class");
      check(dec.imm12 == 12'(imm), "load offset");
      case (k)
        0: check(dec.op == OP_LV && dec.pr_wr_en && dec.pr_wr_row == 4'(rd) &&
                 dec.pr_wr_mask == ((rd >= 16) ? 5'b01100 : 5'b00011), "lv");
        1: check(dec.op == OP_LW64 && dec.pr_wr_en && dec.pr_wr_mask == 5'b10000, "lw64");
        default: check(dec.op == OP_LWF && dec.fix_wr && !dec.pr_wr_en, "lwf");
      endcase
      // stores
      k = $urandom_range(0, 1);
      instr = st(k, rs2, rs1, imm); #1;
      check(dec.simd && dec.cls == CLS_LS && dec.op == (k ? OP_SW64 : OP_SV), "store op");
      check(dec.st_rd_en && dec.st_rd_row == 4'(rs2) && !dec.pr_wr_en && dec.imm12 == 12'(imm), "store fields");
      // scalar
      instr = addi(rd, rs1, imm); #1;
      check(!dec.simd && dec.cls == CLS_ALU && dec.gpr_wr_en && dec.gpr_rs1_en && !dec.pr_wr_en, "addi");
      instr = {12'(imm), 5'(rs1), 3'd2, 5'(rd), OPC_LOAD}; #1;
      check(!dec.simd && dec.cls == CLS_LS && dec.gpr_wr_en, "lw");
      instr = {7'd0, 5'(rs2), 5'(rs1), 3'd2, 5'd0, OPC_STORE}; #1;
      check(!dec.simd && dec.cls == CLS_LS && dec.gpr_rs2_en && !dec.gpr_wr_en, "sw");
      instr = {7'd0, 5'(rs2), 5'(rs1), 3'd1, 5'd0, OPC_BRANCH}; #1;
      check(!dec.simd && dec.cls == CLS_BR, "bne");
      instr = {20'd0, 5'(rd), OPC_JAL}; #1;
      check(!dec.simd && dec.cls == CLS_BR && dec.gpr_wr_en, "jal");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
