// tb_lsu128: the load/store unit against a memory model held in this
// testbench (one-cycle read latency, byte enables, like data_sram).
// Random sequences of lv/lw64/lwf/sv/sw64 with random aligned addresses,
// both halves (bit 4 of the register field) and both FIX indices; every
// store updates a reference copy, every load is checked on the write-back
// port (data, row, mask) or the FIX write port one cycle after issue, and
// the store request (word address, data, byte enables) is checked in its
// issue cycle. pend_* must describe the load waiting for its data.
module tb_lsu128;
  import pqc_pkg::*;
  import pqc_asm_pkg::*;

  localparam int AW = 12;

  logic clk = 0, rst_n = 0, issue = 0;
  word_t instr, base;
  dec_t dec;
  vec320_t st_row;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [MEM_W-1:0] mem_wdata, mem_rdata;
  logic [MEM_W/8-1:0] mem_be;
  logic pend_valid, pend_pr, pend_fix, wb_en, fix_we, fix_waddr;
  row_t pend_row, wb_row;
  logic [NPR-1:0] wb_mask;
  vec320_t wb_data;
  word_t fix_wdata;

  simd_decoder u_dec (.instr(instr), .dec(dec));
  lsu128 #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  // memory model
  logic [127:0] mdl [int];
  function automatic logic [127:0] rd_mdl(input int a);
    return mdl.exists(a) ? mdl[a] : '0;
  endfunction
  always_ff @(posedge clk)
    if (mem_en) begin
      if (mem_we) begin
        logic [127:0] w;
        w = rd_mdl(int'(mem_addr));
        for (int i = 0; i < 16; i++) if (mem_be[i]) w[8*i +: 8] = mem_wdata[8*i +: 8];
        mdl[int'(mem_addr)] = w;
      end else mem_rdata <= rd_mdl(int'(mem_addr));
    end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference copy of the memory, in bytes
  logic [7:0] refm [int];
  function automatic logic [7:0] rb(input int a);
    return refm.exists(a) ? refm[a] : 8'h00;
  endfunction

  initial begin
    int kind, rd, byte_a, off, n_ld = 0, n_st = 0;
    logic [127:0] exp;
    instr = addi(0, 0, 0); base = 0; st_row = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(posedge clk); #1;
      kind = $urandom_range(0, 4);
      rd   = $urandom_range(0, 31);
      off  = int'($urandom_range(0, 127)) - 64;
      for (int p = 0; p < 5; p++) st_row[p] = {$urandom, $urandom};
      // aligned byte address within 2 kB so the model stays small
      case (kind)
        0, 3: byte_a = 16 * $urandom_range(0, 127);
        1, 4: byte_a = 8 * $urandom_range(0, 255);
        default: byte_a = 4 * $urandom_range(0, 511);
      endcase
      off  = (kind == 0 || kind == 3) ? 16 * (off / 16) : (kind == 2 ? 4 * (off / 4) : 8 * (off / 8));
      base = word_t'(byte_a - off + 4096);
      case (kind)
        0: instr = ld(0, rd, 1, off);
        1: instr = ld(1, rd, 1, off);
        2: instr = ld(2, rd, 1, off);
        3: instr = st(0, rd, 1, off);
        default: instr = st(1, rd, 1, off);
      endcase
      byte_a = byte_a + 4096;
      issue = 1;
      #1;
      check(mem_en && mem_addr == AW'(byte_a / 16), "request word address");
      check(mem_we == (kind >= 3), "request direction");
      if (kind == 3) begin
        exp = (rd >= 16) ? {st_row[3], st_row[2]} : {st_row[1], st_row[0]};
        check(mem_be == 16'hFFFF && mem_wdata == exp, "sv data");
        for (int i = 0; i < 16; i++) refm[byte_a + i] = exp[8*i +: 8];
        n_st++;
      end else if (kind == 4) begin
        check(mem_be == ((byte_a % 16) ? 16'hFF00 : 16'h00FF), "sw64 byte enables");
        check(mem_wdata[63:0] == st_row[4] && mem_wdata[127:64] == st_row[4], "sw64 data");
        for (int i = 0; i < 8; i++) refm[byte_a + i] = st_row[4][8*i +: 8];
        n_st++;
      end
      @(posedge clk); #1;
      issue = 0;
      instr = addi(0, 0, 0);
      #1;
      check(pend_valid == (kind <= 2), "pending load flag");
      if (kind <= 2) begin
        n_ld++;
        check(pend_pr == (kind != 2) && pend_fix == (kind == 2), "pending kind");
        check(kind == 2 || pend_row == 4'(rd), "pending row");
      end
      case (kind)
        0: begin
          for (int i = 0; i < 16; i++) exp[8*i +: 8] = rb(byte_a + i);
          check(wb_en && wb_row == 4'(rd) && wb_mask == ((rd >= 16) ? 5'b01100 : 5'b00011), "lv write port");
          check((rd >= 16) ? ({wb_data[3], wb_data[2]} == exp) : ({wb_data[1], wb_data[0]} == exp), "lv data");
        end
        1: begin
          for (int i = 0; i < 8; i++) exp[8*i +: 8] = rb(byte_a + i);
          check(wb_en && wb_mask == 5'b10000 && wb_data[4] == exp[63:0], "lw64");
        end
        2: begin
          for (int i = 0; i < 4; i++) exp[8*i +: 8] = rb(byte_a + i);
          check(!wb_en && fix_we && fix_waddr == 1'(rd) && fix_wdata == exp[31:0], "lwf");
        end
        default: check(!wb_en && !fix_we, "store writes no register");
      endcase
    end
    check(n_ld > 1000 && n_st > 1000, "loads and stores exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
