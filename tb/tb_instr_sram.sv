// tb_instr_sram: writes every word of the 40 kB instruction memory at its
// default size, then fetches at random word addresses (even and odd) and
// checks instr0 = word pc, instr1 = word pc + 1 (0 past the end).
module tb_instr_sram;
  import pqc_pkg::*;

  localparam int SIZE  = 40960;
  localparam int AW    = $clog2(SIZE / 4);
  localparam int WORDS = SIZE / 4;

  logic clk = 0, we = 0;
  logic [AW-1:0] waddr, pc_w;
  word_t wdata, instr0, instr1;

  instr_sram #(.SIZE_BYTES(SIZE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s pc=%0d", what, pc_w); end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t refm [WORDS];

  initial begin
    int a;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = $urandom; refm[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 30000; t++) begin
      a = (t < 4) ? WORDS - 1 - t % 2 : $urandom_range(0, WORDS - 1);
      pc_w = AW'(a);
      #1;
      check(instr0 == refm[a], "instr0");
      check(instr1 == ((a + 1 < WORDS) ? refm[a + 1] : 32'd0), "instr1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
