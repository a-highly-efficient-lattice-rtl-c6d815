// tb_fix_regfile: reset value, writes to each row, and that a write leaves
// the other row alone.
module tb_fix_regfile;
  import pqc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  we, waddr;
  word_t wdata, fix0, fix1;

  fix_regfile dut (.*);

  int checks = 0, failures = 0;
  word_t r0, r1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    check(fix0 == 0 && fix1 == 0, "reset clears FIX");
    rst_n = 1;
    r0 = 0; r1 = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 1'($urandom); wdata = $urandom;
      if (we) begin if (waddr) r1 = wdata; else r0 = wdata; end
      @(negedge clk);
      we = 0;
      check(fix0 == r0, "FIX[0]");
      check(fix1 == r1, "FIX[1]");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
