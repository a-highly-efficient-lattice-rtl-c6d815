// tb_data_sram: random reads and byte-masked writes over the whole 64 kB data
// memory at its default size, against a reference array. Reads must return
// the word one cycle after the request and hold it while en is low.
module tb_data_sram;
  import pqc_pkg::*;

  localparam int SIZE = 65536;
  localparam int AW   = $clog2(SIZE / 16);

  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr;
  logic [MEM_W-1:0] wdata, rdata;
  logic [MEM_W/8-1:0] be;

  data_sram #(.SIZE_BYTES(SIZE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [MEM_W-1:0] refm [SIZE / 16];

  initial begin
    logic [MEM_W-1:0] exp;
    // fill the whole memory
    for (int a = 0; a < SIZE / 16; a++) begin
      @(negedge clk);
      en = 1; we = 1; be = '1; addr = AW'(a);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      refm[a] = wdata;
    end
    for (int t = 0; t < 40000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      we = $urandom_range(0, 1);
      addr = AW'($urandom);
      be = 16'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      if (en && we)
        for (int i = 0; i < 16; i++) if (be[i]) refm[addr][8*i +: 8] = wdata[8*i +: 8];
      exp = refm[addr];
      if (en && !we) begin
        @(negedge clk);
        en = 0;
        check(rdata == exp, "read data");
        @(negedge clk);
        check(rdata == exp, "read data held while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
