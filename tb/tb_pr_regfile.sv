// tb_pr_regfile: random writes on both write ports against a reference copy
// of the five 16 x 64-bit register files; every read port is compared after
// every write. Includes cycles where both ports write the same row (port wa,
// the PALU result, must win) and different rows of the same file (both must
// land).
module tb_pr_regfile;
  import pqc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0][3:0] raddr;
  vec320_t [5:0]   rdata;
  logic            wa_en, wb_en;
  logic [3:0]      wa_row, wb_row;
  logic [4:0]      wa_mask, wb_mask;
  vec320_t         wa_data, wb_data;

  pr_regfile dut (.*);

  int checks = 0, failures = 0, n_same = 0, n_diff = 0;
  logic [63:0] ref_m [5][16];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec320_t rnd();
    vec320_t v;
    for (int p = 0; p < 5; p++) v[p] = {$urandom, $urandom};
    return v;
  endfunction

  initial begin
    wa_en = 0; wb_en = 0; wa_row = 0; wb_row = 0; wa_mask = 0; wb_mask = 0;
    wa_data = '0; wb_data = '0; raddr = '0;
    // fill everything first
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      wa_en = 1; wa_row = 4'(r); wa_mask = '1; wa_data = rnd();
      for (int p = 0; p < 5; p++) ref_m[p][r] = wa_data[p];
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      wa_en = 1'($urandom); wb_en = 1'($urandom);
      wa_row = 4'($urandom); wb_row = ($urandom % 4 == 0) ? wa_row : 4'($urandom);
      wa_mask = 5'($urandom); wb_mask = 5'($urandom);
      wa_data = rnd(); wb_data = rnd();
      if (wa_en && wb_en && (wa_mask & wb_mask) != 0) begin
        if (wa_row == wb_row) n_same++; else n_diff++;
      end
      for (int p = 0; p < 5; p++) begin
        if (wb_en && wb_mask[p]) ref_m[p][wb_row] = wb_data[p];
        if (wa_en && wa_mask[p]) ref_m[p][wa_row] = wa_data[p];
      end
      @(posedge clk);
      #1;
      wa_en = 0; wb_en = 0;
      for (int k = 0; k < 6; k++) raddr[k] = 4'($urandom);
      #1;
      for (int k = 0; k < 6; k++)
        for (int p = 0; p < 5; p++) begin
          checks++;
          if (rdata[k][p] !== ref_m[p][raddr[k]]) begin
            failures++;
            if (failures < 10) $display("FAIL: port %0d file %0d row %0d", k, p, raddr[k]);
          end
        end
    end
    checks++;
    if (n_same == 0 || n_diff == 0) begin
      failures++;
      $display("FAIL: write collisions not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
