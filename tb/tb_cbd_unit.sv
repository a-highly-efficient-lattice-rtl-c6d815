// tb_cbd_unit: for random inputs, lane i of cbd2 must hold the bit sums
// in[i] + in[8+i] and in[16+i] + in[24+i], and of cbd3 additionally
// in[32+i] and in[40+i]; the difference is the binomial sample in [-eta, eta].
module tb_cbd_unit;
  import pqc_pkg::*;

  logic [47:0] in;
  logic        eta3;
  logic [LANES-1:0][1:0] lane_a, lane_b;

  cbd_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int t = 0; t < 500; t++) begin
      in = {$urandom, $urandom};
      eta3 = 1'(t % 2);
      #1;
      for (int i = 0; i < 8; i++) begin
        ea = in[i] + in[8 + i] + (eta3 ? in[32 + i] : 0);
        eb = in[16 + i] + in[24 + i] + (eta3 ? in[40 + i] : 0);
        checks++;
        if (lane_a[i] != ea || lane_b[i] != eb) begin
          failures++;
          $display("FAIL: eta3=%0d lane %0d", eta3, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
