// tb_shuffle_out: compares the output shuffling with the order
// 0,2,4,6,1,3,5,7 of the eight lane results when en is high, and checks the
// lane order when en is low.
module tb_shuffle_out;
  import pqc_pkg::*;

  logic    en;
  vec256_t in, out;
  shuffle_out dut (.*);

  int checks = 0, failures = 0;
  int order [8] = '{0, 2, 4, 6, 1, 3, 5, 7};

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 8; i++) in[i] = $urandom;
      en = t[0];
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (out[k] !== in[en ? order[k] : k]) begin
          failures++;
          $display("FAIL: position %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
