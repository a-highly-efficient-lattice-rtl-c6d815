// tb_shuffle_in: compares the input shuffling with the order
// 0,8,1,9,2,10,3,11,4,12,5,13,6,14,7,15 of the 16 words {rs1, rs2} when en
// is high, and checks that the operands pass straight when en is low.
module tb_shuffle_in;
  import pqc_pkg::*;

  logic    en;
  vec256_t in1, in2, out_a, out_b;
  shuffle_in dut (.*);

  int checks = 0, failures = 0;
  int order [16] = '{0, 8, 1, 9, 2, 10, 3, 11, 4, 12, 5, 13, 6, 14, 7, 15};

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [16], got;
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 16; i++) w[i] = $urandom;
      for (int i = 0; i < 8; i++) begin in1[i] = w[i]; in2[i] = w[i + 8]; end
      en = t[0];
      #1;
      for (int k = 0; k < 16; k++) begin
        got = (k < 8) ? out_a[k] : out_b[k - 8];
        checks++;
        if (got !== w[en ? order[k] : k]) begin
          failures++;
          $display("FAIL: position %0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
