// shuffle_out: output shuffling behind the PALU (post-processing).
//
// The eight 32-bit lane results are reordered so that the even lanes come
// first: output position k takes lane 0,2,4,6,1,3,5,7. addvmt and subvmt use
// it to gather the butterfly outputs of one NTT layer into the order the next
// layer needs. With en low the results pass in lane order, so the network is
// one row of 2:1 multiplexers. The order is the one of the published
// output-shuffling network, which is described as built from multiplexers.
// Purely combinational.
module shuffle_out
  import pqc_pkg::*;
(
  input  logic    en,       // 1: shuffle (addvmt/subvmt), 0: lane order
  input  vec256_t in,
  output vec256_t out
);

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      out[k]     = en ? in[2*k]     : in[k];
      out[k + 4] = en ? in[2*k + 1] : in[k + 4];
    end
  end

endmodule
