// branch_metric_unit: hard-decision branch metrics.
//
// Compares the received 2-bit symbol r with each of the four possible code
// symbols and counts the differing bits (Hamming distance 0..2), as the design
// description specifies for the BMU. Purely combinational; bm[c] is the metric
// of expected symbol c.
module branch_metric_unit
  import viterbi_pkg::*;
(
  input  symbol_t    r,
  output logic [1:0] bm [4]
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [1:0] diff;
      diff  = r ^ symbol_t'(c);
      bm[c] = {1'b0, diff[1]} + {1'b0, diff[0]};
    end
  end
endmodule
