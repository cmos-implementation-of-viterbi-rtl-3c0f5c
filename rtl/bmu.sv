// bmu: branch metric unit.
//
// Takes one received soft symbol (three soft values) and produces the eight
// branch metrics of one trellis iteration. There are eight branches and, for
// this code, each carries a different 3-bit code word, so the metrics are
// indexed by the code word w: bm[w] = sum over the three code bits of
// (x_i - y_i)^2, with y_i = 0 for a '0' and SOFT_MAX for a '1' in w. The
// eight stored branch words and the squared (Euclidean) difference follow the
// source design; mapping a code bit to 0 / SOFT_MAX is this design's choice.
//
// Purely combinational.
module bmu
  import vit_pkg::*;
(
  input  sym_t rx,
  output bm_t  bm [NB]
);

  always_comb begin
    for (int w = 0; w < NB; w++) begin
      int unsigned acc;
      acc = 0;
      for (int i = 0; i < NC; i++) begin
        int d;
        d = int'(rx[i]) - (w[i] ? SOFT_MAX : 0);
        acc += int'(d * d);
      end
      bm[w] = bm_t'(acc);
    end
  end

endmodule
