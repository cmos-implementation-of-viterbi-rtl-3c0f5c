// acs: one add-compare-select unit.
//
// Adds the branch metric of each of the two incoming branches to the path
// metric of the state it comes from, compares the two sums and keeps the
// smaller one as the new path metric of this state. dec is the 1-bit
// survivor decision: 0 keeps branch 0, 1 keeps branch 1 (ties keep 0).
// Sums wrap modulo 2^PM_W and the comparison uses the sign of their
// difference (modulo arithmetic), so no normalisation is needed; this
// follows the source design, which avoids normalisation the same way.
//
// Purely combinational.
module acs
  import vit_pkg::*;
(
  input  pm_t  pm0,
  input  pm_t  pm1,
  input  bm_t  bm0,
  input  bm_t  bm1,
  output pm_t  pm_out,
  output logic dec
);

  pm_t sum0, sum1;

  always_comb begin
    sum0   = pm0 + pm_t'(bm0);
    sum1   = pm1 + pm_t'(bm1);
    dec    = pm_less(sum1, sum0);
    pm_out = dec ? sum1 : sum0;
  end

endmodule
