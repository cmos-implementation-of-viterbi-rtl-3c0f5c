// acs_block: the ACS block of one trellis iteration (four ACS units).
//
// State {a, b} is entered from the two states {b, c}, c = 0 or 1, with input
// bit a. ACS unit st takes the path metrics of those two predecessors and the
// branch metrics of their code words branch_word({b,c}, a). dec[st] = c of
// the surviving predecessor, i.e. the oldest bit of the state the survivor
// came from; the trace back rebuilds the previous state as {b, dec[st]}.
// Four ACS units per iteration follow the source design; the decision
// encoding is this design's own.
//
// Purely combinational.
module acs_block
  import vit_pkg::*;
(
  input  pm_t          pm_in  [NS],
  input  bm_t          bm     [NB],
  output pm_t          pm_out [NS],
  output logic [NS-1:0] dec
);

  for (genvar st = 0; st < NS; st++) begin : g_acs
    localparam state_t S  = state_t'(st);
    localparam state_t P0 = {S[0], 1'b0};
    localparam state_t P1 = {S[0], 1'b1};
    localparam word_t  W0 = branch_word(P0, S[1]);
    localparam word_t  W1 = branch_word(P1, S[1]);

    acs u_acs (
      .pm0    (pm_in[P0]),
      .pm1    (pm_in[P1]),
      .bm0    (bm[W0]),
      .bm1    (bm[W1]),
      .pm_out (pm_out[st]),
      .dec    (dec[st])
    );
  end

endmodule
