// sse: survivor state estimation.
//
// Finds the state with the smallest of the four path metrics, the starting
// state of the trace back. The six pairwise comparisons le[i][j] = (pm[i] <=
// pm[j]) for i < j are formed in parallel (modulo compare, like the ACS) and
// combined: state i wins when it is no larger than every higher-numbered
// state and strictly smaller than every lower-numbered one, so ties go to the
// lowest state number. Six comparisons follow the source design; the tie rule
// is this design's choice.
//
// Purely combinational.
module sse
  import vit_pkg::*;
(
  input  pm_t    pm [NS],
  output state_t best
);

  logic le01, le02, le03, le12, le13, le23;
  logic [NS-2:0] win;

  always_comb begin
    le01 = !pm_less(pm[1], pm[0]);
    le02 = !pm_less(pm[2], pm[0]);
    le03 = !pm_less(pm[3], pm[0]);
    le12 = !pm_less(pm[2], pm[1]);
    le13 = !pm_less(pm[3], pm[1]);
    le23 = !pm_less(pm[3], pm[2]);

    win[0] =  le01 &  le02 &  le03;
    win[1] = !le01 &  le12 &  le13;
    win[2] = !le02 & !le12 &  le23;

    // the comparisons are consistent, so exactly one state wins; state 3
    // wins when none of the others does
    best = win[0] ? 2'd0 : win[1] ? 2'd1 : win[2] ? 2'd2 : 2'd3;
  end

endmodule
