// vit_pkg: constants, types and trellis helpers shared by the Viterbi decoder.
//
// The code is the rate 1/3, constraint length 3 convolutional code with the
// generators g1 = 101, g2 = 011, g3 = 111 (four trellis states). A received
// symbol is three soft values, one per code bit, each SW bits wide; a soft
// value of 0 means a confident '0' and SOFT_MAX a confident '1'.
//
// State encoding: state = {s1, s2}, where s1 is the most recent input bit
// (left flip-flop of the encoder) and s2 the one before it (right
// flip-flop). Input u moves state {s1,s2} to {u,s1}. Code word bit order:
// word[2] = g1, word[1] = g2, word[0] = g3 (the order in which symbols are
// printed, e.g. "111,011,...").
//
// Path metrics use modulo (wrap-around) arithmetic instead of normalisation;
// PM_W is chosen so the spread of the four metrics always stays below half
// the modulo range, which keeps the signed difference of two metrics exact.
// The code, generators and the Euclidean metric follow the source design;
// the soft width SW and the metric widths are this design's choices.
package vit_pkg;

  localparam int NC       = 3;               // code bits per symbol (rate 1/3)
  localparam int V        = 2;               // encoder memory (K - 1)
  localparam int NS       = 4;               // trellis states
  localparam int NB       = 8;               // trellis branches per iteration
  localparam int SW       = 3;               // soft-decision bits per code bit
  localparam int SOFT_MAX = (1 << SW) - 1;

  // generator taps over {s2, s1, u}: bit 2 = x^2, bit 1 = x, bit 0 = 1
  localparam logic [2:0] G1 = 3'b101;
  localparam logic [2:0] G2 = 3'b011;
  localparam logic [2:0] G3 = 3'b111;

  localparam int BM_MAX = NC * SOFT_MAX * SOFT_MAX;
  localparam int BM_W   = $clog2(BM_MAX + 1);
  // spread of path metrics is at most V * BM_MAX; twice that must fit in
  // the positive half of the modulo range
  localparam int PM_W   = $clog2(2 * V * BM_MAX + 1) + 1;

  typedef logic [SW-1:0]          soft_t;
  typedef soft_t [NC-1:0]         sym_t;    // [2] = g1 bit, [0] = g3 bit
  typedef logic [BM_W-1:0]        bm_t;
  typedef logic [PM_W-1:0]        pm_t;
  typedef logic [1:0]             state_t;
  typedef logic [NC-1:0]          word_t;

  // code word emitted for input u leaving state {s1, s2}
  function automatic word_t branch_word(input state_t st, input logic u);
    logic [2:0] r;
    r = {st[0], st[1], u};                  // {s2, s1, u}
    return {^(r & G1), ^(r & G2), ^(r & G3)};
  endfunction

  // a < b in modulo arithmetic (strict)
  function automatic logic pm_less(input pm_t a, input pm_t b);
    pm_t d;
    d = a - b;
    return d[PM_W-1];
  endfunction

endpackage
