// vit_ref_pkg: behavioural reference for the testbenches.
//
// A straightforward software model of the rate 1/3, K = 3 code (generators
// 101, 011, 111) and of a soft-decision Viterbi decoder over one block that
// starts from equal (zero) path metrics, written with plain integers and no
// modulo arithmetic. Tie rules match the hardware's documented choices: the
// ACS keeps the predecessor with oldest bit 0 on a tie, and the final state
// is the lowest-numbered state of minimum metric.
//
// A received symbol is packed as 9 bits {x1, x2, x3}, 3 bits each, where x1
// belongs to g1; soft value 0 is a confident '0' and 7 a confident '1'.
package vit_ref_pkg;

  localparam int SMAX = 7;

  // code word {c1, c2, c3} for input u with shift register (s1 newest, s2 oldest)
  function automatic logic [2:0] ref_word(input logic s1, input logic s2, input logic u);
    return {u ^ s2, u ^ s1, u ^ s1 ^ s2};
  endfunction

  // hard code word to a confident soft symbol
  function automatic logic [8:0] to_soft(input logic [2:0] w);
    logic [8:0] r;
    for (int i = 0; i < 3; i++) r[3*i +: 3] = w[i] ? 3'd7 : 3'd0;
    return r;
  endfunction

  // encode a message, encoder starting cleared
  function automatic void ref_encode(input logic msg[$], output logic [2:0] words[$]);
    logic s1, s2;
    s1 = 0; s2 = 0;
    words = {};
    foreach (msg[k]) begin
      words.push_back(ref_word(s1, s2, msg[k]));
      s2 = s1; s1 = msg[k];
    end
  endfunction

  function automatic int ref_bm(input logic [8:0] rx, input logic [2:0] w);
    int acc, d;
    acc = 0;
    for (int i = 0; i < 3; i++) begin
      d = int'(rx[3*i +: 3]) - (w[i] ? SMAX : 0);
      acc += d * d;
    end
    return acc;
  endfunction

  // decode one block; best_state returns the state the trace back started from
  function automatic void ref_viterbi(input logic [8:0] rx[$], output logic bits[$],
                                      output int best_state);
    int pm[4], npm[4];
    logic [3:0] dec[$];
    int st, n;
    n = rx.size();
    for (int s = 0; s < 4; s++) pm[s] = 0;
    dec = {};
    for (int k = 0; k < n; k++) begin
      logic [3:0] d;
      for (int s = 0; s < 4; s++) begin
        // s = {a, b}: reached from {b, c} with input a
        int a, b, m0, m1;
        a = s >> 1; b = s & 1;
        m0 = pm[b*2 + 0] + ref_bm(rx[k], ref_word(b[0], 1'b0, a[0]));
        m1 = pm[b*2 + 1] + ref_bm(rx[k], ref_word(b[0], 1'b1, a[0]));
        d[s]   = (m1 < m0);
        npm[s] = (m1 < m0) ? m1 : m0;
      end
      pm = npm;
      dec.push_back(d);
    end
    st = 0;
    for (int s = 1; s < 4; s++) if (pm[s] < pm[st]) st = s;
    best_state = st;
    bits = {};
    for (int k = n - 1; k >= 0; k--) begin
      bits.push_front(st[1]);
      st = (st & 1) * 2 + int'(dec[k][st]);
    end
  endfunction

endpackage
