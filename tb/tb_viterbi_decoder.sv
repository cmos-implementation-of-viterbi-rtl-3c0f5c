// tb_viterbi_decoder: end-to-end test of the pipelined decoder at its
// default size (N = 12, L = 3, M = 6).
//
// Phases:
//   1. Block mode with the four published sample blocks (hard received
//      symbols with two channel errors each); the decoded blocks must equal
//      the published decoded messages.
//   2. Block mode, 300 random 12-bit messages back to back (one window per
//      clock, so the pipeline is full), encoded by the reference model, with
//      soft noise and occasional hard errors.
//   3. Stream mode fed from the design's own encoder: message bits go
//      through enc_bit, each code word is checked against the reference
//      encoder, and every M words are sent as one stream window.
//   4. Back-to-back stream windows of a noisy stream, with block windows
//      interleaved so that the mode switches while the pipeline is full.
// Every window is compared with the reference decoder (vit_ref_pkg) on the
// same received window, bit for bit, and noise-free windows also with the
// transmitted message. Every output must appear exactly 2N + 1 clocks after
// its window was taken. Mechanisms counted (each must occur): block windows,
// stream windows, mode switches, a full pipeline, corrected channel errors,
// a trace back starting from a non-zero state.
module tb_viterbi_decoder;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  localparam int N   = 12;
  localparam int L   = 3;
  localparam int M   = 6;
  localparam int LAT = 2 * N + 1;

  logic             clk = 0, rst_n = 0;
  logic             in_valid = 0, in_mode = 0;
  sym_t [N-1:0]     in_syms = '0;
  logic             out_valid, out_mode;
  logic [N-1:0]     out_bits;
  logic             enc_valid = 0, enc_bit = 0;
  word_t            enc_word;

  viterbi_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  typedef struct {
    int           issue;
    logic         mode;
    logic [N-1:0] exp_bits;   // reference decoder result (selected bits)
    logic [N-1:0] true_bits;  // transmitted bits (selected)
    logic         check_true; // compare with the transmitted bits too
  } exp_t;
  exp_t exp_q[$];

  // mechanism counters
  int n_block = 0, n_stream = 0, n_switch = 0, n_corrected = 0, n_nonzero_start = 0;
  int run = 0, max_run = 0;
  logic last_mode = 0; bit any_issued = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- watchdog ----------------
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- output monitor ----------------
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("cycle %0d: unexpected output", cyc);
      end else begin
        e = exp_q.pop_front();
        if (cyc != e.issue + LAT) begin
          failures++; $display("cycle %0d: latency %0d, expected %0d", cyc, cyc - e.issue, LAT);
        end
        checks++;
        if (out_mode !== e.mode || out_bits !== e.exp_bits) begin
          failures++;
          $display("cycle %0d: mode %b bits %b, expected mode %b bits %b",
                   cyc, out_mode, out_bits, e.mode, e.exp_bits);
        end
        if (e.check_true) begin
          checks++;
          if (out_bits !== e.true_bits) begin
            failures++;
            $display("cycle %0d: bits %b differ from transmitted %b", cyc, out_bits, e.true_bits);
          end
        end
      end
    end
  end

  // ---------------- helpers ----------------
  function automatic logic [8:0] noisy(input logic [2:0] w, input int amp, input int flip_pct);
    logic [8:0] r;
    for (int i = 0; i < 3; i++) begin
      int v;
      v = (w[i] ? 7 : 0) + ((amp > 0) ? int'($urandom_range(0, 2 * amp)) - amp : 0);
      if (flip_pct > 0 && int'($urandom_range(0, 99)) < flip_pct) v = 7 - v;
      if (v < 0) v = 0;
      if (v > 7) v = 7;
      r[3*i +: 3] = 3'(v);
    end
    return r;
  endfunction

  function automatic logic hard_err(input logic [8:0] r, input logic [2:0] w);
    for (int i = 0; i < 3; i++) if ((r[3*i +: 3] >= 4) != w[i]) return 1;
    return 0;
  endfunction

  // present one window in the next cycle; rx holds all N window symbols, of
  // which the stream mode sends only the last M
  task automatic issue(input logic mode, input logic [8:0] rx[$], input logic msg[$],
                       input logic check_true, input logic had_err);
    exp_t e;
    logic bits[$];
    int   bs;
    ref_viterbi(rx, bits, bs);
    if (bs != 0) n_nonzero_start++;
    e.mode = mode; e.exp_bits = '0; e.true_bits = '0; e.check_true = check_true;
    if (mode) begin
      for (int j = 0; j < M; j++) begin
        e.exp_bits[j] = bits[L + j]; e.true_bits[j] = msg[L + j];
      end
    end else begin
      for (int j = 0; j < N; j++) begin
        e.exp_bits[j] = bits[j]; e.true_bits[j] = msg[j];
      end
    end
    if (had_err && e.exp_bits == e.true_bits) n_corrected++;
    @(negedge clk);
    in_valid = 1; in_mode = mode; in_syms = '0;
    if (mode) for (int j = 0; j < M; j++) in_syms[j] = sym_t'(rx[2 * L + j]);
    else      for (int j = 0; j < N; j++) in_syms[j] = sym_t'(rx[j]);
    e.issue = cyc + 1;
    exp_q.push_back(e);
    if (mode) n_stream++; else n_block++;
    if (any_issued && mode != last_mode) n_switch++;
    any_issued = 1; last_mode = mode;
    run++;
    if (run > max_run) max_run = run;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 0; run = 0;
    end
  endtask

  // stream state kept by the testbench: the last 2L received symbols and
  // the bits they carry (both start as the reset history: code word 000)
  logic [8:0] s_hist[$];
  logic       s_hbits[$];

  task automatic stream_window(input logic [8:0] new_rx[$], input logic new_bits[$],
                               input logic check_true, input logic had_err);
    logic [8:0] rx[$];
    logic       msg[$];
    rx  = {s_hist, new_rx};
    msg = {s_hbits, new_bits};
    issue(1'b1, rx, msg, check_true, had_err);
    s_hist  = rx[M : N - 1];
    s_hbits = msg[M : N - 1];
  endtask

  // ---------------- stimulus ----------------
  initial begin
    logic [11:0]  t_msg [4];
    logic [35:0]  t_rx  [4];
    logic [11:0]  t_dec [4];
    logic         s_u1, s_u2;   // stream encoder state of the reference

    // sample blocks: received symbols and decoded messages as published.
    // Block 2's published input/decoded message (111111000000) disagrees
    // with its published code words, which carry seven ones; the expected
    // result follows the code words.
    t_rx[0]  = 36'b111_011_011_100_001_001_001_111_101_000_000_000;
    t_dec[0] = 12'b101111100000;
    t_rx[1]  = 36'b111_100_101_001_001_001_001_111_101_000_000_000;
    t_dec[1] = 12'b111111100000;
    t_rx[2]  = 36'b111_011_000_011_010_011_101_010_000_000_000_000;
    t_dec[2] = 12'b101010000000;
    t_rx[3]  = 36'b000_111_011_010_100_001_010_101_001_000_000_000;
    t_dec[3] = 12'b010111000000;

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    idle(2);

    // ---- phase 1: published sample blocks
    for (int r = 0; r < 4; r++) begin
      logic [8:0] rx[$];
      logic       msg[$];
      rx = {}; msg = {};
      for (int k = 0; k < N; k++) begin
        rx.push_back(to_soft(t_rx[r][35 - 3*k -: 3]));
        msg.push_back(t_dec[r][11 - k]);
      end
      issue(1'b0, rx, msg, 1'b1, 1'b1);
      if (r == 0) idle(LAT + 3);   // first one alone: pure latency
    end
    idle(LAT + 2);

    // ---- phase 2: random blocks back to back
    for (int b = 0; b < 300; b++) begin
      logic       msg[$];
      logic [2:0] words[$];
      logic [8:0] rx[$];
      logic       err, clean;
      clean = (b % 4 == 0);
      msg = {}; words = {}; rx = {};
      for (int k = 0; k < N; k++) msg.push_back(1'($urandom));
      ref_encode(msg, words);
      err = 0;
      foreach (words[k]) begin
        rx.push_back(clean ? to_soft(words[k]) : noisy(words[k], 2, (b % 4 == 1) ? 4 : 0));
        if (hard_err(rx[k], words[k])) err = 1;
      end
      issue(1'b0, rx, msg, clean, err);
    end
    idle(LAT + 2);

    // ---- phase 3: stream from the design's encoder (noise-free)
    s_hist = {}; s_hbits = {};
    for (int j = 0; j < 2 * L; j++) begin s_hist.push_back(9'd0); s_hbits.push_back(1'b0); end
    s_u1 = 0; s_u2 = 0;
    for (int w = 0; w < 40; w++) begin
      logic [8:0] nrx[$];
      logic       nbits[$];
      nrx = {}; nbits = {};
      for (int k = 0; k < M; k++) begin
        logic u;
        u = 1'($urandom);
        @(negedge clk);
        in_valid = 0; run = 0;
        enc_valid = 1; enc_bit = u;
        #1;
        checks++;
        if (enc_word !== ref_word(s_u1, s_u2, u)) begin
          failures++; $display("encoder word %b expected %b", enc_word, ref_word(s_u1, s_u2, u));
        end
        nrx.push_back(to_soft(enc_word));
        nbits.push_back(u);
        s_u2 = s_u1; s_u1 = u;
      end
      @(negedge clk) enc_valid = 0;
      stream_window(nrx, nbits, 1'b1, 1'b0);
    end
    idle(2);

    // ---- phase 4: noisy stream back to back, block windows interleaved
    for (int w = 0; w < 300; w++) begin
      if (w % 7 == 3) begin
        logic       msg[$];
        logic [2:0] words[$];
        logic [8:0] rx[$];
        msg = {}; words = {}; rx = {};
        for (int k = 0; k < N; k++) msg.push_back(1'($urandom));
        ref_encode(msg, words);
        foreach (words[k]) rx.push_back(noisy(words[k], 1, 0));
        issue(1'b0, rx, msg, 1'b0, 1'b0);
      end else begin
        logic [8:0] nrx[$];
        logic       nbits[$];
        logic       err;
        nrx = {}; nbits = {};
        err = 0;
        for (int k = 0; k < M; k++) begin
          logic       u;
          logic [2:0] wd;
          u  = 1'($urandom);
          wd = ref_word(s_u1, s_u2, u);
          nrx.push_back(noisy(wd, 3, (w % 5 == 0) ? 3 : 0));
          if (hard_err(nrx[k], wd)) err = 1;
          nbits.push_back(u);
          s_u2 = s_u1; s_u1 = u;
        end
        stream_window(nrx, nbits, 1'b0, err);
      end
    end
    idle(LAT + 5);

    // ---- mechanisms
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d windows never came out", exp_q.size()); end
    $display("block windows %0d, stream windows %0d, mode switches %0d, longest back-to-back run %0d",
             n_block, n_stream, n_switch, max_run);
    $display("windows with corrected channel errors %0d, trace backs from a non-zero state %0d",
             n_corrected, n_nonzero_start);
    checks++; if (n_block == 0)         begin failures++; $display("no block window"); end
    checks++; if (n_stream == 0)        begin failures++; $display("no stream window"); end
    checks++; if (n_switch == 0)        begin failures++; $display("no mode switch"); end
    checks++; if (max_run < LAT)        begin failures++; $display("pipeline never full"); end
    checks++; if (n_corrected == 0)     begin failures++; $display("no corrected error"); end
    checks++; if (n_nonzero_start == 0) begin failures++; $display("no non-zero start state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
