// viterbi_decoder: pipeline-structured soft-decision Viterbi decoder for the
// rate 1/3, K = 3 code (generators 101, 011, 111), plus the matching encoder.
//
// How it works. The decoder works on a window of N received symbols at a
// time. The trellis is unrolled: stage i holds a branch metric unit and an
// ACS block (four ACS units) for symbol i of the window, and hands its four
// path metrics to stage i+1 through a register. Every window starts with all
// path metrics at zero. After the last stage the survivor state estimation
// unit picks the state with the smallest metric and the trace back walks the
// N decision vectors backwards, one trace-back unit per stage and per cycle.
// Delay buffers skew the input symbols into the stages, hold each stage's
// decisions until the trace back reaches them, and align the decoded bits so
// a whole window leaves at once. A new window can enter on every clock, so up
// to N windows are in flight.
//
// Two modes, chosen per window with in_mode:
//   block  (in_mode = 0): in_syms[0..N-1] is one complete block; out_bits
//          gets all N decoded bits (out_bits[i] is the input bit of symbol i).
//   stream (in_mode = 1): in_syms[0..M-1] are the next M symbols of a
//          continuous stream. They are appended to the previous 2L stream
//          symbols (kept in a history buffer, reset to the all-zero code
//          symbol) to form a window of N = 2L + M. Only the bits at window
//          positions L..L+M-1, which have L symbols of context on each side,
//          are output, in out_bits[0..M-1]; out_bits[M..N-1] are zero. The
//          stream output therefore trails the input by L bits: the first
//          stream window returns L bits belonging to the reset history.
//
// Timing: a window taken with in_valid at clock edge E appears on out_bits
// with out_valid (and its mode on out_mode) right after edge E + LATENCY,
// LATENCY = 2N + 1 (25 cycles for N = 12): N cycles through the ACS stages,
// one for the survivor state estimation and N for the trace back. One window
// per clock, no back-pressure. Synchronous active-low reset.
//
// Follows the source design: the unrolled one-stage-per-symbol pipeline,
// block length 12, the BMU/ACS/SSE/trace-back/buffer split, zero initial
// metrics, modulo metrics, and decoding only positions L..L+M-1 of a
// 2L + M window when streaming. This design's own choices: L = 3 and M = 6
// (M = 2L, so that 2L + M = 12), soft values of SW bits, the parallel input
// port, the per-window mode bit and the register placement.
//
// The encoder (enc_*) is independent of the decoder and shares only the
// clock and reset.
module viterbi_decoder
  import vit_pkg::*;
#(
  parameter int unsigned N = 12,   // window (block) length in symbols
  parameter int unsigned L = 3,    // survivor path length (stream mode)
  parameter int unsigned M = 6     // new symbols / output bits per stream window
) (
  input  logic             clk,
  input  logic             rst_n,
  // decoder input: one window per clock
  input  logic             in_valid,
  input  logic             in_mode,     // 0 = block, 1 = stream
  input  sym_t [N-1:0]     in_syms,     // in_syms[0] is the oldest symbol
  // decoder output
  output logic             out_valid,
  output logic             out_mode,
  output logic [N-1:0]     out_bits,    // out_bits[0] is the oldest bit
  // convolutional encoder
  input  logic             enc_valid,
  input  logic             enc_bit,
  output word_t            enc_word
);

  localparam int unsigned LATENCY = 2 * N + 1;
  localparam int unsigned HIST    = 2 * L;

  if (N != 2 * L + M) begin : g_bad_params
    $error("viterbi_decoder: N must equal 2L + M");
  end

  // ------------------------------------------------------------------
  // Encoder
  // ------------------------------------------------------------------
  state_t enc_state;

  conv_encoder u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_valid),
    .in_bit    (enc_bit),
    .code_word (enc_word),
    .state     (enc_state)
  );

  // ------------------------------------------------------------------
  // Window assembly (input register and stream history buffer)
  // ------------------------------------------------------------------
  sym_t [N-1:0]    win_d, win_q;
  sym_t [HIST-1:0] hist_q;
  logic            valid_q, mode_q;

  always_comb begin
    if (in_mode) begin
      for (int i = 0; i < N; i++)
        win_d[i] = (i < HIST) ? hist_q[i] : in_syms[i - HIST];
    end else begin
      win_d = in_syms;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_q   <= '0;
      hist_q  <= '0;
      valid_q <= 1'b0;
      mode_q  <= 1'b0;
    end else begin
      valid_q <= in_valid;
      mode_q  <= in_mode;
      if (in_valid) begin
        win_q <= win_d;
        if (in_mode)
          for (int j = 0; j < HIST; j++) hist_q[j] <= win_d[M + j];
      end
    end
  end

  // ------------------------------------------------------------------
  // Trellis stages: symbol i reaches stage i i cycles after win_q
  // ------------------------------------------------------------------
  pm_t           pm_q  [N+1][NS];   // pm_q[i] feeds stage i
  logic [NS-1:0] dec_q [N];         // decisions of stage i, registered

  for (genvar s = 0; s < NS; s++) begin : g_pm0
    assign pm_q[0][s] = '0;         // every window starts from zero metrics
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    sym_t          sym;
    bm_t           bm     [NB];
    pm_t           pm_nxt [NS];
    logic [NS-1:0] dec;

    pipe_buffer #(.WIDTH($bits(sym_t)), .DEPTH(i)) u_skew (
      .clk (clk), .rst_n (rst_n), .din (win_q[i]), .dout (sym)
    );

    bmu       u_bmu (.rx (sym), .bm (bm));
    acs_block u_acs (.pm_in (pm_q[i]), .bm (bm), .pm_out (pm_nxt), .dec (dec));

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int s = 0; s < NS; s++) pm_q[i+1][s] <= '0;
        dec_q[i] <= '0;
      end else begin
        pm_q[i+1] <= pm_nxt;
        dec_q[i]  <= dec;
      end
    end
  end

  // ------------------------------------------------------------------
  // Survivor state estimation
  // ------------------------------------------------------------------
  state_t best, ss_q;

  sse u_sse (.pm (pm_q[N]), .best (best));

  always_ff @(posedge clk) begin
    if (!rst_n) ss_q <= '0;
    else        ss_q <= best;
  end

  // ------------------------------------------------------------------
  // Trace back: step t runs 2N - 2t - 1 cycles after its decisions were
  // registered; decoded bit t is then delayed t more cycles so that all N
  // bits of a window leave together.
  // ------------------------------------------------------------------
  state_t       tb_q   [N+1];       // tb_q[t+1] = state after step t
  logic [N-1:0] bits_al;

  assign tb_q[N] = ss_q;

  for (genvar t = 0; t < N; t++) begin : g_tb
    logic [NS-1:0] dec_d;
    state_t        st_prev;
    logic          bit_t, bit_q;

    pipe_buffer #(.WIDTH(NS), .DEPTH(2 * (N - t) - 1)) u_dec_buf (
      .clk (clk), .rst_n (rst_n), .din (dec_q[t]), .dout (dec_d)
    );

    tb_unit u_tbu (
      .state_in  (tb_q[t+1]),
      .dec       (dec_d),
      .state_out (st_prev),
      .bit_out   (bit_t)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        tb_q[t] <= '0;
        bit_q   <= 1'b0;
      end else begin
        tb_q[t] <= st_prev;
        bit_q   <= bit_t;
      end
    end

    pipe_buffer #(.WIDTH(1), .DEPTH(t)) u_out_buf (
      .clk (clk), .rst_n (rst_n), .din (bit_q), .dout (bits_al[t])
    );
  end

  // ------------------------------------------------------------------
  // Valid / mode tracking and output selection
  // ------------------------------------------------------------------
  logic v_al, m_al;

  pipe_buffer #(.WIDTH(2), .DEPTH(LATENCY)) u_ctl_buf (
    .clk (clk), .rst_n (rst_n), .din ({valid_q, mode_q}), .dout ({v_al, m_al})
  );

  always_comb begin
    out_valid = v_al;
    out_mode  = m_al;
    out_bits  = '0;
    if (m_al) begin
      for (int j = 0; j < M; j++) out_bits[j] = bits_al[L + j];
    end else begin
      out_bits = bits_al;
    end
  end

  // the encoder state is only observed by testbenches
  logic unused_ok;
  assign unused_ok = ^enc_state;

endmodule
