# Pipelined soft-decision Viterbi decoder, rate 1/3, K = 3

This is a Viterbi decoder that unrolls the trellis in space instead of looping over it in
time. It is built for a short convolutional code: rate 1/3, constraint length 3, four states.
The decoder takes a window of 12 received symbols. Each of the 12 pipeline stages handles one
symbol: it computes the branch metrics and runs the four add-compare-select (ACS) operations
for that step. The last stage's path metrics pick a starting state. A chain of 12 trace-back
units then walks the stored decisions backwards. A new window can enter on every clock, so
the decoder returns a whole window of decoded bits per clock after a fixed latency of 25 cycles.

The design rests on one property of the Viterbi algorithm. Trace the survivor paths back from
every state at time n and they almost always merge by time n − L, where L is the survivor
path length. So a bit can be decoded reliably from a window that gives it about L symbols of
context on each side. It does not need the whole message. The decoder has two modes built on
this property, and the sections below explain them.

A matching encoder is included (`conv_encoder`). It is brought out on the top level, next to
the decoder.

## The code

The encoder keeps two flip-flops. `s1` holds the previous input bit and `s2` the bit before
that. For an input bit `u` it emits three code bits:

| code bit | generator | equation       |
|----------|-----------|----------------|
| c1       | 101       | u ^ s2         |
| c2       | 011       | u ^ s1         |
| c3       | 111       | u ^ s1 ^ s2    |

The code word is written `{c1,c2,c3}`, for example `111` for the first `1` sent from the
cleared state. The trellis state is `{s1, s2}`, and input `u` moves state `{s1,s2}` to
`{u,s1}`. So state `{a,b}` is reached from the two states `{b,0}` and `{b,1}`, and the input
bit of that step is `a`. Each of the 8 branches of one trellis step carries a different code
word:

| from `{s1,s2}` | u = 0 | u = 1 |
|----------------|-------|-------|
| 00             | 000   | 111   |
| 10             | 011   | 100   |
| 01             | 101   | 010   |
| 11             | 110   | 001   |

Everything shared about the code lives in `rtl/vit_pkg.sv`: the generators, the state
encoding, the widths and the `branch_word` function.

## Soft symbols and metrics

Each received code bit is a 3-bit soft value (`SW = 3`). A value of 0 means a confident `0`
and 7 a confident `1`. One received symbol (`sym_t`) is three such values, with `[2]` for c1
and `[0]` for c3. Hard-decision data is fed as 0 and 7.

- **Branch metric** (`bmu`): the squared Euclidean distance from the received symbol to each
  of the 8 code words, with each code bit taken as 0 or 7. That is the sum of
  `(x_i − y_i)^2` over the three bits, at most 3·49 = 147, so 8 bits wide.
- **Path metric** (`acs`): each state keeps the smaller of its two candidate sums and
  records one decision bit. The decision is the oldest bit `c` of the surviving predecessor
  `{b,c}`, and a tie keeps `c = 0`. Path metrics are 11 bits and use modulo arithmetic: sums
  wrap, and two metrics are compared by the sign of their difference. This is valid because
  the four metrics of one step never differ by more than 2·147, well under half the
  11-bit range, so no normalisation is needed. With 12 stages that start from zero, the
  metrics stay below 12·147 = 1764 < 2048 and never actually wrap. The modulo compare still
  lets N grow without changing any width.
- **Survivor state estimation** (`sse`): six pairwise comparisons, formed in parallel,
  decide which state has the smallest metric. Ties go to the lowest state number.
- **Trace back** (`tb_unit`): from state `S = {a,b}` after step t and that step's four
  decisions `d`, the previous state is `{b, d[S]}` and the decoded bit of step t is `a`.

Every window starts with all four path metrics at zero. The decoder is not told that the
encoder starts in state 0. It relies on the second property of the algorithm: after a few
steps the metrics no longer depend on how they started.

## Block mode and stream mode

The window length is N = 2L + M. The defaults are N = 12, L = 3 and M = 6. The mode is
chosen per window with `in_mode` and travels down the pipeline with that window.

**Block mode (`in_mode = 0`).** `in_syms[0..11]` is one complete block, and all 12 decoded
bits come out on `out_bits[0..11]`. Use this when the message is cut into 12-symbol blocks,
preferably ending in zero tail bits as in the sample data below.

**Stream mode (`in_mode = 1`).** This mode is for a continuous stream. Each window brings
only M = 6 new symbols, in `in_syms[0..5]`. The decoder keeps the previous 2L = 6 stream
symbols in a history register and puts them in front of the new ones:

```
window position   0 1 2 | 3 4 5 6 7 8 | 9 10 11
                  <- history (2L) ->|<----- new (M) ----->
                  [ L ] [ output M bits ] [ L ]
```

Only window positions L .. L+M−1 (3..8) are output, on `out_bits[0..5]`. Each of those bits
has at least L symbols of context before it and after it. The bits at the edges of the
window are less reliable, and the neighbouring windows cover them. With M = 2L, consecutive
windows overlap by 2L symbols and their output ranges join up exactly. Six new symbols go in
and six decoded bits come out per window.

The stream output trails the input by L = 3 bits. The history resets to the code word `000`,
which is what a cleared encoder sends for zero input. So the first stream window returns 3
zero bits for that reset history, followed by the first 3 real bits. Block windows can be
mixed with stream windows: they pass through without touching the stream history.

L = 3 is shorter than the usual rule of thumb for best-state decoding, which is about 2.5
times the encoder memory (5 here). The default trades some error-correcting margin for
M = 2L = 6 bits per window. To follow the rule of thumb with a 12-symbol window, set
`L = 5, M = 2`. For more margin, set `L = 5, M = 10, N = 20`.

## Pipeline and timing

```
          +--------+  +--------+        +--------+  +-----+
in_syms ->| stage0 |->| stage1 |-> .. ->|stage11 |->| SSE |--+
  (skew)  |BMU+ACS4|  |BMU+ACS4|        |BMU+ACS4|  +-----+  |
          +---+----+  +---+----+        +---+----+           |
              | dec       | dec             | dec            v
          [delay 23]  [delay 21]   ...  [delay 1]  -> trace back 11 -> ... -> trace back 0
                                                         |                      |
                                                    [delay 11] ... bit 11   [delay 0] bit 0
                                                         +---------> out_bits <-----+
```

- A window is registered on the edge where `in_valid` is high. That edge is E.
- Symbol i reaches stage i through an i-cycle skew buffer. Stage i's path metrics and
  decisions are registered at E + i + 1.
- The SSE result is registered at E + N + 1. Trace-back step t (t = N−1 down to 0) runs one
  cycle after step t+1. Its decisions therefore wait in a buffer of 2(N−t)−1 cycles.
- Decoded bit t is then held for t more cycles, so all N bits leave together.
- `out_valid`, `out_mode` and `out_bits` are valid right after edge E + 2N + 1, which is 25
  cycles for N = 12.

There is one window per clock and no back-pressure. Up to 2N + 1 windows are in flight.
Every register has a synchronous active-low reset (`rst_n`). All delays are plain shift
registers (`pipe_buffer`). A depth of 0 is a wire, so a generate loop can give each lane its
own depth.

At the defaults the design has about 720 flip-flops plus about 1760 bits in the delay lines.
Most of the delay-line bits are decision storage, which grows as N².

## Top-level ports (`viterbi_decoder`)

| port        | dir | width        | meaning |
|-------------|-----|--------------|---------|
| `clk`, `rst_n` | in | 1         | clock, synchronous active-low reset |
| `in_valid`  | in  | 1            | a window is presented |
| `in_mode`   | in  | 1            | 0 = block, 1 = stream |
| `in_syms`   | in  | N × `sym_t`  | received symbols, `[0]` oldest; stream mode uses `[0..M−1]` |
| `out_valid` | out | 1            | a decoded window is on `out_bits` |
| `out_mode`  | out | 1            | mode of that window |
| `out_bits`  | out | N            | decoded bits, `[0]` oldest; stream mode fills `[0..M−1]`, the rest is 0 |
| `enc_valid`, `enc_bit` | in | 1  | encoder shift enable and input bit |
| `enc_word`  | out | 3            | encoder code word `{c1,c2,c3}` for `enc_bit` (combinational) |

Parameters: `N = 12`, `L = 3`, `M = 6`. Elaboration fails unless `N == 2L + M`. The soft width
`SW` and the code itself are constants in `vit_pkg`. The metric widths follow from `SW`
automatically.

## Files

| file | contents |
|------|----------|
| `rtl/vit_pkg.sv` | code constants, types, `branch_word`, modulo compare `pm_less` |
| `rtl/conv_encoder.sv` | rate 1/3 encoder |
| `rtl/bmu.sv` | branch metric unit |
| `rtl/acs.sv` | one add-compare-select unit |
| `rtl/acs_block.sv` | four ACS units wired as one trellis step |
| `rtl/sse.sv` | survivor state estimation |
| `rtl/tb_unit.sv` | one trace-back step |
| `rtl/pipe_buffer.sv` | parameterized delay line |
| `rtl/viterbi_decoder.sv` | top level: pipeline, buffers, modes, encoder |
| `tb/vit_ref_pkg.sv` | integer reference encoder and Viterbi decoder for the tests |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- `tb_bmu` applies all 512 received symbols against all 8 code words. `tb_tb_unit` covers all
  64 state and decision combinations.
- `tb_acs`, `tb_acs_block` and `tb_sse` use random metrics around a random base, so the
  modulo wrap and ties are exercised. They compare with integer arithmetic over the trellis,
  which is enumerated from the encoder equations.
- `tb_conv_encoder` compares the encoder with the three published sample code-word
  sequences, then with the shift-register equations on a random stream.
- `tb_pipe_buffer` checks depths 5 and 0.
- `tb_viterbi_decoder` runs the top level at its default parameters, in four phases:
  1. The four sample blocks. Each holds two corrupted symbols (hard data). The expected
     results are the published decoded messages `101111100000`, `111111100000`,
     `101010000000` and `010111000000`. For the second block, the received code words carry
     seven leading ones, although its message is also listed as `111111000000`; the test
     expects what the code words encode. All four decode correctly.
  2. 300 random blocks back to back, with soft noise and some hard errors.
  3. A stream fed through the design's own encoder.
  4. A noisy stream with block windows mixed in, so the mode switches while the pipeline is
     full.

  Every window is compared bit for bit with `vit_ref_pkg` on the same received window, and
  noise-free windows also with the transmitted bits. Every window must come out exactly
  2N + 1 cycles after it went in. The testbench also counts block windows, stream windows,
  mode switches, a full pipeline, windows whose channel errors were corrected, and trace
  backs that start from a non-zero state. It fails if any of these never happened.

Each module testbench was also run against a deliberately broken copy of its module, and
each one failed.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb rtl/vit_pkg.sv tb/vit_ref_pkg.sv \
    tb/tb_viterbi_decoder.sv --top-module tb_viterbi_decoder
./obj_dir/Vtb_viterbi_decoder
```

Replace `tb_viterbi_decoder` with any other `tb_*` to test one module. Every run takes a
fraction of a second.

## Design choices and departures

Taken from the reference design:
- the code and its generators
- the unrolled pipeline, one BMU and four ACS units per symbol, with a block length of 12
- the six-comparison survivor state estimation
- the trace-back step
- buffers for input skew, decisions and outputs
- modulo path metrics instead of normalisation
- zero initial metrics
- decoding only the middle M bits of a 2L + M window when streaming

Choices made here, where the reference gives no detail:
- L = 3, M = 6 (M = 2L, so that 2L + M = 12). The rule of thumb L ≈ 2.5 × memory would
  give L = 5, M = 2 for the same window.
- 3-bit soft values, mapped 0/7, with the squared distance summed over the three code bits.
- State encoding, decision encoding and tie rules (lowest state, predecessor with oldest
  bit 0).
- The whole window enters in parallel on one port. A serial-to-parallel front end that
  collects symbols into windows is not included.
- The per-window mode bit, and a stream history that resets to the all-zero code word.
- The register placement (latency 2N + 1) and the synchronous active-low reset.
- The reference design reuses ("shares") pipeline buffers between overlapping windows when
  M = 2L. Here each window carries its own copy of the symbols down the skew buffers, and
  only the 2L-symbol history is shared between consecutive stream windows.
- The reference design also includes transistor-level CMOS versions of the ACS and BMU
  cells. They are not part of this RTL, which describes the same logic.
