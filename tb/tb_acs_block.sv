// tb_acs_block: one trellis iteration against the encoder's trellis.
//
// Random path metrics (bounded spread, random base so values wrap) and
// random branch metrics are applied. The reference enumerates every
// (previous state, input) pair of the encoder, computes the destination
// state and code word from the shift-register equations, and keeps per
// destination the smaller sum, preferring the predecessor whose oldest bit
// is 0 on a tie. New metrics and decisions must match.
module tb_acs_block;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  pm_t           pm_in [NS], pm_out [NS];
  bm_t           bm [NB];
  logic [NS-1:0] dec;
  int checks = 0, failures = 0;

  acs_block dut (.pm_in, .bm, .pm_out, .dec);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 3000; trial++) begin
      int base, off[4], b[8], best[4], bestc[4];
      base = int'($urandom_range(0, (1 << PM_W) - 1));
      for (int s = 0; s < 4; s++) begin
        off[s] = int'($urandom_range(0, V * BM_MAX));
        pm_in[s] = pm_t'(base + off[s]);
      end
      for (int w = 0; w < 8; w++) begin
        b[w] = (trial % 5 == 0) ? int'($urandom_range(0, 2)) * 10 : int'($urandom_range(0, BM_MAX));
        bm[w] = bm_t'(b[w]);
      end
      for (int s = 0; s < 4; s++) best[s] = -1;
      // previous state (s1, s2) in order s2 = 0 first, so ties keep s2 = 0
      for (int c = 0; c < 2; c++)
        for (int s1 = 0; s1 < 2; s1++)
          for (int u = 0; u < 2; u++) begin
            int nxt, sum;
            logic [2:0] w;
            w   = ref_word(s1[0], c[0], u[0]);
            nxt = u * 2 + s1;
            sum = off[s1 * 2 + c] + b[w];
            if (best[nxt] < 0 || sum < best[nxt]) begin
              best[nxt] = sum; bestc[nxt] = c;
            end
          end
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (pm_out[s] !== pm_t'(base + best[s]) || dec[s] !== bestc[s][0]) begin
          failures++;
          $display("trial %0d state %0d: %0d/%b expected %0d/%0d", trial, s,
                   pm_out[s], dec[s], pm_t'(base + best[s]), bestc[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
