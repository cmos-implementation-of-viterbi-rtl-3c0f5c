// tb_sse: survivor state estimation against a linear minimum search.
//
// Random path metrics are drawn around a random base (so they often wrap
// past the top of the PM_W-bit range) with a spread inside the range the
// decoder guarantees; the expected state is the lowest-numbered state of
// minimum (unwrapped) metric. Ties are forced in part of the trials.
module tb_sse;
  import vit_pkg::*;

  pm_t    pm [NS];
  state_t best;
  int checks = 0, failures = 0;
  int wraps = 0;

  sse dut (.pm, .best);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 5000; trial++) begin
      int base, off[4], exp_s;
      base = int'($urandom_range(0, (1 << PM_W) - 1));
      for (int s = 0; s < 4; s++)
        off[s] = (trial % 4 == 0) ? int'($urandom_range(0, 3)) : int'($urandom_range(0, V * BM_MAX));
      exp_s = 0;
      for (int s = 0; s < 4; s++) begin
        pm[s] = pm_t'(base + off[s]);
        if (base + off[s] >= (1 << PM_W)) wraps++;
        if (off[s] < off[exp_s]) exp_s = s;
      end
      #1;
      checks++;
      if (int'(best) != exp_s) begin
        failures++;
        $display("trial %0d: offsets %0d %0d %0d %0d -> %0d, expected %0d",
                 trial, off[0], off[1], off[2], off[3], best, exp_s);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrapped metric was tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
