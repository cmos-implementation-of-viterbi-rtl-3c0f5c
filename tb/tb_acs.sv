// tb_acs: one add-compare-select unit against integer arithmetic.
//
// Path metrics are a random base plus offsets within the guaranteed spread,
// so the sums regularly wrap past 2^PM_W. The expected decision is whether
// the branch-1 sum is strictly smaller (ties keep branch 0), and the expected
// new metric is the smaller true sum reduced modulo 2^PM_W.
module tb_acs;
  import vit_pkg::*;

  pm_t  pm0, pm1, pm_out;
  bm_t  bm0, bm1;
  logic dec;
  int checks = 0, failures = 0, wraps = 0, ties = 0;

  acs dut (.pm0, .pm1, .bm0, .bm1, .pm_out, .dec);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 5000; trial++) begin
      int base, o0, o1, b0, b1, s0, s1, exp_pm;
      logic exp_dec;
      base = int'($urandom_range(0, (1 << PM_W) - 1));
      o0 = int'($urandom_range(0, V * BM_MAX));
      o1 = int'($urandom_range(0, V * BM_MAX));
      b0 = int'($urandom_range(0, BM_MAX));
      b1 = (trial % 8 == 0) ? o0 + b0 - o1 : int'($urandom_range(0, BM_MAX));
      if (b1 < 0 || b1 > BM_MAX) b1 = int'($urandom_range(0, BM_MAX));
      pm0 = pm_t'(base + o0); pm1 = pm_t'(base + o1);
      bm0 = bm_t'(b0);        bm1 = bm_t'(b1);
      s0 = o0 + b0; s1 = o1 + b1;
      exp_dec = (s1 < s0);
      exp_pm  = base + (exp_dec ? s1 : s0);
      if (exp_pm >= (1 << PM_W)) wraps++;
      if (s0 == s1) ties++;
      #1;
      checks++;
      if (dec !== exp_dec || pm_out !== pm_t'(exp_pm)) begin
        failures++;
        $display("trial %0d: pm %0d %0d bm %0d %0d -> %0d/%b expected %0d/%b",
                 trial, pm0, pm1, bm0, bm1, pm_out, dec, pm_t'(exp_pm), exp_dec);
      end
    end
    checks++;
    if (wraps == 0 || ties == 0) begin failures++; $display("wrap or tie case not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
