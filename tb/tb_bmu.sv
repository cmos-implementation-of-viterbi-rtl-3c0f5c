// tb_bmu: exhaustive check of the branch metric unit.
//
// All 512 received symbols (three 3-bit soft values) are applied. For each
// of the eight code words the expected metric is the sum of the squared
// differences between the soft values and 0 (for a '0') or 7 (for a '1').
module tb_bmu;
  import vit_pkg::*;
  import vit_ref_pkg::*;

  sym_t rx;
  bm_t  bm [NB];
  int checks = 0, failures = 0;

  bmu dut (.rx, .bm);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      rx = sym_t'(v);
      #1;
      for (int w = 0; w < 8; w++) begin
        checks++;
        if (int'(bm[w]) != ref_bm(9'(v), 3'(w))) begin
          failures++;
          $display("rx %h word %0d: %0d expected %0d", v, w, bm[w], ref_bm(9'(v), 3'(w)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
