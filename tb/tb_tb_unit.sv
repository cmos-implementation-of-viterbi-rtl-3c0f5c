// tb_tb_unit: exhaustive check of one trace-back step.
//
// For every current state and every decision vector the previous state must
// be the predecessor the decisions point to, and the decoded bit must be the
// input bit of the transition. The reference works from the encoder's
// shift-register picture: state (s1, s2) was entered from (s2, c) with input
// s1, where c is the decision bit stored for that state.
module tb_tb_unit;
  import vit_pkg::*;

  state_t        state_in, state_out;
  logic [NS-1:0] dec;
  logic          bit_out;
  int checks = 0, failures = 0;

  tb_unit dut (.state_in, .dec, .state_out, .bit_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int d = 0; d < 16; d++) begin
        logic s1, s2, c;
        state_in = state_t'(s); dec = 4'(d);
        #1;
        s1 = state_in[1]; s2 = state_in[0]; c = dec[s];
        checks++;
        if (state_out !== {s2, c} || bit_out !== s1) begin
          failures++;
          $display("state %0d dec %b: got %0d/%b", s, dec, state_out, bit_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
