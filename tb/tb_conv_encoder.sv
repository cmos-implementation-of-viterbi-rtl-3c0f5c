// tb_conv_encoder: rate 1/3 encoder against published sample vectors and a
// random stream.
//
// First the three sample messages whose code words are listed with the
// design (101111100000, 101010000000, 010111000000) are encoded from a
// cleared register and compared word by word with the listed code words.
// Then a long random bit stream, with random idle cycles, is compared with
// the shift-register equations c1 = u^s2, c2 = u^s1, c3 = u^s1^s2.
module tb_conv_encoder;
  import vit_pkg::*;

  logic   clk = 0, rst_n = 0, in_valid = 0, in_bit = 0;
  word_t  code_word;
  state_t state;
  int checks = 0, failures = 0;

  conv_encoder dut (.clk, .rst_n, .in_valid, .in_bit, .code_word, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_vector(input logic [11:0] msg, input logic [35:0] words);
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      in_valid = 1; in_bit = msg[11-k];
      #1;
      checks++;
      if (code_word !== words[35-3*k -: 3]) begin
        failures++;
        $display("msg %b symbol %0d: %b expected %b", msg, k, code_word, words[35-3*k -: 3]);
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
  endtask

  initial begin
    logic s1, s2, u;
    repeat (2) @(posedge clk);
    #1;
    run_vector(12'b101111100000, 36'b111_011_010_100_001_001_001_110_101_000_000_000);
    run_vector(12'b101010000000, 36'b111_011_010_011_010_011_101_000_000_000_000_000);
    run_vector(12'b010111000000, 36'b000_111_011_010_100_001_110_101_000_000_000_000);

    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    s1 = 0; s2 = 0;
    for (int k = 0; k < 1000; k++) begin
      u = 1'($urandom);
      in_bit = u;
      in_valid = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (code_word !== {u ^ s2, u ^ s1, u ^ s1 ^ s2} || state !== {s1, s2}) begin
        failures++;
        $display("random %0d: %b expected %b", k, code_word, {u ^ s2, u ^ s1, u ^ s1 ^ s2});
      end
      if (in_valid) begin s2 = s1; s1 = u; end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
