// conv_encoder: rate 1/3, constraint length 3 convolutional encoder.
//
// Two flip-flops form the shift register: s1 holds the previous input bit
// and s2 the one before. The three modulo-2 adders give
//   c1 = u ^ s2 (g1 = 101), c2 = u ^ s1 (g2 = 011), c3 = u ^ s1 ^ s2 (g3 = 111)
// and code_word = {c1, c2, c3}. The structure and generators follow the
// source design.
//
// Timing: code_word is combinational from in_bit and the register contents
// (valid while in_valid is high); on a clock edge with in_valid high the
// register shifts (s2 <= s1, s1 <= in_bit). Synchronous active-low reset
// clears both flip-flops (an encoder that starts cleared); the choice of a
// synchronous reset is this design's own.
module conv_encoder
  import vit_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_bit,
  output word_t  code_word,
  output state_t state
);

  state_t st_q;   // {s1, s2}

  always_ff @(posedge clk) begin
    if (!rst_n)        st_q <= '0;
    else if (in_valid) st_q <= {in_bit, st_q[1]};
  end

  assign code_word = branch_word(st_q, in_bit);
  assign state     = st_q;

endmodule
