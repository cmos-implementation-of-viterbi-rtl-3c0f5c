// tb_unit: one trace-back step.
//
// Given the state S_n reached after a trellis step and the four decision bits
// that step's ACS block recorded, it returns the state S_{n-1} the survivor
// came from and the input bit that caused the transition. With states coded
// {s1, s2} (s1 = newest input), S_{n-1} = {S_n[0], dec[S_n]} and the decoded
// bit is S_n[1]. The step (two state bits plus one selected decision give the
// previous state) follows the source design; the bit mapping follows from the
// state encoding chosen here.
//
// Purely combinational.
module tb_unit
  import vit_pkg::*;
(
  input  state_t        state_in,
  input  logic [NS-1:0] dec,
  output state_t        state_out,
  output logic          bit_out
);

  assign state_out = {state_in[0], dec[state_in]};
  assign bit_out   = state_in[1];

endmodule
