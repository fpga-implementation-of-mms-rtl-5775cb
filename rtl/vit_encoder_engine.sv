// vit_encoder_engine -- encoder replica used inside the Viterbi decoder.
//
// Given a trellis state (the K-1 previous input bits) and a hypothesised
// input bit, it returns the next state and the N code symbols the
// transmitter's convolutional encoder would send on that branch. Computing
// branches on the fly this way replaces a stored trellis table, which is
// the memory saving the decoder is built around. Same state convention as
// conv_encoder: word = {bit, state}, next state = {bit, state[K-2:1]}.
// Purely combinational.
module vit_encoder_engine #(
  parameter int unsigned K = 9,
  parameter int unsigned N = 2,
  parameter logic [N-1:0][K-1:0] GEN = {9'o561, 9'o753}
) (
  input  logic [K-2:0] state,
  input  logic         in_bit,
  output logic [K-2:0] next_state,
  output logic [N-1:0] syms
);
  logic [K-1:0] word;
  assign word       = {in_bit, state};
  assign next_state = word[K-1:1];
  always_comb begin
    for (int unsigned i = 0; i < N; i++) syms[i] = ^(word & GEN[i]);
  end
endmodule
