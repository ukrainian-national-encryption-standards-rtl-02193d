// kalyna_round: one unkeyed Kalyna round, SubBytes -> ShiftRows ->
// MixColumns, as a single combinational path. The key addition that follows
// each round (XOR, or addition modulo 2^64 per column) is done by the caller,
// because the key schedule and the encryption use different key operations
// around the same round.
//
// A full round per clock follows the published design; keeping the key
// addition outside the round is this design's choice.
module kalyna_round #(
  parameter int unsigned NB = 2
) (
  input  logic [NB-1:0][63:0] state_in,
  output logic [NB-1:0][63:0] state_out
);
  logic [NB-1:0][63:0] after_sub, after_shift;

  kalyna_sub_bytes   #(.NB(NB)) u_sub   (.state_in(state_in),    .state_out(after_sub));
  kalyna_shift_rows  #(.NB(NB)) u_shift (.state_in(after_sub),   .state_out(after_shift));
  kalyna_mix_columns #(.NB(NB)) u_mix   (.state_in(after_shift), .state_out(state_out));
endmodule
