// kalyna_key_add: round-key addition of DSTU 7624:2014. With op = KEY_ADD
// each 64-bit column of the state is added to the matching key column modulo
// 2^64 (a 64-bit adder whose carry out is dropped); with op = KEY_XOR the key
// is XORed in. Combinational.
//
// Follows the cipher description.
module kalyna_key_add #(
  parameter int unsigned NB = 2
) (
  input  kalyna_pkg::key_op_e  op,
  input  logic [NB-1:0][63:0]  state_in,
  input  logic [NB-1:0][63:0]  key,
  output logic [NB-1:0][63:0]  state_out
);
  always_comb begin
    for (int c = 0; c < NB; c++)
      state_out[c] = (op == kalyna_pkg::KEY_ADD) ? state_in[c] + key[c]
                                                 : state_in[c] ^ key[c];
  end
endmodule
