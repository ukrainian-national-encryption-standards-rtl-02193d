// strumok_alpha_mul: multiplication of a GF(2^64) word by alpha
// (INVERSE = 0) or by alpha^-1 (INVERSE = 1), as a byte shift of the word
// plus one 256 x 64 ROM lookup on the byte that falls out:
//   alpha    * w = (w << 8) ^ ALPHA_MUL[w[63:56]]
//   alpha^-1 * w = (w >> 8) ^ ALPHA_INV_MUL[w[7:0]]
// Tables are built in strumok_pkg from g(z). Combinational.
//
// ROM-plus-shift multiplication follows the published design.
module strumok_alpha_mul #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [63:0] w,
  output logic [63:0] p
);
  localparam strumok_pkg::word_table_t ROM =
    INVERSE ? strumok_pkg::alpha_inv_mul_table() : strumok_pkg::alpha_mul_table();

  if (INVERSE) begin : g_inv
    assign p = (w >> 8) ^ ROM[w[7:0]];
  end else begin : g_fwd
    assign p = (w << 8) ^ ROM[w[63:56]];
  end
endmodule
