// kalyna_sbox_row: one substitution ROM pi_M applied to every byte of one
// row of the Kalyna state.
//
// The state row r of an NB-column block holds NB bytes, and all of them use
// the same table pi_(r mod 4), so one 256 x 8 ROM serves the whole row (for a
// 128-bit block this is one ROM per row, eight in all, each handling 16 bits).
// The ROM is read asynchronously: out is a combinational function of in.
// Contents come from kalyna_pkg::sbox_table(M).
//
// Ports: in / out carry the row bytes, byte j = column j.
//
// One ROM per row follows the published hardware organisation of SubBytes; the
// table contents are stand-ins, see kalyna_pkg.
module kalyna_sbox_row #(
  parameter int unsigned M  = 0,   // table index 0..3
  parameter int unsigned NB = 2    // number of columns
) (
  input  logic [NB-1:0][7:0] in,
  output logic [NB-1:0][7:0] out
);
  localparam kalyna_pkg::sbox_table_t ROM = kalyna_pkg::sbox_table(M);

  always_comb begin
    for (int j = 0; j < NB; j++) out[j] = ROM[in[j]];
  end
endmodule
