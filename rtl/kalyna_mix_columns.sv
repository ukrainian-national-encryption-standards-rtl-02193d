// kalyna_mix_columns: the MixColumns layer, one kalyna_mix_column per column
// of the NB-column state. Combinational.
//
// Follows the cipher description.
module kalyna_mix_columns #(
  parameter int unsigned NB = 2
) (
  input  logic [NB-1:0][63:0] state_in,
  output logic [NB-1:0][63:0] state_out
);
  for (genvar c = 0; c < NB; c++) begin : g_col
    kalyna_mix_column u_col (
      .col_in (state_in[c]),
      .col_out(state_out[c])
    );
  end
endmodule
