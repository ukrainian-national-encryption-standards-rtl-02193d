// kalyna_shift_rows: the ShiftRows layer of DSTU 7624:2014.
//
// Row r of the state is rotated right (towards higher column indices) by
// shift_r = floor(r * L / 512) positions, L = 64 * NB being the block size:
// rows 4..7 move by one column for a 128-bit block, rows 2k, 2k+1 by k for a
// 256-bit block, and row r by r for a 512-bit block. With a fixed block size
// this is only wiring. Combinational.
//
// The shift amounts and direction follow the cipher's formula.
module kalyna_shift_rows #(
  parameter int unsigned NB = 2
) (
  input  logic [NB-1:0][63:0] state_in,
  output logic [NB-1:0][63:0] state_out
);
  for (genvar r = 0; r < 8; r++) begin : g_row
    localparam int unsigned SHIFT = (r * 64 * NB) / 512;
    for (genvar c = 0; c < NB; c++) begin : g_col
      assign state_out[(c + SHIFT) % NB][8*r +: 8] = state_in[c][8*r +: 8];
    end
  end
endmodule
