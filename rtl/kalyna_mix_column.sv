// kalyna_mix_column: MixColumns for one 8-byte column of the Kalyna state.
//
// Output row r is the GF(2^8) dot product of row r of the circulant MDS
// matrix (first row 01 01 05 01 08 06 07 04, each further row rotated right
// by one) with the column. Each input byte goes through one kalyna_gf_mul
// bank, and every output byte is the XOR of eight of the bank outputs, so the
// column is mixed combinationally in a single clock period.
//
// Matrix and product chain follow the cipher description.
module kalyna_mix_column (
  input  logic [63:0] col_in,
  output logic [63:0] col_out
);
  // products[b][k]: input byte b times MDS_V[k]
  logic [7:0] products [8][8];

  for (genvar b = 0; b < 8; b++) begin : g_byte
    logic [7:0] m4, m5, m6, m7, m8;
    kalyna_gf_mul u_mul (
      .x (col_in[8*b +: 8]),
      .x4(m4), .x5(m5), .x6(m6), .x7(m7), .x8(m8)
    );
    // vector v = (01 01 05 01 08 06 07 04)
    assign products[b][0] = col_in[8*b +: 8];
    assign products[b][1] = col_in[8*b +: 8];
    assign products[b][2] = m5;
    assign products[b][3] = col_in[8*b +: 8];
    assign products[b][4] = m8;
    assign products[b][5] = m6;
    assign products[b][6] = m7;
    assign products[b][7] = m4;
  end

  always_comb begin
    for (int r = 0; r < 8; r++) begin
      col_out[8*r +: 8] = '0;
      // M[r][b] = v[(b - r) mod 8]
      for (int b = 0; b < 8; b++) col_out[8*r +: 8] ^= products[b][(b - r + 8) % 8];
    end
  end
endmodule
