// kalyna_sub_bytes: the SubBytes layer of DSTU 7624:2014.
//
// Every byte w(r,c) of the state is replaced by pi_(r mod 4)(w(r,c)). The
// layer is eight row ROMs (kalyna_sbox_row), row r using table r mod 4, all
// read asynchronously so the whole layer settles within one clock period.
//
// Ports: state_in / state_out, NB columns of 64 bits (byte r of a column is
// row r). Purely combinational.
//
// The row-to-table mapping follows the cipher; the bus byte order is this
// design's choice (little-endian, w_k at bits 8k+7:8k).
module kalyna_sub_bytes #(
  parameter int unsigned NB = 2
) (
  input  logic [NB-1:0][63:0] state_in,
  output logic [NB-1:0][63:0] state_out
);
  for (genvar r = 0; r < 8; r++) begin : g_row
    logic [NB-1:0][7:0] row_in, row_out;
    for (genvar c = 0; c < NB; c++) begin : g_col
      assign row_in[c]              = state_in[c][8*r +: 8];
      assign state_out[c][8*r +: 8] = row_out[c];
    end
    kalyna_sbox_row #(.M(r % 4), .NB(NB)) u_sbox (
      .in (row_in),
      .out(row_out)
    );
  end
endmodule
