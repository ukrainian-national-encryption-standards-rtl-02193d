// strumok_t_table: precalculated ROM T_COL of the Strumok nonlinear function,
// 256 words of 64 bits read asynchronously. T_COL[x] is the Kalyna MDS
// column COL multiplied by pi_(COL mod 4)(x), so one lookup performs the
// S-box and the GF(2^8) multiplications of MixColumn for one input byte.
//
// Precalculated T tables follow the published design; their contents derive
// from the stand-in S-boxes.
module strumok_t_table #(
  parameter int unsigned COL = 0   // byte position 0..7
) (
  input  logic [7:0]  addr,
  output logic [63:0] data
);
  localparam strumok_pkg::word_table_t ROM = strumok_pkg::t_table(COL);

  assign data = ROM[addr];
endmodule
