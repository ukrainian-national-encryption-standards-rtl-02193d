// strumok_t: the nonlinear substitution T of DSTU 8845:2019,
//   T(w) = T_0[w_0] ^ T_1[w_1] ^ ... ^ T_7[w_7],
// w_i being byte i (bits 8i+7:8i) of the 64-bit input. Eight ROM lookups
// (strumok_t_table) and seven 64-bit XORs; the result equals Kalyna SubBytes
// followed by MixColumn on the word seen as one column. Combinational.
//
// Follows the published design.
module strumok_t (
  input  logic [63:0] w,
  output logic [63:0] t
);
  logic [63:0] parts [8];

  for (genvar i = 0; i < 8; i++) begin : g_tab
    strumok_t_table #(.COL(i)) u_rom (.addr(w[8*i +: 8]), .data(parts[i]));
  end

  always_comb begin
    t = '0;
    for (int i = 0; i < 8; i++) t ^= parts[i];
  end
endmodule
