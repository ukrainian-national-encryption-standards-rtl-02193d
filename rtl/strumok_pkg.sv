// strumok_pkg: constants and elaboration-time tables of the DSTU 8845:2019
// ("Strumok") keystream generator.
//
// A 64-bit word is an element of GF(2^64) = GF(2^8)[z] / g(z): byte i
// (bits 8i+7:8i) is the coefficient of z^i. GF(2^8) is the Kalyna field
// (0x11d) and beta = 0x02 is its primitive element. g(z) is
//   z^8 + b^170 z^7 + b^166 z^6 + b^2 z^5 + b^224 z^4 + b^70 z^3 + b^2,
// with zero coefficients for z^2 and z (this polynomial is primitive over
// GF(2^8)). alpha is the class of z.
//
// Tables built here:
//  * ALPHA_MUL[c]     = c * z^8 reduced by g, i.e. byte i = c * g_i.
//                       alpha * w = (w << 8) ^ ALPHA_MUL[w[63:56]].
//  * ALPHA_INV_MUL[c] = c * z^-1 for the low byte c:
//                       z^-1 = g_0^-1 (z^7 + g_7 z^6 + ... + g_1), so
//                       alpha^-1 * w = (w >> 8) ^ ALPHA_INV_MUL[w[7:0]].
//  * t_table(i)[x]    = MDS column i times pi_(i mod 4)(x): the nonlinear
//                       function is T(w) = XOR over i of T_i[byte i of w],
//                       i.e. Kalyna SubBytes and MixColumns on one column.
// The S-boxes come from kalyna_pkg::sbox_value (see the note there).
package strumok_pkg;

  // Number of initialisation steps with the FSM output fed back.
  localparam int unsigned INIT_STEPS = 32;

  typedef logic [63:0] word_table_t [256];

  // g_0 .. g_7 of g(z) as bytes of GF(2^8)/0x11d (beta = 0x02):
  // g_0 = b^2, g_3 = b^70, g_4 = b^224, g_5 = b^2, g_6 = b^166, g_7 = b^170.
  localparam logic [7:0] G_COEF [8] = '{8'h04, 8'h00, 8'h00, 8'h5e,
                                        8'h12, 8'h04, 8'h3f, 8'hd7};

  function automatic logic [7:0] g_coef(int unsigned i);
    return G_COEF[i];
  endfunction

  function automatic word_table_t alpha_mul_table();
    word_table_t t;
    logic [63:0] e;
    for (int c = 0; c < 256; c++) begin
      for (int i = 0; i < 8; i++) e[8*i +: 8] = kalyna_pkg::gf_mul(8'(c), g_coef(i));
      t[c] = e;
    end
    return t;
  endfunction

  function automatic word_table_t alpha_inv_mul_table();
    word_table_t t;
    logic [7:0]  g0_inv, cp;
    logic [63:0] e;
    g0_inv = kalyna_pkg::gf_inv(g_coef(0));
    for (int c = 0; c < 256; c++) begin
      cp = kalyna_pkg::gf_mul(8'(c), g0_inv);
      for (int i = 0; i < 7; i++) e[8*i +: 8] = kalyna_pkg::gf_mul(cp, g_coef(i + 1));
      e[63:56] = cp;
      t[c] = e;
    end
    return t;
  endfunction

  function automatic word_table_t t_table(int unsigned col);
    word_table_t t;
    logic [7:0]  sb;
    logic [63:0] e;
    for (int x = 0; x < 256; x++) begin
      sb = kalyna_pkg::sbox_value(col % 4, 8'(x));
      // row r, column col of the circulant MDS matrix is v[(col - r) mod 8]
      for (int r = 0; r < 8; r++)
        e[8*r +: 8] = kalyna_pkg::gf_mul(kalyna_pkg::MDS_V[(col - r + 8) % 8], sb);
      t[x] = e;
    end
    return t;
  endfunction

  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,  // state held
    MODE_INIT  = 2'd1,  // FSM output XORed into the LFSR feedback
    MODE_WARM  = 2'd2,  // one plain step whose output is discarded
    MODE_GAMMA = 2'd3   // keystream generation
  } mode_e;

endpackage
