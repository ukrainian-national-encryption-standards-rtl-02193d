// kalyna_pkg: shared types, constants and elaboration-time tables of the
// DSTU 7624:2014 ("Kalyna") datapath.
//
// A state of NB columns is held as logic [NB-1:0][63:0]: column c is the
// 64-bit word c, and byte r of that word (bits 8r+7:8r) is row r, so byte
// w_k of the block sits at bits 8k+7:8k (little-endian, columns filled first).
//
// GF(2^8) is built on p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11d). The MDS row
// vector is v = (01 01 05 01 08 06 07 04); row r of the circulant matrix is v
// rotated right by r, so M[r][c] = v[(c - r) mod 8].
//
// S-box contents. The four substitutions pi_0..pi_3 are tables published in
// Appendix A of DSTU 7624:2014 and are not reproduced here. sbox_value()
// therefore returns a stand-in family of bijections,
//     pi_m(x) = rotl8(inv(x), m + 1) ^ SBOX_C[m],
// where inv() is the multiplicative inverse in GF(2^8)/0x11d (inv(0) = 0).
// SBOX_C[1] is chosen so that pi_1(0x11) = 0x15, the one entry of the
// standard's tables quoted as an example. To obtain the standard cipher,
// replace the body of sbox_value() with a lookup into the four published
// tables; every ROM in the design (S-boxes and Strumok T tables) is built
// from this one function.
package kalyna_pkg;

  localparam logic [7:0] MDS_V [8] = '{8'h01, 8'h01, 8'h05, 8'h01,
                                       8'h08, 8'h06, 8'h07, 8'h04};

  localparam logic [7:0] SBOX_C [4] = '{8'hA8, 8'hDC, 8'h93, 8'h68};

  // 0x0001000100010001: the tmv_0 word of the key schedule
  localparam logic [63:0] TMV0_WORD = 64'h0001_0001_0001_0001;

  // Number of rounds for a key of nk 64-bit words (128, 256, 512 bits).
  function automatic int unsigned rounds_for(int unsigned nk);
    return (nk == 2) ? 10 : (nk == 4) ? 14 : 18;
  endfunction

  // Generic GF(2^8) multiply, used only to build constant tables.
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    logic [7:0] x;
    r = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (8'h1d & {8{x[7]}});
    end
    return r;
  endfunction

  // Multiplicative inverse as x^254 (0 maps to 0).
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] r;
    logic [7:0] sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] x, int unsigned n);
    logic [7:0] r;
    r = x;
    for (int unsigned i = 0; i < n % 8; i++) r = {r[6:0], r[7]};
    return r;
  endfunction

  // pi_m(x); see the note at the top of this file.
  function automatic logic [7:0] sbox_value(int unsigned m, logic [7:0] x);
    return rotl8(gf_inv(x), m + 1) ^ SBOX_C[m];
  endfunction

  typedef logic [7:0] sbox_table_t [256];

  function automatic sbox_table_t sbox_table(int unsigned m);
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_value(m, 8'(i));
    return t;
  endfunction

  typedef enum logic {KEY_XOR = 1'b0, KEY_ADD = 1'b1} key_op_e;

endpackage
