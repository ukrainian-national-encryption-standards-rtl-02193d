// kalyna_ref_pkg: behavioural reference models used by the testbenches.
//
// Written byte by byte from the cipher descriptions, independently of the
// RTL structure: GF(2^8) products by long division, the MDS matrix typed out
// row by row, ShiftRows by its index formula, the key schedule and
// encryption as straight-line loops, and the Strumok generator with the
// alpha multiplications done as polynomial arithmetic over GF(2^8). Only the
// S-box contents (kalyna_pkg::sbox_value) are shared with the RTL.
// A state of up to 512 bits is a logic [511:0] whose byte 8c+r is row r of
// column c.
package kalyna_ref_pkg;

  typedef logic [511:0] st_t;

  localparam logic [7:0] MDS [8][8] = '{
    '{8'h01, 8'h01, 8'h05, 8'h01, 8'h08, 8'h06, 8'h07, 8'h04},
    '{8'h04, 8'h01, 8'h01, 8'h05, 8'h01, 8'h08, 8'h06, 8'h07},
    '{8'h07, 8'h04, 8'h01, 8'h01, 8'h05, 8'h01, 8'h08, 8'h06},
    '{8'h06, 8'h07, 8'h04, 8'h01, 8'h01, 8'h05, 8'h01, 8'h08},
    '{8'h08, 8'h06, 8'h07, 8'h04, 8'h01, 8'h01, 8'h05, 8'h01},
    '{8'h01, 8'h08, 8'h06, 8'h07, 8'h04, 8'h01, 8'h01, 8'h05},
    '{8'h05, 8'h01, 8'h08, 8'h06, 8'h07, 8'h04, 8'h01, 8'h01},
    '{8'h01, 8'h05, 8'h01, 8'h08, 8'h06, 8'h07, 8'h04, 8'h01}};

  // carry-less product, then reduction by 0x11d from the top bit down
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11d) << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] gpow2(int unsigned k);
    logic [7:0] r = 8'h01;
    for (int unsigned i = 0; i < k; i++) r = gmul(r, 8'h02);
    return r;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    for (int b = 1; b < 256; b++) if (gmul(a, 8'(b)) == 8'h01) return 8'(b);
    return 8'h00;
  endfunction

  function automatic logic [7:0] getb(st_t s, int r, int c);
    return s[8*(8*c + r) +: 8];
  endfunction

  function automatic st_t sub_ref(st_t s, int nb);
    st_t o = '0;
    for (int c = 0; c < nb; c++)
      for (int r = 0; r < 8; r++)
        o[8*(8*c + r) +: 8] = kalyna_pkg::sbox_value(r % 4, getb(s, r, c));
    return o;
  endfunction

  function automatic st_t shift_ref(st_t s, int nb);
    st_t o = '0;
    for (int r = 0; r < 8; r++) begin
      int sh = (r * nb * 64) / 512;
      for (int c = 0; c < nb; c++)
        o[8*(8*((c + sh) % nb) + r) +: 8] = getb(s, r, c);
    end
    return o;
  endfunction

  function automatic st_t mix_ref(st_t s, int nb);
    st_t o = '0;
    for (int c = 0; c < nb; c++)
      for (int r = 0; r < 8; r++) begin
        logic [7:0] acc = '0;
        for (int b = 0; b < 8; b++) acc ^= gmul(MDS[r][b], getb(s, b, c));
        o[8*(8*c + r) +: 8] = acc;
      end
    return o;
  endfunction

  function automatic st_t round_ref(st_t s, int nb);
    return mix_ref(shift_ref(sub_ref(s, nb), nb), nb);
  endfunction

  function automatic st_t add_ref(st_t a, st_t b, int nb);
    st_t o = '0;
    for (int c = 0; c < nb; c++) o[64*c +: 64] = a[64*c +: 64] + b[64*c +: 64];
    return o;
  endfunction

  function automatic int nr_of(int nb);
    return (nb == 2) ? 10 : (nb == 4) ? 14 : 18;
  endfunction

  typedef st_t rk_t [19];

  // Round keys K_0..K_nr for a block of nb words and a key of nk words
  // (nk = nb or 2*nb); the rounds follow the key size.
  function automatic rk_t keys_ref2(st_t key, int nb, int nk);
    rk_t  rk;
    st_t  s, kt, tmv, ktr, kd, ka, kb, slice;
    int   nr = nr_of(nk);
    int   e;
    for (int i = 0; i < 19; i++) rk[i] = '0;
    ka = '0; kb = '0;
    for (int c = 0; c < nb; c++) begin
      ka[64*c +: 64] = key[64*c +: 64];
      kb[64*c +: 64] = key[64*(c + nk - nb) +: 64];
    end
    s = '0;
    s[63:0] = 64'(nb + nk + 1);
    s  = round_ref(add_ref(s, ka, nb), nb);
    s  = round_ref(s ^ kb, nb);
    kt = round_ref(add_ref(s, ka, nb), nb);
    tmv = '0;
    for (int c = 0; c < nb; c++) tmv[64*c +: 64] = 64'h0001000100010001;
    kd = key;
    e  = 0;
    while (e <= nr) begin
      for (int half = 0; half < nk / nb && e <= nr; half++) begin
        slice = '0;
        for (int c = 0; c < nb; c++) slice[64*c +: 64] = kd[64*(c + half * nb) +: 64];
        ktr = add_ref(kt, tmv, nb);
        s = round_ref(add_ref(slice, ktr, nb), nb);
        s = round_ref(s ^ ktr, nb);
        rk[e] = add_ref(s, ktr, nb);
        for (int c = 0; c < nb; c++) tmv[64*c +: 64] = tmv[64*c +: 64] << 1;
        e += 2;
      end
      begin
        st_t rot = '0;
        for (int c = 0; c < nk; c++) rot[64*c +: 64] = kd[64*((c + 1) % nk) +: 64];
        kd = rot;
      end
    end
    for (int o = 1; o < nr; o += 2) begin
      int n = 8 * nb;
      for (int i = 0; i < n; i++) rk[o][8*i +: 8] = rk[o-1][8*((i + 2*nb + 3) % n) +: 8];
    end
    return rk;
  endfunction

  function automatic rk_t keys_ref(st_t key, int nb);
    return keys_ref2(key, nb, nb);
  endfunction

  function automatic st_t encrypt_ref2(st_t p, rk_t rk, int nb, int nr);
    st_t s;
    s = add_ref(p, rk[0], nb);
    for (int i = 1; i < nr; i++) s = round_ref(s, nb) ^ rk[i];
    return add_ref(round_ref(s, nb), rk[nr], nb);
  endfunction

  function automatic st_t encrypt_ref(st_t p, rk_t rk, int nb);
    return encrypt_ref2(p, rk, nb, nr_of(nb));
  endfunction

  // ---------------- Strumok -------------------------------------------------
  function automatic logic [7:0] gcoef(int i);
    case (i)
      0: return gpow2(2);   3: return gpow2(70);  4: return gpow2(224);
      5: return gpow2(2);   6: return gpow2(166); 7: return gpow2(170);
      default: return 8'h00;
    endcase
  endfunction

  // w * z mod g(z), coefficient i in byte i
  function automatic logic [63:0] mulz(logic [63:0] w);
    logic [63:0] o;
    logic [7:0]  top = w[63:56];
    o = '0;
    for (int i = 7; i >= 1; i--) o[8*i +: 8] = w[8*(i-1) +: 8];
    for (int i = 0; i < 8; i++) o[8*i +: 8] ^= gmul(top, gcoef(i));
    return o;
  endfunction

  // v with v * z = w, solved coefficient by coefficient
  function automatic logic [63:0] divz(logic [63:0] w);
    logic [63:0] v;
    logic [7:0]  v7;
    v7 = gmul(w[7:0], ginv(gcoef(0)));
    v = '0;
    v[63:56] = v7;
    for (int i = 1; i < 8; i++) v[8*(i-1) +: 8] = w[8*i +: 8] ^ gmul(v7, gcoef(i));
    return v;
  endfunction

  function automatic logic [63:0] t_ref(logic [63:0] w);
    st_t s = '0;
    s[63:0] = w;
    s = mix_ref(sub_ref(s, 1), 1);
    return s[63:0];
  endfunction

  typedef struct {
    logic [63:0] s [16];
    logic [63:0] r1, r2;
  } strumok_state_t;

  // One step; returns the keystream word of the step.
  function automatic logic [63:0] strumok_step(ref strumok_state_t st, input bit init);
    logic [63:0] fo, fb, z, r1n, r2n;
    fo  = (st.s[15] + st.r1) ^ st.r2;
    z   = fo ^ st.s[0];
    fb  = mulz(st.s[0]) ^ divz(st.s[11]) ^ st.s[13];
    if (init) fb ^= fo;
    r1n = st.r2 + st.s[13];
    r2n = t_ref(st.r1);
    for (int i = 0; i < 15; i++) st.s[i] = st.s[i+1];
    st.s[15] = fb;
    st.r1 = r1n;
    st.r2 = r2n;
    return z;
  endfunction

endpackage
