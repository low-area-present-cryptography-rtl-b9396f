// present_ref_pkg: reference model used by the testbenches.
//
// Written independently of the RTL: the S-box is a 64-bit constant read nibble by
// nibble, the P-layer and the key-word rotation are literal tables, the 80-bit key
// rotation is done with shifts, and decryption is computed from a precomputed list of
// round keys. Also models the key-mixing network of the random key generator.
package present_ref_pkg;

  // S[x] for x = 0..F, most significant nibble first
  localparam logic [63:0] S_HEX = 64'hC56B_90AD_3EF8_4712;

  localparam int P_TAB [64] = '{
     0, 16, 32, 48,  1, 17, 33, 49,  2, 18, 34, 50,  3, 19, 35, 51,
     4, 20, 36, 52,  5, 21, 37, 53,  6, 22, 38, 54,  7, 23, 39, 55,
     8, 24, 40, 56,  9, 25, 41, 57, 10, 26, 42, 58, 11, 27, 43, 59,
    12, 28, 44, 60, 13, 29, 45, 61, 14, 30, 46, 62, 15, 31, 47, 63
  };

  localparam int R_TAB [20] = '{
    14, 10,  9, 13, 16, 11,  8,  2, 17,  5, 18,  3, 15,  1, 19,  4,  7, 12,  0,  6
  };

  function automatic logic [3:0] ref_s(input logic [3:0] x);
    return S_HEX[63 - 4*int'(x) -: 4];
  endfunction

  function automatic logic [3:0] ref_si(input logic [3:0] y);
    for (int x = 0; x < 16; x++) if (ref_s(4'(x)) == y) return 4'(x);
    return 4'h0;
  endfunction

  function automatic logic [63:0] ref_slayer(input logic [63:0] d, input bit inv);
    logic [63:0] o;
    for (int n = 0; n < 16; n++) o[4*n +: 4] = inv ? ref_si(d[4*n +: 4]) : ref_s(d[4*n +: 4]);
    return o;
  endfunction

  function automatic logic [63:0] ref_player(input logic [63:0] d, input bit inv);
    logic [63:0] o;
    for (int i = 0; i < 64; i++) begin
      if (inv) o[i] = d[P_TAB[i]];
      else     o[P_TAB[i]] = d[i];
    end
    return o;
  endfunction

  function automatic logic [79:0] ref_ks1(input logic [79:0] k, input logic [4:0] rc);
    logic [79:0] r;
    r = (k << 61) | (k >> 19);
    r[79:76] = ref_s(r[79:76]);
    r[19:15] = r[19:15] ^ rc;
    return r;
  endfunction

  function automatic logic [79:0] ref_ks2(input logic [79:0] k);
    logic [79:0] r, o;
    for (int w = 0; w < 4; w++)
      for (int j = 0; j < 20; j++) r[20*w + R_TAB[j]] = k[20*w + j];
    for (int n = 0; n < 20; n++) o[4*n +: 4] = ref_s(r[4*n +: 4]);
    return o;
  endfunction

  function automatic logic [79:0] ref_next_key(input logic [79:0] k, input logic [4:0] rc,
                                               input bit s2);
    logic [79:0] t;
    t = ref_ks1(k, rc);
    return s2 ? ref_ks2(t) : t;
  endfunction

  function automatic logic [63:0] ref_encrypt(input logic [63:0] pt, input logic [79:0] key,
                                              input bit s2);
    logic [63:0] st;
    logic [79:0] k;
    st = pt;
    k  = key;
    for (int r = 1; r <= 31; r++) begin
      st = ref_player(ref_slayer(st ^ k[79:16], 0), 0);
      k  = ref_next_key(k, 5'(r), s2);
    end
    return st ^ k[79:16];
  endfunction

  function automatic logic [63:0] ref_decrypt(input logic [63:0] ct, input logic [79:0] key,
                                              input bit s2);
    logic [79:0] rk [1:32];
    logic [63:0] st;
    rk[1] = key;
    for (int r = 1; r <= 31; r++) rk[r+1] = ref_next_key(rk[r], 5'(r), s2);
    st = ct ^ rk[32][79:16];
    for (int r = 31; r >= 1; r--)
      st = ref_slayer(ref_player(st, 1), 1) ^ rk[r][79:16];
    return st;
  endfunction

  // key-mixing network: RN0 quarters T1..T4, second word quarters RN1..RN4
  function automatic logic [79:0] ref_prng(input logic [79:0] rn0, input logic [79:0] rnb,
                                           input logic [1:0] cnt);
    logic [19:0] t [1:4], q [1:4], m1, m2, x1, x2, a1, a2, a3, a4, x3, x4, m3;
    for (int i = 1; i <= 4; i++) begin
      t[i] = rn0[20*(i-1) +: 20];
      q[i] = rnb[20*(i-1) +: 20];
    end
    m1 = cnt[0] ? t[2] : t[1];
    m2 = cnt[0] ? t[4] : t[3];
    x1 = m1 ^ t[1];
    x2 = m2 ^ t[4];
    a1 = 20'(x1 + q[1]);
    a2 = 20'(m1 + q[2]);
    a3 = 20'(x2 + q[3]);
    a4 = 20'(m2 + q[4]);
    x3 = a1 ~^ a2;
    x4 = a3 ~^ a4;
    m3 = (cnt == 0) ? a1 : (cnt == 1) ? x3 : (cnt == 2) ? a4 : x4;
    return {x3, m3, x4, a4};
  endfunction

endpackage
