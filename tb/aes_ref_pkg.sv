// aes_ref_pkg: a plain behavioural AES-128 encryption used as the reference
// by the testbenches.  The Sbox is computed from its definition (inverse by
// exponentiation to 254 in GF(2^8), then the affine map), independent of the
// composite-field circuit under test.
package aes_ref_pkg;

  function automatic logic [7:0] ref_gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 8'h01, sq = x, r;
    // x^254 = x^(2+4+8+16+32+64+128)
    for (int k = 1; k < 8; k++) begin
      sq  = ref_gmul(sq, sq);
      inv = ref_gmul(inv, sq);
    end
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  typedef logic [7:0] st_t [16];

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i];
    return b;
  endfunction

  // round keys k_0 .. k_10
  function automatic void ref_keys(logic [127:0] key, output logic [127:0] rk [11]);
    st_t k = to_st(key), n;
    logic [7:0] rc = 8'h01;
    rk[0] = key;
    for (int j = 1; j <= 10; j++) begin
      n[0] = k[0] ^ ref_sbox(k[13]) ^ rc;
      n[1] = k[1] ^ ref_sbox(k[14]);
      n[2] = k[2] ^ ref_sbox(k[15]);
      n[3] = k[3] ^ ref_sbox(k[12]);
      for (int i = 4; i < 16; i++) n[i] = k[i] ^ n[i-4];
      k = n;
      rk[j] = from_st(k);
      rc = ref_gmul(rc, 8'h02);
    end
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] rk [11];
    st_t s, t, k;
    ref_keys(key, rk);
    s = to_st(pt ^ rk[0]);
    for (int j = 1; j <= 10; j++) begin
      for (int i = 0; i < 16; i++) s[i] = ref_sbox(s[i]);
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) t[4*c+r] = s[4*((c+r)%4)+r];
      s = t;
      if (j < 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
          s[4*c]   = ref_gmul(a0, 2) ^ ref_gmul(a1, 3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ ref_gmul(a1, 2) ^ ref_gmul(a2, 3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ ref_gmul(a2, 2) ^ ref_gmul(a3, 3);
          s[4*c+3] = ref_gmul(a0, 3) ^ a1 ^ a2 ^ ref_gmul(a3, 2);
        end
      k = to_st(rk[j]);
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    return from_st(s);
  endfunction

endpackage
