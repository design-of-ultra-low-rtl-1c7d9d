// aes_pkg: types and arithmetic shared by the AES-128 encryption cores.
//
// State bytes are numbered p = 4*c + r (column c, row r), which is the order in
// which AES reads a 128-bit block: byte 0 is bits [127:120] of the block.  A w-bit
// bus carries bytes in that order, the lowest-numbered byte in its top bits.
// The finite-field helpers implement the tower GF(2^2) -> GF(2^4) -> GF(2^8)
// used by the composite-field Sbox:
//   GF(2^2): x^2 = x + 1
//   GF(2^4): y^2 = y + PHI,    PHI    = 2'b10
//   GF(2^8): z^2 = z + LAMBDA, LAMBDA = 4'b1000
// The choice of these constants is this design's own; any irreducible set works
// once the basis-change matrices in aes_sbox match it.
package aes_pkg;

  typedef logic [7:0] byte_t;
  typedef logic [31:0] word_t;

  localparam logic [1:0]  PHI         = 2'b10;
  localparam logic [3:0]  LAMBDA      = 4'b1000;

  // ---- GF(2^8) with the AES polynomial x^8+x^4+x^3+x+1 (MixColumns) ----
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // MixColumns of one column, row 0 in bits [31:24]
  function automatic word_t mix_column(word_t col);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return { xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
             a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
             a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
             xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3) };
  endfunction

  // ---- tower field arithmetic ----
  function automatic logic [1:0] gf2_mul(logic [1:0] a, logic [1:0] b);
    logic h;
    h = a[1] & b[1];
    return {(a[1] & b[0]) ^ (a[0] & b[1]) ^ h, (a[0] & b[0]) ^ h};
  endfunction

  // in GF(2^2) the inverse is the square
  function automatic logic [1:0] gf2_inv(logic [1:0] a);
    return {a[1], a[1] ^ a[0]};
  endfunction

  function automatic logic [3:0] gf4_mul(logic [3:0] a, logic [3:0] b);
    logic [1:0] h;
    h = gf2_mul(a[3:2], b[3:2]);
    return {gf2_mul(a[3:2], b[1:0]) ^ gf2_mul(a[1:0], b[3:2]) ^ h,
            gf2_mul(a[1:0], b[1:0]) ^ gf2_mul(h, PHI)};
  endfunction

  // (a1*y + a0)^-1 = (a1*d^-1)*y + (a0+a1)*d^-1,  d = a1^2*PHI + a1*a0 + a0^2
  function automatic logic [3:0] gf4_inv(logic [3:0] a);
    logic [1:0] d, di;
    d  = gf2_mul(gf2_mul(a[3:2], a[3:2]), PHI) ^ gf2_mul(a[3:2], a[1:0])
       ^ gf2_mul(a[1:0], a[1:0]);
    di = gf2_inv(d);
    return {gf2_mul(a[3:2], di), gf2_mul(a[1:0] ^ a[3:2], di)};
  endfunction

  // ShiftRows: output byte p = 4c + r is taken from input byte 4*((c+r) mod 4) + r
  function automatic logic [3:0] sr_src(logic [3:0] p);
    return {p[3:2] + p[1:0], p[1:0]};
  endfunction

  // byte p of a 128-bit block
  function automatic byte_t blk_byte(logic [127:0] blk, int unsigned p);
    return blk[127 - 8*p -: 8];
  endfunction

endpackage
