// aes_sbox: AES SubBytes for one byte, computed in a composite field instead of
// a 256-entry table.
//
// The input byte is moved by a linear basis change from GF(2^8) into the tower
// field GF(((2^2)^2)^2) (constants in aes_pkg).  There the multiplicative inverse
// of a1*z + a0 is (a1*d^-1)*z + (a0+a1)*d^-1 with d = a1^2*LAMBDA + a1*a0 + a0^2,
// which needs only GF(2^4) multipliers and one GF(2^4) inversion, itself built
// the same way from GF(2^2).  The inverse basis change and the AES affine
// transform are merged into a single 8x8 bit matrix followed by XOR with 0x63.
// Each matrix row is written as the parity of the input ANDed with a mask.
// The use of a GF(2^8)/GF(2^4)/GF(2^2) tower follows the document; the tower
// constants and the matrices derived from them are this design's own.
//
// Purely combinational: out = S(in) in the same cycle.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in,
  output byte_t out
);

  // row i gives the bits of the input that are XORed into output bit i
  localparam byte_t IN_MAP  [8] = '{8'h03, 8'h34, 8'h9c, 8'h68, 8'h70, 8'h0c, 8'hde, 8'ha0};
  localparam byte_t OUT_MAP [8] = '{8'h5b, 8'h35, 8'ha9, 8'h9b, 8'hbf, 8'h74, 8'h30, 8'h2c};

  byte_t      c;        // input in the tower basis
  byte_t      ci;       // its inverse
  logic [3:0] d, di;

  always_comb begin
    for (int i = 0; i < 8; i++) c[i] = ^(in & IN_MAP[i]);
    d  = gf4_mul(gf4_mul(c[7:4], c[7:4]), LAMBDA) ^ gf4_mul(c[7:4], c[3:0])
       ^ gf4_mul(c[3:0], c[3:0]);
    di = gf4_inv(d);
    ci = {gf4_mul(c[7:4], di), gf4_mul(c[3:0] ^ c[7:4], di)};
    for (int i = 0; i < 8; i++) out[i] = ^(ci & OUT_MAP[i]) ^ (i inside {0, 1, 5, 6});
  end

endmodule
