// aes1_key_expansion: key schedule of the 1-Sbox core, which owns no Sbox.
//
// The 128-bit round key is held in a 16-byte register.  In the four key cycles
// at the end of round j the shared Sbox is lent to this unit: in cycle m
// (m = 0..3) it substitutes byte 12 + ((m+1) mod 4) of k_{j-1}, i.e. RotWord of
// the last key word.  Three results wait in small registers; in cycle 3 the
// whole of k_j is formed at once: w0 = k_{j-1}.w0 ^ SubWord ^ Rcon(j), then
// w_i = k_{j-1}.w_i ^ w_{i-1}.  The key stays still during data cycles, so the
// datapath may read any byte of it.  In the I/O phase the register takes
// key_in byte by byte (byte pos), after that byte of the old key was read.
// The borrowing of the Sbox for four cycles per round follows the document;
// the register organisation is this design's own.
module aes1_key_expansion
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [3:0] pos,
  input  byte_t      key_in,
  input  logic       key_cyc,
  input  logic [1:0] key_idx,
  input  logic [3:0] rnd,
  output byte_t      sb_in,
  input  byte_t      sb_out,
  output byte_t      key [16]
);

  byte_t sw [3];
  byte_t rcon;

  aes_rcon u_rcon (.r_in(rnd), .rcon(rcon));

  assign sb_in = key[4'd12 + {2'b00, key_idx + 2'd1}];

  // k_j, valid in the last key cycle (sb_out is then SubWord byte 3)
  byte_t knext [16];
  always_comb begin
    knext[0] = key[0] ^ sw[0] ^ rcon;
    knext[1] = key[1] ^ sw[1];
    knext[2] = key[2] ^ sw[2];
    knext[3] = key[3] ^ sb_out;
    for (int i = 4; i < 16; i++) knext[i] = key[i] ^ knext[i-4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key <= '{default: '0};
      sw  <= '{default: '0};
    end else if (load) begin
      key[pos] <= key_in;
    end else if (key_cyc) begin
      if (key_idx != 2'd3) sw[key_idx] <= sb_out;
      else                 key <= knext;
    end
  end

endmodule
