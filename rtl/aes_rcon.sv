// aes_rcon: AES-128 round constant for round index r_in (1..10), built from
// plain logic instead of a stored table.
//
// Rcon(j) = x^(j-1) in GF(2^8): a single set bit for rounds 1..8, then 0x1b and
// 0x36 for rounds 9 and 10, where the doubling has wrapped past x^7.  Each
// output bit is therefore a small decode of r_in.  Indices 0 and 11..15 give 0.
// The document asks for Rcon derived from r_in with simple logic; the exact
// decode is this design's own.  Combinational.
module aes_rcon
  import aes_pkg::*;
(
  input  logic [3:0] r_in,
  output byte_t      rcon
);

  always_comb begin
    rcon = '0;
    if (r_in >= 4'd1 && r_in <= 4'd8) rcon[r_in[2:0] - 3'd1] = 1'b1;
    if (r_in == 4'd9)  rcon = 8'h1b;
    if (r_in == 4'd10) rcon = 8'h36;
  end

endmodule
