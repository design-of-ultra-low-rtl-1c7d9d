// aes_shift_row: the ShiftRows step as a read selector on the state store.
//
// For output byte p = 4c + r the round needs logical state byte (r, c + r);
// with the epoch addressing of aes_state_reg that byte lives in physical slot
// (r, (c + (ep+1)*r) mod 4).  The unit delivers the W/8 bytes p = pos ..
// pos+W/8-1 on dout, first byte in the top bits.  With shift = 0 it reads the
// bytes in plain order (slot (r, (c + ep*r) mod 4)); the 1-Sbox core uses
// that to unload the finished block.
// The document has a separate shift-row unit; realising it as addressing of
// the state store is this design's own.  Combinational.
module aes_shift_row
  import aes_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  byte_t        st [4][4],
  input  logic [1:0]   ep,
  input  logic         shift,
  input  logic [3:0]   pos,
  output logic [W-1:0] dout
);

  localparam int unsigned B = W / 8;

  always_comb
    for (int b = 0; b < B; b++) begin
      logic [3:0] p;
      logic [1:0] r, pc;
      p  = pos + 4'(b);
      r  = p[1:0];
      pc = shift ? p[3:2] + r + 2'(ep * r) : p[3:2] + 2'(ep * r);
      dout[W-1-8*b -: 8] = st[r][pc];
    end

endmodule
