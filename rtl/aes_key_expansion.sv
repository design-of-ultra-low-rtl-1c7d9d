// aes_key_expansion: on-the-fly AES-128 key schedule of the 2-Sbox core.
//
// The 16-byte round-key register is updated in place, W/8 bytes per cycle, in
// the same byte order as the datapath, so round j produces key k_j while it
// uses it.  Byte i of k_j is
//   k_j[i] = k_{j-1}[i] ^ S(k_{j-1}[12 + (i+1) mod 4]) ^ (i == 0 ? Rcon(j) : 0)  for i < 4
//   k_j[i] = k_{j-1}[i] ^ k_j[i-4]                                               for i >= 4
// The bytes 12..15 of k_{j-1} are still in the register when bytes 0..3 are
// made, and k_j[i-4] is kept in a 4-byte register (last) indexed by i mod 4,
// or taken from the same cycle when W = 64.  The key Sboxes (min(W/8, 4) of
// them, one for the 8-bit core) work only in the first 4 byte positions.
// The document gives the parts (key registers, Rcon, XOR, Sbox); the byte-
// serial schedule is this design's own.
//
// Controls: load stores key_in (the round-0 cycles); run computes k_j for round
// rnd; with reload as well (the last round) the register takes key_in of the
// next block instead of k_j, while key_out still shows k_j.
// Outputs: key_out = this cycle's key bytes (key_in while loading); kcol = the
// key column(s) matching the MixColumns output of this cycle.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         run,
  input  logic         reload,
  input  logic [3:0]   rnd,
  input  logic [3:0]   pos,
  input  logic [W-1:0] key_in,
  output logic [W-1:0] key_out,
  output logic [N-1:0] kcol
);

  localparam int unsigned B  = W / 8;
  localparam int unsigned KS = B < 4 ? B : 4;

  byte_t kr   [16];
  byte_t last [4];
  byte_t knew [B];
  byte_t sb_in  [KS];
  byte_t sb_out [KS];
  byte_t rcon;

  aes_rcon u_rcon (.r_in(rnd), .rcon(rcon));

  for (genvar s = 0; s < KS; s++) begin : g_sbox
    aes_sbox u_sbox (.in(sb_in[s]), .out(sb_out[s]));
  end

  always_comb
    for (int s = 0; s < KS; s++) begin
      logic [3:0] src;
      src      = 4'd12 + 4'((pos + 4'(s) + 4'd1) & 4'd3);
      sb_in[s] = kr[src];
    end

  // one byte of k_j per lane; lane b >= 4 (W = 64 only) chains on lane b-4
  logic [3:0] lane_i [B];   // key byte index handled by each lane

  for (genvar b = 0; b < B; b++) begin : g_lane
    logic [3:0] i;
    byte_t      t;
    assign i = pos + 4'(b);
    assign lane_i[b] = i;
    if (b >= 4) begin : g_chain
      assign t = knew[b-4];
    end else begin : g_first
      assign t = i < 4'd4 ? sb_out[b % KS] ^ (i == 4'd0 ? rcon : 8'h00) : last[i[1:0]];
    end
    assign knew[b] = kr[i] ^ t;
  end

  always_comb
    for (int b = 0; b < B; b++)
      key_out[W-1-8*b -: 8] = load ? key_in[W-1-8*b -: 8] : knew[b];

  if (B < 4) begin : g_kcol_narrow
    always_comb
      for (int r = 0; r < 4; r++) begin
        logic [3:0] idx;
        idx = {pos[3:2], 2'(r)};
        kcol[31-8*r -: 8] = last[r];
        for (int b = 0; b < B; b++)
          if (idx == pos + 4'(b)) kcol[31-8*r -: 8] = knew[b];
      end
  end else begin : g_kcol_wide
    assign kcol = key_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kr   <= '{default: '0};
      last <= '{default: '0};
    end else if (load || run) begin
      for (int b = 0; b < B; b++) begin
        kr[lane_i[b]]        <= (load || reload) ? key_in[W-1-8*b -: 8] : knew[b];
        last[lane_i[b][1:0]] <= knew[b];
      end
    end
  end

endmodule
