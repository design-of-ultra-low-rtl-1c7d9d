// aes_core_1sbox: 8-bit AES-128 encryption core with a single Sbox shared by
// the round datapath and the key expansion.
//
// The state store holds MixColumns results without the round key.  In a data
// cycle one byte is read in ShiftRows order, XORed with the matching byte of
// the current round key, substituted, and collected by MixColumns, which
// writes a whole column back every fourth cycle.  A multiplexer on Sel(1:0)
// feeds the Sbox from this path (00) or from the key expansion (10), and a
// demultiplexer on Sel(1) returns the result to the one that asked.  Round 10
// writes the substituted bytes back unmixed; after its key cycles have made
// k10, the I/O phase reads the block out XORed with k10 while the next block
// and key are written into the freed places.  16 + 10*20 = 216 cycles a block.
// The shared Sbox, the MUX/DEMUX with Sel and the 16 + 4 cycle rounds follow
// the document; loading the plaintext without a pass through the Sbox and the
// separate I/O phase are this design's own (see aes1_controller).
//
// Interface: clk = start_in ? clk_aes : 1.  While in_ready is 1, one byte of
// plaintext and key per cycle, byte 0 first; while out_valid is 1, one byte
// of ciphertext per cycle.  rst_n is an asynchronous active-low reset.
module aes_core_1sbox
  import aes_pkg::*;
(
  input  logic  clk_aes,
  input  logic  start_in,
  input  logic  rst_n,
  input  byte_t data_in,
  input  byte_t key_in,
  output byte_t data_out,
  output logic  in_ready,
  output logic  out_valid
);

  logic        clk;
  logic [3:0]  r_in, pos;
  logic [1:0]  sel, key_idx, ep;
  logic        io_phase, key_cyc, mc_en, e2, e1_sbox, adv;
  byte_t       st [4][4];
  byte_t       key [16];
  byte_t       rd, kbyte, sb_in, sb_out, key_sb_in;
  logic [31:0] mc_out, mc_col_unused;

  aes_clk_gate u_cg (.clk_aes(clk_aes), .start_in(start_in), .clk(clk));

  aes1_controller u_ctrl (
    .clk(clk), .rst_n(rst_n), .r_in(r_in), .pos(pos), .sel(sel), .io_phase(io_phase),
    .data_cyc(), .key_cyc(key_cyc), .key_idx(key_idx), .mc_en(mc_en), .e2(e2),
    .e1_sbox(e1_sbox), .adv(adv), .in_ready(in_ready), .out_valid(out_valid));

  aes1_key_expansion u_key (
    .clk(clk), .rst_n(rst_n), .load(io_phase), .pos(pos), .key_in(key_in),
    .key_cyc(key_cyc), .key_idx(key_idx), .rnd(r_in), .sb_in(key_sb_in),
    .sb_out(sb_out), .key(key));

  aes_state_reg #(.W(8), .N(32)) u_state (
    .clk(clk), .rst_n(rst_n),
    .e1(io_phase || e1_sbox), .e1_pos(pos), .e1_data(io_phase ? data_in : sb_out),
    .e2(e2), .e2_col(pos[3:2]), .e2_data(mc_out),
    .wofs(!io_phase), .adv(adv), .st(st), .ep(ep));

  // plain order in the I/O phase, ShiftRows order in data cycles
  aes_shift_row #(.W(8)) u_sr (.st(st), .ep(ep), .shift(!io_phase), .pos(pos), .dout(rd));

  assign kbyte = io_phase ? key[pos] : key[sr_src(pos)];

  // MUX: Sel = 00 state ^ key, 10 key expansion
  assign sb_in = sel[1] ? key_sb_in : rd ^ kbyte;

  aes_sbox u_sbox (.in(sb_in), .out(sb_out));

  // DEMUX output 0: MixColumns (output 1, the key expansion, is wired above)
  aes_mixcolumns #(.W(8), .N(32)) u_mc (
    .clk(clk), .rst_n(rst_n), .en(mc_en), .din(sb_out), .col(mc_col_unused), .dout(mc_out));

  assign data_out = rd ^ kbyte;

endmodule
