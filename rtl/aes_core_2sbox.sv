// aes_core_2sbox: AES-128 encryption core with a W-bit datapath and two kinds
// of Sbox: W/8 in the round datapath and min(W/8, 4) in the key expansion
// (one and one in the 8-bit silicon configuration).
//
// Data flow per cycle, W/8 bytes at a time:
//   state store --ShiftRows read--> Sbox --> MixColumns (n-bit) --XOR k_j--> state store
// AddRoundKey is applied when a column is written back, so the store always
// holds the state after AddRoundKey.  Loading writes data_in ^ key_in (k0).
// In round 10 the Sbox output XOR k10 is the ciphertext, and the next block is
// loaded into the slots that round frees.  One block therefore takes 10 rounds
// of 16/(W/8) cycles: 160 cycles at W = 8, 80/40/20 at W = 16/32/64, plus one
// loading round for the first block after reset.
// The block set (key expansion, shift-row, Sbox, MixColumns, shift register,
// counter controller, start_in clock gate) and W/N follow the document; the
// position of the AddRoundKey XOR (at write-back rather than before
// shift-row), the overlapped loading and the handshake are this design's own.
//
// Interface: all logic runs on clk = start_in ? clk_aes : 1.  While in_ready
// is 1 the core takes W bits of plaintext and key per cycle, first bytes in
// the top bits (16/(W/8) consecutive cycles).  While out_valid is 1 it
// presents W bits of ciphertext per cycle in the same order.  rst_n is an
// asynchronous active-low reset.  Lowering start_in pauses the core.
module aes_core_2sbox
  import aes_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned N = W > 32 ? W : 32
) (
  input  logic         clk_aes,
  input  logic         start_in,
  input  logic         rst_n,
  input  logic [W-1:0] data_in,
  input  logic [W-1:0] key_in,
  output logic [W-1:0] data_out,
  output logic         in_ready,
  output logic         out_valid
);

  localparam int unsigned B = W / 8;

  logic         clk;
  logic [3:0]   rnd, pos;
  logic         e1, e2, adv, key_load, key_run, key_reload, final_rnd;
  byte_t        st [4][4];
  logic [1:0]   ep;
  logic [W-1:0] sr_out, sb_out, key_out;
  logic [N-1:0] kcol, mc_out, mc_in_unused;

  aes_clk_gate u_cg (.clk_aes(clk_aes), .start_in(start_in), .clk(clk));

  aes_controller #(.W(W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .rnd(rnd), .pos(pos), .e1(e1), .e2(e2), .adv(adv),
    .key_load(key_load), .key_run(key_run), .key_reload(key_reload),
    .final_rnd(final_rnd), .in_ready(in_ready), .out_valid(out_valid));

  aes_key_expansion #(.W(W), .N(N)) u_key (
    .clk(clk), .rst_n(rst_n), .load(key_load), .run(key_run), .reload(key_reload),
    .rnd(rnd), .pos(pos), .key_in(key_in), .key_out(key_out), .kcol(kcol));

  aes_state_reg #(.W(W), .N(N)) u_state (
    .clk(clk), .rst_n(rst_n),
    .e1(e1), .e1_pos(pos), .e1_data(data_in ^ key_in),
    .e2(e2), .e2_col(pos[3:2]), .e2_data(mc_out ^ kcol),
    .wofs(1'b1), .adv(adv), .st(st), .ep(ep));

  aes_shift_row #(.W(W)) u_sr (.st(st), .ep(ep), .shift(1'b1), .pos(pos), .dout(sr_out));

  for (genvar b = 0; b < B; b++) begin : g_sbox
    aes_sbox u_sbox (.in(sr_out[W-1-8*b -: 8]), .out(sb_out[W-1-8*b -: 8]));
  end

  aes_mixcolumns #(.W(W), .N(N)) u_mc (
    .clk(clk), .rst_n(rst_n), .en(!final_rnd), .din(sb_out), .col(mc_in_unused), .dout(mc_out));

  assign data_out = sb_out ^ key_out;

endmodule
