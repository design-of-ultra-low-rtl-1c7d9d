// aes_state_reg: the 128-bit state store, organised as four rows of four bytes.
//
// A byte is written either from the input side (E1: w bits of data per cycle)
// or from the MixColumns unit (E2: one n-bit group of whole columns per write).
// To avoid a second 128-bit buffer, ShiftRows is folded into the addressing:
// logical byte (row r, column c) sits in physical slot (r, (c + ep*r) mod 4),
// where ep is a 2-bit epoch.  A round reads its bytes in ShiftRows order from
// the slots of epoch ep+1 (see aes_shift_row) and writes each new column into
// exactly the slots it has just read, then advances ep.  Every slot is read
// before it is overwritten, so one copy of the state suffices.
// The document gives a four-row register with E1/E2 enables fed by data_in and
// the n-bit MixColumns output; the epoch addressing is this design's own.
//
// Interface: e1 writes W bits (bytes e1_pos .. e1_pos+W/8-1); e2 writes N/32
// columns starting at column e2_col.  wofs selects the epoch used for writes:
// 1 = ep+1 (round results, and input loading in the 2-Sbox core), 0 = ep.
// adv increments ep.  All on the rising clock edge; st and ep are registers.
module aes_state_reg
  import aes_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         e1,
  input  logic [3:0]   e1_pos,
  input  logic [W-1:0] e1_data,
  input  logic         e2,
  input  logic [1:0]   e2_col,
  input  logic [N-1:0] e2_data,
  input  logic         wofs,
  input  logic         adv,
  output byte_t        st [4][4],   // [row][physical column]
  output logic [1:0]   ep
);

  localparam int unsigned B  = W / 8;
  localparam int unsigned NC = N / 32;

  logic [1:0] wep;
  assign wep = ep + 2'(wofs);

  function automatic logic [1:0] slot(logic [1:0] r, logic [1:0] c, logic [1:0] e);
    return c + 2'(e * r);
  endfunction

  // physical slot of every byte a write touches
  logic [1:0] e1_r [B], e1_c [B];
  logic [1:0] e2_c [NC][4];

  always_comb begin
    for (int b = 0; b < B; b++) begin
      logic [3:0] p;
      p       = e1_pos + 4'(b);
      e1_r[b] = p[1:0];
      e1_c[b] = slot(p[1:0], p[3:2], wep);
    end
    for (int k = 0; k < NC; k++)
      for (int r = 0; r < 4; r++)
        e2_c[k][r] = slot(2'(r), e2_col + 2'(k), wep);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= '{default: '0};
      ep <= '0;
    end else begin
      if (e1)
        for (int b = 0; b < B; b++)
          st[e1_r[b]][e1_c[b]] <= e1_data[W-1-8*b -: 8];
      if (e2)
        for (int k = 0; k < NC; k++)
          for (int r = 0; r < 4; r++)
            st[r][e2_c[k][r]] <= e2_data[N-1-32*k-8*r -: 8];
      if (adv) ep <= ep + 2'd1;
    end
  end

  // the two write paths are never used in the same cycle
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(e1 && e2))
    else $error("aes_state_reg: E1 and E2 active together");

endmodule
