// aes1_controller: counter-based controller of the 1-Sbox core.
//
// A round counter r_in and a cycle counter CNT.  r_in = 0 is the 16-cycle
// input/output phase (the finished block leaves while the next one enters);
// r_in = 1..10 are the AES rounds, 20 cycles each: CNT 0..15 pass the 16 state
// bytes through the shared Sbox, CNT 16..19 lend the Sbox to the key
// expansion.  Sel(1:0) follows the document's control table: 00 for data
// cycles and 10 for key cycles of rounds r_in > 0, another code (01) in the
// r_in = 0 phase.  A block takes 16 + 10*20 = 216 cycles.
// The counters, comparators and the Sel encoding follow the document; the
// round numbering (0..10 with a separate I/O phase) and the remaining control
// signals are this design's own.
//
// Outputs are combinational from the counters.  out_valid marks the I/O
// phases that carry a finished block (all but the first after reset).
module aes1_controller (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] r_in,
  output logic [3:0] pos,        // byte position (CNT 0..15)
  output logic [1:0] sel,
  output logic       io_phase,   // r_in == 0
  output logic       data_cyc,   // r_in > 0, CNT 0..15
  output logic       key_cyc,    // r_in > 0, CNT 16..19
  output logic [1:0] key_idx,    // CNT - 16
  output logic       mc_en,      // data cycle of rounds 1..9
  output logic       e2,         // write a mixed column
  output logic       e1_sbox,    // round 10: write the Sbox byte itself
  output logic       adv,        // last data cycle of a round
  output logic       in_ready,
  output logic       out_valid
);

  logic [4:0] cnt;
  logic       have_block, phase_last;

  assign phase_last = io_phase ? cnt == 5'd15 : cnt == 5'd19;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r_in       <= '0;
      cnt        <= '0;
      have_block <= 1'b0;
    end else if (phase_last) begin
      cnt  <= '0;
      r_in <= r_in == 4'd10 ? 4'd0 : r_in + 4'd1;
      if (r_in == 4'd10) have_block <= 1'b1;
    end else begin
      cnt <= cnt + 5'd1;
    end

  assign io_phase  = r_in == 4'd0;
  assign data_cyc  = !io_phase && cnt < 5'd16;
  assign key_cyc   = !io_phase && cnt >= 5'd16;
  assign key_idx   = cnt[1:0];
  assign pos       = cnt[3:0];
  assign sel       = io_phase ? 2'b01 : data_cyc ? 2'b00 : 2'b10;
  assign mc_en     = data_cyc && r_in != 4'd10;
  assign e2        = mc_en && cnt[1:0] == 2'd3;
  assign e1_sbox   = data_cyc && r_in == 4'd10;
  assign adv       = data_cyc && cnt == 5'd15;
  assign in_ready  = io_phase;
  assign out_valid = io_phase && have_block;

endmodule
