// aes_controller: counter-based controller of the 2-Sbox core.
//
// One counter CNT = {rnd, step}: the upper half is the round index (0 = input
// loading, 1..10 = AES rounds; it also feeds the key expansion for Rcon), the
// lower half the cycle within the round, 16/B cycles per round for B = W/8
// bytes per cycle.  Comparators on the two halves plus a little logic give the
// control signals.  After round 10 the counter goes to round 1, not 0: the
// next block is loaded during round 10, into the state slots the last round
// frees, so a stream of blocks costs 10 rounds = 160/B cycles per block and
// only the first block after reset pays the extra loading round.
// The counter/comparator/logic structure and the CNT split follow the
// document; the signal set and the overlapped loading are this design's own.
//
// Outputs (combinational from CNT): pos = first byte handled this cycle;
// e1 = write the input block (round 0 and 10); e2 = write MixColumns columns
// (rounds 1..9, last cycle of a column); adv = last cycle of a round;
// key_load / key_run / key_reload for the key expansion; final_rnd = round 10,
// whose Sbox output, XORed with k10, is the ciphertext (out_valid).
module aes_controller #(
  parameter int unsigned W = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] rnd,
  output logic [3:0] pos,
  output logic       e1,
  output logic       e2,
  output logic       adv,
  output logic       key_load,
  output logic       key_run,
  output logic       key_reload,
  output logic       final_rnd,
  output logic       in_ready,
  output logic       out_valid
);

  localparam int unsigned B     = W / 8;
  localparam int unsigned STEPS = 16 / B;           // cycles per round
  localparam int unsigned SW    = $clog2(STEPS) > 0 ? $clog2(STEPS) : 1;
  localparam int unsigned CPC   = B < 4 ? 4 / B : 1; // cycles per column

  logic [SW-1:0] step;
  logic          step_last, col_last, is_load, is_final;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rnd  <= '0;
      step <= '0;
    end else if (step_last) begin
      step <= '0;
      rnd  <= is_final ? 4'd1 : rnd + 4'd1;
    end else begin
      step <= step + SW'(1);
    end

  // comparators
  assign step_last = step == SW'(STEPS - 1);
  assign col_last  = CPC == 1 || (32'(step) % CPC) == CPC - 1;
  assign is_load   = rnd == 4'd0;
  assign is_final  = rnd == 4'd10;

  // logic
  assign pos        = 4'(32'(step) * B);
  assign e1         = is_load || is_final;
  assign e2         = !is_load && !is_final && col_last;
  assign adv        = step_last;
  assign key_load   = is_load;
  assign key_run    = !is_load;
  assign key_reload = is_final;
  assign final_rnd  = is_final;
  assign in_ready   = e1;
  assign out_valid  = is_final;

  // ciphertext leaves only while the next block enters (overlapped loading)
  a_out_with_in: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> in_ready)
    else $error("aes_controller: output without overlapped input");

  initial assert (B inside {1, 2, 4, 8}) else $error("aes_controller: W must be 8, 16, 32 or 64");

endmodule
