// tb_aes_controller: runs the 2-Sbox controller (W = 8 and W = 32) for three
// blocks and compares every output with a model of the intended schedule:
// one loading round, then rounds 1..10 of 16/B cycles, round 10 followed by
// round 1, E2 on the last cycle of each column in rounds 1..9, E1 in rounds 0
// and 10.
module tb_aes_controller;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] rnd8, pos8, rnd32, pos32;
  logic e1_8, e2_8, adv8, kl8, kr8, krl8, fin8, ir8, ov8;
  logic e1_32, e2_32, adv32, kl32, kr32, krl32, fin32, ir32, ov32;

  aes_controller #(.W(8)) u8 (.clk(clk), .rst_n(rst_n), .rnd(rnd8), .pos(pos8), .e1(e1_8),
    .e2(e2_8), .adv(adv8), .key_load(kl8), .key_run(kr8), .key_reload(krl8),
    .final_rnd(fin8), .in_ready(ir8), .out_valid(ov8));
  aes_controller #(.W(32)) u32 (.clk(clk), .rst_n(rst_n), .rnd(rnd32), .pos(pos32), .e1(e1_32),
    .e2(e2_32), .adv(adv32), .key_load(kl32), .key_run(kr32), .key_reload(krl32),
    .final_rnd(fin32), .in_ready(ir32), .out_valid(ov32));

  task automatic expect_ctrl(int b, int r, int s, logic [3:0] rnd, logic [3:0] pos, logic e1,
                             logic e2, logic adv, logic kl, logic kr, logic krl, logic ov);
    int steps = 16 / b;
    logic [12:0] want, got;
    want = {4'(r), 4'(s * b), r == 0 || r == 10, r >= 1 && r <= 9 && ((s * b) % 4 == 4 - b || b >= 4),
            s == steps - 1, r == 0, r != 0, r == 10, r == 10};
    got  = {rnd, pos, e1, e2, adv, kl, kr, krl, ov};
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL B=%0d round %0d step %0d: got %b want %b", b, r, s, got, want);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r8 = 0, s8 = 0, r32 = 0, s32 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3 * 160 + 16; cyc++) begin
      #1;
      expect_ctrl(1, r8, s8, rnd8, pos8, e1_8, e2_8, adv8, kl8, kr8, krl8, ov8);
      expect_ctrl(4, r32, s32, rnd32, pos32, e1_32, e2_32, adv32, kl32, kr32, krl32, ov32);
      if (++s8 == 16) begin s8 = 0; r8 = r8 == 10 ? 1 : r8 + 1; end
      if (++s32 == 4) begin s32 = 0; r32 = r32 == 10 ? 1 : r32 + 1; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
