// tb_aes1_controller: runs the 1-Sbox controller over three blocks and
// compares it with a model of its schedule: a 16-cycle I/O phase (r_in = 0,
// Sel = 01), then r_in = 1..10 of 20 cycles, Sel = 00 for CNT 0..15 and 10
// for CNT 16..19, E2 every fourth data cycle in rounds 1..9, Sbox write-back
// in round 10, out_valid in every I/O phase but the first.
module tb_aes1_controller;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] r_in, pos;
  logic [1:0] sel, key_idx;
  logic io_phase, data_cyc, key_cyc, mc_en, e2, e1_sbox, adv, in_ready, out_valid;

  aes1_controller dut (.clk(clk), .rst_n(rst_n), .r_in(r_in), .pos(pos), .sel(sel),
    .io_phase(io_phase), .data_cyc(data_cyc), .key_cyc(key_cyc), .key_idx(key_idx),
    .mc_en(mc_en), .e2(e2), .e1_sbox(e1_sbox), .adv(adv), .in_ready(in_ready),
    .out_valid(out_valid));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r = 0, c = 0, blocks = 0;
    logic [16:0] want, got;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3 * 216; cyc++) begin
      #1;
      want = {4'(r), r == 0 ? 2'b01 : c < 16 ? 2'b00 : 2'b10, r == 0, r != 0 && c < 16,
              r != 0 && c >= 16, r != 0 && c < 16 && r != 10, r != 0 && c < 16 && r != 10 && c % 4 == 3,
              r == 10 && c < 16, r != 0 && c == 15, r == 0, r == 0 && blocks > 0, 2'(c)};
      got  = {r_in, sel, io_phase, data_cyc, key_cyc, mc_en, e2, e1_sbox, adv, in_ready,
              out_valid, key_idx};
      checks++;
      if (got !== want || pos !== 4'(c)) begin
        failures++;
        $display("FAIL r_in %0d cnt %0d: got %b want %b", r, c, got, want);
      end
      c++;
      if ((r == 0 && c == 16) || c == 20) begin
        c = 0;
        if (r == 10) blocks++;
        r = r == 10 ? 0 : r + 1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
