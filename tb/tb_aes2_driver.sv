// tb_aes2_driver: drives one aes_core_2sbox of width W with a stream of NBLK
// blocks (the FIPS-197 example first, then random plaintexts and keys), checks
// every ciphertext against aes_ref_pkg and checks the timing: the first
// ciphertext starts 160/(W/8) cycles after the first input cycle and each
// later one 160/(W/8) cycles after the previous one.  Optionally pauses the
// core by lowering start_in (PAUSE = 1) to exercise the clock gate.
module tb_aes2_driver
  import aes_ref_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned NBLK  = 4,
  parameter bit          PAUSE = 1'b0
) (
  input  logic clk_aes,
  output int   checks,
  output int   failures,
  output int   pauses,
  output int   overlapped_loads,
  output bit   done
);
  localparam int unsigned B     = W / 8;
  localparam int unsigned BLKCY = 160 / B;

  logic         start_in = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  logic [W-1:0] data_in = '0, key_in = '0, data_out;
  logic         in_ready, out_valid;

  aes_core_2sbox #(.W(W)) dut (
    .clk_aes(clk_aes), .start_in(start_in), .rst_n(rst_n), .data_in(data_in),
    .key_in(key_in), .data_out(data_out), .in_ready(in_ready), .out_valid(out_valid));

  logic [127:0] pt [NBLK+1], ky [NBLK+1];
  int in_blk = 0, in_grp = 0, out_blk = 0, out_grp = 0;
  int cyc = 0, first_in = -1, last_out_start = -1;
  logic [127:0] got;

  initial begin
    checks = 0; failures = 0; pauses = 0; overlapped_loads = 0; done = 0;
    pt[0] = 128'h00112233445566778899aabbccddeeff;
    ky[0] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 1; i <= NBLK; i++) begin
      pt[i] = {$urandom, $urandom, $urandom, $urandom};
      ky[i] = {$urandom, $urandom, $urandom, $urandom};
    end
    repeat (2) @(posedge clk_aes);
    #1 rst_n = 1'b1;
    @(posedge clk_aes);
    #1 start_in = 1'b1;
  end

  // pause the core for a few cycles in the middle of the second block
  always @(posedge clk_aes) begin
    if (PAUSE && start_in && cyc == BLKCY + 16 / B + 7) begin
      #1 start_in = 1'b0;
      pauses++;
      repeat (5) @(posedge clk_aes);
      #1 start_in = 1'b1;
    end
  end

  // inputs change after the falling edge; gated cycles do not count
  always @(negedge clk_aes) begin
    if (start_in) begin
      data_in <= pt[in_blk][127 - W*in_grp -: W];
      key_in  <= ky[in_blk][127 - W*in_grp -: W];
    end
  end

  always @(posedge clk_aes) if (start_in && rst_n) begin
    if (in_ready) begin
      if (first_in < 0) first_in = cyc;
      if (out_valid && in_grp == 0) overlapped_loads++;
      if (in_grp == 16 / B - 1) begin in_grp = 0; if (in_blk < NBLK) in_blk++; end
      else in_grp++;
    end
    if (out_valid && out_blk < NBLK) begin
      if (out_grp == 0) begin
        checks++;
        if (out_blk == 0 ? cyc - first_in != BLKCY : cyc - last_out_start != BLKCY) begin
          failures++;
          $display("FAIL W=%0d block %0d starts at cycle %0d (first input %0d, previous %0d)",
                   W, out_blk, cyc, first_in, last_out_start);
        end
        last_out_start = cyc;
      end
      got[127 - W*out_grp -: W] = data_out;
      if (out_grp == 16 / B - 1) begin
        checks++;
        if (got !== ref_encrypt(pt[out_blk], ky[out_blk])) begin
          failures++;
          $display("FAIL W=%0d block %0d: got %h expected %h", W, out_blk, got,
                   ref_encrypt(pt[out_blk], ky[out_blk]));
        end
        if (out_blk == 0) begin
          checks++;
          if (got !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
        end
        out_grp = 0;
        out_blk++;
        if (out_blk == NBLK) done = 1;
      end else out_grp++;
    end
    cyc++;
  end
endmodule
