// tb_aes_top: end-to-end test of aes_top at its default parameters.  Streams
// NBLK blocks (FIPS-197 example first, then random plaintexts and keys)
// through both cores at once, compares every ciphertext with aes_ref_pkg,
// checks the block times (160 cycles for the 2-Sbox core, 216 for the 1-Sbox
// core) and counts each mechanism of the design, failing if one never
// happened: clock gating pauses of each core, the 2-Sbox core's loading
// overlapped with its last round, the 1-Sbox core lending its Sbox to the key
// expansion (Sel = 10) and its I/O phase unloading one block while loading the
// next.
module tb_aes_top;
  import aes_ref_pkg::*;
  localparam int NBLK = 6, CY2 = 160, CY1 = 216;

  logic clk_aes = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  always #5 clk_aes = ~clk_aes;

  logic       s2_start_in = 0, s1_start_in = 0;
  logic [7:0] s2_data_in = 0, s2_key_in = 0, s2_data_out, s1_data_in = 0, s1_key_in = 0, s1_data_out;
  logic       s2_in_ready, s2_out_valid, s1_in_ready, s1_out_valid;

  aes_top dut (.clk_aes(clk_aes), .rst_n(rst_n),
    .s2_start_in(s2_start_in), .s2_data_in(s2_data_in), .s2_key_in(s2_key_in),
    .s2_data_out(s2_data_out), .s2_in_ready(s2_in_ready), .s2_out_valid(s2_out_valid),
    .s1_start_in(s1_start_in), .s1_data_in(s1_data_in), .s1_key_in(s1_key_in),
    .s1_data_out(s1_data_out), .s1_in_ready(s1_in_ready), .s1_out_valid(s1_out_valid));

  logic [127:0] pt [NBLK+1], ky [NBLK+1];
  int checks = 0, failures = 0;
  // mechanism counters
  int pause2 = 0, pause1 = 0, overlap2 = 0, keysel1 = 0, swap1 = 0, done2 = 0, done1 = 0;

  // per-core bookkeeping: [0] = 2-Sbox, [1] = 1-Sbox
  int in_blk [2], in_grp [2], out_blk [2], out_grp [2], cyc [2], first_in [2], last_out [2];
  logic [127:0] got [2];

  initial begin
    for (int k = 0; k < 2; k++) begin
      in_blk[k] = 0; in_grp[k] = 0; out_blk[k] = 0; out_grp[k] = 0; cyc[k] = 0;
      first_in[k] = -1; last_out[k] = -1;
    end
    pt[0] = 128'h00112233445566778899aabbccddeeff;
    ky[0] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 1; i <= NBLK; i++) begin
      pt[i] = {$urandom, $urandom, $urandom, $urandom};
      ky[i] = {$urandom, $urandom, $urandom, $urandom};
    end
    repeat (2) @(posedge clk_aes);
    #1 rst_n = 1'b1;
    @(posedge clk_aes);
    #1 s2_start_in = 1'b1; s1_start_in = 1'b1;
  end

  // clock-gating pauses (start_in changes only while clk_aes is high)
  always @(posedge clk_aes) begin
    if (s2_start_in && cyc[0] == 250) begin
      #1 s2_start_in = 1'b0; pause2++;
      repeat (9) @(posedge clk_aes);
      #1 s2_start_in = 1'b1;
    end
  end
  always @(posedge clk_aes) begin
    if (s1_start_in && cyc[1] == 400) begin
      #1 s1_start_in = 1'b0; pause1++;
      repeat (4) @(posedge clk_aes);
      #1 s1_start_in = 1'b1;
    end
  end

  always @(negedge clk_aes) begin
    if (s2_start_in) begin
      s2_data_in <= pt[in_blk[0]][127 - 8*in_grp[0] -: 8];
      s2_key_in  <= ky[in_blk[0]][127 - 8*in_grp[0] -: 8];
    end
    if (s1_start_in) begin
      s1_data_in <= pt[in_blk[1]][127 - 8*in_grp[1] -: 8];
      s1_key_in  <= ky[in_blk[1]][127 - 8*in_grp[1] -: 8];
    end
  end

  task automatic step(int k, logic in_ready, logic out_valid, logic [7:0] dout, int blkcy);
    if (in_ready) begin
      if (first_in[k] < 0) first_in[k] = cyc[k];
      if (out_valid && in_grp[k] == 0) begin if (k == 0) overlap2++; else swap1++; end
      if (in_grp[k] == 15) begin in_grp[k] = 0; if (in_blk[k] < NBLK) in_blk[k]++; end
      else in_grp[k]++;
    end
    if (out_valid && out_blk[k] < NBLK) begin
      if (out_grp[k] == 0) begin
        checks++;
        if (cyc[k] - (out_blk[k] == 0 ? first_in[k] : last_out[k]) != blkcy) begin
          failures++;
          $display("FAIL core %0d block %0d starts at cycle %0d", k, out_blk[k], cyc[k]);
        end
        last_out[k] = cyc[k];
      end
      got[k][127 - 8*out_grp[k] -: 8] = dout;
      if (out_grp[k] == 15) begin
        checks++;
        if (got[k] !== ref_encrypt(pt[out_blk[k]], ky[out_blk[k]])) begin
          failures++;
          $display("FAIL core %0d block %0d: got %h", k, out_blk[k], got[k]);
        end
        if (out_blk[k] == 0) begin
          checks++;
          if (got[k] !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
        end
        out_grp[k] = 0;
        out_blk[k]++;
        if (k == 0) done2 = out_blk[k]; else done1 = out_blk[k];
      end else out_grp[k]++;
    end
    cyc[k]++;
  endtask

  always @(posedge clk_aes) if (rst_n) begin
    if (s2_start_in) step(0, s2_in_ready, s2_out_valid, s2_data_out, CY2);
    if (s1_start_in) begin
      if (dut.u_core1.sel == 2'b10) keysel1++;
      step(1, s1_in_ready, s1_out_valid, s1_data_out, CY1);
    end
  end

  task automatic finish_up();
    checks += 5;
    if (pause2 == 0)   begin failures++; $display("FAIL 2-Sbox core never paused"); end
    if (pause1 == 0)   begin failures++; $display("FAIL 1-Sbox core never paused"); end
    if (overlap2 == 0) begin failures++; $display("FAIL no overlapped load"); end
    if (keysel1 == 0)  begin failures++; $display("FAIL shared Sbox never used for the key"); end
    if (swap1 == 0)    begin failures++; $display("FAIL no unload/load I/O phase"); end
    $display("blocks 2-Sbox=%0d 1-Sbox=%0d pauses=%0d/%0d overlapped_loads=%0d key_sbox_cycles=%0d io_swaps=%0d",
             done2, done1, pause2, pause1, overlap2, keysel1, swap1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (NBLK * CY1 + 400) @(posedge clk_aes);
    failures++;
    $display("watchdog expired");
    finish_up();
  end

  initial begin
    @(posedge clk_aes);
    wait (done2 == NBLK && done1 == NBLK);
    finish_up();
  end
endmodule
