// tb_aes_core_1sbox: streams blocks (FIPS-197 example, then random) through
// the 1-Sbox core, checks each ciphertext against aes_ref_pkg, checks that
// blocks leave 216 cycles apart and that Sel(1:0) takes the codes 00 / 10 /
// 01 in the cycles the control table assigns them, and pauses the core once
// through start_in.
module tb_aes_core_1sbox;
  import aes_ref_pkg::*;
  localparam int NBLK = 4, BLKCY = 216;

  logic clk_aes = 1'b0;
  always #5 clk_aes = ~clk_aes;

  logic  start_in = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  logic [7:0] data_in = '0, key_in = '0, data_out;
  logic  in_ready, out_valid;
  int    checks = 0, failures = 0, pauses = 0, key_cycles = 0, data_cycles = 0;

  aes_core_1sbox dut (.clk_aes(clk_aes), .start_in(start_in), .rst_n(rst_n),
    .data_in(data_in), .key_in(key_in), .data_out(data_out),
    .in_ready(in_ready), .out_valid(out_valid));

  logic [127:0] pt [NBLK+1], ky [NBLK+1], got;
  int in_blk = 0, in_grp = 0, out_blk = 0, out_grp = 0, cyc = 0, first_in = -1, last_out = -1;
  int phase_cyc = 0;   // cycles since the last I/O phase began, from the outside
  bit seen_io = 0;

  initial begin
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

  always @(posedge clk_aes)
    if (start_in && cyc == 300) begin
      #1 start_in = 1'b0;
      pauses++;
      repeat (7) @(posedge clk_aes);
      #1 start_in = 1'b1;
    end

  always @(negedge clk_aes) if (start_in) begin
    data_in <= pt[in_blk][127 - 8*in_grp -: 8];
    key_in  <= ky[in_blk][127 - 8*in_grp -: 8];
  end

  always @(posedge clk_aes) if (start_in && rst_n) begin
    // Sel against the control table: cycles 16..35 of the phase pattern
    // 16 (I/O) + 10 x (16 data + 4 key)
    if (in_ready) begin
      checks++;
      if (dut.sel == 2'b00 || dut.sel == 2'b10) failures++;
      phase_cyc = in_grp; seen_io = 1;
    end else if (seen_io) begin
      int k;
      k = (phase_cyc - 16) % 20;
      checks++;
      if (dut.sel !== (k < 16 ? 2'b00 : 2'b10)) begin
        failures++;
        $display("FAIL sel=%b at phase cycle %0d", dut.sel, phase_cyc);
      end
      if (k < 16) data_cycles++; else key_cycles++;
    end
    phase_cyc++;
    if (in_ready) begin
      if (first_in < 0) first_in = cyc;
      if (in_grp == 15) begin in_grp = 0; if (in_blk < NBLK) in_blk++; end
      else in_grp++;
    end
    if (out_valid && out_blk < NBLK) begin
      if (out_grp == 0) begin
        checks++;
        if (cyc - (out_blk == 0 ? first_in : last_out) != BLKCY) begin
          failures++;
          $display("FAIL block %0d starts at %0d (first in %0d, prev %0d)", out_blk, cyc, first_in, last_out);
        end
        last_out = cyc;
      end
      got[127 - 8*out_grp -: 8] = data_out;
      if (out_grp == 15) begin
        checks++;
        if (got !== ref_encrypt(pt[out_blk], ky[out_blk])) begin
          failures++;
          $display("FAIL block %0d got %h expected %h", out_blk, got, ref_encrypt(pt[out_blk], ky[out_blk]));
        end
        if (out_blk == 0) begin checks++; if (got !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++; end
        out_grp = 0; out_blk++;
      end else out_grp++;
    end
    cyc++;
  end

  initial begin
    repeat (1500) @(posedge clk_aes);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (out_blk == NBLK);
    checks += 3;
    if (pauses == 0) failures++;
    if (key_cycles == 0) failures++;
    if (data_cycles == 0) failures++;
    $display("pauses=%0d data_cycles=%0d key_cycles=%0d", pauses, data_cycles, key_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
