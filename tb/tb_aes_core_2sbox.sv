// tb_aes_core_2sbox: runs the 2-Sbox core at the four datapath widths of the
// document's sweep (W = 8, 16, 32, 64; n = 32, 32, 32, 64) on streams of
// blocks, checking ciphertexts and the 160/80/40/20-cycle block time, and
// pausing the 8-bit core once through its start_in clock gate.
module tb_aes_core_2sbox;
  logic clk_aes = 1'b0;
  always #5 clk_aes = ~clk_aes;

  localparam int NW = 4;
  int  c [NW], f [NW], p [NW], o [NW];
  bit  d [NW];
  int  checks, failures;

  tb_aes2_driver #(.W(8),  .NBLK(4), .PAUSE(1'b1)) u8  (.clk_aes(clk_aes), .checks(c[0]), .failures(f[0]), .pauses(p[0]), .overlapped_loads(o[0]), .done(d[0]));
  tb_aes2_driver #(.W(16), .NBLK(4), .PAUSE(1'b0)) u16 (.clk_aes(clk_aes), .checks(c[1]), .failures(f[1]), .pauses(p[1]), .overlapped_loads(o[1]), .done(d[1]));
  tb_aes2_driver #(.W(32), .NBLK(4), .PAUSE(1'b0)) u32 (.clk_aes(clk_aes), .checks(c[2]), .failures(f[2]), .pauses(p[2]), .overlapped_loads(o[2]), .done(d[2]));
  tb_aes2_driver #(.W(64), .NBLK(4), .PAUSE(1'b0)) u64 (.clk_aes(clk_aes), .checks(c[3]), .failures(f[3]), .pauses(p[3]), .overlapped_loads(o[3]), .done(d[3]));

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NW; i++) begin checks += c[i]; failures += f[i]; end
    // each mechanism must have happened
    checks++; if (p[0] == 0) begin failures++; $display("FAIL no pause"); end
    for (int i = 0; i < NW; i++) begin
      checks++;
      if (o[i] == 0) begin failures++; $display("FAIL no overlapped load at width %0d", 8 << i); end
    end
    $display("pauses=%0d overlapped_loads=%0d/%0d/%0d/%0d", p[0], o[0], o[1], o[2], o[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3000) @(posedge clk_aes);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk_aes);
    wait (d[0] && d[1] && d[2] && d[3]);
    repeat (2) @(posedge clk_aes);
    report();
    $finish;
  end
endmodule
