// tb_aes_state_reg: writes random blocks through E1 (byte at a time, W = 8)
// and columns through E2 (N = 32), with both write-epoch settings and epoch
// advances, and checks that logical byte (r, c) lands in physical slot
// (r, (c + e*r) mod 4) for the epoch e the write used, and that other slots
// keep their contents.
module tb_aes_state_reg;
  import aes_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  always #5 clk = ~clk;
  logic        e1 = 0, e2 = 0, wofs = 0, adv = 0;
  logic [3:0]  e1_pos = 0;
  logic [1:0]  e2_col = 0, ep;
  logic [7:0]  e1_data = 0;
  logic [31:0] e2_data = 0;
  byte_t       st [4][4];
  byte_t       model [4][4];
  int checks = 0, failures = 0, advances = 0;

  aes_state_reg #(.W(8), .N(32)) dut (.clk(clk), .rst_n(rst_n), .e1(e1), .e1_pos(e1_pos),
    .e1_data(e1_data), .e2(e2), .e2_col(e2_col), .e2_data(e2_data), .wofs(wofs),
    .adv(adv), .st(st), .ep(ep));

  int mep = 0;   // model epoch

  task automatic compare(string what);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
      checks++;
      if (st[r][c] !== model[r][c]) begin
        failures++;
        $display("FAIL %s slot (%0d,%0d) = %02x expected %02x", what, r, c, st[r][c], model[r][c]);
      end
    end
    checks++;
    if (ep !== 2'(mep)) begin failures++; $display("FAIL %s epoch", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      int we;
      wofs = t[0];
      we   = (mep + (wofs ? 1 : 0)) % 4;
      // E1: 16 bytes
      for (int p = 0; p < 16; p++) begin
        e1 = 1; e1_pos = 4'(p); e1_data = 8'($urandom);
        model[p%4][(p/4 + we*(p%4)) % 4] = e1_data;
        @(negedge clk);
      end
      e1 = 0;
      compare("E1");
      // E2: 4 columns
      for (int c = 0; c < 4; c++) begin
        e2 = 1; e2_col = 2'(c); e2_data = $urandom;
        for (int r = 0; r < 4; r++) model[r][(c + we*r) % 4] = e2_data[31-8*r -: 8];
        @(negedge clk);
      end
      e2 = 0;
      compare("E2");
      adv = 1; @(negedge clk); adv = 0; mep = (mep + 1) % 4; advances++;
      compare("adv");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
