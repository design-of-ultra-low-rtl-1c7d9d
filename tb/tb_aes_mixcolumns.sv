// tb_aes_mixcolumns: feeds columns to the 8-bit (n = 32, byte-serial
// collection) and the 64-bit (n = 64, two columns at once) configurations and
// compares with MixColumns written out from its matrix.  Includes the
// FIPS-197 column db 13 53 45 -> 8e 4d a1 bc.
module tb_aes_mixcolumns;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  always #5 clk = ~clk;
  logic [7:0]  d8;
  logic [31:0] col8, out8;
  logic [63:0] d64, col64, out64;
  int checks = 0, failures = 0;

  aes_mixcolumns #(.W(8),  .N(32)) u8  (.clk(clk), .rst_n(rst_n), .en(en), .din(d8),  .col(col8),  .dout(out8));
  aes_mixcolumns #(.W(64), .N(64)) u64 (.clk(clk), .rst_n(rst_n), .en(1'b1), .din(d64), .col(col64), .dout(out64));

  function automatic logic [31:0] ref_mc(logic [31:0] c);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {ref_gmul(a0, 2) ^ ref_gmul(a1, 3) ^ a2 ^ a3,
            a0 ^ ref_gmul(a1, 2) ^ ref_gmul(a2, 3) ^ a3,
            a0 ^ a1 ^ ref_gmul(a2, 2) ^ ref_gmul(a3, 3),
            ref_gmul(a0, 3) ^ a1 ^ a2 ^ ref_gmul(a3, 2)};
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] c;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      c = (t == 0) ? 32'hdb135345 : $urandom;
      // byte-serial: three bytes are stored, the fourth is presented with them
      for (int r = 0; r < 4; r++) begin
        d8 = c[31-8*r -: 8];
        en = 1'b1;
        if (r == 3) begin
          #1;
          checks++;
          if (out8 !== ref_mc(c)) begin failures++; $display("FAIL n=32 %h -> %h", c, out8); end
          if (t == 0) begin checks++; if (out8 !== 32'h8e4da1bc) failures++; end
        end
        @(negedge clk);
      end
      d64 = {c, ~c};
      #1;
      checks++;
      if (out64 !== {ref_mc(c), ref_mc(~c)}) begin failures++; $display("FAIL n=64 %h", d64); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
