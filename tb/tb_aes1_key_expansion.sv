// tb_aes1_key_expansion: loads a key byte by byte, then runs the four key
// cycles of each round with the testbench acting as the shared Sbox (it
// answers sb_in with the reference Sbox), and compares the whole key
// register with the reference round key after each round.  Checks also that
// the key does not move outside the key cycles.
module tb_aes1_key_expansion;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  always #5 clk = ~clk;
  logic       load = 0, key_cyc = 0;
  logic [3:0] pos = 0, rnd = 0;
  logic [1:0] key_idx = 0;
  logic [7:0] key_in = 0, sb_in, sb_out;
  logic [7:0] key [16];
  int checks = 0, failures = 0;

  aes1_key_expansion dut (.clk(clk), .rst_n(rst_n), .load(load), .pos(pos), .key_in(key_in),
    .key_cyc(key_cyc), .key_idx(key_idx), .rnd(rnd), .sb_in(sb_in), .sb_out(sb_out), .key(key));

  assign sb_out = ref_sbox(sb_in);

  task automatic compare(logic [127:0] want, string what);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (key[i] !== want[127 - 8*i -: 8]) begin failures++; $display("FAIL %s byte %0d", what, i); end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, rk [11];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3; n++) begin
      k = n == 0 ? 128'h000102030405060708090a0b0c0d0e0f : {$urandom, $urandom, $urandom, $urandom};
      ref_keys(k, rk);
      for (int i = 0; i < 16; i++) begin
        load = 1; pos = 4'(i); key_in = k[127 - 8*i -: 8];
        @(negedge clk);
      end
      load = 0;
      compare(rk[0], "load");
      for (int j = 1; j <= 10; j++) begin
        rnd = 4'(j);
        repeat (3) @(negedge clk);   // idle (data) cycles: key must hold
        compare(rk[j-1], "hold");
        for (int m = 0; m < 4; m++) begin
          key_cyc = 1; key_idx = 2'(m);
          @(negedge clk);
        end
        key_cyc = 0;
        compare(rk[j], "round");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
