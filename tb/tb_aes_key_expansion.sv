// tb_aes_key_expansion: loads random keys into the 2-Sbox key expansion at
// W = 8 and W = 64 and steps it through rounds 1..10 as the controller would.
// Every key byte on key_out and every key column on kcol (at column ends) is
// compared with the round keys of aes_ref_pkg.  In round 10 a new key is
// reloaded and its round 1 is checked as well.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // W = 8
  logic        load8 = 0, run8 = 0, reload8 = 0;
  logic [3:0]  rnd8 = 0, pos8 = 0;
  logic [7:0]  kin8 = 0, kout8;
  logic [31:0] kcol8;
  aes_key_expansion #(.W(8), .N(32)) u8 (.clk(clk), .rst_n(rst_n), .load(load8), .run(run8),
    .reload(reload8), .rnd(rnd8), .pos(pos8), .key_in(kin8), .key_out(kout8), .kcol(kcol8));
  // W = 64
  logic        load64 = 0, run64 = 0, reload64 = 0;
  logic [3:0]  rnd64 = 0, pos64 = 0;
  logic [63:0] kin64 = 0, kout64, kcol64;
  aes_key_expansion #(.W(64), .N(64)) u64 (.clk(clk), .rst_n(rst_n), .load(load64), .run(run64),
    .reload(reload64), .rnd(rnd64), .pos(pos64), .key_in(kin64), .key_out(kout64), .kcol(kcol64));

  logic [127:0] key [3], rk [3][11];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3; k++) begin
      key[k] = k == 0 ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      ref_keys(key[k], rk[k]);
    end
    // FIPS-197 Appendix A.1: last round key of the example key
    checks++;
    if (rk[0][10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 2; k++) begin
      for (int j = (k == 0 ? 0 : 1); j <= 10; j++) begin
        for (int t = 0; t < 16; t++) begin
          load8 = j == 0; run8 = j != 0; reload8 = j == 10; rnd8 = 4'(j); pos8 = 4'(t);
          kin8 = key[j == 10 ? k + 1 : k][127 - 8*t -: 8];
          if (t < 2) begin
            load64 = j == 0; run64 = j != 0; reload64 = j == 10; rnd64 = 4'(j); pos64 = 4'(8*t);
            kin64 = key[j == 10 ? k + 1 : k][127 - 64*t -: 64];
          end else begin
            load64 = 0; run64 = 0; reload64 = 0;
          end
          #1;
          checks++;
          if (kout8 !== rk[k][j][127 - 8*t -: 8]) begin
            failures++; $display("FAIL W=8 key %0d round %0d byte %0d: %02x", k, j, t, kout8);
          end
          if (j > 0 && t % 4 == 3) begin
            checks++;
            if (kcol8 !== rk[k][j][127 - 32*(t/4) -: 32]) begin failures++; $display("FAIL W=8 kcol"); end
          end
          if (t < 2) begin
            checks++;
            if (kout64 !== rk[k][j][127 - 64*t -: 64] || (j > 0 && kcol64 !== kout64)) begin
              failures++; $display("FAIL W=64 key %0d round %0d half %0d: %h", k, j, t, kout64);
            end
          end
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
