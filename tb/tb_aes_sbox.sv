// tb_aes_sbox: exhaustive check of the composite-field Sbox against the AES
// definition: multiplicative inverse in GF(2^8) (found by search over all
// bytes) followed by the affine transform with constant 0x63.
module tb_aes_sbox;
  logic [7:0] in, out;
  int checks = 0, failures = 0;

  aes_sbox dut (.in(in), .out(out));

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv = 0, r;
    for (int b = 1; b < 256; b++) if (gmul(x, 8'(b)) == 8'h01) inv = 8'(b);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      in = 8'(x);
      #1;
      checks++;
      if (out !== ref_sbox(8'(x))) begin
        failures++;
        $display("FAIL S(%02x) = %02x, expected %02x", x, out, ref_sbox(8'(x)));
      end
    end
    // a few published values
    in = 8'h00; #1; checks++; if (out !== 8'h63) failures++;
    in = 8'h53; #1; checks++; if (out !== 8'hed) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
