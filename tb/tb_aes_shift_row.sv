// tb_aes_shift_row: fills a state array with random bytes and checks, for
// every epoch and position, that the selector returns physical slot
// (r, c + (ep+1)*r) with shift = 1 and (r, c + ep*r) with shift = 0, for the
// 8-bit and the 32-bit datapath.  Also checks the plain ShiftRows mapping at
// epoch 0, where logical and physical slots coincide.
module tb_aes_shift_row;
  import aes_pkg::*;
  byte_t       st [4][4];
  logic [1:0]  ep;
  logic        shift;
  logic [3:0]  pos8, pos32;
  logic [7:0]  d8;
  logic [31:0] d32;
  int checks = 0, failures = 0;

  aes_shift_row #(.W(8))  u8  (.st(st), .ep(ep), .shift(shift), .pos(pos8),  .dout(d8));
  aes_shift_row #(.W(32)) u32 (.st(st), .ep(ep), .shift(shift), .pos(pos32), .dout(d32));

  function automatic byte_t expect_byte(int p, int e, bit s);
    int r = p % 4, c = p / 4;
    return st[r][(c + (s ? e + 1 : e) * r) % 4];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) st[r][c] = 8'($urandom);
      for (int e = 0; e < 4; e++) for (int s = 0; s < 2; s++) for (int p = 0; p < 16; p++) begin
        ep = 2'(e); shift = s[0]; pos8 = 4'(p); pos32 = 4'(p & 12);
        #1;
        checks++;
        if (d8 !== expect_byte(p, e, s[0])) begin failures++; $display("FAIL W=8 p=%0d e=%0d s=%0d", p, e, s); end
        checks++;
        if (d32[31 - 8*(p%4) -: 8] !== expect_byte(p, e, s[0])) begin failures++; $display("FAIL W=32 p=%0d", p); end
      end
    end
    // epoch 0: logical (r,c) is stored at (r,c), so the read is plain ShiftRows
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) st[r][c] = 8'(16*c + r);
    ep = 2'd0; shift = 1'b1;
    for (int p = 0; p < 16; p++) begin
      pos8 = 4'(p);
      #1;
      checks++;
      if (d8 !== 8'(16*(((p/4) + (p%4)) % 4) + p%4)) begin failures++; $display("FAIL ShiftRows p=%0d", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
