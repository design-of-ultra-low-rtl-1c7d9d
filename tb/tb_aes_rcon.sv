// tb_aes_rcon: compares the round-constant logic for every 4-bit index with
// repeated doubling in GF(2^8) starting from 1 (indices 1..10), 0 elsewhere.
module tb_aes_rcon;
  import aes_ref_pkg::*;
  logic [3:0] r_in;
  logic [7:0] rcon, expv;
  int checks = 0, failures = 0;

  aes_rcon dut (.r_in(r_in), .rcon(rcon));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expv = 8'h01;
    for (int j = 0; j < 16; j++) begin
      r_in = 4'(j);
      #1;
      checks++;
      if (rcon !== ((j >= 1 && j <= 10) ? expv : 8'h00)) begin
        failures++;
        $display("FAIL rcon(%0d) = %02x", j, rcon);
      end
      if (j >= 1) expv = ref_gmul(expv, 8'h02);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
