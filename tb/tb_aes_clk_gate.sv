// tb_aes_clk_gate: with start_in = 1 the gated clock must follow clk_aes; with
// start_in = 0 it must stay high, so a counter on the gated clock stops.
// start_in is changed only while clk_aes is high.
module tb_aes_clk_gate;
  logic clk_aes = 1'b0, start_in = 1'b0, clk;
  always #5 clk_aes = ~clk_aes;
  int checks = 0, failures = 0, edges = 0;

  aes_clk_gate dut (.clk_aes(clk_aes), .start_in(start_in), .clk(clk));

  always @(posedge clk) edges++;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6; t++) begin
      int e0;
      @(posedge clk_aes); #1;
      start_in = t[0];
      e0 = edges;
      repeat (10) begin
        @(negedge clk_aes); #1;
        checks++;
        if (clk !== (start_in ? 1'b0 : 1'b1)) failures++;
        @(posedge clk_aes); #1;
        checks++;
        if (clk !== 1'b1) failures++;
      end
      checks++;
      if (edges - e0 != (start_in ? 10 : 0)) begin
        failures++;
        $display("FAIL start_in=%b: %0d gated edges", start_in, edges - e0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
