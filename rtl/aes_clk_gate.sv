// aes_clk_gate: the clock gate in front of an AES core's clock tree.
//
// clk follows clk_aes while start_in is 1 and is held at 1 otherwise, so the
// whole core stops switching between encryptions.  This is the multiplexer
// with a constant '1' input that the document draws; its glitch-free use
// requires start_in to change only while clk_aes is high (for example, driven
// from a falling-edge flop), which this design leaves to the system around it.
// In a standard-cell flow the multiplexer would be replaced by an integrated
// clock-gating cell with the same function.
module aes_clk_gate (
  input  logic clk_aes,
  input  logic start_in,
  output logic clk
);

  assign clk = start_in ? clk_aes : 1'b1;

endmodule
