// aes_mixcolumns: the n-bit MixColumns unit fed by the w-bit Sbox output.
//
// When the datapath is narrower than a column (W < N), the unit collects the
// Sbox bytes of one column in an (N-W)-bit shift buffer; in the cycle that
// delivers the last bytes of the column, dout holds the mixed column(s) of
// {buffer, din}, to be written into the state register in that same cycle.
// When W == N the unit is combinational and mixes N/32 columns per cycle.
// The widths follow the document's table (n = 32 for w = 8..32, n = 64 for
// w = 64); the buffer arrangement is this design's own.
//
// Timing: buffer shifts on every clock with en = 1; dout is combinational.
module aes_mixcolumns
  import aes_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [N-1:0] col,    // the unmixed column(s), {buffer, din}
  output logic [N-1:0] dout    // MixColumns of col
);

  if (N > W) begin : g_buf
    logic [N-W-1:0] buffer;
    logic [N-W-1:0] buffer_next;
    if (N - W > W) begin : g_shift
      assign buffer_next = {buffer[N-W-W-1:0], din};
    end else begin : g_load
      assign buffer_next = din;
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  buffer <= '0;
      else if (en) buffer <= buffer_next;
    assign col = {buffer, din};
  end else begin : g_direct
    assign col = din;
  end

  always_comb
    for (int k = 0; k < N / 32; k++)
      dout[N-1-32*k -: 32] = mix_column(col[N-1-32*k -: 32]);

  initial assert (N % 32 == 0 && N >= W) else $error("aes_mixcolumns: N must be a multiple of 32 and >= W");

endmodule
