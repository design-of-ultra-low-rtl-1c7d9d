// aes_top: the two low-power AES-128 encryption cores side by side.
//
// s2_*: the 2-Sbox core (one datapath Sbox and one key Sbox at W = 8), the
//       configuration that was put on silicon: 160 cycles per block.
// s1_*: the 1-Sbox core, smaller, one Sbox shared between datapath and key
//       expansion: 216 cycles per block here.
// Each core has its own clock gate controlled by its start_in, its own
// byte-serial plaintext/key inputs and ciphertext output with in_ready and
// out_valid (see aes_core_2sbox and aes_core_1sbox for the protocols).  The
// two cores share only clk_aes and the asynchronous reset; they are
// independent alternatives, not a pipeline.
module aes_top #(
  parameter int unsigned W = 8      // datapath width of the 2-Sbox core: 8, 16, 32 or 64
) (
  input  logic         clk_aes,
  input  logic         rst_n,
  // 2-Sbox core
  input  logic         s2_start_in,
  input  logic [W-1:0] s2_data_in,
  input  logic [W-1:0] s2_key_in,
  output logic [W-1:0] s2_data_out,
  output logic         s2_in_ready,
  output logic         s2_out_valid,
  // 1-Sbox core
  input  logic         s1_start_in,
  input  logic [7:0]   s1_data_in,
  input  logic [7:0]   s1_key_in,
  output logic [7:0]   s1_data_out,
  output logic         s1_in_ready,
  output logic         s1_out_valid
);

  aes_core_2sbox #(.W(W)) u_core2 (
    .clk_aes(clk_aes), .start_in(s2_start_in), .rst_n(rst_n),
    .data_in(s2_data_in), .key_in(s2_key_in), .data_out(s2_data_out),
    .in_ready(s2_in_ready), .out_valid(s2_out_valid));

  aes_core_1sbox u_core1 (
    .clk_aes(clk_aes), .start_in(s1_start_in), .rst_n(rst_n),
    .data_in(s1_data_in), .key_in(s1_key_in), .data_out(s1_data_out),
    .in_ready(s1_in_ready), .out_valid(s1_out_valid));

endmodule
