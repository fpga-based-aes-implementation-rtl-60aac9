// aes_inv_sub_bytes: InvSubBytes, the inverse S-box applied to each of the 16
// state bytes, through sixteen aes_inv_sbox tables in parallel.
// Combinational; byte numbering as in aes_pkg::state_t.
module aes_inv_sub_bytes (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_inv_sbox u_sbox (.a(din[i]), .y(dout[i]));
  end
endmodule
