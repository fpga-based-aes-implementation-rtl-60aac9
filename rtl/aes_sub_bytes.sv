// aes_sub_bytes: SubBytes, the S-box applied to each of the 16 state bytes
// independently, through sixteen aes_sbox tables in parallel.
// Combinational; byte numbering as in aes_pkg::state_t.
module aes_sub_bytes (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (.a(din[i]), .y(dout[i]));
  end
endmodule
