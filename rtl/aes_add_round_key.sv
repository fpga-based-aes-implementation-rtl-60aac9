// aes_add_round_key: AddRoundKey, the bitwise XOR of the State with a 128-bit
// round key. XOR is its own inverse, so the same block serves the cipher and
// the inverse cipher; only the order in which round keys are applied differs.
// Combinational.
module aes_add_round_key (
  input  aes_pkg::state_t din,
  input  aes_pkg::state_t rk,
  output aes_pkg::state_t dout
);
  assign dout = din ^ rk;
endmodule
