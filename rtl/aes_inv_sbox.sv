// aes_inv_sbox: the AES inverse S-box as a 256-entry lookup table.
//
// Used by InvSubBytes. Like the forward S-box it is a precalculated table,
// generated at elaboration by aes_pkg::gen_inv_sbox (the forward table read
// backwards). Purely combinational.
module aes_inv_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);
  localparam aes_pkg::sbox_table_t TABLE = aes_pkg::gen_inv_sbox();

  assign y = TABLE[a];
endmodule
