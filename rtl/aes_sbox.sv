// aes_sbox: the AES S-box as a 256-entry lookup table, one byte in, one out.
//
// As the design prescribes, SubBytes uses a precalculated substitution table
// rather than computing the field inverse in logic, so a substitution costs
// one table read and fits in a single clock cycle with the rest of a round.
// The table contents are generated at elaboration by aes_pkg::gen_sbox.
// Purely combinational.
module aes_sbox (
  input  logic [7:0] a,
  output logic [7:0] y
);
  localparam aes_pkg::sbox_table_t TABLE = aes_pkg::gen_sbox();

  assign y = TABLE[a];
endmodule
