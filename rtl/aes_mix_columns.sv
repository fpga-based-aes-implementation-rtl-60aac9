// aes_mix_columns: MixColumns. Each State column, read as a polynomial over
// GF(2^8), is multiplied modulo x^4 + 1 by c(x) = {03}x^3 + {01}x^2 + {01}x
// + {02}. Per column this is the circulant matrix with rows (2 3 1 1),
// (1 2 3 1), (1 1 2 3), (3 1 1 2); a product by 2 is xtime, by 3 is
// xtime(a) ^ a. Combinational.
module aes_mix_columns (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  import aes_pkg::xtime;

  for (genvar c = 0; c < 4; c++) begin : g_col
    logic [7:0] a0, a1, a2, a3;
    assign a0 = din[4*c + 0];
    assign a1 = din[4*c + 1];
    assign a2 = din[4*c + 2];
    assign a3 = din[4*c + 3];
    assign dout[4*c + 0] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
    assign dout[4*c + 1] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
    assign dout[4*c + 2] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
    assign dout[4*c + 3] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
  end
endmodule
