// aes_inv_mix_columns: InvMixColumns. Each State column is multiplied modulo
// x^4 + 1 by d(x) = {0B}x^3 + {0D}x^2 + {09}x + {0E}, the inverse of the
// MixColumns polynomial: the circulant matrix with rows (E B D 9),
// (9 E B D), (D 9 E B), (B D 9 E). The constant products are built from
// xtime chains (x2, x4, x8 of each byte). Combinational.
module aes_inv_mix_columns (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  import aes_pkg::xtime;

  for (genvar c = 0; c < 4; c++) begin : g_col
    logic [3:0][7:0] a, m2, m4, m8, m9, mb, md, me;
    for (genvar r = 0; r < 4; r++) begin : g_mul
      assign a[r]  = din[4*c + r];
      assign m2[r] = xtime(a[r]);
      assign m4[r] = xtime(m2[r]);
      assign m8[r] = xtime(m4[r]);
      assign m9[r] = m8[r] ^ a[r];
      assign mb[r] = m8[r] ^ m2[r] ^ a[r];
      assign md[r] = m8[r] ^ m4[r] ^ a[r];
      assign me[r] = m8[r] ^ m4[r] ^ m2[r];
    end
    assign dout[4*c + 0] = me[0] ^ mb[1] ^ md[2] ^ m9[3];
    assign dout[4*c + 1] = m9[0] ^ me[1] ^ mb[2] ^ md[3];
    assign dout[4*c + 2] = md[0] ^ m9[1] ^ me[2] ^ mb[3];
    assign dout[4*c + 3] = mb[0] ^ md[1] ^ m9[2] ^ me[3];
  end
endmodule
