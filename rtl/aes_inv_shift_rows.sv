// aes_inv_shift_rows: InvShiftRows. Row r of the State is rotated cyclically
// right by r bytes, undoing aes_shift_rows: output byte (r, (c + r) mod 4) is
// input byte (r, c). Pure wiring, combinational.
module aes_inv_shift_rows (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign dout[4*((c + r) % 4) + r] = din[4*c + r];
    end
  end
endmodule
