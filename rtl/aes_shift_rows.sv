// aes_shift_rows: ShiftRows. Row r of the State is rotated cyclically left by
// r bytes (row 0 unchanged, row 3 by three). With byte i at row i%4, column
// i/4, output byte (r, c) is input byte (r, (c + r) mod 4). Pure wiring,
// combinational.
module aes_shift_rows (
  input  aes_pkg::state_t din,
  output aes_pkg::state_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign dout[4*c + r] = din[4*((c + r) % 4) + r];
    end
  end
endmodule
