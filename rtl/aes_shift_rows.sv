// aes_shift_rows: the ShiftRows transform, done purely by wiring.
//
// Row r of the 4x4 state is rotated left by r positions: output cell
// (row r, column c) takes input cell (r, (c + r) mod 4). With byte n at row
// n%4, column n/4, output byte 4c+r is input byte 4((c+r)%4)+r. No logic.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
    end
  end
endmodule
