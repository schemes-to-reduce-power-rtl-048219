// aes_mix_columns: the MixColumns transform on a full 128-bit state.
//
// Each of the four columns is multiplied by the circulant matrix
// [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02]. Output row r of a
// column is one aes_mixcol_unit fed with rows r, r+1, r+2, r+3 (mod 4) of the
// same column, so the stage is 16 identical units. Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar col = 0; col < 4; col++) begin : g_col
    for (genvar row = 0; row < 4; row++) begin : g_row
      aes_mixcol_unit u_unit (
        .a(state_in[127 - 8*(4*col + row)           -: 8]),
        .b(state_in[127 - 8*(4*col + (row + 1) % 4) -: 8]),
        .c(state_in[127 - 8*(4*col + (row + 2) % 4) -: 8]),
        .d(state_in[127 - 8*(4*col + (row + 3) % 4) -: 8]),
        .y(state_out[127 - 8*(4*col + row) -: 8])
      );
    end
  end
endmodule
