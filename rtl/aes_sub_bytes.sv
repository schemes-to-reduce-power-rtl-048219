// aes_sub_bytes: the SubBytes transform, 16 parallel S-box look-ups.
//
// Each byte of the 128-bit state goes through its own aes_sbox table, so the
// whole state is substituted in one combinational step.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar n = 0; n < 16; n++) begin : g_sbox
    aes_sbox u_sbox (.in_byte(state_in[127 - 8*n -: 8]), .out_byte(state_out[127 - 8*n -: 8]));
  end
endmodule
