// aes_add_round_key: AddRoundKey, the bitwise XOR (addition in GF(2)) of the
// 128-bit state with the 128-bit round key. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  assign state_out = state_in ^ round_key;
endmodule
