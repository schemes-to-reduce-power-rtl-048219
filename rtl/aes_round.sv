// aes_round: one AES encryption round on a 128-bit state.
//
// SubBytes (16 S-box look-ups), ShiftRows (wiring), MixColumns (16 XOR-only
// units) and AddRoundKey in a single combinational path. A 2:1 multiplexer in
// front of AddRoundKey selects either the MixColumns output or its input:
// with final_round high the MixColumns stage is bypassed, which turns the
// same hardware into the final AES round, so no separate last-round block is
// needed. Inputs and outputs are plain 128-bit vectors (byte 0 in bits
// [127:120]); the caller registers the result.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);
  block_t subbed, shifted, mixed, pre_key;

  aes_sub_bytes     u_sub   (.state_in(state_in), .state_out(subbed));
  aes_shift_rows    u_shift (.state_in(subbed),   .state_out(shifted));
  aes_mix_columns   u_mix   (.state_in(shifted),  .state_out(mixed));

  assign pre_key = final_round ? shifted : mixed;

  aes_add_round_key u_ark   (.state_in(pre_key), .round_key(round_key), .state_out(state_out));
endmodule
