// aes_key_expansion: one step of the AES-128 key schedule.
//
// From the previous round key (words W0..W3, W0 in bits [127:96]) and the
// round constant it forms the next round key W4..W7:
//   f  = SubWord(RotWord(W3)) ^ {rcon, 00, 00, 00}
//   W4 = W0 ^ f,  W5 = W1 ^ W4,  W6 = W2 ^ W5,  W7 = W3 ^ W6
// RotWord moves the column up one byte; SubWord uses four aes_sbox tables.
// Purely combinational, so a round key is produced in the same cycle as the
// round that uses it and no round keys are stored.
module aes_key_expansion
  import aes_pkg::*;
(
  input  block_t key_in,
  input  byte_t  rcon,
  output block_t key_out
);
  logic [31:0] w0, w1, w2, w3, rot, sub, f, w4, w5, w6, w7;

  assign {w0, w1, w2, w3} = key_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar n = 0; n < 4; n++) begin : g_sbox
    aes_sbox u_sbox (.in_byte(rot[31 - 8*n -: 8]), .out_byte(sub[31 - 8*n -: 8]));
  end

  assign f  = sub ^ {rcon, 24'h0};
  assign w4 = w0 ^ f;
  assign w5 = w1 ^ w4;
  assign w6 = w2 ^ w5;
  assign w7 = w3 ^ w6;
  assign key_out = {w4, w5, w6, w7};
endmodule
