// aes_sbox: the AES byte substitution as a 256-byte look-up table.
//
// The table is a constant ROM, indexed by the input byte. Its contents are
// computed at elaboration by aes_pkg::build_sbox_table() (GF(2^8) inverse,
// then the affine transform), which yields the standard S-box table; a
// synthesis tool maps it to a ROM or LUTs. Combinational: the output changes
// only when the input changes.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);
  localparam sbox_table_t TABLE = build_sbox_table();

  assign out_byte = TABLE[in_byte];
endmodule
