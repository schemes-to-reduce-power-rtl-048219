// aes_pkg: types, constants and constant functions shared by the AES-128
// encryption cores.
//
// A state or round key is a 128-bit vector. Byte Bn of the 16-byte block is
// bits [127-8n -: 8], so byte 0 sits in the most significant position (the
// order in which a block is written as a hex string). Byte n sits in row
// n%4, column n/4 of the 4x4 state, column by column, as AES specifies.
//
// The S-box table is not typed in: build_sbox_table() computes all 256
// entries at elaboration from the multiplicative inverse in GF(2^8) (reduction
// polynomial x^8+x^4+x^3+x+1) followed by the AES affine transform, so the
// hardware is still a 256-byte look-up table. round_constant() gives the round
// constants 01,02,04,...,80,1B,36 of rounds 1 to 10.
package aes_pkg;

  localparam int unsigned BLOCK_BITS = 128;
  localparam int unsigned NUM_ROUNDS = 10;   // AES-128

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [7:0]            byte_t;
  typedef byte_t                 sbox_table_t [256];

  // Byte n of a block, n = 4*column + row.
  function automatic byte_t get_byte(block_t b, int unsigned n);
    return b[BLOCK_BITS-1-8*n -: 8];
  endfunction

  // Multiply by {02} in GF(2^8).
  function automatic byte_t xtime(byte_t x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254; 0 maps to 0.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    // 254 = 1111_1110b
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);   // a^(2^i)
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  // Affine transform: b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 63h.
  function automatic byte_t affine(byte_t b);
    byte_t o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return o ^ 8'h63;
  endfunction

  function automatic sbox_table_t build_sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

  // Round constant of round r (1..10); 00 outside that range.
  function automatic byte_t round_constant(int unsigned r);
    byte_t c = 8'h01;
    if (r < 1 || r > NUM_ROUNDS) return 8'h00;
    for (int unsigned i = 1; i < NUM_ROUNDS; i++)
      if (i < r) c = xtime(c);
    return c;
  endfunction

endpackage
