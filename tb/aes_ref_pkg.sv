// aes_ref_pkg: a plain behavioural AES-128 encryption model used by the
// testbenches as the reference.
//
// It is written independently of the RTL: the S-box comes from a brute-force
// search for the multiplicative inverse followed by the affine matrix taken
// row by row, GF(2^8) products use a generic bit-serial multiplier, and the
// round keys are expanded word by word as a 44-word schedule. Byte 0 of a
// block is bits [127:120], byte n is row n%4, column n/4.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   b8_t;

  function automatic b8_t ref_mul(b8_t a, b8_t b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11B << (i - 8);
    return p[7:0];
  endfunction

  function automatic b8_t ref_sbox(b8_t x);
    b8_t inv = 8'h00;
    // Rows of the affine matrix, row i gives output bit i; bit j of a row
    // selects input bit j.
    b8_t rows [8] = '{8'b1111_0001, 8'b1110_0011, 8'b1100_0111, 8'b1000_1111,
                      8'b0001_1111, 8'b0011_1110, 8'b0111_1100, 8'b1111_1000};
    b8_t y;
    for (int c = 1; c < 256; c++) if (ref_mul(x, b8_t'(c)) == 8'h01) inv = b8_t'(c);
    for (int i = 0; i < 8; i++) y[i] = ^(rows[i] & inv);
    return y ^ 8'h63;
  endfunction

  function automatic b8_t byte_of(blk_t s, int n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic blk_t set_byte(blk_t s, int n, b8_t v);
    s[127 - 8*n -: 8] = v;
    return s;
  endfunction

  function automatic blk_t ref_sub_bytes(blk_t s);
    for (int n = 0; n < 16; n++) s = set_byte(s, n, ref_sbox(byte_of(s, n)));
    return s;
  endfunction

  function automatic blk_t ref_shift_rows(blk_t s);
    blk_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o = set_byte(o, 4*c + r, byte_of(s, 4*((c + r) % 4) + r));
    return o;
  endfunction

  function automatic blk_t ref_mix_columns(blk_t s);
    b8_t m [4][4] = '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
                      '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b8_t acc = 8'h00;
        for (int k = 0; k < 4; k++) acc ^= ref_mul(m[r][k], byte_of(s, 4*c + k));
        o = set_byte(o, 4*c + r, acc);
      end
    return o;
  endfunction

  // Round key r (0..10) of a 128-bit cipher key.
  function automatic blk_t ref_round_key(blk_t key, int r);
    logic [31:0] w [44];
    b8_t rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t ref_round(blk_t s, blk_t rk, bit final_round);
    s = ref_shift_rows(ref_sub_bytes(s));
    if (!final_round) s = ref_mix_columns(s);
    return s ^ rk;
  endfunction

  function automatic blk_t ref_encrypt(blk_t pt, blk_t key);
    blk_t s = pt ^ key;
    for (int r = 1; r <= 10; r++) s = ref_round(s, ref_round_key(key, r), r == 10);
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
