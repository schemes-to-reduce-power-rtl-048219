// aes_mixcol_unit: one output byte of the MixColumns transform.
//
// Computes y = 2*a ^ 3*b ^ c ^ d in GF(2^8) without a multiplier: a^b goes
// through a single multiply-by-two block, and b is added back in, since
// 2a ^ 3b = 2(a^b) ^ b. c^d is formed in parallel. Combinational; 16 of these
// units make up a full 128-bit MixColumns stage.
module aes_mixcol_unit (
  input  logic [7:0] a,   // multiplied by 2
  input  logic [7:0] b,   // multiplied by 3
  input  logic [7:0] c,
  input  logic [7:0] d,
  output logic [7:0] y
);
  logic [7:0] ab2;

  aes_xtime u_x2 (.i(a ^ b), .o(ab2));

  assign y = ab2 ^ (b ^ (c ^ d));
endmodule
