// aes_xtime: multiply a byte by {02} in GF(2^8).
//
// The byte is shifted left by one and, when the bit shifted out (i[7]) is
// set, the reduction constant 1Bh is folded back in. In gates that is a
// rewiring plus three XORs: o0 = i7, o1 = i0^i7, o3 = i2^i7, o4 = i3^i7, the
// remaining outputs are the inputs moved up one place. Purely combinational.
module aes_xtime (
  input  logic [7:0] i,
  output logic [7:0] o
);
  assign o = {i[6], i[5], i[4], i[3] ^ i[7], i[2] ^ i[7], i[1], i[0] ^ i[7], i[7]};
endmodule
