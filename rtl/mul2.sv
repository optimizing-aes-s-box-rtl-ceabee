// mul2: the 2Mul function of the GF(((2^2)^2)^2)-type S-box, 22-bit input
// (the 4-bit inverse theta and the 18 TL0 outputs), 18-bit output.
//
// It expands theta into the 9 operands of a GF(16) multiplier and ANDs them
// with the expanded halves from TL0: m[8:0] are the 9 partial products of
// theta*g1, m[17:9] those of theta*g0. The XOR folding of these products is
// linear and therefore belongs to BL0. The interface follows the published
// decomposition; the expansion is the same as in TL0 (aes_sbox_pkg::expand16).
// Purely combinational.
module mul2
  import aes_sbox_pkg::*;
(
  input  gf16_t   theta,
  input  tl_vec_t tl,
  output tl_vec_t m
);
  gf16_exp_t e_th;

  assign e_th    = expand16(theta);
  assign m[8:0]  = e_th & tl[8:0];
  assign m[17:9] = e_th & tl[17:9];
endmodule
