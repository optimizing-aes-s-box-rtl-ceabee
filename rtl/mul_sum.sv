// mul_sum: the Mul-Sum function of the GF(((2^2)^2)^2)-type S-box,
// 18-bit input, 4-bit output.
//
// From the TL0 outputs it computes d = g1*g0 + nu*(g1+g0)^2 in GF(2^4), the
// value whose inverse the S-box needs (nu = Y*Y^16, see aes_sbox_pkg).
// The 9 partial products of g1*g0 come from NAND cells on the expanded
// operands, ~(tl[t] & tl[9+t]), rather than AND cells: NAND is the smaller
// cell, and since the products are only ever XORed together, each output
// bit needs just one inversion when it sums an odd number of them (the
// parity of its row in aes_sbox_pkg::RED_ROWS). The square-and-scale term
// is linear in g1+g0 and is taken from the raw code bits of both halves,
// which the expansions carry at positions 0, 1, 3 and 4.
// The 18 -> 4 interface and the NAND-for-AND exchange follow the published
// design; the XOR network itself is left to synthesis. Purely combinational.
module mul_sum
  import aes_sbox_pkg::*;
(
  input  tl_vec_t    tl,
  output gf16_t      d
);
  gf16_exp_t e_hi, e_lo, nprod;
  gf16_t     g_sum;

  assign e_hi  = tl[8:0];
  assign e_lo  = tl[17:9];
  assign g_sum = {e_hi[0], e_hi[1], e_hi[3], e_hi[4]} ^ {e_lo[0], e_lo[1], e_lo[3], e_lo[4]};

  for (genvar t = 0; t < 9; t++) begin : g_nand
    cell_nand2 u_nand (.a(e_hi[t]), .b(e_lo[t]), .y(nprod[t]));
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      d[k] = ^(nprod & RED_ROWS[k]) ^ (^RED_ROWS[k]) ^ ^(g_sum & SQSC_ROWS[k]);
    end
  end
endmodule
