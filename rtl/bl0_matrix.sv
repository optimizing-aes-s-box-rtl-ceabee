// bl0_matrix: bottom linear layer BL0 of the GF(((2^2)^2)^2)-type S-box, an
// 18 x 8 matrix over GF(2) followed by the AES constant 0x63.
//
// It merges every linear operation after the last multiplication: folding
// the 18 partial products of 2Mul into the two GF(16) halves of the inverse
// (theta*g1 becomes the low half and theta*g0 the high half, as the normal
// basis inversion formula swaps them), the mapping from the tower back to the
// AES field and the AES affine matrix M. Output r[k] is the XOR of the
// products selected by aes_sbox_pkg::BL0_ROWS[k], then XOR 0x63.
// The 18 x 8 shape follows the published decomposition; the matrix follows
// from this design's tower basis. Purely combinational.
module bl0_matrix
  import aes_sbox_pkg::*;
(
  input  tl_vec_t    m,
  output logic [7:0] r
);
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      r[k] = ^(m & BL0_ROWS[k]) ^ AFFINE_C[k];
    end
  end
endmodule
