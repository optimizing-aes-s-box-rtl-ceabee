// tl0_matrix: top linear layer TL0 of the GF(((2^2)^2)^2)-type S-box, an
// 8 x 18 matrix over GF(2).
//
// It merges every linear operation in front of the first multiplication:
// the isomorphic mapping from the AES field into the normal-basis tower
// (giving halves g1, g0 of GF(16)) and the expansion of each half into the
// 9 operands of a 9-AND GF(16) multiplier. Output tl[t] is the XOR of the
// input bits selected by aes_sbox_pkg::TL0_ROWS[t]; tl[8:0] is the expansion
// of g1 and tl[17:9] that of g0 (order given by aes_sbox_pkg::expand16).
// The 8 x 18 shape follows the published decomposition; the matrix itself
// comes from this design's choice of tower basis, and its XOR network is left
// to synthesis rather than given as a hand-optimised gate list.
// Purely combinational.
module tl0_matrix
  import aes_sbox_pkg::*;
(
  input  logic [7:0] u,
  output tl_vec_t    tl
);
  always_comb begin
    for (int t = 0; t < 18; t++) begin
      tl[t] = ^(u & TL0_ROWS[t]);
    end
  end
endmodule
