// aes_sbox_pkg: types and constants shared by the tower-field AES S-box.
//
// The S-box computes R = M * U^-1 + 0x63 over GF(2^8) (AES polynomial
// x^8+x^4+x^3+x+1). The inversion is carried out in the tower
// GF(((2^2)^2)^2) with normal bases at every level:
//   GF(4)   : basis {W^2, W},   W   = 8'hBC (an element of order 3)
//   GF(16)  : basis {Z^4, Z},   Z   = 8'hE0, over GF(4)
//   GF(256) : basis {Y^16, Y},  Y   = 8'h12, over GF(16), Y + Y^16 = 1
// (all three constants written in the AES polynomial basis).
// A 4-bit GF(16) code {a3,a2,a1,a0} means
//   a3*Z^4*W^2 + a2*Z^4*W + a1*Z*W^2 + a0*Z*W,
// and an 8-bit tower code {g1,g0} means g1*Y^16 + g0*Y. With this basis the
// GF(16) inverse is exactly the lookup table the small-area and low-depth
// inverter netlists implement.
//
// For A = g1*Y^16 + g0*Y the inverse is
//   d     = g1*g0 + nu*(g1+g0)^2,   nu = Y*Y^16 (code 4'b0001)
//   theta = d^-1
//   A^-1  = (theta*g0)*Y^16 + (theta*g1)*Y.
// Every GF(16) product is formed from 9 AND gates on "expanded" operands
// (function expand16 below): a two-level Karatsuba split, GF(16) over GF(4)
// and GF(4) over GF(2). RED_ROWS folds those 9 AND outputs back into 4 bits.
//
// The matrices below are the composition of these linear maps. Row k of a
// matrix is the mask of input bits whose XOR gives output bit k:
//   TL0_ROWS[t]  = expand16 applied to the isomorphism AES -> tower
//                  (t = 0..8: high half g1, t = 9..17: low half g0)
//   BL0_ROWS[k]  = affine matrix M * (tower -> AES map) * (RED_ROWS on each
//                  half, m[8:0] -> theta*g1 = low half of the result,
//                  m[17:9] -> theta*g0 = high half)
//   RED_ROWS[k]  = bit k of a GF(16) product as XOR of the 9 AND terms
//   SQSC_ROWS[k] = bit k of nu*x^2 (square-and-scale, linear in x)
// They were obtained by solving these definitions over GF(2); the test
// benches check the resulting S-box against an independent GF(2^8) model.
package aes_sbox_pkg;

  typedef logic [3:0]  gf16_t;     // GF(2^4) element, normal-basis code
  typedef logic [8:0]  gf16_exp_t; // expanded operand of a GF(16) multiplier
  typedef logic [17:0] tl_vec_t;   // outputs of TL0 / 2Mul

  // Which GF(2^4) inverter the S-box uses.
  typedef enum logic {
    INV_SMALL_AREA = 1'b0,  // 15.33 GE, depth 3
    INV_LOW_DEPTH  = 1'b1   // 19.33 GE, depth 2 (fast variant)
  } inv_variant_e;

  localparam logic [7:0] AFFINE_C = 8'h63;

  localparam logic [7:0]  TL0_ROWS [18] = '{
    8'hc5, 8'ha9, 8'h6c, 8'h89, 8'hff, 8'h76, 8'h4c, 8'h56, 8'h1a,
    8'h15, 8'h0b, 8'h1e, 8'h87, 8'h23, 8'ha4, 8'h92, 8'h28, 8'hba};

  localparam logic [17:0] BL0_ROWS [8] = '{
    18'h2b1a8, 18'h05b9e, 18'h2b0dd, 18'h2dd9e,
    18'h3676e, 18'h2dd43, 18'h1d6eb, 18'h30bb3};

  localparam logic [8:0]  RED_ROWS [4] = '{9'h0f0, 9'h1a8, 9'h0c6, 9'h185};

  localparam logic [3:0]  SQSC_ROWS [4] = '{4'h1, 4'h3, 4'ha, 4'h5};

  // Operand expansion for the 9-AND GF(16) multiplier:
  // {a3, a2, a3^a2, a1, a0, a1^a0, a3^a1, a2^a0, a3^a2^a1^a0}, listed from
  // bit 0 upwards.
  function automatic gf16_exp_t expand16(gf16_t a);
    gf16_exp_t e;
    e[0] = a[3];
    e[1] = a[2];
    e[2] = a[3] ^ a[2];
    e[3] = a[1];
    e[4] = a[0];
    e[5] = a[1] ^ a[0];
    e[6] = a[3] ^ a[1];
    e[7] = a[2] ^ a[0];
    e[8] = a[3] ^ a[2] ^ a[1] ^ a[0];
    return e;
  endfunction

endpackage
