// aes_sbox_t0: AES S-box (SubBytes of one byte) built in the tower field
// GF(((2^2)^2)^2) with normal bases.
//
// The datapath is the five-stage split used to optimise each piece on its
// own:
//   TL0 (8 -> 18, linear)  ->  Mul-Sum (18 -> 4)  ->  GF(2^4) inverse (4 -> 4)
//   ->  2Mul (4 + 18 -> 18, ANDs)  ->  BL0 (18 -> 8, linear, + 0x63)
// Only Mul-Sum, the inverter and 2Mul are non-linear. VARIANT selects the
// small-area inverter (15.33 GE, depth 3, the small-area S-box) or the
// low-depth inverter (19.33 GE, depth 2, the fast S-box). Both inverters are
// the published netlists; TL0, Mul-Sum, 2Mul and BL0 are this design's own
// realisation for its choice of tower basis (see aes_sbox_pkg), and the fast
// variant shares them with the small one.
// Interface: u is the input byte, r = S(u). Purely combinational, so the
// result is valid one propagation delay after u changes.
module aes_sbox_t0
  import aes_sbox_pkg::*;
#(
  parameter inv_variant_e VARIANT = INV_SMALL_AREA
) (
  input  logic [7:0] u,
  output logic [7:0] r
);
  tl_vec_t tl, m;
  gf16_t   d, theta;

  tl0_matrix u_tl0 (.u(u), .tl(tl));
  mul_sum    u_ms  (.tl(tl), .d(d));

  generate
    if (VARIANT == INV_LOW_DEPTH) begin : g_inv_fast
      gf16_inv_nb_fast u_inv (.x(d), .y(theta));
    end else begin : g_inv_area
      gf16_inv_nb_area u_inv (.x(d), .y(theta));
    end
  endgenerate

  mul2       u_m2  (.theta(theta), .tl(tl), .m(m));
  bl0_matrix u_bl0 (.m(m), .r(r));
endmodule
