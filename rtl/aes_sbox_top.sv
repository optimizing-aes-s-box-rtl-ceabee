// aes_sbox_top: top level holding the two S-box designs side by side.
//
//  * sbox_in -> sbox_out: the GF(((2^2)^2)^2)-type AES S-box (aes_sbox_t0),
//    small-area variant by default, fast variant with
//    VARIANT = INV_LOW_DEPTH.
//  * rrb_x -> rrb_y: the SAT-optimised GF(2^4) inverter of the
//    GF((2^4)^2)-type S-box, which works on 5-bit redundant codes. The linear
//    layers around it in that S-box depend on bases defined outside this
//    design, so only the inverter is provided, on its own ports.
//  * m0_x -> m0_y: the 13-XOR circuit of the 8 x 8 example matrix M0, which
//    shows how a linear layer is assembled from local solutions.
// Everything is combinational; there is no clock or reset.
module aes_sbox_top
  import aes_sbox_pkg::*;
#(
  parameter inv_variant_e VARIANT = INV_SMALL_AREA
) (
  input  logic [7:0] sbox_in,
  output logic [7:0] sbox_out,
  input  logic [4:0] rrb_x,
  output logic [4:0] rrb_y,
  input  logic [7:0] m0_x,
  output logic [7:0] m0_y
);
  aes_sbox_t0 #(.VARIANT(VARIANT)) u_sbox (.u(sbox_in), .r(sbox_out));
  gf16_inv_rrb u_rrb_inv (.x(rrb_x), .y(rrb_y));
  m0_matrix    u_m0      (.x(m0_x), .y(m0_y));
endmodule
