// gf16_inv_nb_area: small-area inverter over GF(2^4) = GF((2^2)^2) in
// normal basis, the non-linear core of the S-box.
//
// Eight standard cells, 15.33 GE, logic depth 3, found by an exact SAT search
// over a library that includes complex cells (OA21, MAOI1, MOAI1):
//   T0 = NOR(X1,X3)            T1 = XNOR(T0,X0)
//   T2 = OA21(T1,X3,X2)        T3 = MOAI1(T1,X2,T0,X2)
//   Y0 = MAOI1(T1,X2,X2,X3)    Y1 = OA21(T0,X1,T2)
//   Y2 = MAOI1(X0,T3,X0,X1)    Y3 = MAOI1(T1,X3,X1,T3)
// The netlist is the published one. Bit order: x = {X0,X1,X2,X3} and
// y = {Y0,Y1,Y2,Y3}, X0/Y0 most significant. It maps 0 to 0 and computes
//   f = 0,12,8,4,3,10,7,6,2,13,5,14,1,9,11,15 for x = 0..15.
// Purely combinational, no clock.
module gf16_inv_nb_area (
  input  logic [3:0] x,
  output logic [3:0] y
);
  logic x0, x1, x2, x3;
  logic t0, t1, t2, t3;

  assign {x0, x1, x2, x3} = x;

  cell_nor2  g0 (.a(x1), .b(x3), .y(t0));
  cell_xnor2 g1 (.a(t0), .b(x0), .y(t1));
  cell_oa21  g2 (.a(t1), .b(x3), .c(x2), .y(t2));
  cell_moai1 g3 (.a(t1), .b(x2), .c(t0), .d(x2), .y(t3));
  cell_maoi1 g4 (.a(t1), .b(x2), .c(x2), .d(x3), .y(y[3]));
  cell_oa21  g5 (.a(t0), .b(x1), .c(t2), .y(y[2]));
  cell_maoi1 g6 (.a(x0), .b(t3), .c(x0), .d(x1), .y(y[1]));
  cell_maoi1 g7 (.a(t1), .b(x3), .c(x1), .d(t3), .y(y[0]));
endmodule
