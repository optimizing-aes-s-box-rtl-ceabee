// gf16_inv_rrb: inverter over GF(2^4) in a redundantly represented basis
// (5-bit codes, each field element has two codes), the non-linear core of the
// GF((2^4)^2)-type S-box.
//
// Thirteen standard cells, 23.00 GE, logic depth 2:
//   T0 = OA21(X3,X2,X0)    T1 = XNOR(X3,X4)    T2 = XNOR(X1,X2)
//   T3 = NOR(X1,X4)        T4 = OA21(X4,X1,X0) T5 = XOR(X2,X4)
//   T6 = XOR(X1,X3)        Y0 = NOR(T3, NOR(X2,X3))
//   Y1 = NMUX(X4,T0,T2)    Y2 = MAOI1(X3,T4,X3,T5)
//   Y3 = MAOI1(X2,T4,X2,T6) Y4 = NMUX(X1,T0,T1)
// This is the published netlist; the select of Y1 is X4, which is the reading
// that gives the published 32-entry lookup table. NMUX operands are
// (select, input for select = 1, input for select = 0).
// Bit order: x = {X0,...,X4}, y = {Y0,...,Y4}, X0/Y0 most significant.
// Purely combinational, no clock.
module gf16_inv_rrb (
  input  logic [4:0] x,
  output logic [4:0] y
);
  logic x0, x1, x2, x3, x4;
  logic t0, t1, t2, t3, t4, t5, t6, n23;

  assign {x0, x1, x2, x3, x4} = x;

  cell_oa21  g0  (.a(x3), .b(x2), .c(x0), .y(t0));
  cell_xnor2 g1  (.a(x3), .b(x4), .y(t1));
  cell_xnor2 g2  (.a(x1), .b(x2), .y(t2));
  cell_nor2  g3  (.a(x1), .b(x4), .y(t3));
  cell_oa21  g4  (.a(x4), .b(x1), .c(x0), .y(t4));
  cell_xor2  g5  (.a(x2), .b(x4), .y(t5));
  cell_xor2  g6  (.a(x1), .b(x3), .y(t6));
  cell_nor2  g7  (.a(x2), .b(x3), .y(n23));
  cell_nor2  g8  (.a(t3), .b(n23), .y(y[4]));
  cell_maoi1 g9  (.a(x3), .b(t4), .c(x3), .d(t5), .y(y[2]));
  cell_nmux  g10 (.s(x1), .d1(t0), .d0(t1), .y(y[0]));
  cell_maoi1 g11 (.a(x2), .b(t4), .c(x2), .d(t6), .y(y[1]));
  cell_nmux  g12 (.s(x4), .d1(t0), .d0(t2), .y(y[3]));
endmodule
