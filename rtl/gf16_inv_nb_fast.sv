// gf16_inv_nb_fast: low-depth inverter over GF(2^4) = GF((2^2)^2) in normal
// basis, used by the fast S-box variant.
//
// Nine standard cells, 19.33 GE, logic depth 2:
//   T0 = NMUX(X1,X2,X0)        T1 = MOAI1(X0,X1,X2,X3)
//   T2 = OA21(X3,X1,X0)        T3 = XNOR(X2,X3)
//   T4 = MOAI1(X0,X2,X1,X0)    Y1 = MOAI1(X3,T4,T0,T1)
//   Y2 = XOR(T2,T4)            Y0 = NMUX(T0,T3,T2)
//   Y3 = MOAI1(T1,X1,T0,T3)
// The netlist is the published one; NMUX operands are (select, input for
// select = 1, input for select = 0), the reading under which the netlist is
// the GF(2^4) inverse. Same function and bit order as gf16_inv_nb_area.
// Purely combinational, no clock.
module gf16_inv_nb_fast (
  input  logic [3:0] x,
  output logic [3:0] y
);
  logic x0, x1, x2, x3;
  logic t0, t1, t2, t3, t4;

  assign {x0, x1, x2, x3} = x;

  cell_nmux  g0 (.s(x1), .d1(x2), .d0(x0), .y(t0));
  cell_moai1 g1 (.a(x0), .b(x1), .c(x2), .d(x3), .y(t1));
  cell_oa21  g2 (.a(x3), .b(x1), .c(x0), .y(t2));
  cell_xnor2 g3 (.a(x2), .b(x3), .y(t3));
  cell_moai1 g4 (.a(x0), .b(x2), .c(x1), .d(x0), .y(t4));
  cell_moai1 g5 (.a(x3), .b(t4), .c(t0), .d(t1), .y(y[2]));
  cell_xor2  g6 (.a(t2), .b(t4), .y(y[1]));
  cell_nmux  g7 (.s(t0), .d1(t3), .d0(t2), .y(y[3]));
  cell_moai1 g8 (.a(t1), .b(x1), .c(t0), .d(t3), .y(y[0]));
endmodule
