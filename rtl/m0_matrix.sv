// m0_matrix: 8 x 8 binary matrix M0 as a 13-XOR circuit of depth 3, the
// worked example of building a linear layer from local solutions.
//
// The matrix (row k gives the inputs XORed into Yk, column 0 = X0):
//   Y0: 1100 1010   Y1: 1100 1000   Y2: 0110 0110   Y3: 0001 1001
//   Y4: 0110 1000   Y5: 1111 0000   Y6: 0100 0110   Y7: 1010 0100
// The circuit is built in two steps. First a minimal 9-XOR, depth-2 circuit
// for the light outputs {Y1,Y3,Y4,Y6,Y7}; then 4 more XORs that reuse those
// results for {Y0,Y2,Y5}:
//   T0 = X1^X4  T1 = X5^X6  T2 = X0^X2  T3 = X3^X4
//   Y1 = T0^X0  Y3 = T3^X7  Y4 = T0^X2  Y6 = T1^X1  Y7 = T2^X5
//   T4 = X1^X3  Y0 = Y1^X6  Y2 = Y6^X2  Y5 = T4^T2
// The netlist is the published one. Bit order: x = {X0,...,X7} and
// y = {Y0,...,Y7}, X0/Y0 most significant. Purely combinational.
module m0_matrix (
  input  logic [7:0] x,
  output logic [7:0] y
);
  logic x0, x1, x2, x3, x4, x5, x6, x7;
  logic y0, y1, y2, y3, y4, y5, y6, y7;
  logic t0, t1, t2, t3, t4;

  assign {x0, x1, x2, x3, x4, x5, x6, x7} = x;
  assign y = {y0, y1, y2, y3, y4, y5, y6, y7};

  // local solution for {Y1, Y3, Y4, Y6, Y7}: 9 XORs, depth 2
  cell_xor2 g0  (.a(x1), .b(x4), .y(t0));
  cell_xor2 g1  (.a(x5), .b(x6), .y(t1));
  cell_xor2 g2  (.a(x0), .b(x2), .y(t2));
  cell_xor2 g3  (.a(x3), .b(x4), .y(t3));
  cell_xor2 g4  (.a(t0), .b(x0), .y(y1));
  cell_xor2 g5  (.a(t3), .b(x7), .y(y3));
  cell_xor2 g6  (.a(t0), .b(x2), .y(y4));
  cell_xor2 g7  (.a(t1), .b(x1), .y(y6));
  cell_xor2 g8  (.a(t2), .b(x5), .y(y7));
  // remaining outputs {Y0, Y2, Y5}: 4 XORs on top of the first solution
  cell_xor2 g9  (.a(x1), .b(x3), .y(t4));
  cell_xor2 g10 (.a(y1), .b(x6), .y(y0));
  cell_xor2 g11 (.a(y6), .b(x2), .y(y2));
  cell_xor2 g12 (.a(t4), .b(t2), .y(y5));
endmodule
