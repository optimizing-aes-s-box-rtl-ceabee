// cell_xnor2: two-input XNOR standard cell (2.00 GE), y = ~(a ^ b).
module cell_xnor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = ~(a ^ b);
endmodule
