// cell_nor2: two-input NOR standard cell (1.00 GE), y = ~(a | b).
module cell_nor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = ~(a | b);
endmodule
