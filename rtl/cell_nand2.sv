// cell_nand2: two-input NAND standard cell (1.00 GE), y = ~(a & b).
module cell_nand2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = ~(a & b);
endmodule
