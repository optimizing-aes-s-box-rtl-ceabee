// cell_maoi1: MAOI1 cell (2.33 GE), y = ~((a & b) | ~(c | d)).
module cell_maoi1 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y
);
  assign y = ~((a & b) | ~(c | d));
endmodule
