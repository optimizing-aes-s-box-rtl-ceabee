// cell_moai1: MOAI1 cell (2.33 GE), y = ~(~(a & b) & (c | d)).
module cell_moai1 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y
);
  assign y = ~(~(a & b) & (c | d));
endmodule
