// cell_oa21: OR-AND-invert cell OA21 (1.33 GE), y = ~((a | b) & c).
module cell_oa21 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = ~((a | b) & c);
endmodule
