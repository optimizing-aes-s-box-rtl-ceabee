// cell_xor2: two-input XOR standard cell (2.00 GE). Kept as its own module so
// that a synthesis run can preserve the published gate structure.
module cell_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a ^ b;
endmodule
