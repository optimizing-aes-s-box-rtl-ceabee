// cell_nmux: inverting 2:1 multiplexer NMUX (2.33 GE).
// Operand order is (select, input taken when select = 1, input taken when
// select = 0): y = ~(s ? d1 : d0).
module cell_nmux (
  input  logic s,
  input  logic d1,
  input  logic d0,
  output logic y
);
  assign y = ~(s ? d1 : d0);
endmodule
