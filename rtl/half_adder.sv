// half_adder: one-bit half adder (2:2 counter), s = a^b, cout = a&b.
// Combinational. Used by the Wallace reduction tree for columns that are left
// with two bits in a stage.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic cout
);
  assign s    = a ^ b;
  assign cout = a & b;
endmodule
