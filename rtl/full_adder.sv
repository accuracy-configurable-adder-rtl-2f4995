// full_adder: conventional one-bit full adder.
//
// Generate g = a&b and propagate p = a^b; sum s = p ^ cin and carry-out
// cout = g | p&cin. Purely combinational, no clock. This is the ordinary cell
// of every ripple-carry subadder in the SARA adder and the 3:2 counter of the
// Wallace reduction tree; its equations are the textbook ones.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic g, p;
  assign g    = a & b;
  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = g | (p & cin);
endmodule
