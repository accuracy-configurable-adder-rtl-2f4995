// cos_fa: carry-out selectable full adder.
//
// Sits at the most significant bit of every SARA subadder except the top one.
// It is a conventional full adder that exports a second carry, the carry
// prediction c_prdt = g = a&b, which is available after one gate delay instead
// of after the whole ripple chain. The subadder above chooses between the real
// carry-out (cout) and c_prdt. Combinational.
module cos_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,     // accurate carry-out, g | p&cin
  output logic c_prdt    // predicted carry-out, g
);
  logic g, p;
  assign g      = a & b;
  assign p      = a ^ b;
  assign s      = p ^ cin;
  assign cout   = g | (p & cin);
  assign c_prdt = g;
endmodule
