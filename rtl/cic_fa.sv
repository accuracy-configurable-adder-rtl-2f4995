// cic_fa: carry-in configurable full adder.
//
// Sits at the least significant bit of every SARA subadder except the bottom
// one. It receives both the accurate carry from the subadder below (cin) and
// that subadder's carry prediction (c_prdt). The sum always uses the accurate
// carry, s = p ^ cin, so this bit itself is never wrong. Its carry-out, which
// feeds the rest of the subadder, uses c_hat = approx ? c_prdt : cin, so in
// approximate mode the carry chain of the subadder starts here from the fast
// prediction and the long chain from below is cut. Combinational.
module cic_fa (
  input  logic a,
  input  logic b,
  input  logic cin,      // accurate carry from the subadder below
  input  logic c_prdt,   // predicted carry from the subadder below
  input  logic approx,   // 1: carry-out uses c_prdt, 0: uses cin
  output logic s,
  output logic cout
);
  logic g, p, c_hat;
  assign g     = a & b;
  assign p     = a ^ b;
  assign c_hat = approx ? c_prdt : cin;
  assign s     = p ^ cin;
  assign cout  = g | (p & c_hat);
endmodule
