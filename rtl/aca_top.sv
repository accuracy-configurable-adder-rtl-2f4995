// aca_top: the accuracy-configurable arithmetic of this design, side by side:
//   - a 16-bit SARA adder with delay-adaptive reconfiguration (4-bit
//     subadders, window 2: the SARA4_DAR2 configuration), and
//   - an 8x8 Wallace-tree multiplier whose final adder is the same kind of
//     SARA/DAR adder (16 bits, same L and W).
// Each unit has its own operands and its own accuracy mode (aca_pkg::acc_mode_e)
// so a system can run, say, exact multiplies next to approximate additions.
// Both are purely combinational; there is no clock or reset. The pairing of
// the two units in one top is this design's packaging; the units themselves
// follow the source.
module aca_top
  import aca_pkg::*;
#(
  parameter int N     = 16,  // adder width
  parameter int L     = 4,   // subadder width (adder and multiplier's final adder)
  parameter int W     = 2,   // DAR detection window
  parameter int MW    = 8,   // multiplier operand width
  localparam int NB   = (N / L > 1) ? N / L - 1 : 1,
  localparam int MNB  = (2 * MW / L > 1) ? 2 * MW / L - 1 : 1
) (
  // adder
  input  logic [N-1:0]    add_a,
  input  logic [N-1:0]    add_b,
  input  logic            add_cin,
  input  acc_mode_e       add_mode,
  output logic [N-1:0]    add_s,
  output logic            add_cout,
  output logic [NB-1:0]   add_approx_sel,
  // multiplier
  input  logic [MW-1:0]   mul_x,
  input  logic [MW-1:0]   mul_y,
  input  acc_mode_e       mul_mode,
  output logic [2*MW-1:0] mul_prod,
  output logic [MNB-1:0]  mul_approx_sel
);

  sara_dar_adder #(.N(N), .L(L), .W(W)) u_adder (
    .a          (add_a),
    .b          (add_b),
    .cin        (add_cin),
    .mode       (add_mode),
    .s          (add_s),
    .cout       (add_cout),
    .approx_sel (add_approx_sel)
  );

  wallace_mult #(.WIDTH(MW), .L(L), .W(W)) u_mult (
    .x          (mul_x),
    .y          (mul_y),
    .mode       (mul_mode),
    .prod       (mul_prod),
    .approx_sel (mul_approx_sel)
  );

endmodule
