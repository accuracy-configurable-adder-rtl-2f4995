// sara_dar_adder: SARA adder with mode control and delay-adaptive
// reconfiguration; at its defaults the 16-bit SARA4_DAR2 configuration
// (4-bit subadders, detection window of 2).
//
// The mode input picks the accuracy at run time, as a system would:
//   ACC_ACCURATE  every boundary passes the real carry (exact sum),
//   ACC_APPROX    every boundary uses the carry prediction (shortest chains),
//   ACC_DAR       dar_detect sets each boundary from the operands, approximate
//                 only where a long carry chain may run through it.
// approx_sel shows the per-boundary choice that was applied. Combinational:
// a, b, cin, mode -> s, cout. The three-mode control is this design's way of
// exposing the fixed configurations and the adaptive one side by side.
module sara_dar_adder
  import aca_pkg::*;
#(
  parameter int N = 16,
  parameter int L = 4,
  parameter int W = 2,
  localparam int K  = N / L,
  localparam int NB = (K > 1) ? K - 1 : 1
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  input  acc_mode_e     mode,
  output logic [N-1:0]  s,
  output logic          cout,
  output logic [NB-1:0] approx_sel
);

  logic [NB-1:0] dar_approx;

  dar_detect #(.N(N), .L(L), .W(W)) u_dar (
    .p      (a ^ b),
    .approx (dar_approx)
  );

  always_comb begin
    unique case (mode)
      ACC_APPROX: approx_sel = (K > 1) ? '1 : '0;
      ACC_DAR:    approx_sel = dar_approx;
      default:    approx_sel = '0;
    endcase
  end

  sara_adder #(.N(N), .L(L)) u_sara (
    .a      (a),
    .b      (b),
    .cin    (cin),
    .approx (approx_sel),
    .s      (s),
    .cout   (cout)
  );

endmodule
