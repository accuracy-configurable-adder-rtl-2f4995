// dar_detect: delay-adaptive reconfiguration (DAR) detector for a SARA adder.
//
// For every subadder boundary it looks at a window of W propagate signals
// p = a^b and switches that boundary to approximate mode only when all W are
// 1, i.e. when a carry could run through the whole window and on into the
// next subadder, making a long carry chain. Otherwise the boundary stays
// accurate: any carry that crosses it must start inside the window, so the
// longest chain in accurate mode is about L + W bits. A larger W therefore
// gives fewer approximations (lower error rate) and a longer worst path.
//
// The window covers the W most significant bits of the lower subadder,
// p[i-W+1..i] with i the boundary bit; the source gives the window size and
// the L + W chain bound but not which bits the window covers, so this
// placement is this design's choice. W may exceed L; the window is clipped at
// bit 0. Interface: p -> approx, combinational.
module dar_detect #(
  parameter int N = 16,  // adder width
  parameter int L = 4,   // subadder width
  parameter int W = 2,   // detection window size
  localparam int K  = N / L,
  localparam int NB = (K > 1) ? K - 1 : 1
) (
  input  logic [N-1:0]  p,       // propagate bits a^b
  output logic [NB-1:0] approx   // approx[k-1] for the boundary below subadder k
);

  initial begin
    assert (W >= 1) else $error("dar_detect: W must be at least 1");
  end

  for (genvar k = 1; k < K; k++) begin : g_bnd
    localparam int HI = k * L - 1;
    localparam int LO = (HI - W + 1 < 0) ? 0 : HI - W + 1;
    assign approx[k-1] = &p[HI:LO];
  end

  if (K == 1) begin : g_single
    assign approx = '0;
  end

endmodule
