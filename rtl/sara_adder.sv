// sara_adder: N-bit simple accuracy reconfigurable adder (SARA).
//
// The adder is cut into K = N/L segments, each an L-bit ripple-carry subadder.
// At each of the K-1 boundaries the most significant bit of the lower subadder
// is a carry-out selectable full adder (cos_fa), which exports the carry
// prediction g = a&b, and the least significant bit of the upper subadder is a
// carry-in configurable full adder (cic_fa). When approx[k-1] is 1, boundary k
// runs in approximate mode: the upper subadder's carry chain starts from the
// prediction, so no carry chain is longer than about L bits, while the boundary
// sum bit still uses the real carry. When approx[k-1] is 0 the real carry
// passes and the boundary behaves as in a ripple-carry adder; with every bit
// 0 the result is exact.
//
// Interface: a, b, cin -> s, cout, purely combinational. Bit 0 is the least
// significant bit. The segment structure, the two special cells and the
// prediction c_prdt = g follow the source; the carry input cin and the
// per-boundary mode vector are this design's choices. When L = 1 a one-bit
// subadder is both the lowest and highest bit of its segment: it is built as
// a cic_fa and its prediction g is formed beside it.
module sara_adder #(
  parameter int N = 16,                   // adder width
  parameter int L = 4,                    // subadder width
  localparam int K  = N / L,              // number of subadders
  localparam int NB = (K > 1) ? K - 1 : 1 // number of boundaries (at least 1 bit wide)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  input  logic [NB-1:0] approx,  // approx[k-1]: boundary between subadders k-1 and k
  output logic [N-1:0]  s,
  output logic          cout
);

  initial begin
    assert (L >= 1 && N % L == 0)
      else $error("sara_adder: N (%0d) must be a multiple of L (%0d)", N, L);
  end

  logic [N-1:0]  c;     // accurate carry-out of every bit
  logic [NB-1:0] pred;  // carry prediction of the MSB of each subadder but the top one

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam int SEG = i / L;
    localparam int POS = i % L;
    localparam bit IS_LSB = (POS == 0) && (SEG > 0);
    localparam bit IS_MSB = (POS == L - 1) && (SEG < K - 1);

    logic ci;
    if (i == 0) begin : g_c0
      assign ci = cin;
    end else begin : g_cn
      assign ci = c[i-1];
    end

    if (IS_LSB) begin : g_cic
      cic_fa u_fa (
        .a(a[i]), .b(b[i]), .cin(ci),
        .c_prdt(pred[SEG-1]), .approx(approx[SEG-1]),
        .s(s[i]), .cout(c[i])
      );
      if (IS_MSB) begin : g_pred
        assign pred[SEG] = a[i] & b[i];
      end
    end else if (IS_MSB) begin : g_cos
      cos_fa u_fa (
        .a(a[i]), .b(b[i]), .cin(ci),
        .s(s[i]), .cout(c[i]), .c_prdt(pred[SEG])
      );
    end else begin : g_fa
      full_adder u_fa (
        .a(a[i]), .b(b[i]), .cin(ci),
        .s(s[i]), .cout(c[i])
      );
    end
  end

  if (K == 1) begin : g_single
    assign pred = '0;
  end

  assign cout = c[N-1];

endmodule
