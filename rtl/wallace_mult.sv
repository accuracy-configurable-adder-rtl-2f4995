// wallace_mult: WIDTH x WIDTH unsigned Wallace-tree multiplier whose final
// carry-propagate adder is the accuracy-configurable SARA/DAR adder.
//
// The WIDTH*WIDTH partial products x[i]&y[j] are placed in 2*WIDTH columns by
// weight. Each reduction stage takes every column in groups of three bits
// through a full adder (sum stays, carry moves one column up), reduces a
// remaining pair with a half adder and passes a single leftover bit on. Stages
// repeat until no column holds more than two bits (four stages for 8x8:
// heights 8, 6, 4, 3, 2). The two remaining rows are added by sara_dar_adder,
// so the mode input makes the product exact (ACC_ACCURATE), approximate with
// the shortest final carry chain (ACC_APPROX) or adaptive (ACC_DAR).
//
// The wiring of the tree is computed at elaboration time by constant
// functions. A carry out of the top column is dropped: the product always
// fits in 2*WIDTH bits, so that carry is always 0. Combinational:
// x, y, mode -> prod. Using SARA as the final adder of an 8x8 Wallace
// multiplier follows the source; the reduction schedule (classic Wallace
// grouping) and the product width of 2*WIDTH bits are this design's choices.
module wallace_mult
  import aca_pkg::*;
#(
  parameter int WIDTH = 8,   // operand width
  parameter int L     = 4,   // subadder width of the final SARA adder
  parameter int W     = 2,   // DAR window of the final adder
  localparam int NC   = 2 * WIDTH
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  acc_mode_e        mode,
  output logic [NC-1:0]    prod,
  output logic [((NC/L > 1) ? NC/L - 1 : 1)-1:0] approx_sel  // boundary modes of the final adder
);

  // ---- tree shape, evaluated at elaboration ----
  function automatic int h0(int c);
    if (c < WIDTH)          return c + 1;
    else if (c <= NC - 2)   return NC - 1 - c;
    else                    return 0;
  endfunction

  // bits that stay in a column after one stage: sums of full and half adders
  // plus a passed single bit
  function automatic int stay(int h);
    return h / 3 + ((h % 3 != 0) ? 1 : 0);
  endfunction

  // carries that a column sends one column up in one stage
  function automatic int up(int h);
    return h / 3 + ((h % 3 == 2) ? 1 : 0);
  endfunction

  // height of column c after s stages
  function automatic int height(int s, int c);
    int hh [NC];
    int nh [NC];
    for (int cc = 0; cc < NC; cc++) hh[cc] = h0(cc);
    for (int t = 0; t < s; t++) begin
      for (int cc = 0; cc < NC; cc++)
        nh[cc] = stay(hh[cc]) + ((cc > 0) ? up(hh[cc-1]) : 0);
      hh = nh;
    end
    return hh[c];
  endfunction

  function automatic int max_height(int s);
    int m = 0;
    for (int cc = 0; cc < NC; cc++)
      if (height(s, cc) > m) m = height(s, cc);
    return m;
  endfunction

  function automatic int num_stages();
    int s = 0;
    while (max_height(s) > 2 && s < 32) s++;
    return s;
  endfunction

  localparam int NST  = num_stages();
  localparam int MAXH = WIDTH + 1;

  // g_lv[s].col[c][k]: k-th bit of column c before stage s. Each stage has
  // its own array so that no array feeds itself.
  for (genvar s = 0; s <= NST; s++) begin : g_lv
    logic [MAXH-1:0] col [NC];
  end

  // ---- stage 0: partial products ----
  for (genvar c = 0; c < NC; c++) begin : g_pp
    localparam int I0 = (c - WIDTH + 1 > 0) ? c - WIDTH + 1 : 0;
    for (genvar k = 0; k < MAXH; k++) begin : g_k
      if (k < h0(c)) begin : g_p
        assign g_lv[0].col[c][k] = x[I0 + k] & y[c - I0 - k];
      end else begin : g_z
        assign g_lv[0].col[c][k] = 1'b0;
      end
    end
  end

  // ---- reduction stages ----
  for (genvar s = 0; s < NST; s++) begin : g_st
    for (genvar c = 0; c < NC; c++) begin : g_col
      localparam int H    = height(s, c);
      localparam int NFA  = H / 3;
      localparam int REM  = H % 3;
      localparam int OFF  = stay(H);                      // first carry slot in column c+1's next stage
      localparam int CIN  = (c > 0) ? up(height(s, c - 1)) : 0;
      localparam int HN   = height(s + 1, c);

      // carries sent up by this column
      logic [NFA:0] cy;

      for (genvar g = 0; g < NFA; g++) begin : g_fa
        full_adder u_fa (
          .a   (g_lv[s].col[c][3*g]),
          .b   (g_lv[s].col[c][3*g+1]),
          .cin (g_lv[s].col[c][3*g+2]),
          .s   (g_lv[s+1].col[c][g]),
          .cout(cy[g])
        );
      end

      if (REM == 2) begin : g_ha
        half_adder u_ha (
          .a   (g_lv[s].col[c][3*NFA]),
          .b   (g_lv[s].col[c][3*NFA+1]),
          .s   (g_lv[s+1].col[c][NFA]),
          .cout(cy[NFA])
        );
      end else begin : g_noha
        assign cy[NFA] = 1'b0;
        if (REM == 1) begin : g_pass
          assign g_lv[s+1].col[c][NFA] = g_lv[s].col[c][3*NFA];
        end
      end

      // carries arriving from column c-1
      for (genvar m = 0; m < CIN; m++) begin : g_cin
        assign g_lv[s+1].col[c][OFF + m] = g_st[s].g_col[c-1].cy[m];
      end

      // unused slots
      for (genvar k = HN; k < MAXH; k++) begin : g_z
        assign g_lv[s+1].col[c][k] = 1'b0;
      end
    end
  end

  // ---- final carry-propagate addition ----
  logic [NC-1:0] row_a, row_b;
  for (genvar c = 0; c < NC; c++) begin : g_rows
    assign row_a[c] = g_lv[NST].col[c][0];
    assign row_b[c] = g_lv[NST].col[c][1];
  end

  // the final carry-out is always 0 (the product fits in NC bits)
  logic fin_cout;

  sara_dar_adder #(.N(NC), .L(L), .W(W)) u_final (
    .a          (row_a),
    .b          (row_b),
    .cin        (1'b0),
    .mode       (mode),
    .s          (prod),
    .cout       (fin_cout),
    .approx_sel (approx_sel)
  );

endmodule
