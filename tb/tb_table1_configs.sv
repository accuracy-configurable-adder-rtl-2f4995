// tb_table1_configs: the 16-bit adder configurations compared in the
// evaluation: SARA1, SARA4, SARA8 (1-, 4- and 8-bit subadders, every
// boundary approximate), SARA4_DAR2 (4-bit subadders, adaptive with a window
// of 2) and the exact ripple-carry adder (SARA4 in accurate mode). Each is
// checked against the word-level reference on the same random operands, and
// their error rates are compared with the accuracy ranking of the evaluation:
// SARA1 lowest accuracy, SARA4 and SARA8 moderate, SARA4_DAR2 high, the
// ripple-carry adder exact.
module tb_table1_configs;
  import aca_pkg::*;
  import aca_ref_pkg::*;

  logic [15:0] a, b, s1, s4, s8, sd, sx;
  logic        c1, c4, c8, cd, cx;
  logic [14:0] sel1;
  logic [2:0]  sel4, seld, selx;
  logic        sel8;
  int checks = 0, failures = 0;
  int e1 = 0, e4 = 0, e8 = 0, ed = 0, ex = 0;
  longint d1 = 0, d4 = 0, d8 = 0, dd = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sara_dar_adder #(.N(16), .L(1), .W(2)) u_sara1 (.a, .b, .cin(1'b0), .mode(ACC_APPROX),   .s(s1), .cout(c1), .approx_sel(sel1));
  sara_dar_adder #(.N(16), .L(4), .W(2)) u_sara4 (.a, .b, .cin(1'b0), .mode(ACC_APPROX),   .s(s4), .cout(c4), .approx_sel(sel4));
  sara_dar_adder #(.N(16), .L(8), .W(2)) u_sara8 (.a, .b, .cin(1'b0), .mode(ACC_APPROX),   .s(s8), .cout(c8), .approx_sel(sel8));
  sara_dar_adder                         u_dar2  (.a, .b, .cin(1'b0), .mode(ACC_DAR),      .s(sd), .cout(cd), .approx_sel(seld));
  sara_dar_adder                         u_rca   (.a, .b, .cin(1'b0), .mode(ACC_ACCURATE), .s(sx), .cout(cx), .approx_sel(selx));

  task automatic cmp(string nm, logic [16:0] got, logic [64:0] r, inout int e, inout longint d);
    logic [16:0] exact = 17'(a + b);
    checks++;
    if (got != r[16:0]) begin failures++; $display("FAIL %s %h+%h -> %h exp %h", nm, a, b, got, r[16:0]); end
    if (got != exact) begin
      e++;
      d += longint'(exact) - longint'(got);
    end
  endtask

  initial begin
    localparam int NV = 50000;
    for (int i = 0; i < NV; i++) begin
      a = 16'($urandom); b = 16'($urandom);
      #1;
      cmp("SARA1", {c1, s1}, sara_ref(64'(a), 64'(b), 1'b0, 64'h7fff, 16, 1), e1, d1);
      cmp("SARA4", {c4, s4}, sara_ref(64'(a), 64'(b), 1'b0, 64'h7, 16, 4), e4, d4);
      cmp("SARA8", {c8, s8}, sara_ref(64'(a), 64'(b), 1'b0, 64'h1, 16, 8), e8, d8);
      cmp("SARA4_DAR2", {cd, sd}, sara_ref(64'(a), 64'(b), 1'b0, dar_ref(64'(a), 64'(b), 16, 4, 2), 16, 4), ed, dd);
      checks++;
      if ({cx, sx} != 17'(a + b)) begin failures++; ex++; end
    end
    $display("error rate per 10000: SARA1 %0d  SARA4 %0d  SARA8 %0d  SARA4_DAR2 %0d  RCA %0d",
             e1 * 10000 / NV, e4 * 10000 / NV, e8 * 10000 / NV, ed * 10000 / NV, ex * 10000 / NV);
    $display("mean error distance: SARA1 %0d  SARA4 %0d  SARA8 %0d  SARA4_DAR2 %0d",
             d1 / NV, d4 / NV, d8 / NV, dd / NV);
    checks += 3;
    if (!(e1 > e4))  begin failures++; $display("FAIL SARA1 not less accurate than SARA4"); end
    if (!(e4 >= e8)) begin failures++; $display("FAIL SARA8 less accurate than SARA4"); end
    if (!(ed < e4))  begin failures++; $display("FAIL SARA4_DAR2 not more accurate than SARA4"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
