// tb_sara_adder: checks the SARA adder at 16 bits with 4-bit subadders (the
// default) and with 1-bit and 8-bit subadders against the word-level
// reference aca_ref_pkg::sara_ref, for random operands and random
// per-boundary modes. It also checks that all-accurate mode gives the exact
// sum, and a directed case in which a cut carry makes the approximate sum
// differ from the exact one while the boundary sum bit stays exact.
module tb_sara_adder;
  import aca_ref_pkg::*;

  localparam int N = 16;

  logic [N-1:0] a, b;
  logic         cin;
  logic [14:0]  approx;   // wide enough for L = 1
  logic [N-1:0] s4, s1, s8;
  logic         co4, co1, co8;
  int checks = 0, failures = 0;
  int approx_errors = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sara_adder dut4 (.a, .b, .cin, .approx(approx[2:0]), .s(s4), .cout(co4));
  sara_adder #(.N(N), .L(1)) dut1 (.a, .b, .cin, .approx(approx), .s(s1), .cout(co1));
  sara_adder #(.N(N), .L(8)) dut8 (.a, .b, .cin, .approx(approx[0]), .s(s8), .cout(co8));

  task automatic check(int l, logic [N-1:0] s, logic co);
    logic [64:0] r = sara_ref(64'(a), 64'(b), cin, 64'(approx), N, l);
    checks++;
    if ({co, s} != r[N:0]) begin
      failures++;
      $display("FAIL L=%0d a=%h b=%h cin=%0d approx=%b -> %h/%0d expected %h/%0d",
               l, a, b, cin, approx, s, co, r[N-1:0], r[N]);
    end
  endtask

  task automatic apply();
    #1;
    check(4, s4, co4);
    check(1, s1, co1);
    check(8, s8, co8);
    if ({co4, s4} != 17'(a + b + cin)) approx_errors++;
  endtask

  initial begin
    // exact when every boundary is accurate
    for (int i = 0; i < 2000; i++) begin
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom); approx = '0;
      #1;
      checks += 3;
      if ({co4, s4} != 17'(a + b + cin)) begin failures++; $display("FAIL exact L=4 %h+%h", a, b); end
      if ({co1, s1} != 17'(a + b + cin)) begin failures++; $display("FAIL exact L=1 %h+%h", a, b); end
      if ({co8, s8} != 17'(a + b + cin)) begin failures++; $display("FAIL exact L=8 %h+%h", a, b); end
    end
    // directed: carry generated at bit 2 runs through bits 3..7 into bit 8.
    // Boundary at bit 3/4 approximate: bit 4 sum is exact, bits above lose it.
    a = 16'h00FC; b = 16'h0004; cin = 0; approx = '1;
    #1;
    checks += 2;
    // exact sum 0x0100. Bit 4 takes the real carry and is 0 as in the exact
    // sum; bits 5..7 start from the prediction g3 = 0 and stay 1.
    if (s4 != 16'h00E0) begin failures++; $display("FAIL directed s4=%h", s4); end
    if (s4 == 16'(a + b)) begin failures++; $display("FAIL directed: no approximation seen"); end
    // random operands and modes against the reference
    for (int i = 0; i < 20000; i++) begin
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom); approx = 15'($urandom);
      apply();
    end
    checks++;
    if (approx_errors == 0) begin
      failures++;
      $display("FAIL random approximate runs never differed from the exact sum");
    end
    $display("L=4 random-mode results differing from exact: %0d of 20000", approx_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
