// tb_cos_fa: exhaustive check of the carry-out selectable full adder: sum and
// carry as a full adder, plus the carry prediction equal to a AND b.
module tb_cos_fa;
  logic a, b, cin, s, cout, c_prdt;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cos_fa dut (.a, .b, .cin, .s, .cout, .c_prdt);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks += 2;
      if ({cout, s} != 2'(a + b + cin)) begin
        failures++;
        $display("FAIL sum a=%0d b=%0d cin=%0d", a, b, cin);
      end
      if (c_prdt != (a && b)) begin
        failures++;
        $display("FAIL prediction a=%0d b=%0d -> %0d", a, b, c_prdt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
