// tb_full_adder: exhaustive check of the full adder against a+b+cin.
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  full_adder dut (.a, .b, .cin, .s, .cout);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} != 2'(a + b + cin)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> s=%0d cout=%0d", a, b, cin, s, cout);
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
