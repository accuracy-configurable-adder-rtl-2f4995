// tb_cic_fa: exhaustive check of the carry-in configurable full adder. The
// sum must always use the real carry-in; the carry-out is the majority of a,
// b and the carry the mode selects (prediction when approx = 1).
module tb_cic_fa;
  logic a, b, cin, c_prdt, approx, s, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cic_fa dut (.a, .b, .cin, .c_prdt, .approx, .s, .cout);

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic chat;
      logic [1:0] t;
      {a, b, cin, c_prdt, approx} = 5'(v);
      #1;
      chat = approx ? c_prdt : cin;
      t    = 2'(a + b + chat);
      checks += 2;
      if (s != 1'(a + b + cin)) begin
        failures++;
        $display("FAIL sum v=%0d s=%0d", v, s);
      end
      if (cout != t[1]) begin
        failures++;
        $display("FAIL carry v=%0d cout=%0d", v, cout);
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
