// tb_dar_detect: exhaustive check of the DAR detector at its defaults
// (16 bits, L = 4, W = 2) over all 65536 propagate patterns, plus a random
// check of a W = 3 instance, against aca_ref_pkg::dar_ref. It also counts
// boundaries that go approximate and that stay accurate.
module tb_dar_detect;
  import aca_ref_pkg::*;

  logic [15:0] p;
  logic [2:0]  ap2, ap3;
  int checks = 0, failures = 0;
  int n_approx = 0, n_acc = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dar_detect dut (.p, .approx(ap2));
  dar_detect #(.N(16), .L(4), .W(3)) dut3 (.p, .approx(ap3));

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [63:0] r2, r3;
      p = 16'(v);
      #1;
      // dar_ref takes operands; with b = 0 the propagate bits equal a
      r2 = dar_ref(64'(p), 64'd0, 16, 4, 2);
      r3 = dar_ref(64'(p), 64'd0, 16, 4, 3);
      checks += 2;
      if (ap2 != r2[2:0]) begin failures++; $display("FAIL W=2 p=%b -> %b exp %b", p, ap2, r2[2:0]); end
      if (ap3 != r3[2:0]) begin failures++; $display("FAIL W=3 p=%b -> %b exp %b", p, ap3, r3[2:0]); end
      for (int k = 0; k < 3; k++) if (ap2[k]) n_approx++; else n_acc++;
    end
    // W = 2: a boundary is approximate for 1/4 of the patterns
    checks++;
    if (n_approx != 3 * 65536 / 4) begin
      failures++;
      $display("FAIL approximate boundary count %0d", n_approx);
    end
    $display("boundaries approximate %0d, accurate %0d", n_approx, n_acc);
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
