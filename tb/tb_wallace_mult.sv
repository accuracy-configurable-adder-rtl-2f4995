// tb_wallace_mult: checks the 8x8 Wallace multiplier.
//  - ACC_ACCURATE, all 65536 operand pairs: the product is x*y.
//  - Every pair: the two rows the tree hands to the final adder sum to x*y
//    (the reduction tree is exact whatever the mode).
//  - ACC_APPROX and ACC_DAR, all pairs: the product equals the SARA reference
//    applied to those two rows with the boundary modes the mode implies.
//  - The 254 x 254 = 64516 case.
module tb_wallace_mult;
  import aca_pkg::*;
  import aca_ref_pkg::*;

  logic [7:0]  x, y;
  logic [15:0] prod;
  logic [2:0]  sel;
  acc_mode_e   mode;
  int checks = 0, failures = 0, approx_diff = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  wallace_mult dut (.x, .y, .mode, .prod, .approx_sel(sel));

  initial begin
    for (int v = 0; v < 65536; v++) begin
      logic [15:0] ra, rb;
      logic [64:0] r;
      logic [63:0] ap;
      {x, y} = 16'(v);
      mode = ACC_ACCURATE;
      #1;
      ra = dut.row_a;
      rb = dut.row_b;
      checks += 2;
      if (prod != 16'(x * y)) begin failures++; $display("FAIL exact %0d*%0d -> %0d", x, y, prod); end
      if (16'(ra + rb) != 16'(x * y)) begin failures++; $display("FAIL tree rows %0d*%0d", x, y); end
      mode = ACC_APPROX;
      #1;
      r = sara_ref(64'(ra), 64'(rb), 1'b0, 64'h7, 16, 4);
      checks++;
      if (prod != r[15:0]) begin failures++; $display("FAIL approx %0d*%0d -> %0d exp %0d", x, y, prod, r[15:0]); end
      if (prod != 16'(x * y)) approx_diff++;
      mode = ACC_DAR;
      #1;
      ap = dar_ref(64'(ra), 64'(rb), 16, 4, 2);
      r = sara_ref(64'(ra), 64'(rb), 1'b0, ap, 16, 4);
      checks += 2;
      if (sel != ap[2:0]) begin failures++; $display("FAIL DAR select %0d*%0d", x, y); end
      if (prod != r[15:0]) begin failures++; $display("FAIL DAR %0d*%0d -> %0d exp %0d", x, y, prod, r[15:0]); end
    end
    x = 8'd254; y = 8'd254; mode = ACC_ACCURATE;
    #1;
    checks++;
    if (prod != 16'd64516) begin failures++; $display("FAIL 254*254 -> %0d", prod); end
    mode = ACC_APPROX;
    #1;
    $display("254*254: exact 64516, approximate %0d; approximate products differing: %0d of 65536",
             prod, approx_diff);
    checks++;
    if (approx_diff == 0) begin failures++; $display("FAIL approximate mode never differed"); end
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
