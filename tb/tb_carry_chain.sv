// tb_carry_chain: the delay side of the accuracy/delay trade-off, measured
// on the 16-bit adder (L = 4, W = 2) in zero-delay simulation.
//
// 1. Sensitivity: for random operands, bit j of a is toggled and the highest
//    sum bit that changes is found. Its distance above j is the length of the
//    carry path that was exercised. In ACC_APPROX it may not exceed L + 1
//    (prediction bit, then one subadder); in ACC_ACCURATE it reaches N - 1.
// 2. The worked example: with a carry generated at bit 3 (bit 4 when bits
//    are counted from 1) and propagated through bits 4..7, sum bit 8 (S_9)
//    depends on bit 3 through a path of 5 carry cells plus the sum XOR,
//    6 stages, in approximate mode; in accurate mode a carry from bit 0
//    reaches S_9 through 8 carry cells plus the XOR, 9 stages.
// 3. DAR bound: from the boundary modes the adder reports, the longest run
//    of carry cells that one generate drives (a run is cut where a boundary
//    is approximate and stops at a non-propagating bit) is computed; in
//    ACC_DAR it never exceeds L + W, and both bounds are reached.
module tb_carry_chain;
  import aca_pkg::*;

  localparam int N = 16, L = 4, W = 2;

  logic [N-1:0] a, b, s, a2;
  logic         cout;
  acc_mode_e    mode;
  logic [2:0]   sel;
  int checks = 0, failures = 0;
  int max_span_approx = 0, max_span_acc = 0, max_chain_dar = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sara_dar_adder dut (.a, .b, .cin(1'b0), .mode, .s, .cout, .approx_sel(sel));

  // highest sum bit that changes when bit j of a is toggled, minus j
  task automatic span(int j, output int d);
    logic [N-1:0] base, diff;
    base = s;
    a2 = a;
    a[j] = ~a[j];
    #1;
    diff = base ^ s;
    a = a2;
    #1;
    d = 0;
    for (int k = j; k < N; k++) if (diff[k]) d = k - j;
  endtask

  // longest run of carry cells driven by one generate, given boundary modes
  function automatic int longest_chain(logic [N-1:0] x, logic [N-1:0] y, logic [2:0] ap);
    logic [N-1:0] g = x & y, p = x ^ y;
    int best = 0;
    for (int j = 0; j < N; j++) begin
      if (g[j]) begin
        int m = j;
        // carry out of bit m feeds bit m+1; it continues if bit m+1
        // propagates and the boundary below m+1 (if any) is accurate
        while (m + 1 < N && p[m+1] && !(((m + 1) % L == 0) && ap[(m + 1) / L - 1])) m++;
        if (m - j + 1 > best) best = m - j + 1;
      end
    end
    return best;
  endfunction

  initial begin
    int d;
    // 1. sensitivity in the two fixed modes
    for (int i = 0; i < 3000; i++) begin
      a = N'($urandom); b = N'($urandom);
      for (int mm = 0; mm < 2; mm++) begin
        mode = (mm == 0) ? ACC_APPROX : ACC_ACCURATE;
        #1;
        for (int j = 0; j < N; j++) begin
          span(j, d);
          if (mode == ACC_APPROX) begin
            checks++;
            if (d > L + 1) begin failures++; $display("FAIL approx span %0d from bit %0d a=%h b=%h", d, j, a, b); end
            if (d > max_span_approx) max_span_approx = d;
          end else if (d > max_span_acc) max_span_acc = d;
        end
      end
    end
    // directed long chain for the accurate mode
    a = 16'h0001; b = 16'hFFFF; mode = ACC_ACCURATE;
    #1;
    span(0, d);
    if (d > max_span_acc) max_span_acc = d;
    $display("longest exercised path: approximate %0d bits, accurate %0d bits", max_span_approx, max_span_acc);
    checks += 2;
    if (max_span_approx != L + 1) begin failures++; $display("FAIL approximate bound L+1 not reached"); end
    if (max_span_acc != N - 1)    begin failures++; $display("FAIL accurate path not full length"); end

    // 2. the S_9 example: bits counted from 0, S_9 is s[8]
    a = 16'h00F8; b = 16'h0008; mode = ACC_APPROX;   // g at bit 3, p at bits 4..7
    #1;
    span(3, d);
    checks++;
    if (d != 5) begin failures++; $display("FAIL S_9 path in approximate mode: %0d", d); end
    $display("S_9 in approximate mode: %0d carry cells + sum = %0d stages", d, d + 1);
    a = 16'h00FF; b = 16'h0001; mode = ACC_ACCURATE; // carry from bit 0 through bit 7
    #1;
    span(0, d);
    checks++;
    if (d != 8) begin failures++; $display("FAIL S_9 path in accurate mode: %0d", d); end
    $display("S_9 in accurate mode: %0d carry cells + sum = %0d stages", d, d + 1);

    // 3. DAR bound
    mode = ACC_DAR;
    for (int i = 0; i < 50000; i++) begin
      int c;
      a = N'($urandom); b = N'($urandom);
      if (i % 5 == 0) b = ~a ^ N'(1 << $urandom_range(0, N - 1));  // long propagate runs
      #1;
      c = longest_chain(a, b, sel);
      checks++;
      if (c > L + W) begin failures++; $display("FAIL DAR chain %0d a=%h b=%h sel=%b", c, a, b, sel); end
      if (c > max_chain_dar) max_chain_dar = c;
    end
    $display("longest carry run in DAR mode: %0d (bound L+W = %0d)", max_chain_dar, L + W);
    checks++;
    if (max_chain_dar != L + W) begin failures++; $display("FAIL DAR bound not reached"); end

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
