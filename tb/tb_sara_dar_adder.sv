// tb_sara_dar_adder: checks the 16-bit SARA4_DAR2 adder in its three modes
// against the word-level references: ACC_ACCURATE must give the exact sum,
// ACC_APPROX must match sara_ref with every boundary approximate, ACC_DAR
// must choose the boundaries that dar_ref gives and add as sara_ref does with
// them. It also measures error rates and checks that the adaptive mode errs
// less often than the fixed approximate mode.
module tb_sara_dar_adder;
  import aca_pkg::*;
  import aca_ref_pkg::*;

  localparam int N = 16, L = 4, W = 2;

  logic [N-1:0] a, b, s;
  logic         cin, cout;
  acc_mode_e    mode;
  logic [2:0]   sel;
  int checks = 0, failures = 0;
  int err_approx = 0, err_dar = 0, dar_cut = 0, dar_kept = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  sara_dar_adder dut (.a, .b, .cin, .mode, .s, .cout, .approx_sel(sel));

  task automatic run(acc_mode_e m);
    logic [63:0] ap;
    logic [64:0] r;
    mode = m;
    #1;
    case (m)
      ACC_ACCURATE: ap = '0;
      ACC_APPROX:   ap = 64'h7;
      default:      ap = dar_ref(64'(a), 64'(b), N, L, W);
    endcase
    r = sara_ref(64'(a), 64'(b), cin, ap, N, L);
    checks += 2;
    if (sel != ap[2:0]) begin
      failures++;
      $display("FAIL mode %s a=%h b=%h approx_sel=%b exp %b", m.name(), a, b, sel, ap[2:0]);
    end
    if ({cout, s} != r[N:0]) begin
      failures++;
      $display("FAIL mode %s a=%h b=%h cin=%0d -> %h/%0d exp %h/%0d", m.name(), a, b, cin, s, cout, r[N-1:0], r[N]);
    end
    if (m == ACC_ACCURATE) begin
      checks++;
      if ({cout, s} != 17'(a + b + cin)) begin failures++; $display("FAIL exact %h+%h", a, b); end
    end
    if ({cout, s} != 17'(a + b + cin)) begin
      if (m == ACC_APPROX) err_approx++;
      if (m == ACC_DAR)    err_dar++;
    end
    if (m == ACC_DAR) begin
      dar_cut  += $countones(sel);
      dar_kept += 3 - $countones(sel);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
      run(ACC_ACCURATE);
      run(ACC_APPROX);
      run(ACC_DAR);
    end
    $display("errors: approximate %0d, adaptive %0d of 20000; DAR boundaries cut %0d kept %0d",
             err_approx, err_dar, dar_cut, dar_kept);
    checks += 3;
    if (!(err_dar < err_approx)) begin failures++; $display("FAIL DAR not more accurate"); end
    if (err_dar == 0)            begin failures++; $display("FAIL DAR never approximated"); end
    if (dar_cut == 0 || dar_kept == 0) begin failures++; $display("FAIL DAR never switched"); end
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
