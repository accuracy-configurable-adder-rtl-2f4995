// tb_aca_top: end-to-end test of aca_top at its default parameters (16-bit
// SARA4_DAR2 adder, 8x8 Wallace multiplier with a SARA4_DAR2 final adder).
// Random operands are applied while both units switch modes independently.
// Checked: exact results in accurate mode; adder results against the
// word-level SARA reference with the DAR choice from the DAR reference;
// approximate results never above the exact ones (a predicted carry is never
// 1 when the real carry is 0). Each mechanism must be seen at least once:
// a mode switch, an approximate boundary, a DAR boundary cut and one kept,
// an adder and a multiplier result changed by approximation.
module tb_aca_top;
  import aca_pkg::*;
  import aca_ref_pkg::*;

  logic [15:0] add_a, add_b, add_s, mul_prod;
  logic        add_cin, add_cout;
  logic [7:0]  mul_x, mul_y;
  acc_mode_e   add_mode, mul_mode, prev_add_mode, prev_mul_mode;
  logic [2:0]  add_sel, mul_sel;
  int checks = 0, failures = 0;
  int n_switch = 0, n_approx_bnd = 0, n_dar_cut = 0, n_dar_kept = 0;
  int n_add_err = 0, n_mul_err = 0, n_mul_dar_cut = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  aca_top dut (
    .add_a, .add_b, .add_cin, .add_mode, .add_s, .add_cout, .add_approx_sel(add_sel),
    .mul_x, .mul_y, .mul_mode, .mul_prod, .mul_approx_sel(mul_sel)
  );

  function automatic acc_mode_e pick(int r);
    case (r % 3)
      0:       return ACC_ACCURATE;
      1:       return ACC_APPROX;
      default: return ACC_DAR;
    endcase
  endfunction

  initial begin
    prev_add_mode = ACC_ACCURATE;
    prev_mul_mode = ACC_ACCURATE;
    for (int i = 0; i < 30000; i++) begin
      logic [63:0] ap;
      logic [64:0] r;
      @(posedge clk);
      add_a = 16'($urandom); add_b = 16'($urandom); add_cin = 1'($urandom);
      mul_x = 8'($urandom);  mul_y = 8'($urandom);
      // hold a mode for a few operations, then switch
      if (i % 4 == 0) begin
        add_mode = pick(int'($urandom_range(0, 2)));
        mul_mode = pick(int'($urandom_range(0, 2)));
      end
      #1;
      if (add_mode != prev_add_mode) n_switch++;
      if (mul_mode != prev_mul_mode) n_switch++;
      prev_add_mode = add_mode;
      prev_mul_mode = mul_mode;

      // adder
      case (add_mode)
        ACC_ACCURATE: ap = '0;
        ACC_APPROX:   ap = 64'h7;
        default:      ap = dar_ref(64'(add_a), 64'(add_b), 16, 4, 2);
      endcase
      r = sara_ref(64'(add_a), 64'(add_b), add_cin, ap, 16, 4);
      checks += 3;
      if (add_sel != ap[2:0]) begin failures++; $display("FAIL adder select"); end
      if ({add_cout, add_s} != r[16:0]) begin
        failures++;
        $display("FAIL adder %s %h+%h+%0d -> %h exp %h", add_mode.name(), add_a, add_b, add_cin, {add_cout, add_s}, r[16:0]);
      end
      if ({add_cout, add_s} > 17'(add_a + add_b + add_cin)) begin failures++; $display("FAIL adder overestimates"); end
      if (add_mode == ACC_ACCURATE) begin
        checks++;
        if ({add_cout, add_s} != 17'(add_a + add_b + add_cin)) begin failures++; $display("FAIL adder exact"); end
      end
      if ({add_cout, add_s} != 17'(add_a + add_b + add_cin)) n_add_err++;
      n_approx_bnd += $countones(add_sel);
      if (add_mode == ACC_DAR) begin
        n_dar_cut  += $countones(add_sel);
        n_dar_kept += 3 - $countones(add_sel);
      end

      // multiplier
      checks++;
      if (mul_prod > 16'(mul_x * mul_y)) begin failures++; $display("FAIL multiplier overestimates"); end
      if (mul_mode == ACC_ACCURATE) begin
        checks += 2;
        if (mul_prod != 16'(mul_x * mul_y)) begin failures++; $display("FAIL product %0d*%0d -> %0d", mul_x, mul_y, mul_prod); end
        if (mul_sel != 3'b000) begin failures++; $display("FAIL multiplier select in accurate mode"); end
      end
      if (mul_mode == ACC_APPROX) begin
        checks++;
        if (mul_sel != 3'b111) begin failures++; $display("FAIL multiplier select in approximate mode"); end
      end
      if (mul_prod != 16'(mul_x * mul_y)) n_mul_err++;
      if (mul_mode == ACC_DAR) n_mul_dar_cut += $countones(mul_sel);
    end

    $display("mode switches %0d, approximate boundaries %0d, DAR cut %0d kept %0d, multiplier DAR cut %0d",
             n_switch, n_approx_bnd, n_dar_cut, n_dar_kept, n_mul_dar_cut);
    $display("approximate results: adder %0d, multiplier %0d of 30000", n_add_err, n_mul_err);
    checks += 7;
    if (n_switch == 0)      begin failures++; $display("FAIL no mode switch"); end
    if (n_approx_bnd == 0)  begin failures++; $display("FAIL no approximate boundary"); end
    if (n_dar_cut == 0)     begin failures++; $display("FAIL DAR never cut"); end
    if (n_dar_kept == 0)    begin failures++; $display("FAIL DAR never kept"); end
    if (n_add_err == 0)     begin failures++; $display("FAIL adder never approximated"); end
    if (n_mul_err == 0)     begin failures++; $display("FAIL multiplier never approximated"); end
    if (n_mul_dar_cut == 0) begin failures++; $display("FAIL multiplier DAR never cut"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
