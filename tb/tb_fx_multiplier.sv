// tb_fx_multiplier: checks the fixed-point multiplier for the three format
// combinations the FPLL uses, against a real-number reference (the product
// truncated to the output format, and saturated).
module tb_fx_multiplier;
  import fpll_pkg::*;
  fx_t a, b, p_ss, p_ws, p_sw;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // Q4.36 x Q4.36 -> Q4.36
  fx_multiplier #(.A_FRAC(36), .B_FRAC(36), .P_FRAC(36)) d_ss (.a, .b, .p(p_ss));
  // Q24.16 x Q4.36 -> Q24.16
  fx_multiplier #(.A_FRAC(16), .B_FRAC(36), .P_FRAC(16)) d_ws (.a, .b, .p(p_ws));
  // Q4.36 x Q4.36 -> Q24.16
  fx_multiplier #(.A_FRAC(36), .B_FRAC(36), .P_FRAC(16)) d_sw (.a, .b, .p(p_sw));

  function automatic real expect_fx(input real prod_real, input int frac);
    real r, mx;
    r  = $floor(prod_real * (2.0 ** frac));
    mx = 2.0 ** 39;
    if (r > mx - 1.0) r = mx - 1.0;
    if (r < -mx) r = -mx;
    return r;
  endfunction

  task automatic cmp(input fx_t got, input real want, input string what);
    checks++;
    // reals carry 53 bits: allow one LSB of rounding in the reference
    if ((real'(got) - want) > 1.5 || (real'(got) - want) < -1.5) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d got=%0d want=%0f", what, a, b, got, want);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra, rb;
    for (int i = 0; i < 3000; i++) begin
      a = fx_t'({$urandom, $urandom}) >>> ($urandom % 30);
      b = fx_t'({$urandom, $urandom}) >>> ($urandom % 30);
      if (i == 0) begin a = fx_const(1.5, 36); b = fx_const(-2.25, 36); end
      if (i == 1) begin a = fx_const(7.9, 36); b = fx_const(7.9, 36); end
      #1;
      ra = real'(a); rb = real'(b);
      cmp(p_ss, expect_fx(ra / 2.0**36 * rb / 2.0**36, 36), "Q4.36*Q4.36");
      cmp(p_ws, expect_fx(ra / 2.0**16 * rb / 2.0**36, 16), "Q24.16*Q4.36");
      cmp(p_sw, expect_fx(ra / 2.0**36 * rb / 2.0**36, 16), "Q4.36*Q4.36->Q24.16");
    end
    // exact small case: 1.5 * -2.25 = -3.375
    a = fx_const(1.5, 36); b = fx_const(-2.25, 36); #1;
    checks++;
    if (p_ss != fx_const(-3.375, 36)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
