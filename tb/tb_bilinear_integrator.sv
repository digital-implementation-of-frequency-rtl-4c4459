// tb_bilinear_integrator: drives the trapezoidal integrator with random
// inputs, gains and enable gaps and compares every step with a real-number
// model of y[n] = y[n-1] + g (x[n] + x[n-1]). Also checks reset to INIT, the
// hold when en = 0, the guard-bit accumulation of increments below one
// output LSB, and that a constant input ramps the output linearly.
module tb_bilinear_integrator;
  import fpll_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  fx_t  x, g, y, y_q, x2, g2, y2, y2_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam fx_t INIT = fx_const(0.25, 36);

  // oscillator-style instance: Q24.16 in, Q4.36 gain, Q4.36 out
  bilinear_integrator #(.IN_FRAC(16), .G_FRAC(36), .OUT_FRAC(36), .GUARD(0), .INIT(INIT)) dut (
    .clk, .rst_n, .en, .x, .g, .y, .y_q);
  // frequency-style instance: Q4.36 in, tiny gain, Q24.16 out with guard bits
  bilinear_integrator #(.IN_FRAC(36), .G_FRAC(56), .OUT_FRAC(16), .GUARD(24), .INIT('0)) dut2 (
    .clk, .rst_n, .en, .x(x2), .g(g2), .y(y2), .y_q(y2_q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, mp, rx, rg, want, m2;
    x = '0; g = '0; x2 = '0; g2 = '0;
    repeat (2) @(posedge clk);
    #1;
    check(y_q == INIT, "reset value");
    rst_n = 1;
    m = 0.25; mp = 0.0;
    for (int n = 0; n < 3000; n++) begin
      rx = real'($urandom_range(0, 2000000)) / 1.0e6 - 1.0;   // -1 .. 1
      rg = real'($urandom_range(0, 1000)) / 1.0e5;            // 0 .. 0.01
      x  = fx_const(rx, 16);
      g  = fx_const(rg, 36);
      en = ($urandom_range(0, 3) != 0);
      #1;
      want = m + (real'(g) / 2.0**36) * ((real'(x) + mp) / 2.0**16);
      check((real'(y) / 2.0**36 - want) < 1.0e-9 && (real'(y) / 2.0**36 - want) > -1.0e-9,
            "combinational y[n]");
      @(posedge clk);
      #1;
      if (en) begin
        m  = want;
        mp = real'(x);
      end
      check((real'(y_q) / 2.0**36 - m) < 1.0e-9 && (real'(y_q) / 2.0**36 - m) > -1.0e-9,
            "registered y[n] / hold");
      // follow the block's truncated state so rounding does not accumulate
      m = real'(y_q) / 2.0**36;
    end
    // constant input: output must ramp by 2*g*x per sample
    x = fx_const(1.0, 16); g = fx_const(0.001, 36); en = 1;
    @(posedge clk); #1;
    begin
      fx_t y0;
      y0 = y_q;
      @(posedge clk); #1;
      check((y_q - y0) == 2 * g, "linear ramp");  // x = 1.0 exactly
    end
    // increments far below one Q24.16 LSB must still accumulate
    en = 0; @(posedge clk);
    x2 = fx_const(0.5, 36);
    g2 = fx_const(1.0e-7, 56);
    en = 1;
    repeat (1000) @(posedge clk);
    #1;
    m2 = real'(y2_q) / 2.0**16;
    check(m2 > 0.9e-4 && m2 < 1.1e-4, "sub-LSB accumulation with guard bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
