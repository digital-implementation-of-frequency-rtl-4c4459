// tb_fpll_main_full: the top level at its default parameters (40 MHz clock,
// fs = 4 MHz, K1 = K2 = 10, gw = 100, start at 1 Hz with xc = xs = 1).
//
// With the nominal adaptation gain the frequency moves by a fraction of a
// hertz per second, so the complete operation shown here is a slow one: a
// 1.25 Hz sine of amplitude 0.8 is sampled by a behavioural ADC for 2.0 s
// of simulated time (8 million samples) while the estimate climbs from its
// 1 Hz start. Checked:
//   - exactly one conversion per CLK_DIV clocks;
//   - the estimate ends within 8 % of the input frequency and is still
//     closer at 2.0 s than at 1.0 s;
//   - in the last 0.25 s the I DAC code follows the ADC input and the CORDIC
//     phase follows the input phase;
//   - the lock flag was raised and phase outputs were delivered.
// Run time is a few minutes of wall clock.
module tb_fpll_main_full;
  import fpll_pkg::*;

  localparam real F_IN = 1.25, AMP = 0.8, FS = 4.0e6;
  localparam int  CLK_DIV = 10, ADC_W = 12;
  localparam longint NS = 8_000_000;   // 2.0 s of samples

  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] adc_data;
  logic adc_convst, dac_wr, locked, phase_valid;
  logic [11:0] dac_i, dac_q;
  fx_t omega, freq_hz, phase, magnitude;

  fpll_main dut (
    .clk, .rst_n, .adc_data, .adc_convst, .dac_i, .dac_q, .dac_wr,
    .omega, .freq_hz, .locked, .phase_valid, .phase, .magnitude);

  always #12.5 clk = ~clk;   // 40 MHz

  int checks = 0, failures = 0;
  int n_lock = 0, n_phase = 0, bad_i = 0, bad_ph = 0, n_i = 0, n_ph = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (int'(NS) * CLK_DIV + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge locked) n_lock++;

  // Phase outputs arrive CORDIC_ITER + 2 clocks after their sample, within
  // the same sample period; at 1.25 Hz the input phase moves by 2e-6 rad
  // per sample, so the phase of the latest conversion is the reference.
  real th_now = 0.0;
  bit  late = 0;
  always @(posedge clk) begin
    if (phase_valid) begin
      n_phase++;
      if (late) begin
        real d;
        n_ph++;
        d = wrap(real'(phase) / 2.0**36 - th_now);
        if (d > 0.2 || d < -0.2) bad_ph++;
      end
    end
  end

  function automatic real wrap(input real a);
    real r;
    r = a;
    while (r > PI) r -= 2.0 * PI;
    while (r < -PI) r += 2.0 * PI;
    return r;
  endfunction

  initial begin
    longint k = 0, last_cyc = 0, cyc = 0;
    real f1s, f2s, th, d;
    adc_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (k < NS) begin
      @(posedge clk);
      cyc++;
      if (!adc_convst) continue;
      if (k > 0) check(cyc - last_cyc == CLK_DIV, "one conversion per sample period");
      last_cyc = cyc;
      th = 2.0 * PI * F_IN * real'(k) / FS;
      th_now = wrap(th);
      late = (k > NS - NS / 8);
      adc_data <= ADC_W'($rtoi($floor(AMP * $sin(th) * 2048.0)));
      // the I DAC code written now belongs to the previous conversion's sample
      if (k > NS - NS / 8) begin
        d = (real'(dac_i) - 2048.0) / 2048.0 - AMP * $sin(th - 2.0 * (2.0 * PI * F_IN / FS));
        n_i++;
        if (d > 0.02 || d < -0.02) bad_i++;
      end
      if (k == NS / 2) f1s = real'(freq_hz) / 2.0**16;
      k++;
    end
    f2s = real'(freq_hz) / 2.0**16;
    $display("estimate at 1.0 s: %0.4f Hz, at 2.0 s: %0.4f Hz (input %0.2f Hz)", f1s, f2s, F_IN);
    $display("I-vs-input misses %0d of %0d, phase misses %0d of %0d, lock rises %0d, phase outputs %0d",
             bad_i, n_i, bad_ph, n_ph, n_lock, n_phase);
    check(f2s > F_IN * 0.92 && f2s < F_IN * 1.08, "estimate within 8 % after 2 s");
    check((F_IN - f2s) < (F_IN - f1s), "estimate converging");
    check(bad_i == 0 && n_i > 0, "I component follows the input");
    check(bad_ph == 0 && n_ph > 0, "phase follows the input");
    check(n_lock >= 1, "lock flag raised");
    check(n_phase > 0, "phase outputs delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
