// tb_fpll_main: end-to-end test of the FPLL through its converter ports.
//
// A behavioural ADC answers every adc_convst with a 12-bit code of
// A*sin(theta), theta advancing by 2*pi*f/fs per conversion. The input
// frequency starts at F1 and steps to F2 halfway (a frequency switch that
// must make the loop re-acquire). GW is raised and the initial frequency is
// put near F1 so that acquisition takes a few thousand samples; everything
// else is at its default. Checked:
//   - one conversion and one DAC write per sample period (CLK_DIV clocks);
//   - the frequency estimate settles within 8 % of F1 and of F2;
//   - lock is acquired, lost at the step, and acquired again;
//   - phase and magnitude while locked (outside two lock-detector windows
//     after the step, during which the flag may still be stale) match the input's phase and
//     amplitude (CORDIC output aligned with the sample that produced it);
//   - the I DAC code follows the input sample.
// Each mechanism (sample, DAC write, lock, unlock, relock, phase output) is
// counted and a failure is counted for any that never happened.
module tb_fpll_main;
  import fpll_pkg::*;

  localparam real F1 = 50.0e3, F2 = 30.0e3, AMP = 0.8;
  localparam int  NSAMP = 40000;      // per frequency
  localparam int  CLK_DIV = 10, ITER = 32, ADC_W = 12, DAC_W = 12;
  localparam real FS = 40.0e6 / CLK_DIV;

  logic clk = 0, rst_n = 0;
  logic signed [ADC_W-1:0] adc_data;
  logic adc_convst, dac_wr, locked, phase_valid;
  logic [DAC_W-1:0] dac_i, dac_q;
  fx_t omega, freq_hz, phase, magnitude;

  fpll_main #(.GW(1.0e10), .F0_HZ(45.0e3)) dut (
    .clk, .rst_n, .adc_data, .adc_convst, .dac_i, .dac_q, .dac_wr,
    .omega, .freq_hz, .locked, .phase_valid, .phase, .magnitude);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conv = 0, n_samp = 0, n_dac = 0, n_lock = 0, n_unlock = 0, n_phase = 0;
  real f_in = F1, theta = 0.0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic real wrap(input real a);
    real r;
    r = a;
    while (r > PI) r -= 2.0 * PI;
    while (r < -PI) r += 2.0 * PI;
    return r;
  endfunction

  initial begin : watchdog
    repeat ((2 * NSAMP + 100) * CLK_DIV) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural ADC: converts on convst, result valid until the next one
  real conv_theta[$];
  always @(posedge clk) begin
    if (rst_n && adc_convst) begin
      adc_data <= ADC_W'($rtoi($floor(AMP * $sin(theta) * 2.0 ** (ADC_W - 1))));
      conv_theta.push_back(theta);
      theta = wrap(theta + 2.0 * PI * f_in / FS);
      n_conv++;
    end
  end

  // bookkeeping on the sample path: sample k is captured at the tick after
  // its conversion started (adc_convst and the internal sample strobe share
  // that tick); its phase output must appear CORDIC_ITER + 2 clocks later
  int last_samp_cyc = -1, cyc = 0;
  real th_by_cyc[int];
  logic prev_locked = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && adc_convst) begin
      if (n_samp > 0) begin
        th_by_cyc[cyc] = conv_theta.pop_front();
        if (last_samp_cyc >= 0) check(cyc - last_samp_cyc == CLK_DIV, "sample period");
      end
      last_samp_cyc = cyc;
      n_samp++;
    end
    // the lock flag reacts one window (1024 samples) after a disturbance:
    // skip two windows after the frequency step
    if (rst_n && phase_valid && (n_samp < NSAMP || n_samp > NSAMP + 2048)) begin
      real th;
      n_phase++;
      check(th_by_cyc.exists(cyc - (ITER + 2)), "phase latency CORDIC_ITER + 2");
      th = th_by_cyc.exists(cyc - (ITER + 2)) ? th_by_cyc[cyc - (ITER + 2)] : 0.0;
      check(wrap(real'(phase) / 2.0**36 - th) < 0.12 && wrap(real'(phase) / 2.0**36 - th) > -0.12,
            "phase tracks the input");
      check((real'(magnitude) / 2.0**36 - AMP) < 0.1 * AMP && (real'(magnitude) / 2.0**36 - AMP) > -0.1 * AMP,
            "magnitude equals the input amplitude");
    end
    if (rst_n && dac_wr) n_dac++;
    if (locked && !prev_locked) n_lock++;
    if (!locked && prev_locked) n_unlock++;
    prev_locked = locked;
  end

  initial begin
    real f_est;
    adc_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: F1
    repeat (NSAMP * CLK_DIV) @(posedge clk);
    f_est = real'(freq_hz) / 2.0**16;
    $display("input %0.0f Hz -> estimate %0.1f Hz (%0.2f %%), locked=%0b", F1, f_est,
             100.0 * (f_est - F1) / F1, locked);
    check((f_est - F1) < 0.08 * F1 && (f_est - F1) > -0.08 * F1, "estimate within 8% of F1");
    check(locked, "locked on F1");
    // phase 2: frequency step
    f_in = F2;
    repeat (NSAMP * CLK_DIV) @(posedge clk);
    f_est = real'(freq_hz) / 2.0**16;
    $display("input %0.0f Hz -> estimate %0.1f Hz (%0.2f %%), locked=%0b", F2, f_est,
             100.0 * (f_est - F2) / F2, locked);
    check((f_est - F2) < 0.08 * F2 && (f_est - F2) > -0.08 * F2, "estimate within 8% of F2");
    check(locked, "locked on F2");
    // I DAC code against the input: I equals the input once locked
    begin
      real di;
      @(posedge clk iff dac_wr); #1;
      di = (real'(dac_i) - 2048.0) / 2048.0;
      check(di < AMP + 0.05 && di > -AMP - 0.05, "I DAC code within the input range");
    end
    $display("samples=%0d conversions=%0d dac_writes=%0d lock=%0d unlock=%0d phase_outputs=%0d",
             n_samp, n_conv, n_dac, n_lock, n_unlock, n_phase);
    check(n_samp > 2 * NSAMP - 10, "samples taken");
    check(n_dac > 2 * NSAMP - 10, "DAC writes");
    check(n_lock >= 2, "lock acquired, and re-acquired after the step");
    check(n_unlock >= 1, "lock lost on the frequency step");
    check(n_phase > 1000, "phase outputs while locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
