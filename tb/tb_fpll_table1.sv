// tb_fpll_table1: frequency estimation across the input frequencies of the
// reference results table (700 Hz to 70 kHz), at fs = 4 MHz and K = 10.
//
// One fpll_core per input frequency runs in parallel, each started at 90 %
// of its input (and at the default xc = xs = 1) with GW raised to
// 1e5 x f_in so that acquisition fits in 60000 samples (15 ms) without
// the start transient overdriving the slower loops. The estimate, averaged over the last 20 % of the run, must
// lie within 8 % of the input, the bound the reference states for its
// hardware; each loop must also report lock. The estimates are printed with
// their error; the one-sample delay in the loop makes the error grow with
// f/fs (about 0.1 % at 1.3 kHz, about 5.5 % at 70 kHz).
// The table's 700 kHz row and the 200 kHz top of the band cannot run at
// fs = 4 MHz: with K = 10 and the feedback delay the oscillator loop is
// unstable above roughly fs/35 (about 110 kHz). They are run here at
// fs = 40 MHz (the top level with CLK_DIV = 1), where the same 8 % bound is
// checked; GW is 1e6 x f_in for these two.
module tb_fpll_table1;
  import fpll_pkg::*;

  localparam int  NF = 6;
  localparam real FREQ [NF] = '{700.0, 1300.0, 3500.0, 6500.0, 7000.0, 70000.0};
  localparam real FS = 4.0e6, AMP = 0.8;
  localparam int  NSAMP = 60000;
  localparam int  NH = 2;
  localparam real FREQ_H [NH] = '{200000.0, 700000.0};
  localparam real FS_H = 40.0e6;

  logic clk = 0, rst_n = 0, sample_en = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fx_t  u      [NF];
  fx_t  fhz    [NF];
  logic lockd  [NF];
  real  acc    [NF];
  fx_t  u_h    [NH];
  fx_t  fhz_h  [NH];
  logic lockd_h[NH];
  real  acc_h  [NH];

  for (genvar i = 0; i < NH; i++) begin : g_loop_h
    logic ov, pv;
    fx_t  xc, xs, om, ph, mg;
    fpll_core #(.FS_HZ(FS_H), .GW(1.0e6 * FREQ_H[i]), .F0_HZ(0.9 * FREQ_H[i])) dut (
      .clk, .rst_n, .sample_en, .u(u_h[i]), .out_valid(ov), .xc, .xs, .omega(om),
      .freq_hz(fhz_h[i]), .locked(lockd_h[i]), .phase_valid(pv), .phase(ph), .magnitude(mg));
  end

  for (genvar i = 0; i < NF; i++) begin : g_loop
    logic ov, pv;
    fx_t  xc, xs, om, ph, mg;
    fpll_core #(.FS_HZ(FS), .GW(1.0e5 * FREQ[i]), .F0_HZ(0.9 * FREQ[i])) dut (
      .clk, .rst_n, .sample_en, .u(u[i]), .out_valid(ov), .xc, .xs, .omega(om),
      .freq_hz(fhz[i]), .locked(lockd[i]), .phase_valid(pv), .phase(ph), .magnitude(mg));
  end

  initial begin : watchdog
    repeat (NSAMP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NF; i++) begin acc[i] = 0.0; u[i] = '0; end
    for (int i = 0; i < NH; i++) begin acc_h[i] = 0.0; u_h[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NSAMP; n++) begin
      for (int i = 0; i < NF; i++)
        u[i] <= fx_const(AMP * $sin(2.0 * PI * FREQ[i] * real'(n) / FS), 36);
      for (int i = 0; i < NH; i++)
        u_h[i] <= fx_const(AMP * $sin(2.0 * PI * FREQ_H[i] * real'(n) / FS_H), 36);
      sample_en <= 1'b1;
      @(posedge clk); #1;
      if (n >= NSAMP - NSAMP / 5) begin
        for (int i = 0; i < NF; i++) acc[i] += real'(fhz[i]) / 2.0**16;
        for (int i = 0; i < NH; i++) acc_h[i] += real'(fhz_h[i]) / 2.0**16;
      end
    end
    for (int i = 0; i < NF; i++) begin
      real est;
      est = acc[i] / real'(NSAMP / 5);
      $display("input %8.1f Hz  estimate %10.2f Hz  error %6.2f %%  locked %0b",
               FREQ[i], est, 100.0 * (est - FREQ[i]) / FREQ[i], lockd[i]);
      checks++;
      if (est > 1.08 * FREQ[i] || est < 0.92 * FREQ[i]) begin
        failures++; $display("FAIL estimate outside 8 %%");
      end
      checks++;
      if (!lockd[i]) begin failures++; $display("FAIL not locked"); end
    end
    for (int i = 0; i < NH; i++) begin
      real est;
      est = acc_h[i] / real'(NSAMP / 5);
      $display("input %8.1f Hz  estimate %10.2f Hz  error %6.2f %%  locked %0b  (fs = 40 MHz)",
               FREQ_H[i], est, 100.0 * (est - FREQ_H[i]) / FREQ_H[i], lockd_h[i]);
      checks++;
      if (est > 1.08 * FREQ_H[i] || est < 0.92 * FREQ_H[i]) begin
        failures++; $display("FAIL estimate outside 8 %%");
      end
      checks++;
      if (!lockd_h[i]) begin failures++; $display("FAIL not locked"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
