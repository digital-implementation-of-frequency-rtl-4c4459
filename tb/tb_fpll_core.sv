// tb_fpll_core: self-checking test of the adaptive loop, lock flag and CORDIC.
//
// A sine wave of F_IN Hz is fed to fpll_core one sample per clock. In
// parallel the testbench runs a double-precision model of the same
// difference equations (bilinear integrators, unit delay on the I feedback,
// previous-sample frequency in the oscillator integrators) and compares the
// core's I, Q and frequency outputs with it every sample. It further
// checks that the estimate settles within 8 % of F_IN and within 0.1 % of
// the model, that `locked` rises, that the CORDIC phase and magnitude match
// atan2 / hypot of the model's I and Q at the right latency, and that
// out_valid follows sample_en by one clock. GW is raised so that the
// frequency is acquired within a few tens of thousands of samples; with
// that gain the default start state xc = xs = 1 kicks the frequency into
// saturation, which the unsaturated model cannot follow, so the oscillator
// starts at rest here (the top-level test keeps the default).
module tb_fpll_core;
  import fpll_pkg::*;

  localparam real         FS     = 4.0e6;
  localparam real         F_IN   = 50.0e3;
  localparam real         F0     = 40.0e3;
  localparam real         GWT    = 1.0e10;
  localparam real         KK     = 10.0;
  localparam int unsigned ITER   = 32;
  localparam int          NSAMP  = 40000;
  localparam real         SCALE_S = 2.0 ** 36;
  localparam real         SCALE_W = 2.0 ** 16;

  logic clk = 0, rst_n = 0, sample_en = 0;
  fx_t  u;
  logic out_valid, locked, phase_valid;
  fx_t  xc, xs, omega, freq_hz, phase, magnitude;

  fpll_core #(.FS_HZ(FS), .K1(KK), .K2(KK), .GW(GWT), .F0_HZ(F0), .XC0(0.0), .XS0(0.0),
              .LOG2_WIN(10), .TOL_SHIFT(7), .LOCK_HITS(4), .CORDIC_ITER(ITER)) dut (
    .clk, .rst_n, .sample_en, .u, .out_valid, .xc, .xs, .omega, .freq_hz,
    .locked, .phase_valid, .phase, .magnitude);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lock = 0, n_phase = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference model state
  real m_xs, m_xc, m_w, m_ps, m_pc, m_pw;
  real hist_xc[0:NSAMP-1], hist_xs[0:NSAMP-1];

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic model_step(input real uu);
    real h, e, e1, xu, xw, ds, dc, dw, wp;
    h  = 0.5 / FS;
    wp = m_w;
    e  = uu - m_xc;
    e1 = KK * e - m_xc;
    ds = e1; m_xs = m_xs + wp * h * (ds + m_ps); m_ps = ds;
    xu = m_xs + KK * e;
    dc = xu; m_xc = m_xc + wp * h * (dc + m_pc); m_pc = dc;
    xw = e * m_xs;
    dw = xw; m_w = m_w + (GWT / FS) * (dw + m_pw); m_pw = dw;
  endtask

  initial begin : watchdog
    repeat (NSAMP + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase / magnitude checker: the output for the sample taken on clock c
  // must appear, while locked, on clock c + ITER + 2
  int cyc = 0, n_se = 0;
  int idx_by_cyc[int];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && sample_en) begin
      idx_by_cyc[cyc] = n_se;
      n_se++;
    end
    if (rst_n && phase_valid) begin
      n_phase++;
      check(idx_by_cyc.exists(cyc - (ITER + 2)), "phase latency ITER + 2");
      if (idx_by_cyc.exists(cyc - (ITER + 2))) begin
        int k;
        real pr, mr, pd, md;
        k  = idx_by_cyc[cyc - (ITER + 2)];
        pr = $atan2(hist_xc[k], hist_xs[k]);
        mr = $sqrt(hist_xc[k]**2 + hist_xs[k]**2);
        pd = real'(phase) / SCALE_S;
        md = real'(magnitude) / SCALE_S;
        // wrap the difference (angles near +-pi)
        pd = pd - pr;
        if (pd > PI) pd -= 2.0 * PI;
        if (pd < -PI) pd += 2.0 * PI;
        check(fabs(pd) < 1.0e-4, "cordic phase");
        check(fabs(md - mr) < 1.0e-4, "cordic magnitude");
      end
    end
  end

  initial begin
    real uu, f_est, f_mod;
    m_xs = 0.0; m_xc = 0.0; m_w = 2.0 * PI * F0; m_ps = 0; m_pc = 0; m_pw = 0;
    u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      uu = 0.9 * $sin(2.0 * PI * F_IN * real'(n) / FS);
      u <= fx_const(uu, 36);
      sample_en <= 1'b1;
      @(posedge clk);
      model_step(real'(fx_const(uu, 36)) / SCALE_S);
      hist_xc[n] = m_xc;
      hist_xs[n] = m_xs;
      #1;
      check(out_valid, "out_valid one clock after sample_en");
      check(fabs(real'(xc) / SCALE_S - m_xc) < 1.0e-3, "I component vs model");
      check(fabs(real'(xs) / SCALE_S - m_xs) < 1.0e-3, "Q component vs model");
      check(fabs(real'(omega) / SCALE_W - m_w) < 1.0e-3 * m_w, "omega vs model");
      if (locked) n_lock++;
    end
    sample_en <= 1'b0;
    @(posedge clk); #1;
    check(!out_valid, "out_valid drops without sample_en");
    f_est = real'(freq_hz) / SCALE_W;
    f_mod = m_w / (2.0 * PI);
    $display("F_IN=%0f  estimate=%0f Hz  model=%0f Hz  locked samples=%0d phase outputs=%0d",
             F_IN, f_est, f_mod, n_lock, n_phase);
    check(fabs(f_est - F_IN) < 0.08 * F_IN, "estimate within 8% of the input");
    check(fabs(f_est - f_mod) < 1.0e-3 * f_mod, "estimate vs model");
    check(locked, "locked at the end");
    check(n_phase > 1000, "phase outputs delivered while locked");
    repeat (ITER + 4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
