// fpll_core: the adaptive frequency and phase locked loop.
//
// Continuous-time loop being implemented (u = input, all gains positive):
//   e   = u - xc                       tracking error
//   e1  = K1*e - xc,   xs = int(w*e1)  quadrature (Q) oscillator state
//   xu  = xs + K2*e,   xc = int(w*xu)  in-phase (I) oscillator state
//   xw  = e*xs,        w  = int(2*gw*xw)  adaptive frequency estimate
// The two integrators in w*() form an oscillator at w rad/s; K1 and K2 pull
// its state towards the input, and the product e*xs steers w towards the
// input frequency. Once locked, xc equals the input, xs leads it by 90
// degrees, and w is the input's angular frequency.
//
// Discretisation: each integrator is a bilinear (trapezoidal) integrator.
// That makes the loop u -> e -> xs -> xc -> e algebraic (every path has a
// direct feed-through), so, as in the reference design, a unit delay is put
// in the feedback: e and e1 use the previous sample's xc. The oscillator
// integrators also use the previous sample's w. The delay costs some
// frequency accuracy, growing with f/fs (a few percent at fs = 20 f).
//
// Arithmetic: 40-bit words, Q4.36 for u, e, xs, xc, xw and w*Ts/2, Q24.16
// for w, K1*e, e1, K2*e, xu; results are truncated after each operation and
// saturated (see fpll_pkg). The frequency integrator keeps 24 extra fraction
// bits so that the small per-sample updates are not lost (this design's
// choice). Also produced: the estimate in Hz (w/(2*pi), Q24.16), a lock
// flag (lock_detector) and, by CORDIC (cordic_main), the phase
// atan2(xc, xs) and amplitude of the input, valid once locked.
//
// Timing: one input sample per clock with sample_en = 1; samples must come
// at FS_HZ, whose Ts is built into the integrator constants. The
// loop update is combinational between sample registers; out_valid pulses
// the clock after sample_en with xs, xc, omega and freq_hz of that sample.
// phase_valid follows a sample by CORDIC_ITER + 2 clocks, and only while
// locked. Reset starts the oscillator from xs = XS0, xc = XC0 at F0_HZ.
//
// Defaults follow the reference: fs = 4 MHz (20 x the 200 kHz top input
// frequency), K1 = K2 = 10, gw = 100, initial frequency 1 Hz, initial
// states xc = xs = 1. With gw = 100
// the frequency adapts slowly (hundreds of rad/s per second); raise GW for
// faster acquisition.
module fpll_core
  import fpll_pkg::*;
#(
  parameter real         FS_HZ       = 4.0e6,
  parameter real         K1          = 10.0,
  parameter real         K2          = 10.0,
  parameter real         GW          = 100.0,
  parameter real         F0_HZ       = 1.0,
  parameter real         XC0         = 1.0,
  parameter real         XS0         = 1.0,
  parameter int unsigned LOG2_WIN    = 10,
  parameter int unsigned TOL_SHIFT   = 7,
  parameter int unsigned LOCK_HITS   = 4,
  parameter int unsigned CORDIC_ITER = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_en,
  input  fx_t  u,            // input sample, Q4.36
  output logic out_valid,
  output fx_t  xc,           // I component, Q4.36
  output fx_t  xs,           // Q component, Q4.36
  output fx_t  omega,        // frequency estimate, rad/s, Q24.16
  output fx_t  freq_hz,      // frequency estimate, Hz, Q24.16
  output logic locked,
  output logic phase_valid,
  output fx_t  phase,        // rad, Q4.36
  output fx_t  magnitude     // Q4.36
);
  localparam real         HALF_TS   = 0.5 / FS_HZ;
  localparam int unsigned TS_FRAC   = fx_frac_for(HALF_TS);
  localparam fx_t         HALF_TS_C = fx_const(HALF_TS, TS_FRAC);
  localparam real         GW_TS     = GW / FS_HZ;   // (2*gw) * Ts/2
  localparam int unsigned GW_FRAC   = fx_frac_for(GW_TS);
  localparam fx_t         GW_TS_C   = fx_const(GW_TS, GW_FRAC);
  localparam fx_t         K1_C      = fx_const(K1, FRAC_W);
  localparam fx_t         K2_C      = fx_const(K2, FRAC_W);
  localparam fx_t         W0_C      = fx_const(2.0 * PI * F0_HZ, FRAC_W);
  localparam fx_t         INV_2PI_C = fx_const(1.0 / (2.0 * PI), FRAC_S);
  localparam int unsigned W_GUARD   = 24;

  fx_t xc_d, xs_n, w_q;
  fx_t xc_n, w_n;        // current-sample I and w: feed only their registers
  fx_t avg_w;            // lock detector's window average, for debug only
  fx_t w_half, e, k1e, e1, k2e, xu, xw;
  fx_t xc_d_w, xs_n_w;
  logic cordic_valid;

  // Delayed I component breaks the algebraic loop; Q24.16 copy for e1.
  assign xc_d_w = xc_d >>> (FRAC_S - FRAC_W);
  assign xs_n_w = xs_n >>> (FRAC_S - FRAC_W);

  // w*Ts/2, the scale of both oscillator integrators (Q4.36)
  fx_multiplier #(.A_FRAC(FRAC_W), .B_FRAC(TS_FRAC), .P_FRAC(FRAC_S)) u_mul_wts (
    .a(w_q), .b(HALF_TS_C), .p(w_half));

  // e = u - xc[n-1]
  fx_adder u_add_e (.a(u), .b(xc_d), .sub(1'b1), .s(e));

  // e1 = K1*e - xc[n-1]
  fx_multiplier #(.A_FRAC(FRAC_W), .B_FRAC(FRAC_S), .P_FRAC(FRAC_W)) u_mul_k1 (
    .a(K1_C), .b(e), .p(k1e));
  fx_adder u_add_e1 (.a(k1e), .b(xc_d_w), .sub(1'b1), .s(e1));

  // xs = int(w * e1)
  bilinear_integrator #(
    .IN_FRAC(FRAC_W), .G_FRAC(FRAC_S), .OUT_FRAC(FRAC_S), .GUARD(0), .INIT(fx_const(XS0, FRAC_S))
  ) u_int_s (
    .clk(clk), .rst_n(rst_n), .en(sample_en), .x(e1), .g(w_half), .y(xs_n), .y_q(xs));

  // xu = xs + K2*e
  fx_multiplier #(.A_FRAC(FRAC_W), .B_FRAC(FRAC_S), .P_FRAC(FRAC_W)) u_mul_k2 (
    .a(K2_C), .b(e), .p(k2e));
  fx_adder u_add_xu (.a(xs_n_w), .b(k2e), .sub(1'b0), .s(xu));

  // xc = int(w * xu)
  bilinear_integrator #(
    .IN_FRAC(FRAC_W), .G_FRAC(FRAC_S), .OUT_FRAC(FRAC_S), .GUARD(0), .INIT(fx_const(XC0, FRAC_S))
  ) u_int_c (
    .clk(clk), .rst_n(rst_n), .en(sample_en), .x(xu), .g(w_half), .y(xc_n), .y_q(xc_d));

  // xw = e * xs ; w = int(2*gw*xw)
  fx_multiplier #(.A_FRAC(FRAC_S), .B_FRAC(FRAC_S), .P_FRAC(FRAC_S)) u_mul_xw (
    .a(e), .b(xs_n), .p(xw));
  bilinear_integrator #(
    .IN_FRAC(FRAC_S), .G_FRAC(GW_FRAC), .OUT_FRAC(FRAC_W), .GUARD(W_GUARD), .INIT(W0_C)
  ) u_int_w (
    .clk(clk), .rst_n(rst_n), .en(sample_en), .x(xw), .g(GW_TS_C), .y(w_n), .y_q(w_q));

  // Outputs of the sample just taken
  assign xc    = xc_d;
  assign omega = w_q;
  fx_multiplier #(.A_FRAC(FRAC_W), .B_FRAC(FRAC_S), .P_FRAC(FRAC_W)) u_mul_hz (
    .a(w_q), .b(INV_2PI_C), .p(freq_hz));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= sample_en;
  end

  lock_detector #(.LOG2_WIN(LOG2_WIN), .TOL_SHIFT(TOL_SHIFT), .LOCK_HITS(LOCK_HITS)) u_lock (
    .clk(clk), .rst_n(rst_n), .en(out_valid), .omega(w_q), .locked(locked),
    .avg_omega(avg_w));

  // Phase and amplitude of the I/Q pair: atan2(I, Q) since I = A sin(theta)
  // and Q = A cos(theta) when locked.
  cordic_main #(.ITER(CORDIC_ITER)) u_cordic (
    .clk(clk), .rst_n(rst_n), .in_valid(out_valid), .x_in(xs), .y_in(xc),
    .out_valid(cordic_valid), .phase(phase), .magnitude(magnitude));

  assign phase_valid = cordic_valid & locked;
endmodule
