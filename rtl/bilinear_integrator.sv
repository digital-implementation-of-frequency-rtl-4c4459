// bilinear_integrator: discrete-time integrator obtained from 1/s with the
// bilinear (trapezoidal) transform s = 2(1 - z^-1) / (Ts(1 + z^-1)).
//
//   y[n] = y[n-1] + g * (x[n] + x[n-1])
//
// The structure follows the reference integrator: the input is added to its
// one-sample-delayed copy, scaled, and accumulated in a register. The scale
// factor g is a port so that one module serves both the I/Q oscillator
// integrators (g = omega*Ts/2, which changes as the frequency adapts) and
// the frequency integrator (g = gw*Ts, a constant); folding Ts/2 into g is
// equivalent to the reference's separate 0.5*Ts gain.
//
// Formats: x has IN_FRAC fraction bits, g has G_FRAC, y has OUT_FRAC. The
// accumulator keeps GUARD extra fraction bits below y (this design's
// choice): the frequency integrator needs them because its per-sample
// increment is far below one LSB of the Q24.16 output at the nominal gain.
//
// Timing: y is combinational from x and g and is the new output y[n] of the
// current sample, which the surrounding loop needs within the same sample.
// On a clock edge with en = 1 the state (accumulator and x[n-1]) advances,
// and y_q then holds y[n]. Reset loads y = INIT and x[n-1] = 0.
module bilinear_integrator
  import fpll_pkg::*;
#(
  parameter int unsigned IN_FRAC  = FRAC_W,
  parameter int unsigned G_FRAC   = FRAC_S,
  parameter int unsigned OUT_FRAC = FRAC_S,
  parameter int unsigned GUARD    = 0,
  parameter fx_t         INIT     = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fx_t  x,
  input  fx_t  g,
  output fx_t  y,
  output fx_t  y_q
);
  localparam int unsigned AW    = W + GUARD;
  localparam int unsigned SHIFT = IN_FRAC + G_FRAC - OUT_FRAC - GUARD;

  localparam logic signed [127:0] ACC_MAX = (128'sd1 <<< (AW - 1)) - 128'sd1;
  localparam logic signed [127:0] ACC_MIN = -(128'sd1 <<< (AW - 1));

  logic signed [AW-1:0] acc_q, acc_d;
  fx_t                  x_q;
  logic signed [W:0]    xsum;
  logic signed [127:0]  inc, nxt;

  always_comb begin
    xsum = (W+1)'(x) + (W+1)'(x_q);
    inc  = (128'(xsum) * 128'(g)) >>> SHIFT;
    nxt  = 128'(acc_q) + inc;
    if (nxt > ACC_MAX)
      acc_d = AW'(ACC_MAX);
    else if (nxt < ACC_MIN)
      acc_d = AW'(ACC_MIN);
    else
      acc_d = AW'(nxt);
    y   = fx_t'(acc_d >>> GUARD);
    y_q = fx_t'(acc_q >>> GUARD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= AW'(INIT) <<< GUARD;
      x_q   <= '0;
    end else if (en) begin
      acc_q <= acc_d;
      x_q   <= x;
    end
  end

  initial assert (IN_FRAC + G_FRAC >= OUT_FRAC + GUARD)
    else $error("bilinear_integrator: accumulator finer than the product");
endmodule
