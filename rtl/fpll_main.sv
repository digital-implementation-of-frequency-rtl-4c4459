// fpll_main: adaptive frequency and phase locked loop with converter
// interfaces - the top level.
//
// An external ADC samples a sine wave at fs = CLK_HZ / CLK_DIV
// (adc_interface). Every sample drives one update of the adaptive loop
// (fpll_core), which estimates the input's frequency (omega in rad/s and
// freq_hz in Hz), regenerates its in-phase and quadrature components, flags
// lock, and then gives the input's phase and amplitude by CORDIC. The I and
// Q components go out to two DACs (dac_interface).
//
// Ports: adc_data / adc_convst to the ADC, dac_i / dac_q / dac_wr to the
// DACs, and the estimates as Q24.16 (omega, freq_hz) and Q4.36 (phase in
// rad, magnitude) words. Estimates change once per sample period, one
// clock after the sample is taken; phase/magnitude follow CORDIC_ITER + 1
// clocks later and phase_valid marks them while the loop is locked.
// The hierarchy (ADC interface, core with adder, multiplier and CORDIC, DAC
// interface) follows the reference design; the 40 MHz clock is an
// assumption, chosen so that fs is the reference's 4 MHz.
module fpll_main
  import fpll_pkg::*;
#(
  parameter real         CLK_HZ      = 40.0e6,
  parameter int unsigned CLK_DIV     = 10,
  parameter int unsigned ADC_W       = 12,
  parameter int unsigned DAC_W       = 12,
  parameter real         K1          = 10.0,
  parameter real         K2          = 10.0,
  parameter real         GW          = 100.0,
  parameter real         F0_HZ       = 1.0,
  parameter int unsigned LOG2_WIN    = 10,
  parameter int unsigned TOL_SHIFT   = 7,
  parameter int unsigned LOCK_HITS   = 4,
  parameter int unsigned CORDIC_ITER = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    adc_convst,
  output logic [DAC_W-1:0]        dac_i,
  output logic [DAC_W-1:0]        dac_q,
  output logic                    dac_wr,
  output fx_t                     omega,
  output fx_t                     freq_hz,
  output logic                    locked,
  output logic                    phase_valid,
  output fx_t                     phase,
  output fx_t                     magnitude
);
  localparam real FS_HZ = CLK_HZ / real'(CLK_DIV);

  logic sample_en, est_valid;
  fx_t  u, xc, xs;

  adc_interface #(.CLK_DIV(CLK_DIV), .ADC_W(ADC_W)) u_adc (
    .clk(clk), .rst_n(rst_n), .adc_data(adc_data), .adc_convst(adc_convst),
    .sample_en(sample_en), .u(u));

  fpll_core #(
    .FS_HZ(FS_HZ), .K1(K1), .K2(K2), .GW(GW), .F0_HZ(F0_HZ),
    .LOG2_WIN(LOG2_WIN), .TOL_SHIFT(TOL_SHIFT), .LOCK_HITS(LOCK_HITS),
    .CORDIC_ITER(CORDIC_ITER)
  ) u_core (
    .clk(clk), .rst_n(rst_n), .sample_en(sample_en), .u(u),
    .out_valid(est_valid), .xc(xc), .xs(xs), .omega(omega), .freq_hz(freq_hz),
    .locked(locked), .phase_valid(phase_valid), .phase(phase), .magnitude(magnitude));

  dac_interface #(.DAC_W(DAC_W)) u_dac (
    .clk(clk), .rst_n(rst_n), .load(est_valid), .i_in(xc), .q_in(xs),
    .dac_i(dac_i), .dac_q(dac_q), .dac_wr(dac_wr));
endmodule
