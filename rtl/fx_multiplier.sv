// fx_multiplier: 40 x 40 signed fixed-point multiplier with format conversion.
//
// p = a * b, where a has A_FRAC fraction bits, b has B_FRAC and p is
// delivered with P_FRAC. The exact 80-bit product (A_FRAC + B_FRAC fraction
// bits) is shifted right by A_FRAC + B_FRAC - P_FRAC, dropping the low bits
// (truncation, as the reference design does after every arithmetic
// operation), and then saturated to 40 bits (this design's choice).
// Purely combinational, no latency.
module fx_multiplier
  import fpll_pkg::*;
#(
  parameter int unsigned A_FRAC = FRAC_S,
  parameter int unsigned B_FRAC = FRAC_S,
  parameter int unsigned P_FRAC = FRAC_S
) (
  input  fx_t a,
  input  fx_t b,
  output fx_t p
);
  localparam int unsigned SHIFT = A_FRAC + B_FRAC - P_FRAC;

  logic signed [2*W-1:0] prod;

  always_comb begin
    prod = (2*W)'(a) * (2*W)'(b);
    p    = fx_sat(128'(prod) >>> SHIFT);
  end

  initial assert (A_FRAC + B_FRAC >= P_FRAC)
    else $error("fx_multiplier: output format finer than the product");
endmodule
