// fx_adder: saturating fixed-point adder/subtractor of the FPLL datapath.
//
// s = a + b when sub = 0, s = a - b when sub = 1. Both operands and the
// result share one format (any of the package formats; the binary point does
// not matter to addition). The 41-bit exact result is clamped to the 40-bit
// range instead of wrapping, which keeps a large start-up error from turning
// into a sign flip inside the loop. Purely combinational, no latency.
// The block is the design's "Adder"; the saturation is this design's choice.
module fx_adder
  import fpll_pkg::*;
(
  input  fx_t  a,
  input  fx_t  b,
  input  logic sub,
  output fx_t  s
);
  logic signed [W:0] sum;

  always_comb begin
    sum = sub ? (W+1)'(a) - (W+1)'(b) : (W+1)'(a) + (W+1)'(b);
    s   = fx_sat(128'(sum));
  end
endmodule
