// fpll_pkg: shared fixed-point formats, constants and helper functions of the
// adaptive frequency and phase locked loop (FPLL).
//
// Every datapath word is 40 bits wide. Two formats are used, as in the
// reference design: Q4.36 (4 integer bits including the sign, 36 fraction
// bits) where fraction precision matters (input sample, error, I/Q
// components, angles) and Q24.16 where integer range matters (angular
// frequency in rad/s, the loop gains K1 and K2 and the signals they scale).
// Constants that are far below one (Ts/2, gw*Ts) are stored in 40 bits with
// as many fraction bits as fit; fx_frac_for() picks that count at
// elaboration time. Every conversion between formats drops the low bits
// (truncation toward minus infinity) and, as this design's own choice,
// saturates instead of wrapping on overflow.
package fpll_pkg;

  localparam int unsigned W      = 40;  // datapath word
  localparam int unsigned FRAC_S = 36;  // Q4.36 signal format
  localparam int unsigned FRAC_W = 16;  // Q24.16 frequency / gain format

  typedef logic signed [W-1:0] fx_t;

  localparam real PI = 3.14159265358979323846;

  localparam fx_t FX_MAX = {1'b0, {(W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(W-1){1'b0}}};

  // Nearest fixed-point word for a real value with `frac` fraction bits.
  function automatic fx_t fx_const(input real v, input int frac);
    return fx_t'(longint'(v * (2.0 ** frac)));  // the cast rounds to nearest
  endfunction

  // Largest fraction-bit count (up to 62) for which |v| still fits in a
  // signed W-bit word; used for the tiny constants Ts/2 and gw*Ts.
  function automatic int fx_frac_for(input real v);
    int f;
    real a;
    a = (v < 0.0) ? -v : v;
    f = 0;
    while ((f < 62) && (a * (2.0 ** (f + 1)) < 2.0 ** (W - 2)))
      f++;
    return f;
  endfunction

  // Arithmetic right shift of a wide intermediate result followed by
  // saturation to one W-bit word.
  function automatic fx_t fx_sat(input logic signed [127:0] v);
    if (v > 128'(signed'(FX_MAX)))
      return FX_MAX;
    else if (v < 128'(signed'(FX_MIN)))
      return FX_MIN;
    else
      return fx_t'(v);
  endfunction

  // arctan(2^-i) in Q4.36, the CORDIC angle table.
  function automatic fx_t cordic_atan(input int i);
    return fx_const($atan(2.0 ** (-i)), FRAC_S);
  endfunction

  // 1 / prod_i sqrt(1 + 2^-2i), the inverse CORDIC gain after n stages.
  function automatic real cordic_inv_gain(input int n);
    real g;
    g = 1.0;
    for (int i = 0; i < n; i++)
      g = g * $sqrt(1.0 + 2.0 ** (-2 * i));
    return 1.0 / g;
  endfunction

endpackage
