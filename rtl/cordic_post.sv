// cordic_post: output stage of the CORDIC vectoring unit.
//
// Undoes the 180-degree pre-rotation of cordic_pre: when `flip` is set the
// angle gets +pi added (original y >= 0) or -pi (original y < 0), which
// keeps it in (-pi, pi]. The length from cordic_core carries the CORDIC gain
// of ITER stages; it is multiplied by the inverse gain (computed at
// elaboration, held in Q4.36) and saturated to Q4.36. One register stage.
module cordic_post
  import fpll_pkg::*;
#(
  parameter int unsigned WIDTH = W + 2,
  parameter int unsigned ITER  = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] x_in,
  input  fx_t                     z_in,
  input  logic                    flip,
  input  logic                    y_neg,
  output logic                    out_valid,
  output fx_t                     phase,
  output fx_t                     magnitude
);
  localparam fx_t PI_FX    = fx_const(PI, FRAC_S);
  localparam fx_t INV_GAIN = fx_const(cordic_inv_gain(ITER), FRAC_S);

  fx_t                 ang_d, mag_d;
  logic signed [127:0] prod;

  always_comb begin
    if (!flip)
      ang_d = z_in;
    else if (y_neg)
      ang_d = z_in - PI_FX;
    else
      ang_d = z_in + PI_FX;
    prod  = (128'(x_in) * 128'(INV_GAIN)) >>> FRAC_S;
    mag_d = fx_sat(prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      phase     <= '0;
      magnitude <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phase     <= ang_d;
        magnitude <= mag_d;
      end
    end
  end
endmodule
