// cordic_pre: quadrant pre-rotation for the CORDIC vectoring unit.
//
// CORDIC vectoring converges only for vectors within about +-99 degrees of
// the x axis. A vector in the left half plane (x < 0) is therefore rotated
// by 180 degrees, i.e. both components are negated with the `negate` block;
// `flip` records that this was done and `y_neg` the sign of the original y,
// which cordic_post needs to add +pi or -pi back to the angle.
// Inputs are Q4.36; outputs are sign-extended to WIDTH bits so that the
// CORDIC gain (about 1.65) cannot overflow. Purely combinational.
module cordic_pre
  import fpll_pkg::*;
#(
  parameter int unsigned WIDTH = W + 2
) (
  input  fx_t                     x_in,
  input  fx_t                     y_in,
  output logic signed [WIDTH-1:0] x_out,
  output logic signed [WIDTH-1:0] y_out,
  output logic                    flip,
  output logic                    y_neg
);
  logic signed [WIDTH-1:0] xw, yw;

  assign xw    = WIDTH'(x_in);
  assign yw    = WIDTH'(y_in);
  assign flip  = x_in[W-1];
  assign y_neg = y_in[W-1];

  negate #(.WIDTH(WIDTH)) u_neg_x (.a(xw), .en(flip), .y(x_out));
  negate #(.WIDTH(WIDTH)) u_neg_y (.a(yw), .en(flip), .y(y_out));
endmodule
