// cordic_rotate: one CORDIC micro-rotation in vectoring mode.
//
// Stage STAGE rotates the vector (x, y) by -/+ arctan(2^-STAGE) so as to
// drive y towards zero and accumulates the rotation angle in z:
//   y >= 0:  x' = x + y>>>i,  y' = y - x>>>i,  z' = z + atan(2^-i)
//   y <  0:  x' = x - y>>>i,  y' = y + x>>>i,  z' = z - atan(2^-i)
// The three additions use the add_sub block. The angle table entry comes
// from fpll_pkg (Q4.36 radians). Purely combinational; cordic_core
// registers between stages.
module cordic_rotate
  import fpll_pkg::*;
#(
  parameter int unsigned WIDTH = W + 2,
  parameter int unsigned STAGE = 0
) (
  input  logic signed [WIDTH-1:0] x_in,
  input  logic signed [WIDTH-1:0] y_in,
  input  fx_t                     z_in,
  output logic signed [WIDTH-1:0] x_out,
  output logic signed [WIDTH-1:0] y_out,
  output fx_t                     z_out
);
  localparam fx_t ATAN = cordic_atan(STAGE);

  logic                    y_pos;
  logic signed [WIDTH-1:0] xs, ys;

  assign y_pos = ~y_in[WIDTH-1];
  assign xs    = x_in >>> STAGE;
  assign ys    = y_in >>> STAGE;

  add_sub #(.WIDTH(WIDTH)) u_x (.a(x_in), .b(ys),   .sub(~y_pos), .s(x_out));
  add_sub #(.WIDTH(WIDTH)) u_y (.a(y_in), .b(xs),   .sub(y_pos),  .s(y_out));
  add_sub #(.WIDTH(W))     u_z (.a(z_in), .b(ATAN), .sub(~y_pos), .s(z_out));
endmodule
