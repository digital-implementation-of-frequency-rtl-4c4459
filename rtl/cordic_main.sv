// cordic_main: phase and magnitude of an (x, y) vector by CORDIC.
//
// In the FPLL it receives the quadrature pair of the locked oscillator,
// x = Q component (xs) and y = I component (xc), and returns
// phase = atan2(y, x) in Q4.36 radians, (-pi, pi], and
// magnitude = sqrt(x^2 + y^2) in Q4.36 (the amplitude of the input sine).
// Chain: cordic_pre (fold into the right half plane) -> cordic_core (ITER
// pipelined micro-rotations) -> cordic_post (quadrant and gain correction).
// Throughput one vector per clock; latency ITER + 1 clocks from in_valid to
// out_valid.
module cordic_main
  import fpll_pkg::*;
#(
  parameter int unsigned ITER = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  fx_t  x_in,
  input  fx_t  y_in,
  output logic out_valid,
  output fx_t  phase,
  output fx_t  magnitude
);
  localparam int unsigned CW = W + 2;

  logic signed [CW-1:0] px, py, cx;
  logic                 flip, y_neg, cvalid;
  fx_t                  cz;
  logic [1:0]           ctag;

  cordic_pre #(.WIDTH(CW)) u_pre (
    .x_in(x_in), .y_in(y_in), .x_out(px), .y_out(py), .flip(flip), .y_neg(y_neg)
  );

  cordic_core #(.WIDTH(CW), .ITER(ITER), .TAG_W(2)) u_core (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .x_in(px), .y_in(py), .tag_in({flip, y_neg}),
    .out_valid(cvalid), .x_out(cx), .z_out(cz), .tag_out(ctag)
  );

  cordic_post #(.WIDTH(CW), .ITER(ITER)) u_post (
    .clk(clk), .rst_n(rst_n), .in_valid(cvalid), .x_in(cx), .z_in(cz),
    .flip(ctag[1]), .y_neg(ctag[0]),
    .out_valid(out_valid), .phase(phase), .magnitude(magnitude)
  );
endmodule
