// cordic_core: pipelined CORDIC vectoring engine.
//
// ITER cordic_rotate stages (shifts 0 .. ITER-1) with a register after each
// stage, so one vector is accepted per clock and the result appears ITER
// clocks later. A TAG_W-bit side band travels with each vector (used for
// the quadrant flags of cordic_pre) and `valid` marks the occupied slots.
// On exit x holds the vector length times the CORDIC gain
// (about 1.6468) and z the angle of the input vector in Q4.36 radians.
// The number of stages is this design's choice.
module cordic_core
  import fpll_pkg::*;
#(
  parameter int unsigned WIDTH = W + 2,
  parameter int unsigned ITER  = 32,
  parameter int unsigned TAG_W = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] x_in,
  input  logic signed [WIDTH-1:0] y_in,
  input  logic [TAG_W-1:0]        tag_in,
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] x_out,
  output fx_t                     z_out,
  output logic [TAG_W-1:0]        tag_out
);
  logic signed [WIDTH-1:0] x_q [ITER+1];
  logic signed [WIDTH-1:0] y_q [ITER+1];
  fx_t                     z_q [ITER+1];
  logic [TAG_W-1:0]        t_q [ITER+1];
  logic [ITER:0]           v_q;

  assign x_q[0] = x_in;
  assign y_q[0] = y_in;
  assign z_q[0] = '0;
  assign t_q[0] = tag_in;
  assign v_q[0] = in_valid;

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    logic signed [WIDTH-1:0] x_d, y_d;
    fx_t                     z_d;

    cordic_rotate #(.WIDTH(WIDTH), .STAGE(i)) u_rot (
      .x_in (x_q[i]), .y_in (y_q[i]), .z_in (z_q[i]),
      .x_out(x_d),    .y_out(y_d),    .z_out(z_d)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x_q[i+1] <= '0;
        y_q[i+1] <= '0;
        z_q[i+1] <= '0;
        t_q[i+1] <= '0;
        v_q[i+1] <= 1'b0;
      end else begin
        x_q[i+1] <= x_d;
        y_q[i+1] <= y_d;
        z_q[i+1] <= z_d;
        t_q[i+1] <= t_q[i];
        v_q[i+1] <= v_q[i];
      end
    end
  end

  assign out_valid = v_q[ITER];
  assign x_out     = x_q[ITER];
  assign z_out     = z_q[ITER];
  assign tag_out   = t_q[ITER];
endmodule
