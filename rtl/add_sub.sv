// add_sub: plain two's-complement adder/subtractor used inside the CORDIC
// micro-rotations. s = a + b when sub = 0 and a - b when sub = 1, modulo
// 2^WIDTH (CORDIC words have head room, so no saturation is needed).
// Purely combinational.
module add_sub #(
  parameter int unsigned WIDTH = 40
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic                    sub,
  output logic signed [WIDTH-1:0] s
);
  always_comb s = sub ? a - b : a + b;
endmodule
