// negate: two's-complement negation, y = -a when en = 1, y = a otherwise.
// The most negative input is mapped to the most positive value instead of
// to itself. Used by the CORDIC pre-rotation to fold the input vector into
// the right half plane. Purely combinational.
module negate #(
  parameter int unsigned WIDTH = 40
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic                    en,
  output logic signed [WIDTH-1:0] y
);
  localparam logic signed [WIDTH-1:0] MOST_NEG = {1'b1, {(WIDTH-1){1'b0}}};

  always_comb begin
    if (!en)
      y = a;
    else if (a == MOST_NEG)
      y = ~a;
    else
      y = -a;
  end
endmodule
