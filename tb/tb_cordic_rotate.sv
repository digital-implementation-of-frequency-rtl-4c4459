// tb_cordic_rotate: one micro-rotation stage against the textbook
// vectoring equations computed in 64-bit integers, for several stages.
module tb_cordic_rotate;
  import fpll_pkg::*;
  localparam int WIDTH = 42;
  logic signed [WIDTH-1:0] x, y, xo0, yo0, xo5, yo5;
  fx_t z, zo0, zo5;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cordic_rotate #(.WIDTH(WIDTH), .STAGE(0)) d0 (.x_in(x), .y_in(y), .z_in(z), .x_out(xo0), .y_out(yo0), .z_out(zo0));
  cordic_rotate #(.WIDTH(WIDTH), .STAGE(5)) d5 (.x_in(x), .y_in(y), .z_in(z), .x_out(xo5), .y_out(yo5), .z_out(zo5));

  task automatic cmp(input longint got, input longint want, input string what);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s got=%0d want=%0d", what, got, want); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xi, yi, zi, a0, a5;
    // arctan(1) = pi/4 and arctan(1/32), independent of the package table
    a0 = longint'(0.78539816339744830962 * 2.0**36);
    a5 = longint'($atan(1.0 / 32.0) * 2.0**36);
    for (int i = 0; i < 1000; i++) begin
      xi = longint'($urandom) <<< 4;
      yi = longint'(int'($urandom)) <<< 4;
      zi = longint'(int'($urandom));
      x = WIDTH'(xi); y = WIDTH'(yi); z = fx_t'(zi);
      #1;
      if (yi >= 0) begin
        cmp(xo0, xi + yi, "x s0"); cmp(yo0, yi - xi, "y s0"); cmp(zo0, zi + a0, "z s0");
        cmp(xo5, xi + (yi >>> 5), "x s5"); cmp(yo5, yi - (xi >>> 5), "y s5"); cmp(zo5, zi + a5, "z s5");
      end else begin
        cmp(xo0, xi - yi, "x s0"); cmp(yo0, yi + xi, "y s0"); cmp(zo0, zi - a0, "z s0");
        cmp(xo5, xi - (yi >>> 5), "x s5"); cmp(yo5, yi + (xi >>> 5), "y s5"); cmp(zo5, zi - a5, "z s5");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
