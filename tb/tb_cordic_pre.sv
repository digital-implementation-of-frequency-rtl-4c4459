// tb_cordic_pre: checks the half-plane fold for vectors in all quadrants.
module tb_cordic_pre;
  import fpll_pkg::*;
  localparam int WIDTH = 42;
  fx_t x_in, y_in;
  logic signed [WIDTH-1:0] x_out, y_out;
  logic flip, y_neg;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  cordic_pre #(.WIDTH(WIDTH)) dut (.x_in, .y_in, .x_out, .y_out, .flip, .y_neg);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xi, yi;
    for (int i = 0; i < 2000; i++) begin
      xi = longint'(fx_t'({$urandom, $urandom}));
      yi = longint'(fx_t'({$urandom, $urandom}));
      x_in = fx_t'(xi); y_in = fx_t'(yi);
      #1;
      checks++;
      if (flip != (xi < 0) || y_neg != (yi < 0) ||
          longint'(x_out) != ((xi < 0) ? -xi : xi) ||
          longint'(y_out) != ((xi < 0) ? -yi : yi)) begin
        failures++;
        $display("FAIL x=%0d y=%0d -> %0d %0d %b %b", xi, yi, x_out, y_out, flip, y_neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
