// tb_cordic_post: checks the +-pi quadrant correction, the gain
// compensation of the length and the one-clock register stage.
module tb_cordic_post;
  import fpll_pkg::*;
  localparam int WIDTH = 42, ITER = 32;
  logic clk = 0, rst_n = 0, in_valid = 0, flip = 0, y_neg = 0, out_valid;
  logic signed [WIDTH-1:0] x_in;
  fx_t z_in, phase, magnitude;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic_post #(.WIDTH(WIDTH), .ITER(ITER)) dut (
    .clk, .rst_n, .in_valid, .x_in, .z_in, .flip, .y_neg, .out_valid, .phase, .magnitude);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s m=%f", what, real'(magnitude)/2.0**36); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real gain, z, l, want_p, want_m;
    gain = 1.0;
    for (int i = 0; i < ITER; i++) gain *= $sqrt(1.0 + 2.0 ** (-2 * i));
    x_in = '0; z_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      z = real'($urandom_range(0, 3141592)) / 2.0e6 - 0.785;   // +-1.57 rad
      l = real'($urandom_range(0, 1000000)) / 1.0e5;           // 0 .. 10
      @(negedge clk);
      flip = $urandom_range(0, 1);
      y_neg = $urandom_range(0, 1);
      z_in = fx_const(z, 36);
      x_in = WIDTH'(longint'(l * 2.0**36));  // 42-bit word, up to 10.0
      in_valid = 1;
      want_p = z + (flip ? (y_neg ? -3.14159265358979 : 3.14159265358979) : 0.0);
      want_m = l / gain;
      if (want_m > 8.0) want_m = 8.0;   // Q4.36 saturates
      @(posedge clk); #1;
      check(out_valid, "out_valid after one clock");
      check((real'(phase) / 2.0**36 - want_p) < 1e-9 && (real'(phase) / 2.0**36 - want_p) > -1e-9, "phase");
      check((real'(magnitude) / 2.0**36 - want_m) < 1e-9 && (real'(magnitude) / 2.0**36 - want_m) > -1e-9, "magnitude");
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    check(!out_valid, "out_valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
