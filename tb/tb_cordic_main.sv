// tb_cordic_main: phase and magnitude of random vectors in all four
// quadrants against $atan2 and $sqrt, plus the ITER+1 clock latency.
module tb_cordic_main;
  import fpll_pkg::*;
  localparam int ITER = 32, N = 1000;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  fx_t x_in, y_in, phase, magnitude;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic_main #(.ITER(ITER)) dut (.clk, .rst_n, .in_valid, .x_in, .y_in, .out_valid, .phase, .magnitude);

  real rx[N], ry[N];
  int  cyc_in[N];
  int  cyc = 0, nin = 0, nout = 0, quad[4] = '{0, 0, 0, 0};
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s #%0d", what, nout); end
  endtask

  initial begin : watchdog
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real ang, len, d;
      ang = $atan2(ry[nout], rx[nout]);
      len = $sqrt(rx[nout]**2 + ry[nout]**2);
      if (len > 8.0) len = 8.0;
      d = real'(phase) / 2.0**36 - ang;
      if (d > 3.0) d -= 2.0 * 3.14159265358979;   // +pi and -pi are one angle
      if (d < -3.0) d += 2.0 * 3.14159265358979;
      check(d < 1e-8 && d > -1e-8, "phase");
      check((real'(magnitude) / 2.0**36 - len) < 1e-8 && (real'(magnitude) / 2.0**36 - len) > -1e-8, "magnitude");
      check(cyc - cyc_in[nout] == ITER + 1, "latency");
      nout++;
    end
  end

  initial begin
    x_in = '0; y_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (nin < N) begin
      @(negedge clk);
      rx[nin] = real'($urandom_range(0, 120000)) / 10000.0 - 6.0;
      ry[nin] = real'($urandom_range(0, 120000)) / 10000.0 - 6.0;
      if (nin == 0) begin rx[nin] = -1.0; ry[nin] = 0.0; end
      x_in = fx_const(rx[nin], 36);
      y_in = fx_const(ry[nin], 36);
      rx[nin] = real'(x_in) / 2.0**36;
      ry[nin] = real'(y_in) / 2.0**36;
      quad[{rx[nin] < 0.0, ry[nin] < 0.0}]++;
      in_valid = 1;
      cyc_in[nin] = cyc + 1;
      nin++;
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 4) @(posedge clk);
    check(nout == N, "all vectors delivered");
    for (int q = 0; q < 4; q++) check(quad[q] > 0, "every quadrant exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
