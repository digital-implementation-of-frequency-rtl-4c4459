// tb_cordic_core: streams right-half-plane vectors through the pipelined
// CORDIC core, one per clock with random gaps, and checks angle
// (atan2), scaled length (gain 1.6468 x hypot), side-band tag and the
// ITER-clock latency.
module tb_cordic_core;
  import fpll_pkg::*;
  localparam int WIDTH = 42, ITER = 32, N = 500;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [WIDTH-1:0] x_in, y_in, x_out;
  fx_t z_out;
  logic [1:0] tag_in, tag_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic_core #(.WIDTH(WIDTH), .ITER(ITER), .TAG_W(2)) dut (
    .clk, .rst_n, .in_valid, .x_in, .y_in, .tag_in, .out_valid, .x_out, .z_out, .tag_out);

  real rx[N], ry[N];
  int  tin[N], cyc_in[N];
  int  cyc = 0, nin = 0, nout = 0;
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
      real ang, len, gain;
      gain = 1.0;
      for (int i = 0; i < ITER; i++) gain *= $sqrt(1.0 + 2.0 ** (-2 * i));
      ang = $atan2(ry[nout], rx[nout]);
      len = $sqrt(rx[nout]**2 + ry[nout]**2) * gain;
      check((real'(z_out) / 2.0**36 - ang) < 1e-8 && (real'(z_out) / 2.0**36 - ang) > -1e-8, "angle");
      check((real'(x_out) / 2.0**36 - len) < 1e-8 && (real'(x_out) / 2.0**36 - len) > -1e-8, "length");
      check(tag_out == 2'(tin[nout]), "tag");
      check(cyc - cyc_in[nout] == ITER, "latency");
      nout++;
    end
  end

  initial begin
    x_in = '0; y_in = '0; tag_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (nin < N) begin
      @(negedge clk);
      if ($urandom_range(0, 4) != 0) begin
        rx[nin] = real'($urandom_range(0, 100000)) / 12500.0;       // 0 .. 8
        ry[nin] = real'($urandom_range(0, 200000)) / 12500.0 - 8.0; // -8 .. 8
        tin[nin] = int'($urandom_range(0, 3));
        x_in = fx_const(rx[nin], 36);
        y_in = fx_const(ry[nin], 36);
        rx[nin] = real'(x_in) / 2.0**36;
        ry[nin] = real'(y_in) / 2.0**36;
        tag_in = 2'(tin[nin]);
        in_valid = 1;
        cyc_in[nin] = cyc + 1;
        nin++;
      end else
        in_valid = 0;
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 3) @(posedge clk);
    check(nout == N, "all vectors delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
