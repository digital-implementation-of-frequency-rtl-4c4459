// tb_add_sub: random test of the CORDIC adder/subtractor (modulo 2^WIDTH).
module tb_add_sub;
  localparam int WIDTH = 42;
  logic signed [WIDTH-1:0] a, b, s;
  logic sub;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  add_sub #(.WIDTH(WIDTH)) dut (.a, .b, .sub, .s);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, y, r;
    for (int i = 0; i < 2000; i++) begin
      x = longint'({$urandom, $urandom}) >>> 23;
      y = longint'({$urandom, $urandom}) >>> 23;
      a = WIDTH'(x); b = WIDTH'(y); sub = i[0];
      #1;
      r = sub ? x - y : x + y;
      checks++;
      if (s != WIDTH'(r)) begin
        failures++;
        $display("FAIL %0d %0d sub=%0d -> %0d", x, y, sub, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
