// tb_negate: checks conditional negation, including the clamp of the most
// negative input.
module tb_negate;
  localparam int WIDTH = 42;
  logic signed [WIDTH-1:0] a, y;
  logic en;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  negate #(.WIDTH(WIDTH)) dut (.a, .en, .y);

  task automatic try(input longint x, input bit e, input longint want);
    a = WIDTH'(x); en = e; #1;
    checks++;
    if (longint'(y) != want) begin
      failures++;
      $display("FAIL a=%0d en=%0d y=%0d want=%0d", x, e, y, want);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint mn;
    mn = -(64'sd1 <<< (WIDTH - 1));
    try(mn, 1, -mn - 1);
    try(mn, 0, mn);
    try(0, 1, 0);
    for (int i = 0; i < 1000; i++) begin
      longint x;
      x = longint'({$urandom, $urandom}) >>> (64 - WIDTH);
      if (x == mn) x = 1;
      try(x, i[0], i[0] ? -x : x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
