// tb_fx_adder: random and corner-case test of the saturating adder/subtractor
// against a 64-bit integer reference with explicit clamping.
module tb_fx_adder;
  import fpll_pkg::*;
  fx_t a, b, s;
  logic sub;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  fx_adder dut (.a, .b, .sub, .s);

  function automatic longint ref_sum(input longint x, input longint y, input bit sb);
    longint r;
    longint mx;
    mx = (64'sd1 <<< 39) - 1;
    r = sb ? x - y : x + y;
    if (r > mx) r = mx;
    if (r < -mx - 1) r = -mx - 1;
    return r;
  endfunction

  task automatic try(input longint x, input longint y, input bit sb);
    a = fx_t'(x); b = fx_t'(y); sub = sb;
    #1;
    checks++;
    if (longint'(s) != ref_sum(x, y, sb)) begin
      failures++;
      $display("FAIL a=%0d b=%0d sub=%0d s=%0d", x, y, sb, s);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint mx;
    mx = (64'sd1 <<< 39) - 1;
    try(5, 7, 0); try(5, 7, 1); try(-3, -4, 0);
    try(mx, 1, 0); try(-mx - 1, 1, 1); try(mx, -mx - 1, 1); try(-mx - 1, mx, 1);
    for (int i = 0; i < 2000; i++) begin
      longint x, y;
      x = longint'(fx_t'({$urandom, $urandom}));
      y = (i % 2) ? longint'(fx_t'({$urandom, $urandom})) : longint'(fx_t'($urandom));
      try(x, y, i[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
