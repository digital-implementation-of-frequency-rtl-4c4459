// tb_dac_interface: checks scaling, saturation and offset-binary coding of
// the I and Q DAC codes, the hold between load strobes and dac_wr timing.
module tb_dac_interface;
  import fpll_pkg::*;
  localparam int DAC_W = 12;
  logic clk = 0, rst_n = 0, load = 0, dac_wr;
  fx_t i_in, q_in;
  logic [DAC_W-1:0] dac_i, dac_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dac_interface #(.DAC_W(DAC_W)) dut (.clk, .rst_n, .load, .i_in, .q_in, .dac_i, .dac_q, .dac_wr);

  function automatic int expect_code(input real v);
    int c;
    c = int'($floor(v * 2048.0));
    if (c > 2047) c = 2047;
    if (c < -2048) c = -2048;
    return c + 2048;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ri, rq;
    logic [DAC_W-1:0] pi_, pq_;
    i_in = '0; q_in = '0;
    repeat (2) @(posedge clk); #1;
    check(dac_i == 12'h800 && dac_q == 12'h800, "reset at mid scale");
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ri = real'($urandom_range(0, 300000)) / 100000.0 - 1.5;   // beyond full scale too
      rq = real'($urandom_range(0, 300000)) / 100000.0 - 1.5;
      i_in = fx_const(ri, 36); q_in = fx_const(rq, 36);
      ri = real'(i_in) / 2.0**36; rq = real'(q_in) / 2.0**36;
      load = $urandom_range(0, 1);
      pi_ = dac_i; pq_ = dac_q;
      @(posedge clk); #1;
      check(dac_wr == load, "dac_wr one clock after load");
      if (load) begin
        check(int'(dac_i) == expect_code(ri), "I code");
        check(int'(dac_q) == expect_code(rq), "Q code");
      end else
        check(dac_i == pi_ && dac_q == pq_, "codes held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
