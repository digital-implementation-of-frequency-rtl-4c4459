// tb_adc_interface: checks the sample-rate divider (one convst and one
// sample_en every CLK_DIV clocks), the capture of the ADC code present at
// the tick and its conversion to Q4.36 (code / 2^(ADC_W-1)).
module tb_adc_interface;
  import fpll_pkg::*;
  localparam int CLK_DIV = 10, ADC_W = 12;
  logic clk = 0, rst_n = 0, adc_convst, sample_en;
  logic signed [ADC_W-1:0] adc_data;
  fx_t u;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  adc_interface #(.CLK_DIV(CLK_DIV), .ADC_W(ADC_W)) dut (.clk, .rst_n, .adc_data, .adc_convst, .sample_en, .u);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (CLK_DIV * 300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_tick = -1, cyc = 0, ntick = 0;
  logic signed [ADC_W-1:0] held;

  initial begin
    adc_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (CLK_DIV * 200) begin
      @(negedge clk);
      held = adc_data;
      adc_data = ADC_W'($urandom);
      if (cyc % 7 == 0) adc_data = {1'b1, {(ADC_W-1){1'b0}}};   // -full scale
      @(posedge clk); #1;
      cyc++;
      check(adc_convst == sample_en, "convst with sample_en");
      if (sample_en) begin
        if (last_tick >= 0) check(cyc - last_tick == CLK_DIV, "sample period");
        last_tick = cyc;
        ntick++;
        check(real'(u) / 2.0**36 == real'(adc_data) / 2.0**(ADC_W-1), "Q4.36 value of the code");
      end
    end
    check(ntick >= 199, "number of samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
