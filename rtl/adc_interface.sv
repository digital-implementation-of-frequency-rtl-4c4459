// adc_interface: sample clock and input capture for the FPLL.
//
// A counter divides the system clock by CLK_DIV to give the sample rate
// fs (with the defaults 40 MHz / 10 = 4 MHz, twenty times the highest input
// frequency of 200 kHz, the ratio the reference design uses). Each sample
// period starts with a one-clock `adc_convst` pulse that starts a conversion
// in an external parallel ADC; at the start of the following period the
// finished code on `adc_data` is captured, converted from ADC_W-bit two's
// complement (full scale = +-1.0) to Q4.36 and presented on `u` with a
// one-clock `sample_en` strobe. Latency: one sample period from convst to
// sample_en of that conversion.
// The lowest 37 - ADC_W bits of u are always zero: the ADC word is narrower
// than the Q4.36 word it is placed in.
// The ADC word size, the data format, the clock rate and the
// convert/capture handshake are this design's assumptions; the 20x
// oversampling ratio follows the reference design.
module adc_interface
  import fpll_pkg::*;
#(
  parameter int unsigned CLK_DIV = 10,
  parameter int unsigned ADC_W   = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    adc_convst,
  output logic                    sample_en,
  output fx_t                     u
);
  localparam int unsigned CW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [CW-1:0] div_q;
  logic          tick;

  assign tick = (div_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q      <= '0;
      adc_convst <= 1'b0;
      sample_en  <= 1'b0;
      u          <= '0;
    end else begin
      div_q      <= (div_q == CW'(CLK_DIV - 1)) ? '0 : div_q + 1'b1;
      adc_convst <= tick;
      sample_en  <= tick;
      if (tick)
        u <= fx_t'(adc_data) <<< (FRAC_S - (ADC_W - 1));
    end
  end

  initial assert (CLK_DIV >= 1 && ADC_W >= 2 && ADC_W <= FRAC_S + 1)
    else $error("adc_interface: unsupported CLK_DIV / ADC_W");
endmodule
