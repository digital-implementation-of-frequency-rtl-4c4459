// dac_interface: drives two parallel DACs with the FPLL's I and Q outputs.
//
// On each `load` strobe the Q4.36 inputs (full scale +-1.0) are scaled to
// DAC_W bits by dropping low fraction bits, saturated to the DAC range and
// converted to offset binary (code 0 = -full scale, mid code = 0), the
// usual input of a voltage-output DAC. The codes change one clock after
// `load`, together with a one-clock `dac_wr` latch strobe.
// The reference design names this interface only; word size, code format
// and strobe are this design's choice.
module dac_interface
  import fpll_pkg::*;
#(
  parameter int unsigned DAC_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  fx_t              i_in,
  input  fx_t              q_in,
  output logic [DAC_W-1:0] dac_i,
  output logic [DAC_W-1:0] dac_q,
  output logic             dac_wr
);
  localparam int unsigned SH = FRAC_S - (DAC_W - 1);
  localparam fx_t HI = fx_t'((64'sd1 <<< (DAC_W - 1)) - 1);
  localparam fx_t LO = fx_t'(-(64'sd1 <<< (DAC_W - 1)));

  function automatic logic [DAC_W-1:0] to_code(input fx_t v);
    fx_t s;
    logic [DAC_W-1:0] c;
    s = v >>> SH;
    if (s > HI)      s = HI;
    else if (s < LO) s = LO;
    c = DAC_W'(s);
    return {~c[DAC_W-1], c[DAC_W-2:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_i  <= {1'b1, {(DAC_W-1){1'b0}}};
      dac_q  <= {1'b1, {(DAC_W-1){1'b0}}};
      dac_wr <= 1'b0;
    end else begin
      dac_wr <= load;
      if (load) begin
        dac_i <= to_code(i_in);
        dac_q <= to_code(q_in);
      end
    end
  end
endmodule
