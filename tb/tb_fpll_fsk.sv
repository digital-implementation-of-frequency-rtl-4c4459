// tb_fpll_fsk: the FPLL as a baseband FSK demodulator.
//
// A bit stream at 100 bit/s is frequency-shift keyed, "1" = 5.5 kHz and
// "0" = 2.5 kHz (phase continuous), sampled at 4 MHz and fed to fpll_core
// with GW raised to 1e9 and the start frequency between the tones. The
// frequency estimate is the demodulated output: it is sliced at 4 kHz in the
// middle and at the end of every bit and compared with the bit sent, and it
// must lie within 8 % of the tone then. Both tones and both transitions
// (0 -> 1 and 1 -> 0) are counted and must occur.
module tb_fpll_fsk;
  import fpll_pkg::*;

  localparam real FS = 4.0e6, AMP = 0.8, F1 = 5500.0, F0 = 2500.0, BITRATE = 100.0;
  localparam int  SPB = 40000;   // samples per bit
  localparam int  NBITS = 8;
  localparam bit  BITS [NBITS] = '{1, 0, 1, 1, 0, 0, 1, 0};

  logic clk = 0, rst_n = 0, sample_en = 0;
  fx_t  u, xc, xs, omega, freq_hz, phase, magnitude;
  logic out_valid, locked, phase_valid;
  always #5 clk = ~clk;

  fpll_core #(.FS_HZ(FS), .GW(1.0e9), .F0_HZ(4000.0)) dut (
    .clk, .rst_n, .sample_en, .u, .out_valid, .xc, .xs, .omega, .freq_hz,
    .locked, .phase_valid, .phase, .magnitude);

  int checks = 0, failures = 0, rises = 0, falls = 0, ones = 0, zeros = 0;

  task automatic slice(input bit b, input string where);
    real f, ft;
    f  = real'(freq_hz) / 2.0**16;
    ft = b ? F1 : F0;
    checks += 2;
    if ((f > 4000.0) != b) begin failures++; $display("FAIL bit decision (%s) f=%0.1f", where, f); end
    if (f > 1.08 * ft || f < 0.92 * ft) begin failures++; $display("FAIL tone estimate (%s) f=%0.1f", where, f); end
  endtask

  initial begin : watchdog
    repeat (NBITS * SPB + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th;
    th = 0.0;
    u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBITS; b++) begin
      if (b > 0 && BITS[b] && !BITS[b-1]) rises++;
      if (b > 0 && !BITS[b] && BITS[b-1]) falls++;
      if (BITS[b]) ones++; else zeros++;
      for (int k = 0; k < SPB; k++) begin
        u <= fx_const(AMP * $sin(th), 36);
        th += 2.0 * PI * (BITS[b] ? F1 : F0) / FS;
        if (th > PI) th -= 2.0 * PI;
        sample_en <= 1'b1;
        @(posedge clk); #1;
        if (k == SPB / 2) slice(BITS[b], "mid-bit");
      end
      slice(BITS[b], "end of bit");
      $display("bit %0d = %0b  estimate at end %0.1f Hz", b, BITS[b], real'(freq_hz) / 2.0**16);
    end
    checks += 4;
    if (rises == 0) failures++;
    if (falls == 0) failures++;
    if (ones == 0) failures++;
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
