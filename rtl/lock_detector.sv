// lock_detector: frequency-lock indication for the FPLL.
//
// The frequency estimate omega (Q24.16, rad/s) is averaged over windows of
// 2^LOG2_WIN samples, which removes the ripple at twice the input frequency
// that the adaptation law leaves on it. At the end of each window the new
// average is compared with the previous one. If they differ by no more than
// |average| / 2^TOL_SHIFT the window counts as settled; LOCK_HITS settled
// windows in a row raise `locked`, and one unsettled window drops it again.
// The reference design states only that a lock indication is given once the
// frequency has converged; the averaging, tolerance and counts are this
// design's choice.
//
// Timing: one sample is taken per clock with en = 1. `locked` changes on the
// clock edge that closes a window. `avg_omega` holds the last window average.
module lock_detector
  import fpll_pkg::*;
#(
  parameter int unsigned LOG2_WIN  = 10,
  parameter int unsigned TOL_SHIFT = 7,
  parameter int unsigned LOCK_HITS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fx_t  omega,
  output logic locked,
  output fx_t  avg_omega
);
  localparam int unsigned SW = W + LOG2_WIN;
  localparam int unsigned HW = $clog2(LOCK_HITS + 1);

  logic [LOG2_WIN-1:0]  cnt_q;
  logic signed [SW-1:0] sum_q, sum_d;
  fx_t                  avg_d, diff, tol;
  logic [HW-1:0]        hits_q;
  logic                 settled;

  always_comb begin
    sum_d   = sum_q + SW'(omega);
    avg_d   = fx_t'(sum_d >>> LOG2_WIN);
    diff    = (avg_d >= avg_omega) ? avg_d - avg_omega : avg_omega - avg_d;
    tol     = ((avg_d < 0) ? -avg_d : avg_d) >>> TOL_SHIFT;
    settled = (diff <= tol);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      sum_q     <= '0;
      avg_omega <= '0;
      hits_q    <= '0;
      locked    <= 1'b0;
    end else if (en) begin
      cnt_q <= cnt_q + 1'b1;
      if (cnt_q == {LOG2_WIN{1'b1}}) begin
        sum_q     <= '0;
        avg_omega <= avg_d;
        if (settled) begin
          if (hits_q < HW'(LOCK_HITS))
            hits_q <= hits_q + 1'b1;
          locked <= (hits_q + 1'b1 >= HW'(LOCK_HITS));
        end else begin
          hits_q <= '0;
          locked <= 1'b0;
        end
      end else begin
        sum_q <= sum_d;
      end
    end
  end
endmodule
