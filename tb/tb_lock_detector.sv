// tb_lock_detector: feeds frequency sequences (steady with ripple, a step,
// a slow drift) and compares `locked` after every sample with a model that
// averages windows of 2^LOG2_WIN samples and counts settled windows.
// Also checks the exact window at which lock first rises and that it drops
// on a frequency step.
module tb_lock_detector;
  import fpll_pkg::*;
  localparam int LOG2_WIN = 4, TOL_SHIFT = 7, LOCK_HITS = 4;
  localparam int WIN = 1 << LOG2_WIN;
  logic clk = 0, rst_n = 0, en = 0, locked;
  fx_t omega, avg_omega;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lock_detector #(.LOG2_WIN(LOG2_WIN), .TOL_SHIFT(TOL_SHIFT), .LOCK_HITS(LOCK_HITS)) dut (
    .clk, .rst_n, .en, .omega, .locked, .avg_omega);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (40 * WIN * 4) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  longint m_sum = 0, m_avg = 0;
  int m_cnt = 0, m_hits = 0, first_lock_win = -1, win_no = 0, drops = 0;
  bit m_locked = 0, prev_locked = 0;

  task automatic model(input longint w);
    longint a, d;
    m_sum += w;
    m_cnt++;
    if (m_cnt == WIN) begin
      a = m_sum >>> LOG2_WIN;   // floor, like the arithmetic shift
      d = (a > m_avg) ? a - m_avg : m_avg - a;
      if (d <= (((a < 0) ? -a : a) >>> TOL_SHIFT)) begin
        if (m_hits < LOCK_HITS) m_hits++;
      end else
        m_hits = 0;
      m_locked = (m_hits >= LOCK_HITS);
      m_avg = a; m_sum = 0; m_cnt = 0;
      win_no++;
      if (m_locked && first_lock_win < 0) first_lock_win = win_no;
    end
  endtask

  initial begin
    real base, w;
    omega = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40 * WIN; n++) begin
      base = (n < 16 * WIN) ? 314159.0 : (n < 28 * WIN) ? 251327.0 : 251327.0 + 30.0 * (n - 28 * WIN);
      w = base * (1.0 + 0.004 * $sin(2.0 * 3.14159265 * real'(n) / 5.0));
      @(negedge clk);
      omega = fx_const(w, 16);
      en = ($urandom_range(0, 5) != 0);
      if (!en) omega = fx_const(1.0e6, 16);   // ignored while en = 0
      @(posedge clk);
      if (en) model(longint'(omega));
      #1;
      check(locked == m_locked, "locked vs model");
      if (prev_locked && !locked) drops++;
      prev_locked = locked;
      if (!en) n--;
    end
    check(first_lock_win == 1 + LOCK_HITS, "lock after 1 + LOCK_HITS windows");
    check(drops >= 1, "lock lost on the frequency step");
    $display("first lock in window %0d, lock lost %0d times", first_lock_win, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
