// tb_dds_top_full: the end-to-end DDS test at the default sizes.
//
// dds_top is instantiated with no parameter overrides (12-bit amplitude
// words, 16-bit tuning word, no delay truncation). The testbench model and
// checks are those of tb_dds_top: every sample's value and tick spacing,
// the phase reference, the revolution strobe and period, and the phase error
// of the compensated samples against a uniform-rate oscillator. The run
// starts at the largest amplitude (R = 2047) with a tick every clock, hops
// the tuning word in mid revolution, and completes one full revolution of
// 8R = 16376 samples, about 26 million ticks.
module tb_dds_top_full;
  import dds_pkg::*;

  localparam int unsigned WIDTH = DEF_WIDTH;
  localparam int unsigned FTW_W = DEF_FTW_W;
  localparam int unsigned TRUNC = DEF_TRUNC;
  localparam int unsigned PH_W  = 2 * WIDTH + 1;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    restart = 1'b0;
  logic [WIDTH-2:0]        radius = '0;
  logic                    ftw_wr = 1'b0;
  logic [FTW_W-1:0]        ftw = '0;
  logic signed [WIDTH-1:0] cos_o, sin_o;
  logic                    sample_valid, wrap_o;
  logic [PH_W-1:0]         phase_o, period_o;
  logic                    period_valid_o;

  dds_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // One reference step from (px, py) on radius r: the new point, and the
  // number of ticks the step waits for.
  function automatic void ref_step(input int r, inout int px, inout int py,
                                   output int wait_ticks, output bit along_x);
    int dxs, dys, fx, fy;
    dxs = (py >= 0) ? -1 : 1;
    dys = (px >= 0) ? 1 : -1;
    fx = (px + dxs) * (px + dxs) + py * py - r * r;
    fy = px * px + (py + dys) * (py + dys) - r * r;
    along_x = iabs(fx) < iabs(fy);
    wait_ticks = ((along_x ? iabs(py) : iabs(px)) >> TRUNC) + 1;
    if (along_x) px += dxs; else py += dys;
  endfunction

  // Ticks in one revolution of radius r.
  function automatic int rev_ticks(int r);
    int px, py, w, sum;
    bit ax;
    px = r; py = 0; sum = 0;
    for (int i = 0; i < 8 * r; i++) begin
      ref_step(r, px, py, w, ax);
      sum += w;
    end
    return sum;
  endfunction

  // ---------------------------------------------------------------- model
  int  m_r = 0, m_x = 0, m_y = 0, m_ticks = 0, m_t = 0, m_period = 0, m_k = 0;
  int  m_w = 0, m_kclk = 0, m_steps = 0;
  bit  m_running = 0, prev_restart = 0, prev_ftw_wr = 0;
  int  prev_ftw = 0;
  real max_err = 0.0, max_err_uniform = 0.0;
  // mechanism counters
  int  n_hop_mid = 0, n_restart_mid = 0, n_wrap = 0, n_step_x = 0, n_step_y = 0;
  int  n_truncated = 0;

  localparam real PI = 3.14159265358979;

  function automatic real wrap_pi(real a);
    while (a > PI) a -= 2.0 * PI;
    while (a < -PI) a += 2.0 * PI;
    return a;
  endfunction

  task automatic monitor();
    int  w, nx, ny, full;
    bit  ax, tick;
    real ph, err;
    if (sample_valid) begin
      if (prev_restart) begin
        check(cos_o == WIDTH'(m_r) && sin_o == 0,
              $sformatf("restart sample (%0d,%0d), R=%0d", cos_o, sin_o, m_r));
        m_x = m_r; m_y = 0; m_t = 0; m_ticks = 0; m_k = 0;
        m_period = rev_ticks(m_r);
      end else begin
        nx = m_x; ny = m_y;
        ref_step(m_r, nx, ny, w, ax);
        check(m_ticks == w, $sformatf("step %0d at (%0d,%0d): %0d ticks, expected %0d",
                                      m_k, m_x, m_y, m_ticks, w));
        full = (ax ? iabs(m_y) : iabs(m_x)) + 1;
        if (w != full) n_truncated++;
        if (ax) n_step_x++; else n_step_y++;
        m_x = nx; m_y = ny; m_k++; m_steps++;
        m_t += m_ticks;
        check(cos_o == WIDTH'(m_x) && sin_o == WIDTH'(m_y),
              $sformatf("sample %0d: dut (%0d,%0d) ref (%0d,%0d)", m_k, cos_o, sin_o, m_x, m_y));
        check(wrap_o == (m_y == 0 && m_x > 0), "wrap strobe");
        if (m_y == 0 && m_x > 0) begin
          n_wrap++;
          check(m_t == m_period, $sformatf("revolution %0d ticks, expected %0d", m_t, m_period));
          check(period_valid_o && period_o == PH_W'(m_period),
                $sformatf("period_o %0d, expected %0d", period_o, m_period));
          check(m_k == 8 * m_r, $sformatf("revolution %0d samples, expected %0d", m_k, 8 * m_r));
          m_t = 0; m_k = 0;
        end
        check(phase_o == PH_W'(m_t), $sformatf("phase_o %0d, expected %0d", phase_o, m_t));
        // phase accuracy of this sample
        ph  = $atan2(real'(m_y), real'(m_x));
        err = wrap_pi(ph - 2.0 * PI * real'(m_t) / real'(m_period));
        if (err < 0.0) err = -err;
        if (err > max_err) max_err = err;
        err = wrap_pi(ph - 2.0 * PI * real'(m_k) / real'(8 * m_r));
        if (err < 0.0) err = -err;
        if (err > max_err_uniform) max_err_uniform = err;
      end
      m_ticks = 0;
    end else begin
      check(!wrap_o, "wrap strobe without a sample");
    end
    // time base model for this cycle
    if (prev_ftw_wr) begin m_w = prev_ftw; m_kclk = 1; end
    else m_kclk++;
    tick = !ftw_wr && (m_kclk % (m_w + 1) == 0);
    if (tick && m_running && !restart) m_ticks++;
    if (restart) m_running = 1;
    prev_restart = restart;
    prev_ftw_wr  = ftw_wr;
    prev_ftw     = int'(ftw);
  endtask

  // Advance one clock: apply stimulus, then run the model on the new cycle.
  task automatic cycle(bit do_restart = 0, int new_r = 0, bit do_ftw = 0, int new_ftw = 0);
    @(negedge clk);
    restart = do_restart;
    ftw_wr  = do_ftw;
    if (do_restart) begin radius = (WIDTH-1)'(new_r); m_r = new_r; end
    if (do_ftw) ftw = FTW_W'(new_ftw);
    #1;
    monitor();
  endtask

  task automatic run_until_steps(int n);
    int target;
    target = m_steps + n;
    while (m_steps < target) cycle();
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cycle(.do_ftw(1), .new_ftw(0));
    cycle();
    cycle(.do_restart(1), .new_r(2047));
    run_until_steps(5000);
    cycle(.do_ftw(1), .new_ftw(1));            // hop mid-revolution
    n_hop_mid++;
    run_until_steps(100);
    cycle(.do_ftw(1), .new_ftw(0));            // and back
    n_hop_mid++;
    run_until_steps(8 * 2047 - 5100);          // completes the revolution

    $display("max phase error: compensated %f rad, uniform steps %f rad",
             max_err, max_err_uniform);
    check(max_err < 0.002, $sformatf("compensated phase error %f too large", max_err));
    check(max_err < 0.5 * max_err_uniform, "compensation not better than uniform steps");
    $display("mechanisms: hops=%0d restarts=%0d wraps=%0d x_steps=%0d y_steps=%0d truncated=%0d",
             n_hop_mid, n_restart_mid, n_wrap, n_step_x, n_step_y, n_truncated);
    check(n_hop_mid > 0, "no frequency hop");
    check(n_wrap == 1, "revolution not completed");
    check(n_step_x > 0 && n_step_y > 0, "steps along one axis only");
    check(n_truncated == 0, "delay truncated at TRUNC = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
