// tb_dds_trunc_sweep: the delay-truncation trade-off, measured.
//
// Four synthesizers with the same amplitude (R = 64) and tuning word run
// side by side, dropping 0, 1, 2 and 3 delay LSBs (TRUNC). Each runs two
// revolutions. During the second one, every sample's phase atan2(sin, cos)
// is compared with the phase the built-in phase reference reports,
// 2*pi*phase_o/period_o, and the worst difference is kept.
//
// Checks: each revolution length (period_o) equals the value obtained by
// walking the circle in the testbench with the same delay rule; a larger
// TRUNC gives a shorter revolution (a higher output frequency for the same
// clock and tuning word) and a larger worst phase error; the untruncated
// error stays below 0.01 rad.
module tb_dds_trunc_sweep;
  import dds_pkg::*;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned FTW_W = 4;
  localparam int unsigned PH_W  = 2 * WIDTH + 1;
  localparam int          R     = 64;
  localparam int          N     = 4;
  localparam real         PI    = 3.14159265358979;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             restart = 1'b0;
  logic [WIDTH-2:0] radius = (WIDTH-1)'(R);
  logic             ftw_wr = 1'b0;
  logic [FTW_W-1:0] ftw = FTW_W'(1);

  int  checks = 0;
  int  failures = 0;
  real max_err [N];
  int  wraps   [N];
  int  period  [N];

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < N; g++) begin : g_dds
    logic signed [WIDTH-1:0] cos_o, sin_o;
    logic                    sample_valid, wrap_o, period_valid_o;
    logic [PH_W-1:0]         phase_o, period_o;

    dds_top #(.WIDTH(WIDTH), .FTW_W(FTW_W), .TRUNC(g)) dut (
      .clk, .rst_n, .restart, .radius, .ftw_wr, .ftw,
      .cos_o, .sin_o, .sample_valid, .wrap_o,
      .phase_o, .period_o, .period_valid_o);

    always @(negedge clk) begin
      real ph, err;
      if (rst_n && sample_valid) begin
        if (wrap_o) begin
          wraps[g]++;
          period[g] = int'(period_o);
        end
        if (wraps[g] == 1 && period_valid_o) begin
          ph  = $atan2(real'(sin_o), real'(cos_o));
          err = ph - 2.0 * PI * real'(phase_o) / real'(period_o);
          while (err >  PI) err -= 2.0 * PI;
          while (err < -PI) err += 2.0 * PI;
          if (err < 0.0) err = -err;
          if (err > max_err[g]) max_err[g] = err;
        end
      end
    end
  end

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Revolution length in ticks for radius r and truncation t.
  function automatic int rev_ticks(int r, int t);
    int px, py, dxs, dys, fx, fy, sum;
    bit ax;
    px = r; py = 0; sum = 0;
    for (int i = 0; i < 8 * r; i++) begin
      dxs = (py >= 0) ? -1 : 1;
      dys = (px >= 0) ? 1 : -1;
      fx = (px + dxs) * (px + dxs) + py * py - r * r;
      fy = px * px + (py + dys) * (py + dys) - r * r;
      ax = iabs(fx) < iabs(fy);
      sum += ((ax ? iabs(py) : iabs(px)) >> t) + 1;
      if (ax) px += dxs; else py += dys;
    end
    return sum;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int done;

  initial begin
    for (int i = 0; i < N; i++) begin max_err[i] = 0.0; wraps[i] = 0; period[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ftw_wr = 1'b1;
    @(negedge clk);
    ftw_wr = 1'b0;
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    done = 0;
    while (done < N) begin
      @(negedge clk);
      done = 0;
      for (int i = 0; i < N; i++) if (wraps[i] >= 2) done++;
    end
    for (int i = 0; i < N; i++) begin
      $display("TRUNC=%0d: revolution %0d ticks, worst phase error %f rad",
               i, period[i], max_err[i]);
      check(period[i] == rev_ticks(R, i),
            $sformatf("TRUNC=%0d period %0d, expected %0d", i, period[i], rev_ticks(R, i)));
      if (i > 0) begin
        check(period[i] < period[i-1], $sformatf("TRUNC=%0d revolution not shorter", i));
        check(max_err[i] > max_err[i-1], $sformatf("TRUNC=%0d error not larger", i));
      end
    end
    check(max_err[0] < 0.01, "untruncated phase error too large");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
