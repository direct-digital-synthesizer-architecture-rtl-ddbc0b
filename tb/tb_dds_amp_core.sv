// tb_dds_amp_core: self-checking test of the Jordan circle generator.
//
// A reference walk is computed independently with exact arithmetic: at each
// point both candidate moves are scored with F = x^2 + y^2 - R^2 evaluated
// by multiplication, and the one with the smaller |F| is taken (y on a tie).
// The core is stepped with a random enable and compared after every clock.
// For each radius the test also checks that one revolution is exactly 8R
// steps, that wrap fires only on the step that returns to (R, 0), that the
// point never leaves the band |F| <= 2R, and that restart reloads it.
module tb_dds_amp_core;
  import dds_pkg::*;

  localparam int unsigned WIDTH = 12;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    restart = 1'b0;
  logic [WIDTH-2:0]        radius = '0;
  logic                    step_en = 1'b0;
  step_dir_e               dir;
  logic                    upd, wrap;
  logic signed [WIDTH-1:0] x_d, y_d, x, y;

  int checks = 0;
  int failures = 0;

  dds_amp_core #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fval(int px, int py, int r);
    return px * px + py * py - r * r;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Run one revolution (plus a few steps) of radius r.
  task automatic run_radius(int r);
    int rx, ry, steps, dxs, dys, fx, fy;
    bit want_x;
    @(negedge clk);
    radius  = (WIDTH-1)'(r);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    check(x == r && y == 0, $sformatf("restart r=%0d -> (%0d,%0d)", r, x, y));
    rx = r; ry = 0; steps = 0;
    while (steps < 8 * r + 3) begin
      dxs = (ry >= 0) ? -1 : 1;
      dys = (rx >= 0) ? 1 : -1;
      fx = fval(rx + dxs, ry, r);
      fy = fval(rx, ry + dys, r);
      want_x = iabs(fx) < iabs(fy);
      step_en = ($urandom_range(0, 3) != 0);
      #1;
      check(dir == (want_x ? STEP_X : STEP_Y),
            $sformatf("dir at (%0d,%0d) r=%0d", rx, ry, r));
      if (step_en) begin
        if (want_x) rx += dxs; else ry += dys;
        steps++;
        check(wrap == (ry == 0 && rx > 0),
              $sformatf("wrap at step %0d r=%0d", steps, r));
        if (ry == 0 && rx > 0)
          check(steps % (8 * r) == 0,
                $sformatf("revolution length %0d, expected %0d", steps, 8 * r));
      end
      @(negedge clk);
      check(x == rx && y == ry,
            $sformatf("step %0d r=%0d: dut (%0d,%0d) ref (%0d,%0d)", steps, r, x, y, rx, ry));
      check(iabs(fval(rx, ry, r)) <= 2 * r,
            $sformatf("point (%0d,%0d) off the circle r=%0d", rx, ry, r));
    end
    step_en = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_radius(5);
    run_radius(37);
    run_radius(1000);
    run_radius(2047);
    run_radius(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
