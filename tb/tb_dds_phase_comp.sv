// tb_dds_phase_comp: self-checking test of the phase compensation counters.
//
// Two instances, one with full delays (TRUNC = 0) and one dropping two
// delay LSBs (TRUNC = 2), are loaded with random coordinates and a random
// next-step axis, then fed random ticks. The test counts ticks from the load
// to the released step and checks it equals (|coord| >> TRUNC) + 1, where the
// coordinate is |y| for a step along x and |x| for a step along y. It also
// checks that no step is released off a tick or while disabled.
module tb_dds_phase_comp;
  import dds_pkg::*;

  localparam int unsigned WIDTH = 10;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    enable = 1'b0;
  logic                    tick = 1'b0;
  step_dir_e               dir = STEP_X;
  logic                    load = 1'b0;
  logic signed [WIDTH-1:0] x_d = '0, y_d = '0;
  logic                    step0, step2;

  int checks = 0;
  int failures = 0;

  dds_phase_comp #(.WIDTH(WIDTH), .TRUNC(0)) dut0 (
    .clk, .rst_n, .enable, .tick, .dir, .load, .x_d, .y_d, .step_en(step0));
  dds_phase_comp #(.WIDTH(WIDTH), .TRUNC(2)) dut2 (
    .clk, .rst_n, .enable, .tick, .dir, .load, .x_d, .y_d, .step_en(step2));

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic one_delay(int px, int py, step_dir_e d, int density);
    int exp0, exp2, ticks, got0, got2, cyc;
    @(negedge clk);
    x_d = WIDTH'(px); y_d = WIDTH'(py);
    load = 1'b1;
    tick = 1'b0;
    @(negedge clk);
    load = 1'b0;
    dir = d;
    exp0 = ((d == STEP_X) ? iabs(py) : iabs(px)) + 1;
    exp2 = (((d == STEP_X) ? iabs(py) : iabs(px)) >> 2) + 1;
    ticks = 0; got0 = 0; got2 = 0; cyc = 0;
    while ((got0 == 0 || got2 == 0) && cyc < 100_000) begin
      tick = ($urandom_range(1, 100) <= density);
      enable = (cyc % 13 != 5);            // occasionally disabled
      #1;
      if (!enable || !tick)
        check(!step0 && !step2, "step without an enabled tick");
      if (enable && tick) begin
        ticks++;
        if (got0 == 0 && step0) got0 = ticks;
        if (got2 == 0 && step2) got2 = ticks;
      end
      @(negedge clk);
      cyc++;
    end
    check(got0 == exp0, $sformatf("TRUNC=0 (%0d,%0d) dir=%s: %0d ticks, expected %0d",
                                  px, py, d.name(), got0, exp0));
    check(got2 == exp2, $sformatf("TRUNC=2 (%0d,%0d) dir=%s: %0d ticks, expected %0d",
                                  px, py, d.name(), got2, exp2));
    tick = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    one_delay(0, 0, STEP_X, 100);
    one_delay(5, 0, STEP_Y, 100);
    one_delay(5, 0, STEP_X, 100);
    one_delay(-511, 300, STEP_Y, 50);
    one_delay(-511, -300, STEP_X, 50);
    for (int i = 0; i < 200; i++)
      one_delay($urandom_range(0, 1022) - 511, $urandom_range(0, 1022) - 511,
                ($urandom_range(0, 1) != 0) ? STEP_X : STEP_Y, $urandom_range(20, 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
