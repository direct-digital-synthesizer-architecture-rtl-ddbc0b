// dds_phase_comp: sample timing compensation with two delay counters.
//
// The circle generator advances the phase by unequal amounts per step: a
// unit step along x advances it by about |y|/R^2 radians, a step along y by
// about |x|/R^2 (the step projected on the tangent of the circle). Issuing
// steps at a constant rate would therefore distort the phase. This block
// spaces the steps in time instead: before a step it waits a number of time
// base ticks proportional to the coordinate that measures that step's phase
// advance, so the phase grows linearly with time.
//
// Two down counters hold the delays: cnt_x is loaded with |x| >> TRUNC and
// times steps along y, cnt_y is loaded with |y| >> TRUNC and times steps
// along x. Both are loaded whenever the core's registers are written
// (restart or step), from the values being written. On each tick the counter
// selected by the core's next direction is tested: at zero the step is
// released, otherwise both counters count down (stopping at zero). A step
// therefore takes (|coordinate| >> TRUNC) + 1 ticks; the +1 is the minimum
// spacing between samples. TRUNC drops delay LSBs: a shorter revolution, so
// a higher top frequency, at the cost of more phase ripple. Using the
// coordinates as delays and the truncation trade-off follow the published
// method; the exact counting convention is this design's choice.
//
// Interface and timing:
//   tick      time base from the frequency tuning counter.
//   dir       axis of the core's next step (combinational from the core).
//   load, x_d, y_d  core register write and the coordinates written.
//   step_en   combinational, one clock: release the next step. Only ever
//             high in a tick cycle.
module dds_phase_comp
  import dds_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned TRUNC = DEF_TRUNC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    tick,
  input  step_dir_e               dir,
  input  logic                    load,
  input  logic signed [WIDTH-1:0] x_d,
  input  logic signed [WIDTH-1:0] y_d,
  output logic                    step_en
);

  localparam int unsigned DW = WIDTH;

  logic [DW-1:0] cnt_x_q, cnt_y_q;
  logic [DW-1:0] abs_x, abs_y;
  logic [DW-1:0] sel;

  always_comb begin
    abs_x   = x_d[WIDTH-1] ? DW'(-x_d) : DW'(x_d);
    abs_y   = y_d[WIDTH-1] ? DW'(-y_d) : DW'(y_d);
    sel     = (dir == STEP_X) ? cnt_y_q : cnt_x_q;
    step_en = enable & tick & (sel == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_x_q <= '0;
      cnt_y_q <= '0;
    end else if (load) begin
      cnt_x_q <= abs_x >> TRUNC;
      cnt_y_q <= abs_y >> TRUNC;
    end else if (enable && tick) begin
      if (cnt_x_q != '0) cnt_x_q <= cnt_x_q - DW'(1);
      if (cnt_y_q != '0) cnt_y_q <= cnt_y_q - DW'(1);
    end
  end

  a_step_on_tick: assert property (@(posedge clk) disable iff (!rst_n)
    step_en |-> tick);

endmodule
