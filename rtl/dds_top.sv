// dds_top: direct digital synthesizer based on amplitude sequencing.
//
// A quadrature sine/cosine source with no phase-to-amplitude table. The
// amplitude core (dds_amp_core) produces the cosine and sine words directly
// by walking a point around a circle of radius `radius` on the integer grid.
// Its steps are unequal in phase, so the phase compensation counters
// (dds_phase_comp) hold each step back by a number of time base ticks
// proportional to the step's phase advance; the time base comes from the
// loadable frequency tuning counter (dds_freq_counter). A phase counter
// (dds_phase_counter) runs alongside as a phase reference.
//
// One revolution takes about 2*pi*R^2 / 2^TRUNC + 8R ticks of the time base,
// i.e. (FTW+1) times that many clocks, and yields 8R samples (R = radius).
// The output frequency is therefore
//   f_out ~= f_clk / ((FTW+1) * (2*pi*R^2/2^TRUNC + 8R)).
// Changing the tuning word never disturbs the core's point, so frequency
// hops are phase continuous; writing restart reloads the amplitude and
// starts a new revolution at phase 0 (cos = R, sin = 0).
//
// Interface and timing:
//   restart, radius  synchronous (re)start with a new amplitude; nothing is
//                    generated after reset until the first restart.
//   ftw_wr, ftw      load a frequency tuning word at any time.
//   cos_o, sin_o     two's complement amplitude words, to the DACs. They
//                    change only in the cycle sample_valid is high.
//   sample_valid     one-clock strobe: a new (cos_o, sin_o) sample.
//   wrap_o           one-clock strobe with the sample that closes a turn.
//   phase_o, period_o, period_valid_o  phase reference, in ticks.
// The block structure follows the published architecture; widths, the
// start/restart protocol and the output strobes are this design's choices.
module dds_top
  import dds_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH,
  parameter int unsigned FTW_W = DEF_FTW_W,
  parameter int unsigned TRUNC = DEF_TRUNC,
  parameter int unsigned PH_W  = 2 * WIDTH + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,
  input  logic [WIDTH-2:0]        radius,
  input  logic                    ftw_wr,
  input  logic [FTW_W-1:0]        ftw,
  output logic signed [WIDTH-1:0] cos_o,
  output logic signed [WIDTH-1:0] sin_o,
  output logic                    sample_valid,
  output logic                    wrap_o,
  output logic [PH_W-1:0]         phase_o,
  output logic [PH_W-1:0]         period_o,
  output logic                    period_valid_o
);

  logic                    running_q;
  logic                    tick;
  logic                    step_en;
  step_dir_e               dir;
  logic                    upd;
  logic signed [WIDTH-1:0] x_d, y_d;
  logic                    wrap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q    <= 1'b0;
      sample_valid <= 1'b0;
      wrap_o       <= 1'b0;
    end else begin
      if (restart) running_q <= 1'b1;
      sample_valid <= upd;
      wrap_o       <= wrap;
    end
  end

  dds_freq_counter #(.FTW_W(FTW_W)) u_freq (
    .clk    (clk),
    .rst_n  (rst_n),
    .ftw_wr (ftw_wr),
    .ftw    (ftw),
    .tick   (tick)
  );

  dds_phase_comp #(.WIDTH(WIDTH), .TRUNC(TRUNC)) u_comp (
    .clk     (clk),
    .rst_n   (rst_n),
    .enable  (running_q & ~restart),
    .tick    (tick),
    .dir     (dir),
    .load    (upd),
    .x_d     (x_d),
    .y_d     (y_d),
    .step_en (step_en)
  );

  dds_amp_core #(.WIDTH(WIDTH)) u_core (
    .clk     (clk),
    .rst_n   (rst_n),
    .restart (restart),
    .radius  (radius),
    .step_en (step_en),
    .dir     (dir),
    .upd     (upd),
    .x_d     (x_d),
    .y_d     (y_d),
    .wrap    (wrap),
    .x       (cos_o),
    .y       (sin_o)
  );

  dds_phase_counter #(.PH_W(PH_W)) u_phase (
    .clk          (clk),
    .rst_n        (rst_n),
    .restart      (restart),
    .enable       (running_q),
    .tick         (tick),
    .wrap         (wrap),
    .phase        (phase_o),
    .period       (period_o),
    .period_valid (period_valid_o)
  );

endmodule
