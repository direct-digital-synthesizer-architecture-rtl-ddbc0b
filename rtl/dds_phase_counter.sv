// dds_phase_counter: phase reference running beside the amplitude core.
//
// Because the compensation makes the generated phase grow linearly with the
// time base, the number of ticks since the start of the current revolution
// is a phase reference. The counter advances on every tick while the DDS
// runs and is cleared when the core completes a revolution (wrap) or is
// restarted. At each wrap the count reached, i.e. the length of the
// revolution just finished in ticks, is latched into `period`, so a user
// can scale phase/period to a fraction of a turn. The published
// architecture only names an optional parallel phase counter; counting
// ticks and latching the period is this design's reading of it.
//
// Interface and timing:
//   phase    ticks since the last wrap/restart, registered.
//   period   ticks of the last complete revolution, updated at each wrap;
//            period_valid goes high at the first wrap after reset.
module dds_phase_counter
  import dds_pkg::*;
#(
  parameter int unsigned PH_W = 2 * DEF_WIDTH + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            enable,
  input  logic            tick,
  input  logic            wrap,
  output logic [PH_W-1:0] phase,
  output logic [PH_W-1:0] period,
  output logic            period_valid
);

  logic [PH_W-1:0] phase_inc;

  assign phase_inc = phase + PH_W'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= '0;
      period       <= '0;
      period_valid <= 1'b0;
    end else if (restart) begin
      phase        <= '0;
    end else if (enable && tick) begin
      if (wrap) begin
        phase        <= '0;
        period       <= phase_inc;
        period_valid <= 1'b1;
      end else begin
        phase        <= phase_inc;
      end
    end
  end

endmodule
