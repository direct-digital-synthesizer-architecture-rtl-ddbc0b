// dds_freq_counter: loadable frequency tuning counter, the DDS time base.
//
// A down counter reloaded from the frequency tuning word (FTW). It emits a
// one-cycle tick every FTW+1 clocks; the phase compensation counters count
// these ticks, so the output frequency is inversely proportional to FTW+1.
// Writing a new word (ftw_wr) reloads the counter at once, so a frequency
// hop takes effect on the next tick boundary with one clock of loading
// latency; the amplitude core keeps its point, so the hop is phase
// continuous. Using a loadable counter as the tuning element follows the
// published architecture; the tick-every-FTW+1 convention and the immediate
// reload are this design's choices.
//
// Interface and timing:
//   ftw_wr, ftw   load a new tuning word; the first tick at the new rate
//                 comes FTW+1 clocks after the write edge.
//   tick          high for one clock every FTW+1 clocks (every clock when
//                 FTW = 0). Held low during reset.
module dds_freq_counter
  import dds_pkg::*;
#(
  parameter int unsigned FTW_W = DEF_FTW_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ftw_wr,
  input  logic [FTW_W-1:0] ftw,
  output logic             tick
);

  logic [FTW_W-1:0] ftw_q;
  logic [FTW_W-1:0] cnt_q;

  assign tick = (cnt_q == '0) & ~ftw_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ftw_q <= '1;
      cnt_q <= '1;
    end else if (ftw_wr) begin
      ftw_q <= ftw;
      cnt_q <= ftw;
    end else if (cnt_q == '0) begin
      cnt_q <= ftw_q;
    end else begin
      cnt_q <= cnt_q - FTW_W'(1);
    end
  end

endmodule
