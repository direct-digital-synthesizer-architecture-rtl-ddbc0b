// tb_dds_phase_counter: self-checking test of the phase reference counter.
//
// Drives random ticks, wraps (always in a tick cycle, as the amplitude core
// only steps on ticks), enable gaps and restarts, and compares phase,
// period and period_valid every clock with a reference model kept in the
// testbench.
module tb_dds_phase_counter;
  import dds_pkg::*;

  localparam int unsigned PH_W = 12;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            restart = 1'b0;
  logic            enable = 1'b0;
  logic            tick = 1'b0;
  logic            wrap = 1'b0;
  logic [PH_W-1:0] phase, period;
  logic            period_valid;

  int checks = 0;
  int failures = 0;
  int m_phase = 0, m_period = 0, n_wraps = 0;
  bit m_valid = 0;

  dds_phase_counter #(.PH_W(PH_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 50_000; c++) begin
      @(negedge clk);
      checks++;
      if (phase != PH_W'(m_phase) || period != PH_W'(m_period) || period_valid != m_valid) begin
        failures++;
        if (failures < 20)
          $display("FAIL cycle %0d: phase %0d/%0d period %0d/%0d valid %0b/%0b",
                   c, phase, m_phase, period, m_period, period_valid, m_valid);
      end
      enable  = ($urandom_range(0, 99) < 95);
      tick    = ($urandom_range(0, 99) < 60);
      wrap    = tick && ($urandom_range(0, 299) == 0);
      restart = ($urandom_range(0, 1999) == 0);
      // reference model, applied at the coming edge
      if (restart) m_phase = 0;
      else if (enable && tick) begin
        if (wrap) begin
          m_period = (m_phase + 1) % (1 << PH_W);
          m_phase  = 0;
          m_valid  = 1;
          n_wraps++;
        end else m_phase = (m_phase + 1) % (1 << PH_W);
      end
    end
    checks++;
    if (n_wraps < 10) begin failures++; $display("FAIL too few wraps: %0d", n_wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
