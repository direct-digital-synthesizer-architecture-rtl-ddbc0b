// tb_dds_freq_counter: self-checking test of the frequency tuning counter.
//
// Loads a series of tuning words (0, small random values, and one hop in
// the middle of a count) and checks, cycle by cycle, that a tick comes
// exactly every FTW+1 clocks after each write and never elsewhere.
module tb_dds_freq_counter;
  import dds_pkg::*;

  localparam int unsigned FTW_W = 8;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             ftw_wr = 1'b0;
  logic [FTW_W-1:0] ftw = '0;
  logic             tick;

  int checks = 0;
  int failures = 0;

  dds_freq_counter #(.FTW_W(FTW_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write word w, then watch n clocks.
  task automatic run_word(int w, int n);
    @(negedge clk);
    ftw = FTW_W'(w);
    ftw_wr = 1'b1;
    #1;
    checks++;
    if (tick) begin failures++; $display("FAIL tick during write"); end
    @(negedge clk);
    ftw_wr = 1'b0;
    #1;
    for (int c = 1; c <= n; c++) begin
      checks++;
      if (tick != ((c % (w + 1)) == 0)) begin
        failures++;
        if (failures < 20) $display("FAIL ftw=%0d cycle %0d tick=%0b", w, c, tick);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (tick) begin failures++; $display("FAIL tick after reset"); end
    rst_n = 1'b1;
    run_word(0, 20);
    run_word(1, 20);
    run_word(7, 50);
    run_word(255, 600);
    for (int i = 0; i < 30; i++) begin
      int w;
      w = $urandom_range(0, 40);
      run_word(w, $urandom_range(1, 150));   // often a hop mid-count
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
