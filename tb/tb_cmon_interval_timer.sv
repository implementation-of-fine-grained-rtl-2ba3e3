// tb_cmon_interval_timer: self-checking test of the sampling interval timer.
//
// Checks the spacing of sample pulses for several interval lengths (the
// pulse must come every cfg_interval enabled cycles), that a disabled timer
// holds its position, that restart begins a new full interval and suppresses
// a pulse due in that cycle, and that sample_count counts every pulse.
module tb_cmon_interval_timer;
  logic clk = 0, rst_n = 0;
  logic enable, restart, sample;
  logic [31:0] cfg_interval, sample_count;
  int checks = 0, failures = 0;

  cmon_interval_timer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // run n enabled cycles, return the cycle numbers (1-based) of the pulses
  task automatic run(int n, output int first, output int pulses, output int last);
    first = -1; pulses = 0; last = -1;
    for (int c = 1; c <= n; c++) begin
      @(negedge clk);
      if (sample) begin
        pulses++;
        if (first < 0) first = c;
        last = c;
      end
    end
  endtask

  initial begin
    int first, pulses, last, cnt0;
    int ivs[5] = '{7, 1, 2, 13, 100};
    enable = 0; restart = 0; cfg_interval = 7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // pulse spacing for several intervals
    for (int k = 0; k < 5; k++) begin
      int iv;
      iv = ivs[k];
      @(negedge clk);
      cfg_interval = iv; restart = 1;
      @(negedge clk);
      restart = 0; enable = 1;
      // the first cycle after restart is cycle 1 of the new interval
      #1;
      checks++;
      if (sample != (iv <= 1)) begin failures++; $display("FAIL first-cycle pulse iv=%0d", iv); end
      cnt0 = sample_count;
      run(10 * iv - 1, first, pulses, last);
      // pulses counted from the cycle after the first check
      expect_eq($sformatf("pulses iv=%0d", iv), pulses + ((iv <= 1) ? 1 : 0), 10);
      if (iv > 1) expect_eq($sformatf("first pulse iv=%0d", iv), first, iv - 1);
      @(negedge clk);
      expect_eq($sformatf("sample_count iv=%0d", iv), sample_count - cnt0, 10);
      enable = 0;
    end
    // disabled: no pulses, position held
    cfg_interval = 10; restart = 1;
    @(negedge clk); restart = 0; enable = 1;
    repeat (4) @(negedge clk);    // 5 cycles of the interval done
    enable = 0;
    run(50, first, pulses, last);
    expect_eq("pulses while disabled", pulses, 0);
    enable = 1;
    run(10, first, pulses, last);
    expect_eq("resumed first pulse", first, 5);
    // restart in the cycle of a due pulse suppresses it
    cfg_interval = 4; restart = 1;
    @(negedge clk); restart = 0;
    @(negedge clk); @(negedge clk); @(negedge clk);
    checks++;
    if (!sample) begin failures++; $display("FAIL due pulse missing"); end
    restart = 1;
    #1;
    checks++;
    if (sample) begin failures++; $display("FAIL pulse not suppressed"); end
    @(negedge clk); restart = 0;
    run(4, first, pulses, last);
    expect_eq("first pulse after restart", first, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
