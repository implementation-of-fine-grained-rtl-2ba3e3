// tb_cmon_activity_counters: self-checking test of the super-set counters.
//
// A small configuration (2 threads, 8 super sets, 4-bit counters) is driven
// with random events and periodic sample pulses, including events in the
// sample cycle. A testbench model keeps its own saturating counts, restarts
// them at each sample (with the same cycle's event counted in the new
// interval), and all counters are compared after every cycle. It also counts
// how often a counter saturated and how often an event met a sample.
module tb_cmon_activity_counters;
  localparam int unsigned T = 2, N = 8, W = 4;
  logic clk = 0, rst_n = 0;
  logic ev_valid, sample;
  logic [0:0] ev_tid;
  logic [2:0] ev_ss;
  logic [T*N-1:0][W-1:0] counts;
  int model [T*N];
  int checks = 0, failures = 0, saturations = 0, collisions = 0;

  cmon_activity_counters #(.THREADS(T), .N_SS(N), .CNT_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx;
    ev_valid = 0; sample = 0; ev_tid = 0; ev_ss = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      ev_valid = $urandom_range(0, 4) != 0;
      ev_tid   = 1'($urandom);
      // skew towards a few super sets so some counters saturate
      ev_ss    = ($urandom_range(0, 1) != 0) ? 3'd2 : 3'($urandom);
      sample   = (cyc % 97) == 96;
      idx      = int'(ev_tid) * N + int'(ev_ss);
      if (sample) begin
        if (ev_valid) collisions++;
        foreach (model[i]) model[i] = 0;
        if (ev_valid) model[idx] = 1;
      end else if (ev_valid) begin
        if (model[idx] == (1 << W) - 1) saturations++;
        else model[idx]++;
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < T*N; i++) begin
        checks++;
        if (int'(counts[i]) != model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cyc=%0d counter %0d = %0d exp %0d", cyc, i, counts[i], model[i]);
        end
      end
    end
    checks += 2;
    if (saturations == 0) failures++;
    if (collisions == 0) failures++;
    $display("saturations=%0d sample/event collisions=%0d", saturations, collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
