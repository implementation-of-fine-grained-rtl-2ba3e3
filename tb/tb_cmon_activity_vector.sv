// tb_cmon_activity_vector: self-checking test of the activity vector stage.
//
// Random counter values and cutoffs are applied with the default sizes
// (2 threads, 32 super sets, 20-bit counters, 4 levels). After a sample the
// held vector must equal the levels computed in the testbench as
// min(3, floor(count*4 / (2*cutoff))); without a sample the vector must not
// change even though the counts and cutoff do. vec_valid must be low until
// the first sample. Every level value must occur at least once.
module tb_cmon_activity_vector;
  localparam int unsigned T = 2, N = 32, W = 20, L = 4;
  logic clk = 0, rst_n = 0;
  logic sample;
  logic [W-1:0] cutoff;
  logic [T*N-1:0][W-1:0] counts;
  logic [T*N-1:0][1:0] vec, expv;
  logic vec_valid;
  int checks = 0, failures = 0;
  int seen [L];

  cmon_activity_vector #(.THREADS(T), .N_SS(N), .CNT_W(W), .LEVELS(L)) dut (.*);

  always #5 clk = ~clk;

  function automatic int unsigned ref_level(longint unsigned c, longint unsigned k);
    longint unsigned q;
    if (k == 0) return L - 1;
    q = (c * L) / (2 * k);
    return (q > L - 1) ? L - 1 : int'(q);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = 0; cutoff = 100; counts = '0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (vec_valid !== 1'b0 || vec !== '0) failures++;
    for (int r = 0; r < 200; r++) begin
      cutoff = W'($urandom_range(1, 5000));
      for (int i = 0; i < T*N; i++) begin
        counts[i] = W'($urandom_range(0, 2 * int'(cutoff)));
        expv[i]   = 2'(ref_level(counts[i], cutoff));
        seen[expv[i]]++;
      end
      sample = 1;
      @(negedge clk);
      sample = 0;
      checks++;
      if (vec !== expv || vec_valid !== 1'b1) begin
        failures++;
        $display("FAIL round %0d vector mismatch", r);
      end
      // change the inputs without a sample: the vector must hold
      cutoff = W'($urandom_range(1, 5000));
      for (int i = 0; i < T*N; i++) counts[i] = W'($urandom);
      repeat (3) @(negedge clk);
      checks++;
      if (vec !== expv) begin
        failures++;
        $display("FAIL round %0d vector changed without sample", r);
      end
    end
    for (int i = 0; i < L; i++) begin
      checks++;
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
