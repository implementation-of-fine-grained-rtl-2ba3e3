// tb_cmon_bus_snoop: self-checking test of the cache-bus snooper.
//
// Random accesses (address, thread, miss) are driven for every combination
// of enable and miss_only. One cycle later the registered event must be
// present exactly when the access should be counted, with the thread id and
// the super-set index computed in the testbench as (addr >> 11) & 31 for the
// default 1024-set, 64-byte-line cache.
module tb_cmon_bus_snoop;
  logic clk = 0, rst_n = 0;
  logic cfg_enable, cfg_miss_only;
  logic bus_valid, bus_miss;
  logic [31:0] bus_addr;
  logic [0:0] bus_tid;
  logic ev_valid;
  logic [0:0] ev_tid;
  logic [4:0] ev_ss;
  int checks = 0, failures = 0;

  cmon_bus_snoop dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        exp_v;
    logic [0:0]  exp_t;
    logic [4:0]  exp_s;
    int          counted = 0;
    cfg_enable = 0; cfg_miss_only = 0; bus_valid = 0; bus_miss = 0; bus_addr = 0; bus_tid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      cfg_enable    = (i % 1000) >= 250;
      cfg_miss_only = (i % 1000) >= 600;
      bus_valid = $urandom_range(0, 3) != 0;
      bus_miss  = $urandom_range(0, 1);
      bus_addr  = $urandom;
      bus_tid   = 1'($urandom);
      exp_v = cfg_enable && bus_valid && (!cfg_miss_only || bus_miss);
      exp_t = bus_tid;
      exp_s = 5'((bus_addr >> 11) & 31);
      @(negedge clk);
      checks++;
      if (ev_valid !== exp_v || (exp_v && (ev_tid !== exp_t || ev_ss !== exp_s))) begin
        failures++;
        $display("FAIL i=%0d ev=%b/%0d/%0d exp=%b/%0d/%0d", i, ev_valid, ev_tid, ev_ss,
                 exp_v, exp_t, exp_s);
      end
      if (exp_v) counted++;
      bus_valid = 0;
    end
    checks++;
    if (counted == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
