// tb_cache_monitor_ss128: one cache monitor with a 128-super-set vector.
//
// Same procedure as tb_cache_monitor, but for the finer configuration used
// to compare scheduling decisions against a plain miss counter: the
// 512 KB level-2 cache (1024 sets) divided into 128 super sets of 8 sets,
// 2 threads, 20-bit counters and 4 usage levels, so each thread's vector is
// 256 bits, eight register words. Random bus traffic, half of it aimed at
// two hot super sets per thread, runs over short programmed intervals. The reference
// model of cmon_tb_pkg predicts each activity vector; after every interrupt
// the vector words are read over the register bus and compared. Interrupt
// spacing must equal the programmed interval. The test covers
// intervals, miss-only counting and a disabled period; saturation of the
// 20-bit counters is left to tb_cmon_top.
module tb_cache_monitor_ss128;
  import cmon_pkg::*;
  import cmon_tb_pkg::*;

  localparam int unsigned T = 2, N = 128, W = 20, L = 4, SET_BITS = 10;
  localparam int unsigned SSW = $clog2(N);
  localparam int unsigned SS_LSB = 6 + SET_BITS - SSW;

  logic clk = 0, rst_n = 0;
  logic bus_valid, bus_miss, csr_req, csr_we, csr_rvalid, irq;
  logic [31:0] bus_addr, csr_wdata, csr_rdata;
  logic [0:0] bus_tid;
  logic [CSR_AW-1:0] csr_addr;

  cache_monitor #(.N_SS(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0, last_irq = 0;
  bit spacing_ok = 0;
  int n_spacing = 0, n_filtered = 0, n_disabled = 0;

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cmon_model m;
  int unsigned cut_cur = 1024, cut_prev = 1024, ivl = 1_000_000, rate = 2, miss_pct = 50;
  bit en = 0, mo = 0, hot_only = 0;

  typedef struct { bit we; logic [CSR_AW-1:0] addr; logic [31:0] data; } op_t;
  op_t ops [$];
  bit rd_pend = 0;
  op_t rd_op;

  function automatic void wr(logic [CSR_AW-1:0] a, logic [31:0] d);
    ops.push_back('{1'b1, a, d});
  endfunction

  task automatic step();
    op_t op;
    bit issued_we = 0;
    cycle++;
    m.observe(irq, cut_prev);
    if (irq) begin
      if (spacing_ok) begin
        checks++;
        n_spacing++;
        if (cycle - last_irq != ivl) begin
          failures++;
          $display("FAIL interrupt spacing %0d, interval %0d", cycle - last_irq, ivl);
        end
      end
      last_irq = cycle;
      spacing_ok = en;
      for (int i = 0; i < 2 * int'(m.words); i++)
        ops.push_back('{1'b0, CSR_VEC_BASE + CSR_AW'(4 * i), m.exp_words.pop_front()});
    end
    if (rd_pend) begin
      checks++;
      if (!csr_rvalid || csr_rdata !== rd_op.data) begin
        failures++;
        $display("FAIL read %h: rvalid=%b data=%h expected %h (interval %0d)", rd_op.addr,
                 csr_rvalid, csr_rdata, rd_op.data, m.closes);
      end
      rd_pend = 0;
    end
    csr_req = 0; csr_we = 0;
    if (ops.size() != 0) begin
      op = ops.pop_front();
      csr_req = 1; csr_we = op.we; csr_addr = op.addr; csr_wdata = op.data;
      if (op.we) issued_we = 1;
      else begin rd_pend = 1; rd_op = op; end
    end
    bus_valid = $urandom_range(1, rate) == 1;
    bus_tid   = 1'($urandom);
    bus_addr  = $urandom;
    if (hot_only || $urandom_range(0, 1) != 0)
      bus_addr[SS_LSB +: SSW] = SSW'(4 * bus_tid + $urandom_range(0, 1));
    bus_miss  = $urandom_range(1, 100) <= miss_pct;
    if (bus_valid) begin
      if (!en) n_disabled++;
      else if (mo && !bus_miss) n_filtered++;
      else m.access(bus_addr, bus_tid);
    end
    cut_prev = cut_cur;
    if (issued_we) begin
      case (op.addr)
        CSR_CTRL: begin
          if (en != op.data[0]) spacing_ok = 0;
          en = op.data[0]; mo = op.data[1];
        end
        CSR_CUTOFF:   cut_cur = op.data[W-1:0];
        CSR_INTERVAL: begin ivl = op.data; spacing_ok = 0; end
        default: ;
      endcase
    end
  endtask

  task automatic run(int n);
    repeat (n) begin
      @(negedge clk);
      step();
    end
  endtask

  initial begin
    m = new(T, N, 6, SET_BITS, W, L);
    bus_valid = 0; bus_addr = 0; bus_tid = 0; bus_miss = 0;
    csr_req = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(CSR_CUTOFF, 4);
    wr(CSR_INTERVAL, 3000);
    wr(CSR_CTRL, 1);
    run(30000);
    wr(CSR_CTRL, 3);
    run(9000);
    wr(CSR_CTRL, 0);
    run(2000);
    wr(CSR_CTRL, 1);
    run(9000);
    checks += 4;
    if (m.closes < 10)     begin failures++; $display("FAIL too few intervals"); end
    if (n_spacing == 0)    begin failures++; $display("FAIL no spacing check"); end
    if (n_filtered == 0)   begin failures++; $display("FAIL miss-only never filtered"); end
    if (n_disabled == 0)   begin failures++; $display("FAIL disable never exercised"); end
    for (int l = 0; l < int'(L); l++) begin
      checks++;
      if (m.level_seen[l] == 0) begin failures++; $display("FAIL level %0d never seen", l); end
    end
    $display("intervals=%0d spacing=%0d filtered=%0d disabled=%0d saturations=%0d boundary=%0d",
             m.closes, n_spacing, n_filtered, n_disabled, m.saturations, m.collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
