// tb_cmon_top: end-to-end test of the two-cache monitor at its default sizes.
//
// The level-2 and level-3 cache buses carry random accesses of both threads,
// half spread over the whole address space and half aimed at a few "hot"
// super sets per thread, so that the activity vectors hold every usage level.
// A reference model per cache (cmon_tb_pkg) predicts every activity vector;
// after each interrupt the testbench reads the vector words through the
// register bus and compares them, and it checks that interrupts come exactly
// one interval apart. Phases:
//   1. one complete one-million-cycle interval with the reset configuration
//      (only the enable bit is written);
//   2. short programmed intervals (interval and cutoff rewritten);
//   3. miss-only counting;
//   4. monitor disabled while traffic continues, then re-enabled;
//   5. an interval longer than 2**20 cycles with every level-2 access of
//      thread 0 in one super set, so that its counter saturates.
// Each mechanism is counted and a failure is recorded for any that never
// happened.
module tb_cmon_top;
  import cmon_pkg::*;
  import cmon_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic l2_valid, l2_miss, l3_valid, l3_miss;
  logic [31:0] l2_addr, l3_addr;
  logic [0:0] l2_tid, l3_tid;
  logic csr_req, csr_we, csr_rvalid, l2_irq, l3_irq;
  logic [CSR_AW:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata;

  cmon_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  initial begin
    // the whole test is about 2.4 million cycles
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- models
  cmon_model m [2];   // 0: level 2, 1: level 3

  // configuration in force in the current and in the previous cycle
  int unsigned cut_cur [2], cut_prev [2], ivl [2];
  bit en [2], mo [2];
  // interrupt spacing
  longint unsigned last_irq [2];
  bit spacing_ok [2];
  // mechanism counters
  int n_filtered = 0, n_disabled = 0, n_spacing = 0, n_reprog = 0, n_full = 0;

  // ------------------------------------------------------- register traffic
  typedef struct {
    bit          we;
    logic [10:0] addr;
    logic [31:0] data;   // write data, or expected read data
    string       what;
  } csr_op_t;
  csr_op_t ops [$];
  bit      rd_pend = 0;
  csr_op_t rd_op;

  // -------------------------------------------------------- traffic shape
  int unsigned rate = 16;       // one access in `rate` cycles per bus
  bit          saturate = 0;    // all level-2 thread-0 accesses to one set
  int unsigned miss_pct = 50;

  function automatic logic [31:0] gen_addr(int unsigned cache, int unsigned tid);
    logic [31:0] a;
    int unsigned lsb;
    a   = $urandom;
    lsb = (cache == 0) ? 11 : 13;
    if ($urandom_range(0, 1) != 0) begin
      // hot super sets: 4 per thread, at 8*tid + 0..3 (+16 for level 3)
      a[lsb +: 5] = 5'(8 * tid + $urandom_range(0, 3) + 16 * cache);
    end
    return a;
  endfunction

  function automatic void push_vector_reads(int unsigned c);
    int unsigned nw;
    nw = 2 * m[c].words;
    for (int i = 0; i < int'(nw); i++) begin
      csr_op_t op;
      op.we   = 0;
      op.addr = {1'(c), CSR_VEC_BASE + 10'(4 * i)};
      op.data = m[c].exp_words.pop_front();
      op.what = $sformatf("L%0d vector word %0d (interval %0d)", c + 2, i, m[c].closes);
      ops.push_back(op);
    end
  endfunction

  function automatic void wr(int unsigned c, logic [9:0] a, logic [31:0] d);
    csr_op_t op;
    op.we = 1; op.addr = {1'(c), a}; op.data = d; op.what = "write";
    ops.push_back(op);
  endfunction

  function automatic void rd(int unsigned c, logic [9:0] a, logic [31:0] exp, string what);
    csr_op_t op;
    op.we = 0; op.addr = {1'(c), a}; op.data = exp; op.what = what;
    ops.push_back(op);
  endfunction

  // one clock cycle of stimulus and checking, called at the falling edge
  task automatic step();
    logic [1:0] irq;
    csr_op_t op;
    bit issued_we;
    irq = {l3_irq, l2_irq};
    cycle++;

    // interrupts: close the model interval, check spacing, queue the reads
    for (int c = 0; c < 2; c++) begin
      m[c].observe(irq[c], cut_prev[c]);
      if (irq[c]) begin
        if (spacing_ok[c]) begin
          checks++;
          n_spacing++;
          if (cycle - last_irq[c] != ivl[c]) begin
            failures++;
            $display("FAIL L%0d interrupt spacing %0d, interval %0d", c + 2,
                     cycle - last_irq[c], ivl[c]);
          end
        end
        if (ivl[c] == 1_000_000 && spacing_ok[c]) n_full++;
        last_irq[c]   = cycle;
        spacing_ok[c] = en[c];
        push_vector_reads(c);
      end
    end

    // read response of the previous cycle
    if (rd_pend) begin
      checks++;
      if (!csr_rvalid || csr_rdata !== rd_op.data) begin
        failures++;
        $display("FAIL %s: rvalid=%b data=%h expected %h", rd_op.what, csr_rvalid,
                 csr_rdata, rd_op.data);
      end
      rd_pend = 0;
    end else begin
      checks++;
      if (csr_rvalid) begin
        failures++;
        $display("FAIL read data without a request");
      end
    end

    // next register operation
    csr_req = 0; csr_we = 0;
    issued_we = 0;
    if (ops.size() != 0) begin
      op = ops.pop_front();
      csr_req = 1; csr_we = op.we; csr_addr = op.addr; csr_wdata = op.data;
      if (op.we) issued_we = 1;
      else begin
        rd_pend = 1;
        rd_op   = op;
      end
    end

    // cache bus traffic
    for (int c = 0; c < 2; c++) begin
      logic v, miss;
      logic [31:0] a;
      logic [0:0] t;
      t    = 1'($urandom);
      v    = saturate ? (c == 0) : ($urandom_range(1, rate) == 1);
      if (saturate && c == 0) t = 0;
      a    = (saturate && c == 0) ? 32'h0000_3800 : gen_addr(c, t);
      miss = $urandom_range(1, 100) <= miss_pct;
      if (c == 0) begin l2_valid = v; l2_addr = a; l2_tid = t; l2_miss = miss; end
      else        begin l3_valid = v; l3_addr = a; l3_tid = t; l3_miss = miss; end
      if (v) begin
        if (!en[c]) n_disabled++;
        else if (mo[c] && !miss) n_filtered++;
        else m[c].access(a, t);
      end
    end

    // configuration written in this cycle is in force from the next one
    for (int c = 0; c < 2; c++) cut_prev[c] = cut_cur[c];
    if (issued_we) begin
      int c;
      c = int'(op.addr[10]);
      case (op.addr[9:0])
        CSR_CTRL: begin
          if (en[c] != op.data[0]) spacing_ok[c] = 0;
          en[c] = op.data[0];
          mo[c] = op.data[1];
        end
        CSR_CUTOFF:   cut_cur[c] = op.data[19:0];
        CSR_INTERVAL: begin ivl[c] = op.data; spacing_ok[c] = 0; n_reprog++; end
        default: ;
      endcase
    end
  endtask

  task automatic run(longint unsigned n);
    for (longint unsigned i = 0; i < n; i++) begin
      @(negedge clk);
      step();
    end
  endtask

  // run until every queued register operation is done
  task automatic drain();
    while (ops.size() != 0 || rd_pend) begin
      @(negedge clk);
      step();
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      m[c] = new(2, 32, 6, (c == 0) ? 10 : 12, 20, 4);
      cut_cur[c] = 1024; cut_prev[c] = 1024; ivl[c] = 1_000_000;
      en[c] = 0; mo[c] = 0; spacing_ok[c] = 0; last_irq[c] = 0;
    end
    l2_valid = 0; l2_addr = 0; l2_tid = 0; l2_miss = 0;
    l3_valid = 0; l3_addr = 0; l3_tid = 0; l3_miss = 0;
    csr_req = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // reset values and identification
    for (int c = 0; c < 2; c++) begin
      rd(c, CSR_CTRL, 0, "reset ctrl");
      rd(c, CSR_CUTOFF, 1024, "reset cutoff");
      rd(c, CSR_INTERVAL, 1_000_000, "reset interval");
      rd(c, CSR_CONFIG, {8'd2, 8'd4, 16'd32}, "config");
      rd(c, CSR_STATUS, 0, "status before first interval");
    end
    drain();

    // 1. one full interval of one million cycles at the reset configuration
    rate = 16;
    wr(0, CSR_CTRL, 1);
    wr(1, CSR_CTRL, 1);
    run(2_000_010);
    drain();
    for (int c = 0; c < 2; c++) begin
      rd(c, CSR_STATUS, 1, "status after an interval");
      rd(c, CSR_SAMPLES, 2, "two intervals counted");
    end
    drain();

    // 2. short intervals, cutoff rescaled
    for (int c = 0; c < 2; c++) begin
      wr(c, CSR_CUTOFF, 4);
      wr(c, CSR_INTERVAL, 2000);
    end
    run(20_000);
    for (int c = 0; c < 2; c++) wr(c, CSR_INTERVAL, 777);
    run(10_000);

    // 3. miss-only counting
    for (int c = 0; c < 2; c++) wr(c, CSR_CTRL, 3);
    miss_pct = 30;
    run(10_000);
    miss_pct = 50;

    // 4. disabled, then running again
    for (int c = 0; c < 2; c++) wr(c, CSR_CTRL, 0);
    run(5_000);
    for (int c = 0; c < 2; c++) wr(c, CSR_CTRL, 1);
    run(10_000);

    // 5. saturation: level-2 thread 0, super set 7, for 1.1 million cycles;
    //    the count stops at 2**20-1, which is level 2 for the cutoff
    //    2**20-1 (a wrapped count would give level 0)
    wr(0, CSR_CUTOFF, 20'hFFFFF);
    wr(0, CSR_INTERVAL, 1_100_000);
    drain();
    saturate = 1;
    run(1_100_010);
    saturate = 0;
    run(10);
    drain();

    // every mechanism must have happened
    begin
      int unsigned need [string];
      need["L2 intervals"]            = m[0].closes;
      need["L3 intervals"]            = m[1].closes;
      need["full 1M-cycle intervals"] = n_full;
      need["interval spacing checks"] = n_spacing;
      need["interval reprogramming"]  = n_reprog;
      need["miss-only filtered"]      = n_filtered;
      need["ignored while disabled"]  = n_disabled;
      need["counter saturation"]      = m[0].saturations;
      need["access at a boundary"]    = m[0].collisions + m[1].collisions;
      for (int l = 0; l < 4; l++) begin
        need[$sformatf("L2 level %0d", l)] = m[0].level_seen[l];
        need[$sformatf("L3 level %0d", l)] = m[1].level_seen[l];
      end
      foreach (need[k]) begin
        $display("  %-26s %0d", k, need[k]);
        checks++;
        if (need[k] == 0) begin
          failures++;
          $display("FAIL mechanism never exercised: %s", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
