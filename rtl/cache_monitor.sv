// cache_monitor: fine-grained activity monitor for one cache.
//
// Snoops one cache bus and produces, for every hardware thread, an activity
// vector with one few-bit usage level per super set (group of contiguous
// cache sets). Datapath: cmon_bus_snoop extracts the thread id and super-set
// index of each counted access; cmon_activity_counters counts them per
// (thread, super set); cmon_interval_timer ends each sampling interval, at
// which point cmon_activity_vector quantizes all counters against the
// programmed cutoffs and holds the vector while the counters start again
// from zero. cmon_csr gives software access to configuration and vectors,
// and irq pulses for one cycle when a new vector is ready.
//
// Timing: an access on the bus is counted two cycles later (snoop register,
// counter). A vector becomes readable the cycle after the interval ends; an
// access that is still in the snoop register at that point counts towards
// the next interval.
//
// From the original proposal: snooped address bits index super-set counters, the
// counters are reduced to a few bits and combined into an N-dimensional
// activity vector, sampled every million cycles. The per-thread split, the
// register interface, the interrupt and the default cache geometry are this
// design's own choices.
module cache_monitor
  import cmon_pkg::*;
#(
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned THREADS      = 2,
  parameter int unsigned LINE_BITS    = 6,
  parameter int unsigned SET_BITS     = 10,
  parameter int unsigned N_SS         = 32,
  parameter int unsigned CNT_W        = 20,
  parameter int unsigned LEVELS       = 4,
  parameter int unsigned DEF_CUTOFF   = 1024,
  parameter int unsigned DEF_INTERVAL = 1_000_000,
  localparam int unsigned TID_W       = idx_w(THREADS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // snooped cache bus
  input  logic              bus_valid,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [TID_W-1:0]  bus_tid,
  input  logic              bus_miss,
  // register bus
  input  logic              csr_req,
  input  logic              csr_we,
  input  logic [CSR_AW-1:0] csr_addr,
  input  logic [CSR_DW-1:0] csr_wdata,
  output logic [CSR_DW-1:0] csr_rdata,
  output logic              csr_rvalid,
  // new activity vector available
  output logic              irq
);

  localparam int unsigned SS_W  = idx_w(N_SS);
  localparam int unsigned LVL_W = idx_w(LEVELS);

  ctrl_t              cfg_ctrl;
  logic [CNT_W-1:0]   cfg_cutoff;
  logic [31:0]        cfg_interval;
  logic               interval_wr;
  logic [31:0]        sample_count;
  logic               sample;

  logic               ev_valid;
  logic [TID_W-1:0]   ev_tid;
  logic [SS_W-1:0]    ev_ss;

  logic [THREADS*N_SS-1:0][CNT_W-1:0] counts;
  logic [THREADS*N_SS-1:0][LVL_W-1:0] vec;
  logic                               vec_valid;

  cmon_bus_snoop #(
    .ADDR_W(ADDR_W), .THREADS(THREADS), .LINE_BITS(LINE_BITS),
    .SET_BITS(SET_BITS), .N_SS(N_SS)
  ) u_snoop (
    .clk, .rst_n,
    .cfg_enable   (cfg_ctrl.enable),
    .cfg_miss_only(cfg_ctrl.miss_only),
    .bus_valid, .bus_addr, .bus_tid, .bus_miss,
    .ev_valid, .ev_tid, .ev_ss
  );

  cmon_activity_counters #(
    .THREADS(THREADS), .N_SS(N_SS), .CNT_W(CNT_W)
  ) u_counters (
    .clk, .rst_n, .ev_valid, .ev_tid, .ev_ss, .sample, .counts
  );

  cmon_interval_timer #(.CYC_W(32)) u_timer (
    .clk, .rst_n,
    .enable      (cfg_ctrl.enable),
    .restart     (interval_wr),
    .cfg_interval(cfg_interval),
    .sample,
    .sample_count
  );

  cmon_activity_vector #(
    .THREADS(THREADS), .N_SS(N_SS), .CNT_W(CNT_W), .LEVELS(LEVELS)
  ) u_vector (
    .clk, .rst_n, .sample, .cutoff(cfg_cutoff), .counts, .vec, .vec_valid
  );

  cmon_csr #(
    .THREADS(THREADS), .N_SS(N_SS), .CNT_W(CNT_W), .LEVELS(LEVELS),
    .DEF_CUTOFF(DEF_CUTOFF), .DEF_INTERVAL(DEF_INTERVAL)
  ) u_csr (
    .clk, .rst_n,
    .csr_req, .csr_we, .csr_addr, .csr_wdata, .csr_rdata, .csr_rvalid,
    .cfg_ctrl, .cfg_cutoff, .cfg_interval, .interval_wr,
    .sample_count, .vec, .vec_valid
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq <= 1'b0;
    else        irq <= sample;
  end

endmodule
