// cmon_top: fine-grained cache monitoring for a two-thread SMT processor.
//
// Two cache_monitor instances snoop the buses of the unified level-2 cache
// (512 KB) and of the level-3 cache (2 MB). Each divides its cache into
// N_SS super sets, counts each thread's accesses per super set over a
// sampling interval and publishes a per-thread activity vector of few-bit
// usage levels, from which the operating system scheduler predicts how much
// two threads would interfere in the cache. Both monitors sit behind one
// register bus: address bit CSR_AW selects the level-3 monitor, the lower
// bits address the registers of cmon_pkg. Read data returns one cycle after
// the request.
//
// From the original proposal: level-2 and level-3 caches of 512 KB and 2 MB, two
// hardware threads (the modelled processor is a Pentium 4 with
// Hyper-Threading), 32 super sets, usage levels 0-3, one-million-cycle
// intervals. Choices made here: 64-byte lines and 8 ways for both caches (1024 and
// 4096 sets), the register bus and its decoding, and leaving the level-1
// caches unmonitored since their size is not given.
module cmon_top
  import cmon_pkg::*;
#(
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned THREADS      = 2,
  parameter int unsigned LINE_BITS    = 6,
  parameter int unsigned L2_SET_BITS  = 10,
  parameter int unsigned L3_SET_BITS  = 12,
  parameter int unsigned N_SS         = 32,
  parameter int unsigned CNT_W        = 20,
  parameter int unsigned LEVELS       = 4,
  parameter int unsigned DEF_CUTOFF   = 1024,
  parameter int unsigned DEF_INTERVAL = 1_000_000,
  localparam int unsigned TID_W       = idx_w(THREADS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // level-2 cache bus
  input  logic              l2_valid,
  input  logic [ADDR_W-1:0] l2_addr,
  input  logic [TID_W-1:0]  l2_tid,
  input  logic              l2_miss,
  // level-3 cache bus
  input  logic              l3_valid,
  input  logic [ADDR_W-1:0] l3_addr,
  input  logic [TID_W-1:0]  l3_tid,
  input  logic              l3_miss,
  // register bus
  input  logic              csr_req,
  input  logic              csr_we,
  input  logic [CSR_AW:0]   csr_addr,
  input  logic [CSR_DW-1:0] csr_wdata,
  output logic [CSR_DW-1:0] csr_rdata,
  output logic              csr_rvalid,
  // new activity vector of each cache
  output logic              l2_irq,
  output logic              l3_irq
);

  logic              sel_l3;
  logic [CSR_DW-1:0] l2_rdata, l3_rdata;
  logic              l2_rvalid, l3_rvalid;

  assign sel_l3 = csr_addr[CSR_AW];

  cache_monitor #(
    .ADDR_W(ADDR_W), .THREADS(THREADS), .LINE_BITS(LINE_BITS),
    .SET_BITS(L2_SET_BITS), .N_SS(N_SS), .CNT_W(CNT_W), .LEVELS(LEVELS),
    .DEF_CUTOFF(DEF_CUTOFF), .DEF_INTERVAL(DEF_INTERVAL)
  ) u_l2 (
    .clk, .rst_n,
    .bus_valid(l2_valid), .bus_addr(l2_addr), .bus_tid(l2_tid), .bus_miss(l2_miss),
    .csr_req  (csr_req && !sel_l3), .csr_we, .csr_addr(csr_addr[CSR_AW-1:0]),
    .csr_wdata, .csr_rdata(l2_rdata), .csr_rvalid(l2_rvalid),
    .irq      (l2_irq)
  );

  cache_monitor #(
    .ADDR_W(ADDR_W), .THREADS(THREADS), .LINE_BITS(LINE_BITS),
    .SET_BITS(L3_SET_BITS), .N_SS(N_SS), .CNT_W(CNT_W), .LEVELS(LEVELS),
    .DEF_CUTOFF(DEF_CUTOFF), .DEF_INTERVAL(DEF_INTERVAL)
  ) u_l3 (
    .clk, .rst_n,
    .bus_valid(l3_valid), .bus_addr(l3_addr), .bus_tid(l3_tid), .bus_miss(l3_miss),
    .csr_req  (csr_req && sel_l3), .csr_we, .csr_addr(csr_addr[CSR_AW-1:0]),
    .csr_wdata, .csr_rdata(l3_rdata), .csr_rvalid(l3_rvalid),
    .irq      (l3_irq)
  );

  // only the selected monitor answers, so an OR merges the read data
  assign csr_rvalid = l2_rvalid | l3_rvalid;
  assign csr_rdata  = l2_rdata & {CSR_DW{l2_rvalid}} | l3_rdata & {CSR_DW{l3_rvalid}};

endmodule
