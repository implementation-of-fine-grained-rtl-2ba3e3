// cmon_bus_snoop: address snooper on one cache bus.
//
// Every cycle the cache bus may carry one access: its address, the hardware
// thread that issued it and whether it missed. The snooper keeps the accesses
// that are to be counted (all of them, or only the misses when miss_only is
// set) and turns the address into a super-set index: a super set is a group
// of 2**(SET_BITS-SS_W) contiguous cache sets, so its index is simply the top
// SS_W bits of the set index, addr[LINE_BITS+SET_BITS-1 -: SS_W].
//
// Interface: bus_* is sampled every cycle; ev_* is the registered event, one
// cycle later (latency 1, one event per cycle). Nothing is counted while
// cfg_enable is low.
//
// From the original proposal: the snooped address bits index the super-set
// counters. Choices made here: the register stage, the miss-only filter (the
// evaluation uses both access and miss activity) and the default cache
// geometry (512 KB level-2 cache, 64-byte lines, 8 ways, hence 1024 sets).
module cmon_bus_snoop
  import cmon_pkg::*;
#(
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned THREADS   = 2,
  parameter int unsigned LINE_BITS = 6,
  parameter int unsigned SET_BITS  = 10,
  parameter int unsigned N_SS      = 32,
  localparam int unsigned TID_W    = idx_w(THREADS),
  localparam int unsigned SS_W     = idx_w(N_SS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_enable,
  input  logic              cfg_miss_only,
  // snooped cache bus
  input  logic              bus_valid,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [TID_W-1:0]  bus_tid,
  input  logic              bus_miss,
  // counted event
  output logic              ev_valid,
  output logic [TID_W-1:0]  ev_tid,
  output logic [SS_W-1:0]   ev_ss
);

  logic count_it;
  assign count_it = cfg_enable && bus_valid && (!cfg_miss_only || bus_miss);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_valid <= 1'b0;
      ev_tid   <= '0;
      ev_ss    <= '0;
    end else begin
      ev_valid <= count_it;
      ev_tid   <= bus_tid;
      ev_ss    <= bus_addr[LINE_BITS+SET_BITS-1 -: SS_W];
    end
  end

  initial begin
    assert (N_SS == (1 << SS_W)) else $error("N_SS must be a power of two");
    assert (SS_W <= SET_BITS) else $error("more super sets than cache sets");
    assert (LINE_BITS + SET_BITS <= ADDR_W) else $error("set index beyond address");
  end

  // A counted access must come from an existing hardware thread
  a_tid_range: assert property (@(posedge clk) disable iff (!rst_n)
    count_it |-> (32'(bus_tid) < THREADS));

endmodule
