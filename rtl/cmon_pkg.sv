// cmon_pkg: constants and types shared by the fine-grained cache monitor.
//
// The monitor groups the sets of a cache into contiguous "super sets", counts
// the accesses of every hardware thread to every super set over a sampling
// interval, and reduces each count to a small usage level. The resulting
// per-thread activity vector is read by the operating system scheduler.
//
// This package holds the software register map of one monitor (byte
// addresses, 32-bit registers) and the helper used to size index fields.
// The register map is a choice made here: the original proposal only says the
// monitor hands its activity vector to the operating system.
package cmon_pkg;

  // Register interface of one cache monitor
  localparam int unsigned CSR_AW = 10;  // byte address width inside one monitor
  localparam int unsigned CSR_DW = 32;  // register width

  localparam logic [CSR_AW-1:0] CSR_CTRL     = 10'h000;  // rw: bit0 enable, bit1 miss_only
  localparam logic [CSR_AW-1:0] CSR_CUTOFF   = 10'h004;  // rw: two-level cutoff C
  localparam logic [CSR_AW-1:0] CSR_INTERVAL = 10'h008;  // rw: interval length in cycles
  localparam logic [CSR_AW-1:0] CSR_SAMPLES  = 10'h00C;  // ro: completed intervals
  localparam logic [CSR_AW-1:0] CSR_CONFIG   = 10'h010;  // ro: {THREADS[7:0], LEVELS[7:0], N_SS[15:0]}
  localparam logic [CSR_AW-1:0] CSR_STATUS   = 10'h014;  // ro: bit0 vector valid
  localparam logic [CSR_AW-1:0] CSR_VEC_BASE = 10'h100;  // ro: activity vector words

  // Control register layout
  typedef struct packed {
    logic [29:0] rsvd;
    logic        miss_only;  // count only misses instead of every access
    logic        enable;     // monitor running
  } ctrl_t;

  // Width of an index over n items, at least one bit
  function automatic int unsigned idx_w(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
