// cmon_activity_counters: super-set activity counters of one cache.
//
// One CNT_W-bit counter per (thread, super set). A snooped event increments
// the counter selected by its thread id and super-set index; a counter that
// reaches its maximum stays there (saturates). The sample pulse ends a
// sampling interval: every counter restarts from zero in that cycle, or from
// one if the same cycle's event selects it, so no event is lost across the
// boundary. The counts are outputs so that the activity vector stage can
// quantize them all in the sample cycle.
//
// Interface: counts[t*N_SS+s] is the count of thread t in super set s. An
// event changes the count on the next clock edge.
//
// From the original proposal: one counter per super set, indexed by the snooped
// address bits. Choices made here: counters kept per hardware thread (the scheduler
// needs each thread's usage), the width (20 bits holds the one million events
// an interval of one million cycles can bring), saturation and clear-on-sample.
module cmon_activity_counters
  import cmon_pkg::*;
#(
  parameter int unsigned THREADS = 2,
  parameter int unsigned N_SS    = 32,
  parameter int unsigned CNT_W   = 20,
  localparam int unsigned TID_W  = idx_w(THREADS),
  localparam int unsigned SS_W   = idx_w(N_SS)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 ev_valid,
  input  logic [TID_W-1:0]                     ev_tid,
  input  logic [SS_W-1:0]                      ev_ss,
  input  logic                                 sample,
  output logic [THREADS*N_SS-1:0][CNT_W-1:0]   counts
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  for (genvar t = 0; t < THREADS; t++) begin : g_thr
    for (genvar s = 0; s < N_SS; s++) begin : g_ss
      logic hit;
      assign hit = ev_valid && (32'(ev_tid) == t) && (32'(ev_ss) == s);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          counts[t*N_SS+s] <= '0;
        end else if (sample) begin
          counts[t*N_SS+s] <= CNT_W'(hit);
        end else if (hit && counts[t*N_SS+s] != CNT_MAX) begin
          counts[t*N_SS+s] <= counts[t*N_SS+s] + 1'b1;
        end
      end
    end
  end

endmodule
