// cmon_activity_vector: builds and holds the activity vectors of one cache.
//
// At the end of a sampling interval (sample high) every activity counter is
// reduced to a usage level by its own cmon_quantizer, all in parallel, and
// the levels are stored as the activity vector of each thread: an
// N_SS-dimensional vector of LVL_W-bit levels. The vector then stays stable
// for the whole next interval, so software can read it at any time, and
// vec_valid tells that at least one interval has completed since reset.
//
// Interface: counts[t*N_SS+s] in, vec[t*N_SS+s] out; vec changes on the
// clock edge that ends the sample cycle (latency 1 from sample).
//
// From the original proposal: each counter reduced to a few bits and the results
// combined into an N-dimensional activity vector, so that only the vector
// and not the counters travels to the operating system. Choices made here: one
// quantizer per counter (all are reduced in one cycle) and the holding
// register.
module cmon_activity_vector
  import cmon_pkg::*;
#(
  parameter int unsigned THREADS = 2,
  parameter int unsigned N_SS    = 32,
  parameter int unsigned CNT_W   = 20,
  parameter int unsigned LEVELS  = 4,
  localparam int unsigned LVL_W  = idx_w(LEVELS)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                sample,
  input  logic [CNT_W-1:0]                    cutoff,
  input  logic [THREADS*N_SS-1:0][CNT_W-1:0]  counts,
  output logic [THREADS*N_SS-1:0][LVL_W-1:0]  vec,
  output logic                                vec_valid
);

  logic [THREADS*N_SS-1:0][LVL_W-1:0] level;

  for (genvar i = 0; i < THREADS*N_SS; i++) begin : g_q
    cmon_quantizer #(.CNT_W(CNT_W), .LEVELS(LEVELS)) u_q (
      .count (counts[i]),
      .cutoff(cutoff),
      .level (level[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec       <= '0;
      vec_valid <= 1'b0;
    end else if (sample) begin
      vec       <= level;
      vec_valid <= 1'b1;
    end
  end

endmodule
