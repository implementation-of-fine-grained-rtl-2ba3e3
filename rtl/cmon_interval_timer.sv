// cmon_interval_timer: sampling interval timer.
//
// Counts clock cycles while enabled and raises sample for one cycle at the
// last cycle of every interval of cfg_interval cycles (an interval of 0 or
// 1 samples every cycle). sample_count counts the completed intervals and
// wraps. While disabled the timer holds its position; the cycle counter is
// reset to zero by restart (used when software rewrites the interval), which
// also suppresses a sample due in that cycle.
//
// Interface: sample is a one-cycle pulse, combinational from the cycle
// counter, so the counters and the activity vector act on the same edge.
//
// From the original proposal: cache activity is sampled over intervals of one
// million clock cycles, the default of cfg_interval. Choices made here: the
// interval is programmable, and the hold/restart behaviour.
module cmon_interval_timer #(
  parameter int unsigned CYC_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             restart,
  input  logic [CYC_W-1:0] cfg_interval,
  output logic             sample,
  output logic [31:0]      sample_count
);

  logic [CYC_W-1:0] cyc;
  logic             last;

  // cyc + 1 >= interval, without overflow
  assign last   = ({1'b0, cyc} + 1'b1) >= {1'b0, cfg_interval};
  assign sample = enable && last && !restart;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc          <= '0;
      sample_count <= '0;
    end else if (restart) begin
      cyc <= '0;
    end else if (enable) begin
      if (last) begin
        cyc          <= '0;
        sample_count <= sample_count + 1'b1;
      end else begin
        cyc <= cyc + 1'b1;
      end
    end
  end

endmodule
