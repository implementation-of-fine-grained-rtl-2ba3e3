// cmon_quantizer: reduces one activity count to a usage level.
//
// The count of one super set is given a score between 0 (low usage) and
// LEVELS-1. Software programs one cutoff C, the decision point of a two-level
// (one-bit) score; for more levels the cutoffs are scaled linearly from it,
// at j*2*C/LEVELS for j = 1 .. LEVELS-1. With the default four levels the
// cutoffs are C/2, C and 3C/2. The level is the number of cutoffs the count
// reaches (count >= cutoff), computed without division as
// count*LEVELS >= j*2*C.
//
// Interface: purely combinational, count and cutoff in, level out.
//
// From the original proposal: few-bit levels, four levels (0-3) by default, the
// linear scaling of the cutoffs from the two-level one. Choices made here: a count
// equal to a cutoff belongs to the higher level; LEVELS must be a power of
// two so the level fills its field.
module cmon_quantizer
  import cmon_pkg::*;
#(
  parameter int unsigned CNT_W  = 20,
  parameter int unsigned LEVELS = 4,
  localparam int unsigned LVL_W = idx_w(LEVELS)
) (
  input  logic [CNT_W-1:0] count,
  input  logic [CNT_W-1:0] cutoff,
  output logic [LVL_W-1:0] level
);

  // wide enough for (LEVELS-1)*2*cutoff and count*LEVELS
  localparam int unsigned W = CNT_W + LVL_W + 2;

  logic [W-1:0] scaled_count;
  assign scaled_count = W'(count) * W'(LEVELS);

  always_comb begin
    level = '0;
    for (int unsigned j = 1; j < LEVELS; j++) begin
      if (scaled_count >= W'(j) * W'(2) * W'(cutoff)) level = LVL_W'(j);
    end
  end

  initial assert (LEVELS >= 2 && LEVELS == (1 << LVL_W))
    else $error("LEVELS must be a power of two, at least 2");

endmodule
