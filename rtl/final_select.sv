// final_select: picks the final direction of the branch being fetched.
//
// The prediction-queue entry holds one ahead prediction per secondary-tag
// value; the secondary tag computed from the skipped branches drives a plain
// NSTAG-to-1 multiplexer (not a priority chain), so this selection does not
// depend on the predictions and runs in parallel with the queue read.  The
// single-cycle counter then overrides the ahead prediction when its override
// counter says it is the more reliable one.  Without an ahead prediction
// (the first AHEAD_DIST branches after reset) the single-cycle counter is
// used, and a branch unknown to the single-cycle BTB is predicted not taken.
// These rules follow the description.  Purely combinational.
module final_select
  import bp_pkg::*;
(
  input  logic      pq_ready,     // queue entry holds an ahead prediction
  input  preds_t    pq_preds,
  input  stag_t     sel,          // secondary tag from the missing history
  input  logic      sc_hit,
  input  logic      sc_taken,
  input  logic      sc_override,
  output logic      ahead_dir,    // the selected ahead prediction
  output logic      dir,
  output pred_src_t src
);

  assign ahead_dir = pq_preds[sel];

  always_comb begin
    if (pq_ready) begin
      if (sc_hit && sc_override) begin
        dir = sc_taken;
        src = SRC_OVERRIDE;
      end else begin
        dir = ahead_dir;
        src = SRC_AHEAD;
      end
    end else if (sc_hit) begin
      dir = sc_taken;
      src = SRC_NOAHEAD;
    end else begin
      dir = 1'b0;
      src = SRC_NONE;
    end
  end

endmodule
