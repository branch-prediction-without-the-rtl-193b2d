// missing_hist_hash: computes the secondary tag ("missing history") that
// selects one of the 2^STAG_W ahead predictions for the branch now being
// fetched.
//
// The ahead predictor started this branch's prediction AHEAD_DIST branches
// earlier, so the paths of the AHEAD_DIST branches in between are missing
// from the history it used.  Those branches are hashed from their predicted
// next fetch addresses: starting from zero, for every skipped branch from
// oldest to newest, sel = rotate_right_1(sel ^ a[6:2] ^ a[11:7]).  Hashing
// addresses rather than directions covers indirect branches and keeps the
// tag width independent of the ahead distance (both as described); taking
// the fall-through address for a not-taken branch is this design's choice.
//
// Hardware: a window of the last AHEAD_DIST folded 5-bit values (a shift
// register) and a small XOR/rotate network over it, so `sel` is a purely
// combinational function of the window and is ready at the start of the
// cycle the branch is fetched.  `push` shifts in the next fetch address of
// the branch fetched this cycle.  On a flush, `restore` reloads the window
// saved with the mispredicted branch (`win` is that checkpoint); a push in
// the same cycle is applied on top of the restored window.
module missing_hist_hash
  import bp_pkg::*;
#(
  parameter int N = AHEAD_DIST
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push,
  input  pc_t                   push_addr,
  input  logic                  restore,
  input  logic [N*STAG_W-1:0]   restore_win,
  output logic [N*STAG_W-1:0]   win,
  output stag_t                 sel
);

  // win[STAG_W-1:0] is the newest branch, the top slice the oldest.
  logic [N*STAG_W-1:0] base, nxt;

  always_comb begin
    base = restore ? restore_win : win;
    nxt  = base;
    if (push) nxt = {base[(N-1)*STAG_W-1:0], stag_fold(push_addr)};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) win <= '0;
    else        win <= nxt;

  always_comb begin
    stag_t s;
    s = '0;
    for (int k = N - 1; k >= 0; k--) begin
      s = s ^ win[k*STAG_W +: STAG_W];
      s = {s[0], s[STAG_W-1:1]};
    end
    sel = s;
  end

endmodule
