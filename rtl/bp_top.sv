// bp_top: branch-prediction front end combining the two ideas of this
// design: an ahead-pipelined TAGE that reads one entry per table and tells
// missing-history patterns apart with a secondary tag, and a global history
// that leaves out the updates of predictable prediction packets.
//
// Per fetched branch (one per cycle at most) the caller, i.e. the fetch unit,
// presents the branch PC, its fall-through address, its kind and whether the
// current packet holds a conditional branch.  The ahead front end returns
// the direction, the next fetch address and what the branch must carry to
// its resolution (`br_ckpt`, `br_key`, `br_stag`, `br_ahead_*`).  When the
// branch is followed as taken it ends its prediction packet: the history
// unit then updates the path history and, unless the packet is skipped, the
// global history; the packet's start address and path-history bits are
// looked up in the locked tables in the same cycle.  The global history,
// path history and virtual PC offset fed to the ahead TAGE are those of the
// pruned history, so the predictor sees the longer effective history.
//
// Flushes: a backend misprediction (`rs_*` with `rs_mispred`) or a late
// flush from the multi-cycle BTB restores history and front-end state from
// the branch's checkpoint and re-applies that branch with its correct
// outcome.  Retired packets (`rt_*`) train the predictability tables.
// `prune_en` switches history pruning on; with it off the history takes
// every packet, as in a baseline TAGE.
//
// Putting the two mechanisms into one front end, and sharing the history
// between them, is this design's choice; each follows its own description.
module bp_top
  import bp_pkg::*;
#(
  parameter int PRUNE_THRESH = 2024,   // eligibility threshold of the training tables
  parameter int DIV_THRESH   = 185,    // divergence score that triggers a copy
  parameter int BL_THRESH    = 3,      // blacklist count above which training stops
  parameter int DECAY_INSTR  = 65536   // retired instructions between decays
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prune_en,
  input  pc_t         reset_pc,
  output logic        ready,
  // fetch
  input  logic        br_valid,
  input  pc_t         br_pc,
  input  pc_t         br_fallthru,
  input  logic        br_cond,
  input  logic        br_call,
  input  logic        br_ret,
  input  logic        br_jmp,
  input  logic        br_pkt_cond,
  output logic        br_accept,
  output logic        stall,
  output logic        pred_dir,
  output pred_src_t   pred_src,
  output logic        pred_taken,
  output pc_t         pred_next,
  output bp_ckpt_t    br_ckpt,
  output ahead_key_t  br_key,
  output stag_t       br_stag,
  output logic        br_ahead_ok,
  output logic        br_ahead_dir,
  output logic        br_skip,        // the packet this branch ends skips the GHR
  // late flush
  output logic        lf_valid,
  output pc_t         lf_pc,
  output pc_t         lf_target,
  // backend resolution
  input  logic        rs_valid,
  input  logic        rs_mispred,
  input  pc_t         rs_pc,
  input  logic        rs_cond,
  input  logic        rs_call,
  input  logic        rs_ret,
  input  logic        rs_jmp,
  input  logic        rs_pkt_cond,
  input  logic        rs_taken,
  input  pc_t         rs_target,
  input  pc_t         rs_next,
  input  bp_ckpt_t    rs_ckpt,
  input  ahead_key_t  rs_key,
  input  stag_t       rs_stag,
  input  logic        rs_ahead_ok,
  input  logic        rs_ahead_dir,
  output logic        rs_tage_pred,
  output logic        rs_long_hit,
  // retirement of a packet
  input  logic        rt_valid,
  input  pc_t         rt_pc,
  input  logic [7:0]  rt_phist,
  input  logic        rt_mispred,
  input  logic        rt_long_hit,
  input  logic [7:0]  rt_ninstr,
  // observation
  output hist_ckpt_t  hist,
  output logic        hist_skipped,
  output logic        hist_forced,
  output logic [15:0] pc_copies,
  output logic [15:0] cf_copies,
  output logic        bl_blocked,
  output logic        decaying
);

  logic       rs_flush;
  hist_ckpt_t lf_hctx;
  logic [3:0] lf_kind;
  fe_ckpt_t   f_ckpt, lf_fckpt;
  logic       lk_hit, lk_pc_hit, lk_cf_hit;
  logic [15:0] pc_score, cf_score;

  assign rs_flush = rs_valid && rs_mispred;

  ahead_frontend u_fe (
    .clk, .rst_n, .ready,
    .br_valid, .br_cond, .br_kind({br_pkt_cond, br_jmp, br_ret, br_call}),
    .br_accept, .br_pc,
    .br_vpc(br_pc + pc_t'(hist.bwd)), .br_fallthru,
    .br_ghr(hist.ghr), .br_phist(hist.phist),
    .stall, .pred_dir, .pred_src, .pred_taken, .pred_next,
    .br_ckpt(f_ckpt), .br_key, .br_stag, .br_ahead_ok, .br_ahead_dir,
    .lf_valid, .lf_pc, .lf_target, .lf_ckpt(lf_fckpt), .lf_hctx, .lf_kind,
    .br_hctx(hist),
    .rs_valid, .rs_mispred, .rs_pc, .rs_cond, .rs_taken, .rs_target, .rs_next,
    .rs_ckpt(rs_ckpt.f), .rs_key, .rs_stag, .rs_ahead_ok, .rs_ahead_dir,
    .rs_tage_pred, .rs_long_hit);

  assign br_ckpt = '{h: hist, f: f_ckpt};

  // ---------------- history event selection ----------------
  logic       h_ev, h_restore, e_call, e_ret, e_jmp, e_cond;
  pc_t        e_pc, e_tgt;
  hist_ckpt_t h_rckpt, h_base;

  always_comb begin
    h_restore = rs_flush || lf_valid;
    h_rckpt   = rs_flush ? rs_ckpt.h : lf_hctx;
    if (rs_flush) begin
      h_ev = rs_taken;
      e_pc = rs_pc;  e_tgt = rs_target;
      {e_cond, e_jmp, e_ret, e_call} = {rs_pkt_cond, rs_jmp, rs_ret, rs_call};
    end else if (lf_valid) begin
      h_ev = 1'b1;
      e_pc = lf_pc;  e_tgt = lf_target;
      {e_cond, e_jmp, e_ret, e_call} = lf_kind;
    end else begin
      h_ev = br_accept && pred_taken;
      e_pc = br_pc;  e_tgt = pred_next;
      {e_cond, e_jmp, e_ret, e_call} = {br_pkt_cond, br_jmp, br_ret, br_call};
    end
    h_base = h_restore ? h_rckpt : hist;
  end

  // locked-table lookup with the start address and path history of the
  // packet the event ends
  history_pruning_unit #(
    .THRESH(PRUNE_THRESH), .DIV_THRESH(DIV_THRESH), .BL_THRESH(BL_THRESH),
    .DECAY_INSTR(DECAY_INSTR)
  ) u_hpu (
    .clk, .rst_n,
    .lk_pc(h_base.pkt_pc), .lk_phist(h_base.phist[7:0]),
    .lk_hit, .lk_pc_hit, .lk_cf_hit,
    .rt_valid, .rt_pc, .rt_phist, .rt_mispred, .rt_long_hit, .rt_ninstr,
    .pc_copies, .cf_copies, .pc_score, .cf_score, .bl_blocked, .decaying);

  pruned_history u_hist (
    .clk, .rst_n, .prune_en, .reset_pc,
    .ev(h_ev), .br_pc(e_pc), .br_target(e_tgt),
    .is_call(e_call), .is_ret(e_ret), .is_jmp(e_jmp), .pkt_cond(e_cond),
    .locked_hit(lk_hit),
    .skipped(hist_skipped), .forced(hist_forced),
    .restore(h_restore), .restore_ckpt(h_rckpt),
    .ckpt(hist));

  assign br_skip = hist_skipped && !h_restore;

endmodule
