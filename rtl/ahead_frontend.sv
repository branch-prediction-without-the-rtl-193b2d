// ahead_frontend: direction and target prediction for the branch being
// fetched, built around the ahead-pipelined TAGE.
//
// For every fetched branch (`br_valid`):
//   - the prediction-queue entry made AHEAD_DIST branches earlier is read and
//     the secondary tag, hashed from the next fetch addresses of the skipped
//     branches, selects one of its 32 predictions;
//   - the single-cycle BTB gives the target, its 2-bit counter and the
//     override decision; the multi-cycle BTB is looked up in parallel;
//   - a new ahead lookup is started with this branch's PC, VPC and history,
//     for the branch AHEAD_DIST later; its 32 predictions land in the queue
//     three cycles later.
// Outputs are combinational: `pred_dir`, `pred_src`, `pred_taken` (the
// direction fetch follows: a taken prediction without a single-cycle target
// is followed as not taken), `pred_next`, plus what the branch must carry to
// its resolution: `br_ckpt` (queue pointers and missing-history window),
// `br_key` (the inputs of the lookup that predicted it), `br_stag`,
// `br_ahead_ok` (an ahead prediction existed) and `br_ahead_dir`.
//
// Late flush: when the single-cycle BTB missed a branch predicted taken and
// the multi-cycle BTB returns its target three cycles later, `lf_valid`
// reports the branch (PC, target, checkpoint) and the front end recovers by
// itself; history recovery is left to the caller.  Backend resolution
// (`rs_valid`) trains the ahead TAGE and both BTBs; with `rs_mispred` it
// restores the queue pointers and the missing-history window from the
// branch's checkpoint and squashes younger lookups.  A backend flush has
// priority over a late flush in the same cycle.
//
// When the queue entry of the fetched branch is allocated but not yet
// written (its ahead prediction is late) `stall` is raised and the branch
// must be presented again.  Stalling is the simpler of the two ways the
// description gives for late predictions; using the single-cycle prediction
// and flushing on disagreement is not built.  Keeping the lookup inputs per
// queue entry, to train at resolve, is this design's choice.
module ahead_frontend
  import bp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic       ready,
  // fetch
  input  logic       br_valid,
  input  logic       br_cond,      // conditional; others are always taken
  input  logic [3:0] br_kind,      // carried to lf_kind, not interpreted
  output logic       br_accept,    // the branch was taken in this cycle
  input  pc_t        br_pc,
  input  pc_t        br_vpc,
  input  pc_t        br_fallthru,
  input  ghr_t       br_ghr,
  input  phist_t     br_phist,
  output logic       stall,
  output logic       pred_dir,
  output pred_src_t  pred_src,
  output logic       pred_taken,
  output pc_t        pred_next,
  output fe_ckpt_t   br_ckpt,
  output ahead_key_t br_key,
  output stag_t      br_stag,
  output logic       br_ahead_ok,
  output logic       br_ahead_dir,
  // late flush from the multi-cycle BTB
  output logic       lf_valid,
  output pc_t        lf_pc,
  output pc_t        lf_target,
  output fe_ckpt_t   lf_ckpt,
  output hist_ckpt_t lf_hctx,
  output logic [3:0] lf_kind,
  input  hist_ckpt_t br_hctx,      // history checkpoint of the fetched branch
  // backend resolution
  input  logic       rs_valid,
  input  logic       rs_mispred,
  input  pc_t        rs_pc,
  input  logic       rs_cond,
  input  logic       rs_taken,
  input  pc_t        rs_target,
  input  pc_t        rs_next,      // correct next fetch address
  input  fe_ckpt_t   rs_ckpt,
  input  ahead_key_t rs_key,
  input  stag_t      rs_stag,
  input  logic       rs_ahead_ok,
  input  logic       rs_ahead_dir,
  output logic       rs_tage_pred,
  output logic       rs_long_hit
);

  // ---------------- fetch-side lookups ----------------
  logic    pq_ready, pq_pending;
  preds_t  pq_preds;
  pq_ptr_t alloc_id, ck_rd, ck_alloc, rd_ptr, alloc_ptr, wr_ptr;
  logic    sc_hit, sc_taken, sc_override;
  pc_t     sc_target;
  stag_t   sel;
  logic [AHEAD_DIST*STAG_W-1:0] win;
  logic    fire;
  logic    flush, rs_flush;
  logic    tg_resp, tg_wr;
  pq_ptr_t tg_id, sq_from;
  preds_t  tg_preds;

  assign stall = br_valid && pq_pending;
  assign fire  = br_valid && !pq_pending && ready && !flush;

  sc_btb u_sc (
    .clk, .rst_n,
    .lk_pc(br_pc), .lk_hit(sc_hit), .lk_target(sc_target),
    .lk_taken(sc_taken), .lk_override(sc_override),
    .up_valid(rs_valid), .up_pc(rs_pc), .up_taken(rs_taken),
    .up_target(rs_target), .up_ahead_valid(rs_ahead_ok && rs_cond),
    .up_ahead_correct(rs_ahead_dir == rs_taken));

  logic      sel_dir;
  pred_src_t sel_src;
  final_select u_sel (
    .pq_ready, .pq_preds, .sel, .sc_hit, .sc_taken, .sc_override,
    .ahead_dir(br_ahead_dir), .dir(sel_dir), .src(sel_src));
  assign pred_dir  = br_cond ? sel_dir : 1'b1;
  assign pred_src  = sel_src;
  assign br_accept = fire;

  assign pred_taken  = pred_dir && sc_hit;
  assign pred_next   = pred_taken ? sc_target : br_fallthru;
  assign br_stag     = sel;
  assign br_ahead_ok = pq_ready;
  assign br_ckpt     = '{rd_ptr: ck_rd, alloc_ptr: ck_alloc, win: win};

  // ---------------- flush control ----------------
  fe_ckpt_t fl_ckpt;
  pc_t      fl_next;
  assign rs_flush = rs_valid && rs_mispred;
  assign flush    = rs_flush || lf_valid;
  assign fl_ckpt  = rs_flush ? rs_ckpt : lf_ckpt;
  assign fl_next  = rs_flush ? rs_next : lf_target;

  pred_queue u_pq (
    .clk, .rst_n,
    .br(fire), .rd_ready(pq_ready), .rd_pending(pq_pending), .rd_preds(pq_preds),
    .alloc_id, .ck_rd, .ck_alloc,
    .wr(tg_wr), .wr_id(tg_id), .wr_preds(tg_preds),
    .rec(flush), .rec_rd(fl_ckpt.rd_ptr), .rec_alloc(fl_ckpt.alloc_ptr),
    .rd_ptr, .alloc_ptr, .wr_ptr);

  missing_hist_hash u_mh (
    .clk, .rst_n,
    .push(flush || fire), .push_addr(flush ? fl_next : pred_next),
    .restore(flush), .restore_win(fl_ckpt.win),
    .win, .sel);

  // ---------------- ahead TAGE ----------------
  assign sq_from = pq_inc(pq_inc(fl_ckpt.alloc_ptr));
  assign tg_wr   = tg_resp && !(flush && int'(pq_dist(sq_from, tg_id)) < PQ_DEPTH / 2);

  ahead_tage u_tage (
    .clk, .rst_n, .ready,
    .req_valid(fire), .req_pc(br_pc), .req_vpc(br_vpc), .req_ghr(br_ghr),
    .req_phist(br_phist), .req_id(alloc_id),
    .resp_valid(tg_resp), .resp_preds(tg_preds), .resp_id(tg_id),
    .squash(flush), .squash_from(sq_from),
    .upd_valid(rs_valid && rs_cond), .upd_pc(rs_key.pc), .upd_vpc(rs_key.vpc),
    .upd_ghr(rs_key.ghr), .upd_phist(rs_key.phist), .upd_stag(rs_stag),
    .upd_taken(rs_taken), .upd_pred(rs_tage_pred), .upd_long_hit(rs_long_hit));

  // lookup inputs per queue entry, read back with the entry
  ahead_key_t keys [PQ_DEPTH];
  always_ff @(posedge clk)
    if (fire) keys[alloc_id] <= '{pc: br_pc, vpc: br_vpc, ghr: br_ghr, phist: br_phist};
  assign br_key = keys[rd_ptr];

  // ---------------- multi-cycle BTB and late flush ----------------
  logic mc_resp, mc_hit;
  pc_t  mc_target;

  mc_btb u_mc (
    .clk, .rst_n,
    .req_valid(fire), .req_pc(br_pc),
    .resp_valid(mc_resp), .resp_hit(mc_hit), .resp_target(mc_target),
    .up_valid(rs_valid && rs_taken), .up_pc(rs_pc), .up_target(rs_target));

  typedef struct packed {
    logic       need;    // predicted taken but no single-cycle target
    logic [3:0] kind;
    pc_t        pc;
    fe_ckpt_t   f;
    hist_ckpt_t h;
  } lf_t;
  lf_t  lf_pipe [3];
  logic lf_v [3];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) lf_v[i] <= 1'b0;
    end else begin
      lf_v[0] <= fire && !flush;
      lf_v[1] <= lf_v[0] && !flush;
      lf_v[2] <= lf_v[1] && !flush;
    end

  always_ff @(posedge clk) begin
    lf_pipe[0] <= '{need: pred_dir && !sc_hit, kind: br_kind, pc: br_pc, f: br_ckpt, h: br_hctx};
    lf_pipe[1] <= lf_pipe[0];
    lf_pipe[2] <= lf_pipe[1];
  end

  assign lf_valid  = lf_v[2] && mc_resp && mc_hit && lf_pipe[2].need && !rs_flush;
  assign lf_pc     = lf_pipe[2].pc;
  assign lf_target = mc_target;
  assign lf_ckpt   = lf_pipe[2].f;
  assign lf_hctx   = lf_pipe[2].h;
  assign lf_kind   = lf_pipe[2].kind;

endmodule
