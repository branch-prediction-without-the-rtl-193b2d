// pruned_history: speculative global history (GHR), path history (PHIST),
// global backward counter and current packet start address, with skipping
// of redundant GHR updates.
//
// History is updated once per prediction packet, at the taken branch that
// ends it: HIST_PUSH (4) bits hashed from the branch PC and target are
// shifted into the 256-bit GHR, and one PC bit into the path history.  The
// position of the taken branch implicitly records the not-taken branches
// before it.  A packet skips the GHR update when:
//   - pruning is enabled and the locked tables list the packet as
//     predictable (`locked_hit`), or it ends in a return or a direct
//     unconditional jump with no conditional branch before it;
//   - and it does not end in a call (calls always update);
//   - unless the backward counter forces the update (vpc_counter).
// The path history is always updated, so the control-flow context used to
// recognise predictable packets stays stable while the GHR is pruned.
// These rules follow the description.  The 4-bit hash, the PC bit taken into
// the path history and treating indirect branches like conditional ones are
// this design's choices.
//
// `ckpt` is the state seen by the packet now being fetched (save it per
// branch).  On a flush, `restore` reloads a checkpoint; an `ev` in the same
// cycle (the flushed branch, now taken) is applied on top of it.  Updates are
// visible the cycle after `ev`.
module pruned_history
  import bp_pkg::*;
#(
  parameter int VPC_MAX = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       prune_en,
  input  pc_t        reset_pc,
  // end of a packet: a taken branch at br_pc going to br_target
  input  logic       ev,
  input  pc_t        br_pc,
  input  pc_t        br_target,
  input  logic       is_call,
  input  logic       is_ret,
  input  logic       is_jmp,       // direct unconditional
  input  logic       pkt_cond,     // packet holds a conditional branch
  input  logic       locked_hit,
  output logic       skipped,      // this event did not write the GHR
  output logic       forced,
  // flush
  input  logic       restore,
  input  hist_ckpt_t restore_ckpt,
  output hist_ckpt_t ckpt
);

  hist_ckpt_t base;
  assign base = restore ? restore_ckpt : ckpt;

  logic skip_req, update, backward;
  logic [BWD_W-1:0] bwd_cnt;
  assign backward = (br_target < br_pc);
  assign skip_req = prune_en && !is_call &&
                    (locked_hit || ((is_ret || is_jmp) && !pkt_cond));
  assign skipped  = ev && !update;

  vpc_counter #(.MAX(VPC_MAX)) u_vpc (
    .clk, .rst_n,
    .ev, .skip_req, .backward,
    .update, .forced,
    .restore, .restore_val(restore_ckpt.bwd),
    .cnt(bwd_cnt)
  );

  function automatic logic [HIST_PUSH-1:0] hist_hash(input pc_t pc, input pc_t tgt);
    return pc[5:2] ^ pc[9:6] ^ tgt[5:2] ^ tgt[9:6];
  endfunction

  ghr_t   ghr_q;
  phist_t phist_q;
  pc_t    pkt_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ghr_q   <= '0;
      phist_q <= '0;
      pkt_q   <= reset_pc;
    end else begin
      ghr_q   <= base.ghr;
      phist_q <= base.phist;
      pkt_q   <= base.pkt_pc;
      if (ev) begin
        if (update) ghr_q <= {base.ghr[GHR_LEN-HIST_PUSH-1:0], hist_hash(br_pc, br_target)};
        phist_q <= {base.phist[PHIST_LEN-2:0], br_pc[2] ^ br_pc[6]};
        pkt_q   <= br_target;
      end
    end

  assign ckpt = '{ghr: ghr_q, phist: phist_q, bwd: bwd_cnt, pkt_pc: pkt_q};

endmodule
