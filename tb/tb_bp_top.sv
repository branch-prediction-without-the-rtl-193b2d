// tb_bp_top: end-to-end test of the whole front end on a synthetic program,
// with the pruning thresholds lowered so that the predictability tables
// fill within a short run (eligibility 16, copy when the divergence score
// exceeds 2, blacklist block after two falls, decay every 4000
// instructions).
//
// Program (one static branch per index, executed in a loop):
//   0 conditional, random           1 conditional, taken 7 times in 8
//   2 conditional, same as 0         3 call
//   4 loop branch (taken 3 of 4)     5 return
//   6..13 backward direct jumps whose PCs share one single-cycle BTB set
//   14 conditional, opposite of 0    15 backward jump to 0
// The in-order "core" fetches along the correct path only and resolves each
// branch six cycles after fetch; every taken branch retires its packet.
// Pruning is off for the first part of the run and then switched on.
//
// Counted, each must occur: start-up without ahead prediction, ahead
// prediction used, single-cycle override, late flush from the multi-cycle
// BTB, backend flush, return/jump packet skipping the history, locked-table
// skip, forced update by the backward counter (eight backward jumps in a
// row), a copy into the locked table, a blacklist block, a decay sweep, and
// no skip at all while pruning is off.  Branch 2, which depends on a branch
// inside the ahead predictor's blind window, must be predicted right at
// least 95% of the time after warm-up.  Stalls for late ahead predictions
// are counted but cannot occur here: one branch per cycle always gives the
// three-cycle lookup its five-branch head start.
module tb_bp_top;
  import bp_pkg::*;
  localparam int NBR = 16, RES_DELAY = 6, LOOPN = 4, NFETCH = 16000, PRUNE_FROM = 3000;

  logic clk = 0, rst_n = 0, ready, prune_en = 0;
  pc_t  reset_pc = 48'h1_0000;
  logic br_valid = 0, br_cond = 0, br_call = 0, br_ret = 0, br_jmp = 0, br_pkt_cond = 0;
  pc_t  br_pc = '0, br_fallthru = '0;
  logic br_accept, stall, pred_dir, pred_taken, br_ahead_ok, br_ahead_dir, br_skip;
  pred_src_t pred_src;
  pc_t pred_next;
  bp_ckpt_t br_ckpt, rs_ckpt = '0;
  ahead_key_t br_key, rs_key = '0;
  stag_t br_stag, rs_stag = '0;
  logic lf_valid;
  pc_t lf_pc, lf_target;
  logic rs_valid = 0, rs_mispred = 0, rs_cond = 0, rs_call = 0, rs_ret = 0, rs_jmp = 0, rs_pkt_cond = 0;
  logic rs_taken = 0, rs_ahead_ok = 0, rs_ahead_dir = 0;
  pc_t rs_pc = '0, rs_target = '0, rs_next = '0;
  logic rs_tage_pred, rs_long_hit;
  logic rt_valid = 0, rt_mispred = 0, rt_long_hit = 0;
  pc_t rt_pc = '0;
  logic [7:0] rt_phist = '0, rt_ninstr = 8'd8;
  hist_ckpt_t hist;
  logic hist_skipped, hist_forced, bl_blocked, decaying;
  logic [15:0] pc_copies, cf_copies;
  int checks = 0, failures = 0, cyc = 0;

  bp_top #(.PRUNE_THRESH(16), .DIV_THRESH(2), .BL_THRESH(1), .DECAY_INSTR(4000)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- program ----------------
  // kinds: 0 conditional, 1 call, 2 return, 3 direct jump
  typedef struct { int idx; int lcnt; bit last0; int seq; bit pktc; } pstate_t;

  function automatic int kind(input int i);
    if (i == 3) return 1;
    if (i == 5) return 2;
    if ((i >= 6 && i <= 13) || i == 15) return 3;
    return 0;
  endfunction
  function automatic pc_t bpc(input int i);
    if (i >= 6 && i <= 13) return 48'h100 + 48'(i - 5) * 48'h10_0000;
    return 48'h1_0000 + 48'(i) * 48'h40;
  endfunction
  function automatic pc_t btgt(input int i);
    if (i == 4)  return bpc(4) - 48'h20;
    if (i == 15) return bpc(0) - 48'h20;
    if (i == 5)  return bpc(3) + 48'h4;
    if (i >= 6 && i <= 13) return bpc(i) - 48'h20;
    return bpc(i) + 48'h24;
  endfunction
  function automatic logic [31:0] mix(input int seq, input logic [31:0] salt);
    logic [31:0] x;
    x = 32'(seq) * 32'h9E3779B1 ^ salt;
    x = x ^ (x >> 15);
    x = x * 32'h85EBCA6B;
    x = x ^ (x >> 13);
    return x;
  endfunction
  function automatic bit outcome(input pstate_t s);
    logic [31:0] m0, m1;
    m0 = mix(s.seq, 32'h1234);
    m1 = mix(s.seq, 32'h5678);
    case (s.idx)
      0:  return m0[0];
      1:  return m1[3:0] != 4'd0;
      2:  return s.last0;
      4:  return s.lcnt < LOOPN - 1;
      14: return !s.last0;
      default: return 1'b1;
    endcase
  endfunction
  function automatic pstate_t advance(input pstate_t s, input bit tk);
    pstate_t n;
    n = s;
    n.seq = s.seq + 1;
    if (s.idx == 0) n.last0 = tk;
    if (s.idx == 4) n.lcnt = tk ? s.lcnt + 1 : 0;
    n.pktc = tk ? 1'b0 : (s.pktc || kind(s.idx) == 0);
    n.idx = (s.idx == 4 && tk) ? 4 : (s.idx == NBR - 1) ? 0 : s.idx + 1;
    return n;
  endfunction

  // ---------------- in-flight branches ----------------
  typedef struct {
    int idx; bit tk; bit ptk; pc_t pnext; int fcyc; pstate_t bef; pstate_t after;
    bp_ckpt_t ck; ahead_key_t key; stag_t st; bit aok; bit adir;
  } rob_t;
  rob_t rob [$];

  pstate_t ps;
  bit blocked, pkt_mis, pkt_long;
  int n_noahead = 0, n_ahead = 0, n_override = 0, n_late = 0, n_flush = 0, n_stall = 0;
  int n_rule_skip = 0, n_lock_skip = 0, n_forced = 0, n_skip_off = 0, n_block = 0, n_decay = 0;
  int n_b2 = 0, n_b2_wrong = 0, n_res = 0, n_fetch = 0, n_retire = 0;

  always @(posedge clk) begin
    if (bl_blocked) n_block++;
    if (decaying) n_decay++;
    if (hist_forced) n_forced++;
    if (hist_skipped && !prune_en) n_skip_off++;
  end

  function automatic bit wrong(input rob_t r);
    return (r.ptk != r.tk) || (r.tk && r.pnext != btgt(r.idx));
  endfunction

  initial begin
    ps = '{idx: 0, lcnt: 0, last0: 0, seq: 0, pktc: 0};
    blocked = 0; pkt_mis = 0; pkt_long = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (!ready) @(posedge clk);
    while (n_fetch < NFETCH || rob.size() > 0) begin
      @(negedge clk);
      prune_en = (n_fetch >= PRUNE_FROM);
      // resolve the oldest branch
      rs_valid = 0; rs_mispred = 0; rt_valid = 0;
      if (rob.size() > 0 && cyc - rob[0].fcyc >= RES_DELAY) begin
        rob_t r;
        int k;
        r = rob.pop_front();
        k = kind(r.idx);
        rs_valid = 1; rs_mispred = wrong(r); rs_pc = bpc(r.idx);
        rs_cond = (k == 0); rs_call = (k == 1); rs_ret = (k == 2); rs_jmp = (k == 3);
        rs_pkt_cond = r.bef.pktc || (k == 0);
        rs_taken = r.tk; rs_target = btgt(r.idx); rs_next = r.tk ? btgt(r.idx) : bpc(r.idx) + 48'h4;
        rs_ckpt = r.ck; rs_key = r.key; rs_stag = r.st; rs_ahead_ok = r.aok; rs_ahead_dir = r.adir;
        n_res++;
        #1;
        pkt_mis  = pkt_mis || rs_mispred;
        pkt_long = pkt_long || (rs_cond && rs_long_hit);
        if (r.tk) begin
          // the branch ends its packet: retire the packet
          rt_valid = 1; rt_pc = r.ck.h.pkt_pc; rt_phist = r.ck.h.phist[7:0];
          rt_mispred = pkt_mis; rt_long_hit = pkt_long;
          pkt_mis = 0; pkt_long = 0;
          n_retire++;
        end
        if (rs_mispred) begin
          n_flush++;
          check(rob.size() == 0, "younger branches fetched past a known misprediction");
          blocked = 0;
        end
        if (r.idx == 2 && n_res > NFETCH / 2) begin
          n_b2++;
          if (r.ptk != r.tk) n_b2_wrong++;
        end
      end
      // fetch the next branch on the correct path
      br_valid = !blocked && !rs_mispred && n_fetch < NFETCH;
      br_pc = bpc(ps.idx); br_fallthru = br_pc + 48'h4;
      br_cond = kind(ps.idx) == 0; br_call = kind(ps.idx) == 1;
      br_ret = kind(ps.idx) == 2; br_jmp = kind(ps.idx) == 3;
      br_pkt_cond = ps.pktc || br_cond;
      #1;
      if (lf_valid) begin
        int k;
        n_late++;
        k = -1;
        for (int i = 0; i < rob.size(); i++) if (bpc(rob[i].idx) == lf_pc) k = i;
        check(k >= 0 && rob.size() - k <= 3, "late flush for an unknown branch");
        if (k >= 0) begin
          check(lf_target == btgt(rob[k].idx), "late flush target");
          rob[k].ptk = 1; rob[k].pnext = lf_target;
          while (rob.size() > k + 1) void'(rob.pop_back());
          ps = rob[k].after;
          blocked = wrong(rob[k]);
        end
        check(!br_accept, "fetch accepted during a late flush");
      end else if (br_valid && stall) begin
        n_stall++;
      end else if (br_valid) begin
        check(br_accept, "branch not accepted");
        if (br_accept) begin
          rob_t r;
          r.idx = ps.idx; r.tk = outcome(ps); r.ptk = pred_taken; r.pnext = pred_next;
          r.fcyc = cyc; r.ck = br_ckpt; r.key = br_key; r.st = br_stag;
          r.aok = br_ahead_ok; r.adir = br_ahead_dir; r.bef = ps;
          check(!pred_taken || pred_next == btgt(ps.idx), "taken prediction with a wrong target");
          check(br_cond || pred_dir, "unconditional branch predicted not taken");
          check(br_ckpt.h == hist, "checkpoint differs from the live history");
          if (pred_src == SRC_NOAHEAD || pred_src == SRC_NONE) n_noahead++;
          if (pred_src == SRC_AHEAD) n_ahead++;
          if (pred_src == SRC_OVERRIDE) n_override++;
          if (pred_taken && br_skip) begin
            if (br_pkt_cond) n_lock_skip++;
            else n_rule_skip++;
          end
          ps = advance(ps, r.tk);
          r.after = ps;
          rob.push_back(r);
          n_fetch++;
          if (wrong(r)) blocked = 1;
        end
      end
    end
    @(negedge clk); rs_valid = 0; br_valid = 0; rt_valid = 0;
    $display("fetched=%0d retired=%0d noahead=%0d ahead=%0d override=%0d late=%0d flush=%0d stall=%0d",
             n_fetch, n_retire, n_noahead, n_ahead, n_override, n_late, n_flush, n_stall);
    $display("rule_skip=%0d locked_skip=%0d forced=%0d skip_while_off=%0d pc_copies=%0d cf_copies=%0d blocked=%0d decay_cycles=%0d b2 wrong %0d/%0d",
             n_rule_skip, n_lock_skip, n_forced, n_skip_off, pc_copies, cf_copies, n_block, n_decay, n_b2_wrong, n_b2);
    check(n_noahead > 0, "start-up without ahead prediction never seen");
    check(n_ahead > 0, "ahead prediction never used");
    check(n_late > 0, "late flush never happened");
    check(n_flush > 0, "backend flush never happened");
    check(n_skip_off == 0, "history skipped while pruning was off");
    check(n_rule_skip > 0, "return/jump packet never skipped");
    check(n_b2 > 0 && n_b2_wrong * 20 < n_b2, "branch 2 not learned through the secondary tag");
    check(n_override > 0, "override never used");
    check(n_forced > 0, "forced history update never happened");
    check(pc_copies > 0, "PC-path locked table never filled");
    check(n_lock_skip > 0, "locked-table skip never happened");
    check(n_block > 0, "blacklist never blocked a packet");
    check(n_decay > 0, "decay never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
