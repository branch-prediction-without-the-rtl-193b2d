// tb_ahead_frontend: runs a small synthetic program through the front end
// with an in-order "core" that resolves each branch six cycles after fetch.
//
// Program (one static branch per index, executed in a loop):
//   0 conditional, random          1 conditional, taken 7 times in 8 (random)
//   2 conditional, same as 0       3 call
//   4 loop branch (taken 3 of 4)   5 return
//   6..11 direct jumps whose PCs all fall in one single-cycle BTB set
//   12 conditional, opposite of 0  13 backward jump to 0
// Branch 2 depends on branch 0 two branches earlier, inside the five
// branches the ahead lookup cannot see, so only the secondary-tag selection
// can predict it.  The six jumps thrash their single-cycle BTB set, so they
// are found late by the multi-cycle BTB.
//
// The core fetches along the correct path only: after a branch it knows is
// mispredicted it stops fetching until the late flush corrects it or the
// branch resolves with `rs_mispred`.  A late flush that turns a correct
// prediction into a wrong one drops the younger branches and rewinds the
// program.  The test counts each mechanism (start-up without ahead
// prediction, ahead prediction used, override, late flush, backend flush)
// and fails if one never occurs, and requires branch 2 to be predicted
// almost always right after warm-up.
module tb_ahead_frontend;
  import bp_pkg::*;
  localparam int NBR = 14, RES_DELAY = 6, LOOPN = 4, NFETCH = 6000;

  logic clk = 0, rst_n = 0, ready;
  logic br_valid = 0, br_cond = 0, br_accept, stall;
  logic [3:0] br_kind = '0;
  pc_t  br_pc = '0, br_vpc = '0, br_fallthru = '0;
  ghr_t br_ghr = '0;
  phist_t br_phist = '0;
  logic pred_dir, pred_taken, br_ahead_ok, br_ahead_dir;
  pred_src_t pred_src;
  pc_t pred_next;
  fe_ckpt_t br_ckpt, lf_ckpt, rs_ckpt = '0;
  ahead_key_t br_key, rs_key = '0;
  stag_t br_stag, rs_stag = '0;
  logic lf_valid;
  pc_t lf_pc, lf_target;
  hist_ckpt_t lf_hctx, br_hctx = '0;
  logic [3:0] lf_kind;
  logic rs_valid = 0, rs_mispred = 0, rs_cond = 0, rs_taken = 0, rs_ahead_ok = 0, rs_ahead_dir = 0;
  pc_t rs_pc = '0, rs_target = '0, rs_next = '0;
  logic rs_tage_pred, rs_long_hit;
  int checks = 0, failures = 0, cyc = 0;

  ahead_frontend dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- program ----------------
  typedef struct { int idx; int lcnt; bit last0; int seq; logic [63:0] ghr; } pstate_t;

  function automatic pc_t bpc(input int i);
    if (i >= 6 && i <= 11) return 48'h100 + 48'(i - 5) * 48'h10_0000;
    return 48'h1_0000 + 48'(i) * 48'h40;
  endfunction
  function automatic pc_t btgt(input int i);
    if (i == 4)  return bpc(4) - 48'h20;
    if (i == 13) return bpc(0) - 48'h20;
    if (i == 5)  return bpc(3) + 48'h4;
    return bpc(i) + 48'h24;
  endfunction
  function automatic bit is_cond(input int i);
    return i == 0 || i == 1 || i == 2 || i == 4 || i == 12;
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
      1:  return m1[2:0] != 3'd0;
      2:  return s.last0;
      4:  return s.lcnt < LOOPN - 1;
      12: return !s.last0;
      default: return 1'b1;
    endcase
  endfunction
  function automatic pstate_t advance(input pstate_t s, input bit tk);
    pstate_t n;
    n = s;
    n.seq = s.seq + 1;
    n.ghr = {s.ghr[62:0], tk};
    if (s.idx == 0) n.last0 = tk;
    if (s.idx == 4) n.lcnt = tk ? s.lcnt + 1 : 0;
    n.idx = (s.idx == 4 && tk) ? 4 : (s.idx == 13) ? 0 : s.idx + 1;
    return n;
  endfunction

  // ---------------- in-flight branches ----------------
  typedef struct {
    int idx; bit tk; bit ptk; pc_t pnext; int fcyc; pstate_t after;
    fe_ckpt_t ck; ahead_key_t key; stag_t st; bit aok; bit adir;
  } rob_t;
  rob_t rob [$];

  pstate_t ps;
  bit blocked;
  int n_noahead = 0, n_ahead = 0, n_override = 0, n_late = 0, n_flush = 0, n_stall = 0;
  int n_b2 = 0, n_b2_wrong = 0, n_res = 0, n_fetch = 0;

  function automatic bit wrong(input rob_t r);
    return (r.ptk != r.tk) || (r.tk && r.pnext != btgt(r.idx));
  endfunction

  initial begin
    ps = '{idx: 0, lcnt: 0, last0: 0, seq: 0, ghr: '0};
    blocked = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (!ready) @(posedge clk);
    while (n_fetch < NFETCH || rob.size() > 0) begin
      @(negedge clk);
      // resolve the oldest branch
      rs_valid = 0; rs_mispred = 0;
      if (rob.size() > 0 && cyc - rob[0].fcyc >= RES_DELAY) begin
        rob_t r;
        r = rob.pop_front();
        rs_valid = 1; rs_mispred = wrong(r); rs_pc = bpc(r.idx); rs_cond = is_cond(r.idx);
        rs_taken = r.tk; rs_target = btgt(r.idx); rs_next = r.tk ? btgt(r.idx) : bpc(r.idx) + 48'h4;
        rs_ckpt = r.ck; rs_key = r.key; rs_stag = r.st; rs_ahead_ok = r.aok; rs_ahead_dir = r.adir;
        n_res++;
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
      br_pc = bpc(ps.idx); br_vpc = br_pc; br_fallthru = br_pc + 48'h4;
      br_cond = is_cond(ps.idx); br_kind = '0; br_ghr = {192'h0, ps.ghr};
      #1;
      if (lf_valid) begin
        // the multi-cycle BTB redirects a branch predicted taken without target
        int k;
        n_late++;
        k = -1;
        for (int i = 0; i < rob.size(); i++) if (bpc(rob[i].idx) == lf_pc) k = i;
        check(k >= 0 && rob.size() - k <= 3, "late flush for an unknown branch");
        check(lf_target == btgt(rob[k].idx), "late flush target");
        if (k >= 0) begin
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
          r.aok = br_ahead_ok; r.adir = br_ahead_dir;
          check(pred_next == (pred_taken ? btgt(ps.idx) : br_fallthru) || !pred_taken, "target");
          check(br_cond || pred_dir, "unconditional branch predicted not taken");
          if (pred_src == SRC_NOAHEAD || pred_src == SRC_NONE) n_noahead++;
          if (pred_src == SRC_AHEAD) n_ahead++;
          if (pred_src == SRC_OVERRIDE) n_override++;
          ps = advance(ps, r.tk);
          r.after = ps;
          rob.push_back(r);
          n_fetch++;
          if (wrong(r)) blocked = 1;
        end
      end
    end
    @(negedge clk); rs_valid = 0; br_valid = 0;
    $display("fetched=%0d noahead=%0d ahead=%0d override=%0d late=%0d flush=%0d stall=%0d b2 wrong %0d/%0d",
             n_fetch, n_noahead, n_ahead, n_override, n_late, n_flush, n_stall, n_b2_wrong, n_b2);
    check(n_noahead > 0, "start-up without ahead prediction never seen");
    check(n_ahead > 0, "ahead prediction never used");
    check(n_override > 0, "override never used");
    check(n_late > 0, "late flush never happened");
    check(n_flush > 0, "backend flush never happened");
    check(n_b2 > 0 && n_b2_wrong * 20 < n_b2, "branch 2 not learned through the secondary tag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
