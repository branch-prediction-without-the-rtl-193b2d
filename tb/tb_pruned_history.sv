// tb_pruned_history: drives random packet ends (calls, returns, direct
// jumps, other taken branches; forward and backward; with and without a
// locked-table hit) into the history unit, with pruning on and off, and
// compares GHR, path history, backward counter and packet address with a
// reference model.  Checkpoint restores are mixed in.  Counts that every
// skip rule (return/jump without a conditional, locked hit, forced update,
// call never skips) was exercised.
module tb_pruned_history;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prune_en = 1, ev = 0, is_call = 0, is_ret = 0, is_jmp = 0, pkt_cond = 0;
  logic locked_hit = 0, restore = 0, skipped, forced;
  pc_t  reset_pc = 48'h4000, br_pc = '0, br_target = '0;
  hist_ckpt_t restore_ckpt, ckpt;
  int checks = 0, failures = 0;
  int n_retskip = 0, n_lockskip = 0, n_forced = 0, n_callupd = 0, n_restore = 0;

  pruned_history dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  ghr_t m_ghr; phist_t m_ph; int m_bwd; pc_t m_pkt;
  hist_ckpt_t saved [$];

  initial begin
    restore_ckpt = '0;
    m_ghr = '0; m_ph = '0; m_bwd = 0; m_pkt = reset_pc;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      bit e, c, r, j, pc_, lh, rs, pe, sk_req, back, upd, frc; int k, base_bwd;
      ghr_t bg; phist_t bp;
      pc_t a, t;
      pe = (i < 5000);
      e = $urandom_range(0, 4) != 0;
      k = $urandom_range(0, 3);
      c = (k == 0); r = (k == 1); j = (k == 2);
      pc_ = $urandom_range(0, 1); lh = $urandom_range(0, 2) == 0;
      a = {16'h0, $urandom} & ~48'h3;
      t = ($urandom_range(0, 1) ? a - 48'(4 * $urandom_range(1, 64)) : a + 48'(4 * $urandom_range(1, 64)));
      rs = (saved.size() > 0) && ($urandom_range(0, 20) == 0);
      if (i >= 3000 && i < 3040) begin
        // a loop whose backward branch keeps hitting the locked table
        e = 1; c = 0; lh = 1; rs = 0; a = 48'h1040; t = 48'h1000;
      end
      @(negedge clk);
      prune_en = pe; ev = e; is_call = c; is_ret = r; is_jmp = j; pkt_cond = pc_;
      locked_hit = lh; br_pc = a; br_target = t; restore = rs;
      if (rs) begin
        restore_ckpt = saved[$urandom_range(0, saved.size() - 1)];
        m_ghr = restore_ckpt.ghr; m_ph = restore_ckpt.phist;
        m_bwd = int'(restore_ckpt.bwd); m_pkt = restore_ckpt.pkt_pc;
        n_restore++;
      end
      back   = t < a;
      sk_req = pe && !c && (lh || ((r || j) && !pc_));
      frc    = sk_req && back && m_bwd >= 7;
      upd    = !sk_req || frc;
      #1;
      check(skipped == (e && !upd), $sformatf("ev %0d skipped=%b", i, skipped));
      check(forced == frc, $sformatf("ev %0d forced=%b", i, forced));
      if (e) begin
        if (upd) m_ghr = {m_ghr[GHR_LEN-5:0], a[5:2] ^ a[9:6] ^ t[5:2] ^ t[9:6]};
        m_ph = {m_ph[PHIST_LEN-2:0], a[2] ^ a[6]};
        m_pkt = t;
        if (upd) m_bwd = 0; else if (back) m_bwd++;
        if (!upd && (r || j) && !lh) n_retskip++;
        if (!upd && lh) n_lockskip++;
        if (frc) n_forced++;
        if (c && pe && lh) n_callupd++;
      end
      @(posedge clk); #1;
      check(ckpt.ghr == m_ghr && ckpt.phist == m_ph && int'(ckpt.bwd) == m_bwd && ckpt.pkt_pc == m_pkt,
            $sformatf("ev %0d state bwd=%0d exp %0d", i, ckpt.bwd, m_bwd));
      if ($urandom_range(0, 3) == 0) saved.push_back(ckpt);
      if (saved.size() > 16) void'(saved.pop_front());
      restore = 0;
    end
    $display("retskip=%0d lockskip=%0d forced=%0d call_with_hit=%0d restores=%0d",
             n_retskip, n_lockskip, n_forced, n_callupd, n_restore);
    check(n_retskip > 0 && n_lockskip > 0 && n_forced > 0 && n_callupd > 0 && n_restore > 0,
          "a rule was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
