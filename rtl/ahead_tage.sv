// ahead_tage: ahead-pipelined TAGE direction predictor with secondary tags.
//
// A lookup is started with the PC and history of the branch being fetched
// now, but it predicts the branch AHEAD_DIST branches later.  Each tagged
// entry carries a primary tag, computed from that ahead PC and history like
// an ordinary TAGE tag, and a secondary tag naming the missing-history
// pattern (see missing_hist_hash) the counter was trained for.  One entry is
// read per table, as in a plain TAGE.  The longest-history selection is then
// replicated once per secondary-tag value: selector s only sees tables whose
// primary tag matches and whose secondary tag equals s, and falls back to the
// untagged bimodal T0 when none does.  The result is NSTAG prediction bits,
// which the prediction queue stores until the missing history is known.
//
// Storage: the NTAB history lengths share 30 banks of 1K entries, the six
// short lengths 10 banks and the fifteen long ones 20 banks.  A bank offset
// hashed from the VPC rotates the lengths of each group over its banks, so
// one lookup reads each bank at most once and different branches spread a
// given history length over all banks of its group.
//
// Update (at resolve): the tables are re-indexed from the same ahead PC and
// history, the provider for the branch's actual secondary tag is found, and
// the baseline TAGE rules apply: the provider counter (or T0) trains, the
// useful bit follows the provider when it differs from the alternate
// prediction, and a misprediction allocates in the first longer table whose
// entry is not useful, writing the secondary tag.  An entry that is useful
// (even with the same primary tag and another secondary tag) is skipped, so
// the allocation is promoted to a longer table; if every candidate is
// useful their useful bits are cleared instead.  As in the usual TAGE
// allocation, a pseudo-random bit (16-bit LFSR) picks the second free table
// instead of the first half of the time, so that patterns sharing an index
// cannot keep evicting each other in a fixed order.
//
// Timing: request in cycle c (indices and tags are hashed and registered),
// tables read in c+1, the NSTAG selections in c+2, `resp_valid`/`resp_preds`
// in c+3: a three-cycle predictor.  `req_id` travels with the request.
// `squash` kills requests in flight whose id lies at or after `squash_from`
// (queue order).  After reset a sweep clears all tables for 2^LOG_T0 cycles;
// `ready` is low and requests and updates are ignored meanwhile.
//
// Follows the description: 6 short and 15 long history lengths in 10 + 20
// banks of 1K entries, tag widths, secondary tag, duplicated selection,
// allocation with promotion.  This design's choices: the history lengths,
// the hashes and the bank rotation, history-based tables indexed by the VPC and
// T0 by the PC, 1-bit useful counters without periodic aging, and no
// use-alternate-on-new-entry table.
module ahead_tage
  import bp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  output logic    ready,
  // lookup
  input  logic    req_valid,
  input  pc_t     req_pc,     // PC of the branch being fetched (indexes T0)
  input  pc_t     req_vpc,    // virtual PC used by the history tables
  input  ghr_t    req_ghr,
  input  phist_t  req_phist,
  input  pq_ptr_t req_id,
  output logic    resp_valid,
  output preds_t  resp_preds,
  output pq_ptr_t resp_id,
  // squash of requests in flight
  input  logic    squash,
  input  pq_ptr_t squash_from,
  // update
  input  logic    upd_valid,
  input  pc_t     upd_pc,
  input  pc_t     upd_vpc,
  input  ghr_t    upd_ghr,
  input  phist_t  upd_phist,
  input  stag_t   upd_stag,
  input  logic    upd_taken,
  output logic    upd_pred,       // what this predictor said for the branch
  output logic    upd_long_hit    // provider uses >= LONG_HIST_BITS history
);

  localparam int T0N = 1 << LOG_T0;
  localparam int TN  = 1 << LOG_TAB;

  typedef logic [LOG_TAB-1:0]   idx_t;
  typedef logic [TAGW_LONG-1:0] tag_t;

  // ---------------- hashing ----------------
  function automatic idx_t tab_idx(input int t, input pc_t vpc, input ghr_t g, input phist_t p);
    logic [15:0] f;
    idx_t r;
    f = fold_ghr(g, HIST_LEN[t], LOG_TAB);
    r = vpc[LOG_TAB+1:2] ^ vpc[2*LOG_TAB+1:LOG_TAB+2] ^ f[LOG_TAB-1:0];
    // path history folded in, limited to the table's history length
    for (int b = 0; b < PHIST_LEN; b++)
      if (b < HIST_LEN[t]) r[(b + t) % LOG_TAB] ^= p[b];
    return r;
  endfunction

  function automatic tag_t tab_tag(input int t, input pc_t vpc, input ghr_t g);
    int w;
    logic [15:0] f1, f2;
    tag_t r, m;
    w  = (t < NSHORT) ? TAGW_SHORT : TAGW_LONG;
    f1 = fold_ghr(g, HIST_LEN[t], w);
    f2 = fold_ghr(g, HIST_LEN[t], w - 1);
    r  = vpc[TAGW_LONG+1:2] ^ f1[TAGW_LONG-1:0] ^ {f2[TAGW_LONG-2:0], 1'b0};
    m  = tag_t'((1 << w) - 1);
    return r & m;
  endfunction

  function automatic logic [LOG_T0-1:0] t0_idx(input pc_t pc);
    return pc[LOG_T0+1:2];
  endfunction

  // Bank of history length t for a lookup with bank offset `off`: the
  // short lengths rotate over banks 0..NBANK_S-1, the long ones over
  // NBANK_S..NBANK_S+NBANK_L-1, so one lookup never uses a bank twice.
  localparam int NBANK = NBANK_S + NBANK_L;
  typedef logic [$clog2(NBANK)-1:0] bank_t;

  function automatic bank_t bank_of(input int t, input logic [7:0] off);
    int b;
    if (t < NSHORT) b = (int'(off) + t) % NBANK_S;
    else            b = NBANK_S + (int'(off) + t - NSHORT) % NBANK_L;
    return bank_t'(b);
  endfunction

  function automatic logic [7:0] bank_off(input pc_t vpc);
    return vpc[9:2] ^ vpc[17:10];
  endfunction

  // ---------------- storage ----------------
  logic [1:0]  t0 [T0N];
  tage_entry_t rd_e [NTAB];   // lookup read port
  tage_entry_t ud_e [NTAB];   // update read port
  idx_t        s1_idx [NTAB];
  tag_t        s1_tag [NTAB];
  idx_t        u_idx  [NTAB];
  tag_t        u_tag  [NTAB];
  logic        wr_en  [NTAB];
  tage_entry_t wr_e   [NTAB];

  // reset sweep
  logic            clearing;
  logic [LOG_T0:0] clr_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_cnt  <= '0;
    end else if (clearing) begin
      clr_cnt <= clr_cnt + 1'b1;
      if (clr_cnt == (LOG_T0+1)'(T0N - 1)) clearing <= 1'b0;
    end
  assign ready = !clearing;

  // Each bank is read by at most one history length per lookup and per
  // update; the bank-to-length crossbars below are the rotations above.
  logic [7:0]  s1_off, u_off;
  bank_t       s1_bank [NTAB];
  bank_t       u_bank  [NTAB];
  idx_t        bk_ridx [NBANK];
  idx_t        bk_uidx [NBANK];
  logic        bk_we   [NBANK];
  tage_entry_t bk_wd   [NBANK];
  tage_entry_t bk_rd   [NBANK];
  tage_entry_t bk_ud   [NBANK];

  assign u_off = bank_off(upd_vpc);

  always_comb
    for (int t = 0; t < NTAB; t++) begin
      s1_bank[t] = bank_of(t, s1_off);
      u_bank[t]  = bank_of(t, u_off);
    end

  // read and update addresses (the write data comes from the update logic,
  // which reads the bank first, so it has a block of its own)
  always_comb
    for (int b = 0; b < NBANK; b++) begin
      bk_ridx[b] = '0;
      bk_uidx[b] = '0;
      for (int t = 0; t < NTAB; t++) begin
        if (int'(s1_bank[t]) == b) bk_ridx[b] = s1_idx[t];
        if (int'(u_bank[t]) == b)  bk_uidx[b] = u_idx[t];
      end
    end

  always_comb
    for (int b = 0; b < NBANK; b++) begin
      bk_we[b] = 1'b0;
      bk_wd[b] = '0;
      for (int t = 0; t < NTAB; t++)
        if (int'(u_bank[t]) == b) begin
          bk_we[b] = wr_en[t];
          bk_wd[b] = wr_e[t];
        end
    end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    tage_entry_t mem [TN];
    always_ff @(posedge clk)
      if (clearing) mem[clr_cnt[LOG_TAB-1:0]] <= '0;
      else if (bk_we[b]) mem[bk_uidx[b]] <= bk_wd[b];
    assign bk_rd[b] = mem[bk_ridx[b]];
    assign bk_ud[b] = mem[bk_uidx[b]];
  end

  always_comb
    for (int t = 0; t < NTAB; t++) begin
      rd_e[t] = bk_rd[s1_bank[t]];
      ud_e[t] = bk_ud[u_bank[t]];
    end

  // ---------------- lookup pipeline ----------------
  logic    s1_v, s2_v, s3_v;
  pq_ptr_t s1_id, s2_id, s3_id;
  logic [LOG_T0-1:0] s1_t0i;
  logic [1:0]  s2_t0;
  tage_entry_t s2_e [NTAB];
  tag_t        s2_tag [NTAB];
  preds_t      s3_p;

  function automatic logic killed(input logic sq, input pq_ptr_t from, input pq_ptr_t id);
    return sq && (int'(pq_dist(from, id)) < PQ_DEPTH / 2);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0;
    end else begin
      s1_v <= req_valid && ready && !killed(squash, squash_from, req_id);
      s2_v <= s1_v && !killed(squash, squash_from, s1_id);
      s3_v <= s2_v && !killed(squash, squash_from, s2_id);
    end

  always_ff @(posedge clk) begin
    // stage 0 -> 1: hash
    s1_id  <= req_id;
    s1_t0i <= t0_idx(req_pc);
    s1_off <= bank_off(req_vpc);
    for (int t = 0; t < NTAB; t++) begin
      s1_idx[t] <= tab_idx(t, req_vpc, req_ghr, req_phist);
      s1_tag[t] <= tab_tag(t, req_vpc, req_ghr);
    end
    // stage 1 -> 2: read
    s2_id <= s1_id;
    s2_t0 <= t0[s1_t0i];
    for (int t = 0; t < NTAB; t++) begin
      s2_e[t]   <= rd_e[t];
      s2_tag[t] <= s1_tag[t];
    end
    // stage 2 -> 3: one selection per secondary-tag value
    s3_id <= s2_id;
    for (int s = 0; s < NSTAG; s++) begin
      logic p;
      p = s2_t0[1];
      for (int t = 0; t < NTAB; t++)
        if (s2_e[t].ptag == s2_tag[t] && s2_e[t].stag == stag_t'(s))
          p = s2_e[t].ctr[CTR_W-1];
      s3_p[s] <= p;
    end
  end

  assign resp_valid = s3_v;
  assign resp_preds = s3_p;
  assign resp_id    = s3_id;

  // ---------------- update ----------------
  logic [LOG_T0-1:0] u_t0i;
  logic [1:0]        u_t0, u_t0_n;
  logic              u_t0_we;
  int                prov, alt;
  logic              prov_pred, alt_pred, final_pred;
  logic [15:0]       lfsr;

  always_comb begin
    int a, a2;
    a     = -1;
    a2    = -1;
    u_t0i = t0_idx(upd_pc);
    u_t0  = t0[u_t0i];
    for (int t = 0; t < NTAB; t++) begin
      u_idx[t] = tab_idx(t, upd_vpc, upd_ghr, upd_phist);
      u_tag[t] = tab_tag(t, upd_vpc, upd_ghr);
    end
    // provider and alternate for the actual secondary tag
    prov = -1;
    alt  = -1;
    for (int t = 0; t < NTAB; t++)
      if (ud_e[t].ptag == u_tag[t] && ud_e[t].stag == upd_stag) begin
        alt  = prov;
        prov = t;
      end
    alt_pred   = (alt >= 0) ? ud_e[alt].ctr[CTR_W-1] : u_t0[1];
    prov_pred  = (prov >= 0) ? ud_e[prov].ctr[CTR_W-1] : u_t0[1];
    final_pred = prov_pred;

    for (int t = 0; t < NTAB; t++) begin
      wr_en[t] = 1'b0;
      wr_e[t]  = ud_e[t];
    end
    u_t0_we = 1'b0;
    u_t0_n  = u_t0;

    if (upd_valid && ready) begin
      if (prov >= 0) begin
        wr_en[prov] = 1'b1;
        if (upd_taken && ud_e[prov].ctr != '1)      wr_e[prov].ctr = ud_e[prov].ctr + 1'b1;
        else if (!upd_taken && ud_e[prov].ctr != '0) wr_e[prov].ctr = ud_e[prov].ctr - 1'b1;
        if (prov_pred != alt_pred) wr_e[prov].u = (prov_pred == upd_taken);
      end else begin
        u_t0_we = 1'b1;
        if (upd_taken && u_t0 != 2'b11)       u_t0_n = u_t0 + 1'b1;
        else if (!upd_taken && u_t0 != 2'b00) u_t0_n = u_t0 - 1'b1;
      end
      // allocation on a misprediction
      if (final_pred != upd_taken && prov < NTAB - 1) begin
        // first free table above the provider, or the second free one when
        // the pseudo-random bit says so
        a  = -1;
        a2 = -1;
        for (int t = NTAB - 1; t >= 0; t--)
          if (t > prov && !ud_e[t].u) begin
            a2 = a;
            a  = t;
          end
        if (lfsr[0] && a2 >= 0) a = a2;
        if (a >= 0) begin
          wr_en[a]     = 1'b1;
          wr_e[a].ptag = u_tag[a];
          wr_e[a].stag = upd_stag;
          wr_e[a].ctr  = upd_taken ? 3'd4 : 3'd3;
          wr_e[a].u    = 1'b0;
        end else begin
          for (int t = 0; t < NTAB; t++)
            if (t > prov) begin
              wr_en[t]  = 1'b1;
              wr_e[t].u = 1'b0;
            end
        end
      end
    end
  end

  // 16-bit LFSR (x^16 + x^14 + x^13 + x^11 + 1), stepped on every update
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr <= 16'hACE1;
    else if (upd_valid) lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  always_ff @(posedge clk)
    if (clearing) t0[clr_cnt[LOG_T0-1:0]] <= 2'b01;
    else if (u_t0_we) t0[u_t0i] <= u_t0_n;

  assign upd_pred     = final_pred;
  assign upd_long_hit = (prov >= 0) && (HIST_LEN[prov] >= LONG_HIST_BITS);

endmodule
