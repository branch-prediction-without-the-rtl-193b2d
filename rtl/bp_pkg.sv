// bp_pkg: sizes, types and shared helper functions of the branch-prediction
// front end (ahead-pipelined TAGE with secondary tags, prediction queue,
// single- and multi-cycle BTBs, and the pruned global history).
//
// Numbers that follow the design description: ahead distance 5, 5-bit
// secondary tag (32 predictions per lookup), 8K-entry bimodal T0, 6 short
// and 15 long history lengths stored in 10 + 20 tagged banks of 1K
// entries, with 17- and 21-bit entries (8/12-bit primary tag, 5-bit
// secondary tag, 3-bit counter, 1 useful bit), a 133-entry prediction
// queue, a 256-bit global history with 4 bits pushed per taken branch, 8
// path-history bits for the control-flow tables, a 48-bit PC (41-bit tag
// over 128 sets), 12-bit eligibility counters and a 4-bit global backward
// counter.  Choices of this implementation: the history
// lengths of the tagged part (a geometric series from 4 to 256 bits),
// the 27-bit path history and the hash functions.
package bp_pkg;

  // ---------------- global sizes ----------------
  localparam int PCW        = 48;   // virtual address bits
  localparam int GHR_LEN    = 256;  // global history register bits
  localparam int PHIST_LEN  = 27;   // path history bits
  localparam int HIST_PUSH  = 4;    // history bits pushed per taken branch
  localparam int AHEAD_DIST = 5;    // branches skipped by the ahead predictor
  localparam int STAG_W     = 5;    // secondary tag width
  localparam int NSTAG      = 1 << STAG_W;
  localparam int PQ_DEPTH   = 133;  // 128 in-flight branches + ahead distance
  localparam int PQ_PTRW    = $clog2(PQ_DEPTH);
  localparam int BWD_W      = 4;    // global backward counter width

  // ---------------- ahead TAGE ----------------
  localparam int NTAB       = 21;   // history lengths of the tagged part
  localparam int NSHORT     = 6;    // the first six use the short tag
  localparam int NBANK_S    = 10;   // 1K-entry banks shared by the short ones
  localparam int NBANK_L    = 20;   // 1K-entry banks shared by the long ones
  localparam int LOG_T0     = 13;   // 8K-entry bimodal
  localparam int LOG_TAB    = 10;   // 1K-entry tagged banks
  localparam int TAGW_SHORT = 8;
  localparam int TAGW_LONG  = 12;
  localparam int CTR_W      = 3;

  typedef int hist_len_t [NTAB];
  // Geometric series from 4 to 256 history bits (ratio about 1.23).
  localparam hist_len_t HIST_LEN = '{4, 5, 6, 8, 9, 12, 14, 17, 22, 27, 33,
                                     40, 49, 61, 75, 92, 113, 140, 172, 212, 256};

  // History length from which a provider counts as "long history" for the
  // pruning policy (132 of 256 bits).
  localparam int LONG_HIST_BITS = 132;

  typedef logic [PCW-1:0]       pc_t;
  typedef logic [GHR_LEN-1:0]   ghr_t;
  typedef logic [PHIST_LEN-1:0] phist_t;
  typedef logic [STAG_W-1:0]    stag_t;
  typedef logic [NSTAG-1:0]     preds_t;
  typedef logic [PQ_PTRW-1:0]   pq_ptr_t;

  // One tagged-table entry: primary tag | secondary tag | counter | useful.
  typedef struct packed {
    logic [TAGW_LONG-1:0] ptag;
    stag_t                stag;
    logic [CTR_W-1:0]     ctr;
    logic                 u;
  } tage_entry_t;

  // History state saved per branch and restored on a flush.
  typedef struct packed {
    ghr_t             ghr;
    phist_t           phist;
    logic [BWD_W-1:0] bwd;
    pc_t              pkt_pc;
  } hist_ckpt_t;

  // Front-end state saved per branch and restored on a flush.
  typedef struct packed {
    pq_ptr_t                    rd_ptr;
    pq_ptr_t                    alloc_ptr;
    logic [AHEAD_DIST*STAG_W-1:0] win;
  } fe_ckpt_t;

  typedef struct packed {
    hist_ckpt_t h;
    fe_ckpt_t   f;
  } bp_ckpt_t;

  // Inputs of the ahead lookup that produced a branch's predictions; kept
  // with the branch so that the predictor can be trained at resolve.
  typedef struct packed {
    pc_t    pc;
    pc_t    vpc;
    ghr_t   ghr;
    phist_t phist;
  } ahead_key_t;

  // Where the final direction came from.
  typedef enum logic [1:0] {
    SRC_AHEAD    = 2'd0,  // ahead TAGE, selected by the secondary tag
    SRC_OVERRIDE = 2'd1,  // single-cycle counter, more confident
    SRC_NOAHEAD  = 2'd2,  // no ahead prediction exists (start-up)
    SRC_NONE     = 2'd3   // no prediction at all: not taken
  } pred_src_t;

  // ---------------- helpers ----------------
  // XOR-fold the low LEN bits of a GHR_LEN-bit vector into W bits.
  function automatic logic [15:0] fold_ghr(input ghr_t h, input int len, input int w);
    logic [15:0] r;
    r = '0;
    for (int b = 0; b < GHR_LEN; b++)
      if (b < len) r[b % w] ^= h[b];
    return r;
  endfunction

  // Circular distance b - a modulo the queue depth.
  function automatic pq_ptr_t pq_dist(input pq_ptr_t a, input pq_ptr_t b);
    int d;
    d = int'(b) - int'(a);
    if (d < 0) d += PQ_DEPTH;
    return pq_ptr_t'(d);
  endfunction

  function automatic pq_ptr_t pq_inc(input pq_ptr_t a);
    return (int'(a) == PQ_DEPTH - 1) ? '0 : a + 1'b1;
  endfunction

  // Five bits of an address used by the missing-history hash.
  function automatic stag_t stag_fold(input pc_t a);
    return a[6:2] ^ a[11:7];
  endfunction

endpackage
