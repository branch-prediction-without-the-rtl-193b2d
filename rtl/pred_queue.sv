// pred_queue: circular buffer holding the NSTAG prediction bits produced by
// the ahead predictor until the branch they are for is fetched.
//
// Each entry has a ready bit and one prediction bit per secondary-tag value
// (1 + 32 bits).  Three pointers run around the buffer:
//   rd_ptr    - next entry to read; read when a branch is fetched (`br`),
//   alloc_ptr - last entry allocated; the same fetched branch starts an ahead
//               lookup for the branch AHEAD_DIST later and allocates entry
//               alloc_ptr+1 with its ready bit cleared (`alloc_id`),
//   wr_ptr    - last entry written by the predictor; `wr` fills entry `wr_id`
//               and sets its ready bit.
// At reset rd_ptr = 0 and alloc_ptr = wr_ptr = AHEAD_DIST-1, so the first
// AHEAD_DIST branches find no ahead prediction.  The read and allocation
// pointers stay AHEAD_DIST-1 apart; the write pointer lies between them.
// Depth = in-flight branches + ahead distance, so entries still needed after
// a flush are never overwritten.
//
// Recovery: every fetched branch saves (rd_ptr, alloc_ptr) as read before its
// own increment (`ck_rd`, `ck_alloc`).  When that branch is found to be
// mispredicted, `rec` sets rd_ptr = ck_rd+1 and alloc_ptr = ck_alloc+1; the
// entries made before the branch, and the one it started itself, survive.
// The write pointer is set to the new allocation pointer, as described,
// when that entry has been written; if its lookup is still in flight
// (possible for a flush raised within the predictor latency, a case this
// design adds) it is set one behind, so the lookup still lands.
//
// Read outputs are combinational from the registers: `rd_ready` (prediction
// present), `rd_pending` (allocated but not yet written: the prediction is
// late) and `rd_preds`.  All pointer updates take effect at the next edge;
// `rec` has priority over `br`.
module pred_queue
  import bp_pkg::*;
#(
  parameter int DEPTH = PQ_DEPTH,
  parameter int AHEAD = AHEAD_DIST
) (
  input  logic    clk,
  input  logic    rst_n,
  // fetch of a branch: read its entry and allocate one for a later branch
  input  logic    br,
  output logic    rd_ready,
  output logic    rd_pending,
  output preds_t  rd_preds,
  output pq_ptr_t alloc_id,
  output pq_ptr_t ck_rd,
  output pq_ptr_t ck_alloc,
  // predictor write-back
  input  logic    wr,
  input  pq_ptr_t wr_id,
  input  preds_t  wr_preds,
  // flush recovery
  input  logic    rec,
  input  pq_ptr_t rec_rd,
  input  pq_ptr_t rec_alloc,
  // state, for observation
  output pq_ptr_t rd_ptr,
  output pq_ptr_t alloc_ptr,
  output pq_ptr_t wr_ptr
);

  function automatic pq_ptr_t inc(input pq_ptr_t a);
    return (int'(a) == DEPTH - 1) ? '0 : a + 1'b1;
  endfunction

  function automatic int pdist(input pq_ptr_t a, input pq_ptr_t b);
    int d;
    d = int'(b) - int'(a);
    if (d < 0) d += DEPTH;
    return d;
  endfunction

  logic [DEPTH-1:0] rdy;
  preds_t           mem [DEPTH];

  assign rd_ready   = rdy[rd_ptr];
  assign rd_preds   = mem[rd_ptr];
  assign rd_pending = !rdy[rd_ptr] && pdist(wr_ptr, rd_ptr) >= 1 &&
                      pdist(wr_ptr, rd_ptr) <= pdist(wr_ptr, alloc_ptr);
  assign alloc_id   = inc(alloc_ptr);
  assign ck_rd      = rd_ptr;
  assign ck_alloc   = alloc_ptr;

  pq_ptr_t rec_a1;
  assign rec_a1 = inc(rec_alloc);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_ptr    <= '0;
      alloc_ptr <= pq_ptr_t'(AHEAD - 1);
      wr_ptr    <= pq_ptr_t'(AHEAD - 1);
      rdy       <= '0;
    end else begin
      if (wr) begin
        rdy[wr_id] <= 1'b1;
        wr_ptr     <= wr_id;
      end
      if (rec) begin
        rd_ptr    <= inc(rec_rd);
        alloc_ptr <= rec_a1;
        if (rdy[rec_a1] || (wr && wr_id == rec_a1)) wr_ptr <= rec_a1;
        else                                        wr_ptr <= rec_alloc;
      end else if (br) begin
        rd_ptr           <= inc(rd_ptr);
        alloc_ptr        <= inc(alloc_ptr);
        rdy[inc(alloc_ptr)] <= 1'b0;
      end
    end

  always_ff @(posedge clk)
    if (wr) mem[wr_id] <= wr_preds;

endmodule
