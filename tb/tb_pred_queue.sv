// tb_pred_queue: drives the prediction queue as the front end does (one
// branch read + allocation per step, predictor write-back three steps after
// allocation) and checks: start-up pointers (read 0, alloc = write = 4),
// that the first five branches find no prediction, that every later read
// returns the bits written for that entry, the constant read/alloc distance,
// a late entry reported as pending, and flush recovery (read = ckpt+1,
// alloc = ckpt+1, surviving entries still readable, write pointer = alloc).
module tb_pred_queue;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic br = 0, wr = 0, rec = 0;
  logic rd_ready, rd_pending;
  preds_t rd_preds, wr_preds = '0;
  pq_ptr_t alloc_id, ck_rd, ck_alloc, wr_id = '0, rec_rd = '0, rec_alloc = '0;
  pq_ptr_t rd_ptr, alloc_ptr, wr_ptr;
  int checks = 0, failures = 0;

  pred_queue dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask

  preds_t model [PQ_DEPTH];
  pq_ptr_t inflight_id [$];
  preds_t  inflight_p [$];
  int      inflight_t [$];
  int step = 0;

  // one step: read+alloc, write-backs whose time has come
  task automatic do_branch(input logic expect_ready);
    @(negedge clk);
    chk(int'(pq_dist(rd_ptr, alloc_ptr)) == AHEAD_DIST - 1, "alloc-read distance");
    if (expect_ready) begin
      chk(rd_ready && rd_preds == model[rd_ptr], "read returns written bits");
    end
    br = 1;
    inflight_id.push_back(alloc_id);
    inflight_p.push_back(preds_t'({$urandom}));
    inflight_t.push_back(step + 3);
    wr = 0;
    if (inflight_t.size() > 0 && inflight_t[0] <= step) begin
      wr = 1; wr_id = inflight_id.pop_front(); wr_preds = inflight_p.pop_front();
      void'(inflight_t.pop_front());
      model[wr_id] = wr_preds;
    end
    @(posedge clk); #1;
    br = 0; wr = 0;
    step++;
  endtask

  initial begin
    pq_ptr_t sv_rd, sv_alloc, sv_next_rd;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(rd_ptr == 0 && alloc_ptr == AHEAD_DIST - 1 && wr_ptr == AHEAD_DIST - 1, "reset pointers");
    for (int i = 0; i < AHEAD_DIST; i++) begin
      @(negedge clk);
      chk(!rd_ready && !rd_pending, "start-up: no prediction");
      do_branch(0);
    end
    // steady state: more than one lap of the circular buffer
    for (int i = 0; i < 300; i++) begin
      // drain write-backs so each read is ready
      while (inflight_t.size() > 0 && pq_dist(rd_ptr, inflight_id[0]) == 0) begin
        @(negedge clk);
        chk(rd_pending && !rd_ready, "late entry is pending");
        wr = 1; wr_id = inflight_id.pop_front(); wr_preds = inflight_p.pop_front();
        void'(inflight_t.pop_front()); model[wr_id] = wr_preds;
        @(posedge clk); #1; wr = 0;
      end
      if (i == 250) begin sv_rd = ck_rd; sv_alloc = ck_alloc; end
      do_branch(1);
    end
    // let everything land, then recover to the branch saved at i = 250
    while (inflight_t.size() > 0) begin
      @(negedge clk);
      wr = 1; wr_id = inflight_id.pop_front(); wr_preds = inflight_p.pop_front();
      void'(inflight_t.pop_front()); model[wr_id] = wr_preds;
      @(posedge clk); #1; wr = 0;
    end
    @(negedge clk);
    rec = 1; rec_rd = sv_rd; rec_alloc = sv_alloc;
    @(posedge clk); #1; rec = 0;
    @(negedge clk);
    chk(rd_ptr == pq_inc(sv_rd) && alloc_ptr == pq_inc(sv_alloc) && wr_ptr == pq_inc(sv_alloc),
        "recovery pointers");
    // the AHEAD_DIST entries after the flushed branch are still readable
    for (int i = 0; i < AHEAD_DIST; i++) begin
      @(negedge clk);
      chk(rd_ready && rd_preds == model[rd_ptr], "surviving entry after recovery");
      br = 1;
      @(posedge clk); #1; br = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
