// tb_ahead_tage: checks the ahead-pipelined TAGE at its full size.
//   - `ready` rises once the 8K-cycle clearing sweep has ended;
//   - a lookup answers exactly three cycles after the request, in order,
//     with its id, and a fresh predictor says not taken for all 32 values;
//   - squashing kills the requests in flight at and after `squash_from`;
//   - training: eight branch contexts (ahead PC, VPC, history), each seen
//     under four secondary tags with its own fixed outcome per tag (both
//     directions mixed within one context).  After training, one lookup per
//     context must give the trained direction for each of its four tags, and
//     the update port must agree; so the 32-way selection by secondary tag
//     works and allocation found room for conflicting patterns (promotion).
module tb_ahead_tage;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0, ready;
  logic req_valid = 0, resp_valid, squash = 0, upd_valid = 0, upd_taken = 0;
  pc_t  req_pc = '0, req_vpc = '0, upd_pc = '0, upd_vpc = '0;
  ghr_t req_ghr = '0, upd_ghr = '0;
  phist_t req_phist = '0, upd_phist = '0;
  pq_ptr_t req_id = '0, resp_id, squash_from = '0;
  preds_t resp_preds;
  stag_t upd_stag = '0;
  logic upd_pred, upd_long_hit;
  int checks = 0, failures = 0, cyc = 0;

  ahead_tage dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // response monitor
  int     exp_cyc [$];
  pq_ptr_t exp_id [$];
  preds_t last_preds;
  always @(negedge clk) if (resp_valid) begin
    checks++;
    if (exp_id.size() == 0 || resp_id != exp_id[0] || cyc - exp_cyc[0] != 3) begin
      failures++;
      $display("FAIL response id=%0d", resp_id);
    end
    if (exp_id.size() > 0) begin void'(exp_id.pop_front()); void'(exp_cyc.pop_front()); end
    last_preds = resp_preds;
  end

  typedef struct { pc_t pc; pc_t vpc; ghr_t ghr; phist_t ph; stag_t st [4]; bit out [4]; } ctx_t;
  ctx_t ctx [8];

  task automatic lookup(input int k, input pq_ptr_t id);
    @(negedge clk);
    req_valid = 1; req_pc = ctx[k].pc; req_vpc = ctx[k].vpc; req_ghr = ctx[k].ghr;
    req_phist = ctx[k].ph; req_id = id;
    exp_id.push_back(id); exp_cyc.push_back(cyc);
    @(negedge clk); req_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic update(input int k, input int j);
    @(negedge clk);
    upd_valid = 1; upd_pc = ctx[k].pc; upd_vpc = ctx[k].vpc; upd_ghr = ctx[k].ghr;
    upd_phist = ctx[k].ph; upd_stag = ctx[k].st[j]; upd_taken = ctx[k].out[j];
  endtask

  int t_ready, nwrong;

  initial begin
    for (int k = 0; k < 8; k++) begin
      ctx[k].pc = {16'h0, $urandom} & ~48'h3;
      ctx[k].vpc = ctx[k].pc + 48'(k % 3);
      for (int b = 0; b < GHR_LEN / 32; b++) ctx[k].ghr[b*32 +: 32] = $urandom;
      ctx[k].ph = PHIST_LEN'($urandom);
      for (int j = 0; j < 4; j++) begin
        ctx[k].st[j] = stag_t'(j * 7 + k);
        ctx[k].out[j] = (j == 0) ? 1'b1 : (j == 1) ? 1'b0 : 1'($urandom_range(0, 1));
      end
    end
    repeat (2) @(posedge clk); rst_n = 1;
    t_ready = cyc;
    while (!ready) @(posedge clk);
    check(cyc - t_ready >= 8192 && cyc - t_ready <= 8194, $sformatf("ready after %0d cycles", cyc - t_ready));
    // fresh predictor: everything not taken, latency 3
    lookup(0, 7);
    check(last_preds == '0, "fresh predictor not all not-taken");
    // back-to-back requests then squash of the younger two
    @(negedge clk);
    req_valid = 1; req_id = 10; exp_id.push_back(10); exp_cyc.push_back(cyc);
    @(negedge clk);
    req_id = 11;
    @(negedge clk);
    req_id = 12; squash = 1; squash_from = 11;
    @(negedge clk);
    req_valid = 0; squash = 0;
    repeat (5) @(negedge clk);
    check(exp_id.size() == 0, "squashed lookups answered or kept");
    // training
    for (int r = 0; r < 100; r++)
      for (int k = 0; k < 8; k++)
        for (int j = 0; j < 4; j++) update(k, j);
    @(negedge clk); upd_valid = 0;
    nwrong = 0;
    for (int k = 0; k < 8; k++) begin
      lookup(k, pq_ptr_t'(k));
      for (int j = 0; j < 4; j++) begin
        check(last_preds[ctx[k].st[j]] == ctx[k].out[j],
              $sformatf("ctx %0d tag %0d: pred %b exp %b", k, ctx[k].st[j], last_preds[ctx[k].st[j]], ctx[k].out[j]));
        upd_pc = ctx[k].pc; upd_vpc = ctx[k].vpc; upd_ghr = ctx[k].ghr; upd_phist = ctx[k].ph;
        upd_stag = ctx[k].st[j];
        #1;
        check(upd_pred == ctx[k].out[j], $sformatf("ctx %0d update-port pred", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
