// tb_sc_btb: checks the single-cycle BTB against a behavioural model:
// allocation of taken branches only, hit/target, the 2-bit counter walk, and
// the 3-bit override counter (+1 when the counter was right and the ahead
// prediction wrong, -1 in the opposite case, override above 2).
module tb_sc_btb;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0;
  pc_t lk_pc = '0, lk_target, up_pc = '0, up_target = '0;
  logic lk_hit, lk_taken, lk_override;
  logic up_valid = 0, up_taken = 0, up_ahead_valid = 0, up_ahead_correct = 0;
  int checks = 0, failures = 0;

  sc_btb dut (.*);
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

  task automatic upd(input pc_t pc, input logic t, input pc_t tg, input logic av, input logic ac);
    @(negedge clk);
    up_valid = 1; up_pc = pc; up_taken = t; up_target = tg; up_ahead_valid = av; up_ahead_correct = ac;
    @(posedge clk); #1; up_valid = 0;
  endtask

  task automatic look(input pc_t pc);
    @(negedge clk); lk_pc = pc; #1;
  endtask

  initial begin
    pc_t a;
    int ctr, usec;
    repeat (2) @(posedge clk); rst_n = 1;
    a = 48'h0000_4000_1230;
    look(a); chk(!lk_hit, "empty after reset");
    upd(a, 0, '0, 0, 0);
    look(a); chk(!lk_hit, "not-taken does not allocate");
    upd(a, 1, 48'h0000_4000_2000, 0, 0);
    look(a); chk(lk_hit && lk_target == 48'h0000_4000_2000 && lk_taken && !lk_override, "allocated weakly taken");
    ctr = 2; usec = 0;
    for (int i = 0; i < 200; i++) begin
      logic t, ac, bim_ok;
      t = 1'($urandom); ac = 1'($urandom);
      bim_ok = (ctr >= 2) == t;
      upd(a, t, 48'h0000_4000_2000, 1, ac);
      if (bim_ok && !ac && usec < 7) usec++;
      else if (!bim_ok && ac && usec > 0) usec--;
      if (t && ctr < 3) ctr++; else if (!t && ctr > 0) ctr--;
      look(a);
      chk(lk_hit && lk_taken == (ctr >= 2) && lk_override == (usec > 2), "counter / override model");
    end
    // conflict: fill one set with 5 taken branches, the oldest is evicted
    for (int k = 0; k < 5; k++) upd(48'h0010_0000_0000 + 48'(k) * 48'h0001_0000_0000, 1, 48'(k + 1), 0, 0);
    look(48'h0010_0000_0000); chk(!lk_hit, "round-robin victim evicted");
    look(48'h0014_0000_0000); chk(lk_hit && lk_target == 48'd5, "newest present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
