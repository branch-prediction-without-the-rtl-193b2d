// tb_vpc_counter: replays a ten-iteration loop whose closing backward branch
// skips its history update, with MAX = 4: the counter must read
// 0,1,2,3,4, force an update, then 0,1,2,3 again.  Then random events are
// compared with a reference model, including restores.
module tb_vpc_counter;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ev = 0, skip_req = 0, backward = 0, restore = 0;
  logic update, forced;
  logic [BWD_W-1:0] restore_val = '0, cnt;
  int checks = 0, failures = 0;

  vpc_counter #(.MAX(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  int exp_seq [10] = '{0, 1, 2, 3, 4, 0, 1, 2, 3, 4};
  bit exp_frc [10] = '{0, 0, 0, 0, 1, 0, 0, 0, 0, 1};
  int m, nforced;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // loop: each iteration ends with a skipping backward branch
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      ev = 1; skip_req = 1; backward = 1;
      #1;
      check(int'(cnt) == exp_seq[i], $sformatf("iter %0d cnt=%0d", i, cnt));
      check(forced == exp_frc[i] && update == exp_frc[i], $sformatf("iter %0d forced=%b", i, forced));
    end
    @(negedge clk); ev = 0;
    // random events against a model
    m = int'(cnt);
    nforced = 0;
    for (int i = 0; i < 3000; i++) begin
      bit e, s, b, r, ef, eu; int rv, base;
      e = $urandom_range(0, 3) != 0; s = $urandom_range(0, 3) != 0; b = $urandom_range(0, 1);
      r = $urandom_range(0, 15) == 0; rv = $urandom_range(0, 4);
      @(negedge clk);
      ev = e; skip_req = s; backward = b; restore = r; restore_val = BWD_W'(rv);
      base = r ? rv : m;
      ef = s && b && base >= 4;
      eu = !s || ef;
      #1;
      check(forced == ef && update == eu, $sformatf("rand %0d forced=%b update=%b", i, forced, update));
      if (ef && e) nforced++;
      if (e && eu) m = 0; else if (e && b) m = base + 1; else m = base;
      @(posedge clk); #1;
      check(int'(cnt) == m, $sformatf("rand %0d cnt=%0d exp %0d", i, cnt, m));
    end
    check(nforced > 0, "no forced update in random phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
