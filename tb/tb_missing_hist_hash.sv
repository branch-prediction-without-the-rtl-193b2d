// tb_missing_hist_hash: pushes random fetch addresses into the missing-history
// hash and compares the secondary tag with a software model of the hash
// (XOR of addr[6:2] and addr[11:7] per skipped branch, rotate right by one,
// oldest branch first, over the last five branches).  Also checks that a
// restore of a saved window with a push in the same cycle gives the hash of
// the restored path.
module tb_missing_hist_hash;
  import bp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic push = 0, restore = 0;
  pc_t  push_addr = '0;
  logic [AHEAD_DIST*STAG_W-1:0] restore_win = '0, win;
  stag_t sel;
  int checks = 0, failures = 0;

  missing_hist_hash dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pc_t hist_q [$];

  function automatic stag_t model(input pc_t q [$]);
    stag_t s = '0;
    int n = q.size();
    for (int k = (n > AHEAD_DIST ? n - AHEAD_DIST : 0); k < n; k++) begin
      s = s ^ q[k][6:2] ^ q[k][11:7];
      s = {s[0], s[STAG_W-1:1]};
    end
    return s;
  endfunction

  initial begin
    logic [AHEAD_DIST*STAG_W-1:0] saved_win;
    pc_t saved_q [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (sel !== '0) begin failures++; $display("FAIL reset sel=%0d", sel); end
    for (int i = 0; i < 400; i++) begin
      push_addr = {$urandom, $urandom};
      push = 1;
      @(negedge clk);
      push = 0;
      hist_q.push_back(push_addr);
      checks++;
      if (sel !== model(hist_q)) begin
        failures++;
        $display("FAIL i=%0d sel=%0d exp=%0d", i, sel, model(hist_q));
      end
      if (i == 200) begin saved_win = win; saved_q = hist_q; end
    end
    // restore to the saved window and push a corrected address
    restore = 1; restore_win = saved_win; push = 1; push_addr = 48'h1234_5678_9ABC;
    @(negedge clk);
    restore = 0; push = 0;
    saved_q.push_back(48'h1234_5678_9ABC);
    checks++;
    if (sel !== model(saved_q)) begin failures++; $display("FAIL restore sel=%0d exp=%0d", sel, model(saved_q)); end
    // a known value: one address 0x000000000F80 -> addr[11:7]=31, rot -> 31
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
