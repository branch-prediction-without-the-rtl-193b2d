// tb_blacklist: bumps a set of keys (more than the eight entries) in random
// order and checks the block output against a model of the eight-entry
// list: allocation at 1, saturating 3-bit count, block above the threshold
// of 3, round-robin replacement.
module tb_blacklist;
  localparam int KEYW = 16;
  logic clk = 0, rst_n = 0;
  logic [KEYW-1:0] q_key = '0, inc_key = '0;
  logic q_block, inc = 0;
  int checks = 0, failures = 0, nblock = 0, nrepl = 0;

  blacklist #(.KEYW(KEYW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [KEYW-1:0] m_key [8];
  int m_cnt [8];
  bit m_vld [8];
  int m_rr;

  initial begin
    for (int e = 0; e < 8; e++) begin m_vld[e] = 0; m_cnt[e] = 0; m_key[e] = '0; end
    m_rr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic [KEYW-1:0] k; int hw;
      k = KEYW'(16'h100 + $urandom_range(0, (i < 2000) ? 6 : 11));
      @(negedge clk);
      inc = $urandom_range(0, 1); inc_key = k;
      q_key = KEYW'(16'h100 + $urandom_range(0, 11));
      #1;
      begin
        bit b; b = 0;
        for (int e = 0; e < 8; e++) if (m_vld[e] && m_key[e] == q_key && m_cnt[e] > 3) b = 1;
        check(q_block == b, $sformatf("query %0d block=%b exp %b", i, q_block, b));
        if (b) nblock++;
      end
      if (inc) begin
        hw = -1;
        for (int e = 0; e < 8; e++) if (m_vld[e] && m_key[e] == k) hw = e;
        if (hw >= 0) begin if (m_cnt[hw] < 7) m_cnt[hw]++; end
        else begin
          if (m_vld[m_rr]) nrepl++;
          m_vld[m_rr] = 1; m_key[m_rr] = k; m_cnt[m_rr] = 1; m_rr = (m_rr + 1) % 8;
        end
      end
      @(posedge clk);
    end
    @(negedge clk); inc = 0;
    check(nblock > 50 && nrepl > 0, "blocking or replacement never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
