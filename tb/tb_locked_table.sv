// tb_locked_table: writes whole sets (tags and valid bits) at random and
// checks the lookup hit and the scan read port against a model.
module tb_locked_table;
  localparam int KEYW = 20, SETS = 8, WAYS = 4, SB = 3, TW = KEYW - SB;
  logic clk = 0, rst_n = 0;
  logic [KEYW-1:0] lk_key = '0;
  logic lk_hit, wr_en = 0;
  logic [SB-1:0] rd_set = '0, wr_set = '0;
  logic [WAYS-1:0][TW-1:0] rd_tag, wr_tag = '0;
  logic [WAYS-1:0] rd_vld, wr_vld = '0;
  int checks = 0, failures = 0, nhit = 0;

  locked_table #(.KEYW(KEYW), .SETS(SETS), .WAYS(WAYS)) dut (.*);
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

  logic [TW-1:0] m_tag [SETS][WAYS];
  bit m_vld [SETS][WAYS];

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin m_vld[s][w] = 0; m_tag[s][w] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 3) == 0;
      wr_set = SB'($urandom_range(0, SETS - 1));
      for (int w = 0; w < WAYS; w++) begin
        wr_tag[w] = TW'($urandom_range(0, 15));
        wr_vld[w] = $urandom_range(0, 1);
      end
      @(posedge clk); #1;
      if (wr_en) for (int w = 0; w < WAYS; w++) begin m_tag[wr_set][w] = wr_tag[w]; m_vld[wr_set][w] = wr_vld[w]; end
      wr_en = 0;
      for (int q = 0; q < 4; q++) begin
        logic [TW-1:0] t; int s; bit h;
        t = TW'($urandom_range(0, 15)); s = $urandom_range(0, SETS - 1);
        // set index = key[2:0] ^ key[5:3]
        lk_key = {t, SB'(s) ^ t[SB-1:0]};
        h = 0;
        for (int w = 0; w < WAYS; w++) if (m_vld[s][w] && m_tag[s][w] == t) h = 1;
        rd_set = SB'(s);
        #1;
        check(lk_hit == h, $sformatf("lookup %0d hit=%b exp %b", i, lk_hit, h));
        if (h) nhit++;
        for (int w = 0; w < WAYS; w++) begin
          check(rd_vld[w] == m_vld[s][w], "rd_vld");
          if (m_vld[s][w]) check(rd_tag[w] == m_tag[s][w], "rd_tag");
        end
      end
    end
    check(nhit > 100, "too few hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
