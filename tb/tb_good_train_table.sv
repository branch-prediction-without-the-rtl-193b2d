// tb_good_train_table: small table (4 sets x 2 ways, threshold 20, -10 on a
// bad packet, -3 decay) driven with good and bad packets from a pool of
// keys that conflict in the sets.  A reference model of the counters checks
// every update: +1 per good packet, -DEC per bad one, allocation into an
// empty or zero way, -1 to all ways on a failed allocation, eligibility,
// falling below threshold, and the periodic decay sweep (one set per cycle).
module tb_good_train_table;
  localparam int KEYW = 16, SETS = 4, WAYS = 2, CW = 12, THRESH = 20, DEC = 10, DECAY = 3;
  localparam int SB = 2;
  logic clk = 0, rst_n = 0;
  logic up_valid = 0, up_good = 0, decay = 0, up_elig, up_falls, decay_busy;
  logic [KEYW-1:0] up_key = '0;
  logic [SB-1:0] rd_set = '0;
  logic [WAYS-1:0][KEYW-SB-1:0] rd_tag;
  logic [WAYS-1:0] rd_elig;
  int checks = 0, failures = 0;
  int n_alloc = 0, n_fail = 0, n_falls = 0, n_elig = 0, n_decay = 0;

  good_train_table #(.KEYW(KEYW), .SETS(SETS), .WAYS(WAYS), .CW(CW), .THRESH(THRESH),
                     .INC(1), .DEC(DEC), .DECAY(DECAY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  int  m_ctr [SETS][WAYS];
  bit  m_vld [SETS][WAYS];
  logic [KEYW-SB-1:0] m_tag [SETS][WAYS];
  logic [KEYW-1:0] pool [12];

  function automatic int setof(input logic [KEYW-1:0] k);
    return int'(k[1:0] ^ k[3:2]);
  endfunction

  initial begin
    for (int i = 0; i < 12; i++) pool[i] = KEYW'(16'h1234 * (i + 1)) & 16'hFFF0 | 16'(i % 4);
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin m_ctr[s][w] = 0; m_vld[s][w] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      logic [KEYW-1:0] k; bit g; int s, hw, zw; bit h, ee, ef;
      @(negedge clk);
      if (i % 500 == 499) begin
        // decay sweep
        decay = 1; up_valid = 0;
        @(negedge clk); decay = 0;
        while (decay_busy) @(negedge clk);
        for (int s2 = 0; s2 < SETS; s2++) for (int w = 0; w < WAYS; w++)
          m_ctr[s2][w] = (m_ctr[s2][w] < DECAY) ? 0 : m_ctr[s2][w] - DECAY;
        n_decay++;
      end
      k = pool[(i / 50) % 2 == 0 ? $urandom_range(0, 3) : $urandom_range(0, 11)];
      g = $urandom_range(0, 19) != 0;
      s = setof(k);
      h = 0; hw = 0; zw = -1;
      for (int w = WAYS - 1; w >= 0; w--) begin
        if (m_vld[s][w] && m_tag[s][w] == k[KEYW-1:SB]) begin h = 1; hw = w; end
        if (!m_vld[s][w] || m_ctr[s][w] == 0) zw = w;
      end
      ee = h && m_ctr[s][hw] >= THRESH;
      ef = 0;
      up_valid = 1; up_key = k; up_good = g;
      #1;
      check(up_elig == ee, $sformatf("upd %0d elig=%b exp %b", i, up_elig, ee));
      if (h) begin
        if (g) m_ctr[s][hw] = (m_ctr[s][hw] == (1 << CW) - 1) ? m_ctr[s][hw] : m_ctr[s][hw] + 1;
        else begin
          m_ctr[s][hw] = (m_ctr[s][hw] < DEC) ? 0 : m_ctr[s][hw] - DEC;
          ef = ee && m_ctr[s][hw] < THRESH;
        end
      end else if (g) begin
        if (zw >= 0) begin m_vld[s][zw] = 1; m_tag[s][zw] = k[KEYW-1:SB]; m_ctr[s][zw] = 1; n_alloc++; end
        else begin for (int w = 0; w < WAYS; w++) m_ctr[s][w]--; n_fail++; end
      end
      check(up_falls == ef, $sformatf("upd %0d falls=%b", i, up_falls));
      if (ef) n_falls++;
      if (ee) n_elig++;
      @(posedge clk); #1;
      up_valid = 0;
      for (int s2 = 0; s2 < SETS; s2++) begin
        rd_set = SB'(s2);
        #1;
        for (int w = 0; w < WAYS; w++) begin
          check(rd_elig[w] == (m_vld[s2][w] && m_ctr[s2][w] >= THRESH), $sformatf("upd %0d rd_elig s%0d w%0d", i, s2, w));
          if (m_vld[s2][w]) check(rd_tag[w] == m_tag[s2][w], "rd_tag");
        end
      end
    end
    $display("alloc=%0d failed_alloc=%0d falls=%0d elig=%0d decays=%0d", n_alloc, n_fail, n_falls, n_elig, n_decay);
    check(n_alloc > 0 && n_fail > 0 && n_falls > 0 && n_elig > 0 && n_decay > 0, "a case was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
