// tb_divergence_sync: the testbench holds a small training table (8 sets x
// 4 ways) and locked table and serves the unit's scan port.  Before each
// scan pass the training contents are changed (sometimes a little,
// sometimes a lot); the score reported at the end of the pass must equal
// A + 2B worked out here, a copy pass must follow exactly when the score is
// above the threshold, and after it the locked table must equal the eligible
// training entries.
module tb_divergence_sync;
  localparam int TW = 8, SETS = 8, WAYS = 4, SB = 3, THRESH = 10;
  logic clk = 0, rst_n = 0;
  logic [SB-1:0] rd_set, wr_set;
  logic [WAYS-1:0][TW-1:0] tr_tag, lk_tag, wr_tag;
  logic [WAYS-1:0] tr_elig, lk_vld, wr_vld;
  logic wr_en;
  logic [15:0] score, copies;
  int checks = 0, failures = 0, ncopy = 0, nnocopy = 0;

  divergence_sync #(.TW(TW), .SETS(SETS), .WAYS(WAYS), .M(2), .THRESH(THRESH)) dut (.*);
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

  logic [WAYS-1:0][TW-1:0] t_tag [SETS], l_tag [SETS];
  logic [WAYS-1:0] t_el [SETS], l_vld [SETS];

  assign tr_tag  = t_tag[rd_set];
  assign tr_elig = t_el[rd_set];
  assign lk_tag  = l_tag[rd_set];
  assign lk_vld  = l_vld[rd_set];

  always @(posedge clk)
    if (wr_en) begin
      l_tag[wr_set] <= wr_tag;
      l_vld[wr_set] <= wr_vld;
    end

  int exp_sc, cp0, nwr;

  initial begin
    for (int s = 0; s < SETS; s++) begin t_tag[s] = '0; l_tag[s] = '0; t_el[s] = '0; l_vld[s] = '0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      // wait for the start of a scan pass
      do @(negedge clk); while (!(dut.st == 1'b0 && dut.s == '0));
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          if ($urandom_range(0, 99) < ((r % 3 == 0) ? 5 : 40)) begin
            t_tag[s][w] = TW'($urandom_range(0, 3));
            t_el[s][w]  = $urandom_range(0, 1);
          end
      exp_sc = 0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          bit same;
          same = l_vld[s][w] && t_el[s][w] && l_tag[s][w] == t_tag[s][w];
          if (t_el[s][w] && !same) exp_sc += 1;
          if (l_vld[s][w] && !same) exp_sc += 2;
        end
      cp0 = int'(copies);
      repeat (SETS) @(negedge clk);
      check(int'(score) == exp_sc, $sformatf("round %0d score=%0d exp %0d", r, score, exp_sc));
      nwr = 0;
      repeat (SETS) begin
        if (wr_en) nwr++;
        @(negedge clk);
      end
      if (exp_sc > THRESH) begin
        ncopy++;
        check(nwr == SETS && int'(copies) == cp0 + 1, $sformatf("round %0d copy missing", r));
        for (int s = 0; s < SETS; s++)
          check(l_vld[s] == t_el[s] && l_tag[s] == t_tag[s], $sformatf("round %0d set %0d not copied", r, s));
      end else begin
        nnocopy++;
        check(nwr == 0 && int'(copies) == cp0, $sformatf("round %0d unexpected copy", r));
      end
    end
    check(ncopy > 0 && nnocopy > 0, "copy or no-copy never exercised");
    $display("copies=%0d below_threshold=%0d", ncopy, nnocopy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
