// tb_mc_btb: writes random taken branches into the multi-cycle BTB, then
// looks them up back to back and checks hit, target and the three-cycle
// latency against a model; unknown PCs must miss.
module tb_mc_btb;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, resp_valid, resp_hit, up_valid = 0;
  pc_t req_pc = '0, resp_target, up_pc = '0, up_target = '0;
  int checks = 0, failures = 0;

  mc_btb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pc_t pcs [200], tgs [200];
  logic exp_hit [$];
  pc_t  exp_tgt [$];
  int   exp_cyc [$];
  int   cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (resp_valid) begin
    checks++;
    if (exp_hit.size() == 0 || cyc - exp_cyc[0] != 3 || resp_hit !== exp_hit[0] ||
        (resp_hit && resp_target !== exp_tgt[0])) begin
      failures++;
      $display("FAIL resp hit=%b tgt=%h lat=%0d", resp_hit, resp_target, exp_cyc.size() ? cyc - exp_cyc[0] : -1);
    end
    if (exp_hit.size()) begin void'(exp_hit.pop_front()); void'(exp_tgt.pop_front()); void'(exp_cyc.pop_front()); end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      pcs[i] = {16'h0, $urandom} + 48'(i) * 48'h1_0000_0000;
      tgs[i] = {$urandom, $urandom};
      @(negedge clk); up_valid = 1; up_pc = pcs[i]; up_target = tgs[i];
    end
    @(negedge clk); up_valid = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      req_valid = 1;
      if (i % 2 == 0) begin
        req_pc = pcs[i/2]; exp_hit.push_back(1); exp_tgt.push_back(tgs[i/2]);
      end else begin
        req_pc = pcs[i/2] ^ 48'h8000_0000_0000; exp_hit.push_back(0); exp_tgt.push_back('0);
      end
      exp_cyc.push_back(cyc);
    end
    @(negedge clk); req_valid = 0;
    repeat (6) @(negedge clk);
    checks++; if (exp_hit.size() != 0) begin failures++; $display("FAIL missing responses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
