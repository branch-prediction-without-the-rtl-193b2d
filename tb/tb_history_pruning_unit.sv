// tb_history_pruning_unit: small tables (4 sets x 2 ways, threshold 20,
// copy on any divergence, decay every 2000 instructions).
// Retires a mix of packets:
//   P  always good                      -> must become locked in the PC path
//   Q  always mispredicted              -> must never be locked
//   L  good but from a long-history table -> must never be locked
//   R  good after path history A, bad after B -> the PC path never takes it,
//      the CF path locks {A,R} but not {B,R}
//   S  runs of good packets broken by a misprediction -> falls below the
//      threshold again and again, gets blacklisted and stops training
// and checks the lookups, that copies happened, that blocking happened and
// that the decay sweep ran.
module tb_history_pruning_unit;
  import bp_pkg::*;
  logic clk = 0, rst_n = 0;
  pc_t  lk_pc = '0, rt_pc = '0;
  logic [7:0] lk_phist = '0, rt_phist = '0, rt_ninstr = 8'd8;
  logic lk_hit, lk_pc_hit, lk_cf_hit;
  logic rt_valid = 0, rt_mispred = 0, rt_long_hit = 0;
  logic [15:0] pc_copies, cf_copies, pc_score, cf_score;
  logic bl_blocked, decaying;
  int checks = 0, failures = 0, nblocked = 0, ndecay = 0;

  history_pruning_unit #(.SETS(4), .WAYS(2), .THRESH(20), .DIV_THRESH(0),
                         .DECAY_INSTR(2000)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (bl_blocked) nblocked++;
    if (decaying) ndecay++;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic retire(input pc_t pc, input logic [7:0] ph, input bit mp, input bit lh);
    @(negedge clk);
    rt_valid = 1; rt_pc = pc; rt_phist = ph; rt_mispred = mp; rt_long_hit = lh;
    @(negedge clk);
    rt_valid = 0;
  endtask

  task automatic look(input pc_t pc, input logic [7:0] ph, input bit e_pc, input bit e_cf, input string nm);
    lk_pc = pc; lk_phist = ph;
    #1;
    check(lk_pc_hit == e_pc && lk_cf_hit == e_cf && lk_hit == (e_pc || e_cf),
          $sformatf("%s: pc_hit=%b cf_hit=%b", nm, lk_pc_hit, lk_cf_hit));
  endtask

  localparam pc_t P = 48'h0000_1000, Q = 48'h0000_2001, L = 48'h0000_3002,
                  R = 48'h0000_4003, S = 48'h0000_5000;
  localparam logic [7:0] A = 8'h5A, B = 8'hA5;
  int s_run;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    look(P, A, 0, 0, "P before training");
    s_run = 0;
    for (int i = 0; i < 1200; i++) begin
      case (i % 6)
        0: retire(P, 8'(i), 0, 0);
        1: retire(Q, 8'(i), 1, 0);
        2: retire(L, 8'(i), 0, 1);
        3: retire(R, A, 0, 0);
        4: retire(R, B, 1, 0);
        5: begin
          // S: 25 good packets then one misprediction
          retire(S, 8'h00, s_run == 25, 0);
          s_run = (s_run == 25) ? 0 : s_run + 1;
        end
      endcase
    end
    repeat (20) @(negedge clk);
    look(P, A, 1, 0, "P after training");
    look(P, B, 1, 0, "P in another context");
    look(Q, A, 0, 0, "Q");
    look(L, A, 0, 0, "L");
    look(R, A, 0, 1, "R after A");
    look(R, B, 0, 0, "R after B");
    check(pc_copies > 0 && cf_copies > 0, "no copy in one of the paths");
    check(nblocked > 0, "blacklist never blocked");
    check(ndecay > 0, "decay never ran");
    $display("pc_copies=%0d cf_copies=%0d blocked=%0d decay_cycles=%0d",
             pc_copies, cf_copies, nblocked, ndecay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
