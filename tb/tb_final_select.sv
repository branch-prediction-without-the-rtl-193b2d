// tb_final_select: exhaustive check of the final direction choice against
// the rules: the ahead prediction chosen by the secondary tag, unless the
// single-cycle counter overrides it; the single-cycle counter when no ahead
// prediction exists; not taken when neither exists.
module tb_final_select;
  import bp_pkg::*;
  logic pq_ready, sc_hit, sc_taken, sc_override, ahead_dir, dir;
  preds_t pq_preds;
  stag_t sel;
  pred_src_t src;
  int checks = 0, failures = 0;

  final_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic exp_dir;
      pred_src_t exp_src;
      pq_preds = $urandom; sel = stag_t'($urandom);
      {pq_ready, sc_hit, sc_taken, sc_override} = 4'($urandom);
      #1;
      if (pq_ready && !(sc_hit && sc_override)) begin exp_dir = pq_preds[sel]; exp_src = SRC_AHEAD; end
      else if (pq_ready) begin exp_dir = sc_taken; exp_src = SRC_OVERRIDE; end
      else if (sc_hit) begin exp_dir = sc_taken; exp_src = SRC_NOAHEAD; end
      else begin exp_dir = 1'b0; exp_src = SRC_NONE; end
      checks++;
      if (dir !== exp_dir || src !== exp_src || ahead_dir !== pq_preds[sel]) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d dir=%b exp=%b src=%0d exp=%0d", i, dir, exp_dir, src, exp_src);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
