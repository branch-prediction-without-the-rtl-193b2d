// mc_btb: multi-cycle branch target buffer, 8K entries in 4 ways.
//
// It is looked up with the current PC of every fetched branch, like the
// single-cycle BTB, and is not ahead-pipelined.  It backs the single-cycle
// BTB: when that misses, the branch is first treated as not taken, and if
// this larger buffer then returns a target for a branch predicted taken the
// front end issues a late flush to that target.  Size, associativity and the
// three-cycle access follow the description.
//
// Timing: request in cycle c (set index registered), the set read in c+1,
// tags compared in c+2, `resp_*` valid in c+3.  Taken branches are written at
// retirement (`up_*`), allocating round-robin within the set on a miss and
// refreshing the target on a hit.  The index hash (low PC bits XOR the next
// ones) and the full-PC tag are this design's choices.
module mc_btb
  import bp_pkg::*;
#(
  parameter int ENTRIES = 8192,
  parameter int WAYS    = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_valid,
  input  pc_t  req_pc,
  output logic resp_valid,
  output logic resp_hit,
  output pc_t  resp_target,
  input  logic up_valid,
  input  pc_t  up_pc,
  input  pc_t  up_target
);

  localparam int SETS = ENTRIES / WAYS;
  localparam int SB   = $clog2(SETS);
  localparam int WB   = $clog2(WAYS);

  typedef logic [PCW-SB-1:0] tag_t;
  typedef logic [SB-1:0]     set_t;

  function automatic set_t set_of(input pc_t pc);
    return pc[SB-1:0] ^ pc[2*SB-1:SB];
  endfunction

  tag_t             tags [SETS][WAYS];
  pc_t              tgts [SETS][WAYS];
  logic [WAYS-1:0]  vld  [SETS];
  logic [WB-1:0]    rr   [SETS];

  // ---- lookup pipeline ----
  logic s1_v, s2_v, s3_v;
  set_t s1_set;
  tag_t s1_tag, s2_tag;
  tag_t s2_tags [WAYS];
  pc_t  s2_tgts [WAYS];
  logic [WAYS-1:0] s2_vld;
  logic s3_hit;
  pc_t  s3_tgt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {s1_v, s2_v, s3_v} <= '0;
    else        {s1_v, s2_v, s3_v} <= {req_valid, s1_v, s2_v};

  always_ff @(posedge clk) begin
    s1_set <= set_of(req_pc);
    s1_tag <= req_pc[PCW-1:SB];
    s2_tag <= s1_tag;
    s2_vld <= vld[s1_set];
    for (int w = 0; w < WAYS; w++) begin
      s2_tags[w] <= tags[s1_set][w];
      s2_tgts[w] <= tgts[s1_set][w];
    end
    begin
      logic h;
      pc_t  t;
      h = 1'b0;
      t = '0;
      for (int w = 0; w < WAYS; w++)
        if (s2_vld[w] && s2_tags[w] == s2_tag) begin
          h = 1'b1;
          t = s2_tgts[w];
        end
      s3_hit <= h;
      s3_tgt <= t;
    end
  end

  assign resp_valid  = s3_v;
  assign resp_hit    = s3_hit;
  assign resp_target = s3_tgt;

  // ---- update ----
  set_t          us;
  logic          uhit;
  logic [WB-1:0] uway;
  always_comb begin
    us   = set_of(up_pc);
    uhit = 1'b0;
    uway = rr[us];
    for (int w = 0; w < WAYS; w++)
      if (vld[us][w] && tags[us][w] == up_pc[PCW-1:SB]) begin
        uhit = 1'b1;
        uway = WB'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        vld[s] <= '0;
        rr[s]  <= '0;
      end
    end else if (up_valid) begin
      vld[us][uway] <= 1'b1;
      if (!uhit) rr[us] <= rr[us] + 1'b1;
    end

  always_ff @(posedge clk)
    if (up_valid) begin
      tags[us][uway] <= up_pc[PCW-1:SB];
      tgts[us][uway] <= up_target;
    end

endmodule
