// sc_btb: single-cycle branch target buffer with a 2-bit direction counter
// and a 3-bit override counter per entry.
//
// The lookup is combinational: for `lk_pc` it returns hit, target, the
// counter's direction and `lk_override`.  The 2-bit counter is the baseline
// single-cycle predictor and uses the current PC only, so it learns branches
// whose direction needs no history.  The 3-bit counter measures whether this
// counter beats the ahead predictor for the branch: +1 when the counter was
// right and the ahead prediction wrong, -1 in the opposite case, unchanged
// otherwise; above 2 the ahead prediction is ignored (`lk_override`).  All
// of this follows the description, as do the size (1K entries, 4 ways) and
// the update at retirement.
//
// This design's choices: the set index is the low PC bits XOR the next ones,
// the full remaining PC is kept as tag, a taken branch that misses allocates
// with its counter weakly taken and override counter 0, and the victim way
// is chosen round-robin per set.  Updates (`up_*`) write at the next edge.
module sc_btb
  import bp_pkg::*;
#(
  parameter int ENTRIES = 1024,
  parameter int WAYS    = 4
) (
  input  logic clk,
  input  logic rst_n,
  // lookup
  input  pc_t  lk_pc,
  output logic lk_hit,
  output pc_t  lk_target,
  output logic lk_taken,
  output logic lk_override,
  // retirement update
  input  logic up_valid,
  input  pc_t  up_pc,
  input  logic up_taken,
  input  pc_t  up_target,
  input  logic up_ahead_valid,    // an ahead prediction was available
  input  logic up_ahead_correct   // and it was right
);

  localparam int SETS = ENTRIES / WAYS;
  localparam int SB   = $clog2(SETS);
  localparam int WB   = $clog2(WAYS);

  typedef struct packed {
    logic             v;
    logic [PCW-SB-1:0] tag;
    pc_t              tgt;
    logic [1:0]       ctr;
    logic [2:0]       use_cnt;
  } ent_t;

  ent_t         mem [SETS][WAYS];
  logic [WB-1:0] rr [SETS];

  function automatic logic [SB-1:0] set_of(input pc_t pc);
    return pc[SB-1:0] ^ pc[2*SB-1:SB];
  endfunction

  // lookup
  always_comb begin
    logic [SB-1:0] s;
    s           = set_of(lk_pc);
    lk_hit      = 1'b0;
    lk_target   = '0;
    lk_taken    = 1'b0;
    lk_override = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (mem[s][w].v && mem[s][w].tag == lk_pc[PCW-1:SB]) begin
        lk_hit      = 1'b1;
        lk_target   = mem[s][w].tgt;
        lk_taken    = mem[s][w].ctr[1];
        lk_override = mem[s][w].use_cnt > 3'd2;
      end
  end

  // update
  logic [SB-1:0] us;
  logic          uhit;
  logic [WB-1:0] uway;
  always_comb begin
    us   = set_of(up_pc);
    uhit = 1'b0;
    uway = rr[us];
    for (int w = 0; w < WAYS; w++)
      if (mem[us][w].v && mem[us][w].tag == up_pc[PCW-1:SB]) begin
        uhit = 1'b1;
        uway = WB'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) mem[s][w].v <= 1'b0;
      end
    end else if (up_valid) begin
      if (uhit) begin
        ent_t e;
        logic bim_ok;
        e      = mem[us][uway];
        bim_ok = (e.ctr[1] == up_taken);
        if (up_taken && e.ctr != 2'b11)       e.ctr = e.ctr + 1'b1;
        else if (!up_taken && e.ctr != 2'b00) e.ctr = e.ctr - 1'b1;
        if (up_ahead_valid) begin
          if (bim_ok && !up_ahead_correct && e.use_cnt != 3'd7) e.use_cnt = e.use_cnt + 1'b1;
          else if (!bim_ok && up_ahead_correct && e.use_cnt != 3'd0) e.use_cnt = e.use_cnt - 1'b1;
        end
        if (up_taken) e.tgt = up_target;
        mem[us][uway] <= e;
      end else if (up_taken) begin
        mem[us][uway] <= '{v: 1'b1, tag: up_pc[PCW-1:SB], tgt: up_target,
                           ctr: 2'b10, use_cnt: 3'd0};
        rr[us] <= rr[us] + 1'b1;
      end
    end

endmodule
