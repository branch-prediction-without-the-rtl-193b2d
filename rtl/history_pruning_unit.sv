// history_pruning_unit: learns which prediction packets are predictable and
// tells the fetch stage which ones may skip their global-history update.
//
// Two tracking paths run side by side:
//   PC path - key = packet start PC: packets predictable in any context;
//   CF path - key = {8 path-history bits, packet PC}: packets predictable
//             only in some control-flow context.  A packet trains the CF path
//             only while its PC is not already eligible in the PC path.
// Each path has a training table (good_train_table), a locked table
// (locked_table) that answers the fetch-time lookup, a divergence unit
// (divergence_sync) that copies training into locked in rare batches, and a
// blacklist that stops packets with unstable predictability from training.
//
// At retirement of a packet (`rt_valid`): it is "good" when it had no
// misprediction and no prediction from a long-history table.  If the path's
// blacklist blocks the key the training update is skipped; otherwise the
// training table is updated, and a misprediction that takes an eligible
// entry below threshold bumps the blacklist (a long-history provider alone
// lowers the counter but does not count as instability).  Every
// DECAY_INSTR retired instructions all training counters decay.  At fetch,
// `lk_hit` is the OR of both locked tables.  Structure and policies follow
// the description; the decay period (not given there) is this design's
// choice.
//
// Timing: the lookup is combinational; training, blacklist and decay write
// at the next edge; the locked tables change only during a copy.
module history_pruning_unit
  import bp_pkg::*;
#(
  parameter int SETS        = 128,
  parameter int WAYS        = 8,
  parameter int THRESH      = 2024,
  parameter int DIV_THRESH  = 185,
  parameter int DIV_M       = 2,
  parameter int BL_THRESH   = 3,
  parameter int DECAY_INSTR = 65536,
  parameter int CF_BITS     = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // fetch-time lookup
  input  pc_t                 lk_pc,
  input  logic [CF_BITS-1:0]  lk_phist,
  output logic                lk_hit,
  output logic                lk_pc_hit,
  output logic                lk_cf_hit,
  // retirement of a packet
  input  logic                rt_valid,
  input  pc_t                 rt_pc,
  input  logic [CF_BITS-1:0]  rt_phist,
  input  logic                rt_mispred,
  input  logic                rt_long_hit,
  input  logic [7:0]          rt_ninstr,
  // observation
  output logic [15:0]         pc_copies,
  output logic [15:0]         cf_copies,
  output logic [15:0]         pc_score,
  output logic [15:0]         cf_score,
  output logic                bl_blocked,   // a retirement was blocked this cycle
  output logic                decaying
);

  localparam int SB   = $clog2(SETS);
  localparam int PKW  = PCW;
  localparam int CKW  = PCW + CF_BITS;

  logic good;
  assign good = !rt_mispred && !rt_long_hit;

  // ---------------- decay timer ----------------
  logic [31:0] icnt;
  logic        decay;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) icnt <= '0;
    else if (decay) icnt <= '0;
    else if (rt_valid) icnt <= icnt + 32'(rt_ninstr);
  assign decay = (int'(icnt) >= DECAY_INSTR);

  // ---------------- PC path ----------------
  logic [PKW-1:0] pc_key;
  logic pc_block, pc_elig, pc_falls, pc_busy;
  logic [SB-1:0] pc_rd_set, pc_wr_set;
  logic [WAYS-1:0][PKW-SB-1:0] pc_tr_tag, pc_lk_tag, pc_wr_tag;
  logic [WAYS-1:0] pc_tr_elig, pc_lk_vld, pc_wr_vld;
  logic pc_wr_en;
  assign pc_key = rt_pc;

  blacklist #(.KEYW(PKW), .THRESH(BL_THRESH)) u_bl_pc (
    .clk, .rst_n, .q_key(pc_key), .q_block(pc_block),
    .inc(rt_valid && !pc_block && pc_falls && rt_mispred), .inc_key(pc_key));

  good_train_table #(.KEYW(PKW), .SETS(SETS), .WAYS(WAYS), .THRESH(THRESH)) u_tr_pc (
    .clk, .rst_n, .up_valid(rt_valid && !pc_block), .up_key(pc_key), .up_good(good),
    .up_elig(pc_elig), .up_falls(pc_falls), .decay, .decay_busy(pc_busy),
    .rd_set(pc_rd_set), .rd_tag(pc_tr_tag), .rd_elig(pc_tr_elig));

  locked_table #(.KEYW(PKW), .SETS(SETS), .WAYS(WAYS)) u_lk_pc (
    .clk, .rst_n, .lk_key(lk_pc), .lk_hit(lk_pc_hit),
    .rd_set(pc_rd_set), .rd_tag(pc_lk_tag), .rd_vld(pc_lk_vld),
    .wr_en(pc_wr_en), .wr_set(pc_wr_set), .wr_tag(pc_wr_tag), .wr_vld(pc_wr_vld));

  divergence_sync #(.TW(PKW-SB), .SETS(SETS), .WAYS(WAYS), .M(DIV_M), .THRESH(DIV_THRESH)) u_dv_pc (
    .clk, .rst_n, .rd_set(pc_rd_set), .tr_tag(pc_tr_tag), .tr_elig(pc_tr_elig),
    .lk_tag(pc_lk_tag), .lk_vld(pc_lk_vld), .wr_en(pc_wr_en), .wr_set(pc_wr_set),
    .wr_tag(pc_wr_tag), .wr_vld(pc_wr_vld), .score(pc_score), .copies(pc_copies));

  // ---------------- CF path ----------------
  logic [CKW-1:0] cf_key;
  logic cf_block, cf_elig, cf_falls, cf_busy, cf_train;
  logic [SB-1:0] cf_rd_set, cf_wr_set;
  logic [WAYS-1:0][CKW-SB-1:0] cf_tr_tag, cf_lk_tag, cf_wr_tag;
  logic [WAYS-1:0] cf_tr_elig, cf_lk_vld, cf_wr_vld;
  logic cf_wr_en;
  assign cf_key   = {rt_phist, rt_pc};
  assign cf_train = rt_valid && !pc_elig && !cf_block;

  blacklist #(.KEYW(CKW), .THRESH(BL_THRESH)) u_bl_cf (
    .clk, .rst_n, .q_key(cf_key), .q_block(cf_block),
    .inc(cf_train && cf_falls && rt_mispred), .inc_key(cf_key));

  good_train_table #(.KEYW(CKW), .SETS(SETS), .WAYS(WAYS), .THRESH(THRESH)) u_tr_cf (
    .clk, .rst_n, .up_valid(cf_train), .up_key(cf_key), .up_good(good),
    .up_elig(cf_elig), .up_falls(cf_falls), .decay, .decay_busy(cf_busy),
    .rd_set(cf_rd_set), .rd_tag(cf_tr_tag), .rd_elig(cf_tr_elig));

  locked_table #(.KEYW(CKW), .SETS(SETS), .WAYS(WAYS)) u_lk_cf (
    .clk, .rst_n, .lk_key({lk_phist, lk_pc}), .lk_hit(lk_cf_hit),
    .rd_set(cf_rd_set), .rd_tag(cf_lk_tag), .rd_vld(cf_lk_vld),
    .wr_en(cf_wr_en), .wr_set(cf_wr_set), .wr_tag(cf_wr_tag), .wr_vld(cf_wr_vld));

  divergence_sync #(.TW(CKW-SB), .SETS(SETS), .WAYS(WAYS), .M(DIV_M), .THRESH(DIV_THRESH)) u_dv_cf (
    .clk, .rst_n, .rd_set(cf_rd_set), .tr_tag(cf_tr_tag), .tr_elig(cf_tr_elig),
    .lk_tag(cf_lk_tag), .lk_vld(cf_lk_vld), .wr_en(cf_wr_en), .wr_set(cf_wr_set),
    .wr_tag(cf_wr_tag), .wr_vld(cf_wr_vld), .score(cf_score), .copies(cf_copies));

  assign lk_hit     = lk_pc_hit || lk_cf_hit;
  assign bl_blocked = rt_valid && (pc_block || (!pc_elig && cf_block));
  assign decaying   = pc_busy || cf_busy;

endmodule
