// locked_table: the table consulted at fetch to decide whether a prediction
// packet skips its global-history update.
//
// Same geometry as the training table it mirrors (128 sets x 8 ways), but an
// entry holds only a tag and a valid bit meaning "eligible to skip".  It is
// never trained directly: the divergence unit rewrites it, one whole set per
// write (`wr_*`), from the eligibility bits of the training table, so the set
// of skipped packets changes only in rare batches and the predictor does not
// keep re-warming.  Geometry and contents follow the description; the
// set-wise copy interface is this design's choice.
//
// `lk_key` -> `lk_hit` is combinational (one cycle in the fetch stage).
// `rd_set` reads a set for the divergence scan.  Writes take effect at the
// next edge.  Reset clears all valid bits: nothing is skipped.
module locked_table #(
  parameter int KEYW = 48,
  parameter int SETS = 128,
  parameter int WAYS = 8
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [KEYW-1:0]                       lk_key,
  output logic                                  lk_hit,
  input  logic [$clog2(SETS)-1:0]               rd_set,
  output logic [WAYS-1:0][KEYW-$clog2(SETS)-1:0] rd_tag,
  output logic [WAYS-1:0]                       rd_vld,
  input  logic                                  wr_en,
  input  logic [$clog2(SETS)-1:0]               wr_set,
  input  logic [WAYS-1:0][KEYW-$clog2(SETS)-1:0] wr_tag,
  input  logic [WAYS-1:0]                       wr_vld
);

  localparam int SB = $clog2(SETS);
  localparam int TW = KEYW - SB;
  typedef logic [SB-1:0] set_t;

  logic [WAYS-1:0][TW-1:0] tag [SETS];
  logic [WAYS-1:0]         vld [SETS];

  always_comb begin
    set_t s;
    s      = lk_key[SB-1:0] ^ lk_key[2*SB-1:SB];
    lk_hit = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (vld[s][w] && tag[s][w] == lk_key[KEYW-1:SB]) lk_hit = 1'b1;
  end

  assign rd_tag = tag[rd_set];
  assign rd_vld = vld[rd_set];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int s = 0; s < SETS; s++) vld[s] <= '0;
    else if (wr_en) vld[wr_set] <= wr_vld;

  always_ff @(posedge clk)
    if (wr_en) tag[wr_set] <= wr_tag;

endmodule
