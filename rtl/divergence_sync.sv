// divergence_sync: decides when the locked table is refreshed from the
// training table, and performs the refresh.
//
// It scans both tables continuously, one set per cycle.  For each way it
// counts A, entries eligible in the training table but absent from the locked
// table (new skipping opportunities), and B, entries valid in the locked
// table that the training table no longer holds as eligible (packets being
// skipped that have stopped being predictable).  After the last set the
// divergence score A + M*B is compared with THRESH: only if it exceeds it is
// the whole locked table rewritten, again one set per cycle, from the
// training table's tags and eligibility bits.  Then scanning restarts.
// Score, weight M = 2 and threshold 185 follow the description; pairing
// entries by (set, way) position and the continuous scan are this design's
// choices.
//
// A scan takes SETS cycles, a copy another SETS cycles.  `score` holds the
// last complete score, `copies` counts locked-table refreshes.
module divergence_sync #(
  parameter int TW     = 41,
  parameter int SETS   = 128,
  parameter int WAYS   = 8,
  parameter int M      = 2,
  parameter int THRESH = 185
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic [$clog2(SETS)-1:0]     rd_set,
  input  logic [WAYS-1:0][TW-1:0]     tr_tag,
  input  logic [WAYS-1:0]             tr_elig,
  input  logic [WAYS-1:0][TW-1:0]     lk_tag,
  input  logic [WAYS-1:0]             lk_vld,
  output logic                        wr_en,
  output logic [$clog2(SETS)-1:0]     wr_set,
  output logic [WAYS-1:0][TW-1:0]     wr_tag,
  output logic [WAYS-1:0]             wr_vld,
  output logic [15:0]                 score,
  output logic [15:0]                 copies
);

  localparam int SB = $clog2(SETS);
  typedef logic [SB-1:0] set_t;

  typedef enum logic {SCAN, COPY} st_t;
  st_t         st;
  set_t        s;
  logic [15:0] acc_a, acc_b;
  logic [15:0] set_a, set_b;

  always_comb begin
    set_a = '0;
    set_b = '0;
    for (int w = 0; w < WAYS; w++) begin
      logic same;
      same = lk_vld[w] && tr_elig[w] && (lk_tag[w] == tr_tag[w]);
      if (tr_elig[w] && !same) set_a = set_a + 1'b1;
      if (lk_vld[w]  && !same) set_b = set_b + 1'b1;
    end
  end

  assign rd_set = s;
  assign wr_en  = (st == COPY);
  assign wr_set = s;
  assign wr_tag = tr_tag;
  assign wr_vld = tr_elig;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st     <= SCAN;
      s      <= '0;
      acc_a  <= '0;
      acc_b  <= '0;
      score  <= '0;
      copies <= '0;
    end else begin
      s <= s + 1'b1;
      if (st == SCAN) begin
        if (s == set_t'(SETS - 1)) begin
          logic [15:0] sc;
          sc    = acc_a + set_a + 16'(M) * (acc_b + set_b);
          score <= sc;
          acc_a <= '0;
          acc_b <= '0;
          if (int'(sc) > THRESH) st <= COPY;
        end else begin
          acc_a <= acc_a + set_a;
          acc_b <= acc_b + set_b;
        end
      end else if (s == set_t'(SETS - 1)) begin
        st     <= SCAN;
        copies <= copies + 1'b1;
      end
    end

endmodule
