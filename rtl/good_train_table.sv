// good_train_table: training table that learns which prediction packets are
// predictable, used both as the "good PC" table (key = packet PC) and as the
// "good CF" table (key = {8 path-history bits, packet PC}).
//
// A set-associative cache (128 sets x 8 ways) whose entries hold a tag and a
// 12-bit saturating counter.  When a packet retires (`up_valid`) its counter
// moves by +1 if the packet was predicted correctly without a long-history
// table (`up_good`), and by -180 otherwise (saturating at 0).  An increment
// that misses allocates the way of the set whose counter is 0 (counter set to
// 1); if no such way exists every counter of the set drops by 1 and the
// request is dropped.  A decrement that misses does nothing.  `decay` starts a
// sweep that subtracts 8 from every counter, one set per cycle.  An entry is
// eligible to skip its history update once its counter reaches THRESH (2024).
// These rules and numbers follow the description; the set index (low key
// bits XOR the next seven) and the value 1 given to a fresh entry are this
// design's choices.
//
// Combinational outputs for the update key: `up_elig` (currently eligible)
// and `up_falls` (this update would take an eligible entry below the
// threshold, which feeds the blacklist).  `rd_set` reads a whole set for the
// divergence scan.  All writes happen at the next edge.
module good_train_table #(
  parameter int KEYW    = 48,
  parameter int SETS    = 128,
  parameter int WAYS    = 8,
  parameter int CW      = 12,
  parameter int THRESH  = 2024,
  parameter int INC     = 1,
  parameter int DEC     = 180,
  parameter int DECAY   = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           up_valid,
  input  logic [KEYW-1:0]                up_key,
  input  logic                           up_good,
  output logic                           up_elig,
  output logic                           up_falls,
  input  logic                           decay,
  output logic                           decay_busy,
  input  logic [$clog2(SETS)-1:0]        rd_set,
  output logic [WAYS-1:0][KEYW-$clog2(SETS)-1:0] rd_tag,
  output logic [WAYS-1:0]                rd_elig
);

  localparam int SB = $clog2(SETS);
  localparam int TW = KEYW - SB;
  typedef logic [SB-1:0] set_t;
  typedef logic [TW-1:0] tag_t;
  typedef logic [CW-1:0] ctr_t;

  tag_t            tag [SETS][WAYS];
  ctr_t            ctr [SETS][WAYS];
  logic [WAYS-1:0] vld [SETS];

  function automatic set_t set_of(input logic [KEYW-1:0] k);
    return k[SB-1:0] ^ k[2*SB-1:SB];
  endfunction

  // ---- update path ----
  set_t          us;
  tag_t          ut;
  logic          hit;
  int            hway, zway;
  ctr_t          nctr [WAYS];
  logic          wen  [WAYS];
  logic          alloc;

  always_comb begin
    us    = set_of(up_key);
    ut    = up_key[KEYW-1:SB];
    hit   = 1'b0;
    hway  = 0;
    zway  = -1;
    alloc = 1'b0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (vld[us][w] && tag[us][w] == ut) begin
        hit  = 1'b1;
        hway = w;
      end
      if (!vld[us][w] || ctr[us][w] == '0) zway = w;
    end
    for (int w = 0; w < WAYS; w++) begin
      nctr[w] = ctr[us][w];
      wen[w]  = 1'b0;
    end
    up_elig  = hit && (int'(ctr[us][hway]) >= THRESH);
    up_falls = 1'b0;
    if (up_valid) begin
      if (hit) begin
        wen[hway] = 1'b1;
        if (up_good)
          nctr[hway] = (int'(ctr[us][hway]) + INC > (1 << CW) - 1) ? '1 : ctr[us][hway] + ctr_t'(INC);
        else begin
          nctr[hway] = (int'(ctr[us][hway]) < DEC) ? '0 : ctr[us][hway] - ctr_t'(DEC);
          up_falls   = up_elig && (int'(nctr[hway]) < THRESH);
        end
      end else if (up_good) begin
        if (zway >= 0) begin
          alloc      = 1'b1;
          wen[zway]  = 1'b1;
          nctr[zway] = ctr_t'(INC);
        end else begin
          for (int w = 0; w < WAYS; w++) begin
            wen[w]  = 1'b1;
            nctr[w] = ctr[us][w] - 1'b1;   // all non-zero here
          end
        end
      end
    end
  end

  // ---- decay sweep ----
  logic busy;
  set_t ds;
  assign decay_busy = busy;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0;
      ds   <= '0;
      for (int s = 0; s < SETS; s++) vld[s] <= '0;
    end else begin
      if (busy) begin
        ds <= ds + 1'b1;
        if (ds == set_t'(SETS - 1)) busy <= 1'b0;
      end else if (decay) begin
        busy <= 1'b1;
        ds   <= '0;
      end
      if (alloc) vld[us][zway] <= 1'b1;
    end

  always_ff @(posedge clk) begin
    for (int w = 0; w < WAYS; w++)
      if (wen[w] && !(busy && ds == us)) ctr[us][w] <= nctr[w];
    if (busy)
      for (int w = 0; w < WAYS; w++) begin
        ctr_t b;
        b = (ds == us && wen[w]) ? nctr[w] : ctr[ds][w];
        ctr[ds][w] <= (int'(b) < DECAY) ? '0 : b - ctr_t'(DECAY);
      end
    if (alloc) tag[us][zway] <= ut;
  end

  // ---- scan read port ----
  always_comb
    for (int w = 0; w < WAYS; w++) begin
      rd_tag[w]  = tag[rd_set][w];
      rd_elig[w] = vld[rd_set][w] && (int'(ctr[rd_set][w]) >= THRESH);
    end

endmodule
