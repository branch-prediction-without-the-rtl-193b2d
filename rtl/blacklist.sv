// blacklist: small fully associative list of prediction packets whose
// predictability is unstable.
//
// Eight entries (one set of eight ways), each a key tag, a valid bit and a
// 3-bit saturating counter.  `inc` is raised when a misprediction takes a
// packet's training counter from eligible to below the threshold; the
// packet's counter here then goes up by one (allocating an entry on a miss).
// A packet whose counter is above THRESH (`q_block`) no longer trains the
// training tables, so it cannot keep entering and leaving the skipped set.
// Size, counter width and behaviour follow the description; the threshold
// value (3), round-robin replacement and a fresh entry starting at 1 are this
// design's choices.  `q_block` is combinational; writes at the next edge.
module blacklist #(
  parameter int KEYW    = 48,
  parameter int ENTRIES = 8,
  parameter int THRESH  = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [KEYW-1:0] q_key,
  output logic            q_block,
  input  logic            inc,
  input  logic [KEYW-1:0] inc_key
);

  localparam int EB = $clog2(ENTRIES);

  logic [KEYW-1:0]  key [ENTRIES];
  logic [2:0]       cnt [ENTRIES];
  logic [ENTRIES-1:0] vld;
  logic [EB-1:0]    rr;

  always_comb begin
    q_block = 1'b0;
    for (int e = 0; e < ENTRIES; e++)
      if (vld[e] && key[e] == q_key && int'(cnt[e]) > THRESH) q_block = 1'b1;
  end

  logic          ihit;
  logic [EB-1:0] iway;
  always_comb begin
    ihit = 1'b0;
    iway = rr;
    for (int e = 0; e < ENTRIES; e++)
      if (vld[e] && key[e] == inc_key) begin
        ihit = 1'b1;
        iway = EB'(e);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      vld <= '0;
      rr  <= '0;
    end else if (inc) begin
      if (ihit) begin
        if (cnt[iway] != 3'd7) cnt[iway] <= cnt[iway] + 1'b1;
      end else begin
        vld[iway] <= 1'b1;
        key[iway] <= inc_key;
        cnt[iway] <= 3'd1;
        rr        <= rr + 1'b1;
      end
    end

endmodule
