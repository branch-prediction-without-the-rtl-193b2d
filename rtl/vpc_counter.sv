// vpc_counter: global backward counter that keeps skipped backward branches
// distinguishable.
//
// When a backward branch skips its history update, every iteration of the
// loop it closes would otherwise see the same PC and the same history.  The
// counter counts backward branches since the last history update; the
// history-based tables are indexed with the virtual PC  VPC = PC + counter,
// while the bimodal table keeps the plain PC.  The counter is incremented by
// a backward packet that skips, cleared by any packet that updates the
// history, and when a skipping backward packet finds it at MAX the history
// update is forced instead (bounding how far the VPC moves).  With MAX = 4 a
// ten-iteration loop sees PC+0..PC+4, a forced update, then PC+0..PC+4 again.
// Behaviour and the default MAX = 7 follow the description; the 4-bit width
// matches the 4 bits checkpointed per branch.
//
// Interface: `ev` marks the end of a packet (its taken branch), with
// `skip_req` (the packet is eligible to skip) and `backward`.  `update` says
// combinationally whether the history is written for this packet.  `restore`
// reloads a checkpointed value (an event in the same cycle applies on top).
module vpc_counter
  import bp_pkg::*;
#(
  parameter int MAX = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ev,
  input  logic             skip_req,
  input  logic             backward,
  output logic             update,
  output logic             forced,
  input  logic             restore,
  input  logic [BWD_W-1:0] restore_val,
  output logic [BWD_W-1:0] cnt
);

  logic [BWD_W-1:0] base;
  assign base   = restore ? restore_val : cnt;
  assign forced = skip_req && backward && (int'(base) >= MAX);
  assign update = !skip_req || forced;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          cnt <= '0;
    else if (ev && update)   cnt <= '0;
    else if (ev && backward) cnt <= base + 1'b1;
    else                 cnt <= base;

endmodule
