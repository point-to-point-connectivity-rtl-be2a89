// arb2: greedy two-input arbiter cell, the building block of the arbiter tree.
//
// Ports: two passive daughter ports L1 (l1i request in, l1o acknowledge out)
// and L2, and one active port R (ro request out, ri acknowledge in) towards
// the parent cell. All four-phase, active high.
//
// How it works:
//  - A daughter request is relayed up (ro+) at once, without waiting for the
//    local decision, but only once the parent has cleared its previous
//    acknowledge (~ri).
//  - A mutual-exclusion element (g1/g2, the cross-coupled flip-flop) picks one
//    daughter; the acknowledge ri is steered to the picked daughter, and only
//    while ro is high.
//  - The daughter's acknowledge is withdrawn when its grant clears (after its
//    request fell), not when ri falls.
//  - ro falls only when both daughter requests are low. So while the parent's
//    acknowledge is still held, the other daughter is served with the same
//    acknowledge: the cell is greedy and the tree scans neighbours before
//    going up a level.
// All of that is the document's behaviour. This model's own choices: it is
// clocked (every state-holding node is a flip-flop updated on clk), and when
// both requests are seen on the same clock the flip-flop, whose choice in
// silicon is decided by metastability resolution, grants the daughter that was
// not granted last.
module arb2 (
  input  logic clk,
  input  logic rst_n,
  input  logic l1i,
  output logic l1o,
  input  logic l2i,
  output logic l2o,
  output logic ro,
  input  logic ri
);
  logic g1, g2;     // mutual-exclusion element outputs
  logic last2;      // last grant went to daughter 2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1 <= 1'b0; g2 <= 1'b0; last2 <= 1'b0;
      ro <= 1'b0; l1o <= 1'b0; l2o <= 1'b0;
    end else begin
      // mutual exclusion: a grant is held until its request falls
      if (g1)      g1 <= l1i;
      else if (g2) g2 <= l2i;
      else if (l1i && (!l2i || last2)) begin g1 <= 1'b1; last2 <= 1'b0; end
      else if (l2i)                    begin g2 <= 1'b1; last2 <= 1'b1; end

      // request to the parent (modified OR gate)
      if (!ro) ro <= (l1i || l2i) && !ri;
      else     ro <= l1i || l2i;

      // acknowledge router: set by grant & ri & ro, cleared by the grant alone
      if (!g1)           l1o <= 1'b0;
      else if (ri && ro) l1o <= 1'b1;
      if (!g2)           l2o <= 1'b0;
      else if (ri && ro) l2o <= 1'b1;
    end
  end

  a_mutex: assert property (@(posedge clk) disable iff (!rst_n) !(l1o && l2o))
    else $error("arb2: both daughters acknowledged");
  a_grant: assert property (@(posedge clk) disable iff (!rst_n) !(g1 && g2))
    else $error("arb2: both grants set");
endmodule
