// arb_tree: N-input arbiter built recursively from two-input arbiter cells.
//
// An N-input arbiter is an N/2-input arbiter (arbt), an (N - N/2)-input
// arbiter (arbb) and one arb2 cell (arbc) whose two daughter ports take the R
// ports of arbt and arbb. The recursion stops at N = 1, which is a pair of
// wires, so the tree has N - 1 cells and ceil(log2 N) levels. Each leaf port i
// (li[i] request, lo[i] acknowledge) is a passive four-phase port; the root's
// R port (ro, ri) is brought out. A user that only needs the arbitration ties
// ri to ro, which completes every root communication at once, as the inverter
// on top of the tree does in silicon.
//
// The recursive split and the cell names are the document's. Because the cells
// are greedy, the tree keeps serving requests inside the smallest subtree that
// still has one before it climbs a level.
// Latency: a request crosses one flip-flop per level going up and one per
// level coming down.
// Lint note: Verilator's lint, run with this module as the top, reports lo,
// t_ro and b_ro as undriven. It does not follow the recursive instances when
// it checks drivers. The warning stands because every one of these nets is
// driven by a sub-tree or by the arb2 cell. Synthesis builds N - 1 cells,
// each with its six flip-flops, and the tree testbench exercises every leaf.
module arb_tree #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] li,
  output logic [N-1:0] lo,
  output logic         ro,
  input  logic         ri
);
  localparam int unsigned NT = N / 2;
  localparam int unsigned NB = N - N / 2;

  if (N == 1) begin : g_wire
    assign ro    = li[0];
    assign lo[0] = ri;
  end else begin : g_split
    logic t_ro, t_ri, b_ro, b_ri;

    arb_tree #(.N(NT)) arbt (
      .clk(clk), .rst_n(rst_n), .li(li[NT-1:0]), .lo(lo[NT-1:0]), .ro(t_ro), .ri(t_ri)
    );
    arb_tree #(.N(NB)) arbb (
      .clk(clk), .rst_n(rst_n), .li(li[N-1:NT]), .lo(lo[N-1:NT]), .ro(b_ro), .ri(b_ri)
    );
    arb2 arbc (
      .clk(clk), .rst_n(rst_n),
      .l1i(t_ro), .l1o(t_ri), .l2i(b_ro), .l2o(b_ri), .ro(ro), .ri(ri)
    );
  end
endmodule
