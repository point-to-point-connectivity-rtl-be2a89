// lrbuf: data-buffer pipeline stage with a passive input port L and a
// lazy-active output port R, both four-phase bundled-data channels.
//
// How it works: one C-element whose inputs are the input request li and the
// inverted output acknowledge ri drives both the input acknowledge lo and the
// output request ro, and its inverse is the latch strobe t:
//     li & ~ri -> lo+, ro+, t-      (latch the data, acknowledge, pass it on)
//     ~li & ri -> lo-, ro-, t+      (latch transparent again, both halves reset)
// So the stage acknowledges its sender without waiting for the next stage to
// finish, which is what lets the sender start its next cycle early. The stage
// waits for ~ri (the next stage has taken the previous item) before a new ro+;
// that wait is the stall.
//
// The production rules, the single C-element and the latch with strobe follow
// the document. This model is clocked: the C-element is a flip-flop and the
// latch is a register that follows the input data while t is high (ro low) and
// holds it while t is low, so data present when li is seen is what goes out.
// Timing: lo/ro rise one clock after li & ~ri; fall one clock after ~li & ri.
module lrbuf #(
  parameter int unsigned W = 4   // data width; the document's example buffers a nibble
) (
  input  logic         clk,
  input  logic         rst_n,
  // L port (passive)
  input  logic         li,
  output logic         lo,
  input  logic [W-1:0] ld,
  // R port (lazy-active)
  output logic         ro,
  input  logic         ri,
  output logic [W-1:0] rd
);
  logic c;      // C-element output
  logic t;      // latch strobe: high = transparent

  c_element #(.RESET_VAL(1'b0)) u_c (
    .clk(clk), .rst_n(rst_n), .a(li), .b(!ri), .y(c)
  );

  assign lo = c;
  assign ro = c;
  assign t  = !c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rd <= '0;
    else if (t)  rd <= ld;
  end

  // Four-phase rules on the output port: a request is only withdrawn after it
  // was acknowledged, and only raised after the previous acknowledge cleared.
  a_r_fall: assert property (@(posedge clk) disable iff (!rst_n) $fell(ro) |-> $past(ri))
    else $error("lrbuf: ro withdrawn before ri");
  a_r_rise: assert property (@(posedge clk) disable iff (!rst_n) $rose(ro) |-> !$past(ri))
    else $error("lrbuf: ro raised while ri still high");
  // Data on R is stable while the request is outstanding.
  a_r_data: assert property (@(posedge clk) disable iff (!rst_n) (ro && $past(ro)) |-> rd == $past(rd))
    else $error("lrbuf: data changed while ro high");
endmodule
