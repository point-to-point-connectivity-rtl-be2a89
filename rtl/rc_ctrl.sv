// rc_ctrl: row (or column) controller of the two-dimensional transmitter.
//
// It sits between one request-select line pair of the neuron array (p_n, the
// active-low wired-NOR request line, and s, the select line), one leaf port of
// an arbiter tree (ro request out, ri acknowledge in) and the address encoder
// (ao request out, ai acknowledge in, which relays the receiver's acknowledge).
// The same controller serves a row and a column.
//
// Handshake, as the document gives it:
//   [~p_n]                 -> ro+        relay a pending request to the arbiter
//   [ri & ~ai]             -> s+, ao+    arbiter granted and the previous
//                                        encoder cycle is over: select the line
//                                        and drive its address onto the encoder
//   [p_n & ai]             -> ro-        every request on the line is served and
//                                        the current event is acknowledged
//   [~ri]                  -> s-, ao-    deselect, release the encoder
// A row controller therefore keeps its row selected until every neuron that was
// spiking when the row was selected has been sent (local readout); a column
// controller covers one neuron of the selected row per cycle.
// ao and s are one node. This model is clocked: ro and s are flip-flops that
// change one clock after their guard holds. ro+ additionally waits for ~ri and
// ~s, the end of the previous four-phase cycle, which the circuit gets for free
// from its ordering.
module rc_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic p_n,   // request line, active low
  output logic s,     // select line
  output logic ro,    // request to the arbiter
  input  logic ri,    // acknowledge from the arbiter
  output logic ao,    // request to the address encoder
  input  logic ai     // acknowledge from the encoder (the receiver's acknowledge)
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ro <= 1'b0;
      s  <= 1'b0;
    end else begin
      if (!ro && !s && !ri && !p_n)   ro <= 1'b1;
      else if (ro && s && p_n && ai)  ro <= 1'b0;

      if (!s && ro && ri && !ai)      s <= 1'b1;
      else if (s && !ro && !ri)       s <= 1'b0;
    end
  end

  assign ao = s;

  a_sel: assert property (@(posedge clk) disable iff (!rst_n) $rose(s) |-> $past(ri))
    else $error("rc_ctrl: selected without a grant");
  a_rel: assert property (@(posedge clk) disable iff (!rst_n) $fell(ro) |-> $past(ri))
    else $error("rc_ctrl: request withdrawn before the grant");
endmodule
