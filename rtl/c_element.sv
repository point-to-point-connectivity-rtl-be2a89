// c_element: Muller C-element, the state-holding gate used by the pipeline stage.
//
// The output rises when both inputs are high, falls when both are low, and
// otherwise holds its value (the job of the staticizer in a transistor-level
// C-element). In this clocked model the output is a flip-flop that takes the
// new value one clock after the inputs agree; it resets to RESET_VAL.
module c_element #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         y <= RESET_VAL;
    else if (a && b)    y <= 1'b1;
    else if (!a && !b)  y <= 1'b0;
  end
endmodule
