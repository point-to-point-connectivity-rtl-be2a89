// aer_encoder: 1-in-M one-hot to n-bit binary address encoder, n = ceil(log2 M).
//
// Input line m (active high, one at a time) drives the binary value m onto the
// address outputs; an extra output, always set by any active input, is the
// active-high request that says the address is valid. With no input active the
// address lines read zero. In silicon each of the M x (n+1) cells is a single
// pull-up or pull-down transistor; here the outputs are the OR of the selected
// input rows of that table. Combinational; the acknowledge is not encoded and
// passes around this block.
module aer_encoder #(
  parameter int unsigned M = 64,
  parameter int unsigned B = (M < 2) ? 1 : $clog2(M)
) (
  input  logic [M-1:0] a,     // one-hot inputs
  output logic [B-1:0] b,     // binary address
  output logic         req    // some input active
);
  always_comb begin
    b = '0;
    for (int unsigned m = 0; m < M; m++)
      if (a[m]) b = b | B'(m);
  end
  assign req = |a;
endmodule
