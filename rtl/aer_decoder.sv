// aer_decoder: n-bit binary to 1-in-M address decoder with an enable (request).
//
// Output m is an (n+1)-input NAND of the n address bits, each taken true or
// complemented according to the bits of m, and of the active-high request, so
// it goes low only for the addressed line while the request is high. M may be
// smaller than 2^n; addresses of M and above select nothing.
// Outputs are active low as in the document's circuit. Combinational.
module aer_decoder #(
  parameter int unsigned M = 64,
  parameter int unsigned B = (M < 2) ? 1 : $clog2(M)
) (
  input  logic [B-1:0] a,     // binary address
  input  logic         req,   // active-high request, the (n+1)th input
  output logic [M-1:0] d_n    // one-cold select lines
);
  always_comb
    for (int unsigned m = 0; m < M; m++)
      d_n[m] = !(req && (a == B'(m)));
endmodule
