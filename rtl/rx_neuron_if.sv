// rx_neuron_if: receiver-side interface of an NY x NX neuron array.
//
// For every neuron the active-high column select axi[x] and row select byi[y]
// are NANDed into an active-low request to the neuron (nrn_req_n). The neuron
// answers with an active-low acknowledge (nrn_ack_n); it may tie it straight to
// its request to make a minimum-width pulse. The acknowledges of a row are
// NANDed into an active-high row acknowledge ryi[y], and the row acknowledges
// are NORed into one active-low acknowledge for the decoders, brought out here
// inverted as ack (active high).
// The gate structure is the document's; a NAND (not a C-element) combines the
// selects, so a request is withdrawn as soon as either select falls.
// Combinational.
module rx_neuron_if #(
  parameter int unsigned NX = 64,
  parameter int unsigned NY = 64
) (
  input  logic [NX-1:0]         axi,        // column selects
  input  logic [NY-1:0]         byi,        // row selects
  output logic [NY-1:0][NX-1:0] nrn_req_n,  // request to each neuron, active low
  input  logic [NY-1:0][NX-1:0] nrn_ack_n,  // acknowledge from each neuron, active low
  output logic [NY-1:0]         ryi,        // row acknowledges
  output logic                  ack         // acknowledge to the decoders
);
  for (genvar y = 0; y < NY; y++) begin : g_row
    for (genvar x = 0; x < NX; x++) begin : g_col
      assign nrn_req_n[y][x] = !(axi[x] && byi[y]);
    end
    assign ryi[y] = !(&nrn_ack_n[y]);
  end
  assign ack = |ryi;
endmodule
