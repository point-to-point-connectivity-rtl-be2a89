// tx_neuron_if: interface between one sending neuron and the row and column
// request-select lines of the transmitter array.
//
// The neuron raises lix when it spikes and holds it until this interface pulls
// its reset lox_n low. While lix is high the interface pulls the row request
// line low (row_pull, one input of the row-wide wired-NOR). When its row is
// selected (s) it also pulls its column request line low (col_pull, one input
// of the column-wide wired-NOR). The neuron is reset only when its row and its
// column (cix) are both selected; the document strengthens this guard on
// purpose. Releasing lix releases both lines. The row select is also handed to
// the neuron as nrn_disable, which stops a neuron in the selected row from
// starting a new spike, so only neurons that were active when the row was
// selected are served.
// The pull-downs and the reset guard are the document's five-transistor
// circuit; pulls are modelled as active-high "pull" bits that the array ORs.
// Purely combinational.
module tx_neuron_if (
  input  logic lix,          // spike from the neuron, held until reset
  output logic lox_n,        // reset to the neuron, active low
  output logic nrn_disable,  // row selected: the neuron must not start a spike
  input  logic s,            // row select
  input  logic cix,          // column select
  output logic row_pull,     // pulls the row request line (~p) low
  output logic col_pull      // pulls the column request line (~cox) low
);
  assign row_pull    = lix;
  assign col_pull    = lix && s;
  assign lox_n       = !(s && cix);
  assign nrn_disable = s;
endmodule
