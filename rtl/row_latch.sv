// row_latch: row-wide latch for parallel readout of the transmitter array.
//
// In parallel readout the spikes of the selected row are not sent one by one
// from the array. Instead the whole row is copied at once into a latch at the
// edge of the array, the row's neurons are reset together, and the row is
// released so that the next row can be arbitrated and selected. The latch's
// bit-cells then act as slave neurons: each set bit requests its column
// controller, and is cleared when its column is selected, while the array is
// already busy with the next row. The row address is latched with the spikes,
// so the bus carries the latched Y while the array moves on.
//
// How it works (one clock per step):
//   load: a row is selected (yreq), the latch is empty, no column is selected
//         and no bus cycle is open -> q <= the row's column pulls,
//         y_q <= y_in, ld_ack <= 1
//   ld_ack high: the selected row's neurons are reset (rst_row) and the row
//         controller, whose encoder acknowledge is ld_ack, may release the row
//   ld_ack falls once the row is deselected (yreq low)
//   q[c] clears when column c is selected (col_s[c])
// The row-wide latch, parallel read, slave-neuron behaviour and overlap with
// the next row follow the document's description; the load conditions, the
// latched Y and the ld_ack handshake are this design's own, as the document
// leaves those details to another publication.
module row_latch #(
  parameter int unsigned NX = 64,
  parameter int unsigned YB = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NX-1:0] pulls,    // column pulls of the selected row
  input  logic [YB-1:0] y_in,     // row encoder address
  input  logic          yreq,     // row encoder request (a row is selected)
  input  logic [NX-1:0] col_s,    // column selects
  input  logic          bus_busy, // a bus cycle is still open
  output logic          ld_ack,   // acknowledge to the row controllers
  output logic          rst_row,  // reset the selected row's neurons
  output logic [NX-1:0] q,        // latched spikes (slave-neuron requests)
  output logic [YB-1:0] y_q       // latched row address
);
  logic empty;
  assign empty = (q == '0) && (col_s == '0) && !bus_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; y_q <= '0; ld_ack <= 1'b0;
    end else begin
      if (!ld_ack && yreq && empty) begin
        q      <= pulls;
        y_q    <= y_in;
        ld_ack <= 1'b1;
      end else begin
        q <= q & ~col_s;
        if (ld_ack && !yreq) ld_ack <= 1'b0;
      end
    end
  end

  assign rst_row = ld_ack;
endmodule
