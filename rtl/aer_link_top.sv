// aer_link_top: a point-to-point address-event link between a sending and a
// receiving neuron array, the two chips of the design side by side.
//
// A spike from sending neuron (y, x) is picked by the transmitter's row and
// column arbiters, sent as the address pair (x, y) over a bit-parallel
// four-phase bus, and delivered by the receiver as a request to receiving
// neuron (y, x): virtual point-to-point wiring between the two arrays, one
// address-event per bus cycle. The bus is brought out for observation.
//
// Ports: lix/lox_n/nrn_disable are the sending neurons' spike, reset and
// disable lines (see aer_tx); rx_req_n/rx_ack_n are the receiving neurons'
// request and acknowledge (see aer_rx). Both chips run on one clock here.
module aer_link_top
  import aer_pkg::*;
#(
  parameter int unsigned NX = NX_DEFAULT,
  parameter int unsigned NY = NY_DEFAULT,
  parameter int unsigned XB = addr_bits(NX),
  parameter int unsigned YB = addr_bits(NY),
  parameter bit PARALLEL_READOUT = 1'b0   // transmitter readout: 0 local, 1 row latch
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // sending neurons
  input  logic [NY-1:0][NX-1:0] lix,
  output logic [NY-1:0][NX-1:0] lox_n,
  output logic [NY-1:0][NX-1:0] nrn_disable,
  // receiving neurons
  output logic [NY-1:0][NX-1:0] rx_req_n,
  input  logic [NY-1:0][NX-1:0] rx_ack_n,
  // bus, for observation
  output logic                  bus_req,
  output logic                  bus_ack,
  output logic [XB-1:0]         bus_x,
  output logic [YB-1:0]         bus_y
);
  aer_tx #(.NX(NX), .NY(NY), .XB(XB), .YB(YB), .PARALLEL_READOUT(PARALLEL_READOUT)) u_tx (
    .clk(clk), .rst_n(rst_n),
    .lix(lix), .lox_n(lox_n), .nrn_disable(nrn_disable),
    .req(bus_req), .ack(bus_ack), .x(bus_x), .y(bus_y)
  );

  aer_rx #(.NX(NX), .NY(NY), .XB(XB), .YB(YB)) u_rx (
    .clk(clk), .rst_n(rst_n),
    .req(bus_req), .ack(bus_ack), .x(bus_x), .y(bus_y),
    .nrn_req_n(rx_req_n), .nrn_ack_n(rx_ack_n)
  );

  // Bus rules: the address holds while a request waits for its acknowledge.
  a_bus_data: assert property (@(posedge clk) disable iff (!rst_n)
      (bus_req && !bus_ack && $past(bus_req)) |-> (bus_x == $past(bus_x) && bus_y == $past(bus_y)))
    else $error("aer_link_top: address changed during a request");
  a_bus_ack: assert property (@(posedge clk) disable iff (!rst_n) $rose(bus_ack) |-> $past(bus_req))
    else $error("aer_link_top: acknowledge without a request");
endmodule
