// aer_rx: two-dimensional address-event receiver for an NY-row by NX-column
// array of receiving neurons.
//
// How it works. A pipeline stage (lrbuf) reads the bus: it latches X and Y and
// acknowledges the sender at once, so the sender can start its next cycle while
// this address is still being decoded. The stage's output request enables a
// ceil(log2 NY)-bit row decoder and a ceil(log2 NX)-bit column decoder; the
// neuron whose row and column are both selected receives a request
// (nrn_req_n low). The neurons' acknowledges are combined by a row NAND and a
// global NOR (rx_neuron_if) and return to the pipeline stage, which withdraws
// its request once the sender has withdrawn its own. A new address waits in
// the bus until the previous neuron has released its acknowledge: the stall.
//
// Bus: req in, ack out, X and Y in (four-phase, bundled data). ack rises one
// clock after req when the stage is free. The structure follows the document;
// the clocked model and active-high decoder enables are this design's choices.
module aer_rx
  import aer_pkg::*;
#(
  parameter int unsigned NX = NX_DEFAULT,
  parameter int unsigned NY = NY_DEFAULT,
  parameter int unsigned XB = addr_bits(NX),
  parameter int unsigned YB = addr_bits(NY)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // address-event bus
  input  logic                  req,
  output logic                  ack,
  input  logic [XB-1:0]         x,
  input  logic [YB-1:0]         y,
  // neuron side
  output logic [NY-1:0][NX-1:0] nrn_req_n,
  input  logic [NY-1:0][NX-1:0] nrn_ack_n
);
  logic          dec_req, dec_ack;
  logic [XB-1:0] xq;
  logic [YB-1:0] yq;
  logic [NX-1:0] ax_n;
  logic [NY-1:0] by_n;
  logic [NY-1:0] ryi;

  lrbuf #(.W(XB + YB)) u_buf (
    .clk(clk), .rst_n(rst_n),
    .li(req), .lo(ack), .ld({y, x}),
    .ro(dec_req), .ri(dec_ack), .rd({yq, xq})
  );

  aer_decoder #(.M(NY), .B(YB)) u_ydec (.a(yq), .req(dec_req), .d_n(by_n));
  aer_decoder #(.M(NX), .B(XB)) u_xdec (.a(xq), .req(dec_req), .d_n(ax_n));

  rx_neuron_if #(.NX(NX), .NY(NY)) u_nif (
    .axi(~ax_n), .byi(~by_n), .nrn_req_n(nrn_req_n), .nrn_ack_n(nrn_ack_n),
    .ryi(ryi), .ack(dec_ack)
  );
endmodule
