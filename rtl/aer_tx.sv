// aer_tx: two-dimensional address-event transmitter with local (row-wise)
// readout, for an NY-row by NX-column array of sending neurons.
//
// How it works. Each neuron that spikes (lix) pulls its row request line low.
// One rc_ctrl per row relays the row request to a greedy NY-input arbiter tree;
// the granted row is selected and its index is driven onto the row encoder
// (Y). Every spiking neuron of the selected row then pulls its column request
// line low; one rc_ctrl per column arbitrates through an NX-input tree, the
// granted column is selected and encoded (X). The neuron at the selected row
// and column is reset. The row stays selected until all neurons that were
// spiking when it was selected are sent, so a burst of events from one row
// costs only column arbitration; only then is row arbitration redone. Neurons
// of the selected row are kept from starting new spikes (nrn_disable).
//
// Bus: bit-parallel X and Y with a four-phase bundled-data request (req, out)
// and acknowledge (ack, in). req rises one clock after both encoders hold a
// valid address and ack is low, and falls one clock after the column encoder
// releases (column deselected). The acknowledge is relayed unchanged to every
// controller as its encoder acknowledge.
//
// Parallel readout (PARALLEL_READOUT = 1, the faster third-generation scheme):
// the selected row is copied into a row-wide latch (row_latch) and its neurons
// are reset together; the row controller takes the latch's load acknowledge as
// its encoder acknowledge, so the next row is arbitrated and selected while the
// latch's bits are sent as a burst on the latched row address. The default
// is local readout, the scheme described in full.
//
// The row/column organisation, the controllers, the arbiter trees with the
// root's request fed back as its acknowledge, and the encoders follow the
// document. How the row and column encoder requests are merged into the one
// bus request (set on both, cleared by the column encoder alone) is this
// design's choice, as is the clocked, single-clock modelling of the
// asynchronous circuits.
module aer_tx
  import aer_pkg::*;
#(
  parameter int unsigned NX = NX_DEFAULT,
  parameter int unsigned NY = NY_DEFAULT,
  parameter int unsigned XB = addr_bits(NX),
  parameter int unsigned YB = addr_bits(NY),
  parameter bit PARALLEL_READOUT = 1'b0   // 1: copy the selected row into a row latch
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // neuron side
  input  logic [NY-1:0][NX-1:0] lix,          // spike held by each neuron
  output logic [NY-1:0][NX-1:0] lox_n,        // reset to each neuron, active low
  output logic [NY-1:0][NX-1:0] nrn_disable,  // row selected: no new spike
  // address-event bus
  output logic                  req,
  input  logic                  ack,
  output logic [XB-1:0]         x,
  output logic [YB-1:0]         y
);
  logic [NY-1:0][NX-1:0] row_pull, col_pull;
  logic [NY-1:0] row_p_n, row_s, row_ro, row_ri, row_ao;
  logic [NX-1:0] col_p_n, col_s, col_ro, col_ri, col_ao;
  logic          row_root, col_root;
  logic          xreq, yreq;
  logic [NX-1:0] col_line;        // column request lines of the array
  logic [NX-1:0] nrn_cix;         // column-side reset enable seen by the neurons
  logic [NY-1:0] row_ai;          // encoder acknowledge seen by the row controllers
  logic [YB-1:0] y_arr;           // row encoder output
  logic          bus_yvalid;

  // neuron interfaces
  for (genvar r = 0; r < NY; r++) begin : g_row
    for (genvar c = 0; c < NX; c++) begin : g_col
      tx_neuron_if u_nif (
        .lix(lix[r][c]), .lox_n(lox_n[r][c]), .nrn_disable(nrn_disable[r][c]),
        .s(row_s[r]), .cix(nrn_cix[c]),
        .row_pull(row_pull[r][c]), .col_pull(col_pull[r][c])
      );
    end
  end

  // row- and column-wide wired-NOR request lines
  for (genvar r = 0; r < NY; r++) begin : g_rline
    assign row_p_n[r] = !(|row_pull[r]);
  end
  for (genvar c = 0; c < NX; c++) begin : g_cline
    logic [NY-1:0] pulls;
    for (genvar r = 0; r < NY; r++) begin : g_bit
      assign pulls[r] = col_pull[r][c];
    end
    assign col_line[c] = |pulls;
  end

  if (PARALLEL_READOUT) begin : g_par
    // the row latch's bit-cells, not the array, request the column controllers
    logic [NX-1:0] q;
    logic          ld_ack, rst_row;
    row_latch #(.NX(NX), .YB(YB)) u_latch (
      .clk(clk), .rst_n(rst_n), .pulls(col_line), .y_in(y_arr), .yreq(yreq),
      .col_s(col_s), .bus_busy(req || ack), .ld_ack(ld_ack), .rst_row(rst_row),
      .q(q), .y_q(y)
    );
    assign col_p_n    = ~q;
    assign nrn_cix    = {NX{rst_row}};   // the whole selected row is reset at once
    assign row_ai     = {NY{ld_ack}};
    assign bus_yvalid = 1'b1;            // y is the latched row address
  end else begin : g_loc
    assign col_p_n    = ~col_line;
    assign nrn_cix    = col_s;
    assign row_ai     = {NY{ack}};
    assign y          = y_arr;
    assign bus_yvalid = yreq;
  end

  // row and column controllers
  for (genvar r = 0; r < NY; r++) begin : g_rctl
    rc_ctrl u_ctl (
      .clk(clk), .rst_n(rst_n), .p_n(row_p_n[r]), .s(row_s[r]),
      .ro(row_ro[r]), .ri(row_ri[r]), .ao(row_ao[r]), .ai(row_ai[r])
    );
  end
  for (genvar c = 0; c < NX; c++) begin : g_cctl
    rc_ctrl u_ctl (
      .clk(clk), .rst_n(rst_n), .p_n(col_p_n[c]), .s(col_s[c]),
      .ro(col_ro[c]), .ri(col_ri[c]), .ao(col_ao[c]), .ai(ack)
    );
  end

  // arbiter trees; the root's request is its own acknowledge
  arb_tree #(.N(NY)) u_row_arb (
    .clk(clk), .rst_n(rst_n), .li(row_ro), .lo(row_ri), .ro(row_root), .ri(row_root)
  );
  arb_tree #(.N(NX)) u_col_arb (
    .clk(clk), .rst_n(rst_n), .li(col_ro), .lo(col_ri), .ro(col_root), .ri(col_root)
  );

  // address encoders
  aer_encoder #(.M(NY), .B(YB)) u_yenc (.a(row_ao), .b(y_arr), .req(yreq));
  aer_encoder #(.M(NX), .B(XB)) u_xenc (.a(col_ao), .b(x), .req(xreq));

  // bus request
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           req <= 1'b0;
    else if (!req && xreq && bus_yvalid && !ack) req <= 1'b1;
    else if (req && !xreq)                req <= 1'b0;
  end

  a_one_row: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(row_s))
    else $error("aer_tx: more than one row selected");
  a_one_col: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col_s))
    else $error("aer_tx: more than one column selected");
  a_stable: assert property (@(posedge clk) disable iff (!rst_n) (req && !ack) |-> (xreq && bus_yvalid))
    else $error("aer_tx: address withdrawn before acknowledge");
endmodule
