// tb_arb_tree: self-checking test of the recursively built arbiter tree.
//
// Two trees are tested with the root's request tied back as its acknowledge:
// a 7-input tree (3-input plus 4-input halves, 6 cells) and one at the default
// size of 64 inputs. Random four-phase clients on every leaf. Checks: at most
// one leaf acknowledged at any time and every request served exactly once.
// A lone request on an idle tree must be acknowledged one clock per level up
// plus one per level down after the first clock that sees it (2 x 6 = 12 for
// 64 inputs); the root's acknowledge is its own request and costs nothing.
module tb_arb_tree;
  localparam int NA = 7;
  localparam int NB = 64;
  localparam int NREQ = 30;
  logic clk = 0, rst_n = 0;
  logic [NA-1:0] lia, loa;
  logic [NB-1:0] lib, lob;
  logic roa, rob;
  int sa[NA], sb[NB];
  logic [NA-1:0] da;
  logic [NB-1:0] db;
  logic solo_req, solo_ack;
  int checks = 0, failures = 0;
  int grants_a = 0, grants_b = 0;
  bit solo_phase = 1;

  arb_tree #(.N(NA)) dut_a (.clk, .rst_n, .li(lia), .lo(loa), .ro(roa), .ri(roa));
  arb_tree dut_b (.clk, .rst_n, .li(lib), .lo(lob), .ro(rob), .ri(rob));

  for (genvar i = 0; i < NA; i++) begin : g_ca
    hs_client #(.NREQ(NREQ), .MAX_IDLE(10)) c (.clk, .rst_n(rst_n && !solo_phase), .req(lia[i]), .ack(loa[i]), .served(sa[i]), .done(da[i]));
  end
  for (genvar i = 1; i < NB; i++) begin : g_cb
    hs_client #(.NREQ(NREQ), .MAX_IDLE(40)) c (.clk, .rst_n(rst_n && !solo_phase), .req(lib[i]), .ack(lob[i]), .served(sb[i]), .done(db[i]));
  end
  // leaf 0 of the big tree is driven by the test itself first, then by a client
  hs_client #(.NREQ(NREQ), .MAX_IDLE(40)) c_b0 (.clk, .rst_n(rst_n && !solo_phase), .req(solo_req), .ack(lob[0]), .served(sb[0]), .done(db[0]));
  logic solo_drive;
  assign lib[0] = solo_phase ? solo_drive : solo_req;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    check($onehot0(loa), "7-input tree: two leaves acknowledged");
    check($onehot0(lob), "64-input tree: two leaves acknowledged");
    grants_a += $countones(loa & ~$past(loa));
    grants_b += $countones(lob & ~$past(lob));
  end

  initial begin
    int t0, lat;
    solo_drive = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // lone request through 6 levels: sampled on the next clock, then 6 up, 6 down
    solo_drive <= 1;
    t0 = 0;
    @(posedge clk);
    while (!lob[0]) begin @(posedge clk); t0++; end
    lat = t0;
    check(lat == 2 * 6, $sformatf("lone-request latency %0d clocks, expected 12", lat));
    solo_drive <= 0;
    @(posedge clk);
    while (lob[0]) @(posedge clk);
    repeat (20) @(posedge clk);
    grants_b = 0;
    solo_phase = 0;
    wait (&da && &db);
    repeat (40) @(posedge clk);
    foreach (sa[i]) check(sa[i] == NREQ, $sformatf("7-input leaf %0d served %0d", i, sa[i]));
    foreach (sb[i]) check(sb[i] == NREQ, $sformatf("64-input leaf %0d served %0d", i, sb[i]));
    check(grants_a == NA * NREQ, $sformatf("7-input grants %0d", grants_a));
    check(grants_b == NB * NREQ, $sformatf("64-input grants %0d", grants_b));
    $display("grants_a=%0d grants_b=%0d", grants_a, grants_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
