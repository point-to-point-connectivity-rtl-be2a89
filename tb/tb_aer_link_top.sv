// tb_aer_link_top: end-to-end test of the address-event link at its default
// size (64 x 64 sending and receiving neurons).
//
// Behavioural neuron models sit on both sides. The test runs four phases:
//  1. one spike on an idle link: the clock count from spike to delivery must
//     equal the count worked out from the structure (one clock per controller
//     step, one per arbiter level up and down, root feedback, bus request,
//     receiver pipeline stage);
//  2. a row with several spiking neurons: they must leave as one burst of
//     consecutive events with the same Y, each event of the burst faster than
//     an event that needs a new row;
//  3. random clustered activity (ensembles of neighbouring neurons firing
//     together, plus scattered background spikes) with slow receiving neurons;
//  4. drain.
// Every bus event must name a neuron with an undelivered spike, every
// receiving neuron must get the events in bus order, and at the end each
// neuron must have received exactly as many spikes as its partner sent.
// Mechanisms counted, each must happen: row bursts, row changes, greedy
// re-use of an arbiter acknowledge, column contention, controllers waiting for
// the previous bus cycle, receiver pipeline stalls, and spikes held off by a
// selected row. Row changes made while other rows wait must climb fewer than
// three arbiter levels on average (the greedy tree scans nearby rows).
module tb_aer_link_top;
  import aer_pkg::*;
  localparam int NX = NX_DEFAULT, NY = NY_DEFAULT;
  localparam int XB = addr_bits(NX), YB = addr_bits(NY);
  localparam int LX = $clog2(NX), LY = $clog2(NY);    // arbiter levels

  logic clk = 0, rst_n = 0;
  logic [NY-1:0][NX-1:0] lix, lox_n, nrn_disable, rx_req_n, rx_ack_n;
  logic [NY-1:0][NX-1:0] fire, accepted, refused, got;
  logic bus_req, bus_ack;
  logic [XB-1:0] bus_x;
  logic [YB-1:0] bus_y;
  int max_delay = 0;

  aer_link_top dut (.*);

  spiking_neurons #(.NX(NX), .NY(NY)) u_snd (
    .clk, .rst_n, .fire, .lix, .lox_n, .nrn_disable, .accepted, .refused
  );
  receiving_neurons #(.NX(NX), .NY(NY), .MAX_DELAY(4)) u_rcv (
    .clk, .rst_n, .req_n(rx_req_n), .ack_n(rx_ack_n), .got
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // scoreboard
  int sent [NY][NX];       // spikes accepted by sending neurons
  int on_bus [NY][NX];     // events seen on the bus
  int recvd [NY][NX];      // spikes delivered to receiving neurons
  int total_sent = 0, total_recv = 0, total_bus = 0;
  int bus_q_x[$], bus_q_y[$];
  longint cyc = 0;
  longint last_bus_t = -1;
  int last_y = -1;
  longint t_spike = 0, t_got = 0;
  always @(posedge clk) begin
    if (lix[37][21] && !$past(lix[37][21])) t_spike <= cyc;
    if (got[37][21] && !$past(got[37][21]))  t_got <= cyc;
  end

  // mechanism counters
  int n_burst = 0, n_rowchg = 0, n_greedy = 0, n_contention = 0;
  int n_aiwait = 0, n_stall = 0, n_refused = 0;
  int n_scan = 0, scan_levels = 0;   // row changes while other rows wait, levels climbed
  longint burst_cyc_sum = 0, rowchg_cyc_sum = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) begin
          if (accepted[y][x]) begin sent[y][x]++; total_sent++; end
          if (refused[y][x]) n_refused++;
          if (got[y][x]) begin
            int ex, ey;
            recvd[y][x]++; total_recv++;
            if (bus_q_x.size() == 0) check(0, $sformatf("delivery to (%0d,%0d) with no bus event", y, x));
            else begin
              ex = bus_q_x.pop_front(); ey = bus_q_y.pop_front();
              check(ex == x && ey == y, $sformatf("delivered to (%0d,%0d), bus order says (%0d,%0d)", y, x, ey, ex));
            end
          end
        end
      if ($rose(bus_req)) begin
        total_bus++;
        check(sent[bus_y][bus_x] > on_bus[bus_y][bus_x],
              $sformatf("bus event (%0d,%0d) without an undelivered spike", bus_y, bus_x));
        on_bus[bus_y][bus_x]++;
        bus_q_x.push_back(int'(bus_x)); bus_q_y.push_back(int'(bus_y));
        if (last_bus_t >= 0) begin
          if (int'(bus_y) == last_y && cyc - last_bus_t < 40) begin
            n_burst++; burst_cyc_sum += cyc - last_bus_t;
          end else if (int'(bus_y) != last_y && cyc - last_bus_t < 80) begin
            n_rowchg++; rowchg_cyc_sum += cyc - last_bus_t;
          end
        end
        if (last_y >= 0 && int'(bus_y) != last_y && $countones(dut.u_tx.row_ro) > 1) begin
          int d;
          d = int'(bus_y) ^ last_y;
          n_scan++;
          while (d != 0) begin scan_levels++; d = d >> 1; end
        end
        last_bus_t = cyc; last_y = int'(bus_y);
      end
      // greedy re-use of a held acknowledge in any arbiter cell near the root
      if (($rose(dut.u_tx.u_col_arb.g_split.arbc.l1o) || $rose(dut.u_tx.u_col_arb.g_split.arbc.l2o)) && $past(dut.u_tx.u_col_arb.g_split.arbc.ro, 2))
        n_greedy++;
      if (($rose(dut.u_tx.u_row_arb.g_split.arbc.l1o) || $rose(dut.u_tx.u_row_arb.g_split.arbc.l2o)) && $past(dut.u_tx.u_row_arb.g_split.arbc.ro, 2))
        n_greedy++;
      if ($countones(dut.u_tx.col_ro) > 1) n_contention++;
      if (|(dut.u_tx.col_ro & dut.u_tx.col_ri & ~dut.u_tx.col_s) && bus_ack) n_aiwait++;
      if (dut.u_rx.u_buf.li && !dut.u_rx.u_buf.lo && dut.u_rx.u_buf.ri) n_stall++;
    end
  end

  task automatic idle_wait();
    int quiet, waited;
    quiet = 0; waited = 0;
    while (quiet < 50 && waited < 100000) begin
      @(posedge clk);
      waited++;
      if (lix == '0 && !bus_req && !bus_ack && total_recv == total_bus && total_bus == total_sent) quiet++;
      else quiet = 0;
    end
    check(quiet == 50, "link did not drain within 100000 clocks");
  endtask

  initial begin
    longint t0, lat, exp_lat;
    int bursts_before;
    fire = '0;
    for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) begin
      sent[y][x] = 0; on_bus[y][x] = 0; recvd[y][x] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // 1. single spike latency
    fire[37][21] <= 1'b1;
    @(posedge clk); fire <= '0;
    for (int i = 0; i < 500 && !got[37][21]; i++) @(posedge clk);
    check(got[37][21], "single spike never delivered");
    @(posedge clk);
    lat = t_got - t_spike;
    // counted from the clock edge that raises the spike: row ro+ 1, row tree
    // 2*LY, row select 1; column ro+ 1, column tree 2*LX, column select 1;
    // bus request 1; receiver stage 1; receiving neuron registers it 1
    exp_lat = 1 + 2 * LY + 1 + 1 + 2 * LX + 1 + 1 + 1 + 1;
    check(lat == exp_lat, $sformatf("single-spike latency %0d clocks, expected %0d", lat, exp_lat));
    $display("single-spike latency = %0d clocks", lat);
    idle_wait();

    // 2. a burst from one row, then a second row
    for (int x = 0; x < NX; x += 9) fire[12][x] <= 1'b1;
    for (int x = 3; x < NX; x += 13) fire[50][x] <= 1'b1;
    @(posedge clk); fire <= '0;
    bursts_before = n_burst;
    idle_wait();
    // row 12 has 8 spiking neurons, row 50 has 5: 7 + 4 same-row successors
    check(n_burst - bursts_before == ((NX + 8) / 9 - 1) + ((NX - 3 + 12) / 13 - 1),
          $sformatf("row bursts: %0d", n_burst - bursts_before));

    // 3. random clustered activity with slow receivers
    for (int t = 0; t < 6000; t++) begin
      fire <= '0;
      if ($urandom_range(0, 99) < 4) begin            // an ensemble: a 3x4 patch
        int cy, cx;
        cy = $urandom_range(0, NY - 3);
        cx = $urandom_range(0, NX - 4);
        for (int dy = 0; dy < 3; dy++)
          for (int dx = 0; dx < 4; dx++)
            if ($urandom_range(0, 2) != 0) fire[cy + dy][cx + dx] <= 1'b1;
      end
      if ($urandom_range(0, 9) == 0) fire[$urandom_range(0, NY-1)][$urandom_range(0, NX-1)] <= 1'b1;
      @(posedge clk);
    end
    fire <= '0;
    idle_wait();

    // 4. final comparison
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++)
        if (sent[y][x] != recvd[y][x] || on_bus[y][x] != sent[y][x])
          check(0, $sformatf("neuron (%0d,%0d): sent %0d, on bus %0d, received %0d", y, x, sent[y][x], on_bus[y][x], recvd[y][x]));
    check(total_sent == total_recv, $sformatf("sent %0d received %0d", total_sent, total_recv));
    check(bus_q_x.size() == 0, "bus events left undelivered");
    check(n_burst > 0, "no row burst");
    check(n_rowchg > 0, "no row change");
    check(n_greedy > 0, "no greedy acknowledge re-use");
    check(n_contention > 0, "no column contention");
    check(n_aiwait > 0, "controllers never waited for the previous bus cycle");
    check(n_stall > 0, "receiver pipeline never stalled");
    check(n_refused > 0, "no spike held off by a selected row");
    // greedy scanning: a row change while other rows wait should climb about
    // two arbiter levels on average, against about five for a random pick
    check(n_scan > 0, "no row change under contention");
    if (n_scan > 0)
      check(100 * scan_levels / n_scan < 300, $sformatf("row changes climb %0d/100 levels on average", 100 * scan_levels / n_scan));
    if (n_burst > 0 && n_rowchg > 0)
      check(burst_cyc_sum / n_burst < rowchg_cyc_sum / n_rowchg,
            $sformatf("burst cycle %0d not shorter than row-change cycle %0d",
                      burst_cyc_sum / n_burst, rowchg_cyc_sum / n_rowchg));
    $display("spikes=%0d bursts=%0d (mean %0d clk) row_changes=%0d (mean %0d clk) greedy=%0d contention=%0d ai_wait=%0d stalls=%0d refused=%0d",
             total_sent, n_burst, n_burst ? burst_cyc_sum / n_burst : 0, n_rowchg,
             n_rowchg ? rowchg_cyc_sum / n_rowchg : 0, n_greedy, n_contention, n_aiwait, n_stall, n_refused);
    $display("row changes under contention=%0d, mean arbiter levels climbed x100=%0d", n_scan, n_scan ? 100 * scan_levels / n_scan : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (sent %0d, bus %0d, received %0d)", total_sent, total_bus, total_recv);
    $display("row changes under contention=%0d, mean arbiter levels climbed x100=%0d", n_scan, n_scan ? 100 * scan_levels / n_scan : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
