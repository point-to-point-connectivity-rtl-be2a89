// tb_aer_tx: self-checking test of the two-dimensional transmitter on a
// 5-row by 7-column array (sizes that are not powers of two, so the arbiter
// trees have uneven halves).
//
// Random spikes are fired by a behavioural neuron model; the bus is answered
// by a receiver model with random delays. Checks: every bus event names a
// neuron with an unsent spike; every spike is sent exactly once; the address
// holds until acknowledged; when a row is deselected none of its neurons is
// still spiking (local readout serves the whole row first); a burst from one
// row takes fewer clocks per event than an event that needs a new row.
module tb_aer_tx;
  localparam int NX = 7, NY = 5;
  localparam int XB = 3, YB = 3;
  logic clk = 0, rst_n = 0;
  logic [NY-1:0][NX-1:0] lix, lox_n, nrn_disable, fire, accepted, refused;
  logic req, ack;
  logic [XB-1:0] x;
  logic [YB-1:0] y;
  int checks = 0, failures = 0;
  int sent [NY][NX];
  int pend [NY][NX];
  int total_acc = 0, total_sent = 0, n_burst = 0, n_rowchg = 0;
  longint cyc = 0, last_t = -1, burst_sum = 0, rowchg_sum = 0;
  int last_y = -1;

  aer_tx #(.NX(NX), .NY(NY)) dut (.*);
  spiking_neurons #(.NX(NX), .NY(NY)) u_snd (.clk, .rst_n, .fire, .lix, .lox_n, .nrn_disable, .accepted, .refused);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // bus receiver: four-phase passive with random delays
  initial begin
    ack = 0;
    forever begin
      @(posedge clk);
      if (req && !ack) begin
        repeat ($urandom_range(0, 4)) begin
          @(posedge clk);
          check(req, "request withdrawn before acknowledge");
        end
        ack <= 1;
        @(posedge clk);
        while (req) @(posedge clk);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        ack <= 0;
      end
    end
  end

  logic [NY-1:0] row_dis_q = '0;     // row disables one clock ago
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int r = 0; r < NY; r++) begin
        for (int c = 0; c < NX; c++)
          if (accepted[r][c]) begin pend[r][c]++; total_acc++; end
        if (row_dis_q[r] && !nrn_disable[r][0])
          check(lix[r] == '0, $sformatf("row %0d deselected with spikes left: %b", r, lix[r]));
      end
      if (req && $past(req) && !$past(ack))
        check(x == $past(x) && y == $past(y), "address changed before acknowledge");
      if ($rose(req)) begin
        check(int'(y) < NY && int'(x) < NX && pend[y][x] > 0, $sformatf("event (%0d,%0d) without a spike", y, x));
        if (int'(y) < NY && int'(x) < NX) begin pend[y][x]--; sent[y][x]++; end
        total_sent++;
        if (last_t >= 0 && cyc - last_t < 30) begin
          if (int'(y) == last_y) begin n_burst++; burst_sum += cyc - last_t; end
          else begin n_rowchg++; rowchg_sum += cyc - last_t; end
        end
        last_t = cyc; last_y = int'(y);
      end
    end
    for (int r = 0; r < NY; r++) row_dis_q[r] <= nrn_disable[r][0];
  end

  initial begin
    fire = '0;
    foreach (pend[r, c]) begin pend[r][c] = 0; sent[r][c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      fire <= '0;
      if ($urandom_range(0, 9) < 2)
        for (int k = 0; k < 4; k++) fire[$urandom_range(0, NY-1)][$urandom_range(0, NX-1)] <= 1'b1;
      @(posedge clk);
    end
    fire <= '0;
    begin
      int quiet = 0;
      while (quiet < 50) begin
        @(posedge clk);
        quiet = (lix == '0 && !req && !ack) ? quiet + 1 : 0;
      end
    end
    check(total_acc > 100, $sformatf("only %0d spikes", total_acc));
    check(total_sent == total_acc, $sformatf("sent %0d of %0d spikes", total_sent, total_acc));
    foreach (pend[r, c]) check(pend[r][c] == 0, $sformatf("neuron (%0d,%0d) has %0d unsent spikes", r, c, pend[r][c]));
    check(n_burst > 0 && n_rowchg > 0, "no bursts or no row changes");
    if (n_burst > 0 && n_rowchg > 0)
      check(burst_sum / n_burst < rowchg_sum / n_rowchg, "burst events not faster than row changes");
    $display("spikes=%0d bursts=%0d (mean %0d) row_changes=%0d (mean %0d)", total_acc, n_burst,
             n_burst ? burst_sum / n_burst : 0, n_rowchg, n_rowchg ? rowchg_sum / n_rowchg : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
