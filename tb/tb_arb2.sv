// tb_arb2: self-checking test of the greedy two-input arbiter cell.
//
// Two random four-phase clients request on L1 and L2; a parent model answers
// the R port after a random delay. Checks: every request is served once, the
// two acknowledges never overlap, an acknowledge is never given without ro and
// ri, a lone request climbs and is acknowledged in the expected number of
// clocks, and the cell is greedy: when both daughters are busy, one parent
// handshake serves more than one daughter.
module tb_arb2;
  localparam int NREQ = 300;
  logic clk = 0, rst_n = 0;
  logic l1i, l1o, l2i, l2o, ro, ri;
  int s1, s2;
  logic d1, d2;
  int checks = 0, failures = 0;
  int parent_cycles = 0, greedy = 0, grants = 0;

  arb2 dut (.*);
  hs_client #(.NREQ(NREQ), .MAX_IDLE(4)) c1 (.clk, .rst_n, .req(l1i), .ack(l1o), .served(s1), .done(d1));
  hs_client #(.NREQ(NREQ), .MAX_IDLE(4)) c2 (.clk, .rst_n, .req(l2i), .ack(l2o), .served(s2), .done(d2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // parent: four-phase passive, random delay
  initial begin
    ri = 0;
    forever begin
      @(posedge clk);
      if (ro && !ri) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        ri <= 1; parent_cycles++;
        @(posedge clk);
        while (ro) @(posedge clk);
        repeat ($urandom_range(0, 2)) @(posedge clk);
        ri <= 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    check(!(l1o && l2o), "both daughters acknowledged");
    if ($rose(l1o) || $rose(l2o)) begin
      grants++;
      check($past(ri) && $past(ro), "acknowledge without ro and ri");
      if ($past(ri, 2) && $past(ro, 2)) greedy++;   // parent ack was already held
    end
  end

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2);
    repeat (20) @(posedge clk);
    check(s1 == NREQ && s2 == NREQ, $sformatf("served %0d/%0d", s1, s2));
    check(grants == 2 * NREQ, $sformatf("grants %0d", grants));
    check(greedy > 0, "greedy service never happened");
    check(parent_cycles < grants, $sformatf("parent cycles %0d not fewer than grants %0d", parent_cycles, grants));
    $display("grants=%0d parent_cycles=%0d greedy=%0d", grants, parent_cycles, greedy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
