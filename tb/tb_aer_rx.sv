// tb_aer_rx: self-checking test of the two-dimensional receiver on a 5-row
// by 6-column array.
//
// A sender model drives random addresses within the array over the four-phase
// bus with random delays; behavioural
// receiving neurons answer with random delays. Checks: every address reaches
// exactly its own neuron, in order; the receiver acknowledges one clock after
// a request when its pipeline stage is free, before the neuron has answered;
// the stage stalls a new address while the previous neuron still acknowledges.
module tb_aer_rx;
  localparam int NX = 6, NY = 5;
  localparam int XB = 3, YB = 3;
  localparam int NEV = 400;
  logic clk = 0, rst_n = 0;
  logic req, ack;
  logic [XB-1:0] x;
  logic [YB-1:0] y;
  logic [NY-1:0][NX-1:0] nrn_req_n, nrn_ack_n, got;
  int checks = 0, failures = 0;
  int qx[$], qy[$];
  int n_got = 0, n_sent = 0, n_stall = 0, n_fast = 0;

  aer_rx #(.NX(NX), .NY(NY)) dut (.*);
  receiving_neurons #(.NX(NX), .NY(NY), .MAX_DELAY(5)) u_rcv (.clk, .rst_n, .req_n(nrn_req_n), .ack_n(nrn_ack_n), .got);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    req = 0; x = 0; y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NEV; i++) begin
      int ax, ay;
      bit free;
      repeat ($urandom_range(0, 2)) @(posedge clk);
      ax = $urandom_range(0, NX-1); ay = $urandom_range(0, NY-1);
      x <= XB'(ax); y <= YB'(ay);
      @(posedge clk);
      req <= 1;
      qx.push_back(ax); qy.push_back(ay);
      @(posedge clk);
      free = !dut.u_buf.ri;
      @(posedge clk);
      if (free) begin
        check(ack, "acknowledge must follow a request by one clock when the stage is free");
        n_fast++;
      end
      while (!ack) @(posedge clk);
      req <= 0;
      @(posedge clk);
      while (ack) @(posedge clk);
      n_sent++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_buf.li && !dut.u_buf.lo && dut.u_buf.ri) n_stall++;
    for (int r = 0; r < NY; r++)
      for (int c = 0; c < NX; c++)
        if (got[r][c]) begin
          int ex, ey;
          n_got++;
          if (qx.size() == 0) check(0, "delivery without an address");
          else begin
            ex = qx.pop_front(); ey = qy.pop_front();
            check(ex == c && ey == r, $sformatf("delivered to (%0d,%0d), expected (%0d,%0d)", r, c, ey, ex));
          end
        end
    check($countones(~nrn_req_n) <= 1, "two neurons selected");
  end

  initial begin
    wait (n_sent == NEV);
    repeat (30) @(posedge clk);
    check(n_got == NEV, $sformatf("delivered %0d of %0d", n_got, NEV));
    check(n_stall > 0, "pipeline stage never stalled");
    check(n_fast > 0, "no acknowledge on a free stage");
    $display("delivered=%0d stalls=%0d fast_acks=%0d", n_got, n_stall, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
