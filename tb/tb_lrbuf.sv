// tb_lrbuf: self-checking test of the data-buffer pipeline stage.
//
// A sender on the L port and a receiver on the R port both follow the
// four-phase protocol with random delays. The test checks that every word
// comes out once and in order, that the stage acknowledges its sender one
// clock after li when the output side is free, that it acknowledges before the
// receiver has acknowledged (pipelining), and that it stalls while ri is high.
module tb_lrbuf;
  localparam int W = 4;
  localparam int NWORDS = 200;
  logic clk = 0, rst_n = 0;
  logic li, lo, ro, ri;
  logic [W-1:0] ld, rd;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, stalls = 0, early_acks = 0;
  logic [W-1:0] q[$];

  lrbuf #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // sender
  initial begin
    li = 0; ld = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NWORDS; i++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      ld <= W'($urandom);
      li <= 1;
      @(posedge clk);
      q.push_back(ld);
      while (!lo) @(posedge clk);
      li <= 0;
      ld <= W'($urandom);        // data may change once acknowledged
      while (lo) @(posedge clk);
      sent++;
    end
  end

  // receiver with random acknowledge delay
  initial begin
    ri = 0;
    forever begin
      @(posedge clk);
      if (ro && !ri) begin
        logic [W-1:0] exp;
        repeat ($urandom_range(0, 6)) @(posedge clk);
        exp = (q.size() > 0) ? q.pop_front() : '0;
        check(rd == exp, $sformatf("word %0d: got %h expected %h", got, rd, exp));
        got++;
        ri <= 1;
        @(posedge clk);
        while (ro) @(posedge clk);
        repeat ($urandom_range(0, 2)) @(posedge clk);
        ri <= 0;
      end
    end
  end

  // timing and mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (li && !lo && ri) stalls++;
    if (lo && ro && !ri) early_acks++;
    if ($past(li) && !$past(lo) && !$past(ri) && $past(rst_n) && !$past(li, 2))
      check(lo, "lo must rise one clock after li when the output is free");
  end

  initial begin
    wait (sent == NWORDS);
    repeat (20) @(posedge clk);
    check(got == NWORDS, $sformatf("received %0d of %0d words", got, NWORDS));
    check(stalls > 0, "stall never happened");
    check(early_acks > 0, "acknowledge never ran ahead of the receiver");
    $display("stalls=%0d early_acks=%0d", stalls, early_acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
