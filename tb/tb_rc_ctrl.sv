// tb_rc_ctrl: self-checking test of the row/column controller.
//
// The test plays the request line, the arbiter and the encoder acknowledge,
// and checks each step of the handshake and its clock count:
// ro+ one clock after ~p_n; s/ao+ one clock after ri (only once ai is low);
// ro- only after p_n is high and ai is high; s/ao- one clock after ~ri.
module tb_rc_ctrl;
  logic clk = 0, rst_n = 0;
  logic p_n, s, ro, ri, ao, ai;
  int checks = 0, failures = 0;

  rc_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    p_n = 1; ri = 0; ai = 0;
    step(2); rst_n = 1; step(2);
    for (int k = 0; k < 20; k++) begin
      bit hold_ai;
      hold_ai = (k % 2) == 1;           // previous encoder cycle still running
      check(!ro && !s && !ao, "idle");
      p_n = 0;                           // a neuron requests
      if (hold_ai) ai = 1;
      step(1);
      check(ro, "ro must rise one clock after the request");
      step(3);
      check(!s, "no select before the arbiter grants");
      ri = 1;
      step(1);
      if (hold_ai) begin
        check(!s, "select must wait for the previous acknowledge to clear");
        step(3);
        check(!s, "select must wait for the previous acknowledge to clear");
        ai = 0; step(1);
      end
      check(s && ao, "select and encoder request one clock after the grant");
      step(2);
      ai = 1;                            // receiver acknowledges the event
      step(2);
      check(ro, "request held while neurons of the line still request");
      p_n = 1;                           // all served
      step(1);
      check(!ro, "ro must fall once the line is clear and acknowledged");
      check(s, "select held until the arbiter releases");
      ri = 0;
      step(1);
      check(!s && !ao, "deselect one clock after the arbiter releases");
      ai = 0;
      // a clear line with ai low must not withdraw early
      step(2);
    end
    // a line that clears before the acknowledge arrives waits for it
    p_n = 0; step(1); ri = 1; step(2); p_n = 1; step(3);
    check(ro, "ro must wait for the encoder acknowledge");
    ai = 1; step(1); check(!ro, "ro falls once acknowledged");
    ri = 0; step(1); ai = 0; step(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
