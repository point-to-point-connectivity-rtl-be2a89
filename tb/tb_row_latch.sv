// tb_row_latch: directed and random test of the parallel-readout row latch.
//
// Checks: a selected row is loaded one clock after it appears when the latch
// is empty, with its address; the load is acknowledged and the row reset
// asserted until the row is deselected; a latched bit clears when its column
// is selected; no new row is loaded while bits remain, a column is selected
// or a bus cycle is open; a random run delivers every loaded bit exactly once.
module tb_row_latch;
  localparam int NX = 8, YB = 3;
  logic clk = 0, rst_n = 0;
  logic [NX-1:0] pulls, col_s, q;
  logic [YB-1:0] y_in, y_q;
  logic yreq, bus_busy, ld_ack, rst_row;
  int checks = 0, failures = 0;

  row_latch #(.NX(NX), .YB(YB)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask
  task automatic step(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    int loaded, cleared;
    pulls = 0; col_s = 0; y_in = 0; yreq = 0; bus_busy = 0;
    step(2); rst_n = 1; step(1);
    // load a row
    pulls = 8'b1010_0110; y_in = 3'd5; yreq = 1;
    step(1);
    check(ld_ack && rst_row && q == 8'b1010_0110 && y_q == 3'd5, "row loaded one clock after selection");
    pulls = 0; step(2);
    check(ld_ack, "load acknowledge held while the row is selected");
    yreq = 0; step(1);
    check(!ld_ack && !rst_row, "acknowledge falls after deselection");
    // a new row may not load while bits remain
    pulls = 8'b0000_0001; y_in = 3'd2; yreq = 1; step(2);
    check(!ld_ack && q == 8'b1010_0110 && y_q == 3'd5, "no load while the latch holds spikes");
    // serve the bits one column at a time; the last one leaves a bus cycle open
    bus_busy = 1;
    for (int c = 0; c < NX; c++) if (q[c]) begin
      col_s = NX'(1) << c; step(1);
      check(!q[c], $sformatf("bit %0d clears when its column is selected", c));
      col_s = 0; step(1);
    end
    step(2);
    check(!ld_ack && q == 0, "no load while a bus cycle is open");
    bus_busy = 0; step(1);
    check(ld_ack && q == 8'b0000_0001 && y_q == 3'd2, "next row loaded once empty");
    yreq = 0; pulls = 0; step(2);
    col_s = 1; step(1); col_s = 0; step(1);
    // random: every loaded bit is cleared exactly once
    loaded = 0; cleared = 0;
    for (int t = 0; t < 2000; t++) begin
      logic was_ack;
      logic [NX-1:0] sel;
      was_ack = ld_ack;
      yreq = ($urandom_range(0, 3) == 0);
      pulls = yreq ? NX'($urandom) : '0;
      sel = (q != 0 && $urandom_range(0, 1)) ? (q & -q) : '0;
      col_s = sel;
      cleared += $countones(q & sel);
      step(1);
      if (ld_ack && !was_ack) loaded += $countones(q);
      col_s = 0;
      if (ld_ack) begin yreq = 0; pulls = 0; step(1); end
    end
    col_s = 0; yreq = 0;
    while (q != 0) begin col_s = q & -q; step(1); cleared++; col_s = 0; step(1); end
    check(loaded > 50, $sformatf("only %0d bits loaded", loaded));
    check(loaded == cleared, $sformatf("loaded %0d bits, cleared %0d", loaded, cleared));
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
