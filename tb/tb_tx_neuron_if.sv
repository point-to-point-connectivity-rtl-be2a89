// tb_tx_neuron_if: exhaustive test of the sending-neuron interface.
//
// All eight combinations of spike, row select and column select are applied
// and the row pull, column pull, neuron reset and disable outputs compared with
// the intended rules: the row line is pulled while spiking, the column line
// only while spiking in a selected row, and the reset only when both the row
// and the column are selected.
module tb_tx_neuron_if;
  logic lix, lox_n, nrn_disable, s, cix, row_pull, col_pull;
  int checks = 0, failures = 0;

  tx_neuron_if dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {lix, s, cix} = 3'(v);
      #1;
      check(row_pull == lix, $sformatf("row_pull for %03b", v));
      check(col_pull == (lix & s), $sformatf("col_pull for %03b", v));
      check(lox_n == !(s & cix), $sformatf("lox_n for %03b", v));
      check(nrn_disable == s, $sformatf("nrn_disable for %03b", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
