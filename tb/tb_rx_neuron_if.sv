// tb_rx_neuron_if: randomized test of the receiver neuron-interface array.
//
// On a 5-row by 6-column array, random row and column selects and random
// neuron acknowledges are applied. Each neuron's request must be low exactly
// when its row and column are both selected, each row acknowledge must be high
// when any neuron of the row acknowledges, and the global acknowledge must be
// high when any row acknowledges.
module tb_rx_neuron_if;
  localparam int NX = 6, NY = 5;
  logic [NX-1:0] axi;
  logic [NY-1:0] byi, ryi;
  logic [NY-1:0][NX-1:0] nrn_req_n, nrn_ack_n;
  logic ack;
  int checks = 0, failures = 0;

  rx_neuron_if #(.NX(NX), .NY(NY)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      bit any;
      axi = NX'($urandom); byi = NY'($urandom);
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++)
          nrn_ack_n[y][x] = ($urandom_range(0, 15) != 0);   // mostly idle
      if (t % 3 == 0) nrn_ack_n = '1;
      #1;
      any = 0;
      for (int y = 0; y < NY; y++) begin
        bit row_any;
        row_any = 0;
        for (int x = 0; x < NX; x++) begin
          check(nrn_req_n[y][x] == !(axi[x] && byi[y]), $sformatf("request of neuron (%0d,%0d)", y, x));
          if (!nrn_ack_n[y][x]) row_any = 1;
        end
        check(ryi[y] == row_any, $sformatf("row acknowledge %0d", y));
        any |= row_any;
      end
      check(ack == any, "global acknowledge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
