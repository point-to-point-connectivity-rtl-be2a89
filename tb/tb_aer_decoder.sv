// tb_aer_decoder: exhaustive test of the binary to one-hot decoder.
//
// For the default 64 lines and a 6-line decoder on 3 bits (fewer lines than
// codes), every address with the request high must pull exactly its own line
// low (none for codes without a line), and nothing may be selected while the
// request is low.
module tb_aer_decoder;
  logic [5:0] a64; logic q64; logic [63:0] d64;
  logic [2:0] a6;  logic q6;  logic [5:0]  d6;
  int checks = 0, failures = 0;

  aer_decoder u64 (.a(a64), .req(q64), .d_n(d64));
  aer_decoder #(.M(6), .B(3)) u6 (.a(a6), .req(q6), .d_n(d6));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int v = 0; v < 64; v++) begin
      a64 = 6'(v); q64 = 0; #1;
      check(&d64, $sformatf("line selected without request, address %0d", v));
      q64 = 1; #1;
      check(d64 == ~(64'd1 << v), $sformatf("address %0d gave %h", v, d64));
    end
    for (int v = 0; v < 8; v++) begin
      a6 = 3'(v); q6 = 0; #1;
      check(&d6, $sformatf("6-line: selected without request, address %0d", v));
      q6 = 1; #1;
      check(d6 == ((v < 6) ? ~(6'd1 << v) : 6'h3f), $sformatf("6-line: address %0d gave %b", v, d6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
