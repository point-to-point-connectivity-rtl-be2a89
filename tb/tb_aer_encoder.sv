// tb_aer_encoder: exhaustive test of the one-hot to binary encoder.
//
// For the default 64 lines and for a 7-line encoder (not a power of two) every
// one-hot input must produce its index and a request; no input must produce
// no request.
module tb_aer_encoder;
  logic [63:0] a64; logic [5:0] b64; logic r64;
  logic [6:0]  a7;  logic [2:0] b7;  logic r7;
  int checks = 0, failures = 0;

  aer_encoder u64 (.a(a64), .b(b64), .req(r64));
  aer_encoder #(.M(7)) u7 (.a(a7), .b(b7), .req(r7));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    a64 = '0; a7 = '0; #1;
    check(!r64 && !r7, "request without input");
    for (int m = 0; m < 64; m++) begin
      a64 = 64'd1 << m; #1;
      check(r64 && b64 == 6'(m), $sformatf("64-line encoder, line %0d gave %0d", m, b64));
    end
    for (int m = 0; m < 7; m++) begin
      a7 = 7'd1 << m; #1;
      check(r7 && b7 == 3'(m), $sformatf("7-line encoder, line %0d gave %0d", m, b7));
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
