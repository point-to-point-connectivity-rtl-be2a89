// hs_client: behavioural four-phase active client for arbiter tests.
//
// Raises req after a random idle time (up to MAX_IDLE clocks), waits for ack,
// holds for up to MAX_HOLD clocks, withdraws req, waits for ack to clear, and
// repeats until it has been served NREQ times. Counts its grants.
module hs_client #(
  parameter int NREQ     = 20,
  parameter int MAX_IDLE = 8,
  parameter int MAX_HOLD = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic req,
  input  logic ack,
  output int   served,
  output logic done
);
  initial begin
    req = 0; served = 0; done = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    for (int i = 0; i < NREQ; i++) begin
      repeat ($urandom_range(0, MAX_IDLE)) @(posedge clk);
      req <= 1;
      @(posedge clk);
      while (!ack) @(posedge clk);
      served++;
      repeat ($urandom_range(0, MAX_HOLD)) @(posedge clk);
      req <= 0;
      @(posedge clk);
      while (ack) @(posedge clk);
    end
    done = 1;
  end
endmodule
