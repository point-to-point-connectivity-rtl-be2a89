// receiving_neurons: behavioural model of an array of receiving neurons.
//
// Only the digital face is modelled (not the integrator): a neuron whose
// active-low request falls answers with an active-low acknowledge after a
// random delay of 0 to MAX_DELAY clocks, and releases it a random 0 to
// MAX_DELAY clocks after the request is withdrawn. 'got' pulses for one clock when a request arrives.
module receiving_neurons #(
  parameter int NX = 64,
  parameter int NY = 64,
  parameter int MAX_DELAY = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NY-1:0][NX-1:0] req_n,
  output logic [NY-1:0][NX-1:0] ack_n,
  output logic [NY-1:0][NX-1:0] got
);
  logic [NY-1:0][NX-1:0] seen;
  int wait_cnt [NY][NX];
  int rel_cnt [NY][NX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_n <= '1; got <= '0; seen <= '0;
    end else begin
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) begin
          got[y][x] <= !req_n[y][x] && !seen[y][x];
          if (req_n[y][x]) begin
            seen[y][x] <= 1'b0;
            if (!ack_n[y][x]) begin
              if (rel_cnt[y][x] > 0) rel_cnt[y][x] <= rel_cnt[y][x] - 1;
              else                   ack_n[y][x] <= 1'b1;
            end
          end else if (!seen[y][x]) begin
            seen[y][x]     <= 1'b1;
            wait_cnt[y][x] <= $urandom_range(0, MAX_DELAY);
            rel_cnt[y][x]  <= $urandom_range(0, MAX_DELAY);
          end else if (wait_cnt[y][x] > 0) begin
            wait_cnt[y][x] <= wait_cnt[y][x] - 1;
          end else begin
            ack_n[y][x] <= 1'b0;
          end
        end
    end
  end
endmodule
