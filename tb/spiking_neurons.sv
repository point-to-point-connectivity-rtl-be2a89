// spiking_neurons: behavioural model of an array of sending neurons, for tests.
//
// Only the digital face of each neuron is modelled (the analog integrator and
// the axon-hillock spike generator are not): a fire pulse starts a spike, the
// spike (lix) is held until the transmitter pulls the reset lox_n low, and a
// neuron whose row is selected (nrn_disable) cannot start a spike. A fire
// pulse on a neuron that is still spiking or disabled is refused. 'accepted'
// pulses for one clock when a fire pulse started a spike.
module spiking_neurons #(
  parameter int NX = 64,
  parameter int NY = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NY-1:0][NX-1:0] fire,
  output logic [NY-1:0][NX-1:0] lix,
  input  logic [NY-1:0][NX-1:0] lox_n,
  input  logic [NY-1:0][NX-1:0] nrn_disable,
  output logic [NY-1:0][NX-1:0] accepted,
  output logic [NY-1:0][NX-1:0] refused
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lix <= '0; accepted <= '0; refused <= '0;
    end else begin
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++) begin
          accepted[y][x] <= fire[y][x] && !lix[y][x] && !nrn_disable[y][x];
          refused[y][x]  <= fire[y][x] && (lix[y][x] || nrn_disable[y][x]);
          if (!lox_n[y][x] && lix[y][x])               lix[y][x] <= 1'b0;
          else if (fire[y][x] && !nrn_disable[y][x])   lix[y][x] <= 1'b1;
        end
    end
  end
endmodule
