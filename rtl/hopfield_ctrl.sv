// hopfield_ctrl: equilibrium detection and iteration control for the
// Hopfield network.
//
// The network iterates until it reaches equilibrium, i.e. until no neuron's
// activation can change with further iterations. Each neuron reports a
// `stable` bit (see hopfield_neuron); their AND is that condition. While
// `en` is high and the network is not at equilibrium, `update` enables one
// parallel iteration of all neurons per clock and the iteration counter
// advances. At equilibrium `update` drops, the state freezes and
// `equilibrium` stays high until the next reset, so the final activation
// pattern can be read at leisure.
//
// Interface and timing: `equilibrium` and `update` are combinational from
// the current neuron state; `iterations` is a register cleared by the
// synchronous reset `rst` and holding the number of iterations performed
// (saturating at its maximum). The published design only names the
// stopping rule; this gating and counter are the simplest circuit for it.
module hopfield_ctrl
  import hopfield_pkg::*;
#(
  parameter int unsigned NN = N_DEFAULT * N_DEFAULT,
  parameter int unsigned IW = IW_DEFAULT
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [NN-1:0] stable,
  output logic          update,
  output logic          equilibrium,
  output logic [IW-1:0] iterations
);

  assign equilibrium = &stable;
  assign update      = en && !equilibrium && !rst;

  always_ff @(posedge clk) begin
    if (rst) begin
      iterations <= '0;
    end else if (update && (iterations != '1)) begin
      iterations <= iterations + 1'b1;
    end
  end

endmodule
