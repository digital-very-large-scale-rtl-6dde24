// hopfield_top: discrete Hopfield network solving the N-Queen problem.
//
// N*N neurons, one per board square, are instantiated from the same
// hopfield_neuron description, each with its own row and column so that it
// elaborates its own constant weight array; a neuron is wired only to the
// neurons on its row, column and diagonals. All neurons update in parallel
// (synchronously): every clock computes all u updates from the current
// outputs, then all v outputs from the new u. hopfield_ctrl stops the
// iteration at equilibrium and counts iterations.
//
// Interface:
//   clk, rst, en   clock, synchronous active-high reset/load, run enable
//   xs             initial activation pattern, loaded while rst is high
//   xij_out        current activation pattern (bit i*N+j is the queen at
//                  0-based row i, column j); it is the solution once
//                  `equilibrium` is high
//   equilibrium    no neuron can change any more; updates have stopped
//   iterations     parallel iterations performed since reset
// Timing: one iteration per clock cycle while en is high and the network is
// not at equilibrium. With the default N = 4 there are 16 neurons with 32-bit
// accumulators, as in the reference FPGA implementation. The equilibrium
// output, the iteration counter and the bit order of xs/xij_out are choices
// of this design.
module hopfield_top
  import hopfield_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int          A  = A_DEFAULT,
  parameter int          B  = B_DEFAULT,
  parameter int          C  = C_DEFAULT,
  parameter int          DT = DT_DEFAULT,
  parameter int unsigned UW = UW_DEFAULT,
  parameter int unsigned IW = IW_DEFAULT
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic [N*N-1:0] xs,
  output logic [N*N-1:0] xij_out,
  output logic           equilibrium,
  output logic [IW-1:0]  iterations
);

  localparam int unsigned NN = N * N;

  logic [NN-1:0]        v;
  logic [NN-1:0]        stable;
  logic                 update;
  logic signed [UW-1:0] u [NN];    // neuron states, kept for waveform debug

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      hopfield_neuron #(
        .N(N), .ROW(i), .COL(j), .A(A), .B(B), .C(C), .DT(DT), .UW(UW)
      ) u_neuron (
        .clk    (clk),
        .rst    (rst),
        .en     (update),
        .init_v (xs[i*N+j]),
        .v_in   (v),
        .v      (v[i*N+j]),
        .u      (u[i*N+j]),
        .stable (stable[i*N+j])
      );
    end
  end

  hopfield_ctrl #(.NN(NN), .IW(IW)) u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .en          (en),
    .stable      (stable),
    .update      (update),
    .equilibrium (equilibrium),
    .iterations  (iterations)
  );

  assign xij_out = v;

endmodule
