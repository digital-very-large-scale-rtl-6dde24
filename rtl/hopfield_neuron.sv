// hopfield_neuron: one discrete Hopfield neuron x_(ROW,COL) of the N-Queen
// network.
//
// Each clock with `en` high the neuron performs one iteration of
//   u(t+1) = u(t) + DT * ( sum_kl W(ij,kl) * v_kl(t) + I )
//   v(t+1) = 1 if u(t+1) > 0, else 0
// Because every v is 0 or 1 the weighted sum is a set of conditional
// additions: input kl adds its constant weight only when that neuron fires.
// The weights come from hopfield_pkg::nq_weight at elaboration, so only
// inputs with a non-zero weight (same row, column or diagonal: O(N) of them)
// are connected; the others are constant zero and are removed by synthesis.
// The state u is a signed UW-bit accumulator (32 bits by default, as in the
// reference implementation) and v is a flip-flop.
//
// `stable` is high when the neuron can never change state again while the
// rest of the network stays where it is: a firing neuron whose net input is
// >= 0 only grows its u, a silent one (u <= 0) whose net input is <= 0 only
// lowers it. The AND of all `stable` bits is therefore an exact equilibrium
// test for the whole network.
//
// Interface and timing:
//   rst (synchronous, active high) loads v = init_v and u = 1 or 0, a small
//   value consistent with v, so the network starts from any chosen state.
//   v_in[k*N+l] is the current output of neuron (k,l), including this one.
//   u and v update on the rising clock edge of each enabled cycle: one
//   iteration per clock. `stable` is combinational from v_in and v.
// Design choices beyond the published update rule: the synchronous reset and
// its load values, the integer step DT, and saturation of u at the limits of
// its width instead of wrapping (so a network left oscillating for a long
// time cannot flip sign through overflow). The net input and DT*net are
// computed at the accumulator width UW, which must hold |DT*net| (at most
// DT*(N*(A+B) + 2*(N-1)*C) + A + B; 32 bits hold it for any practical N).
module hopfield_neuron
  import hopfield_pkg::*;
#(
  parameter int unsigned N   = N_DEFAULT,
  parameter int unsigned ROW = 0,
  parameter int unsigned COL = 0,
  parameter int          A   = A_DEFAULT,
  parameter int          B   = B_DEFAULT,
  parameter int          C   = C_DEFAULT,
  parameter int          DT  = DT_DEFAULT,
  parameter int unsigned UW  = UW_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 init_v,
  input  logic [N*N-1:0]       v_in,
  output logic                 v,
  output logic signed [UW-1:0] u,
  output logic                 stable
);

  localparam int unsigned NN   = N * N;
  localparam int          BIAS = nq_bias(A, B);

  typedef logic signed [UW-1:0] acc_t;
  typedef logic signed [UW:0]   wide_t;

  localparam wide_t U_MAX = wide_t'({1'b0, {(UW-1){1'b1}}});
  localparam wide_t U_MIN = -U_MAX - wide_t'(1);

  // Conditional terms: weight of input n if that neuron fires, else zero.
  acc_t term [NN];

  for (genvar n = 0; n < NN; n++) begin : g_syn
    localparam int W = nq_weight(int'(ROW), int'(COL), n / int'(N), n % int'(N), A, B, C);
    if (W != 0) begin : g_conn
      assign term[n] = v_in[n] ? acc_t'(W) : acc_t'(0);
    end else begin : g_none
      assign term[n] = acc_t'(0);
    end
  end

  acc_t  net;     // sum_kl W*v + I
  acc_t  step;    // DT*net
  wide_t u_sum;   // u + step, one bit wider to catch overflow
  acc_t  u_next;

  always_comb begin
    net = acc_t'(BIAS);
    for (int n = 0; n < NN; n++) net += term[n];
    step  = acc_t'(net * acc_t'(DT));
    u_sum = wide_t'(u) + wide_t'(step);
    if (u_sum > U_MAX)      u_next = acc_t'(U_MAX);
    else if (u_sum < U_MIN) u_next = acc_t'(U_MIN);
    else                    u_next = acc_t'(u_sum);
  end

  assign stable = v ? (net >= 0) : (net <= 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      u <= init_v ? acc_t'(1) : acc_t'(0);
      v <= init_v;
    end else if (en) begin
      u <= u_next;
      v <= (u_next > 0);
    end
  end

endmodule
