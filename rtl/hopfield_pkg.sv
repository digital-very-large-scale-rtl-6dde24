// hopfield_pkg: constants and elaboration-time functions shared by the
// N-Queen Hopfield network.
//
// The network has one binary neuron x_ij per square (row i, column j) of an
// N x N board. Its connection weights follow from writing the N-Queen
// constraints as a quadratic penalty and reading off the coefficients:
//
//   W(ij,kl) = -A*[i==k] - B*[j==l] - C*[i!=k]*([i+j==k+l] + [i-j==k-l])
//   I(ij)    =  A + B
//
// A, B and C weigh the row, column and diagonal constraints (all 1 in the
// reference configuration, so every weight is 0, -1 or -2 and the bias is 2).
// The self weight W(ij,ij) = -A-B is kept, as the formula gives it: with it a
// placement of N non-attacking queens is an exact fixed point of the
// update rule. The functions are evaluated only while elaborating, so every
// weight is a constant wired into the neuron that uses it and zero weights
// cost no hardware.
package hopfield_pkg;

  // Default problem size and penalty coefficients.
  localparam int unsigned N_DEFAULT  = 4;
  localparam int          A_DEFAULT  = 1;
  localparam int          B_DEFAULT  = 1;
  localparam int          C_DEFAULT  = 1;
  // Integration step dt of the update rule, as an integer multiplier.
  localparam int          DT_DEFAULT = 1;
  // Accumulator width of each neuron's internal state u.
  localparam int unsigned UW_DEFAULT = 32;
  // Width of the iteration counter.
  localparam int unsigned IW_DEFAULT = 32;

  // Weight between neuron (i,j) and neuron (k,l); indices are 0-based.
  function automatic int nq_weight(int i, int j, int k, int l,
                                   int a, int b, int c);
    int w;
    w = 0;
    if (i == k) w -= a;
    if (j == l) w -= b;
    if ((i != k) && (((i + j) == (k + l)) || ((i - j) == (k - l)))) w -= c;
    return w;
  endfunction

  // External bias current of every neuron.
  function automatic int nq_bias(int a, int b);
    return a + b;
  endfunction

endpackage
