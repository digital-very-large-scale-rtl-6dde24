// hopfield_checker: drives one hopfield_top instance through many solve
// attempts and checks it cycle by cycle against hopfield_ref_pkg.
//
// Each attempt loads an initial pattern through rst/xs (random patterns of
// varying density, plus a known valid placement that must be an immediate
// fixed point), then runs with `en` mostly high and occasionally low, for at
// most MAXIT iterations. Every cycle it compares xij_out, the iteration
// count and the equilibrium flag with the model, and at each equilibrium it
// confirms in the model that the pattern holds for 64 more iterations and
// that the design stays frozen. It counts loads, iterations, en stalls,
// equilibria, valid solutions and attempts that did not settle, noting
// those caught in a period-two oscillation; `done`
// rises when all attempts are finished. It is a testbench helper, not part
// of the design.
module hopfield_checker
  import hopfield_ref_pkg::*;
#(
  parameter int N        = 4,
  parameter int TRIALS   = 100,
  parameter int MAXIT    = 200
) (
  input  logic           clk,
  output logic           rst,
  output logic           en,
  output logic [N*N-1:0] xs,
  input  logic [N*N-1:0] xij_out,
  input  logic           equilibrium,
  input  logic [31:0]    iterations,
  output logic           done,
  output int             checks,
  output int             failures
);

  localparam int NN = N * N;

  int n_load = 0, n_iter = 0, n_stall = 0, n_eq = 0, n_valid = 0;
  int n_unsettled = 0, n_fixed = 0, max_iter_to_eq = 0, n_twocycle = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL N=%0d %s: got %0d expected %0d at %0t", N, what, got, exp, $time);
    end
  endtask

  initial begin
    automatic hopfield_ref #(N) m = new();
    logic [NN-1:0] start, prev1, prev2;
    longint its;
    bit two_cycle;
    checks = 0; failures = 0; done = 1'b0;
    rst = 1'b1; en = 1'b0; xs = '0;
    for (int t = 0; t < TRIALS; t++) begin
      // Choose a starting pattern.
      if (t == 0) start = hopfield_ref #(N)::known_solution();
      else if (t == 1) start = '0;
      else begin
        automatic int dens = 1 + ($urandom() % 4);
        for (int n = 0; n < NN; n++) start[n] = ($urandom() % 8) < dens;
      end
      // Load.
      rst = 1'b1; en = 1'($urandom()); xs = start;
      @(posedge clk); #1;
      rst = 1'b0;
      m.load(start);
      n_load++;
      its = 0;
      prev1 = start; prev2 = ~start; two_cycle = 0;
      check("load pattern", longint'(xij_out == start), 1);
      check("load iterations", longint'(iterations), 0);
      // Run.
      for (int c = 0; c < MAXIT * 2; c++) begin
        bit exp_eq;
        exp_eq = m.stable_now();
        check("equilibrium flag", longint'(equilibrium), longint'(exp_eq));
        if (equilibrium) break;
        en = ($urandom() % 8) != 0;
        if (!en) n_stall++;
        @(posedge clk); #1;
        if (en) begin
          m.iterate();
          its++;
          n_iter++;
          // Parallel update may lock into a period-two oscillation.
          if (m.pattern() == prev2 && m.pattern() != prev1) two_cycle = 1;
          prev2 = prev1;
          prev1 = m.pattern();
        end
        check("xij_out", longint'(xij_out == m.pattern()), 1);
        check("iterations", longint'(iterations), its);
        if (its >= MAXIT) break;
      end
      if (equilibrium) begin
        logic [NN-1:0] final_p;
        n_eq++;
        if (its > max_iter_to_eq) max_iter_to_eq = int'(its);
        if (its == 0) n_fixed++;
        final_p = xij_out;
        check("model holds at equilibrium", longint'(m.holds_for(64)), 1);
        if (hopfield_ref #(N)::valid(final_p)) n_valid++;
        // The design stays frozen while en stays high.
        en = 1'b1;
        repeat (3) @(posedge clk);
        #1;
        check("frozen pattern", longint'(xij_out == final_p), 1);
        check("frozen iterations", longint'(iterations), its);
      end else begin
        n_unsettled++;
        if (two_cycle) n_twocycle++;
      end
      if (t == 0 && N >= 4)
        check("known solution is a fixed point", longint'(equilibrium && its == 0), 1);
    end
    $display("N=%0d attempts %0d: loads %0d iterations %0d en-stalls %0d equilibria %0d (valid solutions %0d, immediate %0d, slowest %0d iterations) unsettled %0d (two-cycles %0d)",
             N, TRIALS, n_load, n_iter, n_stall, n_eq, n_valid, n_fixed, max_iter_to_eq, n_unsettled, n_twocycle);
    check("load happened", longint'(n_load > 0), 1);
    check("iteration happened", longint'(n_iter > 0), 1);
    check("en stall happened", longint'(n_stall > 0), 1);
    check("equilibrium happened", longint'(n_eq > 0), 1);
    check("valid solution happened", longint'(n_valid > 0), 1);
    check("two-cycle happened", longint'(n_twocycle > 0), 1);
    done = 1'b1;
  end

endmodule
