// tb_hopfield_top: end-to-end test of the N-Queen Hopfield network at its
// default size (4-Queen, 16 neurons, 32-bit accumulators).
//
// hopfield_checker loads 300 starting patterns, runs the network to
// equilibrium or to 200 iterations, and compares every cycle with an
// independent model. Equilibria, valid placements, en stalls and
// unsettled attempts are counted; each mechanism must occur at least once.
// One iteration per clock is checked through the iteration counter.
module tb_hopfield_top;

  localparam int N = hopfield_pkg::N_DEFAULT;

  logic clk = 1'b0;
  logic rst, en, done, equilibrium;
  logic [N*N-1:0] xs, xij_out;
  logic [31:0] iterations;
  int checks, failures;

  always #5 clk = ~clk;

  hopfield_top dut (
    .clk, .rst, .en, .xs, .xij_out, .equilibrium, .iterations);

  hopfield_checker #(.N(N), .TRIALS(300), .MAXIT(200)) chk (
    .clk, .rst, .en, .xs, .xij_out, .equilibrium, .iterations,
    .done, .checks, .failures);

  initial begin
    repeat (300 * 500) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // Let the checker clear its done flag before waiting on them.
    repeat (2) @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
