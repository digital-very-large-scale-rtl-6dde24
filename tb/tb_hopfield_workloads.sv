// tb_hopfield_workloads: the 8-Queen and 16-Queen problems on the same
// network description, scaled by its N parameter (64 and 256 neurons).
//
// Each size is driven by its own hopfield_checker against the independent
// model, with fewer attempts than the 4-Queen test because every model step
// is larger. Both instances run side by side on one clock; the test ends
// when both are done.
module tb_hopfield_workloads;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst8, en8, eq8, done8;
  logic [63:0] xs8, out8;
  logic [31:0] it8;
  int          checks8, failures8;

  logic         rst16, en16, eq16, done16;
  logic [255:0] xs16, out16;
  logic [31:0]  it16;
  int           checks16, failures16;

  hopfield_top #(.N(8)) dut8 (
    .clk, .rst(rst8), .en(en8), .xs(xs8), .xij_out(out8),
    .equilibrium(eq8), .iterations(it8));

  hopfield_checker #(.N(8), .TRIALS(200), .MAXIT(300)) chk8 (
    .clk, .rst(rst8), .en(en8), .xs(xs8), .xij_out(out8), .equilibrium(eq8),
    .iterations(it8), .done(done8), .checks(checks8), .failures(failures8));

  hopfield_top #(.N(16)) dut16 (
    .clk, .rst(rst16), .en(en16), .xs(xs16), .xij_out(out16),
    .equilibrium(eq16), .iterations(it16));

  hopfield_checker #(.N(16), .TRIALS(60), .MAXIT(300)) chk16 (
    .clk, .rst(rst16), .en(en16), .xs(xs16), .xij_out(out16), .equilibrium(eq16),
    .iterations(it16), .done(done16), .checks(checks16), .failures(failures16));

  initial begin
    repeat (200 * 700) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks16,
             failures8 + failures16 + 1);
    $finish;
  end

  initial begin
    // Let the checkers clear their done flags before waiting on them.
    repeat (2) @(posedge clk);
    wait (done8 && done16);
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks16,
             failures8 + failures16);
    $finish;
  end

endmodule
