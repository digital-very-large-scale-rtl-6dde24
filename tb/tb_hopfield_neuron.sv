// tb_hopfield_neuron: self-checking test of one N-Queen Hopfield neuron.
//
// Two neurons at board square (1,2) of a 4x4 network are driven with random
// neighbour patterns: one with the default 32-bit accumulator and step 1, one
// with a 6-bit accumulator and step 2 so that saturation is reached quickly.
// The expected weights are derived here from the attack rules of the board
// (same row, same column, same diagonal), not from the design's package, and
// a reference model tracks u and v. Every cycle checks u, v and `stable`;
// reset loading, holding with en low and one iteration per clock are checked
// as well.
module tb_hopfield_neuron;

  localparam int N  = 4;
  localparam int NN = N * N;
  localparam int R  = 1;
  localparam int K  = 2;

  logic clk = 1'b0;
  logic rst, en, init_v;
  logic [NN-1:0] v_in;
  logic v_a, v_b, st_a, st_b;
  logic signed [31:0] u_a;
  logic signed [5:0]  u_b;

  int checks = 0;
  int failures = 0;
  int sat_hits = 0;

  always #5 clk = ~clk;

  hopfield_neuron #(.N(N), .ROW(R), .COL(K)) dut_a (
    .clk, .rst, .en, .init_v, .v_in, .v(v_a), .u(u_a), .stable(st_a));

  hopfield_neuron #(.N(N), .ROW(R), .COL(K), .DT(2), .UW(6)) dut_b (
    .clk, .rst, .en, .init_v, .v_in, .v(v_b), .u(u_b), .stable(st_b));

  // Reference weight from the attack rules, with A = B = C = 1.
  function automatic int ref_w(int i, int j, int k, int l);
    int w = 0;
    if (i == k) w -= 1;                 // same row, self included
    if (j == l) w -= 1;                 // same column, self included
    if (i != k && (i + j == k + l)) w -= 1;  // ascending diagonal
    if (i != k && (i - j == k - l)) w -= 1;  // descending diagonal
    return w;
  endfunction

  function automatic int ref_net(logic [NN-1:0] vv);
    int s = 2;
    for (int n = 0; n < NN; n++) if (vv[n]) s += ref_w(R, K, n / N, n % N);
    return s;
  endfunction

  longint mu_a, mu_b;
  logic   mv_a, mv_b;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic compare_all();
    int net;
    net = ref_net(v_in);
    check("u_a", longint'(u_a), mu_a);
    check("v_a", longint'(v_a), longint'(mv_a));
    check("u_b", longint'(u_b), mu_b);
    check("v_b", longint'(v_b), longint'(mv_b));
    check("stable_a", longint'(st_a), mv_a ? longint'(net >= 0) : longint'(net <= 0));
  endtask

  // Apply one clock with the given controls and advance the reference.
  task automatic step(logic r, logic e, logic iv, logic [NN-1:0] vv);
    int net;
    rst = r; en = e; init_v = iv; v_in = vv;
    net = ref_net(vv);
    @(posedge clk);
    if (r) begin
      mu_a = iv ? 1 : 0; mu_b = mu_a; mv_a = iv; mv_b = iv;
    end else if (e) begin
      mu_a = mu_a + longint'(net);
      mu_b = mu_b + 2 * longint'(net);
      if (mu_b > 31)  begin mu_b = 31;  sat_hits++; end
      if (mu_b < -32) begin mu_b = -32; sat_hits++; end
      mv_a = mu_a > 0;
      mv_b = mu_b > 0;
    end
    #1;
    compare_all();
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NN-1:0] pat;
    // Weight spot checks against the hand-derived row of the 4x4 matrix.
    check("w self", longint'(ref_w(R, K, R, K)), -2);
    // Reset loads both polarities.
    step(1, 0, 1, '0);
    step(1, 0, 0, '0);
    // With no other neuron firing the net input is the bias: +2 per clock.
    step(0, 1, 0, '0);
    check("one iteration per clock", longint'(u_a), 2);
    // Hold with en low.
    step(0, 0, 0, '1);
    check("hold", longint'(u_a), 2);
    // Random patterns, with occasional reloads.
    for (int t = 0; t < 3000; t++) begin
      pat = NN'($urandom());
      if (($urandom() % 64) == 0) step(1, 0, 1'($urandom()), pat);
      else step(0, 1'(($urandom() % 8) != 0), 1'b0, pat);
    end
    // Long run of full-board patterns drives u negative into saturation.
    for (int t = 0; t < 20; t++) step(0, 1, 1'b0, '1);
    for (int t = 0; t < 20; t++) step(0, 1, 1'b0, '0);
    check("saturation reached", longint'(sat_hits > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
