// tb_hopfield_ctrl: self-checking test of the equilibrium controller.
//
// Random `stable` vectors (biased towards all ones so that equilibrium
// occurs often) and random `en` are applied to a 16-neuron controller with
// a 32-bit counter and to one with a 4-bit counter, which saturates. A
// reference model checks `equilibrium`, `update` and the iteration counts
// every cycle, and the test counts how often equilibrium, a stall by en and
// counter saturation happened.
module tb_hopfield_ctrl;

  localparam int NN = 16;

  logic clk = 1'b0;
  logic rst, en;
  logic [NN-1:0] stable;
  logic upd_a, eq_a, upd_b, eq_b;
  logic [31:0] it_a;
  logic [3:0]  it_b;

  int checks = 0;
  int failures = 0;
  int n_eq = 0, n_stall = 0, n_sat = 0;

  always #5 clk = ~clk;

  hopfield_ctrl #(.NN(NN)) dut_a (
    .clk, .rst, .en, .stable, .update(upd_a), .equilibrium(eq_a), .iterations(it_a));
  hopfield_ctrl #(.NN(NN), .IW(4)) dut_b (
    .clk, .rst, .en, .stable, .update(upd_b), .equilibrium(eq_b), .iterations(it_b));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m_a, m_b;
    logic   exp_eq, exp_upd;
    m_a = 0; m_b = 0;
    rst = 1'b1; en = 1'b0; stable = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int t = 0; t < 4000; t++) begin
      if (($urandom() % 200) == 0) rst = 1'b1; else rst = 1'b0;
      en = ($urandom() % 6) != 0;
      stable = (($urandom() % 4) == 0) ? '1 : NN'($urandom() | $urandom());
      #1;
      exp_eq  = &stable;
      exp_upd = en && !exp_eq && !rst;
      check("equilibrium", longint'(eq_a), longint'(exp_eq));
      check("update", longint'(upd_a), longint'(exp_upd));
      check("update_b", longint'(upd_b), longint'(exp_upd));
      if (exp_eq && en) n_eq++;
      if (!en && !exp_eq && !rst) n_stall++;
      @(posedge clk);
      if (rst) begin
        m_a = 0; m_b = 0;
      end else if (exp_upd) begin
        m_a++;
        if (m_b == 15) n_sat++; else m_b++;
      end
      #1;
      check("iterations", longint'(it_a), m_a);
      check("iterations_b", longint'(it_b), m_b);
    end
    check("equilibrium seen", longint'(n_eq > 0), 1);
    check("en stall seen", longint'(n_stall > 0), 1);
    check("counter saturation seen", longint'(n_sat > 0), 1);
    $display("equilibria %0d stalls %0d saturations %0d", n_eq, n_stall, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
