// hopfield_ref_pkg: behavioural reference model of the N-Queen Hopfield
// network, used only by testbenches.
//
// The weights are derived here from the chess rules rather than from the
// design's package: -1 for a neuron on the same row, -1 for the same column
// (so -2 for the neuron itself), -1 for each other neuron on either
// diagonal, and a bias of +2. The model keeps u as a 64-bit integer and
// performs the synchronous (parallel) update: all new u from the old v, then
// all v = (u > 0). It also provides an independent equilibrium test (iterate
// a copy and watch for any change), an N-Queen validity test and the
// penalty energy of a pattern.
package hopfield_ref_pkg;

  class hopfield_ref #(int N = 4);
    localparam int NN = N * N;

    int     w [NN][NN];
    longint u [NN];
    bit     v [NN];

    function new();
      for (int a = 0; a < NN; a++) begin
        for (int b = 0; b < NN; b++) begin
          int i = a / N, j = a % N, k = b / N, l = b % N;
          w[a][b] = 0;
          if (i == k) w[a][b] -= 1;
          if (j == l) w[a][b] -= 1;
          if (i != k && (i + j == k + l || i - j == k - l)) w[a][b] -= 1;
        end
      end
    endfunction

    function void load(logic [NN-1:0] xs);
      for (int n = 0; n < NN; n++) begin
        v[n] = xs[n];
        u[n] = xs[n] ? 1 : 0;
      end
    endfunction

    function longint net(int a);
      longint s = 2;
      for (int b = 0; b < NN; b++) if (v[b]) s += w[a][b];
      return s;
    endfunction

    function void iterate();
      longint nu [NN];
      for (int a = 0; a < NN; a++) nu[a] = u[a] + net(a);
      for (int a = 0; a < NN; a++) begin
        u[a] = nu[a];
        v[a] = nu[a] > 0;
      end
    endfunction

    // True when every neuron's net input pushes it further the way it is.
    function bit stable_now();
      for (int a = 0; a < NN; a++) begin
        longint s = net(a);
        if (v[a] && s < 0) return 0;
        if (!v[a] && s > 0) return 0;
      end
      return 1;
    endfunction

    // True when a copy run for k more iterations never changes any v.
    function bit holds_for(int k);
      hopfield_ref #(N) c = new();
      c.u = u;
      c.v = v;
      for (int t = 0; t < k; t++) begin
        c.iterate();
        if (c.v != v) return 0;
      end
      return 1;
    endfunction

    function logic [NN-1:0] pattern();
      logic [NN-1:0] p;
      for (int n = 0; n < NN; n++) p[n] = v[n];
      return p;
    endfunction

    // Exactly one queen per row and per column, at most one per diagonal.
    static function bit valid(logic [NN-1:0] p);
      int q = 0;
      for (int a = 0; a < NN; a++) begin
        if (!p[a]) continue;
        q++;
        for (int b = a + 1; b < NN; b++) begin
          int i = a / N, j = a % N, k = b / N, l = b % N;
          if (p[b] && (i == k || j == l || i + j == k + l || i - j == k - l)) return 0;
        end
      end
      return q == N;
    endfunction

    // A valid placement built by a known construction, for a fixed-point
    // test (for N = 2 or 3 no placement exists; returns zero).
    static function logic [NN-1:0] known_solution();
      logic [NN-1:0] p = '0;
      int col [N];
      int m = 0;
      if (N < 4) return p;
      // Standard explicit construction for N not of the form 6k+2 / 6k+3.
      if (N % 6 != 2 && N % 6 != 3) begin
        for (int c = 2; c <= N; c += 2) col[m++] = c;
        for (int c = 1; c <= N; c += 2) col[m++] = c;
      end else begin
        // Backtracking search for the remaining sizes.
        int r = 0;
        col[0] = 0;
        while (r < N) begin
          bit ok;
          col[r]++;
          if (col[r] > N) begin
            r--;
            continue;
          end
          ok = 1;
          for (int q = 0; q < r; q++)
            if (col[q] == col[r] || col[q] - col[r] == q - r || col[q] - col[r] == r - q) ok = 0;
          if (ok) begin
            r++;
            if (r < N) col[r] = 0;
          end
        end
      end
      for (int r2 = 0; r2 < N; r2++) p[r2 * N + col[r2] - 1] = 1'b1;
      return p;
    endfunction
  endclass

endpackage
