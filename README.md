# A discrete Hopfield network that places N queens

This is synthesizable SystemVerilog for a small, fully parallel Hopfield neural
network that solves the N-Queen problem: put N queens on an N x N board so that
no two share a row, a column or a diagonal. The default build is the 4-Queen
network. It has 16 binary neurons, one per square, each with a 32-bit
accumulator, and it performs one network iteration per clock cycle. The same
RTL scales to 8-Queen (64 neurons) and 16-Queen (256 neurons) by changing one
parameter.

The idea is to turn the constraints into an energy function whose minima are
valid placements. The Hopfield dynamics then only ever move downhill in that
energy. Nothing is trained. Every weight is a small constant fixed by the
chess rules, so the weights are wired into the logic. The weighted sum of a
neuron then costs only a few conditional additions, with no multipliers and no
weight memory.

## The energy function and the weights

Let `x_ij = 1` mean "a queen on row i, column j". A penalty that is zero
exactly for a non-attacking placement is:

```
f(x) = A/2 * sum_i (sum_j x_ij - 1)^2          one queen per row
     + B/2 * sum_j (sum_i x_ij - 1)^2          one queen per column
     + C/2 * sum over queen pairs on a shared diagonal
```

Expand it. Then match it term by term against the Hopfield energy
`E = -1/2 sum W v v - sum I v`. This gives the weight between square (i,j) and
square (k,l), and the bias of every neuron:

```
W(ij,kl) = -A*[i==k] - B*[j==l] - C*[i!=k]*([i+j == k+l] + [i-j == k-l])
I(ij)    =  A + B
```

The design uses `A = B = C = 1`. Every weight is therefore 0, -1 or -2, and
every bias is 2. A neuron has a non-zero weight only to squares on its own row,
column or diagonals. That is O(N) inputs out of N^2, and only those inputs are
wired. `hopfield_pkg::nq_weight` evaluates the formula while the design
elaborates. Each neuron instance receives its own row and column as
parameters, so it gets its own constant weight row.

For N = 4 the matrix is as follows. Rows and columns are numbered (row, col),
in the same order as the bits of `xs` and `xij_out`:

```
      (0,0)..(0,3) (1,0)..(1,3) (2,0)..(2,3) (3,0)..(3,3)
(0,0) -2 -1 -1 -1 -1 -1  0  0 -1  0 -1  0 -1  0  0 -1
(0,1) -1 -2 -1 -1 -1 -1 -1  0  0 -1  0 -1  0 -1  0  0
(0,2) -1 -1 -2 -1  0 -1 -1 -1 -1  0 -1  0  0  0 -1  0
(0,3) -1 -1 -1 -2  0  0 -1 -1  0 -1  0 -1 -1  0  0 -1
(1,0) -1 -1  0  0 -2 -1 -1 -1 -1 -1  0  0 -1  0 -1  0
(1,1) -1 -1 -1  0 -1 -2 -1 -1 -1 -1 -1  0  0 -1  0 -1
(1,2)  0 -1 -1 -1 -1 -1 -2 -1  0 -1 -1 -1 -1  0 -1  0
(1,3)  0  0 -1 -1 -1 -1 -1 -2  0  0 -1 -1  0 -1  0 -1
(2,0) -1  0 -1  0 -1 -1  0  0 -2 -1 -1 -1 -1 -1  0  0
(2,1)  0 -1  0 -1 -1 -1 -1  0 -1 -2 -1 -1 -1 -1 -1  0
(2,2) -1  0 -1  0  0 -1 -1 -1 -1 -1 -2 -1  0 -1 -1 -1
(2,3)  0 -1  0 -1  0  0 -1 -1 -1 -1 -1 -2  0  0 -1 -1
(3,0) -1  0  0 -1 -1  0 -1  0 -1 -1  0  0 -2 -1 -1 -1
(3,1)  0 -1  0  0  0 -1  0 -1 -1 -1 -1  0 -1 -2 -1 -1
(3,2)  0  0 -1  0 -1  0 -1  0  0 -1 -1 -1 -1 -1 -2 -1
(3,3) -1  0  0 -1  0 -1  0 -1  0  0 -1 -1 -1 -1 -1 -2
```

**The self weight is -2, not 0.** A classic Hopfield network has no
self-connections. Here the diagonal term is kept as the expansion produces it.
This is deliberate, and it is what makes the network work. Take a valid
placement. Each queen sees exactly itself on its row (-1) and on its column
(-1), plus the bias +2, so its net input is exactly 0. Every empty square sees
one queen on its row and one on its column, plus possibly some on its
diagonals, so its net input is 0 or less. A valid placement is therefore an
exact fixed point of the dynamics. If the self term were dropped, a queen
would see +2 and each empty square 0, and the fixed points would no longer
match the solutions.

## One neuron, one iteration per clock (`hopfield_neuron`)

Each neuron holds a signed internal state `u` (32 bits) and a binary output
`v`. While it is enabled, it does the following on every clock:

```
net    = I + sum over connected kl of (v_kl ? W(ij,kl) : 0)
u_next = sat(u + DT * net)
u <= u_next;   v <= (u_next > 0)
```

Because the outputs are 0 or 1, the weighted sum needs no multiplications. It
is only conditional additions of constants. All neurons update together
(synchronous, parallel update). Every new `u` is computed from the old outputs
of the whole network, and then every `v` follows from its new `u`. One full
network iteration takes exactly one clock cycle. `DT` is the integration step,
an integer, with default 1.

The accumulator saturates at its most positive and most negative values
instead of wrapping. A network left to oscillate for a very long time
therefore cannot flip a neuron by overflow.

Each neuron also reports `stable`. This is high when the neuron's net input
pushes `u` further in the direction it already lies. That means a firing
neuron with `net >= 0`, or a silent neuron (`u <= 0`) with `net <= 0`. Such a
neuron cannot change its output while the others keep theirs.

## Stopping at equilibrium (`hopfield_ctrl`)

The algorithm iterates until the activations no longer change. The controller
ANDs the `stable` flags. When all are high, no neuron can ever change again:
the network is at equilibrium. The test is exact, not a heuristic such as
"nothing changed in the last iteration". The controller then holds `update`
low, so the state freezes, and it raises `equilibrium`. It also counts the
iterations performed since reset. The solve time in clock cycles is simply
`iterations`.

**Two-cycles.** With parallel update a Hopfield network can end in a
period-two oscillation instead of a fixed point. Both states of such a cycle
are local minima of the energy. This network does not escape such cycles. When
it is caught in one, `equilibrium` never rises. The caller should bound the
run, for example with a cycle budget, and restart from a new random pattern.
In simulation, every run that settled ended in a valid placement, and almost
every run that did not settle was caught in a two-cycle. No noise, annealing or
other method of escaping local minima is included.

## Top level (`hopfield_top`)

```
clk          clock
rst          synchronous, active high: load xs, clear the iteration count
en           run enable; low holds the whole network
xs[N*N]      starting pattern (bit i*N+j = row i, column j, 0-based)
xij_out[N*N] current pattern; the solution once equilibrium is high
equilibrium  the network has settled and stopped
iterations   iterations performed since reset (32 bits, saturating)
```

How to use it: hold `rst` high for one clock with a random pattern on `xs`,
then raise `en`. Wait for `equilibrium` or for your iteration budget to run
out. At reset each neuron starts with `v = xs` bit, and with `u = 1` where the
bit is set and `u = 0` where it is clear. That is the smallest state consistent
with `v = (u > 0)`. Random starting patterns are supplied from outside; there
is no random source on chip. The top generates the N x N neuron array, wires
every neuron's output vector to all neurons (each uses only its non-zero-weight
inputs), and adds the controller.

The default build has 35 signal pins (clk, rst, en, 16 + 16 pattern bits) plus
`equilibrium` and the counter.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | board size; N*N neurons |
| `A`, `B`, `C` | 1 | row, column and diagonal penalty weights |
| `DT` | 1 | integration step, integer |
| `UW` | 32 | width of each neuron's accumulator `u` |
| `IW` | 32 | width of the iteration counter |

`UW` must hold `DT * net`. The magnitude of `net` is at most
`N*(A+B) + 2*(N-1)*C + A + B` (60 for N = 16), so 32 bits are ample. Changing
`A`, `B` or `C` changes the energy landscape. The fixed-point property
described above needs `I = A + B`, which the package enforces.

## Sizes

| problem | neurons | inputs wired per neuron | status |
|---|---|---|---|
| 4-Queen | 16 | 10 to 12 | default build |
| 8-Queen | 64 | up to 28 | `N = 8` |
| 16-Queen | 256 | up to 60 | `N = 16` |

At N = 4 the generic coarse synthesis gives about 546 word-level cells and 560
flip-flops: 16 x 33 bits of neuron state plus the 32-bit counter.

## Where this design departs from the published one

- **Extra ports.** The `equilibrium` flag, the iteration counter and the
  freeze at equilibrium are additions. The published network exposes only
  clock, enable, reset, the starting pattern and the output pattern.
- **Pruned adders.** The published synthesis kept one 32-bit adder per neuron
  pair, 256 for N = 4. Here zero-weight inputs are removed at elaboration
  rather than left to the synthesis tool.
- **Assumed details.** The reset polarity and load values, the bit order of
  the pattern, saturation, and the integer step `DT` are all choices made
  here.
- **Not included.** There is no LED or host-link logic. `xij_out` is brought
  out for whatever board wiring displays or reads it.

## Verification

Each testbench checks itself and prints a line of the form
`TB_RESULT checks=N failures=M`.

- `tb/tb_hopfield_neuron.sv` tests a neuron at square (1,2) with random
  neighbour patterns. The expected weights come from the chess rules, written
  independently of the design's package. The test checks `u`, `v` and `stable`
  every cycle. It also covers reset loading, holding with `en` low, one
  iteration per clock, and saturation, using a second instance with a 6-bit
  accumulator.
- `tb/tb_hopfield_ctrl.sv` tests the controller with random stable vectors.
  It checks the gating and the iteration count, including a saturating 4-bit
  counter.
- `tb/tb_hopfield_top.sv` runs the default 4-Queen build end to end with 300
  starting patterns. The top's parameters are left at their defaults. The
  checker (`tb/hopfield_checker.sv`) compares every cycle with a behavioural
  model (`tb/hopfield_ref_pkg.sv`). At every equilibrium it confirms in the
  model that the pattern survives 64 more iterations, and that the design
  stays frozen. It requires each behaviour to have occurred at least once:
  load, iteration, stall by `en`, equilibrium, valid placement, and two-cycle.
  It also checks that a known valid placement is recognised as an equilibrium
  after zero iterations.
- `tb/tb_hopfield_workloads.sv` does the same at N = 8 (200 attempts) and
  N = 16 (60 attempts).

In the runs made, between 63 % and 85 % of random starts settled at N = 4.
About half settled at N = 8, and about a third at N = 16. Every run that
settled ended in a valid placement. At N = 4 the slowest settled run took under 50 iterations.

## Simulating

The package files must come first. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hopfield_pkg.sv tb/hopfield_ref_pkg.sv tb/tb_hopfield_top.sv \
    --top-module tb_hopfield_top -o sim
./obj_dir/sim
```

Replace `tb_hopfield_top` with `tb_hopfield_workloads` for the 8- and
16-Queen runs. The block tests (`tb_hopfield_neuron`, `tb_hopfield_ctrl`)
need only `rtl/hopfield_pkg.sv` and their own file. Each run takes a few
seconds.
