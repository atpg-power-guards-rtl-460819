# ATPG power guard

A delay test applies two vectors to a circuit: V1 sets it up and V2 launches
the transitions whose timing is captured. A test-pattern generator (ATPG)
that sees only the logic will happily pick a pair V1→V2 that switches far
more of the circuit than normal operation ever does. The resulting supply
droop slows the chip down, and good parts then fail the test.

The power guard fixes this without changing the ATPG tool or the chip's
test hardware. It is a small circuit placed around the circuit under test
(CUT) in the netlist that is handed to the ATPG tool. It is used only for
test generation and is never built in silicon. Each cycle, the guard
estimates the power of the current input transition. When the estimate is
not below a threshold P_th, the guard hides the CUT's outputs behind an
uncontrollable flip-flop. The ATPG tool then sees an unknown value there
and cannot detect any fault through that pattern pair. It has to look for
another, power-safe pair. Every pattern it produces is therefore below the
threshold, as far as the power model is accurate.

This repository holds synthesizable SystemVerilog for the guard, plus
self-checking testbenches.

## Structure

```
            in_vec ──┬────────────────────────────► cut_in ──► [ CUT ] ──► cut_out
                     │                                                        │
  transition_gen     ▼                                                        │
   prev_vec <= in_vec (one flip-flop per input)                               │
   trans = in_vec ^ prev_vec                                                  │
                     │                                                        │
  power_compute      ▼                                                        │
   p_eq = c0 + Σ coef[k]·trans[k]                                             │
                     │                                                        │
  response_mask      ▼                                                        ▼
   valid = prev_known && (p_eq < p_th)      guard_out <= valid ? cut_out : {X_ff}
```

| File | Contents |
|---|---|
| `rtl/pg_pkg.sv` | default sizes and the P_eq width rule |
| `rtl/transition_gen.sv` | previous-vector flip-flops, XORs, and the `prev_known` flag |
| `rtl/power_compute.sv` | the linear power model |
| `rtl/response_mask.sv` | threshold comparator, X flip-flop, output multiplexers and output register |
| `rtl/power_guard.sv` | top: the three parts wired together, with the CUT connected through ports |

### Transition signals

Each primary input has one flip-flop that holds its value from the previous
cycle. An XOR compares the two values, so `trans[k]` is 1 when input k
switches between V1 and V2.

### Power model

The estimate is linear in the transition bits:

    P_eq = c0 + c1·i1^T + c2·i2^T + … + cn·in^T

Here `c_k` is the power that a switch on input k adds, and `c0` is a constant
term. The coefficients come from fitting many random power simulations of
the real CUT at cell level. Fitting with non-zero gate delays also captures
glitch power. Each `i^T` is a single bit, so each product is just the
coefficient gated by that bit. The sum is combinational and is available in
the same cycle as the vector.

### Response masking and the X flip-flop

`X_ff` is a flip-flop whose D input is its own Q. It has no reset and no
input from outside, so no vector can set it. A test generator treats its
value as unknown (X). When `valid` is 0, every guard output takes this
value, and any fault effect on those outputs disappears from the ATPG
tool's view. The multiplexed outputs are then registered:

    o'' = valid ? o : X        o' <= o''   on the rising clock edge

All outputs share a single `X_ff`.

The comparison is strict (`p_eq < p_th`). A transition whose estimate
exactly equals the threshold is rejected.

### The setup vector (three-vector tests)

Before the first vector there is no previous vector, so the transition bits,
and therefore `valid`, are unknown in that cycle. That makes the response to
V1 unobservable. The fix is to generate every test as three vectors:

| cycle | input | previous | valid | guard output |
|---|---|---|---|---|
| setup | V0 | unknown | unknown → masked | X |
| launch | V1 | V0 | `P(V0→V1) < P_th` | O1 or X |
| capture | V2 | V1 | `P(V1→V2) < P_th` | O2 or X |

V0 is not part of the delivered test. It only gives the guard a defined
history, so that the ATPG tool must also choose V0→V1 to be power-safe.

A two-state netlist cannot hold an unknown value. This RTL therefore has a
`prev_known` flag in `transition_gen`. A synchronous `rst` clears it, and the
first clock edge after that sets it. While it is 0, `valid` is forced low,
and the setup cycle is masked exactly as an unknown `valid` would mask it.
The previous-vector flip-flops have no reset, so before the first vector
they hold whatever value they start with.

## Interface of `power_guard`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | test clock |
| `rst` | in | 1 | synchronous, active high: forget the previous vector |
| `in_vec` | in | N_IN | test vector i1..in |
| `coef0` | in | COEF_W | constant term c0 |
| `coef` | in | N_IN × COEF_W | per-input coefficients, `coef[k-1]` = c_k |
| `p_th` | in | P_W | threshold |
| `cut_in` | out | N_IN | to the CUT's inputs (equal to `in_vec`) |
| `cut_out` | in | N_OUT | from the CUT's outputs |
| `guard_out` | out | N_OUT | guarded, registered outputs o'1..o'm |
| `p_eq` | out | P_W | estimate for the current cycle (observation) |
| `valid` | out | 1 | current transition accepted (observation) |
| `x_val` | out | 1 | value held by `X_ff` (observation) |

Parameters: `N_IN = 41` and `N_OUT = 32` are the pin counts of the ISCAS-85
c1355 benchmark. `COEF_W = 16`. `P_W = COEF_W + clog2(N_IN + 2) = 22`, wide
enough that the sum of all coefficients cannot overflow. All values are
unsigned integers in a unit you choose. The testbenches use 1 nW per LSB,
which covers each coefficient up to 65.5 µW.

Timing: a vector applied in cycle n produces `p_eq` and `valid` in cycle n,
and `guard_out` after the clock edge that ends cycle n. To guard a smaller
CUT with the default sizes, tie the unused inputs to a constant and set
their coefficients to 0.

## Choices made in this RTL

The following are design choices and were not taken from the method:

- Coefficients and threshold are ports rather than constants. One netlist
  therefore serves any fitted model. How the coefficients get into the
  guard is up to the user.
- Bit widths, the unsigned integer format and the default sizes.
- `rst` and the `prev_known` flag, which stand in for the unknown initial
  state (see above).
- The CUT is outside the module and connects through `cut_in`/`cut_out`.
  The method places the CUT inside the wrapper. To produce the netlist for
  an ATPG tool, instantiate the CUT and connect it to these ports.
- `p_eq`, `valid` and `x_val` are brought out only to observe the design.
- The strict `<` comparison. One description of the method says a pattern
  that "does not exceed" the limit is valid, which would mean `<=`. The
  structural description uses `<`, and that is what is built here. Changing
  it is a one-character edit in `response_mask.sv`.

What the guard cannot do: it is only as accurate as the linear model. When
the patterns are later simulated at cell level, a few of them can still
exceed P_th because the model does not capture the CUT's power exactly.

## Testbenches

All are self-checking. Each prints `TB_RESULT checks=N failures=M` and has
a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_transition_gen` | transition bits against a reference model, held vectors, `prev_known` around reset |
| `tb_power_compute` | `p_eq` against a 64-bit reference sum: random cases, single inputs, and all inputs at maximum coefficient |
| `tb_response_mask` | `valid` and the registered output for pass, mask, equality and unknown-history cases; `X_ff` never changes |
| `tb_power_guard` | end to end around the c17 benchmark (`tb/cut_c17.sv`), 400 three-vector tests; counts and requires setup-masked, launch/capture passed and masked, equality, held vector, whole test passed and rejected |
| `tb_power_guard_full` | the top at its default size around a 41-in/32-out stand-in CUT (`tb/cut_wide.sv`): 75 tests unguarded to find P_max, then the same tests at 80 % and 70 % of P_max; every passed response must be below the threshold |
| `tb_power_guard_table1` | the same threshold experiment at the pin counts of six ISCAS-85 circuits (c1355, c1908, c3540, c5315, c6288, c7552), with coefficients scaled to each circuit's peak power |

The CUTs in `tb/` are test models, not the benchmark netlists. Only c17 is
the real circuit. The others are arbitrary logic with the right pin counts.

Running one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  --top-module tb_power_guard -y rtl -y tb +libext+.sv -Irtl \
  rtl/pg_pkg.sv tb/tb_power_guard.sv -o sim
./obj_dir/sim
```

Every testbench runs in well under a second.
