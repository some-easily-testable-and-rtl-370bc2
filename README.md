# Easily testable AND/EOR networks

Any Boolean function can be written as an exclusive-OR ("ring") sum of
product terms. A circuit built that way, with one AND gate per term and a
chain of two-input EOR gates to add the terms up, is unusually easy to
test: an EOR gate passes every change at one input to its output whatever
the other input does. So a fault anywhere in the chain, or a wrong AND
output, reaches the output. A few extra control inputs can also switch
single gates on, off or to their complement, which makes it possible to say
*where* a fault is.

This repository holds synthesizable SystemVerilog for four such
realizations, following the paper "Some Easily Testable and Diagnosable
Network Realizations":

| Realization | Module | Idea | Locates faults |
|---|---|---|---|
| Network (I) | `network_i` | positive-polarity sum; two control inputs per term | yes |
| Network (II) | `network_ii` | complemented inputs allowed, so fewer terms and levels; a parity output checks the input buses | no (detection only) |
| Network (III) | `network_iii` | identical blocks, each forming any term from its control inputs; a universal, regular array | yes |
| Sequential circuit | `sequential_network_ii` | Network (II) with D flip-flops fed back as extra inputs | no |

The paper compares these networks with an earlier network that has no
control inputs. That network is Network (I) with its controls fixed
(`c1 = '1`, `c2 = '0`) and is not provided separately.

All four are purely gate-level: AND gates, EOR gates and, in the sequential
circuit, D flip-flops. Nothing is pipelined. The interesting part is the
structure and what the extra control and observation inputs let a tester do.

## The running example

The paper works one 5-variable function through all the networks. As a
positive-polarity sum (only true literals) it has a constant and 16 terms:

```
f5 = 1 ^ x1x3 ^ x1x2x3 ^ x1x2x4 ^ x3x4 ^ x1x3x4 ^ x2x3 ^ x2x3x4 ^ x1x2x3x4
       ^ x1x5 ^ x2x5 ^ x1x2x5 ^ x3x5 ^ x3x4x5 ^ x1x3x4x5 ^ x2x3x4x5 ^ x1x2x3x4x5
```

When complemented literals are allowed, the same function needs 4 terms:

```
f5 = ~x3~x5 ^ x1x2x4 ^ ~x1~x2~x3x5 ^ ~x1~x2x3~x4~x5
```

The literals that must be complemented in the 4-term form were worked out
by checking all 32 input values against the 16-term form. This is the only
assignment of complements to these four terms that gives the same function,
with a constant of 0. The terms have 2, 3, 4 and 5 literals.

Every network defaults to this function (Network (III) is programmed with it
at run time), so the same test vectors exercise all of them. The
16-term form costs 16 EOR levels in Network (I); the 4-term form costs 4
levels in Network (II).

## Shared building block: `eor_cascade`

`eor_cascade #(W)` is a chain of W two-input EOR gates with a head input `c`:
`out = c ^ in[0] ^ ... ^ in[W-1]`. It is deliberately *not* a balanced tree.
The chain is what the paper specifies, and its depth is what the paper calls
the number of "logic levels". Each gate has its own net
(`g_gate[k].v`). That keeps the structure visible after elaboration and lets
a test bench force a single gate.

## Network (I): a control pair per term

Level `i` has an AND gate that forms the term `t_i` from uncomplemented
inputs, plus one more input, `c1[i]`. It also has an EOR gate with the
control `c2[i]`:

```
t'_i = t_i & c1[i]
h_i  = t'_i ^ c2[i]
f    = x0 ^ h_m ^ ... ^ h_1          (level 1 sits next to the output)
```

| c1 | c2 | h_i | use |
|---|---|---|---|
| 1 | 0 | t_i | normal operation |
| 1 | 1 | ~t_i | test: complement of the term |
| 0 | 0 | 0 | level switched off |
| 0 | 1 | 1 | level forced to 1 |

Terms are set by the parameter `TERM`, one N-bit mask per level. Bit `j-1`
is set when `x_j` is in the term, and index `i-1` is level `i`. The default
is the 16-term example with `x0 = 1`.

Because every level can be switched off, the tester can isolate one level.
With all other levels off, `f = x0 ^ h_i`, so each AND gate, each control EOR
and each collector gate can be examined on its own. The cost is
`n + 2m + 2` pins (39 for the example), which is why Network (I) suits only
functions with few terms. `t_prime` and `h` are extra observation outputs
for test benches. The circuit itself needs only `f`.

## Network (II): complements, and a parity check on the inputs

This is the densest idea in the design.

**Complement control.** Every input passes an EOR gate, `y_j = x_j ^ z`. In
operation `z = 1`, so the `y` lines carry `~x_j`. An AND gate that needs
`~x_j` takes the `y` line, and one that needs `x_j` takes the `x` line. In
`network_ii` these choices are the masks `USE_Y` and `USE_X`. One pin, `z`,
therefore provides every complement. The pin also gives a test mode: with
`z = 0` every AND gate sees only true inputs. For the example, that makes the
network compute `x3x5 ^ x1x2x4 ^ x1x2x3x5 ^ x1x2x3x4x5`, a value the tester
can predict.

**Parity output.** A second EOR chain runs over the `y` lines:
`w = cw ^ y_1 ^ ... ^ y_n`. Any single stuck line on the input buses
changes `w` for some input, even where the AND gates hide it.

**Why odd and even n differ.** A stuck `z` changes all n lines it drives at
once, and an even number of changes cancels in an EOR chain. With odd n a
single `z` is fine. With even n the control is split into `z1`, `z2`, each
driving an odd number of lines, so a fault on either still flips `w`. The
port `z` is therefore 1 bit wide for odd N and 2 bits wide for even N
(`tdn_pkg::z_width`). `Z1_LINES` sets how many lines `z1` drives. The default,
N-1 for even N, is this design's choice; the paper only requires both counts
to be odd. The pin count is n+5 for odd n and n+6 for even n.

**Test set.** n+6 vectors, in the order (c0; x1..xn; z; cw), with `-` for
"any value":

| vector | c0 | x | z | cw |
|---|---|---|---|---|
| I1 | 0 | all 1 | 0 | 1 |
| I2 | 1 | all 1 | 0 | 0 |
| I3 | 0 | all 0 | 0 | 1 |
| I4 | 1 | all 0 | 0 | 0 |
| I5 | - | all 1 | 1 | - |
| I6 | - | all 0 | 1 | - |
| T_j (j = 1..n) | - | all 1 except x_j = 0 | 0 | - |

For the example (n = 5) these 11 vectors detect every one of 38 injected
single stuck-at faults. The faults are on the `z` stem, each `y` line, each
AND output, each collector gate and each parity-chain gate
(`tb/network_ii_fault_sim_tb.sv`).

**Finding the terms.** The RTL takes the terms as parameters. The paper
derives them with a greedy method. Start with `f` equal to the target. While
`f` has ON-set minterms, choose `k` with `2^k >= |ON[f]| > 2^(k-1)` and
consider every term with at least `n-k` literals (either polarity). Among
these, take the term `g` that leaves the fewest ON-set minterms in `f ^ g`,
then set `f = f ^ g`. The chosen terms, added up, give `f`. This is an
offline step and is not part of the hardware.

## Network (III): a universal array of identical blocks

Block `B^i` (`network_iii_block`) has one EOR gate per variable and one AND
gate: `y^i = &(x ^ c^i)`. What each control terminal is driven with decides
the term:

| drive c^i_j with | literal of x_j in the term |
|---|---|
| 0 | x_j |
| 1 | ~x_j |
| ~x_j | absent (the literal is 1) |
| x_j | block switched off (the literal is 0) |

`network_iii` has K blocks on a shared input bus. An EOR chain headed by
`c0` collects the outputs: `f = c0 ^ y^k ^ ... ^ y^1`. The function lives
entirely in what drives the `c` terminals, so the same hardware realizes
any function that fits in K terms.

**Why K = 2^(n-1) is enough.** Fix x1..x4 to one of its 16 values. The
function is then one of 0, 1, x5 or ~x5 of the remaining variable. Give each
of the 16 blocks the minterm of x1..x4 together with the right x5 literal,
or switch the block off. That covers any 5-variable function. The default is
`K = 2**(N-1)` = 16 for N = 5. The paper phrases the bound as "more than
2^(n-1)" blocks; this construction needs exactly 2^(n-1), plus `c0`. The test
benches check the construction on random truth tables.

**Fault location.** Each block and each collector gate can be driven
separately, so a fault can be traced to one block or to one collector gate.
The paper says this is possible but does not give the procedure. The one in
`tb/network_iii_fault_location_tb.sv` is this design's own:

1. Switch every block off. If `f` no longer follows `c0`, a collector gate
   is stuck. Switch single blocks on, starting at the head of the chain;
   only blocks after the stuck gate still move `f`.
2. Switch each block on alone as the constant term 1. A block that does not
   move `f` has its output or a literal stuck at 0.
3. In each block, set one literal to 0 and the others to 1. If `f` moves,
   that literal is stuck at 1.

Of the 224 single stuck-at faults injected (block outputs, literal nets and
collector gates), all 224 are located. A similar procedure on Network (I)
(`tb/network_i_fault_location_tb.sv`) uses the four level modes. It names
the faulty level and whether its AND gate or its control EOR is stuck, and
at which value, for 96 of 96 faults.

Spare blocks, which the paper proposes for repair, are simply a larger K.

## Sequential circuit

`sequential_network_ii` puts S D-type flip-flops around Network (II). Their
outputs `q` become extra input lines after `x`. Each extra line gets its own
complement EOR and its own gate in the parity chain `w`. There are S+1
collectors. Collector k (head `cs[k-1]`) produces the next state `g[k-1]`
of flip-flop k, and collector 0 (head `c0`) produces the output `f`.
`DEST[t]` is a one-hot word that assigns term t to one collector: bit 0 is
the output and bit k is next state k. Terms that belong to other collectors
enter a chain as 0. Through `cs` the tester can invert any next state.

The paper gives no function for this circuit. The default is an example of
this design's own, a 2-bit counter with enable `x[0]`, in operation
(`z = 1`, `c0 = cs = 0`):

```
g1 = q1 ^ x1      g2 = q2 ^ q1 x1      f = ~q1 ~q2   (state 0 flag)
```

The flip-flops load on the rising edge of `clk`. `rst_n` is an asynchronous
active-low reset to 0, which is also this design's addition. `f`, `g` and
`w` are combinational in the current inputs and state. With an even number
of lines (N+S), `z` is split as in Network (II). The paper's drawing has a
single `z`.

## Top level

`testable_networks_top` places the realizations side by side. They are
alternatives, not parts of one machine, so each keeps its own ports:

* `n1_*`: Network (I), the 16-level example.
* `n2_*`: Network (II), n = 5, the 4-level example.
* `n2e_*`: Network (II), n = 4, with `z1`/`z2`. Its function,
  `~x1x2 ^ x3~x4 ^ x1x2x3x4`, is this design's own example of the even case.
* `n3_*`: Network (III), 16 blocks of 5 inputs.
* `sq_*`: the sequential counter.

In operation, drive these values:

* `n1_c1 = '1`, `n1_c2 = '0`, `n1_x0 = 1`
* `n2_z = 1`, `n2_c0 = 0`
* `n2e_z = 2'b11`, `n2e_c0 = 0`
* `sq_z = 1`, `sq_c0 = 0`, `sq_cs = 0`
* for `n3_c`, the controls of the wanted terms

## Changing the function

* **Network (I).** Set `N`, `M` and `TERM`, one N-bit mask per level. Bit
  `j-1` stands for `x_j`. Put the constant term on `x0`.
* **Network (II).** Set `N`, `M`, `USE_X` and `USE_Y`, one pair of masks per
  AND gate, with term `g_j` at index `j-1`. A gate with both masks zero is the
  constant 1, which is better folded into `c0`. For even N, `Z1_LINES` must
  be odd.
* **Sequential circuit.** Set `N`, `S`, `M`, `USE_X`, `USE_Y` and `DEST`
  over the lines `{q, x}`.
* **Network (III).** Nothing to change. Drive `c` as in the table above.

## Files and simulation

`rtl/` holds:

* `tdn_pkg.sv`: the helpers that size `z`.
* `eor_cascade.sv`
* `net2_input_stage.sv`: the complement gates and the parity chain.
* `network_i.sv`
* `network_ii.sv`
* `network_iii_block.sv`
* `network_iii.sv`
* `sequential_network_ii.sv`
* `testable_networks_top.sv`

Each module has a test bench `tb/<module>_tb.sv`, and `tb/tdn_tb_pkg.sv`
holds the reference functions. Three more benches go further:

* `network_ii_fault_sim_tb`: runs the test set against injected faults.
* `network_i_fault_location_tb`: fault location in Network (I).
* `network_iii_fault_location_tb`: fault location in Network (III).

Every bench computes its expected values independently of the RTL masks.
Every bench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog. `testable_networks_top_tb` runs the whole top at its default sizes:

* all three networks compute the example for all 32 inputs;
* then each mechanism is exercised: level modes and isolation, test mode,
  the test set, the parity flips for z / z1 / z2, Network (III) programmed
  with random functions, and counting, wrap-around and an inverted next
  state in the sequential circuit.

The bench fails if any of these never occurs.

To run a bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tdn_pkg.sv tb/tdn_tb_pkg.sv tb/testable_networks_top_tb.sv \
    --top-module testable_networks_top_tb -o sim
./obj_dir/sim
```

For lint, use `verilator --lint-only -Wall -Irtl rtl/tdn_pkg.sv rtl/<module>.sv`.
The code uses only synthesizable constructs in `rtl/`. Its only state is the
two flip-flops of the sequential example.

## Where this design departs from the paper or fills gaps

* **Complement bars.** The complemented literals of the 4-term example were
  recovered by exhaustive comparison with the 16-term form (see above). The
  result agrees with the paper's drawing of that example: constant 0, z = 1,
  gates of 2 to 5 inputs.
* **Parity chain.** `w` is taken over the `y` lines, one EOR gate per input.
  The general drawing could also be read as tapping the `x` lines. Either
  reading satisfies the test set above.
* **Even n.** For even n, `z1` drives the first n-1 lines and `z2` the last.
  The paper fixes only that both counts are odd.
* **Test counts.** The paper's summary table lists n+2 tests under
  Network (II) and n+6 under Network (III), the reverse of its theorems
  (n+6 for Network (II), n+2 for Network (III)). This design follows the
  theorems. The n+2 tests for Network (III) and the tests for Network (I)
  are not spelled out in the paper and are not reproduced. The fault-location
  benches use their own procedures.
* **Sequential circuit.** The example function and the reset are this
  design's own.
* **Observation outputs.** The extra outputs (`t_prime`, `h`, `y`, `g`,
  block outputs) are not part of the paper's pin counts.
* **Fault models.** Faults are modelled as stuck-at values on gate outputs
  and nets. The paper also allows "any fault" in an EOR gate and stuck-at
  faults on AND gate inputs, which these benches do not inject.
