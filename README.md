# Thru-testable ex1: a small sequential circuit made easy to test without scan

Sequential circuits are hard to test because their feedback loops mean that
an automatic test-pattern generator has to reason over many clock cycles.
Full scan removes the problem by turning every flip-flop into a shift-register
stage. That costs area, one pin and long shift sequences. Partial scan
does the same for just enough flip-flops to break every loop.

The *thru-testable* approach takes a different route. Most circuits already
have **thru functions**: logic that, under some condition on other signals
(the **activator**), moves data one-to-one or onto from one register or input
to another register or output. Examples are a multiplexer, a load in a given
state, or an adder with one operand fixed. If every register on a feedback loop
lies on a chain of thru functions (a **thru path**) from an input to an
output, the test generator can set and observe those registers as it would in
an acyclic circuit. It can do so as long as two rules hold:

* no thru path needs itself, directly or through another path, to be
  activated, and
* when one signal would be needed at two different values in the same clock
  cycle (a *path dependency*), a **hold function** can delay one of the two
  uses.

Where a thru path is missing, a new thru function is added: a 2:1 multiplexer
in front of the flip-flop, selected by a new test input. A hold function is
added where needed: the register keeps its value under another new input. Only
registers that have no existing thru function into them need the extra logic.
This is why the result is smaller than partial scan.

This repository holds the RTL of the worked example `ex1` after this
treatment. `ex1` is a four-state controller and an 8-bit datapath written in
one process. The thru-testable version is `ex1_tt`, which is also the top.

## The ex1 circuit

Registers: `ps` (2 bits), `rega`, `regb`, `regc`, `regd`, `regf`, `regg`,
`rego` (8 bits each) and `rege` (1 bit): 59 flip-flops in total. Inputs are
`A`, `B`, `C`, `D` (8 bits), `E`, `clk` and `rst`. The output is `O = rego`.

| state | action | next state |
|---|---|---|
| s0 | `rega..regd <= A..D`, `rege <= E`, `regg <= 0` | s1 |
| s1 | `regf <= rega + regb` if `regc < regd` | s2 |
|    | `regf <= rega - regb` otherwise | s3 |
| s2 | `regg <= regf + regg + regf` | s1 if `rege = 0`, else s3 |
| s3 | `rego <= regg - 3` | s0 |

Arithmetic and the comparison are unsigned modulo 256. The encoding is
s0=00, s1=01, s2=10, s3=11. With `E = 1` and `C < D` one operation takes 4
clocks and gives `O = 2*(A+B) - 3`. With `C >= D` it takes 3 clocks and gives
`O = 0 - 3 = 0xFD`. With `E = 0` and `C < D` the circuit loops between s1 and
s2 forever, adding `2*(A+B)` to `regg` on each pass.

`rege` is a separate 1-bit register. It loads `E` and is the loop test in s2.
This reading is what gives the 59-flip-flop count.

## Thru paths of ex1, existing and added

The thru functions that ex1 already has:

* `A..E -> rega..rege`, active in s0;
* `rega -> regf` and `regb -> regf`, active in s1. Add and subtract are both
  one-to-one in either operand when the other is fixed;
* `regg -> rego`, active in s3 (`rego = regg - 3`);
* `rego -> O`, a plain wire.

`regg <= regf + regg + regf` does not count: `regg` feeds itself, and a thru
function whose activator or input is its own output is not used.

Two registers on feedback loops are therefore not covered. The state register
is one; it is the activator of all the other thru functions. `regg` is the
other. The method puts activator registers on one group of paths (TP1) and
the rest on another (TP2). Each group has its own new activator input, so that
the two groups never depend on each other.

| addition | activator | effect |
|---|---|---|
| TP1: `A[0] -> ps[1] -> ps[0] -> p` | `k1` | sets the state bit by bit from `A[0]`; the new output `p` shows `ps[0]` |
| TP2: `regf -> regg` | `k2` | closes the path `A -> rega -> regf -> regg -> rego -> O` |
| hold on `ps` | `h1` | freezes the controller |
| hold on `regf` | `h2` | keeps `regf` through an s1 |
| hold on `regg` | `h3` | keeps `regg` through an s0 or s2 |

A test typically uses TP1 to put the controller into the state that activates
an existing thru function. It then uses `h1` to keep the controller there
while data moves along TP2. `tb/tb_ex1_tt.sv` does exactly this: it carries
`0x5A` from `A` to `O` (as `0x57`) by steering the state through TP1.

With `k1 = k2 = h1 = h2 = h3 = 0`, `ex1_tt` is cycle for cycle the original
ex1. Leaving the three hold inputs at 0 gives the *partially thru-testable*
variant, which has no hold functions.

When several test inputs are high at once, hold wins over the thru load, and
the thru load wins over normal operation.

## Modules

| file | contents |
|---|---|
| `rtl/ex1_pkg.sv` | width `W = 8`, state enum, 59-bit register struct |
| `rtl/ex1_core.sv` | combinational next-state logic of ex1 (table above); `O = rego` |
| `rtl/tt_reg.sv` | flip-flop with thru multiplexer (`thru_en`, `thru_d`) and hold (`hold_en`); asynchronous reset to `RESET_VAL` |
| `rtl/ex1_tt.sv` | top: `ex1_core`, three `tt_reg` cells (`ps`, `regf`, `regg`) and plain flip-flops for the other registers |

Top ports: `clk`, `rst` (asynchronous, active high), `A`, `B`, `C`, `D`
(8 bits), `E`, `O` (8 bits), test inputs `k1 k2 h1 h2 h3` and test output `p`.
Each register is a single flip-flop stage. `O` and `p` come straight from
flip-flops.

The next-state logic is kept apart from the flip-flops on purpose. The same
logic can then be wrapped either by plain flip-flops or by flip-flops that
carry test functions, which is what the method does to a netlist.

## Where this departs from, or goes beyond, the method's description

* **Which registers receive additions is this design's choice.** For ex1 the
  method's published results give only counts. The thru paths above were
  worked out by applying its insertion procedure at word level. The result
  matches the published pin overhead for ex1: 5 new inputs, 3 of them hold
  activators, and 1 new output; 2 inputs and 1 output without holds. It also
  matches the published 59 flip-flops. The shape of TP1 (input -> state bits
  -> new output) and the holds on the state register and on `regf` follow the
  method's own worked example. The choices of `A[0]` as the TP1 source and of
  `regg` as the third held register are this design's own.
* **Thru-function count.** The published figure for ex1 is 52 new thru
  functions, counted on a synthesized gate-level netlist. Here 10 flip-flop
  inputs get a thru multiplexer (2 state bits, 8 `regg` bits), and 18
  flip-flops get a hold. The method runs on a gate-level netlist, where loops
  through individual bits are visible. At word level fewer additions are
  needed, and this RTL has not been checked with a sequential ATPG tool.
* **Reset.** All registers reset to 0. The original circuit resets only the
  state register.
* **Priority of test inputs** (hold > thru > normal) is a choice; the method
  does not say.
* **Not included:** the method's own tool flow (behavioural-model extraction,
  register-graph analysis, minimum feedback vertex set, ATPG); the
  gate-level example netlist used to explain the method, whose gate types
  are not given; and the ITC'99 benchmark circuits used in the evaluation.

## Simulating

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ex1_pkg.sv \
    tb/tb_ex1_tt.sv --top-module tb_ex1_tt -o sim
./obj_dir/sim
```

Use the same command with `tb_ex1_core` or `tb_tt_reg`.

* `tb_ex1_core` compares the next-state logic with a reference model, using
  random and boundary values in all four states.
* `tb_tt_reg` checks the three ways of loading the register and the
  asynchronous reset.
* `tb_ex1_tt` runs the top at its default size against a cycle-accurate model
  and compares all 59 register bits after every edge. It runs complete ex1
  operations and checks their results and cycle counts (4 or 3 clocks). It
  also exercises the s1/s2 loop, shifts a pattern through TP1, carries a value
  along TP2, and ends with 5000 cycles of random test inputs. It counts the
  add, subtract, loop, exit, TP1, TP2 and each hold, and fails if any of them
  never happened.
* `tb_ex1_ptt` uses only `k1`, `k2` and `p`, with the hold inputs tied to 0.
  This is the partially thru-testable variant. It sets the state through TP1,
  then carries random values from `A` to `O` through TP2 and checks
  `O = A - 3`. It also writes random states through TP1 and reads them back
  on `p`.

`ex1_tt` also has assertions for the controller's normal-mode transitions and
for the `regf` hold. Compile with `--assert` to check them during simulation.

To change the word width, edit `W` in `rtl/ex1_pkg.sv`. The testbenches assume
8 bits.
