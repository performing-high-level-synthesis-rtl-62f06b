# IMP1: a fixed register-transfer skeleton for single-loop programs

Any terminating or non-terminating algorithm can be rewritten, by a fixed set of program
transformations, into *single-loop form* (SLF):

    PROGRAM o_init (LOCVAR v_init (WHILE c (PARTIALIZE a)))

That is: one state triple `(x, o, v)`, one combinational loop body `a` that maps the state
to a new state, and one combinational loop condition `c`. `x` is loaded from the input,
`o` starts at the constant `o_init` and is the result, and `v` is a local variable that
starts at `v_init`. Branches, sequences and nested loops of the original program become
extra flag and phase variables inside `x`/`v` and multiplexers inside `a`.

Once a program has this shape, no scheduler or controller synthesis is needed. One
generic circuit, **IMP1**, runs *any* SLF program. It does one loop iteration per clock,
and it talks to its environment by a fixed start/reset/ready protocol, **IFC1**. The
interface behaviour is therefore separate from the algorithm: change `a` and `c` and the
protocol stays the same.

This repository contains:

* `imp1`: the generic IMP1 circuit. `a` and `c` plug into it through ports.
* `slf_unroll`: the loop-unrolling transformation as hardware. It packs `n+1` loop
  iterations into one clock.
* An example program to make the circuit concrete: Euclid's greatest common divisor by
  repeated subtraction (`gcd_a`, `gcd_c`, `slf_pkg`).
* `hls_imp1_top`: the whole design. It is the IMP1 circuit running the GCD program with a
  body unrolled once.

## The IFC1 protocol

This part needs the most care when you integrate the circuit. The signals are `data_in`,
`start`, `reset`, `data_out` and `ready`. The circuit is **free** in a cycle if:

* it was ready in the previous cycle, or
* it has just come out of power-on reset, or
* `reset` is high in this cycle.

The rules:

1. **Accepting a start.** If `start` is high in a cycle where the circuit is free, the
   program starts on the `data_in` of that cycle. A `start` while the circuit is busy is
   ignored.
2. **Idling.** If the circuit is free and `start` is low, `ready` is high and `data_out`
   repeats the previous cycle's value. After a result, `ready` and the result therefore
   stay until the next start.
3. **Running.** If the circuit is not free, `ready` is high exactly when the loop
   condition `c` is false on the current state. In that cycle `data_out` is the result.
4. **Latency.** A start accepted in cycle `t` on a program needing `k` loop iterations
   gives `ready` and the result in cycle `t + k`. If `k = 0` this is cycle `t` itself,
   because `ready` is combinational in `start`. `ready` stays low in between.
5. **Non-termination.** If the program never terminates for this input, `ready` never
   rises. Only `reset` ends such a run. `reset` makes the circuit free in the same cycle,
   so `reset` and `start` together abort the old run and start a new one.

Timing of a run with `k = 3`. The input is sampled in the start cycle only; `x` means
"don't care".

    cycle      t     t+1   t+2   t+3   t+4   t+5
    start      1     0     0     0     0     1
    data_in    D     x     x     x     x     D'
    ready      0     0     0     1     1     0      <- t+5: new run accepted
    data_out   x     x     x     f(D)  f(D)  x

A start in cycle `t+4` would also have been accepted, since `ready` was high in `t+3`.
Back-to-back operation therefore loses no cycle.

`ready`, and `data_out` in the result cycle, are combinational functions of `start`,
`reset` and `data_in`. If a register feeds these inputs, there is a combinational path
from them through `c` and `a` to `ready` and `data_out`.

## Inside IMP1

State registers (the names follow the circuit's labels):

| register | holds                     | next value             | power-on value |
|----------|---------------------------|------------------------|----------------|
| `D_T`    | ready of the last cycle   | `ready`                | true           |
| `D_q3`   | `x`, the data part        | `x` part of `a(state)` | `Q3`           |
| `D_q2`   | `o`, the output part      | `data_out`             | `Q2`           |
| `D_q1`   | `v`, the local variable   | `v` part of `a(state)` | `Q1`           |

Control (`imp1_ctrl`):

    free  = reset | D_T
    load  = start & free        -> input muxes take (data_in, o_init, v_init)
    hold  = ~start & free       -> output mux takes the current o
    ready = hold | ~c

Datapath (`imp1`):

    state    = load ? (data_in, o_init, v_init) : (D_q3, D_q2, D_q1)
    step_o   = c    ? o part of a(state)        : o part of state
    data_out = hold ? o part of state           : step_o

Three design points:

* **The output register is `o`.** `D_q2` stores what was on `data_out`, so the held
  result and the loop's `o` variable are the same flip-flops.
* **`D_q1` and `D_q3` load `a(state)` in every cycle,** even when idle or finished. Their
  contents only matter while a run is in progress, and the next start overrides them.
  This saves the enable logic.
* **`a` and `c` are outside the module.** `imp1` drives the current state on
  `st_x_o`/`st_o_o`/`st_v_o`, and takes back `c_i` and the three parts of `a` on
  `a_x_i`/`a_o_i`/`a_v_i`. `a` and `c` must be purely combinational.

`imp1` holds two concurrent assertions that encode IFC1:

* `reset` without `start` gives `ready`.
* `ready` followed by a cycle without `start` keeps `ready` and `data_out`.

## Writing a program for it: the GCD example

The example computes

    while (p != q) { if (p > q) p -= q; else q -= p; }  return p;

The `return p` after the loop has to move into the single loop. A done flag in `v` does
this, which is the usual device when loops and sequences are merged into one loop:

* `a`: if `p != q`, subtract the smaller operand from the larger. Otherwise set `o = p`
  and `v = 1`.
* `c`: `(p != q) | ~v`
* `o_init = 0`, `v_init = 0`

With `s` subtraction steps the loop runs `k = s + 1` iterations. If one operand is zero
and the other is not, the subtraction never progresses. This is a deliberate example of
the non-terminating case: `ready` stays low until `reset`.

To run another program:

1. Write its `a` and `c` as combinational modules over its own state type.
2. Instantiate `imp1` with matching `XW`/`OW`/`VW`.
3. Wire the state ports to `a` and `c`, as `hls_imp1_top` does.

## Loop unrolling (`slf_unroll`)

The loop-unrolling transformation rewrites `WHILE c (PARTIALIZE a)` into a loop whose body
is:

* `a` once, unconditionally, then
* `n` copies of `s -> c(s) ? a(s) : s`.

In hardware this is a combinational chain of `n+1` copies of `a` and `n` copies of `c`.
The chain goes between the state multiplexers and the registers of IMP1; `c` itself is
unchanged. A program of `k` iterations then needs `ceil(k / (n+1))` clocks, at the cost of
a longer combinational path and more area.

`UNROLL_N` on `hls_imp1_top` (default 1) sets `n`; 0 gives the plain loop.
`tb_hls_imp1_unroll` runs the same 103 operand pairs on `n = 0, 1, 3`. It measured 4898,
2474 and 1265 clocks in total.

For the GCD program the guard happens not to matter for correctness, because `a` leaves a
finished state unchanged. `slf_unroll` still implements the guard, and its testbench checks
it on states where it matters.

## Files and parameters

| file                 | contents |
|----------------------|----------|
| `rtl/slf_pkg.sv`     | GCD state types (`gcd_x_t`, `gcd_state_t`), width `GCD_W = 16`, `o_init`/`v_init` |
| `rtl/imp1_ctrl.sv`   | free/load/hold/ready gates and `D_T` |
| `rtl/imp1.sv`        | generic IMP1: muxes, `D_q1..D_q3`, IFC1 assertions. Parameters `XW`, `OW`, `VW`, `Q1..Q3` |
| `rtl/gcd_a.sv`       | GCD loop body |
| `rtl/gcd_c.sv`       | GCD loop condition |
| `rtl/slf_unroll.sv`  | unrolled body, parameter `N` |
| `rtl/hls_imp1_top.sv`| top: ports `clk`, `rst_ni`, `data_in` (`{p, q}`, 32 bits), `start`, `reset`, `data_out` (16 bits), `ready`. Parameter `UNROLL_N` |

Synthesised at the defaults, the top has 50 flip-flop bits (32 `x`, 16 `o`, 1 `v`,
1 `D_T`) and about 40 word-level cells.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/slf_pkg.sv tb/tb_hls_imp1_top.sv \
              --top-module tb_hls_imp1_top
    ./obj_dir/Vtb_hls_imp1_top

Replace the testbench name to run the others.

* `tb_hls_imp1_top` runs the top at its defaults over about 160 GCD runs.
* `tb_imp1` checks the generic circuit with a program of its own: a counting loop with
  zero-iteration and non-terminating inputs.
* `tb_imp1_ctrl`, `tb_gcd_a`, `tb_gcd_c` and `tb_slf_unroll` compare against reference
  models.
* `tb_hls_imp1_unroll` compares the unrolling factors.

`tb_hls_imp1_top` checks every result against a reference GCD, and every latency against
`ceil(k/(n+1))`. It also counts the protocol events and fails if any never occurs:

* idle hold
* start while busy
* abort of a non-terminating run by `reset`
* `reset` together with `start`
* back-to-back start
* a final clock that used only part of the unrolled body

## What is taken from the method and what is this design's own

From the method:

* the IMP1 structure: which multiplexer selects what, under which gate, and which
  register feeds which multiplexer
* the IFC1 rules, including power-on as the `t = 0` case
* the SLF program shape
* the structure of the unrolled body

This design's own choices:

* **The GCD example program.** The method fixes no program. This is only a demonstration
  workload. No performance or area figures were published for IMP1 to compare against.
* **All widths.** The method leaves the types free; here they are 16-bit operands and a
  1-bit flag.
* **The default unrolling factor of 1.**
* **The power-on reset `rst_ni`.** It is asynchronous and active-low, and loads `D_T = 1`
  and `D_q1..3 = Q1..Q3`. The protocol's own `reset` is a plain input, sampled
  combinationally.
* **`a` and `c` as ports of `imp1`.** In the method they are parameters of the circuit, but
  SystemVerilog cannot pass a module as a parameter. For the same reason `slf_unroll`
  instantiates the GCD modules directly and would need editing for another program.

Not covered: the transformation process itself, i.e. deriving an SLF program from an
arbitrary one and choosing which optimisations to apply. It is a proof-and-rewriting
method, not hardware. Any other interface pattern besides IFC1 is also out of scope.
