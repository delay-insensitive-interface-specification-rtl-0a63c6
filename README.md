# Delay-insensitive handshake elements

This is a small library of clockless building blocks for circuits whose
modules talk only by handshakes. A module that follows such a protocol stays
correct whatever the wire and gate delays are. Each element is defined by
the order in which its signal transitions must happen. It is then built as a
few gates, some of which feed their own output back to hold state. There
are four elements:

| element | module | what it does | realisation |
|---|---|---|---|
| D element | `di_d_element` | runs a handshake on its right port nested inside the return-to-zero half of a handshake on its left port | three gates, one of them state-holding, plus an added internal state signal |
| JOIN | `di_join` | one output transition after both inputs have made one | Muller C-element, one state-holding gate |
| MERGE | `di_merge` | one output transition for each transition of either input | XOR gate, or an OR gate in a restricted environment |
| MUTEX | `di_mutex` | grants at most one of two requests | behavioural model only |

`di_elements_top` places all four side by side. They are independent cells
and are not wired to each other. Their ports come out with the prefixes
`d_`, `j_`, `m_` and `x_`.

## Reading the protocols

A transition is written as the signal name followed by `+` (rise) or `-`
(fall). "x -> y" means the element answers a transition on input x with a
transition on output y. The environment must wait for that answer before it
makes its next move. Outside that rule, no timing is assumed. None of the
elements has a clock.

## D element: a sequencer with a hidden state bit

Ports: left request `ar` (in) and acknowledge `ak` (out). Right request `br`
(out) and acknowledge `bk` (in). Starting with every signal low, one cycle is:

```
ar+ -> ak+        left request is acknowledged at once
ar- -> br+        release of the left request starts the right handshake
bk+ -> br-        right side acknowledges, right request withdrawn
bk- -> ak-        only now is the left acknowledge withdrawn
```

The left side therefore sees its return-to-zero phase stretched over a
complete four-phase handshake on the right. Chaining D elements this way
sequences operations.

The inputs and outputs alone do not decide what the element should do next.
Take the state just after `ar+ ak+` and the state just after `bk+ br-`. The
visible signals differ only in inputs that are about to change, and for the
same input values the outputs have to behave differently. So one internal
signal, `csc0`, is added. The gates are:

```
ak   = ~csc0 | bk
br   = ~ar & ~csc0
csc0 = (~ar & csc0) | bk          // holds its value through feedback
```

Here is `csc0` over one cycle:

| step | ar | bk | csc0 | ak | br |
|---|---|---|---|---|---|
| rest | 0 | 0 | 1 | 0 | 0 |
| ar+ | 1 | 0 | 0 | 1 | 0 |
| ar- | 0 | 0 | 0 | 1 | 1 |
| bk+ | 0 | 1 | 1 | 1 | 0 |
| bk- | 0 | 0 | 1 | 0 | 0 |

At rest `csc0` is 1. `ar+` clears it, which raises `ak`. `bk+` sets it
again, which drops `br`. `ak` is held high through the `bk` term until `bk`
falls.

**Reset (added in this design).** With `ar = bk = 0`, the `csc0` gate is
stable at either value. Only `csc0 = 1` is the correct rest state: with
`csc0 = 0`, both `ak` and `br` would be high. The module therefore has an
active-high `rst` that forces `csc0` to 1. Assert `rst` while `ar` and `bk`
are low, then release it before the first request. `csc0` is also an output
port, so that it can be observed.

## JOIN: the C-element

```
c = b(a + c) + ac
```

When `a` and `b` agree, `c` takes their value. When they differ, `c` keeps
its value. In a two-phase environment, `a` and `b` each toggle once and `c`
then toggles once. With `a = b = 0` the equation forces `c = 0`, so
initialising the inputs initialises the element. It has no reset pin.

## MERGE: XOR, or OR when the environment allows

In the general case, the environment toggles either `a` or `b` and waits
for `c` to toggle. An XOR gate does exactly this. In a more restricted
environment, one input makes a full up/down pair (each half answered by
`c`) before either input is used again. The two inputs are then never high
together, and a cheaper OR gate gives the same behaviour. The parameter
`IMPL` (type `di_pkg::merge_impl_e`) chooses between them:

| `IMPL` | gate | use it when |
|---|---|---|
| `MERGE_XOR` (default) | `c = a ^ b` | inputs toggle freely, one at a time |
| `MERGE_OR` | `c = a \| b` | each input returns to 0 before the next request |

The top uses the XOR version.

## MUTEX: simulation model only

Each client runs a four-phase handshake on its pair: `r0+ -> g0+`,
`r0- -> g0-`, and likewise for `r1`/`g1`. The two grants are never high
together. A request that arrives while the other grant is high waits until
that grant falls.

A real mutex has to settle the metastable state that follows two requests
arriving together. That takes an analog filter behind a cross-coupled latch,
and no network of logic gates can do it. `di_mutex` is therefore a
behavioural model and is not synthesizable. It reacts `GRANT_DELAY` time
units (default 1) after any request change. First it withdraws a grant whose
request has fallen. Then, if no grant is high, it grants a pending request.
When two requests tie, the winner alternates. This stands in for the random
outcome of the real element. An immediate assertion checks that the grants
never overlap.

## What the tools will say

- **Combinational loops on `csc0` and `c`.** These are the state-holding
  gates of the D and JOIN elements. They are intended, and they converge:
  every input change the protocol allows settles in one step.
  Verilator reports them as `UNOPTFLAT` warnings.
- **Latches in `di_mutex`.** These appear when synthesis ignores the model's
  delays. The model is not meant to be synthesized.
- **No glitch or hazard modelling.** The gates are ideal and zero-delay. The
  simulations show that each element follows its protocol. They say nothing
  about hazards in a particular cell library. A silicon realisation has to
  keep each state-holding equation as one complex gate, or check its
  decomposition for hazards.

## Where this design goes beyond the element definitions

- The `rst` pin and the `csc0` output of the D element.
- The choice to put both MERGE gates in one module, selected by a parameter.
- Everything about the MUTEX model's timing and how it breaks ties.

The gate equations, the handshake orders and the signal names are the
elements' own.

## Files

- `rtl/di_pkg.sv`: the `merge_impl_e` type.
- `rtl/di_d_element.sv`, `rtl/di_join.sv`, `rtl/di_merge.sv`,
  `rtl/di_mutex.sv`: the elements.
- `rtl/di_elements_top.sv`: the four elements side by side.
- `tb/tb_<module>.sv`: one self-checking testbench per module.

Each testbench acts as the element's intended environment, with random
gaps between transitions. It checks every output after each step, and
checks that nothing moves early during the gaps. The MUTEX bench also forces
simultaneous requests. The top-level bench runs all four environments
concurrently. It fails if any mechanism never occurred: a nested D-element
handshake, a JOIN waiting for its second input, a MERGE transition from each
input, a MUTEX request waiting, or a MUTEX tie. Each bench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

All benches use plain Verilator 5 with timing support, for example:

```
verilator --binary --timing --assert -Wno-UNOPTFLAT -Irtl -y rtl \
    rtl/di_pkg.sv tb/tb_di_elements_top.sv --top-module tb_di_elements_top
./obj_dir/Vtb_di_elements_top
```

Replace the last file and the top-module name to run another bench.
`-Wno-UNOPTFLAT` only silences the intended feedback loops described
above. Each run takes well under a second.
