# Speed-independent handshake circuits: an averaging filter, two multiplexers and a family of four-phase controllers

This is a set of small asynchronous circuits, none with a clock. Every
circuit talks to its neighbours over four-phase handshake channels. A sender
raises a request, the receiver raises an acknowledge, the sender lowers the
request, and the receiver lowers the acknowledge. Data, where there is data,
is *bundled*: a plain binary word is valid while its request is high.

Each controller is the logic that a state-graph synthesis tool produces from
a signal transition graph (STG). An STG is a Petri net whose events are the
rising (`x+`) and falling (`x-`) edges of the circuit's signals. The netlists
are *speed independent*: they work for any gate delays. Where the same input
values recur with different required outputs, the synthesis adds internal
state-coding signals (`csc0`, `csc1`, ..., and `z` in the filter) to tell
the states apart.

The circuits come from one set of worked examples, so they are independent
of each other. The top module `petrify_examples` places them side by side.

| circuit | module | what it does |
|---|---|---|
| averaging filter | `filter` (`filter_ctrl`, `hs_latch`, `bd_adder`) | one output word `(x + y) / 2` per input word `x`, where `y` is the previous input |
| all-bundled multiplexer | `abmux` (`abmux_ctrl`) | a control token carrying a select bit passes one word from input 0 or input 1 |
| dual-rail-control multiplexer | `drmux` | the same job, with the select sent on two rails |
| concurrent controller | `csc_ctrl_cg`, `csc_ctrl_gc` | req/ack to REQ/ACK; the two return-to-zero phases overlap; three state signals |
| serial controller | `serial_ctrl` | the output handshake finishes before the input is acknowledged |
| decoupled controller | `c_hs_ctrl` | `R = C(r, A')`, `a = R`: a Muller pipeline stage |
| latch stage | `latch_stage` | the decoupled controller driving a data latch |

## How asynchronous logic is written here

Every state-holding signal in these netlists has the form
`q = set + q · reset'`. It is built as one cell, `gc_element`, a generalized
C-element:

```systemverilog
always_latch
  if (rst)               q = INIT;
  else if (set || clr)   q = set;
```

A synthesized equation of the form `q = f(q, inputs)` becomes a
`gc_element` with `set = f(0, ...)` and `clr = ~f(1, ...)`. This is the same
Boolean function, written so that the feedback sits inside one latch rather
than in a combinational loop spread through the module. `c_element` is the
two-input Muller C-element (`set = a·b`, `clr = a'·b'`) built on it. All other
gates are plain `assign` expressions.

Things to know when you read or change this RTL:

* **Latches and loops are intended.** Lint reports circular logic
  (`UNOPTFLAT`), and synthesis reports latches and logic loops. These are
  the circuits' asynchronous state and handshake feedback. Verilator
  iterates the loops until they settle, which they do, because in every
  stable state of a correct environment no signal is excited.
* **Reset is added.** The synthesized equations have no reset. Each
  `gc_element` has an active-high asynchronous `rst` that forces the
  specified initial state. The concurrent controller starts with
  `csc0 = csc1 = csc2 = 1`. The all-bundled multiplexer starts with
  `csc0 = 1`. Everything else starts at 0.
* **Delays are zero.** The simulation evaluates every gate in zero time.
  This proves the logic function and the event order against a
  random-delay environment. It does not prove hazard freedom under real gate
  delays. That property belongs to the synthesized netlists themselves.
  Mapping them to gates that are not atomic complex gates needs the usual
  care.
* **Matched delays are zero.** In the bundled-data parts (the filter's
  latches and adder), the acknowledge is the request, delayed in silicon by
  a delay matched to the data path. In the RTL the acknowledge is the
  request itself. For a real implementation, put a delay element in
  `hs_latch` (`A = R`) and `bd_adder` (`Aa = Ra`).

## The averaging filter

The behaviour is

```
y := 0
loop  x := READ(IN);  WRITE(OUT, (x + y) / 2);  y := x  end
```

The data path has two level-sensitive latches (`hs_latch`) and an adder.
Each latch is transparent while its request is high. IN feeds latch `x`,
`x` feeds latch `y`, and `x` and `y` feed the adder (`bd_adder`). The adder
forms a `W+1`-bit sum and halves it, rounding down, so it never overflows.
The receiver is expected to capture OUT with its own latch, controlled by
`Rout`/`Aout`.

The hard part is the controller, `filter_ctrl`. Starting with every signal
at 0, one token goes through this cycle:

```
Rin+  → Rx+ → Ax+ → Ra+ → Aa+ → Rout+ → Aout+ → z+ → Rout- → Aout-
      → Ry+ → Ay+ → Rx- → Ax- → { Ain+ → Rin- }  ∥  { Ra- → Aa- }
      → z- → Ry- → { Ay- }  ∥  { Ain- → next Rin+ }
```

In words:

1. Latch `x` opens only once the input is valid and `y` has closed.
2. The adder runs, and the result is handed out and acknowledged.
3. Only then does `y` open to take the current `x`, so that `y := x` happens
   after the output is safe.
4. `x` closes again, and only then is the input acknowledged, so the sender
   may change IN.
5. The adder and the input channel return to zero in parallel.

The states before and after `Aout+` look alike on the inputs. The state
signal `z` tells them apart. The implementation is five simple gates and one
C-element:

```
Rx   = Rin · Ay'        Ry   = z · Aout'       Ain = Ry · Ax'
Ra   = Ax               Rout = Aa · z'
z    = C(Aout, Rin + Aa)
```

These equations were derived from the cycle above, one output at a time.
They agree with the structure of the published gate-level controller:
inverted-input gates, an OR of `Rin` and `Aa` feeding a C-element together
with `Aout`, and the C-element output named `z`. That drawing does not name
its other gate types, so the equations rest on the cycle. `Rout` in
particular is the two-input form `Aa · z'`.

Interface timing: IN must stay stable from `Rin+` until `Ain+`. OUT is
valid from `Rout+` until `Aout+`.

## The two handshake multiplexers

Both pass one word from one of two input channels to the output for each
control token. The input that is not selected is simply not acknowledged:
its request waits until a token selects it.

**All-bundled (`abmux`, controller `abmux_ctrl`).** The control channel is
`Ctl1Req`/`Ctl1Ack` with a bundled select bit `Ctl1`. `Ctl1 = 0` takes
input 0 and `Ctl1 = 1` takes input 1. `Ctl1` must be stable while `Ctl1Req`
is high. The controller has one state signal `csc0`, where 1 means input 0
is being served. It keeps the choice after the control request has been
withdrawn:

```
In1Ack  = OutAck · csc0'             In0Ack = OutAck · csc0
OutReq  : set   Ctl1Req · (In1Req · csc0' + In0Req · Ctl1')
          reset Ctl1Req' · (In1Req' · csc0' + In0Req' · csc0)
Ctl1Ack : set OutAck,                 reset OutAck' · csc0
csc0    : set OutAck' · Ctl1Req',     reset Ctl1Req · Ctl1
```

The data path is a two-way multiplexer steered by `Ctl1`. That is safe
because the control channel is acknowledged only at `OutAck+`, so `Ctl1`
stays valid for as long as `OutData` must.

**Dual-rail control (`drmux`).** The select arrives as a rising edge on
`ctl_f` (take `x`) or on `ctl_t` (take `y`), never both. The circuit is four
C-elements:

```
gx = C(x_req, ctl_f)     gy = C(ctl_t, y_req)     z_req = gx + gy
x_ack = C(gx, z_ack)     y_ack = C(gy, z_ack)     ctl_ack = z_ack
```

The second pair of C-elements holds the input acknowledge high until both
the input request and the control rail have returned to zero. `ctl_ack` is
`z_ack` itself, so that output is a wire from an input. The data
multiplexer is steered by `ctl_t`.

## The four-phase controllers

All four have a left push channel (`r` in, `a` out) and a right push channel
(`R` out, `A` in). They differ in how much the two handshakes may overlap.

**Concurrent controller (`csc_ctrl_cg`, `csc_ctrl_gc`).** After `r+`, the
controller issues `R+`. It acknowledges the left side while the right
handshake is still under way, and the two return-to-zero phases overlap.
With so much concurrency, many states share input values, so three state
signals are needed. All three start at 1. Two implementations of the same
specification are given. They use different state codings, so they are not
gate-for-gate the same:

* `csc_ctrl_cg` uses one complex gate per signal:

  ```
  a    = a(csc2 + csc0) + csc1'        R    = csc2(csc0(a + r) + R)
  csc0 = csc0(csc1' + a') + R'·csc2    csc1 = r'(csc0 + csc1)
  csc2 = A'(csc0'(csc1' + a') + csc2)
  ```

* `csc_ctrl_gc` uses one generalized C-element per signal, each with its
  own set and reset covers. The covers are listed in the module header.

**Serial controller (`serial_ctrl`).** A request runs a complete right-hand
cycle (`R+ A+ R- A-`) before `a+`. One set/reset state bit separates the two
halves:

```
a = csc0 · A'    R = r · csc0'    csc0 = A + r · csc0
```

`csc0` is set by `A` and reset by `r'`.

**Decoupled controller (`c_hs_ctrl`).** `R = C(r, A')` and `a = R`. The
output rises once a request is present and the previous output cycle has
been fully acknowledged. The input is acknowledged at the same moment. A
chain of these cells is a data-less FIFO.

**Latch stage (`latch_stage`).** The decoupled controller with a
latch-enable output: `Rout = C(Rin, Aout')`, `Lt = Rout`, `Ain = Lt`. The
data latch is transparent while `Lt = 0` and holds while `Lt = 1`. The word
is therefore captured at `Lt+`, no later than `Ain+`, which is the event
that lets the sender drop its data.

## What is not built, and other departures

* The source's controller for the dual-rail multiplexer, as a synthesized
  equation set, was not used. Those equations acknowledge the inputs without
  regard to the control rails, and in simulation they do not behave as a
  multiplexer. `drmux` uses the C-element circuit drawn for the same
  multiplexer instead.
* A technology-mapped netlist exists for the concurrent controller (library
  gates `oai12`, `aoi12`, `aoi22`, `nor3`, SR latches and a C-element). Taken
  literally, it deadlocks against a four-phase environment, so it was not
  built. The complex-gate and generalized-C versions are.
* The "two wires" controller (`a = A`, `R = r`), obtained when the
  specification is fully serial, needs no logic and has no module.
* Two further multiplexer variants, one with reduced concurrency and one
  with four-phase control, are only named in the source. They are not built.
* Data width `W` is 8 everywhere. The source never gives a width.
* The reset and all initial values other than `csc0..csc2 = 1` are this
  design's own choices.

## Testbenches and simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. A testbench
plays the environment with random 1–6 ns delays and checks the event order
the specification requires. Where there is data, it also checks the data
against a model worked out in the testbench. Some of the checks:

* the filter's outputs against `(IN[k] + IN[k-1]) / 2`;
* the multiplexers' outputs against the select sequence;
* the serial controller never acknowledging before the right side has
  returned to zero;
* the latch stage holding its word after the sender has scrambled its input.

`tb_petrify_examples` runs every circuit of the top together, at default
parameters, using `tb/hs_env.sv` as the environment of the four controllers.
It counts how often each mechanism occurred and fails if one never did:

* both inputs selected in each multiplexer;
* an input kept waiting;
* the filter's `y` holding a different previous word;
* the latch holding against a changed input.

Each testbench prints `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module tb_filter tb/tb_filter.sv
./obj_dir/Vtb_filter
```

Use `-Wno-UNOPTFLAT` to silence the expected loop warnings. Every
testbench finishes in well under a second.
