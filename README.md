# Bidirectional IO multiplexing circuit

A chip made of several modules can be pad-limited: its pads, not its core,
set the die size. One remedy is to let modules share pads. An earlier remedy
shares a pad only among module inputs, or only among module outputs, and
needs every module to have matching numbers of each. This circuit lets **one
pad carry the inputs of some modules and the outputs of others**. A few
control bits choose which module owns the pad at a given moment.

The circuit has two parts around the pad:

```
                 +-------------+ --> input of module 1
   PAD --+-----> | distributor | --> ...
         |       +-------------+ --> input of module e
         |             ^ M1..Mc
         |       +-------------+ <-- output of module e+1
         +<----- | multiplexer | <-- ...
         |       +-------------+ <-- output of module p
         |             ^ Mc+1..Mn
         +--- W -------^   (pad value fed back into the multiplexer)
```

* The **distributor** hands the pad value to the input of one module chosen
  by control bits M1..Mc and holds every other module input at 0.
* The **multiplexer** chooses what is driven onto the pad. Control bits
  Mc+1..Mn pick either the output of one output module or the wire **W**.
* **W** is the key to the bidirectional use. It carries the pad's own value
  back into the multiplexer. In an input state the multiplexer selects W, so
  the pad driver repeats exactly what the external source is putting on the
  pad. The driver needs no enable, it never fights the source, and the last
  bit of an earlier output state cannot linger on the pad into the next
  input state.

## The four-module example (default configuration)

With the default parameters the circuit is the worked example: the inputs of
modules 1, 2 and 3 and the output of module 4 share one pad, steered by three
control bits (M1, M2, M3):

| (M1, M2, M3) | working state       | pad is driven by     |
|--------------|---------------------|----------------------|
| (0, 0, 1)    | input of module 1   | external source      |
| (0, 1, 1)    | input of module 2   | external source      |
| (1, 0, 1)    | input of module 3   | external source      |
| (x, x, 0)    | output of module 4  | module 4             |

The gate equations are:

```
input of module 1 = IO & ~M1 & ~M2
input of module 2 = IO & ~M1 &  M2
input of module 3 = IO &  M1 & ~M2
IO (driven)       = (~M3 & output of module 4) | (M3 & IO)     -- the W term
```

Two properties follow directly from the gates, and the RTL keeps both:

* The distributor does not look at M3. In the output state the pad carries
  module 4's data, and that data also reaches whichever of modules 1-3 M1 and
  M2 select. If no module should see it, set M1 = M2 = 1: that code selects
  no module. Otherwise the selected module must ignore its input in this
  state.
* The pad driver is always on. In input states it drives the pad's own value.

## Static and dynamic realisations

The circuit exists in two transistor-level forms, and the top selects one with
the `DYNAMIC` parameter:

* **Static CMOS (`DYNAMIC = 0`, default).** Each output is a NAND/NOR-style
  complex gate plus an inverter. In RTL the whole circuit is combinational:
  no clock, no state, zero cycles of latency. In a 0.35 um process the static
  circuit was characterised at about 0.1 ns of delay and 2.5 GHz; it is the
  better of the two forms (lower power-delay product), hence the default.
* **Dynamic (domino) CMOS (`DYNAMIC = 1`).** Each output is a precharged
  node with a clocked footer, a keeper transistor and an output inverter,
  modelled by `domino_stage`. Its pull-down network computes the same
  function as the static gate, so the dynamic top feeds the static gate
  functions into one `domino_stage` per output. All outputs are 0 while
  `clk = 0` (precharge). While `clk = 1` (evaluate) they show the result in
  the same cycle, and a discharged node stays discharged until the next
  precharge. This also applies to the pad driver, which therefore drives
  0 during every precharge phase, even in input states. A system using this
  form has to treat the pad as valid only in the evaluate phase.

`domino_stage` is a behavioural model (a latch on the dynamic node, no
delays). It simulates and synthesises, but a real dynamic gate is a
transistor-level cell, not standard-cell logic.

## Generalisation: any number of input and output modules

`N_IN` (modules 1..e that take input) and `N_OUT` (modules e+1..p that give
output) are parameters. The control fields are binary, generalising the
example's table:

* `m_dist` (M1..Mc, M1 is the MSB), `DIST_SEL_W = max(1, ceil(log2 N_IN))`
  bits: code k < N_IN selects module k+1; larger codes select none.
* `m_mux` (Mc+1..Mn), `MUX_SEL_W = ceil(log2(N_OUT+1))` bits: code k < N_OUT
  selects output module e+1+k; codes >= N_OUT select W.

With N_IN = 3 and N_OUT = 1 these codes are exactly the table above. The
binary encoding for other sizes is this implementation's own choice; only
the structure (distributor, multiplexer, W) comes from the original design.

## Files

| file | contents |
|------|----------|
| `rtl/bidir_io_pkg.sv` | control-field widths as functions of N_IN / N_OUT; enum of the example's working states |
| `rtl/io_distributor.sv` | distributor (decode AND gates), with an assertion that at most one module input is active |
| `rtl/io_multiplexer.sv` | multiplexer with the W input |
| `rtl/domino_stage.sv` | behavioural model of one dynamic gate (precharge, evaluate, keeper) |
| `rtl/bidir_io_mux.sv` | top: distributor + multiplexer + W, static or dynamic |
| `tb/tb_io_distributor.sv` | exhaustive check against the gate equations (N_IN = 3 and 5) |
| `tb/tb_io_multiplexer.sv` | exhaustive check against the gate equation (N_OUT = 1 and 3) |
| `tb/tb_domino_stage.sv` | precharge, evaluate, hold after discharge, keeper |
| `tb/bidir_io_scenario.sv` | reusable end-to-end environment: pad net, module models, external device, checker |
| `tb/tb_bidir_io_mux.sv` | end-to-end test of the default top (static, 3 inputs + 1 output), plus a directed check of the control-bit table |
| `tb/tb_bidir_io_mux_variants.sv` | end-to-end tests: dynamic 3+1, static 4+3, dynamic 5+2 |

### Top-level ports (`bidir_io_mux`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | precharge (0) / evaluate (1); used only when `DYNAMIC = 1` |
| `m_dist` | in | DIST_SEL_W | M1..Mc |
| `m_mux` | in | MUX_SEL_W | Mc+1..Mn |
| `io_i` | in | 1 | value present on the pad (pad receiver) |
| `io_o` | out | 1 | value the circuit drives onto the pad |
| `mod_in` | out | N_IN | inputs of modules 1..e |
| `mod_out` | in | N_OUT | outputs of modules e+1..p |

The pad cell is outside the RTL. It joins `io_o` and any external driver into
one net and returns that net as `io_i`. The path `io_i -> io_o` through W
is combinational, so a simulation that models the pad net as
`io_i = external_drives ? external_value : io_o` contains a combinational
loop (Verilator reports UNOPTFLAT in the testbench). The loop is harmless:
in input states the external value breaks it, and in output states W is not
selected.

## Verification

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. The end-to-end environment
(`bidir_io_scenario`) moves 8-bit words, one bit per clock cycle. It first
alternates input and output states so that every module and both kinds of
mode switch occur, then continues in random order. It checks every bit
against its own reference:

* the selected module input equals the pad bit, all others are 0;
* in input states the driven value equals the pad value (W), also in the
  first bit after an output state that ended with the opposite value;
* in output states the pad carries the selected module's bit, and the
  distributor hands it to the module that M1..Mc select;
* each word arrives complete within exactly 8 cycles;
* with `DYNAMIC = 1`, every output is 0 during each precharge phase.

It counts each mechanism (each working state, input-to-output and
output-to-input switches, W repeats, idle codes, precharge phases) and fails
if one never happened. `tb_bidir_io_mux` runs the top with all parameters
at their defaults. Beside the scenario, it applies the four rows of the
control-bit table directly to a second instance of the top, with every
combination of data values and, in the output state, of the two
don't-care bits.

To run one with plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/bidir_io_pkg.sv tb/tb_bidir_io_mux.sv --top-module tb_bidir_io_mux
./obj_dir/Vtb_bidir_io_mux
```

Replace the testbench name for the others. Each runs in well under a second.

## What is not modelled, and where the RTL departs from the circuit

* **Timing, power and area.** The published figures (static: 0.098-0.101 ns
  delay, 2.5 GHz, about 327 pW, 57.5 x 50.4 um^2 in 0.35 um; dynamic:
  0.114-0.127 ns, 1.6-2 GHz, 57.5 x 54.9 um^2) are properties of the
  transistor-level circuits. The RTL has no delays.
* **Drive buffers.** The original places two series inverters for drive
  strength. They are logically the identity and are left out.
* **Pad cell and the modules themselves** are outside this RTL (see ports).
* **Control bits** are plain inputs. Where they come from (pins, a register,
  a controller) is left to the chip. The static form needs no reset because
  it holds no state. The dynamic form's state is cleared by every precharge
  phase.
* **Dynamic form**: the keeper is modelled only as "the node keeps its
  value". Charge sharing, which is the keeper's actual purpose, does not exist
  in a two-state logic model.
* **Sizes other than 3 + 1** use this implementation's binary control
  encoding (see above).
