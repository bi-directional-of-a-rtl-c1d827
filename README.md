# Bi-directional built-in test circuit for open interconnects on assembled PCBs

An open solder joint between an IC and the board leaves an IC pin floating.
A floating pin does not reliably read as a stuck-at value, so logic-level
tests (boundary scan, for example) can miss it. This design detects the open
through **supply current** instead.

Each targeted pin gets a small sensing cell built around a CMOS inverter. The
cell weakly drives the pin with a slow test signal, Tsig, that sits around half
of V_DD.

- **Pin intact.** The other IC's driver holds the pin at H or L. The inverter
  input stays at a rail, and the inverter draws almost no current.
- **Pin open.** Nothing else drives the pin, so it follows Tsig into the range
  where both of the inverter's transistors conduct. The IC's supply current
  i_DDS then rises with every Tsig crest.

A shift register selects one cell per test-clock cycle. The *cycle* in which
i_DDS rises therefore tells which interconnect is open. A direction signal,
TIS, turns every pad buffer round. In one direction the input interconnects
are sensed at the receiving IC's Di pins. In the other, the output
interconnects are sensed at the Do pins. Both ends of a board net can be
covered this way.

This repository holds synthesizable RTL for the digital parts: the shift
register and the direction buffers. The analog parts have behavioural models:
the sensing cell, the Tsig source and the board interconnect. A board-level top
joins them into a daisy chain of ICs, and self-checking testbenches run the
whole test sequence.

## How a cell turns an open into current (`tc_cell`)

Each cell contains:

- an input multiplexer;
- two transmission-gate switches, AS_1 and AS_2;
- an nMOS pull-down, NM_1;
- an inverter used as the current sensor;
- an output multiplexer.

| Q_k (from the shift register) | AS_1 (pin to node) | AS_2 (Tsig via R_S to node) | NM_1 (node to GND) | inverter input |
|---|---|---|---|---|
| L (not selected / initialization) | off | off | on | 0 V, no current |
| H, pin driven H or L | on | on | off | V_DD or 0 V, no current |
| H, pin open | on | on | off | follows Tsig, current flows |

The model computes the inverter input as an integer in millivolts. The inverter
current is a triangle. It is zero below V_i1 = 0.7 V and above V_i2 = 2.6 V,
and peaks at 1 mA at V_DD/2 = 1.65 V. Tsig = 0.8 V + 0.8 V·sin(2π·1 MHz·t)
swings between 0 V and 1.6 V. At its crest an open pin therefore draws about
0.95 mA, and in its trough nothing. An open shows up as current pulses, two
per test-clock period.

The detection threshold i_TH is taken as 100 µA. The document gives no value
for it: it is to be set from unit-to-unit variation.

- **Input multiplexer.** Selects the targeted pin: Di_k while TIS = L, Do_k
  while TIS = H.
- **Output multiplexer.** Passes the pin level to the core in normal mode
  (TMS = H). In test mode (TMS = L) it passes the inverter-input level, so every
  unselected cell presents a clean L downstream.

The result leaves on `out_fwd` (towards the core) when TIS = L, and on
`out_rev` (back out through the Di pad) when TIS = H. Each output is computed
only from its own direction's pin. This keeps the two directions from forming
a combinational loop through the board.

## The selection pulse (`shift_register`)

The shift register has three parts:

- N D-flip-flops clocked by TCK and cleared asynchronously by RST (active low);
- a two-input AND gate in front of the first flip-flop;
- an RS flip-flop that closes that AND gate once Q_1 has been set.

The first IC of a chain sees TMi as a step that stays H. A later IC sees a
one-cycle pulse from its predecessor's TMo. Either way, exactly one H pulse is
launched after each reset. It then walks one stage per TCK:

```
TCK edge after TMi rises:   1     2     3   ...   N     N+1
Q_1                         H     L     L         L     L
Q_2                         L     H     L         L     L
Q_N  (= TMo)                L     L     L         H     L
```

The RS flip-flop is implemented as a flip-flop set on the same edge that loads
Q_1. This gives the same cycle behaviour as the level-sensitive original
without a latch. An assertion checks that at most one Q is high.

## Two directions (`dir_buffer`, `test_circuit`)

Every pad has a `dir_buffer`: two opposed tristate buffers enabled by TIS.

- **Input buffers (IB).** On TMi and on each Di pad. The pad is an input while
  TIS = L.
- **Output buffers (OB).** On TMo and on each Do pad. The pad is an output
  while TIS = L.

| | TIS = L (inputs tested) | TIS = H (outputs tested) |
|---|---|---|
| shift register input | TMi pad | TMo pad |
| shift register output Q_N | driven on TMo | driven on TMi |
| cell k senses | Di_k | Do_k |
| cell k output | core input k | driven out on Di_k |
| Do_j | driven by core output j | input |

With TIS = H the test levels travel backwards. The tester drives the last IC's
Do pads. Each IC passes them through its cells to its Di pads, and on to the
Do pads of the IC before it.

If an IC has more cells than outputs (N_I > M_I), the extra cells see a driven
L in this direction and never flag.

`test_circuit` holds one IC's set of blocks:

- IB_1 … IB_{N_I+1};
- OB_1 … OB_{M_I+1};
- the shift register;
- N_I cells.

Its `idd_ua` output is the sum of the cells' inverter currents.

## Test sequence and fault location (`pcb_assembly`)

The top models a board of `NUM_IC` ICs in a daisy chain:

- TMo of IC#k drives TMi of IC#k+1;
- TCK, RST, TMS, TIS and Tsig are shared;
- the supply currents add up to `idds_ua`;
- Do_j of IC#k is wired to Di_j of IC#k+1 by a `pcb_net`, whose `open_defect`
  bit cuts that net.

The defaults are two ICs with two inputs and two outputs each. Each core is
plain wiring from input j to output j, as in the two-IC reference experiment.
`M_I` must equal `N_I` in this top.

The test runs in three phases:

1. **Normal mode:** TMS = H. Pins pass straight to the cores, and no current
   flows.
2. **Initialization:** TMS = L, RST = L. All Q outputs are L, every NM_1
   grounds its inverter, and no current flows.
3. **Test:** RST = H, then TMi = H (or the last IC's TMo, for TIS = H). The
   pulse visits IC#1 cells 1..N_I, then IC#2 cells 1..N_I, and so on. TIS = H
   reverses the IC order.

Slot *s* (1-based) after the launching edge therefore selects:

- **TIS = L:** IC number ⌊(s−1)/N_I⌋, cell (s−1) mod N_I, counting ICs and
  cells from 0.
- **TIS = H:** the same, with the IC order reversed.

An open on the net between Do_j of IC#i and Di_j of IC#i+1 (both counted
from 0) appears in slot (i+1)·N_I + j + 1 when TIS = L. When TIS = H it appears
in slot (NUM_IC−1−i)·N_I + j + 1. In the default board, an open on IC#2's
input Di_1 raises i_DDS in the third TCK cycle of the test, and only there.

## Modelling conventions

- **Pads and nets.** Pads and nets are `bist_pkg::pin_t` pairs `{drv, val}`
  rather than tristate nets. `drv = 0` is a floating node. Each `pcb_net` end
  receives only the *far* end's drive, never its own, so a receiving pad
  floats when the net is open. A `pcb_net` assertion flags both ends driving
  one intact net.
- **Units.** Voltages are `int` millivolts, currents `int` microamperes.
- **Tsig source.** `tsig_gen` is a sampled sine. A sample clock (`tsig_clk`,
  10 ns period) steps a phase counter through a table that `$sin` computes at
  elaboration. RST resets the phase.
- **Synthesizable vs behavioural.** `shift_register` and `dir_buffer` are
  synthesizable logic. `tc_cell`, `tsig_gen` and `pcb_net` model analog or
  board parts: they elaborate and lint, but they do not describe real gates.

## Files

| file | what it is |
|---|---|
| `rtl/bist_pkg.sv` | `pin_t`, supply/Tsig/inverter constants, i_TH |
| `rtl/shift_register.sv` | SR: D-FF chain, AND gate, RS-FF |
| `rtl/dir_buffer.sv` | IB/OB direction buffer |
| `rtl/tc_cell.sv` | sensing cell (behavioural) |
| `rtl/tsig_gen.sv` | Tsig source (behavioural) |
| `rtl/pcb_net.sv` | board interconnect with open injection (behavioural) |
| `rtl/test_circuit.sv` | one IC's test circuit |
| `rtl/pcb_assembly.sv` | top: daisy-chained board |
| `tb/tb_*.sv` | one self-checking bench per module |

### Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `pcb_assembly` | `NUM_IC`, `N_I`, `M_I` | 2, 2, 2 | two-IC reference board |
| `pcb_assembly` | `TSIG_STEP_NS` | 10 | own choice |
| `tsig_gen` | `VDC`, `VAC` (mV) | 800, 800 | reference experiment |
| `tsig_gen` | `RS` (Ω) | 2500 | reference experiment |
| `tsig_gen` | `F_AC_HZ` | 1 000 000 | own choice: no value given |
| `tc_cell` | `VI1`, `VI2` (mV) | 700, 2600 | own choice |
| `tc_cell` | `IPEAK` (µA) | 1000 | own choice |
| `pcb_net` | `RP_MOHM`, `CP_PF` | 100, 10 | reference experiment |

`pcb_net` keeps `RP_MOHM` and `CP_PF` for reference only; the model neglects
their 1 ps time constant.

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and stops on a watchdog if
it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv tb/tb_pcb_assembly.sv \
          --top-module tb_pcb_assembly -Mdir obj && ./obj/Vtb_pcb_assembly
```

Replace the bench name to run another one. `tb_pcb_assembly` runs the board
at its default size, with TCK and Di_1 at 500 kHz and Di_2 held H. It covers:

- the normal-mode data path;
- a defect-free test in both directions;
- every single open net in both directions;
- an open tester connection.

It checks the shift-register outputs in every cycle, and checks that each open
is detected in exactly its own cycle. It also counts each mechanism it
exercises (initialization, single pulse, chain hand-off, both directions,
detection, location); a mechanism never seen is a failure.

`tb_pcb_chain` runs the same top with four ICs of three pins each. In both
directions it covers:

- every single open net;
- random pairs of opens.

It checks that i_DDS crosses i_TH in exactly the predicted cycles.

The unit benches cover the following:

- **`tb_tc_cell`** sweeps Tsig across every pin state against an independently
  computed current curve.
- **`tb_tsig_gen`** compares samples with the sine formula and measures the
  period.
- **`tb_shift_register`** checks step and pulse inputs, re-launch blocking and
  asynchronous reset.
- **`tb_test_circuit`** runs one IC with three inputs and two outputs through
  normal mode, the input test and the output test.

## How far to trust it, and where it departs from the source

These points follow the source description:

- the block structure of the test circuit (N_i+1 input buffers, M_i+1 output
  buffers, an N_i-stage shift register with AND gate and RS flip-flop, N_i
  cells);
- the switch settings per Q level;
- the TIS and TMS meanings;
- the daisy chain;
- the supply, Tsig and R_S values, and the parasitic values.

These are this design's own reading:

- **Multiplexer controls.** Which signal steers each cell multiplexer
  (TIS/TMS) is not given and is inferred from the described behaviour.
- **Reverse path.** The path the shift-register pulse and the test levels take
  when TIS = H is inferred from the opposed tristate buffers.
- **Numeric values.** The inverter thresholds, the current shape and peak,
  i_TH and the Tsig frequency have no published values.
- **Clocking.** The clock edge and the asynchronous reset are assumed.
- **Sense cells.** The cells are idealised. A driven pin fully overrides Tsig,
  the switches have no resistance, and Tsig's distortion under load is not
  modelled.

Not modelled:

- **Resistive (partial) opens.** Outside the scope of the method as published.
- **The IC logic core.** Not specified; the top uses plain wiring.
- **Pad ESD and output protection.** Analog structures with no logic function.
- **The tester's current measurement.** The benches apply the threshold rule
  i_DDS ≥ i_TH to the modelled current in its place.
