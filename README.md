# Fault-injectable QCA half adder

Quantum-dot cellular automata (QCA) compute with cells of four quantum dots
holding two electrons; a cell's polarization (+1 or -1) is a logic 1 or 0, and
cells influence their neighbours by Coulomb repulsion instead of current. The
logic primitives are the three-input **majority voter** (MV), the
**inverter**, and wires: straight, **L-shaped**, **fanout** and coplanar
**crossover**. At these sizes cells are easily lost when the molecules are
deposited. A single missing cell does not disable a device. It changes the
device's function in a predictable way. So each device has a small, fixed
list of logic faults.

This RTL is the logic-level model of a QCA half adder that is built, on
purpose, from more devices than needed: 4 majority voters, 2 inverters,
6 L-shaped wires, 2 fanouts and a crossover. Each device can be switched into
each of its faults through auxiliary inputs. Injecting the faults one at a
time shows how a missing cell in any device shows up at `sum` and `carry`,
and which input vectors detect it. The clocked top also reproduces the
latency of the QCA layout: `carry` one QCA clock cycle and `sum` two cycles
after the inputs.

## Devices and their faults

| Device | Module | Fault free | Fault (missing cell) | Control |
|---|---|---|---|---|
| Majority voter | `qca_mv` | `AB + BC + AC` | stuck-at-B: output = B (cell beside input A or C missing) | `fault0=0, fault1=1` |
| | | | Maj(A', B, C') (centre cell missing) | `fault0=1` (`fault1` ignored) |
| Inverter | `qca_inv` | `A'` | stuck-at-A: output = A | `fault=1` |
| L-shaped wire | `qca_lwire` | `A` | stuck-at-A': output = A' | `fault=1` |
| Fanout | `qca_fanout` | `f1 = f2 = A` | stuck-at-A' on branch `f1` only | `fault=1` |
| Crossover | (wiring) | passes both signals | none modelled | none |

A voter with one input tied to 0 is an AND gate; tied to 1, an OR gate.
Faults on inputs, outputs and the crossover are outside the fault model.

The voter's encoding `fault0=1, fault1=1` has been described both as
Maj(A',B,C') and as unused. Here `fault0=1` alone selects Maj(A',B,C'), so
both readings give the same result.

## The half adder netlist (`qca_half_adder`)

```
In1 -> Fanout1 --f1 (fanout11)--> INV1 ------------------------> MV1.B
               --f2 (fanout12)--> MV4.B
                              \-> LSW1 -> [crossover] -> LSW4 -> MV2.A
In2 -> Fanout2 --f1 (fanout22)--> LSW3 ------------------------> MV1.C
               --f2 (fanout21)--> MV4.C
                              \-> LSW2 -> INV2 ----------------> MV2.B
MV1.A = 0   MV1 = In1'In2 -> LSW5 -> MV3.B
MV2.C = 0   MV2 = In1 In2' -> LSW6 -> MV3.C
MV3.A = 1   MV3 = sum   = MV1 + MV2
MV4.A = 0   MV4 = carry = In1 In2
```

The voters' B inputs matter because stuck-at-B copies B. The B input of MV1
is the inverted In1, so MV1 stuck-at-B makes `sum` = 1 for In1 = In2 = 0. The
B input of MV4 is In1, so MV4 stuck-at-B makes `carry` = In1. Each fanout's
faultable branch `f1` is the one that does not reach MV4. As a result,
faults in MV4 change only `carry`, and every other fault changes only `sum`.

### Fault dictionary

Output values are listed for the input vectors `{In1,In2}` = 00, 01, 10, 11.
The rows come from the circuit equations, and the testbenches check every
entry.

| Fault | sum | carry | Detected by |
|---|---|---|---|
| none | 0 1 1 0 | 0 0 0 1 | - |
| MV1 stuck-at-B / Maj(A',B,C') | 1 1 1 0 (In1'+In2') | unchanged | 00 |
| MV2 stuck-at-B / Maj(A',B,C') | 1 1 1 0 | unchanged | 00 |
| MV3 stuck-at-B / Maj(A',B,C') | 0 1 0 0 (In1'In2) | unchanged | 10 |
| MV4 stuck-at-B | unchanged | 0 0 1 1 (In1) | 10 |
| MV4 Maj(A',B,C') | unchanged | 1 0 1 1 (In1+In2') | 00, 10 |
| INV1, Fanout1 | 0 0 1 1 (In1) | unchanged | 01, 11 |
| INV2, LSW2 | 0 1 0 1 (In2) | unchanged | 10, 11 |
| Fanout2, LSW3 | 1 0 1 0 (In2') | unchanged | 00, 01 |
| LSW1, LSW4 | 1 1 0 0 (In1') | unchanged | 00, 10 |
| LSW5 | 1 0 1 1 (In1+In2') | unchanged | 00, 01, 11 |
| LSW6 | 1 1 0 1 (In1'+In2) | unchanged | 00, 10, 11 |

Every single fault can be detected. No two vectors cover all of them, but
three do, for example {00, 01, 10}.

## Clock zones and latency

A QCA circuit is clocked in four zones. Each zone passes through four phases
(switch, hold, release, relax), and each zone runs a quarter period behind
the one before it. A value therefore moves forward one zone per quarter
period, and four zones per QCA clock cycle.

- `qca_clock_gen` counts quarters: one edge of `clk` is one quarter period.
  It reports the phase of each zone in `zone_phase[k]`. Zone k switches when
  `quarter == k`.
- `qca_zone_pipe` models a chain of zone stages. Stage i belongs to zone
  i mod 4. It copies the stage before it only in its zone's switch quarter,
  and holds its value in the other three.
- `qca_half_adder_top` places `4*SUM_CYCLES` zone stages behind `sum` and
  `4*CARRY_CYCLES` stages behind `carry`. The defaults are 2 and 1 cycles,
  as in the layout.

The source layout does not say which device lies in which zone. The stages
therefore sit after the combinational netlist. The output values and the
latencies are the same as if the stages were spread through the netlist. The
timing of signals inside the layout is not modelled.

Timing at the top:

- `in1`, `in2` and `faults` are sampled at the rising edge at which
  `quarter` reads 0. Values at other edges are ignored.
- Take that edge as E. `carry` shows the result after edge E+3, so it can be
  read from edge E+4. `sum` shows it after edge E+7, readable from edge E+8.
- Each output then holds its value for a full period (four edges).
- `rst_n` is synchronous and active low. It clears the quarter count and all
  zone stages to 0.

## Fault-injection interface

`hdlq_pkg::ha_fault_t` is a packed 18-bit struct. Index 0 of each field is
device 1:

| Field | Bits | Devices |
|---|---|---|
| `mv_fault0` | [17:14] | MV1..MV4 `fault0` |
| `mv_fault1` | [13:10] | MV1..MV4 `fault1` |
| `inv_fault` | [9:8] | INV1, INV2 |
| `fanout_fault` | [7:6] | Fanout1, Fanout2 |
| `lwire_fault` | [5:0] | LSW1..LSW6 |

All zeros (`HA_FAULT_FREE`) is the fault-free circuit. Several faults may be
set at once; the netlist simply applies all of them.

## How far this model goes

- Only logic is modelled. The electrostatics of the cells, bistable
  cell-level simulation and the physical causes of the faults are not. A
  missing cell is represented only by the device fault it causes.
- The devices are unidirectional and have no timing of their own. QCA
  wires can in principle carry signals both ways; that is not modelled.
- The following are this design's own readings, where the circuit
  description leaves room:
  - which branch of each fanout is `f1`;
  - the A and C letters of the voters other than their B inputs;
  - the placement of the zone stages;
  - the reset behaviour.

  The fault dictionary above follows from these choices.
- Where the published summary of fault effects disagrees with the device
  models and the worked example, this RTL follows the models. MV1 stuck-at-B
  gives `sum` = 1 for In1 = In2 = 0, as the worked example says, although
  the summary lists its effect as 0 (fault free 1).

## Files and simulation

`rtl/` holds the package `hdlq_pkg`, the four device models, `qca_half_adder`,
`qca_clock_gen`, `qca_zone_pipe` and the top `qca_half_adder_top`.

Each block has a self-checking testbench in `tb/`. Each prints one line,
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_qca_mv`, `tb_qca_inv`, `tb_qca_lwire`, `tb_qca_fanout` | each device, exhaustively, with and without faults |
| `tb_qca_half_adder` | the fault dictionary above, the MV1 example, and which output each fault affects |
| `tb_qca_clock_gen` | the phase sequence and the quarter-period offsets between zones |
| `tb_qca_zone_pipe` | chains of 1, 4, 5 and 8 stages, to the exact edge |
| `tb_qca_half_adder_top` | end to end at default parameters. Inputs and single faults change randomly every quarter, with a mid-run reset. Both outputs are checked at every edge, and the test reports how often each fault class showed at an output. |
| `tb_fault_table` | runs every single fault through the clocked top, prints the fault dictionary, and finds the smallest complete test set |

Every file needs the package first. For example:

```
verilator --binary --timing --assert -Irtl rtl/hdlq_pkg.sv rtl/qca_*.sv \
    tb/tb_fault_table.sv --top-module tb_fault_table -Mdir obj
./obj/Vtb_fault_table
```

Use the same command with another testbench and its `--top-module`. The
simulator has two states, so every register is reset before it is read. For
lint, run `verilator --lint-only -Wall -Irtl rtl/hdlq_pkg.sv rtl/qca_half_adder_top.sv`.
