# Stack-based configurable NAND/NOR key gates

Logic locking protects a gate-level netlist from piracy, overbuilding and
reverse engineering by making part of its function depend on secret key bits.
Only with the correct key does the chip compute the intended function. The
usual key gates are an XOR or a small lookup table inserted in a wire, and
they cost area, power and delay on every gate they protect.

This design replaces an ordinary two-input gate with one configurable cell.
A single key bit decides whether the cell is a NAND or a NOR:

| key | a | b | y |
|-----|---|---|---|
| 0   | 0 | 0 | 1 |
| 0   | 0 | 1 | 1 |
| 0   | 1 | 0 | 1 |
| 0   | 1 | 1 | 0 |
| 1   | 0 | 0 | 1 |
| 1   | 0 | 1 | 0 |
| 1   | 1 | 0 | 0 |
| 1   | 1 | 1 | 0 |

An attacker who extracts the netlist sees the same cell in both cases. The
function only becomes fixed when the key is loaded.

The RTL contains:

* the configurable gate, `stack_nand_nor`;
* a demonstration netlist, `nandnor`. It is the ISCAS-85 benchmark c17, locked
  with two such gates;
* a functionality-strip unit, `cube_strip`, and a restoration unit,
  `func_restore`, on one output of `nandnor`.

Everything is combinational. There is no clock and no reset.

## Inside the configurable gate

The cell's transistors form three groups. `stack_nand_nor` writes each group as
a Boolean conduction term. A PMOS conducts when its gate is low, and an NMOS
when its gate is high.

* **PMOS stack.** PMOS A and PMOS B are in parallel from VDD. A PMOS driven by
  the key is in series with them, on the way to OUT. The stack can pull OUT
  high only while key = 0. It then conducts when A or B is 0, which is the
  pull-up of a NAND.
* **NMOS stack.** An NMOS driven by the key is in series with NMOS A and NMOS B,
  which are in parallel to ground. The stack can pull OUT low only while
  key = 1. It then conducts when A or B is 1, which is the pull-down of a NOR.
* **Shared-function section.** This section is always active. PMOS B and
  PMOS A are in series from VDD to OUT, and NMOS A and NMOS B are in series
  from OUT to ground. It gives the outputs that NAND and NOR have in common:
  a = b = 0 gives 1, and a = b = 1 gives 0.

The table below shows which group drives OUT in each case:

| key | a, b equal? | pulls OUT up             | pulls OUT down         | function |
|-----|-------------|--------------------------|------------------------|----------|
| 0   | a = b = 0   | shared section and stack | none                   | NAND     |
| 0   | a ≠ b       | PMOS stack               | none                   | NAND     |
| 0   | a = b = 1   | none                     | shared section         | NAND     |
| 1   | a = b = 0   | shared section           | none                   | NOR      |
| 1   | a ≠ b       | none                     | NMOS stack             | NOR      |
| 1   | a = b = 1   | none                     | shared section and stack | NOR    |

The two functions differ only when a ≠ b. Only that case has to be steered by
a key transistor. No input is used inverted, so the cell needs no input
inverters. A NAND/AND cell, by contrast, would need inverted inputs.

The module's output is the value of the pull-up term. An immediate assertion
checks that exactly one network conducts for every input and key value. That
means the output is never left floating and the supplies are never shorted.
The key encoding is the enum `lock_pkg::gate_key_e` (`KEY_NAND` = 0,
`KEY_NOR` = 1).

The model stays at the logic level. It says nothing about transistor sizes,
drive strength or delay. In a real flow this cell would be a custom standard
cell, and `stack_nand_nor` describes its function and structure.

## The locked benchmark: `nandnor`

c17 has five inputs, two outputs and six NAND gates. The top-level module maps
the c17 inputs 1, 2, 3, 6 and 7 to ports `i1` to `i5`. Nodes 11 and 16 become
key gates:

```
n10 = NAND(i1, i3)
n11 = KEYGATE(i3, i4;  k2)          // stack_nand_nor
n16 = KEYGATE(i2, n11; k1)          // stack_nand_nor
n19 = NAND(n11, i5)
o1  = restore(strip(NAND(n10, n16)))  // c17 output 22
o2  = NAND(n16, n19)                  // c17 output 23
```

Nodes 11 and 16 were chosen because each drives two gates, so a wrong key bit
reaches both outputs. Placing key gates in a larger netlist means choosing a
different node set. The placement rule is left to the designer.

**Ports.**

| port           | direction | width | meaning                                           |
|----------------|-----------|-------|---------------------------------------------------|
| `i1`..`i5`     | in        | 1     | c17 primary inputs                                |
| `k1`, `k2`     | in        | 1     | gate keys (`gate_key_e`): 0 = NAND, 1 = NOR       |
| `rk`           | in        | 5     | restoration key                                   |
| `o1`, `o2`     | out       | 1     | c17 outputs 22 and 23                             |

**Parameter.** `CUBE` (5 bits) is the protected input cube. Its default is
`5'b10110`, set by `lock_pkg::DEFAULT_CUBE`.

**Correct key.** The correct key is `k1 = k2 = 0` and `rk = CUBE`. With it, the
netlist computes c17 exactly. Every other one of the 127 key values makes at
least one output wrong for at least one input pattern. The testbench checks
this exhaustively.

## Functionality strip and restore

The strip/restore pair follows the structure that SAT-attack-resilient
schemes share:

* `cube_strip` inverts the original output for one input pattern, the
  protected cube. The cube is fixed in the hardware (parameter `CUBE`). So the
  netlist itself no longer implements the original function.
* `func_restore` compares the inputs with the key `rk`. On a match it inverts
  the output again.

When `rk = CUBE`, the two inversions cancel and the function is restored. Any
other `rk` leaves the output wrong on two patterns: the cube and the value of
`rk`. Both units use an exact-match comparator, which is Hamming distance 0.
Both have a `hit` output. `nandnor` leaves the `hit` outputs open, so that no
key-related signal leaves the locked block. Lint reports the open pins as
`PINCONNECTEMPTY`, and they are deliberate.

## Where this RTL departs from the source description

* **Benchmark netlist.** The source names c17 and larger ISCAS-85 circuits
  (c432, c880, c1355, c2670) as benchmarks but gives none of their netlists.
  The c17 netlist used here is the standard one. The larger circuits are not
  included.
* **Key-gate placement.** The choice of nodes 11 and 16 is this design's own.
* **Strip/restore.** The source does not give the insides of the strip/restore
  pair, how wide it is, or where it connects. The exact-match units, the 5-bit
  `rk` port, the default cube and their placement on `o1` are this design's
  own choices.
* **No `i6` port.** The source's top-level symbol also shows an input `i6`, but
  c17 has only five inputs. This netlist therefore has no `i6`.
* **Not built.** The XOR/multiplexer key cell of earlier work, and a PUF that
  would personalise the key, are mentioned only as background and are not
  part of this RTL.

## Files

| file                     | contents                                            |
|--------------------------|-----------------------------------------------------|
| `rtl/lock_pkg.sv`        | key enum, c17 input count, default protected cube   |
| `rtl/stack_nand_nor.sv`  | configurable NAND/NOR key gate                      |
| `rtl/cube_strip.sv`      | functionality-strip unit                            |
| `rtl/func_restore.sv`    | restoration unit                                    |
| `rtl/nandnor.sv`         | locked c17 (top level)                              |
| `tb/tb_*.sv`             | one self-checking testbench per module              |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog stops a run that hangs.

* `tb_stack_nand_nor` applies all eight (key, a, b) combinations twice. It
  compares the output with the truth table above, stored as a literal constant.
* `tb_cube_strip` tests all patterns, with the default cube and with a second
  cube set by parameter.
* `tb_func_restore` tests all 32 × 32 combinations of key and input, with both
  values of `f_in`.
* `tb_nandnor` sweeps all 4096 combinations of inputs, gate keys and
  restoration key at default parameters, using an independent reference model
  of the locked netlist. It also checks two properties:
  * the correct key reproduces c17;
  * every wrong key is observable.

  It counts each mechanism and fails if one never happens. The mechanisms are
  NAND mode, NOR mode, shared-function input pairs, the strip unit firing,
  the restore unit firing, strip and restore cancelling, and wrong-key
  corruption.

Each testbench was also run against a deliberately broken copy of its module,
and it reports failures there. The broken copies were: the key polarity
swapped, a comparator bit ignored, and a key gate wired to the wrong key bit.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/lock_pkg.sv tb/tb_nandnor.sv --top-module tb_nandnor
./obj_dir/Vtb_nandnor
```

Replace `tb_nandnor` with another testbench name to run that one. Each run
finishes in well under a second.

## Using the key gate elsewhere

To lock another netlist, replace chosen two-input NAND or NOR gates with
`stack_nand_nor` and give each its own key bit. The correct key bit is
`KEY_NAND` where the original gate was a NAND, and `KEY_NOR` where it was a
NOR. To add strip/restore to another output, widen `N` to the number of
inputs that the cube should cover.
