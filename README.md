# 8 kb standard-cell memory with a pass-transistor latch bitcell

At near-threshold supply voltages (around 0.45–0.6 V) ordinary 6T SRAM macros
stop working. For small memories (a few kilobits: register files, FIFOs) an
alternative is a *standard-cell based memory* (SCM): the storage is made of
latches from the cell library and the read path of ordinary CMOS
multiplexers, so the whole memory is placed and routed like logic and scales
down in voltage with it.

The storage element takes about two thirds of the area of such a memory. This
design replaces the library D-latch with a custom 6-transistor
pass-transistor latch that also contains the first stage of the read
multiplexer (a NAND gate with a select input). The memory is organised as
256 words of 32 bits (8 kb), with one write port and one read port, and sits
on a test chip that reaches it either through a scan chain or through a
built-in self test (BIST).

The RTL here describes the logic of that memory and its test access:
bitcell, array, read multiplexer, write enables, scan chain, March C- BIST
and the chip-level wrapper. It is a functional model. The silicon behaviour
(speed, energy, the minimum supply voltage, body bias) is not modelled.

## The bitcell (`scm_bitcell`)

The cell has four pins: `ie`, `d`, `s` and `out`.

* **Storage.** An NMOS pass device, gated by `ie`, connects `d` to the storage
  node. Two inverters with a feedback device hold the value. The feedback
  device is off while `ie` is high. The cell is therefore a level-sensitive
  latch: transparent while `ie` = 1, holding while `ie` = 0.
* **Read.** A NAND gate combines the *inverted* storage node with the select
  `s`:

  | `s` | `out`       |
  |-----|-------------|
  | 0   | 1           |
  | 1   | stored bit  |

  A deselected cell outputs 1. AND-ing the outputs of cells whose selects are
  mutually exclusive therefore gives the selected bit. This is how the cell
  serves as the first multiplexer stage.

The polarity in the table depends on which inverter output feeds the NAND.
That was read from the transistor schematic of the cell. If your cell is
wired the other way, invert `out` in `scm_bitcell.sv`; the rest of the read
tree is unaffected as long as it still selects with AND.

On silicon, an NMOS pass device writes a weak '1', which slows writes. The
published design makes up for this with forward body bias. Neither effect is
modelled.

## The array (`scm_memory`)

`WORDS` × `WIDTH` instances of `scm_bitcell` (defaults 256 × 32), plus
standard-cell write and read logic.

### Writing: row enables from the clock

```
clk      ‾‾‾‾\____/‾‾‾‾\____/‾‾‾‾
we/waddr  =A=X                     sampled at the rising edge
we_q,     ----X=====A=====X-----   registered copy
row_ie[A] _________/‾‾‾‾\_______   = ~clk & we_q & (waddr_q == A)
```

`we`, `waddr` and `wdata` are registered at the rising edge. During the low
phase that follows, `row_ie` of the addressed row is high and that row's 32
latches take `wdata_q`. The registered signals change only while `clk` is
high, when every `row_ie` is low, so a row enable cannot glitch.

**Hold-time caveat for a physical build.** `row_ie` falls at the rising
clock edge, and that same edge updates `wdata_q`. In simulation the latch
always closes first. On silicon the delay through the inverter and AND gate
must be shorter than the clock-to-Q delay of the data registers, or a hold
constraint (or a delayed data path) must guarantee it.

### Reading: a multiplexer tree that starts inside the cells

* The read address is registered at the rising edge when `re` = 1, and held
  otherwise so the tree does not toggle.
* `raddr_q[0]` drives the `s` inputs of all cells. Even rows get
  `~raddr_q[0]` and odd rows get `raddr_q[0]`.
* A 2-input AND per row pair finishes a 2:1 multiplexer.
* A `WORDS/2`:1 multiplexer, selected by `raddr_q[AW-1:1]`, picks the pair.

`rdata` is combinational from the address register and the latches.

### Timing

| operation | request | result |
|---|---|---|
| write | `we` high before the rising edge E | in the array during the low phase after E |
| read  | `re` high before the rising edge E | `rdata` valid before edge E+1 (one cycle of latency) |
| read and write of the same word, same edge | both before E | `rdata` shows the old word in the high phase and the new word by E+1 (write-through) |

The array contents are not reset. Latches have no reset pin, so write a word
before you read it. Only the write and read registers are reset, by the
asynchronous active-low `rst_n`. `WORDS` must be a power of two and at least
2; elaboration stops otherwise.

## Scan access (`scm_scan_if`)

There is one serial chain of `2 + AW + WIDTH` bits (42 by default), shifted
on the system clock while `scan_en` is high:

```
 scan_in -> [ cmd[1:0] | addr[AW-1:0] | data[WIDTH-1:0] ] -> scan_out
              MSB                                  bit 0
```

Bits enter at the command MSB, and `data[0]` leaves first. Shift a whole
command in, then pulse `scan_update` for one cycle with `scan_en` low:

* `SCAN_WRITE` (1): `data` is written to `addr`.
* `SCAN_READ` (2): `addr` is read. At the next edge the data field is
  overwritten with the word read.
* `SCAN_NOP` (0): nothing happens.

After a read, wait one cycle after the update pulse, then shift 42 more
bits: the word comes out, LSB first, while the next command goes in. An
assertion checks that the chain is not shifted during an update or capture
cycle.

## Built-in self test (`scm_bist`)

A `start` pulse runs March C- over every address:

```
any(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); any(r0)
```

"0" and "1" are the all-zero and all-one words.

* The test issues one operation per cycle, 10 × `WORDS` in all (2560 by
  default).
* Each read is compared one cycle later, when the memory's read data is
  valid.
* With `start` sampled at edge E0, `done` rises at edge E0 + 10·`WORDS` + 1.
* `busy` is high from E0 until `done`.
* `fail` and `fail_addr` (the address of the first failing read) hold their
  values until the next start.
* After a passing test, the memory holds all zeros.

The element list is a table in `scm_pkg` (`MARCH_C_MINUS`). To run a
different March test, change that table and `MARCH_ELEMS`.

## Test chip (`scm_chip_top`)

The top wires scan interface, BIST and memory together. `bist_mode` selects
which of the two drives the memory's write and read ports; read data goes to
both. `bist_start` is accepted only in BIST mode. Change `bist_mode` only
while neither side is busy. If you switch in the middle of a test, the BIST's
operations are lost and it reports a failure; the end-to-end testbench does
this on purpose.

The published test chip also carries a second 8 kb memory built from
library latches, as an area reference. It is not part of this RTL. Supply
and body-bias voltages are not logic and have no ports.

## Where this RTL departs from, or adds to, the published design

What the published description fixes:
* the 256 × 32 organisation;
* the 6-transistor pass latch with a NAND select;
* a CMOS multiplexer read path;
* test access through a scan chain and a BIST.

Everything else is a choice of this RTL:

* one write port and one read port;
* the clock-phase write scheme and the one-cycle read latency;
* a 2:1 first stage driven by the address LSB, then one wide multiplexer;
* the scan chain layout, command codes and update/capture protocol, and the
  use of the system clock for shifting;
* March C- as the BIST algorithm, with its handshake;
* the `bist_mode` source multiplexer.

Published results that are outside a functional model:
* area: 108 × 156 µm² against 108 × 216 µm² for the library-latch version;
* operation down to 0.45 V at 9 MHz;
* 20 to 110 MHz at 0.5 V for body bias of 0 to 1 V;
* about 28.5 fJ per bit access at the minimum-energy point.

None of these can be checked with this code.

## Files

| file | contents |
|---|---|
| `rtl/scm_pkg.sv` | default sizes, scan command and March types, the March C- table |
| `rtl/scm_bitcell.sv` | pass latch with integrated NAND select |
| `rtl/scm_memory.sv` | array, write enables, read multiplexer |
| `rtl/scm_scan_if.sv` | scan chain access port |
| `rtl/scm_bist.sv` | March C- self test |
| `rtl/scm_chip_top.sv` | test chip: memory, scan, BIST, mode select |
| `tb/tb_scm_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits; each one
also has a watchdog. All of them run at the default size (256 × 32) in a few
seconds. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_scm_chip_top \
    -y rtl -y tb +libext+.sv rtl/scm_pkg.sv tb/tb_scm_chip_top.sv
./obj_dir/Vtb_scm_chip_top
```

What the testbenches check:

* `tb_scm_bitcell`: transparency, hold and both select states, against a
  latch model; 2000 random vectors.
* `tb_scm_memory`: fills the array, then runs 6000 cycles of random
  simultaneous reads and writes against a reference array. It checks the
  one-cycle read latency, the held read address, same-cycle write-through,
  and the old data in the high phase.
* `tb_scm_scan_if`: scan writes and reads against a reference memory, and
  the chain's shift-register behaviour.
* `tb_scm_bist`: a fault-free run (exact length, 5·`WORDS` writes and
  5·`WORDS` reads, array left at zero), then a stuck-at-0 and a stuck-at-1
  fault inserted in the read path, each found at the right address.
* `tb_scm_chip_top`: end to end at full size. Scan writes and reads, a mode
  switch, a passing BIST run of the expected length, a check of the
  zero-filled array through the scan chain, scan access again, and a BIST run
  disturbed by a mid-test mode switch, which must fail. It counts each of
  these events and fails if one never happened.

## Notes for synthesis

* Latches are intended: `scm_bitcell` infers one latch, which stands for the
  custom cell. In a real flow, replace it with the custom cell and keep the
  module as its simulation model.
* `row_ie` is derived from the clock. Treat it as a generated, gated clock
  for the latches, and mind the hold caveat above.
