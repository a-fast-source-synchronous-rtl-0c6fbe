# Source-synchronous ring network-on-chip

A network-on-chip for a multi-core chip built from unidirectional rings that
run far faster than the cores they serve. Each ring carries its data
source-synchronously next to its own fast clock (about 18 GHz in the original
circuit study, against 2 GHz cores, a 9:1 ratio), so the ring can be clocked
much faster than a mesh router could. Rings are laid out horizontally and
vertically across the die. A core reaches its ring through an **add-drop
station (ADS)**, and packets change between a horizontal and a vertical ring
at a **junction station (JS)**. Every clock boundary (core to ring, ring to
ring) is crossed through an asynchronous FIFO. No two clocks in the system
need to be related: the ring clocks share a frequency but not a phase, and
each core has its own clock.

This repository holds synthesizable SystemVerilog for the stations, the
FIFOs and a parameterized top level. It also has self-checking testbenches
for each of them. The oscillator that makes the ring clock, and the cores,
are not logic and are not included: the ring clocks and core clocks are
inputs.

## The ring slot and its one-cycle skew

Each ring link has three fields: a valid bit, a K-bit destination address
(K = log2 of the number of cores) and a D-bit data word. On every ring-clock
cycle one *slot* passes each station. **The valid bit and address of a slot
travel one cycle ahead of its data word.** A station can therefore decode
the address in one cycle and steer the data in the next. Doing both in the
same cycle would lengthen the ring's critical path.

With the address of a slot at a station's input in cycle `t`:

```
cycle   link in            station                                  link out
t       valid,addr (slot n)  decide: drop / repeat / add;           -
                             load valid/addr out register;
                             pop the Outfifo if the slot is free
t+1     data (slot n)        write data into the Infifo (drop);     valid,addr (slot n or added)
                             capture data in `snoop`;
                             popped word -> `fifodata_out`
t+2     -                    mux: snoop (repeat) or fifodata_out    data (slot n or added)
```

So a slot that is passed on spends exactly one ring cycle in the station, and
the skew is kept from station to station. The decision signals therefore
appear twice: once for the address (cycle `t`) and, registered, for the data
(`sel2` in cycle `t+2`).

## Add, drop, repeat

`ring_port` holds the ring-side logic shared by every station. With `match`
the station's address decode and `blocked` "the drop FIFO cannot take
another word":

| operation | condition | effect |
|---|---|---|
| drop   | valid and match and not blocked | data word written into the drop FIFO; slot becomes free |
| repeat | valid and not (match and not blocked) | address and data passed on unchanged |
| add    | slot free (invalid or dropped) and add FIFO not empty | head of the add FIFO put into the slot |

The outgoing valid bit is `repeat OR (add FIFO not empty)`. A packet whose
destination FIFO is full is not lost: it is repeated, goes round the ring and
tries again.

`blocked` is more than the full flag. The drop decision is made one cycle
before the word is written, so the word of the previous slot may still be on
its way in. `blocked = full OR (previous slot dropped AND exactly one entry
left)`. Without this term a burst of slots for one station overflows its
Infifo by one word. An assertion in `ring_port` checks that this never
happens.

## Crossing clocks: the asynchronous FIFO

`async_fifo` (with `gray_counter`, `ptr_sync` and `fifo_core`) is the
classic Gray-pointer dual-clock FIFO:

* Pointers have log2(DEPTH)+1 bits. The low bits address an entry and the top
  bit counts laps. They are kept in Gray code, so only one bit changes per
  step.
* Each pointer crosses to the other clock through a two-flip-flop
  synchronizer.
* Empty (read domain) means the read pointer equals the synchronized write
  pointer. Full (write domain) means the write pointer equals the
  synchronized read pointer with its two top Gray bits inverted. Both flags
  are registered and are computed from the pointer value after the current
  edge. Both are pessimistic: a flag can stay set a few cycles after the far
  side has moved.
* Storage (`fifo_core`): the write address is decoded one-hot and ANDed with
  the write enable. Each entry either loads the new word or reloads itself.
  A read mux picks the entry at the read pointer. That word, forced to zero
  while the FIFO is empty, is registered on the read clock.

Read protocol: assert `rd_en` while `empty` is low. After that edge, `dout`
holds the popped word and `rd_valid` is high for one cycle. The default depth
is 8 entries (4-bit pointers).

An ADS has two of these FIFOs. The **Infifo** is written on the ring clock and
read on the core clock; it holds data only. The **Outfifo** is written on the
core clock and read on the ring clock; it holds {address, data}, because an
added slot takes its address from it.

## Junctions and routing

A JS has two `ring_port`s, one on each ring, and two FIFOs: H->V and V->H.
Each FIFO word keeps its address, which the next ring needs. Each ring side
drops into its outgoing FIFO and adds from its incoming one. A packet that
stays on its ring passes through the JS in one cycle.

Routing rule (this implementation's choice):

* PE `p` is the `i`-th ADS of horizontal ring `h`, with `p = h*PES_PER_H + i`.
  All PEs sit on horizontal rings.
* On a horizontal ring, a JS takes every packet addressed to another
  horizontal ring. A packet therefore leaves at the first junction whose H->V
  FIFO has room.
* On a vertical ring, the JS of horizontal ring `h` takes every packet
  addressed to ring `h`.

A packet therefore makes at most two ring changes.

## Default configuration (`ring_noc`)

These defaults are the 4x4-core section used to validate the original
circuit:

| parameter | default | meaning |
|---|---|---|
| `K` | 4 | address bits (16 PEs) |
| `D` | 144 | data bits per flit (18 bytes) |
| `DEPTH` | 8 | entries per FIFO |
| `NUM_H`, `NUM_V` | 2, 2 | horizontal and vertical rings |
| `PES_PER_H` | 8 | PEs (ADSs) per horizontal ring |

A horizontal ring has 10 stations: `ADS JS0 ADS JS1 ADS ADS ADS ADS ADS ADS`
(positions 0 to 9). A vertical ring has 4 stages: `JS(h0) repeater JS(h1)
repeater`. The repeater (`ring_repeater`) is one register stage. It splits
the vertical link between two junctions, which is twice as long as a
horizontal link. Placement helpers are in `noc_pkg`.

Top-level ports are arrays indexed by PE (`tx_*`, `rx_*`, `pclk`) or by ring
(`rclk_h`, `rclk_v`). `rst` is asynchronous and active high and resets every
domain. Hold it for several cycles of the slowest clock.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | default sizes, station placement functions |
| `rtl/ring_noc.sv` | top level: rings, stations, repeaters |
| `rtl/add_drop_station.sv` | ADS: ring_port + Infifo + Outfifo |
| `rtl/junction_station.sv` | JS: two ring_ports + H->V and V->H FIFOs |
| `rtl/ring_port.sv` | drop / repeat / add logic and the skewed data path |
| `rtl/ring_repeater.sv` | one-cycle link stage |
| `rtl/async_fifo.sv` | dual-clock FIFO |
| `rtl/fifo_core.sv` | FIFO storage, read mux, output register |
| `rtl/gray_counter.sv` | Gray pointer counter |
| `rtl/ptr_sync.sv` | pointer synchronizer |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ring_noc` end to end |
| `tb/tb_noc_harness.sv` | parameterized traffic harness around `ring_noc` |
| `tb/tb_ring_noc_flits.sv` | 4x4 network with 72-bit and with 288-bit flits |
| `tb/tb_ring_noc_8x8.sv` | 64-PE network (8+8 rings, 6-bit addresses) |

## Simulating

Every testbench ends with a line `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/noc_pkg.sv \
    tb/tb_ring_noc.sv --top-module tb_ring_noc
./obj_dir/Vtb_ring_noc
```

Replace `tb_ring_noc` with any other testbench name. The testbenches use
`$urandom` only; they need no files.

`tb_ring_noc` runs the default configuration. Each ring gets a 56 ps clock
with its own phase and each PE a 504 ps clock with its own phase. It runs
four phases:

1. A single packet crosses from one horizontal ring to the other.
2. One PE floods a PE that has stopped reading. This fills that PE's Infifo,
   then the ring, then the sender's Outfifo.
3. Uniform random traffic between all 16 PEs, with some slow readers.
4. The network drains.

A scoreboard checks that every word arrives once, intact, at the right PE.
The testbench also counts each mechanism and fails if any of them never
occurs: drop, add, repeat, a drop refused by a full Infifo, a full Outfifo,
H->V and V->H transfers, junction pass-through, a refused junction transfer,
and traffic through the repeaters. The unit testbenches account for every
slot from logs of the links. They check the one-cycle pass-through latency,
the order of added and dropped words, that a full Infifo takes exactly
`DEPTH` words of a burst, and the FIFO flags.

`tb_noc_harness` wraps a `ring_noc` of any size with the same kind of PE
models. It sends single packets between random pairs on an idle network,
then random traffic. `tb_ring_noc_flits` uses it for the 9-byte and 36-byte
flit widths. `tb_ring_noc_8x8` uses it for a 64-PE network.

Measured in simulation:

* Pass-through: 1 ring cycle per ADS, JS or repeater.
* Ring change at a JS: about 5 to 6 ring cycles from the address arriving on
  one ring to the address leaving on the other. This is the FIFO write, the
  two synchronizer stages, the registered empty flag and the add stage.
* One packet between PEs on different horizontal rings on an idle network:
  about 65 ring cycles, or 7 PE cycles. Most of this is the two crossings
  between PE and ring clocks.
* Average delivery time of a single packet between random PEs on an idle
  network. This counts from the PE clock edge that queues the packet to the
  edge after which the receiver holds it:
  * 4x4 network: about 6 PE cycles;
  * 64 PEs: about 7 PE cycles;
  * 256 PEs (`K=8, NUM_H=NUM_V=16, PES_PER_H=16`, simulated once with the
    harness): about 9.3 PE cycles.

## Where this departs from the original design, and what is missing

* **Ring-change latency.** The original latency estimate charges a JS 3 ring
  cycles to switch rings. This implementation needs 5 to 6, because of the
  registered flags and the add stage described above.
* **Drop timing.** Here the Infifo is written from the link on the same edge
  that loads the `snoop` register. A write taken from the output of `snoop`
  would need one more cycle of pipelining.
* **Full check.** The full check also counts a pending write (`afull`). The
  original uses the full flag alone.
* **Added-word register.** An added word passes through two registers: the
  FIFO's output register, then `fifodata_out`. This lines it up with the data
  cycle. The original shows a single register.
* **Routing and placement.** The routing rule, PE placement and address map
  are this implementation's. Only the general scheme is given: rings that
  cross at junctions, ADSs and JSs alternating along horizontal rings, and
  junctions separated by repeaters on vertical rings. There is one JS per
  horizontal/vertical pair. A flattened ring that crosses another twice
  would have two junctions.
* **Flow control.** There is none beyond recirculation. If both ring
  directions saturate, packets can circulate indefinitely. The testbenches
  keep the offered load below that point.
* **Not logic.** The following are not included: the standing-wave resonant
  oscillator and its clock-recovery amplifiers, which produce the ring clock;
  the link drivers and wires; and the processor cores.
* **Size.** The 16x16 projection (256 cores, 8-bit addresses, 16+16 rings)
  is a parameter setting (`K=8, NUM_H=NUM_V=16, PES_PER_H=16`). It builds
  slowly under Verilator, so the kept testbench is the 64-PE network. The
  9-byte and 36-byte flit variants are `D=72` and `D=288`.
