# GRP bit-permutation cipher with dual-rail precharge logic

This is a small cipher for low-cost embedded nodes, such as ECUs on a CAN bus. It
encrypts by **permuting the bits of a word**, with no substitution and no arithmetic.
Each 8-bit subword passes through a three-stage network of 2-to-1 multiplexers. The
key is three 8-bit control words, one per stage. The receiver runs the same stages
in reverse order with the same control words and puts every bit back in its place.

There are two hardware points:

* The permutation is a fixed pattern of wires and multiplexers. It is cheap and
  takes one combinational pass.
* The protected version uses **dual-rail precharge (DRP)** logic. It carries every
  bit on two rails: the bit and its complement. Between operations both rails are
  forced to 0. In evaluation exactly one of the two rails rises. The number of
  transitions therefore does not depend on the data or the key, which makes
  power-analysis attacks harder.

A permutation only diffuses: it does not add confusion. Treat this as a lightweight
obfuscating cipher, not as a replacement for AES.

## The permutation network

Positions are numbered 0 to 7 from left to right. That is how the network is drawn
and how control words are written. **Position p is bit `[7-p]` of a subword or
control word.** The key packs the three words with stage 1 first, so
`24'b10101100_11010010_00101010` gives `key[0] = 10101100`.

Each stage splits the 8 positions into 4 pairs `(h, h+d)`:

| network     | stage 1 | stage 2 | stage 3 | control word used |
|-------------|---------|---------|---------|-------------------|
| transmitter | d = 4   | d = 2   | d = 1   | key[0], key[1], key[2] |
| receiver    | d = 1   | d = 2   | d = 4   | key[2], key[1], key[0] |

Each pair has two multiplexers:

* The **H** (upper) multiplexer sits at position h.
* The **L** (lower) multiplexer sits at position h+d.

Both multiplexers take the control bit at position **h** as their select:

* **1**: each multiplexer keeps its own input, so the pair passes.
* **0**: each multiplexer takes its partner's input, so the pair exchanges.

The control bits at L positions do not steer anything. They stay in the 8-bit
control-word format but the network ignores them.

This select rule is the one thing a user must get right. It is the only rule under
which the example control words produce every intermediate arrangement of the
worked example below. Each stage is its own inverse, because it only swaps pairs.
This is why the receiver, with the stages in reverse order, inverts the transmitter
for **any** key when all multiplexers are present.

### Worked example

The input is the arrangement `A7 A6 A5 A4 A3 A2 A0 A1`. The items are bit names.
The key is `10101100 / 11010010 / 00101010`.

| after           | arrangement                  |
|-----------------|------------------------------|
| input           | A7 A6 A5 A4 A3 A2 A0 A1      |
| stage 1 (d = 4) | A7 A2 A5 A1 A3 A6 A0 A4      |
| stage 2 (d = 2) | A7 A2 A5 A1 A0 A4 A3 A6      |
| stage 3 (d = 1) | A2 A7 A5 A1 A0 A4 A3 A6      |

The receiver walks the table back up. The testbenches check this example item by
item: each item is sent alone as a one-hot subword.

## Dual-rail precharge

`grp_drp_tx` and `grp_drp_rx` each contain two copies of the network, both steered
by the same key:

* The **true rail** carries `din` through multiplexers built as
  `(s & a) | (~s & b)`.
* The **complement rail** carries `~din` through the complementary structure
  `(~s | a) & (s | b)`. This is the same cell with AND and OR exchanged.

Both structures select the same input. The point of the second structure is its
behaviour when both rails are precharged: with both data inputs at 0, a cell of
either kind outputs 0 whatever the select is. So while `pre` is high, every rail in
both networks is 0, for any key. When `pre` falls, the outputs become `dout_t` and
`dout_f = ~dout_t`. Assertions in `grp_drp_engine` check this rule on every cycle.

Limits of this RTL:

* The balance that the technique relies on is a property of the layout and of the
  gate library. The RTL only gives the logical structure.
* A synthesis tool may merge the two rails again unless it is told to keep them.
* The original design also mixed the order of true and complement gates in its
  gate-level source. A netlist has no counterpart to that, so it is not modelled.

### Reduced multiplexers

A pair whose control bit is always 1 never swaps, so its multiplexers can be left
out. The `KEEP` parameter (type `keep_t`, one 4-bit mask per stage, pairs numbered
left to right by H position) says which pairs are built. The defaults are the
reduced networks built for the example key:

| block      | stage 1 | stage 2 | stage 3 | pairs built |
|------------|---------|---------|---------|-------------|
| grp_drp_tx | `0101`  | `0011`  | `1000`  | (1,5) (3,7) / (4,6) (5,7) / (0,1) |
| grp_drp_rx | `1000`  | `0011`  | `1111`  | (0,1) / (4,6) (5,7) / all four |

The receiver keeps all four pairs of its last stage, so it is not fully reduced. The
pair only works together for keys that need no multiplexer the transmitter lacks.
This means **bits 23 and 21 of the key must be 1**: stage-1 positions 0 and 2. Any
other bits are free. To use arbitrary keys, set `KEEP_ALL` on both sides. This is the
universal structure (`grp_tx` and `grp_rx` default to it).

## Engine timing and the top level

`grp_drp_engine` wraps `LANES` dual-rail lanes. The default is 2 lanes, so a 16-bit
word is two independent 8-bit subwords under the same key. The engine alternates
between two phases:

1. **PRECHARGE**: `in_ready = 1` and all rails are 0. The word present when
   `in_valid` is high on a clock edge is stored.
2. **EVALUATE**: the rails carry the data for one cycle. Both rails are registered at
   the end of the cycle.

`out_valid` pulses for one cycle, two clock edges after the accepting edge. The
result is on `out_data` (true rail) and `out_data_n` (complement rail). The engine
accepts at most one word every 2 cycles, and every evaluation is preceded by a
precharge cycle. Reset (`rst_n`) is asynchronous and active low. It returns the
engine to PRECHARGE with its outputs cleared.

`grp_secure_top` places a transmitter engine (`tx_*`, plaintext to ciphertext) and a
receiver engine (`rx_*`, ciphertext to plaintext) side by side. They share `key`. The
key must be held stable while either engine has a word in flight. Its parameters are:

| parameter | default           | meaning |
|-----------|-------------------|---------|
| `LANES`   | 2                 | 8-bit subwords per word (16-bit data) |
| `TX_KEEP` | `KEEP_TX_REDUCED` | multiplexer pairs built in the transmitter |
| `RX_KEEP` | `KEEP_RX_REDUCED` | multiplexer pairs built in the receiver |

The network itself is fixed at 8 bits and 3 stages (`grp_pkg::SUBWORD`, `STAGES`).

## Files

| file | contents |
|------|----------|
| `rtl/grp_pkg.sv`         | widths, key and mask types, example key, masks, stage reference |
| `rtl/grp_mux2.sv`        | 2:1 mux cell, AND-OR or complementary OR-AND (`POL`) |
| `rtl/grp_stage.sv`       | one stage: 4 H/L pairs at distance `DIST` |
| `rtl/grp_tx.sv`          | 3-stage transmitter network (d = 4, 2, 1) |
| `rtl/grp_rx.sv`          | 3-stage receiver network (d = 1, 2, 4) |
| `rtl/grp_drp_tx.sv`      | dual-rail transmitter: input rails, precharge, two networks |
| `rtl/grp_drp_rx.sv`      | dual-rail receiver |
| `rtl/grp_drp_engine.sv`  | precharge/evaluate sequencer, registers, handshake, lanes |
| `rtl/grp_secure_top.sv`  | transmitter and receiver engines |
| `tb/grp_ref_pkg.sv`      | independent reference model and the worked example |
| `tb/tb_*.sv`             | one self-checking testbench per module, plus `tb_grp_secure_top_universal` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* **Cell and network tests.** The mux cells are checked exhaustively. The networks,
  in both cell polarities, and the dual-rail blocks are checked against the worked
  example and against 2000 random keys and words.
* **Reference model.** The reference in `tb/grp_ref_pkg.sv` pairs each position p
  with `p ^ d`. It is written independently of the RTL.
* **Engine test.** The engine test checks the 2-cycle latency, the 1-word-per-2-cycle
  throughput, back-pressure and the complementary outputs.
* **`tb_grp_secure_top`.** This test runs the top at its default parameters. It runs
  the example, then 50 key refreshes with random traffic. Every ciphertext word is
  fed to the receiver, and the receiver's output is checked against the plaintext.
  The test counts and requires each of these events:
  * precharge cycles, with the rails at 0;
  * evaluate cycles;
  * back-pressure on both sides;
  * key refreshes;
  * at least one exchanging pair and one passing pair in every stage.
* **`tb_grp_secure_top_universal`.** This test does the same with all multiplexers
  built and unrestricted keys.

To simulate with Verilator, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_grp_secure_top \
  -y rtl -y tb +libext+.sv rtl/grp_pkg.sv tb/grp_ref_pkg.sv tb/tb_grp_secure_top.sv
./obj_dir/Vtb_grp_secure_top
```

Replace the module name to run another testbench. Lint reports ascending packed
ranges in `grp_pkg`. Those ranges are deliberate: they make key and mask literals
read left to right in stage order.

## What is not here

* **Control-word generation.** Turning a chosen arrangement into the three control
  words is done in software on the host. The procedure is not specified in enough
  detail to build. Keys are inputs to this design.
* **Host system.** The microcontroller, its CAN controller, the ADC and the UART used
  to demonstrate an encrypted two-node CAN link are off-the-shelf parts and are not
  modelled.
* **Choices made in this design.** The published structure does not define the
  two-phase timing, the valid/ready handshake, the reset, the precharge value 0 and
  the sharing of one key across lanes. All of these are choices made here.
