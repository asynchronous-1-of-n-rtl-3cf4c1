# Single-track 1-of-n asynchronous cells, as a gate-delay RTL model

In most asynchronous logic, a data channel carries its data on some wires
and its handshake on others: request, acknowledge, or a return-to-zero
phase that the receiver has to signal back. This library uses no
handshake wires at all. A channel is just its n data rails, and the data
does the handshake:

* The channel is **blank** when every rail is low.
* The **sender** may only pull a rail *high*. Raising rail *i* sends the
  value *i*. For the dual-rail (1-of-2) case, rail 0 means 0 and rail 1
  means 1.
* The **receiver** may only pull a rail *low*. Pulling the rail back to
  blank both takes the value and tells the sender that the wire is free
  again.

So one transition in each direction per token, on the same wire, with no
extra wires. Each cell has to work out locally when its input has arrived,
when its output is free, and when to give the input back. That local logic
is what the RTL here describes.

The library has single-track full buffers (dual-rail, 1-of-n, and a variant
with a timing margin). It has AND, OR and XOR gates, plus AND and OR
variants that forward a decided result early, and a full adder with early
carry. There is also a second full adder, built from forks and
three-input gates, for comparison. For routing it has fork, non-conditional merge, split and merge. It
also has a data consumer, and two converters to and from ordinary
four-phase dual-rail logic.

## How to read the RTL: one clock period = one gate delay

The cells are asynchronous, transistor-level circuits: dynamic nodes,
pull-up and pull-down networks, and wires that two cells drive from both
ends. Simulators and synthesis tools do not handle that well. So this RTL
is a **unit-delay model**:

* Every gate output, every dynamic node and every wire level is a
  register.
* On each rising edge of `clk`, each register takes the value its gate
  computes from the register values of the previous period. One clock
  period stands for one gate delay.
* A dynamic node (a state node `S`, an acknowledge node `A`, a completion
  detector node) is written as "precharge if …, else discharge if …, else
  hold". The "hold" branch stands in for the weak keeper that keeps the
  node's level.
* A driver transistor on a wire counts as one gate delay too. The wire
  level lives in `st_wire`, one cycle behind the `up`/`dn` signals that
  drive it.

With this reading, the latencies of the circuits come out as cycle counts,
and the testbenches check them:

| cell | forward latency (L↑ to R↑) | backward latency (R↓ to L↓, data waiting) | period per token in a pipeline |
|---|---|---|---|
| `stfb_buf` (and `stfb_buf_1ofn`) | 2 | 4 | 6 |
| `stfb_buf_m2` | 4 | 4 | 8 |

The model is synthesizable, but what it synthesizes is a synchronous
emulation of the cells, with one flip-flop per node. It is not the
asynchronous circuit. Use it to study and check the protocol, the cell
logic and the handshake timing in gate delays. It says nothing about
analogue effects: charge sharing, keeper strength, transistor sizing, or
delays that differ from gate to gate.

Reset (`rst`) is synchronous and active high. Inside the cells it plays
the role of the `Reset` / `/Reset` inputs. It holds the acknowledge (`A`)
high so that every input wire is pulled blank. It holds the busy detector
(`B`) low so that every state node is precharged. It also sets every
internal register to its idle value. Hold it for at least 4 cycles.

## The channel: `st_wire`

`st_wire #(N)` is one channel of N rails, together with its keeper.

* Inputs: the sender's pull-ups `up[N-1:0]` and the receiver's pull-downs
  `dn[N-1:0]`.
* Output: the wire levels `rail`.
* A rail goes high one cycle after `up`, and low one cycle after `dn`.
  Otherwise it keeps its level. That is the keeper. The intended keeper is
  a "no-fight" one: each side holds the level opposite to the one it
  drives, so it never fights the other side.
* An assertion, `a_no_fight`, fires if `up` and `dn` are ever on for the
  same rail in the same cycle. In silicon that would be a short circuit
  between the two ends of the wire. The assertion is the main safety net of
  the whole model, and every testbench runs with it on.

Every cell port that belongs to a single-track channel comes as a pair:

* `x` and `x_dn` for an input channel: the cell reads the level and drives
  its pull-down.
* `y` and `y_up` for an output channel: the cell reads the level and
  drives its pull-up.

The wires between cells are `st_wire` instances.

## The full buffer and its two detectors

`stfb_buf` is the core of everything else. It has a dynamic state node per
rail (`S0`, `S1`, active low) and two completion detectors:

* **B, right-environment completion detector (busy)**:
  `B = NOR(R0, R1, Reset)`. B is high only when the output wire is blank.
  While B is low, the state nodes are precharged and cannot evaluate.
* **A, state completion detector (acknowledge)**:
  `A = NAND(S0, S1, /Reset)`. A goes high as soon as a state node has
  fired. It then pulls the input rails low.

One token through the buffer, in cycles after `L0` rises (output free):

| cycle | event |
|---|---|
| 1 | `S0` falls (L0 and B discharge it) |
| 2 | `R0` rises (pull-up driven by S0); `A` rises |
| 3 | `L0` is pulled low (acknowledge); `B` falls because R0 is high |
| 4 | `S0` is precharged by the low B |
| 5 | `A` falls and releases the input wire |

The sender stops driving its rail in the same cycle in which the buffer
starts pulling it low, so the timing margin between the two drivers is
zero. In the model this is exact. In silicon it relies on careful sizing.

**`stfb_buf_m2`** adds a margin of two gate delays. Each rail driver
becomes a self-timed pulse:

* `n = NAND(L, S)`
* `x = NOT(n)`
* `S = NAND(x, B)`

Once `S` falls, `n` rises and `x` falls, so `S` returns high three gate
delays later whether or not the receiver has acted. The sender is then off
two gate delays before the receiver pulls down. The price is 4 gate delays
of forward latency and 8 per token. Feeding the cell's own state node `S`
back into the first NAND is this design's choice. Of the wirings
considered, it is the only one that gives all the numbers this cell is
meant to have: forward 4, backward 4, period 8, driver pulse 3, margin 2.
Treat this cell with that in mind.

**`stfb_buf_1ofn #(N)`** is the same buffer for a 1-of-N code. It has one
static `S_i = NAND(L_i, B)` per rail, A is the NAND of all `S_i`, and B is
the NOR of all output rails. N defaults to 4, a choice of this model.

## Logic cells

### AND, OR, XOR (`stfb_and`, `stfb_or`, `stfb_xor`)

These are buffers with logic in the pull-down networks of `S0` and `S1`.
Every discharge path contains one rail of `a` and one rail of `b`, so a
result leaves only when both operands are there. Then `A` acknowledges
both operands at once.

| cell | S0 discharged by | S1 discharged by |
|---|---|---|
| AND | a0·b0, a0·b1, a1·b0 | a1·b1 |
| OR | a0·b0 | a1·b1, a1·b0, a0·b1 |
| XOR | a0·b0, a1·b1 | a1·b0, a0·b1 |

To get NAND, NOR or XNOR, swap the two output rails where you connect
them. No separate cell is needed.

### Early output (`stfb_ori`, `stfb_andi`)

The OR result is certain as soon as either input is 1, and the AND result
as soon as either input is 0. The improved OR sends that early, but it
must still acknowledge *both* inputs, and only once both have arrived.
This is the subtlest part of the library. It adds three pieces:

1. **Node `A` is dynamic and set by a fired state node.** A low `S0` or
   `S1` pulls it high. It stays high, so it remembers that an acknowledge
   is still owed even after `S` has been precharged again by the busy
   output.
2. **`/A = NOT(A)` is in the evaluation footer.** It blocks a second
   evaluation while the acknowledge is pending. Without it, the late
   operand together with the early one would fire the gate again.
3. **The LCD (left-environment completion detector)** is a dynamic node.
   It is precharged while `A` is low. While `A` is high, it is discharged
   once one rail of `a` and one rail of `b` are high.
   `ack = NAND(LCD, /Reset)` then pulls all input rails low and discharges
   `A`.

So the LCD never gates evaluation, only the acknowledge. After an early
result, the cell simply waits with `A` high until the slow operand shows
up. It then consumes both operands and re-arms.

`stfb_andi` is built here as the exact dual of the improved OR: `S0` is
discharged by a0 or b0, and `S1` by a1·b1.

### Full adder (`stfb_fa`)

The sum is a three-input XOR, which needs all of `a`, `b` and `ci`. The
carry is a three-input majority that fires early when `a` and `b` agree:

* S1c is discharged by a1·b1, a1·b0·ci1, or a0·b1·ci1.
* S0c is discharged by a0·b0, a0·b1·ci0, or a1·b0·ci0.

A long carry chain therefore does not wait for each carry in when the
operand bits already decide the carry.

Each half has its own pending node, `As` and `Ac`, and its own `/As` or
`/Ac` in the footer, as in the improved OR. The inputs are acknowledged
together by `ack = NAND(NAND(As, Ac), /Reset)`, that is, only after *both*
the sum and the carry have been sent.

### Full adder from forks (`stfb_fa_fork`, `stfb_xor3`, `stfb_maj3`)

The same adder can be put together from separate cells:

* Three `stfb_fork`s copy a, b and ci.
* One copy of each goes to `stfb_xor3`, the sum gate on its own, with the
  plain acknowledge of the two-input XOR.
* The other copy of each goes to `stfb_maj3`, the carry gate on its own.

`stfb_maj3` still sends early when a and b agree. It borrows the pending
`A` node, the `/A` footer and the LCD from the improved OR, with the LCD
widened to three inputs.

Each fork frees its input as soon as it has passed it on, so neither
result holds up the other's inputs. But the fork sits in front of both
gates. Every result therefore arrives 4 gate delays after the last input
it needs, against 2 for `stfb_fa`. `tb_stfb_fa_fork` measures this for
all eight input values. In a ripple-carry chain that difference is paid
once per bit, which is why `stfb_fa` shares one acknowledge between its
two halves instead.

## Routing cells

| cell | behaviour |
|---|---|
| `stfb_fork` | Copies L to Ra and Rb. Its busy detector is the NOR of all four output rails, so it fires only when both outputs are free. |
| `stfb_ncmerge` | Forwards whichever of La and Lb holds data. The environment must never fill both at once; an assertion checks this. |
| `stfb_split` | C = 0 sends L to Ra and C = 1 sends it to Rb. Each output has its own state nodes and busy detector, so only the chosen output has to be free. L and C are consumed together. |
| `stfb_merge` | C = 0 takes La and C = 1 takes Lb. Each side has its own acknowledge node, which clears its own data input and its own rail of C. The unchosen input keeps its data for later. |
| `stfb_dc` | Data consumer: removes anything that arrives, so unwanted results do not block their producer. Here it is a NOR detector and an inverter driving the pull-downs. The 2-gate path keeps it from fighting a zero-margin sender. A `consumed` strobe is added for observation. |

## Four-phase interfaces

`stfb_tx` takes dual-rail four-phase (return-to-zero) data `l`, with
enable `le`, and sends it on a single-track channel:

* A bit is sent when `le` is high and the output is free.
* A dynamic node `A` is then set, and `le = NOT(A)` falls. This also
  blocks a second send of the same data.
* `A` is cleared, and `le` rises, only when both `l` rails are back at
  zero.

`stfb_rx` takes a single-track channel and presents it as four-phase data
`r`, with enable `re` from the consumer:

* While `re` is high, an arriving bit discharges `S` and drives `r`
  through an inverter.
* When `re` falls, `S` is precharged, so `r` returns to zero.
* At the same time, `NOR(re, re delayed by three inverters)` makes a pulse
  of exactly three cycles, which pulls the single-track input low.

## Top level: `st_top`

The cells are a library rather than one circuit, so `st_top` places one of
each side by side: `buf`, `bufm2`, `buf4`, `and2`, `andi`, `or2`, `ori`,
`xor2`, `fork`, `ncm`, `split`, `merge`, `fa`, `faf` (the fork-based
adder), `tx`, `rx` and `dc`. Each
has its own `st_wire` on every single-track channel, and all of them share
`clk` and `rst`. Port naming:

* For a cell input channel `<cell>_<ch>`: `<cell>_<ch>_up` is the outside
  sender's pull-up and `<cell>_<ch>` is the wire level.
* For a cell output channel: `<cell>_<ch>_dn` is the outside receiver's
  pull-down and `<cell>_<ch>` is the wire level.
* The four-phase signals (`tx_l`, `tx_le`, `rx_r`, `rx_re`) and
  `dc_consumed` are plain ports.

To build your own circuit, instantiate the cells directly. Put one
`st_wire` on each channel. Connect the producer's `*_up` and the
consumer's `*_dn` to it, and feed its `rail` to both.

## Simulating

Each testbench is self-checking, ends with a `TB_RESULT checks=… failures=…`
line, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/st_pkg.sv tb/tb_st_top.sv \
          --top-module tb_st_top -o sim && obj_dir/sim
```

Swap in any `tb/tb_<cell>.sv` to test one cell. `tb_st_src` and
`tb_st_snk` are reusable test sender and receiver models:

* They send random values after random gaps, and receive with random
  stalls.
* They log what they send and receive, for reference checks.
* With no gap and no stall, their timing is exactly that of a neighbouring
  buffer, so throughput measurements are not distorted.

What the testbenches establish:

* **Function.** Every output stream equals a reference computed from the
  input streams: AND, OR, XOR, sum and carry, routing by C, merge order,
  and pass-through.
* **Timing.** Buffers: forward latency, backward latency and period per
  token, as in the table above. Full adders: 2 gate delays (`stfb_fa`)
  against 4 (`stfb_fa_fork`) from the last needed input to each result. `stfb_rx`: the pulse is three cycles long.
  `stfb_dc`: data lives on the wire exactly three cycles.
* **Mechanisms.** Each of these is counted and must occur: early outputs
  of ANDi, ORi, MAJ3 and the carry, occurring only when decided; the fork
  waiting for a busy output; both routes of split and merge; both inputs
  of the non-conditional merge; back-pressure on a buffer; reset clearing
  every wire; the four-phase handshakes.
* **No fights.** No rail is ever driven both ways (`st_wire` assertion).
  `tb_st_top` runs everything at once, at the default parameters.

## Where the model departs from the circuits, and what is assumed

* **Time is quantised to equal gate delays.** Margins of zero are exact
  here but not in silicon. A real design needs timing analysis of the
  zero-margin cells, or the margin buffer.
* **Keepers are idealised.** The no-fight holders and the optional weak
  PMOS and inverter keepers are modelled as a perfect "hold". A fight
  resolves in favour of the pull-up and is reported by the assertion.
* **Reset is added to every cell**, including cells drawn without it.
  Reset is synchronous, and the receiver's pull-down pulse is forced on
  during reset.
* **Cells specified only by their function** are built the simplest way
  consistent with the protocol: `stfb_andi` as the dual of the improved
  OR, and `stfb_dc` as a two-gate detector. The standalone
  `stfb_maj3` combines the adder's carry networks with the improved OR's
  acknowledge logic.
* **`stfb_buf_m2`'s feedback from `S` into the first NAND is a choice**,
  made because it meets every timing number the cell is meant to have.
* **The improved OR uses the full LCD.** It checks every input
  combination. A simplified LCD that uses knowledge of which inputs must
  already be present is possible but not built.
* **Not built:**
  * Bidirectional "transceiver" use of one wire.
  * Several senders on one data wire (only the merge's shared control
    wire has two receivers, each on its own rail).
  * General gates with more than two inputs, or with 1-of-n operands.
    Only the three-input XOR and majority gates of the adder exist as
    cells. The others extend the same way: more series devices per
    discharge path, more rails per state node.
  * The cross-coupled-inverter keeper, which is the baseline that the
    no-fight keeper replaces.
