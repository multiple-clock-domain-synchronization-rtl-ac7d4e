# GasP-style clock-domain crossing for network-on-chip links

In a network on chip whose switches run on independent clocks, every link
between two switches is a clock-domain crossing. This design puts the crossing
into the switches' own buffering: a short chain of buffer cells whose load
enables are generated by two small controls, one at the sender end (clock1) and
one at the receiver end (clock2). The two controls talk over only two
indications:

* **copy** (sender to receiver): buffer cell 1 has been filled;
* **empty** (receiver to sender): buffer cell 1 has been emptied again.

Each control combines its own clock with the indication from the other side
into an enable that moves data one cell forward. Neither side is master: the
sender may request a transfer before the cell is free (the request waits), or
the cell may be free before the sender has anything (the cell waits). This is
what lets the two clocks have equal, related or completely unrelated
frequencies.

The scheme comes from a self-timed (GasP, asynchronous symmetric pulse
protocol) control circuit, in which the full/empty state is a single wire set
by one side and cleared by the other and the enables are locally generated
pulses. The RTL here is a synchronous rendering of that control for standard
cell flows; the differences are listed under *Departures* below.

## The link

```
        clock1 domain                                 clock2 domain
 in_* -> switch_fifo -> input  -> buffer  ===X===> buffer -> output -> switch_fifo -> out_*
                        register  cell 1           cell 2    register
                           ^        ^                ^         ^
                        load_in  enable1          enable2   load_out
                           |        |                |         |
                       gasp_sender_ctrl --copy-->  gasp_receiver_ctrl
                                        <--empty--
```

`gasp_link` (the top) is one inter-switch link: the sender switch's output
FIFO, the crossing interface `gasp_interface`, and the receiver switch's input
FIFO. The switches' routing logic connects to `in_*` (clock1) and `out_*`
(clock2); both are valid/ready ports where a word moves on a rising edge with
valid and ready both high. The physical wire between the switches is not part
of the RTL.

## How a word crosses

Sender end, every clock1 edge:

* `req_stored` is set when the sender hands a word to the input register
  (`load_in`) and cleared when that word is moved on. It is the stored request.
* `cell_empty` is true when cell 1 is free.
* `enable1 = req_stored & cell_empty`. It copies the input register into cell 1,
  clears the request and marks the cell full by flipping `copy`.

Receiver end, every clock2 edge:

* cell 1 is full when the synchronised `copy` differs from `empty`.
* `enable2 = cell1_full & (cell 2 free, or cell 2 moving on this cycle)`. It
  copies cell 1 into cell 2 and flips `empty`, which frees cell 1.
* `load_out` moves cell 2 into the output register when that register is free
  or being read, so a reading receiver pulls the next word along.

The two orders of events:

1. *Request first* (receiver slower). The word sits in the input register with
   `req_stored` high; `put_ready` is low and the sender holds its next word.
   When `empty` comes back, `enable1` fires in the first clock1 cycle that sees
   it.
2. *Empty first* (sender slower). Cell 1 is already free when the word is
   taken, so `enable1` fires in the very next clock1 cycle.

## copy and empty as toggles (the part to read carefully)

Two clock domains cannot share one set/reset wire in synchronous logic, so the
full/empty state of cell 1 is split into two one-bit toggles, each written by
only one domain:

| signal      | owner   | flips when         |
|-------------|---------|--------------------|
| `copy_tgl`  | clock1  | cell 1 is filled   |
| `empty_tgl` | clock2  | cell 1 is emptied  |

Cell 1 is full exactly when the two differ. Each side compares its own toggle
with a synchronised copy of the other's (`gasp_sync`, `SYNC_STAGES` flip-flops).
The sender's own flip takes effect at once, so it can never fill the cell
twice. The receiver's view of "full" lags by the synchroniser, so it can never
read early. The data word itself is not synchronised. Cell 1 is written only
while both sides agree it is empty. It is read by clock2 only after the flip of
`copy_tgl` has passed the synchroniser, which is long after the write. So cell 1
is always stable when clock2 samples it. This is the same argument as for any
toggle (two-phase) handshake, and it relies on the synchroniser depth being
enough for the clock frequencies used.

All of this is equivalent to one full/empty state with a set side and a reset
side, as in the original circuit. The price is synchroniser latency on every
crossing.

## Timing

With an empty link interface and default `SYNC_STAGES = 2`, a word accepted by
`gasp_interface` on a clock1 edge can be read at the output
`T1 + (SYNC_STAGES+2)·T2` to `T1 + (SYNC_STAGES+3)·T2` later. T1 and T2 are the
two clock periods, and the spread is the phase between the clocks. The
interface testbench checks every isolated word against these bounds; the
first word of each run measured:

| clock1 / clock2 | T1 / T2 (ps) | first-word latency |
|-----------------|--------------|--------------------|
| 1.00 / 1.00 GHz | 1000 / 1000  | 6000 ps            |
| 1.66 / 0.66 GHz | 602 / 1514   | 7606 ps            |
| 0.66 / 1.66 GHz | 1514 / 602   | 3938 ps            |

Cell 1 is reused only after a full round trip: more than `SYNC_STAGES·(T1+T2)`
and at most `(SYNC_STAGES+1)·(T1+T2)`, which the interface testbench checks. Sustained throughput is therefore about
one word per round trip, not one per cycle. The switch FIFOs on both sides
absorb bursts. Each `switch_fifo` adds one cycle of its own clock
(first-word fall-through with a registered count).

The transistor-level original reached 300 to 480 ps in a 90 nm process (3 mm
and 6 mm inter-switch wires). This RTL counts in clock cycles, so those numbers
are not reproduced.

## Files

| file | what it is |
|------|-----------|
| `rtl/gasp_pkg.sv` | default sizes: `DATA_W`, `SYNC_STAGES`, `FIFO_DEPTH` |
| `rtl/gasp_sync.sv` | flip-flop synchroniser for one level signal |
| `rtl/gasp_sender_ctrl.sv` | sender-end control (request, cell-1 state, `enable1`, `copy`) |
| `rtl/gasp_receiver_ctrl.sv` | receiver-end control (`enable2`, `empty`, output register) |
| `rtl/gasp_datapath.sv` | input register, buffer cells 1 and 2, output register |
| `rtl/gasp_interface.sv` | the crossing interface: two controls plus data path |
| `rtl/switch_fifo.sv` | single-clock switch port FIFO |
| `rtl/gasp_link.sv` | top: FIFO, interface, FIFO |
| `tb/tb_*.sv` | one self-checking testbench per module above (except the package and synchroniser) |

Parameters (all `int unsigned`):

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W` | 32 | word width (not fixed by the scheme) |
| `SYNC_STAGES` | 2 | flip-flops per synchroniser, at least 1 |
| `FIFO_DEPTH` / `DEPTH` | 4 | words per switch FIFO |

Resets: `rst1_n` and `rst2_n` are asynchronous, active low, one per domain. Assert
both together. The data registers have no reset. The controls' state says which
of them hold a word.

## Departures from the original scheme

* **Synchronous control.** The enables are one-cycle clock enables of
  edge-triggered registers, not self-timed pulses into latches. The full/empty
  wire becomes the copy/empty toggle pair with synchronisers (see above).
* **Receiver-end insides.** The original details one control circuit: a
  request stored on clock1, a full/empty state freed by clock2, and an enable
  when both hold. Here that circuit is the sender end. The receiver end mirrors
  it, and its output-register handling is this design's own.
* **Synchroniser depth.** Two flip-flops are assumed to be enough at the clock
  rates used; no failure-rate analysis was done. Raise `SYNC_STAGES` for
  faster clocks. It costs latency and throughput as given in *Timing*.
* **Switch FIFOs.** Their organisation and depth are this design's own. They are
  kept separate from the crossing's buffer cells.
* **Not built.** The switches' routing, the mesh and folded-torus networks they
  form, the inter-switch wires and the clock generators. The link is the unit
  that would be placed on every switch-to-switch connection.
* **Widths and handshakes.** `DATA_W`, the valid/ready ports and the reset
  scheme are choices, not part of the scheme.

## Verification

Every testbench checks itself against a model written apart from the RTL. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_gasp_sender_ctrl`, `tb_gasp_receiver_ctrl`: check every cycle against a
  cycle model of the control, with a behavioural partner end. They count the
  request-first and empty-first orders, receiver stalls, and a full cell 1
  waiting for cell 2.
* `tb_gasp_datapath`: random enables on two unrelated clocks against a register
  model.
* `tb_switch_fifo`: random push/pop against a queue, including full, empty and
  simultaneous push and pop.
* `tb_gasp_interface`: the three clock pairs above. It checks first-word
  latency and the cell-1 round trip against the bounds in *Timing*, and 200
  random words per pair for loss, duplication, corruption and order.
* `tb_gasp_link`: the top at its default parameters under the same three clock
  pairs, 300 words each. It fails unless each of these happens at least once:
  sender FIFO full, receiver FIFO full, a request queued behind a full cell, an
  empty cell waiting for a request, and the receiver holding off.

Concurrent assertions in the RTL check the handshake rules: no enable into a
full cell, no overwrite of cell 2, no FIFO overflow.

Running one testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    rtl/gasp_pkg.sv rtl/gasp_sync.sv rtl/gasp_sender_ctrl.sv \
    rtl/gasp_receiver_ctrl.sv rtl/gasp_datapath.sv rtl/gasp_interface.sv \
    rtl/switch_fifo.sv rtl/gasp_link.sv tb/tb_gasp_link.sv \
    --top-module tb_gasp_link -o sim
./obj_dir/sim
```

Every run takes a few seconds. `-Wno-fatal` is needed only because the RTL
files carry no `timescale` while the testbenches do. Lint with
`verilator --lint-only -Wall`. It
reports only `SYNCASYNCNET`, because the assertions use the asynchronous resets
in `disable iff`, and `UNUSEDPARAM` for package constants a module does not use.
