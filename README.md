# Priority FIFO with in-queue sorting

A small hardware queue of eight 10-bit elements that behaves like a FIFO
with priorities. Each element carries a 2-bit priority (0 lowest, 3
highest) and an 8-bit data value. An element added to the queue is placed
behind every element of equal or higher priority but ahead of all lower
priority ones, so the head is always the oldest element of the highest
priority present. On request the queue also sorts itself by data value
inside each priority level, and it can walk its contents past a display.
Elements that arrive while the queue is full wait in an input buffer and
enter as soon as a delete makes room.

The storage is not a RAM but a ring of eight registers, each loaded through
its own 4-input multiplexer: hold, take the neighbour on the right, take
the neighbour on the left, or take the new element. Every data movement
the queue needs, whether a shift during insertion or a swap during sorting,
is a setting of those multiplexers driven from one state machine.

## Element format

| bits  | field    |
|-------|----------|
| [9:8] | priority, 0..3, 3 is served first |
| [7:0] | data     |

Written in hex an element reads as three digits, priority first: `311` is
priority 3, data `0x11`; `022` is priority 0, data `0x22`. The display shows
the same three digits.

## The ring, head, tail and the two flags

`head` points at the element that will be deleted next and is always shown
on `data_out`. `tail` points at the first free register. Both are 3-bit
counters that wrap around the ring, so `head == tail` means either empty
or full; two flags, `empty` and `full`, tell the cases apart. "Left" in
this design means towards the head and "right" towards the tail.

## Insertion (the hard part)

Adding an element is a walk from the tail towards the head with a third
counter, the sub-counter:

1. `S6` – while `add` is high the element on `din` is latched (the value on
   the last clock before `add` falls is the one inserted); `empty` is
   cleared. Nothing else happens until `add` falls.
2. `S7` – the sub-counter is loaded with `tail`.
3. `S8` – look at the element just left of the sub-counter. If its
   priority is lower than the new element's and the sub-counter has not
   reached the head, go to `S10`; otherwise go to `S9`.
4. `S10` – the register at the sub-counter copies its left neighbour
   (mux code 2), i.e. that element moves one place right; the sub-counter
   steps left; back to `S8`.
5. `S9` – the new element is written at the sub-counter (mux code 3).
6. `S11` advances the tail, `S12` checks `head == tail`, and `S13` sets
   `full` if so. Back to the idle state `S1`.

With `k` elements moved, the add completes `5 + 2k` clocks after `add`
falls, one clock more when it fills the queue: 5 clocks at best, 20 at worst
(seven elements moved, queue full). An add while the queue is full is
ignored by the queue itself; in the full design it waits in the input
buffer instead.

Example, starting empty, adding `301, 322, 022, 311, 201, 203, 101` and
deleting twice: the registers end as `301 322 311 201 203 101 022 000`
with head 2 and tail 7, so the queue reads `311, 201, 203, 101, 022`. The
deleted elements stay in registers 0 and 1 but are no longer part of the
queue.

## Delete

From `S1`, `del` high (with `add` low and the queue not empty) goes to
`S2`, which advances the head and clears `full`. `S3` then waits for `del`
to fall, `S4` compares head and tail and `S5` sets `empty` if they match.
A delete on an empty queue is ignored. If `add` and `del` are high
together in `S1`, the add is served first.

## Sorting within a priority level

Because the queue is always in decreasing priority order, every priority
level forms a contiguous run, and sorting treats each run as a queue of its
own. Raising `sort` while the machine is idle starts a bubble sort
(`pq_sorter`): each clock it looks at one adjacent pair, counted from the
head, and if both have the same priority and the left data value is
larger, it sets the two multiplexers to exchange them in that clock.
Passes repeat until one makes no exchange. Order is ascending by data,
compared as unsigned. Priorities never change places.

When the sort is finished `eoc` rises and stays high until `sort` is
dropped; `eoc` falls one clock later and the machine is idle again. A
sort of `n >= 2` elements takes at most `n(n-1) + 2` clocks (58 for a full
queue).

## Showing the queue

While `show_queue` is high, the display walks through the queue from the
head, one element every `SHOW_STEP` clocks, and starts over at the head
after the last element. `show_index` gives the position being shown
(0 = head). `data_out` keeps showing the head throughout. When
`show_queue` is low the display shows the head, and it is blank when the
queue is empty. The display is three static seven-segment digits
(priority, data high nibble, data low nibble), segments `{g,f,e,d,c,b,a}`,
active high. With the default `SHOW_STEP = 1` a new element appears every
clock, which suits simulation; a board needs `SHOW_STEP` set to a fraction
of a second worth of clocks.

## Input buffer

Every add request passes through `pq_inbuf`, an 8-entry first-in
first-out memory. A request is one pulse of `add`, however long. It is
written into the buffer on the clock after `add` falls. The buffer hands
its oldest element to the queue with a one-clock add pulse whenever the
queue's state machine is idle and the queue is not full. With room in the
queue an element therefore goes straight through, two clocks later than a
direct add. With the queue full, elements wait and enter one at a time, in
arrival order, after each delete. A request that finds the buffer full too
is dropped. `buf_full` and `buf_count` report the buffer's state; `full`
and `empty` always describe the priority queue itself.

## Interface of `pq_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `reset` | in | 1 | synchronous, active high; hold it high for at least one clock at start-up |
| `add` | in | 1 | add request; `data_in` is taken on the last clock it is high |
| `del` | in | 1 | delete the head; one delete per pulse |
| `sort` | in | 1 | sort each priority level; hold until `eoc`, then drop |
| `show_queue` | in | 1 | walk the display through the queue |
| `data_in` | in | 10 | element to add |
| `data_out` | out | 10 | head of the queue (stale when empty) |
| `full`, `empty` | out | 1 | queue holds 8 / 0 elements |
| `eoc` | out | 1 | sort finished |
| `buf_full`, `buf_count` | out | 1, 4 | input buffer state |
| `count` | out | 4 | elements in the queue |
| `show_index` | out | 4 | position of the displayed element during `show_queue` |
| `seg[3]` | out | 3 x 7 | seven-segment digits, `seg[2]` is the priority |

The operation inputs are levels held for one or more clocks; one pulse is
one operation. The input buffer captures add pulses at any time. The queue
runs one operation at a time: a delete or sort requested while another
operation runs is taken up when the machine returns to `S1`, provided its
input is still high then.

Parameters: `DEPTH = 8` (queue registers), `BUF_DEPTH = 8` (input buffer),
`SHOW_STEP = 1`.

## Modules

| file | role |
|------|------|
| `rtl/pq_pkg.sv` | element struct `elem_t`, mux codes `sel_t`, widths |
| `rtl/pq_regfile.sv` | the ring of registers with their 4-input muxes |
| `rtl/pq_fifo.sv` | the queue: state machine, head/tail/sub-counter, flags; holds the next three |
| `rtl/pq_sorter.sv` | bubble sort within priority levels |
| `rtl/pq_show.sv` | walk through the queue for the display |
| `rtl/pq_inbuf.sv` | input buffer for adds that arrive while the queue is full |
| `rtl/pq_sevenseg.sv` | three-digit hex seven-segment decoder |
| `rtl/pq_top.sv` | buffer + queue + display |

A keypad and its scanning logic are expected to drive `add` and `data_in`.
The clock comes from outside. Neither is part of this RTL.

## What is specified and what is chosen here

These parts come from the specification this design follows: the element
width and its split into 8 data bits and 2 priority bits, eight registers
in a circular queue, the four multiplexer inputs and their order, the
insertion rule, and the state machine for add and delete (states
`S1`–`S13`, with their actions). The specification's reference run
matches this design register for register (the example above). The `eoc`
handshake, the behaviour of a full queue, and the existence of a buffer
and a seven-segment display are also specified.

These choices are this design's own:

- Bit placement: priority sits in bits [9:8].
- Shift timing: the shift register is written in `S10`, not `S8`.
- Latching `din`: the element is latched while `add` is high.
- Operation order: an add wins over a delete when both are high.
- Sort states: the sort has its own states entered from `S1`.
- Sort method: bubble sort, one pair per clock, ascending order.
- `SHOW_QUEUE`: its step rate and its wrap-around.
- Input buffer: its size, its drop rule and its interface.
- Display: format, segment order and polarity.
- Reset: synchronous, and it clears every register.

The specification also mentions a possible age-based priority for elements
that have waited in the buffer. It gives no rule for ageing, so buffered
elements here simply enter in arrival order.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. For example, for the whole design:

```
verilator --binary --timing --assert -Irtl rtl/pq_pkg.sv rtl/pq_regfile.sv \
  rtl/pq_sorter.sv rtl/pq_show.sv rtl/pq_fifo.sv rtl/pq_inbuf.sv \
  rtl/pq_sevenseg.sv rtl/pq_top.sv tb/tb_pq_top.sv --top-module tb_pq_top
./obj_dir/Vtb_pq_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_pq_top` | 1500 random operations at default sizes against a model of queue plus buffer. It compares outputs, display digits and every element shown, and requires each mechanism at least once: shifting insert, buffered add, dropped add, buffered element fed in after a delete, delete on empty, reordering sort, show walk. |
| `tb_pq_fig3` | the reference run above: register contents, head and tail pointers, clocks per add |
| `tb_pq_fifo` | the queue alone against a model: order, flags, `5+2k` add timing, delete timing, the `eoc` handshake, sort results, full/empty corner cases |
| `tb_pq_regfile` | random mux selects against a model of the ring |
| `tb_pq_sorter` | random queues sorted in place, sort-time bound, registers outside the queue untouched |
| `tb_pq_show` | walk order and wrap-around with `STEP = 3` |
| `tb_pq_inbuf` | clock-exact model of store, drop and hand-on, and arrival order |
| `tb_pq_sevenseg` | all 1024 values, with the expected segments built independently |

`pq_fifo` and `pq_inbuf` carry concurrent assertions: element count within
range, flags consistent with the count, no hand-on from an empty buffer.
Build with `--assert` to enable them.
