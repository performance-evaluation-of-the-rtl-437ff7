# Input and output buffered Knockout Switch

A Knockout Switch is a single-stage, output-buffered packet switch. Every
input broadcasts its cell on its own bus. Every output has a *bus interface*
that watches all N buses and keeps the cells addressed to it. Several inputs
can address the same output in one time slot, so each bus interface has an
N-to-L *concentrator* that accepts at most L of them. In the plain Knockout
Switch a cell beyond the L-th is simply lost. L must therefore be large
(7 to 12 for typical loss targets). The concentrators cost about L·N 2×2
elements per output, and every output needs L packet buffers.

This design adds a small FIFO in front of every input. A cell that loses at
the concentrator is not dropped: it stays at the head of its input buffer and
competes again in the next slot. Cells are now lost only when an input buffer
overflows, which is rare. With 5-cell input buffers, L = 4 gives a loss
below 10⁻⁶ at 90 % load. The cost of the input buffers is head-of-line (HOL)
blocking. It adds a mean extra delay of only a few hundredths of a slot at
these sizes.

The RTL is parameterised SystemVerilog with one module per block, built from
the bottom up:

```
iobks_switch                        N x N switch
 ├─ input_buffer  × N               S-cell FIFO, HOL offer/ack, bypass, overflow
 │   └─ packet_fifo
 └─ bus_interface × N               one per output
     ├─ packet_filter × N           address compare
     ├─ concentrator                N-to-L selection and acknowledgement
     └─ shared_buffer               one L-input, 1-output FIFO queue
         ├─ shifter                 L-to-L circular shift
         └─ packet_fifo × L         packet buffers of D cells
iobks_pkg                           cell type and default sizes
```

## Default sizes

| Parameter | Default | Meaning | Origin |
|---|---|---|---|
| `N` | 32 | ports | own choice; the sizing analysis assumes a large N |
| `L` | 4 | concentrator outputs per output | sizing for 90 % load, loss 10⁻⁶ |
| `S` | 5 | input buffer depth, cells | sizing study |
| `D` | 10 | depth of each of the L packet buffers | 4 × 10 = 40 cells per output |
| cell | 5-bit address + 384-bit payload | `iobks_pkg::cell_t` | own choice (ATM payload size) |

The sizing study gives the (L, S) pairs needed for a loss target at each load:

| load | L, S for 10⁻⁶ | L, S for 10⁻¹⁰ |
|---|---|---|
| 0.6 | 3, 3 | 3, 5 |
| 0.7 | 3, 4 | 4, 4 |
| 0.8 | 3, 5 | 4, 5 |
| 0.9 | 4, 4 | 5, 5 |
| 0.99 | 5, 5 | 6, 5 |

The defaults cover every pair with L ≤ 4. For the others, set `L` to 5 or 6.
A plain Knockout Switch needs L = 7 to 9 for 10⁻⁶ and L = 10 to 12 for 10⁻¹⁰.

`N` can be at most 32, because `iobks_pkg::ADDR_W` sets the width of the
address field. Raise `N_PORTS` in the package for a larger switch.
`PAYLOAD_W` sets the payload width.

## One time slot

One clock cycle is one time slot. Everything a slot does, apart from storage,
is combinational:

1. Each input buffer puts its HOL cell on its broadcast bus (`hol_valid`,
   `hol_cell`). If the buffer is empty and a cell arrives in this slot, the
   arriving cell itself is the HOL cell.
2. In every bus interface, the packet filters compare each bus cell's address
   with the interface's own (`MY_ADDR`) and raise a request for each match.
3. Each concentrator grants at most L requests and places the granted cells
   on its outputs 0..k−1 without gaps.
4. An input's acknowledgement is the OR of the grants it got from all N
   interfaces. Only the addressed interface can grant it.
5. At the clock edge, acknowledged cells leave their input buffers. The
   granted cells enter the shared buffers, and each shared buffer sends its
   oldest cell to its output.

A cell entering an idle switch leaves its output one cycle after it arrived.
In the original scheme only the cell header goes to the concentrator. The
acknowledgement comes back, and then the whole cell is sent. This RTL moves
whole cells in parallel, so the header, the acknowledgement and the transfer
all fall in one cycle. A real implementation would spend part of the slot on
the header exchange, or run the fabric faster than the lines. This RTL does
not model that overhead.

## Input buffer rules

`input_buffer` follows the queueing model the sizing rests on, exactly:

- **Bypass.** A cell that arrives at an empty buffer competes in its own
  slot. If it is acknowledged it never occupies storage (`bypass` output).
- **Overflow.** A cell that arrives while the buffer held S cells at the end
  of the previous slot is lost (`in_drop`). This holds even if the HOL cell
  leaves in the same slot. Occupancy therefore never exceeds S.
- **HOL blocking.** An unacknowledged HOL cell stays where it is, and the
  cells behind it wait too (`hol_blocked` at the top).

## Concentrator selection

The sizing analysis treats losing at the concentrator as a random event. It
does not say how the concentrator chooses. The classic Knockout concentrator
is a tournament of 2×2 elements. Here the concentrator is the simplest
circuit with the required function. It scans the inputs in a rotating order
starting at a pointer `ptr`. A request's *rank* is the number of requests
ahead of it in that order. A request wins if its rank is below L, and it goes
to concentrator output *rank*. When requests are refused, `ptr` moves to the
first refused input. That input then wins in the next slot, so no input can
starve behind a HOL cell that keeps losing. The logic is O(N·L) per output:
a prefix count and an AND-OR selector.

## Shared buffer

The L concentrator outputs feed an L-to-L `shifter`, which rotates them by a
write pointer. Arriving cells therefore go to the L packet buffers in cyclic
order, and the write pointer then advances by the number stored. The output
reads the packet buffers in the same cyclic order, one cell per slot. The
result is one FIFO queue with up to L cells in and one cell out per slot,
and L·D places.

The cyclic filling keeps the packet buffers' occupancies within one cell of
each other. A packet buffer can therefore refuse a cell only when the whole
queue is full. In that case the cells that do not fit are lost and counted
on `n_drop`/`sb_drop`. The slot's departing cell frees its place before the
arrivals are stored. An assertion checks that the concentrator delivers its
cells packed from output 0.

## Ports of the top

| Port | Width | |
|---|---|---|
| `clk`, `rst_n` | 1 | slot clock; asynchronous active-low reset empties all buffers |
| `in_valid`, `in_cell` | N, N × `cell_t` | arrivals of this slot; `in_cell[i].dest` must be < N |
| `out_valid`, `out_cell` | N, N × `cell_t` | departures of this slot |
| `in_drop` | N | arrival lost at a full input buffer |
| `hol_blocked` | N | HOL cell refused by its concentrator this slot |
| `bypass` | N | cell crossed its empty input buffer in its arrival slot |
| `sb_drop` | N × ⌈log2(L+1)⌉ | cells lost at each full shared buffer this slot |

The output lines have no backpressure. Each output takes one cell per slot.

## How far it is checked

Each module has a self-checking testbench in `tb/`. Each compares the module
with an independent reference model written from the rules above:

- `tb_packet_fifo`, `tb_input_buffer`, `tb_shared_buffer`: queue models.
- `tb_concentrator`: the rotating-rank rule, and that the first refused
  input wins in the next slot.
- `tb_shifter`, `tb_packet_filter`: exhaustive or random checks.
- `tb_bus_interface`: filter, selection and queue models combined.
- `tb_iobks_switch` (N = 8):
  - a one-slot latency check;
  - a knockout of six simultaneous cells for one output;
  - uniform and hot-spot traffic, with a scoreboard. The scoreboard checks
    that each cell leaves on the right output, that cells from one input to
    one output keep their order with no duplicates, and that every accepted
    cell is accounted for.

  It requires bypass, HOL blocking, input overflow and shared buffer overflow
  to each happen at least once.
- `tb_iobks_full`: the switch at its defaults (N = 32, L = 4, S = 5, D = 10)
  for 20 000 slots of 90 % uniform Bernoulli traffic, with the same
  scoreboard. The run gave no input buffer loss and 19 shared buffer losses
  out of 575 702 cells. The mean extra delay from input buffering was
  0.025 slot (the analytical value at this size is 0.035). It is measured by
  Little's law: cells held in input buffers at the end of each slot, summed
  and divided by cells accepted.
- `tb_iobks_load_sweep`: nine (load, L) points at N = 16. The extra delay
  stays below 0.1 slot in every row, and lies between 0.001 and 0.05 slot.
- `tb_iobks_saturation`: maximum throughput with every input saturated, at
  N = 16 for L = 1, 2, 3, 4, 6 and 8. Only HOL blocking limits it here.

  | L | 1 | 2 | 3 | 4 | 6 | 8 |
  |---|---|---|---|---|---|---|
  | measured, N = 16 | 0.607 | 0.901 | 0.982 | 0.997 | 1.000 | 1.000 |
  | analytical, N → ∞ | 0.632 | 0.896 | 0.977 | 0.996 | 0.9999 | 0.999999 |

  This is why a small L costs almost no capacity: already at L = 4 the
  input buffers lose less than half a percent of throughput.

Loss rates of 10⁻⁶ and below cannot be confirmed by simulation of this
length. The tests show only that losses are absent or rare at these sizes.
The switch size and the concentrator's choice rule differ from the
infinite-N, random-choice analysis, so measured figures agree with the
analytical ones only in magnitude.

## Simulating

With Verilator 5 (package first):

```
verilator --binary --timing --assert --top-module tb_iobks_switch \
    rtl/iobks_pkg.sv rtl/*.sv tb/tb_iobks_switch.sv -o sim
./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`. A
watchdog ends a run that hangs. Building the full-size and sweep testbenches
takes a few minutes, because of the 389-bit cells. Running them takes
seconds.

## Departures from the source scheme

- Whole cells move in parallel within one cycle. There is no separate header
  phase and no fabric speed-up.
- The concentrator is a rotating-priority selector, not a 2×2-element
  knockout tournament. The function is the same; the fairness is
  deterministic rather than random.
- Packet filters compare the address in parallel, not bit-serially.
- The switch size N = 32, the cell format and the reset behaviour are this
  design's own choices.

Lint notes: Verilator reports `SYNCASYNCNET` because the assertions sample
`rst_n` synchronously while the flip-flops use it as an asynchronous reset.
It also reports `PINCONNECTEMPTY` for the monitoring outputs the top leaves
open (input and shared buffer occupancy, concentrator reject count). Both
are intended.
