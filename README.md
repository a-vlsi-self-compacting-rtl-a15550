# Self-compacting buffer for priority queue scheduling

A router output port has to buffer packets of several priorities in one memory
without splitting that memory into fixed per-priority slices. The self-compacting
buffer (SCB) does this by keeping all entries in a single shift-register array,
sorted by priority region. A write is *inserted* at the end of its priority's
region, and the rows behind it move down by one. A read always *deletes* the entry
at row 0, and the rows behind it move up by one. So the buffer never has holes. A
region takes exactly as many rows as it holds entries, and an empty priority uses
no rows at all. This is a dynamically allocated multi-queue (DAMQ). Each region is
a FIFO, and the head of the buffer is always the oldest entry of the most urgent
non-empty region.

Scheduling follows the rotating-priority-queue scheme RPQ+, an approximation of
earliest-deadline-first. Each priority level p has two FIFOs, p and p+. At regular
intervals (every Δ) a *rotation* merges p+ onto the end of p and promotes the
merged queue one level. So data that waits long enough reaches the head whatever
its original priority.

The RTL does one read, one write, or one simultaneous read/write per clock. An
RPQ+ rotation can happen in the same clock. The design is a two-stage pipeline
that needs no stalls.

## Regions and pointers

With n priority levels the buffer holds 2n regions, in this order from row 0:

```
row 0 ->  0+ | 1 | 1+ | 2 | 2+ | ... | (n-1)+ | n | free space
```

New data only arrives with a priority from 1 to n and goes into queue p. The `+`
queues and 0+ are filled only by rotation. A read always takes row 0. Row 0 belongs
to the first non-empty region, which is usually 0+.

Region 0+ always starts at row 0. The other starts are held in 2n *priority
pointers*, numbered as in `scb_pkg`:

| pointer index | holds the start row of |
|---|---|
| 2p-2 (p = 1..n) | queue p |
| 2p-1 (p = 1..n-1) | queue p+ |
| 2n-1 | free space. This is also the entry count. |

A region is empty when its pointer equals the next one. A write of priority p goes
to row `ptr[2p-1]`, the row just past the last entry of queue p. That is the free
pointer when p = n. The buffer is empty when the free pointer is 0 and full when it
is `DEPTH`.

## How one request moves the rows (`scb_buffer_ctrl`, `scb_buffer`)

Each row is one register with four choices: hold, load the write bus, load the row
above (the data moves down), or load the row below (the data moves up). The buffer
controller drives at most one of three lines per row: `wr_line`, `dn_line` and
`up_line`. When no line is set, the row holds. Let `a` be the insertion row,
`ptr[2p-1]`.

| case | rows `< a` | row `a` | rows `> a` |
|---|---|---|---|
| single write | hold | write | move down |
| single read | move up | move up | move up |

Row 0's old value goes to the output port on every read.

**Simultaneous read and write.** Everything up to the end of queue p must move up
by one, and the new entry must land in the row that this frees. That row is
`j = a-1`. Rows `0..j-1` move up, row `j` is written, and rows from `a` onwards
hold. If `a = 0`, queues 0+ to p are all empty, so the entry being read belongs to
a later region. In that case row 0 is simply overwritten with the new entry.

A thermometer decoder (`scb_thermo_decoder`) builds the lines. Unlike a one-hot
decoder, it sets every line from the given address onwards. For a single write its
lines, minus the first one, are the down lines. For a simultaneous read/write its
inverted lines are the up lines. In that case it decodes `a-1`, not `a`.

Example, 1 entry in queue 1 (`A`) and 2 in queue 2 (`B0 B1`), n = 2. The pointers
are 1+ = 1, 2 = 1, free = 3.

```
                      row: 0   1   2   3
start                      A   B0  B1  -
write C to queue 1 (a=1)   A   C   B0  B1     rows >= 1 move down, C at row 1
then read + write D to 1   C   D   B0  B1     a=2: A leaves, C moves up, D at row j=a-1=1
```

## How the pointers follow (`scb_ptr_ctrl`, `scb_prio_ptrs`, `scb_ptr_cell`)

Each cycle the pointer controller raises two sets of lines:

* **A lines**: on a served write of priority p, A is raised for every pointer past
  queue p. These are pointers `2p-1 .. 2n-1`, that is p+, p+1, ... and free.
* **S lines**: on a served read, S is raised for every pointer whose value is not 0.

A case selector then drives the pointers. A pointer with A alone adds 1, with S
alone subtracts 1, and with both or neither holds. On a simultaneous read/write,
the pointers up to queue p therefore move down, and those past it stay where they
are.

**The rule for a pointer of 0 is this design's addition.** The original scheme
decrements every pointer on a read. A pointer of 0 belongs to a region that lies
wholly before the entry being read. Decrementing it would wrap the pointer. And in
the `a = 0` case above, it would leave the following pointers one row short.

Reads are dropped when the buffer is empty. Writes are dropped when it is full,
unless a read is served in the same cycle, and also when the priority is not in
1..n. `w_ack` and `r_ack` report what was served.

Each pointer cell is an up/down counter built as a ripple chain. The carry into
bit 0 is `add | sub`. Each sum bit is the stored bit XOR its carry. For an add the
carry passes through a bit that is 1. For a subtract it passes through a bit that
is 0.

## RPQ+ rotation

A rotation moves only pointers. No data moves. It is done in two steps:

1. **Concatenation:** every p+ pointer (p = 1..n-1) copies pointer p+1. Queue p+
   is now empty and queue p ends where p+ used to end.
2. **Promotion:** every p pointer (p = 1..n-1) copies the new p+ pointer. Queue p
   is now empty, and the old p and p+ form the new (p-1)+.

Queue n and the free pointer are not moved. After a rotation queue n still holds
its data, and queues 1..n-1 with 1+..(n-1)+ are empty. The old 1 and 1+ have joined
0+.

Both steps happen on one clock edge. The copies are chained combinationally:
`nxt_rw` is a pointer's value after this cycle's add/sub, and `nxt` is its value
after rotation. If a read or write arrives in the same cycle as a rotation, the
read/write is applied first, using the labels from before the rotation. The
rotation is then applied to the result. The Δ timer is not part of the SCB. The
`rpq` input is pulsed from outside.

## Pipeline and timing (`scb_top`)

| cycle | stage | what happens |
|---|---|---|
| t | 1 | Requests are gated by full/empty, `w_ack`/`r_ack` are valid, and add/sub lines and the insertion row are formed. At the edge the pointers update, and the case, insertion row and write data are registered. |
| t+1 | 2 | The buffer controller decodes the registered request. At the edge the rows move, and a read's row-0 value is captured. |
| t+2 | | `rd_valid`/`rd_data` show the read data. |

The pointers run one stage ahead of the rows. A request in cycle t+1 therefore
already sees the pointers that include request t. Since that is the layout the rows
will have once request t reaches them, back-to-back requests need no stall. One
request is accepted every clock. `full`, `empty` and `count` include the request
that is in stage 2.

### `scb_top` ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset that empties the buffer |
| `r_ext` | in | 1 | read request |
| `w_ext`, `prio`, `wdata` | in | 1, PW, WIDTH | write request, its priority (1..n), its data |
| `rpq` | in | 1 | RPQ+ rotation |
| `w_ack`, `r_ack` | out | 1 | request served this cycle (combinational) |
| `rd_valid`, `rd_data` | out | 1, WIDTH | output port, 2 cycles after `r_ack` |
| `full`, `empty`, `count` | out | 1, 1, AW | occupancy |
| `ptr` | out | 2n × AW | the priority pointers |
| `buf_case` | out | 2 | case the buffer executes this cycle (`scb_case_e`) |

`PW = clog2(NPRIO+1)` and `AW = clog2(DEPTH+1)`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NPRIO` | 3 | Priority levels. Three is the size of the worked example the scheme is described with. |
| `DEPTH` | 16 | Buffer rows. The scheme fixes no size; this design's choice. |
| `WIDTH` | 16 | Bits per row. This design's choice. |

Any `DEPTH ≥ 2` and `NPRIO ≥ 1` work. Besides the default, the end-to-end test has
passed with (`DEPTH`, `NPRIO`) = (2, 1), (5, 2), (7, 4), (33, 5) and (64, 3). With
one level the insertion-ahead-of-the-head case cannot occur, so its coverage
counter stays at zero. The shift array is `DEPTH × WIDTH`
flip-flops, and every row has a 4-input select.

## Where this RTL departs from the transistor-level scheme

* The scheme is a custom CMOS design: pass-transistor cells, a single-phase clock
  whose high and low halves are used separately, and latches. Here every block is
  ordinary rising-edge flip-flops plus combinational logic. Work done on clock
  halves (falling-edge generation of add/sub, the address latched while the clock
  is high) happens within one clock period.
* The written row in a simultaneous read/write is one row before the insertion
  point, as described above. The prose description of this case can be read as
  writing at the insertion point itself. The line table of the case selector
  supports the version used here, and it is the only one that keeps regions intact.
* A pointer of 0 ignores the read (see "How the pointers follow").
* Both rotation steps happen on one clock edge, not as two consecutive signals.
* Writes with a priority outside 1..n are dropped.
* The buffer rows are cleared on reset, and the read data is registered with a
  valid flag.
* Not included, because they sit around the SCB and are not specified: the
  priority assigner that derives a packet's priority from its header, the Δ timer
  that issues `rpq`, and the router's input controllers and switch.

## Files

`rtl/` holds the design. There is one module or package per file:

```
scb_pkg            sizes, scb_case_e, pointer numbering
scb_top            the SCB: stage 1, pipeline register, stage 2
  scb_ptr_ctrl     request gating, A/S lines, case selector, insertion row
  scb_prio_ptrs    2n pointer cells and the rotation wiring
    scb_ptr_cell   one pointer: ripple add/sub, reset, rotation load
  scb_buffer_ctrl  case selection into per-row write/down/up lines
    scb_thermo_decoder
  scb_buffer       the row array and the output register
```

`tb/` has one self-checking testbench per module, named `tb_<module>`.
`tb_scb_top` runs the whole SCB at its default size for 20,000 cycles of random
traffic in phases that fill, drain and churn the buffer. It compares everything
against a model that keeps one FIFO per region. Each cycle it checks the
acknowledges, every pointer, the occupancy, and the data and 2-cycle latency of
every read. It also counts each mechanism and fails if one never occurs: single
write, single read, simultaneous read/write, write refused when full, read/write
when full, read refused when empty, rotation, rotation together with a read/write,
and insertion ahead of the entry being read. The unit testbenches are exhaustive
for the two decoders and random for the others. Each testbench prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/scb_pkg.sv tb/tb_scb_top.sv \
          --top-module tb_scb_top -Mdir obj_top
./obj_top/Vtb_scb_top
```

For another testbench, replace `tb_scb_top` with its name. Each testbench finishes
in well under a second. To check the RTL without simulating it, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/scb_pkg.sv rtl/scb_top.sv`. The
remaining lint warnings are harmless: unused bits of the pointer-chain vectors, package
constants a module does not use when linted on its own, and `rst_n` used both as an
asynchronous reset and in the `disable iff` of the assertions.
