# Three-stage shared-buffer ATM switch

A shared-buffer switch is a good ATM switch. All its ports share one cell
memory, so it needs less buffer for a given loss rate, and its cost grows
linearly with the number of ports. It cannot grow without limit, though: the
memory has to be read and written once per port in every cell time. This
design builds a large `N x N` switch from `3n` identical `n x n` shared-buffer
*unit switches* (`n = sqrt(N)`), placed in the three stages of a Clos network.

The Clos topology is not used in its usual way. There is no path search, no
rearrangement and no central controller. Every unit switch steps through the
same time-division schedule, and all switches are started together. As a
result:

* there is exactly **one path** for every input/output pair, so cells of a
  connection always arrive **in order**;
* each unit switch makes its own routing decision from a counter and the
  cell's destination;
* a `buffer-full` line between stages stops a switch from sending into a full
  buffer. **Cells can therefore be lost only at the input stage.**

The default build is the 16 x 16 switch: four 4 x 4 unit switches per stage,
53-octet (424-bit) cells and 16 buffer cells per port. The same RTL
elaborates 64 x 64 and 256 x 256 switches by setting one parameter.

## Time slots and cycles

A *time slot* is the time one cell takes on a line. It is divided into `n`
*cycles* `t0 .. t(n-1)`, and one clock period is one cycle. Every port of
every unit switch is active in exactly one cycle of the slot: the cycle
numbered by its *label*. In cycle `t`, each unit switch accepts at most one
cell, on its input labelled `t`, and sends at most one cell, on its output
labelled `t`.

The links between stages follow the standard Clos pattern:

* input switch `a`, output `b` → centre switch `b`, input `a`;
* centre switch `c`, output `d` → output switch `d`, input `c`.

Input line `j = a*n + i` enters input switch `a` on port `i`. Output line
`j = d*n + k` leaves output switch `d` on port `k`. The routing tag of a cell
is its destination line number. The upper half of the tag is the output
switch; the lower half is the port of that switch.

The per-cycle routing rule is:

| stage | in cycle `t`, switch `s` sends ... | on link |
|---|---|---|
| input `a`  | the head cell of its queue for output switch `t` | to centre switch `(t - a) mod n` |
| centre `c` | the head cell of its queue for output switch `(c - 1 - t) mod n` | to that output switch |
| output `d` | the head cell of its queue for port `t` | output line `d*n + t` |

The centre stage walks its outputs in the reverse order of its inputs. This
keeps one input/output pairing from being favoured by the cyclic schedule.

Each unit switch implements this rule with two counters. **DEC-CNT** picks
which queue is served. **DMX-CNT** picks which output link the cell is sent
on. Both step once per cycle. They are loaded with start values that depend
only on the stage and the switch index `i`:

| stage  | DEC-CNT start | DMX-CNT start | direction |
|--------|---------------|---------------|-----------|
| input  | 0             | `(n - i) mod n` | up |
| centre | `(n - 1 + i) mod n` | `(n - 1 + i) mod n` | down |
| output | 0             | 0             | up |

For n = 4, the DEC-CNT starts of the centre switches are 3, 0, 1, 2, and the
DMX-CNT starts of the input switches are 0, 3, 2, 1. `atm_pkg` computes these
values, and the top level loads them all with a single `load` pulse. That pulse
is the only thing that synchronises the fabric.

**Worked example (N = 16).** A cell arrives on line (0,0) with destination
line 12, which is output switch 3, port 0.

1. The cell enters input switch 0 in cycle t0.
2. It waits in queue 3 until t3, then goes to centre switch `(3 - 0) mod 4 = 3`.
3. Centre switch 3 serves output switch `(3 - 1 - t) mod 4 = 3` when `t = 3`,
   so the cell leaves it in the next t3.
4. Output switch 3 sends it on port 0 in the next t0.

On an idle switch this is 8 cycles from entering the input switch to leaving
the output switch. The end-to-end testbench checks the exit cycle of every one
of the 256 input/output pairs against this rule.

## Inside a unit switch

`unit_switch` is the same module in all three stages. Three pins set its role:
`count_down`, `use_lh`, and the counter start values.

**Input merge.** In any cycle only one input link carries a cell. The inputs
are therefore ORed together instead of multiplexed. Every sender drives zeros
on its idle links so that the OR works.

**Shared buffer as linked lists.** The buffer has `LOCS` locations. Each one
holds a cell, its tag and a *next-address* field. The switch keeps one queue
per output, `n` queues in all. Queue `q` is a pair of registers:

* `RARq` points at the head cell;
* `WARq` points at an **empty** location that ends the list.

A queue is empty when `RARq == WARq`. Because each queue always owns one empty
tail location, `LOCS - n` cells can be buffered. A FIFO of free addresses, the
**EA-FIFO**, holds all the other locations.

**Every cycle, the write side does this:**

1. It picks the queue from the tag, using the upper half at the input and
   centre stages and the lower half at the output stage.
2. It writes the cell into the location at `WAR[q]`.
3. It pops a free address from the EA-FIFO. That address goes into the cell's
   next-address field and also becomes the new `WAR[q]`.

**In the same cycle, the read side does this:**

1. DEC-CNT names the queue to serve and DMX-CNT names the output link.
2. It sends the cell only if the queue is not empty **and** the buffer-full
   line of the receiver on that link is low.
3. It reads the cell at `RAR[q]` and drives it on the link through the
   demultiplexer.
4. `RAR[q]` takes the cell's next-address field, and the old `RAR[q]` goes
   back into the EA-FIFO.

The read and the write always touch different locations. A cell written in
cycle `t` can leave in cycle `t+1` at the earliest.

**Flow control and loss.** `buf_full` is the EA-FIFO's empty flag, taken from
its registered count. It goes back to the previous stage on every input link
of the switch. The output stage ties its own buffer-full inputs low. A cell
that reaches a full input switch is discarded and flagged on `cell_dropped`.
No buffer-full line reaches the input stage, so that is the only place where
cells are lost. A location freed in a cycle can be reused only from the next
cycle.

## Line interface

Each input line carries at most one cell per slot, sent as `n` words of
`LINE_W = ceil(424/n)` bits. Word `w` is sent in cycle `w`. `in_start` and the
routing tag `in_dest` come with word 0.

* **S/P converter** (`sp_converter`): assembles the cell and hands it to the
  **port selector** for the whole next slot.
* **Port selector** (`port_selector`): offers line `i` to its input switch in
  cycle `i`.
* **P/S converter** (`ps_converter`): sends each cell leaving an output switch
  on its line in the next `n` cycles.

The latency from the first input word to the first output word is therefore
`n` cycles (the S/P), plus the time through the three buffers, plus one cycle.
For N = 16 on an idle switch it is 8 to 20 cycles (2 to 5 slots), depending
on how the cell's path lines up with the counters.

## Modules

```
atm_switch_top            N x N switch, three stages, Clos wiring, line interface
├─ sp_converter   (N)     line words -> whole cell, one slot later
├─ port_selector  (n)     time-division selection of the n lines of an input switch
├─ unit_switch    (3n)    n x n shared-buffer switch
│  ├─ cycle_counter  x2   DEC-CNT and DMX-CNT (mod-n, up/down, loadable)
│  ├─ addr_registers      RAR/WAR queue pointers with their decoders
│  ├─ ea_fifo             free-address FIFO, empty = buffer full
│  ├─ shared_buffer       cell memory with next-address fields
│  ├─ flow_enable         buffer-full selection, send / blocked
│  └─ cell_demux          1 x n output demultiplexer
└─ ps_converter   (N)     whole cell -> line words
atm_pkg                   cell width, stage enum, counter start values, isqrt
```

`atm_switch_top` parameters:

* `NPORTS` (N, default 16): must be a perfect square.
* `CELLS_PER_PORT` (default 16): the buffer of a unit switch is
  `n * CELLS_PER_PORT` locations, of which `n` are queue tails.
* `CELL_W` (default 424).

Besides the lines, the top brings out these signals for each unit switch:
drop, blocked and buffer-full flags, and occupancy.

**Timing of the interface:**

* Pulse `load` for one clock after reset. The next cycle is t0, and
  `slot_start` marks every t0 after that.
* Reset (`rst_n`) is synchronous and active low. It empties all queues.
* All control and status outputs are single-cycle.

## Sizes and speed

With the defaults, each unit switch holds 64 x (424 + 4 + 6) bits of buffer.
Twelve of them make about 333 kbit of memory in total. Every cycle needs one
read and one write of a whole cell. At 155 Mbit/s a slot is about 2.74 us. For
n = 4, a cycle is therefore 685 ns, and each memory access gets about 340 ns.
If the memory were `b` bits wide instead of a whole cell, the access time
would shrink by a factor of `b/424`.

The buffer size is a choice of this design. The original evaluation found
that fewer than 10 cells per port give a loss rate below 1e-6 at load 0.9
under uniform traffic; 16 per port leaves margin. Runs that measure loss
with very large buffers, such as 128 cells per port, need
`CELLS_PER_PORT = 128`.

## Where this RTL departs from the original design

* **Cell width.** A cell moves as one 424-bit word on every link and in every
  buffer access. The original design converts to a `b`-bit word width inside
  every unit switch, and `b` is left open. Here the S/P and P/S converters sit
  once per line at the edge of the switch, and the line word is `ceil(424/n)`
  bits.
* **Routing tag.** The tag arrives beside the cell. The header translator
  that would produce it from the VPI/VCI is not included, because no
  translation table or header mapping was specified.
* **Start values.** Counter start values are set by pins, as the original
  design intends, but `atm_switch_top` ties those pins to constants.
* **Idle links and buffer-full.** Idle links driving zeros, the registered
  buffer-full flag and the reset contents of the queues are this
  implementation's own choices.

## Verification

Each module has a self-checking testbench in `tb/` that compares it with an
independent model:

* **`tb_unit_switch`** runs a 4 x 4 switch with 16 locations against one FIFO
  per queue, in all three stage roles and under overload.
* **`tb_atm_switch_top`** runs the whole 16 x 16 switch at its default
  parameters, in four parts:
  * The exit cycle of all 256 single-cell paths is compared with the routing
    rule above.
  * A transpose permutation at full load must reach 100 % throughput with no
    loss.
  * Uniform random traffic at load 0.9 is checked against a scoreboard for
    order, integrity and conservation.
  * Hot-spot traffic forces every buffer-full line, blocked transfers at the
    input and centre stages, and input-stage loss, each of which must occur.
* **`tb_workload_n16`, `tb_workload_n64` and `tb_workload_n256`** run
  uniform random and bursty (mean burst 4 and 8) traffic through the 16, 64
  and 256-line builds. They report throughput, loss, mean queue length per
  stage and mean delay. They also check that no cell arrives sooner than the
  pipeline allows. `tb_workload_n16` also saturates every line (a cell in
  every slot) and requires at least 0.9 cells per line and slot to get
  through.
* **`tb_workload_buffer128`** builds the 16-line switch with 128 cells per
  port, so nothing is lost. It records how often an input switch holds at
  least `k` cells per port. That frequency estimates the loss rate a
  `k`-cell-per-port buffer would have. A saturated run with this buffer must
  deliver every cell, which is 100 % throughput.

Typical results at load 0.9 with 16 cells per port:

* Uniform traffic: no loss for 576,000 cells at N = 16 and N = 64.
* Mean cells held per port: about 3.6 at the input stage, 0.5 at the centre
  and 3.9 at the output. The centre switches stay almost empty, and the input
  and output stages hold about the same amount.
* Mean delay from the first input word to the first output word: 10.7
  slots. About 2 slots of this are fixed pipeline.
* Bursty traffic: about 10 % loss with bursts of 4, and 20 % with bursts of
  8. Bursts need far larger buffers.
* Saturated uniform traffic (arrival rate 1.0) at N = 16: throughput 0.954
  with 16 cells per port, where the rest is lost at the input stage, and
  1.000 with no loss with 128 cells per port. Even then the centre switches
  hold only about 0.6 cells per port, against 55 at the input.
* Occupancy with 128 cells per port at load 0.9: at least 10 cells per port
  in about 1.7e-4 of samples, and at least 12 in none of 160,000 samples.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` at the end. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/atm_pkg.sv tb/tb_atm_switch_top.sv --top-module tb_atm_switch_top
./obj_dir/Vtb_atm_switch_top
```

To run another testbench, replace the last file and the top-module name.
`tb_workload_n256` takes about a minute to compile; all others build and run
in seconds.
