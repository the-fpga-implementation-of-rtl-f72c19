# RC-DBA upstream scheduler for an EPON OLT

In an Ethernet passive optical network (EPON) many ONUs (optical network units)
share one upstream fibre to the OLT (optical line terminal). They do not
compete for it. Each ONU reports how many time slots each of its priority
queues wants. The OLT's scheduler decides who transmits when and answers every
ONU with a gate message. This RTL is such a scheduler. It runs the RC-DBA
("request counter" dynamic bandwidth allocation) algorithm, which does two
things:

* it serves traffic by priority (High, then Middle, then Low), and
* it stays fair among ONUs of the same priority, so that one ONU asking for a
  lot cannot keep others waiting again and again.

The design is an FPGA build. A host processor writes the report frames into a
register file over a 16-bit asynchronous bus, starts the scheduler, and reads
the gate frames back.

```
 host bus ──► olt_cpu_if ──report stream──► rcdba_scheduler
 (16 bit)     register file ◄──gate stream──  ├ rcdba_report_in   collect reports
                                              ├ rcdba_weight      RC-DBA weights
                                              ├ rcdba_alloc       grant time slots
                                              └ rcdba_gate_out    emit gates
```

The default configuration has 5 ONUs, 3 priority queues per ONU, and 15
time slots to hand out per scheduling cycle.

## Frames

Both frames are cut-down MPCP control frames of 48 bits (`rcdba_pkg`):

| frame  | 47:44 | 43:40 | 39:32  | 31:24  | 23:16 | 15:8   | 7:0   |
|--------|-------|-------|--------|--------|-------|--------|-------|
| report | DA    | SA    | Q_NUM  | Bitmap | High  | Middle | Low   |
| gate   | DA    | SA    | Opcode 15:8 (0x00) | Opcode 7:0 (0x02) | High  | Middle | Low   |

In a report the three fields are requests, counted in time slots. In a gate
they are grants. The OLT's address is `OLT_ID` = 5. ONU j's report carries
SA = j, and its gate carries DA = the SA of that report. A report's Bitmap
marks which request fields are valid: bit 0 High, bit 1 Middle, bit 2 Low. A
field whose bit is clear counts as zero.

## The weight rule (rcdba_weight)

This is the core of RC-DBA. Every queue (ONU, priority) has a weight. One
weight pass works on each priority separately:

1. Every ONU with a non-zero request at that priority gets `+N_ONU`.
2. Say k ONUs requested. They are ranked by the size of their request. The
   largest gets `+k`, the next `+k-1`, and so on down to the smallest, which
   gets `+1`. When requests are equal, the higher-numbered ONU ranks higher.

Worked example with 5 ONUs (ONU1..ONU5 are indices 0..4):

| requests | ONU1 | ONU2 | ONU3 | ONU4 | ONU5 |  | weights | ONU1 | ONU2 | ONU3 | ONU4 | ONU5 |
|----------|------|------|------|------|------|--|---------|------|------|------|------|------|
| High     | 3    | 4    | 0    | 0    | 2    |  | High    | 7    | 8    | 0    | 0    | 6    |
| Middle   | 2    | 2    | 2    | 0    | 0    |  | Middle  | 6    | 7    | 8    | 0    | 0    |
| Low      | 0    | 0    | 5    | 6    | 0    |  | Low     | 0    | 0    | 6    | 7    | 0    |

For example, three ONUs ask for High slots, so ONU2 (4 slots) gets 5+3,
ONU1 (3) gets 5+2, and ONU5 (2) gets 5+1.

The hardware does this the way a small state machine would, with no sorter:

* A request pass, one ONU per clock, copies the requests into scratch
  registers. It also adds `N_ONU` and counts the requesters.
* Then, while requesters remain, a scan (one ONU per clock) finds the largest
  remaining scratch request. The scan uses `>=`, and that is what produces the
  tie rule. The winner's scratch value is cleared and the remaining count is
  added to its weight.

Weights are kept from one scheduling cycle to the next, so a queue that keeps
asking and keeps losing climbs. When allocation ends, the weight of every queue
that got its whole non-zero request is cleared. Weights are `W_W` = 8 bits wide
and saturate.

## Allocation (rcdba_alloc)

`TOTAL_SLOTS` are shared out one priority at a time:

| priority | budget |
|----------|--------|
| High     | all `TOTAL_SLOTS` |
| Middle   | half of what High left, rounded down |
| Low      | the other half, plus whatever Middle did not use |

Within a priority, ONUs are served in order of decreasing weight (ties go to
the higher ONU number). Each ONU gets `min(request, budget left)`. A scan over
the ONUs that have not yet been served picks the next one. A priority stops
after `N_ONU` grants or when its budget is empty. For the example above: High
takes 4+3+2 = 9 slots and leaves 6. Middle gets 3 of them: ONU3 gets 2 and
ONU2 gets 1. Low gets the other 3, and they all go to ONU4 (weight 7):

| grants | ONU1 | ONU2 | ONU3 | ONU4 | ONU5 |
|--------|------|------|------|------|------|
| High   | 3    | 4    | 0    | 0    | 2    |
| Middle | 0    | 1    | 2    | 0    | 0    |
| Low    | 0    | 0    | 0    | 3    | 0    |

## A scheduling cycle (rcdba_scheduler)

A `start` pulse runs the four stages one after the other. Each stage's
one-cycle `done` pulse starts the next.

1. `rcdba_report_in` takes `N_ONU` reports from a valid/ready stream, one per
   clock at most. The frame received j-th is treated as ONU j.
2. `rcdba_weight` takes about `3·(N_ONU+1) + k·(N_ONU+2)` clocks, where k is
   the total number of non-zero requests.
3. `rcdba_alloc` takes about `N_ONU+2` clocks per grant.
4. `rcdba_gate_out` emits `N_ONU` gates on a valid/ready stream, one per clock.

After that, `done` goes high and stays high until the next `start`. `busy`
covers the whole cycle. With the example above and no stream stalls, a cycle
takes 151 clocks from start to done. Internal assertions check that the weight
and allocation stages never run together, and that a gate frame that has been
offered stays stable until it is taken.

## Host interface (olt_cpu_if, olt_fpga_top)

The host bus has an active-low chip select (`f_cs_b`), write enable (`f_we_b`)
and output enable (`f_oe_b`). It also has a 16-bit data bus, address bits 7:0
(`f_addr`) and address bits 25:20 (`f_addr_hi`). The chip is selected when
`f_addr_hi == HI_SEL`.

A 48-bit frame moves as three 16-bit words: H = bits 47:32, M = 31:16,
L = 15:0. Registers are 32-bit aligned, so the word index is `f_addr[7:2]`:

| word index | byte offset (N_ONU=5) | content |
|------------|-----------------------|---------|
| 0 | 0x00 | CTRL. Write bit 0 = 1 to start (ignored while busy). Read: bit 0 done, bit 1 busy, bit 2 all reports loaded |
| 1 + 3·(N_ONU−1−j) + w | 0x04–0x3C | report j, word w (0 = H, 1 = M, 2 = L), read/write |
| 1 + 3·N_ONU + 3·(N_ONU−1−j) + w | 0x40–0x78 | gate j, word w, read only |

Report 0's L word is therefore at 0x3C and gate 0's L word at 0x78.

Writing the L word of report j marks that report as loaded. The scheduler is
fed loaded reports in ONU order, so the host may load the reports either before
or after it starts the scheduler. Gates are stored in ONU order as they come
out. A host session is:

1. write 15 report words;
2. write CTRL = 1;
3. poll CTRL until bit 0 is set;
4. read 15 gate words.

Bus timing:

* The strobes pass through two-flip-flop synchronisers on the design clock
  (`ck1m`).
* A write takes effect once the synchronised `f_we_b` is seen to fall.
* Hold `f_we_b` low, and keep address and data stable, for at least three
  clocks.
* Reads are combinational from `f_addr`.
* `f_data_oe` enables the data-pad driver while `f_cs_b` and `f_oe_b` are both
  low.

The bidirectional data pad itself is not part of the RTL. The top exposes
`f_data_in`, `f_data_out` and `f_data_oe`.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_ONU` | 5 | ONUs served. The 4-bit addresses and the 64-word register map limit it to 10 at the top level |
| `TOTAL_SLOTS` | 15 | time slots per scheduling cycle (must fit 8 bits) |
| `OLT_ID` | 5 | SA of gate frames |
| `W_W` | 8 | weight width (this design's choice) |
| `HI_SEL` | 0 | value of address bits 25:20 that selects the chip (this design's choice) |

The number of priorities (3) is fixed by the frame format. At the defaults the
whole FPGA top is about 1,000 flip-flops and a few hundred word-level cells.

## What is specified and what is chosen here

These parts follow the published RC-DBA scheduler and its FPGA test system:

* the frame layout;
* the `+N_ONU` and rank increments;
* the tie order seen in the example;
* full grants for High and the halving of the remainder for Middle;
* the phases of each stage's state machine;
* the 16-bit word split;
* the 0x3C and 0x78 offsets;
* the bus signal names;
* the default sizes.

These are this design's own choices, and the places to look first if it is
held against another implementation:

* **Order, not proportion.** Within a priority, slots go out in weight order,
  each ONU taking what it asked for until the budget runs out. The slots are
  not split in proportion to the weights. This reproduces the reference grant
  table above, and a proportional split would not.
* **Low budget.** Low gets the held-back half plus Middle's unused slots, and
  the halving rounds down. Giving Low only the held-back half would give the
  same result on the example above.
* **Weight lifetime.** Weights carry over between cycles and are cleared only
  after a full grant. When a weight should reset is otherwise open.
* **Bitmap.** Requests are qualified by the Bitmap with the bit order given
  above.
* **Handshakes and registers.** The valid/ready handshakes, the CTRL register,
  the loaded flags and the rest of the register map are this design's own.
* **Weights.** 8-bit weights that saturate.
* **Bus.** The bus synchroniser and its three-clock minimum write pulse. The
  data bus is 16 bits wide. A 32-bit host bus connects through its low 16
  bits.

Not included: the host processor, its Linux driver and application, and the
ONU. The testbench plays the host.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs.

* `tb_rcdba_weight` and `tb_rcdba_alloc` check the two example tables above.
  They then check random cases against `rcdba_ref_pkg`, a behavioural model
  written as plain ranking over integer arrays. They also check the cycle
  counts.
* `tb_rcdba_report_in` and `tb_rcdba_gate_out` check field handling, the
  bitmap, handshakes with random gaps and back-pressure, and done timing.
* `tb_rcdba_scheduler` runs the example, then 30 random cycles with weights
  carried over. It uses random stream stalls.
* `tb_olt_cpu_if` checks the register map, the offsets, the loaded flags,
  start pulses, gate capture and the bus enables.
* `tb_olt_fpga_top` uses the default parameters and drives the bus as a host
  would:
  * the example (reports 0x5003_0703_0200 … 0x5403_0702_0000);
  * a cycle where Low uses Middle's leftovers;
  * 40 random cycles, alternating start-then-load and load-then-start.

  It counts ranking ties, partial grants, Middle being limited by its half,
  Low taking leftovers, weight carry-over and weight clearing, and fails if
  any of them never happens.

Running a testbench with Verilator 5, for example the top-level one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rcdba_pkg.sv tb/rcdba_ref_pkg.sv tb/tb_olt_fpga_top.sv \
    --top-module tb_olt_fpga_top
./obj_dir/Vtb_olt_fpga_top
```

For testbenches that do not use the reference model, drop
`tb/rcdba_ref_pkg.sv`. Every testbench runs in well under a second.
