# Dynamic lottery arbitration for a shared on-chip bus

Four processors share a single bus to an on-chip memory, so only one of them
can use it at a time. Something has to decide who goes next. A fixed-priority
arbiter lets busy high-priority masters starve the rest. A TDMA or round-robin
scheme wastes slots and ignores how much bandwidth each master needs. This
design uses a *lottery* instead. Each master holds some number of tickets.
Whenever the bus falls free, a pseudo-random draw picks one of the masters
that are requesting, and a master's chance of winning is its share of the
tickets held by the requesters:

    P(master i wins) = r_i * t_i / sum_j (r_j * t_j)      r_i = request bit, t_i = tickets

A master with more tickets gets a larger share of the bandwidth on average.
Every requesting master that holds at least one ticket still wins now and
then, so no master starves. The arbiter is *dynamic*: ticket counts live in
registers and can be rewritten at run time, so bandwidth shares can follow the
workload.

The RTL implements the arbitration scheme described in "Area Efficient and Low
Latency Bus-Based System on Chip (SoC) Architecture for Inter-Processor
Communication" (Poovendran et al.), which builds on the LOTTERYBUS
architecture of Lahiri et al. Widths, the bus protocol and the burst limit are
not given in that paper and were chosen here. They are listed in "Choices made
here" below.

## The system

```
            m_req[3:0], m_cmd[3:0]                 tkt_wr_*
   masters ----------------------+                    |
   (outside)                     v                    v
                    +---------------------------------------------+
                    | lottery_manager                             |
                    |  ticket_gen -> ticket_mask -> partial_sum --+--> s0..s3, T
                    |  lfsr_rng ------------------> rand_range ---+--> draw in [0,T)
                    |                      compare_grant -> gnt reg-+--> m_gnt[3:0]
                    +---------------------------------------------+
                                     | m_gnt
                    +----------------v---+        +-------------+
   m_cmd[3:0] ----->| bus_mux            |------->| shared_mem  |---> bus_rdata
                    | (owner's command)  | bus_cmd| 8 x 8 bits  |
                    +--------------------+        +-------------+
```

`lottery_soc` is the top. The masters are not part of the RTL. Each master
brings a request line and a bus command (`soc_pkg::bus_cmd_t`: address, write
data, write enable), and receives its grant line and the shared read data.

## How one lottery is drawn

All of this happens in one clock cycle, in combinational logic, in the cycle
in which the bus is free:

1. **Mask** (`ticket_mask`). Each master's ticket count is ANDed with its
   request bit, which gives `r_i * t_i`. A master that is not requesting
   contributes nothing.
2. **Partial sums** (`partial_sum`). The adders form `s_0 = r_0 t_0`,
   `s_1 = s_0 + r_1 t_1`, and so on, up to `T = s_3`. Master *i* owns the
   slice `[s_{i-1}, s_i)` of the range `[0, T)`. The slice is as wide as the
   master's live tickets.
3. **Draw** (`lfsr_rng`, `rand_range`). An 8-bit maximal-length LFSR advances
   every cycle. Its value modulo `T` is the draw. The modulo is slightly
   non-uniform because 255 is rarely a multiple of `T`. For `T = 8`, for
   example, residue 0 comes up 31 times in 255 and every other residue 32
   times. This non-uniformity is a known property of the dynamic lottery
   manager.
4. **Compare and pick** (`compare_grant`). Four comparators test
   `draw < s_i` in parallel. All comparators at and above the winning slice
   fire, so a priority chain keeps the first one, starting from master 0. A
   master with zero tickets owns an empty slice and can never win. If
   `T = 0`, no grant is made.

**Worked example.** Masters C1, C3 and C4 request (request map `1011`, written
C1 C2 C3 C4). Their tickets are 1, 3 and 4. The partial sums are 1, 1, 4, 8
and `T = 8`:

| draw | comparators firing (C1..C4) | winner |
|------|-----------------------------|--------|
| 0    | 1 1 1 1                     | C1     |
| 1-3  | 0 0 1 1                     | C3     |
| 4-7  | 0 0 0 1                     | C4     |

Over many lotteries the three masters win 1/8, 3/8 and 4/8 of the time.
C2 shares C1's partial sum, because its request bit masks its tickets to zero.

## Grant timing and the bus protocol

The grant register `gnt` is one-hot and changes only at a clock edge.

- A master raises `m_req[i]` and holds its command steady on `m_cmd[i]`.
- In any cycle where both `m_req[i]` and `m_gnt[i]` are high, one word moves.
  A write lands in memory at the end of the cycle. Read data is on
  `bus_rdata` during the same cycle. The master may present the next command
  in the following cycle.
- The bus is **free** in a cycle when:
  - nobody owns it, or
  - the owner has dropped its request, or
  - the owner is in the last of its `MAX_BURST` (default 4) cycles.

  In a free cycle a lottery is drawn among the current requesters, and the
  winner's grant appears at the next edge. A request on an idle bus is
  therefore granted after **one cycle**. Under load there is no dead cycle
  between owners.
- An owner that still requests when its burst limit is reached is not kicked
  off for good. It takes part in the next lottery with everyone else and may
  win again.
- When the owner drops its request, its grant stays high for that one cycle,
  but `bus_valid` is low and no transfer happens. The next owner's grant
  follows at the edge.

Example: C3 requests on an idle bus, holds its request, and loses the lottery
drawn in its last burst cycle.

| cycle        | 0 | 1 | 2 | 3 | 4 | 5 |
|--------------|---|---|---|---|---|---|
| `m_req[2]`   | 1 | 1 | 1 | 1 | 1 | 1 |
| `bus_free`   | 1 | 0 | 0 | 0 | 1 | . |
| `m_gnt[2]`   | 0 | 1 | 1 | 1 | 1 | 0 |
| word of C3   | - | 1 | 2 | 3 | 4 | - |

Ticket counts are changed through `tkt_wr_en`, `tkt_wr_idx` and `tkt_wr_val`.
A change takes effect for lotteries drawn after the next clock edge. It never
interrupts a burst already granted. After reset the counts are 1, 2, 3 and 4.

## Modules

| file | what it is |
|------|------------|
| `rtl/soc_pkg.sv` | Widths and counts shared by all blocks. Bus command struct. |
| `rtl/lottery_soc.sv` | Top: arbiter, bus multiplexer and memory on one shared bus. |
| `rtl/lottery_manager.sv` | The arbiter: lottery datapath, grant register, burst counter, assertions. |
| `rtl/ticket_gen.sv` | Per-master ticket registers, rewritable at run time. |
| `rtl/ticket_mask.sv` | `r_i AND t_i`. |
| `rtl/partial_sum.sv` | Prefix sums `s_i` and total `T`. |
| `rtl/lfsr_rng.sv` | 8-bit LFSR, x^8+x^6+x^5+x^4+1, period 255. |
| `rtl/rand_range.sv` | Draw = LFSR mod `T`. |
| `rtl/compare_grant.sv` | Parallel comparators and first-hit priority chain. |
| `rtl/bus_mux.sv` | AND-OR multiplexer that puts the owner's command on the bus. |
| `rtl/shared_mem.sv` | 8 x 8-bit memory. Single-cycle read and write, cleared on reset. |

Parameters and their defaults:

| name | default | meaning |
|------|---------|---------|
| `N_MASTERS` / `N` | 4 | Number of masters. Four, as in the paper. |
| `TICKET_W` / `TW` | 4 | Bits per ticket count (0 to 15 tickets). |
| `LFSR_W` / `RW` | 8 | Random number width. |
| `MAX_BURST` | 4 | Longest ownership, in bus cycles. |
| `MEM_DEPTH` / `DEPTH` | 8 | Memory words. Data and address are 8 bits each. |
| `INIT_TICKETS` | 1, 2, 3, 4 | Ticket counts after reset. |

The partial-sum width is derived: `TICKET_W + clog2(N+1)` = 7 bits. Reset is
asynchronous and active low on every register.

If you change `N`, also give `INIT_TICKETS` a list of `N` values. If you
change `LFSR_W`, also give `TAPS` a maximal-length polynomial of that width.
For good fairness, keep `2^LFSR_W` well above the largest possible `T`.

## Choices made here

The paper describes the lottery datapath (mask, adders, random number,
comparators, first-hit pick) and the ticket probability. It leaves the
following open, and this design chose:

- **Burst length.** The paper says the winner keeps the bus "for a number of
  bus cycles" but gives no number. Here the limit is a fixed `MAX_BURST` of 4,
  and the grant lines are plain one-hot bits, not a per-grant word count.
- **Ticket generation.** The paper says the tickets come from a "ticket
  generator" without saying how. Here they are software-written registers.
  Any policy that adapts tickets (to queue depth, waiting time, and so on)
  would sit outside and drive the `tkt_*` port.
- **Draw numbering.** The comparator rule "fires when the random number is
  less than the partial sum" is used with a 0-based draw in `[0, T)`. The
  paper's worked example counts draws from 1; both select the same masters
  for the same position in the range.
- **Timing.** The paper gives no widths, reset behaviour or bus timing.
  Registered grant, single-cycle memory access, 3-bit memory address decode
  (higher address bits alias), and `T = 0` giving no grant are all choices
  made here.
- **Not built.**
  - The master processors and the fourth, unnamed sub-unit of the paper's
    processor top.
  - A "rotating priority start", which appears only in a figure title of the
    paper and is not explained. The comparison always starts at master 0, as
    the paper's text says.
  - The static-priority, TDMA/round-robin and static-lottery arbiters, which
    the paper uses only for comparison.

## Verification

Every block has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Leaf blocks.** These are checked against models written independently in
  the testbench:
  - the LFSR, bit for bit, including its period of 255;
  - every `raw mod T` for `T` from 0 to 60;
  - the paper's 1:3:4 example in `partial_sum_tb` and `compare_grant_tb`.
- **`lottery_manager_tb`.** A cycle-accurate model of the arbiter is compared
  with the grant every cycle: during 800 lotteries on request map `1011`,
  during random traffic, and during random ticket rewrites. The test also
  checks the win shares (1:3:4 gave 97/302/401 of 800) and the one-cycle
  idle-bus latency.
- **`lottery_soc_tb`.** This is the end-to-end test at default parameters.
  Four behavioural masters run 60 random read/write requests each. The test
  checks:
  - every read value against a memory model;
  - that grants are one-hot and go only to requesters;
  - that a master whose tickets are set to zero is never newly granted;
  - that every master finishes.

  It counts contended lotteries, bursts cut at the limit, early releases,
  reads, writes and ticket changes, and fails if any of them never occurs.
- **`lottery_soc_maps_tb`.** This runs the paper's request maps 1011, 0111,
  1110 and 1101 with saturating traffic. It checks that:
  - the bus is busy every cycle;
  - every burst is 4 words;
  - idle masters are never granted;
  - lottery shares are within 25% of ticket shares.

  It prints per-master bandwidth and waiting time. For map 1011 with tickets
  1:3:4, C1, C3 and C4 got 12.2%, 37.3% and 50.5% of the bus cycles. Their
  mean waits between bursts were 28, 6 and 3 cycles, and the worst waits 144,
  36 and 28 cycles.

The lottery gives bandwidth *shares*, not latency bounds: a one-ticket master
can wait a long time, as the worst case above shows. The paper measures grant
latencies for its third master of about 15 to 24 cycles at a 10 ns clock,
under traffic it does not specify. Those figures are not reproduced here.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/soc_pkg.sv \
    rtl/lottery_soc.sv tb/lottery_soc_tb.sv --top-module lottery_soc_tb
./obj_dir/Vlottery_soc_tb
```

Verilator finds the other modules through `-Irtl`, because each module lives
in a file of its own name. For a single block, replace the two files with
`rtl/<block>.sv tb/<block>_tb.sv` and set `--top-module <block>_tb`. Every
testbench finishes in well under a second.
