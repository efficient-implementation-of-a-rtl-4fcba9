# LR(T) statistics counters: small SRAM counters backed by DRAM

A router that keeps a million 64-bit counters, each possibly updated several times per
minimum-size packet, cannot afford to hold them all in fast SRAM, and DRAM is too slow to be
read and written on every update. This design keeps every counter twice: a full 64-bit copy
in external DRAM and a small 9-bit copy in on-chip SRAM. All updates go to the SRAM copy.
Once every B updates (B = 20 by default) one SRAM counter is *evicted*: its value is added to
the DRAM copy and the SRAM counter is cleared. The DRAM therefore sees one read-modify-write
per B updates, and the SRAM only has to be wide enough that no counter overflows between
evictions.

How wide that is depends on which counter is evicted. This design uses the
**LR(T)** rule (Largest Recent, with threshold T) and its support structure, the
**aggregated bitmap**. With T = B, no SRAM counter ever exceeds

    (2B - 1) + log_d(N - 1),   d = B / (B - 1)

which is 309 for N = 2^20 and B = 20, so 9 bits suffice. The bitmap adds under 2 bits per
counter. The true value of counter i is always `DRAM[i] + SRAM[i]`.

## The update cycle

Time is divided into cycles of B accepted updates followed by one eviction slot:

```
clock:   u1  u2  u3 ... uB  EV  u1  u2 ...
SRAM:    +1  +1  +1     +1  read&clear
bitmap:  (add when a counter reaches T)  delete+find / find
DRAM:                       read ... write   (overlaps the next cycle)
```

* **Update slot** (one clock): the counter is read, incremented and written back
  (`counter_sram`). The new value goes to the *largest-recent register* (`lr_register`),
  which keeps j\*, the counter with the largest value touched in this cycle, and C\*, that
  value. If the counter has just reached T it is added to the aggregated bitmap, which holds
  the set of counters whose value is at least T.
* **Eviction slot** (one clock, `upd_ready` low): the controller (`lr_cma`) picks the
  victim, reads and clears its SRAM counter, hands index and value to the DRAM engine
  (`dram_updater`), and sends the bitmap one operation: *delete+find* if the victim was in the
  set, otherwise a plain *find*. The find returns the candidate for the next eviction.
* The DRAM engine reads the 64-bit counter, adds the evicted value and writes it back while
  the next cycle of updates proceeds.

So B updates are accepted every B + 1 clocks. The eviction slot is stretched (and
`upd_ready` held low) only if the DRAM engine is still busy with the previous eviction
(`evict_wait_dram`) or the previous find has not returned yet (`evict_wait_find`). At the
default size the find returns after 16 clocks, well within the 21-clock cycle. Idle clocks
without an update do not advance the cycle.

## Choosing the victim

At the eviction slot, with j\*/C\* from this cycle and the bitmap's candidate from the last
find:

| condition | victim | `evict_src` |
|---|---|---|
| C\* >= T | j\* | 1 (`EV_JSTAR_HIGH`) |
| C\* < T and the bitmap held a counter | that counter (its value is >= T) | 2 (`EV_FOUND`) |
| C\* < T and the bitmap was empty | j\* | 3 (`EV_JSTAR_LOW`) |

The candidate cannot go stale. Only evictions lower a counter, and the find excludes the
counter it deletes. A counter that reaches T after the find was issued was updated in this
cycle, so C\* >= T already covers it.

T = B is the optimal choice and the default. T = 0 gives LR(0): every counter is at least
0, so the victim is always j\* and the bitmap stays empty. LR(0) needs only the register,
but its counters must be much wider: an adversarial pattern can push one to B(N+1)/2
(24 bits at the default size). `tb_lr_bound` shows this difference.

## The aggregated bitmap

This is the part that makes LR(T) fast enough for line rate. It is a set of N elements
that supports add, delete, test and **find any member**. Every operation walks from the
root down, one tree level per clock, so a new operation can start every clock.

*Structure.* The N-bit bitmap is cut into N/W words of W bits. These words are the leaves of
a complete binary tree with H = log2(N/W) internal levels (14 at the default size, 15 levels
in all). Each internal node stores two counts:

* `lcount`: the number of members under its left child
* `rcount`: the number of members under its right child

Nodes hold no pointers. On level l, the node on the path of leaf word w is `w >> (H - l)`,
and bit `H-1-l` of w picks its left or right child. Each level is a separate memory bank
(`abm_level`, with the leaves in `abm_leaf`).

*Operations*, per level:

| operation | internal node on i's path | leaf |
|---|---|---|
| add(i) | count on i's side + 1 | set bit i |
| delete(i) | count on i's side - 1 | clear bit i |
| test(i) | - | report bit i |
| find | go left if `lcount` != 0, else right if `rcount` != 0, else fail | lowest set bit of the word |

*Pipelining.* Each level is read combinationally and written at the clock edge. An operation
then moves to the next level through a register. Operations enter one per clock, in order,
so each one sees every bank exactly as the earlier operations left it. The result of a
sequence is the same as running it one operation at a time. The latency is H + 2 clocks: an
entry register, H levels and the leaf.

*Combined delete+find.* Each eviction has to remove the victim and look for the next
candidate. Both happen in one pass. At every level the stage updates the node on the delete
path and steers the find. It reads the node on the find path through a second read port of
the bank. If both paths use the same node, the find sees the decremented counts, so it never
returns the element just deleted. Each level therefore costs one write and two reads per
operation.

*Size.* A node holds two counts of log2(N) bits (20 bits at the default size), so it fits in
one 64-bit word. The whole bitmap takes (2N/W - 1) words, under 2 bits per element:
1.70 Mbit for N = 2^20.

## Byte counters

A byte counter adds a packet's length, up to u = 1500 bytes, on each update. Counting it
exactly would cost about 11 more SRAM bits per counter. Instead, `prob_incr` adds 1 with
probability x/u for an update of x bytes, so the stored count times u estimates the byte
total. The estimate's relative error shrinks as the count grows. The random number comes
from a 32-bit LFSR whose top 16 bits R are scaled to `(R * u) >> 16`; the increment is taken
when that is below x. Every update still adds 0 or 1, so the counter-size bound and the
bitmap's "reaches T" test still hold. Whether an update is a byte update is chosen per update
(`upd_prob`); with `upd_prob` low the update adds 1.

## Files

| file | contents |
|---|---|
| `rtl/stat_pkg.sv` | bitmap operation and eviction-rule enums, helpers |
| `rtl/stat_counter_top.sv` | the chip: wires the blocks below |
| `rtl/lr_cma.sv` | LR(T) controller: cycle schedule, victim choice, bitmap and DRAM requests |
| `rtl/lr_register.sv` | j\* / C\* register |
| `rtl/counter_sram.sv` | N x CW counter array with increment and read-and-clear |
| `rtl/agg_bitmap.sv`, `abm_level.sv`, `abm_leaf.sv` | aggregated bitmap pipeline |
| `rtl/dram_updater.sv` | read-add-write of a DRAM counter |
| `rtl/prob_incr.sv` | probabilistic increment |
| `tb/dram_model.sv` | behavioural DRAM with random latency and back-pressure (test only) |
| `tb/lr_adversary.sv` | adversarial traffic source used by `tb_lr_bound` |

## Parameters (`stat_counter_top`)

| name | default | meaning |
|---|---|---|
| `N` | 2^20 | number of counters |
| `B` | 20 | updates per eviction (ratio of DRAM to SRAM access time) |
| `T` | 20 | LR threshold; B is optimal, 0 gives LR(0) |
| `CW` | 9 | SRAM counter width, `ceil(log2((2B-1) + log_d(N-1)))` |
| `M` | 64 | DRAM counter width |
| `W` | 64 | bitmap word width; must divide N with N/W >= 2 |
| `U` | 1500 | largest byte increment |
| `XW` | 11 | width of the byte amount |

If you change N or B, recompute CW from the formula above. For LR(0), CW must reach
`ceil(log2(B(N+1)/2))`.

## Interface and timing

* `clk`, `rst_n`: one clock; synchronous active-low reset.
* After reset the counter SRAM and the bitmap banks clear themselves one word per clock
  (N clocks for the SRAM). `init_done` rises when this is done, and `upd_ready` stays low
  until then.
* Updates use `upd_valid` / `upd_ready` / `upd_idx` / `upd_prob` / `upd_bytes` and are
  taken on a clock where valid and ready are both high.
* The DRAM port is `dram_cmd_valid/write/addr/wdata` with `dram_cmd_ready`. Read data returns
  on `dram_rd_valid/dram_rd_data` after any latency. One DRAM update is in flight at a time:
  one read, then one write.
* Status outputs:
  * `evict_valid` / `evict_idx` / `evict_val` / `evict_src` report every eviction.
  * `evict_wait_find` / `evict_wait_dram` show a stretched eviction slot.
  * `overflow` is a sticky flag: an SRAM counter saturated. It must never rise when CW is
    chosen by the formula.

There is no port for reading a counter total. A host would read `DRAM[i] + SRAM[i]`; that
path is not part of this RTL.

## Where this design makes its own choices

* **Memories are register arrays** with a combinational read and a clocked write. One slot
  (one read and one write) therefore takes one clock. A real chip would use SRAM macros with
  registered reads and pipeline the read-modify-write accordingly.
* **Bitmap banks have two read ports** because of the combined delete+find (see above). The
  published scheme says only that delete and find can be merged at the cost of two accesses
  per level, not how.
* **Node counts are one bit wider than log2(N/2)** so that a node can count a full half of the
  bitmap.
* **Set membership uses "at least T"**: a counter joins the bitmap when it reaches T and
  leaves it when evicted. Some wording of the original scheme says "exceeds T"; the set
  definition and the victim rule both use "at least T", and that is followed here.
* **The find picks the leftmost path**, and the lowest bit of the leaf word.
* **j\* ties keep the earlier counter.**
* **Flow control is added**: the update handshake, the clear sweep after reset, saturation
  with a sticky flag, and the two eviction waits. The published scheme assumes fixed timing
  and does not cover these.
* **The k-ary tree variant is not built**, and neither is any host read-out.

## Verification

Every module has a self-checking testbench that prints `TB_RESULT checks=N failures=M`.
With plain Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/stat_pkg.sv tb/tb_stat_counter_top.sv --top-module tb_stat_counter_top -Mdir obj -o sim
./obj/sim
```

| testbench | what it shows |
|---|---|
| `tb_agg_bitmap` | 6000 random operations at N = 128, W = 16 against a bit-vector model; every find result is a member, finds on an empty set fail, delete+find never returns the deleted element, latency is exactly H+2 |
| `tb_counter_sram` | increments, read-and-clear, saturation and the overflow flag against a reference array |
| `tb_lr_register` | j\*/C\* over random cycles, including ties and clear-with-update |
| `tb_lr_cma` | controller with model memories: B updates per cycle, the victim rule, bitmap add exactly on reaching T, delete+find or find, both waits, no lost clock |
| `tb_dram_updater` | accumulated DRAM values under random latency and back-pressure |
| `tb_prob_incr` | increment frequencies within 5 sigma of x/u, byte estimate within 3 % |
| `tb_stat_counter_top` | whole chip at N = 256, B = T = 4: every eviction checked against a reference LR(T) model, DRAM + SRAM totals exact, largest value within the bound; each mechanism (three victim rules, delete+find and find, both waits, slot stall, byte increments taken and skipped) must occur |
| `tb_stat_counter_full` | the same checks with every parameter at its default (2^20 counters, B = T = 20), 600 400 updates after the 2^20-clock clear; an eviction never has to wait for a find at this size |
| `tb_lr_bound` | adversarial pattern on LR(0) and LR(b), N = 16, B = 4: LR(0) reaches B(N+1)/2 = 34, LR(b) stays at 6, below its bound of 16 |

How far to trust it:

* The full-size run checks functions and totals, not timing closure. The rate needed for
  10 Gbps with 10 updates per 40-byte packet is 312.5 M updates/s, which at 20 of every 21
  clocks means a clock of at least 328 MHz. Nothing here shows that this is reachable.
* Random traffic at full size stays far below the 309 bound. The worst-case behaviour is
  exercised only at the small size of `tb_lr_bound`.
