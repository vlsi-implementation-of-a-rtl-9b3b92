# Weighted fair queueing ATM queuing unit

An ATM switch port that queues cells per connection can give every
connection a guaranteed share of the link, proportional to a weight, and can
protect well-behaved connections from ones that send too much. The textbook
way to do this, weighted fair queueing, gives each cell a virtual timestamp
and always sends the cell with the smallest one. That needs a sort of up to N
timestamps in every cell period, which is expensive in hardware.

This RTL implements a queuing unit that approximates the sort with a
**bucket sort over a cyclic virtual time window**. Timestamps are dropped
into one of 128 buckets, each covering a fixed slice of virtual time. Buckets
are emptied in order, and within one bucket cells leave first-in first-out.
The cost of the scheduler then hardly depends on the number of connections:
it is a set of linked lists plus a 128-bit "bucket non-empty" vector that is
scanned for the next non-empty bucket.

The unit sits between an incoming 8-bit cell line and a switch. It has:

* 2048 connections, each mapped to one of 16 ports (one per switch output);
* per-connection FIFO queues of cell buffers in an external 2M x 48-bit SRAM,
  protected by a single-error-correcting Hamming code;
* one weighted fair queueing scheduler per port;
* a round robin between the ports, with per-port rate shaping and
  backpressure from the switch;
* an MC68000-style processor port for configuration, counters, an interrupt
  and direct SRAM access.

## How a cell moves through the unit

1. **Line input** (`line_in_if`). The unit receives bytes with a
   start-of-cell marker. A cell counts only if exactly 53 bytes follow the
   marker. A cell cut short by a new marker, and bytes that arrive outside a
   cell, are dropped as mismatched. The low 11 bits of the cell's VCI index a
   label table, which gives the connection id or says "unmapped".
2. **Pass-through**. An unmapped cell goes straight to the line output.
3. **Enqueue** (`cell_queue`). The cell takes a buffer from the idle buffer
   list and is appended to its connection's queue. It is discarded if the
   queue already holds its programmed maximum or if no buffer is free. Its 53
   bytes are written to the SRAM as 11 words of 5 bytes, at address
   `buffer * 11 + word`.
4. **Stamp** (`bucket_sort`). If the queue was empty, the cell is now at the
   front of its queue and gets a timestamp:
   `timestamp = last_ts[port] + spacing[connection]  (mod 8192)`.
   `last_ts` is the timestamp of the port's most recently sent cell. The
   spacing constant is inversely proportional to the connection's weight.
5. **Schedule** (`port_scheduler`, `traffic_shaper`). A port may send when
   it has a stamped cell, its shaper interval has run out and the switch does
   not hold it back. The ports take turns in round robin.
6. **Dequeue**. For the chosen port, the bucket sorter removes the entry
   with the earliest bucket and returns its connection. The cell queue then
   unlinks that connection's oldest buffer. If cells remain, the new front
   cell is stamped at once, relative to the timestamp just sent. The 11
   words are read back through the Hamming decoder and the cell leaves on the
   line output (`line_out_if`), which writes an external FIFO.

`global_ctrl` carries out these steps one cell at a time, serving arrivals
before departures. An arrival takes 15 clocks and a departure 19, so both fit
within the 53 byte-clocks of one cell at line rate (clock = byte rate).

## The bucket sorter

Virtual time is a 13-bit counter that wraps at `T_WINDOW = 8192`. Every port
owns `N_BUCKETS = 128` buckets. Bucket *b* covers virtual times
`64*b .. 64*b+63`, so the bucket index is `timestamp[12:6]`: a shift, because
both sizes are powers of two.

```
bucket memory (per port)     bucket entries (N_CONN, shared)
 b:  head tail  flag          e: cid  offset(6b)  next
 0   e7   e2    1   ──► e7 ──► e2
 1   --   --    0
 2   e4   e4    1   ──► e4
 ...                          idle entry list: idle_head ─► ... ─► idle_tail
127
active[port], last_ts[port]
```

* Each bucket is a FIFO linked list of entries. An entry stores the
  connection id, the timestamp offset inside the bucket (6 bits) and a next
  pointer. The full timestamp is `bucket*64 + offset`. Only the front cell
  of a queue is stamped, so each connection is in the sorter at most once,
  and `N_CONN` entries suffice. Entries not in use form an idle list.
* A one-bit flag per bucket says whether the bucket is non-empty. A removal
  does not read the bucket memory to search. It scans the 128 flags
  cyclically, starting at the port's `active` bucket (`cyclic_find`:
  rotate, then priority-encode), takes the head of the first non-empty
  bucket, and makes that bucket the new `active` one.
* Insert and remove each take one clock and give their result the next
  clock. After reset, a sequence of `N_CONN` clocks links the idle entry
  list.

**Where the approximation lies.** Entries in one bucket leave in insertion
order, not in timestamp order. So timestamps that fall into the same 64-tick
slice may be served out of order. With one tick per bucket the sort would be
exact. More buckets therefore mean smoother output.

**Choosing spacing constants.** Set `spacing = k / w`, where *w* is the
relative weight. The window must hold the largest spacing without lapping the
active bucket: `k <= T_WINDOW * (B-1)/B = 8128` for the defaults. A spacing
larger than that wraps past the active bucket and is served too early. The
hardware does not check this; it is the configuring software's job. Because
spacings are integers, only weights *w* with integer `k/w` are exact. With
`k = 8100`, for example, the weights 1, 10, 50 and 100 give spacings 8100,
810, 162 and 81.

## Queues, buffers and the SRAM word

Every connection keeps a queue length, a maximum length and head and tail
buffer pointers (`cell_queue`). All connections draw buffers from one shared
pool, linked into an idle list. Enqueue takes the idle head; dequeue returns
the buffer to the idle tail. After reset, an initialisation sequence links
all `N_BUFS` buffers and sets every maximum to 500; this takes about 190k
clocks at the default size. `R_STATUS` bit 0 reads 1 when it is done.

The SRAM word is 48 bits: a shortened Hamming(63,57) codeword with 42 data
bits and check bits at positions 1, 2, 4, 8, 16 and 32 (`hamming48`). Reads
correct any single-bit error and count it. A syndrome that points beyond bit
48 is reported as uncorrectable. A cell uses 40 of the 42 data bits of each
of its 11 words. The 2^21-word SRAM therefore holds
`N_BUFS = 2^21 / 11 = 190650` cell buffers.

`sram_ctrl` registers the address, the write data and the read data. A read
returns data two clocks after the request. Writes are taken to complete on
the clock edge that ends a clock with `sram_we_n` low. The bidirectional data
bus appears as `sram_dq_o`, `sram_dq_oe` and `sram_dq_i`.

## Ports, shaping and backpressure

`port_scheduler` is a round robin over the 16 ports. The pointer moves past
a port only when that port's grant is used. `traffic_shaper` holds, per
port, a processor-programmed minimum distance in clocks between cell starts
(0 means no limit), plus a down counter. It also honours the switch's
per-port backpressure bit `bp`, which stops the port at once. Together
these cap each port's rate at `f_clk / interval`. The backpressure input
adapts the rate to how busy the switch output is.

## Processor interface

The bus is a synchronous strobe (`cpu_as_n`, `cpu_rw`, 6-bit register
index, 16-bit data). `cpu_dtack_n` falls 4 clocks after the strobe for a
write and 5 clocks after it for a read. `cpu_irq_n` is low while an unmasked
interrupt cause is set.

| idx | name | access | meaning |
|---|---|---|---|
| 0 | ID | R | 0xA7F0 |
| 1 | CTRL | RW | bit 0: process cells |
| 2 | STATUS | R | bit 0: tables initialised, bit 1: SRAM access busy |
| 3 | IRQ_STAT | R/W1C | 0 discard, 1 mismatch, 2 corrected, 3 uncorrectable, 4 input overrun, 5 SRAM access done |
| 4 | IRQ_MASK | RW | interrupt enables |
| 5 | CONN_SEL | RW | connection for 6..9 |
| 6 | CONN_QMAX | W | maximum queue length |
| 7 | CONN_QLEN | R | current queue length |
| 8 | CONN_SPACE | W | spacing constant (13 bits) |
| 9 | CONN_PORT | W | port 0..15 |
| 10, 11 | LBL_SEL, LBL_DATA | RW, W | label-table index (low VCI bits); data bit 15 = mapped, low bits = connection |
| 12, 13 | SHP_SEL, SHP_IVAL | RW, W | port; shaper interval in clocks |
| 14..20 | CNT_* | R | cells queued, sent, discarded, mismatched, corrected, uncorrectable, passed through (16-bit, wrapping) |
| 21..25 | MEM_ALO/AHI/D0/D1/D2 | RW | SRAM address (21 bits) and data (42 bits) |
| 26 | MEM_CMD | W | 1 = read, 2 = write the word |

Bring-up sequence: wait for STATUS bit 0; then, for each connection, write
the label table entry, port, spacing and maximum; set CTRL bit 0.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_CONN` | 2048 | connections (also the number of bucket entries) |
| `N_PORTS` | 16 | ports |
| `N_BUCKETS` | 128 | buckets per port (power of two) |
| `T_WINDOW` | 8192 | virtual time window (power of two, larger than `N_BUCKETS`) |
| `N_BUFS` | 190650 | cell buffers |
| `QLEN_W` | 15 | queue length field width |

The published evaluation also used 256 and 512 buckets, which give smoother
output. Those settings are only a change of `N_BUCKETS`.

## Size

Synthesised with yosys at the default parameters (generic cells, not gate
equivalents), the whole unit has about 1500 logic cells and 7300 flip-flops.
It also has 3.7 Mbit of memory arrays. Almost all of that memory is the
buffer link table in `cell_queue`, one 18-bit pointer for each of the
190650 buffers. A version that keeps the links in the SRAM would need only
the per-port bucket state, the connection tables and the label table on chip.

| module | logic cells | flip-flop bits | memory bits |
|---|---|---|---|
| `bucket_sort` (16 ports) | 466 | 2440 | 102400 |
| `cell_queue` | 108 | 96 | 3566868 |
| `global_ctrl` | 194 | 499 | 34816 |
| `port_scheduler` + `traffic_shaper` | 261 | 516 | 0 |
| `line_in_if` + `line_out_if` | 90 | 3348 | 22528 |
| `sram_ctrl` (with `hamming48`) | 207 | 122 | 0 |
| `cpu_if` | 140 | 315 | 0 |

The original chip was estimated at roughly 2000 to 3000 gates per module,
about 5000 of them for the queue and bucket-sort control.

## Departures from the original architecture

* **On-chip tables.** The original keeps the bucket entries, the queue
  control table and the buffer links in the external SRAM, alongside the
  cells. Only the bucket flags and bucket pointers are on chip there. Here
  all linked-list tables are on-chip arrays and only the cell payloads use
  the SRAM. As a result each operation takes one clock instead of a sequence
  of SRAM accesses.
* **Codeword split.** How the 48 bus bits divide between data and check bits
  is not specified. The 42 + 6 split is a choice of this design.
* **Register count.** The original has about 50 processor registers; the
  map above has 27. The bus is simplified to a synchronous strobe that keeps
  the 5/4-clock access times.
* **Line framing and label decode.** Framing uses a start-of-cell marker
  (no HEC-based delineation). Label decode indexes a table with the low VCI
  bits. Both are choices of this design, as are the FIFO handshake, the
  shaper form, the controller's step order and the reset value 500 of the
  queue maxima.
* **Queue length limit.** Queue length fields are 15 bits, so the largest
  maximum is 32767.
* **Not modelled.** Pads, clocking and the switch fabric are outside the
  RTL.

## Simulation and verification

Every module has a self-checking testbench in `tb/`. Each ends with the
line `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
          rtl/wfq_pkg.sv tb/tb_wfq_unit.sv --top-module tb_wfq_unit -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_cyclic_find` | flag search vs. a direct loop, W = 128 and 16 |
| `tb_hamming48` | zero syndrome, data placement, every single-bit error corrected, double errors flagged |
| `tb_bucket_sort` | random inserts and removes vs. a bucket-list model: connection, timestamp, window wrap, skipped buckets, FIFO order within a bucket |
| `tb_cell_queue` | buffer numbers, discards on full queue and empty pool, lowered maxima, length read-back |
| `tb_port_scheduler` | round robin grants vs. a pointer model; one grant per port per round |
| `tb_traffic_shaper` | eligibility vs. a counter model; exact spacing of interval+1 clocks; backpressure |
| `tb_line_in_if` | cell bytes, label decode, mismatch and overrun drops |
| `tb_line_out_if` | byte order, start marker, FIFO-full hold, 53 clocks per cell |
| `tb_sram_ctrl` | 2-clock read latency, stored codewords, corrected and flagged errors |
| `tb_cpu_if` | 4/5-clock access, table-write pulses, counters, interrupt, SRAM access |
| `tb_wfq_unit` | end to end at 64 connections / 4 ports / 16 buckets / 256-tick window / 128 buffers (see below) |
| `tb_wfq_full` | the same scenario at the default (full) size |
| `tb_wfq_weights` | full size: 40 connections with weights 1, 10, 50, 100 (ten each), then 1500 connections with weights 1, 10, 50, 80 (300 each), sharing one port |

The end-to-end scenario checks every delivered cell byte for byte, in order
per connection. It exercises and counts each mechanism:

* 3:1 weighted sharing of a port;
* a bit flipped in a stored cell and corrected;
* strict alternation between two backlogged ports;
* queue-full discards;
* shaped spacing within 60 clocks of the programmed interval;
* pass-through of unmapped cells and a mismatched cell;
* processor SRAM read and write;
* a wrap of the virtual time window;
* back-to-back cells at line rate with no input overrun while the output
  FIFO is intermittently full.

In `tb_wfq_weights`, each weight class gets exactly its share over one
round, and every class of weight 10 or more sends half of its cells
(within a few percent) in the first half of the round. The departure of
each cell is compared with its ideal position n * round / w:

| Workload | round (cells) | weight | mean deviation | max deviation |
|---|---|---|---|---|
| 40 connections, k = 8100 | 1610 | 1 / 10 / 50 / 100 | 35.5 / 30.0 / 24.0 / 17.0 | 40 / 39 / 37 / 33 |
| 1500 connections, k = 8000 | 42300 | 1 / 10 / 50 / 80 | 1050 / 886 / 628 / 542 | 1200 / 1170 / 1032 / 1042 |

Deviations are in cell periods. With 128 buckets, cells whose timestamps
fall in the same 64-tick bucket leave in arrival order, not timestamp
order; with 1500 connections a bucket holds many cells, so the deviation
grows with the number of connections. Lighter classes deviate more
because their ideal positions are late in the round while their cells
share buckets with the heavy classes.

The testbenches use `tb/sram_model.sv`, a behavioural SRAM with an
error-injection hook. No waveform files or external data are needed.
