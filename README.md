# MLQ stream-aggregation engine

Sliding-window aggregation keeps, for every key in a stream, the last WS
values it has seen. Every WA new values it reduces that window to a
result. Holistic functions such as the median can't be updated
incrementally, so each window has to be stored and then read back whole.

With many keys and large windows this needs more capacity than on-chip
RAM has. Storing every value straight into DRAM costs a read-modify-write
per 2-byte value on 64-byte lines.

This design keeps each key's window as a **multi-level queue (MLQ)** over
three memories:

| level | memory | values per key | access unit |
|---|---|---|---|
| L1 | on-chip block RAM | V1 = 2 | one 32-bit word per key, per-value write enables |
| L2 | off-chip QDR-SRAM (2 channels) | V2 = 32 | 128-bit words of 8 values, byte enables |
| L3 | off-chip DRAM (3 channels) | ring of WS_MAX = 4096 | whole 64-byte lines of 32 values |

New values always go into L1. When a key's L1 block is full it is flushed
to L2, and a full L2 block (exactly one DRAM line) is written to L3 as one
line write. Each memory is therefore written at its natural width, and
DRAM never sees a partial write. The oldest values of a window may sit in
any level. The newest are always in L1.

At the defaults the engine serves 128K keys (131072 hash slots), with
windows of up to 4096 16-bit values chosen at run time. It computes
average, minimum, maximum and median per window.

## Data flow

```
rx_unpack -> sync_fifo -> hash_functions -> mem_cmd_gen <-> hash_table
                                              |   |   |
                                        m1_bram qdr_ctrl x2 dram_ctrl x3
                                              |   |   |
                                            data_collector -> compute_kernel
                                                                 -> sync_fifo -> tx_pack
```

- **rx_unpack**
  - Each 64-bit network word carries one tuple `{ts[63:40], key[39:16], value[15:0]}`.
  - Words without all eight keep bits are dropped and counted.
  - Words that arrive while the input FIFO is full are also dropped and counted, since the network side cannot be stalled.
- **hash_functions**
  - Computes two candidate indexes per key with multiplicative hashing: the top IDX_W bits of `(key * C) mod 2^24`, with C = 0x9E3779 and 0x7FEB35.
- **hash_table**
  - Has one bank per hash function.
  - Each entry holds valid, key, TAIL (number of values ever inserted, mod WS_MAX) and CNT (values currently in the window).
  - A lookup returns hit, new (the first empty candidate in bank order is claimed), or fail (no candidate free; the tuple is dropped and counted).
  - The queue number ("slot") is `{bank, index}`.
  - After reset a sweep clears the valid bits, one index per cycle. The `ready` output goes high when the sweep is done.
- **mem_cmd_gen**: the MLQ controller, described below.
- **qdr_ctrl / dram_ctrl**: one per channel.
  - Queue commands and issue them in order.
  - qdr_ctrl tags each read (flush read or window read) so the top can steer the response.
  - dram_ctrl issues a read only when its response FIFO has a free entry, so a stalled consumer never loses a line.
- **data_collector**: takes a window's L3 lines, L2 words and L1 values, which arrive in parallel. It emits the values in age order, one per cycle.
- **compute_kernel**: reduces the window (see below).
- **tx_pack**: sends each result as two words:
  - `{key, ts, count}`, with sop set.
  - `{avg, min, max, median}`, with eop set.

Stages use valid/ready handshakes, so a slow consumer stalls the pipeline
back to the input FIFO.

## Queue bookkeeping (the hard part)

Per-level read and write pointers are not stored. Because the block sizes
are fixed, a key's whole state is two numbers:

- T: the total number of values inserted, mod WS_MAX.
- n: the number of values in the window.

Value number s (counting from 0) has a fixed place in each level:

- In L1 it is lane `s mod V1`.
- In L2 it is value `s mod V2` of the key's 32-value block.
- In L3 it is value `s mod WS_MAX` of the key's ring.

So the last `T mod V1` values are in L1 and the `(T mod V2) - (T mod V1)`
values before them are in L2. Everything older is in L3.

**Insert.** Write the value into L1 lane `T mod V1`. Then:

- If that filled L1 (`(T+1) mod V1 == 0`), write both values into L2 with byte enables, at offset `(T+1-V1) mod V2`.
- If that in turn filled L2, read the 4 L2 words back and write them to DRAM as one line. The line is number `((T+1-V2) mod WS_MAX) / 32` of the key's ring.

L2 is 128 bits wide, so an L1 flush is a byte-enabled partial write. It
never needs a read.

**Aggregate.** When n reaches cfg_ws the generator splits the window:

```
c1 = T mod V1                 values in L1
c2 = (T mod V2) - c1          values in L2
a1 = min(n, c1)               window part in L1
a2 = min(n - a1, c2)          window part in L2
a3 = n - a1 - a2              window part in L3
p2 = c2 - a2                  first L2 position used
p3 = T - (T mod V2) - a3      first L3 position used (mod WS_MAX)
```

It issues all reads at once:

- L3 lines `p3/32 ... (p3 + a3 - 1)/32`, wrapping around the ring.
- L2 words `p2/8 ... (c2 - 1)/8`.
- The L1 word.

It then sends the data collector a descriptor: slot, key, timestamp and
the counts/offsets `a1, a2, a3, p2 mod 8, p3 mod 32`. The collector stores
the L2 words and the single L1 word. It emits L3 values, skipping the
first `p3 mod 32` of the first line, then the L2 values, then the L1
values. L3 is the oldest part and L1 the newest.

**Evict.** After an aggregation n drops by cfg_wa. Nothing is erased: the
head is simply `T - n`, and older data is overwritten as the ring wraps.

**Channels.** A key's L2 and L3 data sit on channel `slot mod CH2` and
`slot mod CH3`. The address inside a channel is the global one:

- L2: `slot * 4 + word`.
- L3: `slot * 128 + line`.

This wastes part of each channel but keeps the address arithmetic trivial.

**Hazards.** The generator handles one tuple at a time, in a state
machine. It reads the hash entry, writes L1, performs any flushes, issues
the aggregation, then writes the entry back. The next tuple starts after
that, so two tuples of the same key never overlap. An L2 flush read and a
window read on the same channel return in order and are told apart by
their tags.

## Median and the other functions

Sum, minimum and maximum are updated as values stream in. The average is
`floor(sum / n)`, computed with a bit-serial divider.

The median is a two-pass histogram median, the lower median (rank
`floor((n-1)/2)`):

1. While the window streams in, each value is stored in a window buffer and counted in a 256-bin histogram of its upper 8 bits. A scan of that histogram finds the bin holding the target rank, and how many values fall below it.
2. The buffer is read again. Only values in that bin are counted, in a 256-bin histogram of their lower 8 bits. A second scan gives the exact value.

Each scan keeps a running count and looks at SCAN_P = 4 bins per cycle,
so a scan of 256 bins takes 64 cycles. A window of n values costs about
`2n + 128` cycles. Histogram bins are cleared during the scans, so the
kernel is ready for the next window right after the result leaves. The
divider finishes within the scans.

## Departures and limits

- **Throughput.** The memory command generator handles one tuple at a time. It needs 5 cycles for a plain insert and more when it flushes. The kernel needs about 2n + 128 cycles per window. The engine therefore runs far below one tuple per clock. It holds the full problem size but not at line rate. A pipelined generator would need to forward hash-table entries between tuples of the same key; it is not built. Measured at the default size (16 keys or fewer):

  | ws | wa = 1 | wa = ws/4 | wa = ws |
  |---|---|---|---|
  | 64 | 174 | 13.0 | 6.8 |
  | 256 | 102 | 8.4 | 6.4 |
  | 1024 | 204 | 7.7 | 6.9 |
  | 4096 | 209 | – | 6.9 |

  The table is in cycles per tuple. When windows close rarely the cost is about 7 cycles per tuple. With wa = 1 every tuple closes a window, and reading and reducing the window (one value per cycle, twice in the kernel) dominates.
- **One kernel, one query.** Only one query is built: average, min, max and median per window.
- **Hash table.** It has no deletion or ageing. A key that finds both candidates taken is dropped for good and counted in `ev_fail`. With 128K active keys in 128K slots, some keys will find no free entry.
- **Windows.** Nothing is emitted until a key has collected cfg_ws values. cfg_ws and cfg_wa must not change while tuples are flowing; the test bench resets between settings.
- **Widths and formats.** The network word layout, the result packet, the hash constants, the FIFO depths and the 128-bit L2 word (an 18-byte QDR word read as 16 data bytes) are this design's choices.
- **Off-chip parts.** The QDR-SRAM, DRAM and Ethernet port are outside the top. Their signals are ports. `tb/qdr_sram_model.sv` and `tb/dram_model.sv` are behavioural models for simulation. The DRAM model stalls commands at random and returns lines after a fixed latency.

## Parameters (mlq_swag_top)

| name | default | meaning |
|---|---|---|
| NUM_HASH | 2 | hash functions / table banks |
| IDX_W | 16 | index bits per bank (slots = NUM_HASH * 2^IDX_W) |
| WS_MAX | 4096 | largest window, L3 ring size per key |
| V1 | 2 | values per key in L1 |
| V2 | 32 | values per key in L2 (one DRAM line) |
| M2_VPW | 8 | values per L2 word |
| M3_VPL | 32 | values per DRAM line |
| CH2 / CH3 | 2 / 3 | QDR-SRAM / DRAM channels |
| M2_ADDR_W / M3_ADDR_W | 22 / 27 | word / line address bits per channel |
| HI_W | 8 | bits of the first median histogram |

compute_kernel also has SCAN_P (default 4), the number of histogram bins
scanned per cycle; it must divide both histogram sizes.

V1 must divide V2, V2 must be a multiple of M2_VPW and equal M3_VPL, and
WS_MAX must be a multiple of V2.

## Simulating

Every test bench prints `TB_RESULT checks=N failures=M` and stops itself.
Block benches are in `tb/tb_<module>.sv`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mlq_pkg.sv tb/tb_mlq_swag_top.sv --top-module tb_mlq_swag_top
./obj_dir/Vtb_mlq_swag_top
```

- **`tb_mlq_swag_top`** runs the engine end to end at IDX_W=4 and WS_MAX=256.
  - It compares every result packet with a per-key reference queue.
  - It runs several (ws, wa) settings, including ws = WS_MAX and windows spanning all three levels.
  - The transmit side stalls at random, the DRAM stalls, and malformed words are injected.
  - It ends by flooding the table until lookups fail.
  - It counts each mechanism and fails if one never happened: insert, both flushes, aggregation, eviction, three-level windows, back-pressure, DRAM stall, receive drop, hash failure.
- **`tb_mlq_swag_full`** runs the top at its default sizes. It runs a key with ws = 4096 and wa = 1024, then many keys with ws = 64 and wa = 8.
- **`tb_mlq_swag_workload`** sweeps ws from 64 to 4096 and wa from 1 to ws at the default sizes.
  - It sends input as fast as the input FIFO takes it and never stalls the transmit side.
  - It checks every result.
  - It prints the rate of each phase in cycles per tuple, and checks it against the timing given above.
