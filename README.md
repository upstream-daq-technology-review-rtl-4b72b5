# DDR4 buffer manager for compressed wire-chamber data

This design holds a rolling window of compressed detector data in DDR4 memory so that
it can be read back later in two ways:

- **Event fragments.** An event selection command names a time window. The buffer
  manager returns every super-packet recorded in that window.
- **Supernova data.** A supernova trigger streams out the most recent N samples,
  towards NVMe storage.

The data comes from 2560 wires read out at 2 MHz with 12-bit samples. It arrives
already compressed, on 40 links of 64 wires each. Every link delivers one
*super-packet* per 32 µs period. A super-packet holds 64 samples of each of its 64 wires,
is Fibonacci-coded into a variable number of 16-bit words, and carries a 64-bit timestamp
that advances by 64 per period.

The memory is a circular buffer. Its key structure is the *write-run*: the 40
super-packets of one 32 µs period, written back to back. An index RAM remembers where
each write-run starts. A time window therefore maps to an address range with two RAM
reads, and no search through memory is needed.

```
 40 x 16-bit AXI4-stream links (clk_s)
   |  input_fifo x40 (16x4096, dual clock, packs 4 words -> 64-bit rows)
   v
 sp_formatter: round-robin MUX, header row BEEF CAFE len link, 64-bit rows
   |  -> stream FIFO 512x128 + write descriptors       init_ts, run end
   v                                                       |
 mem_wr_if  --AXI4 AW/W/B (512 bit, 64-beat bursts)-->   sp_indexer (index RAM 32x16384)
   | run_done + run start address --------------------------^      ^
                                                                   |
 16-bit command stream -> cmd_fifo (dual clock) -> {id, t_start, t_end}
                                                                   |
 mem_rd_if  <--------- event address range [start, end) -----------'
   |   <--- supernova request (last N samples before the write pointer)
   |--AXI4 AR/R (512 bit), ARID = 0 event / 1 supernova
   +--> evt_selector -> 128-bit event fragments (-> b128_sink snapshot)
   +--> snv_selector -> 256-bit supernova stream
```

Two clocks are used:

- `clk_s` (200–250 MHz): the input links, the command stream, the IPBus registers and
  the test generators.
- `clk_m` (300 MHz): the memory controller's user clock, for everything after the input
  FIFOs.

## Memory layout

Each link's words are packed four to a 64-bit row, first word in the top bits. The
formatter writes each super-packet as:

| row | bits 63:48 | 47:32 | 31:16 | 15:0 |
|---|---|---|---|---|
| 0 (header, added by the formatter) | `BEEF` | `CAFE` | length in 16-bit words | link number |
| 1 | flags | timestamp 63:48 | timestamp 47:32 | timestamp 31:16 |
| 2 | timestamp 15:0 | payload | payload | payload |
| … | payload … (last row zero-filled) | | | |

Eight rows make one 512-bit memory word, row 0 in bits 511:448.

- The MUX visits links 0..39 in order and takes one whole packet from each. That is one
  write-run.
- After the run's last packet, zero rows pad it to a 512-bit boundary. Every write-run
  therefore starts on a memory word, and zero rows never begin with the magic word.
- Writes go out in 4 KByte bursts (64 beats × 64 bytes). A burst is shorter only where a
  write-run ends.

The formatter cuts its write descriptors at every 4 KByte boundary of the memory address
and at the run end. These cuts are why full-length bursts stay 4 KByte-aligned even after
a short burst. The write interface also splits any burst that would cross a 4 KByte
boundary, but with these descriptors the split never happens. The write address wraps to
0 at `MEM_BYTES`.

## From time to address: the indexer

At the end of each write-run, the write interface reports the run's start address. The
indexer stores it at entry `run mod INDEX_DEPTH`. The first super-packet's timestamp
becomes the initial timestamp `T0`. A command {id, t_start, t_end} is then handled as
follows:

1. **Run numbers.** `si = (t_start − T0) >> 6` and `ei = (t_end − T0) >> 6`. A time before
   `T0` counts as run 0. If `ei < si`, then `ei = si`.
2. **Wait.** The command waits until run `ei` has been written. The waiting cycles are
   counted.
3. **Clamp.** A start run more than `INDEX_DEPTH` runs old has already been overwritten in
   the index. It is raised to the oldest run still held, and `ei` too if needed. The
   command is counted as *lost*. This is the buffer's designed failure mode: old data is
   overwritten whether it was read or not.
4. **Read range.** The range is `[index[si], index[ei+1])`. If run `ei` is the newest,
   the current write address is used as the end instead. The end may be below the start
   when the range wraps.

With 16384 entries at 32 µs each, the index covers 0.52 s of history.

## Reading: two sources on one AXI read port

`mem_rd_if` keeps two request contexts:

- **Event range.** A byte range that may wrap. A range whose end equals its start means
  the whole memory.
- **Supernova request.** `ceil(2·N / 64)` memory words ending at the current write
  pointer, where N is the number of 16-bit samples requested.

Each context issues 4 KByte-aligned bursts of at most 64 beats, and the read port has
one burst in flight.

- **Alternation.** When both contexts are active they alternate burst by burst. ARID
  marks the source, and the returning data is routed by RID.
- **Back-pressure.** A burst is issued only when its destination selector reports room
  for 64 more words (`space_ok`). A slow consumer therefore stops the reads rather than
  losing data.
- **End marker.** `rd_last` marks the final word of a request.

## Event fragment selector

The event fragment selector is the part of the design with the most state.

- Read data enters a 512-word FIFO and is parsed one 64-bit row per cycle.
- A row that starts with `BEEF CAFE` opens a packet. The parser reads the length from it
  and the timestamp from the next two rows.
- The packet is **kept** when its time slot `[ts, ts+64)` overlaps the command's window:
  `ts + 64 > t_start && ts <= t_end`. A packet that is not kept is skipped row by row.
- Rows outside packets (run padding) are ignored.

Each command produces exactly one fragment on the 128-bit output:

- Beat 0 is a header `{id[31:0], t_start[63:0], t_end[31:0]}`.
- Then the kept packets follow whole, header rows included, two rows per beat with the
  first row in bits 127:64.
- The last beat carries TLAST. If it holds only one row, its TKEEP is `16'hFF00`;
  otherwise TKEEP is all ones.
- A window that matches nothing gives a header-only fragment.

Commands reach the selector through a 16-entry queue in the same order as their reads.
The command FIFO releases a command only when both the indexer and this queue can take
it.

## Supernova selector

Its own 512-word FIFO holds the read data. Each word leaves as two 256-bit beats, bits
511:256 first, with TLAST on the last beat of the request. It applies the same
`space_ok` flow control as the event selector.

## Command format

An event selection command is 10 words of 16 bits on an AXI4-stream, most significant
word first:

- ID: 2 words
- t_start: 4 words
- t_end: 4 words

TLAST is on word 10. A command that ends at any other word count is dropped and counted
(`bad_cmds`). `cmd_fifo` carries the commands from `clk_s` to `clk_m` in a 32-entry
dual-clock FIFO.

## Test and debug blocks and registers

| block | what it does |
|---|---|
| `data_gen` | Sends `n_runs` super-packets on every link. Flags word 0, timestamp `INIT_TS + 64·run`, payload counting 0..`PAYLOAD_WORDS`−1. |
| `trig_cmd_gen` | Sends the command held in the registers as the 10-word stream. |
| `b128_sink` | Captures the first 4096 beats of the event fragment stream after a clear, readable as 32-bit words over IPBus. |

With `USE_TEST_SOURCES = 1` (the default), the two generators replace the external
`link_*` and `req_*` inputs.

IPBus registers (word addresses, `clk_s`); each access is acknowledged one cycle after the
strobe, and unknown addresses return `err`:

| address | access | content |
|---|---|---|
| 0x00 | W | pulses: bit0 start data send, bit1 issue command, bit2 supernova trigger, bit3 clear sink |
| 0x01 | RW | input FIFOs enable (bit 0) |
| 0x02 | RW | number of super-packets per link to send |
| 0x03 | RW | command ID |
| 0x04 / 0x05 | RW | t_start 63:32 / 31:0 |
| 0x06 / 0x07 | RW | t_end 63:32 / 31:0 |
| 0x08 | RW | supernova number of samples (16-bit words) |
| 0x10 | R | flags: fifo_en, generator busy, command generator busy, T0 valid, supernova busy |
| 0x11–0x13 | R | write-runs written, indexer wait cycles, lost commands |
| 0x14–0x17 | R | fragments, packets kept, packets dropped, supernova requests |
| 0x18–0x1A | R | AXI write errors, AXI read errors, malformed commands |
| 0x1B–0x1C | R | sink beats stored, sink TLASTs |
| 0x1D | R | write pointer |
| 0x1E / 0x1F | R | T0 63:32 / 31:0 |
| 0x10000 + 4·beat + word | R | sink snapshot (word 0 = bits 127:96) |

Two enable details:

- The enable is sampled at the start of each packet.
- A packet that starts while the FIFOs are disabled is read and discarded. The links
  therefore never block.

## Compression: Fibonacci coding

Upstream of the buffer manager, each link's data is compressed. A Fibonacci (Zeckendorf)
code writes a positive integer as a sum of non-adjacent Fibonacci numbers:

- Bit k means F(k+1) of the series 1, 2, 3, 5, 8, …
- After the highest bit, a '1' is appended. No code contains '11' anywhere else, so every
  code word ends in `11` and codes can be concatenated without length fields.
- A value N gets a code of i+1 bits, where F(i) is the largest Fibonacci number not
  above N. For example, 12 = 1 + 3 + 8 is sent as `1 0 1 0 1 1`.

Small numbers get short codes, so the coder works on sample differences rather than
samples.

`compressor` handles one link:

1. **Split.** A header/payload state machine sends the 5 header words (flags and
   timestamp) into a header FIFO. The 12-bit samples go to the encoder.
2. **Map to a positive integer.** Each sample becomes the difference to the previous
   sample of the packet (0 before the first), zigzag-mapped (0, −1, 1, −2 … → 0, 1, 2, 3 …),
   plus one. This gives a value of at least 1 and a code of at most 20 bits.
3. **Encode.** `fib_encoder` builds the code in one registered cycle. A chain of
   compare/subtract steps computes the same entries as a lookup table of all codes.
   Zero would raise `out_err`, but the mapping never produces it.
4. **Pack.** The packer appends the code bits, first bit first, to an 80-bit buffer. Each
   full 16-bit word goes to the payload FIFO, first bit in bit 0.
5. **Pad.** After the packet's last sample, the remaining bits are zero-padded to a whole
   word, and that word is marked last.
6. **Output.** An output state machine sends the header words, then the payload words up
   to the marked one, with TLAST.

Throughput:

- Input: one sample per cycle while the bit buffer holds fewer than 24 bits.
- Output: one word per cycle.

On the testbench's synthetic data (a random walk with occasional large jumps), the
factor is about 2.8. The factor on real detector data is not established here.

In `bm_top`, one compressor stands beside the buffer manager with its own `raw_*`/`comp_*`
ports. The buffer manager's links expect compressed packets. In a full system one
compressor would feed each link, and a formatter would add the header row described
above.

The compare chain runs in a single cycle; it would need pipelining to close timing at
the stream clock.

## Performance and sizing

| item | needed | this design |
|---|---|---|
| raw input, 2 MHz × 2560 × 2 B | 10.24 GB/s | not meant to enter: data arrives compressed |
| compressed input (~2.6×) | ~3.9 GB/s | the formatter moves one 64-bit row per 300 MHz cycle = **2.4 GB/s**: too slow |
| per link | ~100 MB/s | 16 bit × 250 MHz = 500 MB/s |
| DDR4 write side | ~3.9 GB/s | 4 KByte per ~80 cycles in simulation ≈ 15 GB/s |
| 4 KByte write / read time | — | 80 / 94 cycles with a 15 / 30-cycle memory model |
| index history | — | 16384 × 32 µs = 0.52 s |
| 10 s at ~3.9 GB/s | 39 GB | `MEM_BYTES` = 2 GiB default (0.54 s), `ADDR_W` = 32 |

The 64-bit formatter path is the throughput limit. A wider MUX (128 bit or more) would be
needed for the full compressed rate.

A full 10 s buffer would need:

- `ADDR_W` ≥ 36;
- a memory of about 40 GB;
- an index of about 330 K entries, or coarser index entries.

All three are parameters.

## What is a design choice here

The document this design follows fixes the following:

- the block structure;
- the sizes of the input FIFOs (16×4096), the stream FIFO (512×128) and the index RAM
  (32×16384);
- the header row `BEEF CAFE length link` and the row order of a super-packet;
- 4 KByte bursts, shorter at write-run ends, and the circular buffer;
- timestamps advancing by 64 per run;
- the stream widths: 16-bit inputs and commands, 128-bit fragments, 256-bit supernova
  data;
- the list of debug registers.

These points are choices made here:

- packing words into rows, and padding write-runs;
- the descriptor cuts at 4 KByte memory boundaries;
- the 10-word command format and the fragment header layout;
- the overlap rule for keeping a packet, and TKEEP on half beats;
- supernova reads take the *newest* N samples;
- burst-level alternation of the two read sources, and the `space_ok` threshold;
- the clamp and counter for commands older than the index;
- FIFO depths not given (command 32, selectors 512, sink 4096);
- the 2 GiB memory size;
- the register address map;
- the enable behaviour.

Each RTL file's opening comment repeats this split for that block.

Three clock-crossing shortcuts are accepted, all of them debug values:

- Status words are `clk_m` counters read from `clk_s` without synchronisation.
- The supernova sample count is a static setting.
- `b128_sink`'s `lasts_seen` counter stays in the write clock.

## Parameters (defaults)

| module | parameter | default |
|---|---|---|
| `bm_top` | `N_LINKS` | 40 |
| | `ADDR_W` | 32 |
| | `MEM_BYTES` | 2 GiB |
| | `INDEX_DEPTH` | 16384 |
| | `PAYLOAD_WORDS` | 1024 |
| | `USE_TEST_SOURCES` | 1 |
| `sp_formatter` | `IN_DEPTH` | 4096 |
| | `STREAM_DEPTH` | 128 |
| | `BURST_BEATS` | 64 |
| `sp_indexer` | `TS_PER_RUN` | 64 |
| `evt_selector` / `snv_selector` | `FIFO_DEPTH` | 512 |
| `evt_selector` | `CMDQ_DEPTH` | 16 |
| `cmd_fifo` | `CMD_DEPTH` | 32 |
| `b128_sink` | `DEPTH` | 4096 |
| `compressor` | `HDR_WORDS` | 5 |
| | `HDR_DEPTH` | 64 |
| | `PAY_DEPTH` | 512 |

## Files and simulation

`rtl/`:

- `bm_pkg.sv`: shared constants (magic words, command length) and the command/IPBus
  structs.
- Helpers: `sync_fifo`, `async_fifo` (Gray-coded pointers), `pulse_sync` (toggle
  synchroniser).
- One file per block listed above; `bm_top.sv` is the top.

`tb/`:

- One self-checking testbench per module, `tb_<module>.sv`. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
- `ddr4_axi_model.sv` is a behavioural AXI4 memory. It has fixed write/read latencies and
  an optional stall, and counts bursts, full bursts and 4 KByte crossings.
- `tb_bm_top` runs the whole design at reduced size: 4 links, 512 KByte memory, a
  32-entry index, external inputs. In one run it makes each mechanism happen and fails if
  one never does:
  - full and short write bursts;
  - the buffer wrap;
  - an indexer wait;
  - a command lost to the index;
  - read flow control and output back-pressure;
  - a read range across the wrap;
  - interleaved event and supernova reads;
  - kept and dropped packets;
  - a header-only fragment;
  - the sink snapshot;
  - compressed packets of known coded length.
- `tb_bm_full` runs the top at its default parameters through IPBus alone, as the debug
  firmware would be used: 40 links × 3 runs, one command, a sink read-back and a
  supernova trigger.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_bm_top -Irtl -Itb -y rtl -y tb \
    rtl/bm_pkg.sv tb/tb_bm_top.sv --Mdir obj_tb_bm_top -o sim
./obj_tb_bm_top/sim
```

Every testbench finishes in seconds; `tb_bm_full` allocates the 2 GiB model memory
sparsely.
