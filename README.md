# BFAST*: a Bloom-filter string-matching engine for virus and packet scanning

BFAST* is a hardware filter for exact multi-pattern string matching, meant to
sit beside a software scanner (an anti-virus or deep packet inspection
program). Almost all scanned data contains no pattern at all. The engine's job
is to prove that quickly, and to point the software at the rare places where a
pattern *might* start. The software then verifies those places with its own
exact matcher.

The engine runs in sub-linear time. It does not look at every byte. It slides
an 8-byte search window over the text and usually jumps the whole window
forward in one step. The jump length comes from eight Bloom filters instead of
a large shift table.

This repository holds synthesizable SystemVerilog for the engine: two text
buffers, the hash functions, the Bloom filters, five scan controllers on a
shared five-stage pipeline, the register file and a DMA engine. A
self-checking testbench comes with every module.

## The shift heuristic

Take every pattern's first 8 bytes (patterns must be at least 8 bytes long).
Cut them into blocks by where the block *ends*:

| group | block of pattern `p0 p1 ... p7` | length |
|-------|---------------------------------|--------|
| G0    | `p4..p7`                        | 4      |
| G1    | `p3..p6`                        | 4      |
| G2    | `p2..p5`                        | 4      |
| G3    | `p1..p4`                        | 4      |
| G4    | `p0..p3`                        | 4      |
| G5    | `p0..p2`                        | 3      |
| G6    | `p0..p1`                        | 2      |
| G7    | `p0`                            | 1      |

A block in group Gg ends g bytes before the end of the pattern's first 8
bytes. Each group is stored in its own Bloom filter.

Scanning looks at the rightmost 4 bytes of the window:

* The lowest group g that contains this block is the safe shift. Moving the
  window by g bytes lines it up with the pattern that could contain the
  block. Any smaller shift would put a known block at a position where no
  pattern has it.
* If no group contains the block, the window moves by 8.
* For G5..G7 only the last 3, 2 or 1 bytes of the block are compared. Those
  groups cover windows where a pattern starts inside the block.
* A shift of 0 (the block is in G0) means the window may hold a whole
  pattern prefix. The controller then *checks* the window: the block ending
  i bytes before the window end must be in Gi, for i = 0..7. If all eight
  agree, the window is reported as a possible match. If one fails, scanning
  resumes one byte further on.

Bloom filters give false positives and never false negatives. A false
positive only costs a shorter shift or a needless check. No pattern is ever
skipped.

## Hardware organisation

```
              +--------------+   +-------------+   +----------------------+
 host port -> | TextRam0/1   |-->| HashGen     |-->| BloomFilterQuery     |
 DMA ------>  | 4 byte banks |32 | H0..H3 (H3) |14 | MbitVector0..7       |
              +--------------+   +-------------+   +----------------------+
                     ^ 13-bit address                       | hit[7:0], shift
              +--------------+                              v
              |  TextPoint   |<--- TPController0..4 <--- write-back
              +--------------+
```

* **TextRam0 / TextRam1** (`bfast_text_ram`): 8 KB each, 13-bit byte
  address. Each is four interleaved byte banks, so any 4 consecutive bytes
  come out in one access. The banks below the byte offset read the next row,
  and the four bytes are then rotated into order. One TextRam is scanned
  while the other is filled.
* **HashGenerator** (`bfast_hash_gen`): four H3-class hash functions with
  14-bit results. Each function is a table of 32 rows of 14 bits, one row per
  block bit; the hash is the XOR of the rows whose bit is 1. The tables are
  written by the host. Because the hash is linear, the hashes of the 3-, 2-
  and 1-byte suffixes (for G5..G7) are partial XORs of the same per-byte
  terms, so they come out at no extra cost.
* **MbitVector0..7** (`bfast_mbit_vector`): one 2^14 x 1-bit Bloom filter per
  group, with four read ports so that all four hash bits are read in one
  cycle. The host writes and reads single bits.
* **BloomFilterQuery** (`bfast_bloom_query`): a group hits when all four of
  its bits are set. The shift is the lowest hit group, or 8 when none hits.
* **TPController0..4** (`bfast_tp_controller`): controller k scans the k-th
  1600-byte segment of the requested range. Its windows may start up to 7
  bytes into the next segment, so a pattern that crosses a segment boundary
  is still seen.
* **TextPoint** (`bfast_text_point`): the first pipeline stage. It gives the
  pipeline to each controller in turn.
* **Registers** (`bfast_regs`) and **DMA** (`bfast_dma`).
* **`bfast_core`** connects the scanning parts. **`bfast_top`** adds the DMA
  and decodes the host port.

### The shared five-stage pipeline

A query passes five stages, one cycle each:

| stage         | what happens                                         |
|---------------|------------------------------------------------------|
| TP            | the owning controller's TextPoint addresses the TextRam |
| TextRead      | four bytes leave the banks, rotated; block registered |
| Hash          | four hash functions over the block and its suffixes  |
| ShiftDistance | the eight MbitVectors are read                        |
| WB            | hit vector and shift reach the controller, which moves |

The five controllers use the stages in strict rotation: controller k enters
TP at cycles k, k+5, k+10 and so on after the scan starts. Each controller
therefore has exactly one query in flight. Its result arrives in the cycle
just before its next turn, so no stalls or forwarding are needed, and every
stage is busy every cycle. One controller advances by at most 8 bytes every 5
cycles. Five controllers together reach up to 8 bytes per cycle.

### TPController state machine

| state | behaviour |
|-------|-----------|
| INIT  | idle until a scan starts. A start loads TextPoint with the address of the rightmost block of the segment's first window. It goes to SCAN, or to HOLD when not even one 8-byte window fits. |
| SCAN  | each result adds the shift to TextPoint. Shift 0 goes to CHECK. A window end at or past the segment limit goes to HOLD. |
| CHECK | pass i queries the block at TextPoint and requires group i to hit; then `TextPoint--`, `i++`. A miss goes back to SCAN with the window one byte right of where the check began. After eight hits, one more pass makes the `i >= 8` decision and enters HOLD with a pending report. |
| HOLD  | a pending report uses one more pass; `found` rises at its write-back. HOLD is left only when the scan is disabled (to INIT) or restarted. |

`stop` moves a controller in SCAN or CHECK straight to HOLD. It is raised as
soon as any controller has reported, so a scan ends at its first reported
match.

### Timing

The cycles during which a TextRam's `scanning` flag is high:

| situation | cycles |
|-----------|--------|
| 11 bytes, no match | 5 |
| 1600 / 3200 / 4800 / 6400 / 8000 bytes, no match | 1000 / 1001 / 1002 / 1003 / 1004 |
| match in the first window of segment k | 55 + k (1 detect + 8 check + 1 decide + 1 report passes) |
| match in the last window of segment 0 (address 1592) | 1050 |

In general, a scan takes `5*S + k` cycles, where S is the number of passes
that controller k needs. Without a match this is the maximum over the
controllers; with a match it is the first controller to report. In the best
case (no pattern material at all) an 8000-byte TextRam is scanned in 1004
cycles: 8000 bytes / 1004 cycles ≈ 8 bytes per cycle. That is 6.4 Gbit/s at
100 MHz.

## Host interface

`bfast_top` has a plain single-cycle host port. `h_rdata` is valid one cycle
after `h_re`.

| `h_is_reg` | `h_id` | target | `h_addr` / data |
|-----------|--------|--------|-----------------|
| 1 | 0 | EnableTextRam0 | `{enable[31], start[30:13], length[12:0]}`; length 0 = 8192 |
| 1 | 1 | EnableTextRam1 | same |
| 1 | 2 | StatusRegister (read only) | see below |
| 1 | 3 | DMA source byte address | 4-byte aligned |
| 1 | 4 | DMA control | `{go[31], TextRam[30], dest offset[26:14], length[13:0]}` |
| 1 | 5 | DMA status | `{error[2], done[1], busy[0]}` |
| 0 | 0, 1 | TextRam0/1 | byte address; writes are aligned 32-bit words, reads return 4 bytes from any byte |
| 0 | 2..5 | H0..H3 | row 0..31, 14-bit value |
| 0 | 6..13 | MbitVector0..7 | bit address 0..16383, data bit 0 |

StatusRegister bits:

| bits | field |
|------|-------|
| 24 | BFAST* enable (a scan is running) |
| 23 | TextRam0 finished |
| 22 | TextRam1 finished |
| 21 | TextRam0 scanning |
| 20 | TextRam1 scanning |
| 19 | TextRam0 error |
| 18 | TextRam1 error |
| 17:13 | VirusAddress: one-hot, which TPController reported |
| 12:1 | TextPointer: bits 12:1 of the reported window's start address |
| 0 | FoundVirus |

Rules for scans and errors:

* Writing an EnableTextRam register clears that TextRam's finished and error
  flags.
* A scan starts when a TextRam is enabled, not finished and not in error, and
  no other scan is running. TextRam0 goes first when both are ready.
* A TextRam whose scan ended *without* a match lets the other TextRam start
  at once; this gives the ping-pong use. A result *with* a match is held
  until its TextRam is disabled, by writing enable = 0.
* The error flag of a TextRam is set by a host or DMA access to it while it
  is being scanned; the access is refused. It is also set by an enable
  request whose start + length exceeds 8 KB.

The DMA reads 64-bit beats through `m_req_*` / `m_rsp_*`, one read at a time,
and writes them into the chosen TextRam as 32-bit words.

### Using it

1. Write random rows into H0..H3.
2. Clear all eight MbitVectors. For every pattern and group g, take the
   group's block (see the table above), placed at the *end* of a 4-byte word
   with leading bytes zero. Hash it with the suffix length of the group:
   4 for G0..G4, then 3, 2, 1 for G5, G6, G7. Set the four addressed bits in
   MbitVector g.
3. Load text by DMA or by host writes. Enable the TextRam. Poll the
   StatusRegister until its finished bit is set.
4. If FoundVirus is set, verify in software from the reported window start.
   The reported start is rounded down to an even address, so verification
   starts at most 1 byte early.
5. For long buffers, cut the text into batches of up to 8000 bytes. Let
   consecutive batches overlap by at least 7 bytes; the testbench uses 10.
   Load one TextRam while the other is scanned.

## Departures and choices to know about

* **Hash functions**: H3 hashing and the suffix hashes for G5..G7 are this
  design's choices. Any software that programs the filters must use the same
  construction (see `h3_ref` in `tb/bfast_tb_pkg.sv`).
* **MbitVector size**: each has a 14-bit address and 1-bit data, which is
  2 KB. Four read ports are modelled as one array; on an FPGA this is two
  dual-port block RAMs holding the same contents, 4 KB in all.
* **Segment overlap, resume after a failed check, one-hot VirusAddress and
  TextPointer bits 12:1** are this design's choices. The resume point is one
  byte after the checked window.
* **The bus**: the original system hangs the engine on a processor bus with a
  CPU, DDR memory and bus bridges. Those are platform parts, and here they
  are replaced by the plain host port and memory read port. Verification of
  candidates stays in software.
* **Bloom filter capacity**: with 16384 bits and 4 hashes per group, a group
  holds a few thousand blocks at a useful false-positive rate (about 6% at
  2800 entries). A signature set of tens of thousands of patterns fills every
  bit, so every block hits. The engine still never misses a pattern, but it
  no longer filters anything.

## Files

| file | contents |
|------|----------|
| `rtl/bfast_pkg.sv` | sizes, types, register field structs |
| `rtl/bfast_text_ram.sv` | TextRam, 4 interleaved banks |
| `rtl/bfast_hash_gen.sv` | H0..H3 and the suffix hashes |
| `rtl/bfast_mbit_vector.sv` | one Bloom filter bit array |
| `rtl/bfast_bloom_query.sv` | eight filters and the shift rule |
| `rtl/bfast_tp_controller.sv` | scan controller state machine |
| `rtl/bfast_text_point.sv` | TP stage, slot rotation |
| `rtl/bfast_regs.sv` | EnableTextRam0/1, StatusRegister |
| `rtl/bfast_core.sv` | the pipeline, scan control, host decode |
| `rtl/bfast_dma.sv` | memory-to-TextRam DMA |
| `rtl/bfast_top.sv` | core + DMA, top level |
| `tb/bfast_tb_pkg.sv` | reference hash, exact group sets, scan model with cycle counts |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if the test hangs. Use verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bfast_pkg.sv tb/bfast_tb_pkg.sv tb/tb_bfast_top.sv --top-module tb_bfast_top
./obj_dir/Vtb_bfast_top
```

Replace `tb_bfast_top` with any other `tb_bfast_<module>`. Lint with
`verilator --lint-only -Wall -Irtl rtl/bfast_pkg.sv rtl/bfast_top.sv`.

What the tests cover:

* `tb_bfast_core` reproduces every timing in the table above. It also
  compares 30 random scans on a 4-letter alphabet with the reference model:
  match, controller, window start and exact cycle count. Failed checks, the
  ping-pong start and the error flags are exercised too.
* `tb_bfast_top` runs the full-size design the way scanning software would.
  It programs the patterns, then scans 20000–24000-byte buffers in
  overlapping 8000-byte batches. The DMA loads one TextRam while the other is
  scanned. It covers a match across a batch boundary and a refused DMA write,
  and it counts each of these mechanisms.
* `tb_bfast_clamav_files` scans whole files through `bfast_top`: 1 KB and
  1 MB, each clean and with one signature (at byte 359 and byte 738663). The
  file is read in 131072-byte buffers and 8000-byte batches, each keeping 10
  bytes of overlap. The signatures must be reported at exactly those bytes.
  The test also prints the cycles spent on DMA and on scanning. With this
  DMA (one 8-byte read in flight) loading takes about 98% of the time. Faster
  text delivery pays off much more than a faster scanner.
* The leaf testbenches check their module against independent models: byte
  arrays, bit arrays, a bit-serial H3 hash and exact set membership.

All testbenches run in well under a minute.
