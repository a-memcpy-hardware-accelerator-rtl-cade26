# memcpy by pointer: a data cache that copies words without moving them

A word-by-word `memcpy` of data that already sits in the cache spends its time
reading and rewriting words the cache already holds. This design lets the
cache record a copy instead of making it: for every destination word it
stores a pointer to the source word in an *indexing table* beside the cache.
A later read of the destination is redirected to the source; main memory and
the cache are only brought up to date when the source or the copy is about to
change. Copies need not be aligned to cache lines: source and destination may
start at any word of a line, independently of each other.

One copied word costs two clock cycles. A read of a copied word costs one
extra cycle over an ordinary hit.

The cache itself is a 32 KB direct-mapped write-through cache with 32-byte
lines (1024 lines of eight 32-bit words) on a 22-bit word address:

| field  | bits | use                                  |
|--------|------|--------------------------------------|
| tag    | 9    | compared with the tag-memory         |
| index  | 10   | selects the line                     |
| offset | 3    | selects the word in the line         |

## The indexing table

The table has one slot per word of the cache (2^13 = 8192 slots). A slot is
addressed by the index and offset of a copy's *destination* address and holds:

| field         | width | meaning                                              |
|---------------|-------|------------------------------------------------------|
| valid         | 1     | the slot describes a live copy                       |
| tag_dst       | 9     | tag of the destination; the slot matches only this tag |
| index_src     | 10    | line of the source, as seen from this slot's line    |
| offset_calc   | 4     | `offset_dst - offset_src` of the copy's first word, -7..+7 |
| tag_src       | 9     | tag of the line `index_src` refers to                |

A read or write of address `a` is a copy access when slot `{a.index, a.offset}`
is valid and its `tag_dst` equals `a.tag`.

A copy of N words fills N consecutive slots. The largest copy is 8192 words,
one slot for each word of the cache.

### Finding the original word

The destination and the source are usually at different positions within
their lines. So the original of a copied word may lie in the line named by
`index_src`, or in the line before it, or in the line after it.
`offset_calc` (module `offset_calc`) computes where:

    cal = req_offset - offset_calc          (range -7 .. +14)
    cal > 7 : line index_src + 1, word cal - 8
    cal < 0 : line index_src - 1, word cal + 8
    else    : line index_src,     word cal

When the line step wraps the index, `tag_src` is carried up or down with it.

When a memcpy from `src` to `dst` is set up:

- `offset_calc` is the same for every word: `dst.offset - src.offset` of the first word.
- For destination word `d = dst + i` with source `s = src + i`, the slot stores
  `{tag_src, index_src} = (s - d.offset + offset_calc) >> 3`.
  This value is always a multiple of eight, so the shift loses nothing.

Example 1: a copy of 11 words from line 0 word 1 to line 14 word 5 has
`offset_calc = 4`. Destination word (15, 2) stores `index_src = 1`. A read of
it gives `cal = 2 - 4 = -2`, so the original is line 0, word 6.

Example 2: source at line 0 word 4 and destination at line 14 word 2 give
`offset_calc = -2`. Reading (14, 7) gives `cal = 9`, so the original is
line 1, word 1.

## Keeping copies correct

A copy is only a pointer, so the hardware must turn it into real data before
the pointer stops being true. Main memory at a copy's address stays stale
until then. Turning a copy into data is a *write-back*, done in the controller
(`cache_ctrl`) in these steps:

1. Read the slot.
2. Translate its address as above and read the original from the cache,
   refilling the original's line if it is missing.
3. Write that word to main memory at the copy's own address.
4. Write it to the cache too, if the copy's line is cached.
5. Invalidate the slot in the table and in the CAM.

Write-backs happen in these cases:

- **Write to a copy.** The copy is written back first. Then the write is
  applied normally, so a partial (byte) write merges with the copied word.
- **Write to an original.** The CAM (`src_cam`) holds, per slot, the full
  source word address. It is searched with the written address. Each copy it
  finds is written back, one at a time, before the write goes through.
- **memcpy conflicts.** Before a slot is written:
  - If the source word is itself a copy, that copy is written back first.
  - If the destination slot holds a copy with another tag, that copy is
    written back first.
  - If some copy points at the destination word, that copy is written back
    first, because the destination is about to change.

  With these rules, overlapping and chained copies behave like the plain loop
  `for i: dst[i] = src[i]`.

All writes go through to main memory. A write that misses the cache does not
allocate a line. A read miss refills the whole line with eight one-word reads.
For a copy, the refilled line is the original's line.

Evicting a cache line writes nothing back. Its words are current in main
memory (the cache is write-through), and a copy pointing at one of them is
served by refilling the line.

## Timing

| operation                                   | cycles                                    |
|---------------------------------------------|-------------------------------------------|
| read, ordinary hit                          | data and `ocm_ack` 1 cycle after the request |
| read of a copy, original cached             | 2 cycles (table, then cache)              |
| memcpy, per word, no conflict               | 2 (table/CAM lookup, then table/CAM write) |
| memcpy of N words after the start command   | 2N, e.g. 16384 for 8192 words             |
| write                                       | main-memory write, plus any write-backs   |

The CAM write takes two cycles. The memcpy loop overlaps its second cycle with
the next word's lookup. A search made during that second cycle already sees
the entry being written.

While a memcpy runs, processor requests wait. At 100 MHz, two cycles per
32-bit word is 200 MB/s for the copy itself, not counting the four register
stores that start it.

## Interfaces

`memcpy_cache_top` ports:

- **Processor data side.**
  - Inputs: `ocm_req`, `ocm_we`, `ocm_addr[21:0]` (word address),
    `ocm_be[3:0]`, `ocm_wdata[31:0]`.
  - Outputs: `ocm_rdata`, `ocm_ack`.
  - The request is held until `ocm_ack`, a one-cycle pulse; read data is valid
    with it.
- **Parameter registers.** Inputs `reg_we`, `reg_addr[1:0]`, `reg_wdata`;
  output `reg_rdata` (reads answer in the same cycle).

  | word | byte offset | write                      | read      |
  |------|-------------|----------------------------|-----------|
  | 0    | 0x0         | bit 0 = 1 starts the copy  | busy flag |
  | 1    | 0x4         | source word address        | same      |
  | 2    | 0x8         | destination word address   | same      |
  | 3    | 0xc         | number of words, 1..8192   | same      |

  A start while busy is ignored.
- **Main memory.**
  - Outputs: `mem_req`, `mem_we`, `mem_addr[21:0]`, `mem_be`, `mem_wdata`.
  - Inputs: `mem_rdata`, `mem_ack`.
  - One word per transfer; the request is held until `mem_ack`.

Assertions in `cache_ctrl` and `src_cam` check three handshake rules:

- a main-memory request stays stable until its acknowledge;
- `ocm_ack` is only given to a pending request;
- the CAM is never written while busy.

Reset `rst_n` is asynchronous and active low. It clears all valid bits: the
cache lines, the table slots and the CAM entries.

## Files

| file | contents |
|------|----------|
| `rtl/memcpy_pkg.sv` | widths, address and table-entry structs, controller states |
| `rtl/offset_calc.sv` | translation of a copy address to its original |
| `rtl/indexing_table.sv` | 8192-slot table, two read ports, one write port |
| `rtl/src_cam.sv` | 8192-entry CAM over source addresses, two-cycle write, bypass |
| `rtl/data_cache.sv` | tag-, valid- and byte-writable data-memory, hit compare |
| `rtl/memcpy_regs.sv` | parameter registers and start pulse |
| `rtl/cache_ctrl.sv` | the controller state machine |
| `rtl/memcpy_cache_top.sv` | top level wiring |
| `tb/main_memory.sv` | behavioural main memory, used only by testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## How far to trust it

- **What the tests cover.**
  - Every module has a self-checking testbench ending in `TB_RESULT`.
  - `tb_memcpy_cache_top` runs the top at its full sizes against a reference
    model of what every address should read. It runs:
    - both worked examples;
    - copies of 1, 8, 11 and 8192 words, each with its cycle count checked;
    - 6000 random reads, byte writes and copies (overlapping ones included) on
      lines that collide in the cache.
  - It counts each mechanism (copy reads stepping to the previous and next
    line, refills, write-backs for each reason, requests held during a copy,
    write misses) and fails if one never happens.
  - `tb_memcpy_workloads` runs copies of 1, 8, 40 and 8192 words, and a sweep
    from 4 to 4096 bytes. Each copy must take two cycles per word. Adding the
    28 cycles that the original platform's software needed to write the four
    registers gives 30, 44, 108 and 16412 cycles for the four sizes. The test
    prints the throughput at 100 MHz: 200 MB/s for the copy itself, and
    148 MB/s for 160 bytes once setup is included.
- **Taken from the source design:**
  - the address split and cache organisation;
  - the table fields;
  - the translation algorithm;
  - the write rules for copies and originals;
  - the one-extra-cycle copy read;
  - the two-cycle CAM write that sets the two-cycles-per-word rate;
  - the register map and the 8192-word maximum.
- **This design's own choices:**
  - all port protocols;
  - refill on a miss (the source design assumes data is present);
  - no write-allocate;
  - the memcpy conflict rules;
  - the CAM search bypass;
  - carrying `tag_src` across an index wrap;
  - the busy read-back;
  - holding processor requests during a copy.
- **Known departure.** The source design writes copies back when their
  original's line is evicted. This one does not need to, as explained above.
- **Other differences.**
  - The source register listing describes the address registers as holding
    "tag and index"; here they hold the full word address, offset included.
  - Unaligned (byte) copies are not handled in hardware. Software is expected
    to copy leading and trailing bytes and pass word addresses.
- **Size.** The CAM is 8192 entries of 22-bit keys with a comparator per
  entry. That is faithful in function but large as flip-flop logic; an FPGA or
  ASIC build would use a CAM macro with the same ports.

## Simulating

Each testbench is standalone. With Verilator 5, for example:

    verilator --binary -Irtl -Itb rtl/memcpy_pkg.sv rtl/*.sv tb/main_memory.sv \
        tb/tb_memcpy_cache_top.sv --top-module tb_memcpy_cache_top -o sim
    ./obj_dir/sim

The unit testbenches need only the package and their module, e.g.
`rtl/memcpy_pkg.sv rtl/offset_calc.sv tb/tb_offset_calc.sv`.
`tb_cache_ctrl` needs the package, all of `rtl/` and `tb/main_memory.sv`.
The full top-level run takes a few seconds.
