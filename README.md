# Static wear leveling by write-request redirection

NAND flash blocks survive only a limited number of program/erase cycles. Real
write traffic is concentrated on a few addresses. Without countermeasures, the
blocks that hold the hot addresses wear out while the rest of the memory stays
almost new, and the drive dies early. This design spreads write requests over
all blocks. Every block has a write counter. While a block's counter is below a
*saturation level* S, writes to it go in place, with no data movement. When the
counter reaches S, the logical block is moved to the least-written ("fresh")
block. Whatever cold data lived there is moved into the worn block, where it
causes no further wear. Data are migrated only at that threshold, so the
migration overhead stays low. Traffic aimed at a single logical block is served
S × B times instead of S times (B = number of blocks).

The RTL models a miniature SSD:

- four data blocks of two 4-kB pages (32 kB of user data)
- one extra *dummy* block, used as scratch space during swaps
- a 14-bit counter word per block
- a ten-state write controller

```
            wr_n/wr_addr/wr_data, rd_en/rd_addr            sat_level
                          |                                    |
                  +-------v--------+  inc / swap / excl  +-----v---------------+
                  | wl_write_ctrl  |-------------------->| block_counter_table |
                  |  (10 states)   |<--------------------|  4 x {ID,count,LINK}|
                  +-------+--------+  words, saturated,  +---------------------+
                          |           fresh block, used
                byte write / read / copy
                  +-------v-----------------------------------------+
                  | flash_array: block0 block1 block2 block3 dummy  |
                  |              (2 pages x 4 kB each)              |
                  +-------------------------------------------------+
```

## Files

| file | contents |
|---|---|
| `rtl/wl_pkg.sv` | widths, the counter-word struct, the state enum |
| `rtl/flash_array.sv` | byte storage: 4 data blocks + dummy block |
| `rtl/block_counter_table.sv` | counter words, saturation flags, fresh-block search, LINK exchange |
| `rtl/wl_write_ctrl.sv` | the ten-state write-request controller and the read port |
| `rtl/wl_ssd_top.sv` | top level |
| `tb/wl_ref_pkg.sv` | request-level reference model used by the testbenches |
| `tb/wl_top_tasks.svh` | request drivers and workloads shared by the top-level testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_wl_sat_sweep` (saturation-level sweep) and `tb_wl_ssd_top_full` (full size) |

## The counter word and the logical-to-physical mapping

Each of the four data blocks owns one word:

```
 13  12 11                    2  1   0
+------+-----------------------+------+
|  ID  |   count (10 bits)     | LINK |
+------+-----------------------+------+
```

The fields mean different things, and this is the key to the design:

- **ID** is the word's own index, 0 to 3. It never changes.
- **count** belongs to the **physical** block with that index. It counts the
  write requests that block has served, and is its wear measure. Copies made
  during a swap are not counted.
- **LINK** belongs to the **logical** block with that index. It names the
  physical block that holds logical block ID's data now. After reset, LINK = ID
  for every word: the identity mapping.

The four LINKs therefore always form a permutation of the four physical blocks.
An assertion in `block_counter_table` checks this. When LINK ≠ ID, the logical
block has been moved at least once.

Next to the words, the table keeps one **used** bit per physical block, set
once the block holds data that must be kept. The controller reads it to decide
whether a fresh block must be saved through the dummy block before it is
overwritten.

The **fresh block** is the one with the lowest count, excluding the block
being left; ties go to the lowest index. If even that block is saturated,
every block is worn to the threshold and the request cannot be served.

## The write path: ten states

A request is a byte plus a 25-bit address. The low 13 bits select the byte
within a block, the next 2 bits the logical block L, and the rest are ignored.
`wr_n` is active low: the controller leaves idle when it sees `wr_n = 0`.

| state | action | next |
|---|---|---|
| S1 idle | wait; on `wr_n = 0` register address and data, set `busy` | S2 |
| S2 compare | LINK[L] = ID[L]? | equal → S4, different → S3 |
| S3 change block | follow LINK[L] to the physical block P that holds L | S4 |
| S4 see counter | sense whether count[P] ≥ S | S5 |
| S5 check fresh counter | not saturated → write in place. Saturated → choose fresh block F and the logical block M that lives in F. If F is saturated too → request missed | S10 / S6 / S1 |
| S6 check if not empty | does F hold data? | yes → S7, no → S8 |
| S7 fresh → dummy | copy F into the dummy block | S8 |
| S8 old → new | copy P into F | S9 if S7 ran, else S10 |
| S9 dummy → old | copy the dummy block into P | S10 |
| S10 write and increment | write the byte into the target block, count++ | S1 |

When the last copy finishes, the counter table exchanges LINK[L] and LINK[M],
and the used bits of P and F. From then on, hot block L lives in the
little-worn F, and M's cold data live in the worn P. The byte is written into F
and F's count is incremented.

Because requests into a saturated block are refused or redirected, a saturated
block is in effect write-protected. Its count never exceeds S. Cold data moved
into it are only read.

### Timing

Each copy state moves one byte per clock and lasts `BLOCK_BYTES` cycles (8192
at the default size). Latency is counted from the clock edge that accepts the
request up to the edge that raises `wr_done` or `wr_missed`, both included:

| case | cycles |
|---|---|
| write in place, L not moved | 5 |
| write in place, L moved earlier (via S3) | 6 |
| missed (all blocks saturated) | 4 (+1 via S3) |
| swap into an empty fresh block | in-place + 1 + BLOCK_BYTES |
| swap through the dummy block | in-place + 1 + 3 × BLOCK_BYTES |

`wr_done` and `wr_missed` are one-cycle pulses. They arrive in the cycle in which
`busy` falls and the controller is back in S1. A new request may be presented in
that cycle. `wr_n` must be released once the request has been accepted.
Otherwise it is taken again as a new request when the controller returns to idle.

### Reads and the busy register

`busy` is a register that is set while a write is being processed. Reads are
held off during that time. A read (`rd_en`, `rd_addr`) is served only in S1,
and only when no write is requested in the same cycle; writes take priority. A
served read goes through the same LINK mapping. It returns the byte on `rd_data`
with `rd_valid` one cycle later. A read that is not served gets no `rd_valid`,
and the requester retries it.

## Parameters and ports

`wl_ssd_top` parameters (all defaults are the configuration described above):
`PAGE_BYTES = 4096`, `PAGES_PER_BLOCK = 2`, `HOST_ADDR_W = 25`, `DATA_W = 8`.
The number of blocks is fixed at 4 by the 2-bit ID/LINK fields in `wl_pkg`.
The count field is 10 bits wide.

The saturation level is the input port `sat_level` (10 bits), so it can be
changed between runs. The evaluation uses S = 16. Observation outputs are:

- `counters`: the four words
- `state`
- `done_cnt`, `miss_cnt`, `swap_cnt`: 16-bit totals of served requests, missed
  requests and swaps

The reset `rst_n` is asynchronous and active low. It resets the mapping,
counts, used bits and the controller. It does not clear the memory array.

## Where this design fills in or departs from the source description

The published description gives:

- the memory organisation
- the counter word format
- the names of the ten states and the printed conditions on their transitions
- the evaluation workloads

The following are this implementation's own choices:

- **Empty fresh block.** The state diagram sends "fresh block is empty"
  directly to the final write. Here that path goes through S8 (copy the old
  block into the fresh one, with no dummy round trip) first. Otherwise, the
  earlier bytes of the hot logical block would be lost when it moves.
- **S3 → S4.** The diagram labels this arc "counter reached saturation". It is
  read as the reason LINK differs from ID, and the transition is unconditional.
- **Missed requests.** Once every block is saturated, a request ends in S5 with
  `wr_missed`. The diagram draws no such exit.
- **Meaning of LINK, the used bits, fresh-block tie-breaking, copy width,
  address decode, read port protocol, reset values, state encoding and counter
  widths** are not specified in the source. They are chosen as described above.
- **Memory model.** The memory is a plain byte array, overwritten in place, with
  no erase and no page programming. The wear being levelled is what the block
  counters count, not a physical property of the array.
- **Comparison baseline.** The "memory without the algorithm" used for
  comparison in the evaluation is not part of the RTL. The testbenches only
  compute how many requests it would have served.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

- `tb_flash_array`, `tb_block_counter_table`: unit tests. The counter-table
  test uses a reference model of counts, links, used bits and the fresh-block
  choice, with random traffic and changing saturation levels.
- `tb_wl_write_ctrl`: controller, counter table and an 8-byte-block array, with
  S = 5 and random traffic biased to one block. Each request is compared with
  `wl_ref_pkg` on:
  - outcome
  - the exact set of states visited
  - latency in cycles
  - all counter words

  Reads are held active during every write, to check that none is served while
  busy. All data are read back at the end.
- `tb_wl_ssd_top`: top level with 32-byte blocks and S = 16. It runs:
  - **Case 1:** one write to each block
  - **Case 2:** one block up to its threshold and one more write (swap into an
    empty block)
  - **Cases 3/4:** one block full and the others one short, then hot writes
    through the dummy block until everything saturates; every byte is read back
  - the 36-request workload (34 requests to two blocks)
  - single-block endurance traffic

  It counts each mechanism: write in place, LINK redirection, swap into an
  empty block, swap through the dummy block, missed request, read held off.
  It fails if any mechanism never occurs.
- `tb_wl_sat_sweep`: saturation levels 4, 8, 16 and 32, each with 4·S + 8
  write requests, three quarters of them to one block. For every level it
  checks that exactly 4·S requests are served, and that the swap and miss
  totals match the model. It prints served / missed / swaps per level, so you
  can see how migration traffic depends on S.
- `tb_wl_ssd_top_full`: the top level at its default size, with 8-kB block
  copies. It runs the 36-request workload (all 36 served, 2 swaps) and
  single-block traffic (64 = 16 × 4 served, then misses).

Results against the published claims:

- Single-block traffic is served S × B = 64 times, and the request after that is
  missed.
- All 36 requests of the evaluation workload are served.
- The published table's figures for the memory without leveling (19 of 32
  served) cannot be reproduced, because its request sequence is not given. For
  the 36-request pattern used here, a memory without leveling would serve 34.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/wl_pkg.sv tb/wl_ref_pkg.sv rtl/flash_array.sv rtl/block_counter_table.sv \
  rtl/wl_write_ctrl.sv rtl/wl_ssd_top.sv tb/tb_wl_ssd_top.sv --top-module tb_wl_ssd_top
./obj_dir/Vtb_wl_ssd_top
```

Replace `tb_wl_ssd_top` with any other testbench name. Each run takes well under
a second, including the full-size one. To try other sizes, change `PAGE_BYTES`
in a testbench. To try other saturation levels, change the `sat` argument of
`restart()` / `run_endurance()`. The reference model adapts to both.
