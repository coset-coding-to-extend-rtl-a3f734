# Coset coding for write-limited memory: PCM FlipMin codec and a Flash SSD write path

Memory cells that wear out with every program (phase-change memory, Flash) last longer if
each write changes as few cells as possible, and avoids cells that can no longer change.
Coset coding gets this freedom by spending redundancy: a k-bit dataword does not select one
n-bit codeword but a whole *coset* of 2^(n-k) candidates, any of which decodes to the same
data. The writer picks the candidate that is cheapest to program on top of what the
location already holds. This repository holds two designs built on that idea. They
share only clock and reset in the top module `coset_top`.

1. **PCM FlipMin codec.** 64-bit words are stored in 72 cells (the overhead of an ECC DIMM)
   and selected by exhaustive search.
2. **Flash SSD with coset coding.** This is a convolutional coset code selected by a
   Viterbi search. It comes with cell-level management (Waterfall coding and stuck-at cell
   pointers) and a flash translation layer that re-writes pages without erasing them.

## The coset coding arithmetic (shared by both designs)

A coset code is defined by a zero coset generator Z ((n-k) x n). From Z three more
matrices follow:

- **H#** (k x n) maps a dataword to a *coset label*.
- The coset of data d is `{ d·H# ^ u·Z }` for all `u`.
- **H** (n x k) decodes any member: `Z·H = 0`, `H#·H = I`.

Picking the member closest to the previous content `p` is the same as searching the
*translate coset* `{ (d·H# ^ p) ^ u·Z }`. That search finds its minimum-weight member, the
*leader* `l`, and writes `rep = l ^ p`. The number of cells that change equals the weight
of `l`.

H# and H are not tables in the source. They are computed at elaboration time in
`flipmin_pkg` by Gauss-Jordan elimination of Z over GF(2):

- the pivots are taken from the lowest columns;
- the data bits are placed in the non-pivot columns, so that H# is a plain placement;
- H reads those columns back, with parity corrections from the reduced rows.

Three zero coset generators are provided:

| code (`code_e`)    | sub-vectors per 64-bit word | n  | k  | candidates per search |
|--------------------|-----------------------------|----|----|-----------------------|
| `FM_PARITY_72_64`  | 8                           | 9  | 8  | 2                     |
| `FM_RM_1_3`        | 16                          | 8  | 4  | 16                    |
| `FM_RM_1_7T` (default) | 1                       | 72 | 64 | 256                   |

Notes on the codes:

- `FM_PARITY_72_64`: Z is the repetition word.
- `FM_RM_1_3` and `FM_RM_1_7T` use first-order Reed-Muller words `z_j = u0 ^ (u·j)`.
- `FM_RM_1_7T` is RM(1,7) punctured to its first 72 coordinates.

## Design 1: PCM FlipMin (`flipmin_encoder`, `flipmin_decoder`)

`flipmin_subenc` handles one sub-vector in five steps:

1. `gf2_matmul` forms the label.
2. The label is XORed with `prev`.
3. `translate_coset_gen` XORs the result with every zero coset member. These members sit in
   a constant table built at elaboration.
4. `min_weight_select` picks the minimum-weight candidate.
5. The leader is XORed with `prev` again.

Stuck cells are handled by **coset erasure matching**. A candidate with a 1 in a position
marked by `fault_mask` would flip a stuck cell, so it is skipped. If every candidate is
excluded, the overall minimum is returned and `cem_ok` is low. Ties go to the lowest index.

`flipmin_encoder` instantiates one sub-encoder per sub-vector and registers the result:

- `rep`, `flips` (total cells changed) and `cem_ok` (all sub-vectors respected the stuck
  cells) appear with `out_valid`, one clock after `in_valid`;
- the search is fully combinational, so a new word can be accepted every clock.

`flipmin_decoder` is a combinational multiply by H.

## Design 2: Flash coset coding

### Block code

A 4 KB page (32768 bits) is coded as 66 independent blocks. Each block holds 501 data bits
in 1024 cells, and a page has 67584 cells in total.

The code is a rate-1/2 convolutional code with 128 states (memory 7), with generators 247
and 371 in octal. A block is 512 trellis steps. The syndrome former has 512 outputs:

- 501 carry data;
- the last 11 are held at zero by the encoder and checked on read (`syn_err`).

**The coset label.** `conv_label_gen` computes the label as an inverse syndrome, one step
per clock: the first code bit is 0, and the second comes from a recursive filter through
G1.

**The coset search.** `viterbi_selector` searches the zero coset, i.e. all code sequences,
for the path that differs least, under the chosen cost, from the translate sequence
`label ^ prev`:

- The forward pass runs 128 add-compare-select units in parallel, one trellis step per
  clock, and stores 128 decision bits per step.
- A traceback then emits the zero coset path, one step per clock.
- The start state is left free: all path metrics start at 0.
- The best final state gives the path; its start state is returned, because the decoder
  needs it.
- `done` comes 2L+1 clocks after `start`, about 1025 clocks for L = 512.

**The metric (`mf`).** Each cell has a cost for being flipped:

- `MF_BFR` costs 1 per flip, so it minimises the number of bit flips.
- `MF_BFR_SCI_WL` costs `level+1`, so it prefers less worn cells. A cell already at its
  limit F gets a prohibitive cost (2^16), so it is changed only when nothing else is
  possible.

**Decoding.** `conv_decoder` removes the start state's zero-input response from the first
7 steps and applies the syndrome former.

### Cell levels: Waterfall coding and stuck-at cell pointers (SCPs)

A cell stores one bit as its level mod 2. Changing the bit raises the level by one, so a
cell can flip F times (`F`, default 1) before its block must be erased.

When a cell at its limit must change, `scp_write_unit` spends a *stuck-at cell pointer*.
Each page has 100 of them, each made of a 17-bit cell index plus one replacement bit. From
then on, reads and writes of that cell use the pointer's bit. A cell that needs a pointer
when none is left makes the write `fail`.

`scp_read_unit` applies the same replacement on read.

`flash_write_path` processes one block in four phases:

1. Read 1024 cells (one per clock).
2. Run the coset encoder.
3. Load the page's pointer table.
4. Produce the new levels (one cell per clock).

`flash_read_path` reads 1024 cells and decodes; `done` comes NCELL+1 clocks after `start`.

`page_coder` runs the 66 blocks of a page one after the other:

- A write collects 66 start states (462 bits) and stops at the first failing block.
- A read takes those start states back.
- The Flash array is outside the design. For the addressed page/block, it must present the
  cell levels and the page's pointer table in the same clock; programming is done with
  `arr_we` / `arr_scp_we`.

### Flash translation layer

Pages are Clean (writable), Valid, Stale or Sealed (a coset re-program failed). Blocks are
Clean, Active or Sealed.

- **`map_table`**: LBA → physical page plus the 462-bit start states. Read is synchronous.
- **`write_controller`**: handles writes and reads.
  - A host write goes to the next Clean page of the Active block. Pages left Valid or
    Sealed by an eraseless clean are skipped.
  - A failed write marks that page Sealed and retries the same data on the next Clean
    page.
  - When the block has no Clean page left, it asks for a new Active block.
  - On success the map is updated and the previous page of the LBA becomes Stale.
  - Reads decode with the stored start states; an unmapped LBA reads as zeros.
  - Page moves requested by the garbage collector are a read followed by a write of the
    same LBA.
- **`garbage_collector`**: runs after each host write. Host requests wait while it works.
  It has two triggers:
  - *Capacity*: writable pages (all minus Sealed) below the advertised capacity. The block
    with the most Sealed pages is fully erased.
  - *Free pool*: at most 5% Clean blocks. Cleaning continues up to 15%. The victim is
    the Sealed block with the fewest Valid pages.
    - If it has at least `ERASE_THRESH` Sealed pages, or no Stale page at all, it is
      **fully erased**: its Valid pages are moved out first, then `erase_en` is raised.
    - Otherwise it is **eraselessly cleaned**: it is marked Clean without touching the
      Flash. Its Stale pages become writable again through coset coding, and its Valid and
      Sealed pages stay put. This avoids both the erase and the page moves.

## Parameters (defaults)

| parameter | default | note |
|---|---|---|
| `CODE` | `FM_RM_1_7T` | PCM code |
| `F` | 1 | flips per cell before erase (Waterfall levels) |
| `NCB` | 66 | code blocks per page (reduce for fast tests) |
| `NB`, `PPB` | 848, 256 | blocks, pages per block (my choice; about 0.85 GB of 4 KB pages) |
| `ADVERTISED` | 188744 | advertised logical pages (my choice; about 87% of the physical pages) |
| `ERASE_THRESH` | PPB/2 | Sealed pages that force a full erase (my choice) |

## Where this departs from the coset coding scheme it implements

- **Hamming ECC not built.** The original scheme embeds a Hamming ECC in the Flash coset
  code. It is not built here because its matrices are not available. The 11 spare
  syndrome bits per block give only an error-detect flag.
- **Convolutional generators.** The generators, the puncturing of RM(1,7), the
  label/decoder matrices and the metric weights are my choices. They are consistent with
  the stated code sizes (72/64 bits; 128 states; 501/1024 bits per block; 7-bit start
  states; 100 one-bit SCPs per page).
- **Capacity and free-pool policy.** The thresholds (5%/15%, half a block), the victim
  rules and the drive size are my choices. Ties pick the lowest block, not a random one.
- **Not in the design.** The memory arrays (PCM chips, Flash cells) are not part of the
  design. `coset_top` exposes their ports.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- Reference models are independent of the RTL. `tb_flash_ref_pkg` contains an encoder, a
  syndrome former and a dynamic program over all start states that gives the optimal
  metric.
- The testbenches check:
  - round trips and coset membership;
  - minimality of the search;
  - stuck-cell matching;
  - latencies (encoder 1 clock; Viterbi 2L+1; block read NCELL+1);
  - SCP allocation and exhaustion.

`tb_coset_top` drives both designs end to end with a small Flash geometry: one code block
per page, 8 blocks of 8 pages, 40 logical pages and an erase threshold of 1. The Flash
array is modelled in the testbench. Every read is compared with the last data written. The
test fails unless each of these happened at least once:

- host stall;
- write retry;
- SCP use;
- Waterfall level rise;
- eraseless clean;
- full erase;
- page move;
- PCM stuck-cell matching;
- PCM flip saving.

`tb_coset_top_full` runs `coset_top` with every parameter at its default. It encodes a few
PCM words, writes one random 4 KB page through the host port, reads it back and reads an
unwritten LBA. This takes about 16 s of Verilator time.

At default size the map table holds 188744 x 480 bits and the garbage collector holds the
state and LBA of 217088 pages. Both are plain arrays meant to map onto RAM, which makes
gate-level synthesis of the whole top slow.

Simulate with Verilator, for example:

    verilator --binary --timing -Wno-fatal rtl/flipmin_pkg.sv rtl/flash_pkg.sv tb/tb_flash_ref_pkg.sv \
        -y rtl -y tb tb/tb_coset_top.sv --top-module tb_coset_top
    ./obj_dir/Vtb_coset_top

A Flash page write at full size takes about 66 x 3100 clocks.
