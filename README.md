# Partitioned systolic sequence alignment with drive-backed boundary streaming

This design scores a DNA query sequence against a much longer reference, such as a
gigabyte genome. The score is a local alignment, computed with a linear chain of
processing elements (PEs). Each PE holds one query character. The reference flows
through the chain one character per clock, so the chain works on one anti-diagonal
of the score matrix per cycle.

A chip holds only a few dozen PEs (50 here). A longer query is therefore cut into
segments of 50 characters and processed in **partition passes**: the same chain is
reused for rows 1-50, then rows 51-100, and so on. On every pass the whole
reference is streamed again from the host over Ethernet. The one thing a pass must
hand to the next is the bottom row of its part of the matrix. For every reference
column the last PE emits a 28-byte **boundary record**. The records go through a
FIFO to an SSD and are read back as the top boundary of the next pass.

The hardest part to follow is how the boundary record and the passes fit together,
so most of this file is about that.

## What one PE computes

PE *i* holds query character *q_i*. For reference column *j* with character *r_j*:

    H(i,j) = max( 0,
                  H(i-1,j-1) + (q_i == r_j ? MATCH : MISMATCH),
                  H(i-1,j)   + GAP,
                  H(i,j-1)   + GAP )

The defaults are MATCH = +2, MISMATCH = -1 and GAP = -1. `H(i-1,j)` arrives from
the PE above with column *j*. `H(i-1,j-1)` is the value that arrived with column
*j-1* (the PE's "diag" register). `H(i,j-1)` is the PE's own previous result (its
"left" register).

Besides the score, every cell carries the **start cell** of the local path ending
in it. That start cell is:

- the predecessor's start cell, when the cell extends a path; or
- the cell itself, when the diagonal predecessor is 0 (a new path begins) or when
  H is 0.

Ties are broken in the order diagonal, then up, then left.

A PE whose query slot is empty passes the record through unchanged. This happens in
the last pass, when the query length is not a multiple of 50.

## The boundary record and the pass loop

The record is `rec_t` in `rtl/dialign_pkg.sv`: seven 32-bit words (224 bits,
28 bytes).

| word | field       | meaning for column *j* after the rows processed so far |
|------|-------------|--------------------------------------------------------|
| 0    | `h`         | H of the last processed row                            |
| 1, 2 | `h_srow`, `h_scol` | start cell of that path                         |
| 3    | `best`      | best H anywhere in column *j* so far                   |
| 4    | `best_row`  | row of that best cell (the first row wins a tie)      |
| 5, 6 | `best_srow`, `best_scol` | start cell of the best path              |

The record does not store the column number or the reference base. Every pass
streams the reference in the same order, so column *j*'s record is simply the
*j*-th record read back.

One pass runs like this (`control_unit`):

1. **QUERY**: `query_loader` takes the pass's segment (up to 50 bytes) from the
   stream. It shifts the segment into the chain through PE1, last character first,
   so PE *k* holds character *k*.
2. **REF**: the chain's left and diagonal state is cleared (column 0 is all zero).
   `ref_loader` then joins each reference byte with its column number and a
   boundary record:
   - a zero record on the first pass (row 0 of the matrix);
   - on later passes, the next record from the LOAD FIFO.

   Records from the last PE go to the STORE FIFO, unless this is the last pass.
   On the last pass they go to the DARM instead.
3. **PSB**: the partition state bank copies each PE's best cell of its row.
4. **DRAIN**: wait until every word written in this pass is on the drive, then
   start the next pass.

The path to the drive is 16 bits wide. `store_fifo` keeps whole records in seven
32-bit lanes and sends each one as fourteen 16-bit words. The order is record word
0 first, and within each 32-bit word the low half first. The HBA WRITE FIFO
(`sync_fifo`, 16 bit) sits between it and the drive. On the way back, the HBA
READ FIFO feeds `load_fifo`, which rebuilds the record from 14 words.

Drive regions alternate between passes: pass *p* writes region *p mod 2* and reads
region *(p-1) mod 2*. Each region is `ref_len * 14` words long.

`hba_mux` selects the drives:

- **Single mode** (`dual = 0`): both streams go to adapter 0.
- **Dual mode** (`dual = 1`): pass *p* writes to adapter *p mod 2* and reads from
  the other one. The read of the previous pass's records therefore never competes
  with the write of the current pass on one drive.

### Throughput

With no drive traffic, which is the case for a query of 50 characters or fewer,
the chain takes one column per cycle. After the 50-cycle fill the records come out
at 28 bytes per clock. At the ~67.7 MHz clock this architecture was built for,
that is about 1.9 GB/s.

The record path to the drive carries only 2 bytes per clock. A SATA SSD writes
roughly 66 MB/s. With several passes the STORE FIFO therefore fills and the
**whole chain stalls** (`arr_en` low) until there is room. When the drive read
falls behind, the LOAD FIFO runs dry and **bubbles** enter the chain instead. Both
keep the result exact and only cost time.

Rough cost: every pass except the last writes `14 * ref_len` words. For a 1 GB
reference that is 28 GB per pass boundary.

## Feeding the accelerator

The host sees two logical Ethernet controller cores that share one link. Each core
has an input buffer, presented here as a byte stream `ec_valid/ec_data/ec_ready[k]`.
`sirc_stream` drains them alternately: `CHUNK` bytes (default 1024) from core 0,
then `CHUNK` from core 1, and so on. This lets the host refill one buffer while the
other is read. The merged stream goes to the query loader or the reference loader,
depending on the phase.

Host protocol:

1. Set `query_len`, `ref_len` and `dual`, then pulse `start`.
2. While `phase == PH_QUERY`, send query bytes `pass_idx*50` onwards (at most 50).
3. While `phase == PH_REF`, send the whole reference.
4. Each phase change restarts the alternation at core 0. Repeat until `done`.

`ec_arbiter` shares the MAC transmit path between the two cores' transmit
streams. It grants whole packets, round robin. The top exposes it as ports.

## Results

- **DARM** (`darm_*` ports), valid at `done`. In the last pass, the record of
  column *j* carries the best cell of that column over all query rows. DARM keeps
  the best of these, the earliest column winning a tie, and reports:
  - `darm_score`: the best score;
  - `darm_final_row`, `darm_final_col`: the end cell;
  - `darm_pos_row`, `darm_pos_col`: the start cell of that best local alignment.
- **PSB** (`psb_*` ports). After each pass it stores every PE's best cell (score,
  row, column, start cell) at address `pass*50 + k`. It also keeps:
  - the best entry of each partition (`psb_part_best`, selected by
    `psb_part_idx`);
  - the best over all partitions (`psb_stitched`, the first row winning a tie).

  `psb_stitched.score` always equals `darm_score`. The two may name different
  cells when several cells tie. The bank is on chip and holds `MAX_PART = 4`
  partitions (a 200-character query). For longer queries, entries beyond the
  fourth partition are not stored, but `psb_stitched` and the DARM still cover all
  passes.
- **Result packet** (`res_*` ports). When `done` rises, `result_out` sends the
  DARM result as one 20-byte packet (score, start row, start column, final row,
  final column; 32 bits each, least significant byte first) towards a controller
  core's output buffer.

## Modules

| file | role | main parameters |
|------|------|-----------------|
| `rtl/dialign_pkg.sv` | record, PSB entry, phase and HBA request/response types | |
| `rtl/pe.sv` | one processing element | `MATCH=2`, `MISMATCH=-1`, `GAP=-1` |
| `rtl/pe_array.sv` | chain of PEs | `NUM_PE=50` |
| `rtl/query_loader.sv` | segment buffer and reverse shift into the chain | `NUM_PE` |
| `rtl/ref_loader.sv` | joins reference, column number and boundary record | |
| `rtl/store_fifo.sv` | 7 x 32-bit record lanes, 224 to 16 bit serialiser | `DEPTH=64` |
| `rtl/load_fifo.sv` | 16 to 224 bit assembler and record buffer | `DEPTH=64` |
| `rtl/sync_fifo.sv` | FIFO used for the HBA READ/WRITE FIFOs | `WIDTH=16`, `DEPTH=512` |
| `rtl/hba_mux.sv` | one or two SATA adapters | |
| `rtl/control_unit.sv` | pass sequencer | `NUM_PE` |
| `rtl/psb.sv` | partition state bank | `NUM_PE`, `MAX_PART=4` |
| `rtl/darm.sv` | best-cell tracker | |
| `rtl/sirc_stream.sv` | two-core input merge and routing | `CHUNK=1024` |
| `rtl/ec_arbiter.sv` | two-core transmit arbiter | |
| `rtl/result_out.sv` | result packet to the host | |
| `rtl/dialign_top.sv` | everything wired together | all of the above |

All interfaces are valid/ready streams or one-cycle pulses. Reset (`rst_n`) is
synchronous and active low.

The SATA adapters are outside the design: `hba_req[k]` / `hba_rsp[k]` carry
commands (word address and length) plus the 16-bit streams. So are the Ethernet
MAC, the controller cores and any DRAM. A behavioural drive model for simulation
is in `tb/ssd_model.sv`. It serves reads and writes one word at a time, taking
turns when both are waiting.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For
example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/dialign_pkg.sv tb/tb_ref_pkg.sv tb/tb_dialign_full.sv --top-module tb_dialign_full
    ./obj_dir/Vtb_dialign_full

The end-to-end tests compare the accelerator with `tb/tb_ref_pkg.sv`, which
computes the full score matrix directly:

- `tb_dialign_full` runs the default sizes: 50 PEs, a 200-character query in four
  passes against an 1100-base reference, a 3-pass dual-drive job, a
  single-pass rate check, and the same 3-pass job in both drive modes. The
  drive model performs one word operation at a time, so the dual-drive run must
  finish sooner (15283 against 17315 cycles).
- `tb_dialign_top` runs 4 PEs with small FIFOs and a slow drive. This forces
  stalls, bubbles, partial segments, chunk alternation and both drive modes, and
  counts that each one happens.

Each block also has its own testbench, `tb/tb_<module>.sv`.

## How far to trust it, and where it departs from the published architecture

These parts follow the published architecture:

- the chain of 50 PEs;
- time-multiplexing the chain over partition passes, with the reference
  re-streamed on every pass;
- a 28-byte record per column from the last PE, held as 7 x 32-bit lanes and
  moved as 14 x 16-bit words through HBA READ/WRITE FIFOs;
- one or two SATA adapters muxed onto those FIFOs;
- a partition state bank, a DARM reporting score, position, final row and column,
  and an output block that returns the result;
- two Ethernet controller cores sharing one link, with a transmit arbiter.

These are this design's own choices, because the published description does not
give them:

- The exact scoring. The architecture is described for the DIALIGN algorithm,
  only as "string matching with a score per character match". This RTL uses the
  plain local-alignment recurrence above. MATCH +2 and MISMATCH -1 come from a
  worked example; GAP -1 is the least certain value.
- The meaning of the seven record words.
- Query loading by reverse shift.
- The stall/bubble handshake.
- Drive regions and ping-pong in dual mode.
- Chunked alternation between the two controller cores.
- The result packet format.
- The HBA command interface. The real SATA controller core's interface is not
  modelled.
- An on-chip PSB instead of one backed by DDR DRAM.
- The DARM reads the last PE directly in the final pass. One of the published
  block diagrams draws it beside the PSB instead.
- FIFO depths.

Verified in simulation only: no FPGA timing closure, no real drive and no real
Ethernet core. The scores are exact against the reference model on every tested
job, including stalls and bubbles. A real DIALIGN scoring unit would replace the
cell computation in `pe.sv`; everything else would stay.
