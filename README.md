# Embedded way prediction for a last-level cache tile

Large last-level caches usually look up their tags first and only then read the one data way that hit. This is a *sequential* access, and it spends latency to save energy. Reading all data ways in parallel with the tags saves that latency, but a 16-way cache then reads 16 blocks to use one.

Embedded way prediction sits between the two. Next to the wordline decoder of every data sub-array is a small CAM. For each row it holds the low bits of the stored tag (the *partial tag*) and one *inhibit* bit. While the row address is being decoded, each way's CAM compares the request's partial tag against the entry of the addressed set. A wordline fires only if its CAM entry matches and is not inhibited.

The inhibit bits are kept so that, in each set, at most one way is uninhibited for any partial tag: the most recently used one. So at most one data way is read while the tags are compared. If the tag lookup confirms that this way hit, the data arrives with parallel-access latency. If not, the correct way is read afterwards, which costs the same as a sequential access. Either way, no access reads more than two data ways.

This repository holds synthesizable SystemVerilog for one 2 MB, 16-way LLC tile built this way, together with self-checking testbenches.

## Organisation

| level | size | module |
|---|---|---|
| tile | 2 MB, 4 independent banks | `llc_tile` |
| bank | 512 KB: 512 sets x 16 ways x 64 B, tag array + 8 data mats | `llc_bank` |
| mat | 2x2 sub-arrays sharing one predecoder, holds 2 ways | `data_mat`, `mat_predecoder` |
| sub-array | 256 rows x 523 bits (512 data + 11 ECC), final decoder, two CAMs | `data_subarray`, `wl_decoder`, `ptag_cam` |
| CAM | 128 entries x (7-bit partial tag + inhibit) | `ptag_cam` |

- **Address.** A 49-bit physical address splits as `tag[48:17] | set[16:8] | bank[7:6] | offset[5:0]`. The partial tag is `tag[6:0]`.
- **Ways and sub-arrays.** Each 32 KB way takes two sub-arrays of the same mat. Set bit 8 picks the sub-array and set bits 7:0 pick the row. Within mat *m*, the local ways 0 and 1 are ways 2m and 2m+1.
- **CAM layout.** One CAM cell is twice as tall as an SRAM cell, so each sub-array has two 128-entry CAMs side by side. The top CAM serves the even rows and the bottom CAM serves the odd rows.
- **ECC.** Rows carry an extended Hamming SECDED code (`secded_enc`, `secded_dec`) and no bit interleaving. Interleaving would put blocks with different tags on one wordline, which defeats per-row gating.
- **Predecoder.** It has four 2-to-4 decoders on set bits [1:0], [3:2], [5:4] and [7:6]. The access enable gates the [1:0] decoder. A combining stage turns these into two 16-wide one-hot groups. The final stage in each sub-array (`wl_decoder`) forms 256 row selects and ANDs each with its CAM matchline.

Shared sizes, operation codes and bundles are in `ewp_pkg`.

## A read, cycle by cycle

In `llc_bank`, tag and data pipelines are scheduled separately:

```
cycle 0   read accepted; if the data pipeline is free this cycle, a
          prediction (set + partial tag, all inhibit comparison lines 0)
          enters the H-tree towards all 8 mats
cycle 6   tag lookup resolves (TAG_LAT = 6)
            hit, and the predicted way is the hit way -> nothing more to do
            otherwise (wrong way, no way, no prediction issued)
                                 -> sequential access of the hit way issued
            miss                 -> READ_MISS on the tag response port
cycle 15  data of a correct prediction delivered      (DATA_LAT = 15)
cycle 21  data of a sequential / mispredicted read    (6 + 15)
```

The data path lasts 15 cycles: 7 H-tree request stages, 1 cycle in the mat, and 7 response stages. These numbers reproduce the 15-cycle parallel and 21-cycle sequential latencies of the original design, which assumed a 4 GHz clock. How the latency is split between stages is this implementation's choice.

The tag side knows which way the CAMs picked without reading them. The tag array keeps a copy of every inhibit bit, and the partial-tag compare reuses the low bits of the full tag comparator. `inhibit_ctrl` computes:

- the predicted way (partial tag equal, inhibit copy clear);
- whether the prediction was right;
- the outcome class.

The bank asserts that the way that actually fired in the mats is the one the tag side expected.

There are five outcome classes, and each gives a one-cycle pulse on `stats`:

| class | meaning |
|---|---|
| `pred_unique` | hit, only one way had the partial tag, and it was read |
| `pred_collision` | hit, several ways shared the partial tag, and the inhibit bits picked the right one |
| `nopred_miss` | miss, no way read |
| `mispred` | hit, but the wrong way or no way was read |
| `overpred_miss` | miss, but a way was read anyway |

`pred_skipped` counts reads that found the data pipeline busy and went straight to sequential access.

## Keeping the inhibit bits right

The invariant: for every set and partial tag, at most one valid block is uninhibited, and it is the most recently used one. Invalid lines are always inhibited. The rules, applied at tag resolve:

- **Read or write-back:** every valid way with the request's partial tag is inhibited, then the hit way (if any) is cleared. A hit therefore changes at most two inhibit bits. On a miss, all ways with that partial tag end up inhibited until the fill arrives.
- **Fill into way v:**
  - If v was the uninhibited member of its old collision set, the most recently used other member of that set is uninhibited.
  - Then every other way with the new partial tag is inhibited.
  - Finally v is cleared.
- **Invalidate of way h:** h is inhibited. If h was the uninhibited member of its collision set, the most recently used remaining member takes over.

The original proposal allows any successor when the LRU state is only approximate. This design keeps exact LRU ages (`lru_update`), so it always picks the true next-most-recent block.

The new inhibit bits are written to the tag array at once. They are also sent to the CAMs as per-way write enables that travel with the next data-pipeline operation of that request. If the request has no data operation, a CAM-only operation is sent, and it fires no wordline.

## Reaching one way without a way select

The CAM/decoder path has no override input. So how does a sequential access (misprediction, write-back, fill, eviction read-out) open exactly one way? The controller knows every CAM entry, so it chooses the comparison lines:

- **Partial tag lines:** carry the partial tag the target entry currently holds. For a fill, that is the victim's old partial tag.
- **Inhibit line of the target way:** carries the target's current inhibit value, so the target matches whether or not it is inhibited.
- **Inhibit lines of all other ways:** each carries the inverse of that way's inhibit bit, so none of them can match.

For a prediction, every inhibit line is 0, so only uninhibited entries can match. A CAM write in the same operation updates the entry at the clock edge, after the compare, so the controller always computes against the contents before the operation. A fill that evicts a dirty block takes two operations: a forced read of the victim, then a forced write that installs the new data, partial tag and inhibit bits.

## Interfaces

### `llc_tile` (top)

- **Request port.** `req_valid`/`req_ready` handshake, with:
  - `req_op`: `OP_READ`, `OP_WRITE`, `OP_FILL` or `OP_INVAL`;
  - `req_addr`, `req_wdata` (512 bits) and `req_id` (8 bits).
- **Routing.** A request goes to the bank named by address bits [7:6], and `req_ready` is that bank's ready.
- **Response ports.** They are packed arrays indexed by bank and cannot be stalled:
  - `dresp_*`: block responses, either read data or eviction data (`DR_READ` / `DR_EVICT`), with id, tag, set, and the ECC-corrected data. `dresp_ecc_err` flags a double-bit error.
  - `tresp_*`: tag-only responses (`TR_READ_MISS`, `TR_WRITE_ACK`, `TR_WRITE_MISS`, `TR_FILL_ACK`, `TR_INVAL_ACK`). For a fill, `tresp_dirty` says that eviction data follows, and `tresp_tag` gives the victim's tag. For an invalidate, `tresp_dirty` says that the block's data follows.
  - `stats`: the event pulses of each bank.

### Operation semantics

These are this design's choices:

- **Write** updates a present block and marks it dirty. A write miss is reported and nothing is allocated.
- **Fill** assumes the block is absent. It picks the first invalid way, or else the LRU way.
- **Invalidate** returns the block's data if it is dirty.

### Pipeline and timing

- A bank holds one request in its tag pipeline at a time. It accepts the next one in the cycle the current one resolves, except when a fill needs a second data operation.
- After reset, `req_ready` stays low for 512 cycles while the bank writes every tag set invalid. The CAMs reset to "partial tag 0, inhibited", which matches.
- Tag responses come 6 cycles after acceptance. Block responses come 15 or 21 cycles after acceptance, as shown above.

## Departures and limits

- **CAM circuit.** The dynamic 10T CAM cell, matchline precharge and comparison-line drivers are modelled at logic level (an equality compare). The claim that a 7+1-bit compare fits within the wordline-decode delay is a circuit result, and RTL cannot show it.
- **Energy.** Energy and power are not modelled.
- **Data arrays.** The SRAM sub-arrays and the tag array are plain memory arrays with one-cycle (data) or combinational (tag) read.
- **Tag pipeline throughput.** The tag pipeline is not pipelined across requests: one request resolves every 6 cycles per bank. A fully pipelined tag path would need same-set hazard handling, which the original design does not describe.
- **H-tree.** The H-tree is a register pipeline that ORs the mats' outputs. Inter-bank routing is a plain demultiplexer, and the four banks' responses are not merged.
- **Coherence.** Coherence, the directory, the cores and memory are outside the tile. Invalidations and fills are driven from outside.
- **Compared schemes.** Sequential-only, parallel and MRU way-prediction lookups are not built. They are what the design is compared against, not part of it.

## Files and simulation

`rtl/` holds one module or package per file. The hierarchy is `llc_tile` → `llc_bank` → {`tag_array`, `inhibit_ctrl`, `lru_update`, `secded_enc`, `secded_dec`, `htree`, `data_mat` → {`mat_predecoder`, `wl_decoder`, `ptag_cam`, `data_subarray`}}.

Every module has a self-checking testbench in `tb/` that ends by printing `TB_RESULT checks=N failures=M`. The end-to-end and accuracy benches are the most useful:

- `tb_llc_bank`: one bank against an independent reference model, with 4000 random requests.
- `tb_llc_tile`: the full-size tile, all parameters at their defaults, with 6000 requests over all four banks. The simulation itself takes seconds; building it with Verilator takes about a minute.
- `tb_llc_accuracy`: prediction accuracy with random 32-bit tags. It fills 64 sets of one bank, then issues 3000 reads with temporal reuse and 15% misses. With 7 partial-tag bits, 96% of hits are read by a correct prediction, and no way is read for 88% of misses. The bench requires at least 90% and 80%.
- `tb_ptag_width`: the same question at partial-tag widths of 2, 4, 6, 7 and 8 bits. Five copies of the tag-side prediction logic (`inhibit_ctrl` takes the width as parameter `PW`) see one trace of 20000 reads, with a fill after every miss. Correctly predicted hits rise from 30% at 2 bits through 68%, 90% and 95% to 97% at 8 bits. Misses with no way read rise from 6% to 94%. At 2 and 4 bits, about 30% of all hits depend on the inhibit bit to pick among colliding ways. The bench checks that the hits are identical at every width and that accuracy grows with width.

What the end-to-end benches check:

- every response, with its data and its exact cycle;
- the outcome-class totals against the model;
- correction of injected single-bit errors;
- that each mechanism occurred at least once: correct unique and collision predictions, over-predictions, mispredictions, busy-pipeline skips, inhibit updates, forced accesses, evictions and ECC corrections.

To run a bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ewp_pkg.sv tb/tb_llc_tile.sv --top-module tb_llc_tile -Mdir obj -o sim
./obj/sim
```

Replace `tb_llc_tile` with any other bench name, for example `tb_inhibit_ctrl` or `tb_data_mat`.

The main knobs are in `ewp_pkg`:

- `PTAG_W`, the partial tag width (7 by default). The original study found 6 to 8 bits necessary at the LLC.
- `TAG_LAT` and `DATA_LAT`.
- The cache geometry.

`htree` takes its stage counts as parameters, and `llc_bank` sets the response stages from `DATA_LAT`.
