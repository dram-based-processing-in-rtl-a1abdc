# Processing in DRAM for memory-bound ML kernels: MViD and TRiM-G

Two machine-learning kernels spend nearly all their time waiting for DRAM rather
than computing:

* the **sparse matrix-vector product** inside recurrent networks (for example the
  1600 x 1600 GRU weights of a speech recogniser), where every weight is used once;
* the **embedding gather-and-reduce (GnR)** of recommendation models, which reads
  dozens of scattered table rows and adds them into one vector.

Both are cheap to compute, so it pays to put small adders and multipliers inside the
memory. Each unit then works at the bandwidth inside the DRAM instead of the off-chip
bus. This repository holds RTL for two such designs:

* **MViD** puts 16 MAC units next to four banks of an LPDDR4 channel. It streams a
  delta-encoded sparse matrix out of those banks while the host keeps using the
  memory.
* **TRiM-G** puts one small fp32 unit (the *IPR*) at every bank-group of every DDR5
  chip, plus a reduction unit (the *NPR*) in the DIMM's buffer chip. Together they
  gather and reduce embedding vectors in a two-level tree.

The DRAM cell arrays, the host processor and the memory-controller scheduler are
not part of the RTL. The testbenches contain behavioural models of the DRAM.

`pim_top` places both designs side by side. They share no signals, and each has its
own ports (`mvid_*`, `mc_*`, `trim_*`).

---

## Part 1 - MViD (matrix-vector multiplication in DRAM)

### 1.1 The weight format: delta encoding, one matrix row per read

Weights are 12-bit integers. Each non-zero weight is stored with a 4-bit index as a
16-bit pair `{data[11:0], idx[3:0]}`. One 256-bit DRAM read holds 16 pairs; pair *k*
sits in bits `[16k+15:16k]`.

* **Column rule.** The index is the gap to the previous non-zero, minus one:
  `col = prev_col + idx + 1`. At the start of a matrix row, `prev_col = -1`, so the
  first index is the absolute column.
* **End of row.** Index `0xF` marks the end of a matrix row. That pair's data field
  carries the row number, which is the output-vector address.
* **Long gaps.** A gap longer than 14 is bridged with dummy pairs `{0, 0xE}`. A dummy
  pair adds nothing but advances the column by 15.
* **Single row per read.** A read never holds pairs of two matrix rows. After the
  end marker, the rest of the read is padding and is ignored. A row can span many
  reads; the column count carries from one read to the next.

The encoder, which lives in the testbenches, follows these rules. For 1600 x 1600
at 75 % sparsity it produces about 26 reads per row.

### 1.2 One MV-bank: a five-stage pipeline (`mvid_datapath`)

Each read from the bank's sense amplifiers passes through five stages, one stage
per cycle:

1. **Read** - register the 256-bit read.
2. **Index decode** (`mvid_index_decoder`) - a parallel prefix sum of `idx + 1`
   over the 16 pairs gives 16 absolute columns. A 4-bit compare finds `0xF`.
3. **Vector fetch** (`mvid_iv_sram`) - 16 reads of the 1600 x 12-bit input vector
   at once.
4. **MAC** (`mvid_mac` x 16) - 16 signed 12 x 12 products are accumulated into
   24-bit partial sums. The first read of a row restarts the sums.
5. **Store** (`mvid_adder_tree`, `mvid_ov_sram`) - when the read held the end
   marker, the 16 partial sums are added and written to the 400 x 24-bit output
   vector at the row number.

`row_done` rises three cycles after the read that holds a row's end marker. Reads
arrive at most once per tCCD (8 cycles), so the stages never stall.

### 1.3 Issuing the commands inside the bank (`mvid_cgu`)

The host does not send one command per read. It sends one **MV-mul** to each bank:
a start row and a read count, written with a configuration command. The bank's
command generator (CGU) expands it into `ACT, RD x 64, PRE, ACT, ...`, obeying the
DRAM timings:

| Timing | Value |
|---|---|
| tRCD | 29 |
| tRAS | 68 |
| tRP | 29 |
| tCCD | 8 |
| reads per 2 KB row | 64 |

tCCD comes from the document; the other values are assumed LPDDR4-3200 numbers.
ACTs of the four MV-banks need a grant from the MCU, which keeps them at least tRRD
(16 cycles) apart.

### 1.4 Sharing the memory with the host: slow-down, pause, resume

This is the subtle part of MViD. The banks keep working while the host processor
still reads and writes the same channel. Two limits apply:

* The channel's power budget allows four banks reading at full rate, or fewer banks
  plus host traffic.
* A host request to an MV-bank needs that bank's row buffer.

The control unit (`mvid_mcu`) decodes every host command in one cycle and reacts:

| Host command | Effect |
|---|---|
| ACT/RD/WR/PRE to a normal bank while MV-mul runs | First time only: the MCU broadcasts **slow-down** to all CGUs before passing the command, which costs 2 extra cycles (3 tCK instead of 1). In slow-down, reads and ACT grants are spaced 2 x tCCD and 2 x tRRD. |
| **p-PRE** (pause PRE) to an MV-bank | The bank finishes the ACT and RD it had planned, then precharges and holds (`paused`). The row buffer is now the host's. The other MV-banks are slowed down. |
| **r-PRE** (resume PRE) | Precharges the host's row. The bank re-opens its own row and continues from the next unread column. |
| **s-PRE** (speed-up PRE) | Leaves slow-down and precharges. |
| **WR-iv** | Writes 16 vector elements into all four iv-SRAMs at once. The burst marked *last* starts MV-mul. |
| **RD-ov** | As a poll, returns all ones when the bank is done and all zeros while it is busy. As a read, returns 10 output entries of 24 bits (entry 0 in bits [23:0]). |

The memory controller decides when to send those commands (`mvid_mc_policy`):

* Every tIV = 4 cycles it adds the number of queued requests to the normal banks and
  to each MV-bank into counters.
* A counter reaching nTH = 4 triggers slow-down, or a pause of that MV-bank.
* Once a paused bank's requests are served, the policy resumes it.
* Once nothing is pending and no bank is paused, it speeds up.

The counters are not cleared each interval, so a lone request is not starved.
`allow_nonmv_o` and `allow_mv_o` tell the scheduler which queued requests may go.

### 1.5 MViD block map

```
mvid_channel
 +- mvid_mcu            host command decode, SD broadcast, RD-ov, ACT arbitration
 +- mvid_mv_bank x 4    (banks 2..5)
     +- mvid_cgu        ACT/RD/PRE generator with slow/pause/resume
     +- mvid_datapath   index decoder, iv-SRAM, 16 MACs, adder tree, ov-SRAM
mvid_mc_policy          controller-side slow-down/pause policy (separate ports)
```

---

## Part 2 - TRiM-G (embedding gather-and-reduce in DDR5)

### 2.1 The instruction: an 85-bit C-instr

One lookup is one C-instr (`trim_pkg::cinstr_t`, MSB first):

| Field | Bits | Meaning |
|---|---|---|
| addr | 34 | `{rank, row[15:0], bank-group[2:0], bank[1:0], col[9:0], 00}` |
| weight | 32 | fp32 weight for a weighted sum |
| nrd | 5 | reads per vector. One read gives 4 fp32 per chip, so 16 per rank of 4 chips. nRD = v_len / 16, at most 16 |
| tag | 4 | which of the 4 GnR operations of the batch |
| opcode | 3 | 0 = sum, 1 = weighted sum, 7 = transfer (this design's) |
| skew | 6 | cycles the IPR waits after arrival before ACT. This is how the host spaces ACTs (tFAW) |
| vt | 1 | last C-instr of the batch |

### 2.2 Getting C-instrs to 16 bank-groups: the two-stage path (`trim_npr`)

The 14-bit C/A bus of one rank carries one C-instr per 7 cycles. That is far too
slow to keep the 8 bank-groups of a rank busy (2 ranks x 8 bank-groups = 16 memory
nodes per DIMM). The NPR therefore splits the path in two stages:

* **Stage 1.** The host writes frames of up to 7 C-instrs over the data pins, one
  frame per 8 cycles, into a 32-entry queue.
* **Stage 2.** The queue head is sent in order to its rank, as 7 beats of 14 bits,
  least significant beat first. Both ranks' C/A buses work in parallel.

Each chip (`trim_chip`) reassembles the beats and hands the C-instr to the IPR of
the addressed bank-group. All chips of a rank see the same C/A. Each reads its own
8-bit slice of the 64-bit data word at the same address.

**Flow control is by credits.** The NPR keeps one credit counter per (rank,
bank-group), equal to the IPR queue depth of 8. Sending spends a credit; every queue
pop in the chip returns one. The IPR queues therefore never overflow. A C-instr
whose bank-group has no credit blocks the head, because C-instrs go in order.

### 2.3 Inside an IPR (`trim_ipr`, `trim_cinstr_decoder`)

* **Queue.** Each entry is stamped with its arrival cycle.
* **Decoder.**
  * It activates the head lookup once `skew` cycles have passed, its bank is
    precharged (tRP) and tRRD_L has passed. The lookup then leaves the queue.
  * Up to four lookups, one per bank, can be open at once. The next bank opens while
    the current one is read.
  * Reads go to `col + 16 i` for i = 0..nRD-1, tRCD after the ACT and tCCD_L (12)
    apart.
  * A bank is precharged after tRAS.
* **MACs.** Each returning 128-bit burst (4 fp32) is added, or multiplied by the
  weight and added, into register-file row `{tag, i}`. A small FIFO remembers the
  tag, index, opcode and weight of every outstanding read.
* **Register file.** 64 rows x 4 lanes x fp32 = 1 KB. Valid bits make an unwritten
  row read as +0, so there is no clearing pass.
* **Error check.** The on-die ECC parity of each burst is recomputed with a
  (136,128) Hamming code and compared with the stored parity. A mismatch pulses
  `err_o`. The data is not corrected; that is left to the host.

DDR5-4800 timing in cycles:

| tRCD | tRP | tCL | tRAS | tCCD_S | tCCD_L | tRRD_L |
|---|---|---|---|---|---|---|
| 40 | 40 | 40 | 77 | 8 | 12 | 12 (assumed) |

tRAS is derived as tRC - tRP.

### 2.4 Double buffering and the transfer protocol (the hardest part)

A batch holds 4 GnR operations of N_lookup lookups each. When its last C-instr
(`vt`) has been sent, the IPRs' partial sums must be collected. Meanwhile, the next
batch should already be gathering. Each IPR therefore has **two** register files:
the next batch accumulates in one while the other is being drained. The order is
kept with **transfer C-instrs** (opcode 7), which travel the same in-order C/A path
as lookups:

* **Fields.** `skew[0]` = which buffer, `skew[1]` = *first* of the batch, `nrd[3:0]`
  = row, `tag` = tag, `vt` = *last* of the batch.
* **First transfer.** It acts as a **barrier** in the IPR queue. It waits until every
  earlier lookup has been activated, read and reduced (no bank open, no read
  outstanding). Then it switches accumulation to the other buffer.
* **Every transfer.** Each one returns one 128-bit row to the NPR, with its id
  `{tag, row, bank-group}`. The IPR holds the response until the chip's arbiter takes
  it. The chip has one fixed-priority arbiter over its eight IPRs.
* **Last transfer.** It clears the drained buffer's valid bits and frees the buffer.

The NPR generates the transfers, looping over tag, row and bank-group, for both
ranks in parallel. Transfers of one rank are spaced at least tCCD_S. Interleaving
follows these rules:

1. Until every bank-group of a rank has received its *first* transfer, transfers
   have absolute priority. A lookup of the new batch may not reach an IPR before the
   barrier, or it would land in the old buffer.
2. After that, transfers and lookups of the next batch alternate on the C/A bus.
   The drain of batch k overlaps the gather of batch k+1.
3. At most two batches are in flight. Lookups of batch k+2 wait until batch k has
   been fully reduced.

### 2.5 Reduction in the NPR and the output

Each rank's response is 512 bits: 4 chips x 4 lanes of fp32, one slice per chip.
The NPR adds it lane by lane into that rank's accumulator row `{tag, row}`; this
reduces across bank-groups. When both ranks have delivered every row, the
cross-rank adders sum the ranks. The result leaves on `out_*` one row per cycle,
with `out_last_o` on the final row. A row holds 16 fp32 values, elements 16 i ..
16 i + 15 of the reduced vector for that tag.

The fp32 adders (`trim_fp32_add`) and multipliers (`trim_fp32_mul`) round to nearest
even and flush subnormals to zero.

### 2.6 TRiM-G block map

```
trim_dimm
 +- trim_npr             frame queue, credits, C/A serializer, transfer generator,
 |                       per-rank and cross-rank fp32 adders
 +- trim_chip x (2 ranks x 4 chips)
     +- C/A deserializer, response arbiter
     +- trim_ipr x 8     (one per bank-group)
         +- trim_cinstr_queue, trim_cinstr_decoder
         +- trim_ipr_mac x 4 (trim_fp32_mul + trim_fp32_add)
         +- trim_ecc_ded
```

---

## Where this RTL departs from, or adds to, the source design

The following are this design's own choices. They are filled in where the source
description is silent:

* **MViD**
  * LPDDR4 timings other than tCCD; 64 reads per DRAM row.
  * The host command set is modelled as decoded commands (`host_cmd_t`) rather than
    CA-pin sequences.
  * The CFG command that sets each bank's start row and length.
  * 24-bit wrap-around arithmetic.
  * Round-robin ACT arbitration.
  * The policy clears a counter when its action is taken.
* **TRiM-G**
  * The address layout.
  * The transfer C-instr and its response id.
  * Credits and queue depths (IPR 8, NPR 32).
  * LSB-first beat order.
  * tRRD_L = 12.
  * 4 chips per rank.
  * The two-batch limit.
  * The arbiter.
  * Detection-only ECC with a Hamming code chosen here.
  * fp32 rounding without subnormals.
  * The reduced rows are streamed out on `out_*` as soon as both ranks have delivered
    them. In the source design, the memory controller reads them from the buffer
    chip.
  * The transfer of partial sums is ordered by ids rather than by fixed timing.
* **Not built**
  * The host processor, its memory-controller scheduler and DDR PHY.
  * The TRiM host-side C-instr encoder/scheduler.
  * The run-time driver that replicates hot embedding entries.
  * The DRAM arrays.

  The testbenches stand in for all of these.
* **Only one TRiM-G DIMM.** `pim_top` instantiates one DIMM (2 ranks). A second
  DIMM would be a second `trim_dimm`.

---

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Results are computed
independently of the RTL:

* MViD results are plain integer dot products.
* TRiM results use real arithmetic on small integers, so they are exact in fp32.

The DRAM models (`tb/mvid_dram_model.sv`, `tb/trim_dram_model.sv`) check every ACT,
RD and PRE against the timing rules.

Cycle counts checked where the source gives them:

* tCCD read spacing and its doubling in slow-down.
* tRRD ACT spacing, doubled in slow-down.
* The 1-cycle decode and 3-cycle slow-down command delay.
* tCCD_L back-to-back reads in an IPR.
* 7 C/A beats per C-instr, 7 C-instrs per 8-cycle frame.
* tCCD_S between transfers.

`tb_pim_top` runs both designs together at the top's default parameters:

* **MViD.** A 1600 x 1600 matrix at 75 % sparsity (400 rows per MV-bank, about
  10,300 reads each) times a 1600-element vector.
* **TRiM-G.** Two batches of 4 GnR operations x 80 lookups with v_len = 256 over
  2 ranks x 4 chips. One lookup reads a row with a flipped bit.

It counts every mechanism and fails if one never happened:

* slow-down, speed-up, pause and resume;
* busy and done polls, and RD-ov reads;
* p-PRE, r-PRE and s-PRE from the policy;
* frame back-pressure and credit stalls;
* transfers, and transfers overlapping lookups;
* weighted and plain sums;
* ECC errors.

It takes about 95,000 cycles, roughly 20 s with Verilator.

### Simulating with Verilator

Packages first, then the RTL, the testbench models and the testbench. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/mvid_pkg.sv rtl/trim_pkg.sv tb/tb_fp_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) \
  tb/mvid_dram_model.sv tb/trim_dram_model.sv tb/trim_host_model.sv tb/tb_pim_top.sv \
  --top-module tb_pim_top -Mdir obj_pim && ./obj_pim/Vtb_pim_top
```

A block test needs only its own files. For example:

```
verilator --binary --timing -Irtl -Itb rtl/mvid_pkg.sv rtl/mvid_index_decoder.sv \
  tb/tb_mvid_index_decoder.sv --top-module tb_mvid_index_decoder
```

The simulator is two-state. Every register that is read is reset or written
before use. The SRAM and register-file arrays are not reset.

### Changing sizes

Most sizes are parameters:

* MViD: `MVID_NMVB`.
* TRiM-G: `TRIM_NRANK`, `TRIM_NCHIP`, and the timing parameters of `trim_dimm`.

Widths that follow from the data formats (12/4-bit pairs, 85-bit C-instr, 16 reads
per vector, 4 tags) live in `mvid_pkg` and `trim_pkg`. Changing them means
revisiting the encoders in the testbenches.
