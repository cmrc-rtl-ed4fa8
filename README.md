# Coalescing register file for a GPU streaming multiprocessor

A GPU register file is split into single-ported banks. When two requests hit
the same bank, or two operand reads hit the same operand collector (OC), they
wait for each other. Many warp registers, though, hold *narrow* values: in every
one of the 32 threads, the upper bytes are only the sign extension of the lower
ones. This RTL stores each register so that a narrow value uses only part of
the bank. A narrow register with an even entry number and a narrow register
with an odd entry number can then share one bank access. This works for any
mix of reads and writes, from the same or from different warp instructions.
Narrow reads from different banks can also share one OC write port. All of
this is done in hardware. No compiler support and no register renaming are
needed.

The default configuration is one Fermi-class SM: a 128 KB register file in
4 banks of 256 entries × 128 B, 4 operand collectors, 48 warps of 32 threads.

## Storing a register: thread-interleaved and aligned

A warp register is 32 threads × 4 bytes = 128 B. Each bank is built from four
32 B sub-banks, and each sub-bank holds one 32 B slice of every entry. The
register is stored *thread-interleaved*:

- slice s holds byte s of all 32 threads;
- the byte of thread t is at bits `[8t+7:8t]` of the slice.

A value that needs only bytes 0..k-1 therefore occupies only k sub-banks.

Even entries are right-aligned: byte 0 goes to sub-bank 0. Odd entries are
left-aligned: byte 0 goes to sub-bank 3. Left alignment costs no cross-thread
shifter. Each thread swaps its own bytes (B0↔B3, B1↔B2) before the slices are
formed (`cmrc_align_wr`), and swaps them back on the way out (`cmrc_align_rd`).
So an even register of width w uses sub-banks `0..w-1`, and an odd register of
width w uses sub-banks `3..4-w`. They overlap only if their widths add up to
more than 4 bytes.

## Width masks

`cmrc_width_detect` sits in the write-back stage. For bytes 1, 2 and 3, it
decides whether any thread needs that byte. A thread does not need byte b when
bits `[31:8b-1]` are all zeros (reduction OR) or all ones (reduction NAND). The
reduction includes the top bit of byte b-1. Without that bit, 128 would be
stored as one byte and read back as -128. The warp's mask is the OR over its
threads, so it always describes a contiguous width. Byte 0 is always stored and
has no mask bit.

The 3-bit mask of every register (1024 × 3 bits = 384 B) is kept in
`cmrc_mask_buffer`. It is written when the value is written back. It is read
when an instruction is placed in an OC, so that each operand read knows its
sub-banks. On the way out, `cmrc_align_rd` fills the bytes that were not stored
with the sign of the highest stored byte.

Physical sub-bank mask: `phys_mask(wm, odd)` in `cmrc_pkg` builds `{wm,1}`
for even entries and the bit-reversed `{wm,1}` for odd entries.

## Banks, crossbar and collectors

- `cmrc_rf_bank` has two request ports, A and B. Each port carries its own
  read/write, entry number and 4-bit sub-bank mask. Sub-bank s follows
  whichever port has bit s set. An assertion checks that the two masks never
  overlap. Read data appear one cycle later.
- The bank-to-OC crossbar is four independent 32 B crossbars
  (`cmrc_xbar_slice`). Crossbar s connects sub-bank s of every bank to slice s
  of every OC's write port. Each OC output has its own source select, so one OC
  can take its four slices from four different banks in one cycle.
- `cmrc_oc` treats its 128 B write port as four 32 B ports. Each port writes its
  slice into any of the three operand entries, chosen by its own operand index.
  Two registers read together in one bank access therefore land in their own
  entries as they are written, without any unpacking step. Operands stay in
  register-file form in the OC. They are swapped back and sign-extended after
  the dispatch selection. The design therefore has five thread-local byte-swap
  MUX sets: two on the write side, one per write-back port, and three on the
  read side, one per dispatched operand.

## Arbitration (`cmrc_arbiter`)

This is the part that decides which requests are coalesced. It runs once per
cycle and handles the banks one at a time, from bank 0 to bank 3.

1. **Candidates** for bank b, in order:
   - the oldest queued write of the bank;
   - the second-oldest queued write of the bank;
   - the pending operand reads of all OCs that target the bank. These are taken
     in a round-robin order that rotates by one position every cycle, so no
     collector starves.
2. A read is **eligible** only if the OC slices it needs are still free in this
   cycle. Sub-bank s always travels over crossbar s into OC slice s, so these
   slices are exactly its physical sub-bank mask. Earlier banks in the same
   cycle may already have used some of them.
3. **Primary** request: the oldest write if there is one, so writes have
   priority. Otherwise, the first eligible read.
4. **Partner**: the first later candidate that meets both conditions:
   - it targets the other entry parity;
   - its sub-bank mask is disjoint from the primary's.

   An even entry always uses sub-bank 0 and an odd entry always uses
   sub-bank 3. So the disjointness test alone rules out two entries of the same
   parity.
5. The primary goes to port A and the partner to port B. Granted reads mark
   their OC slices as used. The routes for those slices are registered, so the
   crossbars apply them in the next cycle, when the bank data appear.

Depending on what is paired, this gives:

- two reads of one instruction (`ACC_RR_SAME`);
- reads of two different instructions (`ACC_RR_DIFF`);
- two writes (`ACC_WW`);
- a read and a write (`ACC_RW`);
- reads from several banks into one OC in the same cycle (`ev_oc_xbank`).

A request that finds no slot simply stays pending. That is the serialization
that coalescing reduces. The arbiter reports each bank's access kind every
cycle on `ev_bank`, for performance counters.

Two write-back ports (`NUM_WB = 2`) feed per-bank write queues
(`cmrc_write_queue`, depth 4). With a single write-back port, a bank would never
hold two pending writes, because writes have priority and drain at least one per
cycle. Two writes could then never be coalesced.

## Register layouts (`cmrc_reg_map`)

| `LAYOUT` | bank of register r of warp w | entry |
|---|---|---|
| `LAYOUT_WID` | w mod 4 (whole warp in one bank) | (w div 4)·20 + r |
| `LAYOUT_WSHIFT` (default) | (w + r) mod 4 | w·5 + r div 4 |

Each warp has 20 registers (`REGS_WARP`). Entry parity decides the alignment.
The two layouts coalesce about equally well. The default is wshift, the layout
with the higher speedup.

## Top level `cmrc_rf`: interfaces and timing

All interfaces use valid/ready handshakes.

- **Write-back** (`wb_*[NUM_WB]`): carries warp, register and a 32 × 32-bit
  value. Port k is ready when its bank's queue has room for it and for the
  lower-numbered ports that write the same bank in this cycle.
- **Write done** (`done[bank][port]`): flags each write in the cycle it is
  performed in the bank. The value is readable from the next cycle on.
- **Issue** (`iss_*`): carries warp, tag and up to three source registers. The
  instruction goes to the lowest-numbered free OC. `iss_ready` is low when all
  OCs are busy.
- **Dispatch** (`disp_*`): the lowest-numbered complete OC is offered with three
  full-width operands. The OC is freed when `disp_ready` is high.
- Read timing: a read granted in cycle t reads the bank in t, is written into
  the OC in t+1, and can be dispatched from t+2.

**Hazards are the caller's job.** The block does not check them. A scoreboard
outside must meet both rules:

- issue no instruction that reads a register before that register's write is
  reported on `done`;
- write no register that an instruction still waiting in an OC reads.

## Parameters

| parameter | default | origin |
|---|---|---|
| banks, sub-banks, bank width | 4, 4, 128 B | evaluated configuration |
| entries per bank | 256 | 128 KB / 4 / 128 B |
| OCs | 4 | evaluated configuration |
| warps × threads | 48 × 32 | evaluated configuration |
| width-mask buffer | 1024 × 3 bit | evaluated configuration |
| registers per warp | 20 | own choice (48 × 20 fits 1024 entries in both layouts) |
| operands per OC | 3 | own choice |
| write-back ports, write-queue depth | 2, 4 | own choice |
| layout | wshift | selectable |

Data widths are fixed in `cmrc_pkg`: 32 threads, 4 sub-banks and 32-bit values.

## Departures and limits

- The width test works on each thread separately and includes the sign bit of
  the byte below. The original scheme was stated as an OR/NAND over whole
  bytes, which would lose values such as 128 and warps that mix signs.
- All 32 threads are assumed active. Control divergence is not handled, a
  limitation the design shares with earlier register-coalescing schemes.
- Neither the arbitration order, nor write priority, nor the write queues, nor
  the OC and dispatch selection come from the original design. They are the
  simplest choices that make the coalescing cases reachable.
- Only one SM is built. A 16-SM GPU holds 16 copies. Power is not modelled.
- Sub-banks are behavioural single-port arrays with a one-cycle read and no
  reset. In silicon they would be 6T SRAM macros.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_cmrc_rf` runs the whole register file at its default parameters:

- it writes all 960 registers;
- it then runs 4000 instructions mixed with random writes, using a value mix of
  about 30 % full-width values;
- bursts of writes to one bank fill that bank's write queue;
- it compares every dispatched operand with a shadow register file.

It fails if any of these events never happened:

- each of the four kinds of coalesced bank access;
- cross-bank OC write coalescing;
- a waiting read;
- a full write queue;
- all OCs busy;
- dispatch back-pressure.

It prints the bank-access reduction. With these random, mostly unrelated
instructions the reduction is small, around 6 %. The reduction depends strongly
on how often narrow even/odd pairs are pending at the same time.

`tb_cmrc_rf_wid` runs the same test with `LAYOUT_WID`. In that layout all
operands of an instruction come from one bank. Cross-bank OC coalescing cannot
happen, and the test checks that it does not. Same-instruction read pairs are
more frequent instead.

A directed step at the end measures the time from issue to dispatch for two
operands in the same bank:

- 3 cycles when both operands are 1-byte values and their reads share one bank
  access;
- 4 cycles when both are full width and their reads are serialized.

Run a testbench with plain Verilator. List the package first and the other
files of `rtl/` after it. `-Wno-fatal` keeps lint warnings from stopping the
build:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_cmrc_rf \
    rtl/cmrc_pkg.sv $(ls rtl/*.sv | grep -v cmrc_pkg) tb/tb_cmrc_rf.sv
./obj_dir/Vtb_cmrc_rf
```

The full-size run takes a few seconds.

## Files

| file | content |
|---|---|
| `rtl/cmrc_pkg.sv` | constants, types, `phys_mask` |
| `rtl/cmrc_rf.sv` | top level |
| `rtl/cmrc_width_detect.sv` | write-back width detection |
| `rtl/cmrc_mask_buffer.sv` | per-register width masks |
| `rtl/cmrc_align_wr.sv`, `rtl/cmrc_align_rd.sv` | byte-swap, interleave, sign extension |
| `rtl/cmrc_reg_map.sv` | register-to-bank layouts |
| `rtl/cmrc_write_queue.sv` | per-bank write queue |
| `rtl/cmrc_arbiter.sv` | coalescing arbiter |
| `rtl/cmrc_rf_bank.sv`, `rtl/cmrc_subbank.sv` | bank with sub-bank controls |
| `rtl/cmrc_xbar_slice.sv` | one 32 B crossbar |
| `rtl/cmrc_oc.sv` | operand collector with 32 B write ports |
| `tb/tb_*.sv` | testbenches |
