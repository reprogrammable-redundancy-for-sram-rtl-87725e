# Reprogrammable redundancy for low-voltage SRAM caches

Lowering the supply voltage of a processor saves power. What usually sets the lowest usable
voltage is the cache SRAM. As the voltage falls, a growing number of individual bitcells stop
reading or writing reliably. These failures are scattered: at the voltages of interest there are
tens to hundreds of bad bits in a megabyte, nearly all of them alone in their word.

This RTL is a cache hierarchy that repairs such bits at run time. After a built-in self-test
(BIST) at the target voltage finds the failing cells, the host programs three repair mechanisms.
Each suits a different kind of array:

| Mechanism | Protects | Idea | Storage |
|---|---|---|---|
| **Bit bypass (BB)** | tag arrays | flip-flop copies of up to 2 bad bits in each of a few bad rows | 7 entries per L1 tag array, 22 per L2 bank |
| **Dynamic column redundancy (DCR)** | data arrays | one spare column per word; a per-set *redundancy address* says which column to skip | one RA field per set, kept in the tag row |
| **Line disable (LD)** | data arrays | a cache line with more than one bad bit is never used | one bit per way, kept in the tag row |

Every data word also carries a SEC-DED code (single-error-correct, double-error-detect). While
the repairs are being found and checked, the code's correction is switched off and errors are
only counted. That way no bad bit is hidden. Once programmed, correction can be switched on to
cover soft errors.

The hierarchy has these caches:
- a 16-KB 2-way L1 instruction cache;
- a 32-KB 4-way L1 data cache;
- a crossbar;
- a 1-MB 8-way L2 made of four banks;
- a shared off-chip memory port.

The processor pipeline is not included. Its instruction-fetch and data ports are the top-level
ports of `rr_cache_top`.

## Block map

```
 fetch port ──► I$ (rr_cache_bank) ─┐                 ┌─► L2 bank 0 ─┐
 data port  ──► D$ (rr_cache_bank) ─┴─► l2_xbar ──────┼─► L2 bank 1 ─┼─► memio_arb ─► memory port
                                                      ├─► L2 bank 2 ─┤
                                                      └─► L2 bank 3 ─┘
 SCR bus ──► rr_control ──► RR commands to all six caches
                        ──► bist_ctrl (L1 domain)  ─► every L1 SRAM ─► one bist_checker per SRAM
                        ──► bist_ctrl (L2 domain)  ─► every L2 SRAM ─► one bist_checker per SRAM
```

| File | Role |
|---|---|
| `rr_pkg.sv` | Shared constants, target and opcode enums, the 32-bit RR command struct, the BIST operation struct |
| `rr_cache_top.sv` | Top level; no parameters, sizes fixed to the configuration below |
| `rr_cache_bank.sv` | One cache (L1) or one L2 bank, with BB, DCR, LD, SEC-DED and BIST hooks |
| `dcr_encoder.sv`, `dcr_decoder.sv` | Write-side and read-side column shifters |
| `secded_enc.sv`, `secded_dec.sv` | Extended Hamming encoder and checker; correction can be switched off |
| `bit_bypass.sv` | Tag-array repair entries |
| `sram_macro.sv` | Behavioural single-port SRAM with injectable stuck-at cells (simulation model of a compiled macro) |
| `bist_ctrl.sv` | March C- sequencer, one per voltage domain, broadcast to all SRAMs of the domain |
| `bist_checker.sv` | Per-SRAM comparator and error FIFO |
| `rr_control.sv` | System control registers: RR commands, BIST control, error readout, ECC enable and counters |
| `l2_xbar.sv` | Two L1 line clients to four L2 banks |
| `memio_arb.sv` | Four L2 banks to one memory port |

### Array sizes at the defaults

| Cache | Sets × ways | Word K (data) | Stored word | Data macro per way | Tag row | RA + check bits | BB entries |
|---|---|---|---|---|---|---|---|
| I$ | 128 × 2 | 128 | 128 + 9 + 1 spare = 138 | 512 × 138 | 57 | 8 + 5 | 7 |
| D$ | 128 × 4 | 64 | 64 + 8 + 1 spare = 73 | 1024 × 73 | 100 | 7 + 5 | 7 |
| L2 bank (×4) | 512 × 8 | 128 | 138 | 2048 × 138 | 157 | 8 + 5 | 22 |

All lines are 64 bytes. A data macro row holds one word, so a line takes `512/K` rows: 4 in the
I$ and L2, 8 in the D$. Physical addresses are 32 bits. L2 banks are chosen by address bits
[7:6], just above the line offset.

## Dynamic column redundancy

DCR is the part that needs the most care, because one small field changes how every data bit of a
set is stored.

### The shifter

Take a protected word of `N` bits: the `K` data bits plus the SEC-DED check bits (N = 137 for the
I$ and L2, 72 for the D$). It is stored in `N+1` physical columns. Column `i` of the array has one
2:1 multiplexer in front of it:

```
write  (dcr_encoder):  X[i] = shift[i] ? D[i-1] : D[i]     D[-1] = D[N] = 0
read   (dcr_decoder):  D[i] = shift[i] ? X[i+1] : X[i]
```

`shift` is a thermometer code: all ones from the failing column upward, zeros below it. For a
failing column `f`:
- columns below `f` store their own bits;
- every bit from `f` upward moves one column up;
- the spare column `N` takes the top bit;
- column `f` holds only a copy of its neighbour, and the read side never looks at it.

The decoder uses the same select, without its top bit.

The select is not stored. It is worked out from a short binary *redundancy address* (RA):

| RA | Meaning | shift[i] |
|---|---|---|
| 0 | no repair | 0 for all i |
| k (1 … N+1) | column k-1 is bad | 1 for every i with i+1 ≥ k |

RA = N+1 names the spare column itself. This is useful when only the spare is bad: nothing shifts,
but the set is marked as using its repair. The RA is `$clog2(N+2)` bits wide: 8 for a 137-bit
word, 7 for a 72-bit word.

### One RA per set

The RA is not stored per word. It is stored once per set, in the tag row, and it applies to every
word of every way of that set: 32 words in each case, which is 4416 bits in the L2 and 2336 bits
in the D$. The repair it gives is one bad column position per set. Two bad bits in the same set
can both be repaired only if they are in the same column. That is what makes DCR cheap:
- 8 bits per set (13 with its own check bits), where a per-word code would need 8–9 bits per word;
- a single multiplexer level in the data path.

Line disable takes over where this rule breaks down.

### Where it sits in the pipeline

Because the RA lives in the tag row, it is available exactly when the tags are:

- **Read.** The tag macro and every way's data macro are read in the same cycle. In the next
  cycle (`S_LOOKUP`), the tag row gives both the hit way and the RA. Each way's data word goes
  through `dcr_decoder` with that RA, then through `secded_dec`. Decoding adds one multiplexer
  delay after the macro output and no cycle.
- **Write hit.** The data word is `secded_enc`-coded and shifted by `dcr_encoder` using the RA
  read in the previous cycle. It is written in `S_LOOKUP`.
- **Refill.** Each word of the incoming line is encoded with the set's RA, one word per cycle
  (`S_FILL_WR`).
- **Eviction.** The dirty victim's words are read and decoded with the same RA (`S_WB_RD`).

### Changing a set's RA

Changing a set's RA changes how every word of that set must be read. The design avoids any
re-layout: the RA is programmed after BIST and before the cache is used. BIST and the tag clear
that follows it leave every set with RA = 0 and no valid lines.

An `RR_DCR_RA` command does a two-cycle read-modify-write of the tag row (`S_CFG`). It leaves the
valid bits alone, so do not program the RA of a set that holds valid data.

## Bit bypass

Tag rows cannot use DCR: the RA itself lives there. Instead, each tag macro sits behind a
`bit_bypass` array of flip-flop entries. An entry holds:
- a valid bit and a row address;
- two column slots, each with a valid bit and a column number;
- two repair bits.

Its behaviour:
- **Write to a matching row.** The entry captures `din` at each valid column into its repair bit.
  The macro is written as normal.
- **Read.** The array registers the read address, because the macro output arrives one cycle
  later. When the output arrives, it replaces the bits at the valid columns with the stored
  repair bits.

A bad tag bit may therefore lie anywhere in the row, including the RA or LD fields. Up to two bad
bits per row are covered, in as many rows as there are entries.

Entries are programmed one field per command:
- `RR_BB_ROW` sets the row and the entry's valid bit;
- `RR_BB_COL` sets one slot's column and valid bit.

## Line disable and replacement

Each tag row has one LD bit per way. A disabled way:
- never hits, even if its valid bit reads as set;
- is never chosen as a refill victim.

The victim is the first invalid enabled way. If there is none, a rotating pointer chooses, and it
skips disabled ways. If every way of a set is disabled, the set is bypassed:
- a read fetches the line from the next level and returns the word without allocating it;
- a write reads the line, merges the word and writes the line back.

`RR_LD` commands set or clear one way's bit. Like the RA, this is a read-modify-write of the tag
row.

## The cache bank

`rr_cache_bank` is blocking, write-back and write-allocate. Its request port carries one word
(`K` bits) with a valid/ready handshake. The line port toward the next level has:
- valid/ready requests;
- posted line writes (no response);
- one read response per line read.

| State | What happens |
|---|---|
| `S_INIT` | `SETS` cycles clearing the tag rows; after reset and after every BIST run |
| `S_IDLE` | takes a request (reads tag and all data ways) or an RR command |
| `S_LOOKUP` | compare, answer a read hit, write a write hit; on a miss pick the victim |
| `S_WB_RD`, `S_WB_REQ` | read the dirty victim's words, send the line |
| `S_FILL_REQ`, `S_FILL_WAIT`, `S_FILL_WR` | fetch the line, write its words |
| `S_BYP_WR` | write-back of a merged line when the whole set is disabled |
| `S_RESP` | answer after a miss |
| `S_CFG` | second cycle of an RA/LD read-modify-write |

A read hit answers on the cycle after the request is taken. RR commands are accepted only in
`S_IDLE`, and take priority over new requests.

Tag row layout, LSB first:
1. `WAYS` × {tag, dirty, valid};
2. `WAYS` LD bits;
3. the RA as a 13- or 12-bit SEC-DED code word.

The RA decides how every data word of the set is read, so it has its own check bits: 5 of them,
from the same extended Hamming code as the data. The RA is checked in `S_LOOKUP`, and any error is
reported on the cache's ECC event outputs. With correction on, the corrected RA steers the
shifters. The tags and LD bits carry no check bits; BB is their only protection.

## BIST and error logging

Each voltage domain has one `bist_ctrl`:
- one for the I$ and D$;
- one for the four L2 banks.

`bist_ctrl` broadcasts a March C- sequence to every macro of its domain:
```
⇕(w0) ⇑(r0,w1) ⇑(r1,w0) ⇓(r0,w1) ⇓(r1,w0) ⇕(r0)
```
That is 10 operations per row and one operation per cycle, addressed up to the deepest array of
the domain. Shallower arrays ignore rows they do not have.

The data bit is copied into every column. With `alt` set, it is inverted on odd rows, which gives
a row-stripe background. Each operation carries an 8-bit test number that the host chooses.

Each macro has its own `bist_checker`. On a read, it compares the row with the expected pattern.
On a mismatch it pushes `{row, data read, test number}` into a 4-entry FIFO.

Flow control:
- when any FIFO in the domain has two or fewer free entries, `stall` freezes the sequencer until
  the host drains it;
- a push into a full FIFO sets a sticky `overflow` flag instead.

While BIST runs, the caches refuse requests. Afterwards, each bank clears its tags.

## Programming the repairs

The host does everything through a 32-bit register bus (`scr_we`, `scr_addr`, `scr_wdata`,
`scr_rdata`), served by `rr_control`. Reads are combinational; writes act at the clock edge.

| Addr | Access | Meaning |
|---|---|---|
| 0x00 | W / R | write: RR command; read: [0] command still pending |
| 0x01 | W | start BIST: [0] L1 domain, [1] L2 domain, [15:8] test number, [16] alternating background |
| 0x02 | R | [0] L1 busy, [1] L2 busy, [2] L1 overflow, [3] L2 overflow |
| 0x03 | W / R | error-buffer select: [2:0] cache, [7:4] macro (0 = tag, w+1 = data way w); read [8] = entry available |
| 0x04 | R / W | read: [15:0] failing row, [23:16] test; write: pop the entry |
| 0x05 | R | SEC-DED correction enable |
| 0x06 | R | single-error count |
| 0x07 | R | double-error count |
| 0x08–0x0F | R | failing row's data, 32 bits per register |

### RR command word

| Bits | Field |
|---|---|
| 31:29 | `op`: 1 BB row, 2 BB column, 3 DCR RA, 4 LD, 5 ECC correction |
| 28:26 | `target`: 0 I$, 1 D$, 2–5 L2 bank 0–3 |
| 25:21 | `idx`: BB entry or way |
| 20 | `slot`: BB column slot |
| 19 | `flag`: valid / disable / enable |
| 18:11 | `val`: column or RA |
| 10:0 | `row`: tag row = set index |

A command waits in `rr_control` until its cache is idle.

### The programming rule

The host plans the repairs from the logged errors:
1. An error in a tag macro: add or extend a BB entry for that row. Each entry has two column slots.
2. The first bad column in a set's data: set that set's RA to column + 1.
3. A bad bit in a set that already has a different repaired column: disable that line's way.

Program the BB entries first, then the RAs, then the LD bits, and only then start using the
cache.

A data-macro row number gives both the set and the way:
- the set is `row / words-per-line`;
- the way is the macro index.

The column is found by comparing the logged data with the expected background.

`tb_rr_cache_top` carries out this flow in full and can serve as a reference host.

## SEC-DED

`secded_enc` computes a systematic extended Hamming code. The word is stored as
`{overall parity, check bits, data}`:
- K = 128 uses 8 check bits plus parity;
- K = 64 uses 7 check bits plus parity.

The bit positions are constant tables built by constant functions, so the logic is a plain XOR
tree. `secded_dec` always reports `single_err` and `double_err`, and corrects only when `corr_en`
is set. Correction is off after reset.

The code sits inside the DCR shift. The spare column therefore protects the check bits as well as
the data. A third instance, with K = 8 or 7, guards each set's RA in the tag row.

## What follows the source design and what does not

Follows it:
- Three repair mechanisms and where each applies: BB on tags, DCR plus LD on data.
- Thermometer-coded 2:1 column multiplexers, with the decoder using the encoder's select minus its
  top bit.
- One RA per set, stored and read with the tags.
- Two repair bits per BB entry; 7 entries per L1 and 22 per L2 bank.
- LD bits in the tag row; replacement avoids disabled ways.
- SEC-DED on every data word and on the RA (8 + 5 bits), with correction disabled during testing.
- Per-domain BIST broadcast, with a per-SRAM error buffer of {address, data, test}.
- Programming by 32-bit commands over the control-register bus, in the order BB, DCR, LD.
- Sizes: 16-KB 2-way I$, 32-KB 4-way D$, 1-MB 8-way 4-bank L2, 64-byte lines, 138-bit L2 and I$
  data rows, an 8-bit RA for the 137-bit word.

This design's own choices:
- The cache protocol: blocking, write-back, write-allocate, replacement order, bypass of fully
  disabled sets.
- The command encoding and register map.
- March C- as the test, and the error-FIFO depth and stall.
- The RA encoding (0 = none).
- A 32-bit physical address, so the L2 tag row is 157 bits. The source design's tags are wider
  because they carry coherence state not modelled here.

Departures:
- **Single clock.** The three voltage/frequency domains share one clock. There are no
  asynchronous FIFOs or level shifters.
- **D$ data array.** It is one 64-bit word per row (1024 × 73). The source arrays hold two words
  per 146-bit row.
- **Tag check bits.** Only the RA field has check bits. Whether the source design's tags carry a
  code of their own is not stated.
- **No pipeline.** The processor pipeline, its host interface and the clock receivers are not
  part of this RTL. The I$ and D$ are not kept coherent with each other.
- **Simulation SRAM.** `sram_macro` is a simulation model. Failing cells are stuck-at values
  injected by testbench tasks. For synthesis, replace it with the compiled macro of the target
  process; the ports are the usual single-port ones, with a one-cycle registered read.

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog ends a hung run with a failure.
With Verilator 5:

```sh
verilator --binary -j 4 -Wno-fatal -y rtl rtl/rr_pkg.sv tb/tb_rr_cache_top.sv \
          --top-module tb_rr_cache_top -o sim
./obj_dir/sim
```

For another block, swap in its testbench. Testbench names match the modules: `tb_dcr_encoder`,
`tb_dcr_decoder`, `tb_secded` (encoder), `tb_secded_dec`, `tb_sram_macro`, `tb_bit_bypass`,
`tb_bist_ctrl`, `tb_bist_checker`, `tb_rr_cache_bank`, `tb_l2_xbar`, `tb_memio_arb`,
`tb_rr_control` and `tb_rr_cache_top`. The simulator is two-state, so everything that is read is
reset or written first.

`tb_rr_cache_top` runs the whole hierarchy at full size in a few seconds:
1. It injects stuck-at cells:
   - two bits in one L2 tag row;
   - one I$ tag bit;
   - a D$ data bit;
   - an L2 spare-column bit;
   - three L2 data bits in one set, two of them in the same column.
2. It runs both BIST backgrounds through the register bus and drains the error buffers, which
   stalls the sequencer.
3. It plans and programs the repairs as described above.
4. It sends 2500 random reads and writes through both L1 ports against a reference memory, then
   reads back every address written.

It counts the following mechanisms, and fails if any count is zero:
- BIST errors and stalls;
- programmed BB rows and BB-corrected reads;
- accesses to repaired sets;
- disabled lines;
- L1 and L2 misses;
- L2 write-backs.

It also requires the SEC-DED counters to stay at zero: every failing bit must have been repaired,
not merely tolerated.

The block testbenches cover, among other things:
- every RA value of both shifters;
- all single and double errors of the code;
- BB capture and substitution;
- the exact March sequence;
- FIFO overflow;
- crossbar and arbiter routing;
- a bank with LD, RA and fully disabled sets;
- a stuck cell inside a stored RA, which is reported and, with correction on, corrected.

## Limits

- Repair capacity is fixed by the parameters:
  - one column per set;
  - any number of disabled ways;
  - BB entries per tag array.

  Whether a real fault map fits depends on how its failures fall, not on the RTL.
- BB entries, RAs and LD bits are volatile. They must be reprogrammed after power-up, and RAs and
  LD bits after every BIST run, because BIST clears the tag rows.
- A BIST run of the L2 domain takes 10 × 2048 cycles, plus stalls while errors are drained.
