# Gated-wordline instruction cache (3-size MIPS-II format)

In a small on-chip instruction cache most of the read energy goes into
swinging bitlines, and a conventional array swings all 32 bitline pairs of
an instruction on every fetch. Many MIPS-II instructions carry far fewer
than 32 useful bits: three-register ALU operations whose destination
repeats a source, immediates that fit in five bits, loads with small aligned
offsets, `jr $ra`. This design stores each instruction in one of three
sizes (17, 23 or 34 bits) and splits the wordline of every cache row into
segments. The size bits held in the row switch the later segments on or
off, so a short instruction swings only 17 bitline pairs and a medium one
23. Every instruction still owns 34 cells. The saving is in bits read and
written, not in capacity.

The technique is the "3-size" gated-wordline scheme of M. Panich, *Reducing
Instruction Cache Energy Using Gated Wordlines* (MIT MEng thesis, 1999). The
cache around it follows the instruction cache of the Torrent-0 (T0) vector
processor:

* 1 KB, direct-mapped, 16-byte lines (64 lines of 4 instructions).
* One sub-bank per instruction word, so a fetch powers a single word.
* The tag is compared only when a fetch can have left the current line.

The RTL here is an independent implementation written from that
description. Where the description stops, the choices are this design's
own; the last sections list them.

## The stored word

```
 short segment (main wordline)   medium segment (local wl 1)   long segment (local wl 2)
 [ s[15:0]          | S/M ]      [ m[4:0]      | M/L ]         [ l[10:0] ]
      16 bits          1             5 bits       1               11 bits
```

| size   | S/M | M/L | segments read      | bits |
|--------|-----|-----|--------------------|------|
| short  | 0   | x   | short              | 17   |
| medium | 1   | 0   | short + medium     | 23   |
| long   | 1   | 1   | all three          | 34   |

Field placement, chosen so the opcode, rs slot and rt slot always sit at
the same bits of the short segment (they go straight to the decoder):

* short: `s = {op, A, B}`
* medium: `s = {op, A, B}`, `m` = five more bits (rd, low immediate bits,
  or low target bits)
* long: `s = instr[31:16]`, `m = instr[15:11]`, `l = instr[10:0]`

The full instruction is kept, except that load/store opcodes are
relocated.

### The re-encoded opcode map

To name the compressed forms without a function field, the opcode space is
re-encoded (`rtl/gw_pkg.sv`):

* Loads and stores move into opcode rows 2 and 3: SB 17, SH 18, SW 19,
  LBU 24, LB 25, LH 26, LW 27, LHU 28.
* The 29 re-encoded instructions take opcodes 34–62 (bit 5 set):
  * BEQ, BNE, BEQL, BNEL: 34–37
  * JR 38, JALR 39
  * SLL, SRL, SLT, SLTU, SRA, SLLV, SRLV, SRAV: 40–47
  * ADD … NOR: 48–55
  * ADDI … XORI: 56–62

All code points that were free are taken by the re-encoding. Any opcode
that is illegal in MIPS-II is therefore stored as `BREAK`, which raises the
same exception class.

### Compression rules (`rtl/gw_compressor.sv`)

| group | instructions | short when | medium when |
|---|---|---|---|
| R1, R2_2 | ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU SLLV SRLV SRAV | rd = rs (order-free ADD ADDU AND OR XOR NOR also rd = rt, stored with rs/rt swapped) | otherwise (rd in `m`) |
| R2_1 | SLL SRL SRA | rd = rt (`A` = sa, `B` = rt) | otherwise |
| R4 | JR, JALR | always | – |
| I1_1 | ADDI ADDIU SLTI SLTIU ANDI ORI XORI | rs = rt and immediate fits 5 bits | rs = rt and immediate fits 10 bits, or rs ≠ rt and it fits 5 bits |
| I2_1 | BEQ BNE BEQL BNEL | rt = 0 and offset fits 5 bits | rt = 0 and it fits 10 bits, or rt ≠ 0 and it fits 5 bits |
| I3 | LB LBU SB / LH LHU SH / LW SW | – | offset fits 5 bits after dropping 0 / 1 / 2 alignment zeros (which must be zero) |
| I1_2, I2_2/3 | LUI, BLEZ BGTZ BLEZL BGTZL, REGIMM branches | – | immediate fits 5 bits |
| J | J, JAL | – | target < 2^15 |
| others | MULT, DIV, MFHI…, SYSCALL, BREAK, COP0, … | – | never (long) |

Two notes on the table:

* "Fits" means the value survives truncation and re-extension:
  * signed for arithmetic immediates, offsets and compares;
  * unsigned for ANDI, ORI, XORI and LUI.
* An instruction that is neither short nor medium is stored long.

`rtl/gw_decompressor.sv` is the exact inverse. It puts back:

* the function field and the zero fields;
* the merged register;
* the sign- or zero-extension, and the shift for load/store offsets.

It ignores segments that were not read, because their cells hold stale
data.

Fields that MIPS-II defines as zero but that hold non-zero values are
dropped. Examples are sa in ADD and rt in JR. Such an instruction comes
back with those fields cleared. The same holds for the operand swap of
order-free operations.

## Gating the wordlines

Each row of a sub-bank (`rtl/gw_data_bank.sv`) has one `wordline_gate`
(`rtl/wordline_gate.sv`), written in the faster "parallel" style. In that
style both local wordlines hang directly off the main wordline:

```
lwl_m = main & (write_m | read & S/M)      medium segment + M/L cell
lwl_l = main & (write_l | read & M/L)      long segment
write_m = refill            (every refill)
write_l = refill & long
```

The subtle point is the M/L cell. On a read the long wordline looks only
at M/L, not at S/M. So when a short instruction replaces a long one, its
M/L cell has to be cleared; otherwise the next read would turn on the long
segment for nothing. That is why `write_m` is on for every refill.

On that write the medium *data* cells are written only when the new S/M
bit is 1. Otherwise their bitlines are held so the cells keep their state.
The M/L cell itself is always written.

Segments whose local wordline stays off read as zero in this model. In
silicon they would be bitlines left in precharge.

## The cache

`rtl/gw_icache.sv` (top) ties the blocks together:

```
 fetch ─► lookup stage ─► row_decoder ─► tag_array            ─┐
                                   └──► gw_data_bank × WORDS ─┴► output latches ─► resp_crit (op, rs, rt)
                                            ▲                                   └─► gw_decompressor ─► resp_instr
 mem_rdata ─► gw_compressor ────────────────┘ (refill)
 tag_compare_ctrl ◄── class of the latched instruction, PC offset
```

* **Sub-banking.** Every instruction word of a line lives in its own bank,
  and only the bank of the fetched word is enabled. One `row_decoder`
  (2-to-4 predecoders, one AND per row) drives the main wordlines of the
  tag array and all banks.
* **Timing.**
  * A fetch is accepted on an edge when `fetch_req && fetch_ready`.
  * The next cycle is the lookup: arrays are read from the registered
    address.
  * On a hit the stored word is captured in the output latches, so
    `resp_*` is valid in the cycle after the lookup.
  * Fetches stream at one per cycle.
* **Miss and refill.**
  * `fetch_ready` drops and `mem_req` pulses for one cycle with the line
    address.
  * Memory returns `WORDS` words in order on `mem_rvalid`, with any gaps
    between them. Each word is compressed and written as it arrives.
  * The tag and valid bit are written with the last word.
  * The missed lookup is then replayed with a forced tag compare.
* **Invalidate.** A one-cycle `invalidate` clears every valid bit. Use it
  whenever instruction memory changes. A refill that is under way still
  completes.

### Skipping tag compares (`rtl/tag_compare_ctrl.sv`)

Fetches inside one line share a tag, so the tag array can stay idle
(`tag_rd` low, no hit check) unless the fetch may be in another line. A
compare is made when any of these holds:

1. the previous fetch was the last word of its line (all word-offset PC
   bits 1): sequential flow into the next line;
2. the fetch two back was a branch or jump: MIPS branches have a delay
   slot, so the target is the fetch after the slot. Whether the branch is
   taken is not known in time, so every branch and jump counts;
3. the previous fetch was SYSCALL, BREAK or RFE, which redirect at once;
4. the first fetch after reset or invalidate, a fetch flagged with
   `fetch_restart`, and the replay after a refill.

The class of each instruction is taken from the decompressed word in the
output latches, one cycle behind the lookup. Skipping is only safe if the
fetch side presents fetches in program order. Any redirection not covered
by rules 1–3 must set `fetch_restart`. Examples are exception entry, a
mispredicted speculative fetch, and an interrupt. Set `TAG_SKIP = 0` to
compare on every fetch.

## Interface of `gw_icache`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset (clears valid bits and controller state) |
| fetch_req / fetch_addr / fetch_restart | in | 1/32/1 | fetch request, byte address (word aligned), "not the program-order successor" |
| fetch_ready | out | 1 | fetch accepted this cycle |
| invalidate | in | 1 | clear all valid bits |
| resp_valid / resp_instr / resp_crit / resp_size | out | 1/32/16/2 | instruction in the output latches: rebuilt word, raw short segment (op, rs, rt), size 0/1/2 |
| mem_req / mem_addr | out | 1/32 | one-cycle refill request, line byte address (low bits 0) |
| mem_rvalid / mem_rdata | in | 1/32 | refill words, in order |
| tag_rd, seg_rd[2:0], seg_wr[2:0] | out | | array activity for energy accounting: tag compared; segments read / written ([0] short, [1] medium incl. M/L, [2] long) |

Parameters:

* `LINES = 64` and `WORDS = 4`; the tag width follows from these.
* `TAG_SKIP = 1`.

## Choices made here, beyond the original description

* **Field placement** inside the segments (above). The original fixes only
  the segment sizes and which fields are critical.
* **Branch re-encodings.** The published opcode table lists different
  branch names at 34–37 than its own list of re-encoded instructions. This
  design re-encodes BEQ, BNE, BEQL and BNEL there, following the list.
  BLEZL and BGTZL stay under their normal opcodes and are medium or long.
* **Order-free operations with rd = rt** are stored short, with rs and rt
  swapped. The original says rd can be discarded for them but not how.
* **J/JAL** are medium when the 26-bit target fits the 15 bits a medium
  word has free. No rule is given for jumps in the 3-size format.
* **Illegal opcodes** become BREAK.
* **Interfaces, reset, invalidate and latency.** The fetch and refill
  handshakes, the `fetch_restart` input, the two-stage pipeline, the
  replay after a refill and the flash invalidate are all this design's
  choices.
* **Data array.**
  * Sub-banks are one instruction wide. The original pairs two
    instructions left and right of a shared decoder; that is layout only.
  * The tag array is not split into halves.
  * Storage is flip-flop arrays standing in for 6T SRAM. Precharge, sense
    amplifiers and drivers are not modelled.
* **Known lint warnings.** Some shared opcode constants are unused in a
  given module. The four constant output bits (`mem_addr[3:0]`) are
  intentional.

## Not included

* The CPU pipeline and decoder that consume the fetched instruction, and
  main memory. The testbench models both.
* The transistor-level SRAM, precharge and sense circuits, and the energy
  model built on them.
* The 2-size (medium/long) variant, an alternative to this design. It
  needs a single size bit and one local wordline.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog.
`tb/tb_mips_ref.sv` is an independent reference: size rules written with
integer range checks, plus the expected rebuilt instruction. It also
provides a random MIPS-II instruction generator biased towards the corner
cases of the rules.

| testbench | what it covers |
|---|---|
| tb_gw_compressor | ~115k checks: size class, size bits, critical-field placement, round trip through the decompressor |
| tb_gw_decompressor | hand-built words of each format; random round trips with garbage in unread segments |
| tb_row_decoder | every index, 6-bit and 5-bit decoders, enable |
| tb_wordline_gate | all 64 input combinations |
| tb_gw_data_bank | random refills/reads against a per-cell-group model, including the stale-M/L case and `seg_rd`/`seg_wr` |
| tb_tag_array | compares, writes, invalidate and reset against a model |
| tb_tag_compare_ctrl | random fetch/stall streams against the four compare rules; each rule must fire |
| tb_gw_icache | end to end at the default size (see below) |
| tb_gw_icache_sweep | the same checks (via `tb/tb_icache_env.sv`) on the five 1 KB shapes with 4- to 64-byte lines, and with skipping off |

### End-to-end test

`tb_gw_icache` runs a random 4 KB program through the cache at its default
parameters. It uses `tb/tb_main_memory.sv`, a memory with random latency
and gaps between words. The fetch model behaves like a MIPS pipeline:

* delay slots, then a taken or fall-through target;
* immediate redirection after SYSCALL, BREAK and RFE;
* exceptions marked with `fetch_restart`;
* bubbles;
* occasional program rewrites followed by `invalidate`.

For every fetch it checks:

* the returned instruction, its size class and critical fields;
* whether the tag was compared, against the rules above;
* hit or miss, against a model of the cache contents;
* the refill address;
* hit latency.

It fails if any of these mechanisms never occurred: refill, skipped
compare, each compare reason, invalidate, restart, each of the three sizes.
A typical run has 30,000 fetches and about 160,000 checks:

* about 9,000 misses;
* about half of all fetches skip the tag compare.

It also reports bits read against 32 per lookup. The random program is
mostly long instructions, so that figure (about 93%) is not typical. The
original study measured compiled SPECint95 programs: about 71% of the bits
read remain (29% saved), and on average 72% of tag compares are avoided.

`tb_gw_icache_sweep` shows how line length changes the skipping. The
share of fetches that compare the tag falls as lines get longer:

| line length | fetches that compare the tag |
|---|---|
| 4 bytes | 100% |
| 8 bytes | 69% |
| 16 bytes | 54% |
| 32 bytes | 43% |
| 64 bytes | 41% |

These figures come from the synthetic stream, which branches about every
fourth instruction. Real code branches less often, so it skips more
compares.

Running a testbench with Verilator 5 (from the directory holding `rtl/` and
`tb/`; modules are found by name through `-y`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gw_pkg.sv tb/tb_mips_ref.sv tb/tb_gw_icache.sv --top-module tb_gw_icache
./obj_dir/Vtb_gw_icache
```

Replace `tb_gw_icache` with any other testbench name to run a block test.
It builds without warnings at Verilator's default warning level and runs
in about a second.

## Files

* `rtl/gw_pkg.sv`: stored-word type, size enum, MIPS-II and re-encoded
  opcodes, immediate-fit function, control-transfer classes.
* `rtl/gw_compressor.sv`, `rtl/gw_decompressor.sv`: the refill-side
  compressor and the read-side decompressor.
* `rtl/wordline_gate.sv`, `rtl/gw_data_bank.sv`: one row's local
  wordlines, and one instruction-wide sub-bank.
* `rtl/row_decoder.sv`, `rtl/tag_array.sv`, `rtl/tag_compare_ctrl.sv`:
  decoder, tags and valid bits, compare-skipping control.
* `rtl/gw_icache.sv`: the top level.
* `tb/`: testbenches, reference model, memory model, and the
  parameterised test environment used by the sweep.
