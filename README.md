# XOR-merged instruction register file stage for MIPS32

An instruction register file (IRF) is a tiny memory, here 32 entries, that
holds a program's most frequently executed instructions. Fetched words can
then name those instructions by a 5-bit index instead of carrying them in
full: one 32-bit word fetched from the instruction cache can stand for up to
five instructions. Fewer cache fetches means less fetch energy, which matters
in embedded processors.

Thirty-two entries are not many. This design stretches them with
**XOR-based merging**: each entry stores a *code*, an instruction plus four
flag bits, and a 5-bit parameter supplied with the reference is XORed into
the fields the flags select. One entry therefore stands for a whole group of
similar instructions, for example the same `addu` on different registers.
The scheme follows the published proposal "An XOR-based approach to merging
entries for instruction register files". Everything marked below as this
design's choice fills in details that proposal leaves open.

The RTL is the IRF stage that sits between instruction fetch and decode. It
takes fetched words and hands plain MIPS32 instructions to the decoder.

## The code format and the XOR rebuild

An IRF entry is 36 bits:

| bits  | 35 | 34 | 33 | 32 | 31:0 |
|-------|----|----|----|----|------|
| field | S  | T  | D  | I  | default instruction |

When an entry is read with parameter `p`:

| flag | field changed | bits |
|------|---------------|------|
| S | rs  | 25:21 |
| T | rt  | 20:16 |
| D | rd  | 15:11 |
| I | immediate, low five bits | 4:0 |

A field whose flag is set becomes `field ^ p`. All other bits (opcode,
shamt, funct, the upper immediate) pass through unchanged. A reference
without a parameter uses `p = 0`, so it returns the stored instruction
itself, the entry's *default*. R-type entries use S, T and D. I-type entries
use S, T and I. J-type entries use no flags. Flags a format does not use are
kept at zero by whoever builds the IRF image, so D never alters an I-type
immediate and I never alters an R-type funct.

Example. `addu v0,a0,a1` (rs 4, rt 5) and `addu v0,t0,t1` (rs 8, rt 9) share
one entry:

- Store `addu v0,a0,a1` with S and T set.
- Parameter 0 returns `addu v0,a0,a1`.
- Parameter 12 turns rs into 4^12 = 8 and rt into 5^12 = 9, which gives
  `addu v0,t0,t1`.

The hardware for this is four 5-bit XORs and four 5-bit 2:1 selects
(`irf_xor_extract`). It replaces the older scheme's 32 x 16-bit immediate
table. The older scheme also worked only for I-type instructions, while XOR
merging works for R-type as well.

Filling the IRF is a compile-time job, done outside this hardware. A greedy
pass over an instruction profile picks the 31 codes that cover the most
executed instructions. Entry 0 is always the nop. For each chosen code, the
stored default is the group's most frequent instruction.

## Packed instruction words

A fetched word is one of four kinds. `packed_decode` tells them apart.

**Tightly packed (T-type).** The word holds a 6-bit opcode, five 5-bit
fields f1..f5 and an S bit that extends the opcode:

```
 31    26 25  21 20  16 15  11 10   6  5  4    0
| opcode |  f1  |  f2  |  f3  |  f4  | S |  f5  |
```

Each field is either an IRF index or a parameter. There are eight variants:

| variant | references | parameters |
|---------|-----------|------------|
| tight5 | f1..f5 | none |
| param4_A .. param4_D | f1..f4 | f5 belongs to the 1st .. 4th reference |
| param3_AB, param3_AC, param3_BC | f1..f3 | f4 belongs to the first letter's reference, f5 to the second |

Unused fields are padded with index 0, the nop.

**Loosely packed R-type.** The word is an R-type instruction (opcode 0)
whose shamt field holds the index of one IRF instruction that follows it.

**Loosely packed I-type.** The word is an I-type instruction whose
immediate is cut to 11 bits (15:5). Bits 4:0 hold the index of the IRF
instruction that follows it.

**Regular.** Anything else passes through unchanged.

The layout of the fields and the list of eight variants follow the IRF
instruction set. The following encodings are this design's choices:

- **T-type opcodes.** T-type words use primary opcodes 0x18..0x1B, which
  MIPS32 Release 1 leaves unused. The variant number is `{opcode[1:0], S}`,
  in the table's order: 0 = tight5, 1..4 = param4_A..D, 5..7 = param3_AB,
  AC, BC.
- **Shift amounts.** sll, srl and sra by a constant carry their shift amount
  in the rs field, which they otherwise leave unused. The decoder moves it
  back into shamt. Every other R-type gets shamt = 0. R-type instructions
  that use both rs and shamt cannot be loosely packed. In MIPS these are
  mostly coprocessor instructions, and those are regular words here anyway.
- **Which I-types are loosely packed.** These are REGIMM (0x01), opcodes
  0x04..0x0F (branches and ALU immediates), and loads and stores
  (0x20..0x2E).
- **I-type immediate extension.** The 11-bit immediate is sign-extended,
  except for andi, ori, xori and lui, which zero-extend.
- **Other words.** j, jal, coprocessor and all other opcodes are regular
  words.
- **Issue order.** A loosely packed word gives its regular instruction
  first, then its IRF instruction with parameter 0.

## Stage organisation and timing

```
fetch_* --> packed_decode --> irf_issue_seq --slot.idx--> irf_regfile --code--+
            (slot list)       (one slot/cycle)                                  v
                                   |--slot.param-------------------> irf_xor_extract
                                   |--regular instruction--+                    |
                                                           v                    v
                                                    dec_instr = slot.is_irf ? rebuilt : regular
```

- `irf_fetch_stage` (top) wires the parts together. It brings out the IRF
  load port, the fetch-side handshake and the decode-side handshake.
- `packed_decode` is combinational. It turns the fetched word into a list
  of up to five slots (regular, or IRF index plus parameter) and the
  restored regular instruction.
- `irf_issue_seq` registers the slot list when it accepts a word and issues
  one slot per cycle. With `SKIP_NOP = 1` (the default), references to
  entry 0 are removed as the word is accepted. Nop padding then costs no
  decode cycle, and a word made only of padding yields nothing.
- `irf_regfile` is 32 x 36 bits. It has a synchronous write port and a
  combinational read port. Reset clears every entry to zero, which is the
  nop with no flags. Writes to entry 0 are ignored, so the reserved nop
  cannot be overwritten.
- `irf_xor_extract` is the flag-controlled XOR rebuild described above.

Handshakes are valid/ready on both sides. A transfer happens when both are
high.

- **Latency.** A word accepted at clock edge *n* puts its first instruction
  on `dec_*` during cycle *n+1*. The IRF read and the rebuild are
  combinational within that cycle.
- **Throughput.** Each further instruction of the same word takes one more
  cycle in which `dec_ready` is high. `fetch_ready` stays low until the last
  instruction of the word leaves. The next word is accepted in that same
  cycle, so regular words flow at one per cycle, and a tight5 word occupies
  the stage for exactly five cycles.
- **Source flag.** `dec_from_irf` marks instructions that came from the IRF.
- **Loading.** The IRF is meant to be loaded once, while the stage is idle,
  before the program runs. If an entry is written while a word that uses it
  is being issued, the new contents are seen from the next cycle.

Top-level ports of `irf_fetch_stage`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, synchronous active-low reset |
| irf_we, irf_waddr, irf_wdata | in | 1, 5, 36 | IRF load port (`irf_code_t`) |
| fetch_valid, fetch_ready, fetch_instr | in, out, in | 1, 1, 32 | fetched word |
| dec_valid, dec_ready, dec_instr | out, in, out | 1, 1, 32 | instruction to the decoder |
| dec_from_irf | out | 1 | instruction was read from the IRF |

Parameters: `ENTRIES` = 32 and `SKIP_NOP` = 1. Indexes are 5 bits wide, so
`ENTRIES` should stay 32.

## What is outside this RTL

- **The processor and the cache.** The MIPS pipeline and the L1
  instruction cache are not included. The stage's fetch and decode ports
  are where they connect.
- **IRF selection.** Choosing the IRF contents (the greedy selection over
  normalized codes) and packing the program are compiler work. The
  testbenches build IRF images and packed words by hand.
- **The older immediate-table scheme.** The baseline that XOR merging
  replaces is not implemented.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_irf_xor_extract` | The two-`addu` merge above, each flag on its own, then random codes and parameters against a mask-based model. |
| `tb_irf_regfile` | Reset to nop, random writes and reads against a shadow copy, writes to entry 0 ignored, a second reset. |
| `tb_packed_decode` | All eight T-type variants, loose R (including the shift relocation), loose I (sign- and zero-extended), regular words, and random words of each kind. |
| `tb_irf_issue_seq` | Random slot lists with random stalls on both sides against a scoreboard. Also checks one slot per cycle with no bubble between words, and that a five-slot word holds fetch off for exactly five cycles. |
| `tb_irf_fetch_stage` | End to end at default parameters; details below. |
| `tb_workload_rijndael` | An AES round fragment of 10 instructions, merged into 4 entries and packed into 4 T-type words, comes out unchanged in 11 cycles. |

`tb_irf_fetch_stage` runs these steps, in order:

1. After reset, every entry reads back as the nop.
2. A qsort inner loop of 8 instructions, merged into 5 entries and packed
   into 3 T-type words, comes out unchanged.
3. About 20,000 random words of every kind go through with random fetch
   gaps and decoder stalls. Each result is compared with a reference model
   (`tb/irf_ref_pkg.sv`).
4. A throughput check: one instruction per cycle, and one tight5 word every
   five cycles.

This testbench also counts every mechanism: each word kind and each T-type
variant, each XOR flag actually changing a field, nop padding dropped,
decoder stalls, fetch held off, IRF writes, and the ignored write to entry
0. Any mechanism that never happened counts as a failure.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/irf_pkg.sv tb/irf_ref_pkg.sv tb/tb_irf_fetch_stage.sv --top-module tb_irf_fetch_stage
./obj_dir/Vtb_irf_fetch_stage
```

Substitute another testbench name for the other tests. Every testbench
finishes in well under a second.

## How far to trust it

- **From the published scheme:** the XOR rebuild and the 36-bit code
  format, the IRF size, the nop in entry 0, and the T-type field layout
  with its eight variants.
- **This design's own choices:** the opcode values, the variant numbering,
  which reference owns which parameter in the param3 variants (read from
  the variant names), which I-type opcodes are loosely packed and where
  their index sits, the shift-amount relocation, dropping nop padding, and
  all timing and handshakes. They are gathered in `irf_pkg` and
  `packed_decode`, so changing an encoding means editing those two files
  only.
- **Not tested:** the design has not been run inside a processor.
- **Lint:** Verilator lint reports no latches, loops or multiply-driven
  nets. Its remaining warnings are about package constants that some
  modules do not use.
