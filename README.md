# A VLIW processor for symmetric block ciphers

Symmetric block ciphers all use a few operations over and over. They XOR or add
with key material, shift and rotate, apply fixed bit permutations, and look up
S-boxes. What changes from cipher to cipher is the sizes: how wide a block is,
how many bits go into an S-box and how many come out, and which bits a
permutation moves where. This processor gives each of those operations a
128-bit functional unit. The S-box unit and the permutation unit are
*configured* by instructions instead of being hard-wired to one cipher. Every
160-bit instruction word holds four 40-bit instructions that run on different
units in the same cycle. The compiler or programmer does all scheduling. The
hardware has no hazard detection and never stalls, so a program's run time
is simply its number of words plus the pipeline fill.

The same RTL runs DES, AES-style byte S-boxes and the large S-boxes of
ciphers like LOKI97 or MARS. Only the program and the tables in data memory
change.

```
            +-----------+   160-bit word   +-------------+
 host ----->|  I-CACHE  |----------------->| dispatcher  |--+-- slot 0..3
            | 2^16x160  |                  +-------------+  |
            +-----------+                                   v
                 ^ IPC         +------+------+-----+-----+------+------+-----+-----+
            +---------+        | ALU1 | ALU2 | SHF | ROT | PERM | SBOX | L/S | MOV |
            | control |        +------+------+-----+-----+------+------+-----+-----+
            +---------+            |      register bank (26 regs)          |
                                   +--------------------------------------+
                                                 ^      |
            +-----------+  read (SBOX, LOAD)     |      | write (STORE)
 host <---->|  D-CACHE  |------------------------+------+
            | 2^16x128  |
            +-----------+
```

## Functional units and their registers

Each unit works on its own fixed registers, so an instruction needs almost no
operand fields.

| UF code | Unit | Operations | Registers |
|---|---|---|---|
| 0 | ALU1 | AND OR XOR ADD SUB INC DEC NOT CLR | A1 ← A1 op B1 |
| 1 | ALU2 | same | A2 ← A2 op B2 |
| 2 | Shifter | SHL, SHR by 1, 2, 3, 8, 32 | A3 |
| 3 | Rotator | ROL, ROR by 1, 2, 4, 8, 32 | A4 |
| 4 | Permutation | PERINIC, PERBIT | A5 ← bits of B5, PERAC |
| 5 | S-box | SBOXINIC, SBOX | A6 ← S(B6), AC1, AC2, SPC and the configuration |
| 6 | Load/store | LOAD, STORE | any register, DPC |
| 7 | Move/branch | MOV, JMP, JZ, JL, JG | any register, JPC |

The register bank (`vliw_regbank`) has 26 registers:

| # | Name | Width | Use |
|---|---|---|---|
| 0 | X | 128 | general, reached only by MOV/LOAD/STORE |
| 1–10 | A1 B1 A2 B2 A3 A4 A5 B5 A6 B6 | 128 | unit operands |
| 11 | PERAC | 16 | next destination bit of PERBIT |
| 12, 13 | AC1, AC2 | 16 | S-box source and destination bit pointers |
| 14 | SPC | 16 | last S-box table address |
| 15 | DPC | 16 | data pointer of LOAD/STORE |
| 16 | IPC | 16 | instruction counter (read-only here; owned by control) |
| 17 | JPC | 16 | last taken branch target |
| 18–20 | SBOXEND, SBOXCOL, SBOXQ | 16 | S-box table base, row length, table stride |
| 21, 22 | TBO, TBD | 6 | S-box input and output width (0 means 64) |
| 23 | BMODE | 1 | S-box row/column by bit (0) or byte (1) |
| 24, 25 | LIN, COL | 32 | S-box row and column masks |

A narrower register reads as zero-extended and keeps the low bits when
written. All registers reset to zero.

## Instruction word

The word is 160 bits: four slots of 40 bits, with slot 0 in bits [39:0]. Each
slot is laid out as:

```
 39                         8 7    5 4      0
+----------------------------+------+--------+
|        field (32)          |  UF  | opcode |
+----------------------------+------+--------+
```

| Opcode | Mnemonic | Field |
|---|---|---|
| 0 | NOP | – |
| 1–9 | AND OR XOR ADD SUB INC DEC NOT CLR | – |
| 10, 11 | SHL, SHR | [2:0] amount code 0..4 |
| 12, 13 | ROL, ROR | [2:0] amount code 0..4 |
| 14 | PERINIC | [6:0] first destination bit |
| 15 | PERBIT | wide, see below |
| 16 | SBOXINIC | wide, see below |
| 17 | SBOX | [15:0] table number n |
| 18, 19 | LOAD, STORE | [4:0] register, [5] stream mode, [31:16] address |
| 20 | MOV | [4:0] destination, [12:8] source |
| 21–24 | JMP, JZ, JL, JG | [4:0] a, [12:8] b, [31:16] target |

The amount codes 0..4 select 1, 2, 3, 8, 32 for the shifter and 1, 2, 4, 8, 32
for the rotator.

**Wide instructions.** PERBIT and SBOXINIC carry more than 32 bits of
operand, so each takes the whole word. Its UF and opcode sit in slot 0, and
the remaining bits [159:8] are its operand:

* **PERBIT.** Sixteen 8-bit source indices. Entry *i* is in bits
  [8i+15 : 8i+8], for i = 0..15.
* **SBOXINIC.** SBOXEND [23:8], SBOXCOL [39:24], SBOXQ [55:40], TBO [61:56],
  TBD [67:62], LIN [99:68], COL [131:100], BMODE [132].

`vliw_pkg` has encoder functions for all of these, for use in testbenches:
`enc`, `f_regs`, `f_mem`, `f_br`, `word4`, `enc_perbit` and `enc_sboxinic`.

## Timing: what a program may assume

This is the part that needs the most care when writing programs.

**Three stages, one word per cycle.**

1. **Fetch.** IPC addresses the I-CACHE, which has a synchronous read.
2. **Execute.** The dispatcher hands each slot to its unit, and the units
   compute combinationally. A LOAD or SBOX issues its D-CACHE read, and a
   branch resolves.
3. **Write-back.** Results, the LOAD or SBOX data and the new pointer values
   are written into the registers. A STORE writes the D-CACHE.

**Reads within a word.** All four slots read the register state *before* the
word. Writes from the same word are not visible to each other. If two slots
write the same register, the higher slot wins. SBOXINIC is applied first, so
any slot overrides it.

**Back-to-back words.** The register bank's read port is a bypass: it shows
the values that the write-back stage is about to commit. A word can use any
result of the word just before it, including LOAD data and an S-box result
merged into A6, with no gap. In the same way, a LOAD or SBOX read that hits
the address a STORE in the previous word is writing returns the new data. The
core forwards the store data, whatever the memory's read-during-write
behaviour.

**Branches.** A taken branch loads IPC at the end of the execute stage. The
word after the branch has already been fetched and always runs: there is one
delay slot. JZ tests a = 0. JL tests a < b and JG tests a > b, compared
unsigned over the full 128 bits.

**Start and halt.**

* Pulse `start` with the first address.
* The program ends with a `JMP` to its own address. After that word and its
  delay slot, fetching stops and the pipeline drains.
* `done` rises and `busy` falls.

A program of N words (halt and delay slot included) takes N + 4 cycles from
`start` to `done`.

**Dispatcher rules.** A word is checked in the execute stage:

* A unit takes one instruction per word: the first slot that names it.
* LOAD, STORE and SBOX share the one D-CACHE path, so only the first of
  them in a word runs.
* PERBIT and SBOXINIC count only in slot 0.
* An opcode sent to a unit that does not have it is dropped.

Each dropped slot is reported on `word_error` (sticky until the next
`start`). The word itself still runs.

## The S-box unit

One SBOX instruction substitutes one block of a cipher's state.

* B6 holds the state being substituted.
* AC1 points at the next input block, *TBO* bits wide.
* The result, *TBD* bits wide, is written into A6 at AC2.
* Both pointers advance, so eight DES S-boxes are eight consecutive SBOX
  instructions.

Steps for `SBOX n`:

1. Take the origin block `o = B6[AC1 +: TBO]`.
2. Gather the bits of `o` selected by the mask LIN into the row number, and
   those selected by COL into the column number. The lowest selected position
   becomes the least significant bit. With BMODE = 1 each mask bit selects a
   whole byte of `o`, so a row or column can be made of whole bytes.
3. Read D-CACHE word `SBOXEND + row*SBOXCOL + col + SBOXQ*n` (16 bits,
   wrapping). SPC records this address.
4. In write-back, the low TBD bits of that word replace `A6[AC2 +: TBD]`.
   AC1 advances by TBO and AC2 by TBD.

A table is therefore stored row by row, one entry per D-CACHE word. Table
*n* starts SBOXQ words after table *n−1*.

**DES example.** The input bits are b5..b0 of each 6-bit group. The row is
b5 b0 and the column is b4..b1:

```
SBOXINIC  SBOXEND=0x100 SBOXCOL=16 SBOXQ=64 TBO=6 TBD=4
          LIN=0b100001  COL=0b011110  BMODE=0
SBOX 7 ; SBOX 6 ; ... ; SBOX 0     (AC1 walks from bit 0 upward, so S8 comes first)
```

**Other ciphers.**

* AES uses TBO = TBD = 8, LIN = 0xF0 and COL = 0x0F with SBOXCOL = 16: the
  high nibble picks the row and the low nibble the column. LIN = 0 with
  COL = 0xFF would store the same table as one row of 256.
* Ciphers with 32-bit outputs (CAST-128, MARS, Blowfish) use TBD = 32.
* The masks are 32 bits wide, so an S-box input can be up to 32 bits (LOKI97
  needs 14).

In practice the table size is limited by the 64 Ki-word D-CACHE.

SBOXINIC loads all of the configuration in one word and clears AC1 and AC2.

## The permutation unit

PERINIC k clears A5 and sets PERAC = k. Each PERBIT then fills sixteen
destination bits in one cycle:

```
for i in 0..15:  if idx[i][7] == 0:  A5[PERAC + i] = B5[idx[i][6:0]]
PERAC += 16
```

A 64-bit permutation takes four PERBIT words. An entry with bit 7 set leaves
its destination bit alone. This allows partial runs, such as the 48 bits of
DES's E expansion (three PERBITs).

Bits are numbered from 0 at the least significant end. DES tables number from
1 at the most significant end. For an n-in, m-out DES table T, destination bit
m−j therefore takes source bit n−T[j].

## Memories and the host port

`vliw_crypto_top` joins the core to two single-clock memories:

* **I-CACHE** (`vliw_icache`): 2^16 × 160 bits. The read is registered, and
  there is a separate host write port.
* **D-CACHE** (`vliw_dcache`): 2^16 × 128 bits, holding S-box tables, keys
  and data. It has one registered read port and one write port, so in the
  same cycle an SBOX or LOAD can read while an earlier STORE writes.

The host loads programs and data through `host_i_*` and `host_d_*` while the
core is idle. Host reads return data one cycle after `host_d_re`. While
`busy` is high, the core owns both memories and host accesses are ignored.
Memory writes are blocked during reset. The address widths are the
parameters `IAW` and `DAW`, default 16.

## Module list

| File | Contents |
|---|---|
| `rtl/vliw_pkg.sv` | widths, opcodes, register numbers, structs, gather/merge helpers, encoders |
| `rtl/vliw_alu.sv` | ALU (used twice) |
| `rtl/vliw_shifter.sv`, `rtl/vliw_rotator.sv` | shifter and rotator |
| `rtl/vliw_perm.sv` | permutation unit |
| `rtl/vliw_sbox.sv` | S-box address generation and pointer updates |
| `rtl/vliw_loadstore.sv` | LOAD/STORE addressing and DPC |
| `rtl/vliw_movbranch.sv` | MOV and branches |
| `rtl/vliw_dispatcher.sv` | slot routing and word rules |
| `rtl/vliw_regbank.sv` | 26 registers, ordered multi-write, bypass view |
| `rtl/vliw_control.sv` | fetch, IPC, start/halt state machine |
| `rtl/vliw_core.sv` | everything above plus the write-back stage and store forwarding |
| `rtl/vliw_icache.sv`, `rtl/vliw_dcache.sv` | memories |
| `rtl/vliw_crypto_top.sv` | core, memories and host port |

## Testbenches

Each `tb/tb_<module>.sv` tests one module against a reference model written
independently in the testbench, mostly with random stimulus. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* **`tb_vliw_core`** runs a looped program on behavioural memories.
* **`tb_vliw_crypto_top`** runs the complete top at its default sizes. It
  runs a DES-style round with random S-boxes, and a loop. It also covers
  same-word write conflicts, the bypass, store-to-load forwarding and the
  exclusive D-CACHE rule. It counts each mechanism and fails if any never
  happened.
* **`tb_vliw_des`** encrypts with full 16-round DES.
  * The S-boxes come from `tb/des_sbox.hex`.
  * The round keys are computed in the testbench.
  * It is checked against the standard known-answer pairs. For example, key
    133457799BBCDFF1 with plaintext 0123456789ABCDEF gives 85E813540F0AB405.

* **`tb_vliw_des4`** runs four-block DES and compares the results with a
  software DES.
* **`tb_vliw_sbox_table4`** runs the S-box unit on the full processor, once
  per cipher S-box shape. The shapes are those of DES, AES, Serpent,
  CAST-128, MARS, Twofish, Magenta, Blowfish and LOKI97, plus a byte-mode
  shape. Table contents are random. The result in A6 is compared with a
  reference model, and each run is checked to take words + 4 cycles.

### Simulating

Run from the repository root, so that `$readmemh` finds `tb/des_sbox.hex`:

```
verilator --binary --timing --assert -Irtl rtl/vliw_pkg.sv rtl/vliw_[a-o]*.sv rtl/vliw_[q-z]*.sv \
          tb/tb_vliw_des.sv --top-module tb_vliw_des -o sim
./obj_dir/sim
```

Replace the testbench and top module name to run any other test.

## DES on this processor

The DES program in `tb_vliw_des` is straight-line code of 360 words:

* the initial permutation: 4 PERBIT words, then splitting into R and L;
* 16 rounds of 21 words each;
* the swap and final permutation, a STORE and the halt word.

Each round runs, in order: E (PERINIC and 3 PERBIT), XOR with the round key,
SBOXINIC, 8 SBOX, P (PERINIC and 2 PERBIT), and L ⊕ f. The L/R swap costs no
words of its own. At the start of a round A2 holds R and X holds L. The MOVs
`A2 ← X` and `X ← B5` ride in free slots of the key-XOR word and the first
SBOX word.

It runs in **364 cycles** per 64-bit block, 5.69 cycles per bit. 54% of the
slots are used, with a wide word counted as four.

`tb_vliw_des4` encrypts four blocks at once, with an interleaved schedule of
its own. It gains by using the 128-bit registers as four 32-bit lanes:

* One register holds the R halves of the four blocks, and another holds the
  L halves.
* E is applied two blocks at a time. A pair's 96 expanded bits take
  6 PERBIT words and are XORed with the key into B6.
* The 16 SBOX words of each pair leave three slots per word free. The moves
  and the key XOR of the other pair run in those slots.
* Once the first pair's 16 SBOX words are done, moving zero into AC1 makes
  the second pair's results land after the first pair's.
* P and the L ⊕ f XOR then cover all four lanes at once.

A round takes 61 words for four blocks. The whole program is 1038 words and
runs in **1042 cycles for 256 bits**, 4.07 cycles per bit against 5.69 for
the single-block program.

## How this implementation relates to the original architecture

The following follow the original architecture:

* the unit set, register roles and 4 × 40-bit word;
* the wide PERBIT and SBOXINIC instructions;
* the S-box parameters and address formula;
* the three-stage stall-free pipeline;
* the 64 Ki-word Harvard memories;
* the rule that LOAD, STORE and SBOX are exclusive.

These are this design's own choices, where the architecture does not fix
them:

* the opcode and field encodings;
* LSB-first bit numbering;
* the mask form of LIN/COL;
* "0 means 64" for TBO/TBD;
* PERINIC clearing A5, and the PERBIT skip bit;
* the shifter and rotator amount codes;
* the LOAD/STORE stream mode through DPC;
* the branch conditions, the single delay slot and the self-jump halt;
* dropping illegal slots instead of trapping;
* the host port.

Known differences:

* **Cycle count.** The original architecture reports 380 cycles for one DES
  block (5.94 cycles per bit) and 564 cycles for four blocks with loop
  pipelining. Here one block takes 364 cycles. Four-block loop pipelining
  cannot reach 564 cycles on this design: only one SBOX runs per word, so
  four blocks need at least 512 SBOX words plus 192 E-expansion words. The
  four-block program here takes 1042 cycles.
* **Size.** The datapath holds 11 full 128-bit registers, so it synthesises
  to roughly 6,000 flip-flops. The smaller FPGA prototype reported for the
  original is not comparable.
* **Registers.** The original counts 24 registers. Here LIN and COL are
  registers too, which makes 26.
* **Register X** has no unit of its own. It is reachable only through MOV,
  LOAD and STORE.
