# Dictionary decompression front end for variable-length RISC code

Processors with variable-length instructions already give their most common
instructions short encodings, so the code-compression tricks made for
fixed-length RISC (16-bit Thumb-style subsets, split-and-entropy-code schemes)
buy little there. This design keeps a simpler idea that does still pay off:

* the 256 most frequent instructions of a program are put in a **dictionary**,
  and every occurrence of one of them is replaced by its **one-byte index**;
* code stays **byte aligned**: a slot in the compressed code is either a whole
  original instruction or a one-byte index;
* a **separate bit stream**, one bit per slot, says which slots are indexes, so
  no opcode has to be reserved and no mode-switch instruction is needed;
* because instructions move, a **branch address table (BAT)** translates each
  branch target of the original program to its new address and to the
  position of its indicator bit.

The RTL in `rtl/` is the run-time half: the stores for the four images and a
two-stage front end (fetch, then a *post-fetch* stage that expands indexes)
that hands the original instruction stream, one instruction per clock, to
the processor's decode stage. Building the images is done offline by a
compressor; the end-to-end testbenches contain a reference one.

## How a compressed program is laid out

Instructions are 1 to 4 bytes. Byte 0 is at the lowest address and appears in
bits `[7:0]` of a 32-bit `instr_t`; unused upper bytes are zero.

**Instruction length rule.** The front end must know the length of every
normal instruction to step over it. The design uses a stand-in rule,
`length = byte0[7:6] + 1`, kept in one function, `cc_pkg::ilen_of`. For a real
instruction set, replace that function; nothing else depends on the encoding.

**Code image** (`CODE_BYTES`, 16 KiB). The original instructions, in order,
with every dictionary instruction replaced by its index byte. If `L(i)` is the
length of instruction `i` and `D(i)` is 1 when it is in the dictionary, slot
`i` starts at

    caddr(0) = 0,   caddr(i+1) = caddr(i) + (D(i) ? 1 : L(i)).

**Indicator bit stream** (`BIT_BYTES`, 2 KiB). Bit `i` of the stream is `D(i)`.
It is stored as bytes, least significant bit first: byte `i/8`, bit `i%8`.

**Dictionary** (`DICT_ENTRIES` = 256 entries, `DICT_BYTES` = 1 KiB). This is the
part that differs most from a fixed-length design. Entries have different
lengths but are stored **packed, with no padding**. To still find an entry from
its index alone, the compressor orders the dictionary by length: first all
1-byte entries, then all 2-byte entries, and so on. The hardware holds only
the number of entries of each length, `cnt[0..3]`. From these it forms

    first[g] = cnt[0] + ... + cnt[g-1]           first index of length g+1
    base[g]  = 1*cnt[0] + ... + g*cnt[g-1]       first byte of that group

An index `idx` belongs to the highest group `g` with `first[g] <= idx`. The
entry is then `g+1` bytes long and starts at byte

    base[g] + (idx - first[g]) * (g+1).

So the index gives both the instruction and its length, and the storage is
exactly the sum of the entry lengths. An index at or above
`cnt[0]+...+cnt[3]` is not a loaded entry; the front end flags it with
`dict_err`.

**Branch address table** (`BAT_ENTRIES`, 512). One `bat_entry_t` per branch
target: `orig_addr` (address in the original program), `new_addr`
(`caddr` of the target), `bit_byte` and `bit_pos` (where its indicator bit is,
`i/8` and `i%8`). Entries must be written **sorted by `orig_addr`**, and the
number of valid entries written to the count register. The program's entry
point is started through the table like any branch, so it must be in it.

## The front end

```
 redir_addr ──► BAT search ──┐ new_addr, bit_byte/bit_pos
                             ▼
   code memory ◄── pc ── FETCH ──► f_* register ──► POST-FETCH ──► out_* ──► decode
   bit reader  ◄── bit ──┘                          │  ▲
                                                    ▼  │
                                                 dictionary
```

**Fetch** (`cc_fetch`). Each cycle it reads a 4-byte window of the code image
at `pc` (`byte_window_mem`: four byte-wide banks interleaved on the low
address bits, so any unaligned window is one row per bank) and the current
indicator bit (`bit_indicator_unit`: a one-byte buffer that loads the next
stream byte as it consumes bit 7, so it never stalls). A set bit means the
slot is an index and `pc` advances by 1; a clear bit means a normal
instruction and `pc` advances by its length. The window, the bit and the
length go into the fetch/post-fetch register.

**Post-fetch** (`cc_postfetch`). For an index slot, byte 0 of the window
addresses the dictionary (`cc_dictionary`), which returns the instruction and
its length. A normal slot passes through, cut to its length. The result is
registered and offered to decode with `out_valid`/`out_ready`. While decode
holds off (`out_valid && !out_ready`) both stages stall; an assertion checks
that a held output does not change.

**Branches** (`cc_bat`). The processor signals a taken branch, or the start
of execution, with `redir_valid` and the target's *original* address. This
flushes both stages and starts a binary search of the sorted table, one
compare per clock. On a hit, `pc` is loaded with `new_addr` and the bit reader
with `bit_byte`/`bit_pos`, and fetching resumes. On a miss fetching stops and
`bat_miss` stays high until the next redirect. A new redirect during a search
restarts it. An output offered in the cycle the redirect is raised is dropped.

**Timing.**

* Sequential code: one instruction per clock; an instruction leaves the
  front end two clock edges after fetch reads it.
* Redirect: if the table finds the target after `k` compares
  (`k <= floor(log2 BAT_ENTRIES) + 1`, at most 10 for 512 entries), the first
  instruction is valid `k + 3` clock edges after the edge that samples
  `redir_valid`. A miss takes one more cycle to detect than the longest hit.
* Dictionary and code reads are combinational array reads inside a stage.

## Interface of `cc_decomp_top`

| Port group | Direction | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of control state (stores are not reset) |
| `code_we/_waddr/_wdata` | in | write one byte of the code image |
| `bit_we/_waddr/_wdata` | in | write one byte of the indicator stream |
| `dict_we/_waddr/_wdata` | in | write one byte of the packed dictionary |
| `dict_cnt_we/_grp/_val` | in | number of dictionary entries of length `grp+1` |
| `bat_we/_waddr/_wdata` | in | write one `bat_entry_t` |
| `bat_cnt_we/_val` | in | number of valid table entries |
| `redir_valid`, `redir_addr` | in | start at this original-program address |
| `out_valid`, `out_ready` | out/in | handshake to decode |
| `out_instr`, `out_len` | out | original instruction and its length in bytes |
| `out_compressed` | out | instruction came from the dictionary |
| `searching`, `bat_miss`, `dict_err` | out | table search running; target not in table; index past the loaded dictionary |
| `fetch_fire`, `fetch_len`, `bit_byte_rd`, `dict_rd` | out | one pulse per slot fetched (and its size in bytes), per stream byte read, per dictionary read, for counting memory traffic |

Load all four images and both count registers, then issue a redirect to the
entry point. Images may be rewritten only while the front end is idle; the bit
reader must be restarted (by a redirect) after its stream is rewritten.

## Parameters and sizes

| Parameter | Default | Basis |
|---|---|---|
| `DICT_ENTRIES` | 256 | one-byte index; fixed by the scheme |
| `DICT_BYTES` | 1024 | 256 entries of at most 4 bytes |
| `CODE_BYTES` | 16384 | holds compressed programs of the size the design targets (original code up to about 16 KB) |
| `BIT_BYTES` | 2048 | one bit per slot, at most one slot per code byte: 16384/8 |
| `BAT_ENTRIES` | 512 | a table of up to 2000 bytes at 5 bytes or more per entry holds at most 400 targets |
| `cc_pkg::MAX_ILEN` | 4 | longest instruction, with the stand-in length rule |
| `cc_pkg::ADDR_W` | 16 | all addresses in table entries and on `redir_addr` |

`CODE_BYTES`, `BIT_BYTES` and `DICT_BYTES` must be powers of two.

## What follows the scheme, and what is this design's own

Taken from the scheme: 256-entry dictionary with one-byte indexes; entries
grouped by length so the index gives the length; one indicator bit per
instruction kept in a separate byte-stored stream; byte-aligned compressed
code; a table from original target address to new address and indicator-bit
position; decompression in an extra post-fetch pipeline stage; instructions
compressed one at a time, so any instruction can be a branch target.

Own choices, each a place to check before reuse:

* The instruction length rule (`byte0[7:6] + 1`, 1 to 4 bytes). The scheme
  was meant for existing 16- and 32-bit variable-length processors whose
  encodings are not reproduced here.
* How the table is searched. The scheme only says the target is translated
  through the table; here it is a sorted table with a sequential binary
  search, so a taken branch costs up to 10 extra cycles at 512 entries. A
  directly indexed or associative table would be faster and larger.
* Packed dictionary storage with per-length counts, LSB-first bit packing,
  the 4-bank code memory, combinational memory reads, the `valid/ready`
  decode handshake, the redirect protocol, stopping on a table miss, and the
  `dict_err` flag.
* Store sizes other than the dictionary's 256 entries.
* The processor itself is not part of this RTL. It must detect taken
  branches in the *original* address space and present them on `redir_*`.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values the testbench computes itself and prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_byte_window_mem` | every unaligned 4-byte window, including wrap-around, against a byte array |
| `tb_bit_indicator_unit` | bits after random restarts and steps; number of stream bytes read |
| `tb_cc_dictionary` | every index for several splits over the four lengths, including an empty group and a partly filled dictionary |
| `tb_cc_bat` | every stored key and random absent keys in full, partial and empty tables; hit, entry and exact search cycle count; restart on a new request |
| `tb_cc_fetch` | the slot sequence under random stalls against a reference walk; two-cycle restart after a table answer; stop on a miss |
| `tb_cc_postfetch` | expansion, pass-through, handshake under random back-pressure, flush, one-cycle latency, error flag |
| `tb_cc_decomp_top` | whole design at default sizes: a generated 4000-instruction program compressed by the testbench, run from the entry point and through random redirects (some while an output is held), redirect latency `k+3`, a missing target; every output compared with the original program; each mechanism (dictionary hits of every length, normal instructions, stalls, flushes, bit-stream byte crossings, restarts in mid-byte, table miss) must occur |
| `tb_cc_capacity` | the same at the largest program size the stores are meant for: about 14.7 KB of original code, 12.3 KB compressed, about 450 branch targets |

For the generated programs the testbenches also print storage and traffic.
With the skewed program of `tb_cc_decomp_top`, the code, the bit stream,
the dictionary and a 382-entry table need 5496 + 500 + 626 bytes plus the
table, against 9789 original bytes. A sequential run fetches
5499 + 501 bytes from code and bit stream instead of 9787. These figures
describe synthetic programs, not real benchmarks.

Simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cc_pkg.sv \
          tb/tb_cc_decomp_top.sv --top-module tb_cc_decomp_top -Mdir obj
./obj/Vtb_cc_decomp_top
```

Replace the testbench name for the others. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/cc_pkg.sv rtl/<module>.sv`. The
remaining lint warnings are about unused bits (for example, the upper bits of
16-bit table fields that address smaller stores) and one constant comparison
in bank 0 of the window memory.

## Files

| File | Content |
|---|---|
| `rtl/cc_pkg.sv` | shared types (`instr_t`, `bat_entry_t`), sizes, length rule |
| `rtl/byte_window_mem.sv` | banked byte memory with unaligned 4-byte read (code image, dictionary storage) |
| `rtl/bit_indicator_unit.sv` | indicator stream store and bit reader |
| `rtl/cc_dictionary.sv` | length-grouped packed dictionary |
| `rtl/cc_bat.sv` | branch address table with binary search |
| `rtl/cc_fetch.sv` | fetch stage and redirect control |
| `rtl/cc_postfetch.sv` | post-fetch expansion stage |
| `rtl/cc_decomp_top.sv` | the complete front end |
