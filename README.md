# VOR — a VAX on a RISC

The VOR runs VAX programs on a simple load/store processor, the VR, by
translating VAX instructions (VIs) into VR instructions (TIs) on the fly
and caching the translations in the VR's ordinary cache. The translator T
sits where main memory would be. When the VR fetches from the
pseudo-address of a VAX PC and misses, T reads the VAX bytes, decodes them
and returns the TIs as if they were memory contents. After that, a VAX
instruction that hits in the cache costs only its TIs. No decode happens on
the execution path.

The difficult part is keeping cached translations correct when VAX code is
overwritten. This can be a store by the VR itself, by another processor or
by an I/O device. The VOR handles it with per-page sequence numbers (SNs)
and a background cleanup engine, without ever searching the cache. That
scheme takes up most of this document.

## Pseudo-addresses

A VAX PC `V` is mapped to the 39-bit VR address

    PC = (V + 2^32) << 6  =  {1, V[31:0], slot[3:0], 2'b00}

- Bit 38 marks the address as a pseudo-address.
- Each VAX byte address owns 16 TI slots, which is four cache lines of four
  words.
- Ordinary VR addresses (data, native code) stay below 2^32.

Both kinds go through the same TLB:

- For a pseudo-address, the TLB looks up the VAX address `V`.
- The real address `RA` of the VAX byte, together with the slot, becomes the
  cache tag.

The cache indexes a TI line by `{RA low bits, slot[3:2]}`, so the lines of
one VI are adjacent. It indexes an ordinary line by `RA[4 +: log2 NLINES]`.
The tag is the full key `{flag, slot[3:2], RA}`.

The VR has a VAX PC pseudo-register, `VPC` (r15). It holds the address of
the first byte of the current VI. PC-relative operands use it, and so do
traps.

## Going from one VAX instruction to the next: where / when

A branch TI at the end of every translation would cost a cycle per VI, so
each cache line carries two small fields instead:

| field | meaning |
|---|---|
| `when` (3 bits) | after the VR executes word `when-1` of this line, it branches. 0 = no branch |
| `where` (12 bits) | the branch goes to address of word 0 of the line + `where` |

For a VI of length `len` whose translation ends in line `k`:

    where = (len << 6) - 16*k
    when  = TIs in the last line

The branch target is therefore slot 0 of the next VI. VPC is loaded from
the target at the same time.

Because of how the branch is placed, a translation needs at least two TIs,
and its last line must not hold just one TI. T pads with NOPs where needed.

**Joining.** Many VIs translate into a single TI, for example a
register-to-register `MOVL`. T then translates the next VI (VI2) too and
packs both into one line:

| TIs of VI2 | line contents | when | where |
|---|---|---|---|
| 1 | TI1, TI2.1, NOP, fix | 2 | after VI2 |
| 2 | TI1, TI2.1, TI2.2, fix | 3 | after VI2 |
| >2 | TI1, TI2.1, NOP, fix | 2 | VI2 slot 1 (the rest of VI2's own translation) |

- Word 3 (`fix`) is `LI r15, r15, len1`. It is never executed in sequence;
  it tells exception code how to advance VPC past VI1.
- The line's `joined` bit is set. While it is set, VPC still names VI1.
- A VI2 that traps is not joined.

## The translator T (`translator`)

T is a state machine between the cache's line port and the memory bus. It
handles three kinds of request:

- **Ordinary line read or write-back:** four word transfers to memory,
  passed straight through.
- **TI line:** T fetches the VI's bytes a word at a time, decodes the opcode,
  then decodes each operand specifier into one of three forms:
  - a VR register (VAX R1–R15 live in r1–r15; R0 lives in r16);
  - a 6-bit signed constant;
  - a memory operand `d(r)`.

  It emits address arithmetic as needed:
  - index mode scales with a shift and an add;
  - deferred modes load a temporary;
  - PC-relative modes use `VPC` plus the bytes consumed so far.

  Auto-increment and auto-decrement are not applied at once. Each register
  keeps a pending adjustment, which T folds into later uses of that register
  and emits as `LI` TIs after the operation. Then the operation's
  Read / Op / Write steps are emitted.
- **VI that runs past the end of its page, an unknown opcode, or more than
  16 TIs:** T emits a TRAP TI. This stands in for the software ("extracode")
  that a full system would call.

Translated opcodes:

- `HALT`, `NOP`
- `BRB`, `BRW`, `BNEQ`, `BEQL`, `BGTR`, `BLEQ`, `BGEQ`, `BLSS`
- `ADDL2`, `ADDL3`, `SUBL2`, `SUBL3`, `MOVL`, `CLRL`, `INCL`
- `BISL2`, `BISL3`, `BICL2`, `BICL3`, `XORL2`, `XORL3`, `CMPL`, `TSTL`

`CMPL` sets NZ from the difference `src1 - src2`. N is therefore exact
unless the subtraction overflows, and V comes from the subtraction instead
of being cleared. `TSTL` leaves C unchanged.

All VAX addressing modes are decoded.

Temporaries live in r40–r45 and r46–r51. The 6-bit literal field of an
operate TI holds −32..31, so short literals 32..63 and immediates are
loaded into a temporary with `LI`/`LIH` first.

Timing:

- one clock per specifier byte or emission step;
- plus one memory read per new word of VI bytes.

The test program makes 15 translations. At full size it runs in 769 clocks
when every VI must be translated, and in 95 clocks from the cache.

## The VR (`vr_core`, `fetch_seq`)

The VR is a 32-bit RISC with 64 registers, run one instruction at a time:
fetch, execute, and a memory step for loads and stores. All accesses go
through the cache with a req/ack handshake. The TI encoding is this
design's own:

| opcode | fields | effect |
|---|---|---|
| LD / ST | r1, r2, d16 | word access at r2+d. Traps unless aligned; the trap records the address and r1 |
| LDB/STB, LDW/STW | r1, r2, d16 | ignore the low address bits and save them in BN (r63). The W forms trap on offset 3 |
| LI / LIH | r1, r2, d16 | r1 := r2 + d, r1 := r2 + d·2^16 (r2 = r0 means base 0) |
| ALU | r1, r2 or lit6, r3, func, cc, size | r1 := x op r3. Size byte/half writes only the low part. cc selects NZ / NZ,V:=0 / NZ,C,V |
| ALU SXB / SXH | r1, r3 | r1 := r3's low byte / halfword, sign-extended |
| EXT | r1, r2, r3, pos, width | field of the pair (r2, r3) |
| EXTB / INS | r1, r3, width | byte field at BN: extract, or insert into r1 |
| BR | r1, cond, d16 | delayed branch on r1 (sign, zero, or a bit of r1) |
| JMPL | r1, r2, d16 | delayed jump to r2+d. r1 := return address |
| VBR | r2, cond, d12 | VAX branch, at once: VPC := r2+d and PC := (VPC+2^32)<<6, if the NZ condition holds |
| TRAP | code | stop with a code; a full system would enter extracode here |

Pseudo-registers:

- `r0` reads as PC.
- `r15` is VPC.
- `r60` is NZ. It holds the sign-extended result, so N and Z are its sign
  and zero tests.
- `r61` is C and `r62` is V.
- `r63` is BN.

A 32-bit load or store of a VAX register sets NZ and clears V, as VAX moves
do.

`fetch_seq` chooses the next PC in this priority order:

1. VAX branch;
2. a pending delayed branch;
3. the where/when implicit branch;
4. PC + 4.

## Keeping translations valid (`vor_tlb`, `rt_table`, `ti_cache`, `cleanup_fsm`)

**Sequence numbers.** Each TLB entry holds:

- a real page;
- a **hot** bit;
- an SN `(y, n)`, where `y` is a 2-bit cleanup cycle and `n` counts 1..MAXN.

Each TI line in the cache stores the SN its page had when the line was
made. A TI line hits only if:

- the tag matches;
- the page is hot;
- the SNs *match*: `n` is equal and either `y` is equal, or the line is of
  the current cycle `cy` while the TLB still says `cy−1`.

Any store to a page makes it cold (**Chill**). Every TI of the page then
misses at once, with no search of the cache.

**RT.** A store from another processor or an I/O device arrives with a real
address only. `rt_table` is a 1024-entry direct-mapped table from real page
to TLB index, so the store can find the TLB entry to chill. A page is hot
only while it owns its RT slot. Warming a page takes over the slot and
chills the previous owner. Consequences:

- An external store that finds no owner in RT needs no action.
- A store by the VR chills through the TLB entry that translated it.

**Warm.** The first TI fetch from a cold page warms it. The page gets the
SN `(cy+1, nMax)`. Chill raises `nMax` to `n+1` whenever it chills an SN of
cycle `cy+1`. So a page that is warmed again never gets back an SN that its
stale lines might still carry.

When `nMax` reaches `MAXN`, a cold page cannot be warmed. Its TIs are then
fetched from T and executed without being cached. This is slow but
correct.

**Cleanup.** The engine recycles SNs. It runs one cache line per clock
whenever the cache arrays are free: with no request pending, or while a
miss waits for T or memory. For each TI line whose SN is from the last
cycle (`cy−1`), it probes the TLB through RT:

- If the entry still owns the page, is hot and has the same `n`, the line is
  relabelled to cycle `cy`. A TLB SN still in `cy−1` is also moved to `cy`.
- Otherwise the line's `n` is set to 0. No hot page has `n = 0`.

After the last line, the engine starts a new cycle (`cy := cy+1`,
`nMax := 1`). At that point no line holds an SN of the old last cycle, so
its numbers are free again.

With a 6-bit `n` and 4096 lines, one warm per miss cannot outrun cleanup in
practice. The uncached path covers the case where it does.

Points to know when reading the code:

- **Fill while cy−1.** A line filled while its page's SN is still in cycle
  `cy−1` is stored already relabelled to `cy`. The cleanup scan may have
  passed that line's slot, so it must not be left behind.
- **Asymmetric match.** After the TLB entry has been bumped from `cy−1` to
  `cy`, lines of the page that cleanup has not reached yet (still `cy−1`)
  miss until they are re-translated. This follows from the match rule and is
  harmless.
- **The TLB** does one operation per clock. The fixed priority is:
  1. refill;
  2. external store;
  3. warm;
  4. internal store;
  5. cleanup bump;
  6. new cycle.

## Block map

| module | role |
|---|---|
| `vor_pkg` | sizes, types, TI encoding, helper functions |
| `vor_top` | VR core, cache, TLB (with RT), cleanup engine and translator. Memory bus, TLB refill, external-store port, status and event pulses are brought out |
| `vr_core` (+ `fetch_seq`) | the processor |
| `ti_cache` | direct-mapped, write-back, write-allocate cache for data and TI lines. Drives warm/chill, the line port to T, and the cleanup access |
| `vor_tlb` (+ `rt_table`) | TLB with hot bits, SNs, `cy`, `nMax` and the RT table |
| `cleanup_fsm` | SN cleanup engine |
| `translator` | T, including pass-through of ordinary lines |
| `fast_cache_index` | cache indexing with virtual-address bits and a one-clock retry when the dubious bits disagree; beside the rest in the top, on its own `fx_*` ports |

Default sizes:

- 4096 lines of 16 bytes (64 KB);
- 1024 TLB entries for 512-byte pages;
- 1024 RT entries;
- `MAXN` = 64;
- 30-bit real addresses (21-bit real page).

TLB refill is done from outside through the `tlb_fill_*` port, by whatever
handles TLB misses. A TLB miss stops the core with trap code `0x11`.

Memory is outside the top. It is a word bus (`m_req/m_we/m_addr/m_wdata`,
answered by `m_ack/m_rdata`), with the request held until acknowledged.

## Where this design departs or stops short

- **Opcode subset.** Only the opcodes listed above are translated. Byte and
  word operand sizes, calls, queues, strings and floating point trap
  instead.
- **VIs that cross a page boundary** trap. The proposed translation, which
  splits the VI with a branch into the next page, is not built.
- **T reads VAX bytes from memory, not from the cache.** Code that the VR
  itself writes becomes visible to T once the dirty line is written back.
  The chill on the store still invalidates the old translation at once.
- **Faults stop the core.** Traps (HALT, unknown opcode, unaligned
  reference, TLB miss) stop the core with a code rather than vectoring to
  extracode. Interrupts are not modelled.
- **Immediate VAX branch.** The VAX branch takes effect at once, with no
  delay slot. A taken conditional VAX branch at the end of a translation
  therefore never executes the next VI's first TI, so no special case is
  needed for it.
- **Fast cache indexing stands alone.** `fast_cache_index` addresses the
  cache with virtual-address bits and checks the "dubious" bits (the index
  bits above the page offset) against the real address. If they differ, it
  takes one more clock with the real index. The cache of the top translates
  and indexes in the same clock and does not use it, so the block sits
  beside the rest of the top on its own `fx_*` ports.
- **Hardwired translator.** T is a hardwired state machine rather than a
  microcoded engine.
- **Own encoding and core.** The TI encoding, register assignment and the
  one-instruction-at-a-time core are this design's own.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/vor_pkg.sv \
        tb/tb_vor_top.sv --top-module tb_vor_top -Mdir obj_top
    obj_top/Vtb_vor_top

The other testbenches build the same way:

- `tb_vor_full`
- `tb_translator`
- `tb_ti_cache`
- `tb_vor_tlb`
- `tb_rt_table`
- `tb_cleanup_fsm`
- `tb_fetch_seq`
- `tb_vr_core`
- `tb_fast_cache_index`

`tb/mem_model.sv` is the behavioural memory they share.

**`tb_vor_top`** runs the system with 64 lines and `MAXN` = 3 so that
conflicts, write-backs and SN exhaustion happen quickly. It:

1. runs a native loop;
2. runs a VAX program, which covers every addressing mode the translator
   handles, joining and a backward conditional branch;
3. reruns the program from the cache;
4. patches the code with an external store and checks that the new code
   runs;
5. stores into the code page and reruns with the SNs exhausted (uncached
   execution);
6. lets cleanup run whole cycles and checks that kept lines still hit;
7. takes a TLB miss;
8. runs a counting loop that uses the logical, compare and test
   instructions;
9. drives `fast_cache_index` (on the `fx_*` ports) with random address
   pairs and checks the one-clock retry.

It counts 20 mechanisms and fails any that never occurred.

**`tb_vor_full`** runs the same program at the default sizes, with no
parameter overrides. This includes cleanup cycles over all 4096 lines.
