# Multi-bit soft-error correction for a CAM-tagged cache

In a highly associative cache the tags sit in a content-addressable memory
(CAM). Every access compares the requested tag against all the tags of a set
at once, and nothing reads a tag out. A particle strike that flips a CAM cell
therefore does not give a wrong value anyone could check. Instead, the next
access to that line **misses although the line is present** (a *false
miss*). In a write-back cache the line may be dirty. The refill triggered by
the false miss would then bring back stale data from the next level, and
the newest copy of the data would be lost.

This RTL implements a cache that handles this case in four steps:

1. **It detects** upsets in every tag word at once. Each word carries a
   parity bit, and its parity chain drives a per-word error line.
2. **It finds** the corrupted words with a cheap, non-priority encoder. A
   small pre-coder in front of the encoder relies on the fact that one
   strike corrupts only neighbouring words.
3. **It repairs** the words one after another in the background. Each word
   has a single-error-correcting Hamming code. CPU accesses are never
   stalled for this.
4. **It disarms false misses.** The miss status holding registers (MSHR)
   are searched with every repaired tag. A pending miss on that line was
   false, so its MSHR entry is cancelled and its refill is dropped when it
   arrives.

The default configuration is a 32 KB, 32-way set-associative cache with
32-byte lines and 24-bit tags. That gives 32 sets and 1024 CAM tag words.

## Interleaved tag words: one parity bit catches a double upset

Two tag words share one physical CAM row with their cells interleaved: bit
*m* of word 2r is column 2m and bit *m* of word 2r+1 is column 2m+1. Each
word's parity bit follows its tag cells (`tag_cam`). A strike that flips two
neighbouring cells of a row thus flips **one** bit in each of two words. One
parity bit per word is enough to see both errors, and a code that corrects a
single bit per word is enough to repair them. Interleaving N words in the
same way would extend this to N-cell bursts.

`err_o[w]` is the XOR of word *w*'s tag cells and its parity bit. In
silicon this is a chain of small NMOS pass-gate XOR cells ending in a skewed
NAND gate, tuned for fast detection against noise margin. Here only its
logic function is modelled. The Hamming check bits of each word sit in a
separate column that is never searched. Parity cells do not take part in the
search.

## From 1024 error lines to one starting address

A strike can also corrupt several *vertically* adjacent words. A priority
encoder over 1024 inputs would find the highest one, but it is large and
slow. The design instead puts a two-level **pre-coder** in front of a plain
OR-plane encoder (`error_precoder`, `error_addr_encoder`):

* **Pairing.** The error lines of words 2g and 2g+1 (one physical row) are
  ORed into a group flag. This halves the encoder to 512 inputs. The cost
  is that the engine later has to read both words of a group to learn
  which one is bad.
* **Top-of-run gating.** Group *g*'s active-low output `gerr_n[g]` goes low
  only if group *g* is flagged **and group g+1 is not**. The top group is
  gated by a constant 1.

Corrupted words always form one contiguous run, so exactly one output is
low: the group holding the highest corrupted word. A non-priority encoder
can then produce its index. For example, if words 3 and 4 are bad, groups 1
(words 2–3) and 2 (words 4–5) are flagged, and only group 2's output goes
low. The engine then starts at word 5.

This relies on the premise that one event hits only adjacent words. Two
separate runs present at the same time would make the encoder OR two
indices together.

`err_addr_gen` registers the error vector (stage **PAR**), runs the
pre-coder and encoder, and registers the group address (stage **ENC**). It
also gives the unregistered OR of all error lines, `global_err_o`.

## The correction walk

`corr_ctrl` repairs one word per two cycles, walking down from the higher
word of the flagged group:

| stage | cycles | what happens |
|-------|--------|--------------|
| PAR   | 1 | error vector registered |
| ENC   | 1 | pre-coder + encoder, group address registered |
| RD    | 1 | read the word (read port b), recompute its parity, Hamming-correct the tag |
| WR+MRA| 1 | if the word was bad: write back the corrected tag with fresh parity and check bits; if the line is valid, search the MSHR for {corrected tag, set} |
| …     |   | RD/WR for the next lower word |
| PROP  | 2 | wait for the repaired cells to pass PAR and ENC again, then look for another flagged group |

The first RD happens in the cycle in which the group address appears. The
walk ends at the **first clean word below the starting word**, or after word
0. The starting word itself may be clean, because a group is flagged when
either of its words is bad.

Timing: after a strike, the last WR ends **2 + 2K** clock edges later, where
K is the number of words read. For a run of M corrupted words starting at
the top of a group, K = M + 1 (one clean word ends the walk). If the run's
highest word is the lower word of its group, the clean upper word is read
too, and K = M + 2. For example, if words 3 and 4 are corrupted, words 5,
4, 3 and 2 are read, so K = 4 and the walk takes 10 cycles.

## False misses and the MSHR

Normal miss handling (`mbc_cache`, `mshr`) runs in this order:

1. Register the miss in the MSHR, unless the line is already pending. A
   pending line is a secondary miss and is merged.
2. Pick a victim way: a free way of the set, else a per-set round-robin way
   that no other pending miss has reserved. Invalidate it.
3. Send one request to the next level. It carries the fetch and, if the
   victim was dirty, the victim's ECC-corrected tag and data as a
   write-back.
4. When the refill arrives, it is written into the reserved way only if the
   MSHR still holds a live entry for that line.

The correction engine adds a fifth operation: **cancel**. When a repaired
valid tag matches a live MSHR entry, the miss on that line was false. The
entry is invalidated and the reserved way is released. When the refill
arrives later, no entry is found and the block is dropped (`fill_drop_o`).
The dirty line, now with its tag repaired, stays in the cache. The
requester's retry hits it.

All this only works if the repair lands before the refill is accepted. The
original scheme sizes its circuits so that correction time < miss penalty.
This RTL enforces the ordering directly: **refills are held
(`fill_ready_o` = 0) while any error line is set or the engine is busy.**
When the budget holds, the refill of a false miss finds the repair already
done and is never delayed; only refills of other lines that happen to
arrive during a correction wait a few cycles. When the budget is exceeded
(long runs, slow lower level), refills wait instead of corrupting data. As a
consequence, an MSHR entry is never cancelled and filled in the same cycle.

### Budget at the evaluated operating point

The original evaluation used a 2.933 GHz core with a 3.4 ns miss penalty,
that is, about 10 cycles. With 2 + 2K ≤ 10, up to K = 4 words can be read
inside the miss penalty. That is a run of up to 3 corrupted words (2 if
the run's highest word is the lower word of its group). The original
transistor-level study reported 3 to 5 correctable words, depending on how
strongly the detection gate is skewed. `tb_correction_budget` measures this
at full size with a 10-cycle refill latency:

| corrupted words M | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| cycles to last repair | 6 | 8 | 10 | 12 | 14 | 16 |
| false-miss refill | on time | on time | on time | held | held | held |

In every case the false miss is cancelled, its refill is dropped, and the
dirty data are read back intact.

## The cache around it

* **CPU port.** `req_valid/req_ready`, byte address {24-bit tag, 5-bit
  set, 5-bit offset} (34 bits), write enable and one 32-bit word. The CAM
  is searched in the accept cycle. `resp_valid` comes one cycle later with
  `resp_hit`, and with the corrected read word for reads. A miss returns
  `resp_hit=0`, and the requester retries later. Hits continue while
  misses are outstanding (hit-under-miss).
* **Lower-level port.** `mreq_*` (valid/ready; fetch line plus optional
  write-back) and `fill_*` (valid/ready; line and data). Refills take the
  data-memory line port ahead of the CPU, so the CPU is held for that
  cycle. The CPU is also held while a memory request waits for
  `mreq_ready`.
* **ECC** (`hit_miss_ecc`). A Hamming single-error-correcting code covers
  each 24-bit tag (5 check bits) and each 32-bit data word (6 check bits).
  Everything that leaves the cache passes through a corrector: the read
  word, the write-back line and the write-back tag.
* **Data memory** (`data_mem`). 1024 lines × 8 codewords of 38 bits. It has
  a synchronous word port for hits and a synchronous line port for victim
  reads and refills.
* **Test access.** `inj_en_i/inj_row_i/inj_mask_i` flip any cells of one
  physical tag row. The status outputs `global_err_o`, `corr_busy_o`,
  `corr_fix_o`, `false_miss_o`, `fill_drop_o` and `mshr_count_o` show the
  error handling at work.

## Hierarchy

```
mbc_cache                top: cache controller, line state, handshakes
├── tag_cam              interleaved CAM tags, parity chains, search, 2 read + 1 write port
├── err_addr_gen         PAR/ENC registers
│   ├── error_precoder   pair OR + top-of-run gating
│   └── error_addr_encoder
├── corr_ctrl            RD / WR+MRA / PROP walk   (hamming_dec, hamming_enc)
├── hit_miss_ecc         hit/miss, tag and data ECC (hamming_dec, hamming_enc)
├── mshr                 alloc / merge / fill lookup / cancel
└── data_mem             data array with ECC words
cache_pkg                default sizes, Hamming helper functions, engine state type
```

Every module takes its sizes as parameters. The defaults come from
`cache_pkg`.

## Where this RTL departs from the original scheme or fills gaps

* The original scheme gives the tag interleaving, the parity chain, the
  pre-coder, the walk order and stage names, and the MSHR cancel and drop
  rule. These follow it. The cycle timing (one cycle per PAR, ENC, RD and
  WR; two for PROP) is this design's choice. The original gives analog
  delays only.
* The original text describes the walk once as going upward from the
  lower word. Its example and figure go downward from the top of the run,
  and this RTL walks downward.
* The original figure of the pre-coder labels its inputs as N/2 and its
  encoder as LOG2(N/4). The text asks for an N/2-input encoder over N error
  lines, and this RTL follows the text.
* Holding refills during correction (instead of relying on the timing
  budget) is this design's choice.
* The CPU and lower-level interfaces, the retry-on-miss policy, the
  replacement policy, the MSHR size (8), the 32-bit CPU word, the Hamming
  code and the data-word ECC are not specified by the original and were
  chosen here.
* Not modelled: the transistor-level CAM cell, the NMOS parity chain and
  the skewed NAND gate (speed, noise margin). Only their logic function is
  present. The area results of the original concern layout and are not
  reproduced.
* Known limits: an upset in an *invalid* word is repaired but never
  searched in the MSHR (such a line cannot have caused a false miss).
  Multiple hits caused by a corrupted tag that equals another way's tag
  resolve to the lowest way. Two independent runs present at the same time
  are outside the premise of the pre-coder.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test at full
size (random traffic, false-miss strikes on dirty lines, memory model with
10-cycle refills, golden data image) runs in about ten seconds:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cache_pkg.sv tb/tb_mbc_cache.sv \
          --top-module tb_mbc_cache -Mdir obj -o sim && obj/sim
```

Replace `tb_mbc_cache` by `tb_correction_budget` (the miss-penalty sweep
above, full size), `tb_tag_cam`, `tb_error_precoder`,
`tb_error_addr_encoder`, `tb_err_addr_gen`, `tb_corr_ctrl`, `tb_mshr`,
`tb_hit_miss_ecc` or `tb_data_mem` for the block tests. The block tests
use reduced sizes. `tb_corr_ctrl` runs the engine together with the real
tag memory and error address generator, and checks the 2 + 2K cycle count
on every trial.

The end-to-end test counts, and requires at least once each: hits, misses,
merged secondary misses, dirty write-backs, refills taken and dropped,
false-miss cancels, repaired words, refills held by correction, CPU stalls
(by a refill or a waiting memory request), a full MSHR, and a single-word
repair finishing within the 10-cycle miss latency.
