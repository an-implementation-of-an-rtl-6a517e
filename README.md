# Super hybrid address generator

An *address generator* stores k distinct n-bit vectors (the *registered
vectors*), each with an index from 1 to k. For any n-bit input it returns the
index of the equal registered vector, or 0 if there is none. Uses include
IP filtering, pattern and word matching and memory patching. The set changes
at run time, and it has no structure a logic synthesizer could exploit.

k is tiny compared with 2^n (here n = 40, k = 1730), so a 2^n-word lookup
table is out of the question. A CAM built from registers and gates works but
costs about 7/6·n·k FPGA logic elements, which is more than the largest
Cyclone II has for this size. This design does most of the job with small
embedded memories instead:

* a **hash memory** of 2^p words, addressed by a cheap XOR hash of the input,
  holds the index of the one registered vector stored in each hash column;
* an **AUX memory** of 2^q words, addressed by that index, holds the rest of
  the vector, so a **comparator** can tell a real match from an input that
  merely lands in the same column;
* the vectors that collide go to a second, smaller hash stage, and the few
  that collide again go to a small **reconfigurable PLA** (a register-and-gates
  CAM).

The three parts realize disjoint vector sets, so their outputs are simply
ORed. With the default sizes, about 80% of the vectors sit in stage 1, 16% in
stage 2 and 4% in the PLA. Everything is held in writable memories and
registers, so the vector set can be reloaded while the generator is running.

## The hash and why the AUX memory only stores part of the vector

Write the input as X = (x_1 … x_n) and split it into the bound part
X1 = (x_1 … x_p) and the free part X2 = (x_{p+1} … x_n). The hash is

    y_i = x_i XOR x_j(i)      i = 1 … p,   x_j(i) taken from X2

Given X2, the map from X1 to Y1 is one-to-one, so (Y1, X2) identifies X.
A lookup reads index = HASH[Y1]. If the index is non-zero and
AUX[index] == X2, the input is exactly the registered vector with that index.
Otherwise it is not stored in this stage. The AUX memory therefore needs only
n − p bits per word, not n.

Each of the 2^p hash columns can hold one vector. If two registered vectors
hash to the same column, only one of them can stay. For k vectors spread
uniformly over 2^p columns, the fraction kept is about
1 − ½(k/2^p) + ⅙(k/2^p)². That is 0.82 for stage 1 at the default size
(k = 1730, 2^12 columns).

The select j(i) of each output bit is held in a register (`hash_network`),
so the loader can try several hash functions and keep the best one.

## The super hybrid split

| part | hash bits | index bits | memories (default, n = 40, q = 11) | holds |
|---|---|---|---|---|
| stage 1 (`u_stage1`) | p1 = q+1 = 12 | q = 11 | HASH 2^12×11, AUX 2^11×28 | ≈ 80% |
| stage 2 (`u_stage2`) | p2 = q−1 = 10 | q2 = q−2 = 9 | HASH 2^10×9, AUX 2^9×30 | ≈ 16% |
| PLA (`u_pla`) | — | q = 11 | 43 words × (40 + 11) registers | ≈ 4% |

The memories total 126,976 bits. Stage 2 uses its own hash, with its own
split of X (p2 = 10 bound bits, 30 free bits). Its memories hold 9-bit
indices only. **Every vector placed in stage 2 must therefore have an index
below 2^(q−2) = 512.** The hardware cannot enforce this rule. The software
that loads the generator must assign indices so that it holds; see below.

`addr_gen_top` ORs the three results. An assertion (`a_one_part`) checks that
at most one part matches any input. This holds whenever the three parts were
loaded with disjoint vector sets.

## Loading a vector set

Most of the real work happens in the software that computes the memory
contents. `tb/addr_gen_driver.sv` contains a complete loader, written in
SystemVerilog. Its steps are:

1. Pick a hash for each stage: p distinct free-bit selects, chosen at random.
2. Hash every vector with hash 1. The first vector to reach a column keeps
   it. The others go on to stage 2.
3. Hash the left-over vectors with hash 2. Again one vector per column, and
   the rest go to the PLA.
4. Repeat steps 1 to 3 with new random hashes until the PLA count fits the
   number of PLA words. Up to 256 tries are made, keeping the best.
5. Give the stage-2 and PLA vectors the indices 1 … L, and the stage-1
   vectors L+1 … k. L must stay below 2^(q−2). If the index table is fixed
   in advance, swap entries or re-hash instead.
6. Fill the memories:
   * HASH1[hash1(v)] = index and AUX1[index] = X2 of v;
   * HASH2[hash2(v)] = index and AUX2[index] = X2' of v;
   * write every other hash word as 0;
   * write each PLA word with a vector and its index.

The memories have no reset. Every hash memory word must be written before
lookups are trusted. An AUX word is only read through a non-zero hash word,
so unused AUX words may hold anything.

Configuration goes through one write port, `cfg` (`addr_gen_pkg::cfg_req_t`).
It takes one write per clock, and writes may be interleaved with lookups:

| `target` | `addr` | `data` |
|---|---|---|
| `CFG_HASH1_NET` / `CFG_HASH2_NET` | output bit i (0-based) | free-bit select j (0 = x_{p+1}) |
| `CFG_HASH1_MEM` / `CFG_HASH2_MEM` | hash value Y1 | index (0 = empty column) |
| `CFG_AUX1` / `CFG_AUX2` | index | X2 (bits n−1 … p of the vector) |
| `CFG_PLA_VEC` | word | vector |
| `CFG_PLA_ADDR` | word | index (0 frees the word) |

To add or remove one vector at run time, rewrite its hash word, or its PLA
index, in a single write.

## Lookup timing

The lookup path is pipelined and accepts one input per clock:

| clock | stage 1 and 2 | PLA |
|---|---|---|
| 0 | `in_valid`, `in_vec`; hash computed, hash memory read | match and encode |
| 1 | index out, AUX memory read | delay |
| 2 | AUX data out, compare | delay |
| 3 | `out_valid`, `out_addr` | — |

The memories are synchronous-read RAMs, as FPGA block RAMs are. The PLA
result is delayed by three registers to line up with the hash stages. There
is no back-pressure. Reset is asynchronous and active low. It clears the
pipeline valids and the PLA, and it sets hash select i to free bit
(i mod (n−p)).

## Modules

| file | role |
|---|---|
| `rtl/addr_gen_pkg.sv` | configuration request type, target encoding, width helper |
| `rtl/addr_gen_top.sv` | super hybrid generator: two hash stages + PLA, ORed |
| `rtl/hash_stage.sv` | hash network → hash memory → AUX memory → comparator, 3-clock pipeline |
| `rtl/hash_network.sv` | programmable XOR hash |
| `rtl/hash_memory.sv` | 2^p × q synchronous RAM |
| `rtl/aux_memory.sv` | 2^q × (n−p) synchronous RAM |
| `rtl/comparator.sv` | passes the index when X2 matches the AUX word |
| `rtl/reconfigurable_pla.sv` | WORDS match circuits + per-word index registers + OR encoder |
| `rtl/match_circuit.sv` | one PLA word: register, XNOR per bit, AND |

Top-level parameters: `N` (40), `Q` (11), `P1` (Q+1), `P2` (Q−1), `Q2` (Q−2)
and `PLA_WORDS` (43). For a larger set, raise `Q` to ⌈log2(k+1)⌉. The other
parameters follow. Size `PLA_WORDS` using the collision formula above, plus
some margin. `N` may be at most 64, the width of the configuration data field.

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=… failures=…`
and has a watchdog. With plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/addr_gen_pkg.sv tb/tb_addr_gen_top.sv --top-module tb_addr_gen_top
    ./obj_dir/Vtb_addr_gen_top

| testbench | what it checks |
|---|---|
| `tb_addr_gen_top` | Default-size generator with 1730 synthetic words (1–8 letters, 5 bits each, blank-padded to 40 bits); see the list after this table. |
| `tb_addr_gen_workloads` | 1730 random 40-bit vectors; 1730 random 32-bit addresses; 3366 words at Q = 12 with 78 PLA words; 4705 words at Q = 13 with 48 PLA words. |
| `tb_hash_stage` | The 6-variable example below: all 64 inputs are streamed and checked, including the 3-clock latency. Then a default-size stage (n = 40, p = 12, q = 11) holding 1500 random vectors, with collided, aliasing and random lookups. |
| `tb_hash_network`, `tb_hash_memory`, `tb_aux_memory`, `tb_comparator`, `tb_match_circuit`, `tb_reconfigurable_pla` | Each unit against a model written in the testbench. The PLA test also loads a 7-word, 4-bit PLA as a complete small address generator (vectors 0010 0111 1101 0101 0011 1011 0001 → 1…7) and checks all 16 inputs. |

`tb_addr_gen_top` checks the following:

* every registered word;
* 2000 unregistered words;
* inputs built to land on an occupied column of each stage, which only the
  comparator can reject;
* removing and restoring vectors at run time;
* the 3-clock latency of every lookup.

It counts each of these mechanisms and fails if any of them never happened.

The hash-stage example has seven 6-bit vectors:

| index | x1…x6 | index | x1…x6 |
|---|---|---|---|
| 1 | 000010 | 5 | 000001 |
| 2 | 010010 | 6 | 111011 |
| 3 | 001010 | 7 | 010111 |
| 4 | 001110 | | |

The hash is y1 = x1⊕x6, y2 = x2⊕x5, y3 = x3⊕x4. Vectors 1 and 4 share a
column. The stage keeps vector 1, and vector 4 belongs in a PLA. The hash
memory holds 2 5 1 0 6 7 3 0. The AUX memory holds (x4 x5 x6) for each index.

A typical default-size run placed 1396 words in stage 1, 292 in stage 2 and
42 in the PLA.

## How far to trust it, and where it departs from the original method

Followed from the method:

* the XOR hash and the hash/AUX/comparator structure;
* the super hybrid sizes p1 = q+1, p2 = q−1, q2 = q−2;
* AUX widths of n − p;
* the register-and-gates PLA with an OR encoder;
* the OR of the three parts.

Choices of this design:

* **Pipeline and memories.** The method gives no timing. Synchronous-read
  memories and the 3-clock pipeline are this design's own.
* **Programmable hash.** The hash selects are registers, so hash functions
  can be re-optimized with each vector set. A fixed wiring would also
  follow the method.
* **PLA output part.** The output part of each PLA word is a writable index
  register, so a word can be reloaded. A word with index 0 is free; there
  is no valid bit.
* **No don't-care bits.** PLA words hold fully specified vectors only.
* **PLA size.** 43 words, the estimate for the 1730-vector case with random
  hashes. With hash functions tuned to the actual word list, as few as 30
  words were reported. The synthetic word list here needed 42.
* **AUX widths.** Stage 1 stores 28 bits and stage 2 stores 30, that is,
  n − p. A 27-bit and a 31-bit figure also appear in descriptions of the
  method, but they are not consistent with n − p.
* **Index assignment** belongs to the loader, not to the hardware. The
  method's rule of keeping the smallest index in a column is one valid
  choice. The loader here keeps the first vector to arrive and renumbers
  afterwards.

Not built:

* the plain hybrid method (one hash stage plus a larger PLA);
* the all-PLA implementation, used only as a cost comparison;
* the optimization of hash functions against a specific word list.

The default size holds at most 2047 vectors. Sets of 3366 or 4705 vectors
need `Q` = 12 or 13; both sizes are exercised in `tb_addr_gen_workloads`.

Known lint note: in `addr_gen_top` and `reconfigurable_pla`, Verilator
reports `rst_n` as used both synchronously and asynchronously. This is only because the assertions use
`disable iff (!rst_n)`. The flip-flops all use asynchronous reset.
