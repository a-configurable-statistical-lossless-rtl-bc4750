# PPMH compression core

This is a lossless data compressor in hardware. It predicts each input byte from the bytes just
before it, and spends few bits on bytes it predicted well. The prediction is a *variable-order
Markov model*, in the PPM family ("prediction by partial matching"). The model keeps statistics for
every context it has seen: the last byte (order 1), the last two bytes (order 2), and so on up to
order 4. It codes each byte with the longest context that has seen that byte before. A byte that
is new to a context is preceded by an *escape*, which moves to the next shorter context. Order 0
(no context) and a uniform fallback, order −1, make sure every byte can always be coded.

What makes the scheme cheap in hardware is this: a byte is not coded as one event out of 257
(256 bytes plus the escape). It is coded as a path of 9 binary decisions down a count tree:

- the first decision is "escape or symbol";
- the other eight are the bits of the byte.

A *binary* arithmetic coder therefore does all the coding, one decision per clock cycle. Each
decision needs one count read and one count update. The whole design is built around that walk.

The RTL follows the Byacom-1 organisation published by Nunez-Yanez and Chouliaras. That
organisation has four parts:

- a hashed context tree in SRAM;
- a double buffer of found contexts;
- a tree-walking probability estimator;
- a six-stage multiplication-free arithmetic coder.

Where the published description stops, this RTL fills in its own choices. The arithmetic inside
the coder and several encodings are examples. All of them are listed under
[Departures and own choices](#departures-and-own-choices).

```
 in_data ─► input FIFO ─► context modeller ─► double buffer ─► probability ─► arithmetic coder ─► out_data
 in_eob      (256 x 9)    (tree SRAM,          (2 records of    estimator      (LPS table, MZ range,
                           free map)            context areas)  (count trees)   carry buffer, packer,
                                                                                commit/rollback FIFO)
```

Blocks are compressed independently. An end-of-block word on the input does three things:

- it ends the block in the code stream with a termination sequence;
- it flushes the coder;
- it frees every context in one cycle.

A short block therefore costs no reset time.

## Context tree

The context modeller (`context_modeller.sv`) finds the contexts of the current byte. Every
context is a node of a tree. The root is order 0, and a node at depth k stands for k preceding
bytes. Each node owns a *context area*: an index, 0..1023, into the statistics memories. The root
always owns area 0.

The tree lives in a 1312-word SRAM. Each word holds:

| field        | bits | meaning                                         |
|--------------|------|-------------------------------------------------|
| context area | 10   | the area of this node                           |
| prefix area  | 10   | the area of its parent (the one-shorter context) |
| symbol       | 8    | the byte this node adds to its parent's context |

The node for "parent P extended by byte s" is searched from the index
`((s << 2) XOR P) mod 1312`, stepping by +1 on a miss. The search for a byte runs as follows:

- It starts at the root with the previous byte, then goes one order deeper with each match. The
  match becomes the new parent.
- It stops at the run-time maximum order (`max_order`, 0..4).
- It also stops after 10 probes without a match.
- It also stops at a free word. The free word is then claimed for the missing context, and the
  next unused context area (1, 2, 3, … in order of first use) is written into it.

A newly claimed context is still reported to the estimator as the highest order of this byte. It
is marked *fresh*, and its statistics are treated as empty. An empty context spends no code bits:
its only possible outcome is the escape.

The string `aaacaaaccab` builds the following tree, each entry written as context → area. The
context-modeller testbench checks this tree.

- order 1: `a`→1, `c`→4
- order 2: `aa`→2, `ac`→5, `ca`→8, `cc`→9
- order 3: `aaa`→3, `aac`→6, `acc`→10
- order 4: `aaac`→7

**One-cycle reset.** Each tree word has a busy bit in the free map (`area_free_map.sv`). The
free map is a 41 × 32-bit SRAM plus a 41-bit *line valid* register. A word is busy only when its
line is valid and its own bit is set. Clearing the 41-bit register therefore frees the whole tree
at once, in the same way as the valid bits of a cache. Marking a word busy writes back its map
word, with one more bit set, from the read made the cycle before. When the line was invalid, the
other 31 bits are written as free.

Timing: 2 cycles to start a byte (root), 2 cycles per probe (SRAM read, then compare), and
1 cycle to close the record.

## Double buffer

The found areas of one byte form one record: areas for orders 0..n−1, a fresh flag for each,
the byte itself, and the end-of-block flag. The record goes into one of two banks
(`ctx_area_dbuf.sv`). The modeller fills one bank while the estimator codes from the other. The
modeller waits only when it is a whole byte ahead.

## Probability trees

Every context area owns 256 nodes of the probability memory (address `area << 8 | node`, 14 bits
per node) and one 11-bit word of the total memory.

- **Node 0, the root.** Its count is the weight of all symbols seen in the context. The escape
  weight is the context total minus that count.
- **Nodes 1..255.** These form the 8-level symbol tree. Node *i* has children 2*i* and 2*i*+1,
  and byte bit 7 decides the branch below node 1.

A node stores only the weight of its left subtree. The right weight is the weight handed down from
the parent (*top*) minus the node's count. Each decision is sent to the coder as the pair
`cum0` = left weight and `cum1` = top, plus the direction.

Node word (14 bits):

```
 13      12      11      10      9 ........ 0
 rst_l   rst_r   scl_l   scl_r   count (left weight)
```

The walk visits one node per cycle, and in the same cycle writes the node back updated:

- **Adaptation.** If the byte goes left, the count grows by the increment. The increment is
  *order + 1*, so longer contexts adapt faster. The escape weight grows by 1 whenever a context
  sees a new byte.
- **Lazy reset.** A fresh context is treated as empty at its root. Its `rst` bits are pushed one
  level down with every visit. A node whose parent says "reset pending" counts as zero. No cycle
  is ever spent clearing the 262,144 nodes.
- **Lazy halving.** The total word is `{scale pending, total[9:0]}`. When an update brings the
  total to 1008 or more, the next visit halves the root. The escape weight stays at least 1.
  The next visit also sets the `scl` bits, so each node below is halved when it is next
  visited. A halved count is clamped to the weight handed down, so `left ≤ top` always holds. The
  counts stay within 10 bits.

**Escapes and speculation.** The estimator does not know beforehand whether the byte exists in a
context. It starts walking and sends decisions to the coder as it goes. Suppose the branch the
byte needs has weight 0. The estimator then stops sending and finishes the walk, which adds the
byte to the context. Then it sends three events:

1. `ROLLBACK`: the coder drops everything since the last commit, including bytes it already put
   into the output FIFO;
2. the escape decision, with the root counts from *before* the update;
3. `COMMIT`.

It then retries one order lower. After order 0 fails, order −1 sends the 8 byte bits with weights
1:1. A successful walk ends with `COMMIT`. Every order that was tried is updated.

**Termination.** A decoder must learn where a block ends, without a length field. The last byte
that was coded in order 0 is the *termination symbol*, and its order-0 probability is then
certainly non-zero. At the end of a block the estimator codes two things:

- an escape from every order, order 0 included;
- the termination symbol in order −1.

A normal byte can never be coded that way, so the decoder recognises it as the end. The estimator
then sends `FLUSH` and `END`.

Timing: 1 cycle to load a context and 9 cycles of walk. A byte found in its first context takes
10 cycles. The record is released in its last walk cycle, so a waiting record is loaded right in
the next cycle. The COMMIT event and the total-word update of a successful walk are put off into
that load cycle. If the load reads the same total word in that cycle, the new word is forwarded
to it. An escape adds 4 cycles (rollback, escape, commit, reload) and another walk.

## Arithmetic coder

The coder (`arith_coder.sv`) is a pipeline with valid/ready between all stages, and it takes one
event per cycle:

1. **Index.** Both counts are shifted left until the top is at bit 9. The table index is then
   `{4 bits of top below its leading one, 5 most significant bits of the smaller branch}`. A
   smaller branch of 0 gives a certain decision, which costs nothing.
2. **LPS table** (`lps_table.sv`, 512 × 7). It gives the probability of the less probable branch
   in 1/128 units, computed at elaboration as
   `round(128 · (16·l + 8) / (528 + 32·t))`, clamped to 1..63.
3. **Range arithmetic** (`mz_coder.sv`). There is a 7-bit range R, kept in 64..127, and an 8-bit
   low register L (7 code bits plus a carry). The less probable branch gets q and the other gets
   R − q, with no multiplication. Coding the upper (right) branch adds the left width to L. The
   new range is shifted up by its leading-zero count in the same cycle. That shift releases k code
   bits, plus a possible carry into the last released bit. COMMIT copies {R, L} into shadow
   registers, and ROLLBACK copies them back.
4. **Carry buffer** (`code_buffer.sv`). A released bit may still change when a later carry
   arrives. The stage keeps the last such bit (the *cache bit*) and a count of ones after it. A
   carry turns `c 1 1 … 1` into `c+1 0 0 … 0`. The stage emits final bits as compact items:
   head bit, run of equal bits, up to 6 literals. Its own state is shadowed for rollback.
5. **Packer** (`code_packer.sv`). It takes up to 8 bits of an item per cycle and forms bytes,
   first bit in the most significant bit. A long run takes several cycles, and the stages before
   it wait. At END it pads the last byte with zeros.
6. **Output FIFO** (`out_buffer.sv`). It has three pointers: write, commit and read. Only
   committed bytes are visible. A rollback moves the write pointer back to the commit pointer.

## Interface

| port        | dir | width | meaning                                              |
|-------------|-----|-------|------------------------------------------------------|
| `clk`       | in  | 1     | clock                                                |
| `rst_n`     | in  | 1     | asynchronous reset, active low                       |
| `max_order` | in  | 3     | maximum model order 0..4, held stable during a block |
| `in_valid`, `in_ready` | in/out | 1 | input handshake                             |
| `in_data`   | in  | 8     | byte to compress                                     |
| `in_eob`    | in  | 1     | this word ends the block (its data is ignored)       |
| `out_valid`, `out_ready` | out/in | 1 | output handshake                          |
| `out_data`  | out | 8     | compressed byte                                      |
| `blk_done`  | out | 1     | pulses when a block's last byte is in the output FIFO |

The parameters are `CONTEXTS` (1024), `LINES` (41 free-map lines, 1312 tree words), `IN_DEPTH`
(256) and `OUT_DEPTH` (256). `CONTEXTS` must be a power of two, and `LINES·32` should be
comfortably larger than `CONTEXTS`.

Memory at the defaults comes to 3,727,305 bits:

| memory            | size                  | bits      |
|-------------------|-----------------------|-----------|
| probability nodes | 262,144 × 14          | 3,670,016 |
| tree              | 1312 × 28             | 36,736    |
| totals            | 1024 × 11             | 11,264    |
| LPS ROM           | 512 × 7               | 3,584     |
| free map          | 1312 + 41 valid bits  | 1,353     |
| buffers           | 256 × 9 + 256 × 8     | 4,352     |

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. The reference models are in `tb/ppmh_ref_pkg.sv`:

- an independent PPMH *decoder*: the same context search, the same count rules and an interval
  decoder;
- the LPS formula.

`tb_byacom_core` runs the core at its default size. It compresses several blocks:

- generated text of 256, 1024 and 4096 bytes at order 3;
- 1024 bytes at orders 0 and 4;
- 3000 random bytes;
- a 2000-byte run.

The output ready is toggled at random. Each compressed block is decoded with the reference decoder
and must come back unchanged. The test also counts the following events and fails if any never
happened:

- escapes;
- order −1 codings;
- fresh contexts;
- rollbacks of bytes already in the output FIFO;
- halvings;
- searches ending at the probe limit;
- running out of context areas;
- double-buffer waits;
- coder stalls;
- output stalls.

Typical results on the generated text: ratio 0.40 at 256 bytes, 0.20 at 1 KB and 0.12 at 4 KB
(output/input), at 2.3–3.2 cycles per bit. Random data expands by about 28 %. A long run of one
byte comes close to the floor of 10 cycles per byte (1.26 cycles per bit against 1.25).

The unit testbenches check the following:

| module | what its testbench checks |
|--------|---------------------------|
| context modeller | the tree above, plus random blocks against the reference search on a small instance, to reach probe chains, the search limit and full area tables |
| probability estimator | every committed decision (counts and direction), replayed into the reference decoder |
| LPS table | all 512 entries against the formula |
| range coder, carry buffer, packer | round trips through bit-level models with random rollbacks and stalls |
| FIFOs, RAM, free map, double buffer | against behavioural models |

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_byacom_core \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ppmh_pkg.sv tb/ppmh_ref_pkg.sv tb/tb_byacom_core.sv
./obj_dir/Vtb_byacom_core
```

Replace `tb_byacom_core` with any other `tb_<module>`. The full-size end-to-end run builds in a few
seconds and simulates in under a second.

## Departures and own choices

Taken from the published design:

- the block structure;
- the tree memory layout and sizes (1312 × {10, 10, 8}, 41 × 32 free map, line-valid register);
- the search limit of 10;
- run-time orders 0..4;
- 256-node count trees with 10-bit counts and 14-bit nodes carrying reset and halving flags;
- order-dependent increments;
- speculative coding with shadow registers and a commit/rollback output buffer;
- the termination scheme;
- the 512 × 7 LPS table;
- the 7-bit range;
- single-cycle renormalisation;
- the six-stage coder.

This design's own:

- **Hash and probe step.** The shift of 2 and the step of +1 were chosen here.
- **Increments and scaling.** The increment values (order + 1 for a symbol, +1 for the escape)
  and the halving threshold of 1008 were chosen here.
- **Words and events.** The total-word encoding `{scale pending, total}` and the event set
  between the estimator and the coder were chosen here.
- **Coder arithmetic.** The published coder refers elsewhere for its arithmetic. This design uses
  its own carry-based range coder (a low register with carry, instead of a subend register with
  borrows), its own LPS table contents and its own carry/run buffer. The published design names a
  3-bit zero-run count; here a 16-bit count of pending ones is used, so that no run can stall the
  buffer. Code generator and packer are one stage.
- **Memories.** They have a separate read and write port (the published design uses single-port
  SRAM for the probability data).
- **Not built.** The host command register file is not built; `max_order` is a plain input. A
  decompressor is not part of the design, and the testbenches decode with a behavioural model.

## Known limits

- An empty block (end-of-block with no bytes) produces a termination sequence that the decoder
  cannot tell apart from data.
- A speculative group that produced more bytes than the output FIFO holds would deadlock. A group
  is one byte's attempt in one context, a few bytes at most, so 256 bytes is far from this limit.
- `max_order` must not change inside a block.
