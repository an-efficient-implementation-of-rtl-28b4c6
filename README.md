# MUSRA: a coarse-grained reconfigurable array running AES

MUSRA is a word-level reconfigurable accelerator. A host processor hands it the
inner loops of a program. The accelerator has an 8 x 8 grid of 16-bit
reconfigurable cells (RCs), and each row of the grid is one pipeline stage.
Data streams in through a 512-bit input FIFO and results stream out through a
512-bit output FIFO. Once the pipeline is full, one loop iteration completes
every clock, or every *n* clocks when an iteration spans *n* FIFO rows.

A *context* sets what the grid computes: 128 32-bit words that configure
every cell, the constants and the data addresses. Each cell has two
configuration layers, so the next context is loaded while the current one
runs, and switching contexts costs one clock.

The application used here is AES encryption, split between software and the
array:

- The host runs key expansion, SubBytes and ShiftRows.
- The array runs AddRoundKey and a combined MixColumns + AddRoundKey step
  ("Mix_Add"). Mix_Add turns one 4-byte state column into one result column
  per clock, with a latency of seven clocks.

This repository holds synthesizable SystemVerilog for the whole accelerator and
an AHB-Lite slave port for the host. It also holds testbenches, including an
end-to-end run that encrypts 128 blocks with AES-128 and AES-256 and compares
them with a reference model.

```
           AHB-Lite (host)
                |
          +-----------+        CMD / STATUS / counters
          | musra_ahb |------------------------------+
          +-----------+                              |
           |         |                               |
   +--------------+  +-------------+        +------------------+
   | context mem  |  | data memory |        | context parser   |
   | 16 x 128 x32 |  | 1024 x 512b |        | load / swap / run|
   +--------------+  +-------------+        +------------------+
          |  parser    |         ^   cfg, GRF, LOR |   rca_en, pops, pushes
          +----------->| in DMA  | out DMA         v
                       v         |          +-------------+
                   IN_FIFO 8x512b |          | GRF 2 x 32  |
                       |  broadcast         +-------------+
                       v                          |
            +------------------------------------------+
            | crossbar | row 0: RC00 .. RC07           |
            | crossbar | row 1: RC10 .. RC17           |
            |   ...    |   ...                         |
            | crossbar | row 7: RC70 .. RC77           |
            +------------------------------------------+
                       | PE_OUT + LOR_OUT of one row
                       v
                   OUT_FIFO 8x512b --> out DMA --> data memory
```

## The reconfigurable cell (`musra_rc`, `musra_pe_alu`)

Each cell is a processing element with an output register (OUT_REG, seen as
PE_OUT) and a local register (LOR). Three multiplexers feed it:

| Operand | Sources |
|---|---|
| A | input-FIFO word, crossbar line from the row above, GRF entry, or the cell's own LOR |
| B | the same four sources |
| LOR input | input-FIFO word, crossbar line, or the cell's own result (`LOR_SELF`); it can also hold |

The third operand C is the LOR. It is taken either from the LOR register or,
when `c_byp` is set, straight from the LOR input multiplexer. C is used by
`MAC`, `ADD3` and `XOR3`. The LOR has two uses: it delays a value by one
stage so two paths of a data-flow graph arrive together, or it holds a
per-cell constant.

The datapath (`op_e` in `musra_pkg`):

- Arithmetic: ADD, SUB, ADD3, unsigned and signed MUL (low 16 bits), MAC.
- Logic: AND, OR, XOR, XOR3, NOT.
- Shifts: SLL, SRL and SRA by `B[3:0]`, and SRND, an arithmetic shift that
  adds 2^(B-1) first so the result rounds to nearest.
- Comparison: ABSD (unsigned |A-B|), signed MIN and MAX.
- Two-lane 8-bit ADD8 and SUB8.
- PASSA, and NOP, which holds OUT_REG.

One 17x17 multiplier and one 18-bit right shifter are shared by the multiply
and shift operations.

Both configuration layers sit in the cell. `act_layer` selects the layer that
drives the datapath, and the parser writes the other one. On `swap` the LOR
loads its initial value from the incoming layer.

Timing:

- OUT_REG and LOR update on the rising edge when `en` is high.
- With `en` low the whole array freezes; this is how the array stalls.
- The cell has no combinational loop: `LOR_SELF` is not on the C-bypass path.

### Configuration word (32 bits, one per cell)

| bits | field | meaning |
|---|---|---|
| 4:0 | `op` | operation |
| 10:5 | `a_idx` | FIFO word 0..31, crossbar source 0..15 or GRF entry 0..31 |
| 12:11 | `a_src` | 0 FIFO, 1 crossbar (PRE), 2 GRF, 3 LOR |
| 18:13 | `b_idx` | as `a_idx` |
| 20:19 | `b_src` | as `a_src` |
| 26:21 | `lor_idx` | FIFO word or crossbar source for the LOR input |
| 28:27 | `lor_src` | 0 hold, 1 FIFO, 2 crossbar, 3 own result |
| 29 | `c_byp` | C from the LOR input instead of the LOR register |
| 31:30 | - | reserved |

The function `musra_pkg::rc_word()` builds a configuration word.

## The array and its crossbars (`musra_rca`, `musra_crossbar`)

A crossbar sits above every row, including row 0. Each cell picks its A, B
and LOR inputs from 16 sources:

| Row | Sources 0..7 | Sources 8..15 |
|---|---|---|
| 1..7 | PE_OUT of columns 0..7 of the row above | LOR of columns 0..7 of the row above |
| 0 | input-FIFO words 0..7 | input-FIFO words 8..15 |

The whole input-FIFO head row (32 words) also reaches every cell directly
through the FIFO source. The GRF is shared by all cells.

The array has one enable, so all rows advance or stall together. A value
therefore takes exactly one clock per row, and a data-flow graph is mapped by
placing each operation in the row that matches its depth. Values that must
skip rows are carried in LORs.

## Contexts and the context parser (`musra_context_parser`)

A context is 128 32-bit words in the context memory:

| words | contents |
|---|---|
| 0..63 | configuration word of the RC in row `w/8`, column `w%8` |
| 64..79 | GRF: word 64+i holds entry 2i in [15:0] and entry 2i+1 in [31:16] |
| 80 | [15:0] iteration count N, [18:16] first array row whose outputs are stored, [21:19] input rows per iteration N_I-1, [24:22] output rows per iteration N_O-1 |
| 81 | first data-memory row read by the input DMA |
| 82 | first data-memory row written by the output DMA |
| 83..95 | reserved |
| 96..127 | LOR initial values: word 96+i holds RC 2i in [15:0] and RC 2i+1 in [31:16] (RC index = row*8 + column) |

When the host writes a context number to CMD, the parser does the following:

1. **Load.** It reads the 128 words, one per clock, and decodes each word as
   it arrives. Configuration words and LOR values go into the *inactive*
   layer of each cell. GRF words go into the inactive GRF bank. Words 80..82
   go into shadow registers.
2. **Wait.** A load touches only the inactive layer and bank, so it can run
   while the previous context still executes. The load then waits until that
   context has finished.
3. **Swap** (one clock). The parser:
   - flips the active layer and GRF bank;
   - loads every LOR from its initial value;
   - copies the shadow registers;
   - starts both DMAs and the array.

   It is then free to accept the next command.
4. **Run.** An iteration pops N_I IN_FIFO rows on N_I successive advancing
   clocks. Because the FIFO head is broadcast, stage *s* of the iteration sees
   its row *s*. Load and execution therefore overlap: a loop body with
   operands arriving in two rows needs no extra buffering. The iteration
   delivers N_O output rows from N_O successive array rows, starting at the
   configured first row. A new iteration starts every max(N_I, N_O) clocks,
   so in the common case N_I = N_O = 1 it starts every clock. A valid bit
   follows each iteration down the rows. When the bit reaches an output row,
   that row's outputs are pushed into OUT_FIFO as one row: words 0..7 are
   PE_OUT of columns 0..7, words 8..15 are their LORs, and the rest is zero.
   The DMAs move N*N_I and N*N_O rows.
5. **Stall.** The array freezes for a clock when either:
   - it still needs input and IN_FIFO is empty, or
   - a result is due and OUT_FIFO is full.
6. **Done.** The context ends when the output DMA has written all N rows.
   `ctx_done` pulses, and a pending context swaps in on the next clock.

**Timing of one iteration.** Take a row written into IN_FIFO on clock edge
*t*. It can enter row 0 on edge *t*+1, and its result is in PE_OUT of row *r*
on edge *t*+1+*r*. For Mix_Add the output row is 5, so the result is ready
seven clocks after the FIFO write.

## Memories, FIFOs and DMAs

- **Context memory** (`musra_context_mem`): 16 contexts of 128 words, with
  synchronous reads. The host has one write port and one read port; the
  parser has its own read port.
- **Data memory** (`musra_data_mem`): 1024 rows of 512 bits (64 KiB), with
  one read port and one write port.
  - The host reads and writes 32-bit words at address `row*16 + j`. Word *j*
    holds 16-bit words 2j in [15:0] and 2j+1 in [31:16].
  - The input DMA reads whole rows and the output DMA writes whole rows.
  - The host has priority on each port. A DMA request is granted only in a
    clock without a host access, and a refused DMA repeats its request.
- **GRF** (`musra_grf`): 32 entries of 16 bits, in two banks. The banks swap
  together with the configuration layers.
- **FIFOs** (`musra_fifo`): 512 bits x 8 rows. The head row can be read
  without a read cycle. Push and pop may happen together even when the FIFO
  is full. Overflow and underflow are assertion errors.
- **Input DMA** (`musra_input_dma`): reads N consecutive rows into IN_FIFO.
  It issues a read only while the FIFO, counting the read in flight, has
  room.
- **Output DMA** (`musra_output_dma`): writes N OUT_FIFO rows to consecutive
  rows and pulses `done` after the last one.

## Host interface and programming (`musra_ahb_if`, `musra_top`)

The top is an AHB-Lite slave with zero wait states that accepts 32-bit
accesses only.

| HADDR[21:20] | region |
|---|---|
| 0 | registers |
| 1 | context memory: word `HADDR[19:2]`, so context *k* word *w* is at 0x100000 + 4*(128k + w) |
| 2 | data memory: word `HADDR[19:2]` = row*16 + j |

The registers:

| offset | register |
|---|---|
| 0x00 | CMD (write): load and run context `WDATA[7:0]` |
| 0x04 | STATUS: [0] command waiting, loading or loaded but not yet started; [1] array running; [2] parser loading; [31:16] contexts completed |
| 0x08 | stall cycles: [15:0] input, [31:16] output |
| 0x0C | [15:0] layer swaps, [31:16] loads that overlapped execution |

A typical sequence:

1. Write contexts into free slots.
2. Write input rows into the data memory.
3. Write CMD, poll STATUS[0] until it is 0, and write the next CMD. The
   following context loads while the current one runs.
4. Wait for the completed-contexts count, then read the results.

Reads of the synchronous memories are issued in the AHB address phase.
Writes take place in the data phase. A read that directly follows a write to
the same word gets the written value forwarded.

## AES on the array

**Data layout.** The state is kept in the data memory as one 4-byte state
column per 512-bit row, one byte in the low half of each 16-bit word 0..3.
Column *c* of every block is stored contiguously. Each round then runs four
contexts, one per column position, which differ only in their four
round-key bytes in the GRF.

**Round schedule.** Processing goes round by round over all blocks:

1. Round 0 and the last round use an AddRoundKey context: row 0 XORs FIFO
   words 0..3 with GRF 3..6.
2. Rounds 1..Nr-1 use the Mix_Add context.
3. Between rounds the host reads the results and applies SubBytes and
   ShiftRows. In the test the host does this after all four contexts of a
   round have finished. The hardware would also let the host work on one
   part of the data while the array processes another, because host accesses
   to the data memory take priority and DMAs simply wait.

**Mix_Add** uses the identity `y0 = 2*(x0^x1) ^ (x1 ^ (x2^x3))` and its
rotations. The GRF holds 0x07, 0x01 and 0x1B in entries 0..2 and the key bytes
K0..K3 in entries 3..6. For j = 0..3:

| row | columns 0..3 | columns 4..7 |
|---|---|---|
| 0 | t_j = x_j ^ x_j+1; LOR <- x_j+3 | - |
| 1 | u_j = t_j+2 ^ LOR_j+2 (= x_j+1^x_j+2^x_j+3); LOR <- t_j | t_j >> 7 (GRF0) |
| 2 | v_j = LOR_j << 1 (GRF1); LOR <- u_j | b_j = (t_j>>7) & 1 |
| 3 | idle; LOR <- u_j (from LOR) | m_j = b_j * 0x1B (GRF2); LOR <- v_j |
| 4 | u_j ^ K_j (GRF 3+j) | w_j = m_j ^ v_j |
| 5 | y_j = w_j ^ (u_j ^ K_j) | - |

All indices are mod 4. Row 5, columns 0..3, hold the result column. The
values are 16 bits wide. Only the low byte is the AES byte; bit 8 can be set
because `v` is not masked to 8 bits. The host masks it when it reads the
result.

The array produces one state column per clock. Array time per block, counting
only the array:

| Key | Mix_Add rounds | AddRoundKey passes | Array clocks per block |
|---|---|---|---|
| AES-128 | 9 | 2 | 44 |
| AES-256 | 13 | 2 | 60 |

This does not count the host's table lookups and bus transfers.

The testbench package (`tb/musra_tb_pkg.sv`) builds both contexts:
`mixadd_ctx` and `ark_ctx`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_musra_rc` | 600 random configurations against an integer model of every operation; LOR sources, initial value on swap, hold, C bypass, stall |
| `tb_musra_crossbar` | random selects against direct indexing |
| `tb_musra_rca` | the Mix_Add context on the bare array over 40 columns (7-clock latency, stall hold, LOR initial values) |
| `tb_musra_fifo` | random push/pop against a queue model |
| `tb_musra_grf` | bank and pair writes against a model |
| `tb_musra_context_mem` | random host and parser accesses against a model |
| `tb_musra_data_mem` | host words, DMA rows, priorities and grants against a model |
| `tb_musra_input_dma`, `tb_musra_output_dma` | row order, counts, refused grants, FIFO fill limits, done timing |
| `tb_musra_context_parser` | decoding into layers/GRF/LOR, swap timing, execution and stall rules, overlap of loading with execution, multi-row iterations (3 in, 2 out) |
| `tb_musra_ahb_if` | random bus traffic, including back-to-back read-after-write, against a model |
| `tb_musra_top` | end to end, default parameters: see below |

**End-to-end test.** `tb_musra_top` runs the full design at its default
parameters. A behavioural AHB host encrypts 128 blocks with AES-128 and again
with AES-256. Key 00..1f; block 0 is the FIPS-197 example plaintext. It
compares every ciphertext byte with the reference model. It also spot-checks
that model against the FIPS-197 example ciphertexts (first and last byte). A final
context runs a small loop with two input and two output rows per iteration:
`v = ((x*y) + z) & t - 35`, then `w = v` one stage later, over 40 iterations.

It also checks that each of these happened at least once:

- the 7-clock Mix_Add latency;
- input stalls;
- output stalls, forced by occupying the data-memory write port;
- one layer swap per context;
- context loads overlapping execution;
- host/DMA arbitration.

A run takes about 145,000 clocks and under a second. The 128 blocks fill the
data memory exactly: 512 input rows and 512 output rows.

To simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/musra_pkg.sv tb/musra_tb_pkg.sv \
    tb/tb_musra_top.sv -y rtl --top-module tb_musra_top
./obj_dir/Vtb_musra_top
```

Testbenches that do not use the AES helpers can leave out
`tb/musra_tb_pkg.sv`. Modules are found by name through `-y rtl`. Assertions
on FIFO overflow/underflow and on the bus and parser handshakes are active
with `--assert`.

## Where this design makes its own choices

The source architecture fixes these:

- the 8x8 array of 16-bit cells;
- 512-bit x 8-row FIFOs;
- input-FIFO broadcast;
- crossbars between rows;
- the cell structure: operand multiplexers, LOR and two configuration layers;
- 128-word contexts loaded behind execution;
- iterations that take several input rows and give several output rows, with
  load, execution and store overlapped;
- the AES hardware/software split, and the Mix_Add stage layout and constants.

Everything else here is this design's own choice:

- the opcode list and configuration encoding;
- the context word map;
- GRF double-banking;
- memory sizes (16 contexts, 64 KiB data memory);
- the whole-array stall rule;
- the DMA and arbitration protocols;
- the AHB register map;
- the crossbar routing of Mix_Add operands where the stage layout leaves it
  open;
- the operation used for `w` in the two-row loop test (pass-A), which the
  original example leaves undefined.

**Not built:**

- **Decryption.** There is no InvMixColumns context; only encryption is
  mapped and tested.
- **System-side DMA.** The context and data DMA controllers that would fetch
  from system memory are not built. The host moves everything through the
  AHB slave, and only the array-side input and output DMAs exist.
- **8-bit SIMD.** Only two-lane add and subtract exist; no other 8-bit
  operations are built.
- **Host-side parts.** The host processor, bus fabric, clock generation and
  software tasks lie outside this RTL. The AES software side exists only as
  a testbench model.

**Remaining lint warnings** are of two kinds:

- Signals or package constants that a particular module does not use, such
  as the top bits of the 17x17 product and the reserved configuration bits.
- Verilator's note that the reset is used both asynchronously and
  synchronously. The synchronous use is only the `disable iff` of the
  assertions in the FIFO, the parser and the bus interface; all flip-flops
  use an asynchronous active-low reset.
