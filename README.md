# Low-power instruction bus decoder

An embedded processor fetches an instruction from program memory nearly every
cycle, and when that memory is off chip, every line of the 32-bit instruction
bus that flips charges a large pad and board capacitance. Most execution time
is spent in a few hot loops (hot-spots), so the same short runs of
instructions cross the bus again and again. This design cuts the bit
transitions of those runs by storing the hot-spot code in memory in an
*encoded* form, chosen offline so that successive bus words differ in as few
bits as possible. A small decoder next to the CPU turns the encoded words back
into the original instructions, using tables loaded before the hot-spot runs.
Nothing is encoded in hardware: encoding is a static step done on the program
image.

This repository holds the SystemVerilog of that decoder, with self-checking
testbenches and a testbench-side model of the offline encoder.

## The encoding

**Partitions.** Each 32-bit instruction is cut into partitions of `PART_W`
bits. When 32 is not a multiple of `PART_W`, the left-over bits, chosen among
those that rarely toggle, are sent as they are. The default configuration uses
six 5-bit partitions of a MIPS word and leaves bits 30 and 5 unencoded:

| partition | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|
| bits | 31, 29:26 | 25:21 | 20:16 | 15:11 | 10:6 | 4:0 |

Partition *p* is made of encoded bits *p*·5 … *p*·5+4, counting only the bits
set in `ENC_MASK` and starting from the LSB. So a different `PART_W`/`ENC_MASK`
pair gives a different layout with no other change.

**Basic blocks.** Only basic blocks (straight-line code with one entry) are
encoded. The first instruction of a block is stored unchanged. Each later
instruction *i* is encoded partition by partition. Let X be the original
partition, Y the value on the bus, and *i−1* the previous instruction of the
same block. The encoder picks the codeword Y<sub>i</sub> nearest in Hamming
distance to Y<sub>i−1</sub> that one of the decoding functions maps back to
X<sub>i</sub>.

**Decoding functions.** There are two kinds of transformations, each with the
16 two-input Boolean operations:

* Type 1: X<sub>i</sub> = X<sub>i−1</sub> OP Y<sub>i</sub>
  (previous *original* partition)
* Type 2: X<sub>i</sub> = Y<sub>i−1</sub> OP Y<sub>i</sub>
  (previous *bus* partition)

The operation is applied bit by bit within the partition. A 5-bit function
code names one of the 32: bit 4 selects the type, and bits 3:0 give the
operation number *n*. Operation *n* is F<sub>n</sub>(A,B) = n[{~A,~B}], where A
is the history operand and B = Y<sub>i</sub>. This numbering gives F1 = A·B,
F5 = B (identity), F6 = A⊕B, F9 = xnor, F10 = ¬B and F14 = nand. Example:
X<sub>i−1</sub> = 10011, Y<sub>i</sub> = 01101, Type 1 nand (code 14) gives
X<sub>i</sub> = 11110.

Many operations cannot produce every X<sub>i</sub>. For example, nand always
gives 1 where the history bit is 0. Only the B, ¬B, xor and xnor kinds (either
type) can decode every pattern.

**Function subsets.** Storing a 5-bit code for every partition would make the
table large. Instead, a few functions, `NUM_FUNCS` (= 4), are chosen per
hot-spot. Each partition then stores only a 2-bit index into that subset. The
selection rule, which the testbench implements, is:

1. Pseudo-encode the hot-spot with all 32 functions.
2. Count, for each function, how many partitions it could encode at the
   minimum transition count.
3. Keep the `NUM_FUNCS` most frequent functions.

A transformation-table entry is therefore 6 × 2 + 1 = 13 bits per encoded
instruction, the extra bit marking the block's last instruction.

## The decoder

```
 CPU ──cpu_req/addr──► instruction fetcher ──mem_req/addr──► address bus
                        │  tag FIFO (PC of each word in flight)
 instruction bus ──mem_rdata──►│
                        ▼ rsp_pc, rsp_word
                      BBIT ──hit, TT index──► control ──ptr──► TT (sync read)
                                                 │               │ 6 × 2-bit index, E
                  history X(i-1), Y(i-1) ──► decoding logic ◄─ TSIR (4 × 5-bit codes)
                                                 │ restored word
                     raw word ──► mux (0 raw / 1 decoded) ──► output register ──► CPU
```

* **Instruction fetcher** (`ibe_instr_fetcher`). It forwards the CPU's PC
  request to the address bus and keeps the PC of each request in flight in a
  FIFO of `MAX_OUTSTANDING` entries. Each returning bus word therefore leaves
  the fetcher together with its PC.
* **BBIT** (`ibe_bbit`), the basic block identification table. It is an
  associative table of start PCs of encoded blocks, each with the TT index of
  the block's first entry. All entries are compared in parallel.
* **TT** (`ibe_tt`), the transformation table. It holds one 13-bit entry per
  encoded instruction, stored consecutively per block. It has a synchronous
  read port, like an SRAM.
* **TSIR** (`ibe_tsir`), the transformation subset identification registers:
  `NUM_FUNCS` 5-bit registers with the hot-spot's function codes. Each
  partition looks up its own code with its TT index.
* **Decoding logic** (`ibe_decoding_logic`, `ibe_logic_unit`). It takes the
  partitions apart, runs one universal logic unit per partition, and puts the
  word back together. Unencoded bits pass through.
* **Control and output mux** (`ibe_decoder`). This is the state machine and
  history registers described below.

### How a block goes through

For every word arriving from the bus (call it *w*, fetched at *pc*):

1. **BBIT hit** (*pc* starts an encoded block). *w* is the unencoded first
   instruction and goes to the CPU as it is. The history registers take *w*
   as both X<sub>i−1</sub> and Y<sub>i−1</sub>. The block is marked open, and
   the TT pointer is set to the block's index.
2. **Block open and *pc* = previous PC + 4.** *w* is decoded using the TT
   entry at the pointer. The restored word goes to the CPU and into
   X<sub>i−1</sub>, and *w* goes into Y<sub>i−1</sub>. If the entry's E bit is
   set, the block closes. Otherwise the pointer moves to the next entry.
3. **Anything else.** This covers cold code, a jump out of the middle of a
   block, or an exception. *w* passes raw and any open block closes.

A block is entered only at its start, so a fetch that breaks the sequence can
never need decoding. A loop that branches back to its own first instruction
hits the BBIT again and restarts cleanly.

### Timing

* The address path is combinational (`mem_addr = cpu_addr`).
* The restored word appears at `cpu_rvalid`/`cpu_rdata` exactly one clock
  after the word arrived at `mem_rvalid`. The output register is the only
  added latency.
* The TT is read a cycle ahead: the next pointer value is its read address.
  So the entry for a word is ready when the word arrives, and words can
  arrive every cycle.
* With `MAX_OUTSTANDING = 2`, a memory that answers one cycle after the grant
  streams one word per cycle.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cpu_req`, `cpu_addr` | in | 1, 32 | fetch request and its PC |
| `cpu_gnt` | out | 1 | request accepted this cycle (`cpu_req && cpu_gnt`) |
| `cpu_rvalid`, `cpu_rdata` | out | 1, 32 | original instruction, in request order |
| `cpu_rdecoded` | out | 1 | that word went through the decoding logic |
| `mem_req`, `mem_addr` | out | 1, 32 | address bus |
| `mem_gnt` | in | 1 | memory accepts the request |
| `mem_rvalid`, `mem_rdata` | in | 1, 32 | instruction bus; one pulse per accepted request, in order, ≥ 1 cycle later |
| `cfg_we`, `cfg_sel`, `cfg_addr`, `cfg_wdata` | in | 1, 2, 16, 128 | table write port |

## Loading the tables

Tables are written one entry per clock through the configuration port. Load
them before the hot-spot is entered, not while a block is being decoded.

| `cfg_sel` | `cfg_addr` | `cfg_wdata` |
|---|---|---|
| `CFG_BBIT` (0) | entry 0..39 | [31:0] start PC of the block, [47:32] TT index of its first encoded instruction, [63] valid |
| `CFG_TT` (1) | entry 0..944 | [0] E (last instruction of the block), [2p+2:2p+1] TSIR index of partition p |
| `CFG_TSIR` (2) | register 0..3 | [4:0] function code |

For a block of *L* instructions starting at TT index *t*:

* TT entries *t* … *t+L−2* hold instructions 1 … *L−1*.
* Entry *t+L−2* has E set.
* Blocks of one instruction need no BBIT entry.

After reset:

* every BBIT entry is invalid, so every word passes raw;
* every TSIR register holds the identity code 5.

To move to another hot-spot, software rewrites the four TSIR registers and
whatever BBIT/TT entries it needs.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 32 | bus width (only 32 is supported) |
| `PART_W` | 5 | partition width |
| `ENC_MASK` | `32'hBFFF_FFDF` | bits that are encoded; their count must be a multiple of `PART_W` |
| `NUM_FUNCS` | 4 | TSIR registers per hot-spot (2, 4, 8, 16 or 32) |
| `TT_DEPTH` | 945 | TT entries (945 × 13 bits = 1.5 KByte) |
| `BBIT_ENTRIES` | 40 | BBIT entries (40 × (30-bit PC + 10-bit index) = 0.2 KByte) |
| `MAX_OUTSTANDING` | 2 | fetches in flight |

The default is the 4-function, 5-bit configuration that gave the largest
energy saving in the published evaluation. The TT and BBIT sizes are the table
sizes that evaluation's energy estimate assumed, converted to entries.

Other configurations of that evaluation need only a parameter change:

* 2 to 32 functions;
* partitions of 2 to 6 bits: `PART_W = 4` and `ENC_MASK = '1` give eight 4-bit
  partitions, and `PART_W = 6` with the default mask gives five 6-bit ones;
* larger or smaller TT sizes.

TT entry width is always `NUM_PARTS × log2(NUM_FUNCS) + 1`.

With the defaults, the six benchmark kernels of that evaluation fit as
follows:

* The TT needs at most 817 entries (LU), so the table holds every kernel.
* The BBIT holds up to 40 blocks. That is enough for five of the six kernels
  with every block encoded at once.
* FFT, with 82 blocks, must be loaded as two or more hot-spots.

## Departures and choices

The block structure follows the published scheme: the four components, the
unencoded first instruction, one TT entry per later instruction with its end
bit, the TSIR indirection, the two transformation types and the raw/decoded
output mux. The following are this implementation's own choices:

* **Handshakes.** The fetch port uses request/grant, and the memory port
  returns in-order response pulses. The fetcher's tag FIFO pairs each word
  with its PC.
* **Configuration port.** The single shared write port and its data layout
  are this design's own.
* **TT storage.** The TT uses a synchronous read that runs a cycle ahead. Its
  entry bit order (E at bit 0) is a choice.
* **Output register.** The output is registered, adding one cycle of latency.
  The source describes no pipeline.
* **Leaving a block.** A fetch that is neither a BBIT hit nor the next
  sequential PC closes the open block.
* **Partition layout.** The default mask leaves bits 30 and 5 unencoded,
  taken from the 5-bit partition example.
* **Function codes.** The code layout (bit 4 = type) is a choice.
* **One TSIR bank per hot-spot.** The published evaluation also lets each
  basic block have its own function subset. Here that costs a TSIR reload
  between blocks, since there is no per-block TSIR set.
* **Reset values.** Reset invalidates the BBIT and sets the TSIR to identity.
  The TT is not reset.
* **Encoder fallback.** The encoder model adds one rule of its own: if none of
  the four selected functions can decode every pattern, the fourth slot takes
  the best one that can. This keeps every partition encodable.

Not built: the offline tools (block selection, function selection, code
rebuilding), the CPU, and the memory. The testbenches model the encoder and
the memory.

## Verification

Each module has a self-checking testbench in `tb/`, and each ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_ibe_logic_unit` | all 32 codes, exhaustively, against the function table written out by name, plus the nand example |
| `tb_ibe_tsir` | reset to identity, writes, per-partition reads |
| `tb_ibe_decoding_logic` | whole-word restoration against an explicit partition map |
| `tb_ibe_tt` | the full 945-entry table: one-cycle read, read-old on collision |
| `tb_ibe_bbit` | 40 entries: hits, misses, index, invalidation, reset |
| `tb_ibe_instr_fetcher` | PC tagging and order under random grant and latency; the outstanding limit |
| `tb_ibe_decoder` | end to end at the default parameters (see below) |
| `tb_ibe_configs` | end to end at eight other configurations: 2, 4, 8 and 32 functions with 2- to 6-bit partitions |
| `tb_ibe_mmul` | end to end on a hand-assembled MIPS matrix-multiply kernel (16 x 16), at the default parameters |

`tb_ibe_decoder` has three parts:

1. **Program.** It builds a MIPS-like program: cold code plus 40 basic blocks
   in two hot-spots.
2. **Encoding.** It selects each hot-spot's functions, encodes the program,
   and loads the tables.
3. **Fetch trace.** It runs loops over the blocks, with fall-through between
   blocks, jumps out of a block half way, cold code (some of it running into a
   block start), a TSIR reload between hot-spots, random memory grant and
   latency, and CPU bubbles.

Every word must come back as the original instruction, with the right
`cpu_rdecoded` and exactly one cycle of added latency. Every one of those
mechanisms must occur at least once. The encoded bus must show fewer bit
transitions than the unencoded one for the same fetch sequence; on the
synthetic program it shows roughly a 28 % reduction. That number describes
random MIPS-like code, not real benchmarks.

`tb_ibe_configs` and `tb_ibe_mmul` both use the harness `ibe_tb_cfg_run`,
which encodes a program, loads the tables and checks every fetched word
against the original. `tb_ibe_configs` gives each configuration its own
random program and reports reductions from about 21 % to 76 %. Those numbers
come from synthetic code and are not comparable with each other. The kernel in
`tb_ibe_mmul` has seven basic blocks, all encoded as one hot-spot, and is
fetched along its real loop control flow (64102 fetches). It shows about a
14 % reduction. It is a hand-written kernel, not the compiled benchmark
program, so its figure is not the published Mmul result.

To run a testbench with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ibe_pkg.sv tb/ibe_tb_ref_pkg.sv tb/tb_ibe_decoder.sv \
    --top-module tb_ibe_decoder -o sim
./obj_dir/sim
```

Replace `tb_ibe_decoder` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ibe_pkg.sv rtl/ibe_decoder.sv`.
The simulator is two-state, so the testbenches reset or initialise everything
they read.

## Files

* `rtl/ibe_pkg.sv`: function codes, configuration-bus layout, helper
  functions
* `rtl/ibe_decoder.sv`: top level, with control, history and output mux
* `rtl/ibe_instr_fetcher.sv`, `rtl/ibe_bbit.sv`, `rtl/ibe_tt.sv`,
  `rtl/ibe_tsir.sv`, `rtl/ibe_decoding_logic.sv`, `rtl/ibe_logic_unit.sv`:
  the components
* `tb/ibe_tb_ref_pkg.sv`: reference function table and partition map
* `tb/ibe_tb_imem.sv`: behavioural instruction memory with transition
  counter
* `tb/ibe_tb_cfg_run.sv`: parameterised encode-load-fetch harness used by
  `tb_ibe_configs` and `tb_ibe_mmul`
* `tb/tb_*.sv`: testbenches
