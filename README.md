# A reconfigurable arithmetic pipe for vector and scalar instructions

This is SystemVerilog for the arithmetic pipeline of the Texas Instruments
Advanced Scientific Computer (ASC), a 1970s vector machine. Its central idea
is that one short pipeline of eight sections runs every arithmetic
instruction, scalar or vector. The pipeline is not wired for any single
operation. Each clock, a word read from a control ROM tells every section
where to take its inputs from and what to compute. The same adders,
shifters and multiplier tree therefore form a two-stage path for a fixed
add, a five-stage path for a floating add, and a loop for a floating dot
product.

Vectors stream one result per clock once the pipe is full. Scalars go
through only the sections they need, so they do not pay for the length of
the vector pipe.

The design covers one MBU/AU pipeline:
- the arithmetic unit (AU) with its eight sections;
- the ROM control and the sequencer that steps through it;
- the operand-fetch side of the memory buffer unit (MBU), which streams two
  vectors from interleaved memory with a three-octet look-ahead.

The instruction processor (IPU) that issues instructions, and the memory
itself, are outside the design and appear as ports.

## The eight sections

Every section has an output register and runs every clock. A section
ignores a neighbour whose output it has not been told to select. All
sections live in `asc_au`, one file per section.

| Section | File | What it does |
|---|---|---|
| Input | `asc_input.sv` | Registers the operand pair from the MBU. Either operand can be replaced by the previous result (the *short circuit*), so dependent scalar instructions need not go through the register file. |
| Multiply | `asc_multiply.sv` | 32 x 32 bits to 64 bits. Radix-4 Booth recoding makes 17 partial products plus a row of negation bits. A Wallace tree of full adders (18 -> 12 -> 8 -> 6 -> 4 -> 3 -> 2 rows) leaves a *pseudosum* and a *pseudocarry*. No carry-propagate adder sits here, so a product is never complete until it reaches the Accumulator. Fixed operands are two's complement. Floating operands are sign/magnitude 32-bit words whose exponent bits are dropped; the product exponent `ea + eb - 64` is formed beside the tree. |
| Accumulate | `asc_accumulate.sv` | Adds pseudosum + pseudocarry, plus its own previous output when told to. The fixed dot product uses that feedback. One row of 3:2 adders feeds a 64-bit carry-lookahead adder. |
| Exponent Subtract | `asc_expsub.sv` | Compares two floating exponents. Loads the *Large* and *Small Operand Registers*. Computes the alignment shift in hex digits (0..14, i.e. 0..56 bits). It also holds the compare logic for fixed and floating compares. |
| Align | `asc_align.sv` | Shifts the small fraction right by whole hex digits in one clock. Also does all right shifts (logical, arithmetic, circular) of 0..64 bits in two clocks: hex digits first, then 0..3 bits. |
| Add | `asc_add.sv` | A 64-bit carry-lookahead adder with two levels of lookahead: 4-bit groups and 16-bit blocks (`asc_cla64.sv`). It does fixed add/subtract with an overflow flag, and the sign-magnitude sum of aligned floating fractions. A second adder forms `small - large` so that a negative difference needs no extra clock. |
| Normalize | `asc_normalize.sv` | Normalizes floating results by hex digits. It shifts right one digit on a carry out of the fraction, and left by the number of leading zero digits. It flags exponent overflow and underflow. It also does all left shifts, in the same two steps as Align. |
| Output | `asc_output.sv` | Selects which section's register is the result. Computes AND, OR and XOR directly from the Input section. Marks the result for the IPU (scalars, dot products) or the MBU (vector elements). |

How the sections connect:
- The main chain is Input -> Multiply -> Accumulate -> Exponent Subtract ->
  Align -> Add -> Normalize.
- The Accumulator also feeds itself, the Normalizer and Output.
- The Normalizer feeds back into Exponent Subtract.
- Every section feeds Output.
- Input feeds Output directly, for the logical instructions.

These links follow the original's block diagram. The original's text also
has Exponent Subtract (compares, floating add) and Add (fixed add) take
operands from Input. This design does the same. It also lets Align and
Normalize take the shift operands from Input, which is its own choice.

## Number formats

Fixed point is 64-bit two's complement. Floating point is sign/magnitude with
a 7-bit exponent of base 16, in excess-64:

```
64-bit  [63] sign  [62:56] exponent  [55:0] fraction (14 hex digits)
32-bit  [31] sign  [30:24] exponent  [23:0] fraction (6 hex digits)
value = (-1)^sign * 0.fraction * 16^(exponent - 64)
```

A floating number is normalized when its top hex digit is non-zero. Zero is
all zeros.

Inside the pipe, floating values travel unpacked as `ufloat_t`, which has a
10-bit signed exponent. Intermediate exponents may then leave 0..127 until
the Normalizer checks them:
- Underflow gives a true zero and raises `result_unf`.
- Overflow keeps the low 7 exponent bits and raises `result_ovf`.

Additions truncate. There is no guard digit, so a digit shifted out in Align
is lost.

## Control: one ROM word per section-clock

`asc_control_rom` is 512 words by 256 lines. Its contents are computed at
elaboration from `rom_word()` in `asc_au_pkg`, so no data file is needed.

The low 46 lines form a `ctl_t`. It has one field per section, plus:
- `fetch`: take the next operand pair;
- `b1` and `b2`: two next addresses;
- `done`: last word of the instruction.

A word controls the sections in the clock it is read. The Output section's
fields act one clock later, on the data the sections registered in that
clock.

Each instruction owns 16 addresses starting at `opcode * 16`. The floating
dot product needs 21 words and spills into slot 22, so opcodes 22 and 23 are
not used. Undefined opcodes (22, 23, 30, 31) read idle words and must not be
issued.

**Scalars** read one word per internal section used:

| Instruction | Words | Path | Issue to result |
|---|---|---|---|
| fixed add, subtract, logical, compare | 1 | Input -> Add (or Exp. Subtract) -> Output | 3 clocks |
| fixed multiply | 2 | Input -> Multiply -> Accumulate -> Output | 4 clocks |
| floating multiply | 3 | ... -> Accumulate -> Normalize -> Output | 5 clocks |
| floating add/subtract | 4 | Input -> Exp. Subtract -> Align -> Add -> Normalize -> Output | 6 clocks |
| shifts | 2 | Input -> Align (or Normalize) twice -> Output | 4 clocks |

**Vectors** use the two next-address fields. `asc_sequencer` stands for the
MBU's part of the control. Normally it follows `b1`. When the last operand
pair has been fetched (end of loop), it follows `b2` instead.

A vector program has three parts:
- **Fill words** admit the first pairs while the pipe fills.
- **One steady word** has `b1` pointing at itself. The pipe stays in that
  configuration, taking one pair and giving one result per clock.
- **Drain words**, reached through `b2`, let the last elements leave.

The sequencer counts the pairs the pipe takes (`vlen` of them). Because
`b2` is taken as soon as the last pair is fetched, a vector shorter than the
fill sequence goes straight into its drain.

**Vector shifts** cannot follow this pattern. A shift occupies Align (or
Normalize) for two clocks, so the steady state is a loop of two words:
- a hex-step word, which fetches nothing;
- a bit-step word, which fetches the next pair, selects the output and has
  `b1` pointing back to the hex word.

The result is one element every two clocks. The Input register holds each
pair through both steps.

Each section also registers a one-clock *new data* flag beside its data. The
Output section emits a result only when the flag of its selected source is
set. Short vectors and drain steps therefore never emit stale values, and
each scalar gives exactly one result.

## The floating dot product

The eight-section split exists for this instruction, and it is the least
obvious part of the design.

The product `A[i]*B[i]` leaves the Accumulator at clock *t*. It needs four
more sections (Exponent Subtract, Align, Add, Normalize) before a sum that
includes it is ready. By then, products `i+1 .. i+3` are already in flight.

So the pipe keeps **four partial sums** in circulation. Exponent Subtract
pairs the product leaving the Accumulator with the sum leaving the
Normalizer:

```
S[i] = A[i]*B[i] + S[i-4]            (S[-4..-1] = 0)
chain k holds the sum of products i with i = k (mod 4)
```

In the steady word, one product enters and one partial sum finishes every
clock. After the end of loop, the drain words reduce the four chains to one
number, still using the same loop:

1. Exponent Subtract *parks* one chain sum in a hold register (`EXS_HOLD`).
   The next chain sum to leave the Normalizer is added to it (`EXS_COMB`).
   This happens twice, giving `(S_c + S_c+1)` and `(S_c+2 + S_c+3)`.
2. The two pair sums are combined the same way, and the total leaves through
   Output to the IPU.

`c = max(n, 8) mod 4` names the chain that finishes first. The order of the
additions is fixed and known, so a bit-exact reference model can follow it
(`tb/asc_ref_pkg.sv` does). The result arrives `n + 15` clocks after issue
for `n >= 8`.

The floating dot product takes 32-bit operands. The partial sums and the
result are 64-bit floating.

The fixed dot product is simpler. Products are summed in the Accumulator
through its feedback input, one per clock, with no circulation.

## The MBU operand streams

`asc_mbu_stream` fetches one vector from memory. It reads octets (eight
consecutive, aligned words, one from each of eight interleaved banks). It
keeps at most three octets requested or buffered ahead of the pipe. It
delivers one word per clock and frees a buffer slot when its last needed word
is taken.

`asc_pipe` runs two streams, A and B. It starts the arithmetic pipe only
when both are *primed*: three octets held, or the whole vector held if it is
shorter. It then pops one word from each stream whenever the pipe takes a
pair.

The memory port is a simple request/ready handshake with in-order returns
(`mem_rvalid`, 512-bit `mem_rdata`). The pipe has no mid-vector stall. It
relies on the look-ahead keeping ahead of it. An assertion in `asc_pipe`
fires if a stream would run dry. The test memory (a new octet every 2
clocks, returned 6 clocks after the request) keeps up. A pipe one element
per clock needs at least one octet every 8 clocks per stream. Memory slower
than that would need a stall, which is not built.

## Interfaces

`asc_pipe` is the top. These are its ports (clock `clk`, asynchronous
active-low reset `rst_n`):

| Port | Dir | Meaning |
|---|---|---|
| `issue`, `issue_ready` | in/out | issue one instruction when ready |
| `opcode` | in | `asc_au_pkg::opcode_e` |
| `is_vector`, `vlen` | in | vector instruction and its length (1..65535) |
| `base_a`, `base_b` | in | word addresses of the A and B vectors |
| `scalar_a`, `scalar_b` | in | scalar operands from the IPU |
| `sc_a`, `sc_b` | in | use the previous result as operand A or B |
| `mem{a,b}_req/addr/ready` | out/out/in | octet request per stream (`addr` is an octet address) |
| `mem{a,b}_rvalid/rdata` | in | octet returned, in request order |
| `result`, `result_valid` | out | one pulse per result |
| `result_to_ipu` | out | 1 for scalars and dot products, 0 for vector elements |
| `result_cc` | out | compare result: 0 equal, 1 less, 2 greater |
| `result_ovf`, `result_unf` | out | fixed overflow / exponent overflow; exponent underflow |

`asc_au` can be used on its own. It takes operand pairs on
`opnd_a`/`opnd_b`, and asserts `opnd_take` in each clock it consumes one.

Parameters:
- `LEN_W` = 16 (vector length width);
- `ADDR_W` = 24 (word address width);
- `LOOKAHEAD` = 3 (octets per stream);
- `ROM_DEPTH` x `ROM_WIDTH` = 512 x 256 (in the package).

Instructions: `ADD SUB AND OR XOR CMP CMPF FAD FSB MPY FMP SRL SRA SRC SLL
SLC` (scalar, codes 0-15), `VADD VFAD VMPY VCMP VDPX VDPF` (vector, codes
16-21), `VSRL VSRA VSRC VSLL VSLC` (vector shifts, codes 24-28) and `VCMPF`
(vector floating compare, code 29). The shift
count is operand B, bits 6:0, clipped to 64. For vector shifts, each element
takes its count from the B vector.

## Where this design departs from, or adds to, the original

- The ROM contents, the control-word layout and the opcode numbering are
  this design's. The original ROM drove about 180 signals. This one uses 46
  lines, at a coarser grain.
- The new-data flags are an addition. In the original, timing came from the
  ROM sequence alone.
- How the four dot-product partial sums are combined (hold register, fixed
  pairing order) is this design's. So are the drain length and the
  resulting latency.
- The bit placement of the floating format, truncation without a guard
  digit, and the overflow/underflow handling are assumptions.
- The fixed multiply uses two ROM words (Input -> Multiply -> Accumulate ->
  Output), as the description of the original states. A diagram of the
  original shows a longer path through the adder sections for this case;
  that path is used here for the floating dot product instead.
- A right shift by the full 64 bits is allowed in the hex step (0..64 rather
  than 0..60), so that every count 0..64 can be reached in two clocks.
  Left shifts with the arithmetic kind act as logical shifts.

## Not built

- **Divide and double-length multiply.** The original iterates through
  Multiply and Accumulate, but the iteration is not described.
- **32- and 16-bit fixed word sizes.**
- **Add Magnitude and similar add-type variants.**
- **Select, Replace and Map.**
- **The IPU** (instruction fetch, decode, address hazards, 48 registers).
- **The MBU's result stores and non-unit-stride address generation.**
- **The memory itself.** `tb/asc_mem_model.sv` is a behavioural stand-in
  with placeholder timing: 6 clocks latency, a new octet every 2 clocks.
- **Multi-pipeline systems.** Up to four MBU/AU pipelines per IPU are simply
  copies of `asc_pipe`.

## Simulating

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. The package files must come first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/asc_au_pkg.sv tb/asc_ref_pkg.sv tb/tb_asc_pipe.sv \
    --top-module tb_asc_pipe -o sim
./obj_dir/sim
```

Other modules are found through `-Irtl -Itb`. `-Wno-fatal` keeps the
testbenches' width warnings (random-number assignments) from stopping the
build. Replace `tb_asc_pipe` with any
other testbench.

`tb/asc_ref_pkg.sv` is an independent integer model of the floating
arithmetic. It covers unpacking, exact products, hex alignment with
truncation, and normalization. The testbenches compare results bit for bit
against it.

- `tb_asc_au` checks the latency of each scalar instruction, one result per
  clock for vectors (one per two clocks for vector shifts), and the
  dot-product latency.
- `tb_asc_pipe` runs the whole pipeline at its default parameters with two
  memory models. It covers vectors of lengths 1 to 60 at aligned and
  unaligned addresses, and scalars with and without the short circuit. It
  counts how often each mechanism happened and fails if any never did. The
  mechanisms are:
  - a full look-ahead buffer;
  - an octet boundary crossing;
  - waiting for the look-ahead;
  - the end-of-loop branch;
  - steady-word looping;
  - the short circuit;
  - alignment;
  - a carry and leading-zero normalization;
  - accumulator feedback;
  - dot-product pairing;
  - two-step shifts;
  - a vector at two clocks per result;
  - overflow and underflow.

Registers without reset are not read before they are written. The
testbenches also pass when every register starts at a random value
(`+verilator+rand+reset+2`).
