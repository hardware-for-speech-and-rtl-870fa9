# Hardware for speech and audio coding

Speech and audio codecs on small embedded processors spend most of their
cycles in a few tight loops and on awkward data formats. This RTL provides
three independent pieces of hardware that remove such bottlenecks. Each one
is a small addition to an ordinary DSP or RISC data path:

- **A. Bit-addressed loads and stores.** A memory access unit lets a 32-bit
  RISC processor load or store a variable of any width from 1 to 32 bits at
  any *bit* address, in a single instruction. Samples from a 13-bit
  converter, or 9- to 11-bit compression codewords, can then be packed back to
  back with no padding. No shift-and-mask code is needed.
- **B. Accelerators for the G.723.1 codebook search.** These are functional
  units for the fixed-codebook (MP-MLQ) search of the G.723.1 speech coder:
  - a conditional move that also records the loop index;
  - an address generator that forms `base + |l - REG|` and whose sign flag
    zeroes a multiplier operand;
  - a down-counting loop counter with a variable step;
  - a bit-serial divider, a normalisation unit, an `amax` instruction and a
    merged add-then-shift.

  With these units, one step of each inner search loop takes one clock
  cycle.
- **C. Reduced floating point for an MP3 decoder.** The data path uses a
  20-bit floating-point format instead of wide fixed point: 1 sign bit, a
  6-bit exponent and a 13-bit mantissa. Memory holds a 15-bit format in 16-bit
  words: 1 sign bit, a 5-bit exponent and a 9-bit mantissa. The unit consists of
  load and store converters and a multiply-accumulate unit whose accumulator
  has the same 20-bit format as the registers.

The three designs share nothing but clock and reset. The top module
`speech_audio_hw_top` places them side by side, and each has its own ports.

---

## A. Bit-addressed memory

### Instructions

The processor keeps its normal word load and store. Two extra instructions
use the 16-bit immediate field differently:

| field | bit load | bit store |
|---|---|---|
| opcode `insn[31:26]` | `0x1C` | `0x1D` |
| Length (0 means 32) | `insn[15:11]` | `insn[25:21]` |
| Mode | `insn[10:8]` | `insn[10:8]` |
| signed bit offset | `insn[7:0]` | `insn[7:0]` |
| RA (base: a bit address) | `insn[20:16]` | `insn[20:16]` |
| RD / RB (data register) | RD `insn[25:21]` | RB `insn[15:11]` |

The store immediate is split around the RB field, so Length moves to
`insn[25:21]`. The word load `l.lwz` is `0x21` and the word store `l.sw` is
`0x35`. Both use a 16-bit signed byte offset.

Mode bits:
- bit 0 selects sign extension;
- bit 1 selects *fractional* mode: a load places the variable at the top of
  the register and clears the bits below it, and a store takes the variable
  from the top of the register instead of the bottom;
- bit 2 is reserved.

`bit_lsu_decode` turns the instruction and the RA value into the signals the
memory controller needs. It computes:
- `use_bit_mode`, `length` and `mode`;
- the address: RA + offset, which is a bit address in bit mode and a byte
  address otherwise;
- the register indices.

### Bit order

Bit address 0 is bit 31 (the MSB) of word 0. Address 31 is bit 0 of word 0,
and address 32 is bit 31 of word 1. A variable is a run of `length` bits read
MSB first. It may continue from the bottom of one word into the top of the
next.

### How a load works (`bit_memory_controller`)

The word holding the first bit is read. If the variable crosses into the next
word, that word is read as well. The controller takes the two words as one
64-bit value. It shifts the variable to the bottom of the result and then
zero- or sign-extends it. In fractional mode it shifts the variable to the top
instead. For a word load the whole word passes through unchanged.

### How a store works

The register value is shifted into its place within a 64-bit window. A
64-bit write mask holds `length` ones at the same place. The upper half of the
window and of the mask goes to the first word, and the lower half to the next
word. The memory (`bitmask_dmem`) has a write enable for each bit. A store
therefore never needs to read the memory first, and neighbouring variables in
the same word are left untouched.

### Timing and the stall

- The data memory has one cycle of read latency.
- A load inside one word returns `rvalid`/`rdata` in the cycle after the
  controller accepts it.
- A store inside one word takes one cycle.
- An access that crosses a word boundary needs a second memory access in the
  next cycle. For that cycle `stall` is high and `req_ready` is low. The
  processor must hold its request. A crossing load returns its data one cycle
  later than a non-crossing one.
- Accesses that stay inside a word run back to back, one per cycle.

An assertion in the controller checks that it never accepts a request while
it stalls.

In the top level, `bm_issue`/`bm_insn`/`bm_ra_val`/`bm_rb_val` are what the
processor presents. It must hold them while `bm_ready` is low. Load results
come out on `bm_rvalid`/`bm_rdata` together with the destination register
number `bm_rd`. The processor itself, and the compiler support for the new
instructions, are not part of this RTL.

---

## B. G.723.1 search accelerators

The fixed-codebook search of the 6.3 kbit/s G.723.1 coder places 5 or 6
pulses in a 60-sample subframe. Its cost is dominated by two inner loops.

**Pulse search** (positions `l` = 0, 2, …, 58):

    WrkBlk[l] = L_msu(WrkBlk[l], Pamp, ImrCorr[|l - Ploc|]);
    if (|WrkBlk[l]| > Acc1) { Acc1 = |WrkBlk[l]|; index = l; }

**Convolution over the pulses only** (for each of the 60 outputs):

    for each pulse j:  if (l >= Ploc[j]) Acc0 = L_mac(Acc0, Pamp[j], Imr[l - Ploc[j]]);

In software, each step of these loops needs an address calculation with an
absolute value, a branch, a multiply-accumulate, an absolute value, a
compare-and-branch and an index copy. The hardware pipelines this work and
issues one such step per cycle.

### The units

- **`cond_move_idx`: conditional move with loop index.**
  - The candidate (ACR1) optionally goes through a saturating absolute value
    and is compared with the reference register ACR2.
  - If it is larger, ACR2 takes it and the current loop counter is stored as
    the index. `idx_we` lets a register file copy the index too.
  - `max_out` gives the larger value in the same cycle, so the winner can be
    written back to ACR1 as well.
  - `ge_mode` turns `>` into `>=`. The hardware loop counts *down*, while the
    reference C loop counts up with `>`. On a tie, `>=` makes both pick the
    same (lowest) index.
- **`hw_loop_counter`.** Loads a start value and a step, and subtracts the
  step on each advance. A step of 2 serves the even-position search. `last`
  marks the final index, the one after which the next step would go below
  zero.
- **`offset_agu`.** Holds a pulse position in REG and computes
  `base + (lc - REG)`, or its absolute value, combinationally. A buffer such as
  `ImrCorr[|l - Ploc|]` is thus fetched without using the ALU. The sign of
  `lc - REG` leaves the unit as `neg`.
- **`dsp_mac`.** A 16×16 MAC with saturation, matching the ITU basic
  operations (`L_mult`, `L_mac`, `L_msu`):
  - integer mode for the `_I` operations;
  - autocorrelation mode, in which one operand feeds both multiplier inputs;
  - the **conditional operand**: with `cond_en` set, a high `cond_neg` (the
    AGU's `neg`) replaces the memory operand by zero. The multiply that
    software would have skipped with a branch therefore adds nothing.
  - The `MAC_L`/`MSU_L` operations accumulate onto an external value
    (`acc_in`, e.g. a `WrkBlk` element) rather than the accumulator.
- **`op_ram16`.** A 16-bit operand memory, 1024 words by default, with one
  write port and a synchronous read port driven by the AGU.
- **`mpmlq_datapath`.** Chains the units above. The sequencer outside it
  supplies one control word (`dsp_pkg::mpmlq_ctl_t`) per cycle. The pipeline
  has three stages:
  1. The AGU forms the address from the loop counter and REG, and the memory
     read starts.
  2. The operand arrives and the MAC updates the accumulator. Its control is
     delayed one cycle to match.
  3. The conditional move compares the accumulator and, on a win, stores the
     loop index that belonged to this step.

  One loop step is issued per cycle. A 30-step pulse search takes 30 cycles,
  and a convolution output with `Np` pulses takes `Np` cycles.
- **`serial_divider`.** Restoring division, one quotient bit per cycle.
  - `DIV_S`: a 16-bit numerator and denominator with `0 <= num <= den`,
    giving a Q15 quotient. `done` comes 16 cycles after `start`.
  - `DIV_32`: a Q31 numerator over a Q15 denominator, with `num <= den<<16`,
    giving a Q31 quotient in 32 cycles.
  - Equal operands give the largest positive value after one cycle.
- **`norm_unit`.** `NORM_S`/`NORM_L`: the number of redundant sign bits of a
  16- or 32-bit value. Zero gives 0. Combinational.
- **`max16_unit`.** `amax b,a`: `b = max(abs_s(a), b)`; `max`: `b = max(a, b)`.
  Combinational.
- **`add_shift_unit`.** Add/subtract, arithmetic right shift, or the merged
  `(a ± b) >>> sh`. In the merged form the adder output goes straight into the
  shifter.

All accumulations saturate exactly as the ITU fixed-point reference does, so
that the codec stays bit-exact.

---

## C. Reduced floating point

### Formats (`rfp_pkg`)

| | sign | exponent | mantissa | bias | width |
|---|---|---|---|---|---|
| internal (`rfp_t`) | 1 | 6 | 13 | 31 | 20 bits |
| external (`rfpx_t`) | 1 | 5 | 9 | 15 | 15 bits in a 16-bit word, bit 15 = 0 |

- The value is `(-1)^s × 1.m × 2^(e-bias)`.
- Exponent 0 means zero. There are no subnormals, infinities or NaNs.
- A result too large for the format saturates to the largest magnitude.
- A result too small flushes to zero.
- Rounding is to nearest, with ties away from zero.
- The widths are the package constants `IE`, `IM`, `XE` and `XM`. The other
  modules are written in terms of them.

### Units

- **`rfp_expand`.** Converts memory to internal format. It re-biases the
  exponent and pads the mantissa with zeros, so the conversion is exact.
- **`rfp_round`.** Converts internal to memory format. It rounds the mantissa
  to 9 bits. A carry out of the mantissa increments the exponent, and the
  result saturates or flushes at the ends of the 5-bit range.
- **`rfp_mul`.** Multiplies two 14-bit significands (13 stored bits plus the
  implied one), normalises by at most one place, rounds to 13 bits and adds the
  exponents.
- **`rfp_add`.** Aligns the smaller operand, keeping guard, round and sticky
  bits, and adds or subtracts. It then normalises with a leading-zero count,
  which handles cancellation, and rounds.
- **`rfp_mac`.** `rfp_mul` followed by `rfp_add`, feeding a 20-bit
  accumulator register. Operations: `CLR`, `LOAD`, `MUL`, `MAC`, `MSU` and
  `ADD`. Because each result is normalised, the accumulator needs no guard
  bits. A MAC rounds twice: once after the multiply and once after the add.
  One operation per cycle.

In the top level the two operands come from memory words (`fp_a_mem`,
`fp_b_mem`). They are expanded and sent to the MAC. The accumulator is
available both in internal form (`fp_acc`) and rounded to the memory format
(`fp_acc_mem`).

---

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bit_memory_controller`, `bitmask_dmem` | `AW` | 10 | word address bits (1024 × 32-bit data memory) |
| `bitmask_dmem` | `DW` | 32 | word width |
| `op_ram16`, `offset_agu`, `mpmlq_datapath` | `AW` | 10 | operand memory address bits (1024 × 16 bits) |
| `cond_move_idx` | `W` | 32 | compare width |
| `hw_loop_counter`, `offset_agu` | `W` | 16 | counter / REG width |
| `add_shift_unit` | `W` | 32 | data width |

The top module has no parameters. It uses these defaults.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the module with a reference model written independently inside the
testbench, and ends by printing `TB_RESULT checks=N failures=M`.

- The floating-point tests use `tb/rfp_ref_pkg.sv`. It computes exact
  results with wide integers and rounds them once. This is enough to check
  `rfp_mul`, `rfp_add` and the converters bit for bit over random and corner
  operands. These include zero, cancellation, ties, saturation and flush.
- The G.723.1 tests run the two inner loops from their C form in plain
  integer arithmetic, check every intermediate result, and check that each
  loop takes one cycle per step. The convolution test also checks that
  looping over the pulses only gives the same result as the original loop
  over all 60 positions.
- The bit-memory tests keep a bit-level shadow copy of the memory. Every load
  is compared with the shadow copy, over random stores and loads of all
  lengths, modes and offsets. A store that disturbs a neighbouring bit
  therefore shows up in a later load. The tests also check the stall, the
  extra cycle of a crossing access, and back-to-back loads at one per cycle.
- `tb_speech_audio_hw_top` drives all three designs through the top at its
  default size. For design A it stores packed 13-bit converter samples and
  9–11-bit codewords and reads them back. For design B it runs both search
  loops and the divider. For design C it runs floating-point MAC sequences.

  The test counts each mechanism and fails if one never happened: crossing
  loads and stores, stall cycles, signed, unsigned, fractional and word loads,
  zeroed operands, conditional-move wins, loop ends, divisions,
  floating-point cancellation, saturation and flush on store.
Four workload tests run application-sized jobs at the default sizes:

- `tb_wl_g7231_frame` runs one worst-case frame of search work through
  `mpmlq_datapath`. That is 64 convolutions (21120 multiply-accumulates) and
  288 pulse searches (8640 steps). It checks every result and both cycle
  totals.
- `tb_wl_rfp_filterbank` runs the MP3 synthesis filterbank for one granule
  (576 samples) in the reduced format. It checks each dot product against
  the error bound of its roundings. It also checks the output against a
  full-precision filterbank: the SNR is about 60 dB, and the RMS error is
  about 7·10⁻⁵ of full scale at a -20 dB level. This is below the 2⁻¹¹/√12
  RMS limit of a limited-accuracy MP3 decoder. The test applies that limit
  to the filterbank alone, so passing it does not prove a whole decoder
  compliant.
- `tb_wl_bitmem_fir` packs FIR filter input of every width from 1 to 31 bits
  through the top level. It checks that a sequential pass makes exactly
  `b - gcd(b, 32)` extra accesses per 32 samples, runs an 8-tap filter on the
  packed data, and prints each width's memory saving against
  byte/halfword/word storage next to the measured load penalty.

  | width (bits) | memory saved | sequential-load penalty |
  |---|---|---|
  | 9 | 44 % | 25 % |
  | 13 | 19 % | 38 % |
  | 21 | 34 % | 62 % |
  | 24 | 25 % | 50 % |
  | 31 | 3 % | 94 % |
- `tb_wl_v42bis_codewords` compresses 4000 characters of text with a
  V.42bis-style LZW coder written in the testbench. Its codewords are 9, 10
  and 11 bits wide as the dictionary grows. Each codeword is stored through
  the top level with one bit-store instruction, so the stream is packed with
  no padding. The test then reads the stream back with one bit load per
  codeword, decodes it, and compares the result with the original text. It
  also checks that each codeword straddling a word boundary costs exactly one
  stall cycle on store and on load.

### Running a test with Verilator

Each test needs the packages first, then the testbench. The module search
paths cover the rest:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/bitmem_pkg.sv rtl/dsp_pkg.sv rtl/rfp_pkg.sv tb/rfp_ref_pkg.sv \
        tb/tb_speech_audio_hw_top.sv --top-module tb_speech_audio_hw_top -o sim
    ./obj_dir/sim

Replace the testbench file and top module name to run another test. Every
test has a watchdog that counts a failure and stops if the simulation hangs.
All registers reset asynchronously on `rst_n` low. Memories are not reset, so
tests write what they read.

## Where this RTL goes beyond, or departs from, its source

These points are this design's own choices, made where the source leaves
the detail open, or are places where the RTL knowingly differs from it:

- **Bit order and encodings.** Several details are chosen here:
  - the MSB-first bit order;
  - the opcode values and the Mode bit positions;
  - the `req_valid`/`req_ready` handshake of the memory controller;
  - word accesses using byte addresses.
- **Separate load and store shifters.** Load and store could share one
  shifter, because they never need it in the same cycle when the processor
  issues one access at a time. This controller instead accepts a new request
  in the same cycle that it aligns an earlier load's data, and gives each path
  its own shifter. Sharing would save area but cost a bubble after each load.
- **Memory with bit write enables.** The store scheme needs a memory that
  applies a per-bit mask. `bitmask_dmem` models one as a register array. A
  real design would use an SRAM with bit-write enables.
- **Alternatives that were not built.** Other ways to avoid the stall of a
  crossing access exist: two memory banks for even and odd words, a small
  write cache, or a load cache for sequential reads. Only the main scheme is
  built, with one memory and one stall cycle per crossing access.
- **No processor or sequencer.** Design A needs the host processor's
  pipeline and design B needs an instruction sequencer. Both are left out.
  The ports bring out what they would drive.
- **Conditional move.** ACR2 and the index register live inside the unit. A
  write-back to ACR1 is offered through `max_out` for a register file outside.
- **Pipeline of the search data path.** The three stages and their alignment
  are chosen here.
- **MAC details.** The saturation behaviour, the `MAC_L`/`MSU_L` forms and
  the `CLR`/`LOAD` operations are added to keep bit-exactness with the ITU
  code.
- **Divider operand format.** `DIV_32` takes a Q15 denominator. The ITU
  reference `Div_32` takes a 32-bit denominator split into two halves, so
  that form is not provided.
- **Floating-point multiplier width.** The source calls the internal
  multiplier 13×13. With the implied leading one the significands are 14
  bits wide, so `rfp_mul` multiplies 14×14.
- **Floating-point details.** The exponent bias, zero encoding, saturation,
  flush to zero and rounding mode are chosen here. The source fixes only the
  field widths.
- **Memory sizes.** The operand memory and the bit-addressed data memory
  have 1024 words each. The source does not size them. Both sizes can be
  changed with `AW`.

## Files

| file | contents |
|---|---|
| `rtl/bitmem_pkg.sv` | opcodes, Mode bits, decoded access struct |
| `rtl/bit_lsu_decode.sv` | load/store instruction decoder |
| `rtl/bit_memory_controller.sv` | bit load/store engine with stall |
| `rtl/bitmask_dmem.sv` | data memory with per-bit write mask |
| `rtl/dsp_pkg.sv` | saturating helpers, MAC operations, search-path control word |
| `rtl/cond_move_idx.sv`, `max16_unit.sv`, `hw_loop_counter.sv`, `offset_agu.sv`, `dsp_mac.sv`, `op_ram16.sv` | G.723.1 units |
| `rtl/mpmlq_datapath.sv` | the chained search data path |
| `rtl/serial_divider.sv`, `norm_unit.sv`, `add_shift_unit.sv` | further G.723.1 units |
| `rtl/rfp_pkg.sv` | reduced floating-point formats and packing function |
| `rtl/rfp_expand.sv`, `rfp_round.sv`, `rfp_mul.sv`, `rfp_add.sv`, `rfp_mac.sv` | floating-point units |
| `rtl/speech_audio_hw_top.sv` | the three designs side by side |
| `tb/*.sv` | testbenches and the exact floating-point reference package |
