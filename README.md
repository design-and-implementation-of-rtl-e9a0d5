# Hybrid FPS/LNS processor

A floating-point processor spends most of its time on multiplications and
divisions, which are slow in IEEE 754 arithmetic. In a logarithmic number system
(LNS), where a number is stored as a sign and a fixed-point base-2 logarithm, a
multiplication is a fixed-point addition and a division is a subtraction. Addition
and subtraction, on the other hand, are slow in LNS. This processor keeps **every
variable in both forms at once**. Float add/subtract work on the float copies.
Multiply/divide work on the LNS copies. Every result is written in the form it was
computed in, and a converter produces the other form alongside, while the next
instructions are already running.

Three pieces make this work:

* a **twin memory**: two 32-bit memories behind one address. Word *n* of the float
  memory and word *n* of the LNS memory always hold the same variable;
* a **memory management unit** (MMU) that, on every write, sends a copy of the value
  through the float-to-LNS converter (FLC) or the LNS-to-float converter (LFC) and
  stores the result in the other memory at the same address;
* fast, cheap **piecewise-linear converters**: 128 straight-line segments, two
  7-bit look-up tables and a 7 x 16 multiplier built from three LUT sub-multipliers,
  with two pipeline stages.

The rest is a small processor around them: an I/O buffer, a central unit that
fetches and sequences instructions, ten 23-bit registers and two 23-bit ALUs. ALU1
works on fractions and ALU2 works on exponents, LNS integer parts and signs, both
in the same clock.

## Number formats

Both forms are 32 bits wide.

| form  | bit 31 | bits 30:23 | bits 22:0 | value |
|-------|--------|-----------|-----------|-------|
| float | sign   | exponent *e*, bias 127 | fraction *f* | ±1.*f* · 2^(*e*−127) |
| LNS   | sign   | integer part *n*, two's complement | fraction *x* | ±2^(*n*.*x*) |

The LNS word covers the same range as single precision. Special values are rules
of this design:

* **LNS zero** is the code with integer −128 and fraction 0 (`32'h4000_0000`).
* **Float → LNS.** Exponent 0 (zero and subnormals) becomes LNS zero. Exponent 255
  (infinity, NaN) becomes the largest LNS magnitude.
* **LNS → float.** Integers below −126 become float zero. No subnormals are made.

## The piecewise-linear converters (`pwl_convert`, `flc`, `lfc`)

Both converters split the word into sign, integer/exponent and fraction. Only the
fraction needs a non-linear function:

* FLC: fraction_out = log2(1 + *f*) — mantissa [1,2) to logarithm [0,1)
* LFC: fraction_out = 2^*x* − 1 — the inverse

The sign passes straight through. The exponent is turned into the integer part
(*e* − 127) or back (*n* + 127).

`pwl_convert` computes either function over [0,1) with 128 straight lines. The
23-bit input *x* is split in two:

```
idx = x[22:16]   (7 bits: which line)
rem = x[15:0]    (16 bits: position on the line)

y = shift[idx] * 2^16  +  (slope[idx] * rem) >> 6        (23 bits, saturating)

shift[i] = round(128  * g(i/128))                         7 bits
slope[i] = round(8192 * (g((i+1)/128) - g(i/128)))        7 bits (values 44..92)
```

Here g(t) = log2(1+t) or 2^t − 1. The shift value gives the 7 most significant
bits of the result, the coarse part. The slope times the remainder fills in the 16
bits below it, the fine part. Both tables are computed at elaboration from the
formulas above, with integer Q2.30 arithmetic: repeated squaring for log2, and a
product of square roots of 2 for 2^t. No table file is involved. To change the
function or the rounding, edit `g_q30` in `pwl_convert.sv`.

**Accuracy.** The coarse part has only 7 bits, so the error is set by the rounding
of the shift table: at most about 0.0039 (≈ 2^-8) in the output fraction.

* FLC: a logarithm error of 0.0039 is a relative error of about 0.27 % in the
  value.
* LFC: the same absolute error in the mantissa is at most 0.39 % relative.
* A float → LNS → multiply → LNS → float round trip stays within about 1 %.

The testbenches check every conversion bit for bit against a model built from real
arithmetic, and within 2^-7 of the exact function.

**Pipeline.** There are two registers:

1. after the multiplier (shift value, product and side-band);
2. on the output.

A result comes out 2 clocks after its input, and a new input is taken every clock.
Each converter carries a side-band word (`in_sb` → `out_sb`) through its pipeline.
The MMU uses it to carry the destination address.

### The 7 x 16 multiplier (`lut_mult_7x16`, `lut_submult`)

The 16-bit remainder is cut into slices of 6, 5 and 5 bits. Each slice is multiplied
by the 7-bit slope in a ROM addressed by `{slope, slice}` (`lut_submult`; 8192,
4096 and 4096 entries). Two shift-and-add steps combine the three partial products:

```
s = p_lo + (p_mid << 5)
p = s + (p_hi << 10)
```

The module is combinational. The first pipeline register of `pwl_convert` follows
it.

## Memory management and the twin memory (`mmu`, `twin_memory`)

`twin_memory` holds two arrays of `MEM_DEPTH` 32-bit words (default 512 each,
4 KB in total). The type bit (`0` float, `1` LNS) in front of the address picks the
array. It has two write ports and one read port with a registered (1-clock) read:

* write port 0 takes values from the central unit;
* write port 1 takes values from the converters.

The two write ports must not write the same array in one clock; an assertion
checks this.

**Writes.** A write request (`w_valid/w_ready`, `w_type`, `w_addr`, `w_data`)
stores the word in its own array. In the same clock the MMU starts a conversion.
Two clocks later the converted word is written into the other array at the same
address. A two-entry tracking pipeline records each conversion in flight: live bit,
destination array, address. It provides three behaviours:

* **Read stall.** A read of form *T* at address *a* waits (`r_ready = 0`) while a
  conversion into *T* at *a* is in flight. This is the only place where conversion
  latency shows up in execution. The end-to-end test sees it about twenty times.
  The usual case is reading a result in the other form right after computing it.
* **Write stall.** A write waits one clock if a converted word goes into the same
  array in that clock.
* **Cancellation.** A conversion in flight is dropped when a newer write to the
  same address is accepted, so an older value cannot overwrite a newer one.

**Reads.** A read request (`r_valid/r_ready`, `r_type`, `r_addr`) returns the word
on `r_data` with `r_rvalid` one clock after it is accepted.

## Central unit, registers and ALUs

### Register split

A 32-bit value is held in two 23-bit registers while it is processed:

| register | holds | worked on by |
|----------|-------|--------------|
| low (R0, R2) | fraction (LNS, float multiply/divide) or mantissa `{1, f[22:1]}` (float add/subtract) | ALU1, main register R0 |
| high (R1, R3) | `{sign at bit 22, zeros, exponent or LNS integer in bits 7:0}` | ALU2, main register R1 |

Each ALU takes its main register as operand A. Operand B comes from a register read
port or from an immediate supplied by the central unit. `alu23` has add/subtract
with carry, reverse subtract, logic operations, pass-through and shifts. A right
shifter in front of the adder can act on either operand, so alignment and addition
happen in one pass. The high word keeps zeros between bit 7 and the sign bit. Carries
and borrows of the 8-bit field therefore stay clear of the sign, and bits 9:0 of
ALU2's result can be read as a signed 10-bit exponent.

### Instruction set (`fpslns_pkg::opcode_e`)

Instruction word: `[31:28]` opcode, `[26:18]` D, `[17:9]` A, `[8:0]` B. Memory
instructions use 9-bit addresses. Register instructions use the low 4 bits of a
field. A load instruction is followed in the stream by one data word.

| opcode | operation | form used | execute clocks |
|--------|-----------|-----------|----------------|
| `LDF` D | M[D] ← next word (float) | float; LNS copy made | – |
| `LDL` D | M[D] ← next word (LNS) | LNS; float copy made | – |
| `LDI` D | M[D] ← float(next word as signed integer) | float | – |
| `OUTF` A / `OUTL` A | send the float / LNS form of M[A] | | – |
| `LDR` D / `OUTR` A | R[D] ← next word[22:0] / send R[A] | | – |
| `FADD`/`FSUB` D,A,B | M[D] ← M[A] ± M[B] | float copies | 3 |
| `FMUL`/`FDIV` D,A,B | M[D] ← M[A] × / ÷ M[B] | LNS copies | 2 |
| `IADD`/`ISUB` B | R0 ← R0 ± R[B] | registers | 1 |
| `MOVR` D,B | R[D] ← R[B] | registers | 1 |

Float and LNS operations use R0..R3 as scratch registers. Integer work should keep
its values in R4..R9.

### How an operation runs

Every instruction starts with a 1-clock fetch from the I/O input buffer. A
memory-to-memory operation then goes through these steps:

1. Read operand A through the MMU, in the form the operation needs.
2. Write A into R0/R1 while reading B.
3. Write B into R2/R3.
4. Execute.
5. Write the result back through the MMU.

**FMUL/FDIV** (2 clocks):

* EX1: ALU1 adds (or subtracts) the fractions; the carry (borrow) is kept.
* EX2: ALU2 adds (or subtracts) the integer parts with that carry.

The central unit then puts in the sign (XOR of the signs) and handles special
results:

* signed overflow of the 8-bit integer gives the largest magnitude (overflow up) or
  zero (overflow down);
* a zero operand gives zero;
* division by zero gives the largest magnitude.

**FADD/FSUB** (3 clocks):

* EX1: ALU2 subtracts the exponents while ALU1 compares the mantissas. This decides
  which operand is larger, the alignment distance, the effective operation and the
  result sign.
* EX2: ALU1 shifts the smaller mantissa right and adds or subtracts it. ALU2 passes
  on the larger exponent. A zero operand makes both ALUs pass the other operand
  unchanged.
* EX3: normalisation.
  * A carry out of the addition is shifted back in (`ALU_SHR` with `cin = 1`) and
    ALU2 adds 1 to the exponent.
  * Otherwise the leading zeros are counted, ALU1 shifts left by that count and
    ALU2 subtracts it from the exponent.
  * An exponent ≤ 0 flushes to zero; ≥ 255 gives infinity.

The mantissa runs through the 23-bit ALU as `{1, f[22:1]}`. **A float add/subtract
result therefore has 22 fraction bits, truncated**; its last bit is always 0. There
is no IEEE rounding.

**Integers.** `IADD`/`ISUB` take one clock on ALU1. Integers bound for floating-point
work are loaded with `LDI`, which converts them in the `int2float` sub-unit
(truncating above 2^24).

## Top level and timing (`hybrid_processor`)

| port | direction | meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_data[31:0]` | in/out/in | instruction and data stream |
| `out_valid`, `out_ready`, `out_data[31:0]` | out/in/out | results from `OUTF`/`OUTL`/`OUTR` |
| `busy` | out | an instruction is in progress |

Parameters:

* `MEM_DEPTH` = 512 words per memory. The architecture allows 2–16 KB in total.
  The 9-bit address fields of the instruction word limit this implementation to
  512 words.
* `IO_DEPTH` = 8 words per I/O buffer.

A word written into the I/O buffer can be fetched one clock later. Clocks per
instruction when nothing stalls:

| instruction | clocks |
|-------------|--------|
| `FADD`/`FSUB` | 8 (fetch 1, operand reads 3, execute 3, write-back 1) |
| `FMUL`/`FDIV` | 7 (as above with 2 execute clocks) |
| `IADD`/`ISUB`/`MOVR` | 2 (fetch 1, execute 1) |
| loads | 3 (fetch, data word, memory write) |

The converted copy of any written value is ready 2 clocks after the write.

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_hybrid_processor \
          rtl/fpslns_pkg.sv tb/tb_hybrid_processor.sv -Mdir obj -o sim
./obj/sim
```

Verilator finds the other modules through `-Irtl`, since each file is named after
its module. The same command works for any testbench name.

| testbench | what it covers |
|-----------|----------------|
| `tb_hybrid_processor` | Whole processor at default size, ~460 checks. Random float add/sub, multiply/divide (read back in both forms), LNS loads, integer loads, register arithmetic, zeros, cancellation, overflow, divide by zero, a mantissa sum of exactly 2.0. Checks the execute clocks of every instruction. Counts how often each mechanism occurred and fails if one never did: FLC/LFC conversions, conversion stalls, both normalisations, LNS saturation, zero operands, integer-to-float, full input buffer, output back-pressure. |
| `tb_workloads` | A 128-point radix-2 FFT of integer samples (in place, 390 memory words, about 35,000 clocks), and one output-layer neuron of a 256-200-40 network at its full fan-in of 200 inputs (multiply-accumulate, 402 words), run as programs on the full-size processor. Every output is compared with real-arithmetic references (within 3 % of the largest FFT output, 2 % for the neuron). The largest FFT bin error is typically about 0.5 % of the largest output. |
| `tb_mmu` | Back-to-back random reads and writes. Read stalls, write stalls and cancelled conversions must all occur. |
| `tb_flc`, `tb_lfc` | Bit-exact against a real-arithmetic model; accuracy bound; 2-clock latency; special codes. |
| `tb_lut_mult_7x16`, `tb_alu23`, `tb_register_file`, `tb_int2float`, `tb_io_unit`, `tb_twin_memory` | Unit tests against independent models. |

The testbenches initialise everything they read and do not depend on x/z values.

## Where this implementation departs from the original description, and what is missing

**Followed:**

* the block structure;
* the ten 23-bit registers and the roles of R0/R1;
* the two 23-bit ALUs and their fraction / exponent split;
* the twin memory of 32-bit words with a type bit;
* the four MMU tasks;
* the FLC/LFC structure: 128 segments, 7-bit shift and slope LUTs, 16-bit remainder,
  three-LUT multiplier, two storage points and 2-clock latency;
* the 1-clock fetch;
* the execute clocks for float add/sub (3), multiply (2), divide (2) and integer
  add/sub (1).

**This design's own choices, with no counterpart in the original:**

* the instruction set and its encoding;
* the register split of a value;
* the ALU operation set and pre-shifter;
* the LUT contents and scaling;
* the special-value rules;
* the 23-bit mantissa truncation;
* the handshakes, the stall and cancellation rules;
* the 6/5/5 multiplier slicing;
* FIFO depths and memory size.

**Timing differences:**

* The original lists a 3-clock latency for memory management and 2 for the central
  unit. Here an MMU read takes 1 clock. A memory-to-memory instruction spends
  several clocks on operand reads and write-back, so its total clocks per
  instruction are well above the original's estimate of about 3 per operation.
* One of the original tables gives 3 clocks for a conversion, and its text and unit
  table give 2. This design converts in 2.

**Not built:**

* an integer multiply instruction. Integers loaded with `LDI` can be multiplied
  with `FMUL` through their LNS copies, but not exactly.
* the "other" operations: exp, log, trigonometric and activation functions,
  estimated at about 250 clocks each as software sequences.
* the "pack" function of the I/O unit, which is not specified beyond its name.

**Workloads:**

* A 256-point FFT needs about 768 words; 512 fit. The largest that fits, 128 points, runs in `tb_workloads`.
* The 256-200-40 neural network needs 59,200 weights alone.
* Of the network, a single 200-input neuron runs in `tb_workloads`.

## Files

| file | contents |
|------|----------|
| `rtl/fpslns_pkg.sv` | formats, constants, ALU operations, opcodes |
| `rtl/hybrid_processor.sv` | top level |
| `rtl/central_unit.sv`, `rtl/int2float.sv` | control, sequencing, integer-to-float |
| `rtl/register_file.sv`, `rtl/alu23.sv` | registers unit, 23-bit ALU |
| `rtl/io_unit.sv`, `rtl/sync_fifo.sv` | I/O buffers |
| `rtl/mmu.sv`, `rtl/twin_memory.sv` | memory management, twin memory |
| `rtl/flc.sv`, `rtl/lfc.sv`, `rtl/pwl_convert.sv` | converters and their shared piecewise-linear core |
| `rtl/lut_mult_7x16.sv`, `rtl/lut_submult.sv` | LUT-based 7 x 16 multiplier |
