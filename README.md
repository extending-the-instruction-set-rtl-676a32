# Single-precision floating-point extension for an RV32IM core

This RTL adds the RISC-V "F" extension (IEEE 754 binary32 arithmetic) to an existing five-stage RV32IM integer core. It contains:

- a bank of 32 floating-point registers;
- the `fcsr` register, holding the rounding mode and sticky exception flags;
- a decoder for the F opcodes;
- a floating-point unit that executes 25 of the extension's 30 instructions.

Most instructions finish in one cycle. Multiply, divide and square root run in a shared multi-cycle unit, and the integer pipeline must stall while it is busy.

The integer core itself is not included. `fpu_core` is written as a coprocessor slice: the host hands it one F instruction, the value of `x[rs1]` and, for `FLW`, the loaded word. `fpu_core` returns:

- the integer write-back, for compares, `FCLASS`, `FCVT.W[U].S` and `FMV.X.W`;
- the store data, for `FSW`;
- a stall (`instr_ready` low).

## Instruction coverage

| Group | Instructions | Unit | Latency |
|---|---|---|---|
| Load/store | FLW, FSW | `fpu_core` (the address and memory access are the host's) | 1 |
| Add | FADD.S, FSUB.S | `fp_addsub` | 1 (combinational) |
| Multiply/divide/root | FMUL.S, FDIV.S, FSQRT.S | `fp_mds` | 4 / 28 / 28 cycles |
| Min/max, compare | FMIN.S, FMAX.S, FEQ.S, FLT.S, FLE.S | `fp_compare` | 1 |
| Sign injection | FSGNJ.S, FSGNJN.S, FSGNJX.S | `fp_sgnj` | 1 |
| Classify | FCLASS.S | `fp_classify` | 1 |
| Conversions | FCVT.W.S, FCVT.WU.S, FCVT.S.W, FCVT.S.WU | `fp_cvt_f2i`, `fp_cvt_i2f` | 1 |
| Moves | FMV.X.W, FMV.W.X | pass-through in `fpu` | 1 |

The fused multiply-add group (FMADD, FMSUB, FNMADD, FNMSUB) is not implemented. It decodes as an illegal instruction: it completes at once with `illegal` set and has no effect.

All five IEEE rounding modes are supported: RNE, RTZ, RDN, RUP and RMM. An instruction can give the mode statically or as DYN, in which case the mode comes from `frm`. The reserved encodings 101 and 110 are illegal. All five exception flags are produced:

| Flag | Raised for |
|---|---|
| NV (invalid) | signalling NaN, 0·∞, ∞−∞, 0/0, ∞/∞, √ of a negative number, out-of-range conversion |
| DZ (divide by zero) | finite ÷ 0 |
| OF (overflow) | result too large for binary32 |
| UF (underflow) | tiny and inexact result |
| NX (inexact) | rounded result |

The flags accrue into `fcsr`. A NaN result is always the canonical quiet NaN, 0x7FC00000.

## Block structure

```
fpu_core
 ├─ fp_ctrl_decode   opcode/funct decode, operand-bank selects, rounding mode
 ├─ fp_regfile       32 x 32 FP registers, 2 read / 1 write port
 ├─ fp_csr           frm + sticky fflags
 └─ fpu
     ├─ fp_addsub ── fp_decoder, fp_norm, fp_rounder, fp_final_norm
     ├─ fp_mds    ── fp_decoder, fp_exp_handler, fp_sign_handler, fp_mds_ctrl,
     │               fp_mul24, fp_div_sig, fp_sqrt_sig, fp_norm, fp_sqrt_norm,
     │               fp_rounder, fp_final_norm
     ├─ fp_compare ── fp_decoder;  fp_classify ── fp_decoder;  fp_sgnj
     ├─ fp_cvt_i2f ── fp_rounder, fp_final_norm
     └─ fp_cvt_f2i ── fp_decoder (own fixed-point rounding)
```

`fpu_pkg` holds the types shared by these modules:

- the rounding-mode enum, the flag struct and the unpacked-operand struct;
- the internal operation enum and the decoded-control struct;
- the opcode and funct7 constants;
- a leading-zero count function.

### Operand multiplexers

The integer pipeline needs two new selects for the operands:

- `data1_sel` picks the first operand from the FP bank or the integer bank. `FCVT.S.W[U]` and `FMV.W.X` read an integer register.
- `registerbank_sel` chooses which bank receives the result.

`int_or_float` plays the same role for the host's forwarding path. All three come from `fp_ctrl_decode` in the `fp_ctrl_t` record, along with `data2_sel`.

## The common arithmetic path: unpack, normalise, round, pack

Every arithmetic unit follows the same four steps.

1. **Unpack** (`fp_decoder`) into sign, biased exponent, 24-bit significand and class bits.
   - The class bits mark zero, subnormal, infinity, NaN and signalling NaN.
   - The hidden bit is 1 for normal numbers. For a subnormal it is 0 and the exponent counts as 1, so normal and subnormal operands can be handled alike.
2. **Normalise before rounding** (`fp_norm`, parameter `IW` = width of the raw significand).
   - The raw result has two integer bits, in the form `1x.xxx` or `01.xxx`.
   - If the top bit is set, the normaliser shifts right by one and increments the exponent.
   - Otherwise it shifts left by the leading-zero count, but only until the exponent reaches 1. If the count is larger, the result is subnormal.
   - If the exponent is already below 1, it shifts right into the subnormal range and collects the bits that fall off into the sticky bit.
   - Its output is 24 bits plus the round (R) and sticky (S) bits.
   - The same module serves the adder (`IW`=28), the multiplier (48) and the divider (29).
   - The square root needs no shift: its root is always normalised. `fp_sqrt_norm` only slices R and S out of the root.
3. **Round** (`fp_rounder`). The rounder adds one ulp (unit in the last place) when the mode asks for it:
   - RNE: R and (S or LSB);
   - RMM: R;
   - RUP: R or S, for a positive result;
   - RDN: R or S, for a negative result;
   - RTZ: never.

   Its output is 25 bits wide, so a carry out of bit 23 stays visible.
4. **Final normalise and pack** (`fp_final_norm`). It handles the cases rounding can create:
   - A carry out of 1.111…1 renormalises to 1.000… and increments the exponent.
   - A subnormal that rounds up to the hidden bit becomes the smallest normal number.
   - On overflow the result depends on the mode and the sign: infinity under RNE/RMM and toward the sign, otherwise the largest finite number.
   - OF, UF and NX are set here. UF is raised when the result is inexact and its packed exponent is 0.

## Adder (`fp_addsub`)

The operands are first ordered by magnitude. The smaller one is shifted right by the exponent difference into a 27-bit field: 24 bits plus guard, round and sticky. Bits shifted past the field OR into the sticky bit.

The effective operation is the XOR of the signs and the `sub` input. The unit then adds or subtracts the aligned significands; because of the ordering, the result of a subtraction is never negative. The result goes through `fp_norm`, the rounder and the final normaliser.

Special cases:

- NaN inputs give the canonical NaN. NV is raised for signalling NaNs and for ∞−∞.
- An exact zero result is +0, except under RDN, where it is −0.
- A sum of two zeros keeps the common sign.

The unit is purely combinational.

## The multiply/divide/square-root unit (`fp_mds`)

This is the hardest part of the design. Three significand engines share one sequencer, one rounder and one final normaliser.

### Sequencer (`fp_mds_ctrl`)

The sequencer is a three-state machine: IDLE → ITER (n cycles) → READY.

- The `start` cycle loads the operand registers of all three engines.
- Each ITER cycle asserts `step`.
- READY is a single cycle in which the result of the last step is rounded and presented.

The iteration count is 3 for multiply and 27 for divide and square root. `ready` therefore comes 4 or 28 cycles after `start`, whatever the operands are.

At start, the sign handler, the exponent handler and the special-case logic also latch their results. A special-case result (NaN, infinity, zero, division by zero) overrides the engine output at READY, so the latency stays constant.

### Partitioned multiplier (`fp_mul24`)

The 24×24-bit product is built from two levels of partitioning:

- Each operand is cut into four 6-bit pieces.
- Stage 1 forms the 16 products of 6×6 bits.
- Stage 2 combines them into the four 12×12 products `AH·BH`, `AH·BL`, `AL·BH` and `AL·BL`. Each uses `X·Y = XH·YH·2^12 + (XH·YL+XL·YH)·2^6 + XL·YL`.
- Stage 3 adds those four into the 48-bit product with the same identity at 2^24 / 2^12.

Each stage is registered. The exponent is `ea + eb − 127`, using effective exponents. A subnormal operand simply gives a product with leading zeros, which `fp_norm` removes, down to the subnormal limit.

### Divider (`fp_div_sig`)

Both significands are first normalised so they start with 1: leading zeros are shifted out and the exponent is corrected. This makes subnormal divisors and dividends need no special handling.

The divider then computes `Q = floor(Mx · 2^26 / My)` by restoring shift-subtract division, one quotient bit per cycle, for 27 cycles. `Q` lies in [2^25, 2^27), that is, one or two integer bits above 24 fraction bits plus a round bit. A non-zero final remainder becomes the sticky bit.

The exponent is `ea − eb + 127`, with the leading-zero corrections applied. `fp_norm` (IW=29) then takes care of the one-bit normalisation and of subnormal results.

### Square root (`fp_sqrt_sig`)

The square root uses the non-restoring algorithm of Li and Chu:

- It keeps a partial root `Q` and a signed 29-bit partial remainder `R`.
- Each cycle brings down two more radicand bits.
- If `R ≥ 0`, it subtracts `Q<<2 | 01`. If `R < 0`, it adds `Q<<2 | 11`.
- The new root bit is the inverted sign of the new `R`.
- A single 29-bit adder/subtracter does all of the arithmetic. No restoring step is needed.

The radicand is 54 bits: the normalised significand placed at the top, and doubled when the unbiased exponent is odd. After 27 cycles this gives a 27-bit root, always in [2^26, 2^27): 24 bits, a round bit, and a leftover bit that goes into the sticky bit together with the "remainder non-zero" flag.

The result exponent is half the unbiased exponent, plus 127. A subnormal input is normalised first, and the square root of a binary32 number is never subnormal, so no normalisation is needed afterwards.

Special cases:

- √(−0) = −0.
- √(+∞) = +∞.
- The square root of any other negative number is the canonical NaN with NV.

## Conversions, compare, sign injection, classify

- **FCVT.S.W / FCVT.S.WU.**
  - The unit takes the absolute value, counts its leading zeros and shifts the leading one to the top.
  - The exponent is `127 + 31 − shift`.
  - The low 8 bits supply R and S for the rounder.
  - Integers of more than 24 significant bits are rounded and raise NX.
- **FCVT.W.S / FCVT.WU.S.**
  - The unit shifts the significand into a 32.32 fixed-point word and rounds with the mode.
  - Results out of range saturate and raise NV:
    - NaN and +big give 0x7FFFFFFF (signed) or 0xFFFFFFFF (unsigned);
    - −big gives 0x80000000 (signed) or 0 (unsigned).
- **Compare.**
  - Numbers are compared by sign, then exponent, then mantissa, with +0 equal to −0.
  - FEQ raises NV only for signalling NaNs. FLT and FLE raise it for any NaN.
  - FMIN and FMAX return the other operand when one operand is NaN, and treat −0 as less than +0.
- **Sign injection** keeps the magnitude of rs1 and takes its sign from one of three sources: the sign of rs2 (FSGNJ), its inverse (FSGNJN), or the XOR of both signs (FSGNJX).
- **Classify** returns the standard 10-bit one-hot mask: −∞, −normal, −subnormal, −0, +0, +subnormal, +normal, +∞, sNaN, qNaN.

## Integration handshake (`fpu_core`)

- An instruction is accepted in a cycle where `instr_valid` and `instr_ready` are both high.
- Single-cycle instructions assert `done` in the same cycle. The result is on `int_wb_*` or `store_data`, or it is written into the FP bank at the next clock edge.
- FMUL, FDIV and FSQRT drop `instr_ready` from the cycle after issue until they complete. The host must hold its pipeline for that long. An assertion in `fpu_core` checks that the stall tracks the unit's `busy`.
- Flags from every completed instruction OR into `fflags`.
- The host's CSR instructions reach `fcsr` through `csr_we`, `csr_wdata` and `csr_rdata`, which carry `{frm, fflags}`. A host write takes priority over accrual in the same cycle.
- Reset is asynchronous and active low. It clears `fcsr`, the FP registers and the sequencer.

## Where this design departs from its source description

The description this RTL was built from leaves some points open and contradicts itself on others. The choices made here are:

- **Multiplier pieces are 6 bits.** The equations split each operand at 2^12 and 2^6, while the text calls the partitions 8-bit; the equations were followed. The three pipeline registers are this design's own choice.
- **Divider.** The source only says it reuses the host's integer divider algorithm and corrects subnormal divisors with an "offset". Here the divider is restoring and pre-normalised, which gives the same results.
- **Square root: one root bit per cycle.** The text speaks of two root bits per cycle but also of 27 cycles for a 27-bit root. One root bit (two radicand bits) per cycle matches the cycle count and was used.
- **Ready comes in a separate cycle** after the last iteration, instead of during it.
- **f0 is an ordinary register.** The source's decode logic forces register 0 to read as zero in both banks. The RISC-V specification gives f0 no such rule, and this design follows the specification.
- **SGNJX test value.** The source's expected-result table lists FSGNJX of 7583.1235 and −304.4893 as 0x45ECF8FD. Its own formula gives 0xC5ECF8FD, which is what is built and checked.
- **FCVT.WU.S of −304.4893.** The same table lists 0x130. The source's conversion table (and RISC-V) says a negative input gives 0 with NV, which is what is built.
- **Integer-to-float conversion rounds** and raises NX for large integers. The source claims every 32-bit integer is exactly representable.
- **Float-to-integer conversion rounds** with the instruction's mode, instead of truncating.
- **Underflow** is detected after rounding, using the packed exponent: UF is set when the result is inexact and has a zero exponent. Strict IEEE tininess-after-rounding differs only for results that round up exactly to 2^-126.
- **Not described by the source, so chosen here:**
  - the NaN rules of compare, min and max (taken from RISC-V);
  - reserved rounding modes, which are illegal;
  - the host interface;
  - the `fcsr` access port;
  - register-file reset.
- **Adder latency.** The adder and the other single-cycle units are combinational. The source mentions a later clocking step without giving a latency.
- **Not included:**
  - the fused multiply-add instructions;
  - the integer core with its forwarding and hazard units;
  - the memories.

## Verification

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

The reference model (`tb/tb_fp_ref_pkg.sv`) works through the simulator's double-precision `real` type:

- it converts binary32 to `real` exactly;
- it performs the operation in double precision;
- it rounds back to binary32 with its own bit-exact routine, which supports all five modes and reports inexactness.

Rounding the double-precision result to binary32 is exact for add, multiply, divide and square root, because 53 ≥ 2·24+2.

The tests by unit:

| Unit | Checks |
|---|---|
| Adder | about 20,000 random, edge-case and directed vectors |
| Multiplier path | all modes |
| Divide and square root | random and subnormal operands, plus special cases and the flags |
| Sequencer | cycle counts |
| Register file, CSR, decoder | directed tests |

`tb/tb_fpu_core.sv` plays the integer host. It feeds encoded instructions and honours the stall. It runs, among others, a reference program on a = 7583.1235 and b = −304.4893: loads, the four basic operations, square root, min/max, sign injection, conversions, move, compare, classify and stores. Extra directed instructions cover the remaining mechanisms: a dynamic (frm) and a static rounding mode, overflow, underflow, inexact, divide by zero, invalid, a subnormal result, the sticky flags, an illegal encoding and a CSR write. The testbench counts each of these events and fails if any never occurred. The top has no parameters, so this testbench also runs the full-size design.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  -y rtl -y tb +libext+.sv \
  rtl/fpu_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_fpu_core.sv \
  --top-module tb_fpu_core -o sim
./obj_dir/sim
```

`tb/tb_rv_enc_pkg.sv`, which holds the instruction encoders, is found through `-y tb`. For a unit testbench, replace `tb_fpu_core` with its name.
