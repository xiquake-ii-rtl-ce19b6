# A 4-wide floating-point vector coprocessor for the PowerPC 440 FCB

The PowerPC 440 in a Virtex-5 FX cannot execute AltiVec/VMX vector
instructions itself, but its auxiliary processor unit (APU) can *decode* the
VMX 128-bit loads and stores and sixteen user-defined instructions (UDIs),
and hand them to logic in the fabric over the Fabric Co-processor Bus (FCB).
This design is that fabric logic: a fabric co-processor module (FCM) that
holds 32 vector registers of four single-precision floats and executes
graphics-style vector arithmetic on them. The aim is the
throughput of SIMD hardware for 3D work (4-element vectors, 4x4 matrices):
one instruction per clock, with the answer given in the same cycle the
instruction arrives wherever possible.

Every instruction is *autonomous*: nothing comes back into the
processor's registers, no condition codes, no exceptions. Data enters the
coprocessor only through vector loads and leaves only through vector stores.
This is what makes same-cycle completion possible, and it is why most of the
FCB result outputs are constants.

## Instruction set

| instruction | effect (A = reg rs1, B = reg rs2, T = reg rd) | cycles |
|---|---|---|
| vector load | T = 128 bits from memory | completes with the load data |
| vector store | memory = reg rd | completes when the transfer size is non-zero |
| `ADD` (0) | T = [a0+b0, a1+b1, a2+b2, a3+b3] | 1 |
| `SUB` (1) | element-wise A - B | 1 |
| `MUL` (2) | element-wise A * B | 1 |
| `DIV` (3) | element-wise A / B | 1 |
| `MOV` (4) | T = A | 1 |
| `INV` (5) | element-wise 1 / A | 1 |
| `SQRT` (6) | element-wise sqrt(A) | 13 |
| `SUM` (7) | T = [a0+a1+a2+a3, b0, b1, b2] | 1 |
| `ITOF` (8) | signed 32-bit integer elements to float | 1 |
| `FTOI` (9) | float elements to signed 32-bit integers (toward zero) | 1 |

The number in brackets is the 5-bit extended opcode. A UDI carries its
fields in PowerPC bit order (bit 0 = MSB): `rd` in bits 6..10, `rs1` in
11..15, `rs2` in 16..20, opcode in 21..25. Loads and stores use the `rd`
field as the vector register. Element 0 of a vector is bits [0:31] of the
128-bit bus word, the most significant word. The opcode values and the
opcode field position are choices of this implementation.

`SUM` is less strange than it looks. It is the building block for matrix
times vector. Multiply a matrix row by the vector, then `SUM` the products
with the accumulator as B. The new dot product enters element 0 and the
earlier ones move down one place. Four `MUL`/`SUM` pairs, rows 3 down to 0,
leave `[row0·v, row1·v, row2·v, row3·v]` in the accumulator
(`tb/tb_vertex_transform.sv` does exactly this).

## Completion timing on the bus

The FCB controller (`fcm_control`) is where the design's real difficulty
lies. The bus lets the coprocessor finish an instruction in the cycle it is
presented, and the design does so wherever it can:

* **UDIs.** The instruction word is decoded straight off the bus. The
  register file is read asynchronously and the vector unit is
  combinational, so the result exists in the arrival cycle. There is one
  exception: the *first* UDI of a sequence must take at least two cycles.
  The controller keeps two one-cycle memories, *Mode* (what kind of
  instruction was in flight) and *Done* (whether it completed). A UDI may
  complete in its arrival cycle only if a UDI completed in the cycle
  before. Otherwise its result is parked in the *result hold* register and
  written back one cycle later. A back-to-back stream of single-cycle UDIs
  therefore costs N + 1 cycles.
* **Writeback permission.** A UDI result is committed only when
  `APUFCMWRITEBACKOK` allows it. The permission may come before the result,
  for example as a one-cycle pulse while a square root is still running.
  The *write-OK hold* register remembers it until the instruction
  completes. If the permission comes late, the result waits in the result
  hold.
* **Stores.** Register `rd` drives `FCMAPUSTOREDATA` directly from the
  register file's first read port (the `rs1` address is switched to `rd`).
  The processor may raise `APUFCMDECLDSTXFERSIZE` after the instruction
  itself. A store completes only in the first cycle in which that field is
  non-zero, not merely on `APUFCMDECSTORE` with the instruction strobe.
* **Loads** complete in the cycle `APUFCMLOADVALID` is high, writing
  `APUFCMLOADDATA` to `rd`. They do not wait for writeback permission.
  Every load and store moves a whole 128-bit quadword. The transfer size is
  used only as the store-completion signal, so element-sized VMX loads
  would overwrite the whole register.
* **Flush** (`APUFCMFLUSH`) abandons the instruction in flight. It writes
  nothing, gives no done, and stops a running square root.
* **Square root** takes 13 cycles in the vector unit. Every other
  operation takes one.

Only one instruction is in flight at a time. Assertions check this and
check that at most one decode strobe accompanies an instruction.
`FCMAPUSLEEPNOTREADY` is high while an instruction is in flight and not
completing. `FCMAPURESULTVALID`, `FCMAPUCONFIRMINSTR`, `FCMAPUCR`,
`FCMAPUEXCEPTION`, `FCMAPUFPSCRFEX` and `FCMAPURESULT` are constant zero.
The FCB inputs that only matter for non-autonomous or FPU instructions are
accepted and ignored: `DECNONAUTON`, `DECFPUOP`, `ENDIAN`, `MSRFE0/1`,
`NEXTINSTRREADY`, `OPERANDVALID`, `RADATA`, `RBDATA` and the UDI number
`DECUDI`.

The rule of the two-cycle first UDI, the late transfer size on stores and
single-cycle operation are properties of the processor's bus as the design
was built against it. The exact treatment of loads, flushes and early
writeback permission is this implementation's reading of the bus. It was
not checked against the processor's bus specification and should be
checked against it before the design is used with real silicon.

## Data path

```
APUFCMINSTRUCTION -> instr_decode (register + same-cycle bypass) -> rd, rs1, rs2, op
                                                   |
      rs1rd ? rd : rs1 ---> vreg_file (32 x 128, 2 async reads, 1 write) ---> s1 -> FCMAPUSTOREDATA
                                 ^                  | s1, s2
                                 |                  v
      rd_mode ? LOADDATA : result_hold <--------- vpu (4 x fp_unit, SUM adder, 4 x sqrt)
```

* `vreg_file`: 32 x 128 bits with asynchronous reads. A block RAM's
  registered read would cost the cycle that same-cycle stores need, so the
  array is written to map onto distributed RAM. It has no reset.
* `vpu`: four `fp_unit` lanes plus one extra adder for `SUM`, and four
  `sqrt_nonrestoring` units (one per element), each with a 26-bit radicand.
* `fp_unit`: combinational single-precision add/sub, multiply, divide,
  int-to-float and float-to-int.
* `nr_array_divider`: the significand divider. It is a combinational
  nonrestoring array of controlled add/subtract cells. Each cell is an XOR
  of the divisor bit with the row's add/subtract control, followed by a full
  adder. The first row subtracts. Each row's sign is a quotient bit and sets
  the next row to add or subtract. For floats it runs with a 24-bit divisor
  and 26 rows: the dividend is the dividend's significand shifted left by
  25, so the quotient has 23 fraction bits after a shift of at most one
  place. Its default parameters (4-bit divisor, 4 quotient bits) are the
  small textbook example of such an array.
* `sqrt_nonrestoring`: the iterative square root. It has three registers:
  D (the radicand, shifted two bits left per step), Q (the root, shifted one
  bit left per step) and R (the signed remainder). One adder/subtractor
  computes 4R + next two radicand bits − (4Q+1) when R ≥ 0, or + (4Q+3)
  when R < 0. The inverted sign of the result is the next root bit. The
  default W = 32 gives a 16-bit root in 16 cycles with an 18-bit adder. A
  negative final remainder is corrected by adding 2Q+1.

## Floating-point behaviour

The arithmetic is IEEE-754 single precision with these simplifications,
all choices of this implementation:

* All results are **truncated** (rounded toward zero), not rounded to
  nearest.
* Subnormal inputs are read as zero, and results below the normal range are
  flushed to signed zero.
* Overflow gives infinity (strict round-toward-zero would give the largest
  finite number).
* NaN and infinity follow IEEE: inf − inf, 0 · inf, 0/0 and inf/inf give
  the quiet NaN `7FC00000`, and x/0 gives infinity.
* `FTOI` saturates to `7FFFFFFF` / `80000000`; a NaN input gives
  `7FFFFFFF`.
* **`SQRT` has only 12 fraction bits.** Reaching the 13-cycle latency with
  one root bit per cycle means a 13-bit root. The significand, shifted one
  more place when the exponent is odd, forms a 26-bit radicand. The root's
  leading one is implicit, and the low 11 fraction bits of the result are
  zero. A negative non-zero operand gives NaN, and ±0 gives ±0. Setting
  the `vpu` parameter `SQRT_W` to 48 gives a full 24-bit root, correct to
  one unit in the last place, at a latency of 24 cycles; any even value
  from 26 to 48 trades precision against latency (`SQRT_W/2` cycles).
  Nothing else in the design depends on this value.
* `SUM` adds as (a0+a1) + (a2+a3).

## Where this departs from the original system

* The original lanes reused a third-party open-source FPU, with only its
  division replaced by the array divider. Here every lane is written from
  scratch, and its rounding and special-case handling (above) may differ
  from that FPU's.
* The original built its register file, by its own account, from
  "4KB" of memory. 32 × 128 bits is 4 Kbit, which is what is built.
* The original ran the FCB at 100 MHz. No timing closure has been attempted
  here. The combinational path from the instruction bus through the
  register file, a 26-row array divider and the write port is long.
* The rest of the original system is vendor IP and is not part of this RTL:
  the processor, the vendor's scalar FPU, the DVI, PS/2, Ethernet and sound
  blocks, and the logic analyser used for debugging.

## Files

| file | contents |
|---|---|
| `rtl/vpu_pkg.sv` | types (`fp32_t`, `vec_t`), opcodes, mode encoding, sizes |
| `rtl/vector_coprocessor.sv` | top level, FCB ports |
| `rtl/fcm_control.sv` | mode/done registers, write-OK hold, completion rules, assertions |
| `rtl/instr_decode.sv` | instruction register and field decode |
| `rtl/vreg_file.sv` | 32 x 128-bit register file |
| `rtl/result_hold.sv` | result holding register |
| `rtl/vpu.sv` | four-lane vector unit |
| `rtl/fp_unit.sv` | one floating-point lane (`fp_addsub`, `fp_mul`, `fp_div`, `fp_cvt`) |
| `rtl/nr_array_divider.sv` | nonrestoring array divider |
| `rtl/sqrt_nonrestoring.sv` | iterative square root |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two below |
| `tb/tb_vector_coprocessor.sv` | end to end, default parameters: loads, bursts of all ten operations, late writeback, late store size, flush; checks results and cycle counts |
| `tb/tb_vertex_transform.sv` | 200 vertices through a 4x4 matrix, 9 UDI cycles per vertex |
| `tb/fp_ref_pkg.sv` | reference conversions between single precision and `real`, with truncation |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog that fails the run if it hangs. The
floating-point checks compare against double-precision `real` arithmetic
truncated to single. They allow one unit in the last place (two for `SUM`,
four for the vertex dot products) because the reference rounds twice.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vpu_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_vector_coprocessor.sv \
    --top-module tb_vector_coprocessor -o sim
./obj_dir/sim
```

Swap the testbench file and `--top-module` for any other testbench. The
packages must come first on the command line. The simulator is two-state,
and the register file is not reset, so the testbenches load every register
before they read it.
