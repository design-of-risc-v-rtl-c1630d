# Single-cycle RISC-V bit-manipulation execution IP

This block executes the instructions of the RISC-V bit-manipulation ("B")
draft extension for a coprocessor. Each cycle it takes three source operands
and a raw 32-bit instruction word. One cycle later it shows the result, plus a
flag that says whether the word was a bit-manipulation instruction at all.
Every instruction takes one cycle, and a new one can start every cycle.

There are two ideas for keeping the area small:

* **Fold the variants in the decoder.** The immediate form (`sloi`, `grevi`,
  `addiwu`, ...) and the RV64 `*W` form (`slow`, `grevw`, ...) of an
  instruction become the same internal operation as its register form, plus
  two flags. Each function is therefore built once in the datapath.
* **One rotator for every shift.** `slo`, `sro`, `rol`, `ror`, the funnel
  shifts `fsl`/`fsr`/`fsri`, all their `*W` forms and `slliu.w` use a single
  2·XLEN-bit barrel *right* rotator. The tricks that make this work are
  explained below.

`XLEN` is 32 or 64; the default is 64, which includes the RV64-only
instructions.

## Interface and timing

| port     | dir | width  | meaning                                              |
|----------|-----|--------|------------------------------------------------------|
| `clk`    | in  | 1      | clock                                                |
| `rst_n`  | in  | 1      | synchronous, active-low reset; clears `result`       |
| `src1`   | in  | XLEN   | rs1 value                                            |
| `src2`   | in  | XLEN   | rs2 value (ignored by immediate forms)               |
| `src3`   | in  | XLEN   | rs3 value (cmix, cmov, fsl, fsr, fsri and W forms)   |
| `instr`  | in  | 32     | instruction word; only opcode/funct fields and immediates are used |
| `result` | out | XLEN+1 | `result[XLEN:1]` = rd, `result[0]` = valid           |

The decode and execute logic is combinational from the inputs to the result
register, which loads on every rising clock edge. There is no handshake. If
`instr` is not a bit-manipulation instruction, the valid bit is 0 and rd is 0.
The register numbers inside `instr` are ignored: the caller supplies the
register values. The clock, the reset and the always-loading register are
this implementation's choices. The port set and the `{rd, valid}` result
format are the design's own.

## Block structure

```
 instr ──► bmi_decoder ──► {valid, op, word, use_imm, imm, right, crc_size}
                                  │
 src2 / imm ─► operand-b mux ─────┤
 src1, src3 ──────────────────────┤
            ┌─────────────────────┴───────────────────────────────┐
            │ bmi_shift_rotator  slo sro rol ror fsl fsr slliu.w  │
            │ bmi_zbb   andn orn xnor clz ctz pcnt min[u] max[u]  │
            │           pack[u|h] addwu subwu addu.w subu.w       │
            │ bmi_zbs   sbset sbclr sbinv sbext                   │
            │ bmi_zba   sh1add sh2add sh3add (+ .uw)              │
            │ bmi_zbt   cmix cmov                                 │
            │ bmi_zbc   clmul clmulh clmulr                       │
            │ bmi_zbf   bfp                                       │
            │ bmi_zbe   bext bdep                                 │
            │ bmi_zbp   grev gorc shfl unshfl                     │
            │ bmi_zbr   crc32.[bhwd] crc32c.[bhwd]                │
            │ bmi_zbm   bmatflip bmator bmatxor (RV64)            │
            └─────────────────────┬───────────────────────────────┘
                     unit mux (by op) ─► result register {rd, valid}
```

The units follow the draft's Z-extension groups. Some instructions belong to
more than one group: `andn`/`orn`/`xnor`/`pack`/`rol`/`ror` are in both Zbb
and Zbp, for example. Each of these is built only once. The pseudo-instructions
`rev8`, `rev` and `orc.b` are `grevi`/`gorci` with fixed immediates, so they
need no extra hardware. All units see the same operands. `bitmanip_ip`
selects one output with `bmi_pkg::unit_of(op)`.

## The shift rotator

This block is `rtl/bmi_shift_rotator.sv`. Rotating a 2·XLEN-bit word
`{H, L}` right by `s` leaves `(L >> s) | (H << (XLEN-s))` in its low half.
Rotating it right by `-s`, which is a left rotation by `s`, leaves
`(H << s) | (L >> (XLEN-s))` in its high half. So an XLEN-bit source can be
shifted in either direction while the other half supplies the bits shifted in.
The rotator works in four steps.

**1. Amount twiddling.** The shift amount is `b` masked to:

* `XLEN-1` for slo/sro/rol/ror and `slliu.w`;
* `31` for their `*W` forms;
* `2·XLEN-1` for fsl/fsr/fsri, or `63` for fslw/fsrw/fsriw.

**2. Mask twiddling.** This step builds the rotator input from `src1` and a
"mask" half:

| operation        | mask half     | input, left op  | input, right op |
|------------------|---------------|-----------------|-----------------|
| slo / sro        | all ones      | `{src1, 1..1}`  | `{1..1, src1}`  |
| rol / ror        | src1          | `{src1, src1}`  | `{src1, src1}`  |
| fsl / fsr / fsri | src3          | `{src1, src3}`  | `{src3, src1}`  |
| any `*W` form    | as above, 32b | `{m32, s32, m32, s32}` | same     |

For a funnel shift with an amount of XLEN or more, the draft swaps the two
operands. Here that happens by itself, because rotating a further XLEN places
the other half in the output window.

The `*W` pattern repeats with a period of 64 bits. Its result can therefore
be read from the low 32 bits of either output half, whatever the amount is
modulo 64.

**3. Direction.** A two's-complement block negates the amount. A
multiplexer steered by `instr[14]` (funct3 bit 2) feeds the rotator with
`shamt` for right operations (`instr[14] = 1`) or `-shamt` for left ones.

**4. Result selection.** The result is taken as follows:

* right operations: the low half;
* left operations: the high half;
* `*W` forms: the low 32 bits of that half, sign-extended.

`slliu.w` (`zext32(rs1) << shamt`) has no zeros-shifting path of its own. The
block computes it as `~slo(~zext32(rs1), shamt)`: it complements the input and
the output of the ones-shifting left path.

The rotator itself is `log2(2·XLEN)` stages of 2:1 multiplexers.

## Decoder and encodings

`bmi_decoder` recognises the OP, OP-IMM, OP-32 and OP-IMM-32 major opcodes.
It uses funct7/funct3 for register forms and funct6/funct3 for shift-style
immediates. Ternary instructions are marked by `instr[26]`: in OP, cmix/cmov have
`instr[25]=1` and fsl/fsr `instr[25]=0`; in OP-IMM, fsri is recognised by
`instr[26]` alone, since `instr[25]` is bit 5 of its amount. The unary group
(clz/ctz/pcnt/bmatflip/crc32*) is selected by the rs2 field.

The encodings follow the bitmanip draft of this instruction set, for example:
`andn` 0x40007033, `orn` 0x40006033, `xnor` 0x40004033, `slo` 0x20001033 (all
with rd = rs1 = rs2 = x0). The full list is `build_table` in
`tb/bmi_ref_pkg.sv`, in mnemonic / template / operand-kind form. Only the
four encodings above are confirmed by a published run of the original IP.
**The others are taken from the draft and have not been checked against
the original IP.** Check them against the
revision of the spec you target before relying on them; `bmi_decoder.sv` is
the only place to change.

On RV32 (`XLEN = 32`), the following decode as invalid:

* all OP-32 and OP-IMM-32 instructions;
* `bmat*`, `crc32.d` and `crc32c.d`;
* shift immediates with `instr[25] = 1`.

In total there are 104 encodings on RV64, 56 of which also exist on RV32.

## Semantics of the other units

All follow the draft's definitions. A `*W` form uses the low 32 bits of its
operands and sign-extends its 32-bit result.

* **Zbb:**
  * `pack = {b[lo half], a[lo half]}`, `packu` takes the high halves, and
    `packh = zext({b[7:0], a[7:0]})`.
  * `addwu`/`addiwu`/`subwu` zero-extend a 32-bit sum or difference.
  * `addu.w`/`subu.w` add or subtract `zext32(rs2)`.
  * clz/ctz are priority searches; pcnt is an adder chain.
* **Zbs:** the bit index is `b & (XLEN-1)` (or `& 31`). A one-hot mask is then
  ORed, cleared, XORed or tested.
* **Zba:** `(rs1 << N) + rs2`. In the `.uw` form rs1 is zero-extended from
  32 bits first.
* **Zbt:** `cmix = (a & b) | (c & ~b)` and `cmov = b ? a : c`.
* **Zbc:** one XLEN×XLEN carry-less product `p`:
  * `clmul = p[XLEN-1:0]`, `clmulh = p[2XLEN-1:XLEN]` and
    `clmulr = p[2XLEN-2:XLEN-1]`;
  * the `*W` forms feed zero-extended words into the same array and take
    bits `[31:0]`, `[63:32]` or `[62:31]`.
* **Zbf:** `bfp` takes a control word `cfg` from the upper half of rs2. It
  holds `len` and `off`, and `len = 0` means XLEN/2. On RV64,
  `cfg[31:30] = 2'b10` selects the 16-bit short form. The low `len` bits of
  rs2, shifted by `off`, replace those bits of rs1.
* **Zbe:** `bext`/`bdep` are built from a prefix count `rank[i]` of the
  mask bits below bit i:
  * `bdep`: bit i = `mask[i] & a[rank[i]]`;
  * `bext`: result bit `rank[i]` receives `a[i]`.

  This is the largest unit, with a quadratic gather.
* **Zbp:**
  * grev/gorc are butterfly networks. Stage k swaps blocks of 2^k bits, or
    ORs them for gorc.
  * shfl/unshfl swap the two middle quarters of each 4N-bit block, from the
    widest stage down (shfl) or the narrowest up (unshfl). The amount is
    masked to `XLEN/2-1`.
* **Zbr:** an unrolled chain of bit steps
  `x = (x >> 1) ^ (POLY & -x[0])`, tapped after 8, 16, 32 or 64 steps. POLY
  is 0xEDB88320 for CRC-32 and 0x82F63B78 for CRC-32C.
* **Zbm (RV64):** the register is read as an 8×8 bit matrix with byte i as
  row i:
  * `bmatflip` transposes it;
  * `bmator`/`bmatxor` compute `rs1 × rs2` with an OR or XOR of ANDs.

## Verification

Every module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. Expected values come from `tb/bmi_ref_pkg.sv`.
It holds bit-serial models written in the style of the draft's reference C
code: plain loops, with no rotator, prefix counts or generated masks.

* `tb_bitmanip_ip`: the whole IP at its default XLEN = 64.
  * Every one of the 104 encodings is issued, built with random register
    fields and immediates, with 40 random and corner-case operand sets.
  * The result is checked exactly one cycle after issue, at one instruction
    per cycle.
  * It also checks encodings of other extensions (valid must be 0) and reset.
  * It counts, inside the design, each unit, immediate folding, `*W`
    folding, left and right rotation, half-swapping funnel shifts, the
    `slliu.w` path, invalid instructions and reset. It fails if any count is
    zero.
* `tb_bitmanip_ip_rv32`: the same at XLEN = 32.
  * It first replays a published four-instruction log of the original IP:
    `andn 1,0 → 1`, `orn 0,1 → fffffffe`, `slo deadbeef,8 → adbeefff`.
  * That log also prints `xnor` with result `fffffffe`, which is `xnor(0,1)`,
    although its printed operands are 0 and 0. Both `xnor(0,1)` and
    `xnor(0,0) = ffffffff` are checked.
  * RV64-only instructions must come back invalid.
* `tb_bmi_decoder`: checks the folded operation, the flags and the immediate
  for every table entry, at both XLEN values. The expectation comes from the
  mnemonic, not from the decoder's tables.
* `tb_bmi_<unit>`: 300 random vectors per operation, on an XLEN = 64 and an
  XLEN = 32 instance. `tb_bmi_zbr` also runs the standard check string
  "123456789" through `crc32.b`/`crc32c.b` and compares the result with the
  published check values CBF43926 and E3069283.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/bmi_pkg.sv tb/bmi_ref_pkg.sv tb/tb_bitmanip_ip.sv \
    --top-module tb_bitmanip_ip -Mdir obj_top
./obj_top/Vtb_bitmanip_ip
```

Replace the testbench name for the others. The two packages must be named
on the command line; Verilator finds the modules through `-Irtl`.
`-Wno-fatal` keeps lint warnings in the testbenches (widths, unused bits)
from stopping the build. Each
testbench finishes in well under a second of simulation.

## How far to trust it, and where it departs

* **Instruction semantics:** all of them are checked against independent
  reference models. Those models encode the same reading of the draft as the
  RTL. A misremembered detail of the draft (an encoding, the `bfp` control
  layout, the `fsriw` immediate width) would be wrong in both, and would not
  show up in the tests.
* **Instruction count:** the original work states 106 instructions. This
  implementation has the 104 encodings listed above plus three
  pseudo-instructions. The exact set behind 106 is not known.
* **Not included:** `sext.b`/`sext.h` and the other instructions of later
  revisions of the draft are not in this instruction set. Their unary slots
  decode as invalid.
* **Original implementation:** the original was written in Bluespec and
  reported FPGA LUT counts for Zbb, Zba and Zbs (about 1200 LUTs for Zbb after
  optimisation). This SystemVerilog has not been mapped to an FPGA, so those
  counts are not reproduced.
* **Timing:** the unit is one combinational cycle, as in the original, with
  no pipelining option. `bext` and the carry-less multiplier are the longest
  paths.
* **Lint warnings:** the remaining lint warnings are all unused input bits.
  Register fields of `instr` and the high bits of shift amounts are
  deliberately ignored.

## Changing it

* **Width:** `XLEN` (32 or 64) is the only parameter. It must be the same on
  all units; `bitmanip_ip` passes it down.
* **New instruction:**
  1. Add an enumerator to `bmi_op_e`.
  2. Map it to a unit in `unit_of` (both in `rtl/bmi_pkg.sv`).
  3. Decode it in `bmi_decoder`.
  4. Implement it in the unit.
  5. Add a table entry and a reference function to `tb/bmi_ref_pkg.sv`, so
     that `tb_bitmanip_ip` covers it automatically.
* **Pipelining:** to add a pipeline stage, register the decoder output and
  the operands in `bitmanip_ip`. The units are purely combinational.
