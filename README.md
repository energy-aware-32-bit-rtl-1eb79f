# Energy-aware 32-bit ALU with accurate, semi-accurate and approximate lanes

Many workloads can tolerate small errors in their results: pixels, audio
samples, sensor readings. In such data the low-order bits matter least. This
ALU uses that. It cuts its 32-bit operands into four bytes and runs each byte
pair through its own 8-bit sub-ALU. Each lane has a different accuracy:

| lane | operand bytes         | sub-ALU                | result bits     |
|------|-----------------------|------------------------|-----------------|
| 1    | `A[31:24]`, `B[31:24]` | accurate               | `OUTALU[63:48]` |
| 2    | `A[23:16]`, `B[23:16]` | accurate               | `OUTALU[47:32]` |
| 3    | `A[15:8]`,  `B[15:8]`  | semi-accurate          | `OUTALU[31:16]` |
| 4    | `A[7:0]`,   `B[7:0]`   | approximate            | `OUTALU[15:0]`  |

The inexact lanes work on truncated operands: they drop the four least
significant bits. Their adders, multipliers and dividers therefore shrink to
4-bit units. Errors stay in the low-order bytes. A bare AND clock gate adds a
second saving: when `En` is low, the output register gets no clock.

The four lanes are independent. No carry or borrow passes between bytes. Each
lane returns a 16-bit result, so that a byte product fits, and the four
results make up the 64-bit `OUTALU`. In effect this is a four-way SIMD
byte ALU whose lanes have graded accuracy. It does not compute one 32-bit
sum or product.

## Block diagram

```
            Sel[3:0] ──► alu_ctrl ──ctrl──┬──────────┬──────────┬──────────┐
                                          ▼          ▼          ▼          ▼
 A,B[31:24] ───────────────────────► alu8_accurate                          │
 A,B[23:16] ──────────────────────────────────► alu8_accurate               │
 A,B[15:8]  ─────────────────────────────────────────► alu8_semi_accurate   │
 A,B[7:0]   ───────────────────────────────────────────────────► alu8_approximate
                 16 b each ─► alu_add (64-bit register) ─► OUTALU[63:0]
 clk, En ─► clock_gate_and ─ gclk ─► alu_add;   gclk also drives port Q
```

| file | role |
|------|------|
| `rtl/alu_pkg.sv` | lane widths, the opcode enum `alu_op_e`, the control word `alu_ctrl_t`, the AND-OR mux function |
| `rtl/alu_ctrl.sv` | controlling unit: decodes `Sel` into the opcode and a 16-bit one-hot select |
| `rtl/alu8_accurate.sv` | exact 8-bit lane, used twice |
| `rtl/alu8_semi_accurate.sv` | lane 3: multiply and square on truncated operands |
| `rtl/alu8_approximate.sv` | lane 4: all arithmetic on truncated operands, approximate two's complement |
| `rtl/clock_gate_and.sv` | `gclk = clk & en` |
| `rtl/alu_add.sv` | joins the four lane results and registers them on `gclk` |
| `rtl/alu_proposed.sv` | top level |

## Instruction set

`Sel` selects one of 16 instructions. All four lanes execute the same
instruction on their own bytes. Operands are unsigned.

| `Sel` | instruction | exact result in a lane (16 bits) |
|------|-------------|----------------------------------|
| 0  | add             | `a + b` (9 bits) |
| 1  | subtract        | `a - b`, 16-bit two's complement |
| 2  | multiply        | `a * b` |
| 3  | divide          | `a / b`; `8'hFF` if `b == 0` |
| 4  | square          | `a * a` |
| 5  | modulus         | `a % b`; `a` if `b == 0` |
| 6  | and             | `a & b` |
| 7  | or              | `a \| b` |
| 8  | nor             | `~(a \| b)` (8 bits) |
| 9  | nand            | `~(a & b)` (8 bits) |
| 10 | xor             | `a ^ b` |
| 11 | xnor            | `~(a ^ b)` (8 bits) |
| 12 | one's complement | `~a` (8 bits) |
| 13 | two's complement | `-a` modulo 256 |
| 14 | right shift     | `a >> b[2:0]`, logical |
| 15 | left shift      | `a << b[2:0]`, keeps all 15 bits |

The set of instructions is the design's specification. The numbering, the
result widths, the division-by-zero values and the use of `b[2:0]` as the
shift amount were chosen for this implementation.

## Where the approximation is, and how large it is

Truncation means that an operand's four low bits are taken as zero. With
`ah = a[7:4]` and `bh = b[7:4]`, the inexact lanes compute:

| instruction | semi-accurate lane (3) | approximate lane (4) |
|-------------|------------------------|----------------------|
| add         | exact                  | `(ah + bh) << 4` |
| subtract    | exact                  | `(ah - bh) << 4` |
| multiply    | `(ah * bh) << 8`       | `(ah * bh) << 8` |
| divide      | exact                  | `ah / bh`; `8'hFF` if `bh == 0` |
| square      | `(ah * ah) << 8`       | `(ah * ah) << 8` |
| modulus     | exact                  | `(ah % bh) << 4`; `ah << 4` if `bh == 0` |
| two's complement | exact             | `~a` (the +1 is dropped) |
| other logic, shifts | exact          | exact |

The specification fixes some of this and leaves the rest open. Fixed:
truncation by four bits, all arithmetic approximate in lane 4, two's
complement approximate in lane 4, and all logic exact in lane 3. Open, and
chosen here: which arithmetic lane 3 approximates (multiply and square, the
largest units), and how two's complement is approximated.

Measured over all 65,536 operand pairs, as mean relative error (pairs with an
exact result of zero left out) and largest absolute error:

| instruction | truncated (lanes 3 and 4 as above) |
|-------------|------------------------------------|
| add         | 7.9 %, max 30 |
| subtract    | 19 %, max 15 (results near zero weigh heavily) |
| multiply    | 25 %, max 7425 |
| square      | 20 %, max 7425 |
| divide      | very large: a divisor below 16 truncates to zero |
| modulus     | very large, for the same reason |

**Departure from the stated targets.** The specification aims for 95-99 %
accuracy in the semi-accurate lane's arithmetic. It aims for 80-90 % in the
approximate lane's arithmetic and 95-100 % in its logic. Truncating the
operands meets the approximate lane's target for add (92 %) and subtract
(81 %). It does not meet it for multiply (75 %), and meets it only at the
edge for square (80 %). Divide and modulus fall far short. In the
semi-accurate lane, the truncated multiply and square reach only 75-80 %,
well short of 95-99 %. Truncating the four low bits of the *result* instead
would be more accurate, at the cost of keeping the full-size units. To try
that, change the `OP_MUL`/`OP_SQR` lines of `alu8_semi_accurate.sv`. The
testbench model in `tb/tb_alu_ref_pkg.sv` must change with them.

## Clock gating and timing

`clock_gate_and` is a plain two-input AND of `clk` and `En`. It has no latch,
as specified. `En` must therefore change only while `clk` is low; otherwise
the gate cuts a clock pulse short or adds a glitch. The testbenches change
`En` on the falling edge. For an ASIC or FPGA flow, a latch-based
integrated clock-gating cell is the safe replacement.

Timing of the top level:

* Apply `A`, `B`, `Sel` and `En` before a rising edge of `clk`.
* If `En` is high, `OUTALU` shows the result just after that edge. The
  latency is one cycle and one result is produced per cycle.
* If `En` is low, `OUTALU` keeps its value and the register gets no clock
  edge.
* `Q` is the gated clock, brought out as in the specified top level.
* There is no reset. `OUTALU` is undefined until the first enabled edge.

All lanes and the controlling unit are combinational. The only state is
the 64-bit output register in `alu_add`. The specification routes the gated
clock to each of the four sub-ALUs. Here the sub-ALUs hold no state, so the
gated clock drives only the shared output register. Externally, the
behaviour is the same: with `En` low, no register in the ALU toggles.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_alu8_accurate`, `tb_alu8_semi_accurate`, `tb_alu8_approximate`: all
  16 instructions with all 65,536 operand pairs, checked against an integer
  model (`tb/tb_alu_ref_pkg.sv`). The model is written independently of the
  RTL and uses `%`, `/` and `**` instead of bit slicing.
* `tb_alu_ctrl`: all 16 codes.
* `tb_clock_gate_and`: the gated clock at both clock phases, and its edge
  count against the enabled cycles.
* `tb_alu_add`: lane order, and that the value holds between edges.
* `tb_alu_proposed`: end to end at the default sizes. It runs directed
  cases and then 20,000 random cycles, with `En` low one cycle in five and
  zero divisor bytes mixed in. It checks `OUTALU` each cycle and checks `Q`
  at both clock phases. It counts each instruction, hold cycles, inexact
  results in lanes 3 and 4, and division by zero, and fails if any count is
  zero. It also checks one gated clock edge per enabled cycle.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/alu_pkg.sv tb/tb_alu_ref_pkg.sv tb/tb_alu_proposed.sv \
    --top-module tb_alu_proposed -o sim
./obj_dir/sim
```

Verilator finds the modules that a testbench uses through `-Irtl -Itb`. To
test a single block, name that block's testbench file and top module instead. The lane testbenches take a few seconds,
and the end-to-end one under a second.

## Changing the design

* `TRUNC_BITS` (default 4) on the two inexact lanes sets how many low bits
  are dropped. The reference model in `tb/tb_alu_ref_pkg.sv` hard-codes 4
  (`% 16`), so change both together.
* The opcode numbering lives only in `alu_op_e` in `rtl/alu_pkg.sv`. The
  testbench model uses the same numbers.
* Lane widths are in `alu_pkg` (`LANE_W = 8`, `LANE_RES_W = 16`). The top
  level's `DATA_W = 32` and `OUT_W = 64` are checked against them during
  elaboration. The lane bodies assume 8-bit lanes (`b[2:0]` shift amounts).
