# A delay-insensitive 8051 ALU in NULL Convention Logic

Clocked logic works only if every path meets its timing, and timing drifts a
long way when a chip is cooled from room temperature towards a few kelvin or
run at a very low supply voltage. This design sidesteps the problem for the
arithmetic-logic unit of an 8051-compatible microcontroller by building it in
NULL Convention Logic (NCL): every signal carries its own validity, every gate
waits until its inputs are complete, and the ALU itself announces when a
result is ready. No delay inside the ALU has to be known for it to compute
correctly. The original chip of this kind, an 8-bit ALU in a 0.5 µm SiGe
process, was shown to work from 2 K to room temperature and at supplies as low
as 0.36 V.

The RTL here describes that ALU together with the small test wrapper around
it: a 48-bit serial-in register that feeds its inputs, a 38-bit serial-out
register that collects its outputs, and the few gates that sequence the
handshake between the clocked registers and the clockless ALU.

```
 data_in ─► [48-bit serial-in register] ──48 wires──► AND nullcontrol ──► ┌──────────────┐
                 ▲ clock AND NOT ko                                        │   NCL ALU    │──► ko
                 │                                                         │ arith, logic │
 clock ──────────┴──────────────► [38-bit serial-out register] ◄─38 wires──┤   OR merge   │
                                     load = ko            └─► data_out     └──────────────┘
```

## NCL in four ideas

**Dual rail.** Every logical bit travels on two wires, `t` (rail 1) and `f`
(rail 0). `t=1,f=0` is DATA 1, `t=0,f=1` is DATA 0, both low is NULL ("no value
yet"), both high is illegal. In `ncl_pkg` this is the struct `dr_t`.

**Wavefronts.** A circuit alternates between a complete DATA set on its inputs
and a complete NULL set. Outputs may only go to DATA when the inputs are all
DATA and may only return to NULL when the inputs are all NULL. A result is
therefore never half-valid from the receiver's point of view: once every
output pair holds DATA, the result is final.

**Threshold gates with hysteresis.** The building block is the TH*m*_*n* gate
(`ncl_th_gate`): its output rises once at least *m* of its *n* inputs are high
and then stays high until all *n* inputs are low. TH*n*_*n* is the C-element;
TH1_*n* is an ordinary OR.

**Completion detection.** ORing the two rails of a signal says "this signal
has a value"; a TH*n*_*n* gate over all those ORs rises when every signal has
DATA and falls when every signal is back to NULL (`ncl_completion`). For the
ALU this output is called **Ko**: high means "complete result present", low
means "NULL has passed through, ready for new operands".

In RTL, the hysteresis of a threshold gate is written as a level-sensitive
latch (`always_latch`): set when the threshold is met, clear when all inputs
are low, hold otherwise. The ALU units use the same pattern on their output
rails: they compute the 8051 function at word level, but their outputs obey
the DATA/NULL rules above. The latches are the intended state-holding
elements of NCL, not coding accidents; synthesis of these files maps them to
latches: 38 per operation slot, one per completion gate.

## The ALU core (`ncl_alu`)

### Input and output sets

The ALU reads 24 dual-rail signals (48 wires) and produces 19 (38 wires),
exactly the sizes of the two shift registers. Signal *i* sits on wires
*2i+1* (rail 1) and *2i* (rail 0):

| Input signal | Bits | Meaning |
|---|---|---|
| `tmp1` | 8 | first operand (A; DPL for INC DPTR) — wires 15:0 |
| `tmp2` | 8 | second operand (B or source byte; DPH for INC DPTR) — wires 31:16 |
| `al` | 4 | operation code — wires 39:32 |
| `ac` | 1 | auxiliary carry in |
| `cyi` | 1 | carry in |
| `los` | 1 | select the logic unit |
| `aos` | 1 | select the arithmetic unit — wires 47:46 |

| Output signal | Bits | Meaning |
|---|---|---|
| `result_l` | 8 | result byte (MUL: low byte, DIV: quotient) — wires 15:0 |
| `result_h` | 8 | MUL high byte, DIV remainder, INC DPTR high byte; 0 otherwise |
| `ov`, `ac`, `cy` | 1 each | flags — `cy` on wires 37:36 |

### Operations

| `al` | with `aos` = 1 | with `los` = 1 |
|---|---|---|
| 0 | ADD | ANL (and) |
| 1 | ADDC | ORL (or) |
| 2 | SUBB | XRL (xor) |
| 3 | INC | CPL |
| 4 | DEC | RL |
| 5 | INC DPTR | RR |
| 6 | MUL | RLC |
| 7 | DIV | RRC |
| 8 | DA | SWAP |

Results and flags follow the 8051 instruction set: ADD/ADDC/SUBB set CY, AC
and OV; MUL clears CY and sets OV when the product exceeds 255; DIV clears CY
and sets OV on division by zero (then `result_l` = FFh and `result_h` = A);
DA adjusts after BCD addition and can only set CY; RLC/RRC rotate through CY.
Where an instruction leaves a flag alone, the ALU passes `cyi` and `ac` through
and drives OV to 0, since there is no OV input.

### Steering and merging

Every operation has its own slot (`ncl_alu_op`), nine in the arithmetic unit
(`ncl_alu_arith`) and nine in the logic unit (`ncl_alu_logic`). All 18 slots
see the same input wires, but a slot produces DATA only when it is addressed:
its unit select (`aos` or `los`) is DATA 1 and `al` holds its code. Every
other slot keeps its outputs NULL. Since an unaddressed slot outputs all
zeros, the 18 result sets are merged simply by ORing them wire by wire (first
within each unit, then the two units), and completion detection on the merged
set gives Ko.

Exactly one of `aos`/`los` must be DATA 1 and `al` must be 0–8. Otherwise no
slot is addressed, the outputs stay NULL and Ko never rises, so the handshake
stops; with both selects DATA 1 two slots answer and the outputs carry
illegal codes. These are illegal instructions, not handled cases.

Each slot waits until *all 24* input signals are DATA before it drives DATA,
even those its operation does not use, and returns to NULL only when all 24
are NULL. That is the conservative reading of input completeness.

## The chip wrapper (`ncl_alu_chip`) and its handshake

The outside world is clocked; the ALU is not. Two gates bridge them
(`ncl_input_control`):

* every ALU input wire is `register bit AND nullcontrol`, so `nullcontrol = 0`
  presents a NULL set and `nullcontrol = 1` presents the stored DATA set;
* the input register's clock is `clock AND NOT ko`, so it can shift only while
  the ALU is NULL and is frozen while the ALU holds a result.

The output register (`piso_shift_register`) runs on the ungated clock. Ko is
its per-bit select: with Ko high every flip-flop loads its ALU output, with Ko
low every flip-flop takes its neighbour's value (the first takes 0).

One instruction, with `nullcontrol` changed only while `clock` is low:

1. `nullcontrol = 0`; wait until `ko = 0` (NULL has reached the outputs).
2. Give 48 clocks, presenting the 48 input wires on `data_in` most significant
   wire first. During the first 38 of these clocks `data_out` delivers the
   previous result, most significant wire first (sample before each rising
   edge).
3. `nullcontrol = 1`; `ko` rises once every output pair holds DATA, which also
   stops the input register's clock.
4. Give two clocks: the output register captures the result.
5. Back to step 1. After `ko` falls, the captured result leaves on `data_out`.

An instruction thus costs 50 clocks, with the serial output of one instruction
overlapping the serial input of the next. The ALU's own settling happens
between clock edges and is observed through `ko`, which is brought out as a
pin so that a tester can wait for it rather than for a fixed time.

Two cautions. The clock gate is a plain AND: if `nullcontrol` changed while
`clock` was high, Ko could cut a clock pulse short. And the output register
loads on every clock edge while Ko is high, including while the ALU is
part-way back to NULL, so no clock edge may occur between lowering
`nullcontrol` and Ko falling. An assertion in `ncl_alu_chip` flags a clock
edge with Ko high and an incomplete output set.

## What follows the original and what is this design's choice

Taken from the original design: dual-rail NCL with threshold gates with
hysteresis; the list of 18 operations; steering of operands to the selected
logic and ORing of the results; the 48-bit serial-in and 38-bit serial-out
registers and the names of all signals between them and the ALU; Nullcontrol
forcing NULL by ANDing the inputs; the input clock passed only while Ko is
low; Ko selecting load or shift in the output register; two clocks with Ko
high before shifting out.

Chosen here, because the original does not say:

* Ko polarity is high = complete DATA. (Generic NCL descriptions use the
  inverse for a register's request line; the chip's own sequence needs Ko to
  rise on DATA.)
* The split of the 6 remaining input signals into a 4-bit `al` code plus
  one-bit `aos` and `los` selects, and all operation codes.
* Codes 9–15 and select combinations other than exactly one DATA 1 are
  illegal and stop the handshake.
* Operand roles (A = `tmp1`), the contents of `result_h`, the pass-through of
  unchanged flags, OV = 0 when unaffected, and the DIV-by-zero result.
* Word-level Boolean functions in place of the original gate-level netlist
  (which was derived with a threshold-gate reduction method and is not
  available); completion detection as one wide C-element rather than a tree
  of small gates.
* Serial bit order, Ko as a pin, and no reset anywhere. The NCL part clears
  itself whenever its inputs are NULL; the shift registers hold nothing that
  is used before it has been shifted in, so the first word out of
  `data_out` after power-up is meaningless.

Not included: the other 8051 blocks that shared the original die, the pads
and package, and anything electrical (supply-voltage scaling, power,
temperature behaviour), which RTL cannot express.

## Files

| File | Contents |
|---|---|
| `rtl/ncl_pkg.sv` | dual-rail type, signal layouts, operation codes, encode/decode helpers |
| `rtl/ncl_th_gate.sv` | TH*m*_*n* threshold gate with hysteresis |
| `rtl/ncl_completion.sv` | completion detector |
| `rtl/ncl_alu_op.sv` | one operation slot: 8051 function, steering, DATA/NULL hold |
| `rtl/ncl_alu_arith.sv`, `rtl/ncl_alu_logic.sv` | the two ALU units, nine slots each |
| `rtl/ncl_alu.sv` | ALU core: units, OR merge, Ko |
| `rtl/sipo_shift_register.sv`, `rtl/piso_shift_register.sv` | the serial registers |
| `rtl/ncl_input_control.sv` | Nullcontrol gating and Ko clock gate |
| `rtl/ncl_alu_chip.sv` | top level |
| `tb/alu_ref_pkg.sv` | integer reference model of all 18 operations |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ncl_alu_chip \
    -y rtl -y tb +libext+.sv rtl/ncl_pkg.sv tb/alu_ref_pkg.sv tb/tb_ncl_alu_chip.sv
./obj_dir/Vtb_ncl_alu_chip
```

Replace `tb_ncl_alu_chip` with any other testbench name. What they check:

* `tb_ncl_th_gate`, `tb_ncl_completion`: set, clear and hold of the gates,
  completion rising only on the last DATA signal and falling only on the last
  NULL signal.
* `tb_ncl_alu_op`: all 18 slots side by side; only the addressed one may
  answer, with the reference result.
* `tb_ncl_alu_arith`, `tb_ncl_alu_logic`, `tb_ncl_alu`: every operation with
  corner and random operands and BCD sums for DA, each taken through NULL →
  partial DATA → DATA → partial NULL → NULL, checking that outputs and Ko
  change only on complete sets and that the unselected unit stays NULL.
  `tb_ncl_alu` also lets the 24 input signals arrive and leave one at a
  time in random order, standing in for arbitrary wire delays, and checks
  that outputs and Ko move only with the last one.
* `tb_sipo_shift_register`, `tb_piso_shift_register`,
  `tb_ncl_input_control`: register order, load/shift selection and the
  gating.
* `tb_ncl_alu_chip`: the whole chip at its default sizes, 360 instructions
  through the serial handshake above, checking every result read from
  `data_out`, the frozen input register while Ko is high and the 50-clock
  instruction cost, and counting DATA/NULL wavefronts, gated clocks, loads,
  shifts, each instruction and each flag being set.

The simulations are zero-delay, so they show the logic and the handshake
order, not delay insensitivity itself: every wavefront settles in the same
time step. Verilator simulates two-state logic; the latches start at random
values and are cleared by the first NULL set, which every testbench applies
first.
