# Carry-save flexible DSP accelerator

DSP kernels such as filters are chains of additions and multiplications.
Carry-save (CS) arithmetic makes the additions cheap, because no carry
ripples through the word. Most CS data paths lose that advantage at every
multiplication: they convert the CS value back to binary with a slow
carry-propagate adder before multiplying. This accelerator avoids that step.
A CS operand is recoded directly into modified Booth (MB) digits, so a whole
*add, multiply, add* template runs in carry-save form from end to end. A
carry-propagate adder is needed only when a value leaves the accelerator or
becomes a multiplier coefficient.

The basic unit is the **flexible computational unit (FCU)**. In one clock
cycle it computes either of

    W* = A x (X* +/- Y*) +/- K*
    W* = A x K* +/- (X* +/- Y*)

or any part of these. Starred names are CS numbers and `A` is a binary
coefficient. Several FCUs share a register bank that holds CS values, so one
FCU's result feeds the next FCU's operand as it is. A control unit issues one
control word per cycle; a kernel is scheduled off line into these words.

All RTL is SystemVerilog-2017 under `rtl/`. The testbenches are under `tb/`.

## Number format: modular carry-save with one guard bit

This is the part that most needs understanding before the rest of the code
makes sense.

* Data words are 16-bit two's complement (`DW = 16`).
* A CS number is a pair of 17-bit words `{c, s}` (`CW = 17`, type `cs_t`).
  Its value is `(c + s) mod 2^17`, read as a 17-bit two's complement number.
* All CS additions wrap modulo 2^17. The results are exact **as long as every
  value fits 16 bits**. The design relies on this, as any fixed-width DSP data
  path does. Nothing checks it except the `ovf` flag (below).
* The 17th bit is a guard bit. You cannot sign-extend a modular CS pair
  without resolving the carry. With the guard bit, the Booth recoder can find
  the exact signed value of a 16-bit quantity from the 17-bit pair without a
  carry chain (see the next section).
* A binary value enters the bank as `{c = 0, s = sign_extend(x)}`. The
  coefficient `A` is read from the low 16 bits of the `s` word, so an `A`
  register must hold a binary value: one loaded from the input, or written
  back by the CS-to-binary converter.
* `A` is a Q1.15 fraction, so `A = 0x4000` means 0.5. The multiplier returns
  `A*P / 2^15`, on the same scale as `P`.

## The FCU (`fcu.sv`)

```
 X*  Y*
  \  /
 [+/-]  first CS adder/subtractor (cs_addsub)   -> N*
   |  \________________
 MUX1 (N* or K*)       MUX2 (N* or K*)
   |                      |
 [ x A ]  CS->MB recoder + truncated multiplier (mb_mult)  -> M*
   |                      |
   +------[+/-]-----------+   second CS adder/subtractor
            |
            W*
```

The configuration word is `cfg = d[3:0]` (type `fcu_cfg_t`):

| bit | name     | 0           | 1            |
|-----|----------|-------------|--------------|
| d0  | `sub1`   | N* = X*+Y*  | N* = X*-Y*   |
| d1  | `mux1_n` | multiply K* | multiply N*  |
| d2  | `mux2_n` | add K*      | add N*       |
| d3  | `sub2`   | W* = M*+Q*  | W* = M*-Q*   |

Useful words:

* `0010`: W* = A(X+Y) + K.
* `0100`: W* = A·K + (X+Y), a multiply-accumulate.
* `1011`: W* = A(X-Y) - K.

To drop a term, read a zero register. For a near-unity factor use
`A = 0x7FFF`.

The FCU is purely combinational. The register bank holds its result.

**CS adder/subtractor (`cs_addsub.sv`).** This is a 4:2 compressor made of two
full-adder rows. To subtract, both words of the second operand are inverted.
The `+2` that two's complement then needs enters through the free
least-significant bit of each row's carry word. Its delay is two full adders
at any width.

## Booth recoding straight from carry-save (`cs_to_mb.sv`)

A radix-4 MB digit lies in -2..2. The recoder must produce digits `d_j` with
`sum d_j 4^j = value` from a pair whose 2-bit slices each sum to
`g = 0..6`. It does this with two short transfers between neighbouring
slices:

1. `t1 = (g >= 4)` goes to the next slice. The slice keeps `w = g - 4·t1`,
   which is 0..3.
2. Adding the incoming `t1` gives `v = 0..4`.
3. `t2 = (v >= 2)` goes to the next slice. The slice keeps `u = v - 4·t2`,
   which is -2..1.
4. Adding the incoming `t2` gives the digit, -2..2.

Each digit depends only on its own slice and the one below it. No carry
travels further.

The top digit (weight 4^7) uses bits 14..16 of both words plus the two
transfers, taken modulo 8 as a signed number. The lower seven digits sum to
at most ±10922, and the value fits 16 bits, so the top digit is forced to
lie in -2..2 and is exact. A top residue outside -2..2 means the operand was
wider than 16 bits, and `ovf` is raised. Digits are encoded as
`{neg, two, one}` (`mb_digit_t`).

## Truncated multiplier (`mb_mult.sv`)

* Each digit selects 0, A or 2A. A negative digit inverts the selection;
  the `+1` of that negation is not added (see below).
* Row j has weight 4^j. Only the 17 columns of weight 2^15..2^31 are built,
  which gives the 17-bit product.
* Every column below 2^15 is dropped. All the Booth `+1` bits sit at columns
  2j ≤ 14, so they are dropped too.
* To compensate, the constant `COMP = 4` is added at the lowest kept column.
  It is the rounded mean of the dropped bits for random operands.
* The rows are summed by a chain of 3:2 CS adders, and the product stays in
  CS form.

The result is `sum_j floor((d_j·A - neg_j)·4^j / 2^15) + COMP (mod 2^17)`.
It differs from the exact `A·P/2^15` by between -4.67 and +4 LSB. The
testbench measures a worst case of +4.0.

Note that `A = 0` gives 4, not 0: a constant-correction truncated multiplier
is always biased where the true product is zero. Use a zero `K*` register
rather than `A = 0` to drop the product term.

## The accelerator around the FCUs (`flex_accel.sv`)

| block | file | role |
|-------|------|------|
| control unit | `ctrl_unit.sv` | FSM: idle, then one control step per cycle from a 32-entry store; stalls on the data port |
| register bank | `reg_bank.sv` | 16 CS registers; write ports: one per FCU, input, write-back; a higher port wins a conflict |
| operand multiplexers | `operand_mux.sv` | routes any register to X*, Y*, K*, A of every FCU and to the converter |
| FCUs | `fcu.sv` | `NUM_FCU = 2` units working in parallel |
| CS-to-binary | `cstobin.sv` | 17-bit ripple-carry adder; 16-bit result plus overflow |
| data port | `data_port.sv` | input valid/ready stream; output one-entry buffer with valid/ready |
| package | `fcu_pkg.sv` | sizes, `cs_t`, `mb_digit_t`, `fcu_cfg_t`, `ctrl_word_t` |

**Timing.** One control step takes one cycle:

1. The control word is read.
2. The multiplexers pick the registers.
3. The FCUs and the converter compute combinationally.
4. All writes happen at the clock edge.

A value written in step t can be read in step t+1. A step that takes an
input waits while `in_valid` is low. A step that outputs waits while the
output buffer is full and `out_ready` is low. While a step waits nothing is
written, so a run lasts *steps + stalled cycles*, and `done` pulses one cycle
after the last step. Results appear on `out_data` one cycle after their step.

**Control word (`ctrl_word_t`, 66 bits).** Listed from the most significant
field:

* `last`: this is the final step.
* `in_en`, `in_dst`: store the next input sample in register `in_dst`.
* `cb_out`: convert register `cb_src` and send the result out.
* `cb_wb`, `cb_dst`: write the converted value back as binary into `cb_dst`.
* `cb_src`: the register the converter reads.
* For each FCU (FCU 1 in the higher bits): `cfg`, the operand registers
  `x`, `y`, `k`, `a`, then `we` and `dst` for the result.

Load the words with `prog_we`/`prog_addr`/`prog_data` while the unit is idle;
writes during a run are ignored. Then pulse `start`.

**Overflow.** `ovf` is sticky and cleared by `start`. It is set when an FCU
writes a result whose multiplier operand exceeded 16 bits, or when a
converted value does not fit 16 bits. Overflow of the final CS adder itself
is not detectable without a carry-propagate adder and is not flagged.

**Example: 4-tap FIR.** See `build_fir` in `tb/flex_accel_tb.sv`. Taps go in
r0..r3, samples circulate in r4..r7, and r15 is never written, so it reads
zero. Each output takes three FCU steps with the multiply-accumulate word
`0100`:

1. FCU0 computes `h0·x[n]`, while FCU1 computes `h1·x[n-1]`.
2. `h2·x[n-2] + (p0 + p1)`.
3. `h3·x[n-3] + (p2 + 0)`.

The partial sums never leave CS form. Only the output goes through the
converter.

## Where this RTL departs from, or adds to, the architecture

The architecture fixes the component set and its roles, the FCU structure,
the 16-bit operands, the 17-bit truncated and compensated product, CS-to-MB
recoding, and the ripple-carry converter. The following are choices of this
implementation:

* **Number of units and sizes.** 2 FCUs, 16 registers, 32 control steps and
  one converter; the architecture leaves these to the designer. They are
  constants in `fcu_pkg`.
* **17-bit CS words and Q1.15 scaling.** These are one consistent reading of
  "16-bit operands, 17-bit product".
* **Configuration bits.** The bit assignment of `cfg` and the multiplexer
  polarities are chosen here.
* **Recoding and compensation.** The recoding circuit and the compensation
  constant are this design's own. So is the use of a linear chain of 3:2
  adders rather than a tree.
* **Control unit.** A kernel-specific controller would be a dedicated FSM.
  Here a generic FSM reads its outputs from a loadable control-step store,
  so the same netlist runs any scheduled kernel.
* **Data port.** The handshakes, the output buffer and the write-back path
  (which makes computed values usable as coefficients) are this design's
  own.
* **No registers inside the FCU.** A stand-alone FCU with registered outputs
  would add one cycle of latency.
* **Not built.** The off-line flow is software and is not part of this RTL.
  That flow does CS-aware graph transformation, mobility-based list
  scheduling, binding and register allocation. Control words must be written
  by hand or by such a tool.

## Verification and simulation

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M`.

* **`cs_addsub_tb`**: random and corner operands against integer arithmetic
  modulo 2^17.
* **`cs_to_mb_tb`**: exact digit sums for random CS splits of 16-bit values,
  digit-by-digit agreement with the transfer rules, and the overflow flag.
* **`mb_mult_tb`**: bit-exact against the truncation formula above, and
  within -4.67..+4 of the exact product.
* **`fcu_tb`**: all 16 configuration words. `N*` and `P*` are checked
  exactly, `W*` within the truncation bound. The testbench also replays the
  operand set A=6, X=4, Y=1, K=4.
* **`cstobin_tb`, `reg_bank_tb`, `operand_mux_tb`, `data_port_tb`,
  `ctrl_unit_tb`**: each is checked against a model. The `data_port_tb` and
  `ctrl_unit_tb` cases include stalls and the exact run length.
* **`flex_accel_tb`**: end to end at the default sizes. It runs the FIR
  kernel and 200 random programs, then a forced overflow. A real-valued model
  with a per-register error bound checks every output, and a step model
  checks `in_ready`, the run length and `done` cycle by cycle. It counts
  every mechanism: both subtractions, all multiplexer settings, parallel
  FCUs, chained CS results, write-back (also used as a coefficient), input
  and output stalls, and overflow. A mechanism that never occurs is a
  failure.

`tb/fcu_ref_pkg.sv` holds the integer reference arithmetic that several
testbenches share.

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fcu_pkg.sv tb/fcu_ref_pkg.sv rtl/*.sv tb/flex_accel_tb.sv \
  --top-module flex_accel_tb -Mdir obj -o sim && ./obj/sim
```

Every testbench finishes in well under a second.

## Changing the design

* **Sizes.** `NUM_FCU`, `NREG` and `PDEPTH` in `fcu_pkg` can be changed
  freely. The control word widens with them.
* **Data width.** `DW` must stay even. `CW = DW + 1` is what makes the
  recoder's top digit exact.
* **Compensation.** `mb_mult`'s `COMP` parameter sets the constant.
* **Tests.** The random-program generator in `flex_accel_tb` adapts to the
  package sizes. The FIR example assumes at least 16 registers and 2 FCUs.
