# Carry-free FIR filters in redundant binary arithmetic

An ordinary binary adder is slow because a carry may have to ripple from the
least to the most significant bit. A radix-2 **redundant (signed-digit)
number** removes that ripple. Each digit may be −1, 0 or +1, so every value has
several spellings. That freedom lets an adder settle each digit from its own
position and its right-hand neighbour only, whatever the word length.

This RTL builds the arithmetic of such a number system from two 3-input
cells, PPM and MMP. From them it builds carry-free adders, digit-serial
adders, a converter back to two's complement, and a multiplier of a binary
coefficient by a redundant sample. On top of these sit two filters:

* a **3-tap transposed FIR filter**, `fir3_transposed`. It takes 4-digit
  redundant samples and 4-bit coefficients and gives a 10-bit two's
  complement output, one sample per clock;
* a **4-tap box-car FIR filter**, `boxcar_fir`. All its coefficients are 1.
  It is built from digit-serial redundant adders, in four independent
  1-digit lanes.

The design is a re-creation in synthesizable SystemVerilog of a full-custom
90 nm CMOS filter chip. The original was drawn at transistor level. Its
gate-level cell equations, block diagrams and word sizes are followed here.
Its transistor sizing, layout and measured delays have no RTL counterpart.
Where the original leaves a point open, the choice made here is stated
below, and in each file's header.

## Number representation

A W-digit redundant number is carried as two unsigned W-bit vectors:

    X = X+ − X−,   digit x_i = x_i+ − x_i− ∈ {−1, 0, +1}

Zero has two codes (`00` and `11`). Ports ending in `_p` hold the `+` half and
ports ending in `_m` hold the `−` half. Everything is least-significant-digit
first: bit i has weight 2^i.

## The two cells

| cell       | equation                    | outputs                                         |
|------------|-----------------------------|-------------------------------------------------|
| `ppm_cell` | x+ − x− + y = 2·t+ − u−     | u− = x+ ⊕ x− ⊕ y;  t+ = x+ if x+≠x−, else u−    |
| `mmp_cell` | x+ − x− − y = −2·t− + u+    | u+ = x+ ⊕ x− ⊕ y;  t− = x− if x+≠x−, else u+    |

PPM ("plus-plus-minus") adds an unsigned bit to a signed digit. It returns a
**transfer digit** of weight +2 and an **interim digit** of weight −1. MMP
("minus-minus-plus") subtracts an unsigned bit, with the signs reversed. The
transfer goes one position to the left and no further. That single fact makes
the arithmetic carry-free. PPM is also a binary full adder with an inverted
x− input and an inverted sum output.

## Adders built from the cells

* `ppm_adder_par` / `mmp_sub_par` (W = 4): one cell per digit. The interim
  digits stay in place and the transfers move up one position. The result has
  W+1 digits. One sum half has a constant 0 at each end (for example
  `s_p[0]` and `s_m[W]` of the adder). The delay is one cell, whatever W is.
* `ppm_lsd_serial`: the same adder, one digit per clock. A D flip-flop delays
  the transfer into the next digit's clock.
* `sbd_adder`: the digit-serial adder of **two** redundant numbers. A PPM
  cell adds x and y+. Its transfer is delayed one clock and fed to an MMP cell,
  which subtracts the PPM's interim digit and y−. The MMP's interim digit is
  the sum digit s+. Its transfer, delayed one clock, is s−.

**Serial timing.** Digit i of the sum appears in the same clock as input
digit i, so there is no latency. An N-digit sum has N+1 digits, so one clock of
zero input after the last digit flushes the flip-flops. All flip-flops
(`dff_s`) have the S pin of the original cell: S high lets Q follow D on the
rising edge, S low forces Q to 0 at once. In this RTL S is an asynchronous,
active-low clear called `s_n`. In the original adder and filter schematics
S is tied high. Here it is a port, so a test can start from a known state.
Holding `s_n` at 1 gives the original behaviour.

## Back to two's complement: `rb2bin`

The converter treats X+ and X− as two unsigned numbers and subtracts them with
a chain of MMP cells. Here the borrow does ripple:
x_i+ − x_i− − c_i = −2·c_(i+1) + y_i, with c_0 = 0. The last borrow becomes
the top output bit y[W], with weight −2^W. So y is the (W+1)-bit two's
complement value of X+ − X−. This is the only full-length ripple in the
multiplier, and it comes last.

## The redundant multiplier (`rd_multiplier`)

This is the least obvious block. It multiplies an **unsigned** 4-bit
coefficient A by a **4-digit redundant** sample B. The product is 9 bits of
two's complement (range −225…225), one bit more than a 4×4 binary product
because B is signed.

1. **Recode** each digit b_j into a sign and a magnitude (`bj_recoder`):
   |b_j| = b+ ⊕ b−, sign(b_j) = ¬b+ ∧ b−.
2. **Partial products** (`pp_cell`): r_ij = (a_i ⊕ sign_j) ∧ |b_j|. Row j
   is A, ¬A or 0.
3. **Sign correction.** A row whose digit is −1 should be −A. In 4 bits,
   ¬A = 15 − A, so −A = ¬A + 1 − 16. Each row is therefore split into:
   * a positive part r_j + sign_j. A row of four full adders adds it at
     weight 2^j into an accumulator, with sign_j as the row's carry-in;
   * a negative part sign_j at weight 2^(j+4). These bits form the minus half
     of a redundant number.
4. **Convert.** An 8-position `rb2bin` subtracts the minus half from the
   accumulator and produces S0…S8.

Example: A = 5, B = (+1, 0, 0, −1) read msd to lsd, that is 8 − 1 = 7.
Row 0 is the −1 digit, so it gives r = ¬5 = 10 plus carry-in 1, which is 11.
Rows 1 and 2 are 0. Row 3 gives 5·8 = 40. The accumulator is 11 + 40 = 51.
The minus half is 1·2^4 = 16. 51 − 16 = 35 = 5·7.

The recoding and partial-product gates, the four adder cells per row and the
final redundant-to-binary stage follow the original. The exact row wiring
(ripple rows, with the sign as carry-in) is this design's own. The original
calls the block "digit-serial", but its pin list has all digits of B in
parallel and no clock. The block here is combinational.

## The 3-tap filter (`fir3_transposed`)

    y(n) = a·x(n) + b·x(n−1) + c·x(n−2)

This is the transposed (data-broadcast) form. x(n) goes to three multipliers
at once. c·x passes through a 9-bit register (`dff_reg`, nine D flip-flops).
A 9-bit ripple adder (`rca_adder`) adds it to b·x, and the 10-bit sum passes
through a second register. A 10-bit adder then adds a·x. The critical path is
one multiplier plus one adder, and there is one sample per clock. y is
combinational from the current sample and the two registers, so a new sample
is answered in the same clock.

* Coefficients are ports. Read as fractions with an LSB of 1/64, code 8 is
  0.125, the value the original uses on its taps.
* Each past sample stays paired with the coefficient in force when it
  entered. Changing a coefficient therefore takes effect tap by tap.
* `y` has 10 bits. The second register and adder are 10 bits wide, so y is
  exact while |y| ≤ 511, and wraps modulo 2^10 beyond that. Only large
  coefficients on all three taps with large samples get there. With 0.125 on
  every tap, |y| ≤ 360. Making the second stage 10 bits (the original gives 9
  bits for the adders and registers and 10 for the output) is this design's
  choice.
* The adders sign-extend. The tenth sum bit is a8 ⊕ b8 ⊕ carry, not the bare
  carry, because the products are signed.

## The box-car filter (`boxcar_fir_1b`, `boxcar_fir`)

With all four coefficients equal to 1, the filter needs no multiplier:

    d1 = D(x), d2 = D(d1), d3 = D(d2),   s = ((x + d1) + d2) + d3

The input is one redundant digit per clock. Each delay is a pair of
flip-flops, one for x+ and one for x−. Each `+` is an `sbd_adder`. This is
where the behaviour needs care. The SBD adders also pass their transfer digits
one clock forward, so it is best to read the streams as serial numbers, least
significant digit first. Read that way, each delay multiplies by 2, and the
output stream equals **15 × the input stream** (1 + 2 + 4 + 8).

After the last nonzero input digit, four clocks of zero input bring out every
pending digit. The output is zero from then on. Taken digit by digit, an
output digit is not x(n)+…+x(n−3): it is a redundant spelling of the same
total.

`boxcar_fir` has LANES = 4 independent copies of the 1-digit filter, the
"4-bit input" version. The lanes never interact. That the 4-bit version is
four side-by-side copies is an inference: its reported power is exactly four
times that of the 1-digit version.

## Top level (`rbfir_top`)

The top holds five independent units that share only `clk` and `s_n`:

| prefix  | unit                        | ports                                                                     |
|---------|-----------------------------|---------------------------------------------------------------------------|
| `fir3_` | 3-tap filter                | `x_p[3:0]`, `x_m[3:0]`, `coef_a/b/c[3:0]` → `y[9:0]`                      |
| `bc_`   | 4-lane box-car filter       | `x_p[3:0]`, `x_m[3:0]` → `s_p[3:0]`, `s_m[3:0]`                           |
| `pa_`   | 4-digit parallel PPM adder  | `x_p`, `x_m`, `y` [3:0] → `s_p`, `s_m` [4:0]                              |
| `ms_`   | 4-digit parallel MMP subtr. | `x_p`, `x_m`, `y` [3:0] → `s_p`, `s_m` [4:0]                              |
| `ls_`   | serial lsd-first PPM adder  | `x_p`, `x_m`, `y` → `s_p`, `s_m`                                          |

The top has no parameters. Widths come from `rbfir_pkg` (`X_DIGITS`,
`COEF_W`, `OUT_W`). Most submodules take a width parameter (`W`, `A_W`/`B_W`,
`LANES`) whose default is the original's size.

Four outputs are constant by construction (`pa_s_p[0]`, `pa_s_m[4]`,
`ms_s_m[0]`, `ms_s_p[4]`). They are the "0" digits at the ends of the
parallel adders. `fir3_transposed` leaves bit 10 of its final sum unused,
because of the 10-bit output. Lint reports both, and both are deliberate.

## Not in the RTL

* The transistor-level inverter, NAND2 and NAND3 cells. Their substance is
  device sizing, layout and delay; where a gate is needed, the RTL writes it
  as an operator.
* The gate-level flip-flop. `dff_s` is a behavioural register with the same
  S behaviour.
* The systolic bit-serial multiplier, described only as background
  architecture. What is given of it does not fix its timing, so it is not
  built. The filters use the array multiplier above.
* Clock rates: about 368 MHz for the 3-tap filter and 80 MHz for the
  box-car filter. They are transistor-level results, and nothing in the RTL
  depends on them.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`, and each has a
watchdog. With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
              --top-module tb_rbfir_top tb/tb_rbfir_top.sv
    ./obj_dir/Vtb_rbfir_top

Replace the name to run another test. Each block `X` has its test in
`tb/tb_X.sv`:

* cells, recoder, partial product, converter, parallel adders and
  multiplier: exhaustive over all input codes (the multiplier: 16 × 256
  cases);
* serial adders and box-car filters: random words, each checked for its
  value. The serial adders and the 1-digit box-car filter also check that
  the flush length is exact, and the serial adders check the clear;
* `tb_fir3_transposed`: random samples and coefficients against a reference
  model, plus an impulse with 0.125 on every tap (8, 8, 8, 0) and an S clear;
* `tb_rbfir_top`: all units at once, at full size. It also counts that each
  mechanism happened: −1 digits, negative outputs, clears with state
  pending, transfers out of the top digit, and nonzero flush digits;
* `tb_wl_fir3_impulse`: the impulse-response workload of the 3-tap filter.
  It covers every coefficient code and every redundant spelling of every
  amplitude.

All of them pass. Each was also shown to fail on a deliberately broken copy
of its block.
