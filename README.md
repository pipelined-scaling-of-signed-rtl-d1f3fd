# Pipelined scaler for signed residue numbers

In a residue number system (RNS), an integer is held as its remainders
modulo a few small, pairwise coprime moduli. Addition and multiplication
then work channel by channel on a few bits at a time. Division does not.
That matters in DSP datapaths. A filter with integer-scaled coefficients
gets close to the RNS range M after a few multiply-accumulates, and its
result has to be divided by a scaling factor K before the next stage.

This RTL divides a **signed** RNS number by a **product of moduli**,
K = m1·m2. It never converts the number to binary. It finds the number's
mixed-radix digits, keeps only the two digits that survive the division,
and turns them back into residues. Every step is either a 5-bit binary
add or a 64-word look-up table. A 64-word table is one 6-input FPGA LUT
per output bit, so the design pipelines into five short stages and takes
a new number on every clock.

The default base is {m1, m2, m3, m4} = {27, 29, 31, 32}. That gives:

- K = 27·29 = 783;
- M = 776 736;
- signed inputs X in [−388 368, 388 367];
- results Y = ⌊X / 783⌋ in [−496, 495].

## Numbers, digits and the quotient

A nonnegative N < M can be written in mixed radix as

    N = a1 + a2·m1 + a3·m1·m2 + a4·m1·m2·m3,      0 ≤ ai < mi

The digits are found from the residues xi = |N|mi one after another:

    a1 = x1
    a2 = |(x2 − a1)·|1/m1|m2|m2
    a3 = |(x3 − a1 − a2·m1)·|1/(m1·m2)|m3|m3
    a4 = |(x4 − a1 − a2·m1 − a3·m1·m2)·|1/(m1·m2·m3)|m4|m4

Dividing by K = m1·m2 and truncating leaves

    Ny = ⌊N / K⌋ = a4·m3 + a3.

The truncation error is below 1. No error-correction channel is needed.

**Signed numbers.** A signed X is carried as N = X mod M. With M even,
X is negative exactly when N ≥ M/2. Because m4 is even, that is the same
as a4 ≥ m4/2. The sign therefore comes free with the last digit. For a
negative X the true quotient is

    Y = Ny − M/K = Ny − m3·m4.

This is ⌊X/K⌋, rounded toward minus infinity. Its residues are
|Ny − m3·m4|mi. The original architecture writes this as
mi − |m3·m4 − Ny|mi, which is the same value once reduced into [0, mi).

## Mixed-radix conversion in three stages (`rns_mrc`)

The straightforward conversion is sequential: a2 is needed before a3 can
start, and a3 before a4. This design shortens that chain with one trick.
A digit is never computed just so that another table can multiply it by a
constant. Instead, the later table reads whatever the digit was computed
from and holds the composed function. For example, a2 is a function of
the 6-bit difference d2 = x2 − a1. So a table addressed by d2 can return
|−a2·m1|m3 directly, without waiting for a2.

All differences are 6-bit two's complement in [−31, 31]. All sums of two
table outputs are at most 62. Every table address therefore fits in 6 bits.

| Stage | Block      | Input              | Output (default-base constant)            |
|-------|------------|--------------------|-------------------------------------------|
| 1     | BA11       | x2, x1             | d2 = x2 − x1                              |
| 1     | BA12       | x3, x1             | d3 = x3 − x1                              |
| 1     | BA13       | x4, x1             | d4 = x4 − x1                              |
| 1     | ROM11      | d2                 | a2 = \|d2·14\|29                          |
| 1     | ROM12      | d2                 | \|−a2·27\|31                              |
| 1     | ROM13      | d3                 | \|d3\|31                                  |
| 1     | ROM14      | d2                 | \|−a2·27\|32                              |
| 1     | ROM15      | d4                 | \|d4\|32                                  |
| 2     | BA21       | ROM13, ROM12       | s3                                        |
| 2     | ROM21      | s3                 | a3 = \|s3·4\|31                           |
| 2     | BA22       | ROM15, ROM14       | s4'                                       |
| 2     | ROM22      | s3                 | \|−a3·783\|32                             |
| 2     | ROM23      | s4'                | \|s4'\|32                                 |
| 3     | BA31       | ROM23, ROM22       | s4                                        |
| 3     | ROM31      | s4                 | a4 = \|s4·17\|32, and sign = a4 ≥ 16      |

The constants are:

- 14 = |1/27|29;
- 4 = |1/783|31;
- 17 = |1/24273|32.

For another base, all of them are computed at elaboration from the moduli
parameters. Each stage ends in a register. a1 and a2 are delayed so that
all four digits and the sign leave together, three cycles after the input.

## Scaling and sign correction (`rns_scaling_part`)

There are two stages per residue channel mi:

- **Stage 4.**
  - One table gives |a3|mi.
  - One table gives |a4·m3|mi.
  - A two-operand modulo adder (TOMA) adds them: ti = |Ny|mi.
- **Stage 5.**
  - A correction table gives |ti − m3·m4|mi.
  - A multiplexer chooses that value when the sign is set and ti otherwise.

Two features of this structure follow for any base:

- **m3 channel:** the a4 table always gives 0, so the adder never wraps.
- **m3 and m4 channels:** m3·m4 ≡ 0, so the correction table is the identity.

Only the m1 and m2 channels really correct a negative number (they subtract
20 modulo 27 and 6 modulo 29 for the default base). The tables are kept in all four channels so the
structure does not depend on the base.

## Interface and timing (`rns_scaler`)

| Port           | Dir | Width | Meaning                                          |
|----------------|-----|-------|--------------------------------------------------|
| `clk`          | in  | 1     | clock                                            |
| `rst_n`        | in  | 1     | asynchronous, active-low; clears valid bits only |
| `in_valid`     | in  | 1     | `x` holds a number                               |
| `x`            | in  | 4×5   | residues of X; `x[0]` is modulo m1               |
| `out_valid`    | out | 1     | `y` valid, 5 cycles after `in_valid`             |
| `y`            | out | 4×5   | residues of Y = ⌊X/K⌋; `y[0]` is modulo m1       |
| `y_negative`   | out | 1     | X < 0, aligned with `y`                          |
| `mrs_valid`    | out | 1     | digits valid, 3 cycles after `in_valid`          |
| `mrs_digits`   | out | 4×5   | a1..a4 of X mod M                                |
| `mrs_negative` | out | 1     | X < 0, aligned with the digits                   |

- A number may enter on every cycle, with no back-pressure.
- A negative X is given as the residues of X + M.
- The `residue_t` and `residue_vec_t` types are in `rns_scaler_pkg`.

## Files

| File                    | Contents                                                  |
|-------------------------|-----------------------------------------------------------|
| `rtl/rns_scaler_pkg.sv` | widths, default base, types, elaboration-time arithmetic  |
| `rtl/rns_scaler.sv`     | top: converter plus scaling part, checks on the base      |
| `rtl/rns_mrc.sv`        | stages 1–3, mixed-radix digits and sign                   |
| `rtl/rns_scaling_part.sv` | stages 4–5, per-channel scaling, correction, selection  |
| `rtl/rns_lut_rom.sv`    | one 64-word table; see the formula below                  |
| `rtl/rns_binary_adder.sv` | 5-bit add, or subtract to 6-bit two's complement        |
| `rtl/rns_toma.sv`       | two-operand modulo adder                                  |
| `rtl/rns_sign_mux.sv`   | sign-controlled output multiplexer                        |

**The table formula.** Every table in the design is one instance of
`rns_lut_rom`. Each word holds

    data = | |v·MUL1|MOD1 · MUL2 + ADD2 |MOD2

Here v is the address, read as signed when `ADDR_SIGNED` is set. The inner
reduction is skipped when `MOD1 = 0`. `SIGN_BIT` adds an output bit that
is set when the result is at least `MOD2/2`. The tables are filled by a
constant function at elaboration. There are no data files.

## Changing the base

`rns_scaler` takes `M1`..`M4` as parameters. Elaboration stops with an
error unless:

- the moduli are pairwise coprime;
- each modulus is between 2 and 32;
- m4 is even.

The structure is fixed: four moduli and K = m1·m2. A larger base, or a
different K, needs more conversion stages and more digit terms in the
scaling part. Neither is provided.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values are
computed by plain integer arithmetic or search, not by the tables' formula.

| Testbench             | What it covers                                          |
|-----------------------|---------------------------------------------------------|
| `tb_rns_binary_adder` | all operand pairs, both modes                           |
| `tb_rns_lut_rom`      | four table kinds, all 64 addresses                      |
| `tb_rns_toma`         | all residue pairs for 27, 29, 31, 32                    |
| `tb_rns_sign_mux`     | all input combinations                                  |
| `tb_rns_mrc`          | 20 000 random numbers with bubbles; digits, sign, 3-cycle latency |
| `tb_rns_scaling_part` | every (a3, a4, sign); 2-cycle latency                   |
| `tb_rns_scaler`       | every one of the 776 736 signed inputs, default base     |
| `tb_rns_scaler_base2` | the same end to end for base {25, 23, 29, 32}           |

The two end-to-end testbenches check:

- the quotient and the digits;
- the 5- and 3-cycle latencies;
- that the valid outputs stay low when idle.

They also count the mechanisms the inputs exercise, and fail if any never
happens:

- positive and negative inputs;
- adder wrap-arounds;
- nontrivial corrections;
- back-to-back inputs and idle cycles.

Each testbench prints `TB_RESULT checks=N failures=F`. To run one:

    verilator --binary --timing --assert -y rtl --top-module tb_rns_scaler \
        rtl/rns_scaler_pkg.sv tb/tb_rns_scaler.sv
    ./obj_dir/Vtb_rns_scaler

The exhaustive default-base run takes under a second.

## Where this RTL departs from, or goes beyond, the original architecture

**Followed from the original.** These parts come from the original block
diagram, with its block names:

- the block structure and the stage numbering;
- the choice of base and K;
- two's complement differences, and 6-input tables;
- the sign taken from a4;
- the two-table-plus-modulo-adder scaling per channel;
- the output multiplexer under the sign.

**Readings of unclear points:**

- **Correction table.** The original describes it as "mi − yi". Here it
  follows the correction formula mi − |m3·m4 − Ny|mi instead. That formula
  is what makes the result correct.
- **ROM12 and ROM14.** These are read as |−a2·m1|m3 and |−a2·m1|m4. The
  conversion equations require this.
- **ROM13, ROM15 and ROM23.** Here they reduce their inputs modulo m3 or
  m4, so that every sum stays within a 6-bit address.
- **a3 and a4 tables.** In each channel, which table of the pair takes a3
  and which takes a4 is an arbitrary choice.

**This design's own choices:**

- **Register placement.** One register level ends each stage. That gives
  5 cycles of latency and no register in front of stage 1.
- **Valid bits.** A valid bit runs alongside the data, and reset clears
  only the valid bits.
- **Digit outputs.** The mixed-radix digits are brought out as ports.
- **Parameters.** The moduli are parameters.
- **Adder structure.** The TOMA is a plain add, compare and subtract.

**Implementation figures.** The original FPGA result reports these figures
on a Virtex-6:

- 106 registers;
- 119 LUTs;
- about 659 MHz.

Its short input and output timing suggests registers right at the ports.
This RTL has 123 flip-flops as written. It has not been placed or timed
on any device, so its speed is not known.

**Not provided:**

- **Larger bases.** The six- and seven-moduli extensions are mentioned as
  a possibility and are not built.
- **Rounding.** Results are truncated toward minus infinity, not rounded
  to nearest.
