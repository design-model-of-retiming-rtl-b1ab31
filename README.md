# SPT shift-add multiplier and FIR filter

A multiplier for FIR filter coefficients that never multiplies. Each coefficient is approximated
as a sum of at most three **signed powers of two** (SPT terms), for example
`0.875 = 2^0 - 2^-3` or `0.3125 = 2^-2 + 2^-4`. Multiplying a sample by the coefficient then
takes up to three right shifts of the sample and up to two additions or subtractions.

The coefficient is not stored as a binary number. It is stored already decoded into the control
signals that drive the shifters and adders, so no decoder sits between the coefficient store and
the multiplier.

Only the stages a coefficient needs are enabled. A one-term coefficient never switches the
adders. A small timing generator, the *speculative delay line*, acknowledges the product as soon
as the last used stage is done.

The source design is an asynchronous, low-power multiplier built from self-timed latch adders,
meant for a hearing-aid filter clocked at a few MHz. This RTL is a **synchronous** rendering of
it. Each delay element and latch becomes a clocked flip-flop, and the rest of the structure is
kept: three shift modules, two add/subtract stages, an output mux and a request/acknowledge
handshake. A 16-tap FIR filter is built around it, with one multiplier per tap.

## Number formats

**Samples and products** use 16-bit sign-magnitude Q15. Bit 15 is the sign and bits 14:0 are the
magnitude in units of 2^-15. Negative zero is allowed and means zero.

**Coefficients** are stored as a control word, `spt_pkg::spt_ctrl_t`, of 18 bits:

| field  | bits | meaning |
|--------|------|---------|
| `sg`   | 1 | coefficient sign |
| `en1`  | 1 | term 2 is present |
| `en2`  | 1 | term 3 is present (only counts when `en1` is set) |
| `ctl1` | 4 | term 1 is the sample shifted right by `ctl1` places, i.e. weight 2^-ctl1 |
| `ctl2` | 4 | shift of term 2 |
| `ctl3` | 4 | shift of term 3 |
| `sub1` | 1 | term 2 is subtracted instead of added |
| `sub2` | 1 | term 3 is subtracted instead of added |
| `corr` | 1 | truncation correction (see below) |

The product magnitude the hardware computes is, with `t_i = floor(|x| / 2^ctl_i)`:

```
m = t1                                  if !en1
m = t1 ± t2 ± corr                      if en1 & !en2   (corr has the sign of term 2)
m = t1 ± t2 ± corr ± t3                 if en1 & en2
product = { sg ^ x[15], m mod 2^15 }
```

Rules the encoder of the coefficients must follow (the hardware does not check them):

- **Term 1 has the largest weight** (`ctl1 <= ctl2, ctl3`). A subtraction then never goes
  negative, so no comparator is needed.
- **The result must fit in 15 bits.** An encoding whose value exceeds 1.0, such as
  `2^0 + 2^-1`, wraps around.
- **Zero** is encoded as term 1 minus an equal term 2 (`en1=1, sub1=1, ctl1=ctl2`). This is
  `spt_pkg::SPT_ZERO`, the value the coefficient store resets to.

**Truncation and `corr`.** Each shifted term drops the bits shifted out, so a sum of terms comes
out slightly low and a difference slightly high. Setting `corr` moves the result of the first
add/subtract stage by one LSB against that bias: +1 when term 2 is added, −1 when it is
subtracted. It is realised as the carry-in of the first stage, `sub1 ^ corr`.

The source says that an error-correction scheme exists and that it enters at this stage. The
exact correction rule above is this design's own reading. The analysis that decides, per
coefficient, whether to set `corr` is not part of the RTL. It belongs to whatever tool encodes
the coefficients.

## Multiplier datapath (`spt_multiplier`)

```
             multiplicand[14:0]
        ┌───────────┼────────────┐
   shift_module1  shift_module2  shift_module3     latch: REQ, REQ&EN1, REQ&EN2
   (>> ctl1)      (>> ctl2)      (>> ctl3)
        │  sm1          │ sm2          │ sm3
        ├──────► add_sub 1 ◄──┘           │         EA1, SUB1, carry-in SUB1^CORR
        │            │ as1                │
        │            └─────► add_sub 2 ◄──┘         EA2, SUB2, carry-in SUB2
        │            │            │ as2
        └──────► product_mux ◄────┘                 select by EN1/EN2
                     │
      {SG ^ multiplicand[15], magnitude} = product[15:0]
```

- **`shift_module`** holds an input latch and a barrel shifter. The latch takes the magnitude
  on each clock edge while its enable is high. The shifted output is combinational from the
  latch. The latches of terms 2 and 3 stay closed when their term is absent, so nothing behind
  them switches.
- **`add_sub`** is a 15-bit ripple chain of `latch_adder` cells. The B operand is inverted
  when `sub` is set.
- **`latch_adder`** is a full adder whose sum is held while `ea` is low; only the sum leaves
  the stage, so only the sum is held. Here the hold element is an enabled flip-flop: the sum is
  captured on every edge while `ea` is high.
- **`product_mux`** passes `sm1` when `en1` is clear, `as2` when `en1` and `en2` are set, and
  `as1` otherwise. The sign is `sg ^ x[15]`.

## Timing: the speculative delay line (`speculative_delay`)

The delay line turns REQ and the two "term present" flags into the two stage enables and ACK:

```
d    = REQ delayed by SHIFT_DLY
EA1  = d & EN1
EA2  = (EA1 & EN2) delayed by ADD1_DLY
m    = EN2 ? EA2 : EA1
ACK  = EN1 ? ((m & REQ) delayed by ADD2_DLY) : d
       ... and, after REQ falls, held high until every delay flip-flop is clear
```

Each delay is a chain of D flip-flops, one cycle long by default. Latency is counted in clock
edges from the first edge that samples REQ high:

| terms | stages used | ACK rises after (default) | in general |
|-------|-------------|---------------------------|------------|
| 1 | shift | 1 | S |
| 2 | shift, ADD/SUB1 | 2 | S + A2 |
| 3 | shift, ADD/SUB1, ADD/SUB2 | 3 | S + A1 + A2 |

S, A1 and A2 are `SHIFT_DLY`, `ADD1_DLY` and `ADD2_DLY`.

**Handshake.** The handshake is four-phase:

1. Drive `multiplicand` and `ctrl`.
2. Raise `req` and hold all three steady.
3. Wait for `ack` to rise; `product` is valid from then on.
4. Lower `req` and wait for `ack` to fall.

`product` stays valid after the handshake until the next request.

**Return-to-zero hold (this design's addition).** In the original delay line, ACK can fall while
the EA2 chain still holds a one. A request that follows at once would then see a false early ACK.
To prevent this, ACK is held high during the return-to-zero phase until the whole line has
cleared. It falls max(S, A2, S+A1) edges after REQ falls, counting only the terms used.

**Cases.** The delay line separates three cases: one, two and three terms. The source mentions
four adaptive cases, but its delay line shows only these three. EN2 without EN1 acts as one term.

## FIR filter (`fir_filter`, the top)

`fir_filter` is a direct-form filter, `y[n] = Σ_k c_k · x[n−k]`, with `TAPS = 16` taps.

- **Delay line.** A D flip-flop delay line `x[0..TAPS-1]` holds the samples; `x[0]` is the
  newest.
- **Coefficient store.** `coef_ctrl_mem` holds one SPT control word per tap. It is written
  through `coef_we/coef_addr/coef_data` and read in parallel. Reset sets every tap to zero.
  Write it only while `in_ready` is high; an assertion flags writes made while the filter is
  busy.
- **Controller.** A three-state controller (idle, multiply, return-to-zero) handles each
  sample:
  1. accept it when `in_valid && in_ready`, and shift it into the delay line;
  2. raise one REQ to all `TAPS` multipliers;
  3. when every ACK is high, register the two's-complement sum of the sign-magnitude products
     into `out_sample`, pulse `out_valid` and lower REQ;
  4. return to idle when every ACK is low.
- **Output.** `out_sample` has `16 + clog2(TAPS)` bits (20 at 16 taps), LSB weight 2^-15. It is
  full precision, with no rounding or saturation.
- **Rate.** With the default delays, `out_valid` rises 1 + (largest term count among the
  coefficients) edges after the accepting edge, that is 2 to 4. A new sample can be accepted
  once the return-to-zero phase ends, so a sample takes about 5 to 8 cycles in all.

The source evaluates filters of 4, 8 and 16 taps. `TAPS` can be set to any of them. A smaller
response also runs on the 16-tap default with zero coefficients in the unused taps.

## How far this follows the source design

These parts follow the source:

- the three-term SPT encoding with predecoded control signals EN1, EN2, CTL1–3, SUB1, SUB2,
  CORRECTION and SG;
- the 16-bit sign-magnitude operands and product;
- three latch-plus-shift modules with term 1 the largest, so no comparator is needed;
- two add/subtract stages of latch adders, whose sum is held and whose carry is not;
- the output mux, with the sign formed from SG and the multiplicand sign;
- the structure of the speculative delay line;
- enabling only the stages a coefficient needs;
- the 4/8/16 tap counts of the filter.

These are this design's own choices:

- **Synchronous, not asynchronous.** Delays are whole clock cycles, and latches are enabled
  flip-flops. No delay values are given in the source, so each defaults to one cycle.
- The **correction rule**, carry-in `sub1 ^ corr` on the first stage only.
- The **4-bit shift controls**, and a plain barrel shifter in place of the source's
  (undescribed) low-power shifter.
- Holding **ACK during return-to-zero**.
- The **whole FIR structure**: direct form, one multiplier per tap, the controller, the
  valid/ready interface, the coefficient write port, reset to zero coefficients, and a
  full-precision output.
- The **reset**: asynchronous, active-low, on the delay line, the controller and the
  coefficient store. The datapath latches have no reset; they are always written before they
  are read.

Not modelled:

- the transistor-level behaviour of the latch adder (weak keeper, small devices);
- power, area and the analog delay of the delay line;
- the analysis that picks SPT terms and correction bits for a given filter.

The figures the source reports for power, delay and area belong to a custom asynchronous circuit.
They say nothing about this RTL.

## Files

| file | content |
|------|---------|
| `rtl/spt_pkg.sv` | control-word struct `spt_ctrl_t`, widths, `SPT_ZERO` |
| `rtl/latch_adder.sv` | one-bit adder with held sum |
| `rtl/add_sub.sv` | 15-bit add/subtract stage |
| `rtl/shift_module.sv` | input latch + right shifter |
| `rtl/speculative_delay.sv` | EA1/EA2/ACK timing |
| `rtl/product_mux.sv` | stage select and sign |
| `rtl/spt_multiplier.sv` | the multiplier |
| `rtl/coef_ctrl_mem.sv` | per-tap control-word store |
| `rtl/fir_filter.sv` | top: FIR filter |
| `tb/spt_ref_pkg.sv` | reference arithmetic written from the formulas above |
| `tb/<module>_tb.sv` | self-checking testbench for each module |
| `tb/spt_multiplier_dly_tb.sv` | multiplier with longer delays (2/3/2 cycles) |
| `tb/fir_taps_tb.sv`, `tb/fir_run.sv` | 4-tap and 8-tap filters |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module fir_filter_tb \
  rtl/spt_pkg.sv tb/spt_ref_pkg.sv rtl/*.sv tb/fir_filter_tb.sv
./obj_dir/Vfir_filter_tb
```

Use `tb/fir_run.sv` together with `tb/fir_taps_tb.sv`. Every testbench finishes in a few seconds.

What the tests cover:

- The adder cell is checked exhaustively. The stages, shifters and mux are checked on random
  operands, including the hold behaviour.
- The delay line is checked for the rise and fall times of EA1, EA2 and ACK in all three cases,
  at two sets of delay lengths.
- The multiplier runs 600 random products with full handshakes, checked for value and latency.
- `fir_filter_tb` runs the default 16-tap filter through reset, three coefficient sets and about
  130 samples. It checks every output and its latency. It also counts, and requires:
  1-, 2- and 3-term products, subtraction in both stages, correction, negative coefficients and
  samples, zero coefficients, samples offered while the filter is busy, and reprogramming.

## Changing it

- `TAPS` on `fir_filter` sets the filter length.
- `SHIFT_DLY`, `ADD1_DLY` and `ADD2_DLY` on `spt_multiplier` and `speculative_delay` give
  multi-cycle paths for the shifters and adders, if a faster clock is wanted.
- `W` sets the magnitude width of the datapath modules. The control-word layout is fixed in
  `spt_pkg`, and `MAG_W` there is the width the filter uses.
- More SPT terms would need another shift module, another `add_sub` stage, another tap in the
  delay line and a new field set in `spt_ctrl_t`.
