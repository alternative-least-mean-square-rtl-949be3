# Delayed-LMS adaptive FIR filters: direct, transposed and hybrid forms

An adaptive FIR filter changes its coefficients while it runs. The aim is to
make its output `dhat` follow a desired signal `d`, for example a known
training sequence in an equaliser. The least-mean-square (LMS) rule moves
every coefficient a small step against the error:

    w_k(n+1) = w_k(n) + mu * e(n) * x(n-k),      e(n) = d(n) - dhat(n)

In hardware the plain LMS rule closes a loop within one clock period. That
loop runs from the coefficients through the whole filter, the error
subtractor and the update multiplier, and back into the coefficient
registers, so no register can be inserted to shorten it. The *delayed* LMS
(DLMS) rule applies an error that is `D` samples old:

    w_k(n+1) = w_k(n) + mu * e(n-D) * x(n-D-k)

With the delay, the error can be registered, and the filter can then be
pipelined like an ordinary FIR filter. This RTL has the three DLMS
structures for FPGAs that such pipelining gives:

| form | where the filter's registers sit | critical path of the filter |
|---|---|---|
| direct | on the x delay line | one multiplier + a TAPS-long adder chain |
| transposed | on the partial-sum line | one multiplier + one adder, for any length |
| hybrid | on the x line inside a 3-tap section, on the sum line between sections | one section |

All three share the same weight update block. Default sizes: 16 taps,
12-bit two's complement data and coefficients, and step size `mu = 2^-7`,
which is a shift. In published place-and-route results on a Virtex-E FPGA,
the transposed form ran about four times faster than the direct form at 16
taps (48 vs 11 MHz), for almost the same area and power. The hybrid form
lies between the two.

## Block structure

```
dlms_top                    all three forms on the same x and d
├── dlms_direct             fir_direct      + dlms_weight_update
├── dlms_transposed         fir_transposed  + dlms_weight_update
└── dlms_hybrid             fir_hybrid      + dlms_weight_update
                               └── hybrid_section (x ceil(TAPS/3))
every multiplier:           booth_mult
shared sizes:               dlms_pkg
```

| file | what it is |
|---|---|
| `rtl/dlms_pkg.sv` | default sizes, accumulator width function |
| `rtl/booth_mult.sv` | combinational signed multiplier: radix-4 Booth recoding, carry-save array, one final adder |
| `rtl/fir_direct.sv` | direct-form filter block |
| `rtl/fir_transposed.sv` | transposed-form filter block |
| `rtl/hybrid_section.sv` | one hybrid section (3 taps by default) |
| `rtl/fir_hybrid.sv` | hybrid filter block: input register + chain of sections |
| `rtl/dlms_weight_update.sv` | error, step size, registered `mu*e`, weight registers |
| `rtl/dlms_direct.sv`, `dlms_transposed.sv`, `dlms_hybrid.sv` | one complete adaptive filter each |
| `rtl/dlms_top.sv` | the three forms side by side |

## Timing of each form

Every block takes one sample of `x` and of `d` per clock. There is no
handshake. `rst` is a synchronous, active-high reset that clears every
register, so all weights start at zero. The time index below is the clock
cycle. Every sum is shifted right by `COEF_FRAC` (see the number format
section).

**Weight update (shared).** The error `e = d - dhat` is combinational.
`mu*e` is registered once, which makes the DLMS delay D = 1. The update has
its own x delay line: two registers, then one register per tap. Tap `k` is
therefore updated with the x sample that met weight `k` in the error being
applied:

    me(n+1)   = e(n) >>> (MU_SHIFT - COEF_FRAC)
    w_k(n+1)  = w_k(n) + me(n) * x(n-2-k)

**Direct form.** x passes one register before each tap, so tap `k` sees
`x(n-1-k)`. The products are summed by an unregistered adder chain:

    dhat(n) = sum_k w_k(n) * x(n-1-k)

**Transposed form.** x drives all multipliers at once. The last tap's
product is registered. Each adder adds its product to the registered sum
from its right and is registered again, and the left-most sum is the
registered output:

    dhat(n) = sum_k w_k(n-1-k) * x(n-1-k)

Each product keeps the coefficient of the cycle in which it was formed. With
fixed coefficients the response is the same as the direct form's. While the
weights adapt it is not: the delay from weight `k` to the error it causes
grows to `k+2` cycles.

**Hybrid form.** x is registered once, then enters sections of
`SECTION_TAPS` taps. Inside a section, x passes a register between taps and
the products are added without registers. The partial sum coming from the
next section is registered before it is added. x leaves a section without a
register. A tap in section `j = k / 3` sees x one cycle later per section
boundary, and its product passes `j` sum registers:

    dhat(n) = sum_k w_k(n - k/3) * x(n-1-k)

With fixed coefficients all three filter blocks have the same impulse
response: the first tap's coefficient appears one cycle after the input. If
TAPS is not a multiple of 3, the last section is shorter. At 16 taps that
gives five 3-tap sections and one 1-tap section.

## Stability: the transposed form at 16 taps

The three forms are not equally stable, because their weight-to-error
delays differ. In the transposed form that delay is `k+2` cycles for tap
`k`, up to 17 cycles at 16 taps. The published setup is x uniform in
-5..+5, mu = 2^-7 and 16 taps. There the direct and hybrid forms converge,
but the transposed form, built exactly as described, diverges: its error
grows until the weights wrap. It converges at 4 and 8 taps, with x in
-4..+4, or with mu = 2^-8. The RTL matches a cycle-exact reference model in
all these cases, so this is a property of the structure, not a bug. If you
use the transposed form with long filters, lower the input power or the step
size (`MU_SHIFT`).

## Number format

| quantity | bits | format |
|---|---|---|
| `x`, `d`, `dhat`, `err` | `DATA_W` = 12 | integer, two's complement |
| weights `w` | `COEF_W` = 12 | `COEF_FRAC` = 6 fraction bits: -32 .. +31.98, step 1/64 |
| products | `DATA_W + COEF_W` = 24 | full precision |
| filter sums | `DATA_W + COEF_W + clog2(TAPS)` = 28 | full precision |

`dhat` is the full sum shifted right arithmetically by `COEF_FRAC` (rounded
toward minus infinity) and cut to 12 bits. The step size `mu = 2^-MU_SHIFT`
becomes `e >>> (MU_SHIFT - COEF_FRAC)`, i.e. `e >>> 1` by default.
`MU_SHIFT >= COEF_FRAC` is required, and an elaboration-time assertion
checks it. The update product `me * x` is cut to `COEF_W` bits. The design
assumes inputs small enough not to overflow: the published tests kept x in
-5..+5 for that reason. Nothing saturates, and every result wraps.

## Booth multiplier

`booth_mult` recodes the multiplier `b` in overlapping 3-bit groups into
digits -2..+2. A 12-bit operand therefore gives 6 partial products instead
of 12. The partial products are reduced by a chain of 3:2 carry-save adders,
which propagate no carries, and one final carry-propagate adder. The
multiplier is combinational, is exact for any widths, and is used for all
`2 x TAPS` multipliers of each form. The other adders are plain `+`, which
FPGA tools map onto the dedicated carry chain.

## Where this RTL departs from, or adds to, the published description

- **Error sign.** The published text writes `e = dhat - d` but updates with
  `w + mu*e*x`, which would make the filter diverge. This RTL uses
  `e = d - dhat` with an adding update. This is the standard LMS convention
  and matches the adders drawn in the update loop.
- **Step size.** The published structure shows `mu` as a multiplier input.
  Here it is a fixed power of two, a parameter `MU_SHIFT`, applied as a shift.
- **Binary point, output scaling, wrap-around, reset and interface.** These
  are not specified in the source and are this design's choices, as
  described above.
- **Separate update delay line.** Each form keeps the x delay line of its
  weight update separate from that of its filter, as the structures are
  drawn. The direct form could share registers, but this RTL does not.
- **All three forms in one top.** This is for comparison. In practice one
  would instantiate only `dlms_direct`, `dlms_transposed` or `dlms_hybrid`.
- **Not included.** The plain (non-delayed) LMS filter, which is the
  baseline the delayed forms replace. The carry-look-ahead adder, which was
  only a speed comparison. Anything specific to the FPGA device.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 16 | filter length. 4, 8 and 16 were evaluated |
| `DATA_W` | 12 | width of x, d, dhat, err |
| `COEF_W` | 12 | width of the weights |
| `COEF_FRAC` | 6 | fraction bits of the weights (this design's choice) |
| `MU_SHIFT` | 7 | step size `mu = 2^-MU_SHIFT` |
| `SECTION_TAPS` | 3 | taps per hybrid section (hybrid only) |

## Simulation

The testbenches are self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops. Most of them compare every cycle
against `tb/dlms_ref_pkg.sv`. That package is a reference model written
directly from the equations above, not from the register structure. It
keeps a history of x and of every weight.

| testbench | what it runs |
|---|---|
| `tb_booth_mult` | corner operands and 200k random pairs at 12x12; exhaustive 5x7 |
| `tb_fir_direct`, `tb_fir_transposed`, `tb_fir_hybrid` | random coefficients changing every cycle, full-range x; reset; impulse response with fixed coefficients |
| `tb_hybrid_section` | random x, coefficients and incoming sum; reset in mid-run |
| `tb_dlms_weight_update` | open-loop random x, d, dhat; reset in mid-run |
| `tb_dlms_direct`, `tb_dlms_transposed`, `tb_dlms_hybrid` | system identification of a random 16-tap plant; wrap-around phase with x = +-300; resets; convergence check |
| `tb_dlms_top` | all three forms at the default size on one stream. It counts weight adaptation, convergence and resets, and checks that each occurs |
| `tb_dlms_sizes` | all three forms at 4 and 8 taps with the published input range -5..+5 |

To run one with Verilator 5, name the packages and the testbench, and let
`-y rtl` find the modules:

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module tb_dlms_top \
    rtl/dlms_pkg.sv tb/dlms_ref_pkg.sv tb/tb_dlms_top.sv
./obj_dir/Vtb_dlms_top
```

Testbenches without the reference model (`tb_booth_mult`, `tb_fir_*`,
`tb_hybrid_section`, `tb_dlms_weight_update`) need only `rtl/dlms_pkg.sv`.

`tb_dlms_top` runs the full default configuration (16 taps, about 4000
samples) in well under a second.
