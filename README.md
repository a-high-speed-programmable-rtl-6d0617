# Programmable CSD-coefficient FIR filter

An 18-tap FIR filter for 10-bit video samples that has no multipliers but can still be
reprogrammed. Each coefficient is a sum of at most three signed powers of two, which is its
canonic signed-digit (CSD) form. So each tap is three programmable shifters, not a
multiplier. All 54 shifted copies of the input go into one tree of 4:2 compressors, and a
carry-select adder built from carry look-ahead blocks finishes the sum. The tree gets
deeper with log2 of the number of partial products, not with the number of taps. So the
clock period stays almost flat as taps are added. A DC gain stage at the output corrects
the small DC gain error that CSD rounding leaves. The coefficients are loaded over an I2C
slave port.

This RTL follows the architecture published by Tang, Zhang and Min in "A High-Speed,
Programmable, CSD Coefficient FIR Filter" (Fudan University). That architecture fixes the
tap structure, the digit encoding, the compressor tree, the carry-select final adder, the
output register and the presence of a DC gain module and an I2C loader. The number formats,
the DC gain method, the I2C protocol and the register map are choices made here. They are
marked as such below and in each file's header.

```
 x_in ──┬──────────► tap 1 ──► tap 2 ── … ──► tap 17        (D register in every tap)
        │  tap 0       │         │               │
        ▼              ▼         ▼               ▼
      3 digits      3 digits  3 digits  …     3 digits       54 partial products, 14 bits
        └──────────────┴────┬────┴───────────────┘
                   4:2 compressor tree (5 levels)            sum row + carry row
                            ▼
                 carry-select adder (4-bit CLAs)
                            ▼
                       y_raw register  (Yout')
                            ▼
                    DC gain correction  ──► y_out (Yout)
 SCL/SDA ─► I2C slave ─► coefficient registers ─► all digit codes and the 2 gain codes
```

## The CSD digit

Each digit (`csd_shifter`) turns the tap's sample into one partial product under a 5-bit
code:

| code          | weight            | operation                         |
|---------------|-------------------|-----------------------------------|
| `0_0000`      | +2^0              | pass                              |
| `0_0001`–`0_1110` | +2^-1 … +2^-14 | arithmetic shift right 1 … 14   |
| `1_0000`      | −2^0              | negate                            |
| `1_0001`–`1_1110` | −2^-1 … −2^-14 | shift right 1 … 14, then negate  |
| `x_1111`      | 0                 | output zero                       |

Bit 4 is the sign and bits 3:0 are the shift. A tap holds three digits, so a coefficient
is `s0·2^-p0 + s1·2^-p1 + s2·2^-p2`. Any digit can be switched off. In a true CSD number no
two nonzero digits are adjacent. The hardware does not enforce this: any three codes are
accepted, including two identical ones.

## Number format and word length

- **Samples** (`x_in`, `y_out`) are 10-bit two's complement. An unsigned luma sample can be
  fed in with its MSB inverted. The original design states only that samples are 10 bits.
- **Internal word**: each partial product is 14 bits. This is the sample with 4 guard
  bits appended below its LSB. It follows the original design's "N+2 or N+4" internal
  length, which is there to keep truncation error below the quantisation noise.
- A right shift drops the bits below the guard bits, which rounds toward minus infinity.
  The worst error is one guard LSB (1/16 of a sample LSB) per digit.
- **No integer headroom.** All tree and adder arithmetic is modulo 2^14. Partial sums may
  wrap, and the result is still exact whenever the true filter output fits in the 10.4
  format (−512 … +511.9375). Coefficient sets with a large sum of absolute values can
  overflow on full-scale input, and the output then wraps. The DC gain stage cannot undo
  that. A normal low-pass with unity DC gain has a small overshoot. Keep its input a little
  below full scale, or accept the rare wrap.
- `y_raw` is the 14-bit result (Yout'), with 4 fraction bits.

## The compressor tree

`pp_adder_tree` takes the 54 partial products and reduces them level by level. At each
level every four rows go through a `comp42`, which has two full adders per bit. The first
full adder's carry goes sideways into the next bit's second full adder. That sideways carry
never depends on the carry from the bit below, so each 4:2 level is exactly two full adders
deep whatever the width. The rows at each level are 54, 28, 14, 8, 4 and finally 2. That is
five levels, within the original design's bound of ceil(log2 3M) = 6.

When a level's row count is not a multiple of four:

- three leftover rows go through one more compressor, with its fourth input tied to zero;
- one or two leftover rows skip that level.

This leftover handling is a choice made here. The row counts are computed while the design
is elaborated, by `tree_rows_at` and `tree_levels` in `csd_pkg`. Changing `NTAPS` resizes
the tree automatically.

The published structure has each tap add its own three digits first. In this RTL the three
digits of every tap go straight into the shared tree, as in the overall block diagram of
the original design. The sum is the same, and one adder stage per tap is saved.

## The final adder

`csel_adder` adds the sum and carry rows. It is built from `cla4_dual` blocks. Each block is
a 4-bit look-ahead adder that produces its sum and carry-out for both carry-in = 0 and
carry-in = 1.

- **8-bit groups.** Two such blocks make an 8-bit group. The low block's two carry-outs pick
  the high block's results through sum selectors. This gives the group's sum and carry-out
  for both group carry-ins.
- **Carry selectors.** One carry selector per group then passes the real carry from group to
  group. The carry never ripples through a CLA.
- **Width.** The 14-bit word is padded to two 8-bit groups. The path is one 4-bit CLA, one
  sum selector and two carry selectors.

## Timing

One sample enters per clock. Tap 0 has no input register, so the digits of tap 0 see `x_in`
directly. The filter output for the sample applied in clock *n* is in `y_raw` after the
clock edge that ends clock *n*. That is a latency of one clock. `y_out` follows `y_raw`
through combinational logic.

The register-to-register path runs from `x_in` (or a tap register) through one digit, five
compressor levels and the final adder into `y_raw`. The original design reports 100 MHz in
a 0.6 µm CMOS process. Nothing in this RTL checks or constrains timing.

A coefficient write takes effect on the clock after the register is written. Output
samples computed during a reload mix old and new codes.

## DC gain correction

CSD rounding leaves the coefficient sum close to, but not exactly, the wanted DC gain.
`dc_gain` multiplies `y_raw` by `1 + c0 + c1`, where `c0` and `c1` are two more CSD digits
with the same 5-bit code as the taps. With both set to zero codes the factor is exactly 1,
so no multiplier is needed. The module then does two things:

1. It rounds to the nearest integer (a half rounds up) and drops the 4 fraction bits.
2. It saturates to −512 … 511 and raises `y_sat` when it clamps.

The original design says only that a DC gain module cancels the DC gain. The correction
factor, the rounding and the saturation are choices made here.

## Loading coefficients over I2C

`i2c_slave` is a register-pointer I2C slave. Its default address is `7'h2C` (parameter
`I2C_ADDR`).

- **Write:** START, `addr+W`, pointer, data bytes…, STOP. Each data byte is stored at the
  pointer, and the pointer then increments.
- **Read:** START, `addr+W`, pointer, repeated START, `addr+R`, data bytes…, STOP. The master
  NACKs the last byte.
- **Other addresses:** no acknowledge, and the slave ignores the rest of the transfer.

SCL and SDA are sampled by the filter clock through two-flop synchronisers. `clk` must
therefore be at least about ten times the SCL rate, which is easy at video rates. SDA is
open drain: `sda_oe = 1` means pull low. Combine it with `sda_i` outside the chip, or in a
pad. The slave never stretches SCL.

Register map (`coef_regs`, one code in bits 4:0 of each byte, reset value `0_1111` = zero):

| address            | content                          |
|--------------------|----------------------------------|
| `3*t + d`          | digit `d` (0…2) of tap `t` (0…17) |
| 54, 55             | DC gain digits `c0`, `c1`        |
| 56 … 255           | not present (read as 0, writes ignored) |

A complete load is one write of 56 bytes from pointer 0. After reset every code is zero.
The filter then outputs 0 and the DC gain is 1.

## Parameters

`csd_fir_top` parameters:

| parameter  | default | meaning                  |
|------------|---------|--------------------------|
| `DW`       | 10      | sample width             |
| `NTAPS`    | 18      | number of taps           |
| `GW`       | 4       | guard bits               |
| `I2C_ADDR` | `7'h2C` | I2C slave address        |

Three digits per tap and the 5-bit code are fixed in `csd_pkg`. The register map holds
`3*NTAPS + 2` codes and needs 8-bit addresses, so `NTAPS` can be at most 84.

## Files

| file | block |
|------|-------|
| `rtl/csd_pkg.sv` | code type, default sizes, tree sizing functions |
| `rtl/csd_shifter.sv` | one programmable CSD digit |
| `rtl/csd_tap.sv` | three digits and the tap delay register |
| `rtl/comp42.sv` | 4:2 compressor |
| `rtl/pp_adder_tree.sv` | partial-product compressor tree |
| `rtl/cla4_dual.sv` | 4-bit CLA with results for both carry-ins |
| `rtl/csel_adder.sv` | carry-select final adder |
| `rtl/dc_gain.sv` | DC gain correction, rounding, saturation |
| `rtl/coef_regs.sv` | coefficient code registers |
| `rtl/i2c_slave.sv` | I2C slave controller |
| `rtl/csd_fir_top.sv` | the filter |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come from
`tb/csd_model_pkg.sv`, an integer model that computes a digit as
`floor(x / 2^shift)` by division, not by shifting. `tb/i2c_master_bfm.sv` is a bit-banged
I2C master used by three of the testbenches.

| testbench | what it checks |
|-----------|----------------|
| `tb_csd_shifter` | all 32 codes, on edge and random inputs |
| `tb_cla4_dual` | all 256 operand pairs |
| `tb_comp42` | random rows at widths 14 and 3; width 3 is checked exhaustively |
| `tb_pp_adder_tree` | trees of 54, 7 and 2 rows |
| `tb_csel_adder` | widths 14, 16 and 5, including full-length carry chains |
| `tb_dc_gain` | random values and codes; saturation is checked |
| `tb_coef_regs` | reset value, writes, reads, out-of-range addresses |
| `tb_i2c_slave` | burst writes, read-back with repeated START, a wrong address that is NACKed |

The two end-to-end testbenches run the full filter at its default size:

- **`tb_csd_fir_top`** programs the filter over I2C, reads the codes back and streams
  random samples. It compares `y_raw`, `y_out` and `y_sat` with the model on every clock.
  It covers the reset state, random and symmetric coefficient sets, a reload while samples
  keep flowing, and saturation. It counts each of these events and fails if any of them
  never happens.
- **`tb_luma_lowpass`** uses the filter as an 18-tap luminance low-pass. It designs a
  windowed-sinc filter with cutoff 0.25 cycles per sample. It rounds each coefficient to
  three CSD digits and picks the DC gain digits. It then measures the gain at 0, 0.05, 0.1,
  0.4 and 0.5 cycles per sample by correlating the output with the input tone. The
  measured gain must agree with the gain predicted from the rounded coefficients. The
  passband gain must be within 5 % of one and the stopband gain below 1/30. The values
  measured are 0.9996 to 1.004 in the passband and 0.005 at 0.4 cycles per sample. This
  coefficient set is generated by the testbench. It is not the coefficient table of the
  original luminance filter.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/csd_pkg.sv tb/csd_model_pkg.sv tb/tb_csd_fir_top.sv --top-module tb_csd_fir_top
./obj_dir/Vtb_csd_fir_top
```

Replace `tb_csd_fir_top` with any other testbench name. Every testbench finishes in well
under a second of host time.

## Not included

- The published coefficient set of the 10-bit, 18-tap luminance filter is not included.
  The filter is fully programmable, so any set of three-digit CSD coefficients, including
  that one, can be loaded.
- The multiplier-based FIR and the Booth/Wallace multiplier are not included. The original
  design uses them only as the baseline for comparison.
- There are no timing constraints, no pads and no layout. The 100 MHz and 6.8 mm × 6.8 mm
  figures belong to the original 0.6 µm implementation.
