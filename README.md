# Gray-code bit-error-rate BIST for high-speed ADCs

A bit error of an analog-to-digital converter is a conversion that lands
more than one code away from the conversion before it, although the input
moved too slowly for that to happen. Counting such errors at the full rate of
a GS/s converter normally means capturing every output word with expensive
equipment, or building an on-chip subtractor that must keep up with the
sampling clock.

This RTL counts the errors on chip, with no adder at all. It relies on the
Gray code that flash ADCs already produce: two Gray codes one step apart
differ in exactly one bit, and *which* bit may change is fixed by the current
code. The test therefore reduces to a few XORs, a one-hot test and a mask.
The error count leaves the chip on a single pin as a self-framing serial
stream, so the whole test needs two pins: reset and serial out.

The design follows a published BIST circuit that was built in 90-nm CMOS
next to a 5-bit flash ADC and measured at 700 MS/s to 1 GS/s. The default
sizes here are that prototype's: 5-bit codes, 4-bit error record, header
`1011`, division ratios up to 16.

## The adder-free distance test

Let X be the current Gray code and X-1 the one sampled before it, and let
`d = X xor (X-1)`. Three tests run in parallel (`rtl/gray_comparator.sv`):

| part | question | logic |
|------|----------|-------|
| A | identical codes? | `d == 0` |
| B | exactly one bit different? | OR over k of "bit k of d set, all others clear" |
| C | is that bit one that leads to a neighbour of X? | `(d & ~V) == 0` |

The decision (`rtl/decision_logic.sv`) is then: A true means no error; B
false means error (two or more bits changed, so the step is at least two
codes); B true and C false means error (one bit changed, but it jumped to a
code that is not adjacent in value); otherwise no error.

**The verification code V** is the heart of part C. For a code X with value
i, its neighbours i-1 and i+1 each differ from X in one bit. V is the OR
(equivalently the XOR, since the two bits differ) of those two positions. A
single-bit change is a one-code step exactly when it falls inside V. For the
reflected Gray code, V depends on X alone and has a closed form. Writing the
code as G1 (MSB) ... GN (LSB):

```
V_N     = 1
V_{N-1} = G_N
V_k     = G_{k+1} & ~G_{k+2} & ... & ~G_N        (k < N-1)
```

The LSB may always flip (one of the neighbours is always reached that way);
the other allowed position is the bit just above the lowest set bit of X.
For 3 bits:

| value | Gray | V |
|------:|------|---|
| 0 | 000 | 001 |
| 1 | 001 | 011 |
| 2 | 011 | 011 |
| 3 | 010 | 101 |
| 4 | 110 | 101 |
| 5 | 111 | 011 |
| 6 | 101 | 011 |
| 7 | 100 | 001 |

At the ends of the range V has only one bit (code 0 has no lower neighbour;
the top code's upper flip would wrap to code 0 and is not in V), so the wrap
between 0 and 2^N-1, which is a one-bit Gray change, correctly counts as an
error. In the RTL, bit index 0 is the LSB, so `verif_o[0] = 1` and
`verif_o[k] = cur[k-1] & ~cur[k-2] & ... & ~cur[0]`.

The testbench checks all 1024 pairs of 5-bit codes against the plain
definition (convert both to binary, error if |difference| > 1).

Because A, B and V are computed side by side, the longest path is a handful
of gate levels independent of an adder's carry chain. The original circuit
reports about 22 NAND2 equivalents and an 8-gate critical path for this
logic, against about 60 gates and 16 gate delays for a binary-code version
built around a 6-bit adder. Those figures are for that cell-level circuit
and are not reproduced by this RTL.

## Data path and timing

Everything runs on the ADC clock `clk` (fs). `rtl/ber_bist.sv` connects:

```
code_i ─► code_registers ─► gray_comparator ─► decision_logic ─► error_counter ─► parallel_to_serial ─► ser_o
            ▲ (X, X-1)         parts A B C        err_o             count_o, end_o     header + record
clock_divider: sample_en at fs/2**div_sel
```

* **Division.** `clock_divider` gives a one-cycle `sample_en` every
  d = 2^`div_sel_i` cycles (1, 2, 4, 8, 16; larger selects saturate at 16).
  The first pulse comes in the first cycle after reset. The two code
  registers load only on that enable, so at ratio d they hold conversions
  taken d clocks apart.
* **Judging a pair.** A code presented with `sample_en` high is in the
  registers one clock later, and the pair it forms with the previous sample
  is judged in that cycle: `err_o` is a one-cycle pulse there. Each pair is
  judged once, whatever d is. No pair is judged until two samples have been
  taken since reset.
* **Counting.** `error_counter` is a B-bit half-adder chain. The pulse is
  counted at the end of the cycle in which it appears. When the carry leaves
  the top bit (the (2^B)-th error), the test ends: `end_o` rises and stays
  high, and the count stays at all ones until reset.
* **Reset.** `rst` is asynchronous and active high. In the top, the BIST
  leaves reset one clock after the ADC encoder, so the first code it samples
  is a real conversion.

### Why divide?

A test input must move by less than one code between the conversions that
are compared. For an N-bit ADC and a full-scale sine, that limits the input
to about f_in ≤ fs / (2^N·π) when every conversion is compared. Comparing
only every d-th conversion adds high-frequency test points:

```
f_in = (m/d)·fs ± fs / (2^N·π·d),   m = 1, 2, ...
```

Sampled every d clocks, such an input looks like a slow sine, while the ADC
still converts a fast signal at full rate. Conversions between the samples
are ignored. With d up to 16, test frequencies can be placed across the
range from dc to fs/2.

## The serial frame

`parallel_to_serial` sends, one bit per clock and without a break:

```
| 1 0 1 1 | r3 r2 r1 r0 | 1 0 1 1 | r3 r2 r1 r0 | ...
  header    error record
```

The header marks where each record starts, so an oscilloscope trace can be
read by eye. Both fields are sent MSB first, and the frame is 2·B = 8 clocks
long. `frame_start_o` is high during the first header bit. The record is
copied from the counter at the last header bit, so the four record bits of
one frame always belong to one count. The record therefore changes at most
once every 8 cycles. A frame going out at the moment of the (2^B)-th error
still shows all ones: after an overflow the record reads `1111`, and
`end_o` says that the test has ended.

## The ADC front ends (`rtl/adc_ber_bist_top.sv`)

* **Flash ADC** (`flash_encoder`). The 2^N-1 comparator outputs (`therm_i`,
  comparator 1 at bit 0) form a thermometer code. Pairs of neighbouring
  comparators mark the top of the column (`hot[k] = t[k-1] & ~t[k]`), and a
  ROM holding `k xor (k >> 1)` in row k is read by ORing the selected rows.
  The result is registered. A bubble in the column selects two rows, and the
  OR of their codes is usually far from the true code: this is the kind of
  error the BIST counts. The comparators and the resistor ladder are analog
  and are not part of this RTL; `therm_i` is where they connect.
* **Binary ADC** (`binary_to_gray`). Pipelined or SAR converters give binary
  codes. `G1 = B1` and `Gk = B(k-1) xor Bk` turns them into Gray code.
  `use_bin_i = 1` selects this path. The converted code is registered, so
  both sources reach the BIST one clock after their input.

`adc_gray_o` shows the code given to the BIST.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 5 | ADC resolution (Gray code width) |
| `B` | 4 | width of the header, the error record and the counter |
| `HEADER` | `4'b1011` | header pattern, sent MSB first |
| `MAX_LOG2_DIV` | 4 | largest division ratio is 2^MAX_LOG2_DIV = 16 |
| `SEL_BITS` | 3 | width of `div_sel_i` |

The shared defaults live in `rtl/bist_pkg.sv`. A 4-bit record holds 15
errors. The original prototype's measurements found 19 to 198 errors per run
at 735 MS/s (4.2 million samples, 1/8 and 1/16 fs). Runs like those need
`B = 8`, or must be read before the counter overflows. The header and record
widths are a matter of the application, and `B` only changes the frame
length.

## Where this RTL departs from the original circuit

* The original clocks the two code registers from a divided clock. Here,
  all flip-flops stay on fs and use a sample enable. The sampled codes are
  the same, and there is only one clock domain.
* The serializer's selects come from a 3-bit phase counter rather than from
  three divided clocks (periods 2, 4 and 8).
* The record is copied into a holding register once per frame. The original
  multiplexes the live counter bits.
* What the counter shows after an overflow is not specified. Here it
  freezes at all ones with `end_o` set.
* The gate-level structure (gate types, NAND/NOR mapping) is not
  reproduced; the logic is written as Boolean expressions and left to
  synthesis.
* The source selection between flash and binary input, the register after
  `binary_to_gray`, the `valid` qualification of the first pair and the
  one-clock-later reset release of the BIST are additions of this design.
* The original prototype omitted the programmable divider and took the
  divided clock from a pattern generator. It is built here because it is
  part of the proposed architecture.
* The encoder block of the flash ADC is labelled "Gray-to-binary" in the
  original block diagram, while its outputs are Gray bits G1..G5 and the
  description says thermometer codes become Gray codes. This RTL produces
  Gray code. The gates between comparators and ROM are taken to be plain
  two-input transition detectors; any extra bubble suppression the original
  may have is not modelled.
* The binary-code version of the BIST (an adder plus three detectors) is a
  comparison baseline and is not included.

## Files

| file | content |
|------|---------|
| `rtl/bist_pkg.sv` | shared defaults and the frame-phase type |
| `rtl/adc_ber_bist_top.sv` | top: ADC front ends + BIST |
| `rtl/ber_bist.sv` | the BIST circuit |
| `rtl/clock_divider.sv` | sample enable at fs/2^div_sel |
| `rtl/code_registers.sv` | codes X and X-1 |
| `rtl/gray_comparator.sv` | parts A, B, C and the verification code |
| `rtl/decision_logic.sv` | error pulse |
| `rtl/error_counter.sv` | half-adder counter with overflow end |
| `rtl/parallel_to_serial.sv` | header + record serializer |
| `rtl/flash_encoder.sv` | thermometer-to-Gray encoder of the flash ADC |
| `rtl/binary_to_gray.sv` | binary-to-Gray converter |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_table4_workload.sv` | the eight prototype measurement cases, shortened |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes. They
use only the defaults except where stated. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bist_pkg.sv \
          tb/tb_ber_bist.sv --top-module tb_ber_bist --Mdir obj_ber_bist
./obj_ber_bist/Vtb_ber_bist
```

Replace `tb_ber_bist` with any other testbench name. The package file must
come first, and `-y rtl` lets Verilator find the submodules.

What the testbenches establish:

* `tb_gray_comparator`: every 5-bit pair against binary distance, and the
  3-bit verification codes against the table above.
* `tb_ber_bist`: random code streams at ratios 1 to 16, including skipped
  cycles filled with random codes, multi-bit jumps and single-bit
  non-adjacent flips. `err_o` is checked in every cycle, every serial frame
  is decoded, and a run drives the counter to overflow.
* `tb_adc_ber_bist_top` (all parameters at their defaults): sine inputs at
  the low-frequency limit for ratio 1 and near fs/d for ratios 2 to 16, with
  bubbles in sampled and skipped conversions, the binary path, and an
  overflow run. The ADC code, `err_o`, the final count and every frame are
  checked against an independent model. The test also checks that each of
  these mechanisms occurred.
* `tb_table4_workload`: the eight measurement cases (198, 35, 150, 101, 19,
  93, 63 and 50 errors at 1/8 and 1/16 fs), each with 3000 sampled pairs
  instead of 4.2 million. An 8-bit-record instance must match the
  reference count exactly through its serial output. The default instance
  must report overflow.

Timing closure at 700 MS/s to 1 GS/s, area and power depend on the cell
library and are not shown by these simulations.
