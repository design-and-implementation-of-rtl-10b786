# Pipelined Karatsuba-Ofman multiplier with BCD output

This design multiplies two unsigned binary numbers with the Karatsuba-Ofman
algorithm and delivers the product twice: in binary and as binary-coded
decimal (BCD). BCD output suits financial and commercial work, where results
are read as decimal digits. The default size is 8 x 8 bits, with a 16-bit
binary product and a four-digit BCD result. The datapath is a seven-stage
pipeline. It accepts a new operand pair on every clock.

## The Karatsuba-Ofman step

Each W-bit operand is cut into a high part and a low part of L = W/2 bits:

    A = AH*2^L + AL        B = BH*2^L + BL

Schoolbook multiplication needs four half-size products. Karatsuba-Ofman
needs only three:

    P1 = AH*BH      P0 = AL*BL      P2 = (AH+AL)*(BH+BL)

The middle term AH*BL + AL*BH equals P2 - P1 - P0. The usual form of the
recombination is

    P = 2^(2L)*P1 + P0 + 2^L*(P2 - P1 - P0)

This design evaluates it in a reordered form:

    P = [2^(2L)*P1 + P0]  +  2^L*P2  -  2^L*(P1 + P0)

- The bracket costs nothing. P0 < 2^(2L), so it is just P1 and P0 side by side.
- P1 + P0 can start as soon as the sub-products exist.
- What remains after the multipliers is one 2L-bit adder (P1 + P0), one 3L-bit
  adder (+ 2^L*P2) and one 3L-bit subtraction. Each of the three gets its own
  pipeline stage.

The algorithm is usually described in radix 10^n, with the operands split into
decimal digits. Here the operands are binary, so the radix is 2^L and the
equation is otherwise unchanged. Decimal digits come only at the end, from a
binary-to-BCD converter.

`kom_mult` applies the same step recursively. Its three sub-products are
instances of `kom_mult` itself. At `BASE_W` bits (default 4) and below, the
recursion stops and a plain `*` is used. The half-sums AH+AL and BH+BL are one
bit wider than the high part. So P2 is the widest sub-product, and an 8 x 8
multiply uses sub-multipliers of 4, 4 and 5 bits. The 5-bit one splits once
more. `BASE_W` must be at least 3, or the recursion on the half-sums would not
end (an elaboration error guards this). Intermediate sums wrap modulo 2^(2W).
This is harmless because the final difference is a W x W product and always
fits in 2W bits.

## Binary to BCD: double dabble

`double_dabble` converts the binary product with the shift-and-add-3
algorithm. The bits enter a scratch register of BCD digits, most significant
bit first, one left shift per bit. Before each shift, every digit greater than
4 gets 3 added. A 5 therefore becomes 8, and after doubling it becomes 16,
which is a carry into the next digit and a 0. After BIN_W shifts the scratch
register holds the decimal value.

The loop is unrolled into BIN_W rows of add-3 correctors, with no clock. The
digit count defaults to what the largest BIN_W-bit value needs: 5 digits for
16 bits. With fewer digits the result is the value modulo 10^DIGITS, because a
digit never depends on the digits above it.

## The pipeline (`bcd_kom_mult_pipe`, the top)

| stage | work | registers |
|---|---|---|
| 1 | operand capture | a, b |
| 2 | split and pre-add | AH, AL, BH, BL, AH+AL, BH+BL |
| 3 | three sub-multipliers (`kom_mult`) | P1, P0, P2 |
| 4 | 2L-bit adder, concatenation | S = P1+P0, C = P1:P0, P2 |
| 5 | 3L-bit adder | T = C + 2^L*P2, S |
| 6 | 3L-bit subtraction | Z = T - 2^L*S |
| 7 | BCD conversion (`double_dabble`) | y, y_ovf, z |

Only the outer Karatsuba step is pipelined. The sub-multipliers inside
stage 3 are combinational. An assertion checks that the stage-6 subtraction
never borrows, which would mean a wrong partial product.

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock; everything changes on its rising edge |
| rst_n | in | 1 | synchronous, active low; clears the valid pipeline only |
| in_valid | in | 1 | a and b hold an operand pair |
| a, b | in | W | unsigned binary operands |
| out_valid | out | 1 | y, y_ovf and z hold a result |
| y | out | 4*Y_DIGITS | product in BCD, digit 0 in y[3:0] |
| y_ovf | out | 1 | product has more than Y_DIGITS decimal digits |
| z | out | 2W | product in binary |

Timing: a pair sampled with in_valid on one rising edge appears with
out_valid seven rising edges later. Throughput is one pair per clock. There
is no stall and no back-pressure. Data registers are not reset; only the
valid bits are.

Parameters: `W` (default 8) and `Y_DIGITS` (default 4).

Example results, which the testbench checks: 11 x 4 gives y = 16'h0044 and
z = 44. 13 x 5 gives y = 16'h0065. 15 x 2 gives y = 16'h0030.

## Where this design makes its own choices

- **Binary operands, radix 2^L.** The algorithm is often stated for decimal
  digits. This design multiplies binary operands and converts the product
  afterwards. A multiplier whose inputs are BCD digits is not provided.
- **Four BCD digits and `y_ovf`.** The 16-bit `y` holds four digits, but 8 x 8
  products reach 65025. For products above 9999, `y_ovf` is set and `y` shows
  the product modulo 10000. `z` is always exact. Set `Y_DIGITS = 5` to get
  every digit.
- **Seven stages and where the registers sit.** Seven matches the stage count
  reported for the 8 x 8 multiplier. The cut points follow the critical path of
  the reordered equation (multiplier, 2L-bit adder, 3L-bit adder, 3L-bit
  subtraction). The published flip-flop count for the pipelined version is
  16. That is far below what seven stages of an 8 x 8 datapath need, and this
  design does not try to match it: it has 184 flip-flop bits.
- **Control.** `in_valid`, `out_valid` and `rst_n` are this design's
  additions.
- **Leaf size.** `BASE_W = 4` is this design's choice.
- **Unpipelined version.** A combinational multiplier is simply `kom_mult`
  followed by `double_dabble`. No separate top is provided for it.
- **Verilator lint.** Linted as a top module on its own, `kom_mult` draws
  Verilator warnings that nets in its recursive branch are undriven. The
  warnings come from how Verilator checks a recursive module. Instantiated,
  the module lints clean and simulates correctly.

## Files

- `rtl/bcd_kom_pkg.sv`: package with `bcd_digits(bits)`, the number of decimal
  digits of 2^bits - 1.
- `rtl/kom_mult.sv`: recursive combinational Karatsuba-Ofman multiplier.
- `rtl/double_dabble.sv`: combinational binary-to-BCD converter.
- `rtl/bcd_kom_mult_pipe.sv`: the pipelined top.
- `tb/tb_kom_mult.sv`: all 65536 pairs at 8 bits, plus random and extreme
  pairs at 13 bits (an odd width, three levels of recursion).
- `tb/tb_double_dabble.sv`: all 16-bit inputs, at 5 digits and cut to 4 digits.
- `tb/tb_bcd_kom_mult_pipe.sv`: end-to-end test at the default size.
  - It replays the example pairs above back to back.
  - It then sends all 65536 operand pairs, with random idle cycles.
  - A 7-deep reference pipeline checks out_valid on every cycle, and z, y and
    y_ovf for every result.
  - It measures the latency.
  - It checks that a reset flushes operations in flight.
  - It counts back-to-back issues, idle cycles, overflows and half-sum carries,
    and fails if any of these never happened.

Every testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl \
        rtl/bcd_kom_pkg.sv rtl/kom_mult.sv rtl/double_dabble.sv \
        rtl/bcd_kom_mult_pipe.sv tb/tb_bcd_kom_mult_pipe.sv \
        --top-module tb_bcd_kom_mult_pipe
    ./obj_dir/Vtb_bcd_kom_mult_pipe

The other testbenches build the same way, each with the modules it uses. Every
run finishes in well under a second.

Lint a module:

    verilator --lint-only -Wall -Irtl rtl/bcd_kom_pkg.sv rtl/bcd_kom_mult_pipe.sv

## Changing the size

- `W` may be any width of 2 or more. The pipeline and the converter size
  themselves from it, and `kom_mult` recurses as deep as needed.
- Wider operands only deepen the combinational sub-multipliers in stage 3. To
  keep the clock rate, more Karatsuba levels would have to be pipelined; this
  design does not do that.
- `Y_DIGITS` may range from 1 to the digit count of the largest product.
