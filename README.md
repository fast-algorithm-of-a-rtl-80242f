# 16-digit decimal logarithm converter

This is synthesizable SystemVerilog for a radix-10 logarithm unit. It takes a
16-character BCD number and returns log10 of it, one decimal digit at a time.
It uses no lookup tables, no division and no conversion to binary. All the
arithmetic is decimal: one combinational 16 x 16 digit BCD multiplier does the
work, and the rest is counting where the decimal point moves.

## The idea: every mantissa digit is an exponent

Write the input as P = A * 10^c, with 1 <= A < 10. The characteristic `c` is
simply the position of P's leading non-zero digit, so log10 P = c + log10 A,
with 0 <= log10 A < 1.

Let log10 A = 0.d1 d2 d3 ... in decimal. Then

    A^10 = 10^(d1 . d2 d3 ...) = 10^d1 * 10^(0.d2 d3 ...)

so the first mantissa digit d1 is the decimal exponent of A^10. That is the
number of its integer digits minus one, a value from 0 to 9. The remaining
factor 10^(0.d2 d3 ...) is A^10 with its decimal point moved back behind the
leading digit. It is a new A in [1,10), and the same step yields d2, and so on.
Each result digit therefore costs one tenth power and one look at where the
decimal point is. The "right shift" that brings A^10 back into [1,10) costs
nothing, because the mantissa is always stored normalised and only the
decimal-point position is tracked.

Worked example, P = 123456789.123456, three digits:

| step | A (normalised)        | A^10                | digit |
|------|-----------------------|---------------------|-------|
| char | 1.23456789123456      | leading digit at 10^8 | c = 8 |
| 1    | 1.23456789123456      | 8.2252...           | 0     |
| 2    | 8.2252...             | 1417417401.8...     | 9     |
| 3    | 1.4174174018...       | 32.73...            | 1     |

The result is L = 8.091. For inputs below one, c is negative. For
P = 0.00000123456789, c = -6 and the digits are 0, 9, 1, so L = -6 + 0.091 =
-5.909.

The digits are truncated, never rounded. The result is always at or just
below the true logarithm, within one unit of the last digit requested.

## Interface and timing

`dec_log64` is the top level. Parameters: `NDIG = 16` is the data-path width
in digits; `NFRAC = 16` is the largest number of mantissa digits.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begins a conversion; only sampled while `busy` is 0 |
| `p_in` | in | 64 | 16 characters, character 15 in bits 63:60 |
| `i_in` | in | 5 | mantissa digits wanted, 0..16; larger values are clamped to 16 |
| `busy` | out | 1 | conversion in progress |
| `done` | out | 1 | one-cycle pulse when the result is ready |
| `err` | out | 1 | the input is zero, has a character 4'hB..4'hF, or has two points |
| `res_char` | out | 6 | signed characteristic c (-15..15) |
| `res_mant` | out | 64 | mantissa digits d1 d2 ..., d1 in bits 63:60; unused digits are 0 |
| `res_neg`, `res_int`, `res_frac` | out | 1, 8, 64 | the same value in sign-magnitude BCD: -5.909 is `res_neg`=1, `res_int`=8'h05, `res_frac`=64'h9090_0000_0000_0000 |

Each character is a BCD digit 0..9 or the decimal-point code 4'hA. A string
with no point is an integer of up to 16 digits. A string with a point holds up
to 15 digits: `64'h1234_5678_9A12_3456` is 123456789.123456, and
`64'h0A00_0001_2345_6789` is 0.00000123456789.

Timing: if `start` is sampled on clock edge 0, then `done` goes high after
edge 1 + 4*i. There is one cycle to load and normalise the input, then four
cycles per mantissa digit. With an invalid input, or with i = 0, `done` comes
after edge 1. The results stay valid until the next `start`. One conversion
runs at a time.

## Structure

```
dec_log64
 |- reg_counter      input registers for P and i; down counter of digits still to compute
 |- log_controller   IDLE -> LOAD -> ITER (steps 0..3 per digit) -> DONE
 `- core_unit
     |- dps            decimal-point separator: removes the 4'hA character, counts integer digits
     |- (2:1 mux)      input path, or the power-10 unit's result
     |- zero_detector  leading-zero count + left-alignment (normalisation)
     |- dp_update      coefficient = integer digits - leading zeros - 1
     |- a_q register   the current normalised mantissa A
     |- power10_unit   A^10 in 4 cycles
     |   |- dec_mult        16 x 16 digit combinational BCD multiplier
     |   |   |- dec_ppg         recoding + partial products
     |   |   |- sd_adder_tree   tree of carry-free signed-digit adders (sd_adder)
     |   |   `- sd_to_bcd       final borrow-propagate conversion
     |   `- dp_accumulator  decimal exponent of X^2, X^4, X^8, X^10
     |- coef_update    stores c and the digits
     `- result_update  sign-magnitude formatting
```

`dlog_pkg` holds the shared constants (the default sizes and the point code
4'hA), the digit types, the controller's state enum and `core_ctrl_t`, the
bundle of control lines from the controller to the core (`sel_fb`, `load_a`,
`p10_en`, `p10_step`).

One rule does the decimal-point bookkeeping for both phases. A value whose
digit string has `nint` digits left of the point and `lz` leading zeros has
its leading digit at 10^(nint - lz - 1).

- In the load cycle, `dps` and `zero_detector` supply nint and lz. The result
  is the characteristic; it is negative for inputs below one.
- In the iterations, the power-10 result is already normalised (lz = 0), and
  nint is its exponent plus one. The result is the next digit.

So one multiplexer, one zero detector and one subtractor serve both phases.

## The power-10 unit

A tenth power is taken by recursive squaring on the one multiplier. A 2:1
select (`Sel`) chooses the second operand:

| cycle (`p10_step`) | operands | product | kept in |
|---|---|---|---|
| 0 | X * X | X^2 | accumulator and the X^2 register |
| 1 | acc * acc | X^4 | accumulator |
| 2 | acc * acc | X^8 | accumulator |
| 3 | acc * X^2 (`Sel` = 1) | X^10 | fed back to the core as the new A |

Both operands are normalised 16-digit mantissas in [1,10), so each 32-digit
product lies in [1,100). The unit keeps the 16 most significant digits. Those
are product digits 31..16 when digit 31 is non-zero, with the flag c = 1;
otherwise they are digits 30..15, with c = 0. The remaining digits are
truncated.

`dp_accumulator` turns those flags into exponents:

- X^2 has exponent c0, which is also stored for the last step.
- X^4 has exponent 2*c0 + c1.
- X^8 has exponent 4*c0 + 2*c1 + c2.
- X^10 has exponent e = 5*c0 + 2*c1 + c2 + c3.

e is at most 9, and it is the next mantissa digit. The result of step 3 is used
combinationally in the same cycle: the multiplexer, the zero detector and
`dp_update` store the digit and the new A on the edge that ends step 3. The
next digit's step 0 starts on the following cycle. This is why each digit
takes exactly four cycles. The longest combinational path runs through the
multiplier, the normaliser and the zero detector into `a_q`.

## The BCD multiplier

`dec_mult` computes an exact 32-digit product of two 16-digit BCD operands in
three combinational stages.

1. **Recoding and partial products (`dec_ppg`).** Each multiplier digit b_j is
   split as b_j = h_j + l_j, with h_j in {0, 5, 10} and l_j in {-2, -1, 0, 1, 2}.
   For example, 7 = 5 + 2, 8 = 10 - 2 and 9 = 10 - 1. Only four multiples of
   the multiplicand X are then needed, and none of them needs a carry chain:
   - X itself.
   - 10X, a one-digit shift of X.
   - 2X: each digit is doubled into a (carry, digit) pair. The digit part is
     even, so adding the carry from below can never overflow.
   - 5X = 10X / 2: digit i is 5*(x_i mod 2) + floor(x_{i-1} / 2).

   Negative multiples are written as 10's complements over the 32-digit
   width: each digit from position j upward is replaced by its 9's complement.
   The "+1" that completes each complement is not added in place. Instead,
   all of them go into one extra operand whose digit j is 1 when l_j < 0. That
   gives 16 + 16 + 1 = 33 operands, all with digits 0..9.
2. **Reduction (`sd_adder_tree`, `sd_adder`).** A balanced binary tree of
   signed-digit adders, six levels deep, sums the 33 operands. Digits are
   5-bit two's-complement values in -9..9. Each adder position computes
   u_i = x_i + y_i, a transfer c_i = sign(u_i) when |u_i| > 1 (0 otherwise),
   and s_i = u_i - 10*c_i + c_{i-1}. The result always lies in -9..9, so no
   carry travels more than one position. All sums are taken modulo 10^32, and
   the complemented operands rely on this.
3. **Conversion (`sd_to_bcd`).** A single ripple borrow chain turns the
   signed-digit sum into BCD: a negative position gets +10 and borrows 1 from
   the next position.

## Accuracy

Every product is truncated to 16 digits. `tb_error_analysis` converts 110
random operands: 100 16-digit integers and 10 fractions. It does this at 4, 8,
12, 14 and 16 mantissa digits and compares each result with `$ln(P)/$ln(10)`.
The largest absolute errors are 9.9e-5, 9.8e-9, 9.8e-13, 1.1e-14 and 5.3e-15.
Below 14 digits the error comes from the truncation of the result itself.
Note that `real` arithmetic cannot resolve errors much below 1e-15.

## Size

Yosys coarse synthesis of `dec_log64` gives about 12,000 word-level cells and
346 flip-flops. Almost all of the logic is the multiplier. For comparison, the
published FPGA prototype of this architecture reports 342 registers, and its
multiplier also dominates the area. The recoding in `dec_ppg` is mapped to a
small read-only table.

## Design choices and departures

These points are choices made for this implementation, where the
architecture leaves them open:

- **Handshake and reset.** The start/busy/done protocol and the asynchronous
  active-low reset are this implementation's own.
- **One conversion at a time.** The original prototype is described as
  pipelined and quoted at 51 mega-samples per second at 51 MHz. With a single multiplier
  that is busy for four cycles per digit, this RTL sequences the power unit
  and does not overlap conversions. The throughput is one digit per four
  cycles, plus one load cycle per conversion.
- **No exponent input.** The input is the 16-character string only. A
  decimal64 operand's exponent is not an input, and `res_char` covers only
  -15..15. To handle a full decimal64 value, add its exponent to `res_char`
  outside this unit. No DPD decoder is included.
- **Error flag.** The original architecture defines no behaviour for a zero
  or malformed input. The `err` output, and the choice of which strings it
  rejects, are additions.
- **X^2 register.** The X^2 "latch" is an edge-triggered register.
- **Clamping of i.** i is clamped to `NFRAC` = 16, the width of the data path.
- **Tree shape.** The shape of the adder tree and the ripple structure of the
  final conversion are the simplest ones that do the job.
- **Digit count for small inputs.** The number of digits computed is always
  `i_in`, also for inputs below one.

## Simulating

Every testbench in `tb/` is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The shared
reference model `tb/dlog_ref_pkg.sv` runs the same recurrence with 128-bit
binary integers. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dlog_pkg.sv tb/dlog_ref_pkg.sv tb/tb_dec_log64.sv \
    --top-module tb_dec_log64 -o sim
./obj_dir/sim
```

Change the file and the top module name to run another testbench.

- `tb_dec_log64` is the end-to-end test at the default size. It covers both
  worked examples, powers of ten, the largest input, invalid inputs, i = 0,
  i > 16, a start while busy, and 60 random conversions. It checks every digit
  and the latency of 1 + 4*i cycles, and counts each of those cases.
- `tb_error_analysis` runs the accuracy sweep described above.
- Each block has its own testbench, `tb_<module>.sv`. The arithmetic blocks
  are tested at reduced widths against 64-bit integers. `dec_mult` and
  `power10_unit` are tested at full width against 128-bit integers.

The modules contain SystemVerilog assertions, which run under `--assert`:

- In `log_controller`, `done` is a single-cycle pulse, and the counter is
  never empty while iterating.
- In `core_unit`, the power-10 result is only taken in step 3.
- In `dec_log64`, the number of digits written equals the number requested.

The widths `NDIG` and `NFRAC` are parameters. The multiplier, the partial
product generator and the adders scale with `NDIG`. The top level and the
testbench reference model assume 16-character inputs.
