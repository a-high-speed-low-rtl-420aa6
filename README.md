# Carry-free maximally redundant signed-digit adder

This is a combinational adder for numbers written in a redundant radix-2^h
signed-digit system. Each digit is an (h+1)-bit two's complement value in
[-(2^h-1), 2^h-1]. Because the digits are redundant, a carry never has to
ripple across the word. Each digit position sends at most a transfer of -1, 0
or +1 to the next position up. That transfer depends only on the position's
own two operand digits. So the adder's delay is the delay of one digit slice,
whether the word has 4 digits or 400.

The digit set [-(2^h-1), 2^h-1] is the largest symmetric set that h+1 bits
can hold ("maximally redundant"). The default is h = 4 (radix 16, 5 bits per
digit) with N = 16 digits.

The RTL implements the non-speculative scheme published as "A High Speed Low
Power Signed Digit Adder". That scheme gets the transfer of each position
straight from the operand bits with a few gates. It does not add the digits
first and then compare the sum against a threshold, and it does not compute
three speculative sums in parallel.

## Number format

- An operand has N digits. Digit i has weight 2^(h·i):
  `X = sum x[i] · 2^(h·i)`.
- A digit `x[i]` is an (h+1)-bit two's complement number. Bit h is its sign,
  weighted -2^h. The code `10…0` (-2^h) is not a valid digit, and the adder
  must never be given it.
- The sum S has N+1 digits in the same encoding. The top digit `s[N]` is the
  transfer out of position N-1, so it is always -1, 0 or +1.
- A number has many representations. For example, with h = 4, `(1)(-6)` and
  `(0)(10)` both mean 10. The adder returns one valid representation of
  X + Y. To get a conventional binary result, evaluate the digits with their
  weights (one ordinary carry-propagate addition). Nothing here does that.

## How one digit slice works

Digit slice i takes `x_i`, `y_i` and the transfer `t_i` from position i-1. It
produces `s_i` and the transfer `t_(i+1)`. These two relations hold:

    x_i + y_i = w_i + 2^h · t_(i+1)        w_i in [-(2^h-2), 2^h-2]
    s_i       = w_i + t_i                  s_i in [-(2^h-1), 2^h-1]

Since |w_i| ≤ 2^h-2 and |t_i| ≤ 1, `s_i` always fits. Adding `t_i` never
creates another transfer.

### 1. The position sum costs nothing

The two digits, stacked on top of each other, already form a carry-save
representation of `p_i = x_i + y_i`. The bits of that representation are:

- two sign bits `X^h` and `Y^h`, each weighted -2^h (negabits);
- bits h-1..0 of both digits, positively weighted (posibits).

No adder is needed to form `p_i`.

### 2. Re-encoding the top of the sum

The transfer also has weight 2^h, so the sign bits could serve as the
transfer. A transfer in [-1, 1] needs one posibit and one negabit in position
h, but there are two negabits. The slice therefore re-encodes the three bits
`{X^h, x^(h-1), y^(h-1)}`. Their value, counted in units of 2^(h-1), is in
[-2, 2]. The same value is given by a posibit `~X^h` in position h plus two
negabits `~x^(h-1)` and `~y^(h-1)` in position h-1. The only cost is three
inverters.

After this step:

- the pair (`~X^h` posibit, `Y^h` negabit) is a first guess of `t_(i+1)`;
- two h-bit two's complement halves, with sign bits `~x^(h-1)` and
  `~y^(h-1)`, add up to a first guess of `w_i`.

### 3. The exception flag

The first guess fails only when the interim sum would come out as -2^h or
-2^h+1, which is outside the allowed range. That happens when bits h-1..1 of
both digits are zero and `x^0` and `y^0` are not both 1. That covers five
operand pairs:

| digit signs | operand pairs (x, y)          | guessed t, w    | corrected t, w  |
|-------------|-------------------------------|-----------------|-----------------|
| both ≥ 0    | (0,0), (0,1), (1,0)           | 1, p - 2^h      | 0, p            |
| mixed       | (0, -(2^h-1)), (-(2^h-1), 0)  | 0, p            | -1, p + 2^h     |
| both < 0    | none                          | -1, p + 2^h     | —               |

The flag is

    phi = ~( x^(h-1) | … | x^1 | y^(h-1) | … | y^1 | (x^0 & y^0) )

When `phi = 1` the slice subtracts 1 from the transfer and adds 2^h to the
interim sum. In every exception, both position h-1 negabits are 1, so adding
2^h means clearing both of them. `sd_xfer_logic` computes:

    t_pos  = ~(X^h | (Y^h & phi))     posibit of t_(i+1)
    t_neg  =   Y^h | phi              negabit of t_(i+1)
    xs_neg = ~(x^(h-1) | phi)         corrected negabit, x half
    ys_neg = ~(y^(h-1) | phi)         corrected negabit, y half

The transfer is ready one OR-tree plus two gate levels after the inputs. That
is much sooner than any adder in the slice finishes.

### 4. Interim sum

`sd_interim_adder` adds the two h-bit halves. Bits h-2..0 come straight from
the operands, so this addition does not wait for the flag. In position h-1:

- the adder receives both negabits inverted;
- its inverted carry-out becomes the sign bit `W^h`, weighted -2^h.

The result `w_i` is an ordinary (h+1)-bit two's complement number. The adder
is either a full-adder chain or a flat carry look-ahead.

### 5. Adding the incoming transfer

`t_i` is -1, 0 or +1, so the last step only ever increments or decrements
`w_i`. Because the result cannot overflow, the sign bit is

    S^h = ~c^h & (W^h | T^h) | (W^h & T^h)        (c^h = carry into bit h)

This step has two implementations.

- **`sd_final_adder` (any h).** `sd_xfer_conv` first turns the transfer pair
  into two's complement. `t^0 = t_pos ^ t_neg`, and every higher bit equals
  `tau = ~t_pos & t_neg`. Since all the upper operand bits equal `tau`, the
  look-ahead carries simplify. With `c^1 = w^0 & t^0`:

      c^k = tau & OR(w^1..w^(k-1)) | (tau | AND(w^1..w^(k-1))) & c^1

  When h is a multiple of 4 and at least 8, the OR and AND terms are built
  in two levels from groups of four bits. A full-adder chain form is also
  available.
- **`sd_final_cla4` (h = 4, the default).** This version merges the
  conversion into the adder. It decodes `a` (t = -1) and `b` (t = +1) from
  the neighbour's transfer pair. Sum bit j flips when `a` is set and all
  lower bits of w are 0, or when `b` is set and all lower bits are 1.

### Timing

Everything is combinational. There is no clock, register or handshake. The
longest path starts at the exception flag of slice i-1. It goes through the
transfer gates to slice i, then through slice i's final-step carry logic to
`S^h`. Slice i's interim sum is computed in parallel on the other input of
that final step. The path length does not depend on N.

## Modules

| module             | role                                                          |
|--------------------|---------------------------------------------------------------|
| `sd_pkg`           | defaults `SD_H = 4` and `SD_N = 16`, the `sd_arch_e` enum, full-adder functions |
| `sd_adder`         | top level: N slices, zero transfer into digit 0, `s[N]` from the last transfer |
| `sd_digit_slice`   | one digit position (steps 1–5)                                |
| `sd_xfer_logic`    | exception flag, outgoing transfer, corrected negabits         |
| `sd_interim_adder` | interim sum `w_i`                                             |
| `sd_xfer_conv`     | transfer pair to (h+1)-bit two's complement                   |
| `sd_final_adder`   | `s_i = w_i + t_i` for any h                                   |
| `sd_final_cla4`    | `s_i = w_i + t_i` for h = 4, transfer decode merged in        |

Top-level parameters and ports (`sd_adder`):

| name   | kind      | default        | meaning                                         |
|--------|-----------|----------------|-------------------------------------------------|
| `H`    | parameter | 4              | radix 2^H, digits are H+1 bits; H ≥ 2           |
| `N`    | parameter | 16             | operand digits                                  |
| `ARCH` | parameter | `SD_ARCH_CLA`  | `SD_ARCH_CLA` look-ahead, `SD_ARCH_RIPPLE` full-adder chains |
| `x`, `y` | input `[N-1:0][H:0]` |    | operand digits                                  |
| `s`    | output `[N:0][H:0]` |      | sum digits                                      |
| `phi`  | output `[N-1:0]` |         | per-position exception flag (for observation)   |

Between slices, the transfer travels as a posibit/negabit pair
(`t_pos - t_neg`). The codes (0,0) and (1,1) both mean 0.

`sd_digit_slice` uses `sd_final_cla4` when `H == 4` and `ARCH` is look-ahead.
Otherwise it uses `sd_xfer_conv` followed by `sd_final_adder`.

## What follows the published scheme and what is chosen here

These parts follow the published scheme: the carry-save view of the position
sum, the re-encoding, the exception flag and its corrections, the negabit
handling in the interim adder, the sign-bit rule of the last step, the
simplified look-ahead, and the radix-16 merged final logic.

These choices are made here:

- **Digit count.** The scheme has no fixed digit count. N = 16 is a default
  only.
- **Transfer into digit 0.** The transfer into digit 0 is tied to zero.
  There is no carry-in port.
- **Top digit encoding.** `s[N]` uses the same (h+1)-bit encoding as the
  other digits.
- **Transfer gates.** The gate equations for `t_pos` and `t_neg` are derived
  from the exception table above. Other gate forms give the same values on
  valid inputs. The input `X^h = Y^h = 1` with `phi = 1` cannot occur,
  because it would need a digit of -2^h.
- **Carry range in the simplified look-ahead.** The published equation runs
  its OR and AND terms up to `w^k`. The carry into bit k depends only on
  bits 1..k-1, so this RTL stops at `w^(k-1)`. Running the terms up to `w^k`
  gives wrong sums for some inputs, and the testbench of `sd_final_adder`
  catches that.
- **Where the transfer is decoded.** Each slice passes its transfer as the
  raw pair, and the receiving slice decodes it. This matches the radix-16
  merged logic. A diagram of the ripple form shows the conversion on the
  sending side instead. The arithmetic is the same either way.
- **Interim-sum look-ahead.** The "standard" look-ahead for the interim sum
  is written as a flat generate/propagate expansion.
- **Large h.** For large h (multiples of 4 from 8 up), the scheme suggests a
  look-ahead tree with simplified group signals but does not spell it out.
  Here it is a two-level look-ahead. Bits 1..h-1 are cut into groups of four.
  Each group makes an "any bit is one" and an "all bits are one" signal. Each
  carry combines the group signals below its own group with the bits of its
  own group. Other h use the flat form.
- **Gate level.** The equations are written as AND/OR/XOR expressions. Gate
  choice is left to synthesis.

Not reproduced: the published delay, power and area figures for one radix-16
slice in a 0.13 µm CMOS library (0.46 ns, 1.42 mW, 1708 µm²). They depend on
the cell library and the synthesis flow.

## Verification

Every testbench checks the design against plain integer arithmetic, not
against a copy of the RTL's logic. Each one prints
`TB_RESULT checks=<n> failures=<m>`.

| testbench              | what it covers                                                     |
|------------------------|--------------------------------------------------------------------|
| `tb_sd_xfer_logic`     | all digit pairs, h = 2, 3, 4: flag, transfer, `x+y = w + 2^h t`, range of w |
| `tb_sd_xfer_conv`      | all four transfer codes, h = 4, 6                                  |
| `tb_sd_interim_adder`  | all inputs, h = 3, 4, both architectures                           |
| `tb_sd_final_adder`    | every valid w with every transfer, h = 3, 4, 5, 8, both architectures, and h = 12 look-ahead |
| `tb_sd_final_cla4`     | every valid w with every transfer code                             |
| `tb_sd_digit_slice`    | exhaustive single slice (all x, y and incoming transfers) for h = 4 look-ahead and ripple, and h = 2, 3, 5 |
| `tb_sd_adder`          | default top (h = 4, N = 16): fixed patterns plus 20 000 random operand pairs; checks each digit, the full value in 128-bit arithmetic, and `phi` |
| `tb_sd_adder_variants` | top with ripple slices, and with h = 2, 3, 8                       |

The exhaustive slice test covers every situation a slice can meet, because
all a slice sees of its neighbour is a transfer in {-1, 0, 1}.

`tb_sd_adder` also counts how often each mechanism occurs. A mechanism that
never occurs counts as a failure. The mechanisms are:

- both kinds of transfer correction;
- outgoing transfers of -1, 0 and +1;
- increments and decrements in the last step, including ones that reach the
  sign bit;
- a non-zero top digit.

`tb_sd_ref_pkg` holds the integer reference functions.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/sd_pkg.sv tb/tb_sd_ref_pkg.sv tb/tb_sd_adder.sv \
        --top-module tb_sd_adder -o sim -Mdir obj_tb_sd_adder
    ./obj_tb_sd_adder/sim

Replace `tb_sd_adder` with any other testbench name. Verilator finds the RTL
modules through `-Irtl`. To lint the design:

    verilator --lint-only -Wall -Irtl rtl/sd_pkg.sv rtl/sd_adder.sv

Lint reports only that some package constants are unused in a given module.
