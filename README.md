# XGCD: a 32-bit modular inverse processor

Public-key schemes such as RSA need the modular inverse of an integer:
given `a` and a modulus `m`, find `s` with `a*s ≡ 1 (mod m)`. It exists exactly
when `gcd(a, m) = 1`. This processor finds `s` with the extended Euclidean
algorithm (XGCD). The algorithm runs the ordinary Euclidean remainder sequence
for the gcd and also carries along a Bézout coefficient, which ends up as the
inverse. Operands, modulus and result are carried on 33-bit buses, `(32:0)`,
so 32-bit values fit with room to spare. The core loops over one sequential
divider and one multiplier.

## The algorithm as executed

```
s = 0;  s1 = 1;  r = m;  r1 = a;
while (r1 != 0) {
    q = r div r1;
    (s, s1) = (s1, s - q*s1);
    (r, r1) = (r1, r mod r1);        // r mod r1 == r - q*r1
}
if (r != 1)  result = 0;             // not invertible
else         result = (s < 0) ? s + m : s;
```

Worked example, 18⁻¹ mod 65:

| iteration | q | s   | s1  | r  | r1 |
|-----------|---|-----|-----|----|----|
| 0         |   | 0   | 1   | 65 | 18 |
| 1         | 3 | 1   | -3  | 18 | 11 |
| 2         | 1 | -3  | 4   | 11 | 7  |
| 3         | 1 | 4   | -7  | 7  | 4  |
| 4         | 1 | -7  | 11  | 4  | 3  |
| 5         | 1 | 11  | -18 | 3  | 1  |
| 6         | 3 | -18 | 65  | 1  | 0  |

The final `r = 1` shows `gcd = 1`. The coefficient `s = -18` is negative, so
the result is `-18 + 65 = 47`, and indeed `18*47 = 846 = 13*65 + 1`.

## Interface (`xgcd`)

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `Clk`     | in  | 1     | clock |
| `Reset`   | in  | 1     | synchronous reset, active high |
| `Enable`  | in  | 1     | start request; `A` and `B` are sampled when it is accepted |
| `A`       | in  | N+1   | the integer `a` (unsigned) |
| `B`       | in  | N+1   | the modulus `m` (unsigned) |
| `Results` | out | N+1   | `a⁻¹ mod m`, or 0 if `gcd(a, m) ≠ 1` |
| `Ack`     | out | 1     | one-cycle pulse: operands accepted |
| `Ready`   | out | 1     | `Results` is valid |

The parameter is `N = 32`, so the buses are 33 bits wide. The processor has
104 port bits in total.

### Handshake and timing

1. While idle, the processor samples `Enable` on every clock edge. On the edge
   where it is high, `A` and `B` are captured and `Ack` goes high for one
   cycle. After that, `A` and `B` may change.
2. Suppose the computation takes `k` loop iterations. Then `Ready` rises
   `k*(N+6) + 1` clock edges after the accepting edge, which is
   `38k + 1` cycles at `N = 32`. Some examples:
   - 18⁻¹ mod 65 takes 6 iterations, so 229 cycles.
   - The slowest 33-bit pair, the consecutive Fibonacci numbers
     F(48) and F(49), takes 47 iterations, so 1787 cycles.
   - Random 32-bit operands usually need about 20 iterations.
3. `Ready` and `Results` stay valid as long as `Enable` is held high. One edge
   after `Enable` falls, `Ready` drops and the processor is idle again. To
   start the next operation, raise `Enable` again. `Results` keeps its value
   until that next operation finishes.

Edge cases:
- `a = 0` skips the loop and returns 0. `m = 1` returns 0.
- `a ≥ m` is allowed. The first quotient is then 0 and the pair swaps.
- `m = 0` has no meaning. The operation still completes, but the result is
  unspecified.

## Controller

Eight states are visited in this order. The numbers in the last column are
the cycles each state takes.

| state       | work | cycles |
|-------------|------|--------|
| `set_reset` | idle; on `Enable`, load `s=0, s1=1, r=B, r1=A`, pulse `Ack`; go to `div`, or to `sign_test` if `A = 0` | waits |
| `div`       | start the divider on `r / r1` | 1 |
| `modular`   | wait until the divider delivers `q` and `r mod r1` | N+2 |
| `mult`      | `p = q * s1` | 1 |
| `reset1`    | `(s, s1) <= (s1, s - p)`, `(r, r1) <= (r1, r mod r1)` | 1 |
| `set1`      | back to `div` if `r1 ≠ 0`, else to `sign_test` | 1 |
| `sign_test` | `Results <= (r ≠ 1) ? 0 : (s < 0 ? s + m : s)`, raise `Ready` | 1 |
| `output`    | hold until `Enable` falls, then back to `set_reset` | waits |

## Datapath widths and why the arithmetic is exact

- **Remainders.** `r` and `r1` are unsigned, `N+1` bits wide, and never
  exceed `max(a, m)`.
- **Coefficients.** `s` and `s1` are signed, `N+2` bits wide. In this
  algorithm `|s| ≤ m` throughout, so `N+2` bits hold every coefficient.
- **Product.** The product `q*s1` can exceed `N+2` bits, but it is only used
  in `s - q*s1`, whose true value does fit. Both are computed modulo
  `2^(N+2)`, so the difference comes out exact even when the product wraps.
  This avoids a wider multiplier and subtractor.
- **No second multiply.** The algorithm's other product, `q*r1`, is never
  formed, because `r - q*r1` is exactly the divider's remainder.
- **Final correction.** The last step adds `m` to a negative `s`. It is one
  adder, used only in `sign_test`.

## Divider (`xgcd_divider`)

A restoring shift-and-subtract divider with `W = N+1` bits. It produces one
quotient bit per cycle, most significant bit first:

1. The next dividend bit is shifted into the partial remainder.
2. If the result is at least the divisor, the divisor is subtracted and the
   quotient bit is 1.

Timing:
- `start` loads the operands.
- `busy` is then high for exactly `W` cycles.
- `done` is high for the following single cycle.
- `quotient` and `remainder` stay valid until the next `start`.

The controller never divides by zero, because the loop ends when `r1 = 0`.
An assertion checks this.

## Files

| file | contents |
|------|----------|
| `rtl/xgcd_pkg.sv` | controller state type |
| `rtl/xgcd_divider.sv` | sequential divider |
| `rtl/xgcd.sv` | top: controller, coefficient registers, multiplier, final correction |
| `tb/tb_xgcd_divider.sv` | divider against `/` and `%`, latency `W+1` edges |
| `tb/tb_xgcd.sv` | end-to-end test at the default size |

`tb_xgcd` covers the following, over about 3000 operations:
- the 18⁻¹ mod 65 example;
- the Fibonacci worst case;
- corner cases;
- random operands over all 33 bits;
- a reset in the middle of an operation.

For the worked example, it also compares the `s, s1, r, r1` registers with
the table above after each of the six iterations.

It checks each result in two ways:
- against a 64-bit software model of the algorithm;
- independently, by testing `(a*s) mod m = 1` for invertible inputs, or that
  the result is 0 when `gcd(a, m) ≠ 1`.

It also checks the `Ack` pulse, the `Ready`/`Enable` handshake and the exact
latency for every operation. It counts how often each behaviour occurs: loop
skipped, sign correction, no correction, non-invertible input, `a ≥ m`,
`Enable` held, reset. A behaviour that never occurs counts as a failure.
Assertions in the RTL check the handshake rules (run with `--assert`).

Simulate with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/xgcd_pkg.sv rtl/xgcd_divider.sv \
    rtl/xgcd.sv tb/tb_xgcd.sv --top-module tb_xgcd
./obj_dir/Vtb_xgcd
```

The divider test builds the same way from `rtl/xgcd_divider.sv` and
`tb/tb_xgcd_divider.sv` with `--top-module tb_xgcd_divider`. Both tests end
with a line `TB_RESULT checks=<n> failures=<n>`.

To change the precision, set `N`; all widths follow from it. Latency grows
linearly with `N`, because each iteration holds one `N+1`-cycle division.

## What follows the original design and what does not

Taken from the original design:
- the algorithm, as listed above;
- the 32-bit precision;
- the port list and the `(32:0)` bus notation;
- the eight state names.

Its description prints the integers both as "32-bit" and as `(32:0)`. This
RTL uses 33-bit buses. That reading matches the reported pin count:
104 = 3×33 + 5.

Choices made here:
- **States.** The work done in each state and the order of the states were
  chosen for this RTL. The design waits in `set_reset`, `modular` and
  `output`.
- **Divider.** The multi-cycle restoring divider.
- **Ack and Ready.** Their exact meaning and the hold-until-`Enable`-falls
  handshake.
- **Reset.** Synchronous, active high.
- **Non-invertible input.** A result of 0 stands for "not invertible".
  There is no separate error output.
- **Operands.** `A` and `B` are treated as unsigned over all 33 bits.

Known differences:
- **Adders.** The original is said to use carry-save addition, but where is
  not described. This RTL uses ordinary binary adders, subtractors and
  comparators.
- **Clock speed.** The original reports an FMAX of 7.3 to 19.8 MHz on FPGAs,
  which suggests long combinational paths per clock. This RTL spreads each
  division over `N+1` cycles, so its clock period should be much shorter and
  its cycle count higher. Its timing has not been measured on any FPGA.
- **Registers.** Generic synthesis gives 417 flip-flops, against 546
  reported for the original.

A binary (shift-and-halve) inversion method is sometimes shown next to this
kind of processor. It is not used here.
