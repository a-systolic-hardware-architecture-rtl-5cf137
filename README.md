# Montgomery modular multiplication: bit-serial and systolic hardware

Public-key schemes such as RSA spend almost all their time computing
`A * B mod N` for large numbers, usually inside a modular exponentiation.
Dividing by `N` is slow in hardware. Montgomery's method avoids the division.
It computes `A * B * R^-1 mod N` for a power of two `R`. At every step it adds
the multiple of `N` that makes the running sum divisible by the radix, then
shifts the sum right. Only additions, small multiplications and shifts are
needed. The factor `R^-1` cancels when the whole computation stays in the
"Montgomery domain", where each value `x` is held as `x * R mod N`.

This repository holds two implementations of that idea, plus an exponentiation
controller:

| unit | what it computes | default size |
|---|---|---|
| `Montgomery_multiplier_modif` | `z = x * y * 2^-8 mod 17`, radix 2, carry-save | 8 bits, modulus 17 |
| `sys_mont` | `r = A * B * 2^-1024 mod N`, radix 2^32, 1-D systolic array | 1024 bits = 32 words of 32 bits |
| `mont_exp` | `r = A^E mod N` (square-and-multiply on `sys_mont`), or one product | 1024-bit base, exponent and modulus |

`mont_top` places the 8-bit multiplier and the 1024-bit unit side by side.
They share only `clk` and `reset`, which is synchronous and active high.

## 1. The bit-serial carry-save multiplier

Files: `mont_bitserial.sv` (datapath), `mont_ctrl.sv` (control logic),
`csa.sv`, `rca.sv`, `mod_reduce.sv`, and the wrapper `Montgomery_multiplier_modif.sv`.

```
        B ──► [ Shift ] ── b_i ──► MUX1(0, A) ─────────────┐
                                                            ▼
   control ── U_i ──► MUX2(0, m) ──► CSA ──► CSA ──► S_sig, C_sig ──► RCA ──► D
   logic                             ▲                  │
                                     └── S, C fed back ─┘
```

Radix-2 Montgomery scans the multiplier `B` one bit per cycle, LSB first. The
sum is never resolved into binary inside the loop. It is kept as a pair
`(S, C)` whose value is `S + C`. One iteration does the following:

1. `U_i = S[0] ^ C[0] ^ (b_i & A[0])`. This is the parity of `S + C + b_i*A`.
2. The upper CSA adds `U_i * m` to `(S, C)`. The lower CSA then adds `b_i * A`.
   Because `m` is odd, adding it when `U_i = 1` makes the total even.
3. The total is halved by wiring. The sum vector's bit 0 is always 0 and is
   dropped by a right shift. The carry vector, whose weight is 2, is stored
   without a shift.

The critical path is therefore two full-adder delays, whatever the width.
After `W` iterations the ripple-carry adder forms `D = S + C`.
`D ≡ A*B*2^-W (mod m)` and `D < A + m`. The `S_sig`/`C_sig` registers are `W+2`
bits wide. Assertions check that the halved sum is even and that nothing
overflows.

`D` is not fully reduced. The wrapper therefore passes it through
`mod_reduce`, which subtracts `m` once per cycle while the value is `m` or more.
`x` and `y` may be any 8-bit values (even larger than `m`), so there can be
several subtractions.

**Handshake of `Montgomery_multiplier_modif`.** The ports are `x`, `y`, `clk`,
`reset`, `start`, `z` and `done`.

- Pulse `start`, and keep `x` stable until `done`.
- `done` rises after `WIDTH + 4 + floor(D / MODULUS)` cycles, and `z` is then valid.
- `done` and `z` hold until the next `start`.
- The modulus is the parameter `MODULUS`, not a port.

With the defaults, `2^8 ≡ 1 (mod 17)`, so the Montgomery product equals the
ordinary product mod 17. For example, `0x50 * 0x47` gives `z = 2`.

## 2. The systolic word-level multiplier (`sys_mont`)

Files: `sys_mont.sv`, `sys_pe.sv`, `sys_ctrl.sv`, `mod_reduce.sv`, `mont_pkg.sv`.

This unit uses the word form of the algorithm, with `k = K` bits per word and
`M` words, so that `R = 2^(K*M)`:

```
S = 0
for i = 0 .. M-1:
    q_i = ((S mod 2^k + a_i * b_0) * N') mod 2^k          N' = -N^-1 mod 2^k
    S   = (S + q_i * N + a_i * B) / 2^k
return S mod N
```

### Array

There are `M+1` processing elements in a row (33 by default). PE `j` holds word
`j` of `B` and of `N`. For iteration `i` it computes one column:

```
T = s_j + a_i*b_j + q_i*n_j + c_in        (2K+1 bits)
t_j   = T mod 2^K   -> goes LEFT:  word j-1 of the next S   (this is the / 2^k)
c_out = T >> K      -> goes RIGHT: carry (K+1 bits) into PE j+1
```

- **PE 0** computes `q_i` itself. Its column is then divisible by `2^K`; an
  assertion checks this. It has no carry in.
- **`a_i` and `q_i`** move one PE to the right per cycle, in registers, with a
  valid bit.
- **PE M** is the extra element. Its `b` and `n` words are zero, and it holds
  the top word of `S`, which it reads back from its own carry register. The
  extra word is needed because `S < N + B` can exceed `R` while the loop runs.

### Schedule

PE `j` handles iteration `i` in cycle `2i + j`. It needs word `j+1` of the
previous `S`. PE `j+1` wrote that word in cycle `2(i-1) + (j+1) = 2i + j - 1`,
so it is ready in a register exactly one cycle earlier.

The controller (`sys_ctrl`) therefore feeds a new word `a_i` into PE 0 **every
second cycle**. About `M/2` iterations are in flight at once, each one a
diagonal wave across the array. A PE's registers hold their value in the
cycles when its valid input is low.

The controller's states are IDLE, SETUP, FEED, DRAIN, REDUCE and FIN:

1. On `start` the operands are latched.
2. `N'` is computed from `n_0` by Newton iteration (`mont_pkg::neg_inv_word`).
3. The array registers are cleared (`S = 0`).
4. The words of `A` are fed in.
5. The controller counts `M` valid columns leaving the last PE.
6. `mod_reduce` subtracts `N` until the result is below `N`. With `B < 2N`
   this takes at most two subtractions.

**Operand bounds:** `N` odd and `N < R`; `A < R`; `B < 2N`.

**Latency:** `3M + 6` cycles, plus one cycle per final subtraction. That is 102
to 104 cycles at the default size. `done` is a one-cycle pulse, and `r` holds
until the next result.

Each PE contains two `K x K` multipliers (PE 0 has one more, for `q_i`). At the
default size there are 67 multipliers of 32 x 32 bits and about 8,300
flip-flops.

## 3. Exponentiation (`mont_exp`)

This unit wraps `sys_mont`:

- `mode = 0`: one product `r = A*B*R^-1 mod N`.
- `mode = 1`: `r = A^E mod N` by left-to-right (MSB-first) binary
  square-and-multiply.

Mode 1 runs these steps:

1. Compute `R^2 mod N` by doubling 1 with a conditional subtraction, `2*K*M`
   times (one cycle each, 2048 cycles at the default size).
2. Compute `abar = MonMul(A, R^2)` and `x = MonMul(1, R^2)`.
3. For each exponent bit, MSB first: `x = MonMul(x, x)`, then
   `x = MonMul(x, abar)` if the bit is 1.
4. Compute `r = MonMul(x, 1)`.

All `EW` exponent bits are scanned, leading zeros included. An exponentiation
therefore takes `3 + EW + popcount(E)` products. A random 1024-bit exponent
needs about 163,000 cycles.

Every intermediate value is already below `N`, which meets the bounds of
`sys_mont`. The base may be any value below `R`.

## 4. Top level (`mont_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock, synchronous active-high reset |
| `bs_start`, `bs_x`, `bs_y` | in | 1, 8, 8 | start and operands of the 8-bit multiplier |
| `bs_z`, `bs_done` | out | 8, 1 | `x*y*2^-8 mod 17`; `done` held until the next start |
| `sy_start`, `sy_mode` | in | 1, 1 | start; 0 = multiply, 1 = exponentiate |
| `sy_a`, `sy_b`, `sy_e`, `sy_n` | in | 1024 each | operand / base, multiplier, exponent, odd modulus |
| `sy_r`, `sy_done`, `sy_busy` | out | 1024, 1, 1 | result, one-cycle done pulse, busy |

Parameters: `WIDTH = 8`, `MODULUS = 17`, `K = 32`, `M = 32`. The exponent width
is `K*M`.

## 5. What follows the source design, and what does not

These parts follow the source publication:

- The radix-2 datapath: shift register for `B`, multiplexers selecting `0`/`A`
  and `0`/`m`, two CSAs feeding `S_sig`/`C_sig` back, and a final RCA.
- The 8-bit ports `x`, `y`, `clk`, `reset`, `start`, `z`, `done`.
- The example operands and modulus 17.
- The 1024-bit systolic organisation in 32-bit words, with carries passed
  between neighbouring PEs and FSM sequencing.
- The word-level algorithm.
- Left-to-right square-and-multiply exponentiation.

These are choices of this design:

- **Systolic array:** 33 PEs instead of 32; the one-column-every-second-cycle
  schedule; the register placement.
- **Precomputation:** `N'` and `R^2 mod N` are computed in hardware.
- **Reduction:** final reduction by repeated subtraction in both multipliers.
- **Bit-serial multiplier:** the `W+2`-bit accumulator; the LSB-first scan; the
  quotient-bit formula; the modulus as a parameter.
- **Handshakes:** their timing, the reset style, and the `mode` input.

Not reproduced:

- **Bit width.** The publication's headline is a 32-bit multiplier, but its
  synthesized 8-bit symbol is what is built here as the default. `WIDTH = 32`
  is a parameter change; `tb_mont_mul32` simulates it with the modulus 2^32 - 5.
- **Internal structure behind the 8-bit simulation.** The publication's 8-bit
  simulation shows internal partial-product signals (`p0..p7`, `q`, `clear`)
  of a structure it does not describe. Only the result and the handshake are
  matched.
- **Lookup table.** A lookup table of "possible values" is mentioned, but not
  its contents.
- **Multiplexed architecture.** A "multiplexed architecture" is only used for
  comparison.
- **FPGA results.** The FPGA area and delay figures (Virtex-5) have not been
  reproduced.

## 6. Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference values are computed in the
testbench independently of the Montgomery loop:

- a result `r` is accepted when `r < N` and `r * R ≡ A * B (mod N)`;
- exponentiation is checked against right-to-left square-and-multiply with `%`.

Cycle counts are checked where they are fixed. `tb_mont_mul32` runs the
bit-serial multiplier at 32 bits.

`tb_mont_top` runs at the default sizes. It runs 1024-bit products while the
8-bit unit runs concurrently, the 8-bit example (`0x50 * 0x47 → 2`), and one
full 1024-bit exponentiation. It counts each mechanism and fails if one never
occurred. The counted mechanisms are:

- a quotient bit that adds the modulus;
- a zero multiplier bit;
- final subtractions in both units;
- overlapping iterations in the array;
- a product needing no subtraction;
- both modes;
- the `R^2` precomputation;
- squarings with and without a following multiplication.

The run takes well under a second of wall-clock time with verilator (the build takes a few seconds).

## 7. Simulating

With verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mont_pkg.sv tb/tb_mont_top.sv \
          --top-module tb_mont_top -o sim
./obj_dir/sim
```

Replace `tb_mont_top` with any other testbench, for example `tb_sys_mont`
(128-bit array) or `tb_mont_exp` (128-bit operands, 24-bit exponent). The
package `mont_pkg.sv` must be listed first. Other modules are found through
`-Irtl`.
