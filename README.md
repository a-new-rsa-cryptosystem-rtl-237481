# Bit-serial Montgomery RSA processor

This is synthesizable SystemVerilog for an RSA processor that computes
`M^E mod N` for n-bit operands (n = 512 by default). The design follows a
published single-chip architecture. A Montgomery multiplication is split into a
plain product and a Montgomery reduction of only the low half of that product.
Because of the split, intermediate results never need a final subtraction. The
whole datapath works one bit per clock, with three units overlapped on the same
bit stream.

A 512-bit exponentiation takes about 0.40 M clocks for a random exponent and
0.53 M clocks for the worst case, an all-ones exponent. Each modular
multiplication takes n+7 = 519 clocks.

## The arithmetic

### Modified Montgomery multiplication

For operands A and B below 2^(n+1) and an odd modulus N < 2^n, with L = n+2:

```
C  = A*B = C1*2^L + C0            (C0: low L bits, C1: the rest, C1 < 2^n)
P  = 0
for i = 0 .. L-1:                 (Montgomery reduction of C0 only)
    q_i = (P + c_i) mod 2
    P   = (P + q_i*N + c_i) / 2
R  = P + C1                       (R = A*B*2^-L mod N, 0 <= R < 2^(n+1))
```

The loop gives `P*2^L = C0 + N*Q` with `P <= N`. Therefore
`R*2^L = A*B + N*Q`, so R is congruent to `A*B*2^-L` mod N. Also,
`R < N + 2^n < 2^(n+1)`. The result is not fully reduced, but it fits the
(n+1)-bit operand width, so it can go straight into the next multiplication.

### Exponentiation

Write `MM(A,B) = A*B*2^-(n+2) mod N`. The exponent has k bits, the leading one
included. Exponentiation then runs as follows:

```
M' = MM(M, C)                with C = 2^(2(n+2)) mod N   (pre-processing)
R  = M'
for each exponent bit below the leading one, most significant first:
    R = MM(R, R)
    if bit == 1: R = MM(R, M')
R  = MM(R, 1)                                            (post-processing)
```

Pre-processing moves M into the Montgomery domain. The host supplies the
constant C.

Post-processing removes the factor 2^(n+2). It also fully reduces the result.
With B = 1 the high half C1 is zero, so `R = P <= N`. Equality is only possible
when `M^E` is congruent to 0 mod N.

An exponent with k bits, v of them ones, takes k+v multiplications:
- 1 pre-processing multiplication
- k-1 squarings
- v-1 multiplications by M'
- 1 post-processing multiplication

## Datapath

```
 I/O buffer --bits--> modulus reg N ----------------(parallel)------------+
 (8-bit)   --bits--> constant reg C --+                                   |
           --bits--> exponent reg     |  serial                           v
           --bits--> text reg M / M' -|-(parallel)-> serial-parallel  c_i  Montgomery
                        ^             +--selector--> multiplier ------->  module
                        |             |                    |  held C1 --->  |
                        |             |                                     | carry-save
                        +-------------+----- r_i ----- carry-propagation <--+
                                                       adder
```

- **Operand registers** (`operand_reg`) are linear shift registers, loaded
  least significant bit first.
  - The modulus register is read in parallel by the Montgomery module.
  - The constant register is read serially, rotating, during pre-processing.
  - The text register is n+1 bits wide. It holds M, then M', and finally the
    result.
- **Serial-input selector**. The multiplier's serial operand comes from the
  constant register in pre-processing. In every later multiplication it comes
  from the carry-propagation adder, which is emitting the previous result. The
  selector can also force zeros.
- **Serial-parallel multiplier** (`sp_multiplier`): see below.
- **Montgomery module** (`mont_module`): see below.
- **Carry-propagation adder** (`cp_adder`) has two shift registers and one full
  adder. It turns the carry-save result into binary, one bit per clock.
- **Exponent register** (`exponent_reg`) normalises the exponent while the
  message is being loaded. It shifts left until the leading one reaches the
  MSB and counts the remaining bits. It then presents the bits, most
  significant first.
- **I/O buffer** (`io_buffer`) is one 8-bit register. It turns input bytes into
  one bit per clock and collects result bits into output bytes.
- **Controller** (`rsa_controller`) is a counter-based state machine with
  eleven states.

There are about 12n flip-flops in total, most of them in the multiplier (4n),
the Montgomery module (2n), the adder (2n) and the four operand registers.

## One multiplication, clock by clock

The previous result streams out of the adder one bit per clock. The multiplier
consumes each bit as it arrives. The Montgomery module reduces each product bit
one clock after the multiplier produced it. Clocks are counted from the start
of a multiplication (`cyc`):

| cyc | multiplier | Montgomery module | adder |
|---|---|---|---|
| 0 .. n+1 | takes serial bit `cyc`, product bit `cyc` registered | reduces product bit `cyc-1` (from cyc 1) | streams previous result bit `cyc` |
| n+2 | holds C1 | reduces product bit n+1 | - |
| n+3 | holds C1 | adds C1 sum vector | - |
| n+4 | holds C1 | adds C1 carry vector | - |
| n+5 | - | folds its LSB carry `h` | - |
| n+6 | - | - | loads the carry-save result |

In the next clock, cyc 0 of the next multiplication, bit 0 of the new result
is on the adder output. Each multiplication therefore takes exactly n+7 clocks.
During the multiplication that follows pre-processing, the text register also
captures M' from the adder stream. From then on, M' is the parallel operand of
every multiply-by-M' step.

## Serial-parallel multiplier and the squaring schedule

The multiplier is a linear array of n+1 cells. Cell j holds a sum bit and a
carry bit. The top cell holds a sum bit only.

Every clock, cell j adds three bits:
- its partial product `pp_j`
- the sum bit of cell j+1, which shifts the running product right by one
- its own carry

Cell 0's sum bit is the next product bit. After L = n+2 clocks the low L bits
have left the array. The array then stops and holds `C1 = floor(A*B/2^L)` in
carry-save form:
- `hi_sum[j]` = sum bit of cell j+1
- `hi_carry[j]` = carry of cell j

For `R*M'` the partial product is simply `pp_j = M'_j & x_t`.

Squaring is harder because both operands are the same serial stream, so bit j
of the "parallel" operand only exists from clock j on. The array schedules its
inputs so that each term is added exactly once, at the right weight:
- At clock j, cell j latches the arriving bit `m_j` and adds it alone. This is
  the diagonal term `m_j*m_j = m_j` at weight 2j.
- At clock j+1, cell j adds nothing.
- From clock j+2 on, cell j adds `m_j & m_(t-1)`, using the input delayed by one
  clock.

A cross term `m_j*m_k` (j < k) therefore enters once, at weight j+k+1, which
is the same as adding it twice at weight j+k. That is exactly the square. A
thermometer register with `th[j] = (clock > j)` tells each cell which of the
three cases applies.

The four registers per cell are sum, carry, latched bit and thermometer bit.
All n+2 product bits are ready after n+2 clocks, in squaring as well as in
multiplication.

For post-processing `MM(R, 1)`, the parallel operand is forced to one. The
serial operand is still the adder stream.

## Montgomery module: carry-save reduction with an exact LSB

The reduction step needs the parity of P every clock. A carry-save P would
normally need a carry-propagating addition to get that parity. The module
avoids this by keeping bit 0 of P in a single register. The state is:

```
P = S + 2*K + 2*h      S: sum vector, K: carry vector one position up,
                       h: one extra carry bit of weight 2
```

One reduction step with input bit c does the following:

1. `q = S[0] ^ c`. This is the quotient bit, a single XOR.
2. Because N is odd, bit 0 of `P + q*N + c` equals `S[0] + q + c`, which is
   always even. Its carry into position 1 is `co = S[0] | c`, a single OR.
3. A row of full adders forms `S[j] + K[j-1] + q*N[j]` for j >= 1.
4. An extra full adder adds the row's position-1 sum, `co` and `h`. Its sum
   becomes the new `S[0]` and its carry becomes the new `h`.
5. The new vectors are stored shifted right by one position.

The critical path is therefore one full adder plus a selector.

The same adder row also does the final addition. A two-way selector in front
of each adder swaps `q*N[j]` for the vector to be added, and the outputs are
then stored unshifted. Three such clocks add the multiplier's sum vector, its
carry vector, and `h`. The result `res_s + res_k` goes to the adder.

The invariant `P <= N` keeps every vector inside n+2 positions.

## Controller

The controller has eleven states: `IDLE`, `LOAD_N`, `LOAD_C`, `LOAD_E`,
`LOAD_M`, `PRE`, `SQR`, `MUL`, `POST`, `CAPT` and `UNLOAD`.

1. **Loading.** `LOAD_N`, `LOAD_C` and `LOAD_E` take n bits each, one per
   clock while bytes are available. `LOAD_M` takes n bits plus one zero bit
   for the top of the text register. The exponent is normalised during
   `LOAD_M`.
2. **Multiplication.** Each of `PRE`, `SQR`, `MUL` and `POST` takes n+7 clocks.
   At its end the next state is chosen from the current exponent bit and the
   bit count.
3. **Output.** `CAPT` shifts the final result into the text register in n+1
   clocks. `UNLOAD` sends it out through the I/O buffer. `done` pulses once
   the last byte has been taken.

## Interface and use

Module `rsa_processor`, parameter `N_BITS` (default 512; must be a multiple of
8). It uses one clock and an asynchronous active-low reset `rst_n`.

1. Pulse `start`.
2. Send 4*N_BITS/8 bytes on `in_data`, using `in_valid` and `in_ready` (a byte
   moves when both are high at a rising edge). Each operand goes least
   significant byte first, and each byte least significant bit first, in this
   order:
   1. N. It must be odd and below 2^n.
   2. C = 2^(2(n+2)) mod N.
   3. E. It must be non-zero; E = 0 is treated as E = 1.
   4. M. It must be below N.
3. The N_BITS/8 result bytes appear on `out_data` with `out_valid`, and are
   taken with `out_ready`, least significant byte first. `busy` stays high
   until `done` pulses.

Simulate the end-to-end tests with plain Verilator, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rsa_pkg.sv tb/tb_rsa_full.sv --top-module tb_rsa_full
obj_dir/Vtb_rsa_full
```

`tb_rsa_full` runs the 512-bit default size: a random full-length exponent,
65537 and an all-ones exponent, in a few seconds. `tb_rsa_processor` runs 40
exponentiations at 32 bits with random input gaps and output back-pressure. It
checks each result and the clock count `(k+v)*(n+7)`, and counts how often
each mechanism occurred:
- pre-processing
- squaring
- multiplication
- skipped multiplication
- post-processing
- input stall
- output back-pressure

Every block also has its own self-checking testbench, `tb/tb_<module>.sv`,
at 16 bits. Each testbench ends with a `TB_RESULT checks=… failures=…` line.

Measured at n = 512, from `start` to `done`, with the testbench's random input
gaps included:

| exponent | multiplications | clocks in multiplications | clocks start to done |
|---|---|---|---|
| random 512-bit, 264 ones | 776 | 402,744 | 405,948 |
| all ones (worst case) | 1024 | 531,456 | 534,656 |

The published chip reports 0.39 M clocks average and 0.54 M worst case. At its
125 MHz clock, the counts above give about 158 and 120 kbit/s.

## What is the original architecture and what is this implementation's

**Taken from the original design:**
- the modified Montgomery algorithm and the exponentiation with pre- and
  post-processing
- the set of units and how they connect
- (n+1)-bit operands and n+2 reduction steps
- the stop-and-hold multiplier and the squaring input schedule
- the XOR quotient, the OR carry and the extra LSB full adder of the
  Montgomery module
- the selector in front of each Montgomery adder
- the bit-serial carry-propagation adder feeding the next multiplication
  directly
- the 8-bit I/O buffer, exponent normalisation during message load, and an
  eleven-state counter-based controller
- 512-bit operands, and n+7 = 519 clocks per multiplication

**Chosen here:**
- **Final addition.** The multiplier's high half is kept in carry-save form
  and added in three clocks. This is what sets the 519-clock multiplication.
- **Squaring timing.** Cells are timed by a thermometer register.
- **Post-processing.** The 1 is applied on the parallel side.
- **Serial-input selector.** It has two sources and a zero gate. The original
  drawing shows three inputs.
- **Text register.** It is n+1 bits wide, because M' can need n+1 bits.
- **Load protocol.** Load order is N, C, E, M, with bytes and bits least
  significant first. The handshake is synchronous valid/ready. The original
  chip has an asynchronous byte port, so a host on another clock needs a
  synchronizer.
- **Result path.** The result is captured in the text register and unloaded
  through the same I/O buffer.
- **Edge cases and reset.** E = 0 gives M. Reset is asynchronous and clears
  every register. The modulus must be odd.
- **State names.** The names of the eleven states.

**Not reproduced:**
- the physical side: the 16-bit layout tiles, the buffered clock and
  global-signal tree, the pads and package, and the 125 MHz timing
- the Chinese-remainder speed-up, which the original only mentions as
  possible
- the original's cycle formula, which counts two more multiplications per
  exponentiation than its own loop performs; this design follows the loop
