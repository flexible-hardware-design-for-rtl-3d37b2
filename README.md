# RSA and prime-field ECC on one Montgomery systolic array

This accelerator runs both RSA and elliptic-curve cryptography over GF(p) on the
same hardware. Both reduce to large-integer modular multiplication, so one
systolic Montgomery multiplier serves both. RSA uses it with moduli up to 4096
bits. ECC uses it with 140–300-bit fields. The clock period does not depend on
the operand length.

The design never performs a data-dependent modular reduction. The Montgomery
radix is chosen as R = 2^(n+4) > 16N for an n-bit modulus N. With that choice,
any two inputs below 4N give a Montgomery product below 2N. So:

* a multiplier output can go straight back into the multiplier, with no final
  "if T ≥ N then subtract N";
* modular additions and subtractions in the point formulas can be plain
  integer operations (a + b, a + 2p − b): the result is below 4p, which the
  multiplier accepts;
* the CRT recombination of RSA (Garner's method) can use x = s + p − t instead
  of a subtraction mod p with a conditional correction.

Every operation therefore takes a time fixed by the operand length alone. That
is the side-channel argument behind the design.

## Block structure

```
            host bus (32-bit, memory mapped)
   ───────────────┬─────────────────────────────┬──────────┬─────────
                  │                             │ commands │
          pk_bus_if (registers, decode)         │          │
                  │ 32-bit chunks               │          │
          pk_memory (16 words × 4104 bits)      │          │
          │ read/write port per unit            │          │
   ┌──────┴──────┐   ┌──────────────┐   ┌───────┴──────┐   │
   │ lncp        │   │ mmme (unit 1)│   │ mmme (unit 2)│ ◄─┘
   │ add/sub/half│   │  └ mmm array │   │  └ mmm array │
   └─────────────┘   └──────────────┘   └──────────────┘
```

| Module | Role |
|---|---|
| `rsa_ecc_top` | Connects the bus interface, memory, LNCP and `NUM_MMM` MMM/E units |
| `pk_bus_if` | Bus protocol, LEN/EBITS/STATUS registers, command strobes |
| `pk_memory` | Shared operand memory, one read and one write port per unit |
| `lncp` | Large Number Co-Processor: constant-time ADD, SUB (a + k·m − b), HALF |
| `mmme` | Montgomery multiplication / exponentiation unit |
| `mmm` | Systolic Montgomery multiplier |
| `mmm_rightmost_cell`, `mmm_cell` | The two kinds of processing cell |
| `rsa_ecc_pkg` | Digit size, command struct, opcodes, −n⁻¹ mod 16 |

The units run concurrently. A point addition keeps both multipliers and the
LNCP busy at the same time. The host, not the hardware, follows the
row-by-row schedules below.

## The systolic Montgomery multiplier (`mmm`)

Each processing cell handles a 4-bit digit of X (α = 4) against a 4-bit digit
of Y (β = 4). For an n-bit modulus, l = n/4 is the number of digits. The array
has one rightmost cell plus regular cells 1 … L+2, where L = N_MAX/4 (1027
cells at the default N_MAX = 4096).

Y and N stay in place, one digit per cell. The multiplicand enters the
rightmost cell one digit every second cycle.

* **Rightmost cell.** For digit x_i it forms u = t + x_i·y₀. It picks the
  quotient digit m_i = u·(−n₀⁻¹) mod 16, which makes u + m_i·n₀ divisible by
  16. It sends x_i, m_i and the carry (u + m_i·n₀)/16 to the left.
* **Cell j.** It adds t_in + x_i·y_j + m_i·n_j + c_in. The low 4 bits are
  digit j−1 of the new partial result, which moves right to cell j−1. The
  upper 5 bits are the carry, which moves left together with x_i and m_i.

Put together, one step computes T ← (T + x_i·Y + m_i·N)/16. Cell j works on
step i in cycle 2i + j. That is the earliest cycle in which both inputs exist:
the carry from cell j−1 in the same step, and digit j of the previous partial
result from cell j+1.

The multiplication takes l+1 steps, so R = 16^(l+1) = 2^(n+4). The last step
leaves cell l+2 in cycle 3l+2.

Cells above l+2 see only zero digits and stay at zero. So the same array
multiplies any operand length up to N_MAX, selected at run time by `len`.

**Timing.** The source design gives 3n/4 + 7 cycles per multiplication.
`done` pulses exactly 3·len + 7 cycles after `start`. The array itself is
finished 4 cycles earlier; the fixed count keeps the latency equal to the
documented one. The result `t` stays valid until the next `start`.

**Ranges.** The modulus must be odd and below 2^(4·len). For the product
guarantee (T < 2N), the inputs must be below 4N. Inputs up to 2^(4·len+4) still
produce a result congruent to X·Y·R⁻¹; only the < 2N bound is lost. The point
schedules use this for a few intermediate values of up to 10p.

## MMM/E unit (`mmme`)

The unit copies its operands from the shared memory into its own registers,
one word per cycle, in the order m, a, b, c. It then runs one of two commands:

* `MOP_MUL`: d = Mont(a, b).
* `MOP_EXP`: d = a^b mod m. Word c must hold R² mod m, precomputed by the host
  for the current `len`. The steps are:
  1. xm = Mont(a, R²) and acc = Mont(R², 1) = R mod m;
  2. for each exponent bit from bit EBITS−1 down to 0: acc = Mont(acc, acc);
     if the bit is 1, also acc = Mont(acc, xm);
  3. d = Mont(acc, 1), which is at most m (and is m only for a ≡ 0).

A squaring and a multiplication run on the same array in the same time. A
command takes 5 + K·(3·len + 8) cycles, where K is the number of Montgomery
multiplications: 1 for MUL, or 3 + EBITS + (number of one bits) for EXP.

At 53 MHz, RSA-1024 averages 1539 multiplications of 776 cycles: 22.5 ms. The
source reports 22.8 ms for its one-multiplier design.

## LNCP (`lncp`)

| op | result | used for |
|---|---|---|
| `LOP_ADD` | a + b | λ₇, λ₈, 2X₃, λ₁ |
| `LOP_SUB` | a + k·m − b, k = 0…15 | a − b with k = 2 (both inputs < 2p), s + p − t with k = 1, larger k where an input may reach 4p or more |
| `LOP_HALF` | (a + (a odd ? m : 0)) / 2 | the /2 in Y₃ of point addition |

None of these operations branches on the data. The host picks k so that the
result cannot go negative. Each command takes 5 cycles: three reads, compute,
write.

## Host interface (`pk_bus_if`)

The bus is synchronous with 32-bit data. A write happens in the cycle `bus_we`
is high. Read data appears on `bus_rdata` one cycle after `bus_re`.

| address | register |
|---|---|
| `0x0000` | LEN: operand length in digits (R = 2^(4·LEN+4)) |
| `0x0001` | EBITS: exponent length for `MOP_EXP` |
| `0x0002` | STATUS: bits [NU−1:0] are unit busy flags. Bit 16 is a sticky flag set when a command hit a busy unit and was dropped; writing the register clears it. |
| `0x0004 + u` | command for unit u (0 = LNCP, 1 = MMM/E 1, 2 = MMM/E 2) |
| `0x8000 \| word<<8 \| chunk` | 32-bit chunk of an operand word; chunk 0 is least significant (129 chunks per word at N_MAX = 4096) |

A command word is `cmd_t` from `rsa_ecc_pkg`, least significant bits first:

| bits | field |
|---|---|
| [1:0] | op |
| [5:2] | a |
| [9:6] | b |
| [13:10] | c |
| [17:14] | m (modulus word) |
| [21:18] | d (destination) |
| [25:22] | k |

Units sample LEN and EBITS when they accept a command.

If the bus and a unit, or two units, write the same memory word in one cycle,
the bus wins, then the lowest-numbered unit. A correct schedule never does
this.

## Elliptic-curve point operations

Points are in Jacobian projective coordinates. Every coordinate is held in
Montgomery form (value·R mod p).

**Point addition** (X₃, Y₃, Z₃) = P + Q is issued row by row. Each row's
operations run in parallel, and the host waits for all units to go idle
before the next row:

| MMM/E 1 | MMM/E 2 | LNCP |
|---|---|---|
| Z₂² | Z₁² | |
| λ₁ = X₁Z₂² | λ₂ = X₂Z₁² | |
| Z₂³ | Z₁³ | λ₃ = λ₁ + 2p − λ₂ |
| | | λ₇ = λ₁ + λ₂ |
| λ₄ = Y₁Z₂³ | λ₅ = Y₂Z₁³ | |
| | λ₃² | λ₆ = λ₄ + 2p − λ₅ |
| | | λ₈ = λ₄ + λ₅ |
| λ₆² | λ₇λ₃² | |
| λ₃³ | Z₁Z₂ | X₃ = λ₆² + 2p − λ₇λ₃² |
| | | 2X₃, then λ₉ = λ₇λ₃² + 8p − 2X₃ |
| λ₈λ₃³ | λ₉λ₆ | |
| Z₃ = Z₁Z₂λ₃ | | Y₃ = HALF(λ₉λ₆ + 2p − λ₈λ₃³) |

The addition uses 15 of the 16 memory words.

**Point doubling** follows the same pattern: λ₁ = 3X₁² + aZ₁⁴, Z₃ = 2Y₁Z₁,
λ₂ = 4X₁Y₁², X₃ = λ₁² − 2λ₂, λ₃ = 8Y₁⁴, Y₃ = λ₁(λ₂ − X₃) − λ₃. The constant
factors 3, 4, 8 and 2, and the curve constant a, are applied as Montgomery
multiplications by 3R, 4R, 8R, 2R and aR mod p, held in memory.

Scalar multiplication is a sequence of these operations, driven by the host.

## CRT decryption without a conditional subtraction

Garner's recombination computes M = t + q·((s − t)·q⁻¹ mod p), where
s = C^d mod p and t = C^d mod q. The subtraction s − t mod p normally needs a
data-dependent correction, and that correction leaks through side channels.
Here x = s + p − t is formed instead (LNCP SUB with k = 1). It lies in
(0, 2p) and is fed directly to the multiplier.

The host sequence is:

1. Run both half-size exponentiations in parallel, one per unit.
2. x = s + p − t.
3. h = Mont(Mont(x, q⁻¹·R² mod p), 1) = x·q⁻¹ mod p.
4. In Montgomery form mod N: Mont(h, q·R² mod N) + Mont(t, R² mod N).
5. A final Mont(·, 1) gives M.

## Where this RTL departs from or adds to the source design

* **Carries.** The source's cell equation is written for 1-bit digits, with two
  carry bits C0/C1. With 4-bit digits the carry reaches 29, so one 5-bit carry
  is used.
* **Cell types.** The 1st-digit, regular and leftmost cells are one module.
  The leftmost cells get zero digits.
* **Latency.** The multiplier's 3l+7-cycle latency is fixed by a counter. The
  array needs 3l+4 cycles.
* **LNCP operations.** The general k·m term and HALF are this design's own.
  The source does not say how λ₉ = λ₇λ₃² − 2X₃ or the /2 of Y₃ are formed.
* **Constant factors in doubling.** The source's doubling schedule lists 3X₁²,
  4X₁Y₁², 8Y₁⁴ and 2Y₁Z₁ as single multiplier operations. Here they cost one
  extra multiplication each, by a constant.
* **Two-unit RSA.** The source's RSA times for two multipliers imply
  exponentiation split across both units. That split is not described and not
  built: an exponentiation runs in one unit.
* **Left to the host.** Point multiplication and the point/CRT schedules are
  host software, not hardware sequencers.
* **Own choices.** The memory size (16 words), the bus protocol and address
  map, the command format, the operand load order and the reset style
  (asynchronous, active low; the memory array has no reset) are all choices of
  this implementation.
* **Compact variant.** A small, low-gate-count variant for wireless devices
  is mentioned as possible but not described, and is not part of this RTL.
* **Not modelled.** FPGA timing (19 ns clock) and gate counts.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_MAX` (`rsa_ecc_top`, `mmm`, `mmme`, `lncp`, …) | 4096 | largest modulus in bits; memory words are 4·(N_MAX/4+2) bits |
| `NUM_MMM` (`rsa_ecc_top`) | 2 | number of MMM/E units (1 or 2) |
| `DIGIT` (`rsa_ecc_pkg`) | 4 | bits per cell digit (α = β); the cell arithmetic widths assume 4 |
| `AW` (`rsa_ecc_pkg`) | 4 | memory address bits (16 words) |

## Simulation

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops, and a watchdog ends a hung run.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl +libext+.sv -Irtl \
    rtl/rsa_ecc_pkg.sv tb/tb_rsa_ecc_top.sv --top-module tb_rsa_ecc_top
./obj_dir/Vtb_rsa_ecc_top
```

| testbench | what it checks |
|---|---|
| `tb_mmm_cell`, `tb_mmm_rightmost_cell` | cell sums, carries and quotient digit against integer formulas |
| `tb_mmm` | random and worst-case multiplications at every length up to 128 bits: congruence, T < 2N, 3l+7 latency |
| `tb_mmme` | MUL and EXP (random exponents) against integer arithmetic, exact cycle counts |
| `tb_lncp`, `tb_pk_memory`, `tb_pk_bus_if` | unit operations, memory ports and priority, register map and dropped commands |
| `tb_rsa_ecc_top` | at N_MAX = 256 through the bus (see below) |
| `tb_rsa_ecc_full` | at the default size: an RSA-4096 exponentiation (e = 65537) beside a 4096-bit multiplication, with the exact 67 765-cycle count checked |
| `tb_rsa_1024_workload` | at the default size: a full RSA-1024 private-key exponentiation (1024-bit exponent) with the exact cycle count; it measures about 1.2 million cycles, 22.6 ms at 53 MHz |

`tb_rsa_ecc_top` runs four operations through the bus:

* a point addition on the NIST P-192 prime, checked against affine
  arithmetic;
* a point doubling of the result, checked the same way;
* a 256-bit RSA exponentiation, with the other unit multiplying at the same
  time;
* a 128-bit CRT decryption.

It also counts that each mechanism occurred: both multipliers busy at once,
multiplier and LNCP busy at once, every opcode, multiply steps inside an
exponentiation, operand-length switches and a dropped command.

The full-size test simulates in about one second after a Verilator build of
about a minute.

## How far to trust it

All testbenches pass. Each was also run against a deliberately broken copy of
its module and reported failures. The references are independent integer
arithmetic:

* products checked by congruence;
* exponentiations by square-and-multiply;
* points by affine formulas with modular inverses.

Verilator lint (-Wall) reports only unused bits of wide intermediate values, package constants a module does not use, and the asynchronous reset appearing in assertion `disable iff` clauses.

Not verified:

* timing closure;
* behaviour when the host breaks the rules (overlapping writes, operands
  outside the stated ranges);
* the RSA-2048/4096 CRT and ECC point multiplication at full length. Only
  their building blocks were run at full length.
