# Reduced-wordlength linear congruential generator

A linear congruential generator (LCG) produces pseudorandom numbers with the
recurrence

    X(k+1) = (a * X(k) + c) mod m

A general hardware LCG with modulus m = 2^N makes every word N bits wide. It
therefore needs an N x N multiplier and a wide adder. Many applications use
a fixed, small multiplier a and increment c. This design keeps the state,
seed and output at N bits but narrows the multiplier input to 3 bits and
the increment input to 2 bits. The multiplier becomes N x 3 and the adder
becomes N + 2, both truncated to N bits. The defaults are N = 8, a 3-bit a
and a 2-bit c. The same RTL is also exercised at N = 16 and N = 31.

The generator delivers one new number per clock.

## Why truncation is exact

With a power-of-two modulus, `mod 2^N` means "keep the low N bits". The
circuit exploits this twice:

* **Multiplier.** The product of an N-bit state and a 3-bit multiplier is
  N+3 bits wide. Only product bits N-1..0 are wired on; the higher bits are
  simply not connected (`lcg_mul_trunc`).
* **Adder.** Adding the 2-bit increment gives an N+1-bit sum. Its carry out,
  bit N, is not connected (`lcg_add_trunc`).

Dropping the higher bits of `a*X` before adding `c` does not change the low
N bits of the result. The hardware sequence is therefore exactly the
mathematical LCG, not an approximation. The only cost of the narrow inputs
is that a and c are limited to 0..7 and 0..3.

The period depends on a and c, as for any LCG. For m = 2^N, full period 2^N
needs c odd and a = 1 mod 4, so a = 1 or a = 5 in this 3-bit range. The
example setting a = 3, c = 1 gives a shorter period.

## Datapath

```
 a_in --[B1: AW bits, CE1]--+
                            v
          +------------> [ x ]  N x AW, low N bits kept
          |                 v
 c_in --[B2: CW bits, CE1]->[ + ]  carry out dropped
          |                 v
          |   seed ----> [mux] <- enable (1 = seed)
          |                 v
          +---------- [B4: N bits, clear = reset]
                            v
                      [B3: N bits, CE2] --> o
```

| Instance | Module             | Role                                        |
|----------|--------------------|---------------------------------------------|
| `u_b1`   | `lcg_en_buffer`    | B1, holds multiplier a (AW bits), CE1       |
| `u_b2`   | `lcg_en_buffer`    | B2, holds increment c (CW bits), CE1        |
| `u_mul`  | `lcg_mul_trunc`    | (a * X) mod 2^N                             |
| `u_add`  | `lcg_add_trunc`    | (p + c) mod 2^N                             |
| `u_mux`  | `lcg_seed_mux`     | seed while `enable`, else next state        |
| `u_b4`   | `lcg_state_buffer` | state X(k); loads every clock, cleared by `reset` |
| `u_b3`   | `lcg_en_buffer`    | output register, CE2                        |
| `u_ctrl` | `lcg_ctrl`         | CE1, CE2 from `enable` and `reset`          |

Shared default widths live in `lcg_pkg` (`N_DEFAULT = 8`, `AW_DEFAULT = 3`,
`CW_DEFAULT = 2`). At the defaults, synthesis gives 21 flip-flops (8 + 8 + 3
+ 2), one 8x3 multiplier, one adder and one 8-bit 2-to-1 multiplexer. The
top level has 24 I/O pins.

## Control protocol

Only two inputs control the generator:

| reset | enable | Effect at each rising edge                                 |
|-------|--------|------------------------------------------------------------|
| 1     | 0      | B4 cleared (at once, asynchronously). B1, B2, B3 hold.     |
| 0     | 1      | B1 <- a_in, B2 <- c_in, B4 <- seed. B3 holds.              |
| 0     | 0      | B4 <- (a*B4 + c) mod 2^N, B3 <- B4. This is the run mode.  |
| 1     | 1      | B4 cleared. No buffer is loaded. Not meant to be used.     |

`lcg_ctrl` implements `ce1 = enable & ~reset` and `ce2 = ~enable & ~reset`.

The timing, as checked by the testbenches:

1. Hold `reset` high for at least one clock, with `enable` low.
2. Drop `reset`. Set `seed`, `a_in` and `c_in` and raise `enable` for at
   least one rising edge. The inputs may change right after the last edge
   with `enable` high.
3. Drop `enable`. After the first rising edge, `o` = seed. After each
   further edge, `o` holds the next number. The output lags the state
   register by one clock because of B3.

Example, with N = 8, seed 7, a = 3, c = 1:
`7, 22, 67, 202, 95, 30, 91, 18, 55, 166, 243, 218, 143, 174, 11, 34, 103, ...`

With N = 31 and the same settings, numbers X11 to X18 are
`1328602, 3985807, 11957422, 35872267, 107616802, 322850407, 968551222, 758170019`.
The last of these is the first to wrap past 2^31.

## Choices not fixed by the architecture

The block structure, the widths and the two truncations are given by the
architecture. The following are this implementation's own decisions:

* **B4 clear.** The clear of the state register is asynchronous and active
  high. The same `reset` also gates the clock enables of B1 to B3
  synchronously. Verilator reports this as SYNCASYNCNET, and it is
  intended.
* **Mux select polarity.** `enable = 1` selects the seed. This follows
  from the protocol: data must be ready before `enable` rises, and numbers
  come out while `enable` is low.
* **Clock-enable equations.** CE1 and CE2 are derived from `enable` and
  `reset` only, but their exact equations are this implementation's choice
  (see above).
* **No reset on B1, B2, B3.** B3 therefore shows an undefined value until
  the first run-mode clock after power-up. That clock happens right after
  `reset` is released, when B3 takes the cleared state 0.
* **Adder width.** The adder takes the already truncated N-bit product,
  so it is N+1 bits wide with its top bit dropped. It does not add c to
  the full N+3-bit product, which would need an 11-bit adder at N = 8.
  Both give the same low N bits.

Not included:

* The equal-wordlength generator that this design improves on. Setting
  `AW = CW = N` gives that structure.
* FPGA-specific timing behaviour, such as clock-to-pad skew and output
  glitches.

## Parameters

| Parameter | Default | Meaning                                       |
|-----------|---------|-----------------------------------------------|
| `N`       | 8       | state, seed and output width; modulus is 2^N  |
| `AW`      | 3       | width of the multiplier input a               |
| `CW`      | 2       | width of the increment input c                |

N = 16 and N = 31 are the other sizes the design is characterised at. The
RTL puts no upper limit on N. The testbench reference models use 64-bit
integers, so they can check N up to 61.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench             | What it checks                                                       |
|-----------------------|----------------------------------------------------------------------|
| `tb_lcg_en_buffer`    | load and hold under a random clock enable                            |
| `tb_lcg_state_buffer` | load every edge; immediate (asynchronous) clear; clear held          |
| `tb_lcg_mul_trunc`    | all 8 x 3-bit operand pairs against (x*a) mod 256                    |
| `tb_lcg_add_trunc`    | all 8 + 2-bit operand pairs against (x+c) mod 256                    |
| `tb_lcg_seed_mux`     | both select values with random data                                  |
| `tb_lcg_ctrl`         | the four rows of the control table                                   |
| `tb_lcg_top`          | whole generator at default size (see below)                          |
| `tb_lcg_workloads`    | N = 16 and N = 31 generators, 5000 numbers each, against a model      |

`tb_lcg_top` runs these steps:

1. Clear the state and start from 0.
2. Run the seed 7 / a = 3 / c = 1 sequence above, then 600 more numbers.
3. Run 40 random settings of seed, a and c, with enable pulses of 1 to 3
   clocks.
4. Reset in the middle of a run and reload.

It checks the following:

* the seed appears exactly one edge after `enable` falls;
* one new number follows every clock;
* `o` holds while `enable` or `reset` is high.

It also counts clears, loads, output holds, product truncations and
dropped adder carries. If any of these never happens, the test fails.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lcg_pkg.sv tb/tb_lcg_top.sv --top-module tb_lcg_top
./obj_dir/Vtb_lcg_top
```

Use the same command with any other testbench name. `-Irtl` lets Verilator
find the modules by file name.

## Files

* `rtl/lcg_pkg.sv`: default widths
* `rtl/lcg_top.sv`: the generator
* `rtl/lcg_en_buffer.sv`, `rtl/lcg_state_buffer.sv`, `rtl/lcg_mul_trunc.sv`,
  `rtl/lcg_add_trunc.sv`, `rtl/lcg_seed_mux.sv`, `rtl/lcg_ctrl.sv`: the
  blocks
* `tb/*.sv`: the testbenches listed above
