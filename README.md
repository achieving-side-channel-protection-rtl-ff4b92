# PRESENT-80 with a reconfigurable, masked S-layer

A power-analysis attacker learns secrets by relating the power a chip draws
to the values its registers and gates process. This core encrypts with the
PRESENT block cipher (64-bit block, 80-bit key, 31 rounds). It hides those
values by changing the logic function of its S-boxes before every
encryption. It does not exchange whole circuits by partial reconfiguration,
which can take milliseconds. It rewrites only the truth tables of look-up
tables whose contents can be shifted in at run time (the CFGLUT5 element of
Xilinx Virtex-5 / Spartan-6 and later). The wiring stays fixed, and a new set
of tables is in place after 16 shift cycles.

Three countermeasures are built on this. Each can be switched on or off:

| switch      | effect |
|-------------|--------|
| `decomp`    | Each S-box `S` is split into two tables. The first, `R1`, is a fresh random bijection. The second is `R2 = S ∘ R1⁻¹`. A register sits between them, so the only S-box intermediate ever stored is the random-looking `R1(x)`. |
| `mask`      | The state is carried XOR-masked with a random 64-bit `m1`, and the register between the tables with a random `m2`. The masks are folded into the table contents, so no extra mask-correction logic is needed. |
| `precharge` | Before a register takes its real value, it is loaded with fresh random data. The Hamming distance between two consecutive register values then no longer depends on the secret. Masking alone does not give this: `HD(x⊕m, y⊕m) = HW(x⊕y)`. |

All eight combinations work and produce the standard PRESENT ciphertext.

## The masked, decomposed S-box

This is the part that needs the most care. Write the state as
`y = x ⊕ m1`, where `x` is the true state and `m1` the 64-bit mask. Nibble
`s` of `y` goes into S-box `s`. Let `m1_s` be nibble `s` of `m1`, and let
`m2_s` be a 4-bit mask of S-box `s`. The two tables of S-box `s` hold

```
R1'_s(k) = R1_s(k ⊕ m1_s) ⊕ m2_s
R2'_s(k) = S(R1_s⁻¹(k ⊕ m2_s)) ⊕ P⁻¹(m1)_s
```

Chaining them on the masked input gives:

```
mid   = R1'_s(x_s ⊕ m1_s) = R1_s(x_s) ⊕ m2_s          (stored in the mid register)
out_s = R2'_s(mid)        = S(x_s) ⊕ P⁻¹(m1)_s
```

The bit permutation `P` is linear. After it, the state is
`P(S(x)) ⊕ m1`, which is masked with the same `m1` as before the round. The
round-key XOR does not touch the mask either. So `m1` is added once, when
the plaintext enters the state register, and removed once, when the
ciphertext register is written. Every register and table output in between
carries masked data.

Switching a countermeasure off is only a choice of table contents. The
hardware stays the same:

* `mask` off: `m1 = m2 = 0`.
* `decomp` off: `R1` is the identity and `m2_s = m1_s`. `R1'` then passes the
  masked nibble through unchanged, and `R2'` is the whole masked S-box.

## Reconfigurable look-up tables

`cfglut5` is a generic-logic model of the 5-input reconfigurable LUT. Its
32-bit table is a shift register. While `ce` is high, each clock shifts `cdi`
into bit 0, and bit 31 appears on `cdo`. `o6` reads the table with all five
inputs. `o5` reads the lower 16 entries with `i[3:0]`. On a Xilinx device
you would use the vendor primitive instead. Its pins are the same.

`rft` (reconfigurable function table) builds any N-input, M-output function
from these LUTs:

* Each LUT is used as a 4-input table (`i[4] = 0`), so one reload takes 16
  cycles.
* Each output bit has `ceil(2^(N-4))` LUTs.
* A multiplexer tree selects among them with `x[N-1:4]`.

For the 4×4 PRESENT S-box this is four LUTs and no multiplexers. All LUTs of a
table load in parallel, and each has its own `cfg_cdi` bit. Entry 15 goes in
first and entry 0 last. The new function is valid in the cycle after the
last shift.

## Blocks

| file | role |
|------|------|
| `rtl/present_pkg.sv` | S-box, bit permutation and its inverse, widths, `mode_t` struct `{decomp, mask, precharge}` |
| `rtl/cfglut5.sv` | reconfigurable 5-input LUT |
| `rtl/rft.sv` | N×M reconfigurable function table |
| `rtl/slayer.sv` | 16 S-boxes, each made of R1' table, 64-bit mid register (with precharge select) and R2' table |
| `rtl/rft_config.sv` | draws the masks and a random bijection `R1` per S-box, computes every entry of R1' and R2', and shifts them in |
| `rtl/present_keysched.sv` | 80-bit key register and PRESENT-80 key schedule (not masked) |
| `rtl/present_rft_top.sv` | plaintext, state and ciphertext registers, key XOR, S-layer, permutation, control |

### Reconfiguration sequence (`rft_config`)

It runs before every encryption and always takes 33 cycles, in every mode:

| cycles | step |
|--------|------|
| 1 | draw `m1` (64 bits) |
| 1 | draw `m2` (4 bits per S-box) |
| 15 | Fisher–Yates shuffle of the 16 S-boxes' `R1` tables, in parallel. Step `i = 15…1` swaps `R1[i]` and `R1[j]`, with `j = (r·(i+1)) >> 4` and `r` the S-box's 4 random bits. The shuffle runs even when `decomp` is off (its result is then not used), so the sequence has the same length in every mode. |
| 16 | `cfg_ce` high; table entry `k = 15…0` of all 32 tables presented on `cfg_r1_cdi` / `cfg_r2_cdi` |

`R1⁻¹` is never stored. For the entry being shifted, a 16-way compare finds
the index whose `R1` value matches. The index rule `(r·(i+1)) >> 4` is
slightly non-uniform, so not all 16! permutations are equally likely. Use a
wider random index if that matters.

### Round schedule (`present_rft_top`)

Without precharge a round takes 2 cycles:

1. `mid ← R1'(state ⊕ K_r)`
2. `state ← P(R2'(mid))`, and the key schedule steps

With precharge a round takes 4 cycles: `mid ← rnd`, `mid ← R1'(…)`,
`state ← rnd`, `state ← P(R2'(…))`. The value a register gives up has
already been used by then, so precharging needs no extra flip-flops.

Latency from the clock edge that samples `start` to the edge that raises
`done`, with `ciphertext` valid at the same time:

| mode | cycles | breakdown |
|------|--------|-----------|
| without precharge | 98 | 1 capture + 33 reconfiguration + 1 mask-and-load + 31×2 rounds + 1 output |
| with precharge | 160 | same, with 31×4 rounds |

An assertion checks that the tables never change while a round is in
progress.

## Interface of `present_rft_top`

| port | dir | width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin an encryption; accepted when `busy` is low |
| `plaintext` | in | 64 | sampled with `start` |
| `key` | in | 80 | sampled with `start` |
| `mode` | in | 3 | `{decomp, mask, precharge}`, sampled with `start` |
| `rnd` | in | 64 | fresh random bits **every cycle** |
| `busy` | out | 1 | encryption in progress |
| `done` | out | 1 | one-cycle pulse when `ciphertext` is updated |
| `ciphertext` | out | 64 | held until the next `done` |

No random number generator is included. The protection is only as good as
the bits on `rnd`, so connect a true RNG or a properly seeded cryptographic
PRNG there.

## What is given and what is chosen

These parts follow the published countermeasure design:

* the round-based structure with 16 S-boxes;
* S-boxes built from CFGLUT-based function tables of
  `m·ceil(2^(n-4))` LUTs with multiplexer stages;
* the split into a random `R1` and `R2 = S ∘ R1⁻¹` with a register between
  them;
* the masked table formulas above;
* register precharge;
* the eight on/off combinations.

These are this implementation's own choices:

* **Precharge placement.** Both register stages of the round (mid and state)
  are precharged in extra cycles. No separate register stage is added.
* **Table loading.** Every LUT is loaded through its own serial input, so
  all 32 tables change in the same 16 cycles. The LUTs' `cdo` outputs could
  instead chain them into one long serial configuration path; that would be
  slower but need fewer wires.
* **Table computation.** The tables are computed in hardware and reloaded
  before every encryption.
* **Random `R1`.** Drawn by a parallel shuffle, one independent `R1` and `m2`
  per S-box.
* **Switching off.** A countermeasure is switched off by choosing identity
  tables and zero masks.
* **Key.** An 80-bit key, with the standard schedule, not masked.
* **Timing and interface.** The cycle schedule, the handshake, and an
  asynchronous reset of all control and data registers. The LUT tables
  have no reset and power up from their `INIT` value; they are always
  rewritten before use.

PRESENT's S-box, bit permutation and key schedule are the cipher's standard
definitions.

How far it can be trusted:

* **Functional correctness** is checked in simulation in all eight modes.
  This covers the four published PRESENT-80 test vectors plus random
  plaintext/key pairs, each compared with an independent reference model,
  and exact latencies.
* **Side-channel resistance** is a physical property. It depends on placing
  each table in LUTs and on the routing. Simulation cannot show it, and
  nothing here has been measured. In particular, the generic `cfglut5` model
  turns into ordinary multiplexer logic on targets without reconfigurable
  LUTs. That logic can glitch, and glitches are exactly the weakness the LUT
  approach avoids.

## Simulation

Each testbench is self-checking, stops itself with a watchdog, and ends by
printing `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_cfglut5.sv` | table shifting, `o5`/`o6`/`cdo`, hold with `ce` low, 16-cycle reload |
| `tb/tb_rft.sv` | 4×4 and 6×2 tables (the latter through a multiplexer tree) |
| `tb/tb_slayer.sv` | R2'∘R1' through the mid register, hold, precharge |
| `tb/tb_present_keysched.sv` | all 32 round keys against a reference |
| `tb/tb_rft_config.sv` | 33-cycle sequence, bijective R1', `R2'(R1'(x⊕m1)) = S(x)⊕P⁻¹(m1)` for every S-box and entry, mask/identity rules per mode |
| `tb/tb_leakage_ttest.sv` | simulated leakage assessment, see below |
| `tb/tb_present_rft_top.sv` | end to end at full size: 80 encryptions over all modes, latency, masked state load, and counts that reconfiguration, random `R1`, both precharges and masking each occurred |

### Simulated leakage assessment

`tb_leakage_ttest` repeats, in simulation, the kind of test used to judge
such countermeasures: a Welch t-test with a ±4.5 pass threshold. It runs
3000 encryptions of random plaintexts under one key in each mode.

* **Power model.** The "power trace" is the number of bits by which the
  state and mid registers change at each clock edge. It is noise-free and
  covers the edges of rounds 15–17.
* **Grouping.** Traces are split by 144 round-16 properties: each S-box
  output bit, each bit of round input ⊕ round output, and the value of
  S-box 0's output.

Typical result (maximum |t|):

| decomp | mask | precharge | max \|t\| |
|:-:|:-:|:-:|:-:|
| 0 | 0 | 0 | ≈ 9.3 (leaks) |
| 0 | 1 | 0 | ≈ 9.3 (leaks) |
| 1 | 0 | 0 | ≈ 9.2 (leaks) |
| 1 | 1 | 0 | ≈ 9.2 (leaks) |
| any | any | 1 | < 4.5 |

The table shows what each countermeasure does against register transitions:

* **Masking alone does not help.** The Hamming distance between two values
  carrying the same mask is the distance between the unmasked values.
* **Precharging with fresh randomness removes this leakage** in this model.

The model sees only register transitions. It is blind to leakage from the
Hamming weight of values, from combinational logic and from glitches. Against
those, masking and decomposition are what matter, and only a measurement of
real hardware can judge them. The testbench therefore asserts only two
things: the unprotected core leaks, and the modes that combine masking with
precharge do not.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
  rtl/present_pkg.sv tb/tb_present_rft_top.sv --top-module tb_present_rft_top
./obj_dir/Vtb_present_rft_top
```

Replace the testbench name to run another. Each one runs in well under a
second.

## Changing it

* **Another 4-bit S-box cipher.** Change `sbox`, `perm` and `perm_inv` in
  `present_pkg`. The mask identity only needs the linear layer to be a bit
  permutation.
* **Larger function tables.** Set `rft`'s `N`/`M`. `cfg_cdi` grows to
  `M·ceil(2^(N-4))` bits, and reloading still takes 16 cycles.
* **Reconfiguring less often.** For example, once per several encryptions.
  Gate `cfg_start` in the top and keep `m1` stable between reloads. The
  tables stay valid as long as `m1` is unchanged.
