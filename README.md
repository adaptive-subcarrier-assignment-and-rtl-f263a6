# DPG engine: hardware for the relaxed OFDM subcarrier and bit allocation problem

A multiuser OFDM base station has to decide, every allocation period, which of
its N subcarriers each of K users gets and how many bits (0..M) each subcarrier
carries. The goal is to meet every user's rate request R_k with the least
transmit power. The exact problem is combinatorial. The first step of an
ordinal-optimisation approach relaxes it into a convex problem: the assignment
ρ_{k,n} becomes a fraction in [0,1], and a small term (σ/2)·ρ² makes the
objective strictly convex. The relaxed problem is then solved for a decreasing
sequence of σ. Whichever (k,n) pairs stay at ρ = 0 for every σ are excluded from
later, software-run search stages.

This RTL is the engine that solves the relaxed problem. It uses the **dual
projected gradient (DPG)** method, which works on two sets of multipliers:

* λ^r_k: one per user, the price of user k's rate constraint;
* λ^p_n: one per subcarrier, the price of its "ρ values add up to 1" rule.

Given the multipliers, the inner problem splits into K·N independent 2×2
problems, each with a closed-form answer. Each answer is then clipped onto the
feasible set. The multipliers move along the gradient of the dual. Every step
uses only multiplies, adds and one logarithm, so the iteration maps onto an
array of simple processing elements (PEs).

## Architecture

There is one **PE array per subcarrier** (`dpg_pe_array`, N copies). The users
are handled in sequence, one user per clock. In each clock, with k given by
the counter CT_k, the arrays and the shared PEs do the following:

| PE | where | does |
|----|-------|------|
| PE1 (`dpg_pe1`) | per array | unconstrained solution of user k on subcarrier n: c* = log2(λ^r·α²/(B ln2)) clamped at 0; ρ̃ = −(λ^p + (f(c*) − λ^r α² c*)/α²)/σ; r̃ = ρ̃·c* |
| PE2 (`dpg_pe2`) | per array | projection of (r̃, ρ̃) onto {0 ≤ ρ ≤ 1, 0 ≤ r ≤ Mρ}, six-way case table |
| PE6 (`dpg_pe6`) | per array | running sum Σ_{l≤k} ρ̂_{l,n} − 1 |
| PE3 (`dpg_pe3`) | per array | λ^p_n += β·(Σ_k ρ̂_{k,n} − 1), written only when k = K |
| PE4 (`dpg_pe4`) | shared | R_k − Σ_n r̂_{k,n} (adder tree over all N arrays) |
| PE5 (`dpg_pe5`) | shared | λ^r_k += β·(that gradient) |
| PE7 (`dpg_pe7`) | shared | σ ← ησ (and 1/σ ← 1/σ / η), written when k = K and t = tmax |

The whole chain PE1 → PE2 → PE4 → PE5 is **combinational within one clock**,
so one clock finishes one user's inner iteration. The critical path therefore
crosses every array, the adder tree and the λ^r update. A run has three nested
loops:

* the inner loop steps over the users: CT_k, 1..K, one per clock;
* the middle loop repeats the sweep tmax times: CT_t;
* the outer loop steps σ down jmax times: CT_j.

A run therefore takes exactly **K·tmax·jmax clocks**. When CT_j finishes,
`dpg_buffer` unloads the result, one user per clock with all N pairs in
parallel.

State is held in three kinds of registers:

* **Type 1** (`dpg_reg_type1`): a word with write enables, for λ^p_n and σ.
* **Type 2** (`dpg_reg_type2`): K banks addressed by k and written every
  clock, for λ^r_k and the per-array (r̂, ρ̂) store.
* **Type 3** (`dpg_reg_type3`): the running ρ sum. It reads −1 in the k = 1
  clock, which starts a new sum without spending a clock.

All registers load at the rising edge. Because a type-2 bank is read and
written at the same k, the λ^r_k used in a sweep is the value written one
sweep earlier.

## Number format and arithmetic

* Every data word is 16-bit signed Q7.8 (range ±128, step 1/256), saturating.
* Products are rounded to nearest.
* Embedded constants (1/ln2, 1/(B ln2), 1/M, 1/(M²+1)) carry 16 fraction bits.
* The power function is f(c) = B(2^c − 1), the MQAM formula. B is a real
  parameter, `B_VAL`, with default 1. This amounts to measuring power in units
  of B. With the physical B ≈ 5.5 (N0 = 1, BER 1e‑4), the multipliers for
  c ≈ 6 would overflow Q7.8.
* log2 (`dpg_log2`) uses a leading-one detector for the integer part. The
  fraction comes from a 256-entry ROM of log2(1+m), which a constant function
  computes at elaboration by repeated squaring.
* R(σ) holds σ and 1/σ side by side, so PE1 multiplies instead of dividing.
* The rate requests R_k are Q7.8 values, so a single R_k cannot exceed
  127.99 bits per symbol.

## Deviations and choices to know about

* **Sign of λ^p in PE1.** The sign follows the first-order condition
  σρ + λ^p + (f − f′c)/α² = 0, so raising λ^p lowers ρ. The alternative
  closed form, with +λ^p in the numerator, makes the gradient ascent diverge.
* **c\* is clamped at 0.** When λ^r α² ≤ B ln2 the user gets no bits on that
  subcarrier, and g = 0. This keeps r̃ ≥ 0, which the projection table assumes.
* **σ runs over jmax values,** σ0 = 1 to σ0·η^(jmax−1). CT_j counts 1..jmax,
  and the run is K·tmax·jmax clocks.
* **Configuration port.** The constants are loaded through `cfg_*` while the
  engine is idle; an assertion checks this. They are α²_{k,n} and 1/α²_{k,n}
  (ALPHA), R_k (RATE), β (BETA), η and 1/η (ETA), and tmax and jmax (LOOPS,
  16-bit unsigned).
* **PE7 has a second multiplier,** for 1/σ. PE1 uses seven multipliers.
* **The buffer is unloaded only after the last σ.** The stage-1 test
  "ρ = 0 for every σ" needs the zero/nonzero pattern of every σ, so a user of
  this RTL has to read the banks after each σ, or add that logic.
* **Step size.** β = 0.5 is the usual quoted value, but it assumes the
  physical B. With B = 1 and the small test cases, β ≥ 1/8 makes the iteration
  oscillate, and a floating-point model of the same algorithm oscillates the
  same way. The tests use β = 1/32. The constant-step iteration stays stable
  only while β is small against σ/(number of users competing for a
  subcarrier). As σ shrinks, a fixed β can start to oscillate.
* Rows 4 and 5 of the projection table need c* > M while ρ̃ < 1. The iteration
  did not produce that in any run tried, so only the PE2 unit test exercises
  those rows.

## What is not here

* The OFDM transmitter and receiver around the engine: adaptive
  (de)modulators, IFFT/FFT, guard interval, bit extraction.
* Ordinal-optimisation stages 1–4: pattern filtering, the stage-2 power
  estimate, the neural-network stage and greedy bit allocation. These are
  software.

## Files

* `rtl/dpg_pkg.sv`: types (`fx_t`, `sigma_t`, `rr_t`, `cfg_sel_t`) and the
  saturating fixed-point helpers.
* `rtl/dpg_top.sv`: the engine. Parameters are K = 32, N = 128, M = 6 and
  B_VAL = 1.0.
* `rtl/dpg_pe_array.sv`, `rtl/dpg_pe1.sv` … `rtl/dpg_pe7.sv`,
  `rtl/dpg_log2.sv`, `rtl/dpg_reg_type{1,2,3}.sv`, `rtl/dpg_counters.sv`,
  `rtl/dpg_buffer.sv`.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_dpg_top.sv`: the end-to-end test. K = 3, N = 4, 4 bits per
  subcarrier on average, tmax = 300, jmax = 4, β = 1/32, η = 0.7. It checks:
  * the run length of K·tmax·jmax clocks;
  * the buffer contents;
  * feasibility of every pair;
  * convergence: Σ_k ρ̂ ≈ 1 and Σ_n r̂ ≈ R_k;
  * agreement with a floating-point model of the algorithm run inside the
    testbench;
  * the final σ;
  * that each mechanism happened: λ^p writes, σ writes, type-3 restarts, the
    c* clamp and projection rows 0–3.
* `tb/tb_dpg_top_full.sv`: the default size (K = 32, N = 128, 512 bits per
  symbol, tmax·jmax = 18000, 576,000 clocks; about 15 s of simulation). At
  this size and β = 1/32 the iteration has not settled: 318 of 4096 pairs are
  off the model and 124 of 160 rate and ρ sums are off target. Those are
  reported; the structural checks must pass.
* `tb/tb_dpg_top_body.svh`: the stimulus and checks the two top-level tests
  share.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/dpg_pkg.sv rtl/*.sv \
  tb/tb_dpg_top.sv --top tb_dpg_top
./obj_dir/Vtb_dpg_top
```

Replace the testbench and top name to run any other test. Each testbench
randomises with `$urandom`, so different seeds
(`+verilator+seed+N`) give different channels.
