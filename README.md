# Concurrent modulo-sum testing of an ADC

An analog-to-digital converter inside a mixed-signal system can drift out of
specification while the system is running. This design checks an ADC
*concurrently*: it never stops the converter and never applies an analog test
stimulus of its own. The ADC's ordinary input signal is the stimulus.

The idea is simple. A DAC is set to a known test level `k`. An analog
comparator watches the operational signal, and when that signal passes
through the level it raises **HIT**. At that moment the input voltage is
known to within half an LSB, so a healthy ADC must be putting out a code
close to `k`. The code is added into a modulo-`L` accumulator, the DAC moves
to the next test level, and the process repeats for `m` levels. The
accumulator was preloaded with minus the sum of the ideal codes, so at the
end it holds only the summed *errors*, reduced modulo `L`. That residue is
the **signature**. If it lies outside the band that quantisation and the
permitted transition spread can explain, the ADC is declared faulty.

```
 operational signal ──┬──────────────► ADC under test ──── adc_code ───┐
                      │                                                 ▼
                      └──► analog  ──HIT──► sync ──► controller ──add──► modulo adder ──► signature
                         comparator                     │                  (seeded -Y0)       │
                      ┌──────┘                       advance                                  ▼
                      │                                 ▼                             signature checker
                     DAC ◄──── test_code ──────── test generator                     (m·dhat < R < L−m·dcheck)
```

## Where each part lives

| File | Part |
|---|---|
| `rtl/conc_adc_test_top.sv` | Top level: DAC and comparator models around the digital core |
| `rtl/conc_test_core.sv` | The synthesisable part: everything below except the two analog models |
| `rtl/test_generator.sv` | Test words `first_code + i*step` (mod 2^N), `m` of them, one per HIT |
| `rtl/sync_2ff.sv` | Two-flop synchroniser for the comparator output |
| `rtl/test_controller.sv` | Session FSM: seed, accept HITs with blanking, latch the verdict |
| `rtl/modulo_adder.sv` | Seeded N-bit modulo adder (the compactor) |
| `rtl/signature_checker.sv` | Tolerance-band decision on the residue |
| `rtl/counter_compactor.sv` | Counter of a time-conversion ADC, reused as the compactor |
| `rtl/dac_model.sv`, `rtl/analog_comparator.sv` | Behavioural models (real-valued voltages) |
| `rtl/conc_test_pkg.sv` | Defaults, modulus enum, controller state enum |
| `tb/adc_model.sv` | Behavioural model of the ADC under test, testbench only |

The ADC under test is not part of the RTL. Its code enters the top on
`adc_code` and is assumed to be synchronous to `clk`.

## The signature and its tolerance band

This part takes the most care to understand.

Let the test levels have ideal codes `y0_i` (for DAC word `k` the ideal code
is `k`, because the DAC puts level `k` at the centre of ADC bin `k`). The ADC
actually gives `y_i = y0_i + δ_i`. With `Y = Σ y_i` and `Y0 = Σ y0_i`, the
adder is loaded with `seed = (−Y0) mod L` and adds every `y_i`. It finishes with

    R = (Y − Y0) mod L = (Σ δ_i) mod L.

For a healthy ADC each error lies between `−dcheck` and `+dhat` LSB. So
`Σ δ_i` lies between `−m·dcheck` and `+m·dhat`. Modulo `L`, the negative
sums wrap to the top of the range. The fault-free residues therefore form two
bands, `[0, m·dhat]` and `[L − m·dcheck, L−1]`. The checker flags

    m·dhat < R < L − m·dcheck     →  fault

**Worked 8-bit case.** Take levels 201 to 205 (`m = 5`), 1-LSB tolerances and
`L = 256`. Then `Y0 = 1015` and the seed is `9`. The fault-free bands are
`[0,5]` and `[251,255]`.

- An ADC whose offset has moved by +2 LSB reads about 203, 203, 205, 207, 206.
  That sums to 1024. The residue is `(1024 + 9) mod 256 = 9`, which is inside
  `(5, 251)`: fault.
- A healthy ADC whose codes sum to 1014 gives residue 255: pass.

Three consequences matter in use:

- **Tolerances add up over m.** The band grows with `m`. Once
  `m·(dhat + dcheck) ≥ L − 1` every residue is explainable, and the checker
  can never flag anything. Keep `m` small compared with `L / (dhat + dcheck)`,
  or raise `N`.
- **Modulo-sum compaction does not widen the uncertainty.** Each code enters
  the sum with weight 1. A compactor that multiplies earlier codes by powers
  of `2^N` would multiply the ±1 LSB spread as well. That is why the modulo
  sum is used here rather than a polynomial or arithmetic-residue signature
  analyser.
- **Aliasing.** A faulty stream escapes when its error sum lands in a
  fault-free band. The published estimate for this scheme is about `2^-N`,
  which is 0.0039 for N = 8. `tb/tb_aliasing.sv` feeds 20 000 random
  erroneous 5-code streams through the adder and the checker:
  - about 0.0045 of the streams give exactly the fault-free residue 0, close
    to `2^-N`;
  - about 0.044 of them pass the tolerance check, because that band holds
    `2m+1 = 11` of the 256 residues.

  For random errors, the second figure is the one that applies to this
  checker.

When the test levels sit on the ideal code transitions instead of the bin
centres, a healthy ADC can only read the level's code or one below it. Set
`dhat = 0` and `dcheck = 1` for that case. The fault band then becomes
`0 < R < L − m`.

The seed and the bounds are inputs. The seed is computed outside the design
from the chosen levels: for the built-in generator,
`Y0 = Σ (first_code + i·step) mod 2^N`. The bounds are recomputed from
`m_count`, `dhat` and `dcheck`, and are shown on `lo_bound` and `hi_bound`.

## Choice of modulus

The parameter `MODULUS` selects the modulus:

- **`MOD_2N` (default), L = 2^N.** The carry out of the adder is dropped
  (`sig_wrap` shows it).
- **`MOD_2N_M1`, L = 2^N − 1.** The carry out is added back in the same
  cycle (end-around carry). This modulus is the suggested variant for
  detecting every single error. Here the register can hold all ones, which
  means zero, and the checker treats it that way.

## A test session, cycle by cycle

1. Drive `first_code`, `step`, `m_count`, `seed`, `dhat` and `dcheck`, then
   pulse `start` for one clock. On that clock edge the adder takes the seed,
   the generator takes the first word, and `busy` rises.
2. The comparator's `hit` is asynchronous. It passes through two flip-flops
   before the controller sees it.
3. The controller takes a HIT only when it is not blanking. A taken HIT
   produces one `add` pulse, which puts the current `adc_code` into the adder
   on that clock edge, and one `advance` pulse, which moves the DAC to the
   next level on the same edge. `hits` counts the HITs taken.
4. After every taken HIT, and after `start`, the controller ignores HIT for
   `BLANK` clocks (default 4). This stops it from counting the old level's
   HIT a second time while the new DAC level and the synchroniser settle.
   Each HIT ignored this way pulses `hit_blanked`.
5. The clock edge after the one that takes the `m`-th code sets `done`, with
   `fault` and `signature` valid. They hold until the next `start`. A session
   with `m = 0` goes straight to `done`.

The session can last as long as it takes the operational signal to pass
every test level in the generator's order. With a slow, periodic signal, the
order of the levels sets how many periods that is. For example, ascending
levels need a rising signal. The generator steps by `step` modulo `2^N`, so
`step = 2^N − 1` gives a descending sequence.

## Counter compactor for time-conversion ADCs

Some ADCs first turn the measured value into a time interval and then count
clocks across it. Such an ADC already contains a counter that can serve as
the compactor, and `counter_compactor` is that counter:

- **Normal mode.** Each `conv_start` clears the count. `code` takes the
  result when `gate` falls, and `conv_done` pulses.
- **Test mode.** `session_start` loads the seed, and conversions no longer
  clear the count. After the series, `count` holds
  `(seed + Σ codes) mod 2^N`, the same residue the modulo adder would form.

This counter is a separate mechanism. In the top it sits on its own `tdc_*`
ports, alongside the modulo-adder test.

## Analog parts and the ADC model

- **`dac_model`** is an ideal N-bit DAC: `vout = code·VFS/2^N`. The default
  `VFS` is 8 V. The test needs no better DAC accuracy than half an LSB.
- **`analog_comparator`** raises HIT while `|vsig − vref| ≤ WINDOW_LSB·LSB`.
  The default window is 0.5 LSB, because a tighter match would not narrow the
  codes a healthy ADC may give.
- **`tb/adc_model.sv`** gives `floor(vin/LSB + spread + 0.5) + offset`,
  clipped to the code range. `offset` models the fault. `spread` (below
  0.5 LSB in magnitude) models a healthy ADC whose transitions wander inside
  their allowed half-LSB range.

All three models use `real` ports. They simulate in Verilator but do not
synthesise, which is why the synthesisable logic is grouped in
`conc_test_core`.

## Choices made in this design

The method fixes the data path: generator → DAC → comparator → HIT → adder
and generator, followed by the band check. The following were chosen here:

- the test sequence is an arithmetic progression;
- HIT is synchronised, sampled by level and blanked after use;
- the verdict is latched one clock after the last code;
- the seed and the tolerances are runtime inputs, and the seed is computed
  outside the design;
- the counter compactor loads the seed rather than clearing;
- reset is asynchronous and active low;
- the width of the `m` counter is 16 bits.

The default resolution is 8 bits, from the worked example. The block
diagrams of the method are drawn for 3 bits, and `N` can be set to 3.

Two structures related to this method are **not** included:

- the GF(2^3) polynomial signature analyser, which is prior art for digital
  circuits;
- the arithmetic compactor that divides by `2^(2^N) + 1`. It is rejected
  because it multiplies the code uncertainty.

Test levels taken from frequency deviation of an impedance-measurement
current are a system idea with no logic to build.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=F`.

- `tb_conc_adc_test_top` runs the whole design at its default parameters. A
  triangle-wave operational signal sweeps the full range while sessions run:
  - the worked example with offsets 0, +2 and −3;
  - descending sequences;
  - 40- and 60-level sessions;
  - sessions with random transition spread;
  - random sessions;
  - both modes of the counter compactor.

  For each session it checks the signature against its own sum of the
  recorded codes, the verdict against its own band test, the order of the
  levels, the one-clock `done` latency, and that HITs were taken, HITs were
  blanked, the adder wrapped, faults were found and passes were given.
- `tb_conc_adc_test_top_lp` runs the same sessions end to end with
  `MODULUS = MOD_2N_M1` (L = 255).
- The unit testbenches check the generator sequence and exhaustion, both
  moduli of the adder, every residue of the checker for random `m` and
  tolerances, the controller's blanking rule and latency, and the model
  transfer functions.
- `tb_aliasing` measures the aliasing rates quoted above.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/conc_test_pkg.sv tb/tb_conc_adc_test_top.sv \
    --top-module tb_conc_adc_test_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Each testbench runs in well
under a second.

Lint the synthesisable core with:

```
verilator --lint-only -Wall -Irtl rtl/conc_test_pkg.sv rtl/conc_test_core.sv
```

Lint reports one remaining warning, SYNCASYNCNET. It is deliberate: the
controller's assertions are disabled by the same reset that the flip-flops
use asynchronously.
