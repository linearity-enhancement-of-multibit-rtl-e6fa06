# Pseudo data-weighted averaging for a 31-element delta-sigma feedback DAC

A multibit delta-sigma ADC feeds its quantizer output back through a DAC built from
identical unit elements. The elements are never quite identical, and because the
DAC sits at the modulator's input, its errors appear unshaped at the output.
Data-weighted averaging (DWA) hides that error. It switches on the elements in
strict rotation, so every element is used equally often and the mismatch error is
pushed to high frequencies. Its weakness is tones. When the input code is periodic,
the rotation pointer is periodic too, and the mismatch turns into spurs, some of
which land in the signal band. This hurts most at low oversampling ratios.

**Pseudo DWA** fixes this with one change. Once every `N_INV` clock cycles, the
least significant bit of the code that advances the pointer is inverted. The DAC
still gets the true code. The only effect is that the pointer lands one element
further on (even code: one element is skipped) or one element short (odd code: one
element is used twice in a row). That small jump breaks the periodicity of the
rotation. The cost is one counter and a multiplexer on top of a plain DWA
implementation.

This repository holds synthesizable RTL for the element selection logic of a 5-bit
quantizer / 31-element DAC with `N_INV = 128`. It also holds behavioural models of
the flash quantizer and of the mismatched unit-element DAC around it, so the whole
feedback path can be simulated.

## Structure

```
           vin (real)
             |
     +----------------+    therm[30:0]   +-------------------------------------------+
     | flash_quantizer|----------------->|                 pdwa_dem                  |
     |  (model)       |                  |                                           |
     +----------------+                  |  therm_latch --> d_q ---> log_shifter ---+---> dac_sel[30:0]
                                         |                   |          ^ ptr       |        |
                                         |                   v          |           |   +----------+
                                         |               therm2bin      |           |   | unit_dac |--> dac_out (real)
                                         |                   | y[4:0]   |           |   | (model)  |
                                         |  lsb_inv_timer    | y[4:1]   |           |   +----------+
                                         |      | inv        v          |           |
                                         |      +-> lsb_inv_mux(y[0]) --+           |
                                         |                   |                      |
                                         |            eac_adder(ptr, y') --> ptr_reg
                                         +-------------------------------------------+
```

`pdwa_top` is the top level. It chains `flash_quantizer` -> `pdwa_dem` -> `unit_dac`.
`pdwa_dem` is the synthesizable core and is what you would put on silicon. The table
below describes its submodules.

| module | what it does |
|---|---|
| `therm_latch` | Holds the 31-digit thermometer code for the cycle |
| `therm2bin` | Encodes the code into `y`, 0..31, by counting ones |
| `lsb_inv_timer` | Pulses `inv` for one cycle in every `N_INV` |
| `lsb_inv_mux` | Gives the adder `y[0]` or `~y[0]` |
| `eac_adder` | Computes `ptr + y'` modulo 31 with an end-around carry |
| `ptr_reg` | Holds the index pointer |
| `log_shifter` | Five rotate stages (by 1, 2, 4, 8, 16) that rotate the code by `ptr` |
| `pdwa_pkg` | Shared defaults: `CODE_W = 5`, `M = 31`, `N_INV = 128` |

## What happens in one cycle

Cycle *n* is the clock period after a rising edge. In that cycle:

1. `d_q` holds the thermometer code sampled at the edge. Its level is `y(n)`.
2. The rotator sends thermometer digit *j* to DAC element `(ptr(n) + j) mod 31`. So
   exactly the elements `ptr(n) .. ptr(n)+y(n)-1` (mod 31) are switched on. These
   enables (`dac_sel`) are combinational from `d_q` and `ptr`.
3. The next pointer is computed as
   `ptr(n+1) = (ptr(n) + y'(n)) mod 31`.
   Here `y'(n)` is `y(n)` with bit 0 inverted when `inv` is high, and plain `y(n)`
   otherwise. It is loaded at the next edge.

The code appears on `dac_sel` one cycle after the quantizer output is sampled. The
pointer used with a code is always the one that the previous code produced.

Two cases show the effect of an inversion. The pointer would have landed on *K*.

- **Even `y`:** the inverted LSB adds 1, so the next cycle starts at *K+1*. Element
  *K* is skipped once.
- **Odd `y`:** the inverted LSB subtracts 1, so the next cycle starts at *K-1*.
  Element *K-1*, the last one just used, is used again.

With a constant input *Y*, plain DWA repeats every `31/gcd(Y,31)` cycles. Under Pseudo
DWA, every inversion shifts the pointer by ±1 relative to that repeating pattern.

## Pointer arithmetic modulo 31

This is the least obvious part of the circuit. Because 31 = 2^5 - 1, "add modulo 31"
is a 5-bit add whose carry out is added back in at the LSB (an end-around carry, as
in ones'-complement arithmetic). `eac_adder` does exactly this.

- If `ptr + y' < 32`, the result is `ptr + y'`.
- Otherwise the result is `ptr + y' - 31`.

The result can be `11111` (31). That value means zero modulo 31, and it is stored as
is, without correction. Nothing downstream needs a correction. A rotation of a
31-digit word by 31 places is the identity, so `log_shifter` treats pointer 31
exactly like pointer 0. The adder also accepts 31 as an input.

If you compare the pointer with a reference model, compare `ptr % 31`.

The `wrap` output is the adder's carry out, i.e. the update goes past element 30. It
is only there for observation.

## Inversion timing

`lsb_inv_timer` is a `clog2(N_INV)`-bit counter: 7 bits for the default of 128. It
is cleared by reset and wraps at `N_INV-1`. `inv` is high while the count is
`N_INV-1`. Counting the reset period as cycle 0, the pointer updates made in cycles
127, 255, 383, ... use the inverted LSB.

The circuit this design follows names a "7-bit Johnson counter" for this job. A 7-bit
Johnson (twisted-ring) counter repeats every 14 cycles, not every 128. The 128-cycle
interval is the quantity the scheme depends on, so a binary counter is used here.

Choosing `N_INV`:

- A smaller `N_INV` breaks tones more aggressively. But the elements are then used
  at visibly unequal rates, which raises in-band mismatch noise.
- A larger `N_INV` approaches plain DWA (`N_INV` = infinity is DWA).
- 64 to 128 is the recommended range for this modulator. 128 is the default.

Any `N_INV >= 2` works.

## Clocking and reset

The switched-capacitor modulator this logic belongs to runs on two non-overlapping
phases:

- The quantizer resolves, the code ripples through the rotator and the DAC settles
  during φ1.
- The pointer register is a latch pair, open on φ2 and then on φ1.

This RTL uses a single rising-edge clock whose period is one φ1+φ2 cycle. The
code latch and the pointer's latch pair each become a flip-flop. The
cycle-level behaviour is the same. What the RTL does not capture is the half-period
budget of the real circuit: the code path (five 2:1 mux levels) has to fit in φ1.

`rst_n` is an asynchronous, active-low reset. It clears the code, the pointer
(element 0) and the timer. The reference circuit's description says nothing
about a reset; this one is an addition.

## Behavioural models

These two modules use `real` signals. They exist for simulation and are not meant for
synthesis.

- **`flash_quantizer`:** 31 comparators with thresholds evenly spaced at
  `VREF*(2k-30)/32`. It gives a thermometer code of level 0..31. The output follows
  `vin` at once, and the code latch provides the sampling.
- **`unit_dac`:** element *i* has the value `ULSB*(1+eps_i)`. The `eps_i` are
  Gaussian with standard deviation `SIGMA` (0.5 % by default), drawn once from
  `SEED` and shifted to zero mean. The output is the sum over the enabled elements.
  Set `SIGMA = 0` for an ideal DAC. In `pdwa_top`, `ULSB = 2*VREF/31`.

## Not included

- **Loop filter:** the 3rd-order, discrete-time, feed-forward loop filter that closes
  the modulator loop. The filter is only characterised (one noise-transfer-function
  zero at DC, two at the band edge, opamp gain 150); no coefficients are available.
  `vin` of `pdwa_top` is the point where its output would connect.
- **Decimation filter.**
- **Two-phase clock generator.**

Without the loop filter, the spectral results that motivate the scheme cannot be
reproduced in this RTL. Those results are tone suppression and the SNDR cost (about
1 dB at `N_INV = 128`, 1.8 dB at 64).

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `CODE_W` | 5 | all | Quantizer and pointer width; `M = 2**CODE_W - 1` elements |
| `N_INV` | 128 | `pdwa_dem`, `lsb_inv_timer`, `pdwa_top` | Cycles between LSB inversions |
| `VREF` | 1.0 | `flash_quantizer`, `pdwa_top` | Quantizer full scale ±VREF |
| `SIGMA` | 0.005 | `unit_dac`, `pdwa_top` | Element mismatch, 1σ |
| `SEED` | 1 | `unit_dac`, `pdwa_top` | Mismatch draw |

`CODE_W` can be changed. The end-around-carry adder and the rotator both rely on
`M` being one less than a power of two.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a watchdog.

- **`tb_eac_adder`** and **`tb_log_shifter`** are exhaustive over all 32 pointer
  values, including 31.
- **`tb_therm2bin`** covers all 32 levels plus random codes with bubbles.
- **`tb_lsb_inv_timer`** checks the pulse positions for `N_INV` = 128 and 64.
- **`tb_pdwa_dem`** runs the core against an integer reference model for
  `N_INV` = 128 and 64, with random and constant inputs. Each cycle it checks the
  code, `ptr mod 31`, `inv`, `wrap` and the exact element set. It also checks that
  skips, re-uses and wrap-arounds all occur.
- **`tb_pdwa_top`** runs the whole path at default parameters:
  - First it holds level 1 to learn each element's value from the DAC output.
  - Then it drives a sine of period 2048 samples, then constant levels 8 and 9.
  - Every cycle it checks the code, the pointer, the element set and the DAC output
    (as the sum of the learned element values).
  - During the constant inputs it checks that the pointer after 31 cycles has moved
    by +1 (even level) or -1 (odd level) per intervening inversion, and by 0 when
    there was none. So the DWA period is broken exactly at the inversions.
  - `tb_pdwa_use_rate` applies one code stream to four copies of the core:
  `N_INV` = 4, 64, 128, and 2^30. The last never inverts in the run, so it acts as
  plain DWA. For each copy the testbench tracks how unevenly the elements have been
  used. Over 16384 cycles the largest max-min spread in use counts is 37, 16, 12
  and 1 respectively. This is the trade-off behind the choice of `N_INV`.
- `pdwa_dem` also asserts every cycle that the number of enabled elements equals
    the encoded code.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pdwa_pkg.sv tb/tb_pdwa_top.sv --top-module tb_pdwa_top -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.
