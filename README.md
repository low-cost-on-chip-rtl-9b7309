# On-chip clock jitter measurement with interleaved NOT chains

This design measures, on chip, how long each high phase of a fast clock (3 GHz
class) lasts, with a resolution finer than one inverter delay. The clock under
test, CK, runs down a few delay lines of inverters ("NOT chains"). A row of
transfer-gate samplers freezes every chain tap when the falling edge of CK has
gone one inverter deep. At that moment the taps hold a picture of the high
phase that has just ended: one tap per tau/n of high phase has seen CK high,
where tau is the inverter delay and n the number of chains. After a fixed
polarity correction the picture is a thermometer code, a run of 0s followed by
1s. The number of 0s is the length of the high phase in units of tau/n.
Comparing it with the count for a jitter-free clock gives the period jitter.

At the default design point (65 nm, tau = 12 ps, 3 GHz, two chains of 28
inverters) the resolution is 6 ps. A jitter-free high phase gives 28 zeros. A
high phase widened by 7 ps gives 29 zeros, which reads as +6 ps.

The repository holds two implementations of the same scheme, side by side in
the top level `jitter_meas_top`:

* **Stand-alone** (`jitter_meas`). The scheme has its own inverter chains,
  built from inverters whose delay can be trimmed.
* **Ring-oscillator re-use** (`fub_jitter`). Processors often carry blocks of
  ring oscillators for measuring process variation. Such a block is called a
  functional unit block, or FUB. Here two of its oscillators (or, as a
  parameter, n of them) become the delay lines. A control input JT switches the FUB between process-variation
  measurement (JT = 1) and jitter measurement (JT = 0).

## How one measurement works

Signals: CK is the clock under test. **GR** is CK divided by two. **Rs** is a
short reset pulse. **VM** ("valid measurement") is the sampling signal.
**o_R[1..W]** is the thermometer word, with W = n·N bits.

1. **Reset.** GR rises on every other rising edge of CK. That edge fires a
   pulse Rs, about 20 ps wide. Rs clears the stored `out_s` node in the
   sampler. VM is derived from `out_s`, so VM drops and all transfer gates
   conduct again. Right after the edge every tap still shows the low phase
   that went before, so the low end of o_R reads all 1s.
2. **Snapshot.** CK then falls. One inverter delay later the first tap of
   chain 1, `p_s`, rises. Tap `p_11` lies one inverter further down and still
   shows the high phase for one more inverter delay. The control block raises
   VM exactly while both are 1: `VM = out_s AND out_x`, where `out_x` is the
   sampled `p_11`. The sampling instant is therefore t_s = D_high + tau.
   Sampling one inverter after the edge, not at the chain input, lets a supply
   glitch caused by the edge die away before the picture is taken.
3. **Hold.** Once VM is 1, the transfer gates are open, so `out_s` and
   `out_x` are frozen at 1 and VM keeps itself at 1. The word stays readable
   through the rest of the cycle and the whole next CK cycle, until the next
   Rs. The high phase of that next cycle is not measured.

So one high phase in two is measured. The result is valid from one inverter
delay after the measured falling edge until the rising edge that fires the
next Rs.

Lint reports this `out_s → VM → sampler` loop as circular combinational logic.
That is expected: the loop is the hold mechanism. After synthesis the samplers
appear as 57 latch bits (`meas_sample`).

## Interleaving n chains (the part to read twice)

A single chain samples CK at delays 2tau, 3tau, …, so its resolution is tau.
To get tau/n, n chains run side by side:

* Chain 1 has N+1 inverters of delay tau. The first output is `p_s`, and tap
  `p_1i` lies (i+1)·tau behind CK.
* The first inverter of chain j (j = 2..n) has a delay of (1 + (j−1)/n)·tau.
  All its other inverters have delay tau. Tap `p_ji` lies (i + (j−1)/n)·tau
  behind CK.

The sampler and the output stage see the taps in order of delay:
p_21, p_31, …, p_n1, p_11, p_22, …, p_n2, p_12, and so on. Bit m then looks
(1 + m/n)·tau into the past. Because sampling happens at t_s = D_high + tau,
bit m shows CK as it was at D_high − m·tau/n after the rising edge. The bit
is 0 when CK was high at that time, so the word has floor(n·D_high/tau) zeros.
`jm_pkg::tap_index` performs this ordering.

**Polarity.** Every inverter flips the signal, so each tap is either in phase
with CK or inverted. A chain-1 tap has passed through i+1 inverters, a chain-j
tap through i. The output stage complements the taps that passed through an
even number of inverters (`jm_pkg::tap_in_phase`), so that every o_R bit
equals CK′ at its own sampling time. With one chain this is "complement the
odd taps". With two chains the bits to complement are m mod 4 ∈ {2, 3}, not
the odd ones.

**Evaluation** (`jitter_eval`). The word is XORed with the jitter-free word
(REF_ZEROS zeros, then ones), and the ones are counted. The count is |Δ| in
units of tau/n. Mismatches above position REF_ZEROS mean a wider high phase
(positive jitter); mismatches below it mean a narrower one. The output is
`jitter_fs = ±count·RES_FS`, where RES_FS = tau/n in fs, together with a flag
`thermo_ok` for words that are not clean thermometer codes. Such a word would
come from a chain much longer than the clock period, or from a trim setting
far off nominal.

## Ring-oscillator re-use (`fub_jitter`)

A FUB contains q ring oscillators, `ro_chain`. Each ring is a 2:1 multiplexer
(select JT), an enable NAND driven by a bit r_k from a serially loaded
register (`fub_scan_reg`, ports TCK/TDI/RESET), a chain of inverters, and a
buffer B whose output closes the ring. A multiplexer, a divide-by-N and a
counter (`ppv_counter`) read the frequency of the selected ring.

* **JT = 1.** The rings oscillate. Enable one ring, select it, and count. In
  this model the period is 2·(K + 1)·tau = 2.4 ns for K = 99.
* **JT = 0.** Ring 1 receives CK and ring 2 receives CKd, which is CK delayed
  by tau/2. The NAND of ring 1 gives `p_s`, its inverters give p_11…p_1N. The
  NAND of ring 2 gives p_21, its inverters give p_22…p_2N. That is the same
  tap pattern as two stand-alone chains. Only the first N = 28 of the 99
  stages are sampled; the rest still toggle. The sampler, output stage,
  control block and evaluation are the same modules as in the stand-alone
  scheme. Both enable bits must be 1.
* **More rings.** With `N_CHAINS = n`, ring j receives CK delayed by
  (j−1)·tau/n. Its NAND then gives p_j1 at (1 + (j−1)/n)·tau, which is the
  stand-alone tap pattern again. Four rings give a resolution of 3 ps.

These rings cannot be trimmed. Instead, their delay error can be measured in
JT = 1 mode and used to correct jitter readings. That correction is a task for
software and is not built here.

To get a clean single-edge oscillation, go through reset first (all enables
0, rings settle), then load the enable bits with JT = 1. If a ring is closed
while CK edges are still travelling in it, it runs at a harmonic.

## Modules

| module | kind | what it is |
|---|---|---|
| `jm_pkg` | package | default sizes, tap ordering and polarity, trim table |
| `jitter_meas_top` | behavioural | both implementations on one CK |
| `jitter_meas` | behavioural | stand-alone scheme, `N_TAPS`, `N_CHAINS`, `TAU_PS`, `REF_ZEROS` |
| `not_chain` | behavioural | one delay line of `prog_not` |
| `prog_not` | behavioural | inverter whose delay is set by the code {A,B,C} |
| `meas_sample` | RTL (latches) | transfer-gate samplers, transparent while VM = 0 |
| `output_stage` | RTL | polarity correction into a thermometer code |
| `control_block` | behavioural | `vm_gen` + `gr_divider` + `rs_pulse_gen` |
| `vm_gen` | RTL | VM = out_s·out_x, VM′ = its complement |
| `gr_divider` | RTL | toggle flip-flop, GR = CK/2 |
| `rs_pulse_gen` | behavioural | Rs pulse, as wide as an inverter delay, at each GR rising edge |
| `jitter_eval` | RTL | XOR, population count, signed jitter, bubble flag |
| `fub_jitter` | behavioural | FUB with q rings, n of them (default 2) usable as chains |
| `ro_chain` | behavioural | one ring: JT multiplexer, enable NAND, inverters, buffer |
| `fub_scan_reg` | RTL | enable-bit shift register |
| `ppv_counter` | RTL | ring multiplexer, divide-by-N, counter |

"Behavioural" means the module models analog timing with `#` delays. Such a
module is meant for simulation, not synthesis. All delays are in ps, with
`timescale 1ps/1fs`.

Top-level ports: `sa_*` belong to the stand-alone scheme and `fub_*` to the
FUB. The FUB inputs are `fub_jt`, `fub_tck`, `fub_tdi`, `fub_reset` and
`fub_sel`; the counter output is `fub_count`. Each side brings out its 56-bit
`o_r`, `vm`, `rs`, `gr`, `diff_count`, `widened`, `jitter_fs` and
`thermo_ok`.

## Where this design follows the original scheme, and where it chooses

Taken from the original scheme:

* the chain structure and delays (tau = 12 ps, first inverter of chain 2 at
  18 ps, N = 28)
* the interleaved tap order for two chains
* the sampling condition p_s = p_11 = 1
* transfer-gate sampling released by Rs
* Rs every other cycle, derived from GR = CK/2 through the gate-delay pulse
  generator
* XOR-and-count evaluation
* JT mode switching with CK/CKd into the two re-used rings
* K = 99 and a jitter-free count of 28

Choices made here:

* **Output-stage polarity for n ≥ 2.** The rule is derived from inverter
  counts (see above). Simply complementing the odd bits would not produce a
  thermometer code with two chains.
* **Sampling tap.** VM is built from the sampled p_11 (bit n of the word):
  of the chain-1 taps it is the one that gives the sampling instant
  D_high + tau.
* **Rs target.** Rs clears the `out_s` node. Which node it acts on is not
  specified; only the effect (VM falls) is.
* **Ring length.** Each ring counts the NAND as one of its K inverting stages.
  A NAND plus 99 inverters would not oscillate.
* **Delay settings.** The CKd delay is tau/2. With n re-used rings, ring j
  is delayed by (j−1)·tau/n; only the four-ring resolution is given, not its
  circuit. The NAND and buffer delays are
  tau. The Rs pulse is 20 ps wide.
* **Trim table.** The delays of the trim settings are approximate (15.5,
  13.2, 12.0, 10.8, 10.1 and 9.4 ps). The two codes without a known value,
  000 and 011, reuse the nearest known setting. All inverters of a chain share
  one code.
* **FUB readout.** The register chain, the divide ratio (8), the 16-bit
  counter, TDO and all reset behaviour are this design's own.
* **Evaluation extras.** The sign and the bubble flag of `jitter_eval` are
  additions. Results are reported in fs.

Not modelled:

* supply-noise effects on inverter delay
* sampler setup and hold times
* the transfer gate that balances VM and VM′
* separate dynamic latches in the output stage
* process-variation dependence of the ring period
* measuring the low phase as well as the high phase (the same structure would
  serve)

One physical caveat shows up in the model. Each chain is slightly longer
(336 ps) than a 333 ps clock period. With a short low phase, the last taps can
therefore reach back into the previous high phase. The testbenches use a
180 ps low phase and a 169 ps nominal high phase, which gives the documented
28 and 29 zero counts.

## Simulation

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.
Verilator 5 with `--timing` runs all of them:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/jm_pkg.sv tb/tb_jitter_meas_top.sv --top-module tb_jitter_meas_top
./obj_dir/Vtb_jitter_meas_top
```

* `tb_jitter_meas_top` runs the top at its default parameters. It covers
  jitter-free, widened and narrowed phases, including the 28 and 29 zero
  cases; hold and reset; a trimmed inverter delay; the PPV mode of both rings
  with their 19.2 ns divided period; and switching modes in both directions.
* `tb_jitter_meas` runs 1, 2 and 4 chains (12, 6 and 3 ps resolution) on the
  same clock, at several trim settings.
* `tb_fub_jitter` runs a three-ring FUB in both modes, and next to it a
  four-ring FUB that uses all four rings as chains (3 ps resolution).
* The remaining testbenches each test one module.

The reference in the end-to-end testbenches is independent of the RTL. It
records every CK edge the testbench drives and predicts bit m as the
complement of CK at t_fall − m·tau/n.

To change the design point, set `N_TAPS`, `N_CHAINS`, `TAU_PS` and
`REF_ZEROS` on `jitter_meas`, or `N_CHAINS`, `K`, `Q`, `REF_ZEROS` and `DIV_N` on `fub_jitter`.
REF_ZEROS should be floor(n·D_high/tau) for the nominal clock. N·tau should
be about one clock period.
