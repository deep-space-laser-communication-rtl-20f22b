# Software-defined pulse modulator with picosecond timing

A deep-space optical link sends data as the *position in time* of short laser
pulses. In M-ary pulse position modulation each pulse carries log2(M) bits,
chosen by which of M slots it falls in. The slots are about 100 ps wide, but an
FPGA clock ticks every 5 ns. This design places pulses to 1 ps anyway. It uses
two timers in series:

* a **coarse counter** at 200 MHz picks the 5 ns clock edge;
* two **programmable delay chains** in series add a **fine delay** of
  0–5099 ps after that edge.

The delay chains are FPGA routing, so their steps are uneven and they drift
with temperature, voltage and age. Three parts make them usable for
picosecond work:

* a **calibration table** picks, for every wanted picosecond, the pair of chain
  settings whose summed delay is closest;
* a **delay-locked loop (DLL)** on the same die keeps measuring a third chain
  of the same build;
* an **environmental compensation** stage subtracts the drift the DLL measures
  from every pulse before the table is read.

The result is a modulator defined entirely in logic: M, the slot width and the
guard time are register inputs and can change between symbols. The only
analogue parts are the laser and the reference clock.

## Signal path

```
 serial byte ─► uart_rx ─► sync_fifo ─┐
 parallel byte ───────────────────────┴─► dppm_modulator ─► pulse_encoder ─► env_comp ─► sync_fifo ─► pulse_gen_array (N × pulse_gen ─► chain A ─► chain B, OR) ─► laser_trig
                                          (Gray + M-DPPM,    (interval →      (drift,    (timestamp   (counter,     (fine delay, two chains)
                                           or ivl_assembler   coarse/fine)     table)     FIFO)        launch)
                                           in tv_mode)
                                                                                  ▲
 dll_osc ─► dll_meter (launcher FF ─► DLL chain ─► arbiter FF, counters A/B) ─► dll_feedback ─► word_sync ─┘
 (4–24 ns, 1 ps)                                                                 (period = chain delay)
```

Everything left of the delay chains runs on `clk` (5 ns). The DLL runs on its
own oscillator. Its result crosses into `clk` through `word_sync`.

The two ends of each pulse time are:

* a **time vector** `{coarse, fine}`: the counter value of the launch edge, and
  the picoseconds to add after it;
* a **launch vector** `{coarse, set_b, set_a}`: the same time with the fine
  part already turned into the two chain settings.

Both are structs in `sdpm_pkg`.

## Differential PPM and the Gray code (`dppm_modulator`)

This is *differential* PPM. There is no fixed frame. The guard time `T_g`
starts right after the previous pulse, and the M slots of width τ follow it. So
the modulator does not output a pulse time. It outputs the **interval since the
previous pulse**:

```
interval = T_g + (s + 1)·τ          s = slot index, 0..M-1
```

The mean interval is `T_g + (M+1)τ/2`, so the data rate is
`log2(M) / (T_g + (M+1)τ/2)`.

The slot is the Gray-code inverse of the data word, that is `s ^ (s>>1) = word`.
A pulse detected one slot off then corrupts only one bit.

Bits are taken from the bytes MSB first, and a word may straddle two bytes. M
(`log2m`, 1..8), τ (`tau_ps`) and `T_g` (`tg_ps`) are sampled for each symbol.

Differential PPM trades robustness for rate. If one pulse is lost, the two
intervals on either side of it are lost with it.

### Time-vector mode (`ivl_assembler`)

With `tv_mode` set, the modulator is bypassed. Each group of 4 input bytes is
taken as one interval in ps, least significant byte first, from either
source. This plays out an exact sequence of intervals, for example a timing
test pattern, through the same timing hardware.

## From intervals to clock edges (`pulse_encoder`)

The encoder keeps the absolute time of the last pulse and adds each interval
to it. It first splits the interval by the clock period, `q = ivl / 5000` and
`r = ivl % 5000`. It then adds `r` to the old fine part, with a carry into the
coarse part, so `fine` always stays in 0..4999.

The schedule has to stay ahead of the free-running counter. At the first
symbol, or after a gap in the data, the next time would be too close or
already past. The encoder then restarts the schedule at `now + LEAD_CYCLES`
(16 cycles, 80 ns) with fine 0, and flags that vector `resync`. The receiver
sees this as a new start of the differential chain.

## Fine delay: two chains and the balancing table

This section covers the hardest part of the design.

**One chain** (`delay_chain`) has 512 settings. Its delay is about
6 ns + setting × 12 ps. Routing makes the real steps uneven by tens of
picoseconds, and sometimes non-monotonic. On its own, one chain gives neither
1 ps resolution nor a usable linear law.

**Two chains in series** give 512 × 512 summed delays. Because both chains are
uneven, and uneven in different ways, these sums fall densely and irregularly
on the picosecond axis. The fine range needs at least 5 ns of variation, and
one chain's ~6 ns barely covers that. For every target `f` from 0 to 5099 ps,
calibration picks the pair whose sum is closest to `offset + f`. The
`balance_lut` RAM, 5100 entries of `{set_b, set_a}` indexed by `f`, stores
that choice.

Calibration works like this:

1. Measure the delay of every setting of each chain. On hardware this uses
   the DLL: give the DLL chain that setting and read the locked period.
2. Pick an offset. The table is most accurate where pairs are dense. With both
   chains mid-range, pair sums land within ±0.25 ps of every target. The test
   bench uses `offset = 2 × 6000 ps static + 3000 ps`.
3. For each `f`, search all `a` for the `b` that brings `dA[a] + dB[b]` closest
   to `offset + f`, and write the table entry.

Once calibrated, every trigger leaves at:

```
t = (launch clock edge) + offset + f        (±0.25 ps in the model)
```

The constant offset is the same for every pulse. Only the intervals carry
data, so it does no harm.

In the RTL the table is written through the top's `lut_we/lut_addr/lut_wdata`
port. Computing it is left to software. In the test bench a SystemVerilog
function does it.

**The chain model** is a behavioural model, because a chain's only function is
its routed delay. Its delay is:

```
delay(set) = STATIC_PS + set·LSB_FS/1000 + nl(set) + drift_ps
nl(s)      = NL_PS·(h/504 − 1),   h = (193·s² + 7919·s + 104729·SEED) mod 1009
```

* `nl` is a fixed pseudo-random error of up to ±48 ps, which stands in for the
  measured non-linearity. A different `SEED` gives each chain different steps.
* `drift_ps` is set by a test bench to model the environment.
* Every edge is delayed, so the model behaves as a transport delay.

## The DLL: measuring a chain with a clock (`dll_osc`, `dll_meter`, `dll_feedback`)

This section covers the second-hardest part of the design. The chains drift,
so the design measures one on-die, continuously, using only flip-flops and a
tunable clock.

* `dll_osc` is a clock with a period settable from 4 to 24 ns in 1 ps steps.
  On hardware it is made of two PLLs; here it is a behavioural model.
* In `dll_meter`, a **launcher** flip-flop toggles on each oscillator edge and
  drives the DLL's delay chain.
* An **arbiter** flip-flop samples the chain output on the next edge.
  * If the chain is faster than one period, the arbiter sees the value just
    launched. That sample is a "one".
  * If the chain is slower, the arbiter sees the older value.
* Counter A counts samples and counter B counts ones, over windows of 1024
  samples. Across the 50 % point, B/A goes from 0 to 1. The 50 % point is
  where **period = chain delay**.
* `dll_feedback` closes the loop:
  1. A **binary search** over 4–24 ns takes 15 windows. At each step it tests
     whether more than half the samples were ones.
  2. It then **tracks** with ±1 ps per window. Once locked, the period *is*
     the chain delay in ps, and it follows drift.
  3. If tracking runs into either end of the range, the search starts again.

**Harmonics.** The launcher toggles, so a chain two, three, … periods long also
makes the arbiter see the "right" value for some periods. With a delay D, a
period between D/3 and D/2 gives ones again, as does one between D/5 and D/4,
and so on. The loop could then lock at period = D/n. The search avoids this:

* its upper bound always stays above D, and its lower bound never drops below
  4 ns;
* so every period it tests is more than D/2;
* above D/2 the ones/zeros answer is monotonic, so the search converges on
  period = D, the fundamental.

This holds while D itself lies in 4–24 ns. If you change the ranges, check the
argument again.

Calibration software may instead lock on purpose to harmonics, for example
to measure a delay longer than 24 ns. `harmonic_finder` gives the order of
such a lock from the periods of two neighbouring locks. With `T_n = D/n` and
`T_(n+1) = D/(n+1)`:

```
n = T_(n+1) / (T_n − T_(n+1))        D = n · T_n
```

The periods are whole picoseconds, so the quotient is rounded, which is exact
for small n. A serial divider takes 18 cycles. The block sits at the top's
`hf_*` ports. A lock on harmonic n divides the resolution by n, which is why
`D = n·T_n` is coarser than a fundamental lock.

**Crossing clocks.** The 17-bit result `{locked, period}` reaches `clk` through
`word_sync`. The word is held in the oscillator domain, a toggle flags it,
and the flag is brought over by two synchroniser flip-flops and an edge detector. The oscillator domain's reset
is asserted asynchronously and released on the oscillator clock.

At the default sizes the DLL locks in about 150 µs of simulated time.

## Environmental compensation (`env_comp`)

At calibration the DLL read `dll_ref_ps`. If it now reads `dll_period_ps`,
each chain is taken to have slowed by `d = dll_period_ps − dll_ref_ps`. Each
pulse goes through two chains, so it would arrive `2d` late. With `comp_en`
set, and only while the DLL is locked, the stage:

* subtracts `CHAINS·d` from the fine part, clamped to ±4999 ps;
* borrows from or carries into the coarse part, so fine stays in 0..4999;
* reads the balancing table to get the two settings.

The stage takes 3 cycles per pulse. This law assumes the data chains drift
like the DLL's chain, because they are the same build on the same die.

## Launching the pulse (`pulse_gen`) and the rate limit

`pulse_gen` owns the free-running 32-bit counter (`now`). All comparisons
against it are wrap-safe.

For each launch vector it:

1. loads `set_a` and `set_b` into the chains;
2. raises `trig` for 2 cycles (10 ns) on the edge where the counter equals
   `coarse`;
3. holds the settings until the pulse has passed through chain A into chain B.

The settings must stay put while a pulse is inside a chain, which limits one
generator to one pulse per 4 cycles: **50 Mpulse/s**. A vector that arrives
with less than two ticks to spare is dropped and counted in `stat_late`.

The 4-tick rule applies to each pair of neighbouring pulses, not only on
average. An 18 ns interval can fall on 3 ticks (for example 0 + 18 ns gives
tick 3, fine 3000 ps), and that pulse is then dropped. `MIN_SPACING = 3`
allows intervals down to 15 ns (66 Mpulse/s). This is safe in the chain model,
which fixes each edge's delay when it enters. On real chains it depends on how
long a pulse needs to clear chain A. `tb_delay_sequence` shows both settings on
a 20/22/18/20/18 ns interval pattern.

A 16-deep timestamp FIFO in front of the generator absorbs bursts. When it
fills, back-pressure stalls the modulator.

### More than one generator (`pulse_gen_array`)

The rate limit belongs to each generator and its chain pair, not to the
design. `pulse_gen_array` puts `N_GEN` generators behind the one timestamp
FIFO. Each generator has its own chain A and chain B, and an OR merges the
chain outputs into `laser_trig`. Launch vectors are dealt round-robin. With
`N_GEN >= 4`, each generator therefore sees at most one pulse per 4 ticks,
even when pulses follow every tick.

All chain pairs share one calibration: one balancing table and one DLL. This
assumes the chains are built alike. In the chain models they are identical.
Pulses closer than the trigger width overlap in the OR and merge.

The top uses `N_GEN = 1`, a single generator. Five generators per modulator
would give 200 Mpulse/s, but only with a faster front end than this one: the
encoder takes 2 cycles per pulse and compensation takes 3.
`tb_pulse_gen_array` runs five generators at 80 Mpulse/s.

## Top level (`sdpm_top`)

| parameter | default | meaning |
|---|---|---|
| `CLKS_PER_BIT` | 1736 | serial bit time (115200 baud at 200 MHz) |
| `MAX_LOG2M` | 8 | largest M = 256 |
| `LEAD_CYCLES` | 16 | restart distance after a data gap |
| `FIFO_DEPTH` | 16 | timestamp and serial FIFOs |
| `LUT_DEPTH` | 5100 | balancing table entries (1 ps each) |
| `MIN_SPACING` | 4 | cycles between launches (50 Mpulse/s) |
| `N_GEN` | 1 | pulse generators (chain pairs) behind the FIFO |
| `PULSE_CYCLES` | 2 | trigger width |
| `DLL_WINDOW` | 1024 | samples per DLL measurement |
| `DLL_MIN_PS`, `DLL_MAX_PS` | 4000, 24000 | oscillator range |
| `LSB_FS`, `STATIC_PS` | 12000, 6000 | chain model: step (fs) and static delay (ps) |

These are the top's ports:

* **Data in:**
  * `uart_rxd`, a serial 8N1 line, LSB first;
  * `byte_data/valid/ready`, a parallel byte stream;
  * `data_sel`, which picks the source (1 = parallel);
  * `tv_mode`, under which the bytes are intervals (4 bytes, LSB first) and
    the modulator is bypassed.
* **Modulation:**
  * `log2m`, the number of bits per symbol;
  * `tau_ps`, the slot width;
  * `tg_ps`, the guard time.
* **Calibration:**
  * `lut_we/lut_addr/lut_wdata` (`wdata = {set_b, set_a}`), the table write
    port;
  * `dll_ref_ps`, the DLL reading taken at calibration;
  * `dll_chain_set`, the setting of the DLL's chain;
  * `comp_en`, which turns compensation on.
* **Status:**
  * `dll_period_ps` and `dll_locked`;
  * `stat_late`, `stat_resync`, `stat_pulses` and `stat_frame_err`, 16-bit
    event counters;
  * `now`, the coarse counter.
* **Harmonic order:**
  * inputs `hf_start`, `hf_t_n_ps` and `hf_t_n1_ps`;
  * outputs `hf_done`, `hf_err`, `hf_order` and `hf_delay_ps`.
* **Output:** `laser_trig`, the fine-timed trigger to the laser driver.

Reset (`rst_n`) is active-low and synchronous to `clk`.

## Synthesizable and behavioural parts

All blocks are synthesizable RTL except `delay_chain` and `dll_osc`:

* `delay_chain` models hand-placed FPGA routing;
* `dll_osc` models a PLL pair.

Both use `real` delays. A port to hardware replaces them with the placed
chain macro and the vendor PLLs. Because the top includes them, the top only
simulates with `--timing`. Verilator reports `ZERODLY` on their computed
delays. The delays are never zero at run time, so the warning is expected.

## Verification

Each block has a self-checking test bench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| test bench | what it checks |
|---|---|
| `tb_uart_rx` | bytes, stop-bit errors, bit timing |
| `tb_sync_fifo` | random push/pop against a queue model, full and empty |
| `tb_dppm_modulator` | M = 2, 4, 8, 16, 32, 256; Gray mapping, intervals, straddling words, back-pressure, one symbol per cycle |
| `tb_pulse_encoder` | coarse/fine accumulation and carries, resync after gaps |
| `tb_env_comp` | drift correction, borrow/carry, clamping, table lookup |
| `tb_pulse_gen` | launch edge, trigger width, 4-cycle spacing, late drop |
| `tb_pulse_gen_array` | five generators at 80 Mpulse/s: every OR edge within 0.01 ps of the chain formula, round-robin order, per-generator spacing |
| `tb_delay_chain` | delay formula, overlapping pulses, drift |
| `tb_dll_osc` | period, clamping, enable |
| `tb_dll_meter` | counts against the chain delay on both sides of the lock point |
| `tb_dll_feedback` | search result, tracking, restart at range ends |
| `tb_word_sync` | words crossing between unrelated clocks |
| `tb_ivl_assembler` | 4-byte intervals with input gaps and output back-pressure |
| `tb_harmonic_finder` | order and delay for n = 1..6 with ±1 ps errors, error flag, latency |
| `tb_sdpm_top` | the whole design at default sizes (below) |
| `tb_delay_sequence` | a 20/22/18/20/18 ns interval pattern through two tops: at defaults the 3-tick pulses are dropped, with `MIN_SPACING = 3` every pulse leaves on its tick |

`tb_sdpm_top` runs the top with every parameter at its default, in these
phases:

1. DLL lock, then harmonic orders 1 to 4 of the locked period.
2. Calibration of a 5100-entry table from copies of the two chain models.
3. M = 4, 8 and 16 with τ = 100 ps, T_g = 20 ns.
4. Chain drift of +30 ps, with compensation.
5. Serial input, then time-vector mode with 40 chosen intervals.
6. An overload phase that fills the FIFO and forces late drops.

Checks:

* every time vector must equal the previous one plus the interval the bench
  computes from the data;
* every trigger edge must land within 0.6 ps of its ideal time (5 ps with
  compensation, since the DLL measures in 1 ps steps).

The bench counts each mechanism, and a mechanism that never happens is a
failure. The mechanisms are DLL lock and tracking, harmonic order, compensation, borrow/carry,
FIFO full, late drop, resync, M switch, both sources and time-vector mode. The bench takes a
few seconds.

Run any bench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/sdpm_pkg.sv tb/tb_sdpm_top.sv --top-module tb_sdpm_top
./obj_dir/Vtb_sdpm_top
```

## Choices made here, and where to be careful

* **The chain model's non-linearity** is synthetic (±48 ps, seeded). Real
  chains need measured tables. The 0.25 ps table accuracy holds for this model
  only.
* **Chain size.** 512 settings of 12 ps give about 6 ns of variable delay.
* **Compensation law:** `fine −= 2·(dll − ref)`. The design assumes all chains
  drift alike.
* **DLL law:** binary search then ±1 ps tracking, with 1024-sample windows.
* **Serial input:** 115200 baud, 8N1, LSB first. Bytes feed the modulator MSB
  first.
* **Restart rule** after data gaps (`LEAD_CYCLES`), and the **late-drop** rule.
* **Trigger width** of 10 ns.

## Not included

* **Error-correction coding, interleaving and framing.** These sit between the
  input and the modulator. No particular code is defined, so data goes
  straight to the modulator.
* **A 200 Mpulse/s front end.** The generator array scales the launch side,
  but the modulator, encoder and compensation stages here handle at most one
  pulse per 3 cycles. The top defaults to one generator, 50 Mpulse/s, which is
  about 150 Mb/s at M = 8 and τ = 100 ps.
* **Stepping the DLL through its harmonics.** The order finder is built, but
  choosing which harmonic locks to measure is left to software.
* **Analogue parts:** the atomic reference clock, the PLL that makes `clk`,
  the laser (seed diode and fiber amplifier) and the receiving photodiode.
  `laser_trig` is the interface to them.
