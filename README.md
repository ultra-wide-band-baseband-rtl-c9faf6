# Impulse UWB receiver baseband in SystemVerilog

This is the digital back end of a carrier-less impulse ultra-wideband (UWB)
receiver. The transmitter sends one short pulse per *chip*. Each pulse is
multiplied by ±1 by a repeating pseudo-noise (PN) code, and each data bit
spans one full code period (a *symbol*). The analog front end samples the
antenna with a 1-bit quantiser at a very high rate. Once per chip it hands
the baseband a window of 256 one-bit samples.

The pulse sits somewhere unknown inside that window, and the code phase is
also unknown. So the receiver has to do three things:

- Find where the pulse is in the window and which code chip is being
  received (acquisition).
- Follow the pulse as it drifts (tracking).
- Despread each symbol into a data bit (data recovery).

The design does the search in parallel. It computes a matched-filter value
at every sample offset of the window, every chip. It then correlates all
those offsets against several code phases at once. The heavy arithmetic
therefore runs at the chip rate, not at the sampling rate.

## Data path at a glance

```
 s[255:0] ──reg──► pmf ──z[0..127]──┬──► correlation_block ×11 ──► peak_detector ×11 ──► lock_detect ──┐
 (1-bit window)    128 slices       │      (128 PN correlators)      (max, address,            (At, which_b,
                   × 128 taps       │                                 > threshold_s)             Adr)     │
                                    │                                                                     ▼
                                    └──► data_correlator (early / on-time / late) ──► data_recovery ──► main_ctrl
                                                                                      data_out, data_bit   │
 pn_in ──► pn_generator (1024-bit code register) ◄── pn_readout (11 wrap counters) ◄── pn_ph ─────────────┤
 c_in  ──► coef_regs (128 × 5-bit taps)            symbol_strobe (init_c, init_early) ◄── strobe_ph ───────┤
                                                   pmf_decoder (slice enables g) ◄── lock, maxadr ─────────┘
```

Everything runs on one clock whose period is one chip. The sample window is
registered once at the input. All other logic between registers is
combinational.

## Number formats

- **Samples and code chips.** A bit value of 1 means +1 and 0 means −1.
- **Matched-filter taps.** Signed 5-bit values. The filter output is signed
  12 bits.
- **Correlations.** Signed 22 bits. That is enough for 1024 chips of the
  largest filter output.
- **Code length.** `wrap` is the code length minus one. The counters run
  0..wrap, and up to 1024 chips are supported.
- **Window size.** `num_corr` is the number of active window offsets minus
  one. Offsets 0..num_corr are searched.

## Pulse matched filter (`pmf`)

The filter has 128 *slices*. Slice k is a 128-tap FIR filter applied to
window samples k .. k+127:

    z[k] = Σ_i coef[i] · (s[k+i] ? +1 : −1)

So z[k] is how well the programmed pulse shape fits at offset k. With 1-bit
samples, each "multiply" is just a conditional negation of a tap. Each
slice is an adder tree of 128 signed 5-bit terms. Sample 255 of the window
is not used, because 128 slices of 128 taps need only 255 samples.

The slice-enable vector `g` forces a slice's output to zero, which also
silences every correlator that listens to that slice.

**Always-on mode (`al`).** In this mode the front end delivers only one
pulse period of samples per chip, on `s[127:0]`. A register keeps the
previous chip's 128 samples. The filter window becomes
{current 128, previous 128}, so a pulse that straddles a chip boundary is
still caught. The coefficients must be programmed to match that
arrangement.

The taps are loaded serially through `coef_regs`:

- Assert `coef_en` and present one tap per clock on `c_in`.
- Load the last tap first. After 128 clocks, the first value shifted in
  sits in tap 127.

## Search: correlation blocks, peaks and phase stepping

**Correlation blocks.** Each `correlation_block` holds 128 `pn_correlator`s,
one per filter slice. All of them are fed the same code chip.

**Correlator operation.** A correlator adds ±z each chip, with the sign
given by the chip. On `init_c` (the first chip of a symbol) it restarts
from the current product, so no chip is lost. A second *dump* register
takes the adder output on `init_early`, the last chip of the symbol. The
complete symbol correlation is therefore ready on the next symbol's first
clock, while the accumulator is already working on the next symbol. When
the block's `lock` input is high, both registers hold (sleep).

**Code source.** `pn_generator` holds the code in a 1024-bit register
loaded serially through `pn_en`/`pn_in`, last chip first. Each block reads
the register through its own mux. The mux is addressed by a counter in
`pn_readout`:

- At the end of every symbol, counter i loads `pn_ph + i`. A start above
  `wrap` loads 0.
- Otherwise each counter counts 0..wrap and wraps around.

During one symbol, the 11 blocks therefore test 11 consecutive code phases
at all 128 window offsets. This amounts to 1408 hypotheses per symbol.

**Peak detection.** `peak_detector` reduces one block's 128 correlations
with a binary tree of max cells:

- Each cell forwards the larger input. Ties go to the lower slice.
- The select bit of the cell at level *l* becomes bit *l* of the winning
  slice address.
- The maximum is compared (signed, strictly greater) with `threshold_s`.

`lock_detect` ORs the per-block flags into `At`, masking blocks at or above
`num_cb`. It reports the winning block `which_b` and that block's slice
address. If several blocks fire, the lowest index wins.

## Control (`main_ctrl`) — the hard part

The controller has three modes. It acts only on the symbol strobe
`sym_en`, the first chip of a symbol, when the correlators hold the
results of the symbol just finished.

**Acquisition (`ST_ACQ`).**

- *Phase stepping.* On the last chip of each symbol, the readout counters
  load `pn_ph`, and `pn_ph` advances by `num_cb`. It returns to 0 once
  every phase 0..wrap has been covered. The controller remembers which
  phase was tested in the symbol now being evaluated (`ph_done`).
- *No detection.* If that symbol closed a sweep of all phases,
  `sh_win` = +1 for one clock. The front end should then delay its
  sampling window to a fresh position. The symbol already started loses
  its first chip or so to the old window position.
- *Detection.* Block `which_b` matched code phase
  `p = ph_done + which_b`. In that symbol, the chip arriving at the symbol
  start was chip p of the code. The controller therefore moves the symbol
  boundary by `wrap+1−p` chips (mod `wrap+1`) by changing `strobe_ph`, the
  compare value of the free-running chip counter in `symbol_strobe`. From
  then on, symbols start exactly at code chip 0.
- *On lock.* The controller latches the winning slice as `maxadr` and
  enters `ST_WAIT`.
- *Stale first symbol.* The first symbol evaluated after entering
  acquisition is skipped, because its correlations are stale.

**Wait (`ST_WAIT`).** The data correlators need one complete symbol on the
new boundary. After the second strobe the mode becomes `ST_TRACK`.

**Tracking (`ST_TRACK`).** `lock` is high in this mode:

- All correlation blocks sleep, and every readout except number 0 is held
  at 0.
- `pmf_decoder` enables only slices `maxadr` and `maxadr ± spc`. In
  acquisition it enables slices 0..num_corr as a thermometer code.
- `data_correlator` muxes those three slices (clamped at the window edges)
  into three more correlators running on readout 0's code.
- `data_recovery` compares magnitudes and sets three flags:
  - `early` when |early| > |on-time|;
  - `late` when |late| > |on-time|;
  - `at_track` when |on-time| ≥ `threshold_t`.
- The soft output `data_out` is the largest-magnitude of the three, with
  on-time winning ties. `data_bit` is its sign (1 = positive).
- `data_valid` pulses on each symbol strobe in tracking.

Each symbol in tracking, the controller also does the following:

- **Drift filter.** `maxadr` moves one slice later after `n_consec`
  consecutive symbols with only `late` set. It moves one slice earlier
  after `n_consec` symbols with only `early` set. A mixed or quiet symbol
  clears both counts. This keeps noise from dithering the on-time
  position.
- **Guard band.** If `maxadr + guard > num_corr`, the pulse is near the
  late edge of the window. Then `sh_win = +1` (delay the window) and
  `maxadr −= num_sh`. If `maxadr < guard`, then `sh_win = −1` (advance the
  window) and `maxadr += num_sh`. `num_sh` must equal the number of
  samples the front end moves per request.
- **Loss.** If `at_track` drops, the controller returns to acquisition.

`sh_win` is two bits: `01` = +1, `11` = −1, `00` = no shift.

## Top-level interface (`uwb_baseband`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | chip-rate clock |
| `reset` | in | 1 | synchronous, active-high clear of all registers |
| `sfreset` | in | 1 | restarts controller and readout counters only |
| `s` | in | 256 | sample window (bit 1 = +1) |
| `al` | in | 1 | always-on mode |
| `c_in`, `coef_en` | in | 5, 1 | serial tap loading |
| `pn_in`, `pn_en` | in | 1, 1 | serial code loading |
| `wrap` | in | 10 | code length − 1 |
| `num_corr` | in | 7 | active window offsets − 1 |
| `num_cb` | in | 4 | correlation blocks in use (1..11) |
| `spc` | in | 7 | early/late spacing in slices |
| `guard`, `num_sh` | in | 7, 7 | guard band width; window shift size in slices |
| `n_consec` | in | 4 | early/late filter length |
| `threshold_s`, `threshold_t` | in | 22, 22 | acquisition and tracking thresholds |
| `data_out` | out | 22 | soft symbol value |
| `data_bit`, `data_valid` | out | 1, 1 | hard decision and its strobe |
| `sh_win` | out | 2 | window shift request to the front end |
| `lock`, `mode`, `maxadr` | out | 1, 2, 7 | status |

To configure the design:

1. Hold `reset` and load the taps and the code.
2. Release `reset` and `sfreset` with the parameters set.

Parameters `NTAPS`, `NSLICE`, `NB` and `PN_MAX` (defaults 128, 128, 11 and
1024) scale the design. `NS = NTAPS + NSLICE` is the window width.

## Where this departs from, or adds to, the original architecture

The block structure, sizes, widths, port set and control behaviour follow
the original architecture. The following are this implementation's own
choices or omissions:

- **Clocking and reset.** There is a single clock. The 8-to-256 serial-to-
  parallel sample buffer and the sampler belong to the front end and are
  not included; the window enters already parallel. Resets are
  synchronous.
- **Phase stepping.** The phase advances by `num_cb` per symbol (one phase
  per block), not by one.
- **Exact timing rules.** These were derived here and are not given by the
  original description:
  - the strobe-phase formula;
  - the skipped first acquisition symbol;
  - the two-strobe wait;
  - the direction of the `maxadr` correction at a guard shift;
  - issuing the acquisition `sh_win` only when the last symbol of a sweep
    is found empty.
- **Added port.** `n_consec` is a new port. The architecture calls for a
  programmable N but gives no pin.
- **Added outputs.** `data_bit`, `data_valid`, `lock`, `mode` and `maxadr`
  are extra outputs.
- **Omitted.** The original pin list has a 7-bit window-size input
  (`cliff`) and a controller output `Sel_b` whose behaviour is not defined.
  Both are left out. The searched window is set by `num_corr`.
- **Hard decision only.** Data recovery stops at the hard decision. Soft
  sequence decoding (e.g. Viterbi) is not included.
- **Max-cell ties.** The lower slice wins.
- **Filter output overflow.** The 12-bit filter output has one unreachable
  corner: all taps −16 against all −1 samples gives +2048, which wraps.
- **No pipelining.** The matched filter is purely combinational: 128 adder
  trees of 128 terms. A real implementation at a high chip rate would need
  pipeline registers, which would shift the strobe timing.

## Verification

Every module has a self-checking testbench in `tb/`
(`tb_<module>.sv`). Each prints `TB_RESULT checks=N failures=M` and has a
watchdog. Expected values come from independent reference models in the
testbenches, with random stimulus from `$urandom`. Three end-to-end benches
drive the whole receiver with a transmitter/front-end model:

- **Small configuration.** `tb_uwb_baseband` uses 16 taps, 16 slices,
  3 blocks and 11-chip Barker code, about the size of an FPGA prototype of
  this architecture.
- **Default sizes.** `tb_uwb_full` runs the same script with every
  parameter at its default: 128 × 128 filter, 11 blocks and 1024-chip code
  register, used with an 11-chip code.
- **Long code.** `tb_uwb_longcode` keeps the default sizes but uses a
  1023-chip maximal-length code from the recurrence
  a[j] = a[j−3] xor a[j−10]. One acquisition sweep then takes 93 symbols
  of 1023 chips. The thresholds are scaled to the longer integration:
  `threshold_s` = 30000 and `threshold_t` = 11000. The run takes a few hundred
  thousand clocks, roughly half a minute in Verilator.

The script takes the receiver through these stages:

1. Noise only. The search sweeps and shifts the window.
2. A preamble until tracking starts.
3. Random data bits.
4. A pulse drifting late until the guard band fires.
5. A pulse drifting early until the other guard fires.
6. Silence until the receiver drops back to acquisition.

The benches check every recovered bit, the symbol alignment and the
locked slice. Each mechanism must occur at least once:

- the acquisition window shift;
- lock;
- tracking;
- late and early steps;
- guard shifts in both directions;
- loss of track.

Run any testbench with plain Verilator, for example:

    verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/uwb_pkg.sv tb/tb_uwb_full.sv --top-module tb_uwb_full
    ./obj_dir/Vtb_uwb_full

The default-size bench builds and runs in well under a minute.

## Files

| File | Contents |
|---|---|
| `rtl/uwb_pkg.sv` | widths, types, mode enum, `sh_win` codes |
| `rtl/uwb_baseband.sv` | top level |
| `rtl/coef_regs.sv`, `rtl/pmf.sv`, `rtl/pmf_decoder.sv` | matched filter, its taps and slice enables |
| `rtl/pn_correlator.sv`, `rtl/correlation_block.sv` | correlators |
| `rtl/pn_generator.sv`, `rtl/pn_readout.sv` | code register and readout counters |
| `rtl/symbol_strobe.sv` | symbol boundary strobes |
| `rtl/peak_detector.sv`, `rtl/lock_detect.sv` | acquisition decision |
| `rtl/data_correlator.sv`, `rtl/data_recovery.sv` | tracking and data decision |
| `rtl/main_ctrl.sv` | mode controller |
| `tb/` | one testbench per module plus the three end-to-end benches |
