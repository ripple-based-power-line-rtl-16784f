# Data over the ripple of a switching DC-DC converter

A DC bus fed by a switching converter always carries a small ripple at the
converter's switching frequency. This design uses that ripple as a data
carrier. The transmitter moves the master converter's switching frequency
between two values, f0 for a 0 and f1 for a 1. It does this by driving the
converter's external synchronisation pin with a frequency-shift-keyed (B-FSK)
clock. The power stage is not modified. Any device on the bus can recover the
bits: it filters the ripple, squares it up with a comparator, and tells the
two frequencies apart with a small digital correlator that uses only
counters.

The RTL covers the two digital ends of the link:

| module | role |
|---|---|
| `bfsk_modulator` | transmitter: continuous-phase B-FSK clock for the converter's sync pin |
| `fsk_receiver` | receiver: one-bit correlation receiver, one decision per symbol |
| `plc_top` | both ends side by side, with the analog path between them left to the outside |

The operating point is a 50 MHz receiver clock and tones at f0 = 50 MHz/56
(≈ 0.893 MHz) and f1 = 50 MHz/44 (≈ 1.136 MHz). A symbol lasts N = 616 clock
cycles (12.32 µs), which gives 81.2 kbit/s.

## The analog path (not in the RTL)

```
bfsk_modulator.sync_out -> master converter sync pin -> DC bus ripple
   -> AC coupling -> band-pass 0.8-1.2 MHz (4th-order Butterworth) -> gain 10
   -> comparator -> fsk_receiver.r_hat
```

The converter, the wiring and the front end are analog. They appear in
`plc_top` only as the output `sync_out` and the input `r_hat`. `r_hat` is
expected to be roughly a square wave at whatever frequency the master is
switching at, corrupted by noise and by harmonics of other converters on the
bus. It is asynchronous to the receiver clock.

## How the receiver decides

The textbook detector for binary FSK is a correlation receiver. Per tone it
multiplies the input by a cosine and a sine at that tone, integrates each
product over a symbol, and takes sqrt(I² + Q²). The larger of the two
magnitudes wins. `fsk_receiver` replaces every piece of it with one-bit
logic:

| correlation receiver | here | module |
|---|---|---|
| cos / sin at f0, f1 | square waves at 0° and 90° from a divider by 56 / 44 | `quad_gen` |
| multiplier | XOR of `r_hat` with the reference | `corr_counter` |
| integrator over T_s | counter enabled by the XOR, cleared every N cycles | `corr_counter`, `symbol_timer` |
| sqrt(I² + Q²) | \|y_I − N/2\| + \|y_Q − N/2\| | `corr_metric` |
| compare | b = (y1 > y0) | `decision_stage` |

A counter ends its symbol near N/2 when its input and reference are
unrelated. It ends near N when they are in anti-phase (the XOR is almost
always 1), and near 0 when they are in phase. Subtracting N/2 and taking the
magnitude therefore measures correlation in either polarity. Using two
references 90° apart removes most of the dependence on the unknown phase of
the incoming tone.

Two properties make this work with exact integers:

* **Orthogonality.** 616 = 11·56 = 14·44, so a symbol holds a whole number of
  periods of each reference. Over one symbol, a clean f0 square wave is
  uncorrelated with both f1 references, and the reverse also holds. 616 is
  the shortest symbol for which this is true.
* **Phase independence at the nominal tone.** Say the input is the f0
  reference delayed by d cycles, with 0 ≤ d ≤ 14. The in-phase counter
  reads 22·d and the quadrature counter 22·(14 − d). The metric is then
  (308 − 22d) + 22d = 308 = N/2 whatever d is. Off-nominal or noisy inputs
  make the metric depend on phase.

The simulated sweep (`tb_freq_sweep`) shows the resulting selectivity:

| input | y0 (min..max over phase) | y1 (min..max) |
|---|---|---|
| f0 nominal | 308..308 | 0..0 |
| f0 − 2 % / + 2 % | 256..308 / 254..308 | 16..24 / 20..26 |
| f1 nominal | 0..0 | 308..308 |
| f1 − 2 % / + 2 % | 24..34 / 14..26 | 250..304 / 218..306 |

Sidelobes stay below about 80 counts. Between the tones the two metric
ranges overlap only from 1.00 to 1.03 MHz, far from both nominal
frequencies. A transmitter whose clock is a few percent off is therefore
still decoded reliably.

Ten bits hold every count and metric: counts reach at most N = 616, and each
magnitude term at most N/2, so the sum is at most 616.

### Receiver timing

* `r_hat` passes a two-flop synchronizer (`bit_sync`). A level sampled on
  clock edge t is counted on edge t + 2.
* `symbol_timer` is free running. Its first symbol is edges 0 … N−1, where
  edge 0 is the first edge with `rst_n` high. The counters take in the last
  cycle of each symbol and then restart.
* `bit_valid` pulses for one cycle, 2 edges after the last edge of the
  symbol. `bit_out`, `y0` and `y1` hold until the next decision. There is
  one decision every N cycles, with no gaps.
* Nothing in the receiver recovers symbol timing. Symbols begin where reset
  is released, so the system has to release reset in step with the
  transmitter. `tb_plc_top` shows how: release it one channel delay plus two
  cycles after the transmitter's reset. A window that is misaligned by a few
  cycles costs only a few counts.
* The first symbol after reset includes the synchronizer's two reset
  samples, so its metric can be up to 4 counts low.

## The transmitter

`bfsk_modulator` is a phase accumulator that counts modulo `ACC_MOD`. Each
clock it adds `INC0` or `INC1` according to the current bit, and `sync_out`
is high in the lower half of the phase range. The output frequency is
f_clk·INC/ACC_MOD. The defaults (`ACC_MOD` = 2464 = 56·44, `INC0` = 44,
`INC1` = 56) give exactly f_clk/56 and f_clk/44, with every period an exact
number of cycles. Only the increment changes at a symbol boundary, never the
phase, so the frequency changes without a jump or glitch. A converter
synchronised to this clock sees no half-period pulse.

Interface: `sym_start` is high on the first cycle of every N-cycle symbol.
`data_in` is sampled on that cycle and used from that cycle on. Nothing else
is a handshake. The source has to present the next bit while `sym_start` is
high.

For an off-nominal transmitter, change `INC0`/`INC1`. For example,
`INC0` = 45 gives f0 + 2.3 %.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N` | 616 | receiver, modulator, top | clock cycles per symbol |
| `DIV0`, `DIV1` | 56, 44 | receiver, top | reference periods in cycles (f0, f1); multiples of 4, dividing N |
| `W` | 10 | receiver, top | count/metric width; needs N < 2^W |
| `ACC_MOD`, `INC0`, `INC1` | 2464, 44, 56 | modulator | phase range and increments (`plc_top` derives them from `DIV0`/`DIV1`) |

Shared constants are in `plc_pkg`.

## Choices made here

These points are this design's own choices, not part of the scheme:

* The modulator is a digital phase accumulator, with a level input that is
  sampled once per symbol. Any continuous-phase B-FSK source (a lab
  waveform generator, for instance) would serve.
* A two-flop synchronizer sits in front of the receiver.
* Symbol timing starts from reset. No preamble and no timing recovery are
  implemented.
* On equal metrics the decision is 0.
* The counts are held in output registers. The decision is registered.
* All resets are synchronous and active low.
* Which reference leads is arbitrary: Q lags I by a quarter period. The
  metric is symmetric in this, so it does not matter.

Known gaps: there is no framing, no coding and no timing recovery. A slower
setting with 0.9/1.1 MHz tones and 20 ms symbols can be reached by the
modulator (`ACC_MOD` = 500, `INC0` = 9, `INC1` = 11, `N` = 1,000,000). The
receiver cannot reach them exactly, because 50 MHz/0.9 MHz is not an integer
divide.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_symbol_timer` | `sym_end` on every N-th cycle (N = 616 and 7) |
| `tb_quad_gen` | I/Q against an ideal square wave and its quarter-period delay, periods per symbol, duty cycle |
| `tb_corr_counter` | random windows against a reference count; extremes 0 and full |
| `tb_corr_metric` | against integer \|a−308\|+\|b−308\|, also at N = 10 |
| `tb_decision_stage` | comparison, tie rule, one-cycle latency, hold |
| `tb_bfsk_modulator` | 11 or 14 periods per symbol, 50 % duty, every run 22–28 cycles (no glitch at switches), `sym_start` timing, off-nominal increment |
| `tb_fsk_receiver` | exact y0/y1/bit against a model computed from the stimulus, decided bits at 0 and ±1–2 % frequency error, metric = 308 for a clean tone, decision latency |
| `tb_plc_top` | whole link at default parameters, separate clocks 7 ns apart, four channel delays, one run with random glitches; counts and requires both symbols, frequency switches, counts driven toward 0 and toward N, several phases and decisions under noise |
| `tb_freq_sweep` | the metric table above (0.6–1.4 MHz, 16 phases per point), ±2 % margin, overlap region |
| `tb_ber_sweep` | error counts vs. frequency error (±8 %) with a modelled 1.004 MHz interferer (4th harmonic of a ~250 kHz slave converter) and Gaussian noise, at two interference levels |

In `tb_ber_sweep` the interferer and noise amplitudes are illustrative. The
testbench shows the expected shape: no errors around the nominal tones, and
errors rising toward ±8 %. It is not a calibrated bit error rate.
Measuring rates near 1e-5 would take more than 1e5 symbols per point.

### Running with Verilator

Every testbench uses default parameters on the modules it tests, apart from
the small-size variants noted above, and finishes in a few seconds. For
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_plc_top \
    -y rtl +libext+.sv rtl/plc_pkg.sv tb/tb_plc_top.sv
./obj_dir/Vtb_plc_top
```

Substitute another testbench name to run it. The design is plain
synthesizable SystemVerilog with no memories. The receiver synthesises to
about 130 flip-flops.
