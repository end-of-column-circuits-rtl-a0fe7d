# End-of-column TDC for a hybrid pixel detector

A pixel detector needs a timestamp for every hit. Timing circuits are noisy, so
this design keeps the pixels purely analog: each pixel has only an amplifier and a
discriminator. It sends its output pulse as a differential current on a transmission
line to the bottom of its column. All timing and digital logic sit there, in an
**end-of-column (EOC)** block. Each EOC measures two times for every pulse:

- the **leading edge**, which is the hit time;
- the **trailing edge**, so that leading minus trailing gives the pulse width
  (the time over threshold).

Each time is stored at a resolution of one delay-line cell, about 97.66 ps. The
EOC then shifts the stored result off chip serially.

The RTL here models the complete periphery. One delay-locked loop (DLL) and one
dual-phase 32-bit coarse counter both run on the 320 MHz reference clock. They are
shared by 40 EOC blocks, one per column. Each column has 45 pixels, so the chip has
1800. The digital parts are synthesizable SystemVerilog. The DLL and the edge
detectors are analog timing circuits in silicon. They are given here as behavioural
models with `#` delays. The design as a whole is therefore for simulation.

## Pixel addressing: 9 lines × 5 groups

A column's 45 pixels do not each get their own wire. They share **9 data lines**,
and each line serves 5 pixels. The pixels also form **5 groups** of 9, and each
group has one **address line**. When a pixel fires, its data line and its group's
address line pulse together. The EOC gives each data line its own TDC channel, so
there are 9 channels per column. At the leading edge, a channel also stores the
5 address lines. The (channel, address) pair identifies the pixel.

## How a time is measured

This section is the core of the design.

**Fine time, from the DLL.** The DLL chains 32 delay cells. A feedback loop adjusts
them until the whole chain delays the reference clock by exactly one period,
3.125 ns. Tap *k* is then the clock delayed by (*k*+1) × 97.66 ps. The taps
together hold one whole clock period, sampled at 32 points. When a trigger pulse
clocks a 32-bit **fine hit register** whose D inputs are the taps, the register
holds a picture of where the clock edges were at that moment.

Let the hit come *P* cells after a rising reference edge. Because the clock has a
50 % duty cycle, taps *P*−16 … *P*−1 (mod 32) are 1 and the other 16 are 0.
`fine_encoder` finds the 1→0 step between tap *P*−1 and tap *P* and outputs
*P* (0…31). The design names this 32-to-5 encoder and places it beside the hit
registers, so that only 5 lines per register leave the block. The rule that
decodes the code is this implementation's own choice.

**Coarse time, from two counters.** A single 32-bit counter changes on every
rising clock edge, so a hit that comes near an edge could store a count that is
half old and half new. To avoid this, there are two counters:

- `cnt0` counts on the rising edge;
- `cnt1` counts on the falling edge. It equals `cnt0` while the clock is high and
  is one ahead while the clock is low.

A hit stores both counters in a 2 × 32-bit **coarse hit register**. Afterwards,
`coarse_select` uses the fine phase *P* to read only the copy that was far from its
own change:

| fine phase *P* | copy that may have been changing | coarse word |
|---|---|---|
| 0 … 7   | `cnt0` (it changed at *P* = 0)   | `c1` |
| 8 … 23  | `cnt1` (it changes at *P* = 16)  | `c0` |
| 24 … 31 | none, but `cnt1` is already one ahead | `c1 − 1` |

Whatever the phase, the selected coarse word is the number of rising reference
edges since reset. Each edge's time, in units of 97.66 ps, is therefore
`coarse × 32 + P`. Choosing the counter by fine time comes from the original
design. The quarter-period windows and the `−1` correction are choices made here.
They read each copy at least 8 cells (780 ps) away from its transition.

Each counter is built from 4-bit synchronous slices (`counter_block4`). In each
slice, every bit toggles through an XOR that is fed by an AND chain from the enable
input. Each slice's carry-out is formed from its own outputs and its carry-in, a
look-ahead scheme chosen because a ripple-carry 32-bit counter is too slow at
320 MHz. Reset goes through the slice's load path, so it is synchronous.

## Edges into triggers, and blocking

The receiver turns the current pulse back into a CMOS pulse. That analog cell is
not modelled: its output is the `rx` input. The **transition detector**
(`trigger_gen`) follows the receiver. It has two D flip-flops with D tied high:

- one is clocked by the rising edge of `rx`;
- one is clocked by the falling edge (through an inverter).

Each flip-flop resets itself through a delay line, so it produces a short pulse.
These pulses are `HIT_lead` and `HIT_trail`. They arrive 260 ps after the
receiver edge, which is the flip-flop and buffer delay. The pulse width is 1 ns;
that value is assumed, since the original gives no number.

- `HIT_lead` clocks the fine and coarse leading-edge registers and the address
  register.
- `HIT_trail` clocks the trailing-edge registers.

`HIT_trail` then does two more things:

1. It disables the detector's input, so a later hit cannot overwrite data that has
   not been read yet. In silicon this is done by disabling the first buffer
   inverter.
2. It sets the *ready to read* flag.

The channel stays blind until readout clears that flag.

## Readout and the serial word

`tdc_readout` passes the asynchronous ready flag through two synchronizer flip-flops
into the reference clock domain. It then loads the channel's data into a shift
register and sends it out at one bit per clock: first a `1` start bit, then the word
MSB first. After the last bit it raises `clear`, which resets the flag and unblocks
the input. It holds `clear` until it sees the synchronized flag fall. When idle,
the serial line is low. Each channel has its own serial line, and in silicon each
line drives one LVDS transmitter.

Word layout (on-chip coarse selection):

| `USE_ENCODER` | word, MSB → LSB | bits |
|---|---|---|
| 0 (demonstrator) | `addr[4:0], coarse_trail[31:0], coarse_lead[31:0], fine_trail[31:0], fine_lead[31:0]` | 133 |
| 1 (full chip)    | `addr[4:0], coarse_trail[31:0], coarse_lead[31:0], phase_trail[4:0], phase_lead[4:0]` | 79 |

The fine fields hold the raw 32-tap codes in the first layout and the encoded
phases in the second. The start bit, the field order and the clear handshake are
this implementation's choices.

**Timing.** The word starts 2–3 cycles after `HIT_trail`. The last bit leaves
WORD_W+1 cycles after the start bit. The channel unblocks about 3 cycles later.
The dead time after a pulse's trailing edge is therefore about 140 cycles
(≈ 440 ns) raw, or about 86 cycles (≈ 270 ns) encoded. A pulse that arrives during
the dead time is lost.

## The DLL model

`dll` combines the following:

- `bb_phase_detector`: a synthesizable flip-flop that samples the last tap at each
  rising reference edge. If the tap is already high, the line is too short and the
  detector asks for *up* (more delay). Otherwise it asks for *down*. This
  single-flip-flop circuit is an assumption: the original reuses an existing
  bang-bang detector without describing it.
- `vcdl`: a behavioural model of the 32 cells, the charge pump, the capacitor and
  the start-up circuit. Each decision changes the total line delay by 10 ps. That
  figure is the delay jitter reported for the chosen 20 pF capacitor and 1.72 µA
  pump current. The delay-per-volt gain is unknown, so this step stands in for the
  pump and capacitor values. Start-up sets the delay to 2000 ps. That is above half
  a period, so the loop cannot lock onto the wrong edge. Every edge passes through
  each cell as a transport delay.

After reset, the loop locks in about 113 reference cycles (≈ 0.35 µs). It then
dithers between 3120 ps and 3130 ps, which moves any tap by at most 5 ps.

The output buffers (differential and single-ended), the tap buffers in front of
each hit-register bank, the receivers and the LVDS drivers are analog and have no
model here.

## Files and hierarchy

```
eoc_top                 40 columns + shared time base          (rtl/eoc_top.sv)
├─ dll                  DLL                                   behavioural
│  ├─ bb_phase_detector bang-bang detector                    rtl
│  └─ vcdl              delay line, charge pump, start-up     behavioural
├─ coarse_counter       2 × 32-bit, opposite clock edges      rtl
│  └─ sync_counter ×2   32-bit from 8 slices
│     └─ counter_block4 4-bit slice with look-ahead carry
└─ eoc ×N_COLS          one column: 9 channels, 5 address lines
   └─ tdc_channel ×9
      ├─ trigger_gen    edge detector, blocking, ready flag   behavioural
      ├─ hit_register ×5   fine lead/trail (32), coarse lead/trail (64), address (5)
      ├─ fine_encoder ×2   32 → 5
      ├─ coarse_select ×2
      └─ tdc_readout    synchronizer, shift register, clear
```

`eoc_pkg` holds the shared sizes, the word-width function and the readout state
type. `counter_block4`, `sync_counter`, `coarse_counter`, `bb_phase_detector`,
`hit_register`, `fine_encoder`, `coarse_select` and `tdc_readout` are synthesizable.

## Parameters and configurations

| parameter | default | meaning |
|---|---|---|
| `eoc_top.N_COLS` | 40 | columns sharing one DLL and one counter |
| `N_TDC` | 9 | data lines (channels) per column |
| `N_ADDR` | 5 | group-address lines per column |
| `USE_ENCODER` | 1 in `eoc_top`; 0 in `eoc` and `tdc_channel` | send 5-bit phases instead of 32-bit tap codes |
| `N_TAPS`, `CNT_W` | 32, 32 | DLL cells; coarse counter width (a multiple of 4) |
| `trigger_gen.PULSE_PS`, `TRIG_DELAY_PS` | 1000, 260 | trigger pulse width; edge-to-trigger delay |
| `vcdl.STEP_PS`, `INIT_DELAY_PS` | 10, 2000 | line-delay change per correction; start-up delay |

The defaults describe the full 40-column chip with encoders. The single-column
demonstrator, which has no encoders, is `N_COLS = 1, USE_ENCODER = 0`. The
demonstrator's separate DLL-plus-one-TDC test structure is not included.

Timescale is 1 ps / 1 fs in every file. A 32-bit counter at 320 MHz wraps after
2³² × 3.125 ns ≈ 13.4 s.

## Simulating

Each testbench checks its results itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  --top-module tb_eoc_top rtl/eoc_pkg.sv tb/tb_eoc_top.sv
./obj_dir/Vtb_eoc_top
```

`-Wno-fatal` is needed because the delay-line model uses a run-time `#` delay.

| testbench | what it shows |
|---|---|
| `tb_eoc_top_full` | default top (40 columns, encoders): DLL lock, then all 360 channels fire; every word is checked (≈ 2 s) |
| `tb_eoc_top` | 2 columns with raw tap codes, against the real DLL and counters. It counts DLL corrections in both directions, all three coarse windows, a pulse ignored while blocked, and readouts from several columns at once |
| `tb_eoc`, `tb_tdc_channel` | one column / one channel against an ideal time base (`tb_ideal_timebase`): exact taps and counters; raw and encoded words; readout latency; blocking |
| `tb_dll`, `tb_vcdl`, `tb_bb_phase_detector` | lock within 200 cycles, tap delays within 10 ps, step size, detector sense |
| `tb_trigger_gen` | 260 ps delay, 1 ns pulses, blocking, ready/clear |
| `tb_tdc_readout` | framing, bit order, clear handshake |
| `tb_counter_block4`, `tb_sync_counter`, `tb_coarse_counter`, `tb_coarse_select`, `tb_fine_encoder`, `tb_hit_register` | the building blocks against reference models |

The expected values are computed from the absolute times at which the testbench
applies its edges. Hits are placed mid-cell, so a correct design gives exact codes.

## Where this RTL departs from, or goes beyond, the circuit it models

- **Address capture.** The address lines are stored per channel on `HIT_lead`.
  The original names a 5-register address bank but does not say how it is
  triggered. An earlier architecture sketch connects the address bus to every
  channel's output buffer, and this RTL follows that sketch.
- **The earlier sketch's other sizes.** That sketch also shows 11 data lines,
  4 address lines and 6-bit coarse fields. This RTL uses 9, 5 and 32.
- **Coarse selection on chip.** The original leaves selection either on chip or
  off chip. Here it is on chip, so each edge sends one 32-bit coarse word instead
  of two.
- **Shift registers.** Silicon places a shift register beside each hit register.
  Here, one shift register per channel loads all of that channel's registers at
  once. The bits sent off chip are the same.
- **Chosen details.** The following were not specified and are chosen here: the
  readout clock (the reference clock), the framing, the clear handshake,
  asynchronous clearing of the hit registers on reset, and the trigger pulse width.
- **Analog parts.** They are modelled only as far as their timing, or not at all
  (see above). The DLL model does not reproduce jitter or the charge-pump
  dynamics.

Lint notes:

- Verilator reports `SYNCASYNCNET` because `rst` is used both synchronously
  (counters, readout) and asynchronously (hit registers, trigger model). It also
  fires because the readout's `clear` is an asynchronous clear of the
  trailing-edge flag. Both uses are intended.
- `ZERODLY` comes from the run-time cell delay in `vcdl`. That delay is never
  zero.
