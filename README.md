# Three-phase inverter controller with pulse-position gate drive

A three-phase inverter makes AC from a DC bus by switching six power
transistors with sine-modulated PWM. When the upper transistors are driven
through pulse transformers, a transformer cannot carry a PWM level for a
whole cycle, because its core has to be reset. This design sends only the
*edges* of each switch signal instead: a short impulse charges the MOSFET gate
at turn-on, and an impulse of opposite polarity discharges it at turn-off.
The gate capacitance holds the state in between. Gate drive of this kind is
called pulse position modulation (PPM). With it, duty cycles close to 0 % and
100 % are possible through a transformer.

The PWM itself is produced entirely with digital timing functions: direct
digital synthesis of the sine, scaling by an amplitude word, and down-counter
timers. Frequency, phase and amplitude are each set by a digital word. The
controller works in one of two modes:

* **Peripheral mode.** A host processor writes the registers over SPI.
* **Stand-alone mode.** An external 8-bit ADC sets the amplitude, sampled
  once per output period. The frequency stays at its reset value of 50 Hz.

## Signal chain

```
           SPI ──► spi_regs ──► PIR ─────────┐
                      │ ACR ──┐              ▼
                      │ TCR   │ ┌─► nco (phase accumulator, L = 20)
                      │       │ │      │ top 10 bits           wrap
  ADC ◄─ adc_start ── adc_iface ◄──────┼───────────────────────┘
  ADC ─► data/eoc ─►  y_hold  │        ▼
                     standalone? ─► mod_sequencer (one phase per Ts/4 slot)
                                     phase_shift → sign_logic → sine_rom
                                     → amp_mod: Z = N/2 ± |X|·Y/256
                                     → timer data buffers A, B, C
                                           │ loaded at the sampling edge
                                           ▼
      pwm_timebase ──────────────────► pwm_timer (pulse deletion, down counters)
      (prescaler, N ticks per period)      │ pwm[2:0], center-based
                                           ▼
                                       dead_time ×3 ─► drv_hi / drv_lo
                                           ▼
                                       gate_drive ×6 ─► gd_on / gd_off
```

| module | role |
|---|---|
| `ppm_inverter_ctrl` | top; wires the chain above |
| `spi_regs` | SPI shift register; PIR, ACR and TCR registers |
| `pwm_timebase` | quantization tick prescaler; tick counter for one PWM period; Ts/4 slots |
| `nco` | 20-bit phase accumulator, one addition per PWM period |
| `phase_shift` | adds 0°, 240° or 120° for phases A, B and C |
| `sign_logic` | folds the phase onto a quarter-wave address; gives the sign |
| `sine_rom` | 256 × 7-bit quarter-wave table, computed at elaboration |
| `amp_mod` | serial two-quadrant multiplier and offset adder |
| `mod_sequencer` | time-shares the items above over the three phases; holds the three timer data buffers |
| `pwm_timer` | three down-counter channels that give center-based pulses, with pulse deletion |
| `dead_time` | complementary upper/lower pair for one leg, with dead time |
| `gate_drive` | turn-on and turn-off impulses for one switch |
| `adc_iface` | starts a conversion once per output period; holds the result |
| `ppm_pkg` | shared constants, the TCR struct, the J-step enum and the sine-table function |

## Numbers at the default parameters

| quantity | value |
|---|---|
| phase accumulator L | 20 bits |
| table address P | 8 bits (quarter wave), so 10 phase bits per cycle and 0.35° resolution |
| PWM timer n | 8 bits, N = 256 quantization ticks per PWM period |
| system clock | 26.844 MHz; with prescale 0 this is also the quantization clock Fq |
| PWM / sampling frequency Fs | Fq / 256 = 104.86 kHz |
| output frequency | Fg = Fs · PIR / 2^20; steps of 0.1 Hz; PIR = 500 gives 50.00 Hz (reset value) |
| highest output frequency | Fs / 2 (PIR = 2^19) |
| amplitude | modulation index Y / 256, Y = 0 … 255 |
| dead time, impulse width | J × 4 clocks ≈ J × 150 ns, J = 1, 4, 16, 64 |

`PWM_BITS` may be set from 8 to 12. That gives finer amplitude steps, but at
the same Fs it needs a 2^n times faster quantization clock. The signal-to-noise
ratio of the PWM quantization is about 6n dB, so 48 dB at n = 8.

## One PWM period, tick by tick

This timing is the least obvious part of the design. `pwm_timebase` divides
the clock by `prescale + 1` into quantization ticks and counts 256 of them per
period. The tick that starts a period is the **sampling edge** (`fs_sync` at
the top).

At the sampling edge, three things happen at once:

1. Each `pwm_timer` channel loads the sample K that its timer data buffer
   holds. The sample was computed during the previous period.
2. The `nco` adds the PIR to the accumulator.
3. Slot 0 begins.

The period is divided into four slots of 64 ticks (Ts/4). In slots 0, 1 and 2,
`mod_sequencer` computes the next sample of phases A, B and C:

| clock after slot start | action |
|---|---|
| 0 | select the phase; add its offset (0, +683 or +341 of 1024) |
| 1 | fold to a table address and sign; read the table (registered) |
| 2 | start the multiplier with magnitude, sign and amplitude Y |
| 2 … 9 | shift-and-add: one magnitude bit per clock |
| 10 | write Z into the buffer of that phase |

Slot 3 is idle. Y is captured at the start of slot 0, so all three phases of a
period use the same amplitude. An assertion checks that a slot never starts
while the previous computation is still running. The sequence takes 10 clocks
and needs at most 64. A sample therefore reaches the output one PWM period
after the phase it was computed from.

**Center-based pulses from down counters.** At the sampling edge each channel
computes s = (N − K) / 2 and loads its down counter with s. It then counts
ticks down twice:

1. The delay s, with its output flip-flop low.
2. K ticks, with the flip-flop high.

When the second count reaches zero, the flip-flop is cleared. The pulse lasts
exactly K ticks and is centered in the period to within half a tick. The
output is registered: it changes one clock after the tick that causes the
change. K = 0 gives no pulse, and K = N gives a pulse that lasts the whole
period.

## Sample arithmetic

The ideal pulse width of phase i is

    K = N/2 · (1 + h · sin(2π·i/M + Θ))

where h is the modulation index and M the number of PWM periods per output
period.

**Sine table.** Word a of the table holds

    T[a] = min(127, round(128 · sin(2π · (a + ½) / 1024))),   a = 0 … 255

`ppm_pkg::sine_entry` computes these words at elaboration time with a
fixed-point Taylor series, and the testbench checks all 256 of them against
`$sin`. The half-step offset makes the table exactly symmetric under
mirroring. `sign_logic` reads the table directly in the first and third
quarter of the cycle, and with the address inverted in the second and fourth.
The sign is the top phase bit, set in the second half cycle. The largest
entries are clipped to 127 to fit 7 bits.

**Modulator.** `amp_mod` computes

    Z = N/2 + sign · ((|X| · Y) >> (16 − n))      (for n = 8: Z = 128 ± |X|·Y/256)

It truncates the magnitude product and applies the sign afterwards. The
rounding is therefore toward zero, and both half waves come out the same.
At full amplitude (Y = 255), Z runs from 2 to 254 out of 256.

**Pulse deletion.** In `pwm_timer`, a width K below the deletion time PD
becomes 0, and a width whose low time N − K is below PD becomes N. PD is
J × 4 ticks. This avoids switching losses on useless narrow pulses.

## Registers and SPI

SPI uses mode 0, MSB first, with CS_N active low. SCLK must be slower than
clk/4, because the three SPI signals are synchronised into the clock domain.
A write is one 24-bit word:

```
 23 22 | 21 20 | 19 ............................ 0
 addr  |  00   | data
```

| addr | register | bits | reset |
|---|---|---|---|
| 0 | PIR, phase increment | data[19:0] | 500 (50 Hz) |
| 1 | ACR, amplitude Y | data[7:0] | 0 (0 V output, 50 % duty on all phases) |
| 2 | TCR, timer control | data[13:0] | prescale 0, deletion J=1, impulse J=4, dead time J=1 |
| 3 | none, ignored | | |

The TCR fields (`ppm_pkg::tcr_t`) are:

* `[13:6]` prescale: quantization tick = prescale + 1 clocks
* `[5:4]` pulse deletion J
* `[3:2]` gate impulse width J
* `[1:0]` dead time J

J is coded 0 → 1, 1 → 4, 2 → 16, 3 → 64.

A register changes only when CS_N rises after exactly 24 bits; any other
length is dropped. The accumulator reads the PIR only at sampling edges, so a
new frequency never causes a phase jump. To shift the phase, write a
different increment for one or a few periods and then restore it.

## Stand-alone mode

When `standalone` = 1, the amplitude comes from `adc_iface` instead of the
ACR. The interface works like this:

* Each time the accumulator overflows (the start of an output period, phase A
  at 0°), it pulses `adc_start` for one clock.
* It waits for `adc_eoc` and stores `adc_data` (8 bits, read as 0 … 255).
* It holds that value until the next conversion.

The error voltage is therefore sampled at the same phase in every period, and
ripple on it does not modulate the output within a period. The held value
resets to 0, so the output ramps up from zero after reset. An `adc_eoc`
without a pending request is ignored.

## Dead time and gate impulses

**Dead time.** At every edge of a leg's PWM, `dead_time` turns both switches
off in the clock after the edge. The switch that the PWM asks for turns on
J × 4 clocks later. An edge that comes during the dead time restarts it, so a
pulse shorter than the dead time never reaches the switches. An assertion in
the top checks that `drv_hi & drv_lo` is never set.

**Gate impulses.** `gate_drive` watches one switch signal. Each rising edge
raises `gd_on` and each falling edge raises `gd_off`, for J × 4 clocks
starting one clock after the edge. The two are never high together. The
external transformer driver applies +V while `gd_on` is high and −V while
`gd_off` is high. That resets the core every switching cycle, so the core
cannot saturate. Switch index 2i is the upper transistor of phase i, and
2i + 1 the lower one.

## Where this RTL makes its own choices

These points are design decisions of this implementation. They are filled in
where the source design leaves them open, or read where its description is
ambiguous:

- **Register interface.** The SPI word format, the TCR field layout and the
  reset values are this design's own. The PWM frequency is set by a clock
  prescaler in the TCR.
- **Phase control.** There is no separate phase register. Phase is changed
  through the increment, as described above.
- **Phase bits.** Ten accumulator bits feed the phase shift (2 quadrant bits
  and 8 address bits), as the 256-word quarter table needs. A description of
  "8 MSBs" would not address a full cycle.
- **Table and rounding.** The table uses half-step sampling and clips at 127.
  The modulator rounds toward zero instead of flooring the two's-complement
  product.
- **Table contents.** The table is fixed at elaboration. In the original
  system it was loaded, with the FPGA configuration, from a serial ROM.
- **Center alignment.** Pulses are centered by a delay count in each timer
  channel. A plain "load at the sampling edge, set the flip-flop, clear it at
  zero" scheme would give edge-aligned pulses.
- **Pulse deletion time.** It uses the same J = 1, 4, 16, 64 steps as the
  dead time, counted in quantization ticks. Its range is otherwise
  unspecified.
- **Duty-cycle range.** The achievable range at full amplitude is 0.78 % to
  99.22 % (Z = 2 … 254). Pulse deletion then narrows it further. A range of
  0.5 % to 99.5 % is not reached.
- **Multiplier timing.** The serial multiplier finishes in 7 clocks. A
  multiplication could take the whole Ts/4 slot (64 clocks), but the sequencer
  uses only the slot's start.
- **ADC handshake.** The one-clock start pulse, and the end-of-conversion
  strobe with parallel data, are assumed. Adapt `adc_iface` to the converter
  you use.
- **Outside the RTL.** The ADC, the host, the FPGA configuration memory, the
  pulse transformers and the power stage are not part of this design.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. The
reference values are worked out independently of the RTL, for example the
sine table with `$sin`. In outline:

* **`tb_phase_shift`, `tb_sign_logic`.** Exhaustive over all 1024 phases.
* **`tb_sine_rom`.** All 256 words, plus the one-clock read latency.
* **`tb_amp_mod`.** Corner and random operands, and the exact 7-clock latency.
* **`tb_nco`.** Random increments, the wrap flag, `dphi = 0`, and the
  2097/2098-period wrap spacing at PIR = 500.
* **`tb_pwm_timebase`.** Tick rate for four prescale values, and the
  positions of the sampling edges and slots.
* **`tb_spi_regs`.** All registers, short and long words, the unused address
  and random writes.
* **`tb_mod_sequencer`.** Every buffer write against the full arithmetic, the
  slot in which it happens, and three writes per period.
* **`tb_pwm_timer`.** The output at every tick against the center-based
  reference, with corner samples, all deletion settings and prescale 0 and 2.
* **`tb_dead_time`, `tb_gate_drive`.** Random edges, with cycle-exact
  reference timing for all four J values.
* **`tb_adc_iface`.** Request/answer sequencing with a behavioural ADC.
* **`tb_ppm_inverter_ctrl`.** End to end at the default parameters:
  * SPI configuration, a phase step, and changes of amplitude, dead time,
    impulse width, deletion time and prescaler.
  * Two full 50 Hz output periods in stand-alone mode with an ADC model.
  * For every PWM period and phase, the pulse width and position are
    compared with a reference model that has its own accumulator.
  * The dead-time pair and the gate impulses are checked clock by clock.
  * Each mechanism (SPI write of each register, deletion of short high and
    low pulses, dead time, on/off impulses, prescaled periods, ADC
    conversion, mode switch, output-period wrap) is counted and must occur.
  * The run takes about a second.
* **`tb_ppm_inverter_ctrl_n12`.** The same test on a 12-bit PWM timer.

No FPGA timing closure has been done. The clock rates above are the design
targets.

## Simulating

With Verilator 5, run from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/ppm_pkg.sv tb/tb_ppm_inverter_ctrl.sv \
    --top-module tb_ppm_inverter_ctrl
./obj_dir/Vtb_ppm_inverter_ctrl
```

Replace the testbench name to run any other test. To lint a module, use
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/ppm_pkg.sv rtl/<module>.sv`.
Every module's parameters have defaults, so each one can be the top of a
synthesis run.
