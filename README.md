# Digital controller FPGA logic for a precision accelerator magnet power supply

A magnet power supply for an accelerator must hold its current to a few parts
per million, and in a synchrotron it must also follow a programmed current
waveform that may change from one machine cycle to the next. This RTL is the
FPGA logic of a digital controller built for that job. The controller has two
cards joined by a backplane:

* a **control card**, with two soft processors (one runs the regulation loop,
  one handles communication), a high-resolution PWM generator, a ping-pong
  waveform memory, a shared dual-port RAM, fiber links and isolated digital I/O;
* an **ADC card**, which samples the current and voltage feedback in step with
  the PWM and sends one data frame per PWM period to the control card.

Precision comes from three ideas, which take up most of this document:

1. **PWM resolution beyond the clock**: the duty cycle carries a fraction of a
   clock step, and the dropped fraction is carried forward into later periods
   (rounding correction).
2. **PWM-synchronous oversampling**: the current is converted at a fixed high
   rate, and each PWM period's samples are summed. The number of samples is
   set each period from the PWM frequency.
3. **Glitch-free waveform changes**: a new waveform is loaded into an idle bank
   while the old one plays, and it takes over only at the start of the next
   waveform period.

The processors, their memories, the Ethernet controller, the flash chips and
the ADC chips are not part of this RTL. Their connections are ports of the top
module, `digital_controller_top`.

## Timing basis

Everything runs from one 150 MHz clock. One clock, 6.67 ns, is the PWM step.
The PWM period is `period` steps, so its frequency is 150 MHz / `period`:

| PWM frequency | period (steps) | steps per period, log2 |
|---|---|---|
| 1 kHz   | 150000 | 17.2 bit |
| 16 kHz  | 9375   | 13.2 bit |
| 100 kHz | 1500   | 10.55 bit |

The period counter has 18 bits, so 572 Hz is the lowest frequency.

## PWM generator with rounding correction (`pwm_gen`, `rounding_corrector`)

`pwm_gen` counts 0 … `period`-1. A channel is high while its phase-shifted
count, `(count - phase[k]) mod period`, is below the duty. The duty register
is unsigned fixed point, 18 integer bits and 14 fraction bits (units of one
step).

The duty is rounded in `rounding_corrector`. Once per period, at the wrap of
the counter, it outputs the integer part of the duty and adds the fraction to
a 14-bit accumulator. When the accumulator overflows, that period gets one
extra step. For a duty of 375.25 steps the periods come out as
375, 375, 375, 376, and so on. The average is exact, and the error never
exceeds one step. At 100 kHz the hardware step gives about 10.5 bits; the
14-bit fraction resolves the average much more finely.

Period, duty and phases are copied into shadow registers at the wrap, so a
register write takes effect at the next period and never cuts a pulse short.
Switching `enable` off acts at once; switching it on acts at the next period.
The counter keeps running while the outputs are off, because its period start
is also the ADC card's sync. The outputs are registered and lag the count by
one clock.

**Phase shift and multi-controller sync.** There are two PWM channels
(`NCH = 2`), one per chopper leg, each with its own phase offset. Several
controllers can run as a master and slaves. The master's `sync_out` marks each
of its period starts with a pulse `SYNC_W` clocks wide. It is wired to each
slave's `sync_in`. On the rising edge, after a 2-flop synchroniser (3 clocks),
the slave restarts its counter at 0. This keeps the slaves' counters locked to
the master's. Take two slave controllers with two legs each, at offsets 0,
P/4, P/2 and 3P/4. The summed output ripple is then at four times the
switching frequency, for example 64 kHz from 16 kHz PWM.

## Synchronous sampling on the ADC card (`adc_card_ctrl`, `current_oversampler`)

The control card's period-start marker reaches the ADC card on a backplane
line (`pwm_sync`). That line is synchronised, and its rising edge starts a new
PWM period on the ADC card.

* **Voltage:** one conversion of the 4-channel 16-bit voltage ADC per period.
  Two channels, chosen by the `VSEL0` and `VSEL1` parameters, are kept. The
  voltage sample rate therefore equals the PWM frequency.
* **Current:** the 18-bit current ADC is started every `SAMPLE_DIV` clocks
  (1 MS/s by default). The averaging window is one PWM period. Its end, the
  deadline, is the measured length of the previous period minus `MARGIN`
  clocks (4 µs), which are kept free for sending the frame. A conversion is
  started only if its result arrives before the deadline. Each window thus
  holds floor((L - MARGIN) / SAMPLE_DIV) samples, where L is the length of the
  previous period. That is 6 samples at 100 kHz and 996 at 1 kHz.
* At the deadline the frame is sent to the control card. It holds the 32-bit
  current sum, the 16-bit sample count and the two voltages. The processor
  computes the mean, sum / count.

Two consequences of measuring the previous period:

* The first period after reset gives no frame.
* After a step to a much shorter period, the window may not fit into the
  period. That period then gives no frame; the next one is normal again.

**Backplane link** (`adc_link_tx`, `adc_link_rx`). The frame goes over SPI
mode 0, MSB first, with an 80-bit frame (`ctrl_pkg::adc_frame_t`). SCLK is
25 MHz (`SCLK_DIV = 3`), so a frame takes 482 clocks (3.2 µs) and fits inside
the 4 µs margin. The ADC card drives SCLK. The control card samples SCLK,
CS_N and data through synchronisers with its own 150 MHz clock, so SCLK must
not exceed clk/4. A frame with the wrong bit count is dropped and flagged.
The four backplane lines are SCLK, CS_N, data and the PWM sync.

## Ping-pong waveform playback (`waveform_ctrl`)

Two banks of `2^WAVE_AW` = 16384 points, 32 bits each (an IEEE-754 single
current reference, for example). One bank plays; writes always go to the
other one.

* **Data trigger:** every `data_div` PWM periods (20 by default), the next
  point is read. It shows on `ref_value` with a one-cycle `data_trig`, and the
  control processor sees it in `CR_WAVE_REF` with a status bit and an
  interrupt.
* **Period trigger:** restarts the waveform at point 0. If a loaded bank is
  pending, the banks swap at this moment.

The communication processor loads the idle bank point by point. It then
commits the bank with the number of points, which makes the bank pending. The
next period trigger swaps it in, so a new waveform never starts in the middle
of a period of the old one.

Trigger modes (`CR_CTRL` bit 2):

* **Local:** the controller makes its own period triggers: when `run` rises,
  when a bank is committed while idle, and right after the last point. The
  waveform repeats with no gap. The data-trigger spacing stays exactly
  `data_div` PWM periods across the restart.
* **Remote:** the period trigger is a rising edge on the trigger fiber input
  (`trig_fiber`). After the last point, the last value is held until the next
  trigger.

All triggers act at PWM period starts. A trigger that arrives between period
starts is served at the next one.

Example from the design's application: a 16000-point stepped trapezoid with
one point per 20 periods of a 16 kHz PWM lasts 16000 × 20 / 16 kHz = 20 s per
waveform period.

## Two processors: boot, shared RAM, floating point

* **`boot_sequencer`.** Both processors boot from the same parallel flash,
  each from its own reset address, so their boot copiers must not overlap.
  Processor 0 leaves reset `RST_STRETCH` clocks after the board reset.
  Processor 1 stays in reset until processor 0 raises `cpu0_boot_done`. The
  boot vectors are parameters; they are output as `cpuN_reset_addr`.
* **`dual_port_ram`.** A 1024 × 32 RAM that both processors read freely, with
  no locks or interrupts. The lower half can only be written by processor 0,
  the upper half only by processor 1. No word has two writers, so simultaneous
  accesses cannot corrupt data. A write into the other processor's half is
  dropped, and `cpuN_wr_denied` pulses.
* **`fp_mul`.** An IEEE-754 single-precision multiplier, one per processor, on
  a custom-instruction style port (`start`, operands, `done` two clocks later,
  one operation per clock). It rounds to nearest even. Subnormal inputs and
  results are flushed to zero. NaN inputs, and infinity × 0, give 0x7FC00000.

### Processor buses and register maps

Each processor bus is word-addressed (`cpuN_addr[11:0]`) with a write strobe.
Read data appears one clock after the address. Reads have no side effects.

| address | target |
|---|---|
| 0x000-0x1FF | shared RAM, lower half (processor 0 writes) |
| 0x200-0x3FF | shared RAM, upper half (processor 1 writes) |
| 0x400-0x41F | the processor's own register block |

Processor 0, `ctrl_regs` (offsets from 0x400):

| off | name | bits |
|---|---|---|
| 0x00 | CTRL | [0] PWM enable, [1] waveform run, [2] trigger mode (0 local, 1 remote) |
| 0x01 | PWM_PERIOD | period in steps (reset 1500 = 100 kHz) |
| 0x02 | PWM_DUTY | duty, 18.14 fixed point steps |
| 0x03/0x04 | PWM_PHASE0/1 | phase offset of each channel, steps |
| 0x05 | ADC_ISUM | current sum of the last frame (signed) |
| 0x06 | ADC_ICOUNT | samples in that sum |
| 0x07 | ADC_V | {voltage VSEL1, voltage VSEL0} |
| 0x08 | STATUS | [0] new ADC frame [1] ADC frame error [2] data trigger [3] period trigger, sticky, write 1 to clear; [4] interlock (live). irq = any sticky bit |
| 0x09 | WAVE_REF | current waveform point |
| 0x0A | WAVE_INDEX | its index |
| 0x0B | WAVE_DIV | PWM periods per point (reset 20) |
| 0x0C | DIN | debounced digital inputs |
| 0x0D | DOUT | digital outputs |
| 0x0E | ILK_MASK | inputs that act as interlocks |
| 0x0F | ILK_LATCH | latched interlocks; any write clears |

Processor 1, `comm_regs`:

| off | name | bits |
|---|---|---|
| 0x00 | WAVE_ADDR | load pointer |
| 0x01 | WAVE_DATA | writes a point to the idle bank, then advances the pointer |
| 0x02 | WAVE_COMMIT | number of points; makes the loaded bank pending |
| 0x03 | WAVE_STATUS | [0] playing bank [1] pending [2] playing |
| 0x04 | LINK_CTRL | [0] fiber line code: 0 RS232, 1 Manchester |
| 0x05 | LINK_TX | byte to send (dropped if busy) |
| 0x06 | LINK_RX | last byte received |
| 0x07 | LINK_STATUS | [0] byte received [1] receive error, sticky, write 1 to clear; [2] transmitter busy. irq = any sticky bit |

## Fiber link and interlock

The communication fiber pair carries either RS232 frames (`uart`: 8N1,
115200 baud) or a Manchester-coded byte stream (`manchester_codec`), as
selected by `LINK_CTRL`. Manchester coding follows IEEE 802.3: 0 is sent as
high then low, 1 as low then high. The rate is 2.5 Mbit/s. The line idles low.
Each frame is a 0 start bit, then 8 data bits LSB first, then at least one
idle bit time. The receiver aligns on the rising edge that starts a frame and
samples each half bit in its middle. After an error, it waits for a low line
and aligns again. Remote triggers use their own fiber input, not the
communication pair.

`interlock_io` debounces the 16 isolated inputs; a new level must hold for
10 µs (`DEB`). An input enabled in ILK_MASK that goes high latches an
interlock. The interlock switches the PWM off at once and forces the 8
isolated outputs low. The latch clears on an ILK_LATCH write, but only once
the input has returned low.

## Files

`rtl/` holds one module or package per file. `ctrl_pkg.sv` has the shared
types, register maps and the frame layout; `digital_controller_top.sv` is the
top. `tb/` holds one self-checking testbench per module, named
`tb_<module>.sv`. `tb/adc_model.sv` is a behavioural converter model used by
the ADC testbenches. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

To simulate, for example the whole controller:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/ctrl_pkg.sv tb/tb_digital_controller_top.sv --top-module tb_digital_controller_top
./obj_dir/Vtb_digital_controller_top
```

`tb_digital_controller_top` runs the top at its default parameters through
one complete operation. It simulates about 1 ms of controller time in a few
seconds, and it covers:

* the boot order;
* both FP multipliers;
* shared-RAM exchange and a refused write;
* 100 kHz PWM with rounding correction and a 180° phase;
* ADC frames read by processor 0;
* local waveform repeat, a bank swap and a remote trigger;
* an RS232 byte and a Manchester byte over a looped-back fiber;
* a cascade sync;
* an interlock.

It counts each of these and fails if any never happened.

Three more testbenches run the design's application cases at default sizes:

* `tb_workload_current_oversampling` runs the complete controller at PWM
  rates of 1, 10, 20, 50 and 100 kHz. A noisy current-ADC model drives the
  current input. The test checks, in every period:
  * exactly one frame;
  * the sample count, floor((P - 600) / 150), which is 996 down to 6;
  * the exact sum;
  * the voltage values.

  From the period means it then computes the effective resolution,
  log2(full scale / RMS noise). The result must grow by half a bit per
  doubling of the sample count, within 1 bit. That is the trend of
  resolution against PWM rate. The absolute resolution of a real channel
  depends on its converter.

* `tb_workload_phase_shift` builds three complete controllers: a main one and
  two slaves. Slave B leaves reset out of step with slave A. With 16 kHz PWM,
  the slave legs are set to offsets 0 and P/2 on A, and P/4 and 3P/4 on B.
  The test checks that, under the main controller's sync, the four legs turn
  on in turn, 2343 or 2344 steps apart. That spacing is ripple at 64 kHz. It
  takes a few seconds.
* `tb_workload_dipole_waveform` loads a 16000-point stepped trapezoid into
  one bank. The trapezoid ramps to 1200 A in 0.75 s, then steps down through
  six plateaus. While that bank plays, a second waveform is loaded into the
  other bank. The test plays both at 16 kHz with one point every 20 periods,
  and checks:
  * each point's value;
  * the 187500-clock spacing between points;
  * the takeover at the waveform period boundary.

  A full 20 s waveform period is 3e9 clocks. That is too long to simulate, so
  each period plays only the first 200 points; `load_len` sets this, and the
  `NPTS` parameter raises it. This is the only reduced quantity, and it is
  the largest waveform length simulated. The run takes about a minute.

## What is this design's own choice

The controller's architecture follows the source design:

* two processors with a shared, ownership-split RAM;
* sequential boot;
* floating-point multipliers;
* 6.67 ns PWM with rounding correction;
* PWM-synchronous voltage sampling and oversampled current;
* SPI backplane;
* ping-pong waveform banks with local and remote triggering;
* 16 + 8 interlock I/O;
* RS232 and Manchester fiber links;
* phase-shifted multi-controller operation.

The source gives none of the following. They were chosen here and can be
changed freely:

* all register maps, the address map and the bus timing;
* the ADC frame layout, the SPI mode and rate, and the choice of the ADC card
  as SPI master;
* the fixed current sample rate (1 MS/s), the 4 µs margin, and sending the sum
  and count rather than a mean;
* 14 duty fraction bits;
* the waveform point width (32 bit) and the commit handshake;
* holding the last point in remote mode;
* the shared RAM size (4 KiB);
* the boot addresses;
* floating-point details: flush to zero, the NaN value, and the two-cycle
  latency;
* UART and Manchester frame formats and rates;
* debounce time, interlock polarity and the safe output state;
* the sync pulse width.
* one SPI frame per PWM period carrying both kept voltages and the current
  result. The source describes the two voltage values as sent to the control
  card separately, each before the end of the period. Sending them together
  in one frame meets the same deadline.

Not covered by this RTL:

* The processor software: the regulation (PID) loop and the Ethernet
  protocol.
* The data exchange between a master controller and its slaves. Only the PWM
  synchronisation line is provided; the message format on the cascade link is
  not defined.
* In this top both cards share one clock. Every signal that crosses between
  the cards is still synchronised on the receiving side, so the logic can be
  split across two FPGAs.
