# Sensor link encrypted with an ADPLL-based true random number generator

Two FPGA boards exchange sensor readings through Wi-Fi modules and a cloud
service. The transmitter board turns a gas sensor and an object-tracking
sensor into one detect bit each. It XORs both bits with a bit from an
on-chip true random number generator (TRNG) and sends the result over a UART
to its Wi-Fi module. The receiver board takes the bytes from its own Wi-Fi
module over a UART, XORs them with a bit from its own TRNG and shows the
result.

The TRNG is the main piece of hardware. One free-running ring oscillator
drives two all-digital phase-locked loops (ADPLLs). A small flip-flop network
samples one loop's outputs with the other loop's output. The randomness
comes from the jitter of the ring, the loops' response to it, and flip-flop
metastability. No analog PLL is used, so the whole generator fits in ordinary
FPGA logic.

## Block structure

```
riat_wcs_top
├── transmitter
│   ├── trng
│   │   ├── pulse_generator       starts the ring after reset
│   │   ├── ring_oscillator       51-stage ring, behavioural model
│   │   ├── adpll (×2)            fir_loop_filter, id_counter, divn_counter
│   │   ├── trng_sampler          DFF1–DFF4, two XORs, div2_counter
│   │   └── post_processor
│   ├── xadc_reader               reads both sensor channels of the on-chip ADC
│   ├── sensor_threshold (×2)     gas, tracking
│   ├── xor_cipher                encryption
│   ├── uart_tx                   to the Wi-Fi module
│   └── seg7_display              tracking value; the 12 LEDs show the gas value
└── receiver
    ├── trng
    ├── uart_rx                   from the Wi-Fi module
    └── xor_cipher                decryption
```

Shared types are in `riat_pkg` (`sensor_frame_t`, the byte on the serial
link). Every file in `rtl/` holds one module or package and opens with a
description of what it does, its timing, and which parts are this design's
own choices.

## The ADPLL

`adpll` is a first-order loop built from four parts:

* **Phase detector.** An XOR of the reference, which is the ring oscillator,
  and the divided-down DCO output.
* **Loop filter (`fir_loop_filter`).** A 4-tap low-pass FIR in transposed
  ("broadcast") form. The one-bit phase-detector output goes to all four
  coefficient gates, and three registers lie between the adders:
  `y(n) = a·x(n-3) + b·x(n-2) + c·x(n-1) + d·x(n)`. The coefficients
  2, 7, 7, 2 are a 4-point Kaiser window (β = 3) scaled by 8. The filter
  output is added into an accumulator of modulus `K·(a+b+c+d)` with K = 4.
  Each wrap of the accumulator sends one carry pulse. When x stays at 1, a
  carry comes every K clocks. When x stays at 0, no carry comes.
* **DCO (`id_counter`).** It runs from the ID clock, 2·N·f0. The output
  toggles on every clock, which gives N·f0. A carry cancels one toggle, so
  each carry delays the output by half a DCO period.
* **Divide-by-N (`divn_counter`).** It divides the DCO output by N = 8 and
  closes the loop.

With f0 = 50 MHz, N = 8 and M = 16, the FIR clock M·f0 and the ID clock
2·N·f0 are both 800 MHz, so one clock (`clk_hf`) drives the whole loop. The
DCO can only be slowed down. The loop therefore locks to references from
f0·(1 − 1/K) = 37.5 MHz up to f0. In lock, the phase error settles where the
carry rate makes up the frequency difference. `tb_adpll` measures this. At
50 MHz no carries come. The divided output follows 49, 45 and 39 MHz
references edge for edge, with 64, 320 and 704 carries per 4 µs. At 30 MHz
the loop does not lock.

The ring oscillator has 51 stages. With a 200 ps stage delay it runs near
47–49 MHz, just below f0 and inside the lock range.

## The sampling network

`trng_sampler` is one clock domain, clocked by IDout3, the DCO output of
ADPLL 2 (400 MHz when locked at f0):

* DFF1 samples IDout1, the DCO output of ADPLL 1.
* DFF2 samples IDout2, the divide-by-N output of ADPLL 1.
* The XOR of the two samples is XORed with DFF3's own output, so DFF3
  accumulates parity.
* A divide-by-2 toggle flip-flop (`div2_counter`, enabled by the board's `t`
  pin) paces the output. On each of its rising edges, DFF4 takes DFF3 as the
  raw random bit, and DFF3 restarts from the new sample pair.

One raw bit comes every two IDout3 periods: 200 Mbit/s at f0, in line with
the roughly 202 Mbit/s the transmitter is reported to reach. With `t` low,
no bits come. `post_processor` XORs each raw bit with the one before it and
keeps the bit rate.

The two ADPLLs use different filter coefficients: 2,7,7,2 for ADPLL 1 and
1,4,4,1 for ADPLL 2. This keeps them from being identical copies.

## Encryption and the link

* **ADC read-out.** The on-chip ADC (XADC) runs its channel sequencer over
  two auxiliary inputs: the tracking sensor on VAUX4 (DRP address 0x14) and
  the gas sensor on VAUX14 (0x1E). After each end-of-conversion,
  `xadc_reader` reads the 12-bit result over the DRP. When both channels
  have a new result, it passes the pair on. The 12 LEDs show the gas value.
  The seven-segment display shows the tracking value in hex.
* **Thresholds.** `sensor_threshold` gives 1 when a 12-bit ADC sample is
  above 2048.
* **Synchronisation.** The output random bit passes a two-flop synchroniser
  into the 100 MHz system clock domain. There it appears as `q1` on the
  transmitter and `q3` on the receiver.
* **Encryption.** For each sample, `xor_cipher` XORs both sensor bits with
  the current random bit.
* **Byte format.** The encrypted pair goes out as one byte: bit 0 is gas,
  bit 1 is tracking, and the other bits are 0. The link runs at 115200 baud,
  8N1 (`CLKS_PER_BIT = 868` at 100 MHz).
* **Dropped samples.** The ADC delivers pairs far faster than the line can
  carry bytes. A pair that arrives while a byte is still being sent is not
  sent, and `tx_dropped` pulses instead. The line always carries the newest
  pair present when it becomes free.
* **Receiver.** The receiver XORs each received pair with its own random bit
  and flags frames whose stop bit is low (`rx_error`).

**Key agreement is not part of this design.** The two boards each have a
free-running TRNG. Nothing makes the receiver's random bit equal to the one
the transmitter used, so `rx_plain` equals the sensor bits only when the two
key bits happen to agree. To let a user add a key scheme, and to let tests
check the data path, both boards bring out the key bit they applied
(`tx_key`, `rx_key`). The end-to-end test checks
`rx_plain ^ rx_key ^ tx_key == sensor bits` for every byte.

## What is modelled rather than built

* **`ring_oscillator` (behavioural, simulation only).** A NAND gate plus 50
  inverters. Each stage has a 200 ps delay plus a random 0–20 ps per
  transition. In an FPGA the ring is a chain of LUTs kept by placement
  constraints. Synthesis cannot build it from this file.
* **ADC, Wi-Fi modules, cloud and sensors.** They are not logic and stay
  outside the top. The XADC's sequencer outputs and DRP port (`xadc_*`) and
  the UART pins (`tx`, `rx`) are top-level ports. `tb/xadc_model.sv` is a
  simulation model of the XADC as seen from the fabric.
* **Clocks.** The 800 MHz `clk_hf` comes from outside. Both boards share
  `sys_clk` and `clk_hf` in `riat_wcs_top`, but on hardware each board has
  its own.

## How far to trust it

* **Randomness in simulation.** Simulation does not show that the output is
  random. The only randomness in the model is the ring's jitter, about 40 ps
  per period, which is small next to the 1.25 ns clock of the loops. Both
  ADPLLs therefore lock in step, and the simulated output stream is almost
  constant. Whether the hardware passes statistical tests depends on the
  real jitter and metastability, which no RTL simulation reproduces. The
  testbenches check the structure of the generator: lock, bit rate, the
  sampling and XOR rules, and the enable.
* **Document gaps, filled by choices.** The source description does not
  give:
  * the FIR coefficients;
  * how the carry acts on the DCO;
  * which flip-flop pins the divide-by-2 output drives;
  * the post-processing method;
  * the threshold value;
  * the UART format;
  * how the pulse generator works.

  The choices above fill these gaps, and each file's header states its own.
* **DFF1/DFF2 resets.** The block diagram also draws the divide-by-2 output
  to the reset pins of DFF1 and DFF2. Here those are reset only by `rst`,
  because clearing them would zero half of the samples.
* **Receiver rate.** A receiver-side output rate of about 680 Mbit/s is
  reported for the original hardware. This design cannot reach it: both
  boards use the same TRNG, at about 200 Mbit/s.

* **Size.** The original boards are reported at 1 LUT (transmitter) and
  2 LUTs (receiver). No implementation of this circuit can be that small:
  the 51-stage ring alone needs 51 LUTs, and each ADPLL adds a filter, an
  accumulator and two counters.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. Build
one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/riat_pkg.sv tb/tb_adpll.sv \
          --top-module tb_adpll -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_riat_wcs_top` | The whole link at default sizes (about 75 s of run time). `tx` is wired to `rx` and the ADC model feeds changing sensor values; about 23 bytes are sent. Every byte must arrive and decrypt correctly given both keys. It also counts carries in both boards' loops, lock of ADPLL 2, raw bits, detect 0 and 1 for both sensors, dropped ADC pairs, one corrupted frame rejected, the display, and the random bits stopping when `t` is low. |
| `tb_trng` | Lock of ADPLL 2 to N × the ring frequency, one bit per two IDout3 periods, the post-processing rule, the `t` enable |
| `tb_trng_rate` | Output bit rate with the ring at about 49.5 MHz: about 198 Mbit/s, within 3 % of the 202 Mbit/s reported for the hardware. It also prints the ones count of ten 150-bit sequences, for information only |
| `tb_adpll` | Lock range and carry rate, as above |
| `tb_fir_loop_filter`, `tb_id_counter`, `tb_divn_counter` | Against reference models with random inputs |
| `tb_trng_sampler`, `tb_post_processor`, `tb_div2_counter` | Against reference models with random inputs |
| `tb_ring_oscillator`, `tb_pulse_generator` | Period and jitter bounds; start timing |
| `tb_xadc_reader` | Against the XADC model: addresses read, pairs delivered |
| `tb_sensor_threshold`, `tb_xor_cipher`, `tb_uart_tx`, `tb_uart_rx`, `tb_seg7_display` | Values decoded independently in the testbench |
| `tb_transmitter`, `tb_receiver` | Each board alone, with a fast UART |

## Parameters

| parameter | default | where |
|---|---|---|
| `N` (÷N modulus) | 8 | `adpll`, `divn_counter`, `trng` |
| `K` (loop-filter modulus factor) | 4 | `fir_loop_filter`, `adpll`, `trng` |
| `M` (FIR clock = M·f0) | 16 | `adpll`; must equal 2·N for the single-clock loop (asserted) |
| FIR coefficients | 2,7,7,2 and 1,4,4,1 | `fir_loop_filter`, `trng` |
| `STAGES` (ring length) | 51 | `ring_oscillator` |
| `T_INV_PS`, `JITTER_PS` | 200, 20 | `ring_oscillator` |
| `THRESHOLD` | 2048 of 4095 | `sensor_threshold` |
| `TRK_ADDR`, `GAS_ADDR` | 0x14, 0x1E | `xadc_reader` |
| `CLKS_PER_BIT` | 868 (115200 baud at 100 MHz) | `uart_tx`, `uart_rx`, boards, top |
| `REFRESH_CYCLES` | 100000 (1 ms per digit) | `seg7_display` |

Of these, N = 8, K = 4, M = 16, the 51-stage ring, f0 = 50 MHz, the 12-bit
ADC values, the two sensors and their ADC channels are the values of the
original design. The VAUX14 address is given there as 0x0E, which is not an
auxiliary-channel register. The channel name is followed instead, giving
0x1E. The rest are this design's choices.
