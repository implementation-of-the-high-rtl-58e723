# Time-interval meter around the THS788: FPGA firmware and MCU peripherals

This design measures time intervals with a commercial time-measurement unit.
The unit is the THS788, with four channels, 13 ps resolution and 7 s range.
The RTL is the digital glue around that unit.

- It receives the unit's 40-bit time stamps on four serial result ports.
- It can drop stamps outside a region of interest (ROI).
- It processes the stamps in one of three ways:
  - stream them to a PC;
  - record a burst at full speed and upload it;
  - build a 65536-bin histogram inside the FPGA.
- A PC drives all of this over RS-232 with a small byte protocol.

A separate group of blocks is the digital part of the temperature controller that stabilises the unit, on a 24 MHz microcontroller clock:

- an SPI master that programs the clock generator;
- a PWM generator and a direction de-multiplexer that drive the Peltier H-bridge;
- the 20 ms control-loop timer.

The top module `tdc_system` holds both groups. The CPU firmware, the analog front end, the H-bridge, the ADC and the THS788 itself are not in this RTL. Their signals are ports of the top.

## Clock domains and how data crosses them

Three clocks matter on the FPGA side. All are derived from RCLK, the 300 MHz result clock of the THS788.

| domain | clock | made by | what runs in it |
|---|---|---|---|
| result | RCLK, 300 MHz | input | four `tmu_serial_decoder` |
| system | 10 MHz = RCLK/30 | `clock_divider`, DIV_SYS = 14 | `supervisor`, the three function blocks, the multiplexers |
| baud | RCLK/162 = 1.85 MHz | `clock_divider`, DIV_UART = 80 | `rs232_serial_interface` (16x oversampling, 115 741 baud) |

The divider is a counter that toggles its output when it reaches DIV, so f_out = f_in / (2·(DIV+1)).

Only single-bit levels cross between domains, and each goes through a two-flip-flop synchroniser (`sync_2ff`). Data words never go through a synchroniser. Two four-phase handshakes keep each data word stable while the other side reads it:

- **RXNE/ACK (decoder to function block).** The decoder loads the 40-bit word into DR and raises RXNE.
  - The function block sees RXNE after synchronisation, reads DR and raises ACK.
  - The decoder drops RXNE when it sees ACK. The block then drops ACK.
  - A word that arrives while RXNE is still high is lost in the decoder. This is the overflow case.
  - One handshake takes 6 system clocks (600 ns), measured in simulation with words arriving back to back. The sustained rate is therefore about 1.67 Msamples/s, not the 6.97 Msamples/s the result port can deliver (300 MHz / 43 clocks per word).
- **Start/Busy (requester to serial port, supervisor to function block).**
  - The requester sets its data and raises Start.
  - The receiver latches the data and raises Busy.
  - The requester drops Start when it sees Busy.
  - Busy falls when the work is done and Start is low.

  The same rule is used between the supervisor and a function block: Busy stays high for the whole measurement.

Reset is one asynchronous input. `reset_sync` releases it separately in each domain.

## The serial interface and the byte protocol

`rs232_serial_interface` moves up to five bytes per request. The bytes are 8N1 and LSB first.

- **Transmit:** the request gives a 40-bit word and a count N. The interface sends bytes 5−N to 4 of the word, lowest first. A 1-byte reply therefore sits in bits 39:32, and a 2-byte histogram bin in bits 39:24.
- **Receive:** the interface gathers N bytes from a 16-byte FIFO into the same positions.

Three owners can use the port: the supervisor and the three function blocks. `serial_if_mux` connects only the current owner and returns Busy to that owner alone.

The PC talks to `supervisor`:

| PC sends | FPGA answers | meaning |
|---|---|---|
| `1F` | `FF` | state synchronisation |
| `AA`, word W, `FF` | `AA`, echo of W | run function W |
| `BB`, W, lower bound, upper bound, `FF` | `BB`, echo of each word | run W with the ROI window lower < t < upper |

A word is five bytes. Byte 0 is the function identifier: high nibble channel 0..3, low nibble task. Bytes 1..4 are a 32-bit parameter, low byte first.

| task | function | parameter |
|---|---|---|
| 1 | asynchronous reading | samples to send, 1 .. 2^32−1 |
| 2 | histogram generation | samples to count, 1 .. 2^32−1 |
| 3 | synchronous reading | samples to record, 1 .. 65536 |
| 4 | histogram upload | ignored |

Error handling:

- An illegal word is answered with five `00` bytes, and the instruction is dropped. Illegal means one of:
  - channel above 3;
  - unknown task;
  - parameter 0 for tasks 1 to 3;
  - a synchronous count above 65536;
  - for `BB`, a lower bound above the upper bound.
- Any byte other than `FF` after the last echo cancels the instruction.
- Unknown first bytes are ignored.
- `AA` turns the ROI off. `BB` turns it on for that run.

## Function blocks

All three take samples through RXNE/ACK from the decoder that `tdc_channel_mux` selects. `fb_selector` routes Start, Busy and ACK to the block named by the task.

- **`async_read_fb`**
  - If the serial port is idle, each sample is sent at once as a 5-byte word.
  - If the port is still sending, the sample is acknowledged and discarded, and a one-clock `discarded` pulse is raised.
  - The parameter counts samples that were sent.
  - Sustained throughput is set by the line: 50 bits per sample, about 2300 samples/s.
- **`sync_read_fb`**
  - Writes `param` consecutive samples into a single-port RAM of 65536 × 40 bits at the handshake rate.
  - Then reads them back in order and sends each as a 5-byte word.
- **`histogram_fb`**
  - Uses a RAM of 65536 × 16 bits, addressed by the 16 low bits of the sample.
  - Each sample takes a read state and a write state (count + 1, saturating at 65535).
  - When `param` samples have been counted, it sends the single byte `F0`.
  - Task 4 uploads all 65536 bins, two bytes each, bin 0 first.
  - The RAM is cleared after reset and at every start; Busy is high while it clears (6.5 ms at 10 MHz).

`tmu_serial_decoder` works in the result domain:

- It shifts RData while the active-low strobe is low. The first bit received ends up as bit 0.
- When the strobe rises, it applies the ROI test: strictly between the bounds, on the full 40-bit value.
- A word that passes is posted to DR/RXNE.

## MCU-side peripherals (24 MHz)

- **`spi_master`:** 16-bit, CPOL 0 / CPHA 0, LSB first, SCLK = 24 MHz / (2·CLK_DIV) = 3 MHz. It is full duplex. `done` stays set until the next transfer starts. The active-low select `ss` (for the clock generator's latch enable) falls with a transfer. It stays low when the next word is presented in the clock after a word ends, so two words form one 32-bit register frame.
- **`pwm_generator`:** a counter over 255 clocks gives 94.1 kHz. The output is high while count < compare, so compare is 0..255. The compare value is updated only at a period boundary.
- **`direction_demux`:** sends the PWM signal to H-bridge IN1 (direction 0) or IN2 (direction 1). The other input is held low.
- **`loop_timer`:** a prescaler of 24 gives a 1 MHz tick. A period of 20000 ticks gives 20 ms. It sets a sticky flag `tc` that firmware clears with `tc_clear`.

## Where this RTL departs from, or adds to, its source description

- **Baud clock divider.** The description divides RCLK by 163. An odd ratio is not possible with a toggling divider and a 50 % duty cycle. This design divides by 162: 115 741 baud against 115 031 for /163. Both are within 1 % of 115 200.
- **Instruction code and ROI flag.** The sync instruction code is `1F`, and `BB` enables the ROI. Where the source's wording is unclear on either point, this design follows its printed code table.
- **Design's own choices.** The source does not settle these:
  - the byte order inside a 5-byte word;
  - task 4 as "histogram upload", with 2 bytes per bin;
  - `F0` as the histogram-finished message;
  - the legality rules;
  - the saturating counts;
  - discarded samples not counting toward the asynchronous total.
- **System clock throughput.** The 10 MHz system clock does not keep up with the result port at its full word rate. See the RXNE/ACK handshake above. The measurements that the source describes run at 500 kHz, well below the limit.
- **One function at a time.** The source allows a long histogram run to go on in parallel with other functions. Here the supervisor waits for every function, the histogram included, before it accepts the next instruction. Running them side by side would need three things this design does not have:
  - a second channel path;
  - a rule for two consumers of one decoder;
  - arbitration of the serial port for the histogram's finished message.
- **Pads and LVDS.** LVDS receivers and pads are not modelled. The top's ports are single-ended.

## Sizes

| parameter (top) | default | meaning |
|---|---|---|
| `CLK_DIV_SYS` | 14 | RCLK / 30 = 10 MHz |
| `CLK_DIV_UART` | 80 | RCLK / 162, 16x baud |
| `HIST_ADDR_W` | 16 | 65536 bins of 16 bits |
| `FIFO_DEPTH` | 65536 | samples of 40 bits in synchronous reading |
| `SPI_CLK_DIV` | 4 | SCLK = 3 MHz |
| `LOOP_PERIOD` | 20000 | 1 µs ticks per control period |

At the defaults the design holds 3.67 Mbit of RAM: 1 Mbit for the histogram and 2.6 Mbit for the FIFO.

Workload capacity:

- A 655 360 000-sample histogram over 2^16 bins (about 10 000 per bin) fits the 16-bit bins and the 32-bit count.
- A 50 000-sample accuracy run fits every function.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M`. A typical run:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/tdc_pkg.sv tb/tb_histogram_fb.sv
./obj_dir/Vtb_histogram_fb
```

Two testbenches cover the whole design:

- **`tb_tdc_system`** runs the whole design at reduced sizes: 64 bins, a 16-deep FIFO, a fast baud clock and a 50-tick loop. It includes models of the THS788 result port and of a PC UART. It exercises:
  - synchronisation;
  - asynchronous reading with discards;
  - synchronous reading;
  - a histogram with samples rejected by the ROI, and its upload, checked bin by bin;
  - an illegal instruction, an unconfirmed instruction and bad ROI bounds;
  - an SPI loopback transfer, PWM in both directions, and the loop timer.

  It counts every one of these and fails if any never happened.
- **`tb_tdc_system_full`** leaves every parameter at its default. It runs synchronisation and a 4-sample synchronous read, with the 65536-bin RAM clear after reset (about 10 ms of simulated time).

Two workload testbenches run the blocks at full size:

- **`tb_workload_linearity`** plays a half-LSB ramp through the 65536-bin histogram. The ramp is the slow sweep that two almost equal generator frequencies produce. The testbench checks that an ideal input fills every bin equally. It uses 2 samples per bin instead of the 10 000 a real run collects.
- **`tb_workload_accuracy`** records and uploads 50 000 stamps with a one-LSB spread through the 65536-word FIFO. It checks that every stamp and the statistics survive.

The unit testbenches for the histogram and the FIFO run at reduced sizes (16 bins, 16 words). The unit testbenches of the histogram use 4-bit counts so that saturation is reached.
