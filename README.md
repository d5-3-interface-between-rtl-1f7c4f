# BEAM39PA beamforming control over SPI: FPGA-side controller

A 39 GHz hybrid-beamforming array is steered by BEAM39PA beamformer ICs.
They sit on a system board and are programmed over SPI. A massive-MIMO
software-defined radio generates and processes the data signals, and it also
has to steer the beams. This RTL is the logic in the radio's control FPGA that
does that. A soft processor receives high-level commands such as "reset",
"load beam table" or "set beam". It turns each command into register
accesses on the beamformers, and it uses the SPI master described here to
send them.

A stock SPI master cannot be used, because the BEAM39PA's framing is not
plain SPI. Besides the data bits it expects extra SCLK pulses while CS is still
asserted after the data, and more pulses after CS has been released. Its
packets are also 2, 4 or 15 bytes long. It sometimes needs SCLK pulses with
no frame at all, or CS asserted with no clock. The core therefore has a small
set of primitives that software combines into packets:

* a **word** of 1 to 4 bytes, sent MSB first, with its own CS framing;
* **continuous mode**, which keeps CS asserted between words so that several
  words form one packet;
* **overwrite CS**, which asserts CS without a transfer;
* an **extra-SCLK burst**, a fixed number of SCLK pulses without data;
* a **soft reset**, which stops any of the above at once.

## Where the logic sits

```
 host PC / signal-processing FPGA
        | command packets (UART / internal link)
 +------v---------------------------------------------- control FPGA ----+
 |  soft processor + firmware (vendor IP, not in this RTL)               |
 |     | Avalon-MM                | parallel ports                       |
 |  +--v-------------------+   pio_out[2:0] -> TX_EN, RX_EN, RESET        |
 |  | spi_master_serena_if |   FE_READY -> pio_in[0]                     |
 |  |  serena_spi_regs     |   KEY/SW -> button_debouncer -> key_sw_db   |
 |  |  serena_spi_master   |                                              |
 |  |  serena_extra_sclk   |                                              |
 |  +--+-------------------+                                   mmd_serena_fpga
 +-----|------------------------------------------------------------------+
       | SCLK, COPI, CIPO, CS0_n, CS1_n (2.5 V)
   level-shifting adapter board (2.5 V <-> 1.8 V)
       |
   system board: beamformer ICs behind the two chip selects
```

`mmd_serena_fpga` is the top. It contains the SPI master IP, the debouncer and
the pin wiring. The processor, its UARTs, parallel ports, timer and memory, and
the PLL are vendor IP. Their signals are ports of the top: the Avalon-MM slave
port `avs_*`, `pio_out`, `pio_led_out`, `pio_in`, `key_sw_db` and
`pll_locked`. Everything runs on one clock, `main_clk`, at 100 MHz.

## One SPI word: the frame

`serena_spi_master` sends a word in up to four phases. Its phase counter counts
clocks. SCLK is bit 0 of that counter whenever a phase drives the clock, so
one SCLK period is two clocks and the bus runs at 50 Mbit/s with a 100 MHz
clock.

```
clock    : |L L|0 1 0 1 ... 0 1|0 1|0 1|
phase    :  LEAD  DATA (8n bits) PRE POST      n = 1..4 bytes
CS_n     : ~~\_____________________/~~~~~~
SCLK     : ____ _/~\_/~\ ... _/~\_/~\_/~\__    (pre pulse under CS, post pulse after)
COPI     :      b31  b30 ...  b(32-8n)
```

| phase | CS | SCLK | length (clocks) | default |
|---|---|---|---|---|
| LEAD | asserted | low | `LEAD_CYCLES` | 2 |
| DATA | asserted | 8n pulses | 16 n | 16 to 64 |
| PRE  | asserted | `PRE_SCLK` pulses | 2 `PRE_SCLK` | 2 |
| POST | released | `POST_SCLK` pulses | 2 `POST_SCLK` | 2 |

* The mode is SPI mode 0: SCLK idles low and COPI changes after each falling
  edge. CIPO is sampled in the last clock of the high phase.
* The word is taken from the top of the 32-bit data register. An n-byte word
  sends bits `[31 : 32-8n]`, so a single byte is bit 31 down to 24.
* The received bits are shifted in at the LSB. After an n-byte word,
  `[8n-1:0]` of the read register holds them, the first bit highest. The
  register is cleared at each start.
* With **continuous mode** set, PRE and POST are skipped and CS stays asserted
  after DATA. The next word starts with its own LEAD phase while CS is still
  low. The packet ends with a word sent with continuous mode cleared, which
  runs PRE and POST.
* Busy time of one word, from the engine's start to idle:
  `LEAD_CYCLES + 16n + 2 PRE_SCLK + 2 POST_SCLK`. That is 70 clocks for a
  4-byte word at the defaults.

The beamformer's own data sheet sets the lead time and the number of SCLK
pulses before and after CS. Those numbers are not known here. All three are
parameters of `serena_spi_master` and `spi_master_serena_if`, and the values
above are placeholders. Check them against the beamformer's timing before
using the core on hardware.

### Extra-SCLK burst

`serena_extra_sclk` runs a counter while the extra-SCLK control bit is set.
Bit 0 of the counter is ORed onto SCLK. After `EXTRA_PULSES` pulses (8 by
default) it clears the control bit itself. CS is not touched, so the pulses
appear with CS high unless software asserts CS through overwrite-CS. BUSY is
high for as long as the bit is set.

### Chip selects

```
cs_int_n = engine_cs_n AND NOT overwrite_cs
CS0_n    = cs_int_n OR NOT cs_sel[0]
CS1_n    = cs_int_n OR NOT cs_sel[1]
SCLK     = engine_sclk OR extra_sclk
BUSY     = engine_busy OR extra_sclk_bit
```

`CS_SEL` is a mask, so a frame can go to CS0, CS1, both or neither. The
soft reset clears the mask.

## Register map (Avalon-MM, 32-bit words, 16-byte span)

| word | name | write | read |
|---|---|---|---|
| 0 | DATA | word to send; **starts a transfer**; byte enables give the length | last received word |
| 1 | CTRL | bit 2 cont, 3 extra_sclk, 4 overwrite_cs, 7 reset | bit 0 busy, 1 cs asserted, 2 cont, 3 extra_sclk, 4 overwrite_cs, 7 reset |
| 2 | CS_SEL | bit 0 enables CS0_n, bit 1 enables CS1_n | the mask |
| 3 | - | ignored | 0 |

Rules software must know:

* **Length from byte enables.** The number of enabled bytes of a DATA write is
  the word length. Which bytes are enabled does not matter, because the data is
  always taken from the top. A DATA write with no byte enabled does nothing.
* **Writes while busy are dropped.** DATA, CS_SEL and bits 2-4 of CTRL are
  ignored while BUSY is set, or while a start is still on its way to the
  engine. Poll bit 0 of CTRL, or the BUSY pin, before the next write.
* **Reset always gets through.** CTRL bit 7 is written even while busy. While
  it is set, the engine is held idle with CS released, the extra-SCLK burst is
  stopped and CS_SEL is cleared. DATA writes then start nothing. Write 0 to
  release it.
* **Latency.** A write is registered, decoded one clock later, and seen by the
  engine as a start pulse in the next clock. BUSY rises three clocks after the
  write cycle. Reads return data one clock after `avs_read`, with no wait
  states. Read and write must not be asserted together; an assertion checks
  this.

### Building the beamformer's packets

| packet | sequence |
|---|---|
| short, 2 bytes | CS_SEL; DATA with 2 byte enables; wait for BUSY low |
| normal, 4 bytes | DATA with all 4 byte enables |
| long, 15 bytes | CTRL = cont; DATA 4 bytes; DATA 4 bytes; DATA 4 bytes; CTRL = 0; DATA 3 bytes, with each DATA write waiting for BUSY low |
| extra clocks | CTRL = extra_sclk; wait for BUSY low |
| CS without clock | CTRL = overwrite_cs; ... ; CTRL = 0 |

The beamformer also has a "reset" packet. Its exact waveform is defined by
the IC and is not reproduced here. The primitives above can produce CS
pulses, clock bursts and short words, but which combination forms that packet
has to be taken from the IC's documentation.

## Top level: pins around the processor

`mmd_serena_fpga` also carries the control lines the processor drives
through its parallel ports:

| pin | from |
|---|---|
| `out_serena_tx_en` | `pio_out[0]` |
| `out_serena_rx_en` | `pio_out[1]` |
| `out_serena_reset` | `pio_out[2]` |
| `pio_in[0]` | `in_serena_fe_ready` (other bits 0) |
| `led[7:2]`, `led[1]`, `led[0]` | `pio_led_out[7:2]`, `pll_locked`, constant 1 |
| `key_sw_db[4:0]` | `{sw[3:0], key1}` through `button_debouncer` |

`main_reset_n` is asynchronous. It goes through a two-flop synchroniser and
then drives the SPI master's synchronous reset. `button_debouncer`
synchronises each input with two flops. A bit changes only after its new
value has held for `CLK_FREQ * DEBOUNCE_US / 1e6` clocks, which is 10 ms, or
1,000,000 clocks at 100 MHz. The output follows the input
`STABLE_CYCLES + 2` clocks after a clean edge.

## What is taken from the original design and what is not

Taken from the original SPI master and FPGA top level:

* the split into register file, serial engine and extra-SCLK counter;
* the register and control-bit positions;
* the busy gating of the write enables, with the reset bit exempt;
* the byte-enable count as the word length, high byte first;
* the four-phase frame (lead, data, pre, post) and the continuous-operation
  input;
* the chip-select logic with two chip selects and an overwrite bit;
* BUSY as engine busy OR the extra-SCLK bit;
* the debouncer's name, ports and 100 MHz clock parameter;
* the pin assignment of RESET, RX_EN and FE_READY.

This design's own choices, where the original gives no value:

* SCLK = clock/2 and SPI mode 0. The only limits known are "up to
  100 Mbit/s" and a control clock below 100 MHz, and 50 Mbit/s meets both.
* `LEAD_CYCLES = 2`, `PRE_SCLK = 1`, `POST_SCLK = 1` and `EXTRA_PULSES = 8`.
* A one-clock read latency, and a pending start counting as busy.
* A DATA write with no byte enabled starts nothing. The receive register is
  cleared at each start.
* TX_EN on `pio_out[0]`.
* The debounce method, 10 ms debounce time and reset value of all ones.
* The reset synchroniser.

Known departures and gaps:

* The original IP also lists an interrupt output. Its behaviour is not
  described, and this core has none; software polls BUSY.
* The beamformer's register map, beam-table memory and packet formats are
  not modelled. The testbenches use a plain shift-register SPI target. The
  checks cover framing and bit order, but not compliance with the IC.
* The high-level command set (reset, init, SRAM write, RF-control write, beam
  select, power, status, raw register access) lives in processor firmware.
  It is not part of this RTL.
* The adapter board's beam trigger, beam number and LVDS beam clock lines
  have no source in this top level.

## Simulating

All files are SystemVerilog-2017. Every testbench prints
`TB_RESULT checks=N failures=M`, has a watchdog and ends with `$finish`.

| testbench | block | what it checks |
|---|---|---|
| `tb_serena_spi_master` | `serena_spi_master` | all word lengths, bits and read-back, busy and CS times, continuous mode, reset mid-word |
| `tb_serena_spi_master_corner` | `serena_spi_master` | the same checks with no lead time, no pre pulses and three post pulses |
| `tb_serena_extra_sclk` | `serena_extra_sclk` | pulse count and timing, self-clear, soft reset |
| `tb_serena_spi_regs` | `serena_spi_regs` | byte-enable lengths, start latency, read-back, busy gating, reset bypass |
| `tb_spi_master_serena_if` | `spi_master_serena_if` | 2/4/15-byte packets to either CS, BUSY timing, overwrite-CS, extra SCLK, soft reset |
| `tb_button_debouncer` | `button_debouncer` | bounce rejection, exact latency, independent bits |
| `tb_mmd_serena_fpga` | `mmd_serena_fpga`, default parameters | one full control session through the Avalon port, and a 10 ms debounced key press; counts every mechanism |

`tb/spi_target_model.sv` is the behavioural SPI target used by the last
three. Example, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/serena_spi_pkg.sv tb/tb_mmd_serena_fpga.sv --top-module tb_mmd_serena_fpga
./obj_dir/Vtb_mmd_serena_fpga
```

Replace the testbench name to run the others. The full-size top-level test
simulates 25 ms of 100 MHz time in about two seconds.

## Files

| file | contents |
|---|---|
| `rtl/serena_spi_pkg.sv` | register addresses, control bit positions, widths |
| `rtl/serena_spi_master.sv` | serial engine (frame phases, shift registers) |
| `rtl/serena_extra_sclk.sv` | extra-SCLK burst counter |
| `rtl/serena_spi_regs.sv` | Avalon-MM slave and registers |
| `rtl/spi_master_serena_if.sv` | SPI master IP: the three above plus pin logic |
| `rtl/button_debouncer.sv` | key/switch debouncer |
| `rtl/mmd_serena_fpga.sv` | FPGA top level |
| `tb/*.sv` | testbenches and the SPI target model |
