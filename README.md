# SPI master with built-in self-test

This is a small SPI master for one serial slave, such as a serial EEPROM. Each
transfer is a fixed frame of three bytes: a **control** byte, a
**status-address** byte and a **data** byte. The master also has a built-in
self-test (BIST) mode. In that mode three on-chip pattern generators supply the
three bytes in place of the input pins. A comparator watches the master's serial
output and counts every bit that goes out right and every bit that goes out
wrong. To test the serializer you only need GO pulses, then a look at the two
counters. No external tester or pattern memory is needed.

The design follows a published SPI-with-BIST design for a Xilinx Spartan-II
FPGA. The block structure, pin names, frame order, counter range and
pattern-generator sequence come from that design. The timing inside the frame,
the mode control and several interface details are this implementation's own
choices. Each one is listed under "Where this design chooses for itself" below.

```
                 in_control/in_status/in_data (normal mode)
                              |
  +--------+  status   +------v------+            spi_sclk, spi_sdat (MOSI)
  | LFSR1  |---------->|             |---------------------------------------> slave
  +--------+  control  |  mux +      |            spi_cs_n
  | LFSR2  |---------->|  spi_master |<--------------------------------------- spi_sdi (MISO)
  +--------+  data     |             |--> out_data, sd_counter
  | LFSR3  |---------->|             |
  +--------+           +------+------+
      |  same patterns        | spi_sdat, sd_counter
      +--------------->+------v---------+
                       | bist_comparator|--> bit_correct, bit_error
                       +----------------+
```

## The frame

The core of the design is the 7-bit step counter `sd_counter`. While `go` is
high it advances by one every clock, from 0 to 29 (0x1D). It then holds at 29
until `go` goes low, which returns it to 0 and arms the next frame. Every
output of the master is decoded from this counter. The meaning of each step is
defined once, in `spi_bist_pkg`, and both the master and the comparator use
that definition:

| step (dec) | step (hex) | what happens                                   | `spi_cs_n` | `spi_sclk` |
|------------|------------|-----------------------------------------------|------------|------------|
| 0          | 00         | idle                                           | 1          | low        |
| 1          | 01         | start: slave selected, no clock yet            | 0          | low        |
| 2 - 9      | 02 - 09    | control byte, bit 7 first                      | 0          | one pulse per step |
| 10         | 0A         | gap                                            | 0          | low        |
| 11 - 18    | 0B - 12    | status-address byte, bit 7 first               | 0          | one pulse per step |
| 19         | 13         | gap                                            | 0          | low        |
| 20 - 27    | 14 - 1B    | data byte, bit 7 first                         | 0          | one pulse per step |
| 28         | 1C         | gap; received byte moves to `out_data`         | 0          | low        |
| 29         | 1D         | done; counter holds until `go` falls           | 1          | low        |

So a frame is 24 data bits in 29 clocks from the clock edge that sees `go` high
until `sd_counter` reads 29.

### Clocking and sampling

The master works in SPI mode 0: the clock idles low, both sides sample on the
rising edge and shift on the falling edge. One bit takes one system clock.
During a bit step, `spi_sclk` is the inverted system clock, gated by a
registered enable:

```
clk        _/~~\__/~~\__/~~\__/~~\_
step        |  1  |  2  |  3  | ...       (changes on rising clk)
spi_sclk   ________/~~\__/~~\__/~~         (rises mid-step, falls at step end)
spi_sdat   ---X bit7 X bit6 X bit5 ...    (changes on rising clk = falling sclk)
```

- `spi_sdat` (MOSI) is registered. It changes on the rising system-clock edge
  at the start of each step, so it is stable around the rising `spi_sclk`
  edge.
- `spi_sdi` (MISO) is sampled on the falling system-clock edge, which is the
  rising `spi_sclk` edge. It goes into an 8-bit shift register. The last eight
  bits received, from the data-byte steps, are copied to `out_data` at step 28,
  so they show from step 29 on.
- `spi_sclk` is a combinational AND of a flip-flop and `~clk`. It is meant to
  leave the chip and clocks nothing inside the design. On an FPGA or ASIC you
  may prefer a clock-forwarding primitive (ODDR or similar), or a divided clock
  if the slave is slower than the system clock. The design has no divider: the
  SPI clock runs at the system clock rate.
- The byte inputs are not latched when the frame starts. Each bit is read at
  the clock edge that begins its step. A byte therefore only has to be valid
  from the start of its own phase until the end of the frame.

### What comes back on `out_data`

`out_data` is whatever the slave drove on MISO during the eight data-byte
steps. What that byte means depends on the slave. The simulation model in
`tb/spi_slave_model.sv` is a plain 8-bit shift-register slave: its register is
rotated through MOSI and MISO. It therefore returns, during the third byte, the
second byte it received. So with that model `out_data` equals the
status-address byte of the same frame, and the end-to-end test uses this.

### `go` and `ss_n`

- `go` is level-sensitive. High runs one frame. Low at any time, including in
  the middle of a frame, returns the master to idle and deselects the slave.
- `ss_n` is an active-low enable of the master port. While it is high the
  counter stays at 0, whatever `go` does.

## Normal mode and self-test mode (`spi_bist_top`)

`bist_mode` selects the source of the three bytes:

- **Normal (`bist_mode = 0`).** The bytes come from `in_control`, `in_status`
  and `in_data`. The comparator does not count.
- **Self-test (`bist_mode = 1`).** LFSR2 supplies the control byte, LFSR1 the
  status-address byte and LFSR3 the data byte. The comparator gets the same
  three patterns and counts.

In self-test mode the generators step once per frame, at step 28, after the
last data bit. Each frame therefore sends new patterns, held stable for the
whole frame. The comparator checks `spi_sdat` against the expected bit at the
end of each of the 24 bit steps. It increments `bit_correct` or `bit_error`
(8 bits each, saturating, cleared only by reset). A clean run of N frames ends
with `bit_error = 0` and `bit_correct = min(24·N, 255)`.

What the self-test covers: the byte multiplexers, the bit selection and the
output register of the master, up to the `spi_sdat` pin. It does not cover the
receive path (`spi_sdi` to `out_data`), which has no reference to compare
against.

## The pattern generator (`lfsr8`)

The generator reproduces exactly the sequence of the reference design's 8-bit
pattern generator. From the reset value 0x01 it goes

```
0x01, 0x03, then 0x13 0x16 0x1D 0x0E 0x18 0x05 0x0B, repeating for ever
```

The only linear next-state function that gives these values is

```
d[0] = q[0] ^ q[4];  d[1] = q[0];  d[4] = q[1];  d[2] = q[4];  d[3] = q[2];  d[7:5] = q[7:5]
```

That is a three-stage maximal-length LFSR (feedback x^3 + x^2 + 1, period 7):
stages q0, q1 and q4. Two more delay stages follow (q2, q3), and the stages are
wired to the output bus in that order. Bits 7:5 keep their reset value.

Be aware of what this means for test quality. There are only seven distinct
patterns, and bits 7:5 of every pattern are 0. A self-test therefore never
sends a 1 in the top three bits of any byte. A fault that forces those bits to
0 goes unnoticed. The three generators start at three points of the same cycle
(seeds 0x01, 0x03 and 0x13, all parameters of `spi_bist_top`), so the three
bytes of a frame differ. If you want better coverage, replace the feedback in
`lfsr8` with a maximal-length 8-bit polynomial. The testbenches that check the
exact sequence would then need new expected values.

## Top-level pins (`spi_bist_top`)

| pin           | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | system clock, one frame step per cycle |
| `reset_n`     | in  | 1     | asynchronous reset, active low, whole design |
| `go`          | in  | 1     | high: run one frame; low: idle |
| `ss_n`        | in  | 1     | active-low enable of the master |
| `bist_mode`   | in  | 1     | 1: self-test patterns and counting; 0: bytes from pins |
| `in_control`  | in  | 8     | control byte (normal mode) |
| `in_status`   | in  | 8     | status-address byte (normal mode) |
| `in_data`     | in  | 8     | data byte (normal mode) |
| `spi_sdi`     | in  | 1     | MISO |
| `out_data`    | out | 8     | byte received during the data-byte steps |
| `sd_counter`  | out | 7     | frame step, 0..29 |
| `spi_sclk`    | out | 1     | SPI clock, mode 0 |
| `spi_sdat`    | out | 1     | MOSI |
| `spi_cs_n`    | out | 1     | slave select, active low |
| `bit_correct` | out | 8     | self-test: bits seen correct |
| `bit_error`   | out | 8     | self-test: bits seen wrong |

Parameters: `COUNT_W` (8) sets the counter width. `SEED_STAT`, `SEED_CTRL` and
`SEED_DATA` (0x01, 0x03, 0x13) set the generator seeds.

## Where this design follows the reference and where it chooses for itself

Taken from the reference design:

- the blocks: three LFSRs, the SPI module and the comparator;
- the wiring of the blocks, with the LFSRs feeding both the SPI module and the
  comparator;
- the master's pin names and widths, including the 7-bit `SD_COUNTER`;
- the byte order (control, status address, data) and the frame counted from 0
  to 0x1D;
- the normal-mode example frame 0x14 / 0x00 / 0xAA;
- the pattern sequence of the LFSR;
- MSB-first shifting.

This design's own choices, where the reference gives no detail:

- **Frame timing.** Which step carries which bit, the start step and the three
  gap steps, and one step per system clock.
- **SPI mode 0**, with a gated `spi_sclk`. There is no clock divider.
- **`spi_cs_n`.** The reference pin list has no slave-select output, although
  its test set-up shows a slave-select line, so one was added.
- **`ss_n` as an active-low enable.** The reference shows an SS input without
  saying what it does.
- **`go` is level-sensitive.** Taking it low mid-frame aborts the frame.
- **`out_data` is the byte received during the data phase.**
- **A separate `bist_mode` pin.** The reference pin table describes `reset_n`
  as selecting normal or BIST mode. Here `reset_n` is a plain reset.
- **Reset.** The LFSRs share the top-level reset rather than having a reset pin
  of their own.
- **Generator stepping and seeds.** One generator step per frame rather than
  per clock, and the seeds 0x03 and 0x13 for LFSR2 and LFSR3.
- **The comparator's inputs.** It takes `sd_counter` and an enable so that it
  knows which bit is on the line. The reference comparator shows neither.
- **The comparator's counters.** Their width (8) and saturation. The
  reference's widths are not known.
- **No BIST controller or signature register.** The generic BIST structure
  includes a controller unit and a MISR, but the reference implementation
  leaves both out, and so does this one. Frames are started by `go`, and
  responses are compared bit by bit instead of being compressed.

Not checked against the reference: its FPGA resource and timing figures
(26 slices, 34 flip-flops, 7.8 ns minimum period on a Spartan-II). A generic
coarse synthesis of `spi_bist_top` gives 57 flip-flop bits and about 140
word-level cells: 26 bits in the master, 16 in the comparator and 5 live bits
in each generator. The design fits easily in the smallest Spartan-II device.

## Files

| file | contents |
|------|----------|
| `rtl/spi_bist_pkg.sv` | step constants, step decoder, bit selection (shared) |
| `rtl/spi_master.sv` | the SPI master |
| `rtl/lfsr8.sv` | the pattern generator |
| `rtl/bist_comparator.sv` | the bit comparator and counters |
| `rtl/spi_bist_top.sv` | top level: generators, mode multiplexers, master, comparator |
| `tb/spi_slave_model.sv` | behavioural 8-bit shift-register SPI slave (simulation only) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulating

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
calls `$finish`. From the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/spi_bist_pkg.sv tb/tb_spi_bist_top.sv --top-module tb_spi_bist_top
./obj_dir/Vtb_spi_bist_top
```

Replace `tb_spi_bist_top` with `tb_spi_master`, `tb_lfsr8` or
`tb_bist_comparator` to run a unit test. Each runs in well under a second. To
lint the design: `verilator --lint-only -Wall -Irtl rtl/spi_bist_pkg.sv
rtl/lfsr8.sv rtl/spi_master.sv rtl/bist_comparator.sv rtl/spi_bist_top.sv`.

What the testbenches check:

- **`tb_spi_master`** acts as the slave. It runs the example frame 0x14 / 0x00 /
  0xAA, with the data byte applied only after the frame has started, then 20
  random frames. For each frame it checks:
  - the 24 bits sent, in order;
  - `out_data` against the byte the testbench drove on MISO;
  - 24 clock pulses, and none while the slave is deselected;
  - 28 clocks of slave select;
  - 29 clocks from `go` to step 29;
  - the counter increasing by one each clock and then holding.

  It also checks that `ss_n` holds the master idle, and that an abort
  mid-frame returns it to idle.
- **`tb_lfsr8`** checks the reset value, the exact sequence over three periods,
  hold with `enable` low, and reset in mid-sequence.
- **`tb_bist_comparator`** drives whole frames itself and injects bit errors:
  random masks, then a single error at each byte's first and last bit. It
  checks both counts after every frame, that gap steps and `enable = 0` count
  nothing, and that both counts saturate at 255.
- **`tb_spi_bist_top`** runs the whole design at its default parameters, with
  the slave model on the bus:
  - 7 normal frames, in which the slave must receive the bytes in order and
    `out_data` must echo the status byte;
  - 13 self-test frames, checked against the sequence above, with
    `bit_correct` growing by 24 per frame up to saturation and `bit_error`
    staying 0;
  - one frame with `spi_sdat` forced high, in which `bit_error` must rise by
    the number of 0 bits in that frame's patterns;
  - an aborted frame and an `ss_n` hold.

  The test counts how often each of these mechanisms happened, and fails if any
  of them never did.

The master also carries two assertions: `spi_sclk` only pulses while the slave
is selected, and the step counter never passes 29.
