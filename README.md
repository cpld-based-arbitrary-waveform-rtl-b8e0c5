# DDS arbitrary waveform generator

A low-cost arbitrary waveform generator built on direct digital synthesis (DDS). One period
of any waveform, up to 32768 samples of 12 bits, is loaded into a waveform RAM through an 8-bit
PC parallel port. A 24-bit phase accumulator then steps through that RAM at a fixed clock. Each
sample it reads goes to a 12-bit DAC, whose staircase output an analog low-pass filter smooths.
The output frequency depends only on the tuning word M added to the phase on each clock:

    Fout = Fclk * M / 2^24          (Fclk = 10 MHz)

| M                         | Fout     | samples per output cycle |
|---------------------------|----------|--------------------------|
| 1                         | 0.596 Hz | 32768 (each held 512 clocks) |
| 2^9 = 512                 | 305 Hz   | 32768 (one per clock)    |
| (2^24 - 1) / 10 = 1677721 | 1.0 MHz  | 10 (the upper limit for low distortion) |

The RAM holds 8 times more than a 4096-level waveform needs. That lets it store several
carrier cycles of an AM or FM signal, for example 3200 carrier cycles of 10 samples under one
modulation cycle. Once programmed, the generator runs on its own, and the PC is free.

## Blocks

```
 parallel port ──> add_data_decoder ──Y0..Y2──> pir ──M──┐
 (data, Add/Data,     │   │                              v
  IOW)                │   └─Y4,Y5──> mode_selector   phase_adder <──┐
                      │              │ ck_en  │CS,WR!,OE!  │ sum      │
                      │ byte         v        │            v          │
                      └──> data_buffer   phase_register ──PR─────────┘
                                │              │ PR[23:9]
                                v D0..D11      v ADD0..ADD14
                              wave_ram (32K x 12) ──> dac12_model ──> (amplifier + LPF, not modelled)
```

| module             | role |
|--------------------|------|
| `awg_top`          | board: `awg_cpld` + `wave_ram` + `dac12_model` |
| `awg_cpld`         | the programmable-logic part: every block below except the RAM and DAC |
| `add_data_decoder` | host bus: address register, select decode Y0..Y7, system reset, data write strobe |
| `pir`              | Phase Increment Register: the 24-bit M, loaded in three bytes |
| `phase_adder`      | 24-bit adder, PR + M, carry out marks a phase wrap |
| `phase_register`   | 24-bit Phase Register (PR); PR[23:9] is the RAM address |
| `mode_selector`    | Programming/Generation mode bit, RAM write/chip-select/output-enable, PR advance |
| `data_buffer`      | host byte onto the 12-bit RAM data bus |
| `wave_ram`         | 32K x 12 memory in two lanes (8 + 4 bits) |
| `dac12_model`      | behavioural model of the 12-bit +/-5 V DAC (not synthesizable in intent) |
| `awg_pkg`          | widths and the register map |

## Host register map and write protocol

The host has 8 data lines and two control lines, Add/Data and IOW. A rising edge on IOW is one
write cycle. With Add/Data = 1, the byte is a register address. With Add/Data = 0, it is data
for the register last addressed.

| address | register | data |
|---------|----------|------|
| 0 | PIR byte 0 | M[7:0] |
| 1 | PIR byte 1 | M[15:8] |
| 2 | PIR byte 2 | M[23:16] |
| 4 | mode       | bit 0: 1 = Programming, 0 = Generation |
| 5 | RAM data   | sample bytes (see below) |
| bit 3 set | system reset | held while the latched address has bit 3 set |

Addresses 3, 6 and 7 select nothing. The address register sits on the data bus, and its bit 3
is the reset line. So an address write with bit 3 set (8) resets the system, and the next
address write releases the reset. The reset clears the Phase Register and the RAM lane toggle.
It leaves M and the mode bit alone.

The host lines go through a two-flop synchroniser on the 10 MHz clock. A data write acts 3
clocks after IOW rises. The host must hold the data and Add/Data lines steady from 3 clocks
before the IOW rising edge until 3 clocks after it, and keep IOW high and low for at least 2
clocks each. A PC parallel port is far slower than that.

## Programming the waveform: the phase register as address counter

Nothing in the design counts RAM addresses. The Phase Register does that job in both modes:

* **Generation mode** (mode bit 0): PR <= PR + M on every clock. The RAM is read at PR[23:9],
  and the sample reaches the DAC.
* **Programming mode** (mode bit 1): PR adds M only once per stored sample. With M = 2^9, that
  adds exactly 1 to PR[23:9], so the address steps through the RAM.

A sample has 12 bits and the host bus has 8. Each sample therefore takes two data writes to
register 5. The first goes to the low lane (D0..D7) and the second to the high lane (D8..D11;
only the low nibble of the byte is used). The second write also advances PR. The full
sequence:

1. address 4, data 1: Programming mode
2. address 8, then address 0: reset (PR = 0, next write goes to the low lane)
3. addresses 0, 1, 2 with data 0x00, 0x02, 0x00: M = 2^9
4. address 5, then 2 x 32768 data bytes: low byte, high nibble, for samples 0..32767
5. addresses 0..2: the wanted M
6. address 4, data 0: Generation mode

After 32768 samples the 15-bit address has wrapped to 0. Filling fewer samples is possible,
but Generation mode always sweeps the whole RAM, so a shorter table must be repeated to fill
it.

## Timing

* Generation mode: address from PR in clock t. The sample is on `dac_code` in t+1 (registered
  RAM read) and on `dac_vout_uv` in t+2 (DAC latch).
* `phase_wrap` is the adder carry while PR advances. It pulses once per output cycle.
* The RAM outputs are enabled only in Generation mode. In Programming mode `dac_code` holds
  its last value.

## How this RTL departs from the original circuit

The original is a schematic design in a small CPLD with an external SRAM. This RTL keeps its
block structure, widths and register map, with these changes:

* **One clock.** The original clocks its registers from the IOW strobe and switches the Phase
  Register's clock between the oscillator and the RAM write pulse. Here everything runs on the
  10 MHz clock: the host lines are synchronised, and the mode selector drives a clock enable.
* **No tri-state bus.** The RAM has a separate write bus, driven by `data_buffer`, and a read
  port. `wave_ram` is a synchronous array with a one-clock read, standing in for the
  asynchronous SRAM chip.
* **Lane order and PR advance.** The original alternates between two RAM chip selects with a
  pair of flip-flops. This design fixes the order as low byte first, and advances PR only on
  the second byte, so the address steps once per complete sample.
* **Reset.** A power-on reset input `por_n` is added. At power-on: M = 0, Programming mode,
  address register 0.
* **Frequency step.** Because the accumulator wraps at 2^24, the step is Fclk / 2^24, not
  Fclk / (2^24 - 1). The two differ by 6 parts in 10^8.
* **DAC model.** The DAC is offset binary, from code 0 = -5 V to code 4095 = +5 V, in 10 V / 4095
  = 2.442 mV steps. Its output is an integer in microvolts, rounded. The amplifier, its
  output-level adjustment and the low-pass filter are analog and not modelled.
* **Observation pins.** `phase`, `phase_wrap`, `prog_mode` and `ram_addr` are brought out of
  the top for test; the original has no such pins.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_add_data_decoder` | select decode for random addresses, reset from bit 3, one data strobe 3 clocks after IOW, captured byte |
| `tb_pir`              | random byte-lane loads against a reference word |
| `tb_phase_adder`      | sum and carry against 64-bit arithmetic, carry across bit 15/16 |
| `tb_phase_register`   | random enable/reset/data against a reference register, address field |
| `tb_mode_selector`    | lane alternation, PR advance on the second byte only, reset of the lane, both mode switches |
| `tb_data_buffer`      | all bytes, enabled and disabled |
| `tb_wave_ram`         | fills and reads back all 32768 words, lane independence, output hold |
| `tb_dac12_model`      | end points, LSB size, latch, random codes against the ideal transfer |
| `tb_awg_cpld`         | 64 samples programmed via the RAM pins, then phase, address and wrap in Generation mode |
| `tb_awg_top`          | whole design at full size, see below |
| `tb_awg_modulation`   | AM at a 1 MHz carrier with modulation ratios 100 and 3200, and FM with +/-20 % deviation; every sample checked, plus carrier cycles, envelope cycles and modulation depth (AM) and carrier period spread (FM) |

`tb_awg_top` runs the top with its default parameters. It programs one sine cycle of 32768
samples through the host protocol. It then reads the whole RAM back at M = 2^9 and checks every
sample at the DAC. Next, at M = 1677721 (1 MHz), it checks every clock for 100000 clocks, with
an output period of 10 clocks. Last, at M = 1 (0.6 Hz), it runs one full 2^24-clock output
cycle and checks for exactly one phase wrap. It also counts address writes, data writes,
resets, PIR loads, low- and high-lane writes, programming address steps, mode switches and
phase wraps, and fails if any of them never happened. It takes about 17 million clocks, about
10 s with Verilator.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/awg_pkg.sv tb/tb_awg_top.sv --top-module tb_awg_top -o sim
./obj_dir/sim
```

Swap in another testbench name for the others. The clock in every testbench is 10 MHz
(`#50` half period at 1 ns units).

## Changing the design

The widths live in `awg_pkg`. `ADDR_W` and `DATA_W` set the RAM depth and sample width.
`PHASE_W` sets the accumulator width, but `awg_cpld` wires exactly three PIR byte registers
(addresses 0..2), so a width other than 24 also needs more select lines there. The RAM address is always the top `ADDR_W` bits of the phase, so the
programming step is `2^(PHASE_W - ADDR_W)`. The 8-bit host bus splits a sample into
`LO_W` = 8 and `HI_W` = `DATA_W - 8` bits. A sample wider than 16 bits would need a third lane
in `mode_selector` and `wave_ram`.
