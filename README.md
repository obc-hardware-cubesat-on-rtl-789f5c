# CubeSat on-board computer glue logic

A small satellite's on-board computer (OBC) is built around a 16-bit
microcontroller (an Infineon C161PI) with external PROM, flash and 4 MB of
static RAM. One job is beyond the microcontroller: its camera streams a
1280 x 1024 picture of 10-bit pixels at 12.5 Mpixel/s, too fast for software
to copy. The glue logic in one small antifuse FPGA solves that with
hardware direct memory access (DMA). While a picture is taken, the
microcontroller leaves the bus and waits in idle mode. The FPGA counts
addresses, selects the RAM chips in turn and strobes every pixel into RAM.
When the last pixel is stored, it wakes the microcontroller with an
interrupt. When no picture is being taken, the same FPGA decodes the
microcontroller's chip selects into the PROM, flash and RAM selects.

This repository holds that logic as synthesizable SystemVerilog. It has two
more parts:

- **Boot supervisor.** The power supply unit chooses the boot ROM (PROM or
  flash) and restarts a hung microcontroller. Its algorithm is written here
  as logic.
- **Error-correcting code.** Bytes kept in the radiation-sensitive RAM are
  protected by a (15,5) BCH code that corrects two bit errors per 15-bit
  word. This is a combinational codec.

These three parts do not connect to each other directly. The
microcontroller sits between them and is not part of this RTL.

## Memory system and address decoding

The microcontroller has a 20-bit address bus and a 16-bit data bus. Its
chip-select unit produces five window signals, CS0#..CS4#, and the FPGA
turns them into device selects:

| window | devices | selected by |
|---|---|---|
| CS0# | PROM (A18 = 0) and flash (A18 = 1), each two 128 kB byte-wide devices | `rom_decoder` |
| CS1#..CS4# | RAM1..RAM8, 512 kB (256k x 16) each, two chips per window | `ram_decoder`, A19 picks the chip |

- **Word addresses.** Address bit A0 selects bytes, so memory word
  addresses start at A1. The RAM uses A1..A18 and the ROMs use A1..A17.
- **RAM windows.** Window CSk# selects RAM(2k-1) when A19 = 0 and RAM(2k)
  when A19 = 1.
- **ROM selects.** PROM# = CS0# OR A18 and FLASH# = CS0# OR NOT A18.
  Each ROM select is then split between the low-byte device (needs A0 = 0)
  and the high-byte device (needs BHE# = 0). To the microcontroller, each
  ROM type then looks like one 16-bit memory.
- **RAM byte enables.** LB# = A0 and UB# = BHE# (`byte_enable`), so byte
  and word accesses both work.
- **Word enable.** During a picture the camera logic raises `word_en`.
  This forces both byte enables on, because each pixel fills a whole word.
- **Merged selects.** The camera logic has its own RAM chip selects. They
  are merged into the RAM selects with an AND of the active-low signals, so
  either side can select a chip.
- **Merged write strobe.** The two write strobes are merged the same way:
  `rw_n = rw_mcu_n & cam_we_n`.

Flash programming needs no extra hardware. Software writes the
AA / 55 / A0 command words to offsets 0x555 / 0x2AA / 0x555 of the flash
half of the window, then the data word. Data bytes are doubled, for example
0xAAAA, so both byte devices see the command. `tb_flash_program` runs this
sequence against models of the byte-wide devices.

## Taking a picture: the camera DMA

This is the part that needs care. The sequence is:

1. **Arm.** The microcontroller pulses CCLR, which clears the address
   counter and re-arms the start flag. It raises CCE (capture enable) and
   triggers the camera. It then puts its bus pins in high impedance and goes
   into idle mode, running from its on-chip XRAM.
2. **Start.** The camera answers with a SYNC pulse when integration starts.
   SYNC clears the start flag, so a transfer is now in progress (`active`).
   From then on:
   - the FPGA drives the RAM address lines (`cam_addr_oe`, and `bus_owner`
     is `BUS_CAMERA`);
   - both byte enables are forced on;
   - the camera chip-select decoder is enabled.
3. **Pixels.** The camera sends rows of 1280 pixels, one per master clock
   period MCLK (80 ns). A new pixel appears when HCLK falls. Between rows,
   VCLK is high for 44 MCLK, and the bus then carries no valid data.
4. **Write strobe.** RAM stores a word on the rising edge of R/W#. R/W#
   must have been low for at least 50 ns, and the address must not change
   before the edge. `cam_write_pulse` therefore keeps the camera strobe low
   and, once per pixel, pulses it high for a short time:

   ```
   clk (100 MHz) |0 |1 |2 |3 |4 |5 |6 |7 |8 |9 |10|11|
   HCLK          ____________/‾‾‾‾‾‾‾‾‾‾‾\___________
   data          =X== pixel n ======================X== pixel n+1
   cam_we_n      ‾‾‾\_____________________/‾‾‾‾‾\_____   rise at 7 stores pixel n
   acc           _________________________/‾‾\________
   address       ====== n ============================X== n+1 (clock 8)
   ```

   - **Pulse timing.** HCLK and VCLK pass a two-flop synchroniser, so the
     strobe rises 3 clocks after HCLK rises. It stays high for
     `T_P_CYCLES` = 2 clocks (t_p = 20 ns, limit 30 ns). It is then low for
     6 clocks (t_wp = 60 ns, minimum 50 ns).
   - **Counter step.** `acc` is high in the cycle the strobe rises. The
     21-bit counter steps one clock later, 10 ns after the rising edge.
   - **When the strobe stays high.** It stays high outside a transfer,
     while VCLK is high and after `finish`.
5. **Chip switching.** The counter's low 18 bits are the word address
   inside a RAM chip. Bits 20..18 number the chip: block b selects
   RAM(b+1). One picture is 1280 x 1024 = 5 x 2^18 words, which is exactly
   RAM1..RAM5.
6. **Finish.** When the counter steps into block 5, `finish` goes high.
   The strobe stays high, the FPGA releases the address lines, and `finish`
   (wired to the microcontroller's EX7IN input) wakes the microcontroller.
   The picture is then ordinary RAM contents.
7. **Next picture.** The next CCLR clears `finish` and re-arms the logic.

**Timing of a whole picture.** A row takes (1280 + 44) MCLK = 105.9 us.
Integration takes 1028 row times and readout 1024 rows, so one picture
takes about 217 ms from SYNC to `finish`. The full-size simulation measures
21,734,463 clocks at 100 MHz, which is 217.3 ms.

**A harmless extra write.** At the end of each row, the strobe rises once
more when VCLK goes high. This stores one word of blanking data at the next
address. The first pixel of the next row then overwrites it. After the last
row, `finish` blocks this edge, so no RAM outside the picture is written.

**Bus rule.** The FPGA has an assertion that the microcontroller's write
strobe stays inactive while the camera owns the bus. The tri-state address
drivers themselves are pads on the board, outside this RTL.

## Boot-ROM selection and watchdog

`psu_boot_supervisor` drives the microcontroller's BootSelect pin (port
P6.7: 0 = PROM, 1 = flash), its supply switch and its reset:

- **Power-on.** The supervisor selects the PROM and powers the
  microcontroller.
- **Boot attempt.** If no watchdog command (`kick`) arrives within
  `BOOT_TICKS`, the boot has failed. The supervisor inverts BootSelect,
  powers the microcontroller off for `OFF_TICKS` and tries again. PROM and
  flash are therefore tried in turn.
- **Watchdog.** The first kick marks a good boot. From then on each kick
  restarts a `WDT_TICKS` timer. If the timer runs out, the microcontroller
  is power-cycled and keeps the same BootSelect.
- **Switching to new software.** `sel_flash`, a command sent before new
  software is used, sets BootSelect to flash. If that flash boot fails, the
  boot-attempt rule falls back to the PROM.

The timer lengths (5 s, 10 s, 3 s with a 1 ms tick) are this
implementation's choice. The original design only says "a few seconds".

## Error-correcting code for stored bytes

`bch_byte_codec` splits a byte into two 5-bit pieces: `data[4:0]`, and
`data[7:5]` padded with zeros. Each piece is encoded into a 15-bit word of
the (15,5) BCH code over GF(16), using the field polynomial x^4+x+1 and the
generator x^10+x^8+x^5+x^4+x^2+x+1. A byte therefore takes 30 bits of
storage.

The decoder (`bch_15_5_decoder`) works in three steps:

1. It forms the syndromes, which are the received word evaluated at
   alpha^1..alpha^6.
2. It computes a degree-2 error-locator polynomial in closed form. For up
   to two errors this is the same polynomial that Euclid's algorithm gives.
3. It tests every bit position with Horner's rule and flips the positions
   that are roots.

The result is then re-checked. Syndromes that two errors cannot explain
raise `rd_uncorrectable`, and so does a decoded pad bit that is set. The
code's minimum distance is 7, so three errors in one half are always
detected, never miscorrected.

In the original system this code runs as microcontroller software. Here it
is one combinational encoder/decoder pair, placed beside the other parts in
the top level.

## Module map

| module | role |
|---|---|
| `obc_top` | top: `obc_fpga`, `psu_boot_supervisor` and `bch_byte_codec` side by side |
| `obc_fpga` | the FPGA: decoders, byte enables, camera strobe, counter, camera decoder |
| `rom_decoder`, `ram_decoder`, `byte_enable` | microcontroller-side decoding (combinational) |
| `cam_write_pulse` | SYNC/VCLK/finish gating, per-pixel strobe, `acc` |
| `cam_addr_counter` | 21-bit image address counter |
| `cam_cs_decoder` | counter bits 20..18 to RAM1..RAM5 selects, `finish` |
| `psu_boot_supervisor` | boot-ROM selection and external watchdog |
| `bch_byte_codec`, `bch_15_5_encoder`, `bch_15_5_decoder`, `bch_pkg` | BCH code |
| `obc_pkg` | shared sizes and the `bus_owner_e` type |

In `tb/`, `sram_model` (a 256k x 16 asynchronous SRAM) and `camera_model`
(the camera's HCLK/VCLK/SYNC timing and a pixel pattern) are behavioural
models used only by the testbenches.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if it
hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/obc_pkg.sv rtl/bch_pkg.sv tb/tb_obc_top.sv --top-module tb_obc_top
./obj_dir/Vtb_obc_top
```

The testbenches are:

- **`tb_obc_top`.** Runs the whole design at full size: RAM and ROM
  accesses, the flash command sequence, a complete 1280 x 1024 picture
  (every pixel is compared), the supervisor with its default timers, and
  the ECC. It takes about 3 minutes.
- **`tb_obc_fpga`.** Runs the same picture flow with a 9-bit counter
  (64-word RAM chips, a 32 x 10 image) in well under a second.
- **`tb_flash_program`.** Puts models of the two PROM and two flash byte
  devices on the CS0 window. It programs 64 words with the unlock
  sequence, reads them back, and checks that the PROM is never written.
  It also checks that a write without the sequence changes nothing and
  that a byte write reaches only one device.
- **Block testbenches.** The decoders are checked exhaustively. The BCH
  codec is checked for all 256 bytes with single, double and triple errors.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `obc_fpga` | `COUNT_W` | 21 | counter width; RAM word address is `COUNT_W-3` bits |
| `obc_fpga` | `BLOCKS` | 5 | RAM chips filled by one picture |
| `obc_fpga`, `cam_write_pulse` | `T_P_CYCLES` | 2 | strobe high time in clocks |
| `psu_boot_supervisor` | `BOOT_TICKS`, `WDT_TICKS`, `OFF_TICKS` | 5000, 10000, 3000 | timers in ticks |

The strobe timing assumes a clock of 8 x MCLK. With a different clock,
choose `T_P_CYCLES` so that t_p <= 30 ns and so that the remaining low
time of the pixel period is at least 50 ns.

## Departures from the original design and open points

- **Strobe generation.** The original makes the short write pulse from PEEL
  gate delays on HCLK. This version is synchronous: it uses a 100 MHz clock
  (an assumption), synchronisers, and a counted pulse. The nanosecond
  margins match the original analysis. The latency from HCLK is 3 clocks.
- **Counter clock.** The counter is clocked by the FPGA clock with `acc` as
  enable, not clocked by `acc` itself.
- **`finish` equation.** The printed form of the `finish` equation is
  inconsistent with the prose. This RTL follows the prose: `finish` is high
  exactly when the counter reaches block 5 (binary 101).
- **Which RAM chips the camera fills.** The camera writes to RAM1..RAM5.
  The original memory map could not be confirmed, so this is an
  assumption.
- **CS/A19 pairing.** The pairing of CSk# and A19 with RAM(2k-1) and
  RAM(2k) is assumed.
- **ROM byte lanes.** The split of each ROM select into byte lanes with
  A0/BHE# is inferred from the existence of separate low-byte and
  high-byte select lines.
- **CCE and CCLR.** These pins are read as capture enable and counter clear
  driven by microcontroller port pins. Their function was not spelled out.
- **Supervisor.** The supervisor's timer lengths and its "good boot" signal
  (the first watchdog command) are assumptions.
- **BCH decoder.** The decoder corrects two errors, as the original intends,
  although the code could correct three. Euclid's algorithm is replaced by
  the equivalent closed-form solution for two errors.
- **Not in this RTL.** The following are bought parts or software and are
  not included: the microcontroller (including its I2C master, ADC,
  chip-select unit and PLL), the RAM, PROM and flash chips, the camera, the
  RS232 level shifter, the temperature sensors, the PSU power switch, and
  the checksum routines for I2C frames and flash contents.
