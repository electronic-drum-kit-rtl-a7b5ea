# Two-pad electronic drum kit: FPGA playback engine

Hitting a pad plays back a stored drum sound. How loud it plays depends on how hard
the pad was hit and on a master volume knob. Each pad holds a piezo transducer. A
microcontroller watches the pads through its ADC. For every hit it sends the FPGA one
16-bit SPI word that names the drum and gives the hit strength and the knob position.
The FPGA does the rest. It starts the drum's sample playback at the recording's own
sample rate, scales each sample with right shifts, adds the two drums together and
drives an 8-bit R-2R resistor-ladder DAC. The two drums have independent voices. A
cymbal keeps ringing when the snare is hit, and a new hit on a drum that is still
sounding restarts that drum, so drum rolls work.

The original kit had a snare and a cymbal. This RTL keeps that configuration, its
sample counts and its timing constants. It also holds two small stand-alone FPGA
utilities that the kit used to load and check an external parallel EEPROM.

```
 SPI_clk, SPI_in ──► spi_rcv ──► drum_decode ──┬─► playback_fsm ─► lpm_rom_snare ──► instr_volume_cntrl ─┐
                     │ byte 1:    (ID 1 / ID 2) │   (snare)                           (snare)              │
                     │ univ vol,                └─► playback_fsm ─► lpm_rom_cymbal ─► instr_volume_cntrl ─┤
                     │ drum ID                      (cymbal)                          (cymbal)             │
                     └── universal volume [7:2] ─────────────────────────────────────► both voices         │
                                                                       sound_out[7:0] ◄─ reg ◄─ add_sounds ◄┘
```

## The hit word

The microcontroller is the SPI master. It runs 16-bit transfers at 1/32 of its 40 MHz
clock, so the SPI clock is 1.25 MHz. Data changes on the falling edge of SPI_clk and is
sampled on the rising edge. The FPGA only listens: there is no MISO and no slave
select.

| bits  | field            | meaning                                                    |
|-------|------------------|------------------------------------------------------------|
| 15:10 | universal volume | master volume knob, 0..63                                  |
| 9:8   | drum ID          | 1 = snare, 2 = cymbal, 0 and 3 = no drum                   |
| 7:0   | hit strength     | peak ADC reading of the hit; higher means louder           |

`drum_pkg::spi_msg_t` describes this layout. After every hit the microcontroller also
sends an all-zero word, which the FPGA ignores. Hit detection, peak tracking and
debouncing all run in the microcontroller's software and are not part of this RTL. The
microcontroller starts a hit when the pad voltage rises above a threshold and ends it
when the voltage falls below a lower one, then waits a while so the pad can stop ringing.

**Framing.** Nothing marks the start of a word. `spi_rcv` counts 16 rising SPI clock
edges from reset and treats each group of 16 as one word. A missing or extra SPI clock
edge would misalign every later word until the next reset.

**Zero means "no news".** `spi_rcv` shows a received word on its two byte outputs for a
single `clk` cycle. The rest of the time both outputs are 0. Downstream blocks treat any
non-zero value as an event and any zero as nothing. One result: a universal volume of 0
never reaches the voices. The lowest knob band is 1..7, and it mutes them.

## A voice: sample playback

Each drum has a `playback_fsm`, a sample ROM and an `instr_volume_cntrl`. The FSM has
four states:

| state    | what it does                                                                 |
|----------|------------------------------------------------------------------------------|
| S0_WAIT  | idle at address 0 until the voice's hit strength is non-zero                 |
| S1_START | counters cleared; address 0 is presented                                     |
| S2_HOLD  | counts clock cycles while the current sample is held                         |
| S3_NEXT  | steps to the next address, or goes back to S0_WAIT after the last sample      |

A non-zero hit strength forces S1_START from any state, which restarts the sound.

Two inputs set the sound:

- `duration_limit` is the number of clock cycles per sample. It is the clock frequency
  divided by the sample rate of the recording.
- `addr_limit` is the number of samples.

The timing is exact:

- Address 0 lasts `duration_limit + 1` cycles: one for S1_START plus one full period.
- Every later address lasts `duration_limit` cycles: `duration_limit - 1` in S2_HOLD plus
  one in S3_NEXT.
- Addresses `0 .. addr_limit-1` are played, then the voice goes idle.

The top's defaults:

| drum   | duration_limit | addr_limit | rate at 40 MHz | length  |
|--------|----------------|------------|----------------|---------|
| snare  | 997            | 11600      | 40.1 kHz       | 0.29 s  |
| cymbal | 2750           | 12986      | 14.5 kHz       | 0.89 s  |

The original design chose 997 and 2750 for 44.1 kHz and 16 kHz from a 44 MHz clock. On
the 40 MHz board clock the sounds play about 10 % slow. Change the two parameters to
retune them.

`FSM_RUNNING` is high outside S0_WAIT. An assertion checks that a running voice never
addresses past its last sample.

### Sample ROMs

`lpm_rom_snare` and `lpm_rom_cymbal` each hold 16384 8-bit words. Reads are
synchronous: the data appears one clock after the address. Words past the sound's
sample count are 0. Samples are unsigned, with silence at 128.

The ROMs are filled when the design is elaborated, by functions in `drum_pkg`. These
are synthetic drum-like waveforms, not recordings. With `noise(n)` equal to bits 23:16
of `1103515245*n + 12345` (mod 2^32):

- snare(n) = 128 + ((3*(noise(n)-128) + tri245(n)) / 4) * q(n) / 256, where tri245 is a
  triangle wave from -128 to 127 with a period of 245 samples, and q(n) is a quadratic
  decay from 255 to 0 over 11600 samples.
- cymbal(n) = 128 + ((noise(n) - noise(n+1)) / 2) * lin(n) / 256, where lin(n) is a linear
  decay from 255 to 0 over 12986 samples.

To play real recordings, replace the initial block of the ROM with a `$readmemh` of
the sample file. Keep the sample count in `*_ADDR_LIMIT`.

### Volume by shifting

`instr_volume_cntrl` avoids a multiplier. It applies two right shifts in a row:

| hit strength | shift |  | universal volume | shift |
|--------------|-------|--|------------------|-------|
| 0..127       | 3     |  | 0..7             | muted |
| 128..159     | 2     |  | 8..15            | 7     |
| 160..191     | 1     |  | 16..23 … 48..55  | 6 … 2 |
| 192..255     | 0     |  | 56..62           | 1     |
|              |       |  | 63               | 0     |

Both volumes come in as one-cycle values, so the block stores them and holds them for
the whole sound. The hit strength register takes every non-zero strength routed to
this voice. The universal volume register takes every non-zero universal volume,
whichever drum the word names. A word for drum ID 3 therefore changes the master volume
without playing anything.

The output is forced to 0 while the voice is idle. Because the samples are unsigned,
heavy shifting lowers the signal's DC level along with its size, and it also costs
resolution: a sample shifted by 5 keeps only 3 bits.

### Mixing

`add_sounds` adds the two scaled voices and keeps the low 8 bits. A sum over 255 wraps
around instead of clipping, which sounds harsh. It only happens when both drums play
near full volume. Shifting each voice right by one before the add would prevent it, at
the cost of one more bit of resolution. That option is not built. The sum is registered
into `sound_out`.

### End-to-end latency

Call E the first `clk` edge that samples the last bit's SPI_clk high. Then:

| after edge | what is ready                                                   |
|------------|-----------------------------------------------------------------|
| E+2        | `spi_rcv` presents the word (two synchroniser flops, one output flop) |
| E+3        | `drum_decode` has routed the hit strength                       |
| E+4        | the voice is in S1_START                                        |
| E+5        | the first sample, scaled, is on `sound_out`                     |

A new universal volume affects `sound_out` from E+4.

## EEPROM utilities

These two blocks stand beside the drum kit in `drum_kit_top`. They share only `clk`
and `rst_n` with it. On the real board each was a separate FPGA image, meant to move a
third drum sound into external memory.

- **`write_eeprom`** copies `kick_rom` into a 32k x 8 parallel EEPROM (AT28C256 class).
  A kick drum has 7755 samples, addresses 0..7754 (`ADDR_LIMIT`). Each byte gets
  `BYTE_PERIOD + 1` = 1,000,001 cycles. `not_WE` is low while the cycle counter is
  between `WE_START` (800,000) and `BYTE_PERIOD`. The chip latches the address on the
  falling edge of `not_WE` and the data on the rising edge, and then the address steps
  on. `not_CE` is held low and `not_OE` high. `WRITE_LED` lights during each strobe and
  `DONE_LED` at the end. A full copy takes about 194 s at 40 MHz.
- **`kick_rom`** is an 8k x 8 synchronous ROM. Its first 7755 words hold a synthetic
  kick: 128 + tri400(n) * q(n) / 256, where tri400 is a triangle wave with a period of
  400 samples and q(n) a quadratic decay over 7755 samples.
- **`read_eeprom`** steps through the EEPROM in address order. The address is the top 15
  bits of a 41-bit counter, so each address lasts 2^26 cycles, about 1.7 s. The byte read
  back goes straight to LEDs. `not_CE` and `not_OE` are held low and `not_WE` high.

## Outside the FPGA

These parts have no RTL here:

- The piezo pads and their op-amp buffer and clamp LEDs, which scale about 30 V peaks to
  under 3 V for the ADC.
- The microcontroller and its software.
- The R-2R DAC, its output buffer and the amplifier. `sound_out` is the DAC input.
- The EEPROM chip. `tb/at28c256_model.sv` is a simple behavioural model of it, for
  testbenches only.

## Choices made in this RTL

These are the places where this RTL makes its own choices, or settles points the
original design left open:

- **Reset.** Every register has an active-low synchronous reset `rst_n`. The original
  had no reset.
- **SPI receiver clocking.** `spi_rcv` runs entirely on `clk`, with synchronisers and an
  edge detector. The original sampled on SPI_clk directly.
- **SPI output window.** The received word is shown for one `clk` cycle. The original
  showed it for one SPI clock period.
- **Drum IDs.** ID 1 drives the snare and ID 2 the cymbal. The IDs are parameters of
  `drum_decode`.
- **Exact period and count.** `duration_limit` and `addr_limit` give exactly the period
  and the count. A literal "greater than" comparison, as originally described, would
  hold each sample 3 cycles longer and play 2 extra addresses.
- **Clean restart.** A restart clears the counters on the same edge that sees the hit,
  so S1_START always shows address 0.
- **Top volume value.** Only universal volume 63 is unshifted. The 56..62 band shifts
  by 1.
- **Idle mute.** An idle voice outputs 0.
- **Output register.** `sound_out` is registered.
- **ROM contents.** The samples are the synthetic waveforms above, not recordings.

## Files

`rtl/` (one unit per file):

- `drum_pkg.sv`: the SPI word type, sizes and sample formulas.
- `spi_rcv.sv`, `drum_decode.sv`, `playback_fsm.sv`, `lpm_rom_snare.sv`,
  `lpm_rom_cymbal.sv`, `instr_volume_cntrl.sv`, `add_sounds.sv`: the drum kit blocks.
- `write_eeprom.sv`, `kick_rom.sv`, `read_eeprom.sv`: the EEPROM utilities.
- `drum_kit_top.sv`: the top level.

`tb/`:

- `tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
- `tb_ref_pkg.sv`: reference arithmetic written apart from the RTL, with 64-bit sample
  formulas and shift lookup tables.
- `drum_kit_scoreboard.sv`: drives SPI words and predicts `sound_out` on every cycle.
- `at28c256_model.sv`: the behavioural EEPROM.
- `tb_drum_kit_top.sv`: the whole design at reduced sizes. It covers a snare played to
  its end, the zero word, overlapping voices with wrapping sums, restarts, a drum-ID-3
  word, a muted hit, all four hit-strength bands, a full EEPROM copy and the read-back.
  It fails if any of these never happens.
- `tb_drum_kit_full.sv`: the top at its default parameters. A snare hit, then a cymbal
  hit while the snare rings, both played to the end (37.7 million cycles, about 30 s of
  simulation). It also checks the first 37 bytes that the writer copies at full pace.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/drum_pkg.sv tb/tb_drum_kit_top.sv --top-module tb_drum_kit_top -o sim
obj_dir/sim
```

Swap in any other testbench name. Every testbench passes with zero failures, including
the full-size one. The testbenches were also checked against deliberately broken copies
of each module, and each of them fails on its broken copy.

The top's size parameters are `SNARE_/CYMBAL_DURATION_LIMIT`, `SNARE_/CYMBAL_ADDR_LIMIT`,
`EW_BYTE_PERIOD`, `EW_WE_START` and `ER_STEP_LOG2`. The ROM depth and the sample
formulas are in `drum_pkg`. To add a third drum, you need another voice chain, another
output of `drum_decode` (ID 3 is free) and another adder input.
