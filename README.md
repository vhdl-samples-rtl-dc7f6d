# IP8320: a 48-channel simultaneous-sampling ADC on an IndustryPack module

The IP8320 puts 48 serial 16-bit analog-to-digital converters on one
IndustryPack (IP) module. All 48 converters share one chip select and one
data clock, so every channel is sampled at the same instant. The logic has
three jobs:

* run the converters: a 23-state sequencer starts a conversion, shifts
  16 bits out of every converter at once, and posts the 48 words together;
* serve the IP carrier: the 48 results, a small control register and the ID
  bytes, with no wait states, over the IP bus clocked at 8 MHz;
* pace the two against each other: a new result set is posted every 9.2 us,
  which is faster than most carriers can read 48 words. The open-drain
  `n_ipstrobe` line, and a 4x slower conversion clock, let software read a
  complete set from one sampling instant.

Two small, unrelated examples live in the same tree: `multex2`, a triple
32 x 32 multiplier, and `gray7`, a 3-bit Gray-code sequencer with start and
pause inputs. The top level `vhdl_samples_top` places all three side by side
with separate ports.

Everything is SystemVerilog (IEEE 1800-2017) and synthesizable, except the
testbench models in `tb/`.

## Block structure

```
                    clk8m (carrier)                       clk5m (oscillator)
                          |                                      |
  IP bus ----------> ipctrl ---- strtena, slowclkena ------> acq_ctrl
  (selects, a[6:1],    |  ^                                 (adc_state + 5-bit
   d[3:0], n_ack, ack) |  '------------- regena ----------- state register)
                       |  hihalf, idsel, regclr, ctrl           |  dclk, shftena,
                       v                                        |  regena, n_cs
  d_out <------- adc_datapath <---------------------------------'
                   ^   ^    ^
             id_rom    |    adc_sdata[47:0] <--- 48 ADCs (dclk, n_cs)
                       |
  d_in[15:0] --> memzero_cmp --> memzero (to ipctrl)
```

| Module | Role |
|---|---|
| `ip8320_pkg` | channel count (48), word width (16), control address 3Fh, state encoding, control register layout |
| `ipctrl` | IP bus transfer control, control register, start/stop logic |
| `adc_state` | next-state logic of the sequencer, DCLK divider, decoded `n_cs`/`shftena`/`regena` |
| `acq_ctrl` | the 5-bit state register closed around `adc_state` |
| `adc_datapath` | 48 shift registers, 48 result registers, 8 MHz read register, read multiplexer |
| `id_rom` | ID space |
| `memzero_cmp` | detects a non-zero extended memory address on `d[15:0]` |
| `ip8320` | the module: the five blocks wired together |

Outside the logic: the 48 converters, the 5 MHz oscillator, the tristate
data bus drivers (enabled by `ack`) and the open-drain driver that pulls
`n_ipstrobe` low (enabled by `strbout`).

## The acquisition sequencer

The state register steps once per rising DCLK edge through 23 codes, chosen
so that only one bit changes per step ("mock Gray"):

```
00 01 03 02 06 07 05 04 0C 0D 0F 0E 0A 0B 09 08 18 19 1B 13 17 15 11 -> 00
```

A 5-bit Gray count has 32 codes, so the sequence leaves the reflected Gray
order after 1Bh to close the loop in 23. Only the return 11h -> 00h flips two
bits, and no output depends on those two, so the outputs can be decoded
straight from the state register without glitches:

| Output | States | Meaning |
|---|---|---|
| `shftena` | 02 .. 1B (16 states) | each DCLK edge shifts one bit of every converter in, MSB first |
| `regena` | 13 | the edge that leaves 13 copies all 48 shift registers into the result registers |
| `n_cs` high | 13, or whenever `strtena` is low | one-state recycle of the converters; shutdown while stopped |

Seen from the converters, an acquisition is the 22 states from 17 to 1B
(chip select low: sample, convert, shift out) plus the recycle state 13.
State 00 waits for `strtena`; once it has left 00 the machine does not look
at `strtena` again in the next-state logic.

**DCLK.** `clk5m` is divided by 2 (2.5 MHz) and then by 2 twice more
(625 kHz) by a ripple chain of toggle flip-flops. DCLK is the 2.5 MHz clock,
or the 625 kHz one when control bit `slowclkena` is set; it is held low in
reset and while `strtena` is low. Resulting rates:

| DCLK | One set every | Samples/s per channel | Time per read, all 48 channels |
|---|---|---|---|
| 2.5 MHz (reset default) | 9.2 us | 108,696 | 192 ns |
| 625 kHz | 36.8 us | 27,174 | 766 ns |

**Stopping.** When `strtena` drops, DCLK stops and the state register is
cleared asynchronously to 00 (see "Departures" for why). When `strtena`
returns, the machine starts again from 00 with chip select already low.

## The IP bus side

`ipctrl` answers the carrier on `clk8m`. A transfer is a select cycle (one of
`n_iosel`, `n_memsel`, `n_idsel`, `n_intsel` low at a rising edge), then the
acknowledge cycle in which `n_ack` is low. There are never wait states:
`n_ack` always comes in the cycle right after the select. The carrier may add
hold cycles by keeping the select low; `n_ack` then stays low until the
select is released and is negated at the first edge where all selects are
high. `ack`, the enable for the data bus drivers, follows the same timing
for read transfers only.

Address map (`a[6:1]` is the word address):

| Space | Locations | Read | Write |
|---|---|---|---|
| I/O | 00h..2Fh | channel 0..47 | acknowledged, ignored |
| I/O | 30h..3Eh | 0 | acknowledged, ignored |
| I/O | 3Fh | control bits `{slowclkena, ctrlinena, statoutena, ackallena}` | control register |
| Memory (extended address `d[15:0]` = 0) | 00h..2Fh | channel 0..47 | not acknowledged |
| Memory | 30h..3Eh | 0 | not acknowledged |
| Memory | 3Fh | control bits | not acknowledged |
| Memory (extended address not 0) | all | not acknowledged | not acknowledged |
| ID | 64 locations | 12 ID bytes + 4 zeros, repeated four times | not acknowledged |
| Interrupt vector | - | not acknowledged, no data | not acknowledged |

With control bit `ackallena` set, every select is acknowledged with `n_ack`,
including the "not acknowledged" cases above, so that a carrier without a bus
timeout cannot hang; those cycles still get no data (`ack` stays low).

How the read data is formed (`adc_datapath`): the results are written in the
DCLK domain, asynchronously to the carrier. A 16-bit read register
re-samples the addressed result on every `clk8m` edge, so new results can be
posted at any moment, even between the select and the end of the acknowledge
cycle; the carrier gets what the register holds at the end of the
acknowledge cycle. `hihalf` (`a[6:1] >= 18h`) picks which group of 24
channels is addressed. `regclr` clears the read register synchronously,
which is how unused locations (30h..3Eh, extended memory) read as zero.
After the register, a multiplexer substitutes the control bits at 3Fh and the
ID byte during ID reads (`idsel`).

Control register writes take effect at the edge that ends the acknowledge
cycle. If the carrier inserts hold cycles during an I/O write, only the
first hold cycle registers the data (`wrtblk` blocks the rest until the
transfer ends).

## n_ipstrobe: status output and control input

`n_ipstrobe` is one open-drain line to the carrier, pulled up when nobody
drives it. Two control bits, both 0 after reset, give it two roles that can
be used together:

* **Status output (`statoutena`)**: while new results are being posted
  (sequencer state 13) the module pulls the line low for one DCLK period.
  The falling edge tells the carrier a new set is arriving; the result
  registers load on the DCLK edge that ends the pulse, so a carrier should
  start reading at the rising edge (see Departures).
* **Control input (`ctrlinena`)**: when something else holds the line low,
  `strtena` drops at the next `clk8m` edge and conversions stop, with the
  converters in shutdown. The module ignores the low it drives itself
  (`strbout` qualifies the input), and `strtena` goes high again as soon as
  the line is high.

With both enabled, an external controller can take exactly one set at a time:
it holds the line low, releases it to start a conversion, waits for the
module's own strobe (the set has just been posted) and pulls the line low
again before the next posting. That must happen within 22 DCLK periods
(8.8 us at 2.5 MHz); the set then stays readable for as long as the line is
held. Several modules on one line convert in step this way, which extends
simultaneous sampling beyond 48 channels. They start in the same DCLK period
only if their 5 MHz oscillators are common (or in phase); with free-running
separate oscillators the starts can differ by up to one DCLK period.

Why this matters: a carrier that needs 250 ns per read takes 12 us for all
48 words, longer than the 9.2 us between postings, so in free-running mode a
set is partly overwritten before it has been read. The alternatives are the
control input, the 625 kHz rate (36.8 us per set, 766 ns per read), or
reading only some channels.

## Clocks and reset

* `clk8m`: the carrier clock. All of `ipctrl` and the read register.
* `clk5m`: the oscillator. Drives the divider chain; DCLK clocks the state
  register, the shift registers and the result registers.
* The two are unrelated. The crossings are kept as simple as in the original
  design: `regena` (DCLK domain) gates `strbout` combinationally; `strtena`
  and `slowclkena` (clk8m domain) gate DCLK and clear the state register;
  the read register samples the result registers directly. A read that
  coincides with a posting may return a word that is changing; the design
  accepts this rather than add wait states.
* `n_reset` (active low, asynchronous) clears every register; `strtena`
  resets to 1, so conversions run from power-up at the fast rate.

## Departures from the original description and open points

* **Stop clears the sequencer.** The description says both that a low
  `n_ipstrobe` input stops conversions and resets the state machine to zero,
  and that a started sequence completes even if the start enable drops.
  Because DCLK itself is gated off by `strtena`, a sequence cannot complete
  after a stop; this design clears the state register while `strtena` is low.
  Consequence: a set started from the stopped state has only 19 states
  between chip-select fall and posting instead of 22. With a converter that
  needs the full 22 DCLK periods, the first set after every start (including
  every set taken under external control) would be incomplete. The testbench
  converter model is parameterised for both cases (`LAT`, below): `tb_ip8320`
  uses the 22-state timing and checks externally paced sets only for stable
  read-back, `tb_ip8320_multiboard` uses a converter that fits in 19 states
  and checks them word by word. Check this against the real converter's
  timing before relying on externally paced acquisition.
* **Posting at the end of the strobe.** The original says the falling edge
  of `n_ipstrobe` indicates that the conversions have just been posted, and
  also that `regena` (state 13) loads the results. Since the result
  registers are clocked by DCLK and enabled in state 13, they load on the
  edge that leaves it: up to one DCLK period (400 ns fast, 1.6 us slow)
  after the falling edge, at the rising edge of the strobe. A carrier that
  starts reading at the falling edge reads the previous set. The
  testbenches read from the rising edge.
* **Data path insides are this design's.** The original gives the control
  signals (`shftena`, `regena`, `regclr`, `hihalf`, `idsel`) and what they do,
  not the data path. Shift direction (MSB first), sampling on the rising DCLK
  edge, a single 16-bit read register as the resynchronisation stage, the
  channel-to-address order, zero-extension of ID bytes and reset of the
  result registers are choices made here.
* **ID bytes.** The layout is as described; the byte values are not
  published. `id_rom` has a parameter `ID_BYTES`; its default holds the IP
  identifier "IPAC" in bytes 0..3, 0Ch (bytes used) in byte 10 and zeros
  elsewhere (manufacturer, model, revision, driver ID, CRC are placeholders).
* **One `regclr` term.** For a memory transfer after its select cycle, the
  read register is cleared when the extended address was non-zero or
  `a6 = a5 = 1`, following the prose of the original; its equation repeats
  the first condition twice.
* **Control read-back in memory space.** Location 3Fh returns the control
  bits in both I/O and memory space, through the multiplexer after the read
  register.
* **Bus split.** The bidirectional data bus is split into `d_in` and `d_out`
  with `ack` as driver enable; the bidirectional `n_ipstrobe` pin into its
  state (`n_ipstrobe` input) and its driver enable (`strbout`).
* The four control bits form one 4-bit register (`ctrl_bits_t`); the
  original uses four one-bit processes with identical write conditions.

## The other two designs

**`multex2`** computes `axb = ad*bd`, `bxc = bd*cd` and `axc = ad*cd` for
three unsigned 32-bit buses, full 64-bit products, purely combinational.
Parameter `W` (default 32) sets the input width.

**`gray7`** counts 0, 1, 3, 2, 6, 7, 5 and back to 0 on rising `clk` edges.
Count 0 is idle: it is left only on an edge where `strtena` is high, whatever
`pause` is. From any other count, the counter advances on every edge where
`pause` is low and holds while `pause` is high. So a one-cycle `strtena`
pulse runs exactly one sequence back to 0, and `strtena` held high makes it
run continuously. `rst` (active high) clears it asynchronously. The unused
code 4 goes to 0. The testbench reproduces the reference waveform: 7 ns clock,
a one-cycle start pulse giving 1, 3, 2, 6, 7, 5, 0, then rest at 0.

## Simulation

All testbenches are self-checking and end with a line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb -Irtl -Itb \
  rtl/ip8320_pkg.sv tb/ipbus_pkg.sv tb/tb_adc_pkg.sv tb/tb_vhdl_samples_top.sv \
  --top-module tb_vhdl_samples_top
./obj_dir/Vtb_vhdl_samples_top
```

Replace the testbench name to run another one. Packages must be listed first.

| Testbench | Covers |
|---|---|
| `tb_vhdl_samples_top` | whole top level at full size (48 channels): the IP8320 sequence below plus multiplier and Gray sequencer |
| `tb_ip8320` | IP8320 end to end: ID space, free-running data checked against the converter model, unused locations, ignored transfers, acknowledge-all, hold cycles, a read held across a posting returning the new set, 9.2 us and 36.8 us posting periods, all 48 channels read in one slow period, strobe output pulse width, stop/start under external control |
| `tb_ip8320_slow_stream` | sustained capture at 625 kHz: a carrier at 750 ns per read reads all 48 channels of five consecutive sets, each word checked against its sampling, no posting inside a read-out |
| `tb_ip8320_multiboard` | two modules on one `n_ipstrobe` line with shared clocks, paced by an external controller (reaction 50 ns and 3 us): simultaneous chip-select fall, one set per release, all 96 words checked, 4 sets |
| `tb_ipctrl` | acknowledge rules and timing per space, hold cycles, `hihalf`, `regclr`, `idsel`, single registration during hold cycles, `strbout`, `strtena` |
| `tb_adc_state` | next state for all 32 codes, decoded outputs, DCLK period 400 ns / 1600 ns, DCLK gating |
| `tb_acq_ctrl` | state walk, 16 shift states and one post per set, 9.2 us / 36.8 us period, stop clears and restart |
| `tb_adc_datapath` | serial capture, read register latency (one `clk8m` edge), zero fill, control read-back, ID multiplexer, old data readable while the next set shifts in |
| `tb_id_rom`, `tb_memzero_cmp`, `tb_multex2`, `tb_gray7` | the small blocks |

Shared testbench parts: `ipbus_if` (carrier model with a `xfer` task),
`adc_model` (behavioural converter: MSB driven after the `LAT`-th rising DCLK
edge following the chip-select fall, result from `tb_adc_pkg::adc_word`;
`LAT = 6` fits the free-running sequence, `LAT = 3` a sequence started from
the stopped state),
`ip8320_exerciser` (the end-to-end sequence, which counts every mechanism it
exercises and fails if one never occurs). The full-size top-level test
simulates about 360 us and finishes in well under a second.

Each module's header comment gives its interface and timing and marks what
follows the original design and what is this implementation's choice.
