# FSSR: a data-driven silicon-strip readout chip in SystemVerilog

The FSSR (Fermilab Silicon Strip Readout) chip reads out 128 microstrips of a
silicon tracker without a trigger. Each strip has a charge amplifier, a shaper
and a discriminator. When a discriminator fires, the chip records which strip
fired and in which beam crossing. That record goes off chip as a 24-bit word
holding the beam-crossing (BCO) number, a set code and a strip code. The words
stream out continuously on 1, 2, 4 or 6 serial lines. When there is no data,
sync words fill the gaps; they carry status bits and let the receiver find the
word boundaries. A slow serial bus, clocked by the BCO clock, configures the
chip: it kills noisy strips, selects strips for charge injection, sets the
number of output lines, and starts and stops readout.

This repository holds RTL for the chip's digital part: the end-of-set logic,
the core readout logic, the programming interface, the programmable registers
and the data output interface. It also holds a behavioural model of the analog
channel, so that the whole chip can be simulated from charge deposit to serial
output. DACs, LVDS pad circuits and other purely analog or physical parts are
not modelled.

## Module map

```
fssr_top                    whole chip; ports are the chip's pads
├── prog_interface          serial command decoder (BCO clock)
├── prog_registers          CapSel, AqBCO, Alines, Kill, Inject, SendData, RejectHits
│   └── tmr_reg ×3          triple-redundant voted register (Alines, SendData, RejectHits)
├── fssr_core
│   ├── analog_channel ×114 behavioural front end (positions 64..90 even are blank)
│   ├── eos_logic ×16       strip cells + end-of-set capture, one per set of 8 strips
│   └── core_logic          BCO counter + horizontal-token readout
└── data_output_if
    ├── clock_control       SCLK = MCA xor MCB, RCLK, OutCLK
    ├── next_word           core word or sync word, plus word mark
    ├── word_serializer     24 bits over 1/2/4/6 lines
    └── steering_logic      registered, masked output pairs
fssr_pkg                    codes, register map, word layouts, shared functions
```

Every file starts with a comment on what the module does, its interface and
its timing. Each comment also says which parts follow the chip's
specification and which are this implementation's own choices.

## Three clocks and how data crosses between them

This is the least obvious part of the design. The chip has three unrelated
time bases:

| Domain | Clock | What runs on it |
|---|---|---|
| Strip cells | each discriminator output | one toggle flip-flop per strip |
| BCO | BCO clock (the beam crossing, e.g. 132 ns) | BCO counter, hit capture, programming interface, registers |
| Readout | MCA/MCB (68.8 MHz, MCB 90° behind MCA) | SCLK, RCLK, token readout, serializer |

The specification requires no phase or frequency relation between the BCO
clock and MCA/MCB. The crossings work as follows:

1. **Discriminator → BCO.** A discriminator pulse can be much shorter than a
   BCO period and arrives at any time. Each strip cell is therefore a toggle
   flip-flop clocked by the discriminator output itself. The toggle flips only
   while RejectHits is 0, so when RejectHits is set the cells ignore new hits.
   Two flip-flops bring the toggle into the BCO domain, and a change of the
   synchronised toggle counts as a hit. Because the synchroniser delays a hit
   by two BCO edges, the stored BCO number is the counter value minus 2. That
   is the crossing in which the pulse arrived.
2. **BCO → RCLK (one handshake per set).** When a set is empty and some of its
   strips report hits, `eos_logic` latches the 8-bit hit pattern and the BCO
   number, then raises `full`. The readout side sees `full` through two
   flip-flops and copies the pattern. The copy is safe because the pattern
   cannot change while `full` is high. The readout side then hands strips to
   the core one at a time. After the last one it toggles an acknowledge, which
   crosses back through two flip-flops and clears `full`. A set holds one
   crossing's worth of hits at a time. Hits that reach a set while it is still
   being read out are lost.
3. **Registers → readout.** Alines and SendData are changed only from time to
   time, so each is synchronised with two flip-flops where it is used.

Resets cross the same way. Smart Core Reset and Firefighter Reset clear the
BCO side at once. On the RCLK side they go through a reset synchroniser:
assertion is asynchronous, and release waits for the second RCLK edge.

## Readout path

### Core: horizontal token (`core_logic`)

The core reads out on RCLK. When any set holds hits and SendData is 1, the
token is *launched*: `core_talking` rises, and the first RCLK cycle after the
launch carries no word. In every later cycle the token moves to the
lowest-numbered set at or beyond its current position that holds hits. The core
then reads out that set's lowest remaining strip, which gives one 23-bit word
per RCLK cycle. Once no hit is left at or beyond the token, `core_talking`
drops for at least one cycle, and the next launch starts again from set 0.
Hits that arrive in a set the token has already passed wait for the next scan.

### Next word (`next_word`)

On every falling RCLK edge, the next-word block takes the core word if
`core_talking` is high now and was also high at the previous falling edge.
Otherwise it takes the sync word. The dead cycle after each launch and the
gap after each scan therefore guarantee at least two sync words per scan.

### Word formats

| Bits | Data word | Sync word |
|---|---|---|
| 23..16 | BCO number | status: 23 SendData, 22 RejectHits, 21..20 Alines, 19 AqBCO≠0, 18..14 zero (unassigned) |
| 15..11 | set code | 〃 |
| 10..7 | strip code | zero |
| 6..1 | zero | zero |
| 0 | word mark = 1 | word mark = 1 |

A sync word has zeros in bits 13..1. The set codes and strip codes are chosen
so that a data word never contains 13 zeros in a row, either inside one word
or across two words.

| Set | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| code | 01010 | 01011 | 01111 | 01110 | 01100 | 01101 | 11101 | 11100 | 10100 | 10101 | 10111 | 10110 | 10010 | 10011 | 11011 | 11010 |

| Strip in set | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| code | 0101 | 0111 | 0110 | 1110 | 1010 | 1011 | 1001 | 1101 |

Strip 0 of the chip (set 1, strip 1) is therefore `01010 0101`, and strip 127
is `11010 1101`. In the RTL, sets and strips are numbered from 0
(`fssr_pkg::set_code`, `strip_code`, `core_word`, `sync_word`).

### Data output interface (`data_output_if`)

SCLK is MCA XOR MCB. With MCB 90° behind MCA, SCLK runs at twice the MCA
frequency. A counter on SCLK marks off N = 24 / lines bits per word. RCLK is
SCLK / N and falls on the edge where the serializer loads a word. As a result,
the chip sends words exactly as fast as the core produces them, and no buffer
is needed.

| Alines | Lines | Bits per line | RCLK | Words/s at MCA = 68.8 MHz |
|---|---|---|---|---|
| 00 | 1 | 24 | MCA/12 | 5.73 M |
| 01 | 2 | 12 | MCA/6 | 11.5 M |
| 10 | 4 | 6 | MCA/3 | 22.9 M |
| 11 | 6 | 4 | MCA/2 | 34.4 M |

Line k (k = 0..L−1) sends bits k·N to k·N+N−1 of the word, lowest bit first.
For example, with 6 lines, line 1 sends b3..b0 and line 6 sends b23..b20. Data
changes on rising SCLK edges. OutCLK runs at the MCA frequency and changes on
falling SCLK edges, so each of its edges falls in the middle of a bit. It
rises during the first bit of every word, which on line 1 is the word mark. A
receiver therefore samples on both OutCLK edges. Line k drives pad pair
Out(k+1), and unused lines are held low.

Operation Reset zeroes the serializer and holds RCLK and OutCLK low. On
release the bit counter restarts, which restores the alignment between the
word mark and the rising OutCLK edge. The line layout is undefined between a
change of Alines and the next Operation Reset.

## Programming interface

A command is sent on `shift_in` while `shift_ctrl` is high, one bit per BCO
clock, and each bit is latched on the falling edge. The fields are:

```
chip address (5) | register number (5) | instruction (3) | data (Write only)
```

Each field goes in least significant bit first. The chip answers its own
address (`chip_addr`, set by wire bonds on the real chip) and also the
broadcast address `10101`.

| Instruction | Code | Effect |
|---|---|---|
| Write | 001 | shifts in 1, 2, 8 or 128 data bits |
| Set | 010 | all bits to 1; on AqBCO: capture the BCO counter; on SCR/SPR: do the reset |
| Read | 100 | register goes out on `shift_out` |
| Reset | 101 | all bits to 0 |
| Default | 110 | value after Firefighter Reset |

| Reg | No. | Bits | After FFR | SPR | Notes |
|---|---|---|---|---|---|
| CapSel | 13 | 2 | 00 | default | peaking time 60 / 85 / – / 125 ns |
| AqBCO | 15 | 8 | 0 | default | BCO number captured by <Set,AqBCO> |
| Alines | 16 | 2 | 00 | kept | output lines 1 / 2 / 4 / 6, voted (SEU tolerant) |
| Kill | 17 | 128 | 0 | kept | opens the discriminator output of a channel |
| Inject | 18 | 128 | 0 | kept | connects InjectIn to a channel's injection capacitor |
| SendData | 19 | 1 | 0 | kept | enables core readout, voted |
| RejectHits | 20 | 1 | 1 | kept | strip cells ignore new hits, voted |
| WildReg | 21 | – | – | – | reaches every register not marked "ignores WildReg"; of the above only AqBCO |
| SPR | 24 | – | – | – | Smart Programming Reset |
| SCR | 28 | – | – | – | Smart Core Reset |

Timing, always in BCO clock edges:

* **Set / Reset / Default** act on the rising edge right after the falling
  edge that latched the last instruction bit.
* **Write** data is shifted into the register half a cycle after each bit is
  latched. Ordinary registers take their LSB first. Kill and Inject take the
  bit for channel 127 first.
* **Read** copies the register to a shadow register on the edge after the
  instruction. One cycle later its MSB appears on `shift_out`, and then one
  more bit per rising edge while `shift_ctrl` stays high. Kill and Inject have
  no shadow register: they rotate, bit 127 first, and after 128 bits they hold
  their original contents again.
* **<Set,SCR>** raises the core reset on the edge after the last instruction
  bit. The reset stays high until the first rising edge after `shift_ctrl` is
  seen low. The BCO counter reads 0 during that crossing and 1 at the next
  edge, so lowering `shift_ctrl` at the right time resynchronises the crossing
  numbers with the rest of the detector.
* **<Set,AqBCO>** samples the BCO counter on the first falling edge after
  `shift_ctrl` goes low. If the sample is not zero, bit 19 of every sync word
  is set.

Alines, SendData and RejectHits are each kept in three copies with a 2-of-3
vote (`tmr_reg`). Every cycle, each copy is rewritten with the voted value, so
a single upset is corrected within one BCO period.

## Resets

| Reset | Source | Clears |
|---|---|---|
| Firefighter (FFR) | pad | everything: registers to the "after FFR" column, core, output interface |
| Operation (OR) | pad | data output interface only (serializer, RCLK/SCLK phase) |
| Smart Core (SCR) | <Set,SCR> | BCO counter, strip cells, end-of-set logic |
| Smart Programming (SPR) | <Set,SPR> | CapSel and AqBCO to default |

Switch-on sequence: FFR, then <Write,Alines>, Operation Reset (if more than
one line is used), <Reset,RejectHits>, <Set,SCR>, <Set,SendData>. To load
Kill or Inject, first <Set,RejectHits>, then scan in the pattern, then
<Reset,RejectHits>.

## Analog channel model

`analog_channel` is a behavioural model for simulation only; it uses delays
and cannot be synthesized. Charge arrives as an event: a rising edge on
`strip_strobe` with an amount on `strip_charge`. A charge above `vth` makes
the discriminator fire after the peaking time selected by CapSel (60, 85 or
125 ns; CapSel = 10 has no specified value and uses 85 ns). The pulse then
lasts 100 ns. The kill switch sits after the discriminator. InjectIn charge
reaches every channel whose Inject bit is set. Charges and threshold are in
arbitrary units. Baseline shift is not modelled, so the baseline restorer
fitted to some channels on the real chip has no effect here. Positions 64 to
90 with even numbers are blank, since their area holds probing pads on the
test chip, which leaves 114 channels.

## Choices made in this implementation

The specification describes the chip's behaviour at its pins and
registers. It does not describe the logic inside the end-of-set blocks or the
readout details. The following are this implementation's own choices:

* End-of-set logic: toggle-flip-flop strip cells, one captured crossing per
  set, and the full/acknowledge handshake described above. Hits that arrive in
  a set while it is busy are lost.
* Within a set, strips are read lowest first. The core reads one word per RCLK
  cycle, and the token skips empty sets within the same cycle.
* When SendData goes to 0, readout stops at a word boundary and loses no word.
  The specification allows up to two words to be lost.
* Each bit of a line is sent lowest first, line k maps to pad pair Out(k+1),
  and unused lines are held at 0.
* RCLK is low for the first half of each word and falls on the load edge.
  Alines is synchronised into the SCLK domain.
* One command per `shift_ctrl` high period. Data bits beyond a register's
  width are ignored. <Set,WildReg> behaves like <Set,AqBCO>.
* The core reset from <Set,SCR> lasts until `shift_ctrl` drops, while other
  Set actions last one BCO period.
* Operation Reset "halts" SCLK as follows: SCLK itself keeps toggling, since
  it is a plain XOR of the master clocks. Every flip-flop it clocks is held
  in reset, so nothing moves until the reset is released.
* ChipHit is the OR of all discriminator outputs after their kill switches,
  so a killed noisy strip does not raise it. It is not registered.
  ChipHasData is high while any end-of-set block holds an unread crossing.
* Registers, widths and codes are fixed constants in `fssr_pkg`, not module
  parameters, because the word format depends on exactly 16 sets of 8 strips.

## Simulating

Any testbench in `tb/` runs with Verilator 5 (it needs `--timing`):

```
verilator --binary --timing --assert -y rtl -y tb rtl/fssr_pkg.sv \
    tb/tb_fssr_top.sv --top-module tb_fssr_top
./obj_dir/Vtb_fssr_top
```

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| tb_fssr_top | the whole chip at full size, driven only through its pads: switch-on sequence, all four line configurations, Kill/Inject scans and read-back, InjectIn, RejectHits, SendData off/on, AqBCO and its status bit, SPR, Operation Reset. It counts each of these and fails if one never happened. Takes about 20 s. |
| tb_fssr_core | random multi-strip hits decoded back to strip and crossing; blank positions, Kill, Inject, RejectHits, ChipHit, ChipHasData |
| tb_core_logic | token order, dead cycle after launch, gap between scans, one word per cycle, SendData, BCO counter |
| tb_eos_logic | short discriminator pulses at random phases, BCO stamps, loss while full, reset |
| tb_prog_interface | command timing, broadcast, read delay and order, Kill rotation, SCR window, AqBCO capture, SPR |
| tb_prog_registers | reset values, bit orders, WildReg, SPR, single-copy upsets |
| tb_data_output_if | serial pads → deserialized words for 1/2/4/6 lines, one word per RCLK |
| tb_clock_control | SCLK, RCLK and OutCLK ratios; RCLK falls on the load edge; OutCLK rises on the word mark |
| tb_next_word, tb_word_serializer, tb_steering_logic, tb_analog_channel | the individual units |

The clocks used in the testbenches are MCA = 68.8 MHz and BCO = 132 ns. The
BCO period is an example value; the design does not depend on it.

## Known limitations

* The analog behaviour is modelled only as far as the digital back end needs
  it: there is no noise, pile-up, gain or baseline shift.
* A set captures the hits of one crossing and accepts new hits only after its
  readout finishes. Under high occupancy, hits are lost in that window.
* `fssr_top` contains the behavioural analog model, so it cannot be
  synthesized as a whole. All other modules are synthesizable.
