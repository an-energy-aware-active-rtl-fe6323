# Energy-aware active smart card: digital core

Most smart cards are passive: they get power, clock and even the time of day
from the reader they are plugged into. A card that must change its secret keys
on a schedule (forward-secure signing or encryption, where yesterday's key is
destroyed so that a stolen card cannot forge yesterday's data) has to keep time
by itself, from its own crystal and battery, and must do so for a year or more
on a battery the size of a card.

The design splits the card into two parts:

* a tiny **continually-active subsystem (CAS)** that never stops: a 32-bit time
  counter stepped at 13.95 kHz (the 3.5712 MHz smart-card clock divided by 256)
  and a 32-entry content-addressable memory (CAM) of *timing keys* that is
  compared against the count on every step;
* a **periodically-active subsystem (PAS)**, with the microcontroller (an 8051),
  its RAM and ROM, the control and microcontroller interfaces, and the encrypted
  reader interface. It sleeps with its clock gated off. When the count equals a
  timing key, the CAM raises a match interrupt that restores the clock and tells
  the processor which keys fired. The processor then runs its periodic job (for
  example deriving a new encryption key), sets the next timing key and goes back
  to sleep.

Both CAS blocks are fault-tolerant, because a single upset in the timekeeping
state would silently shift every later key change. The counter is duplicated
and checked by parity prediction. Each CAM row carries its own parity, so a
corrupted row can never match.

This repository holds synthesizable SystemVerilog for the whole digital core
except the processor, its memories and the UART. Those connect through the top
module's ports.

## Block structure

```
                    periodically-active subsystem (clock: pas_clk, gated)
   UART bytes  +---------------------------------------------------------+
  <----------->| card_interface                                          |
   rx_*/tx_*   |  data_shifter <-> reader_controller -> tea_decrypt --+  |
               |       ^                 ^                            |  |
               |       +-----------------+---- tea_encrypt <-+        |  |
               |                 key_register --> (both)     |        |  |
               +---------------------------------------------|--------|--+
                                              enc_start/plain|   dec_done/plain
               +---------------------------------------------+--------v--+
               | control_interface  (command decoder)                    |
               +----^-------------------------------------------|--------+
   11-bit bus  +----|---------------+         req/done, results |
  <----------->| mcu_interface      |--pas_clk_en--> clock_gate --> pas_clk
   mcu_irq <---|  (free clock)      |<--match_evt---+           |
               +--------------------+               |           v
               +------------------------------------+--------------------+
               | cas_regbank  (transfers at the power-clock peak)        |
               +------------------------------------^--------------------+
                        writes at tick              |  count, match, rdata
               +------------------------------------+--------------------+
               | cas: ft_counter (2 x gray_counter) --count--> ft_cam    |
               +---------------------------------------------------------+
                 ^ tick / peak from cas_clk_div     continually-active
```

| Module | Role |
|---|---|
| `smart_card_top` | The whole core. Parameter `DIV_BITS` (default 8, i.e. divide by 256). |
| `cas_clk_div` | Divider with eight flip-flops. Gives the CAS step `tick` and the mid-period `peak` strobe. |
| `cas` | The CAS: `ft_counter` feeding `ft_cam`. |
| `ft_counter` | Main and redundant `gray_counter`s, error detector and 2-to-1 output mux. |
| `gray_counter` | Segmented Gray counter with per-segment parity prediction. |
| `ft_cam` | 32 x 32-bit CAM. Each row has a parity bit and an enable bit. |
| `cas_regbank` | Register bank between CAS and PAS. |
| `mcu_interface` | Processor register file, IRQ, sleep/wake control. |
| `clock_gate` | Latch-based clock gate for the PAS clock. |
| `control_interface` | Command decoder for reader and processor commands; reader-to-processor mailbox. |
| `card_interface` | Reader interface: `data_shifter`, `reader_controller`, `key_register`, `tea_encrypt`, `tea_decrypt`. |
| `sc_pkg` | Shared widths, opcodes, status byte and CAS request types. |

## The time counter and its fault tolerance

`gray_counter` stores the count as four 8-bit Gray-code segments. A segment
advances one Gray step when all lower segments are at their last code. One
count step therefore flips at most one bit per segment, and an upset in one
segment cannot ripple into a wrong carry elsewhere.

Every Gray step flips exactly one bit, so a segment's parity must toggle each
time the segment advances. A toggle flip-flop per segment keeps the predicted
parity. The XOR of the segment against that flip-flop is the error detector, and
it catches any single flipped bit. The predictor is kept per segment rather than
for the whole word: a segment wrap flips one bit in each of two segments, which
leaves the whole-word parity unchanged.

`ft_counter` runs a main and a redundant counter in lockstep. While the main
counter's detector reports an error, the output mux gives out the redundant
counter's value, so the count seen by the CAM and by software stays right. At
the next CAS step the main counter is reloaded from the redundant one (as the
redundant value plus one), and the error clears. The redundant counter has no
detector of its own, so an upset in it alone goes unnoticed until it is
rewritten. The counter is written through a parallel load that converts the
binary value to Gray code and presets the predictors.

## The timing-key CAM

`ft_cam` has 32 rows. Each row stores `{enable, parity, word}`, where `parity`
is the even parity of the word, computed when the row is written. A row drives
its match line when all three of these hold:

* it is enabled;
* its stored parity agrees with its stored word;
* its word equals the current count.

A row hit by an upset therefore never produces a false match. Its bit in
`parity_err` is raised instead. Rows written with the enable bit clear are plain
storage. The key-update software uses one such row as an *energy monitor*, a
running estimate of the battery energy left. All enables are cleared at reset.

Writes take effect on a CAS step. Reads and the match lines are combinational.
The original design saves power in the CAM with adiabatic match lines, which are
returned to a sinusoidal power clock instead of ground. That is a
transistor-level technique, and here the match logic is ordinary logic.

## Crossing from the CAS to the PAS

In the original design the CAS is adiabatic logic on its own power clock, and
data crosses to the ordinary logic only while that power clock is at its peak.
This core runs both sides from one clock, with the CAS stepping on a one-cycle
`tick` every 256 clocks. `cas_clk_div` also marks the middle of each CAS period
with `peak`, half a period after `tick`. `cas_regbank` transfers data only at
these instants:

* A request from the control interface is held in the bank until the next
  `tick`, where a counter or CAM write is applied.
* Results (count, CAM word at the request's address, match lines, error flags)
  are captured at the next `peak`. The request then reports `done`.
* The handshake is four-phase: hold `req` until `done`, then drop it.
* A read takes at most one CAS period. A write takes at most 1.5 periods, which
  is 384 clocks (about 107 us) at the default divider.
* Match lines are sampled once per CAS period. Captured matches are ORed into a
  sticky 32-bit match register, and a non-zero capture gives one `match_evt`
  pulse. Each count value that matches a key therefore yields exactly one
  interrupt. The register is cleared by the `MATCH_READ` command.

## Sleep and wake-up

`mcu_interface` runs on the free-running clock. Writing bit 0 of its control
register puts the PAS to sleep: `pas_clk_en` falls, and `clock_gate` stops
`pas_clk` cleanly between pulses. `control_interface`, `card_interface` and the
external processor and memories run on `pas_clk`. A `match_evt` sets the IRQ and
clears the sleep bit in the same clock, so the PAS clock is back by the next
clock. The IRQ stays up until the processor clears it. A waiting reader
message also raises the IRQ (see below). It does not wake the card, because the
reader interface runs on `pas_clk` too. The card must therefore be awake while a
reader is talking to it.

## Commands

The control interface executes one command at a time, from either source.
Reader commands come as decrypted 64-bit blocks. Processor commands come through
the register file. When both are waiting, the reader goes first.

| Opcode | Name | Argument | Data | Result |
|---|---|---|---|---|
| 0x00 | NOP | - | - | 0 |
| 0x01 | CAM_WRITE | [4:0] row, [7] enable | timing key | the row as read back |
| 0x02 | CAM_READ | [4:0] row | - | the row's word |
| 0x03 | CNT_WRITE | - | new count | count at the next peak |
| 0x04 | CNT_READ | - | - | count at the next peak |
| 0x05 | MATCH_READ | - | - | sticky match lines (cleared) |
| 0x06 | KEY_WRITE | [1:0] key word | key word | the data |
| 0x07 | TO_MCU (reader only) | message type | message data | no reply |
| 0x08 | TO_READER (processor only) | - | answer | the data, also sent to the reader |
| 0x09 | MSG_READ (processor only) | [0] 0 data / 1 type, [7] clear | - | mailbox word |

* Reader command block: `[63:56]` opcode, `[55:48]` argument, `[31:0]` data.
* Reply block (encrypted and sent back): `[63:56]` opcode, `[55:48]` status,
  `[47:32]` zero, `[31:0]` result.
* Status byte: bit 0 is a bad opcode, bit 1 is the counter error detector (as
  captured at the last peak), bit 2 is an enabled CAM row failing its parity.
* A message opcode from the wrong side is refused with the bad-opcode bit.
* A reader's `KEY_WRITE` changes the key at once, so its reply is already
  encrypted with the partly updated key. Key changes are meant to come from the
  processor.

## Processor register map

The 11-bit bus is a 3-bit register address and an 8-bit data byte, plus write
and read strobes.

| Addr | Write | Read |
|---|---|---|
| 0 | opcode: issues the command (ignored while busy) | last opcode |
| 1 | argument | argument |
| 2-5 | command data, byte 0 (LSB) to byte 3 | result, byte 0 to 3 |
| 6 | - | `{busy, match_irq, msg, 2'b0, status[2:0]}` |
| 7 | bit 0: sleep, bit 1: clear match IRQ | `{5'b0, msg, match_irq, sleep}` |

`mcu_irq` is `match_irq | msg`. `match_irq` is set by a timing-key match and
cleared by the processor. `msg` means a reader message waits in the mailbox; it
falls when the processor reads the mailbox with the clear bit set.

`rdata` is zero unless `rd` is high. To run a command:

1. Write the argument and data bytes.
2. Write the opcode.
3. Poll register 6 until `busy` falls.
4. Read the result bytes.

## Reader interface and TEA

Everything exchanged with a reader is encrypted with TEA (the Tiny Encryption
Algorithm: 64-bit blocks, 128-bit key, 32 cycles with delta `0x9E3779B9`).

* **Receiving.** `data_shifter` packs UART bytes, most significant first, into
  64-bit blocks. `reader_controller` hands each block to `tea_decrypt`. The
  plain text goes to the control interface.
* **Replying.** The control interface passes the reply to `tea_encrypt`. The
  controller hands the cipher text to the shifter, which sends eight bytes over
  a valid/ready handshake.
* **Key.** One `key_register` serves both directions. It is written one 32-bit
  word at a time. Word *i* is `key[32*i +: 32]`, and it is TEA's `k[i]`. The
  block's halves are `v0 = block[63:32]` and `v1 = block[31:0]`.
* **Timing.** Both TEA units do one full cycle (two half-rounds) per clock:
  `done` comes 33 clocks after `start`. From the last received byte to the
  plain text reaching the control interface takes 35 clocks.
* **Overrun.** One received block can wait while decryption is busy. If a
  reader sends a third block before the first has been decrypted, a block is
  lost and the sticky `overrun` output is set.

## The periodic key-update flow

The end-to-end testbench plays the processor and runs the flow the design was
made for:

1. At start-up the processor writes the energy monitor (row 1, enable clear)
   and a first timing key, `now + period` (row 0, enabled). Then it sleeps.
2. When the count reaches the timing key, the match interrupt wakes the PAS.
3. The interrupt routine reads the match lines (`MATCH_READ`) and the count,
   derives a new key from the old one and loads it (`KEY_WRITE` x 4).
4. The routine charges the energy monitor with the cost of the update.
5. It writes the next timing key. Once the energy is below a limit, it uses a
   longer period (weekly instead of daily, in the original application). The
   textual description of the application and its flow chart disagree on which
   way round this goes. The testbench follows the text: low energy leads to less
   frequent updates.
6. It clears the IRQ and sleeps again.

Timing keys are compared modulo 2^32. At 13.95 kHz, one trigger can lie at most
2^32 steps (3.56 days) ahead:

| Update period | Fits one timing key? |
|---|---|
| Hourly | Yes |
| Daily | Yes |
| Weekly | No: 8.4 x 10^9 steps. Software has to chain two triggers. |

## Messages between reader and processor: the signature application

Most reader commands are carried out by the control interface alone. Some
requests need the processor's software, for example *Authenticate* in the
digital-signature application. For these the control interface keeps a
one-entry mailbox:

1. The reader sends `TO_MCU` with a message type in the argument and 32 bits of
   data. The card does not reply yet. The mailbox is filled and `msg` raises the
   IRQ. A newer message overwrites one that has not been read.
2. The processor reads the type and the data with `MSG_READ`. The read that
   sets argument bit 7 also clears `msg`.
3. The processor answers with `TO_READER`. Its data go to the reader in an
   ordinary encrypted reply block with opcode `0x08`.

`tb_rsa_signature` runs the signature application over this path:

* **Reader side.** The reader reads the count and CAM word 31. It then sends
  Authenticate, carrying the count it read.
* **Hash.** The processor model XORs three words into one byte: that count,
  CAM word 31 (which the processor reads itself) and the first TEA key word.
* **Signature.** The processor signs the byte with one of four RSA key pairs.
  It answers with `{16-bit modulus, 16-bit signature}`. The reader checks
  `sig^65537 mod n` against the hash.
* **Pair switching.** A timing key in row 5 makes the processor move to the next
  pair. This uses the same match interrupt as the key update.

The RSA arithmetic is part of the testbench's processor model. It is not
hardware.

## Upset emulation

The top-level `seu_*` inputs exist for testing fault tolerance. In a real chip
they are tied to zero.

* `seu_cnt_main` and `seu_cnt_red` are XOR masks applied to the main and
  redundant counter states on the next clock.
* `seu_cam_en`, `seu_cam_row` and `seu_cam_bit` flip one stored CAM bit. Bit 32
  is the row's parity bit.

## Where this RTL departs from the original design, and what it leaves out

* **Not included:**
  * the 8051 processor, its RAM and ROM (their sizes are not known), and the
    UART;
  * the ATR (answer-to-reset) block, which is only named;
  * the analog parts: battery, crystal, pads, and the switched-capacitor
    resonator that generates the power clock.

  The top module brings out the processor bus, the gated clock `pas_clk` and
  the UART byte interface in their place.
* **Ordinary logic instead of adiabatic circuits.** The CAM match lines and the
  counter's logic family are adiabatic in the original design. Here they are
  ordinary synchronous logic with the same function.
* **Power switching.** When a reader is attached, the original card runs from
  the reader's power and clock, and during sleep its RAM and ROM lose power as
  well as clock. Neither switch is in this RTL. `pas_clk` is the only sleep
  control it provides.
* **Where the command decoder sits.** The decoder is in `control_interface`,
  the block wired to the CAM and counter. The processor reaches it through
  `mcu_interface`.
* **One clock.** The CAS uses the primary clock with a 1-in-256 enable rather
  than a separately divided clock. The placement of the transfer instant half a
  period after the step is this design's choice.
* **Counter width.** The counter is 32 bits. The original description also
  mentions a counter of fifteen flip-flops with a period of up to one year. That
  matches neither 32 bits nor 15 bits at 13.95 kHz. Here 32 bits is used,
  consistent with the 32-bit CAM words.
* **This design's own choices:**
  * reloading the main counter after an error;
  * the segment width;
  * the per-row enable bit;
  * the command set, block layout, register map and handshakes;
  * the reader-to-processor mailbox and its three opcodes;
  * the one-deep holding registers in the reader controller;
  * byte order;
  * the word-wise key update.

## Simulating

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/sc_pkg.sv tb/tea_ref_pkg.sv tb/tb_smart_card_top.sv \
    --top-module tb_smart_card_top -Mdir obj_top
./obj_top/Vtb_smart_card_top
```

Replace `tb_smart_card_top` with any other testbench: `tb_gray_counter`,
`tb_ft_counter`, `tb_ft_cam`, `tb_cas`, `tb_cas_clk_div`, `tb_cas_regbank`,
`tb_tea` (both TEA units), `tb_key_register`, `tb_data_shifter`,
`tb_reader_controller`, `tb_card_interface`, `tb_control_interface` or
`tb_mcu_interface`. `tea_ref_pkg` is a loop-style TEA model used as the
reference. It reproduces the published all-zero test vector
(`41EA3A0A 94BAA940`), which `tb_tea` also checks.

`tb_smart_card_top` runs the core at its default parameters (divide by 256)
through:

* setting the time from the reader;
* four sleep / match-wake / key-update cycles, including the switch to the long
  period;
* reader commands before and after key changes;
* a counter upset corrected on the fly;
* a CAM upset whose false match is blocked;
* a reader overrun.

It counts each of these and fails if one never happens. It takes a few seconds.

`tb_key_schedule` checks the timing-key schedules at real periods on the full
core: an hourly job, a daily key update together with a second job due at the
same instant, and a weekly job. An hour is 50,220,000 steps and a day is
1,205,280,000 steps. The start count of `0xF000_0000` puts the daily trigger
past the 32-bit wrap. Rather than stepping through a whole day, the processor
model moves the count to three steps before each trigger and sleeps. The test
then checks three things:

* the interrupt arrives three steps later;
* the match lines name exactly the rows that are due;
* a weekly key comes due after 4,141,992,704 steps (its period modulo 2^32).

`tb_rsa_signature` runs the signature application described above on the full
core, over six key-pair switches, until all four pairs have signed. It also
checks two failure cases. A changed CAM word 31 must change the hash, and a
signature with one flipped bit must fail to verify.

## How far to trust it

* Every module has its own testbench, which checks against values computed
  independently (reference counts, a TEA model, a model CAM).
* Each testbench has been shown to fail on a deliberately broken copy of its
  module.
* Verilator lint and a Yosys elaboration accept every file.
* Not verified:
  * behaviour against a real 8051 program or a real ISO 7816 reader;
  * gate-level timing;
  * the clock gate beyond RTL simulation.
