# REMCS: a synchronous card-to-card ring for a STATCOM control system

A STATCOM converter is driven by several control cards on a common backplane. One DIF01
*master* card runs the main control loop. Three DIF01 *slave* cards each drive the
H-bridges of one phase (U, V, W). An MCU01 card runs the outer loop and logs data. All of
them work in a fixed sampling period of 55.6 µs (18 kHz), and in every period:

- the master has to collect the measurements and status of every slave;
- it must hand back the PWM duty cycles it has computed;
- MCU01 has to see all of it.

This must happen with fixed latency and without loading the card CPUs. Their parallel bus
is slow, so the exchange is left to the FPGAs. The cards sit in a ring of serial links
(8b/10b at 1.04 Gbit/s of payload). The master sends one message per slave around the
ring. Each slave takes out the message addressed to it and puts its answer in the same
place on the ring. The answers travel on to the master, and MCU01 keeps a copy of each as
it passes.

This repository holds the FPGA side of that system in synthesizable SystemVerilog:

- one card design, `remcs_card`, used for all five cards and configured by a card number;
- a backplane, `remcs_top`, that connects five cards in the ring and ORs together their
  sync, end-of-conversion and global error lines;
- self-checking testbenches for every block and for the whole backplane.

## Cards, slots and the ring

| Card   | `MY_ID` | Role in the exchange |
|--------|---------|----------------------|
| DIF01 master | 0 | drives sync and EOC, starts and paces every message, consumes every frame it receives |
| DIF01 slave U/V/W | 1/2/3 | answer the master's messages, run the PWM |
| MCU01  | 4 | answers its own message, keeps copies of all answers sent to the master |

The backplane has five slots, in the order MCU01, master, U, V, W. Symbols therefore flow
master → U → V → W → MCU01 → master. This places MCU01 after every slave and before the
master, so it can copy every answer on its way back. Each slot has a `backplane_switch`:

- with a card present, the ring passes through the card;
- with the slot empty (`slot_present[i] = 0`), the switch sends the ring past the slot.

The switch register is the one clock of delay per hop. It stands in for the serializer
and the line.

All cards run on one clock, the symbol clock. Its default is 130 MHz, which gives
1.04 Gbit/s at eight payload bits per symbol. The parameters are `CLK_HZ` and `SAMPLE_HZ`.

## Frames on the line

Every symbol is 8b/10b coded (`enc_8b10b`, `dec_8b10b`). Both keep the running disparity.
The decoder flags codes that do not exist and codes of the wrong disparity. A frame is:

```
K27.7 | header | LEN | w0.lo w0.hi | w1.lo w1.hi | ... | K29.7
header = { phase[1:0], source[2:0], destination[2:0] }   LEN = number of 16-bit words
```

A frame of `LEN` words therefore takes `4 + 2·LEN` symbols. Between frames the line
carries K28.5. The phase field says which step of the period a frame belongs to:

- 1: part 1;
- 2: part 2, messages to the DIF01 slaves;
- 3: part 2, the message to MCU01.

The frame has no checksum and no retransmission. A broken frame is reported and dropped:

- `ring_port` forwards a symbol that arrived broken as K30.7, so the break stays visible
  further along the ring;
- `frame_rx` ends a frame at any broken symbol, a missing K29.7 or a bad length;
- in each case it raises `rx_err` and ignores the rest of the frame; words already
  written stay in the mailbox, and the card's status shows the message as not intact.

### What a ring port does with a frame (`ring_port`)

The port decodes each incoming symbol, looks at the header, and then does one of three
things:

- **Forward it.** The frame is not for this card. Its symbols are re-encoded with the
  port's own running disparity and sent on after 3 clocks.
- **Consume it.** The frame is addressed to this card. The master consumes every frame.
  Consumed symbols are not forwarded, so the slot they occupied becomes free for this
  card's answer.
- **Insert.** The card's own frame goes out on the free slot. If a forwarded symbol meets
  an own symbol, the forwarded one is lost and `collision` pulses. The CPU can read the
  count of such losses. A correctly paced ring never produces one.

Idle symbols are regenerated, never forwarded.

## One sampling period

`sample_timer` on the master makes a one-clock sync pulse every `CLK_HZ/SAMPLE_HZ` clocks
(7222 at the defaults). Each card starts its ADCs on that pulse. After the conversion time
of 3.4 µs (442 clocks), the master raises EOC. On EOC, every card:

- captures its 16 ADC inputs into registers;
- raises the CPU interrupt.

The master's CPU then writes two commands to `comm_ctrl`, the exchange sequencer.

**Part 1 (command bit 0).**

- The master sends each of U, V and W the 4 words of user data its CPU left in the
  mailbox.
- Each slave answers at once with its 26-word status message, described below.
- The master then sends MCU01 its user data. MCU01 does not answer.

**Part 2 (command bit 1, after the master's control loop).**

- The master sends each DIF01 slave its 13-word control message, described below.
- Each slave answers with its 4 words of user data.
- Finally the master builds the 57-word summary packet for MCU01, which answers with
  user data.

The master must not put a second message on the ring while the answer to the first is
still travelling. After each message, `comm_ctrl` waits for:

- the length of the expected answer;
- plus a margin of `GAP_MARGIN` (8) clocks.

At the end of a part it waits `DRAIN` (128) clocks, which covers a full round trip of the
ring. Then `busy` drops. Which cards answered intact is collected in `rx_mask`, which the
CPU can read. In the end-to-end test, at the defaults:

- part 1 takes 403 clocks (3.1 µs), against a budget of 6.4 µs;
- part 2 takes 439 clocks (3.4 µs), well inside the 55.6 µs period.

The master's CPU must start part 2 so that it ends before the next sync, leaving a short
safety gap (under 1 µs). The hardware does not enforce this.

A slave answers even when the master's message arrived broken. Its answer still fills the
slot, and the master sees from the error counters what went wrong.

### Message contents

Words are 16 bits; indices are word indices.

**Status message, DIF01 slave → master (26 words).**

| Words | Content | Filled by |
|---|---|---|
| 0–3   | user data | CPU |
| 4     | PLL status | CPU |
| 5–10  | I/O signals | CPU |
| 11    | LED status | CPU |
| 12    | general inputs | CPU |
| 13    | PWM blocking (12 gate signals) | FPGA: all ones while the global error blocks PWM |
| 14    | analogue inputs over limit | CPU |
| 15    | PWM errors | FPGA: latched local fault causes |
| 16    | hardware limits of the analogue inputs | CPU |
| 17–24 | ADC channels 0–7, captured at EOC | FPGA |
| 25    | PWM output levels | FPGA |

The transmitter (`frame_tx`, mode `TXM_T1`) puts the FPGA's words into the frame as it
sends it, so they are always current.

**Control message, master → DIF01 slave (13 words).**

| Words | Content | Used by the slave FPGA |
|---|---|---|
| 0–3  | user data | no, left for the CPU |
| 4–5  | local I/O word (32 bits) | `io_out` |
| 6    | LED control (low byte) | `led` |
| 7–12 | six PWM duty cycles | `pwm_gen` |

`frame_rx` hands words 4–12 to the hardware only after the whole frame has arrived
intact. A broken control message leaves the old duty cycles in force.

**Summary packet, master → MCU01 (57 words).**

| Words | Content |
|---|---|
| 0–3   | user data of the master for MCU01 |
| 4–36  | for U, V and W in turn, 11 words each: 8 ADC channels, PWM status, the first two duty cycles sent to that card |
| 37–44 | the master's own ADC channels 0–7 |
| 45–56 | the user data the master sent to U, V and W |

The master's CPU writes none of this packet. The transmitter gathers each word from the
mailbox areas where the answers and the outgoing messages already sit. The map from packet
word to source is the function `t2_src` in `remcs_pkg`.

## Mailbox and CPU access

Each card has one 4096 × 16 memory (`mailbox`). The address is built as:

```
{ rx, phase[1:0], peer[2:0], word[5:0] }
```

- `rx` = 0 for messages to send, 1 for messages received;
- `peer` is the destination when sending and the source when receiving.

Every message therefore has its own 64-word area. The memory has one write port:

- the link receiver has priority;
- a CPU write that collides with a link write is held for one clock and written next;
- the CPU must therefore not write on two clocks in a row (an assertion checks this).

The CPU reaches the FPGA through `cpu_bus_if`, an asynchronous 16-bit bus with `cs_n`,
`we_n`, `oe_n`, 13 address bits and a data bus:

- the strobes pass a two-flop synchronizer;
- a write is taken two clocks after the strobe falls;
- a read strobe must last at least 5 clocks, and the data are driven while it is low.

Addresses `0x0000–0x0FFF` reach the mailbox, and `0x1000 + n` reaches the registers:

| n | Register | |
|---|---|---|
| 0x00 | command | write: bit 0 start part 1, bit 1 start part 2 (master), bit 2 clear error causes, bit 3 acknowledge interrupt |
| 0x01 | status | bit 0 exchange running, bit 1 global error line, bit 2 local error, bit 3 interrupt pending, bits 12:8 cards answered |
| 0x02 | broken frames received | counter |
| 0x03 | forwarded symbols lost | counter |
| 0x04 | error causes | bit 15 error raised by another card, bits 5:0 local causes |
| 0x05 | PWM output levels | |
| 0x06/0x07 | I/O word from the master | low / high half |
| 0x08 | LED byte from the master | |
| 0x10–0x1F | ADC channels captured at EOC | |

## PWM and synchronisation (`pwm_gen`)

Each DIF01 slave has six PWM channels. They compare a triangular carrier with the duty
cycles:

- the carrier rises for one sampling period and falls for the next (14444 clocks,
  9 kHz);
- every sync pulse restarts it at its peak or its valley, so the carriers of all slaves
  stay aligned;
- a duty cycle is a count of clocks, and an output is high while its duty cycle is above
  the carrier: it is high for 2·duty clocks per carrier period, centred on the valley;
- new duty cycles from the control message are held in a shadow register and take effect
  at the next sync.

All cards therefore switch in step, without any timestamp in the messages.

## Global error (`global_error`)

A fault on any of a card's six fault inputs forces that card's PWM low at once, in the
same clock, and sets a latch for that input. While any latch is set, the card drives the
wired-OR error line. While the line is high, every card's PWM outputs are forced low
through combinational logic. The latched causes stay until the CPU clears them, and a
clear is refused while a fault input is still set. A card that sees the line high
without a fault of its own records a remote error. This separates "I stopped the
converter" from "someone else did".

## Simulating

Every testbench is self-checking. It ends by printing `TB_RESULT checks=N failures=M` and
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/line_code_pkg.sv rtl/remcs_pkg.sv tb/tb_remcs_top.sv --top-module tb_remcs_top
obj_dir/Vtb_remcs_top
```

The same line with another testbench name runs any other test. The testbenches are:

| Testbench | Covers |
|---|---|
| `tb_remcs_top` | the whole backplane at default parameters (see below) |
| `tb_remcs_card` | one slave card driven from a symbol-level model of the ring |
| `tb_comm_ctrl` | message order, gap lengths and drain time, for master and slave roles |
| `tb_ring_port` | forwarding, consuming, inserting, latency, broken symbols |
| `tb_frame_tx`, `tb_frame_rx` | frame format, the three content modes, broken frames |
| `tb_codec_8b10b` | encoder and decoder against each other and against known codes, both error flags |
| `tb_mailbox` | write priority and the held CPU write |
| `tb_cpu_bus_if` | strobe timing and read data |
| `tb_sample_timer` | sync period, EOC delay, sample capture |
| `tb_pwm_gen` | carrier, duty timing, shadow load |
| `tb_global_error` | blocking, cause latch, remote flag |
| `tb_backplane_switch` | pass-through and bypass |

`tb_remcs_top` models five CPUs on their buses and runs:

- a complete sampling period;
- the PWM in the following periods;
- a fault on one card;
- a frame broken on the line;
- a period with an empty slot.

It checks every mailbox area against values it works out itself and counts each
mechanism. It simulates about 0.1 s in a few seconds. Some block testbenches override
parameters (for example a shorter sampling period) to stay short.

## How this design departs from, or goes beyond, its source

The published description of the system gives the message contents and the timing of the
period. It does not give the FPGA logic. Everything below the message level is this
design's own, and should be read as one reasonable way to build it:

- the frame format and control characters;
- forwarding and insertion on the ring;
- the pacing of messages;
- the mailbox map;
- the CPU bus protocol;
- the register map;
- the PWM carrier and duty units;
- error latching.

Points where this design interprets or leaves out parts of that description:

- **Who fills the status message.** The FPGA fills only the PWM blocking and error words,
  the ADC channels and the PWM levels. The CPU writes the rest, including the analogue
  limit words, and how those are computed is not described. The PWM blocking word has
  every bit set while the error line is high; a per-gate meaning is not described.
- **Summary packet.** "PWM status" and "duty cycles" of a slave are taken from word 25 of
  its status message and from the first two duty cycles the master sent to it.
- **Card start-up times.** The slaves are described as being ready for their loop 1.3 µs
  after EOC (MCU01 after 2 µs). These times belong to the CPUs and are not modelled.
  Likewise the time needed to bring the ring into step at power-up (1.28 µs for two
  cards, 6.4 µs for five) is not modelled, because all cards here share one clock from
  reset.
- **Starting the exchange.** The master's CPU starts each part by a register write. The
  slaves' user data answers are sent in part 2, with the duty cycles.
- **ADC.** 16 capture registers per card. DIF01 cards use 8 channels, MCU01 16. The
  converters' own interface is not described: samples enter as parallel words, and the
  conversion time is counted by the master.
- **Outside the FPGA and not modelled.** The LVDS drivers and serializer chips, the CPUs,
  the converters, MCU01's DMA and Ethernet link, the CAN bus that reports error causes,
  the binary I/O unit and the power stage.
- **Simplifications.** The serializer's latency is reduced to the one-clock register of
  the backplane switch. One clock drives all cards.
