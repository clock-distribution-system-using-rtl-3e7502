# MIKUMARI: a clock and data link on one differential pair

MIKUMARI sends a clock, a data stream and fixed-latency timing pulses from a
master to a slave over one cable, using nothing but the SERDES blocks of an
FPGA. The trick is **clock-duty-cycle modulation (CDCM)**. Every period of
the system clock F0 goes out as one clock pulse. Its rising edge always sits
at the start of the period, so a plain PLL on the slave can recover the
clock from it. Data is carried by the position of the falling edge, i.e. by
the duty cycle. An OSERDES running ten bits per F0 cycle draws the waveform,
and an ISERDES at the far end samples it back.

On top of this waveform sit two layers:

* **CBT** (CDCM based transceiver). It turns 10-bit characters into CDCM
  patterns and back. It also brings the lane up by itself after a cable is
  plugged in, and takes it down when the link breaks.
* **MIKUMARI link layer.** It carries user frames with a check sum, and
  one-shot pulses that arrive after a fixed number of clock cycles. The
  fixed latency is what lets the slave line up its own timing with the
  master's.

All of this RTL runs in the F0 domain. The SERDES primitives, the IDELAY and
the clock-recovery PLL are vendor parts and sit outside it. `mikumari_node`
is one end of a link, and the same module serves master and slave.

## The CDCM waveform

One F0 cycle is cut into ten segments. In a pattern word, bit 9 is the first
segment on the line. Every legal pattern starts high and ends low, with
exactly one falling edge.

| mode | fixed high | coded | fixed low | symbols | bits/cycle |
|---|---|---|---|---|---|
| CDCM-10-2.5 (default) | segments 0-2 | 3-6 | 7-9 | 30/40/50/60/70 % duty = `00`/`01`/IDLE/`10`/`11` | 2 |
| CDCM-10-1.5 | segments 0-3 | 4-5 | 6-9 | 40/50/60 % duty = `0`/IDLE/`1` | 1 |

In 2.5 mode the four coded segments form a thermometer code:
`00`→`0000`, `01`→`0001`, IDLE→`0011`, `10`→`0111`, `11`→`1111`. The code's
first bit is placed on segment 3. That placement makes the five 2.5
patterns `11100_00000`, `11110_00000`, `11111_00000` (IDLE),
`11111_10000` and `11111_11000`. A constant IDLE pattern is simply a 50 %
clock.

`cdcm_encoder` and `cdcm_decoder` are the two ends of this table. Each has
one register stage. The decoder also reports whether a word is a legal
pattern at all (`ok`).

## CBT characters

A CBT character is a 2-bit header and an 8-bit body:

| header | type | use |
|---|---|---|
| `00` | T | CBT control, never seen by the link layer |
| `01` | D+ | data, body as is |
| `10` | D- | data, body inverted |
| `11` | K | link-layer special characters |

A character takes 5 F0 cycles in 2.5 mode and 10 in 1.5 mode. That gives
200 Mbit/s of payload in 2.5 mode and 100 Mbit/s in 1.5 mode at 125 MHz.
`cbt_tx` picks one character per character period, with the priority
K > T > D.

**T characters** fill every slot the link layer leaves empty. They are also
sent as "dogfood" at least every `DOG_INTERVAL` (32) characters, and the far
end's watchdog eats them. A T character that displaces a waiting D character
simply withholds that character's `tx_ack`, so the link layer sends it in
the next slot.

**D+ / D-.** The thermometer code is not DC balanced: `11` is high for 70 %
of the cycle. The transmitter keeps a running count of the waveform's
imbalance (segments high minus segments low). For each data character it
sends the body as is (D+) or inverted (D-), whichever moves that count
towards zero. The receiver inverts D- bodies back.

**Latency.** The first pattern of a character leaves 3 cycles after
`tx_ack`, and the last leaves `CHAR_CYCLES-1` cycles later. The receiver
presents the character 6 cycles after the ISERDES word that carries its last
symbol. The receive pipeline has these stages:

1. input register;
2. bit-slip window;
3. decode;
4. symbol shift register;
5. header decode;
6. output register.

### Finding the word and the character boundary

The ISERDES word may start anywhere in the pattern. Because a legal pattern
has one falling edge and starts high, only one of the ten rotations of a
received word is legal. `cbt_rx` keeps the last two words and cuts a 10-bit
window out of them at an offset `slip`. While unaligned, it moves the slip
by one whenever a decoded word is illegal. It declares bit alignment after
16 legal words in a row.

Character alignment works in the same spirit. Two T codes are used:
`T_INIT` = `0x5F` and `T_READY` = `0x2B`. Neither matches itself or the
other at any shifted position in the symbol stream. When one of them shows
up in the symbol shift register, its position becomes the character
boundary. The receiver declares character alignment after 4 hits on the
same boundary.

### Lane bring-up and monitoring (`cbt`)

`cbt` wraps transmitter, receiver, a clock monitor and the lane FSM:

| state | line carries | leaves when |
|---|---|---|
| WAIT_CLK | IDLE | a clock is seen on the input: `clk_lock` (PLL lock on a slave, tie 1 on a master) and the clock monitor (64 toggling words in a row) |
| INIT_IDLE | IDLE, 256 cycles | time is up (the far end tunes its bit slip meanwhile) |
| INIT_T | `T_INIT` until the local receiver is character-aligned, then `T_READY` | receiver aligned and a `T_READY` received |
| UP | link characters, T in the gaps | a drop condition |

The lane drops back to WAIT_CLK when any of these happens:

* a broken pattern;
* an IDLE pattern or a `T_INIT` from the far end while up (the far end has
  restarted);
* loss of `clk_lock` or of the toggling input;
* `WDT_CYCLES` (1024) cycles without a `T_INIT` or `T_READY`.

Together these give hot plug: pull the cable, plug it back in, and both ends
come up again without help. A line stuck at a legal but constant pattern
decodes to T characters with a zero body. Such characters do not count as
dogfood, so the watchdog catches a stuck line too.

## MIKUMARI link layer (`mikumari_link`)

### Frames

A frame is `FSK`, any number of data bytes, one check-sum byte and `FEK`.
`FSK` (`0x1B`) and `FEK` (`0x4E`) are K characters. Data and check sum are D
characters. The check sum is the sum of the data bytes modulo 256.

On the user side:

* `tx_data`/`tx_valid`/`tx_last` are held until `tx_ack`.
* The user may pause inside a frame. The transceiver fills the pause with
  T characters, which the far end never sees.

On the receive side, `mikumari_frame_parser` holds back the two latest D
characters. That way it knows which byte was the last data byte (`rx_last`)
and which was the check sum when `FEK` arrives. It raises these flags:

* `rx_csum_err` on a mismatch;
* `rx_frame_err` for an `FSK` inside an open frame, or an `FEK` with fewer
  than two D characters.

Bytes are delivered as they arrive, so a bad frame's bytes are already out
when the error flag comes. Discarding them is up to the user.

### Scrambler

`prbs16_scrambler` XORs each D character with the top byte of a 16-bit LFSR
(x^16 + x^15 + x^13 + x^4 + 1, seed `0xFFFF`). The LFSR steps eight times
per D character, and both ends reseed it on `FSK`. Scrambling gives the
waveform a random mix of duty cycles even for regular data. That matters for
the recovered clock's jitter, because the PLL sees the average duty cycle.
`SCRAMBLE=0` sends clear text.

### Pulses with fixed latency

A one-shot `pulse_in` with a 3-bit type becomes a pulse K character with body
`{1, type[2:0], timing[3:0]}`. Bit 7 set marks it as a pulse; `FSK`/`FEK`
have bit 7 clear. Pulses have the highest priority: a waiting pulse takes
the next slot ahead of any frame character, and the frame continues
afterwards.

A pulse can still wait 0 to `CHAR_CYCLES-1` cycles for that slot.
`mikumari_pulse_gen` counts the wait into `timing`. `mikumari_pulse_rep` on
the far side delays the pulse by `PULSE_FIX - timing` cycles through a
16-entry delay line. The sum is therefore always the same. Measured from the
edge that samples `pulse_in`, the pulse leaves `pulse_out` after:

* **2.5 mode:** `PULSE_FIX + 2` = 9 cycles plus the CBT latency (13 cycles
  from `tx_ack` to `rx_valid`, plus the cable).
* **1.5 mode:** `PULSE_FIX + 2` = 11 cycles plus the CBT latency. Here the
  wait can reach 9 cycles, so `PULSE_FIX` = 9.

A second request while one is still pending, or a request while the lane is
down, is dropped and flagged on `pulse_dropped`.

## Where this RTL departs from the original design, or fills gaps

* **No link-layer IDLE character.** The original notes that an "additional
  IDLE" is sometimes sent around pulse insertion. Here, gaps are always
  filled by CBT T characters, which are invisible above the CBT. The frame
  simply continues after the pulse.
* **Bit slip in fabric.** The ISERDES bit slip is replaced by a 10-of-20-bit
  window after the ISERDES. Any legal pattern is accepted for tuning, not
  only IDLE.
* **IDELAY tap tuning is not built.** Choosing the sampling phase inside a
  segment needs the IDELAY primitive and an eye scan. It is outside this
  RTL.
* **CDCM-10-1.5 segment layout** (segments 4-5 coded as `00`/`10`/`11` for
  40/50/60 %) is inferred from the 2.5 table and the stated duty cycles.
* **Own choices**:
  * T and K code values;
  * the `T_INIT`/`T_READY` handshake;
  * the disparity rule;
  * the check-sum definition;
  * the PRBS polynomial, seed and reseed point;
  * the counts 16 / 4 / 64 / 256 / 32 / 1024;
  * the dropping of overlapping pulse requests.

  The original gives the structure and names these parts, but not these
  details.

## Files and parameters

`rtl/cdcm_pkg.sv` holds the shared types, codes and the helpers
`char_cycles()` and `char_disp()`. The hierarchy is:

```
mikumari_node  (MODE, SCRAMBLE, DOG_INTERVAL, WDT_CYCLES, INIT_IDLE_CYCLES)
├── mikumari_link   (pulse_gen, frame_gen, 2 × prbs16_scrambler, frame_parser, pulse_rep)
└── cbt             (cbt_tx → cdcm_encoder, cbt_rx → cdcm_decoder, cbt_clk_monitor)
```

`MODE` is `CDCM_10_2P5` (default) or `CDCM_10_1P5`, and `SCRAMBLE` is 1 by
default. `pattern_out` goes to a 10:1 OSERDES (DDR on a 5×F0 clock).
`pattern_in` comes from a 1:10 ISERDES.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Build one with Verilator, for example the
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cdcm_pkg.sv tb/mikumari_tb_pkg.sv tb/tb_mikumari_node.sv \
    --top-module tb_mikumari_node -o sim && obj_dir/sim
```

* `tb_mikumari_node` runs a master and a slave at the default parameters.
  They are joined by `serdes_channel`, a behavioural model of OSERDES,
  cable and ISERDES with word phases 3 and 7. The test has these phases:
  1. power-up from an unplugged cable;
  2. two-way frames with user gaps;
  3. pulses during frames, with latency checked;
  4. a broken pattern;
  5. a stuck line (watchdog);
  6. unplug and replug;
  7. a bit error that only the check sum can see.

  It counts each of these and fails if one never happened.
* `tb_mikumari_workloads` repeats the same test for the other three
  configurations: 1.5 mode scrambled, 1.5 mode clear, and 2.5 mode clear.
* `tb_mikumari_link` checks the link layer alone against an ideal character
  channel.

The rest test single blocks. Those are the encoder and decoder (every
symbol, and every possible input word), the transmitter's rate, latency and
disparity bound, the receiver's bit slip and character alignment from a
non-zero word phase, and so on.

## How far to trust it

Everything above the SERDES is simulated end to end, including fault
recovery. Nothing here models analog behaviour: jitter, the PLL's response
to the duty cycle, or the cable. The SERDES model is an ideal bit shifter.
It has no jitter or sampling-phase uncertainty, which is the job of the
missing IDELAY tuning. Synthesis with a generic flow gives about 520 cells
and 280 flip-flop bits for one node (the 16-entry pulse delay line adds 64
bits).
