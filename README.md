# CDCM clock/data link with the SPDT protocol

Many detector-readout systems have to send one clock to many boards. The clock
must stay low-jitter and arrive with a known phase. Triggers and small control
messages must travel with it, at a latency known to the clock cycle. The usual
way to do this uses FPGA multi-gigabit transceivers and their clock-data
recovery. That ties the system to vendor-specific hard blocks.

This design sends the clock itself down the line. It changes only the clock's
duty cycle to carry data, a method called **clock-duty-cycle modulation
(CDCM)**. The rising edge of every clock period stays where it is. The falling
edge moves to one of four positions, and that position carries two data bits.
The phase detector of a PLL only looks at rising edges, so the modulated clock
can go straight into an FPGA PLL/MMCM or an external jitter cleaner, which gives
back a clean clock at the far end.

On top of this sits the **SPDT (synchronous pulse and data transmission)
protocol**. It sends short packets that carry 0 to 16 user bytes and/or one
synchronous pulse (a trigger). The receiver re-creates the pulse a fixed number
of clock cycles after it was requested at the sending end, even when the pulse
had to wait because the line was busy.

Each end of a full-duplex link is one instance of `mikumari_link`, whether it is
the master or the slave.

```
 user frames, pulses                                        user frames, pulses
        |                                                          ^
     spdt_tx --> cdcm_encoder --> cdcm_serializer ==line==>  ...   |
                                                                   |
     spdt_rx <-- cdcm_decoder <-- cdcm_deserializer <== IDELAY <==line
                        \--------- cdcm_linkup (tap scan, bit slip)
```

## One clock period on the line

The serializer draws each link-clock period as 10 serial bits, high bits first,
at a bit clock ten times the link clock (`SER_RATIO = 10`). The number of high
bits gives the symbol:

| high bits of 10 | word (first bit left) | meaning     |
|-----------------|-----------------------|-------------|
| 3               | `1110000000`          | data `00`   |
| 4               | `1111000000`          | data `01`   |
| 5               | `1111100000`          | IDLE (50 %) |
| 6               | `1111110000`          | data `10`   |
| 7               | `1111111000`          | data `11`   |

Any other word is a *broken pattern*. The decoder flags it on `pattern_err_o`,
for example when heavy clock jitter corrupts the line. Two bits per period means
one byte takes four link cycles. The byte is sent as four bit pairs, most
significant pair first.

The line always carries a clock. When there is nothing to send, the encoder
sends IDLE periods. Bytes are framed by IDLE: the first data symbol after an IDLE
starts a byte, and the first byte after an IDLE is marked as start of packet
(`rx_sop_o`). If an IDLE arrives in the middle of a byte, the decoder reports a
framing error.

## SPDT packets

| byte(s)  | field                | coding in this design                                       |
|----------|----------------------|-------------------------------------------------------------|
| 0        | magic                | `0xFD`                                                      |
| 1        | length + instruction | `{frame, instr[1:0], len[4:0]}`, with `len` from 0 to 16    |
| 2, 3     | pulse timing         | `{pulse, wait[14:0]}`, MSB first                            |
| 4        | reserve              | `0x00`                                                      |
| 5 ..     | user data            | `len` bytes, byte 0 first                                   |
| next 2   | checksum             | 16-bit sum of all bytes from magic to the last user byte, MSB first |
| last     | IDLE                 | four IDLE periods                                           |

A packet is 8 + `len` bytes long, so it takes 32 to 96 link cycles. When packets
are queued, the next magic byte follows in the very next byte slot, so a stream
of 16-byte packets starts a packet exactly every 96 cycles.

The `frame` bit separates a packet that carries a user frame from one sent only
for a pulse. A zero-length user frame is therefore legal. The instruction field
is passed through unchanged; the design gives it no meaning.

The receiver checks each packet and reports errors as follows:

- A packet with a good checksum and a user frame appears on `rx_valid_o` with
  its instruction, length and data.
- A wrong checksum raises `rx_csum_err_o`.
- `rx_frame_err_o` is raised for any of these: a wrong magic byte, a length
  above 16, a packet cut short by IDLE or by a new start of packet, or a broken
  CDCM pattern inside the packet.

## Fixed-latency pulses

This is the subtle part. A pulse request (`pulse_i`, one cycle) may arrive while
a packet is already on the line, so it cannot always go out at once. The
transmitter counts the cycles the pulse waits. The count runs from the request
to the cycle in which the encoder takes the magic byte of the packet that
carries it. The transmitter writes this `wait` into the pulse-timing field.

The receiver notes the cycle in which that magic byte arrives. It then fires
`pulse_o` at `PULSE_DELAY - wait` cycles after that cycle. The wait cancels out,
and the end-to-end latency is

    latency(pulse_i -> far pulse_o) = link latency + PULSE_DELAY   (link-clock cycles)

This holds for every pulse, whatever traffic it had to wait for. The link
latency covers the encoder, serializer, line, deserializer and decoder, and is
fixed once the link is up.

Details:

- **Scheduling.** The receiver schedules pulses in a `PULSE_DELAY`-bit shift
  register. Several pulses from consecutive short packets can therefore be in
  flight at once.
- **No checksum gate.** A pulse fires once the header is in. It does not wait
  for the checksum at the end of the packet, which would otherwise add up to 96
  cycles of packet-length-dependent delay. Only the magic byte, the framing and
  the CDCM patterns up to the pulse-timing field protect it.
- **Choice of `PULSE_DELAY`.** The default of 128 covers the longest wait: a
  pulse that just misses a 16-byte packet waits about 96 to 100 cycles. The
  receiver needs 12 more cycles to read the header. If a wait is too long to
  meet the fixed latency (for example, a pulse requested while the link was
  down), the pulse fires at once and `pulse_late_o` is raised.
- **One waiting pulse.** Only one pulse can wait at the transmitter. A second
  request while one is waiting is dropped and reported on `pulse_drop_o`.
- **Sharing a packet.** A pulse and a user frame that are both pending go out in
  the same packet.

## Bringing the link up

Before it can decode anything, the receiver must sample each bit away from its
edges and must know where each 10-bit period starts. `cdcm_linkup` handles both
while the far end sends IDLE:

1. **Delay-tap scan.** The controller steps the input-delay element (`IDELAY`,
   `NTAPS = 32` taps) through every tap. At each tap it waits `SETTLE` cycles,
   then watches `CHECK` words. A tap is good if every word is the same and is a
   rotation of the IDLE word. Taps that sample on a transition give changing
   words and fail.
2. **Pick the centre.** The controller picks the middle of the longest run of
   good taps; on a tie it takes the first run.
3. **Bit slip.** The controller asks the deserializer for one-bit slips until
   the word equals `1111100000`, which puts the rising edge at the MSB. Each
   slip stretches one capture period by one bit clock.
4. **Link up.** After `CHECK` clean words, `link_up_o` rises.

If no tap is good, or the word is still not aligned after 20 slips, the scan
starts over. With the defaults, link-up takes about 2 500 link cycles. Once up,
the link stays up until reset. There is no automatic recovery after the link is
lost.

Nothing is sent by `spdt_tx` and nothing is passed on by the receiver until the
local receiver is linked up. Each end decides this only from its own receive
side. An application that needs both directions up must combine the two ends'
`link_up_o` itself.

## Clocks and what is outside the RTL

- `clk` is the link clock (up to 125 MHz, or 142 MHz on faster FPGA speed
  grades, limited by the global clock buffers). `clk_bit` is 10 × `clk` and
  phase-aligned with it. Both would come from one PLL/MMCM. At the slave end that
  PLL is fed by the received modulated clock, which is how the clock is
  recovered.
- The serializer and deserializer are plain shift registers on `clk_bit`, single
  data rate. On an FPGA they map to OSERDES/ISERDES, which would run double data
  rate at 5 × `clk`.
- These parts are not RTL:
  - **Clock recovery.** This is done by the PLL/MMCM or an external jitter
    cleaner. The testbenches drive both ends from the same clocks.
  - **The input-delay element.** `mikumari_link` outputs the tap
    (`idelay_tap_o`, `idelay_load_o`) and takes the delayed serial input on
    `serial_i`. In the testbenches, `tb/line_model.sv` models the line and the
    delay, with a closed region of the eye near every bit edge.
  - **The global clock buffers.**

## Files

| file | role |
|------|------|
| `rtl/cdcm_pkg.sv` | shared constants, symbol and packet-field types, CDCM word functions |
| `rtl/cdcm_encoder.sv` | bytes → CDCM words, IDLE when nothing is offered |
| `rtl/cdcm_serializer.sv` | 10:1 serializer on `clk_bit` |
| `rtl/cdcm_deserializer.sv` | 1:10 deserializer with bit slip |
| `rtl/cdcm_decoder.sv` | words → symbols → bytes, start-of-packet mark, pattern and framing errors |
| `rtl/cdcm_linkup.sv` | delay-tap scan, bit slip, `link_up` |
| `rtl/cdcm_transceiver.sv` | the five blocks above, wired together |
| `rtl/spdt_tx.sv` | packet builder, pulse wait counter, checksum |
| `rtl/spdt_rx.sv` | packet checker, frame delivery, pulse scheduler |
| `rtl/mikumari_link.sv` | **top**: one link end |

### Parameters of `mikumari_link`

| parameter | default | meaning |
|-----------|---------|---------|
| `NTAPS` | 32 | taps of the input-delay element |
| `SETTLE` | 8 | cycles waited after each tap change or bit slip |
| `CHECK` | 64 | words that must be clean for a tap to be good, and before link-up |
| `PULSE_DELAY` | 128 | receiver part of the fixed pulse latency; must exceed the longest wait + 14 |

The bit ratio (10), the packet limit (16 user bytes) and the magic byte are
package constants in `cdcm_pkg`.

## Simulation

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_mikumari_link \
    rtl/cdcm_pkg.sv tb/tb_mikumari_link.sv
./obj_dir/Vtb_mikumari_link
```

| testbench | what it shows |
|-----------|---------------|
| `tb_mikumari_link` | Two ends at default parameters. Link-up on both sides with the expected taps and bit slips. Frames of every length both ways. Pulses alone, delayed by traffic and sharing a packet, all at one latency. A dropped second pulse. A falling edge moved on the line that gives a checksum error, and another that gives a pattern error. |
| `tb_mikumari_stream` | 400 back-to-back 16-byte packets each way plus 100 pulses. Checks 96-cycle packet spacing, no errors and constant pulse latency. |
| `tb_cdcm_transceiver` | Loopback through the line model: bytes, start-of-packet marks, one byte per 4 cycles, broken-pattern detection. |
| `tb_cdcm_linkup` | Tap choice against a reference, slip count, link-up time bound. |
| `tb_cdcm_serdes` | Each slip rotates the word by one bit; data passes unchanged at a constant latency. |
| `tb_cdcm_encoder`, `tb_cdcm_decoder` | Word-by-word checks against reference models. |
| `tb_spdt_tx`, `tb_spdt_rx` | Packet bytes, checksum, wait count, packet timing, every error kind, exact pulse cycle, late pulses, several pulses in flight. |

`tb/line_model.sv` is a behavioural model used only by the testbenches. It can
also move one falling edge on the line to inject faults.

## How much of this is the published design

These parts follow the published design:

- CDCM with a fixed rising edge.
- 10 serial bits per clock period, two data bits per period, and IDLE as a
  50 % duty period.
- One byte every four cycles.
- The SerDes-based transceiver structure.
- Link-up by input-delay adjustment and bit slip.
- Detection of broken modulation patterns.
- The SPDT packet fields, their order and sizes (magic `0xFD`, 0 to 16 user
  bytes, 2-byte checksum, closing IDLE byte).

These are this design's own choices, because the published material does not
specify them:

- Which high-bit count stands for which bit pair.
- The bit layout of the length+instruction and pulse-timing fields, and the
  `frame` flag.
- The checksum algorithm (a plain 16-bit byte sum).
- The value of the reserve byte.
- The wait-count method for fixed pulse latency, and `PULSE_DELAY`.
- Firing pulses before the checksum is known.
- Dropping a second waiting pulse.
- The tap-scan algorithm and its parameters.
- Single-data-rate serialization.
- Gating transmission on the local link-up only.

A few things in the published material have no counterpart here:

- Recovery of a lost link (named there as future work).
- Any difference in logic between the master and the slave end.
- The clock-quality behaviour behind the jitter results. This is analog and
  belongs to the PLLs and the line, not to this logic.
