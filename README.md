# CAN controller with an EEDC field in place of the CRC

A classical CAN 2.0A frame ends its protected part with a 15-bit CRC
sequence. The CRC only *detects* errors: every corrupted frame is rejected
and sent again, and its 15 bits are paid on every frame, however short.
This design replaces the CRC sequence with an **Enhanced Error
Detection-Correction (EEDC)** field: a Hamming-like code whose redundancy
bits are appended *after* the data rather than interleaved at power-of-two
positions. The field is 6 to 8 bits long instead of 15, and a receiver can
repair any single flipped bit in the protected part of the frame, then
acknowledge it, with no retransmission.

The RTL contains the EEDC encoder and decoder, a CAN transmitter and
receiver built around them, a complete controller node, and a test system
that emulates a CAN bus inside the FPGA. In that system, frames recorded in
an on-chip memory are replayed from one node to another.

## The EEDC code

Number the `D` protected bits 1..D in the order they are sent. The
redundancy bits are:

* **Position parities.** Let `K = clog2(D+1)` be the number of bits
  needed to write any position number. For `k = 0 .. K-1`, parity `k` is
  the even parity of all data bits whose position number has bit `k` set.
  This is the same as XOR-ing together the position numbers of all the
  1-bits: bit `k` of that XOR is parity `k`.
* **Parity of parities.** One last bit is the even parity of the `K`
  position parities.

So `r = K + 1`. The parities go out in the order parity 0, parity 1, …,
parity K-1, then the parity of parities, directly after the last data bit.

Worked example, 7 data bits `1001110`:

| redundancy bit | covers positions | bits there | value |
|---|---|---|---|
| parity 0 | 1, 3, 5, 7 | 1,0,1,0 | 0 |
| parity 1 | 2, 3, 6, 7 | 0,0,1,0 | 1 |
| parity 2 | 4, 5, 6, 7 | 1,1,1,0 | 1 |
| parity of parities | parity 0..2 | 0,1,1 | 0 |

The code word sent is `1001110 0110`. The encoder testbench checks this
word exactly.

### Decoding

The receiver recomputes the position parities from the received data and
XORs them with the received ones. The result is the syndrome `s`. It also
checks the received parity of parities against the received position
parities; the result is `p`.

| `s` | `p` | meaning | action |
|---|---|---|---|
| 0 | 0 | no error | deliver |
| ≠0, ≤ D | 0 | data bit `s` is wrong | invert bit `s`, deliver, report position |
| ≠0, > D | 0 | impossible for one error | uncorrectable |
| 0 or one bit set | 1 | one redundancy bit is wrong | data is good, deliver |
| two or more bits set | 1 | multiple errors | uncorrectable |

The parity of parities is what tells the two single-error cases apart. A
wrong data bit leaves it consistent. A wrong position parity, or a wrong
parity of parities, breaks it. Every single error therefore has its own
syndrome. As with a Hamming code, the guarantee is single-error
correction. Two errors in the data bits give `p = 0` and a wrong position,
so they can be miscorrected. The decoder testbench only requires that a
double error is never reported as error-free.

### How many redundancy bits

The sizing rule that goes with this construction is `(D + r + 1) ≤ 2^r`.
The construction itself needs `r = clog2(D+1) + 1`, because the position
parities must be able to name every data position. The two agree for the
7-bit example (`r = 4`). For some lengths the construction needs one bit
more than the sizing rule allows; for example, `D = 83` needs 8 bits, where
the rule would allow 7. The RTL follows the construction, because with
fewer bits some single errors could not be located.

## The frame

The EEDC block covers the same span the CRC would: SOF, the 11-bit
identifier, RTR, IDE, r0, the DLC and the data field. That is
`D = 19 + 8·n` bits for `n` data bytes; remote frames carry 0 bytes.

```
SOF | ID(11) | RTR | IDE | r0 | DLC(4) | data(8n) | EEDC(r) | delim | ACK | ACK delim | EOF(7) | IFS(3)
\____________________ EEDC-protected span (D bits) _______/
\___________________________ bit-stuffed _____________________________/
```

| data bytes | D | r (EEDC) | frame bits with EEDC | frame bits with CRC-15 |
|---|---|---|---|---|
| 0 | 19 | 6 | 38 | 47 |
| 1 | 27 | 6 | 46 | 55 |
| 2 | 35 | 7 | 55 | 63 |
| 3–5 | 43–59 | 7 | 63–79 | 71–87 |
| 6 | 67 | 8 | 88 | 95 |
| 7 | 75 | 8 | 96 | 103 |
| 8 | 83 | 8 | 104 | 111 |

The frame bit counts are without stuff bits and include the 3-bit
intermission.

### Measured frame length and payload rate

`eedc_data_rate_tb` replays four random frames of each length at 1 Mbit/s.
It measures the time from one SOF to the next on the bus. It also builds
the same frames with a CRC-15 field (polynomial
x^15+x^14+x^10+x^8+x^7+x^4+x^3+1), stuffed in the same way. Mean bits per
frame, stuff bits and the 3-bit intermission included:

| data bytes | EEDC frame | CRC-15 frame | EEDC payload rate | CRC-15 payload rate |
|---|---|---|---|---|
| 1 | 47.75 | 57.00 | 167.5 kbit/s | 140.4 kbit/s |
| 2 | 57.25 | 65.00 | 279.5 kbit/s | 246.2 kbit/s |
| 4 | 73.00 | 81.50 | 438.4 kbit/s | 392.6 kbit/s |
| 8 | 107.50 | 114.50 | 595.3 kbit/s | 559.0 kbit/s |

Every EEDC frame must be shorter than its CRC-15 counterpart, and it was.
The numbers depend on the random data through the stuff bits.

### Behaviour under random errors

`eedc_random_error_tb` encodes random blocks at every CAN span length. It
inverts 1, 2 or 3 random bits of each code word, 3000 trials each:

| errors | corrected | flagged uncorrectable | miscorrected | undetected |
|---|---|---|---|---|
| 1 | 3000 | 0 | 0 | 0 |
| 2 | 0 | 1036 | 1964 | 0 |
| 3 | 0 | 1266 | 1695 | 39 |

This is the trade-off of a single-error-correcting code of minimum
distance 3. A CRC-15 detects every 1-, 2- and 3-bit error at these lengths
but corrects none. The EEDC field repairs every single error, which saves
a retransmission. However, about two thirds of double errors are
"corrected" into a wrong frame and delivered. Where that matters, a
receiver could refuse corrections, at the cost of losing the benefit.

## The controller

### Transmitter (`can_tx`)

A requested frame is latched and passed through the parallel encoder. The
transmitter then waits until the bus is idle (11 recessive bits). It sends
SOF, then the span and the EEDC bits, inserting a complementary stuff bit
after every five equal bits. A stuff bit is also inserted after the last
EEDC bit when needed. Then come the recessive delimiter, a recessive ACK
slot, the ACK delimiter and 7 EOF bits.

Every bit is read back at the sample point:

* **Recessive read as dominant in the identifier or RTR bit:** arbitration
  is lost. The transmitter falls silent at once and tries again when the
  bus is idle.
* **Any other mismatch:** bit error.
* **Recessive ACK slot:** acknowledgement error.

Both errors are answered with a 6-bit dominant error flag. The frame is
then sent again automatically once the bus is idle. `done_o` pulses on the
last EOF bit of a successful attempt.

### Receiver (`can_rx`)

After 11 recessive bits, a dominant bit is taken as SOF. The receiver
removes the stuff bits; a sixth equal bit is a stuff error. It stores the
span left aligned. Once the DLC has arrived it knows `D` and `r`, and it
takes the next `r` bits as the EEDC field. At the delimiter the
combinational decoder gives its verdict:

* **Clean or corrected:** the receiver drives the ACK slot dominant. After
  a clean EOF it delivers the frame with the correction flags and the
  corrected position. A corrected frame is *not* retransmitted: this is
  what the design is for.
* **Uncorrectable:** no ACK, and a 6-bit error flag after the ACK
  delimiter. The sender then sees an ACK error and repeats the frame. This
  is the usual CAN placement for a CRC error.
* **A dominant delimiter, ACK delimiter or EOF bit, or a recessive IDE
  bit:** form error, with an error flag from the next bit.

A node neither acknowledges nor delivers the frames it is sending itself.
It does receive a frame whose arbitration it lost.

### Node and bus system

`can_eedc_node` puts a bit-timing prescaler, one transmitter and one
receiver on one bus pin. The two drive the pin through a wired AND.

`can_eedc_system` is the top. It has two nodes on a wired-AND bus inside
the FPGA:

* Node 0 is fed by `can_frame_replay`. This is a 64-entry frame memory,
  loaded through a write port, and a sequencer. On `start_i`, the sequencer
  hands entries `0 .. count-1` to the transmitter one by one and waits for
  each to be reported sent.
* Node 1 has a host transmit port.

Each node reads the bus through an XOR with `noise_i[n]`. Raising that bit
around a sample point inverts one bit as that node sees it, which emulates
a disturbed receiver.

## Interfaces and timing

* Frames are `eedc_pkg::can_frame_t`: `{id[10:0], rtr, dlc[3:0],
  data[63:0]}`. Data byte 0 sits in `data[63:56]` and is sent first. Bytes
  beyond the DLC are ignored when sending and are zero when received.
* Transmit handshake: hold `req_valid` with the frame. The request is taken
  in the cycle where `req_ready` is high, which happens only while the
  transmitter is idle.
* One bit lasts `CLK_HZ / BIT_RATE` cycles. The default is 50 cycles
  (50 MHz, 1 Mbit/s). Nodes drive at the start of a bit and sample at 75 %
  of it. All nodes share one clock and reset, so there is no
  resynchronisation.
* Back-to-back frames: the next SOF follows the last EOF bit after exactly
  3 intermission bits. The system testbench checks this spacing for every
  undisturbed frame.
* The encoder and decoder are purely combinational. Their logic depth
  grows with `MAX_D` (83 by default).
* Reset is asynchronous and active low. After reset a node waits for 11
  recessive bits before it takes part on the bus.

## Limits and departures from a full CAN controller

* Only base frames with 11-bit identifiers are handled. IDE = 1 is treated
  as a form error.
* There are no error counters and no error-passive or bus-off states.
  Retransmission repeats without limit.
* There is no hard or soft resynchronisation. This is fine while all nodes
  share a clock, as on the emulated bus, but not for a bus between chips.
* The receiver takes the frame length from the DLC it received. A flipped
  RTR or DLC bit therefore moves the EEDC field and cannot be corrected,
  even though those bits are inside the protected span. What the receiver
  then reports depends on the bits that land in the misplaced field. This
  case is not covered by the testbenches.
* The replay memory sends frames back to back, not at recorded time
  stamps.

## Files

| file | content |
|---|---|
| `rtl/eedc_pkg.sv` | constants, `can_frame_t`, length helpers |
| `rtl/eedc_encoder.sv` | parallel EEDC encoder |
| `rtl/eedc_decoder.sv` | parallel EEDC syndrome decoder / corrector |
| `rtl/can_bit_timing.sv` | bit-rate prescaler |
| `rtl/can_tx.sv` | transmitter |
| `rtl/can_rx.sv` | receiver |
| `rtl/can_eedc_node.sv` | one controller |
| `rtl/can_frame_replay.sv` | frame memory and replay sequencer |
| `rtl/can_eedc_system.sv` | top: two nodes on an emulated bus |
| `tb/can_ref_pkg.sv` | independent reference model: EEDC from its definition, stuffing, trailer |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/eedc_data_rate_tb.sv` | frame length and payload rate, 1–8 data bytes, against CRC-15 |
| `tb/eedc_random_error_tb.sv` | random 1/2/3-bit errors at every span length |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example, the end-to-end test at the default parameters:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  -y rtl -y tb +libext+.sv rtl/eedc_pkg.sv tb/can_ref_pkg.sv \
  tb/can_eedc_system_tb.sv --top-module can_eedc_system_tb -o sim
./obj_dir/sim
```

`can_eedc_system_tb` replays 27 frames of 0–8 data bytes (three of each
length). It disturbs chosen bits so that the run includes:

* data-bit and redundancy-bit corrections;
* uncorrectable double errors (ACK error, then a retransmission);
* a stuff error and a form error;
* a lost arbitration against the host node.

It checks that every frame arrives exactly once, in order and intact, and
that each mechanism happened. The unit testbenches compare the transmitter
bit by bit against the reference stream, and check the encoder against the
worked example and against every length 1..83.
