# Shared-medium FPGA telephone

Several FPGA boards share one twisted pair, each connected through an RS-485
transceiver (MAX485). There is no switch and no master. Any board can drive
the pair, and every board hears everything on it. On top of this broadcast
wire each board runs a small network stack. It carries voice between phones,
with two-way calls and conference calls. Every phone has a 4-bit number.

This repository holds synthesizable SystemVerilog for one phone (`phone`),
built from the blocks below, together with self-checking testbenches. One
testbench puts three phones on a modelled wire and checks calls, ringing,
conferences and line errors end to end.

```
 AC97 mic ─► mic_wrapper ─► tcu ─► parity_stuffer ─► sync_adder ─► DI/DE ┐
                             │                                            │ RS-485
 AC97 spk ◄─ voice_buffer ◄─ packet_analyzer ◄─ tcu ◄─ parity_destuffer ◄─ sync_remover ◄─ RO
                             │
                       phone_fsm ──► siren_gen, ringback_gen, packet selection
```

The two `tcu` boxes are one block with two independent channels.

## The frame on the wire

The transceiver is asynchronous, and the boards' clocks are not related. No
clock is sent with the data. Each frame instead starts with a known sync word,
and the receiver uses it to pick a sampling point. Frames are kept short
enough that clock drift does not matter within one frame.

```
 | SYNC_WORD 32 bits | length 11 bits | block 0 (14 bits) | block 1 | ... |
```

* Every bit is held for `OVERSAMPLE` clock cycles: 8 at 27.5 MHz, which is
  3.44 Mbit/s.
* All fields go out most significant bit first.
* The length counts data bits (14 per block). An 11-bit field therefore
  limits a frame to 146 blocks (2044 bits). All frame buffers are sized for
  that.
* When nobody drives, the wire reads 1 (the transmitter idles at `tx = 1`,
  `de = 0`).

**Sending (`sync_adder`).** The block upstream raises `we` and presents one
14-bit block per cycle. The adder stores each block, and when `we` falls the
frame is complete. The frame is not sent yet. The adder waits for
`green_light`, then drives DE high for the whole frame. In `phone` the green
light is simply "my receiver is not busy", so a phone holds back while
another phone's frame is being received. A phone's own transmission does not
make its own receiver busy, because the receiver is muted while the phone's
DE is high. Muting is also how a phone discards the echo of its own frames.

**Receiving (`sync_remover`).** This is the subtle part. A free-running
counter divides the clock by `OVERSAMPLE`, and the wire is sampled twice per
bit period:

* phase A at count 0;
* phase B `OVERSAMPLE/8` cycles later (45° of a bit; one cycle at the
  default).

Each phase shifts its samples into its own 32-bit register. Both registers
are compared with the sync word at every sample. A sample taken on a bit edge
may read either level. If phase A happens to land on the edges of the sync
word, it can miss the match, but then phase B is one cycle away from every
edge and sees the word cleanly. The phase that matched is stored in `phase`,
and it is kept for the 11 length bits and all the data bits of the frame.
`busy` is high from the sync match to the last data bit. The wire goes
through two flip-flops before it is sampled.

When the frame is complete, the remover stops listening and hands the blocks
out. It goes back to hunting for a sync word only after the last block has
been read. A frame that arrives before then is lost.

## Block handshakes

Two conventions are used throughout. They are the most common source of
off-by-one errors when changing a block.

* **Offer/read (FIFO style).** Used by `sync_remover`, `parity_destuffer` and
  `mic_wrapper` as producers.
  * When `empty` falls, the first item is already on `dout`.
  * Every rising edge with `re` high and `empty` low takes the item on `dout`,
    and `dout` then shows the next item.
  * `empty` rises after the last item has been taken.
  * An assertion in each producer checks that an offered item does not
    change before it is read.
* **Write burst.** Used by the `tcu` outputs, `parity_stuffer` and
  `packet_analyzer`. The data is valid on every rising edge where `we` is
  high, and one burst is one packet or frame.

The `tcu` joins the two conventions. It raises `re` the cycle after `empty`
falls. It forwards each byte it takes with `we` high, one cycle later. It
drops `re` the cycle after `empty` rises. It also watches received headers:
the `to` field of every voice packet is a conference number in use, and
`next_conf` is the largest one seen plus one (0 before any is seen).

## Error correction: the 2×4 parity grid

`parity_stuffer` treats each byte as two rows of four bits:

```
 d0  d1  d2  d3 | p8      p8  = d0^d1^d2^d3     p10 = d0^d4
 d4  d5  d6  d7 | p9      p9  = d4^d5^d6^d7     p11 = d1^d5
 p10 p11 p12 p13                                p12 = d2^d6, p13 = d3^d7
```

The block is `{p13..p10, p9, p8, d7..d0}`. The stuffer registers it and
delays `we` by one cycle to match.

`parity_destuffer` reads a whole frame from the sync remover and recomputes
the six checks for each block:

| failing checks | meaning | action |
|---|---|---|
| none | block is good | keep |
| one row and one column | single data bit wrong | flip the bit at the crossing |
| exactly one check | a parity bit was hit | keep the data |
| anything else | more than one error | drop the whole frame |

The frame is offered to the TCU only if no block was uncorrectable. The
destuffer's states are IDLE, SAMPLING, SAMPLED_WAITING_FOR_TCU and
SENDING_TO_TCU. `frame_dropped` and `corrected` are status pulses; `phone`
brings them out as `rx_dropped` and `rx_corrected`.

The code cannot catch every double error. A data bit flipped together with
its own row or column parity bit looks like a single parity-bit error, so the
wrong data is kept.

## Packets, calls and conferences

A frame carries one packet. Bytes are sent in this order:

| byte | voice packet | calling (ringing) packet |
|---|---|---|
| 0 | `{from[3:0], to[3:0]}` | `{from, to}` |
| 1 | type `8'h01` | type `8'h00` |
| 2..6 | five 8-bit samples (40 bits) | — |

`mic_wrapper` collects five samples, one per AC97 `ready` pulse, and builds
one packet per five samples while the phone FSM enables sending. If a packet
is completed while the previous one is still being read, it is dropped.

`packet_analyzer` takes the header and type of every packet and reports them
to the FSM with a one-cycle `listen` pulse. A voice packet whose `to` equals
the expected conference is passed to the voice buffer. It goes through a
two-entry ping-pong store, in states TRANS_TYPE1_1 and TRANS_TYPE1_2, so the
samples come out one cycle late. Any other packet is skipped until its burst
ends (WAITING_TYPE0_TO_END).

`phone_fsm` has four states:

| from | event | to | while in the new state |
|---|---|---|---|
| IDLE | button | CALLING | sends ringing packets to the dialled number; ringback sound |
| IDLE | ringing packet to my number | RINGING | siren |
| RINGING | ringing packet again | RINGING | ring timer restarts |
| RINGING | no ringing packet for `RING_TIMEOUT` | IDLE | |
| RINGING | button | IN_CALL | opens conference `next_conf` |
| CALLING | voice packet from the dialled number | IN_CALL | joins that packet's conference (`to`) |
| CALLING | button | IDLE | (hang-up while calling; this design's addition) |
| IN_CALL | voice of my conference from another phone | IN_CALL | call timer restarts |
| IN_CALL | button, or `CALL_TIMEOUT` of silence | IDLE | |

In IN_CALL the phone sends voice packets addressed to its conference. A
third phone that dials any member of a running call hears that member's
voice packets, and so joins the same conference. That is how conferences
form. `next_conf` keeps a newly answered call off the conference numbers
already heard on the wire.

## Mixing a conference (`voice_buffer`)

Voice frames arrive in bursts, and the codec wants one sample per `ready`
pulse. The buffer keeps two stores:

* **The running sum.** Every arriving frame is added into it, position by
  position, and the frames are counted.
* **The ready frame.** It is played one sample per `ready` pulse. After its
  fifth sample, the sum becomes the new ready frame and the sum restarts.

The sum is divided by an arithmetic shift. The divisor is the power of two
nearest to the frame count, with ties going up:

| frames | 1 | 2 | 3 | 4 | 5 | 6 | 7–11 | 12–15 |
|---|---|---|---|---|---|---|---|---|
| divisor | 1 | 2 | 4 | 4 | 4 | 8 | 8 | 16 |

The result saturates to 8 bits, because 5 frames divided by 4 can overflow.
Samples are signed. At most 15 frames count per period; with 4-bit numbers
there are at most 15 other phones. A period with no frame plays silence.

## Tones

* `siren_gen`: a square wave that switches between 400 Hz and 700 Hz 8 times
  a second, while the phone is RINGING.
* `ringback_gen`: the OR of a 440 Hz and a 480 Hz square wave, 2 s on and
  4 s off, while the phone is CALLING.

Both derive their periods from `CLK_HZ`. `tone_osc` is their shared
oscillator. In `phone` the speaker gets the voice buffer in a call, the
ringback tone as ±64 while calling, and 0 otherwise. The siren is a separate
one-bit output.

## Parameters

| parameter | default | where | notes |
|---|---|---|---|
| `OVERSAMPLE` | 8 | `phone`, `sync_adder`, `sync_remover` | clock cycles per bit; must match on all phones |
| `MAX_BLOCKS` | 146 | adder, remover, destuffer | from the 11-bit length field |
| `SAMPLES` | 5 | `mic_wrapper`, `voice_buffer` | 40 bits of voice per packet |
| `MAX_FRAMES` | 15 | `voice_buffer` | frames mixed per period |
| `CLK_HZ` | 27 500 000 | `phone`, tone generators | 11 × 2.5 MHz |
| `RING_TIMEOUT`, `CALL_TIMEOUT` | 2 750 000 | `phone`, `phone_fsm` | 0.1 s; this design's choice |
| `SYNC_WORD` | `32'hE2B4_6D1F` | `phone_pkg` | this design's choice |

## What is original and what is this design's choice

These parts follow the original project description:

* the block structure, the frame format and the oversampling factor;
* two-phase sync detection at 45°;
* the 2×4 parity layout and the drop-on-double-error rule;
* the packet layout and type codes;
* the state machines of the FSM, the destuffer and the packet analyzer;
* the TCU handshakes and the "largest conference plus one" rule;
* the running-sum voice mixing with power-of-two division;
* the tone frequencies and the ringback cadence.

These are this design's own choices, where the description is silent:

* the sync word value and the bit order;
* the input synchroniser and the mute input;
* the addressing convention: ringing packets carry the callee's number, the
  answering phone opens `next_conf`, and the caller joins the conference of
  the first voice packet from the callee;
* the timeout lengths, the siren switching rate and the hang-up from CALLING;
* signed samples with saturation, and the audio select.

In one place the description's text and its state diagram disagree: the
packet analyzer's WAITING_TYPE0_TO_END state. The text calls it a one-cycle
state. Here it lasts until the burst ends, as in the diagram, so the voice
bytes of a packet for another conference are never read as a header.

## Known limitations

* **Collisions.** The green light alone does not stop two phones that are
  both waiting for the end of a third phone's frame: both start at the same
  cycle. Nor does it stop a phone from starting during the first 32 bits of
  another phone's frame, before that frame's sync word has been recognised.
  The receivers then drop the garbled frame. The three-phone testbench
  counts these events.
* **Wire capacity.** A 5-sample voice frame takes
  (32 + 11 + 7 × 14) × 8 = 1128 cycles on the wire. At a 48 kHz codec rate a
  phone sends one every 2865 cycles, so two phones fit but three do not. For
  larger conferences, use more samples per packet (`SAMPLES`) or a higher
  bit rate.
* Some double errors are miscorrected (see the parity section).
* The call button is taken as a clean, synchronous level: there is no
  debouncer.

## Simulating

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/phone_pkg.sv tb/tb_phone.sv --top-module tb_phone
./obj_dir/Vtb_phone
```

Testbenches:

| testbench | what it covers |
|---|---|
| `tb_phone` | three phones on a wire with edge noise and injected errors. It checks ringing, answering, joining, conference mixing at every phone, single-error correction, a dropped frame, waiting for the green light, sync on the second phase, echo muting, hang-up and both timeouts. Timeouts and strobes are shortened. |
| `tb_phone_full` | two phones with every parameter at its default, with 48 kHz strobes: a call set up, voice both ways, hang-up and the 0.1 s timeout. About 3 s of simulation time. |
| `tb_sync_remover` | frames at random phases on a wire that is random for one cycle after every edge, and a muted frame. |
| other `tb_<block>` | one per block, checked against reference models written in the testbench. |
