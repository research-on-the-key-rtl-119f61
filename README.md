# A four-line time-division telephone exchange in one FPGA

This is the digital core of a small stored-program-control (SPC) telephone
exchange for four telephones. The classic teaching exchange builds this from
a dedicated digital switch chip, a microcontroller to program it, and separate
circuits for slot timing and call-progress tones. Here one clocked design
does all of it:

- it generates the slot timing of a 2.048 Mbit/s PCM bus;
- it synthesises dial, ring-back and busy tone from a stored 450 Hz sine;
- it drives the 25 Hz ringing wave;
- it reads the dialled digits;
- it switches speech between the users' time slots.

Everything outside the core is a bought-in part on the board, and stays
outside this RTL:

- A-law PCM codecs (TP3067), one per line and one per DTMF receiver;
- line interface circuits (AM79R70);
- DTMF receivers (MT8870);
- a 4.096 MHz oscillator;
- a small processor that shows the line states on an LCD and stores call
  records.

## The bus and the frame

All codecs share two serial lines:

- **DX** carries data from the codecs to the exchange;
- **DR** carries data from the exchange to the codecs.

A frame lasts 125 µs. It holds 256 bits at 2.048 Mbit/s, split into 32 time
slots of 8 bits. A codec sends its speech sample on DX in its slot and takes
the sample it plays from DR in the same slot. Each slot has a sync pulse,
TP1..TP32. The pulse is one bit wide, and TP(k+1) comes 8 bit clocks after
TP(k). The slot's 8 data bits follow the pulse, MSB first, as the TP3067
expects in short-frame-sync mode.

| slot pulse | use |
|---|---|
| TP1..TP4 | the four users' codecs |
| TP5..TP8 | codecs that feed each user's DTMF receiver |
| TP9 | dial tone, sent on DX by the core |
| TP10 | ring-back tone (or music), sent on DX by the core |
| TP11 | busy tone, sent on DX by the core |
| TP12..TP32 | unused |

Everything runs on the single 4.096 MHz clock. `timeslot_gen` counts 512
clocks per frame:

- T2048 is high in the first clock of each bit and low in the second;
- DR changes in the first clock;
- DX is sampled in the second clock;
- `frame_tick` marks the first data bit of slot 0 (the bit after TP1).

## Switching is copying bytes between slots

A connection is a copy from a DX slot to a DR slot:

- In a call between users 1 and 2, the core copies DX slot TP2 into DR slot
  TP1, and DX slot TP1 into DR slot TP2.
- A user who should hear dial tone gets DX slot TP9 copied into their DR
  slot. The core itself puts the dial tone on DX in TP9.
- Ring-back and busy tone work the same way through TP10 and TP11.

So tones and speech follow exactly the same path.

`tsi_switch` does the copying. It has two parts:

- **A 32-byte speech memory, double-buffered.** During a frame, every DX
  slot is shifted into one bank while the other bank is read. The banks swap
  after slot 31.
- **A 32-entry connection table, `route`.** For each DR slot the table gives
  an enable and a source slot. A disabled slot sends the idle code 0xD5,
  which is the A-law zero level as this codec codes it.

Every connection therefore delays the sample by exactly one frame. What user
2 says in frame *f* reaches user 1 in frame *f+1*. The byte for a DR slot is
fetched on the last clock of the slot before it. A change to the table
therefore takes effect from the next slot. When the byte being fetched is
the one being written on that same clock, the fetch bypasses the memory.

`dx_tone_driver` drives DX only during TP9..TP11, through `dx_o` and
`dx_oe`. The switch reads DX as the board sees it: the core's own tone bits
in those three slots, and the codecs' bits everywhere else.

## Call handling

`call_ctrl` runs one state machine per user. The eight states are those of
the front-panel display:

| state | display | meaning | DR slot of the user gets | DTMF slot gets |
|---|---|---|---|---|
| `ST_G` | G | on-hook | idle | idle |
| `ST_Z1` | Z1 | off-hook, waiting to dial | TP9 dial tone | user's own voice |
| `ST_B` | B | dialling | idle | user's own voice |
| `ST_D` | D | number complete, being analysed | idle | idle |
| `ST_H` | H | hearing ring-back | TP10 | idle |
| `ST_Z2` | Z2 | being rung (25 Hz on `ring`) | idle | idle |
| `ST_T` | T | in a call | the other user's slot | idle |
| `ST_M` | M | hearing busy tone | TP11 | idle |

A call goes through these steps:

1. The hook comes off and the user moves from G to Z1.
2. The first digit moves the user to B.
3. The fourth digit moves the user to D.
4. At the next frame tick, the core compares the four DTMF codes with the
   four directory numbers (`user_number`).
5. If the number names another user who is on-hook, the caller goes to H and
   that user goes to Z2. Otherwise the caller goes to M. This covers an
   unknown number, the caller's own number and a busy line.
6. When the rung user lifts the handset, both users go to T.
7. When one side hangs up, the other side goes to M. It stays there until
   that user hangs up too.
8. Putting the hook on always returns a user to G. A caller who hangs up
   while the other phone rings also returns that phone to G.

Two timers count frames:

- **`NO_DIAL` (20 s).** It turns dial tone, or a pause between digits, into
  busy tone.
- **`NO_ANSWER` (60 s).** It ends an unanswered ring: the caller goes to M
  and the rung user to G.

While a user is in Z1 or B, their own DX slot is also copied to their DTMF
slot (TP5..TP8). That codec turns the user's line back into audio for the
MT8870 receiver. `dtmf_capture` then latches the receiver's 4-bit code when
its STD output rises. The board inverts STD, so the pin is `dtmf_le_n`. The
receiver's own codes are used, so digit 0 is `4'hA`.

The users are evaluated in index order within one clock, and each sees the
updates of those before it. Simultaneous events that involve the same user
are therefore resolved by index. No two users can end up ringing the same
phone.

When a call ends, a record is queued for the caller: caller, callee and
whole seconds of conversation. The record is presented on `rec_valid`/`rec`
for one clock. `user_state` and `dialled` are outputs for the display
processor.

## Tones

`sine_table` holds one period of the tone as 18 A-law codes. The codec
inverts the even bits, and the stored codes already include that inversion.
`tone_gen` steps through the table once per frame, so the tone is
8000/18 = 444.4 Hz. From this one sine it builds:

| output | cadence |
|---|---|
| dial tone | continuous |
| ring-back | `RB_ON` = 1 s on, `RB_OFF` = 4 s off |
| busy tone | `BUSY_ON` = 0.25 s on, `BUSY_OFF` = 0.25 s off |
| ringing | a 25 Hz square wave (`RING_HALF` = 160 frames per half period), gated by the ring-back cadence |

Because ringing shares the ring-back cadence, the caller's ring-back and the
called phone's bell run together. The cadence counters run freely from
reset, like a central tone plant.

When `poly_en` is high, `poly_ring` replaces the ring-back tone in TP10 with
stored music: one byte per frame from an 80,000-byte store. The music
restarts whenever nobody is hearing ring-back. The store is loaded through
`mus_we`/`mus_addr`/`mus_data`, and the samples are passed on unchanged.

## Top-level ports (`spc_exchange_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 4.096 MHz clock, asynchronous active-low reset |
| `t2048`, `tp[31:0]` | out | bit clock and slot pulses for the codecs (`tp[k]` is TP(k+1)) |
| `dx_i` | in | DX bus as read |
| `dx_o`, `dx_oe` | out | tone bits and their drive enable on DX |
| `dr` | out | DR bus |
| `hook_off[3:0]` | in | off-hook detect from the line interfaces (active high) |
| `ring[3:0]` | out | 25 Hz ringing drive to the line interfaces |
| `dtmf_q[4]`, `dtmf_le_n[3:0]` | in | DTMF receiver codes and inverted STD |
| `user_number[4]` | in | directory numbers, 4 DTMF codes each |
| `user_state[4]`, `dialled[4]` | out | display state and last dialled digits per user |
| `rec_valid`, `rec` | out | call record strobe and record |
| `poly_en`, `mus_we`, `mus_addr`, `mus_data` | in | music ring-back enable and load port |

The tone cadences, the timers and the music depth are parameters, given in
frames (8000 per second). Their defaults are the real times. The slot plan
and the user count are constants in `spc_pkg`.

## How far to trust it, and where it is this design's own

These points were specified in detail, and the RTL follows them:

- the frame;
- the slot plan;
- the tone table and cadences;
- the call sequence;
- the one-frame copy between slots.

These points were chosen here:

- The meaning of state D.
- The 60 s no-answer time.
- Busy tone for an unknown, own or busy number.
- Silence while dialling.
- The no-dial timer restarting at each digit.
- The idle code in unused slots.
- The record format.
- Restarting the music at each ring-back.
- Fixing the timer limits at build time, as parameters. A host that sets
  them at run time would need them as registers.
- Using the DTMF slots TP5..TP8 as a copy of the user's line. This is
  inferred from the slot plan and from the DTMF receiver being fed by a
  codec output.

Some points have conflicting sources, or could not be checked:

- **Tone slot assignment.** One account of the slot plan puts busy tone in
  TP10 and ring-back in TP11. The call walk-through and its timing diagrams
  use TP10 for ring-back and TP11 for busy tone, and this design follows
  them.
- **Bit order of the tone table.** The two half-periods of the stored sine
  differ only in their last bit. That suggests the table may be printed in a
  different bit order from the one the codec sends. The codes are sent as
  listed, MSB first. Check this against a real TP3067 before trusting the
  tone's shape.
- **Size of the music store.** The store's size is given both as 20 s of
  music and as 80,000 samples, which at 8 kHz is only 10 s. The store holds
  80,000 bytes.
- **Where the music store fits.** 640 kbit exceeds the block RAM of small
  FPGAs such as the Cyclone II EP2C5. There the store would have to be an
  external memory behind the same port.

Outside this RTL:

- The three-party conference call is named only as a possible extension,
  and nothing about how it would work is given. It would need PCM mixing,
  and it is not built.
- The display processor, the FLASH record store with its serial link, and
  the PC software are separate systems.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -y rtl rtl/spc_pkg.sv tb/tb_spc_exchange_top.sv \
          --top-module tb_spc_exchange_top -o sim && obj_dir/sim
```

- **`tb_spc_exchange_top`** runs the whole core with shortened cadences. Its
  testbench models the users' codecs, the DTMF receivers, the hook switches
  and the host. It then checks every DR user slot and DTMF slot of every
  steady frame against the DX slot that the call state says should be
  copied.
  - User 1 calls user 2: dial tone, digits, ring-back on and off, 25 Hz
    ringing, conversation, then busy tone on and off.
  - User 3 calls user 4 with the music ring-back.
  - User 2 waits out the no-dial timer.
- **`tb_spc_exchange_full`** runs one complete call with every parameter at
  its default: the real 1 s/4 s ring-back, 25 Hz ringing (25 periods per
  burst), 0.25 s busy cadence and an 80,000-byte music store. It simulates
  about 1.9 s of exchange time in a few seconds.
- **`tb_tone_workload`** measures the tones at their default parameters
  over 15 s of tone: the dial tone's 18-frame period, the exact ring-back
  and busy burst and pause lengths, and 25 ringing periods per burst.
- **Assertions** in the RTL check two rules while any test runs with
  `--assert`. First, at most one slot pulse is high at a time, and TP1
  precedes every frame start. Second, two users in a call, or a ringing
  pair, always name each other as partner.
- **Block testbenches** cover the slot timing, the tone table, the
  cadences, the music store, the digit capture, the switch and the call
  state machine.
