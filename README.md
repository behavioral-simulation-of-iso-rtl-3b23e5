# Gen2 UHF RFID tag: digital identification layer

A passive UHF RFID tag that follows EPC Class-1 Generation-2 (ISO 18000-6
Type C) has to do four things with very little logic:

- recover the reader's commands from a pulse-interval-encoded envelope;
- take part in a slotted-ALOHA inventory round, so that a reader can
  separate hundreds of tags that all answer on the same channel;
- hand over its identifier (EPC) once it is singled out;
- serve memory reads and writes afterwards.

This repository holds SystemVerilog RTL for that logic. It covers everything
between the analog front end (envelope detector, backscatter modulator) and
the FM0/Miller line encoder. The top module is `gen2_tag`. It takes the
demodulated envelope `env` and gives out reply bits (`tx_bit`, `tx_valid`)
at a rate the encoder sets with `tx_ready`.

```
 env ─► pie_decoder ─► input_buffer ─► cmd_detector ──┐
                 └────► crc_engine (check) ───────────┤
                                                      ▼
   slot_counter ◄──► tag_fsm ◄──► session_flags
   prng         ◄──►    │   ◄──► tag_memory
                        ▼
                  output_buffer (+ crc_engine) ─► tx_bit / tx_valid / tx_last
```

The logic falls into three groups:

| Group | Blocks | Role |
|---|---|---|
| Command detection | `input_buffer`, `crc_engine`, `cmd_detector` | Turn a received frame into a record of fields and a CRC verdict. |
| Control unit | `tag_fsm`, `slot_counter`, `session_flags` | Run the protocol. |
| Response | `prng`, `tag_memory`, `output_buffer` | Make the random numbers, hold the data and send the reply. |

The shared types are in `gen2_pkg`: the command enumeration, the CRC
selector, the tag states and the `cmd_fields_t` record.

## Receiving: PIE symbols and frames (`pie_decoder`)

A reader sends each symbol as a high interval ended by a short low pulse.
Data-0 is one Tari long. Data-1 is 1.5 to 2 Tari long. The reader does not
tell the tag what Tari is. Instead every frame begins with calibration
symbols:

1. a low delimiter;
2. a data-0;
3. RTcal, which is as long as a data-0 plus a data-1;
4. in the preamble of a Query only, TRcal, which sets the backscatter rate.

The decoder counts clocks from one rising edge of the envelope to the next.
It skips the data-0 and stores RTcal. It then compares every later symbol
with the pivot, which is RTcal/2. A symbol no longer than the pivot is 0; a
longer one is 1.

A symbol right after RTcal that is longer than RTcal must be TRcal. Its
length is kept in `trcal_cnt` for the encoder. Frames carry no length field.
The decoder ends a frame when the envelope has stayed high for more than
4 x RTcal, which no symbol can last.

Timing:

- The clock must be several times faster than 1/Tari. The testbenches use 20
  to 50 clocks per Tari.
- A bit appears three clocks after the rising edge that ends it.
- `frame_start` pulses once RTcal is known.
- `frame_end` pulses after the timeout.

## Command detection (`input_buffer`, `crc_engine`, `cmd_detector`)

The input buffer shifts bits in and counts them. It is 352 bits wide, and
the count is 9 bits. A frame that does not fit sets `overflow`.

The receive CRC engine runs both Gen2 checks on the fly:

| CRC | Polynomial | Preset | Good frame leaves |
|---|---|---|---|
| CRC-16 | x^16+x^12+x^5+1 | FFFFh | residue 1D0Fh |
| CRC-5 | x^5+x^3+1 | 01001b | 00000b |

One clock after the frame end, `crc_valid` pulses if the residue selected by
the command's CRC type is right.

The detector looks at the first bits to identify the command. Command codes
are prefix-free: 00 QueryRep, 01 ACK, 1000 Query, 1001 QueryAdjust, 1010
Select, 11000000 NAK, 11000001 Req_RN, 11000010 Read, 11000011 Write. Its
outputs are:

- `crc_sel`, combinational, so that the CRC engine knows which residue to
  test;
- the field record `fields`, one clock later, with `fields_valid`.

Pointers in Select, Read and Write are EBVs, which the detector decodes:

- each byte carries 7 bits;
- the top bit of a byte says that another byte follows;
- one to three bytes are accepted.

A frame whose length differs from what its fields imply is reported as
`CMD_INVALID`, and so is an overflowed one. Frame lengths in bits:

| Command | Bits |
|---|---|
| QueryRep | 4 |
| QueryAdjust | 9 |
| NAK | 8 |
| ACK | 18 |
| Query | 22 |
| Req_RN | 40 |
| Read | 50 + 8 per extra EBV byte |
| Write | 58 + 8 per extra EBV byte |
| Select | 45 + 8 per extra EBV byte + mask length |

## The control unit (`tag_fsm`)

The tag states are Ready, Arbitrate, Reply, Acknowledged, Open and Secured.
The FSM acts on a command only when `crc_valid` is high, or when the command
carries no CRC. Commands that do not apply in the current state are
ignored.

**Select.** The FSM compares the Select's mask with memory:

- Length bits starting at bit address Pointer of MemBank;
- one bit per two clocks, because memory is read word by word.

A match or a mismatch, together with Target and Action, goes to
`session_flags`. That block applies the Gen2 action table to the
inventoried flag of one of four sessions (A or B) or to the SL flag. The tag
then returns to Ready.

**Query.** The tag takes part if two conditions hold:

- Sel agrees with SL (or Sel says "all");
- Target equals the session's inventoried flag.

It then asks the PRNG for a 16-bit number RN16 and loads the slot counter
with RN16 mod 2^Q. With slot 0 the tag backscatters the RN16 and goes to
Reply. Otherwise it goes to Arbitrate.

**Anti-collision.** Each QueryRep counts the slot down. The tag whose count
reaches 0 replies with a fresh RN16. Several tags can reach 0 in the same
slot; the reader then sees a collision and acknowledges nobody. A tag left
in Reply by a QueryRep goes back to Arbitrate, and its counter wraps from 0
to 7FFFh, so it stays silent for the rest of the round.

QueryAdjust changes Q:

| UpDn | Effect |
|---|---|
| 110 | Q + 1 |
| 011 | Q − 1 |
| 000 | Q unchanged |

Every participating tag then draws a new slot. This is how a reader fits
the frame size to an unknown population; the "Q algorithm" lives in the
reader.

**Singulation.** An ACK that echoes the tag's RN16 moves it to Acknowledged.
The tag then sends PC, EPC and CRC-16. A wrong ACK sends it back to
Arbitrate.

A truncated reply needs two things:

- the last Select had Truncate = 1 and pointed into the UII bank;
- the Query selected on SL (Sel = 11).

The reply then drops the part of the EPC that the reader already knows from
its mask. It is 00000b, then the EPC bits from the bit after the mask to the
end of the EPC, then a CRC-16 over those bits. The first word is shifted so
that the reply starts at the right bit.

When an acknowledged tag sees the next QueryRep, QueryAdjust or a Query of
the same session, it inverts its inventoried flag (A↔B) and goes to Ready.
The round goes on with the flag in the other value, so the reader no longer
hears that tag.

**Access.** Req_RN in Acknowledged makes a new RN16 the tag's handle:

- an access password of zero leads to Secured;
- any other password leads to Open.

Req_RN in Open or Secured makes a cover code. Read and Write must carry the
handle:

- A Read returns header 0, the words, the handle and CRC-16. WordCount 0
  means to the end of the bank.
- A Write stores Data XOR cover code.
- An access beyond a bank returns header 1, error code 03h, the handle and
  CRC-16.
- NAK returns any state past Arbitrate to Arbitrate.

The FSM sends replies in pieces of up to 16 bits. It fetches the next memory
word while the previous piece is shifting out.

## Slot counter, session flags, PRNG, memory

- **`slot_counter`**: a 16-bit down counter.
  - `load` sets it to `rn_16_in mod 2^q_value_in`.
  - `dec` counts down; counting down from 0 gives 7FFFh.
  - `slot_done` pulses after every change.
  - `slot_zero` is combinational.
- **`session_flags`**: four inventoried flags and SL, all reset to A and
  deasserted. They keep no value across power loss.
- **`prng`**: a 16-bit Galois LFSR with polynomial
  x^16+x^14+x^13+x^11+1 (mask B400h).
  - A request clocks it 16 times, and `rn16_done` comes 17 clocks after the
    request.
  - `preset` loads `seed`. In the top, every tag is given its own `SEED`
    parameter, so that a population of tags draws different slots.
- **`tag_memory`**: one array of 16-bit words behind one port with `rd_en` /
  `wr_en`. Reads have a latency of one clock. `in_range` says whether an
  address lies in its bank.

  | Bank | Contents | Default size |
  |---|---|---|
  | 00 Reserved | kill and access passwords | 4 words |
  | 01 UII | StoredCRC, PC, EPC | 8 words |
  | 10 TID | E2h class identifier and vendor data | 4 words |
  | 11 User | user data | 16 words |

  PC and StoredCRC are computed from the `EPC` parameter. The memory
  reloads its parameters at reset, in place of non-volatile storage.

## Sending (`output_buffer`)

The buffer has a holding register and a shift register. It sends one bit
per clock in which the encoder raises `tx_ready`. When a reply needs a
CRC-16, a second `crc_engine` follows the outgoing bits. After the last data
bit and one idle clock, the buffer sends the ones' complement of that
CRC-16, MSB first. `tx_last` marks the final bit. `done` pulses one clock
after it.

The link parameters from the last Query also go to the encoder: DR, M and
TRext (`link_*`). So do the measured RTcal and TRcal. The encoder is not
part of this RTL.

## Parameters of `gen2_tag`

| Parameter | Default | Meaning |
|---|---|---|
| `CNT_W` | 16 | width of the PIE symbol counters (clocks) |
| `BUF_BITS` | 352 | input buffer size in bits |
| `SEED` | ACE1h | PRNG seed; give each tag a different one |
| `RES_WORDS`, `EPC_WORDS`, `TID_WORDS`, `USER_WORDS` | 4, 6, 4, 16 | bank sizes in 16-bit words (EPC without StoredCRC and PC) |
| `KILL_PWD`, `ACCESS_PWD` | 0, 0 | passwords |
| `EPC`, `TID` | 96-bit and 64-bit values | memory contents at reset |

A 96-bit EPC is the default. Set `EPC_WORDS` up to 16 for a 256-bit EPC.
`BUF_BITS` limits Select masks: a Select with a 3-byte pointer and a mask
longer than 283 bits overflows the 352-bit buffer.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
with reference models written independently of the RTL in `tb_gen2_pkg`:
bit-serial CRCs and frame builders for every command. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb_gen2_tag` drives the top at its default parameters through real PIE
waveforms. It plays a reader that runs these steps:

1. Select with a matching mask, then one with a mismatching mask;
2. a corrupted frame and a frame of the wrong length;
3. Query, QueryAdjust and QueryReps until the tag replies;
4. a wrong ACK, then the right ACK, which returns the EPC;
5. NAK, then a fresh round;
6. Req_RN for the handle and for a cover code;
7. Read of the EPC, of a whole bank and past a bank;
8. Write, then read back;
9. the flag inversion at the end of the round;
10. a truncated EPC reply.

The testbench counts each of these mechanisms and fails if any did not
occur. It also counts the clocks the encoder holds the output buffer.

`tb_anticollision` puts 100 tags on one shared envelope. Each tag has its
own seed and EPC. A reader model inventories them with the Gen2 Q
algorithm:

- Qfp starts at 4.
- A collision adds 0.3 and an empty slot subtracts 0.3.
- When round(Qfp) differs from Q, the reader sends QueryAdjust. Otherwise it
  moves on with QueryRep.
- Each single reply is lost to interference with probability q. The tag
  then stays in the population for a later slot.

The testbench resets the tags and runs the inventory once for each q of 1,
2, 15, 30 and 60%. It checks these things:

- in every slot, the tags that reply are exactly the tags in Reply;
- every acknowledged tag sends its own EPC with a valid CRC;
- no tag is read twice;
- a final Query gets no answer;
- q = 60% costs more slots than q = 1%.

In one run the 100 tags needed:

| q | Slots | Collisions | Empty | Lost to interference |
|---|---|---|---|---|
| 1% | 312 | 99 | 110 | 3 |
| 2% | 285 | 88 | 96 | 1 |
| 15% | 356 | 114 | 123 | 19 |
| 30% | 376 | 114 | 121 | 41 |
| 60% | 800 | 248 | 258 | 194 |

Building this testbench takes a few minutes, because it holds 100 copies
of the tag.

To run one testbench with plain Verilator (version 5):

```
verilator --binary --timing --assert -Irtl \
  rtl/gen2_pkg.sv rtl/*.sv tb/tb_gen2_pkg.sv tb/tb_gen2_tag.sv \
  --top-module tb_gen2_tag -o sim && ./obj_dir/sim
```

List `gen2_pkg.sv` before the other files. The block testbenches need only
the block's own file and its sub-blocks. `output_buffer` uses `crc_engine`.
`tb_tag_fsm` uses all the blocks except `pie_decoder` and `input_buffer`.

## What is not here, and where this design chose for itself

Not built:

- the analog front end and the FM0/Miller encoder;
- Kill, Lock, Access, BlockWrite and BlockErase, and the Killed state;
- the T1/T2 reply timing, which is left to the encoder;
- persistence times of the session flags.

Choices made here, where the protocol description left them open:

- The numbering of the `cmd_e` commands, except Select (00100b) and Read
  (01000b).
- The `crc_sel` encoding: 10 = CRC-16, 01 = CRC-5.
- The PRNG polynomial.
- All memory sizes and default contents.
- The end-of-frame timeout.
- Synchronous reset in every block.
- The push and ready handshakes between the FSM, the output buffer and the
  encoder.

The slot is RN16 mod 2^Q, drawn from 0 to 2^Q − 1.
