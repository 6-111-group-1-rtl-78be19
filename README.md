# Wireless headphone and speaker set

This design carries a mono audio stream from an A/D converter to a D/A
converter, cutting the data rate along the way.

- Each audio sample is a 16-bit value taken at 90 kHz.
- Every five samples are compressed 2:1 into a 40-bit word, using a
  difference code with a shared exponent.
- Ten extra bits protect the parts of that word whose damage would be
  audible.
- Sixteen protected words are packed into one 800-bit packet.
- On the other side the steps run in reverse and the samples are played
  at 90 kHz.

Alongside the audio path there is a set of controllers for the Chipcon
CC2420 2.4 GHz IEEE 802.15.4 transceiver. They drive the chip entirely from
logic, over its SPI port, with no microcontroller:

- configuration at power-up;
- sending a 5-byte payload with acknowledgement and retransmission;
- receiving a frame and parsing it.

The CC2420 peaks at 250 kbit/s. The protected audio stream needs
900 kbit/s. So the audio path is wired straight from the transmit buffer
into the receive buffer. The radio controllers stand beside it, with their
test payload on ports of their own.

Everything is written in synthesizable SystemVerilog. The three chips (the
AD7656 ADC, the AD5063 DAC and the CC2420) exist only as behavioural models
in `tb/`.

```
 AD7656 ──> adc_sampler ──> chunker ──> compressor ──> ecc_encoder ──> tx_buffer
 (model)        ▲              │ (divider: convst, sclk, frame)                │ 800-bit packets
                └── sample ────┘                                              ▼
 AD5063 <── dac_interface <── decompressor <── ecc_decoder <────────────── rx_buffer
 (model)   (own divider, 5 stacks, serializer)

 spi_clock_divider (27/4 MHz) ─┬─ cc2420_config ─┐
                               │  cc2420_transmit├─ cc2420_spi ──> CC2420 #1 (model)
                               │   └ cc2420_checkack
                               └─ cc2420_config ─┐
                                  cc2420_receive ├─ cc2420_spi ──> CC2420 #2 (model)
```

The top module is `rtl/headphone_system.sv`.

## Time base

Everything on the audio side runs on one 27 MHz clock.

`sample_clock_divider` sets the rhythm:

- **Frame:** 300 clocks, i.e. 90 kHz. One sample enters, and one sample
  leaves, per frame.
- **Serial clock:** `sclk` = 27 MHz / 5 = 5.4 MHz, high for 2 of every 5
  clocks. That gives 60 sclk periods per frame.
- **Convert strobe:** `convst` is high for the first half of the frame.
  The converter only uses its rising edge.

Logic never clocks on these signals. The divider also outputs one-clock
enables, `sclk_tick` and `frame_tick`, and everything else is synchronous to
the 27 MHz clock.

The A/D side and the D/A side each have their own divider. They run
independently and are joined only by the data flow.

## A/D side: sampler and chunker

**adc_sampler.** `adc_sampler` starts a read at a frame start if `sample`
is high.

- It holds `cs_n` high for 20 sclk periods (3.7 µs) after the `convst`
  rising edge. This is enough for the converter to finish. The converter's
  busy output is deliberately not used: its falling edge has no fixed
  relation to `sclk`, and the first bit could be missed.
- It then captures 32 bits, one on each `sclk` rising edge, MSB first.

The word is 32 bits because the design started out as stereo. Only one
channel is fitted, so bits 31:16 are zero and the sample is in bits 15:0.
`word_ready` pulses 260 clocks after the frame start.

**chunker.** `chunker` deals the samples round-robin onto five small
FIFOs (`sample_stack`, 4 deep). Once all five FIFOs hold a sample, it pops
one from each to form a chunk N1..N5 in time order.

It also owns the A/D divider. It drives `sample` low whenever a FIFO is
full, so sampling pauses instead of losing data. If a sample still finds its
FIFO full, the sticky `overflow` flag is set.

## The difference codec (compressor / decompressor)

This is the core of the design.

### Word layout

A chunk of five signed 16-bit samples becomes one 40-bit word:

| bits  | 39:36 | 35 | 34:31 | 30 | 29:26 | 25 | 24:21 | 20 | 19:16     | 15:0 |
|-------|-------|----|-------|----|-------|----|-------|----|-----------|------|
| field | diff4 | s4 | diff3 | s3 | diff2 | s2 | diff1 | s1 | shift_val | N1   |

- **N1** is sent exactly. It is the reference the other four samples are
  rebuilt from.
- **shift_val** is the bit position of the leading one of the largest of
  the four exact differences |N2−N1| … |N5−N4|.
- **diffk** is a 4-bit code. The code's MSB sits at bit `shift_val`, so
  code c stands for c·2^(shift_val−3). All four codes share the one
  exponent.
- **sk** is the sign of difference k: 1 means negative.

### Decoding

N(k+1) = N(k) ± `(code << shift_val) >> 3`, in 16-bit wrap-around
arithmetic. The same arithmetic is coded once, in `codec_pkg::scale_code`.
The compressor and the decompressor both use it.

### Quantisation

Each difference is rounded to the nearest representable value: ties round
up and codes saturate at 15. For shift_val < 3 the step is smaller than 1,
and the fractional part of a decoded difference is dropped.

### Recalculation

This is the important detail. After difference k is coded, the compressor
rebuilds the sample exactly as the decompressor will. It then takes the next
difference from that rebuilt sample, not from the original input sample. A
rounding error in one step is therefore corrected in the next, instead of
being carried through all later samples.

### Example

Input N = 1000, 1013, 1030, 1020, 900.

- The exact differences are +13, +17, −10, −120.
- The largest, 120, has its leading one at bit 6, so shift_val = 6. The
  step is 8.

| k | target − rebuilt   | code        | decoded | rebuilt sample |
|---|--------------------|-------------|---------|----------------|
| 1 | 1013 − 1000 = 13   | 2           | +16     | 1016           |
| 2 | 1030 − 1016 = 14   | 2           | +16     | 1032           |
| 3 | 1020 − 1032 = −12  | 2, negative | −16     | 1016           |
| 4 | 900 − 1016 = −116  | 15          | −120    | 896            |

The listener gets 1000, 1016, 1032, 1016, 896. Without recalculation, step 2
would code the exact +17 as +16 on top of an already-high 1016.

### FSMs and timing

The compressor's FSM runs WAIT, DIFF, MAX_DIFF, MAX1, then (QUANT, RECAL)
four times, then DONE. That is 13 clocks from taking a chunk to presenting
the word. Quantisation divides by shifting: `q = (8·|d| + 2^(sv−1)) >> sv`.

The decompressor takes 7 clocks.

Both are far faster than the 1500 clocks available per chunk. Their
`busy`/`valid` signals mainly matter for flow control.

## Protecting the reference fields (ecc_encoder / ecc_decoder)

Damage to most of the word costs one slightly wrong sample. Damage to N1
or shift_val shifts or scales the whole chunk. The protection therefore
covers only those two fields.

**Encoder.** The encoder records three bit positions:

- `first1`: the leading one of N1;
- `second1`: the next one below it;
- `shift1`: the leading one of shift_val.

It places them above the 40-bit word:

| bits  | 49:46  | 45:42   | 41:40  | 39:0          |
|-------|--------|---------|--------|---------------|
| field | first1 | second1 | shift1 | original word |

A field with no such one records 0.

**Decoder.** For each recorded position p, the decoder:

1. shifts the field left until bit p is the MSB;
2. sets the MSB;
3. shifts it back.

The effect is to clear every bit above p and force bit p to one. N1 is
treated for `second1` first, then for `first1`, so it ends with exactly its
two recorded leading ones. shift_val is treated for `shift1`.

**What it corrects.** It repairs any bit that flipped above the leading one,
and a lost leading one or second one. It cannot see errors below `second1`.
For a negative N1 the leading one is the sign bit, so only that bit is
guarded.

**Position 0.** A recorded position of 0 leaves the field alone. Forcing
bit 0 would corrupt an N1 of 0 or 1. With this rule an undamaged word
always passes through unchanged.

**Timing.** The encoder takes 4 clocks. The decoder takes 5 clocks, one
shift/set/shift step per state. The decoder holds its result until the
decompressor acknowledges it.

## Packets and the two buffers

**tx_buffer.** `tx_buffer` packs sixteen 50-bit words into an 800-bit
packet, the first word in bits 49:0. It keeps up to 10 packets in a circular
FIFO, and `buffer_full` shows when all 10 slots are taken. When the FIFO is
full, the sixteenth word of the next packet is not acknowledged until a slot
frees.

**rx_buffer.** `rx_buffer` does the reverse. It accepts a packet only when
16 of its 160 word slots are free, then writes the words into its FIFO one
per clock, bits 49:0 first.

**Handshakes.** The buffers expect a slower, possibly asynchronous partner,
so their handshakes differ from the rest of the design.

- **Input:** the word or packet is acknowledged with a one-clock `ack_in`.
  An ACKIN state then waits for `valid_in` to fall, so a slow producer's
  data is never taken twice.
- **Output:** the oldest item is held on `data_out` with `valid_out` high.
  A **rising edge** of the consumer's request takes it: `done_transmit` for
  tx_buffer, `request_data_out` for rx_buffer. `valid_out` then drops for at
  least one clock before the next item appears. A consumer that only
  watches the level of `valid_out` therefore still sees one pulse per item.

In the top, rx_buffer's one-clock `ack_in` drives tx_buffer's
`done_transmit`. The ECC decoder's acknowledge drives `request_data_out`.

**Everywhere else** the convention is simpler. `valid` is held until the
consumer pulses a one-clock acknowledge. That acknowledge is combinational:
`state == WAIT && valid_in`, qualified by free space where the consumer has
an output register. A concurrent assertion (`a_hold`) in the chunker, compressor,
ECC encoder, ECC decoder and decompressor checks this rule: an
unacknowledged output stays valid and unchanged. It is active when
simulating with Verilator's `--assert`.

## D/A side

**dac_interface.** `dac_interface` takes a decompressed chunk only when
each of its five stacks has room, and pushes Nk onto stack k. At each frame
start, a round-robin pointer pops the next stack, so the samples leave in
their original order.

If that stack is empty, the previous sample is repeated and `underrun` is
high for the frame. The stream pauses rather than clicking to zero.

**dac_serializer.** `dac_serializer` sends each sample as 24 bits: eight
zero configuration bits, then the sample, MSB first. `sync` is high for one
sclk period before the first bit. Data changes as sclk rises, so it is
stable at the next rising edge. A word occupies 125 clocks of the
300-clock frame.

**Startup.** The transmit buffer only sends whole packets. The first sample
therefore plays at least 80 frames (0.9 ms) after it was taken, and the
first frames after start-up are underruns.

## CC2420 controllers

All radio logic runs on `radio_clk`: 27 MHz / 4 = 6.75 MHz, the MSB of a
2-bit counter in `spi_clock_divider`. This is below the chip's 10 MHz SPI
limit. The divider has its own reset, `clkdiv_rst`, so the radio clock
keeps running while the radio FSMs are held in `radio_rst`.

### cc2420_spi

`cc2420_spi` is a generic master for transactions of up to 144 bits. A
request (`cc2420_pkg::spi_req_t`) gives the start pulse, the bit count and
the bits, MSB first.

- **SCLK** is the inverted module clock. SI and CSn are registered on the
  rising clock edge, so they are set up half a period before the chip
  samples them.
- **SO** is captured one clock after the SI bit it answers.
- **Between transactions** CSn stays high for at least one clock. This also
  ends a RAM access.
- **Timing:** `done` comes nbits + 2 clocks after `start`.

Each node has one master. It belongs to the configuration FSM until
`configured` rises, then to the data FSM. Within the transmitter it is
handed to the ACK checker while that runs.

### cc2420_config

`cc2420_config` runs once after reset:

1. Pulse RESETn, then wait RESET_WAIT (16) clocks.
2. Strobe SXOSCON.
3. Wait WAITLONG (20 000) clocks, about 3 ms at 6.75 MHz, for the crystal
   oscillator.
4. Write five registers in one 120-bit transaction:
   - MDMCTRL0 = 0x0AF2: address recognition and auto-ACK;
   - MDMCTRL1 = 0x0500;
   - IOCFG0 = 0x007F: FIFOP threshold at maximum;
   - SECCTRL0 = 0x01C4: no security;
   - FSCTRL = 0x4000 | (357 + 5·(channel − 11)).
5. Write PANID to RAM 0x168 and the short address to RAM 0x16A, LSB first.
6. Read both back to `panid_rb` / `shortaddr_rb`. At the top level these
   come out as `txr_panid_rb`, `txr_addr_rb`, `rxr_panid_rb` and
   `rxr_addr_rb`.
7. Raise `configured`.

A RAM access is the two bytes `{1, A[6:0]}`, `{A[8:7], R/W, 00000}`,
followed by data that auto-increments.

### cc2420_transmit and cc2420_checkack

`cc2420_transmit` sends one 5-byte payload per request, "aggressively":
there is no clear-channel check.

1. Wait until `payload_valid` is high and SFD and FIFO are both low.
2. Strobe SFLUSHTX and SRXON in one transaction. The TX FIFO is then empty
   and the receiver is on to hear the ACK.
3. Strobe STXON.
4. Write the frame with command 0x3E, 17 bytes in all:

   | bytes | content |
   |-------|---------|
   | 1 | LENGTH = 16 |
   | 2 | frame control 0x8861, LSB first (data frame, ACK requested, PAN-ID compression, 16-bit addresses) |
   | 1 | sequence number |
   | 2 | PANID |
   | 2 | destination address |
   | 2 | own address |
   | 5 | payload, first byte = bits 39:32 |

   PANID and the addresses are sent LSB first. The chip appends the 2-byte
   FCS itself.

5. Wait up to ACK_WAIT (6760) clocks, about 1 ms, for FIFOP.
6. If FIFOP does not come, strobe STXON again and count it in `retries`.
   The frame still in the TX FIFO is resent without being rewritten.
7. If FIFOP comes, `cc2420_checkack` reads 0x7F plus 6 bytes. It accepts
   the ACK when all of these hold:
   - length is 5;
   - frame control is 0x0002;
   - the sequence number matches;
   - bit 7 of the last byte (CRC OK) is set.
8. On success, `tx_success` pulses and the sequence number advances. A bad
   ACK is handled like a timeout.

### cc2420_receive

`cc2420_receive` strobes SRXON and waits for FIFO and FIFOP to be high
together. It then reads command 0x7F plus 17 bytes in one transaction. It
presents the payload, sequence number, source address and CRC-OK flag with
a one-clock `packet_valid`.

FIFOP high without FIFO means the RX FIFO overflowed. The receiver then
strobes SFLUSHRX twice and counts it in `flushes`.

The parser is fixed to the 5-byte payload frame.

## Where this RTL departs from, or fills in, the original description

Each block's choices are also stated at the top of its source file.

**Radio link**
- The audio packets do not go over the radio, for the rate reason given at
  the top. The radio controllers are complete, but they carry only their
  5-byte test payload.
- Radio clock: the description calls for "a 4-bit counter" but also for a
  27/4 MHz clock. These disagree, since a 4-bit counter's MSB gives
  27/16 MHz. The 27/4 MHz reading was followed (`DIV_BITS = 2`);
  `DIV_BITS = 4` gives the other reading.
- Sequence number: it is described as 2 bytes, but the stated frame length
  (16 for a 5-byte payload) only adds up with 1 byte. One byte is used.
- Reading the RX FIFO: the receiver's description uses command 0x3E (the TX
  FIFO write) for this. Command 0x7F, with the read bit set, is used, as the
  ACK checker's description does.
- Radio configuration: the IOCFG0 value, the FSCTRL formula and the ACK
  frame layout come from the CC2420 data sheet.

**Codec**
- The original does not specify rounding, saturation or 16-bit wrap-around
  in the codec. The choices are as stated above.
- ECC field placement in bits 49:40 is this design's own.
- The "position 0 means skip" rule in the ECC decoder is this design's own.

**Flow control and buffers**
- FIFO depths of the chunker and D/A stacks (4) are not given. Flow control
  is this design's own: `sample` gating, `overflow`, `underrun`, buffer-full
  stalls, and the one-clock acknowledges.
- Buffer pointers count 0..N−1 rather than 1..N.

## Parameters

| module                 | parameter    | default | meaning |
|------------------------|--------------|---------|---------|
| sample_clock_divider   | FRAME_DIV    | 300     | clocks per audio frame |
| sample_clock_divider   | SCLK_DIV     | 5       | clocks per serial-clock period |
| adc_sampler            | CS_DELAY     | 20      | sclk periods from convst to CS low |
| chunker, dac_interface | stack depth  | 4       | samples per FIFO |
| tx_buffer              | SLOTS        | 10      | 800-bit packets |
| rx_buffer              | SLOTS        | 160     | 50-bit words |
| spi_clock_divider      | DIV_BITS     | 2       | radio clock = clk / 2^DIV_BITS |
| cc2420_config          | WAITLONG     | 20000   | oscillator start-up wait, radio clocks |
| cc2420_transmit        | ACK_WAIT     | 6760    | ACK timeout, radio clocks |

Word and packet sizes are in `rtl/codec_pkg.sv`. The radio's command and
register constants, and the request/response structs, are in
`rtl/cc2420_pkg.sv`.

Synthesised with yosys, the top comes to about 1 250 cells, 3 800 flip-flop
bits and 17 000 bits of memory. The memory is mostly the two 8 000-bit
packet buffers.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. Each compares against values computed
independently of the RTL:

- `tb/codec_ref_pkg.sv` is a separate reference codec in plain procedural
  code, with a real-valued step.
- The chip models check the exact bytes that reach the CC2420.

Stimulus changes on falling clock edges. Two testbenches shorten the radio
waits (WAITLONG, ACK_WAIT) to keep simulation fast. The rest run at the
default sizes.

`tb_headphone_system` runs the whole design at its default parameters for
about 4 ms of simulated time:

- a noisy sine with occasional large jumps through the complete audio path;
- configuration of both radio nodes;
- one payload sent, carried by the testbench from one chip model's TX FIFO
  to the other's RX FIFO, and received;
- a missed ACK, a retransmission and a good ACK.

**Audio check.** Every sample reaching the DAC model must equal the
reference codec's output, in order. Underrun frames are counted and set
aside.

**Mechanism check.** The test counts each mechanism and fails if one never
happens:

- chunks compressed, ECC words and packets;
- leading-one restorations in the decoder;
- backpressure from the DAC stacks;
- underrun frames;
- the retransmission;
- the received frame and the ACK.

Chunker overflow and the buffer-full flags cannot occur in a healthy
stream. They are exercised in their block testbenches and checked to stay
low here.

### Running a testbench with Verilator

From the repository root, for example for the full system:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv \
  rtl/codec_pkg.sv rtl/cc2420_pkg.sv tb/codec_ref_pkg.sv \
  tb/tb_headphone_system.sv --top-module tb_headphone_system
./obj_dir/Vtb_headphone_system
```

Replace the testbench name to run any other one. The packages must come
first on the command line. `-y rtl -y tb` lets Verilator find every other
module by its file name.

The models in `tb/` (`ad7656_model`, `ad5063_model`, `cc2420_model`) are
simulation-only. They use delays and queues and are not meant for
synthesis. `cc2420_model` decodes commands, register writes, RAM accesses
and both FIFOs. It exposes its `regs`, `ram`, `txfifo`, `rxfifo` and
`strobes` for testbenches to inspect or fill.
