# Bluetooth baseband module with a shared-memory DMA architecture

This is synthesizable SystemVerilog for the digital part of a Bluetooth 1.1
controller: the link controller, an HCI UART, the line coding half of a USB
device and a voice codec, arranged
around a microcontroller and one small single-port SRAM. The idea behind the
design is that no peripheral keeps its own packet buffer. Link controller
payloads, UART traffic and voice samples all live in the 4 kB SRAM that also
holds the processor's data. A memory management unit (MMU) moves single bytes
between the peripherals and that SRAM by DMA.

The processor core is outside this RTL. It is meant to be an ARM7TDMI-class
CPU that fetches its code from external flash. Its data bus is a port of the
top module. The flash, the radio and the PCM codec chip are outside as well,
and their pins are top-level ports.

## Block overview

```
            CPU data bus (ports)
                   |
              +----+-----+      +-----------+
              |   mmu    |------|  sram_sp  |  4 kB, 1024 x 32, single port
              +--+--+--+-+      +-----------+
      I/O regs   |  |  |   DMA channels (one byte per request)
      +----------+  |  +---------------+
      |             |                  |
 link_controller   uart            audio_codec
  |  lc_regs        uart_baud/tx/rx    audio_clkgen, pcm_if
  |  bt_clock       hci_pkt_decoder    alaw/ulaw/cvsd codecs
  |  bt_syncword                       audio_rate_conv
  |  hop_select
  |  bt_tx_path ---- bt_hec, bt_crc16, bt_whiten, bt_fec13, bt_fec23
  |  bt_rx_path ---- bt_correlator, bt_hdr_analysis, same coders
  |  bt_e0
  |  radio_if
 clk_gen (1 MHz and 3.2 kHz strobes)
 usb_sie (own 48 MHz clock; byte interface brought out as ports)
```

Everything except `usb_sie` runs on one clock, `clk`, which is nominally
12 MHz. `usb_sie` runs on `clk_usb`, 48 MHz. Slower rates are one-cycle
enable strobes, not extra clocks:

- the 1 MHz air bit rate;
- the 3.2 kHz Bluetooth native clock;
- the PCM bit clock;
- the UART oversampling tick.

All flops use an asynchronous active-low reset, `rst_n`.

## Sharing one SRAM: the MMU

`mmu.sv` is the part that makes the buffer-less architecture work. It has four
DMA channels, numbered in `bb_pkg`: USB 0, link controller 1, audio 2, UART 3.

**DMA handshake.** A peripheral raises `dma_req.req` with a byte address
(12 bits), a write flag and the write data. It holds them until `dma_rsp.ack`.
For a read, the byte comes back on `dma_rsp.rdata` in the same cycle as the
ack. The MMU steers the byte to the right lane of the 32-bit RAM word:
little-endian, with `addr[1:0]` picking the lane. An assertion in the MMU
checks that a request is not withdrawn before its ack.

**Timing rules.**

- **Two cycles per DMA byte.** A setup cycle picks the waiting channel with
  the lowest number and registers its request. A DMA only starts in a cycle
  in which the CPU does not want the RAM. The access cycle drives the RAM. The ack follows
  one cycle later.
- **The CPU has priority.** A CPU access is accepted in the cycle it is
  requested, with `cpu_ready` high in that cycle. The exception is a collision
  with a DMA access cycle already in progress, which costs the CPU one cycle.
- **Stack accesses give way.** A CPU access marked `cpu_stack` is stalled for
  two cycles when a DMA is pending, and the DMA goes first. Without this rule a
  busy CPU could starve the peripherals, since CPU priority alone would let it
  hold the RAM indefinitely.
- **Read data** reaches the CPU one cycle after the access (`cpu_rvalid`).
- **Memory-mapped I/O.** With `cpu_addr[15]` = 1 the access goes to the I/O
  bus. That bus never waits for the RAM.

**Cost to the CPU.** The two stall rules give the cost of DMA to the CPU as
`(DMA per cycle) x (1 x P_ram + 2 x P_stack)`. Here `P_ram` and `P_stack` are
the fractions of cycles in which the CPU makes RAM and stack accesses. Two
cases:

- **Typical.** The link controller and USB each need 1 DMA per 96 cycles at
  1 Mbit/s, and voice needs 1 per 750 cycles. Together that is about 4% of the
  SRAM's cycles.
- **Worst case.** USB at 12 Mbit/s needs 1 DMA per 8 cycles. The total is
  still below 30% of the SRAM's cycles.

Events: `ev_cpu_stall` and `ev_stack_preempt` pulse when the rules act. The
top brings them out for monitoring.

## The bitstream data paths

`bt_tx_path` and `bt_rx_path` turn payload bytes into the Bluetooth air bit
stream and back.

### No bit buffers

The paths hold no packet buffer. Bits go straight through the coders in
stream order, and a small sequencer enables each coder at the right bits.
The only storage is:

- the byte being serialized;
- one 10-bit block for the rate-2/3 FEC, which needs ten bits before it can
  emit its 15.

### Transmit order

For each packet the Tx sequencer steps through these sections:

1. Access code: 4-bit preamble, the 64-bit sync word from `bt_syncword`, and a
   4-bit trailer. This part is not whitened, encrypted or FEC coded.
2. Header: 10 bits (AM_ADDR, TYPE, FLOW, ARQN, SEQN), then the 8-bit HEC. The
   HEC is seeded with the UAP. The 18 bits are whitened and sent with rate-1/3
   repetition FEC.
3. Payload header, if any: one byte for single-slot packets, two for
   multi-slot ones. It holds L_CH, FLOW and the length.
4. Payload bytes, LSB first. They are fetched one at a time over
   `byte_req`/`byte_ack` while the previous byte is being sent.
5. CRC-16 over payload header and payload, seeded with the UAP.

Each payload bit is handled in this order:

1. It enters the CRC in clear.
2. It is XORed with the E0 keystream if encryption is on.
3. It is whitened.
4. It is coded with rate 1/3, rate 2/3 or no FEC, as the packet type requires.

The whitening LFSR is seeded from native clock bits 6..1. The FEC 2/3 coder
pads the last block with zeros.

### Packet type table

`bb_pkg::pkt_info()` is the packet-type table that programs the sequencer.
For each type it gives:

- whether the type has a payload;
- the number of payload-header bytes;
- the maximum length;
- the FEC;
- whether there is a CRC;
- the number of slots.

It covers NULL, POLL, FHS, DM1/3/5, DH1/3/5, HV1/2/3, DV and AUX1.

### Receive

The receiver does the same steps in reverse. The difference is that it must
learn the packet type and length from the packet itself:

1. `bt_correlator` compares a sliding 64-bit window with the expected sync word
   and reports a hit at 58 or more agreeing bits. The 4-bit trailer follows.
2. The header arrives as 54 bits. Majority voting returns 18 bits, which are
   de-whitened.
3. `bt_hdr_analysis` checks the HEC and the address. Address 0 is accepted as
   broadcast.
4. The header's TYPE field picks the payload FEC and whether there is a
   payload header, a CRC and a length field.
5. For FEC 2/3 the Rx path runs a syndrome decoder on each 15-bit block. It
   corrects single errors and counts them in `fec_fix`.
6. Payload bytes come out on `byte_valid`. The link controller writes them to
   SRAM by DMA.
7. `crc_ok` is valid one clock after `pkt_done`.

An uncorrectable block is passed on as it is and then fails the CRC.

### Encryption

`bt_e0` is the E0 generator: four LFSRs of 25, 31, 33 and 39 bits and the
summation combiner with its two delay registers. The Tx path and the Rx path
each pull one keystream bit per payload bit (`ks_step`). In the link controller
one E0 instance serves both directions. It is loaded at the start of every
packet from four 32-bit key registers. The E0 start-up run from Kc, address and
clock is not built, and neither is the key generation (E1/E3). Both ends of a
link therefore need the same key register contents.

## Link controller

`link_controller.sv` joins the register file, the native clock, the sync word
generator, both data paths, E0, the radio interface and one DMA channel. It
handles one packet per command; there is no slot scheduler. Firmware sets up a
packet like this:

1. Write ADDR: LAP and UAP.
2. Write BASE: Tx and Rx buffer addresses in SRAM.
3. Write PKT: type, AM_ADDR, header flags, L_CH, length.
4. Set `CTRL.tx_go`.

The transmitter waits for the next tick of the 3.2 kHz native clock, so every
packet starts on a half-slot boundary. The receiver takes its whitening seed
from the native clock when it sees the sync word, 68 us later. Both ends
therefore use the same clock bits as long as their native clocks agree.

With `CTRL.rx_en` set, the receiver searches whenever the transmitter is idle.
Received bytes go to RXBASE + n.

Register map (word index on `reg_addr`):

| reg | name   | contents |
|-----|--------|----------|
| 0   | CTRL   | [0] tx_go (self-clearing), [1] rx_en, [2] enc_en, [3] irq_en_tx, [4] irq_en_rx |
| 1   | PKT    | [3:0] type, [6:4] AM_ADDR, [7] FLOW, [8] ARQN, [9] SEQN, [11:10] L_CH, [12] payload FLOW, [24:16] length |
| 2   | BASE   | [11:0] Tx buffer, [27:16] Rx buffer |
| 3   | ADDR   | [23:0] LAP, [31:24] UAP |
| 4   | STATUS | [0] tx_done, [1] rx_done, [4] underrun (write 1 to clear); [2] crc_ok, [3] hec_ok, [5] addr_match of the last received packet |
| 5   | RXINFO | received header fields as in PKT, [24:16] length, [31:25] FEC blocks corrected |
| 6   | CLKN   | native clock; a write loads it |
| 7-10| KEY    | E0 initial state: LFSR1 = KEY0[24:0], LFSR2 = KEY1[30:0], LFSR3 = {KEY1[31], KEY2}, LFSR4 = {KEY3, KEY0[31:25]} |
| 11  | RFCTL  | a write sends [23:0] to the radio's serial port; read [0] = busy |
| 12  | HOP    | read only: [6:0] hop channel (0..78) for the current CLKN and the ADDR register |

`radio_if` is the pin-level interface:

- Tx data and Tx enable. A bit goes out on each 1 MHz strobe.
- Rx enable, high while the receiver is wanted and the transmitter is idle.
- Rx data, through a two-flop synchronizer and a digital PLL. The PLL is a
  free-running 12-clock bit counter. Each line transition pulls the counter
  2 clocks toward the transition's position, so the sample point settles in
  the middle of the bit. It locks within a few transitions of the preamble
  and follows slow drift. The Rx path is clocked by the PLL's bit strobe.
- A 24-bit serial control port (`ser_clk`, `ser_data`, `ser_le`) for
  programming the radio. It shifts MSB first at 4 MHz, one bit per 3 system
  clocks.

`hop_select` computes the channel for the current native clock and the
ADDR register; firmware reads it from HOP.

`bt_clock` is a 28-bit native clock counting 3.2 kHz edges. It also forms CLKE
and CLK by adding offsets.

## HCI UART

`uart.sv` is built from:

- an NCO baud generator: a 20-bit phase accumulator that ticks at 8x the bit
  rate;
- transmit and receive units with 8N1 framing;
- an HCI packet decoder;
- interrupt logic and RTS/CTS flow control.

Baud settings at 12 MHz:

| Bit rate | Increment |
|---|---|
| 1.5 Mbit/s | 2^20 |
| 57.6 kbit/s (reset value) | 40265 |

The receiver qualifies the start bit at mid-bit and samples each data bit at
its middle. Good bytes go by DMA into a ring in SRAM. The decoder follows the
H4 packet indicator:

- 1 = command, with a 1-byte length at offset 3;
- 2 = ACL, with a 2-byte length at offset 3;
- 3 = SCO, with a 1-byte length at offset 3;
- 4 = event, with a 1-byte length at offset 2.

When a packet ends, the decoder latches its type and length and raises an
interrupt. With flow control on, RTS stops the host when fewer than 4 bytes
of the ring are free. The transmitter sends TX_LEN bytes from TX_BASE,
fetching each byte while the previous one shifts out, and honours CTS. The
register map is in the header of `uart.sv`.

## Voice codec

`audio_codec.sv` exchanges one coded byte each way per 125 us frame with SRAM
rings, which is 128 kbit/s of DMA traffic. On the PCM side it exchanges one
16-bit linear sample per frame with an external PCM chip. The PCM bit clock is
512 kHz from an NCO, with 32-bit frames, a sync pulse and the sample MSB first.

- **A-law and mu-law** (`alaw_codec`, `ulaw_codec`) are combinational G.711
  segment coders.
- **CVSD** runs at 64 kHz, so the 8 kHz samples pass through
  `audio_rate_conv` on the way:
  - Up-sampling is linear interpolation: 8 steps between consecutive samples.
  - Down-sampling is an elliptic low-pass biquad followed by keeping one output
    in 8. The biquad has 5 coefficients in Q14; its pass band is about
    3.4 kHz.
- **`cvsd_codec`** uses the Bluetooth constants: step size 10..1280, run of 4
  equal bits, and decay factors 1 - 1/1024 and 1 - 1/32, with 10 fraction bits.

## Top level

`bt_baseband_top` connects:

- the MMU and the SRAM;
- `clk_gen`;
- the link controller, the UART and the voice codec;
- `usb_sie`, whose pins and byte interface are top-level ports.

CPU address map:

| Address | Contents |
|---|---|
| 0x0000-0x0FFF | SRAM (byte addresses) |
| 0x8000 + 4n | link controller register n |
| 0x8100 + 4n | UART register n |
| 0x8200 + 4n | voice codec register n |
| 0x8300 | interrupt summary: [0] LC, [1] UART, [2] voice |

`irq[2:0]` brings out the same three interrupt lines.

## USB serial interface engine

`usb_sie` handles the full-speed (12 Mbit/s) line. It is clocked at 48 MHz,
so it sees four samples per bit. There is no separate bit clock: a 2-bit
phase counter is reset by every transition of D+. The line is sampled two
clocks after a transition, which is the middle of the bit. The longest run
without a transition is seven bits, because of bit stuffing. A run of seven
bits is too short for the counter to drift out of the bit.

Receive, in order:

1. NRZI decode: no transition is a 1, a transition is a 0.
2. Find the sync pattern: at least three 0s, then a 1.
3. Drop the 0 that follows six 1s. A 1 in that place is a stuff error, and
   the packet is abandoned.
4. Pack the bits into bytes, LSB first. Each byte comes out with a one-clock
   `rx_valid`.
5. Check the first byte, the PID, against its complement nibble.
6. Run CRC5 (x^5+x^2+1) and CRC16 (x^16+x^15+x^2+1) over every bit after the
   PID. Both start from all ones.
7. SE0 on the line ends the packet. `rx_eop` pulses, with `rx_crc5_ok` and
   `rx_crc16_ok`. Each flag says whether its remainder equals the fixed
   residual, 01100 or 0x800D. Which flag matters depends on the PID: CRC5
   for tokens, CRC16 for data packets.

Transmit starts when `tx_valid` goes high. The SIE sends the sync byte, and
then takes one byte of `tx_data` per `tx_ready` pulse. The next byte must be
on `tx_data` within 8 bit times (32 clocks). The SIE stuffs bits and NRZI
codes the stream. When `tx_valid` is low at a byte boundary, it ends the
packet: SE0 for two bits, J for one bit, then `usb_oe` is released. The
CRC field is part of the bytes supplied on `tx_data`. The receiver is
blocked while `usb_oe` is high.

The protocol layer is not built. That layer would decode tokens, answer with
handshakes, keep the data toggles and move payloads through DMA channel 0.
In the top, the SIE's byte interface is brought out as `usb_rx_*` and
`usb_tx_*` ports. `usb_rx_status` is {crc16_ok, crc5_ok, stuff_err,
pid_err}.

## Where this design departs from a complete baseband

- **USB line coding only.** The USB protocol layer and endpoint manager are
  not built, so USB does not reach the SRAM. DMA channel 0 is reserved for
  USB and tied off.
- **Hop selection is connection state only.** `hop_select` is the
  79-channel kernel. It adds, XORs, applies a 5-bit butterfly permutation,
  adds mod 79 and maps through the even/odd channel bank, with the
  connection-state inputs taken from the clock and address. The page and
  inquiry hopping sequences are not built. The channel is offered to the CPU
  in register HOP, and the CPU tunes the radio through RFCTL.
- **No E0 key generation** (E1/E3, SAFER+), and no standard E0 start-up.
- **One packet per CPU command.** The link controller does not schedule
  slots, retransmit, or track ARQN/SEQN by itself; firmware does that. DV
  packets are handled only as a data packet, without the separate voice
  field.
- **Clocks.**
  - The 12 MHz system clock is an input, not divided from the 48 MHz USB
    clock. Nothing crosses between the two domains.
  - The 1 MHz transmit timing and the 3.2 kHz tick come from `clk_gen`, not
    from the radio.
- **The receiver PLL follows only the local 12 MHz grid.** Its resolution is
  one system clock, 1/12 of a bit.
- **No clock gating**, and no flash programming through the UART.
- **The whitening seed comes from the local native clock, not the master's
  clock.** This is correct when both devices' CLKN agree.

## Verification

Every module has a self-checking testbench in `tb/` with a cycle watchdog.
Each prints `TB_RESULT checks=N failures=M`. `tb/tb_check.svh` holds the
shared helpers. The testbenches compare against independent models:

- bit-serial CRC/HEC and LFSR recurrences;
- arithmetic G.711 and a floating-point CVSD and filter reference;
- a byte-array memory model;
- a host UART model and a PCM chip model.

`tb_bt_tx_path` loops the Tx path into the Rx path. It checks:

- the number of air bits for each packet type;
- header fields and payload bytes;
- CRC;
- that one bit error per FEC 2/3 block is corrected;
- that an error in an uncoded DH1 payload makes the CRC fail.

`tb_bt_baseband_top` runs two complete chips at default parameters, with
their radio pins crossed. A bus-level CPU model on each chip does the
following:

- sets up packets;
- copies payloads;
- runs checked scratch and stack traffic throughout, so that CPU stalls and
  stack pre-emptions happen for real.

Over the test, chip A does the following:

- sends DH1, DM1 (with an injected air error), DH1 (with an error, so its CRC
  must fail), encrypted DH5 and HV3 packets to chip B;
- receives a DM3 from B;
- takes an HCI command and an ACL packet from a host over its UART at
  1.5 Mbit/s, and sends an HCI event back;
- runs A-law voice through a looped-back PCM chip;
- sends three USB data packets from its SIE to chip B's SIE, on a 48 MHz
  clock that is not locked to the system clock.

Every encoded byte of the voice loop must equal the byte it decoded. The test
counts the following mechanisms and fails if any count is zero:

- DMA on each channel;
- CPU stalls and stack pre-emptions;
- packets sent and received;
- CRC passes and failures;
- FEC corrections;
- encrypted packets;
- UART packets and bytes;
- PCM frames;
- interrupts;
- radio control words;
- hop channel changes;
- USB packets.

`tb_usb_sie` drives the USB receiver from an encoder written in the
testbench. Some edges come one clock late, to test clock recovery. It covers
tokens with CRC5, data packets with CRC16, a damaged CRC, a bad PID and a
missing stuff bit. It also sends packets from one SIE to another and checks
the SE0 length and the packet length on the line.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bt_baseband_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/bb_pkg.sv tb/tb_bt_baseband_top.sv
./obj_dir/Vtb_bt_baseband_top
```

Replace the top module name to run any other testbench. The simulator needs
no x/z states: every register that is read is reset.
