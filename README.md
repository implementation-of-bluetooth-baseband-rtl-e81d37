# Bluetooth baseband data path (bit-serial, SystemVerilog)

Before a Bluetooth radio sends a message, the baseband wraps it in a packet. An
access code addresses the piconet. A header carries link control, protected by
an 8-bit HEC. The payload carries the message, protected by a 16-bit CRC. Both
header and payload are whitened and coded for forward error correction (FEC).
The receiver undoes the same steps in reverse: it finds the access code,
corrects and checks the bits, and hands the message back.

This RTL implements that path for the configuration of the FPGA thesis
*Implementation of Bluetooth Baseband Controller Based on FPGA Design*: a
32-bit message becomes a 270-bit packet, and the 270 bits become the 32-bit
message again. Everything runs one bit at a time at 1 Mbit/s, on a bit enable
derived from the system clock. HEC, CRC and whitening exist only once and
serve both directions, because a device is never sending and receiving at the
same time. A central controller schedules them bit by bit. A flow-control block
turns the HEC and CRC results into acknowledgements (ARQ), retransmissions and
stop/go signalling.

## The packet on the air

| field | bits on air | contents |
|---|---|---|
| access code | 72 | 4-bit preamble, 64-bit sync word (bit 63 first), 4-bit trailer |
| header | 54 | 18 bits × 3 (rate 1/3 FEC): 10 information bits + 8-bit HEC |
| payload, rate 1/3 | 144 | 48 bits × 3: 32-bit message (LSB first) + 16-bit CRC |
| payload, rate 2/3 | 75 | 48 bits + 2 zero pad bits, in five (15,10) Hamming blocks |

With a rate 1/3 payload the packet is 72 + 54 + 144 = **270 bits**, the
design's main case. Packet type DM1 (`4'h3`) selects rate 2/3 for the payload,
giving 201 bits. Every other type uses rate 1/3.

The preamble and trailer alternate 0/1 and carry the alternation into and out
of the sync word. The preamble is `0101` if the first sync bit is 0 and `1010`
if it is 1. The trailer is `0101` after a last sync bit of 1 and `1010` after
a 0. All patterns are written in transmission order.

The header information bits are sent in this order: `lt_addr[0..2]` (active
member address), `ptype[0..3]`, `flow`, `arqn`, `seqn`. Then the HEC follows,
register bit B7 first. The payload sends the message LSB first, then the CRC
MSB first. The whitening sequence runs on without restarting through the 18
header bits and the 48 payload bits. The pad bits are not whitened.

## The shift-register cores

All four codes are Galois (internal XOR) LFSRs that divide by their generator
polynomial. The same trick serves both directions:

* **Generate**: shift the data in. Then switch to `gen_out`. The register now
  feeds its own top bit back in. That bit cancels the feedback, so the
  register shifts its remainder out, top bit first, and ends at zero.
* **Check**: load the same initial value and shift in the whole received code
  word, data and check bits. The register ends at zero exactly when the
  word is intact (`zero` output).

| core | polynomial | register | initial value |
|---|---|---|---|
| HEC (`bt_hec`) | D⁸+D⁷+D⁵+D²+D+1 (`8'hA7`) | 8 bits, B7..B0 | `uap` input |
| CRC (`bt_crc`) | D¹⁶+D¹²+D⁵+1 (`16'h1021`) | 16 bits | `{8'h00, uap}` |
| whitening (`bt_whiten`) | D⁷+D⁴+1 | 7 bits | `{1, wht_init[5:0]}` |
| (15,10) Hamming (`bt_fec23_enc/dec`) | D⁵+D⁴+D²+1 = (D+1)(D⁴+D+1) | 5 bits | 0 |

In polynomial terms, after N data bits m₀…m_{N−1} (m₀ first) the HEC/CRC
register holds (I·D^N + Σ mᵢ·D^(r+N−1−i)) mod g, where r is the register
width. The testbenches check the RTL against exactly this formula, computed
by long division.

The rate 2/3 decoder forms the syndrome with the same LFSR while a block
arrives. A single error in the j-th received bit (j = 0 first) gives syndrome
D^(19−j) mod g. A constant function computes these 15 values, and the matching
bit is flipped. Since g contains the factor (D+1), every double error leaves a
syndrome that matches no single error. The decoder flags such blocks as
`uncorrectable`.

The rate 1/3 decoder takes a majority vote of the three copies.

## Transmit: a pull pipeline

`bt_controller` walks through `TX_LOAD → TX_AC → TX_HDR → TX_PAY → TX_DONE`.
It puts one bit on the air per bit enable (`tick`). The FEC encoder at the end
of the chain decides when the rest of the chain advances:

```
hdr bits / HEC out ─┐                     ┌─ bt_fec13_enc ─┐
                    ├─ src ─ bt_whiten ───┤                ├─ tx_bit
msg (p2s) / CRC out ┘                     └─ bt_fec23_enc ─┘
               ▲ shift only when the encoder raises `take`
```

* The rate 1/3 encoder raises `take` in the first of every three bit periods.
  It shows the new bit at once and then repeats its stored copy twice.
* The rate 2/3 encoder raises `take` in the first 10 of every 15 periods, then
  sends 5 parity bits.

On `take`, the controller advances the source index `s` (0..65) and shifts
exactly the cores that produced the bit:

* bits 0–9 and 10–17 shift the HEC core; `gen_out` is high from bit 10;
* bits 18–49 and 50–65 shift the CRC core and the parallel-to-serial
  converter (`bt_p2s`); `gen_out` is high from bit 50;
* every bit steps the whitener.

Past bit 65 the encoder gets zeros, which are the pad bits.

`TX_LOAD` fetches the 32-bit message from the 8-bit transmit buffer: four
bytes, the first one least significant. It then loads the access code, HEC,
CRC and whitening registers. For a retransmission there is no fetch, because
`bt_p2s` keeps its copy of the last message.

## Receive: correlate, decode, check

`RX_SEARCH` feeds every received bit into `bt_correlator`, a 64-bit sliding
window compared with the sync word. By default it needs an exact match
(`CORR_ERR` allows bit errors). `found` is high in the same cycle as the
enable that completes the match.

After a match the controller loads the shared cores, skips the 4 trailer bits
and routes raw bits to the rate 1/3 decoder for the 54 header bits. The
payload then goes to the rate 1/3 decoder or the rate 2/3 decoder. The choice
comes from the packet type just decoded. It is fixed after the 7th header bit,
well before the payload begins.

Decoded bits arrive as `dvalid` pulses. Each one is dewhitened and then goes
to one destination:

* decoded bits 0–17 go to the HEC core;
* decoded bits 18–65 go to the CRC core;
* the first 32 payload bits also go to `bt_s2p`.

When bit 18 has been processed, the controller looks at the header. A bad HEC,
or a header for another active member address, ends the packet early. When
bit 66 has been processed the CRC result is known and `rx_done` pulses.

The rate 2/3 decoder emits each block's 10 bits after the block's 15th bit,
one per bit enable. Its last bits therefore leave up to 10 bit periods after
the last raw bit.

The message reaches the receive buffer only when `bt_flow_ctrl` commits it.
`bt_s2p` then writes it as four bytes, least significant first.

## Acknowledgement and flow control (`bt_flow_ctrl`)

The header fields follow Bluetooth's meaning: FLOW 1 = go, ARQN 1 = ACK, SEQN
toggles for each new packet. The rules are:

* A sent data packet stays **unacknowledged** (`unacked`) until a received
  header with a good HEC carries ARQN = 1. Then SEQN toggles and the next
  packet carries new data.
* ARQN = 0 counts as a NAK. So does silence: the next request sends the same
  message with the same SEQN again.
* A payload with a good CRC and a **new** SEQN is committed, if the receive
  buffer has room for 4 bytes. It is then acknowledged (ARQN = 1); without
  room, it is refused with ARQN = 0.
* A payload with the **same** SEQN as the last one accepted is a duplicate. It
  is acknowledged again but not committed.
* A bad CRC gives ARQN = 0, and so does a header that fails its HEC.
* The outgoing FLOW bit is 1 while the receive buffer has room. The last FLOW
  bit received (`remote_go`) gates new transmissions.

## Timing

* One bit per `TICK_DIV` system clocks; the default is 16, for a 16 MHz system
  clock. A 270-bit packet takes 270 bit periods: 72 access code, 54 header,
  144 payload.
* After a request, the controller fetches the message from the transmit
  buffer, one byte per clock, and loads the registers. The first bit goes out
  on the next bit enable after that.
* `tx_done` pulses on the bit enable that ends the last bit period, when
  `tx_on` drops.
* On receive, `rx_done` comes about one bit period after the last raw bit at
  rate 1/3, or about 10 bit periods after it at rate 2/3.

## Top-level interface (`bt_baseband`)

| group | ports |
|---|---|
| transmit buffer | `tx_wr`, `tx_wdata[7:0]`, `tx_full` |
| receive buffer (first-word-fall-through) | `rx_rd`, `rx_rdata[7:0]`, `rx_empty` |
| control | `tx_req` (send when possible), `rx_en` (search when idle) |
| configuration | `lt_addr[2:0]` (sent and accepted), `tx_ptype[3:0]`, `sync_word[63:0]`, `uap[7:0]`, `wht_init[5:0]` |
| radio | `bit_tick`, `tx_bit`, `tx_on`, `rx_bit` (sampled on `bit_tick`) |
| status | `state`, `tx_done`, `rx_done`, `rx_hdr`, `rx_hec_ok`, `rx_addr_ok`, `rx_crc_ok`, `rx_msg`, `tx_fec23`, `rx_fec23`, `remote_go`, `unacked` |
| events (one-cycle pulses) | `ev_commit`, `ev_ack`, `ev_nak`, `ev_dup`, `ev_fec_fix`, `ev_fec_fail` |

Parameters: `TICK_DIV` (16), `BUF_DEPTH` (16 bytes per buffer), `CORR_ERR`
(0).

The configuration inputs stand in for the host's register file. The radio
port is plain bits: there is no modulation, clock recovery or frequency
hopping. `bt_pkg` holds the sizes, polynomials, the `bt_hdr_t` header struct
and the controller state enum.

## Files

| file | block |
|---|---|
| `rtl/bt_pkg.sv` | shared constants and types |
| `rtl/bt_baseband.sv` | top level |
| `rtl/bt_controller.sv` | central controller / bit scheduler |
| `rtl/bt_tick_gen.sv` | 1 Mbit/s bit-enable generator |
| `rtl/bt_fifo.sv` | 8-bit transmit / receive buffer |
| `rtl/bt_p2s.sv`, `rtl/bt_s2p.sv` | parallel↔serial converters |
| `rtl/bt_hec.sv`, `rtl/bt_crc.sv` | HEC and CRC generator/checker |
| `rtl/bt_whiten.sv` | whitening |
| `rtl/bt_fec13_enc.sv`, `rtl/bt_fec13_dec.sv` | rate 1/3 FEC |
| `rtl/bt_fec23_enc.sv`, `rtl/bt_fec23_dec.sv` | rate 2/3 FEC |
| `rtl/bt_ac_gen.sv`, `rtl/bt_correlator.sv` | access code generator and correlator |
| `rtl/bt_flow_ctrl.sv` | ARQ and flow control |
| `tb/tb_bt_ref_pkg.sv` | reference model (long division, whole-packet builder) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## What follows the thesis and what is this design's own

These parts follow the thesis:

* the packet sizes (72/54/144, 270 bits in total);
* the HEC and CRC polynomials;
* the 10 + 8 header split and its fields;
* rate 1/3 as repetition, and rate 2/3 as a (15,10) shortened Hamming code
  with zero padding to a multiple of 10 bits;
* the preamble/trailer rule;
* the block order (HEC/CRC, then whitening, then FEC, reversed on receive);
* bit-serial processing on a 1 MHz enable, HEC/CRC/whitening shared by both
  directions, 8-bit data buffers;
* a correlator that starts the packet on a match;
* a flow-control block that reads FLOW/ARQN/SEQN and the CRC result.

These are this design's choices, mostly taken from the Bluetooth core
specification where the thesis leaves the point open:

* the whitening polynomial D⁷+D⁴+1 and its `{1, init}` start value;
* the Hamming generator D⁵+D⁴+D²+1 and syndrome decoding;
* majority-vote decoding for rate 1/3;
* HEC/CRC start values taken from a `uap` input;
* DM1 as the packet type that selects rate 2/3;
* the header bit order;
* the ARQ rules above;
* the buffer depth;
* the 16 MHz system clock;
* the early end of a packet on a bad HEC or a foreign address;
* committing a message only after its CRC passes;
* the correlator error tolerance parameter.

Other points to know:

* **Error checking only.** HEC and CRC detect errors; here the FEC decoders
  do all of the correcting. A packet whose header or payload still fails its
  check is reported and NAKed, not repaired.
* **CRC on every packet.** The thesis also says the CRC applies only to FHS
  packets. Its 270-bit packet nevertheless contains the CRC, so here every
  packet has one.
* **Left out:**
  * the encryptor, which appears only in the reviewed reference data path and
    has no cipher given;
  * the Wishbone host interface and register map, the DMA engine, the PCM
    interface, the RF interface/modem and the hop selector, which are named
    but not specified;
  * variable-length payloads; the message is always 32 bits;
  * deriving the sync word from the device address; the sync word is an
    input.

## Verification

Every module has a self-checking testbench with a watchdog. Each prints
`TB_RESULT checks=N failures=M`. The leaf testbenches compare against
`tb_bt_ref_pkg`, which computes HEC, CRC, whitening and Hamming parity by long
division over whole bit vectors. It does not use shift registers, so it is
independent of the RTL.

`tb_bt_baseband` is the end-to-end test and runs the top at its default
parameters. Two controllers share a clock, and each one's `tx_bit` is the
other's `rx_bit`. The channel carries random noise between packets, and the
testbench can flip chosen bits. Sixteen exchanges make every mechanism happen
at least once:

* rate 1/3 and rate 2/3 packets;
* FEC corrections at both rates;
* a CRC failure, a NAK and a retransmission;
* a HEC failure;
* a duplicate;
* a full receive buffer that stops the other side;
* a packet for another address.

Every error-free packet is compared bit for bit with the reference packet.
Packet lengths (270/201) and the 16-cycle bit spacing are checked, and so is
every message read back from the buffers.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/bt_pkg.sv tb/tb_bt_ref_pkg.sv tb/tb_bt_baseband.sv --top-module tb_bt_baseband
./obj_dir/Vtb_bt_baseband
```

Replace the last file and the top-module name to run any other testbench. The
end-to-end test takes well under a second.

The RTL lints cleanly with `verilator --lint-only -Wall` apart from these
warnings:

* unused package constants;
* a few unused bits: the correlator's oldest window bit, the decoder's parity
  bits, and header fields the flow control does not need;
* outputs left open on purpose;
* `rst_n` used both as an asynchronous reset and in the `disable iff` of
  assertions.
