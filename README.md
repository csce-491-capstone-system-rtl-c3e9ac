# An 802.11 MAC in SystemVerilog: RTS/CTS/Data/ACK with fragmentation

This is the medium access control (MAC) layer of an 802.11 station, written as synthesizable
SystemVerilog. It sits between a PHY that moves 4-bit nibbles and a host that leaves MSDUs
(MAC service data units, up to 2 KB each) in a buffer RAM. It does two jobs:

- **Send.** An MSDU is sent with the four-frame exchange RTS → CTS → Data → ACK. Any MSDU larger
  than a programmable threshold goes as sixteen 128-byte fragments, and each fragment gets its
  own ACK. Access to the medium follows the distributed coordination function (DCF): carrier
  sense plus a network allocation vector (NAV), a DIFS wait, random exponential backoff, and
  retry counters.
- **Receive.** Frames are decoded word by word as they arrive. Each header field has its own
  checker running in parallel with a table-driven CRC-32, and fragments are put back together
  in a 2 KB body buffer.

The receiver never buffers a whole frame before deciding what to do with it. A small state
machine, the ATN ("Address, Type, Number") sequencer, tracks which field the current 16-bit
word belongs to. It enables exactly one field decoder for that word, and every decoder can
raise an exception at any time. When that happens, one exception handler flushes the rest of
the frame. A frame addressed to another station is not dropped silently: its duration field
loads the NAV.

## Frames on the wire

Every field is sent most significant nibble first, in 16-bit words:

| frame | fields (bytes) | total |
|---|---|---|
| RTS  | FCH 2, DID 2, RA 6, TA 6, FCS 4 | 20 |
| CTS, ACK | FCH 2, DID 2, RA 6, FCS 4 | 14 |
| Data | FCH 2, DID 2, Addr1 6, Addr2 6, Addr3 6, SeqCtl 2, [Addr4 6], body, FCS 4 | 28 + body |

- **FCH** is the frame control word, with the 802.11 bit layout: protocol version 1:0, type
  3:2, subtype 7:4, ToDS, FromDS, MoreFragments, Retry, ... up to Order at bit 15.
- **DID** is the duration field. The transmitter fills it with the SIFS value for CTS and ACK
  frames and the DIFS value for RTS and Data frames.
- **Addresses** are 48 bits, sent as three words. Addr3 of a Data frame is the IBSS address.
- **SeqCtl** holds a 12-bit sequence number and a 4-bit fragment number.
- **FCS** is CRC-32 with polynomial 0x04C11DB7, processed most significant bit first. The
  register starts at all ones, and the FCS sent is the complement of the final register.

Subtypes (type, subtype): Data = (10, 0000), RTS = (01, 1011), CTS = (01, 1100),
ACK = (01, 1101). A body is at most 2048 bytes; a fragment body is 128 bytes.

The station's own address defaults to `48'h04FF_FFFF_F044` and the IBSS address to
`48'h004F_FFFF_EE11`. Both are parameters.

## The receiver

`mac_receiver` is a chain of blocks. Each stage below is one module:

1. **`rx_shifter`** takes nibbles over a four-phase handshake:
   - The PHY waits while `MAC_shift_busy` is high, then raises `PHY_go` with a nibble on
     `PHY_in`.
   - The shifter raises busy for one cycle, then holds `MAC_shift_done` until `PHY_go` drops.
   - A nibble therefore costs at least three clock cycles.
   - After the fourth nibble, `new_word` pulses. `new_frame` marks the first word of a frame.
2. **`atn_sequencer`** is the present-state register of the frame walk: HEADER → DID → ADDR1.
   From ADDR1:
   - CTS and ACK go straight to FCS.
   - RTS goes to ADDR2, then FCS.
   - Data goes ADDR2 → ADDR3 → SEQ → [ADDR4] → BODY → FCS.

   The body length comes from `FrameByteCount`, which the PHY supplies with the frame. That
   count is also the only way to find the end of a frame. After a flush, the sequencer goes to
   SKIP and swallows the remaining words up to the byte count.
3. **`word_selector`** decodes the state into the enables of the decoders and the CRC.
4. **Field decoders.** Each one checks its own field and posts a 4-bit code:
   - `frame_control_decoder` checks the protocol version (0010), the type/subtype (0011) and
     the byte count (1010).
   - `address_decoder` compares the receiver address with its own address, which drives
     `not_for_me`. It also checks the address format (1001), receiver = sender (0100), and a
     fragment arriving from a different sender (1110).
   - `seq_control_decoder` keeps, for the last sender, the sequence and fragment numbers of
     the last committed frame. It classifies each new Data frame as one of:
     - the next MSDU, or the next fragment (0000);
     - a retried copy already received (1101);
     - a duplicate (1100 or 0111);
     - out of order (0101, 0110, 1000, 1011);
     - a 17th fragment (1111).
   - `frame_body_decoder` packs body words into 64-bit entries of a 256-entry buffer. Each
     fragment is appended after the last *committed* one, so a fragment that failed is simply
     overwritten by its retry. When the last fragment is committed, `msdu_ready` pulses.
   - `fcs_decoder` runs the CRC over every word before the FCS, four bits per table lookup. It
     then compares the received FCS with the computed one (0001 on mismatch).
5. **`rx_exception_handler`** reacts once per frame:
   - **Any error:** it flushes all the decoders and reports `RX_ERR` / `RX_ERRCODE`. Code 1101
     comes first and also raises `REC_DATA`, so that the ACK whose loss caused the retry is
     sent again.
   - **Frame for another station:** it flushes the frame and raises `nav_load`.
   - **Clean frame:** it commits the frame. Commit advances the sequence history and the body
     buffer. It then pulses `REC_RTS`, `REC_CTS`, `REC_DATA` or `REC_ACK`.

Decoder state is committed only at the end of a frame that passed its CRC. A frame corrupted
late in its body therefore leaves no trace in the sequence history.

**The CRC table.** `crc32_table` builds the 16-entry table for 4-bit steps right after reset.
It does so bit-serially, in 64 cycles, so the table needs no file and no listing of constants.
Entry *i* is the remainder of *i*·x³² divided by the polynomial. One step of the CRC is then
`crc = (crc << 4) ^ T[crc[31:28] ^ nibble]` (function `crc_nibble` in `mac_pkg`). The receiver
and the transmitter each have their own table instance.

## The transmitter

`mac_transmitter` holds five blocks:

- **`tx_control`** is the transmit control block. It runs three transactions:
  - **`MSDURDY`**: send RTS; on `REC_CTS` send Data fragment 0; on each `REC_ACK` send the
    next fragment until the last; then pulse `msdu_done`.
  - **`REC_RTS`**: send a CTS; a Data frame in reply leads to an ACK.
  - **`REC_DATA`**: send an ACK.

  Each frame goes through the same steps: build it, ask the medium for access, send it.
  After an RTS, CTS or Data frame, a response timer runs. If it expires, `EN_RETRY` goes to
  medium access and the same frame is rebuilt with its Retry bit set.
- **`build_frame`** fills six header registers: FCH, DID, three addresses and sequence control.
  - For RTS and Data, the destination is read from the first two words of the MSDU buffer.
  - The destination must be one of four known stations. A bad address gives error 0101; an
    unknown station gives 0110.
  - Each station has its own sequence counter.
  - The MSDU is fragmented when `MSDU_BYTES > FRAG_THRESHOLD`.
- **`transmit_frame`** is a multiplexer in front of a 32-bit shift register:
  - Each field is loaded as one chunk: 4 nibbles for a 16-bit word, 8 for a buffer word or
    the FCS.
  - The register shifts a nibble out each time the PHY takes one (`tx_valid`/`tx_ready`).
  - Body words are read from `BUFF_PTR + 2 + fragment·32 + i`.
  - Every chunk except the FCS also goes to `crc_generator`, so the FCS is ready when the
    last body word has been shifted out.
- **`medium_access`** is the DCF:
  - The medium is busy when carrier sense is high, the NAV is non-zero, or the station itself
    is sending.
  - It must then be seen idle for DIFS cycles.
  - The first busy period of an allocation draws a backoff from `backoff_generator`:
    CW = min((CWmin+1)·2ⁿ − 1, CWmax), then a random number in [0, CW] times the slot time.
  - The backoff counts down only while the medium is idle.
  - Retries increment SSRC for frames shorter than `DOT11RTS_THRESHOLD` and SLRC otherwise.
    At the limits (7 and 4) the frame is given up with error 0010. Too many busy periods in
    one allocation give error 0001.
  - A watchdog runs while the station waits for the medium. Its limit is `ALLOC_TIMEOUT`
    (8192 cycles) plus the drawn backoff. When it runs out, exception 0011 is posted,
    the allocation retry count steps up, and a new backoff is drawn.
- **`tx_exception_handler`** posts `TX_ERR` / `TX_ERRCODE`:
  - Medium and build errors also abort the transaction.
  - A response timeout (0100) and an allocation timeout (0011) are posted, but the retry
    logic deals with them.

`nav_register` holds the NAV. It loads a duration only if that duration is larger than the
present value, and counts down on `nav_tick`.

## The top, `mac_802dot11`

The top connects the receiver, the NAV and the transmitter:

- The receiver's `REC_*` events and sender address go to the transmit control block.
- The receiver's NAV load goes to the NAV, whose value goes to medium access.

The PHY, the MSDU buffer RAM and the host are outside, so their signals are ports:

- receive nibble handshake and `FrameByteCount`;
- transmit nibble stream with valid/ready/end;
- carrier sense and NAV tick;
- `MSDURDY` / `BUFF_PTR` and a synchronous 32-bit buffer read port;
- a read port on the receive body buffer;
- status, error and event outputs.

Timing is in clock cycles. The defaults assume one cycle per microsecond:

| parameter | value |
|---|---|
| SIFS | 10 |
| DIFS | 50 |
| slot time | 20 |
| response timeout | 1024 idle cycles |
| allocation watchdog | 8192 cycles plus the backoff |

CWmin is 7 and CWmax 255.

## Where this departs from, or fills in, the specification

- **The specification's gaps.** It leaves out the block that coordinates transmitter and
  receiver, and the drawing that wires the receiver together. Here the receiver events go
  straight to the transmit control block.
- **PHY transmit line.** Its table gives it as 1 bit wide while its system drawing shows 4 bits
  like the receive side. 4 bits were used, with a valid/ready handshake of this design's own.
- **Carrier sense polarity.** One drawing suggests transmitting when carrier sense is 1. The
  text says the channel is free when carrier sense is *not* set, and the text was followed.
- **Contention window.** CWmin/CWmax of 7/255 come from the backoff drawing. The text mentions
  63/1023 only as the FHSS example.
- **Allocation timeout (0011).** The specification names a watchdog timer but gives no value.
  Here it is the parameter `ALLOC_TIMEOUT`, 8192 cycles, plus the drawn backoff. Taking a new
  backoff when it runs out is also this design's choice.
- **Response timeout.** The specification ties the timeout to `dot11RTSThreshold`. Here it is a
  parameter counted only while the medium is idle, so that receiving a long reply never
  times out.
- **Codes of this design's own:** 1110 (fragment from another sender), 1111 (17th fragment),
  and 1010 reused for a body that would overflow the 2 KB buffer.
- **The station address** is printed with 11 hex digits in the specification; it is
  zero-extended to 48 bits. The same is done for the IBSS address.
- **The NAV** has its own register, as in the DCF description, rather than being part of the
  receive exception handler.
- **Conventions not given by the specification, taken from 802.11:**
  - the CRC is initialised to all ones and its result inverted (bit reflection is not applied);
  - DID bit 15 set means "not a duration".
- **MSDU buffer layout** is this design's choice: the destination address in words 0–1 of
  each MSDU, then 512 data words.

Each module's opening comment says which parts follow the specification and which are its
own choices.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mac_802dot11 \
    -y rtl -y tb +libext+.sv rtl/mac_pkg.sv tb/tb_mac_802dot11.sv
./obj_dir/Vtb_mac_802dot11 +verilator+rand+reset+2
```

`mac_pkg.sv` must come first on the command line. `tb/tb_phy_rx_driver.sv` is a behavioural
PHY model that delivers queued frames with the receive handshake.

`tb_mac_802dot11` is the end-to-end test, with the top at its default parameters. Station A
(the top) sends two 2 KB MSDUs to station B, which is built in the testbench from the same
receiver and transmitter blocks. Station C, a bystander, only listens. The scenario:

1. **First MSDU, fragmented.**
   - The medium is held busy when the MSDU is posted, so A has to back off.
   - A sends an RTS, then 16 fragments.
   - Fragment 3 is corrupted on the air. B sees a CRC error and sends no ACK; A times out and
     retries.
   - The ACK of fragment 5 is corrupted. A retries, and B recognises the retried copy (1101)
     and acknowledges it again.
2. **Second MSDU, unfragmented.** The medium is first held busy for 10 000 cycles, longer
   than the allocation watchdog, so A posts the allocation timeout (0011) and backs off
   again. The MSDU then goes as one Data frame.

The testbench counts each mechanism and fails if any never happened: backoff, retry,
fragmentation, CRC error, retried frame, allocation timeout, NAV update at C, transmit stall by the PHY,
fragmented/unfragmented switch, and the four received frame kinds. It also checks that B
reassembled both MSDUs byte for byte. It simulates about 480 µs of bus time in well under a
second.

The other integration tests are `tb_mac_receiver` (whole frames, built and CRC'd in the
testbench, through the PHY model) and `tb_mac_transmitter` (frames collected from the
transmit line and checked against a bitwise CRC and the buffer contents).
