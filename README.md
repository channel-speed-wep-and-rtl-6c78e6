# 802.11b MAC with channel-speed WEP

This is an IEEE 802.11/802.11b medium access controller (MAC) written in synthesizable
SystemVerilog. It implements the Distributed Coordination Function (DCF): carrier sense, random
back-off, ACK, RTS/CTS and retries. Beside it sits a WEP engine fast enough that encryption and
decryption never slow the radio down. It drives an Intersil HFA3861B baseband processor (BBP) and
an HFA3683 RF/synthesizer chip. A host and a buffer manager hold the frames; they are outside this
RTL, and the MAC talks to them through plain ports.

The main idea is in the WEP engine. RC4 must rebuild its whole 256-entry permutation for every
frame (the key schedule, KSA), and that costs 1536 clocks, about 35 µs at 44 MHz. At 11 Mbit/s
that is about 48 octets of air time. At 54 Mbit/s it is about 235 octets. A naive engine would
have to stall the frame. This design hides the key schedule completely:

* **Transmit:** the KSA starts the moment the MAC raises TX_PE. The BBP then spends 96 µs (short
  preamble) or 192 µs (long preamble) sending the PLCP preamble and header. The key is ready long
  before the first data bit is needed.
* **Receive:** the IV is only known once it has arrived, so the KSA cannot start early. Received
  octets are parked in a 256-octet FIFO while the KSA runs. Then the FIFO drains faster than the
  air fills it. It drains at 4 clocks per octet (90.8 ns); at 54 Mbit/s an octet arrives every
  148 ns.

## Clocking and time base

Everything runs on one clock, `MacClk`. It is 44 MHz by default (`CLK_MHZ`). Reset is synchronous
and active high. A 1 µs strobe is divided from `MacClk` at the top and shared by every 802.11
timer: the SIFS, DIFS, EIFS, slot, NAV, timeouts and the TSF.

The BBP's bit clocks `TXC` and `RXC` come in asynchronously. They are synchronised (two flops),
and their edges are detected in the `MacClk` domain. So `MacClk` must be at least four times the
bit clock. At 44 MHz that leaves a wide margin over the 11 MHz maximum bit clock.

## WEP engine (`wep`, `rc4`, `wep_fifo`, `sbox_ram`)

`rc4` works on a single-port 256×8 S-box RAM (`sbox_ram`).

* **KSA:** 256 cycles write S[i] = i. Then comes the swap loop, 5 cycles per index i:
  1. read S[i];
  2. form j = j + S[i] + K[i mod L];
  3. read S[j];
  4. write S[j];
  5. write S[i].

  The total is 256 + 5·256 = 1536 cycles.
* **PRGA:** each output byte takes 4 cycles:
  1. i+1 and read S[i];
  2. j update and read S[j];
  3. swap;
  4. read S[S[i]+S[j]] and XOR.

  A new request is accepted in the last cycle of the previous one, so bytes stream at exactly 4
  cycles each.
* **Key:** the per-frame key is the 3-octet IV followed by the 5-octet secret key, or the 13-octet
  key when `cfKey128` is set.

`wep` wraps one `rc4` and handles the 802.11 framing:

* The first 28 octets pass in clear: a 24-octet header plus the IV/KeyID field.
* The payload is XORed with the key stream.
* On transmit, four ICV octets are appended. The ICV is the CRC-32 of the plaintext payload, also
  encrypted. They follow after the buffer manager flags the last payload octet (`TPEF`).
* On receive, the ICV is checked through the CRC-32 residue of the decrypted payload plus ICV
  (0xDEBB20E3). The verdict is reported on `macIcvOk`.
* A 4-entry key-stream buffer keeps `rc4` working back to back. Decryption therefore runs at the
  engine's full rate, not at the rate octets are requested.
* The last four octets of a received frame are the FCS. They are held back until the frame ends
  and leave unmodified.

Frames without the WEP bit (receive) or without `TPWep` (transmit) pass through unchanged. On
receive they still pass through the FIFO.

`ENCRYPPhase` is high while encrypted octets leave the MAC.

## DCF: deciding when to talk

**Carrier sense (`chstate`, `valmpdu`).** The medium is busy while any of these holds:
* the BBP reports CCA;
* the NAV (the virtual carrier sense) is running;
* a deferral is not yet over.

The deferral is DIFS after a good frame or EIFS after a bad one. `valmpdu` decides which:
* good frame → DIFS;
* CRC error, or a frame longer than `cfMaxPktLen` without `cfPassBad` → EIFS.

Once the medium has been idle for the deferral, `chstate` emits a SLOT strobe every 20 µs.

The NAV is a microsecond down-counter. It loads the Duration field of any good frame not addressed
to this station, if that is larger than what remains. A CF-End clears it. When the NAV was set by
an RTS and no frame follows within `RTS_TIMEOUT_US`, the NAV is reset.

**Back-off (`backoff`).** The back-off draws `LFSR & CW` slots from a 16-bit LFSR. It counts them
down on SLOT strobes, freezes while the medium is busy, and resumes where it stopped.

**Initiator (`tx_co`).** The state machine is:

    IDLE → BKOFFREQ → [RTSREQ → WAITCTS → CTSSIFS] → MPDUREQ → WAITACK → IDLE
                  ↘ BEACONREQ → IDLE

* RTS is used when `cfNeedRts` is set or the frame is longer than `cfRtsThr`.
* A missing CTS or ACK is a timeout (`cfCtsTimeOut`/`cfAckTimeOut`, in µs). The timeout pauses
  while another frame is being received.
* After a timeout the retry counter is compared with `cfRtyLimit`:
  * **below the limit:** `macTPRT` asks the buffer manager to rewind. The contention window grows
    from `cfCWMin` as 2·CW+1, up to `cfCWMax`. A new back-off starts.
  * **at the limit:** `macTPAB` drops the frame.

  Short and long retries are counted separately. A data frame sent after a successful RTS/CTS
  counts as long.
* Group-addressed frames and beacons need no ACK.

**Responder (`rx_co`).** `rx_co` has four states: IDLE, WAIT_SIFS, TX_ACK and TX_CTS. The ACK or
CTS must start exactly one SIFS (10 µs) after the received frame ends. Before each frame the BBP
needs four register writes over its slow serial port, which takes several microseconds. For that
reason `rx_co` raises its ACK/CTS request at the *start* of the SIFS. `tx_pump` programs the BBP
during the SIFS, waits in a hold state, and raises TX_PE when `rx_co` signals `RespGo` at the end
of the SIFS. A frame that starts during the SIFS withdraws the request. A CTS is not sent while
the NAV is set.

**Frame sources (`ackpkt`, `ctspkt`, `rtspkt`, `bcnctrl`, buffer manager).** Each source offers
the frame octet by octet with a ready flag. `tx_pump` picks one in this priority order: ACK, CTS,
beacon, RTS, data. It then does the following:
1. has `mitop` program the BBP;
2. raises TX_PE;
3. waits for TXRDY;
4. shifts the octets out on TXD, least significant bit first, one bit per TXC rising edge;
5. appends the FCS.

The Duration fields are computed as follows:
* **CTS:** the RTS Duration minus the CTS air time and one SIFS.
* **ACK:** 0, or for a fragment, the received Duration minus the ACK time and SIFS.

## Receive path (`rx1`, `chkpkt`, `addrchk`, `crc32_8`)

`rx1` samples RXD on RXC rising edges, least significant bit first, while MDRDY is high. It
assembles the bits into octets and marks the frame start and end. `chkpkt` parses the frame as
the octets pass:
* frame control and Duration;
* the three addresses;
* beacon timestamp and interval;
* the IV and KeyID.

`chkpkt` also runs the FCS check and decides whether an ACK is due. `addrchk` accepts a frame when
one of these holds:
* Address 1 equals one of four station addresses (`cfMacAddr0..3`);
* it is a broadcast;
* it is a multicast whose hash bit in `cfHashTab` is set;
* `cfPROM` (promiscuous mode) is on.

The hash index is the XOR of the eight 6-bit slices of the address.

Received octets go to the buffer manager through the WEP engine (`macRPD`/`macRPDV`). The frame is
then closed with `macRxDone` and `macRPGOOD`, which means FCS correct and address accepted.

## Timing synchronisation and beacons (`tsf`, `bcnctrl`)

`tsf` keeps a 64-bit microsecond timer (`macTSFT`). A received beacon's timestamp, plus the
receive-delay offset `cfTOFSR`, replaces the timer only if it is later. The target beacon
transmission time (TBTT) is counted in 1024 µs time units:
* in AP and IBSS mode, against `cfBP`;
* in station mode, against the beacon interval learned from the AP.

At TBTT `tx_co` sends the beacon held in `bcnctrl`. `bcnctrl` is a 64×16 RAM (128 octets) that the
host fills through strobes, with an auto-incrementing address. In IBSS mode, a beacon received
before ours goes out cancels ours. Ownership of the RAM passes between host and MAC with
`cfbecOwn` and `bcnClrOwn`. The host must write the beacon's timestamp field itself.

## Baseband control port (`mitop` = `rwbbp` + `mictrl`)

`mictrl` is the master of the HFA3861B serial control port:
* the clock is `miSclk`;
* data changes on the falling edge and is sampled on the rising edge;
* `miRw` is high for a read;
* `miCs` is low during the transfer;
* an 8-bit address is followed by 8-bit data, MSB first.

`rwbbp` arbitrates the port between the per-frame writes, RSSI reads and host accesses. The
per-frame writes are SIGNAL, SERVICE, LENGTH high and LENGTH low. It also converts the frame's
octet count into the PLCP LENGTH field:

    LENGTH = ceil(8·(octets + P) / R)              P = 1 for PBCC, 0 for CCK
    at 11 Mbit/s: length-extension bit = (LENGTH·11 − 8·(octets + P) ≥ 8)

The length-extension bit lets the receiver recover the octet count as
`floor(LENGTH·R/8) − P − ext`.

## RF power sequencing and synthesizer (`rfif`)

`rfif` drives the HFA3683 power enables:
* RFRXPE, RFTXPE, RFPAPE, RFPE1, RFPE2;
* the T/R switch RFTRSW.

It has four states: IDLE, RXPELOW, WAITEND and TXPEHI. When a transmission starts (TPStart):
1. the receive enable drops;
2. each transmit-side enable rises after its own programmable delay (`cfRxPe2*`, in `MacClk`
   cycles).

After the last bit (TPLastBit) they fall again after the `cfLdb2*` delays, and the receive enable
returns. `cfManual` hands the pins to the host. The `cf*Inv` bits invert their polarity.

A separate shifter writes `cfNumBit`+1 bits of `cfSynWrData` to the synthesizer, MSB first.
RFSYNDATA changes while RFSYNCLK is low, and RFLE latches the word on its rising edge. A
synthesizer register word is 20 bits. Two control bits select the register: R counter, A/B counter
or operating mode. Because the word goes out MSB first, those two bits are the last ones shifted.
The host builds the word and sets `cfNumBit` = 19.

## Top-level interface (`wmac`)

The ports of `wmac` are grouped by what they connect to:

* **BBP:** `TX_PE`, `TXD`, `TXRDY`, `TXC`, `RX_PE`, `RXC`, `RXD`, `MDRDY`, `CCA`, and the control
  port `miSclk`, `miRw`, `miCs`, `miSdOut`/`miSdEn`/`IoSdIn`.
* **RF chip:** the `RF*` pins.
* **Buffer manager, transmit:**
  * the frame: `TPSF`, `TPD`, `TPEF`, `TPLEN`, `TPRATE` (0–3 = 1, 2, 5.5, 11 Mbit/s), `MultiAddr`;
  * WEP per frame: `TPWep`, `TPIV`;
  * answers from the MAC: pop `macTPDP` and the outcomes `macTPDN` (done), `macTPRT` (retry) and
    `macTPAB` (abort).

  A frame is taken when `TPSF` is high. It is not taken in the cycle an outcome pulses: that cycle
  gives the buffer manager time to drop `TPSF`.
* **Buffer manager, receive:**
  * data: `macRPD`/`macRPDV`;
  * frame status: `macRxDone`, `macRPGOOD`, `macIcvOk`, `macRxWep`;
  * frame fields: `macRxSa`, `macWepIv`, `macKeyID`.
* **Registers (`cf*`):** addresses, modes, IFS and timeout values, contention window limits, retry
  limit, WEP key, RF delays, beacon RAM access, and host BBP register access.
* **Observation:** `Busy`, `Nav`, `TxState`, `RfState`, `macTSFT` and the retry counters.

`cfOPMODE` selects the operating mode: 0 station, 1 access point, 2 IBSS. `cfDIFS` and `cfEIFS`
are in µs. `cfCWMin` and `cfCWMax` are 2^n−1 values, from 7 to 1023.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| wmac | `CLK_MHZ` | 44 | MacClk frequency; sets the 1 µs divider |
| wmac, wep, wep_fifo | `FIFO_DEPTH`/`DEPTH` | 256 | receive FIFO of the WEP engine |
| wmac, bcnctrl | `BCN_DEPTH`/`DEPTH` | 64 | 16-bit words of beacon RAM |
| chstate | `SLOT_US` | 20 | slot time |
| rx_co, tx_co | `SIFS_US` | 10 | SIFS |
| valmpdu | `RTS_TIMEOUT_US` | 556 | NAV reset after an unanswered RTS |
| tsf | `TU_US` | 1024 | time unit of the beacon interval |
| wep | `WEP_HDR` | 28 | octets sent in clear before the payload |
| mictrl, mitop | `SCLK_DIV` | 4 | MacClk cycles per half period of miSclk |
| rfif | `SYN_DIV` | 4 | MacClk cycles per half period of RFSYNCLK |
| rwbbp | `ADDR_*` | 0x0A–0x0D, 0x3E | BBP register addresses |
| backoff | `LFSR_SEED` | 0xACE1 | back-off random generator seed |

Shared constants (frame types, operating modes, rate codes) are in `rtl/wmac_pkg.sv`.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. With verilator 5, from the
directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
        rtl/wmac_pkg.sv tb/tb_wmac.sv --top-module tb_wmac -Mdir obj_wmac -o sim
    ./obj_wmac/sim

Replace `wmac` with any module name to run that block's testbench.

`tb_wmac` is the end-to-end test, at the top's default parameters. It contains behavioural models
of the BBP (serial TX/RX ports and register port), the synthesizer, and a buffer manager/host. It
takes the MAC through these operations:

| Area | What tb_wmac exercises |
|---|---|
| Register access | BBP register writes and reads, synthesizer writes |
| Receive side | ACK replies, CTS replies, NAV set and deferral, EIFS, address filtering |
| Transmit side | back-off slots, RTS/CTS exchange, ACKed data, retries and abort, multicast |
| WEP and beacons | WEP encryption and decryption, beacon transmission, TSF adoption |
| RF | the RF transmit sequence |

The test counts each of these mechanisms and fails if any never happened.

Other notable checks:

| Testbench | What it checks |
|---|---|
| `tb_rc4` | against a software RC4; the 1536-cycle KSA; the 4-cycle PRGA |
| `tb_wep` | a 1500-octet payload at the 54 Mbit/s arrival rate, with FIFO occupancy staying within 256 |
| `tb_rwbbp` | the LENGTH/extension values for CCK and PBCC frames of 1023–1026 octets |
| `tb_tx_co` | retry limit 3: four transmissions, then abort |

## Choices of this design and departures from the original description

* **Slot time.** The original description gives the slot as 20 µs in some places and 10 µs in
  the channel-state description. The 802.11b value, 20 µs, is used.
* **Key table.** The original feature list mentions a 64-entry key pointer table with a key
  search engine, but does not describe it. This design uses one key register (`cfWepKey`,
  40 or 104 bits) for every frame. `macKeyID` and `macRxSa` are reported so that a host-side
  table could be added.
* **WEP framing.** WEP assumes a 24-octet header, without Address 4. The design's own choices
  here are the 4-entry key-stream buffer and the ICV check through the CRC residue.
* **Undescribed mechanisms.** These are this design's own because the original leaves them
  open:
  * the multicast hash function;
  * the LFSR random generator;
  * the BBP register addresses;
  * the control-port bit order;
  * the µs unit of the timeouts and the cycle unit of the RF delays;
  * the 556 µs RTS NAV timeout;
  * the `tx_pump` source priority.
* **Added ports.** `cfRtsThr` (the RTS threshold) and `TPWep`/`TPIV` (per-frame WEP control) are
  added ports.
* **Register writes in the SIFS.** The BBP is programmed during the SIFS for ACK/CTS, as
  described above. It is a timing necessity, not something the original spells out.
* **Beacon timestamp.** The timestamp is not inserted into outgoing beacons by hardware.
* **Other modes.** Power save, PCF and fragmentation of outgoing frames are not implemented.
  They are not part of the original design either. Received fragments are handled only as far as
  the ACK Duration field.
* **Synthesis.** The original reports 44 MHz on a Xilinx Virtex-II FPGA. No timing closure was
  attempted for this RTL. The only structure that matters for it is the two single-port RAMs:
  the S-box and the FIFO, written as plain arrays.
