# FEC: readout FPGA for a beam position monitor

A beam position monitor (BPM) in a rapid-cycling proton synchrotron has four
pick-up electrodes around the beam pipe: A and C across the horizontal plane,
B and D across the vertical one. The beam position in a plane follows from
how unevenly the two opposite electrodes see the passing bunch. This design
is the FPGA logic of the front-end controller (FEC) board that digitises
those four signals. It does three things at once:

* It records raw samples. After the host arms a capture, the next T0
  timing pulse (start of an acceleration cycle) starts a record of the four
  channels. By default the record is 20 ms long: 5,000,000 samples per
  channel at 250 MS/s, 40 MB in all, written into external DDR3 memory. The
  host reads the record back afterwards for offline study.
* It computes the beam position turn by turn (TBT) in real time. Each
  revolution gives one X and one Y value, by difference over sum inside a
  time window set by the host. The records are streamed to the host and
  also kept in a second DDR3 region.
* It talks to a host computer over UDP on an SFP Ethernet link. The host sets
  registers, receives TBT packets and pulls the raw record out of DDR3. An
  SPI sequencer loads the configuration words of the ADC, the clock PLL and
  the programmable amplifier.

The machine's numbers set the scale. The revolution frequency runs from
1 MHz to 2.44 MHz, so one turn is 102 to 250 samples. The bunch shortens
from 500 ns to 100 ns, so one bunch is 125 down to 25 samples. A 20 ms
cycle has about 20,000 turns.

```
 ADC (4 ch, 14 bit, DDR LVDS)
   |  adc_clk[0]: ch A,B    adc_clk[1]: ch C,D
   v
 adc_ddr_rx x4 --> async_fifo x4 (14 bit x 8) --+-- 64-bit word {D,C,B,A} @ 250 MHz
                   (adc_frontend)               |
                                                +--> pos_calc --> TBT FIFO ----------+
                                                |    (adc_corr x4,  \--> 128i/512o   |
                                                |     win_integ x4,      to DDR3     |
                                                |     pos_div x2)                    |
                                                +--> raw_capture --> fifo_64i_512o   |
                                                     (arm + T0)     64 in, 512 out   |
                                                                       | ui_clk      |
                                                                       v  200 MHz    |
                                  DDR3 controller user port <--> ddr_buf_ctrl        |
                                                                       | read-back   |
                                                                       v FIFO        v
 host <--UDP--> udp_rx --> reg_ctrl --> spi_cfg_seq --> spi_master --> ADC/PLL/amp   |
                   udp_tx <-- udp_pkt_mux <-- reply / TBT records / raw words <------+
```

## Clock domains

| Clock     | Rate    | What runs on it |
|-----------|---------|-----------------|
| `adc_clk[0]`, `adc_clk[1]` | 250 MHz | LVDS capture. Clock 0 serves channels A and B, clock 1 serves C and D. |
| `clk`     | 250 MHz | System clock, the same clock the ADC samples on. Channel merge, raw gating, position processing. |
| `ui_clk`  | 200 MHz | User clock of the DDR3 controller. Write and read sequencing. |
| `eth_clk` | 125 MHz | Byte clock of the gigabit link. UDP receive and transmit, registers, SPI. |

Data cross domains only through dual-clock FIFOs (`async_fifo`,
`fifo_64i_512o`). These use Gray-coded pointers and two-flop synchronisers,
and read in show-ahead mode. Command pulses (arm, readout start) cross in
`pulse_sync`, a toggle-and-edge-detect synchroniser. Status bits cross in
two-flop synchronisers. Each domain gets its own reset from `rst_sync`:
asserted asynchronously, released synchronously.

The configuration registers are a deliberate exception. The window, gains,
offsets and lengths are held in the `eth_clk` domain and used directly in
the others. The host must only change them while nothing uses them: no
capture, readout or TBT run in progress. Changing the gains during a TBT run
is safe in practice, because a value is wrong for at most one turn.
However, this is not a guarantee.

## ADC capture path

Each ADC channel delivers 14 bits on 7 LVDS pairs at double data rate. On
each pair, the even bit comes on the rising edge of the ADC output clock and
the odd bit on the falling edge. `adc_ddr_rx` catches both edges and presents
one parallel sample per rising edge. The differential input buffers and the
input delay taps are vendor primitives, and they stay outside this code. The
ports carry the single-ended bits after the buffers.

Each channel then passes through its own 14-bit, 8-deep dual-clock FIFO into
the system clock. `adc_frontend` pops all four FIFOs in the same cycle, once
none of them is empty. It sign-extends each two's-complement sample to 16
bits and issues one 64-bit word per clock: A in bits [15:0], B in [31:16],
C in [47:32] and D in [63:48]. A sample that meets a full FIFO is dropped
and counted (`ovf_cnt`). This can happen only if the ADC clock runs faster
than the system clock.

## Raw record in DDR3

`raw_capture` is a gate on the sample stream. An arm pulse clears the
downstream width converter and makes the gate wait for a rising edge of T0.
T0 is synchronised with two flops, and the first sample passes within
three clocks of the edge. From then on, exactly `cap_len x 8` sample words pass. The
reset length is 625,000, which is 20 ms. Then `done` is raised.

`fifo_64i_512o` packs eight consecutive 64-bit words into one 512-bit word.
The first word goes to bits [63:0]. The packed word crosses into the
200 MHz controller clock. Its 64-entry depth rides out controller stalls of
about 0.25 us. The input needs 16 Gb/s (64 bit x 250 MHz). The controller
port peaks at 102.4 Gb/s (512 bit x 200 MHz). In other words, one write is
needed every 8 system clocks, and the port can take one per controller
clock.

`ddr_buf_ctrl` drives the native user interface of the DDR3 controller.
Every 512-bit word is one write command with one data beat. Word *n* of a
record goes to `app_addr = 8n`, because the address counts 64-bit units.
The 29-bit address reaches 4 GB. After the record, any range of words
can be read back: `rd_addr` and `rd_len` in words. Writes always win over
reads. A read is issued only while the read-back FIFO has room for every
word already requested. So data returned by the controller is never lost,
however long the UDP side takes to drain it. An assertion (`a_rb_room`)
checks this rule.

Turn-by-turn records take a second route into the same memory. Each record
is also written into a small width converter (the same `fifo_64i_512o`,
here 128 bits in and 4 records per word), which crosses into the controller
clock. `ddr_buf_ctrl` writes these words to a TBT region that starts at
word 2^23 (byte 512 MB) and is 2^23 words long, wrapping around at the end.
Enabling TBT output restarts the region and zeroes the word count (register
0x12). Raw words are written first when both wait. The TBT stream is small:
at most 610,000 words/s against 200 M/s. A raw record longer than 2^23 words
(268 ms) would run into the TBT region.

## Turn-by-turn position

This is the part with the most arithmetic. It lives in `pos_calc` and its
three sub-blocks. For the horizontal plane:

```
A' = K_A * A + b_A          C' = K_C * C + b_C          (per-channel correction)
Delta = A' - C'             Sigma = A' + C'
V_Delta = sum of Delta over samples Ws..We of the turn
V_Sigma = sum of Sigma over the same samples
X = V_Delta / V_Sigma
```

Y is formed the same way from B and D.

**Correction (`adc_corr`).** K is a signed 18-bit number in Q2.16 format.
1.0 is `18'h10000`, and the range is -2 to almost +2. b is a signed 16-bit
offset in ADC counts. The product is shifted right by 16 bits, which rounds
toward minus infinity. b is then added, giving an 18-bit corrected sample.
Latency is 2 clocks. Each channel has its own K and b, which flatten gain
differences between the four electrode chains.

**Turn marker and window (`win_integ`).** A turn starts at a rising edge of
the `rf_win` timing input. The input is synchronised with two flops. Every
following sample has an index: 0 is the first sample after the marker.
Samples with `Ws <= index <= We` are summed; both limits are inclusive and
12 bits wide. With a 12-bit index the window may lie up to 4095 samples
(16 us) after the marker, which covers a whole turn even at 1 MHz. Sums are
32 bits. That is plenty: a 125-sample bunch of full-scale 19-bit values needs
about 26 bits. When the index passes We, the sums are handed on and the
integrator waits for the next marker.

**Ratio (`pos_div`).** A restoring divider forms |V_Delta| / |V_Sigma|, one
quotient bit per clock, and applies the sign afterwards. The result is Q1.15:
32767 means +1.0, the full distance to one electrode in normalised units.
Converting the ratio to millimetres needs the monitor's geometry factor, and
that conversion is left to the host. If |V_Delta| >= |V_Sigma|, the result
saturates to +/-32767 in one clock. If V_Sigma = 0, the result is 0. Both
cases set `sat`. A normal division takes 17 clocks. The X and Y planes have
one divider each.

**Latency and throughput.** `tbt_valid` rises 22 clocks after the clock edge
that takes sample We:

| Stage | Clocks |
|-------|--------|
| correction | 2 |
| sum and difference | 1 |
| integrator | 1 |
| divider | 17 |
| pairing X with Y | 1 |

A new window can start while the divider works. Only a turn shorter than
about 20 samples could find the dividers busy. Such a window is dropped and
counted in `ovr_cnt`; the real machine, at 102 or more samples per turn,
never comes close.

**Record.** Each turn yields a 128-bit `tbt_rec_t`:
`{turn[31:0], x[15:0], y[15:0], sum_x[31:0], sum_y[31:0]}`. The turn
counter counts emitted records from reset. The two sums let the host
judge the beam intensity and reject turns with no beam.

## Host link

### Ethernet layer

`udp_tx` and `udp_rx` speak Ethernet II / IPv4 / UDP over an 8-bit
GMII-style interface at 125 MHz, towards an external SFP transceiver.
Addresses and ports are top-level parameters, and no ARP is done: the host
needs a static ARP entry.

| Parameter | FPGA side (`LOCAL_*`) | Host side (`HOST_*`) |
|-----------|-----------------------|----------------------|
| MAC       | 02:00:C5:B0:00:01     | 02:00:00:00:00:FE    |
| IP        | 192.168.10.10         | 192.168.10.1         |
| UDP port  | 5000                  | 6000                 |

The transmitter sends 7 preamble bytes and the start delimiter, then the
42-byte header. The IPv4 header checksum is computed; the UDP checksum is
left at 0, which UDP allows. The do-not-fragment flag is set, and the IP
identification increments with every frame. Then come the payload, padding
up to the 60-byte minimum, the CRC-32 and a 12-byte gap. A frame with *n*
payload bytes occupies `max(n,18) + 66` byte clocks.

The receiver checks the following, and only if all pass is the command
released (`cmd_valid`, one clock after the last byte):

* the destination MAC is its own or broadcast,
* the frame is IPv4 and the protocol is UDP,
* the destination port is right,
* the frame is long enough,
* the CRC-32 over the whole frame leaves the standard residue `0xDEBB20E3`.

Everything else is counted as a bad frame.

### Commands and registers

Every datagram to the FEC carries one 8-byte command, most significant byte
first: `{op[7:0], 8'h00, addr[15:0], data[31:0]}`. op `0x01` writes a
register and op `0x02` reads one. A read is answered by a reply packet.

| Addr | Name    | Access | Meaning | Reset |
|------|---------|--------|---------|-------|
| 0x00 | ID      | R  | `0xC5B00001` | |
| 0x01 | CTRL    | R/W | [0] arm capture (pulse), [1] TBT enable, [2] start raw readout (pulse), [3] run the SPI table (pulse). Reads return only bit 1. | 0 |
| 0x02 | ATT     | R/W | [1:0] attenuator: 0 = x1, 1 = x0.25, 2 = x0.1, 3 = x0.025 | 0 |
| 0x03 | CAP_LEN | R/W | record length, 512-bit words (24 bit) | 625000 (20 ms) |
| 0x04 | RD_ADDR | R/W | first word to read back | 0 |
| 0x05 | RD_LEN  | R/W | number of words to read back | 0 |
| 0x06 | WS      | R/W | window start, samples after the turn marker (12 bit) | 0 |
| 0x07 | WE      | R/W | window end, inclusive (12 bit) | 99 |
| 0x08-0x0B | K_A..K_D | R/W | gain, signed Q2.16; reads are sign-extended | 1.0 |
| 0x0C-0x0F | b_A..b_D | R/W | offset, signed 16 bit; reads are sign-extended | 0 |
| 0x10 | SPI     | W  | send one SPI frame: [31:30] device (0 ADC, 1 PLL, 2 amplifier), [29:25] bits-1, [23:0] data | |
| 0x11 | STATUS  | R  | [0] capture busy, [1] capture done, [2] readout busy, [3] SPI busy, [4] DDR3 calibrated, [5] ADC sample lost, [6] DDR FIFO word lost, [7] TBT record lost (divider busy or TBT FIFO full), [8] bad frame seen | |
| 0x12 | TBT_WORDS | R | 512-bit TBT words in DDR3 since TBT was enabled. Exact once TBT is disabled. | 0 |

Unknown addresses read as 0 and ignore writes.

A typical session: set ATT and, if needed, send SPI frames. Enable TBT and
collect TBT packets. After disabling TBT, read TBT_WORDS, then read the TBT
region with RD_ADDR = 0x800000 to get every record of the run. Arm a capture and wait for STATUS[1]. Then set
RD_ADDR/RD_LEN and pulse CTRL[2] to stream the record out.

### Packets from the FEC

Every payload starts with a 4-byte header:
`{type, record count, sequence[15:8], sequence[7:0]}`. The sequence number
is shared by all packet types, so the host can spot a lost packet.

| Type | Content | Bytes |
|------|---------|-------|
| `0xA0` reply | the 8-byte reply `{op, 0, addr, value}`, most significant byte first | 12 |
| `0xB0` TBT   | 16 records of 16 bytes, each least significant byte first | 260 |
| `0xC0` raw   | up to 16 words of 64 bytes, each least significant byte first. A readout that is not a multiple of 16 ends with a shorter packet. | up to 1028 |

In a raw word, the bytes come in time order of the samples. Every sample is
a little-endian 16-bit value in the order A, B, C, D.

`udp_pkt_mux` starts a packet only when the transmitter is idle and the
whole packet's worth of data is already waiting. A frame is therefore never
starved halfway. Priority goes to the reply first, then TBT, then raw.

Sizing the link: the worst-case TBT stream is 2.44 M turns/s x 16 bytes =
39 MB/s. That is about a third of the gigabit line, so TBT and a raw readout
can share it. A raw readout reaches about 930 Mb/s of payload in
simulation: 1028-byte payloads in 1094 byte-clock frames, with DDR3 reads
keeping up. A full 40 MB record therefore takes about 0.35 s to read out.

## SPI configuration

`spi_master` sends frames of 1 to 32 bits in SPI mode 0, most significant
bit first, with one chip select per device (ADC, PLL, amplifier). SCLK is
the byte clock divided by `2*HALF` (HALF = 4, so 15.6 MHz). A frame of *n*
bits takes `(2n+2)*HALF` clocks. MISO is shifted in and kept for read-back.

`spi_cfg_seq` walks the configuration table when the host sets CTRL[3]. It
also forwards single frames from register 0x10, which is how the amplifier
gain is changed at run time. **The six table entries are placeholders:**

* the ADC: 16-bit address/data words for reset and output format,
* the PLL: two 24-bit words,
* the amplifier: one 16-bit word.

Replace them with the values from the data sheets of the parts fitted.

## Fixed-point summary

| Signal | Width | Format |
|--------|-------|--------|
| raw sample | 16 | 14-bit ADC code, sign-extended |
| K | 18 | signed Q2.16 |
| b | 16 | signed integer, ADC counts |
| corrected sample | 18 | signed integer |
| Delta, Sigma | 19 | signed integer |
| V_Delta, V_Sigma | 32 | signed integer |
| X, Y | 16 | signed Q1.15, saturating |

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<m>`. The two end-to-end benches share
`tb/fec_top_tb_body.svh` and use three models:

* `ads4449_model.sv` drives the DDR LVDS outputs of a 4-channel ADC.
* `mig_model.sv` stands in for the DDR3 controller's user interface. It is
  a sparse memory with random stalls on 20 % of the cycles, a 12-clock read
  latency and a calibration delay.
* `eth_tb_util.svh` builds and checks Ethernet frames.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/fec_pkg.sv tb/tb_fec_top.sv --top-module tb_fec_top
./obj_dir/Vtb_fec_top
```

Replace `tb_fec_top` with any other testbench name to run that one. Add
`+verilator+rand+reset+2` to start every register from a random value.

`tb_fec_top` runs the whole design with a 100-word record (a few seconds).
`tb_fec_top_full` runs the same sequence with every default in place: a full
20 ms record, 625,000 DDR3 writes of 512 bits. It finishes in under a minute.
The sequence:

* register reads, attenuator setting, the SPI table and one direct SPI frame,
* a frame with a corrupt CRC, which must be ignored,
* arm and T0, then a counting pattern recorded into DDR3,
* readout of the first and the last words over UDP, with every sample
  checked for channel, order and position in the record,
* a 256-word readout that must deliver more than 800 Mb/s of payload,
* TBT with a known beam offset, checked against the expected X and Y,
* a gain change on channel A, after which X must move to the new value,
* readback of the DDR3 TBT region, which must hold the same records that
  arrived over UDP.

The bench counts how often each mechanism happened: controller stalls, short
raw packets, TBT packets, records after the gain change, SPI frames. A
mechanism that never happened counts as a failure.

## Limits and departures

These are the places where the design is narrower than the board it serves,
or where it adds its own choices:

* **Four channels per FPGA path.** The board carries eight ADC channels,
  enough for two monitors. The path here serves one monitor (A-D). A second
  monitor needs a second copy of the capture, DDR3 and position logic, or a
  wider DDR3 word.
* **Gigabit UDP only.** The board's main output is a 10 Gb/s optical link to
  a data aggregation board. Its protocol is not defined here, so only the
  UDP/SFP link is built, as a byte-wide gigabit interface. Serialisation
  is left to the FPGA's transceiver or an external PHY.
* **Vendor and analog parts are outside.** Not part of this code:
  * the DDR3 controller (only its user interface is driven),
  * the clock PLL,
  * the differential input buffers and delay taps,
  * the SFP transceiver,
  * the analog front end: attenuator switches, amplifier and filter.
    Only `att_sel` and the amplifier's SPI words come from this logic.
* **Own choices, not fixed by the original description:**
  * the register map, packet formats and priorities,
  * the turn marker (`rf_win` rising edge),
  * the arm-then-T0 capture start,
  * the fixed-point formats and the divider type,
  * the LVDS bit order,
  * the FIFO depths other than the 14 bit x 8 channel FIFOs.
* **The bunch window is fixed by the host.** Offline analysis of raw records
  can find the bunch with a two-threshold search. In the FPGA, the window is
  simply Ws..We, set by the host.
* **Registers are not synchronised across clock domains** (see Clock
  domains). The TBT word count is copied through two flops only, so it is
  exact only after TBT output is disabled.
* **TBT buffer layout is this design's own.** The region address and size,
  four records per word, and the restart on enable are all choices made here.

## Files

| File | Role |
|------|------|
| `rtl/fec_pkg.sv` | shared sizes, record and command types, register map, CRC-32 step |
| `rtl/fec_top.sv` | top level, clock-domain wiring |
| `rtl/adc_ddr_rx.sv`, `rtl/adc_frontend.sv` | LVDS capture, channel FIFOs, 64-bit sample word |
| `rtl/async_fifo.sv`, `rtl/pulse_sync.sv`, `rtl/rst_sync.sv` | clock-domain crossing helpers |
| `rtl/raw_capture.sv`, `rtl/fifo_64i_512o.sv`, `rtl/ddr_buf_ctrl.sv` | raw record into DDR3 and back |
| `rtl/adc_corr.sv`, `rtl/win_integ.sv`, `rtl/pos_div.sv`, `rtl/pos_calc.sv` | turn-by-turn position |
| `rtl/udp_rx.sv`, `rtl/udp_tx.sv`, `rtl/udp_pkt_mux.sv`, `rtl/reg_ctrl.sv` | host link and registers |
| `rtl/spi_master.sv`, `rtl/spi_cfg_seq.sv` | SPI configuration |
| `tb/tb_<block>.sv` | one self-checking bench per block |
| `tb/tb_fec_top.sv`, `tb/tb_fec_top_full.sv` | end-to-end benches |
| `tb/ads4449_model.sv`, `tb/mig_model.sv`, `tb/*.svh` | models and shared bench code |
