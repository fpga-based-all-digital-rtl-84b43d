# All-digital multi-protocol RFID reader in SystemVerilog

This is an RFID reader that has no mixer, no analog-to-digital converter and no
digital-to-analog converter. The FPGA's multi-gigabit transceiver (MGT) does
both RF jobs:

- **Transmit.** The serializer replays a stored bit pattern at several Gb/s.
  The fundamental of that square wave is the reader's carrier.
- **Receive.** The transceiver's differential input buffer acts as a
  comparator. It compares the antenna signal with a low-frequency reference
  wave and turns it into a one-bit pulse-width-modulated (PWM) stream. The
  deserializer samples that stream at several GS/s, and all the rest is
  digital signal processing.

The same hardware reads HF tags (13.56 MHz, ISO 14443A "MIFARE", Manchester
code) and UHF tags (860-960 MHz, EPC Gen2 / ISO 18000-6C, FM0 code). The
protocol sets the carrier pattern, the DDS frequency, the band-pass filter
coefficients and the decoder that is armed. A processor does that over
AXI4-Lite.

The RTL follows the reader published as "FPGA-Based All-Digital
Multi-protocol RFID Reader". It uses that design's IP-core split,
register tables and signal names. Where that description stops (widths,
filter structure, decoder rules, handshakes), this code makes its own
choices. They are listed in [Departures and own choices](#departures-and-own-choices).

## Block diagram

```
                 +------------------ rfid_reader_top ----------------------------+
 AXI4-Lite x5 -->| custom_ip_mgt_tx_amplitude -- swing/inhibit --+               |
                 |                                               v               |
 Bram_Tx  <----->| custom_ip_adrxtx:  tx_carrier_gen -> mgt_tx_serializer ------>| sma_txp/n
 (tdp_bram)      |                    (loop words 0..limit, MUX on/off)          |
                 |                    ref_wave_gen ----------------------------->| ref_wave_out
 rx_comp_in ---->|                    mgt_rx_deserializer -> ddc -> rx_capture   |
                 |                          |                 |         |        |
 Bram_ADRx <---->|                          +--(MGT words)----+---------+        |
                 |                                            | dataOut_DDC @ clkDataDDC
 Config_Bram <-->| custom_ip_bp_configuration --reload/config-+-> envelope_detector
                 |                                            |   (square + bp_fir)
 MIFARE_Bram <-->| custom_ip_rfid_decoder <-------------------+ rfid_baseband    |
 EPCGEN2_Bram <->|   manchester_decoder, fm0_decoder, 2 x bit_packer             |
                 | custom_ip_iic --> I2C to the Si5326 clock generator (F_sTX)   |
                 +---------------------------------------------------------------+
```

The processor, its AXI interconnect, Ethernet and UART are not part of
this RTL. Each IP core's AXI4-Lite slave is a top-level port, and so is
the processor-side port of each of the five memories. The same holds for
the reader protocol state machines (inventory, anticollision), which run
as software on that processor.

## Clocks and rates (defaults)

| Clock | Default | Where it comes from |
|---|---|---|
| `tx_ser_clk` (F_sTX) | a few GHz | external Si5326, programmed by `custom_ip_iic` |
| `rx_ser_clk` (F_sRX) | 3.2 GHz assumed | transceiver receive clock |
| Tx / Rx word clocks | F_sTX/N1, F_sRX/N2 (N1 = N2 = 32, so 100 MHz) | made inside the serializer and deserializer models |
| `clkDataDDC` | F_sRX/(N2*DEC) (10 MS/s) | made by `ddc` |
| `sys_clk` | 200 MHz | board; drives the reference wave |
| `s_axi_aclk` | 100 MHz | processor bus |

Single control bits cross between domains through `sync_2ff`. Resets enter
the word-clock and sample-clock domains through `rst_sync`, which asserts
at once and releases after two clock edges. Multi-bit settings (limits, the
phase increment, symbol lengths, coefficients) are static. Software changes
them only while the path they steer is disabled.

## Transmit path

The carrier is `F_sTX / F2`, where F2 is the period in bits of the stored
pattern. For example, `0011` repeated gives F_sTX/4. A pattern of 128 bits
holding 35 cycles gives F_sTX*35/128.

- **Storing the pattern.** The processor writes one or more whole periods
  into Bram_Tx and sets the last address in ADRxTx register 0x0C.
- **Replay.** `tx_carrier_gen` loops words 0..limit into the serializer
  while "Enable Tx BRAM" (0x04 bit 1) is set. While the bit is clear it
  sends zeros.
- **ASK.** Toggling that bit switches the carrier on and off. This is how
  reader commands are modulated.
- **Amplitude.** `custom_ip_mgt_tx_amplitude` sets the output swing
  (TXDIFFCTRL, 0x04 [3:0]) and the pre- and post-cursor emphasis. It also
  sets TXINHIBIT, which forces both pins low.
- **Serializer model.** `mgt_tx_serializer` is a behavioural model of the
  hard serializer. It sends each word LSB first. It passes the swing code
  on as `tx_swing` and ignores the emphasis settings.

## Receive path

This is the hardest part to follow.

1. **Comparator PWM.** The antenna signal, `A(t)cos(2*pi*fc*t)`, is compared
   with a slow reference sine `r(t)`. The reference comes from
   `ref_wave_gen`'s 25 MHz square wave after an external low-pass filter.
   The comparator output is a one-bit stream. Its spectrum still holds a
   component at fc whose amplitude follows A(t), plus products of the
   reference.
2. **Deserializer.** `mgt_rx_deserializer`, a behavioural model, packs N2 =
   32 consecutive samples into one word per word clock, oldest sample in
   bit 0.
3. **DDC (`ddc`).** This is a polyphase DDS. Sample k of a word is
   multiplied by `cos(acc + k*phase_inc)`, read from a 256-entry table of
   10-bit values that is computed at elaboration. A one counts as +1 and a
   zero as -1. The phase accumulator advances by `N2*phase_inc` per word.
   - The 32 products are summed: a boxcar over the polyphase paths.
   - The sums of DEC = 10 words are integrated and dumped.
   - The result is one 16-bit sample at 10 MS/s. `dataOut_DDC` is valid on
     the rising edge of `clkDataDDC`.
   - Set `phase_inc = (fc - 2 MHz)/F_sRX * 2^32` to place the reply at a
     2 MHz IF.
   - The integrate-and-dump over 320 samples has nulls at every multiple of
     10 MHz. That removes the mixer's sum frequency and most reference
     products.
4. **Envelope detector (`envelope_detector`).** Each sample is squared.
   This gives the squared envelope plus a 4 MHz term. The 32-tap
   `bp_fir` then keeps only the tag's data band. The coefficients are
   loaded at run time: `custom_ip_bp_configuration` streams them from
   Config_Bram on an AXI-Stream "reload" channel (h[0] first), and a word on
   the "config" channel makes them active. The output is
   `(sum h[k]*x[n-k]) >>> 16`, saturated to 32 bits.
   - An example filter for EPC Gen2 at a 640 kHz link rate is in the
     end-to-end testbench: a 5-tap average minus a 30-tap average. It has
     nulls at 2 and 4 MHz and passes no DC.
5. **Decoders (`custom_ip_rfid_decoder`).** A decoder runs only while its
   start bit is set. Bits are packed MSB first into 32-bit words of
   MIFARE_Bram or EPCGEN2_Bram, starting at address 0. A partly filled last
   word is written left-aligned.
   - **`manchester_decoder` (MIFARE).** It waits for the first rising edge
     of the sliced signal (the start bit), then cuts the stream into symbols
     of `samples_per_symbol` samples. It counts the high samples in each
     half, h1 and h2. A symbol is valid if `|h1-h2| >= threshold`, and its
     bit is `h1 > h2`. The first invalid symbol ends the reply. Counting
     halves, rather than looking for one edge, tolerates a subcarrier inside
     the modulated half. A sample is high when it exceeds the slice level
     (register 0x0C). Level 0 is a sign slicer. A level above the noise,
     after a band-pass filter centred on the 847.5 kHz subcarrier, detects
     the subcarrier bursts of an ISO 14443A reply.
   - **`fm0_decoder` (EPC Gen2).** It measures the run length L between
     level changes. With N samples per symbol and V samples for the
     preamble's violation run, the runs are classed as:
     - half: L < 3N/4
     - full: L < (N+V)/2
     - violation: L < 2V
     - idle: anything longer

     It waits for the violation run of the preamble `1 0 1 0 v 1` and the
     full run that follows it. After that, a full run is a 1 and two half
     runs are a 0. An idle run or a broken pair ends the reply.

     The trailing dummy 1 is stored as one extra 1 bit when the line's idle
     level differs from its level, so software should use the known reply
     length. The slicer has a programmable hysteresis band. Without it,
     noise on the idle line after a reply is decoded as bits.

## Register maps (byte offsets, AXI4-Lite, 32-bit)

**custom_ip_adrxtx**

| Offset | Field |
|---|---|
| 0x00 | Rx memory limit address |
| 0x04 | [0] enable Rx capture (one capture per rising edge)<br>[1] enable Tx memory, i.e. carrier on<br>[2] reset Rx MGT<br>[3] reset Tx MGT<br>[4] CDR hold (only shown on an LED)<br>[5] enable DDS and reference wave<br>[7] capture source: 1 = raw MGT words, 0 = DDC samples |
| 0x08 | DDS phase increment per F_sRX sample |
| 0x0C | Tx memory limit address |

**custom_ip_mgt_tx_amplitude**

| Offset | Field |
|---|---|
| 0x00 | [4:0] post-cursor, [9:5] pre-cursor, [10] TXINHIBIT |
| 0x04 | [3:0] TXDIFFCTRL |

**custom_ip_bp_configuration**

| Offset | Field |
|---|---|
| 0x00 | [0] start; each rising edge streams NTAPS coefficients plus one config word |
| 0x04 | [0] Filter_Resetn (resets to 0) |
| 0x08 | [0] done, read only |

**custom_ip_rfid_decoder**

| Offset | Field |
|---|---|
| 0x00 | [31] MIFARE start, [25:16] decision threshold, [7:0] samples per symbol |
| 0x04 | [31] EPC start, [23:8] samples of the violation run, [7:0] samples per FM0 symbol |
| 0x08 | Read only: [31] MIFARE reply ended, [30] EPC reply ended, [25:16] MIFARE bit count, [9:0] EPC bit count |
| 0x0C | [15:0] slicer level: FM0 hysteresis band and Manchester decision level |

**custom_ip_iic** (write transfers only, SCL = AXI clock / (4*CLK_DIV), about 100 kHz)

| Offset | Field |
|---|---|
| 0x00 | [31] start, [25:24] number of data bytes (1 to 3), [22:16] device address |
| 0x04 | Data bytes, first in [7:0] |
| 0x08 | Read only: [1] ack_error, [0] busy |
| 0x0C | [0] Si5326 reset_n, [1] I2C multiplexer reset_n; both reset to 1 |

The core also forwards `clk_in` to the Si5326 as a complementary pair. A
slave that holds SCL low stretches the clock.

## Reading a tag: the processor's sequence

1. Program the Si5326 over I2C to set F_sTX.
2. Write the carrier pattern to Bram_Tx and set its limit.
3. Set the DDS phase increment and enable the DDS.
4. Write the filter coefficients to Config_Bram. Release Filter_Resetn, then
   start the configuration and wait for done.
5. Key the carrier to send the reader command.
6. Arm the decoder with the tag's symbol length, then wait for "reply
   ended".
7. Read the bit count and the memory. Clear the memory by writing zeros.

For debugging, the Rx memory can capture either raw comparator words or
DDC samples.

## Departures and own choices

These are not fixed by the published design:

- **Sizes.** N1 = N2 = 32, DEC = 10, 16-bit DDC output, 32 filter taps with
  a shift of 16, 1024 x 32 memories, a 25 MHz reference wave and an I2C
  divider of 250.
- **DDC filter.** The DDC is a boxcar plus integrate-and-dump, not a
  designed polyphase low-pass.
- **Decoder rules.** Both decoders' decision rules, the FM0 hysteresis, the
  Manchester slice level, and the status and slicer registers (0x08 and
  0x0C) of the decoder are this design's own.
- **Filter configuration.** A configuration starts on the rising edge of
  the start bit. RFID_Data_Valid means "configured and not in reset", and
  the filter then takes one sample per DDC clock.
- **I2C register map.** The published design gives none. This one is write
  only.
- **Transceiver models.** The serializer and deserializer are behavioural
  models of vendor hard macros. They have no clock recovery and no real
  emphasis, so CDR hold does nothing.
- **Memory write-back.** The decoders write only words that hold received
  bits. Software clears old contents.
- **MIFARE symbol timing.** The samples-per-symbol field is an integer: 94
  at 10 MS/s, while 106 kbps needs 94.4. The decoder does not re-align, so a
  45-bit reply drifts by about 18 samples. It still decodes, but it can yield
  one extra final bit. Software should use the known reply length.

## Files

- **`rtl/`**
  - One module or package per file.
  - `rfid_pkg.sv` holds the AXI4-Lite request and response structs, the
    memory port struct and the register bit constants.
  - `axil_regs.sv` is the four-register AXI4-Lite slave shared by all
    cores.
  - `tdp_bram.sv` is the dual-port memory. Its two ports write one array
    from two clocks, which lint reports as a multi-driven signal; that is
    how a true dual-port RAM is described.
- **`tb/`**
  - One self-checking testbench per block. Each prints
    `TB_RESULT checks=N failures=M`.
  - `axil_bfm.sv` is the bus model they share.

## Simulating

Plain Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_rfid_reader_top -y rtl -y tb +libext+.sv -Irtl \
  rtl/rfid_pkg.sv tb/tb_rfid_reader_top.sv -o sim
obj_dir/sim
```

Replace the top module with any other `tb_*` to test one block.

`tb_rfid_reader_top` runs the whole design at its default parameters in a
few seconds. It does the following:

- programs the Si5326 through an I2C slave model;
- sets the swing;
- loads and keys a carrier of 35 cycles per 128 bits, and checks ASK
  on/off and TXINHIBIT;
- loads a band-pass filter;
- feeds the comparator input with a modelled 866.3 MHz backscatter reply:
  a 32-bit EPC Gen2 FM0 reply at 640 kHz, against a 25 MHz reference sine,
  sampled at 3.2 GS/s;
- checks that the EPC memory holds the 32 bits;
- captures raw words and DDC samples in the Rx memory.

Every mechanism is counted, and one that never happens fails the test.

That test also arms the MIFARE decoder during the EPC reply and checks
that it stays silent.

`tb_rfid_reader_top_mifare` tests the HF path end to end. It does the
following:

- models a 13.56 MHz carrier whose amplitude a tag raises with an 847.5 kHz
  square subcarrier in the modulated half of each 106 kbps Manchester
  symbol, against the same 25 MHz reference sine;
- tunes the DDS 2 MHz above the carrier;
- loads a Hann-windowed cosine band-pass filter at 847.5 kHz;
- sets the slice level above the idle noise;
- sends a start bit and 45 random bits, the length of an anticollision
  UID (5 bytes with parity);
- checks that the status register counts 45 bits (or 46, see the timing
  note above) and that the MIFARE memory holds the 45 bits.

The Manchester decoder is also tested at block level with synthetic
streams.
