# SpaceWire to SPI bridge (SystemVerilog)

This is a bridge between two masters: an on-board computer (OBC) on a SpaceWire link and a microcontroller (MCU) on an SPI bus. The OBC talks RMAP (Remote Memory Access Protocol) over SpaceWire. The MCU uses a small byte-oriented SPI command set. The two sides never see each other directly. They exchange data through shared storage:

* **TC mailbox.** Telecommands flow from the OBC to the MCU. It has 2 slots of 32 bytes.
* **TM mailbox.** Telemetry flows from the MCU to the OBC. It has 2 slots of 2048 bytes.
* **Register RAM.** It holds the status and size registers and a 24-byte `lewis_features` block.

Each mailbox is a two-slot elastic buffer. The writer fills one slot while the reader empties the other. A mail becomes visible only when its writer commits it. A reader can fetch a mail only once.

## Structure

```
spw2spi_top
 ├─ reset_sync            async assert, release after 2 clock edges
 ├─ spi_slave_ctrl        SPI slave
 │   ├─ mcucom_spi        serial front end, runs on sclk (mode 0, MSb first)
 │   ├─ async_fifo x2     sclk <-> clk crossing (Gray pointers)
 │   └─ mcucom            command decoder / protocol FSM
 ├─ spw_codec             SpaceWire codec
 │   ├─ spw_rx_ddr        D xor S clock recovery, DDR capture
 │   ├─ spw_rx_shift      bit pairs -> SMP-pair sample vectors (rx clock)
 │   ├─ async_fifo        rx clock -> clk
 │   ├─ spw_rx_decoder    character decoder (NULL/FCT/N-char, parity/escape/disconnect errors)
 │   ├─ spw_ctrl          link FSM (ErrorReset..Run), credit, tx arbitration
 │   ├─ sync_fifo x2      host RX/TX FIFOs
 │   ├─ spw_tx_encoder    characters -> 7-token vectors, parity chain
 │   ├─ async_fifo        clk -> tx clock
 │   ├─ spw_tx_serializer one token (bit pair) per tx clock
 │   ├─ spw_tx_strobe     data/strobe pair generation
 │   └─ spw_ddr_out x2    DDR output register (behavioural model of the device cell)
 ├─ rmap_target           RMAP read/write command handling, CRC-8, replies
 └─ bridge_ctrl           access authorisation and routing
     ├─ reg_ram_ctrl      status registers + lewis_features (byte_ram)
     └─ mailbox_ctrl x2   TC and TM mailboxes (byte_ram each)
```

Both link controllers use the same two-step interface to `bridge_ctrl`:

1. An **authorisation request** carries {write, mailbox, address, size}. The bridge answers in one cycle, either granting a size or refusing.
2. A **data phase** then moves one byte per strobe. It ends with *done*, which commits a written mail or frees a read slot, or with *cancel*, which drops it.

A refused read still produces a well-formed answer: size 0 on SPI, or RMAP status 10 with no data.

## Register map

| addr | name | size | SPI | SpaceWire |
|---|---|---|---|---|
| 0 | spw_comstat `{tc_rdy, tm_valid}` | 1 | – | read |
| 1 | spi_comstat `{tm_rdy, tc_valid}` | 1 | read | – |
| 2 | tc_size (size of the next TC mail) | 1 | read | – |
| 3 | tm_size (size of the next TM mail, MSB first) | 2 | – | read |
| 5 | lewis_features | 24 | write | read |

Mailboxes are selected by the address-extension bit (SPI) or by extended address 0x01 (RMAP). The MCU reads the TC mailbox and writes the TM mailbox. The OBC does the opposite.

## SPI protocol

SPI runs in mode 0, MSb first, at up to 12.5 MHz. A transaction starts with chip select going low. Its first byte is the command:

* `cmd[4]` = write.
* `cmd[3]` = address extension (mailbox).
* `cmd[2:0]` = address.

Examples: `0x19` writes TM, `0x08` reads TC, `0x01` reads spi_comstat, `0x15` writes features.

* **Write:** `cmd, size_hi, size_lo, data...`. The size is checked against the target. A refused write is dropped.
* **Read:** `cmd, dummy, dummy, then the master clocks more bytes`. The slave returns the granted size in the 4th byte and the data after it. The authorisation runs while the two dummy bytes are shifted. At 12.5 MHz that is 640 ns per byte, or about 25 system clocks.

## SpaceWire / RMAP

* **Encoding.** The codec follows the SpaceWire data/strobe encoding: odd parity, NULL = ESC+FCT, and link start at 10 Mbit/s. The run rate is up to 100 Mbit/s. The tx clock rate is chosen by `tx_fast` and supplied from outside on `tx_clk`; in the FPGA this is a PLL output.
* **Receive path.** The receiver captures both edges of the recovered clock. It hands 2 × SMP bits per word to the 40 MHz decoder, which decodes them in one cycle. With SMP = 2 the decoder handles 160 Mbit/s.
* **Transmit path.** The transmitter encodes a whole character into a 14-bit vector of 7 two-bit tokens, each with a valid flag. The serializer plays it out at one token per tx clock.
* **Flow control.** Each FCT gives 8 N-char credits, up to 56. An FCT is sent when the host RX FIFO has room for 8 more characters.
* **RMAP.** The target accepts two command forms:
  * Write: instruction `0x60`, no reply, no verify, no increment.
  * Read: instruction `0x48`.

  The header and data CRC are the RMAP CRC-8. A read reply carries status 0 with data, or status 10 with length 0 when refused. Corrupt or refused commands pulse `rmap_cmd_err`. Executed commands pulse `rmap_cmd_ok`.

## Timing and parameters

`clk` is taken as 40 MHz. The parameters below default to that:

| parameter | default | meaning |
|---|---|---|
| TC_SIZE / TM_SIZE | 32 / 2048 | mailbox slot sizes in bytes |
| T_6U4 / T_12U8 | 256 / 512 | ErrorReset and ErrorWait times (6.4 µs, 12.8 µs at 40 MHz) |
| DISC_CYCLES | 34 | disconnect timeout (850 ns) |
| SMP | 2 | bit pairs per receive sample vector |
| RX_DEPTH / TX_DEPTH | 64 / 16 | host FIFO depths |

For a different clock, scale T_6U4, T_12U8 and DISC_CYCLES.

## Differences from the source design

* **System clock.** The source is inconsistent: its SPI timing budget implies 40 MHz, while another passage implies 20 MHz. This design uses 40 MHz.
* **SPI FIFOs.** The SPI controller has no extra RX/TX FIFOs between its command decoder and the bridge. The decoder talks to the bridge directly.
* **Mailbox RAM.** The mailbox RAMs are written so they infer block RAM. The source ended up with flip-flops.
* **Reference RMAP example.** The printed header CRC of the reference write example does not match its fields. The standard CRC is used; it gives 0x47 for that header.
* **Features block.** `lewis_features` is 24 bytes at addresses 5–28. The source's address table suggests a slightly longer block.
* **Not supported:** time-codes (received ones are dropped), RMAP verify/increment/reply-on-write options, and any RMAP commands other than the two forms above.
* **Own choices.** These values are this design's own, because the source gives none:
  * the receive sample width;
  * the depths of the clock-crossing FIFOs (4 words on the SPI side, 8 on the SpaceWire side);
  * the host FIFO depths;
  * the disconnect timeout in clock cycles.
* **Transmit clock.** The PLL is not part of the RTL. `tb/txclk_gen_model.sv` models it in simulation.

## Warnings left on purpose

* **Mixed resets.** Some flops in the SPI front end and the SpaceWire rx/tx clock domains use the synchronised reset asynchronously, while the core uses it synchronously. Linters report this as a sync/async mix on the same net. It is intended: the sclk, rx clock and tx clock may be stopped while reset is applied.
* **Unused package entries.** A few package constants are not used by every module that imports the package.

## Simulation

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M` and stops on a watchdog. Example with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/spw2spi_pkg.sv tb/spw_bits_pkg.sv tb/tb_spw2spi_top.sv \
  --top-module tb_spw2spi_top -Mdir obj -o sim && obj/sim +verilator+seed+1
```

### Top-level testbench

`tb_spw2spi_top` places the bridge between a second `spw_codec` acting as the OBC, with its line running slightly above 100 Mbit/s, and an SPI master at 12.5 MHz. It runs:

* the full exchange sequence: TC write by RMAP, status polling, TC read by SPI, TM write by SPI, TM read by RMAP;
* slot switching;
* full and empty mailbox refusals;
* header and data CRC errors;
* an oversize SPI write;
* the features block;
* a full 2048-byte TM mail.

It counts every mechanism it exercises and fails if any count stays at zero. It takes well under a minute.
