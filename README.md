# Camera node for image transfer over a wireless sensor network

A battery-powered camera node cannot afford to send whole frames over a
low-rate, lossy 802.15.4 network. This design sends only what changed. A
background model of the scene is kept in external RAM and updated with a
running average that needs only shifts and adds. Pixels that differ from the
background by more than a threshold are marked. A scan over the marks finds
the bounding box of the moving object. Only that box is sent, in small
packets, under a stop-and-wait application-layer protocol. Each packet carries
a packet ID and a CRC-8. Relaying nodes check the CRC before they forward a
packet, so a corrupted packet is dropped at the next hop instead of travelling
all the way to the base station.

The RTL follows a published FPGA design for such a node: its block
structure, its background-subtraction datapath, its message set and message
sequence, and its cycle budget of eight clock cycles per pixel. Where that
description stops (widths, handshakes, encodings, the CRC polynomial, the
memory map), the choices are this design's own and are listed under
[Departures and choices](#departures-and-choices).

## Architecture

```
           low-frequency clock (clk_lf)          |      high-frequency clock (clk_hf)
                                                 |
  uart_rxd/txd --> xcvr_uart <--> app_proto -----+---> cdc_msg_unit ---> img_proc_block
                                  |   |   |      |     (params / box)    |  bg_subtract
                                  |   |   +------+---> power_ctrl        |  obj_extract
                                  |   |          |     (gclk_hf) ------> + camera_if <-- camera bus
                                  |   +-- port B +---> ext_ram_if <--- port A
  relay in/out ----> pkt_router   |              |        |
                                                 |     SRAM pins
```

* **Low-frequency side.** This side holds the radio link (`xcvr_uart`) and the
  protocol engine (`app_proto`). It also holds the request half of the power
  control unit, and the relay queues (`pkt_router`) for traffic the node
  forwards for other nodes.
* **High-frequency side.** This side holds the camera interface (`camera_if`)
  and the image processing block (`img_proc_block`). The block is built from
  `bg_subtract` and `obj_extract`. Its clock `gclk_hf` is gated off except
  while a frame is processed.
* **Between the two sides.**
  * `cdc_msg_unit` carries the camera parameters across one way and the
    bounding box back.
  * `power_ctrl` wakes the image side and puts it back to sleep.
  * `ext_ram_if` shares one byte-wide asynchronous SRAM between the image
    block (port A, same clock) and the protocol engine (port B, four-phase
    handshake across the clock domains). It runs on the ungated
    high-frequency clock, so the protocol engine can read the frame while
    the image side sleeps.

One image transfer goes like this:

1. The base station sends IMAGE QUERY.
2. `app_proto` raises the power-control request and waits until the gated
   clock runs.
3. It sends the camera parameters through `cdc_msg_unit`.
4. The image block waits for the first pixel of the next camera frame and
   processes the whole frame.
5. The image block returns the bounding box.
6. `app_proto` puts the image side to sleep and answers IMAGE SIZE.
7. START-OF-TRANSMISSION from the base station starts the packet transfer.
   `app_proto` reads the object's pixels from the stored frame, row by row
   inside the box.

## Background subtraction (`bg_subtract`)

The background is a running average per pixel:

    B_n = (1 - a) B_(n-1) + a F_n,  with a = 1/2^k
        = B_(n-1) + (F_n - B_(n-1)) / 2^k

A pixel is foreground (update bit U = 1) when |F_n - B_(n-1)| > T.

The difference F_n - B_(n-1) is formed once and serves both formulas:

* **Background update.** The magnitude of the difference is shifted right by
  k, then added to or subtracted from B_(n-1), following the sign. There is
  no multiplier. The 9-bit sum saturates at 255, and the subtract path clamps
  at 0. With exact arithmetic neither limit can actually be reached.
* **Foreground decision.** The same magnitude is compared with T to give U.

The shifted value truncates toward zero, so the background moves toward the
frame by floor(|d| / 2^k) each frame.

* **Parameters.** k is a 3-bit value. k = 0 (a = 1) copies the frame into the
  background, which is how a background is first loaded.
* **Selective update.** When `sel_update` is set, a foreground pixel keeps
  its old background value (`b_wr = B_(n-1)`). Moving objects then do not
  smear into the model. When it is clear, B_n is always written.
* **Timing.** There is one register stage, and a new pixel can enter every
  cycle.

## Object extraction (`obj_extract`)

The update bits arrive in raster order, and both scans happen in the same
pass:

* **Row scan.** A counter counts consecutive 1s along the row. A row becomes
  an *object row* once its run exceeds the difference threshold D.
* **Column scan.** Each column has its own run counter, kept in an
  `IMG_W`-entry memory that is read and written back as each pixel passes. A
  column becomes an *object column* once its vertical run exceeds D. The
  counters are ignored on row 0, so no clearing pass is needed between
  frames.

The box spans the first to the last object row vertically and the first to
the last object column horizontally. `done` pulses one cycle after the last
pixel. `box.found` is 0 when no row or no column qualified. Isolated noise
pixels never form runs longer than D, which is what makes the threshold
useful. The run counters are 9 bits wide and saturate, so any 8-bit D works.

## Frame sequencing and memory (`img_proc_block`, `ext_ram_if`)

Each pixel takes four SRAM accesses of two cycles each, eight cycles in all:

| cycles | access                     | notes |
|--------|----------------------------|-------|
| 0-1    | read B_(n-1) at `W*H + i`  | the camera pixel F_n is taken from the queue when the read completes; both enter `bg_subtract` |
| 2-3    | write F_n at `i`           | the frame is kept for transmission |
| 4-5    | write the new background   | |
| 6-7    | write U at `2*W*H + i`     | U is also passed to `obj_extract` |

A 640 x 480 frame therefore takes 8 x 307,200 = 2,457,600 cycles, plus 2 at
start and end, or 49.2 ms at 50 MHz. The three planes need 921,600 bytes of
the 1 MByte SRAM (20 address bits). If the camera queue is empty when a pixel
is due, the sequence stalls; nothing is lost.

`ext_ram_if` accepts a request in one cycle and holds the SRAM strobes for
`ACC_CYC` (default 1) more. Port A (`a_req`/`a_ack`) ends an access in the
cycle `a_ack` is high, with read data valid in that cycle. Port B is a
four-phase handshake: address, then `b_req`, then `b_ack` (read data held),
then `b_req` low, then `b_ack` low. The requester synchronises `b_ack`.
Port A has fixed priority.

The SRAM model the testbenches use (`tb/sram_model.sv`) reads
combinationally. It writes on the clock edge that ends a cycle in which
`ce_n` and `we_n` are both low.

## Camera interface (`camera_if`)

The camera bus signals PCLK, VSYNC, HREF and D[7:0] are oversampled by the
image clock, which must be at least four times PCLK. All four pass through
two-flop synchronisers. On each rising edge of PCLK while HREF is high, a byte
is taken. Bytes are assumed to come in YUV 4:2:2 order with Y first, and only
the Y (luminance) bytes are kept as pixels. A rising VSYNC flags the next
pixel as the start of a frame.

Pixels wait in an 8-entry queue. If the queue is full, a pixel is dropped and
counted in `overflows`. The queue runs only while the image block is busy, so
no stale pixels survive a sleep period.

## Power control and clock-domain crossing

* **`power_ctrl`.** A request register in the low-frequency domain is 0 after
  reset, so the image side starts asleep. The request is synchronised into
  the high-frequency domain and drives a latch-plus-AND clock gate (the latch
  is transparent while `clk_hf` is low). `gclk_hf` therefore only starts or
  stops on whole clock periods. The synchronised state comes back as
  `active_ack`, and the protocol engine sends its command only after
  `active_ack` is high. Because the image side is reset asynchronously, it is
  reset even while its clock is stopped.
* **`cdc_msg_unit`.** Each direction is a `cdc_mailbox`. The word is
  registered at the sender, a request toggles, and the receiver synchronises
  the toggle and takes the word, which is stable by then. The receiver then
  toggles an acknowledge back, and the sender's `busy` stays high until that
  acknowledge arrives.

## Application-layer protocol (`app_proto`)

All messages begin with `0xAA` and a type byte. Multi-byte fields are sent MSB
first.

| message               | code     | payload |
|-----------------------|----------|---------|
| image packet          | `AA AA`  | packet ID (2), image data (N), CRC-8 (1) |
| CAMERA SETUP          | `AA 00`  | alpha k, T, D, mode (4) |
| IMAGE QUERY           | `AA 01`  | none |
| IMAGE SIZE            | `AA 02`  | object size in bytes (2) |
| ACK                   | `AA 03`  | packet ID (2) |
| NACK                  | `AA 04`  | packet ID (2) |
| START-OF-TRANSMISSION | `AA 05`  | packet size N (1; 0 means 256) |
| END-OF-TRANSMISSION   | `AA 06`  | none |

The sequence, seen from the base station, is:

1. CAMERA SETUP, answered by ACK `FFFF`.
2. IMAGE QUERY, answered by IMAGE SIZE.
3. START-OF-TRANSMISSION, answered by ACK `FFFF`.
4. Image packet 0. Each ACK for the packet in flight brings the next packet.
   A NACK for it brings the same packet again, byte for byte.
5. After the last packet has been ACKed, the base station sends
   END-OF-TRANSMISSION.

ACKs and NACKs for any other ID are ignored.

Every image packet carries exactly N data bytes. The last one is padded with
zeros after the object's final byte, which lets a relay find packet ends from
N alone. The CRC-8 uses polynomial x^8 + x^2 + x + 1 (0x07), MSB first, with
initial value 0. It covers every byte of the packet before it, header
included.

START-OF-TRANSMISSION is broadcast, and nodes outside the transfer stay silent
until END-OF-TRANSMISSION. That rule, together with stop-and-wait, keeps one
packet on the air at a time and is what avoids collisions and congestion. The
engine here is the camera node's side; the base station is software.

## Relay queue control (`pkt_router`, `pkt_queue`)

A node that forwards traffic keeps one `pkt_queue` per direction. Each is a
circular byte buffer with two write pointers, a committed one and a tentative
one:

* Bytes of a message go in behind the tentative pointer.
* A control message is committed, and becomes visible at the output, once
  its fixed-length payload is complete.
* An image packet is committed only if its CRC-8 matches. Otherwise the
  tentative pointer falls back to the committed one, and `crc_drops` counts
  the packet.
* A message that does not fit in the free space is dropped whole and
  counted in `ovf_drops`.

Image packets travel upstream, but their size N is set by the
START-OF-TRANSMISSION that travels downstream. `pkt_router` therefore shares
the last packet size seen in either direction between both queues.

## Top level (`wmsn_node`)

The top's ports, in groups:

| group | ports |
|-------|-------|
| Clocks and resets | `clk_lf`, `rst_lf_n`, `clk_hf`, `rst_hf_n` (asynchronous, active low) |
| Radio | `uart_rxd`, `uart_txd` (8N1) |
| Camera | `cam_pclk`, `cam_vsync`, `cam_href`, `cam_data[7:0]` |
| SRAM | `sram_addr[19:0]`, `sram_wdata`, `sram_rdata`, `sram_ce_n`, `sram_oe_n`, `sram_we_n` |
| Relay | `up_in_*`, `up_out_*`, `dn_in_*`, `dn_out_*` (valid/data/ready byte streams), `relay_crc_drops`, `relay_ovf_drops` |
| Status | `img_active`, `img_clk` (the gated clock, brought out for observation), `img_busy`, `pkts_sent`, `resends`, `cam_overflows`, `uart_rx_err` |

Parameters, with their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `IMG_W`, `IMG_H` | 640, 480 | frame size |
| `ADDR_W` | 20 | SRAM address bits |
| `CLKS_PER_BIT` | 139 | UART bit time: 57,600 baud from an 8 MHz `clk_lf` |
| `CAM_FIFO` | 8 | camera queue entries |
| `RELAY_DEPTH` | 1024 | bytes per relay queue |

## Departures and choices

The design this RTL follows fixes the following: the block structure and the
two clock domains; the running-average update with alpha = 1/2^k and the
shared difference; the threshold test; row and column run scanning against a
difference threshold; U kept in external RAM; the message codes and payload
sizes; the message sequence; CRC checking before forwarding; and about eight
cycles per pixel at 640 x 480. Everything else is this design's own choice:

* **Network processor.** It is replaced by a hardware protocol engine. The
  original uses a small processor with custom instructions, which is not
  described in enough detail to rebuild.
* **Wavelet transform.** There is no JPEG2000 wavelet transform. The original
  passes the object through a DWT processor and sends only the low-frequency
  sub-band. Here the object's raw luminance pixels are sent.
* **Signed difference.** The source datapath draws an 8-bit difference with
  zero-filled shifts, which only works while F_n >= B_(n-1). Here the sign is
  kept, so the background also follows pixels that get darker. The
  saturation at 255 is kept.
* **Threshold input.** The source datapath drawing feeds the comparator from
  the shifter output, so T would be compared with |F_n - B_(n-1)| / 2^k. The
  source's formula compares the unshifted difference, and this design follows
  the formula, so T means the same for every k. The drawing also offers only
  k = 1..7; k = 0 is added here to load a background.
* **Bounding-box rule.** The vertical extent comes from rows and the
  horizontal extent from columns. The scan is done in one pass, with a
  column-run memory, rather than by re-reading U from RAM.
* **Selective update.** It is a mode bit, and the default is to always write
  B_n.
* **Meaning of message fields.**
  * CAMERA SETUP carries alpha k, T, D and a mode bit.
  * IMAGE SIZE is the box area in bytes, saturated at 65,535.
  * Packet size 0 means 256.
  * A control message is acknowledged with ACK ID `FFFF`.
  * The last packet is zero-padded.
  * The CRC polynomial and the bytes it covers are this design's choice.
* **Retransmission.** Packets are resent only on NACK; there is no timeout.
* **Interfaces and sizes.** The UART link, the camera byte order, the
  four-phase RAM port, the toggle mailboxes, the queue depths, and the resets
  are all this design's choices.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_bg_subtract` | 3,000 random pixels plus corner cases against an integer model of the two formulas, with one-cycle latency |
| `tb_obj_extract` | random rectangles plus noise against a reference that scans stored frames row by row and column by column |
| `tb_img_proc_block` | 16 x 12 frames: RAM contents, box, exactly 8 cycles per pixel, and a stall when pixels are late |
| `tb_img_proc_vga` | two full 640 x 480 frames: 2,457,602 cycles each, RAM contents, and a 160 x 100 object's box |
| `tb_ext_ram_if` | both ports under contention from two unrelated clocks |
| `tb_camera_if` | Y-byte selection, frame flag, enable, and overflow counting |
| `tb_power_ctrl` | gated clock silent after reset and after sleep, full-rate and glitch-free while active |
| `tb_cdc_msg_unit` | words cross both ways once, in order, unchanged |
| `tb_xcvr_uart` | loopback and bit timing, plus the stop-bit error |
| `tb_app_proto` | the full message sequence including NACK, a wrong-ID ACK and an empty object, with 16-byte packets, against a bitwise CRC reference |
| `tb_pkt_router` | good, corrupt and control messages, and overflow with a stalled output |
| `tb_wmsn_node` | the whole node at 32 x 24 (see below) |
| `tb_wmsn_node_full` | the same at the default parameters: two 640 x 480 frames and a 160 x 100 object (16,000 bytes) sent in 63 packets of 256 bytes, with one resend |

The two end-to-end tests share `tb/wmsn_bench.sv`. The bench plays the base
station over the UART and runs a camera that streams YUV frames. It learns a
background, then makes an object appear. It checks IMAGE SIZE, the RAM
planes, and every packet's ID, data and CRC, and sends one NACK. Everything on
the link is also passed through the relay, which must repeat it unchanged and
must drop a corrupted packet. The bench also checks that the image clock is
silent while the node sleeps.

At the default size the end-to-end test simulates about 3 s of node time, most
of it the UART transfer, in about 100 s of Verilator run time.

To run a testbench with plain Verilator (here `tb_wmsn_node`; the others are
the same with a different top):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_wmsn_node \
  -y rtl -y tb +libext+.sv -Irtl rtl/wmsn_pkg.sv tb/tb_wmsn_node.sv
./obj_dir/Vtb_wmsn_node
```

The image size, UART rate and queue sizes are parameters of `wmsn_node`. The
frame map in RAM follows `IMG_W * IMG_H` automatically. An elaboration-time
assertion in `img_proc_block` checks that the three planes fit in
`2^ADDR_W` bytes.

## Lint notes

Verilator reports a few unused signals, all module outputs that the parent
has no use for:

* `bs_bnew` is the always-updated background value, which the selective
  update may discard.
* `pcu_req` is the wake request before it is acknowledged.
* `hf_rsp_busy` is made unnecessary by there being one result per command.

Verilator also reports that the high-frequency reset is used both
asynchronously and in the `disable iff` of an assertion. None of these
affects the logic. The clock-gate latch in `power_ctrl` is intended.
