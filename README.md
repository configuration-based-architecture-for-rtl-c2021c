# SPSP: a configuration-driven serial protocol processor

A software protocol stack decides what to do with every byte of a frame by
running instructions. At gigabit rates there are not enough instructions per
byte for that. The Super Pipeline Serial Processor (SPSP) takes the per-byte
decisions out of software. The frame streams through a short byte shift
register. A row of small hardware units, the **function pages** (FPs), can all
see that register. A **counter and controller** switches pages on and off byte
by byte, following a table of **control lines** that a microcontroller loads
once at boot.

After boot, software only acts once per frame. The SPSP raises an interrupt
when a frame is done. The microcontroller reads the extracted fields and the
payload, then accepts or discards the frame. Accepting a good frame makes the
fast-ACK page send the acknowledgement frame by itself.

This repository holds synthesizable SystemVerilog for the SPSP. It is
configured out of the box (by the testbench) for Ethernet II / IPv4 / TCP. It
comes with a self-checking testbench for each block and one for the whole
design.

## Data path

```
 rx_bit ─► bit_to_byte ─► byte_shift_reg ──win[7:0][7:0]──┬─► FP1 fp_match ───── flag: match
                                 │                        ├─► FP2/FP3 fp_extract  Ethernet DA / SA
                         win_valid, win_end               ├─► FP4 fp_crc ──────── flag: crc_ok
                                 ▼                        ├─► FP5/FP6 fp_extract  IP DA / SA
                        counter_controller ◄── flags ─────├─► FP7/FP8 fp_extract  TCP seq / ack
                           │ fp_start/fp_byte/fp_done     └─► FP9 fp_payload ─► data_buffer ── flag: buf_ok
                           │ ctrl, byte_cnt                                          │
                           ▼                                                         ▼
                     frame_irq / accept ──► FP0 fp_fast_ack ─► byte_to_bit ─► tx_bit    uc_interface ◄─► microcontroller
```

* **bit_to_byte** turns the serial line into bytes, LSB first. `rx_line_en`
  frames the data (like an MII data-valid). `rx_bit_en` strobes each bit.
  When the line goes idle, a one-clock `frame_end` marks the end of the frame.
  The bit counter restarts whenever the line is idle, so every frame must start
  on a byte boundary.
* **byte_shift_reg** holds the last `N_BYTES` (8) bytes. `win[0]` is the newest
  byte. Every page sees the whole window. A page that needs a multi-byte field
  therefore reads it in one clock, when its last byte arrives. The window is
  cleared at the end of a frame.
* **Function pages** act only when the controller tells them to:
  * `fp_start` marks a page's first byte.
  * `fp_byte` marks each byte it should process.
  * `fp_done` marks the clock its job ends.
  * Pages also get the 4-bit `ctrl` code of the current line.
* **flags** are the page results that the controller may test:
  * bit 0: match
  * bit 1: CRC ok
  * bit 2: buffer ok
  * bit 7: always 1
  * the other bits are 0

## The counter and controller

This is the part to understand first. It has two levels:

* **Lower level:** a byte counter inside the current step. Pages use it as a
  reference. They never answer it.
* **Upper level:** the handover from one line (one job) to the next. It is
  decided by a flag that a page returns.

The register file holds 16 control lines of 37 bits each. The line under the
line pointer is in force:

| bits  | field        | meaning |
|-------|--------------|---------|
| 9:0   | `fp_en`      | pages active during this step (bit n = FPn) |
| 11:10 | `mode`       | 0: `len` bytes; 1: until flag `flag_sel` is 1; 2: until end of frame; 3: halt (ignore the rest of the frame) |
| 19:12 | `len`        | byte count for mode 0 |
| 20    | `chk_en`     | test flag `flag_sel` when the step ends |
| 23:21 | `flag_sel`   | flag to wait for or to test |
| 27:24 | `next_ok`    | next line if the test passes (or there is no test) |
| 31:28 | `next_fail`  | next line if the test fails |
| 35:32 | `ctrl`       | code given to the active pages |
| 36    | `frame_done` | the end of this step reports the frame; the test result is the verdict |

### Handover

A step ends on the byte given by its mode. On that same byte the line pointer
moves to the next line, so the next line's pages take the very next byte. No
byte is lost between jobs.

A page that is enabled in two lines in a row sees neither `fp_done` nor a new
`fp_start` between them. This is how the CRC page runs across the whole frame
while other pages take turns.

### End of frame and restart

At the end of a frame, on `uc_restart`, or when the start line is written, the
pointer returns to the start line. Normally the start line hunts for the
preamble with the match page.

### Reports and payload

A report:

* raises `frame_irq`;
* sets the ok bit in the status word;
* commits the payload written during the frame (if the verdict is good) or
  rolls it back (if bad).

A frame that ends without any report is also rolled back.

The microcontroller answers every report with `uc_accept` or `uc_discard`.
Accepting a good frame starts the fast ACK.

## Function pages

| page | module | what it does |
|------|--------|--------------|
| FP0 fast ACK | `fp_fast_ack` | Sends a template frame with fields substituted (see below) and appends a freshly computed Ethernet FCS. It is started by an accept. |
| FP1 matching | `fp_match` | Holds 4 patterns, each 8 bytes with a per-bit mask. `ctrl[1:0]` selects the pattern. The flag is `&(~(win ^ pattern) \| ~mask)`. All four hits are latched when the job ends, for protocol recognition. |
| FP2, FP3 | `fp_extract` | Ethernet destination and source (6 bytes). Loaded from the window on `fp_done`. |
| FP4 CRC | `fp_crc` | Reflected CRC-32, one byte per clock. Polynomial, initial value and good-frame residue are registers. They reset to Ethernet's values: EDB88320, FFFFFFFF, DEBB20E3. |
| FP5, FP6 | `fp_extract` | IP destination and source (4 bytes). |
| FP7, FP8 | `fp_extract` | TCP sequence number (BN) and acknowledgement number (QN). |
| FP9 payload | `fp_payload` | Writes the payload to `data_buffer` and counts it. It holds back the last `ctrl[2:0]` bytes (4 = the FCS) by writing from `win[trim]`. |

**Fast ACK substitution.** FP0 fills its template as follows:

* Ethernet destination ← received source, and Ethernet source ← received destination.
* IP source ← received IP destination, and IP destination ← received IP source.
* TCP sequence ← received acknowledgement number.
* TCP acknowledgement ← received sequence number + payload length.

The template offsets assume 8 bytes of preamble and start delimiter, then
Ethernet II, then IPv4 without options, then TCP.

Swapping the IP addresses leaves the IPv4 header checksum valid. **The TCP
checksum is not recomputed.** It is sent as the template holds it. A receiver
that checks it will reject the ACK unless the microcontroller patches the
template for each connection.

**data_buffer** (2048 bytes) is a FIFO with three pointers: write, commit and
read. Bytes become visible to the reader only when the frame they belong to is
committed. An overflow spoils the current frame: the next commit turns into a
rollback, `buf_ok` drops, and the overflow counter increments.

## Microcontroller port

### Writes

Writes are 32-bit words. `cfg_addr[11:8]` must be 0. `cfg_addr[7:5]` selects
the region and `cfg_addr[4:0]` the word within it:

| region | contents |
|--------|----------|
| 0 | Control lines. Line i: word 2i = bits 31:0, word 2i+1 = bits 36:32. |
| 1 | Word 0: start line. Writing it also moves the pointer there. |
| 2 | Match pattern p: word 4p = pattern bytes 3..0, word 4p+1 = pattern bytes 7..4, words 4p+2 and 4p+3 = the mask in the same order. Byte k compares with `win[k]`, so the last byte of a sequence goes in bits 7:0 of the first word. |
| 3 | CRC: word 0 = polynomial, word 1 = initial value, word 2 = residue. |
| 4 | ACK template: word w holds bytes 4w..4w+3, lowest byte in bits 7:0. |
| 5 | Word 0: ACK template length in bytes. |

### Reads

Reads are combinational on `rd_addr`:

| addr | contents |
|------|----------|
| 0  | Status: `{payload bytes waiting[15:0], 4'b0, line_ptr, match hits[3:0], buf_ok, ack_busy, frame_ok, frame_ready}` |
| 1, 2 | Ethernet DA (high 16 bits / low 32 bits) |
| 3, 4 | Ethernet SA (high / low) |
| 5, 6 | IP DA, IP SA |
| 7, 8 | TCP BN, TCP QN |
| 9  | Payload length of the last frame |
| 10 | Payload byte. Reading with `rd_en` pops it. |
| 11 | `{ACKs sent, frames reported}` |
| 12 | `{overflows, bad frames}` |
| 13 | `{byte counter, 0, payload length valid, field valid[5:0]}` |
| 14 | CRC register |

## Example program: Ethernet / IPv4 / TCP

The end-to-end testbench boots this program. It is a good template for
others.

**Match patterns:**

* 0: the preamble, 55×7 then D5.
* 1: EtherType 0800.
* 2: IP protocol 6.

**Control lines:**

| line | pages | step | then |
|------|-------|------|------|
| 0  | match (pattern 0) | until match | 1 |
| 1  | DA, CRC | 6 bytes | 2 |
| 2  | SA, CRC | 6 bytes | 3 |
| 3  | match (pattern 1), CRC | 2 bytes, test match | 4, else 14 |
| 4  | CRC | 9 bytes | 5 |
| 5  | match (pattern 2), CRC | 1 byte, test match | 6, else 14 |
| 6  | CRC | 2 bytes (header checksum) | 7 |
| 7  | IP SA, CRC | 4 bytes | 8 |
| 8  | IP DA, CRC | 4 bytes | 9 |
| 9  | CRC | 4 bytes (ports) | 10 |
| 10 | TCP BN, CRC | 4 bytes | 11 |
| 11 | TCP QN, CRC | 4 bytes | 12 |
| 12 | CRC | 8 bytes (rest of TCP header) | 13 |
| 13 | payload (trim 4), CRC | until end of frame, test CRC ok, report | 15 |
| 14 | same as 13 | for frames that are not IPv4/TCP | 15 |
| 15 | none | halt | — |

## Protocol recognition

When the protocol of the incoming traffic is not known in advance, the
microcontroller can first boot a short recognition program. The program finds
the preamble and skips the two addresses. It then runs the match page for the
2 bytes of the type field, with patterns 1–3 set to different type codes
(0800, 86DD and 0806 in the testbench). When that step ends, the match page
latches all four pattern hits at once, and the status word shows them in bits
7:4.

After one report, the microcontroller knows which protocol arrived. It then
boots the full program for that protocol. The end-to-end testbench does
exactly this before it boots the TCP program above.

## Timing

* With one byte per clock, the controller hands one job to the next with no
  lost byte.
* A frame of N bytes is done N + 2 clocks after its first byte leaves
  `bit_to_byte`: one clock in the shift register and one in the controller.
* Measured from the receive line going idle, the report comes 3 clocks later.
  The end-to-end testbench checks this.
* The fast ACK leaves through `byte_to_bit`, one bit per `tx_bit_en`.

At 1 Gbit/s Ethernet the byte side needs 125 MHz. `bit_to_byte` takes one bit
per clock, so a serial gigabit line needs a clock as fast as its bit rate. A
byte-wide PHY interface would remove that need, but it is not included.

## Parameters (top level)

| name | default | note |
|------|---------|------|
| `N_BYTES` | 8 | Window width. Must hold the longest pattern (8) and field (6). |
| `BUF_DEPTH` | 2048 | Payload buffer bytes. Holds one 1500-byte payload. |
| `TPL_BYTES` | 64 | Largest ACK template. |

The control-line count (16), the page count (10) and the flag count (8) are in
`spsp_pkg`.

## What follows the original architecture and what does not

These parts follow the original architecture:

* the split into bit/byte converters;
* a shift register shared by all pages;
* the page list FP0–FP8;
* a counter-addressed register file of control vectors, with flag-driven
  handover and a non-interactive byte counter;
* pattern matching for synchronisation and protocol recognition (the
  per-bit masks are an addition);
* a CRC running over the whole frame;
* field extraction;
* a fast ACK built from kept addresses and TCP numbers;
* a microcontroller that only boots, monitors and answers once per frame.

These are this design's own choices:

* the exact line format and step modes;
* the flag set;
* the payload page (FP9) and the commit/rollback buffer;
* the address maps;
* the ACK template mechanism;
* the bit order and framing of the serial ports.

The receive and transmit lines are separate ports. They are not merged into
one line interface.

Not included:

* the microcontroller itself;
* powering down the configuration logic after boot (the configuration
  registers are ordinary flip-flops and are never clock-gated);
* a decision stage that would forward payload to an application on the fly;
* TCP checksum generation and checking;
* use of the IP total-length field (Ethernet padding on short frames counts as
  payload);
* a word-wide datapath (the window moves one byte per clock; wider words
  would need wider pages and a different counter step);
* IP options (the example program assumes a 20-byte IP header and a 20-byte
  TCP header).

## Simulating

Each block has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. For example, with
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_spsp_top \
    rtl/spsp_pkg.sv $(ls rtl/*.sv | grep -v spsp_pkg) tb/tb_spsp_top.sv
./obj_dir/Vtb_spsp_top
```

List `rtl/spsp_pkg.sv` first, and only once, because the other files import it.

`tb_spsp_top` runs the design at its default parameters. It sends:

* 12 frames of mixed kinds: good TCP, CRC error, non-IP and non-TCP, each with
  random idle bits before the preamble;
* a 2100-byte frame that overflows the buffer;
* a frame cut short by `uc_restart`;
* a final good frame.

Before these frames, it runs the recognition program on two frames.

It checks every field, payload byte, verdict and fast-ACK frame against
independently built references. It also counts each mechanism and fails if
any one never happened. `tb_data_buffer` overrides `DEPTH` to 64 so that it
reaches the overflow quickly.
