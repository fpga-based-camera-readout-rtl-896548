# CSI-2 camera bridge with sensor control

This design joins a MIPI CSI-2 image sensor (an IMX219-class camera with two
D-PHY data lanes, RAW10 output) to an FPGA-side host. The bridge does two
separate jobs:

- **Image path.** It turns the camera's high-speed serial lanes into a
  10-bit parallel pixel stream with frame-valid and line-valid. It also
  checks every packet header's error-correcting code (ECC) and reports or
  repairs header bit errors.
- **Control path.** It runs the sensor's I2C-based camera control interface
  (CCI) on its own:
  - After power-up it queues the sensor's start-up register sequence.
  - When a start button is pressed, it powers the sensor and sends that
    sequence.
  - From then on it sends a short register update once per frame period.
  - It accepts register write and read commands from a host through two
    32-bit queues.

The two paths share nothing but the chip. The control side runs on a
24.18 MHz system clock. The image side runs on the camera's D-PHY clock.

```
                        +---------------------------- csi2_bridge_top -------------------------+
 i_mipi_clk, 2 lanes -->| csi2_rx: dphy_deser x2 -> csi2_word_align x2 -> csi2_lane_align ->   |--> pixels, pix valid, fv, lv
                        |          csi2_decode --(header)--> [toggle sync] --> header_ecc      |--> header, ECC flags
                        |                                                                      |
 clk --> rst_gen ------>| cci_broker (fifo_in, fifo_out = sync_fifo) <--ena/busy--> i2c_master |<-> SCL/SDA (open drain)
 button1, host queue -->|            start-up / per-frame tables from cci_rom                   |--> enable, status
                        +----------------------------------------------------------------------+
```

## Control path

### The command word

A host command, and every entry of the built-in tables, is one 32-bit word
laid out as `cci_pkg::cci_cmd_t`:

| bits  | field  | meaning                                  |
|-------|--------|------------------------------------------|
| 31:25 | target | 7-bit I2C address (the camera is 0x10)   |
| 24    | rw     | 0 = write, 1 = read                      |
| 23:8  | index  | 16-bit sensor register index             |
| 7:0   | data   | byte to write (ignored for reads)        |

- **Write:** one I2C transaction of 32 bits: START, address+W, index high,
  index low, data, STOP.
- **Read:**
  1. Write the index.
  2. Send a repeated START and address+R.
  3. Read two bytes: ACK the first, NACK the second.
  4. STOP.

  The result word `{index[15:0], byte@index, byte@index+1}` goes to the
  output queue. `o_data` is valid one clock after the host pulses `i_rd_ena`.

### cci_broker: the instruction_ID sequencer

The broker never drives the I2C bus itself. It feeds the I2C master one byte
at a time through the master's `ena`/`busy` handshake.

A five-state counter, `instruction_ID`, steps forward only on the rising
edge of the master's `busy`. That edge means the master has latched the
previous inputs, so the broker can change them safely for the next byte.

| state | what the broker presents                                                        |
|-------|---------------------------------------------------------------------------------|
| 0     | idle: set `ena`, target address, `rw` = write, index high byte                   |
| 1     | after busy rises: index low byte                                                 |
| 2     | after busy rises: data byte (write), or switch `rw` to read                      |
| 3     | after busy rises: write: drop `ena` (STOP follows); read: the repeated START has begun |
| 4     | read: after the first data byte, drop `ena` so the second byte is NACKed; on the falling edge of `busy`, store the result and finish |

Around this sequencer a phase machine decides what is sent and when:

- **Load.** Straight after reset it copies the 77-entry start-up table
  (read from the `cci_rom` module) into `fifo_in`. It takes one clock per entry.
  Meanwhile `o_buff_full` is high and host writes are ignored.
- **Idle.** The broker waits for a high-to-low edge on `button1`. The button
  is synchronised by three flops.
- **Hold.** It raises `enable` (sensor power and clock) and waits
  `ENABLE_HOLD` clocks (1 ms).
- **Gap and transfer.**
  - Each transaction is preceded by `INIT_TIME` idle clocks (3500).
  - The next command comes from `fifo_in` if it holds one.
  - Otherwise, if a frame update is pending, the next entry of
    the per-frame table in `cci_rom` is sent.
- **Set-up done.** When the queue runs dry after the start-up sequence, the
  broker sets `setup_complete`. The last start-up entry writes 1 to register
  0x0100, which starts streaming. From then on:
  - host writes are accepted;
  - a timer fires every `FRAME_TIME` clocks (1/60 s + 1 clock) and queues the
    per-frame update: registers 0x015A/0x015B (exposure, 0x06DF) and 0x0157
    (analogue gain, 0xE0).

  Host commands always go before a pending frame update. `streaming` is high
  while set-up is complete and no host command is waiting.

The start-up table is the register sequence a reference host sends to this
sensor: 69 transactions. The eight two-byte writes in it are split into
single-byte writes to consecutive indices, which gives 77 entries. The table
also sets the image to 1640 x 1232 pixels, RAW10, on two lanes.

### i2c_master

This is a single-controller I2C master with a 7-bit address.

**Bus clock.** A counter divides the system clock into four quarters of an
SCL period (`(INPUT_CLK / BUS_CLK) / 4` clocks each, 15 at 24.18 MHz and
400 kHz):

- An internal data clock is high in quarters 2 and 3.
- SCL is released in quarters 3 and 4.
- Data changes on the falling edge of the data clock, while SCL is low.
- Data is sampled on the rising edge of the data clock, while SCL is high.

**Clock stretching.** If SCL is still low one clock after the master
released it, a target is stretching the clock. The counter then stops until
SCL is seen high.

**Command state machine.** The states are ready, start, command, slave-ACK 1,
write, read, slave-ACK 2, master-ACK and stop.

- `busy` rises when a byte has been taken, which is the point where the next
  byte's inputs must be ready.
- With `ena` still high and the same address and `rw`, the master continues
  the transaction.
- With a changed address or `rw`, it sends a repeated START.
- With `ena` low, it sends STOP.

**Errors.** A NACK from the target sets `ack_error`. The next START clears
it.

The pins are split into pull-down enables (`scl_oe`, `sda_oe`) and sensed
bus levels (`scl_i`, `sda_i`). An open-drain pad goes outside.

### rst_gen and sync_fifo

- **rst_gen.** The reset generator counts clocks from configuration. It
  pulls `reset_n` low at clock 25000 and releases it at clock 49900, then
  stays idle. Everything before clock 25000 relies on the power-up state of
  the flops.
- **sync_fifo.** The queues are plain single-clock FIFOs, 256 deep and 32
  bits wide:
  - `q` is registered;
  - a write to a full queue is dropped unless a read happens in the same
    clock.

## Image path

A CSI-2 burst on one lane looks like this:

1. the lane idles at 0;
2. a sync byte (0xB8 on the wire, LSB first);
3. the lane's share of the packet bytes;
4. the lane returns to idle.

With two lanes, packet byte *i* travels on lane *i* mod 2.

A packet starts with a 4-byte header: data identifier (virtual channel and
data type), 16-bit word count, ECC.

- **Short packets** (data type < 0x10) end there. Their word-count field
  carries a frame or line number.
- **Long packets** carry `WC` payload bytes and a 2-byte checksum.

### Running everything on the D-PHY clock

The receiver has no byte clock and no PLL. Every stage runs on `i_mipi_clk`
(DCK). A byte strobe every four DCK cycles takes the place of the
divided-down clock.

This solves a rate problem. Two lanes deliver 2 bytes every 4 DCK cycles.
RAW10 packs 4 pixels into 5 bytes, so that is 1.6 pixels per byte time,
which no byte-rate pixel clock could carry. Here the decoder emits pixels
one per DCK cycle with `pix_valid`. `o_pixel_clk` is simply `i_mipi_clk`.

### Stages

1. **dphy_deser** (one per lane). It samples the lane on both DCK edges.
   Every fourth cycle it delivers the last eight bits as a byte, earliest bit
   in bit 0. It does no alignment.
2. **csi2_word_align** (one per lane).
   - While hunting, it keeps a 16-bit window of the previous and the current
     byte and looks for 0xB8 at each of the eight bit offsets.
   - On a match it locks the offset, pulses `sync`, and from then on outputs
     correctly framed bytes.
   - It stays locked until the decoder signals the end of the packet. That
     signal re-arms it and clears the window, so leftover bits cannot fake a
     sync.
3. **csi2_lane_align.** Each lane's bytes, counted from that lane's own
   sync, go into a small queue (4 bytes).
   - A merged word (lane 0 in bits 7:0) is taken as soon as every lane holds
     a byte, so skew between lanes of up to 3 bytes is absorbed.
   - At the end of a packet the queues are flushed.
   - A lane that ran one byte short (odd packet length) contributes an idle
     byte, which the decoder drops.
4. **csi2_decode.**
   - Unloads each word into a byte serialiser and parses one byte per clock.
   - After the fourth header byte it presents VC, DT, WC and ECC with
     `hdr_valid`.
   - Frame start sets `fv` and frame end clears it.
   - In a RAW10 long packet, every fifth payload byte completes a group of
     4 pixels: pixel *k* = `{byte k, byte4[2k+1:2k]}`. The group leaves over
     the next four clocks.
   - `lv` is high from the first to the last pixel of the line.
   - The payload of other data types is skipped.
   - After the checksum (counted, not verified) or after a short packet,
     `done` pulses. This re-arms the aligners and flushes the lane queues.

### Header ECC (header_ecc)

The ECC is a Hamming code over the 24 header bits `{WC, VC, DT}`: five
check bits plus one extra parity bit, six ECC bits in all (the top two bits of
the ECC byte are 0). It corrects one bit error and detects two. Each header bit *d* has a fixed 6-bit column code, and the ECC is the
XOR of the codes of all set bits. The codes are 07, 0B, 0D, 0E, 13, 15, 16,
19, 1A, 1C, 23, 25, 26, 29, 2A, 2C, 31, 32, 34, 38, 1F, 2F, 37, 3B for bits 0
to 23.

The checker recomputes the code and XORs it with the received ECC to get the
syndrome:

| syndrome                 | meaning                  | flags              | header_out         |
|--------------------------|--------------------------|--------------------|--------------------|
| zero                     | no error                 | `no_error`         | unchanged          |
| equals a column code     | single header-bit error  | `corrected_error`  | that bit flipped back |
| has exactly one bit set  | single ECC-bit error     | `corrected_error`  | unchanged          |
| anything else            | two or more bit errors   | `higher_order_error` | not trustworthy  |

At the top level, `o_ecc_errors = {higher_order_error, corrected_error,
no_error}`.

The decoder parses the header as received. The corrected header is a
report for the host; it does not steer the parser. An error in a long
packet's data type or word count therefore still corrupts that packet.

### Clock-domain crossing of the header

`header_ecc` runs on `clk`. Each `hdr_valid` in the DCK domain toggles a
flag, which crosses through three flops into `clk`. The header fields are
held by the decoder until the next header, and are sampled on the
synchronised edge.

This requires consecutive headers to be more than about four `clk` periods
apart. The low-power gap that D-PHY puts between packets gives that easily.

## Top-level interface (csi2_bridge_top)

| port | dir | meaning |
|------|-----|---------|
| `clk` | in | control clock, 24.18 MHz at the default parameters |
| `button1` | in | start button; a high-to-low edge starts set-up |
| `enable` | out | sensor enable |
| `i_data[31:0]`, `i_wr_ena` | in | host command into the command queue |
| `i_rd_ena` | in | pop one read result |
| `o_data[31:0]` | out | read result, valid one clock after the pop |
| `o_buff_empty` | out | no read result waiting |
| `o_buff_full` | out | command queue full, or set-up not yet complete |
| `o_setup_complete`, `o_streaming` | out | status (see cci_broker) |
| `o_i2c_ack_error` | out | NACK seen on the last transaction |
| `scl_i`, `sda_i` | in | I2C bus levels |
| `scl_oe`, `sda_oe` | out | I2C pull-down enables |
| `i_mipi_clk` | in | D-PHY clock |
| `i_mipi_data[LANES-1:0]` | in | D-PHY data lanes |
| `o_pixel_clk` | out | equals `i_mipi_clk` |
| `o_pixel_valid` | out | pixel strobe |
| `o_parallel_pixels[9:0]` | out | RAW10 pixel |
| `o_frame_valid`, `o_line_valid` | out | frame and line valid |
| `o_packet_header[23:0]` | out | corrected header `{WC, VC, DT}` |
| `o_ecc_errors[2:0]` | out | `{higher_order, corrected, none}` |

| parameter | default | meaning |
|-----------|---------|---------|
| `CLK_HZ` | 24_180_000 | control clock frequency |
| `BUS_HZ` | 400_000 | I2C bus clock (Fast mode) |
| `ENABLE_HOLD` | CLK_HZ/1000 | clocks from `enable` to the first transaction (1 ms) |
| `INIT_TIME` | 3500 | idle clocks before each transaction |
| `FRAME_TIME` | CLK_HZ/60 + 1 | frame-update period |
| `RST_ASSERT`, `RST_RELEASE` | 25000, 49900 | power-up reset window, in clocks |
| `LANES` | 2 | D-PHY data lanes |

## Departures and limits

**Clocking and pads**

- The PLL and the on-chip oscillator are not part of the RTL.
  - `clk` is an input.
  - The image side uses the D-PHY clock with a pixel strobe, not a separate
    pixel clock.
- Only D-PHY high-speed data is handled. Low-power signalling, escape mode
  and the clock lane's LP states are outside this design. The lanes are
  expected to rest at 0 between bursts.
- Pixel data is not moved into the `clk` domain. A consumer must run on
  `o_pixel_clk`.

**Control path**

- The bus runs at 400 kHz (Fast mode). Some reference settings use 100 kHz;
  set `BUS_HZ` to change it.
- Reads return two bytes.
- Read results that find the output queue full are lost.
- Host commands sent before set-up is complete are ignored.

**Image path**

- The payload checksum is not verified.
- Lane skew above 3 bytes is not absorbed.
- A line whose payload is not a multiple of 5 bytes leaves `lv` high until
  the next RAW10 line ends.

**Reset**

- The design runs unreset until clock 25000 of the power-up reset window.
  On an FPGA the configuration state covers that time. In simulation, flops
  start at whatever value the simulator gives them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints a final
line `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if
it hangs. Two behavioural models support them:

- `i2c_target_model`: a camera-like target with a 64 K register file, index
  auto-increment and clock stretching.
- `csi2_tx_model`: a two-lane DDR transmitter. It builds short, long and
  RAW10 packets, computes ECC and checksum, can flip header or ECC bits, and
  can skew the lanes.

The testbenches check:

| testbench | what it checks |
|-----------|----------------|
| `tb_i2c_master` | writes, 2-byte reads with repeated START, NACK reporting, START/STOP counts, SCL period, stretching |
| `tb_cci_broker` | full start-up sequence against the table; button and enable hold; gaps between transactions; frame-update period; host writes and reads |
| `tb_cci_rom` | the `cci_rom` start-up table against the recorded trace (two-byte writes expanded); per-frame table; word layouts |
| `tb_sync_fifo` | random traffic against a queue model, including full and empty corner cases |
| `tb_rst_gen` | reset edges at default and reduced settings |
| `tb_header_ecc` | reference ECC from the parity equations; all single flips corrected; random double flips detected |
| `tb_dphy_deser` | bit stream recovery and byte-strobe spacing |
| `tb_csi2_word_align` | sync at all bit offsets; re-arm; no false lock on idle |
| `tb_csi2_lane_align` | skews of -2 to +2 byte slots; flush |
| `tb_csi2_decode` | headers, pixels, `fv`/`lv`, skipped and zero-length packets |
| `tb_csi2_rx` | whole receiver over the lane model with random skew |
| `tb_csi2_bridge_top` | end to end at reduced timing |
| `tb_csi2_bridge_top_full` | the same test with the bridge at its default parameters |

The end-to-end test runs both paths at once:

- the whole start-up sequence, the button, host writes and reads, frame
  updates and clock stretching;
- several frames with injected header errors, covering clean, corrected and
  uncorrectable cases.

It counts how often each of these happened and fails if any never did.

The full-size test (`tb_csi2_bridge_top_full`) runs the default 24.18 MHz
timing: reset window, 1 ms hold, 3500-clock gaps, 1/60 s frame period. It
takes about 1.3 million control clocks, roughly 20 s in Verilator.

To run one test with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_csi2_bridge_top \
  rtl/cci_pkg.sv rtl/csi2_pkg.sv -y rtl -y tb tb/tb_csi2_bridge_top.sv
./obj_dir/Vtb_csi2_bridge_top
```

Replace the module name for the other testbenches. `+verilator+rand+reset+2`
at run time starts the flops at random values. All tests are written to pass
that way too.
