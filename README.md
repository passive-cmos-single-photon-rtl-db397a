# Photon-counting SPAD camera for muzzle-flash detection

A rifle's muzzle flash is short, and it is faint compared with a sunlit scene. Behind a
narrow-band filter at the potassium emission line, what remains is a few hundred photons
per pixel per frame at most. This design is a camera that counts those photons. It is a
64 x 64 array of single-photon avalanche diodes (SPADs). Every pixel holds its own 8-bit
counter and its own 8-bit memory, so all 4096 pixels count at the same time. A new frame is
integrated while the previous one is read out. An FPGA runs the array at 15,000 frames per
second, reads it 8 pixels at a time over a 64-bit bus, stores each complete frame in block
RAM, and streams it on towards the host computer.

The RTL covers the digital part of the imager chip and the FPGA logic next to it:

```
muzzle_flash_system               top: chip + FPGA
 +- spad_imager                   imager chip (no clock)
 |   +- addr_decoder  (x2)        6-bit row decoder, 3-bit column-group decoder
 |   +- pixel_array               64 x 64 spad_pixel, 64 column buses of 8 bits
 |   |   +- spad_pixel            pixel_counter + pixel_latch + bus driver
 |   +- col_mux                   8 column buses -> 64-bit output
 +- spad_controller               FPGA: RESET / LATCH / address sequencer, bus sampling
 +- recording_module              FPGA: frame writer, two-frame buffer, reader
     +- frame_dpram               1024 x 64 dual-port block RAM
     +- frame_reader              RAM -> valid/ready stream
```

`spad_pkg` holds the shared sizes and timing constants. Each module's opening comment
describes its interface and timing.

## One frame, step by step

Getting the timing right matters most in this design, because two frames are in flight at
once. All times below assume a 100 MHz FPGA clock.

```
cycle   0      2    4      6                          2566            6667
        |LATCH |gap |RESET |   integrate frame n+1  ..........  ... |LATCH ...
        |      |    |      |<-- read frame n: 512 bundles x 5 cycles -->|
```

1. **LATCH**, 2 cycles. All pixel memories copy their counters at the same moment. This is
   the global shutter: every pixel's frame ends at the same instant.
2. **Gap**, 2 cycles (20 ns). This keeps the two global commands from overlapping.
3. **RESET**, 2 cycles. All counters clear, and the next frame starts counting.
4. **Readout.** The memories now hold frame n, and they stay unchanged until the next LATCH.
   The controller walks through the 512 bundle addresses. The row address changes slowly and
   the column-group address changes quickly. The controller holds each address for 5 cycles
   (50 ns, the time the real board needs for the bus to settle), then samples the bus.
   Meanwhile the counters are already counting frame n+1.
5. At cycle 6667 (15 kHz) the next LATCH comes.

The readout needs 2566 of the 6667 cycles. If a parameter set gives a frame too short to
hold the readout, `spad_controller` stops with an error at elaboration.

Latency: frame n is read from the chip during frame n+1. It enters the stream as soon as
its last bundle is stored, provided that a buffer bank was free.

Acquisition begins with `start`, which sends a RESET. The first LATCH follows one frame time
later. `stop` takes effect at the next LATCH. The frame captured by that LATCH is still read
out and recorded.

## The pixel

The quenched SPAD gives one digital pulse per detected photon, with 10-20 ns dead time. That
pulse is the counter's clock: the pixel has no system clock, and the chip has no clock pin.
`pixel_counter` is an 8-bit counter on `posedge spad_pulse`, cleared asynchronously by RESET.
The counter saturates at 255: a flash brighter than full scale reads as 255, not as a small
wrapped value. The parameter `SATURATE=0` gives a wrapping counter instead. `pixel_latch`
is a transparent latch (`always_latch`) enabled by LATCH. When the row is selected, the
stored value goes onto the column's 8-bit bus. The shared, tri-stated column bus of the
chip is modelled as a wired OR: a pixel that is not selected drives zeros.

Because the counter clocks on the SPAD pulse, RESET works as an asynchronous clear across
4096 clock domains. The pulses must not arrive at the very moment LATCH falls. In the
hardware this is a physical race that the short pulses make unlikely. The testbenches send
pulses only between RESET and the next LATCH.

## Addresses, pins and bit order

The chip has 11 control inputs: 6 row-address bits, 3 column-group bits, RESET and LATCH.
Its 64 outputs carry 8 pixels. Column group `g` covers the adjacent columns `8g .. 8g+7`.
Column `8g+j` appears on output bits `[8j+7:8j]`. Bundles are numbered `row*8 + g`. That
number is also the word address inside a frame buffer, and the order in which words leave
on the stream (row-major).

The chip's readout is purely combinational, from the address pins to the data pins. The
FPGA samples the data bus without a synchronizer. This is safe because the bus comes from
latched memories that do not change during the readout. The 5-cycle hold covers the
settling time.

## Recording and the stream

`recording_module` writes each bundle into the current bank of a two-frame RAM. At the
frame's last bundle, it marks the bank full and switches to the other bank. `frame_reader`
empties full banks in the order they were filled. It sends one 64-bit word per cycle on a
valid/ready stream:

| signal | meaning |
|---|---|
| `m_valid`, `m_ready` | handshake; a word that is offered stays unchanged until it is taken (asserted) |
| `m_data[63:0]` | 8 pixels, bit order as above |
| `m_first`, `m_last` | first and last of the frame's 512 words |
| `m_frame_id[15:0]` | frame number, counted from 0 after `start` |

A bank is free again once its last word has been taken. Suppose a new frame begins while
its bank is still full, because the sink has fallen a whole frame behind. Then that entire
frame is dropped and `frames_dropped` counts up. A sent frame is therefore never a mix of
two frames. `frames_stored` and `frames_sent` count the rest. The Ethernet interface
attaches to this stream. It is not part of the RTL.

## What follows the imager description, and what is this design's own

Taken from the imager as described:
- 64 x 64 array.
- 8-bit counter and 8-bit latch per pixel.
- Global RESET and LATCH.
- Integrate-while-read with one frame of latency.
- 8-bit column buses.
- A 64-bit bus carrying 8 pixels, with the row address slow and the column address fast.
- 11 control pins.
- 20 ns between LATCH and RESET.
- About 50 ns per 8-pixel bundle.
- 15 kHz / 67 us frames.
- An FPGA with a SPAD controller and a recording module (frame dual-port RAM, frame reader,
  Ethernet interface) that stores a full frame before sending it.

Chosen here, where the description is silent:
- the 100 MHz FPGA clock;
- 2-cycle LATCH and RESET pulses;
- saturation at 255;
- the split of the 11 pins into 6 + 3 + 2;
- adjacent columns per bundle, and the bit order;
- the wired-OR column bus;
- two frame buffers and the whole-frame drop policy;
- the valid/ready stream;
- start/stop and the status counters.

Not modelled:
- The SPAD and its variable-load passive quenching circuit. They are analog; the top takes
  their pulses as the input `spad_pulse[row][col]`.
- The quench-control pin.
- Temperature sensors.
- Pads and drivers.
- The Ethernet MAC/PHY.
- The host software.

No detection algorithm runs in the FPGA: it only records frames. Finding flashes is left to
the host.

## Capacity

| case | needed | built |
|---|---|---|
| 15 kHz frames | 512 x 50 ns = 25.6 us readout per 66.7 us frame | 2566 of 6667 cycles: fits |
| 200 kframes/s, full readout | 512 bundles in 5 us (9.8 ns each) | 25.7 us readout: does not fit; refused at elaboration |
| photons per frame | up to about 110, x2 margin = 220 | 255 |
| frame buffer | 4096 x 8 bit = 32 Kbit | 64 Kbit (two frames) |
| stream rate at 15 kHz | 61.4 MB/s | 64 bit/cycle = 800 MB/s at 100 MHz |

The frame time can be shortened by lowering `FRAME_CYCLES`, down to the 2567 cycles that a
full readout takes: 26 us per frame, about 38 kHz. The controller testbench runs at 2600
cycles. The pixel chip itself has no lower limit on the integration time. But a 5 us frame
(200 kframes/s) would need bundles faster than 10 ns each, which is five times faster than
the bus settles on the real board. The controller does not implement a mode that reads only
part of each frame.

## Parameters

| parameter | default | where |
|---|---|---|
| `ROWS`, `COLS` | 64, 64 | array size |
| `W` | 8 | counter / latch width |
| `K` | 8 | pixels per output word |
| `SATURATE` | 1 | counter saturates (1) or wraps (0) |
| `FRAME_CYCLES` | 6667 | frame period in clock cycles (15 kHz at 100 MHz) |
| `LATCH_CYCLES`, `GAP_CYCLES`, `RESET_CYCLES` | 2, 2, 2 | global pulse timing |
| `BUNDLE_CYCLES` | 5 | hold time per bundle address |

For another clock frequency, scale the cycle counts. The address widths follow from `ROWS`
and `COLS/K`. The recording module's two-bank buffer scales with the frame size.

## Simulating

Every testbench in `tb/` checks its own results. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/spad_pkg.sv tb/tb_muzzle_flash_system.sv \
          --top-module tb_muzzle_flash_system -Mdir obj_tb
./obj_tb/Vtb_muzzle_flash_system
```

Replace the name to run another testbench; there is one `tb_<module>` per module.
`tb_muzzle_flash_system` runs the whole camera at its default size and timing for ten
frames (775 us of simulated time, about 10 s to run). A scene model gives each pixel a background of 0-40
photons per frame. In some frames it adds a two-pixel flash, sometimes brighter than full
scale. The sink applies random backpressure, then stalls for four frame times. The test
compares every pixel of every received frame with the scene, clipped at 255. It also checks
the 6667-cycle frame period and the 2560-cycle readout. It counts that saturation, counting
during readout, backpressure, frame drops and stop each happened at least once.

The smaller testbenches do the following:
- Counter: saturation versus wrap, and asynchronous clear.
- Latch: transparent, then holding.
- Pixel: stored value held during counting.
- Decoders: exhaustive.
- Mux: the column mapping.
- Array: a 16 x 16 instance.
- Chip: 64 x 64, through its pins.
- Controller: every timing number above, against a slow-settling bus model. A second
  instance also runs at the shortest frame time, 2600 cycles.
- RAM: read/write and hold.
- Reader: full-rate 512-cycle frames and backpressure.
- Recording module: an exact drop scenario.

## Tool messages that remain

Lint reports two kinds of messages that are intended:
- **Latches** in `pixel_latch`. The pixel memory is a latch by design.
- **`rst_n` used both asynchronously and synchronously.** The asynchronous use is the flops'
  reset. The synchronous use is only the `disable iff` of the stream assertion in
  `frame_reader`.
