# Streaming Canny edge detector, one pixel per clock

This is a Canny edge detector for FPGAs. A grey-level frame comes in as a raster stream, one 8-bit
pixel per clock, and a one-bit edge map comes out at the same rate. The input frame is 708 x 752
pixels by default and the edge map is 698 x 742. The detector never stalls and never stores a
whole frame. Each of its four stages keeps only a few image rows in block memory. Those rows
feed a small window that slides across the image:

```
 pixels --> [ 5x5 Gaussian ] --> [ 3x3 Sobel, |Gx|+|Gy| ] --> [ direction + non-max suppression ] --> [ double threshold + linking ] --> edge flags
   8 bit      16 bit (x159)        19-bit Gx, Gy, 20-bit |G|      20-bit thinned magnitude                1 bit
 W x H        (W-4)x(H-4)          (W-6)x(H-6)                    (W-8)x(H-8)                             (W-10)x(H-10)
```

Pixels can enter in two ways. One is a direct stream, such as a camera interface. The other is an
RS-232 link to a PC, which also carries the edge map back to the PC. The serial part has a UART,
a FIFO block-RAM buffer and a small address-controller state machine. The same link can also run
as a plain echo for testing the link.

The structure follows the Canny detector in the MSc dissertation *FPGA Implementation of Canny
Edge Detection for Video Processing* (Universidade de Aveiro). That design targets a Xilinx
Virtex-5 XC5VLX50T and reports about 30 MHz, or roughly 57 frames/s at 708 x 752. The RTL here is
an independent SystemVerilog implementation. Where the dissertation leaves something open, or
this RTL does something differently, the sections below say so. The last section collects the
departures.

## Row memories and the sliding window (the core mechanism)

Every stage is built the same way. This is the part to understand first.

A stage that needs a K x K neighbourhood (K = 5 for the Gaussian, 3 for the others) has **K
block memories that all hold the same data**. Each incoming pixel is written to all K memories
at the same address. On a read, memory k is read at the address of row r+k. All K memories are
read in the same clock, so each clock delivers one whole column of the window: pixels (r,c),
(r+1,c), ... (r+K-1,c). Spending K memories where one would do buys exactly this: K pixels
of one column in a single clock, without multi-porting a memory.

The column enters the right-hand side of a K x K register window (`shift_window`). The older
columns shift one place left. Once K columns have entered for a row, the window holds a complete
neighbourhood, and the mask logic produces one result per clock from then on. When the reader
moves to the next row, the window refills, and the first K-1 columns of each row give no result.
This is why each stage trims K-1 pixels from both dimensions.

`line_buffer_bank` is a reusable module that does all of this. Its details:

* **Memory size.** Each memory is a circular buffer of K rows (`DEPTH = K*W` words). The write
  address simply counts around it. Memory k is read at `rd_addr + k*W`, wrapped at `DEPTH`.
* **When a read fires.** A counter `lead` tracks how many pixels the writer is ahead of the read
  position. A read of column (r, c) is issued as soon as its last pixel, (r+K-1, c), has been
  written, which is when `lead > (K-1)*W`. With a continuous input, this gives one column per
  clock, delayed by K-1 rows. With a bursty input, such as bytes from the UART, the reader simply
  waits, so no back-pressure signal is needed. An assertion checks that the writer never gets
  more than one pixel beyond that point. The reader always keeps up, so the buffer cannot be
  overrun.
* **End of frame.** After the last window row (row H-K), the read position jumps over the K-1
  bottom rows. Those rows were only needed as the lower part of earlier windows. The next frame
  may follow immediately, with no gap.
* **Timing.** The memories have a registered read port, as block RAM does. `col_valid` comes
  one clock after the read and carries the column index `col_c` and the top-row index `col_r`.

The design's own choices are the read-as-soon-as-possible rule and the K-row depth. The
dissertation starts reading after K full rows, holds "several rows" per memory, and suggests
one row per memory as a future improvement.

## Gaussian smoothing (`smoothing_filter`, `gauss_mask5x5`)

The smoothing mask is the 5x5 sigma = 1.4 kernel, with integer weights

```
 2  4  5  4  2
 4  9 12  9  4
 5 12 15 12  5
 4  9 12  9  4
 2  4  5  4  2      (sum 159)
```

The mask computes the 25 constant products, registers the five row sums, then registers their
total. Its latency is therefore 2 clocks.

**The sum is not divided by 159.** The smoothed pixel is the raw weighted sum, at most
255*159 = 40545, so it fits 16 bits. The dissertation's gradient-mask interface has 16-bit pixel
inputs, and this design takes that width literally. Every later number is therefore 159 times
the "textbook" value, and the thresholds must be chosen in these units. This keeps full
precision and needs no divider.

## Gradients (`gradient_processor`, `mult_m_idx`)

This stage uses a 3-memory bank and a 3x3 window, named `idx00` to `idx22` (row, column).
Column 2 is the incoming one. `mult_m_idx` is combinational Sobel logic:

```
Gx = (idx02 + 2*idx12 + idx22) - (idx00 + 2*idx10 + idx20)     (right minus left)
Gy = (idx00 + 2*idx01 + idx02) - (idx20 + 2*idx21 + idx22)     (top minus bottom)
```

Both are 19-bit two's complement. The stage registers Gx, Gy and the magnitude
|G| = |Gx| + |Gy|, which is 20 bits. The centre pixel `idx11` is not used by either mask, so
lint reports it as unused. It is kept to preserve the full 3x3 window interface.

## Gradient direction without an arctangent (`div_pipe`, `theta_label`)

Non-maximum suppression needs the gradient direction, rounded to 0, 45, 90 or 135 degrees. No
angle is ever computed. Instead:

1. A pipelined divider computes `q = floor(|Gy| * 256 / |Gx|)`. This is the tangent of the
   angle, with 8 fraction bits.
2. The tangent is compared with two fixed boundaries: tan(22.5 deg) * 256 = 106 and
   tan(67.5 deg) * 256 = 618.
   * If q < 106, the direction is **0 deg**, meaning a horizontal gradient (a vertical edge).
   * If q >= 618, the direction is **90 deg**. Division by zero returns all ones, so Gx = 0 lands
     here too.
   * Otherwise the direction is **45 deg** when Gx and Gy have the same sign, or **135 deg**
     when they differ.

The 2-bit label uses the enum `theta_t`: 0 = 0 deg, 1 = 45, 2 = 90, 3 = 135.

The divider is an unrolled restoring divider with one register stage per quotient bit (26
stages). Delay registers pad it to `LATENCY` = 39 clocks, the latency of the vendor divider core
the dissertation used. It accepts one division per clock. A tag travels alongside the operands,
and this design uses the tag to carry the magnitude. Magnitude and direction therefore leave the
divider together, in the same clock.

## Non-maximum suppression (`nms_stage`, `supimg_module`)

The magnitude goes into a 3-memory bank. The direction label goes into one 2-bit memory
(THETA_RAM). That memory is written at the same address as the bank and read at the middle-row
address. `supimg_module` works like the Sobel window, but on magnitudes:

* The incoming column (`mod_rd_data1..3`) is used directly, as the window's right column.
* The two older columns are registers.
* The direction of the centre pixel is delayed by one column so that it lines up.

The centre is compared with its two neighbours along the gradient direction. Gy is positive
upwards:

| direction | neighbours compared |
|-----------|---------------------|
| 0 deg     | west and east       |
| 45 deg    | north-east and south-west |
| 90 deg    | north and south     |
| 135 deg   | north-west and south-east |

The centre magnitude is kept if it is **greater than or equal to** both neighbours. Otherwise
it becomes 0. `start_store_supimg` marks the columns that complete a window, and
`supimg_wr_en` marks valid results.

## Double threshold and linking (`edge_link_stage`)

This stage uses another 3-memory bank and 3x3 window, holding thinned magnitudes m. Each
pixel falls into one of three classes:

* **Strong:** m > `t_high`.
* **Weak:** `t_low` <= m <= `t_high`.
* **Discarded:** m < `t_low`.

A pixel is an edge if it is strong, or if it is weak and at least one of its 8 neighbours is
strong. This is a **single pass**. A weak pixel that touches only other weak pixels is dropped,
even if that chain of weak pixels eventually reaches a strong one. Full hysteresis would need
the whole frame, or several passes over it. The output is one flag per pixel, `out_edge`, with
`out_valid`.

## Serial link (`rs232_com`, `uart_rx`, `uart_tx`, `address_controller`, `bram_sdp`)

* **Frame format.** The UARTs are 8N1, LSB first. `CLKS_PER_BIT` = 868 gives 115200 baud from
  the board's 100 MHz clock.
* **Receiver.** The receiver synchronises the line through two flip-flops. It samples each bit
  in its middle and flags a low stop bit.
* **Buffer.** The buffer is a 4096 x 8 simple dual-port block RAM used as a FIFO.
* **Address controller.** This state machine has four states:
  * **IDLE:** waits for work.
  * **WR_MEM:** asserts `wren`, which writes the byte and advances `s_wraddr`.
  * **RD_MEM:** asserts `rden`, which reads at `s_rdaddr` and advances it.
  * **UART_WRITE:** asserts `uartwrite`, which loads the byte read into the transmitter.
* **What moves it out of IDLE.** `rx_en` requests a write. `tx_en` means the transmitter is free,
  and leads to a read when the buffer is not empty. A write request that arrives during a read
  is remembered and served next, and writes have priority. `empty`, `full` and a sticky
  `overflow` are outputs. A byte offered while the buffer is full is dropped, and `overflow`
  is raised and stays high until reset.

`rs232_com` has two modes:

* **Loopback** (`loopback = 1`): the received bytes go into the FIFO and are sent back. This is
  the link test the dissertation starts from.
* **Detector mode** (`loopback = 0`): the received bytes leave on `rx_valid`/`rx_data` as
  pixels. The bytes offered on `px_valid`/`px_data`, the edge flags, are queued and transmitted.

**Can the link keep up with itself?** The answer needs care. A pixel arrives every 10*CPB
clocks, one byte time. An edge byte leaves every 10*CPB + 3 clocks, because the controller
passes through IDLE, RD_MEM and UART_WRITE between two bytes. Within a row, the transmit side
therefore falls behind slightly. Each 708-pixel row yields only 698 edge bytes, though, and
the 10 missing bytes give the transmitter time to catch up. The buffer empties once per row
as long as 698 * 3 < 10 * 10 * CPB, which means CPB >= 21. At 868 clocks per bit the backlog
never exceeds a few bytes. With a bit period of 4 clocks, the 4096-byte buffer overflows
within one 708 x 752 frame, and `tx_overflow_o` reports it.

## Top level (`canny_edge_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `src_sel` | in | 1 | 0 = pixels from the serial link, edge bytes back to it; 1 = direct stream |
| `loopback` | in | 1 | serial echo test (the detector then gets no pixels) |
| `uart_rxd`, `uart_txd` | in/out | 1 | RS-232 lines, at logic levels |
| `pix_valid_i`, `pix_i` | in | 1, 8 | direct pixel stream, raster order, gaps allowed |
| `t_low`, `t_high` | in | 20 | linking thresholds, in unnormalised magnitude units |
| `edge_valid_o`, `edge_o` | out | 1, 1 | edge map, raster order, (W-10) x (H-10) |
| `tx_overflow_o` | out | 1 | the serial output buffer dropped a byte |

In serial mode an edge is sent as `8'hFF` and a non-edge as `8'h00`.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `IMG_W` | 708 | frame width |
| `IMG_H` | 752 | frame height |
| `CLKS_PER_BIT` | 868 | clocks per serial bit |
| `FIFO_DEPTH` | 4096 | serial buffer depth |
| `DIV_LATENCY` | 39 | divider latency |

Frames must be sent back to back, in raster order, with every frame the configured size. There
is no start-of-frame marker: the first pixel after reset is pixel (0,0). Only control state is
reset. Memories and data registers are not reset, and outputs must be ignored while `rst` is
high.

**Throughput and latency.** With a continuous input, a 708 x 752 frame (532,416 pixels) is
finished 532,471 clocks after its first pixel enters. That is one pixel per clock plus about 55
clocks of pipeline depth beyond the row delays. 39 of those clocks are the divider. At the
dissertation's 30.4 MHz this is 57 frames/s. No timing analysis has been done for this RTL.

**Size.** At the default size, the line memories hold
5x3540x8 + 3x2112x16 + 3x2106x20 + 2106x2 + 3x2100x20 = 499,548 bits. The serial FIFO adds
32,768 bits. Together that is well within the 2,160 kbit of block RAM on the XC5VLX50T.
A generic (technology-independent) synthesis of the top gives about 3,000 flip-flop bits. About
2,100 of those are in the divider pipeline. For comparison, the dissertation reports 3,390 slice
registers, 2,153 LUTs, 29 block RAMs and 25 DSP blocks for its implementation.

## Where this design departs from the dissertation

* **Smoothed pixels are not divided by 159.** The 16-bit width in the dissertation's interfaces
  is followed rather than the 1/159 factor in its kernel. As a result, thresholds are in
  unnormalised units.
* **Gradient widths.** Gradients are 19 bits and magnitudes 20 bits, as in the dissertation's
  port declarations. The dissertation's prose says gradients are 9 bits. That is too few for a
  Sobel result, even of 8-bit pixels.
* **Direction convention.** The direction comes from |Gy|/|Gx|, so that 90 deg means a vertical
  gradient, compared north/south. One formula in the dissertation writes the ratio the other
  way round. Its prose on which neighbours to compare matches this RTL.
* **Timing of magnitude and direction.** The dissertation writes the magnitude memories
  immediately and starts the direction memory 38 addresses later. Here the magnitude waits in
  the divider, so both are written together.
* **Divider.** The dissertation's vendor divider core is replaced by the restoring divider
  described above. Only its 39-clock latency is kept.
* **Linking.** Linking is a single pass over the 8 neighbours, as described in the dissertation.
  Full iterative hysteresis is not implemented.
* **Serial link.** The dissertation describes the serial link only as a loopback test. It does
  not say how the link feeds the detector. The detector mode, the 0x00/0xFF output bytes, the
  direct stream port, 115200 baud and the FIFO depth are this design's choices.
* **Write timing.** The dissertation shows the buffer write enable half a clock after the data.
  This design uses one clock edge throughout.
* **Row memory depth.** Row memories hold K rows each and start reading as early as possible.
* **Orientation.** The 708 x 752 test image is taken as 708 pixels wide and 752 rows high.

## Verification

The testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog. The reference values come from `tb/canny_ref_pkg.sv`, a behavioural software model of
each stage: Gaussian, Sobel, direction by integer cross-multiplication with 106/256 and 618/256,
suppression, and linking. That model shares no code with the RTL.

| testbench | what it shows |
|-----------|---------------|
| `tb_canny_full` | one full 708 x 752 frame at default parameters; all 517,916 edge flags match the model; one pixel per clock; frame time + 55 clocks |
| `tb_canny_serial` | a 708 x 752 frame sent byte by byte through the UART, with every edge byte read back from the transmit line and compared. It uses the default FIFO and a bit period of 32 clocks; at 4 the buffer would overflow (see the serial section). It also checks that no overflow occurs. Runs for about 2 minutes |
| `tb_canny_edge_top` | 24 x 18 frames: with random input gaps, back-to-back, through the UART both ways, and a loopback echo. It counts each mechanism (gaps, back-to-back, one pixel per clock, all four directions, Gx = 0, suppressed, strong, weak linked, weak dropped, serial frame, loopback) and fails if one never occurred |
| `tb_line_buffer_bank` | column contents and frame-to-frame continuation, with and without input gaps; one column per clock on a continuous input |
| `tb_smoothing_filter`, `tb_gradient_processor`, `tb_nms_stage`, `tb_edge_link_stage` | each stage against the model on two small frames (random images, or random gradients and magnitudes for the last two); the first two also check latency and rate, the last two that every direction and every linking case occurred |
| `tb_mult_m_idx`, `tb_theta_label`, `tb_supimg_module` | combinational mask, direction labels at and around the boundaries, suppression window |
| `tb_div_pipe` | random and edge-case quotients, divide-by-zero, 39-clock latency, one result per clock |
| `tb_uart_rx`, `tb_uart_tx`, `tb_address_controller`, `tb_rs232_com`, `tb_bram_sdp` | serial framing, FIFO order, full/empty/overflow, loopback and detector modes |

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/canny_pkg.sv tb/canny_ref_pkg.sv tb/tb_canny_edge_top.sv --top-module tb_canny_edge_top
./obj_dir/Vtb_canny_edge_top
```

Replace `tb_canny_edge_top` with any other testbench name. The full-size run builds and runs in
a few seconds. The simulator is two-state, so the testbenches ignore outputs during reset.

To change the frame size, set `IMG_W` and `IMG_H` on the top. Each stage receives its reduced
size automatically. To change the divider latency, set `DIV_LATENCY`; it must be at least 26,
the number of divider stages. The frontier constants and the Gaussian weights are in
`rtl/canny_pkg.sv`.
