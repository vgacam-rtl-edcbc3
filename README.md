# VGACAM: a camera-to-VGA frame grabber

A small digital camera produces pixels slowly, in its own clock, four bits at
a time. A VGA monitor wants a steady pixel stream at a much higher rate, about
60 frames a second. This design sits between the two. It captures the top-left
256 x 256 pixels of every camera frame into an external SRAM frame store. It
refreshes the monitor from that store, showing the picture as a 256 x 256
window in the top-left corner of the screen.

Three ideas carry the design:

* **One memory, two users, fixed priority.** The monitor and the camera share
  a single 8-bit SRAM bus. The monitor must never wait, so its reads always
  win. The camera's writes are refused ("busy") while the monitor reads, and a
  128-entry FIFO holds the camera's pixels until there is a free cycle.
* **Four frame banks.** The store holds four 64 KB banks. The camera fills one
  bank per frame, and the monitor shows the last bank that was completely
  written. The monitor never shows a half-written frame, and it switches
  frames only during its vertical sync.
* **Counters as addresses.** The display counters and the camera's row and
  column counters are used directly as frame-store addresses:
  `{bank[1:0], row[7:0], column[7:0]}`, 18 bits, 256 KB.

## Block diagram

```
                +--------------------- camerain ---------------------+
pad_cam[3:0] -->| nibble regs  -> 2-stage sync -> fifo_128 -> camera_test |--write, row, col, data-->+
pad_qck ------->| (qck domain)   qck 3-stage sync + edge detect (wrfifo)  |<--------- busy ---------+ |
pad_fst ------->| 2-stage sync -> fst (clears FIFO and camera_test)        |--endframe--+          | |
                +----------------------------------------------------------+            |          | |
                                                                       bankselect <-----+          | |
                                                     camera_bank, monitor_bank <-- monitor_frame   | |
                                                                                                   v v
hcnt, vcnt --(both < 256: reada; address {monitor_bank, vcnt[7:0], hcnt[7:0]})--> mem2port (port A | port B)
                                                                                   |  memcontrol, pad registers
                                                                                   +--> SRAM pins (2 x 128K x 8)
                 readdata --> vgacontrol8: blankpixel -> output register -> pad_rgb[7:0]
                              hcounter 0..759, vcounter 0..527, syncgen -> pad_hsync, pad_vsync
```

| Module | Role |
|---|---|
| `vgacam_top` | Wires the blocks together. Makes the monitor's read request and the blank signal. Also holds the DAC clock and two parallel-port lines. |
| `camerain` | Camera pins in; frame-store writes out. |
| `camera_test` | Frame-store writer: takes pixels from the FIFO, tracks row and column, writes the window, retries when busy. |
| `fifo_128` | 128 x 8 FIFO, built from two counters and a dual-port RAM. |
| `dpmem128` | 128 x 8 RAM with a synchronous write port and two asynchronous read ports. |
| `counter` | Modulo counter with enable, synchronous clear and terminal count. |
| `mem2port` | SRAM interface with two ports: arbitration, address mux and pad registers. |
| `memcontrol` | Arbiter: port A first, port B busy. |
| `bankselect` | Four-state machine that gives out the banks. |
| `vgacontrol8` | VGA counters, syncs, blanking and the RGB output register. |
| `syncgen` | Decodes the sync windows. |
| `blankpixel` | Forces the pixel to black while blanking. |
| `vgacam_pkg` | Shared constants, the address struct and the bank-selector state enum. |

There is one clock, `clk`, for everything except the first capture
registers, which run on the camera's `pad_qck`. All registers of the design
are rising-edge. The exceptions are the low-nibble capture, on the falling
edge of `pad_qck`, and the SRAM write strobe, which is gated by the low half
of `clk`.

## Getting the camera's pixels into the clock domain

The camera sends each pixel as two nibbles. The high nibble is valid at the
rising edge of `pad_qck`, the low one at the falling edge. In the camera's
clock domain, one register takes the nibble on the rising edge. On the falling
edge the held high nibble and the present low nibble are registered together.
The byte then stays put for a whole `qck` period.

The crossing does not use a dual-clock FIFO. It samples instead:

* The byte passes two `clk` registers.
* The inverted `qck` passes three `clk` registers and then a fourth. The
  write pulse `wrfifo = stage3 & ~stage4` is one `clk` wide and marks each
  falling edge of `qck`.
* The write pulse arrives one register later than the data, so the FIFO
  always stores a byte that settled at least one cycle earlier.

This works only while `qck` is clearly slower than `clk`. One `qck` period
must cover the synchroniser latency, about four `clk` periods. The testbenches
use about 8.3 `clk` periods per pixel. The frame-start pin passes two `clk`
registers. While the result, `fst`, is high, the FIFO is emptied and the
writer's row and column are held at zero.

## The frame-store writer and the FIFO

`fifo_128` is a show-ahead FIFO: the byte at the read pointer is always on
`dataout`, through the RAM's asynchronous read port. `empty` is
`write pointer == read pointer`. **There is no full flag.** If more than 127
pixels pile up, the pointers wrap and the queue looks empty. In this system
the backlog is bounded. The camera is refused for at most 256 consecutive
clocks per display line, and at one pixel per four or more clocks that is at
most 64 pixels. A simulation assertion in `fifo_128` reports any overflow.

`camera_test` looks at the head of the FIFO each cycle:

* **Inside the window** (column < 256 and row < 256), it raises `write` with
  address `{row, column}`. The pixel is popped only if `busy` is low in the
  same cycle. Otherwise the same write is offered again on the next cycle.
* **Outside the window**, it pops the pixel without writing it.
* A camera line is 352 pixels: the column counter goes back to 0 after 351.
* `frame_end` is high while the row is 256, which is the line after the
  window. Row and column are 9 bits wide, so a camera frame must have fewer
  than 512 lines.

## Sharing the SRAM: `mem2port`

The frame store is two 128K x 8 asynchronous SRAMs. Both chips share the
address, data, write-strobe and output-enable pins. Address bit 17 picks the
chip through two chip enables (`pad_cs1` = bit 17, `pad_cs0` = its inverse,
both taken as active low).

Both ports put an address on the interface every cycle:

* Port A, the monitor, asks to read whenever `hcnt < 256 && vcnt < 256`.
  In `vgacam_top` that is the AND of the inverted count bits 9 and 8.
* Port B, the camera, asks to write with `camera_test`'s `write`. When it is
  not writing, port B's address is read anyway; that read is the idle default.

`memcontrol` is combinational:

```
busy_b      = read_a              // port A is never refused
port_select = !busy_b             // 1 selects port B's address
write_l     = !(write_b && !busy_b)
```

For a request made in cycle n:

| When | What happens |
|---|---|
| cycle n | `busyb` answers in the same cycle. |
| edge n+1 | The selected address, the chip enables, `write_l` and the write data are registered into the pad flip-flops. |
| cycle n+1 | `pad_wr = write_l_q OR clk`: a write strobe only in the low half of the cycle, inside stable address and data. `pad_oe = !write_l_q`: the SRAM drives the bus on every cycle that is not a write. The FPGA drives the data pins (`pad_data_t = 0`) only during a write. Read data comes straight from the pins on `readdata`. |
| edge n+2 | The reader registers the data. |

On the monitor side, the counts of cycle n address the memory. The data is
valid in cycle n+1, so `blank` is `!reada` delayed by one register. The pixel
is gated by `blankpixel` and registered into `pad_rgb` at edge n+2. The
syncs are decoded straight from the counts, so the picture sits two pixel
clocks to the right of where the sync timing alone would place it.

## Bank selection

`bankselect` sees two level signals. `camera_frame` is `camera_test`'s
`frame_end`, high for one camera line per frame. `monitor_frame` is the
inverse of `vsync`, high for two display lines per frame. Each event must
count once even though its flag stays high for many cycles:

| State | Condition | Next state, action |
|---|---|---|
| `CAMERA_WAIT` | `camera_frame` | `CAMERA_DONE`. The camera moves to bank + 1 (mod 4), and the bank it just filled is remembered. |
| `CAMERA_DONE` | `!camera_frame` | `MONITOR_WAIT` |
| `CAMERA_DONE` | else `monitor_frame` | `MONITOR_DONE`. The monitor takes the remembered bank. |
| `MONITOR_WAIT` | `monitor_frame` | `CAMERA_WAIT`. The monitor takes the remembered bank. |
| `MONITOR_DONE` | `!camera_frame` | `CAMERA_WAIT` |

This rests on an assumption: the monitor finishes a frame before the camera
finishes the next one. A camera frame end that arrives in `MONITOR_WAIT` is
not counted, and the camera then fills the same bank again. With a 60 Hz
display and a slower camera, this does not happen. The monitor never reads
the bank the camera is writing.

## VGA timing

| Item | Value |
|---|---|
| Line | 760 clocks (`hcnt` 0..759) |
| Frame | 528 lines (`vcnt` 0..527) |
| Horizontal sync | low for counts 582..674 (93 clocks) |
| Vertical sync | low for lines 490 and 491, decoded as `vcnt[9:1] == 245` |
| Visible window | counts 0..255 in both directions; the rest is black |

The sync pulses sit in the middle of the blanking intervals, which centres the
picture on the screen. The pixel clock is whatever `clk` is; 760 x 528 at
about 60 Hz means roughly 24 MHz.

## Where this RTL makes its own choices

* **Reset.** The logic is meant to start from the FPGA's clearing of every
  flip-flop at configuration, and the bank selector is self-starting. Here a
  synchronous, active-high `rst` does that job:
  * it clears the VGA counters and the bank selector, and puts the
    synchronisers in their idle state;
  * it acts as a frame start for the capture path.
* **Pads.** Input and clock buffers are not modelled: `clk` is the board
  clock. The bidirectional SRAM data pad is split into `pad_data_o`,
  `pad_data_t` (1 = released) and `pad_data_i`.
* **Parallel-port lines.** `par1 = !pc_d0` and `par0 = !pc_d1` are always
  driven. Their tristate control is not specified.
* **Chip-enable polarity** is taken as active low. The mux's select sense
  (1 = port B) follows the arbiter's rule.
* **Unknown RAM macros.** The FIFO's RAM is modelled with a synchronous write
  and asynchronous reads, and its counters with a synchronous clear that
  overrides counting. The clock enables of the pad registers are taken as
  always on.
* **Added checks.** `fifo_128` carries simulation assertions for writing a
  full FIFO and reading an empty one.
* **Observation outputs.** The top brings out `hcnt`, `vcnt`, both frame
  flags and both bank numbers.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog:

| Testbench | What it checks |
|---|---|
| `tb_counter` | Random enable and clear against a reference count, for the 7-bit and 0..759 versions. |
| `tb_dpmem128` | Random writes and reads against an array, including a read of the address being written. |
| `tb_fifo_128` | Random traffic against a queue, filled to 127 entries, with a reset part-way through. |
| `tb_camera_test` | Random `empty` and `busy` against a position model, over a whole frame. Every window pixel must be written exactly once. |
| `tb_camerain` | A nibble-serial camera model with an unrelated clock, two frames, bursty `busy`. Every window pixel must be written once with the right byte. |
| `tb_memcontrol`, `tb_syncgen`, `tb_blankpixel` | Exhaustive. |
| `tb_mem2port` | Random port traffic with the SRAM model. Checks pin timing, strobe halves, next-cycle read data, bus contention and the final memory contents. |
| `tb_bankselect` | Both orders of camera and monitor frame ends, against a model of the bank rule. |
| `tb_vgacontrol8` | Counts, sync windows, frame length and the output register, over two frames. |
| `tb_vgacam_top` | End to end at full size. Three camera frames are sent through the pins into the SRAM model: two CIF-sized ones (288 lines of 352 pixels), then one that stops just after the window while the camera pauses, so that a monitor vsync falls inside its frame-end flag. Every displayed 256 x 256 frame is identified and checked pixel by pixel. Also checks blanking, sync timing, frame length and bus contention. It counts memory-busy stalls, discarded pixels, FIFO backlog, bank switches (including one taken while the camera's frame-end flag is still high) and frame ends, and fails if any of them never happens. It runs about 3.7 million clocks, a few seconds with Verilator. |

`tb/sram_model.sv` is a behavioural model of the two SRAM chips, used by
`tb_mem2port` and `tb_vgacam_top`. The camera is modelled inside the
testbenches. The camera's frame height is not part of the design; 288 lines
(CIF) is used because the line length, 352, is CIF's.

Running a testbench with Verilator (5.x), for example the end-to-end one:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vgacam_pkg.sv tb/tb_vgacam_top.sv --top-module tb_vgacam_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others. The results do not depend on
Verilator's random initial values. Every register whose value matters is
either reset by `rst` or written before it is read.

## Limits worth knowing

* The FIFO has no full flag. Correct operation depends on the camera being
  slow enough, as argued above.
* Camera frames must have more than 256 lines, or `frame_end` never rises
  and the banks never switch. They must have fewer than 512 lines, or the
  row counter wraps into the window again.
* A camera frame end that comes before the monitor has taken the previous
  frame is lost. See Bank selection.
* Metastability is handled only by synchroniser depth. The two data stages
  can briefly catch a changing byte, but it is never written, because the
  write pulse comes later.
