# FPGA front end for a 100 frame/s image acquisition and compression system

A high-speed Camera Link camera delivers 600 x 480 gray-scale frames at 100
frames per second, four times a PAL/NTSC rate. A DSP compresses each frame
(JPEG, about 4 ms per frame) and sends the result to a remote monitor over
RS422. The FPGA in between keeps acquisition and compression running at the
same time. Every frame is stored in one of two external SRAMs while the DSP
pulls the previous frame out of the other. When both are done, the two SRAMs
swap roles. This is the **ping-pong cache**. This repository is the
SystemVerilog for that FPGA, with behavioural models of the parts around it
and self-checking testbenches.

```
 camera --LVDS--> deserializer --LVTTL--> cl_receiver --> async_fifo --> pingpong_ctrl <==> SRAM0
 (Camera Link)    (outside chip)          (cl_clk)        (cl_clk->eclk)   (eclk)      <==> SRAM1
                                                                              |  ^
                                                       ext_int4 (frame ready) |  | frame words
                                                                              v  |
 remote monitor <--RS422-- driver <-- rs422_tx <-- async_fifo <-- emif_slave <==> DSP EMIF (CE2)
                                     (bit clk)   (eclk->bit clk)   (eclk)
                                         ^
                                      clk_div (eclk / 1302)
```

## How a frame moves through the design

1. **Camera Link receiver** (`cl_receiver`, camera pixel clock). It registers
   FVAL, LVAL, DVAL and the 8-bit port A from the deserializer. It emits one
   token per valid pixel, marked as first pixel of a frame (SOF), first pixel
   of a line (SOL) or ordinary pixel. When FVAL falls it emits an end-of-frame
   token (EOF). It counts frames and flags any frame that was not 480 lines
   of 600 pixels (`size_err`).
2. **Clock crossing** (`async_fifo` with `sync_2ff`). The 10-bit tokens cross
   from the camera clock into the system clock. The system clock is the
   DSP's EMIF clock, ECLKOUT, 150 MHz. The FIFO uses Gray-coded pointers that
   pass through two-flip-flop synchronizers, so a metastable first flip-flop
   never reaches the logic.
3. **Ping-pong cache** (`pingpong_ctrl`, system clock). It writes each pixel
   to a fixed place: pixel (x, y) always goes to byte address y*600 + x.
   Each SRAM is 256K x 16 with byte lanes. Byte address *a* is word *a*/2:
   the low byte for even *a*, the high byte for odd *a*. One 16-bit EMIF word
   therefore carries two neighbouring pixels. Pixels past the end of a line,
   or lines past line 480, are not written.
4. **Hand-over to the DSP.** When a frame is complete and the SRAMs swap,
   `ext_int4` goes high for `INT_W` cycles. The DSP's EDMA starts on its
   rising edge and reads the 144,000 words of the frame over the EMIF
   (`emif_slave`), one word every three ECLKOUT cycles.
5. **Return path.** The DSP writes the compressed bytes to an EMIF register.
   They queue in a second `async_fifo`. `rs422_tx` sends them as 8N1
   characters on a bit clock that `clk_div` makes from ECLKOUT.

## The ping-pong state machine

`pingpong_ctrl` has four states. `channel_sel` names the SRAM the DSP reads.

| state | SRAM written | SRAM read (`channel_sel`) | leaves when |
|-------|--------------|---------------------------|-------------|
| S0 | none | none | the first SOF token arrives → S1 |
| S1 | SRAM0 (first frame) | none, reads return 0 | the frame's EOF → S2 |
| S2 | SRAM1 | SRAM0 (0) | write frame complete **and** all words of SRAM0 read → S3 |
| S3 | SRAM0 | SRAM1 (1) | write frame complete **and** all words of SRAM1 read → S2 |

Reset returns the machine to S0 from any state. Each entry into S2 or S3
raises the frame-ready interrupt.

"All words read" means the DSP has made W*H/2 = 144,000 read strobes to
the frame area since the swap. The controller does not look at the
addresses, so the DSP must read each word of the frame once. Extra reads
after that return the same SRAM but are not counted.

Two situations need a policy, and this design chooses one for each:

- **Frame drop.** A new frame can start while the write SRAM already holds
  a complete frame and the DSP has not finished reading the other SRAM.
  Both SRAMs are then busy, so the whole new frame is discarded. The drop
  is counted (`drop_cnt`, readable over the EMIF). The frame being read and
  the one waiting are never overwritten.
- **Swap stall.** In the cycle the SRAMs swap, the token FIFO is not popped.
  The next token then goes to the SRAM that is correct after the swap. The
  camera FIFO absorbs the one-cycle pause.

SRAM writes are registered and carry the SRAM they were meant for. A write
issued just before a swap therefore still reaches the right chip. An
assertion checks that the DSP never reads the SRAM being written.

## EMIF interface and timing

The DSP's CE2 space is set up for 1 cycle of setup, 1 cycle of strobe and 0
cycles of hold on a 16-bit bus. Each access takes three ECLKOUT cycles:
150 MHz / 3 x 2 bytes = **100 Mbyte/s**. In the setup cycle the FPGA sends
the address to the read SRAM (an asynchronous SRAM, read combinationally)
and registers the word into ED at the end of that cycle. ED is then stable
through the strobe cycle, and the DSP samples it at the end of the strobe.
Timing is not modelled: the setup-cycle path from the EA pins through the
SRAM to the ED register must fit in one 6.7 ns period. That is tight for a
real asynchronous SRAM. If it does not fit, program two setup cycles in the
DSP. The logic does not change, but each word then takes four cycles.

EA counts 16-bit words. The address map is this design's own:

| EA[19] | EA[1:0] | read | write |
|--------|---------|------|-------|
| 0 | – | frame word EA[17:0] of the read SRAM (even pixel in bits 7:0) | ignored |
| 1 | 0 | status {tx_full, cam_ovf, tx_ovf, size_err, rd_done, wr_full, state[1:0], channel_sel} | ED[7:0] → RS422 FIFO |
| 1 | 1 | frames acquired | – |
| 1 | 2 | frames dropped | – |
| 1 | 3 | SRAM swaps | – |

`cam_ovf`, `tx_ovf` and `size_err` are sticky until reset. The DSP should
check `tx_full` before it writes a byte.

## Budget at 100 frames/s

| step | cycles at 150 MHz | time |
|------|-------------------|------|
| frame period | 1,500,000 | 10 ms |
| writing one frame into SRAM (1 pixel/cycle, limited by the camera) | ≥ 288,000 | ≥ 1.92 ms |
| EDMA transfer of one frame (144,000 words x 3) | 432,000 | 2.88 ms |
| compression on the DSP (figure for the JPEG library used) | – | ~4 ms |

The transfer and the compression together take about 6.9 ms of the 10 ms.
The full-size testbench runs exactly this case: the camera sends frames
10 ms apart, and the DSP model reads each frame and then waits 4 ms. No frame
is dropped.

The figure sometimes quoted for this system, about 10 ms per frame transfer,
does not match its own EMIF settings. Those settings give the 2.88 ms above,
and the RTL follows the EMIF settings. At 10 ms per transfer plus
compression, 100 frames/s would not be reached. In that case the
frame-drop policy keeps the stored frames intact and counts each lost frame.

## Clocks and resets

| clock | source | used by |
|-------|--------|---------|
| `cl_clk` | camera pixel clock (about 40 MHz in the tests) | `cl_receiver`, camera FIFO write side |
| `eclk` | DSP ECLKOUT, 150 MHz | ping-pong cache, EMIF, FIFO read/write sides |
| bit clock | `clk_div`: eclk / `BAUD_DIV`, taken from a flip-flop | `rs422_tx`, RS422 FIFO read side |

`clk_div` makes divided clocks with a counter on the global clock. A
terminal count toggles a register, so the divided clock comes straight from
a flip-flop and cannot glitch. The default ratio of 1302 gives 115.2 kbit/s.
`rst_n` is asynchronous. Each clock domain gets its own copy, whose release
is synchronized by a `sync_2ff` chain.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W`, `H` (`img_pkg::IMG_W/IMG_H`) | 600, 480 | frame size in pixels |
| `CAM_DEPTH` | 512 | camera token FIFO depth (power of two) |
| `TX_DEPTH` | 1024 | RS422 byte FIFO depth (power of two) |
| `BAUD_DIV` | 1302 | ECLKOUT cycles per RS422 bit (even) |
| `INT_W` | 8 | frame-ready interrupt width, ECLKOUT cycles |

`img_pkg` also fixes the SRAM geometry (`SRAM_AW` = 18, 16-bit words), the
EMIF widths and the token and SRAM-request types. `W*H` must be even and at
most 2 x 2^`SRAM_AW`.

## What is outside the FPGA

These parts are used by the system but are not designs of their own here.
Their signals are ports of `img_fpga_top`:

- the LVDS deserializer chips (Camera Link to LVTTL);
- the two SRAM chips (`sram0_o`/`sram1_o` are active-low request structs,
  `sram*_rdata` the data back);
- the DSP: its EDMA, its real-time kernel and the compression software;
- the RS422 line driver (`rs422_txd`).

`tb/` has behavioural stand-ins for the simulations: `cam_model`,
`sram_model`, `dsp_model` and `rs422_rx_model`.

## Choices this design makes

The following are not fixed by the system description and were chosen here:
- the token format;
- the frame-geometry check;
- the SRAM organisation with byte lanes;
- the frame-drop and swap-stall policies;
- the interrupt width;
- the EMIF address map and the status registers;
- the FIFO depths;
- 8N1 at 115.2 kbit/s on RS422;
- using `clk_div` for the RS422 bit clock.

The description names a FIFO module and an RS422 transfer module but gives
no details of either. Both are built here in their simplest usual form.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/img_pkg.sv tb/tb_pkg.sv tb/tb_img_fpga_top.sv --top-module tb_img_fpga_top
./obj_dir/Vtb_img_fpga_top
```

(`img_pkg.sv` and `tb_pkg.sv` must come first. The other files are found
through `-I`.)

| testbench | what it covers |
|-----------|----------------|
| `tb_sync_2ff` | reset value, exact two- and three-stage delay |
| `tb_clk_div` | period, 50 % duty, tick alignment, at DIV=6 and 1302 |
| `tb_cl_receiver` | tokens against a reference, DVAL gaps, 2-clock latency, size error for a short line and a missing line |
| `tb_async_fifo` | full at exactly DEPTH, overflow, order under random traffic on two clocks |
| `tb_pingpong_ctrl` | S0→S1→S2→S3→S2, every word read, frame drop, clipping of long lines, swap count, interrupt width, reset |
| `tb_emif_slave` | setup/strobe timing, data at end of strobe, registers, RS422 writes |
| `tb_rs422_tx` | 8N1 format, 10 bit clocks per character, idle level |
| `tb_img_fpga_top` | whole FPGA at 16 x 8: alternating swaps, drop with a slow DSP, size error, counters over EMIF, RS422 bytes, reset mid-frame, RS422 FIFO overflow. It counts each mechanism and fails if one never happened |
| `tb_img_fpga_full` | whole FPGA at its defaults: three 600 x 480 frames at 100 frames/s, every pixel checked, 432,000-cycle transfers, 10 ms between interrupts, no drop, RS422 output (about 6 s of simulation) |

## Limits

- No timing constraints or pin assignments are included.
- The camera FIFO does not push back on the camera. Because ECLKOUT is much
  faster than the pixel clock, it only fills during the one-cycle swap
  stalls. An overflow is still recorded in the status register.
- Tokens of a dropped frame are consumed at full speed and discarded.
- The controller trusts the DSP to read each frame word exactly once.
