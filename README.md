# Bitmap filters on an FPGA video path

This design applies a "Photoshop" style filter, a Gaussian blur or an emboss,
to a bitmap and shows the result on a 640x480 monitor. The picture is already
stored in an external ZBT SRAM (bank 0) as a 32-bit bitmap, one pixel per
32-bit word. The design streams the pixels out of that memory and filters them
on the fly, one pixel per clock. It then hands them to the video RAM of an SVGA
display controller. The display controller does not accept a write on every
clock, so a small FIFO sits between the filter and the display side. Two
small state machines keep the FIFO from overflowing or running dry.

The RTL follows the structure, latencies and sizes of a university FPGA
project built on a Virtex-II multimedia board. That project used a 27 MHz
system clock, vendor ZBT and SVGA controllers, and a 32x32 generated FIFO.
The filter coefficients, state encodings and handshake details are this
design's own. They are listed under "Choices made here" below.

## Data path

```
 ZBT bank 0 ──zbt_rdata──► pixel_filter ──► mem_fifo (32 x 32) ──vram_wdata──► video RAM
   ▲  (4-clock read)          ▲ en              │ ▲                             (SVGA ctrl)
   │                          │                 │ │ rd_en
 zbt_addr, zbt_rd_en          │          full/empty│                   ▲ vram_we, vram_addr
   │                          │                 ▼ │                   │
   └──────────── mem2fifo_ctrl ─ fifo_wr_en ─►  fifo2disp_ctrl ─ data_valid ─► address counter
                 (burst, rewind, last_data)     (drain on full / last_data,    (stops at 640*480)
                                                 gated by user_access_ok)
```

| Module | Role |
|---|---|
| `displaypattern` | Top level. Wires the parts together and owns the video RAM address counter. |
| `mem2fifo_ctrl` | Reads ZBT bank 0 in bursts, writes the FIFO, rewinds on full, raises `last_data`. |
| `pixel_filter` | Splits a pixel into R, G and B, and filters each with its own `gblur` or `emboss`. |
| `gblur` | 9-tap (8th order) Gaussian FIR on one 8-bit channel. |
| `emboss` | 6th order IIR high pass on one 8-bit channel, offset to mid grey. |
| `mem_fifo` | 32-bit x 32-deep synchronous FIFO with a one-clock read latency. |
| `photoshop_pkg` | Pixel struct, filter-mode enum, screen size and filter coefficients. |

### Pixel format

One word holds one pixel, laid out as a 32-bit little-endian bitmap stores it
(`bmp_pixel_t`):

| bits | 31:24 | 23:16 | 15:8 | 7:0 |
|---|---|---|---|---|
| field | pad | red | green | blue |

32-bit pixels are used because a 24-bit pixel can straddle two memory words,
and that would take two reads. The pad byte is ignored on input and is zero on
output. The design assumes the rows are stored top row first, as in a
"flipped row order" bitmap. Memory order is then screen order, so the design
never reorders pixels. The bitmap file header is not parsed. `BASE_ADDR` is
the word address of the first pixel.

## Flow control: bursts, rewinds and drains

This is the part that needs the most care. Two facts drive the design:

* The ZBT read path (vendor controller plus RAM) returns a word **4 clocks**
  after the read request (`RD_LATENCY`). Up to four reads are in flight
  whenever the FIFO fills up.
* The display controller grants video RAM access only in some clocks
  (`user_access_ok`), because it is also fetching pixels for the screen.

### Memory side (`mem2fifo_ctrl`)

This is a Mealy FSM with three states: `BURST`, `REFILL` and `DONE`.

* In `BURST` it issues one read per clock while the FIFO is not full and
  pixels remain: `ram_rd_en = !fifo_full && pixels left`.
* A shift register of outstanding reads (`pending`) marks the clock in which
  each word comes back. In that clock `fifo_wr_en = returning && !fifo_full`.
  The same enable steps the filter, so the filter only ever sees pixels that
  are stored.
* If a word comes back while the FIFO is full, that word is lost, and so are
  the up to three words behind it. The controller then does three things in
  one clock:
  1. It clears `pending`, so all returns still in flight are ignored.
  2. It sets the read address back to the first pixel not yet stored. It
     keeps a count of stored pixels for this.
  3. It pulses `rewind` and moves to `REFILL`.
* In `REFILL` it waits until the display side has emptied the FIFO, then
  bursts again.
* When the last pixel has been stored, it moves to `DONE` and holds
  `last_data` high.

Because the rewind restarts at the first pixel that was not stored, no pixel
is skipped or repeated. The filter's history also stays exactly in image
order.

### Display side (`fifo2disp_ctrl`)

This is a Mealy FSM with two states, `IDLE` and `DRAIN`.

* It starts draining when the FIFO is full, or when `last_data` says a final,
  partly filled load will never fill it.
* While draining it reads in every clock with `user_access_ok` high, until
  the FIFO reports empty.
* The FIFO delivers a word one clock after its read enable. `data_valid` is
  the read enable delayed by one flop, and it is the video RAM write strobe.
  So a write happens one clock after the grant that allowed it. The
  controller on the other side must accept it then.

### Video RAM address counter (`displaypattern`)

The counter steps once per written pixel and stops at `H*V`, which is
640x480 = 0x4B000. Pixels beyond the bottom-right corner of the screen are
read and filtered, but not written. `frame_done` reports that the counter has
stopped.

### Timing at a glance

* Throughput while bursting: 1 pixel per clock.
* Latency: 4 clocks from read request to FIFO write. The FIFO has 1 clock of
  read latency, and the video RAM write comes 1 clock after the FIFO read.
* Each rewind throws away at most `RD_LATENCY` reads.
* With the display model in the testbench, about 60% of clocks are granted.
  At that rate a 640x480 frame takes about 949k clocks (35 ms at 27 MHz),
  with about 9,600 rewinds. The time spent waiting for an empty FIFO
  dominates. This is the cost of the simple burst-until-full scheme.

## Filters

Both filters work on one 8-bit channel. `pixel_filter` instantiates three of
them, one each for red, green and blue. Each filter steps only on a clock
edge where `en` (the FIFO write enable) is high, and holds its history
otherwise. The output is combinational from the current input and the stored
history. The value presented together with `en` is therefore the filtered
value of that same pixel, and it is what the FIFO stores. The filters run
along the pixel stream, that is horizontally, and they carry their history
across row ends. Reset is synchronous and active high, and clears the
history.

### Gaussian blur (`gblur`)

`out[n] = (sum_{k=0..8} C[k] * x[n-k]) >> 8`, with `C = 1 8 28 56 70 56 28 8 1`.

The coefficients are unsigned 8-bit and even-symmetric, which gives the
filter a linear phase. They are the binomial row C(8,k), the discrete form
of a Gaussian. They sum to 256, so the gain is exactly 1 and the output
always fits in 8 bits. The shift truncates. The first eight outputs after
reset ramp up from black, because the history starts at zero.

### Emboss (`emboss`)

`v[n] = round( (sum_{k=0..6} B[k]*x[n-k] + sum_{k=1..6} A[k]*v[n-k]) / 256 )`,
and `out = clip(v[n] + 128, 0, 255)`.

This is a 6th order IIR filter in direct form I. The signed coefficients
have 8 fraction bits. The defaults are:

* `B = (1, -1, 0, 0, 0, 0, 0)`: a horizontal gradient, which produces the
  relief.
* `A1 = 0.25`: a short decaying tail behind each edge.
* All other coefficients are 0.

Flat areas come out mid grey (128). Rising edges come out light and falling
edges dark. The sum is rounded rather than truncated: with truncation, the
feedback locks at -1 and flat areas sit one step below grey. The history
`v` is saturated to 16 bits, so any coefficient set is safe from wrap-around.
All 13 coefficients are parameters (`B`, `A`), so any 6th order response can
be loaded.

## Builds

`displaypattern #(.FILTER(...))` selects the filter at build time:

* `FILT_BLUR` (default)
* `FILT_EMBOSS`
* `FILT_NONE`: shows the original picture

As in the original project, changing the filter means building and
programming the design again. There is no run-time filter select.

## External parts and their ports

The ZBT RAM controller, the SVGA display controller (timing generation, DAC
drive and memory arbitration), the ZBT SRAM chips and the video DAC are
vendor IP or board parts. They are not part of this RTL. The top brings out
their user-side signals instead:

| Port | Dir | Meaning |
|---|---|---|
| `zbt_addr[18:0]`, `zbt_rd_en` | out | Read request to ZBT bank 0. |
| `zbt_rdata` | in | The word read, `RD_LATENCY` clocks after the request. |
| `user_access_ok` | in | The display controller allows a video RAM write in the next clock. |
| `vram_we`, `vram_addr[18:0]`, `vram_wdata` | out | Video RAM write. |
| `last_data`, `rewind`, `frame_done` | out | Status. |

Everything runs on one clock. In the original project the memory and display
clocks were tied to the 27 MHz system clock for this reason.

### Parameters of `displaypattern`

| Parameter | Default | Meaning |
|---|---|---|
| `FILTER` | `FILT_BLUR` | Filter build. |
| `H`, `V` | 640, 480 | Screen size; the address counter stops at `H*V`. |
| `NUM_PIXELS` | 307200 | Pixels read from ZBT. |
| `BASE_ADDR` | 0 | ZBT word address of the first pixel. |
| `RD_LATENCY` | 4 | ZBT read latency in clocks. |
| `FIFO_DEPTH` | 32 | FIFO depth in words. |
| `ADDR_W`, `VADDR_W` | 19, 19 | ZBT and video RAM address widths (512K words). |

## Choices made here

These points are not fixed by the original design description:

* The filter coefficients: the binomial blur row, the emboss
  `B = (1, -1)` with `A1 = 0.25`, and the +128 offset.
* The emboss rounding and saturation.
* The filters are combinational from the current sample, so the FIFO stores
  the filtered value of the pixel written in that same clock.
* Rewind details: restart at the stored-pixel count, drop in-flight returns,
  and wait for an empty FIFO before the next burst.
* `fifo2disp_ctrl` may read in the very clock its trigger appears.
* Writes come one clock after the grant (`user_access_ok`).
* Reading starts right after reset. The bitmap header is not skipped
  automatically; use `BASE_ADDR`.
* `mem_fifo` is a plain array FIFO in place of a generated one. It has
  registered flags, ignores overflow and underflow, and asserts against
  them.
* The original controllers needed five clocks between the full flag and
  stopping the address counter. Here this latency is simply `RD_LATENCY`
  plus the registered full flag; the rewind logic is written for any
  latency.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
outputs against reference arithmetic in `tb/tb_ref_pkg.sv`, and prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_gblur`, `tb_emboss` | Random streams with random stalls; hold while `en` is low; DC gain; impulse and step responses; reset. |
| `tb_pixel_filter` | All three builds side by side; each channel checked on its own, so swapped channels are caught; pad byte zero. |
| `tb_mem_fifo` | Random traffic against a queue; `full` at exactly 32 words; one-clock read data. |
| `tb_mem2fifo_ctrl` | Pixel order across rewinds; no write while full; the 4-clock latency measured; `last_data`. |
| `tb_fifo2disp_ctrl` | No read before full or `last_data`; only with `user_access_ok`; `data_valid` timing; partial final load. |
| `tb_displaypattern` | End to end on a 16x10 screen with 200 pixels, three builds. Requires that each of these happened at least once: FIFO full, rewind, access stall, filter hold, `last_data` drain, and the address counter stopping at the corner. |
| `tb_image_48x48` | A 48x48 grayscale picture through blur and emboss; checks every pixel, that the brightness is kept, and that a flat background comes out grey. |
| `tb_displaypattern_full` | The top at its default parameters: a whole 640x480 blurred frame, all 307,200 writes checked. Runs in about a second. |

The testbenches use these models in `tb/`:

* `zbt_model`: the ZBT read path with a 4-clock latency and a generated
  picture.
* `dp_env`: the display-side model with `user_access_ok` and a write
  checker.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/photoshop_pkg.sv tb/tb_ref_pkg.sv tb/tb_displaypattern.sv \
  --top-module tb_displaypattern -o sim
./obj_dir/sim
```

Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/photoshop_pkg.sv rtl/displaypattern.sv`.

## Known limits

* The display and memory controllers are modelled only at their user ports.
  Real ZBT timing, bus turnaround and the SVGA timing are not reproduced.
* Emboss and blur are one-dimensional, along rows. The history runs on from
  the end of one row into the next row.
* The burst-until-full scheme wastes cycles on rewinds. A FIFO "almost full"
  threshold of `RD_LATENCY` words would avoid them, but that is not how the
  original controllers worked, so it is not done here.
