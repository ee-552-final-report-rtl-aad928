# Histogram image indexing processor

This processor finds, in a database of up to 64 colour images, the ones whose
colours look most like a query image. A PC streams the images over a
standard (SPP) parallel port. The query comes first, then the candidates.
The FPGA builds a colour histogram of every image as it arrives. For each
candidate it computes the L1 distance to the query histogram and keeps a
sorted list of the closest candidates. When the database ends, it shows the
label of the best match, or of any other kept rank, on two seven-segment
digits. Nothing but two histograms and the short result list is stored, so
the design fits a small FPGA with a few kilobits of block RAM.

The target is a small Flex10K-class FPGA board with a 25.175 MHz clock, two
seven-segment digits, push buttons and a DIP switch. The RTL itself is
generic, synthesizable SystemVerilog.

Two independent test units sit beside the processor on the same top level,
each with its own pins:

- a 64-colour VGA test that uses frame dithering;
- a parallel-port link test.

## The colour feature

Each 8-bit component is quantised uniformly to 16 levels by keeping its top
four bits (`idx_pkg::uq_label`). One image has three 16-bin histograms, for
R, G and B. They live in a single 48-word memory at address
`{component, label}`: R occupies words 0–15, G words 16–31 and B words
32–47. Using one memory with one port, instead of three, costs three
read-modify-write passes per pixel. In exchange it needs a single memory
port, which matters on FPGAs whose block RAMs run out by port count before
they run out by bits.

The distance between the query Q and a candidate C is

    d = sum over the 48 words k of |Q[k] - C[k]|

A smaller d means a closer match.

## Data width and saturation

Bins and distances share one width, `DW`, which defaults to 12 bits.

- **Bins.** A 64×48 image gives at most 3072 counts per bin, which fits in
  12 bits. If a bin reaches 2^DW−1 it stays there.
- **Distances.** The distance of two 64×48 images can reach 2·3·3072 =
  18432, which does not fit in 12 bits. The distance therefore saturates at
  4095, and all candidates that far from the query tie.
- **Ties.** A tie never reorders the list: the earlier image stays ahead.

Set `DW=16` for exact distances with 64×48 images, or for images up to
128×96 (12288 counts per bin).

## Byte protocol on the port

The PC drives eight data lines and four control lines:

| Pin | Meaning |
|---|---|
| `pc_c_b0` STROBE | a byte is on the data lines |
| `pc_c_b1` IMGEND | this byte closes the current image |
| `pc_c_b2` IS_HEAD | this byte is a header |
| `pc_c_b3` TRANSFER | the link is enabled |

The FPGA answers on two lines:

| Pin | Meaning |
|---|---|
| `pc_s_b6` ACK | byte accepted |
| `pc_s_b3` RESET | the processor is coming out of reset |

One operation is sent as this sequence of bytes:

    header(query)      IS_HEAD=1, data[7:6]=01
    R G B R G B ...    data bytes, three per pixel, any number of pixels
    end byte           IMGEND=1 (its data is ignored)
    header(candidate)  IS_HEAD=1, data[7:6]=10
    R G B ...          candidate 0, labelled 0
    end byte
    ...                up to 64 candidates, labelled 0..63
    header(end)        IS_HEAD=1, data[7:6]=11   (optional)

There are three other ways for an operation to end:

- The database fills after the 64th candidate, and the engine ends the
  operation by itself.
- The operator presses the `push_to_done_n` button.
- A new query header starts another operation at any time between images.

If both IMGEND and IS_HEAD are set on one byte, IMGEND wins. A header whose
bits 7:6 are 00 is ignored. Data bytes received between images are dropped.

### Handshake and flow control (`ppi2pc`)

Every PC line passes through two flip-flops before it is used. The handshake
is four-phase:

1. The PC sets the data and flags, then raises STROBE.
2. The FPGA latches the byte and offers it to the control unit.
3. ACK rises only once the control unit has actually used the byte.
4. ACK stays high until the PC drops STROBE.

ACK is therefore also the flow control. While the engine is busy building a
histogram or ranking a candidate, ACK is simply late, and the PC waits. No
byte is ever lost and no FIFO is needed.

After reset, the RESET line to the PC stays high until the PC drops
TRANSFER. This gives the PC a clean starting point.

## Top control unit (`tcu`)

The top control unit turns the byte stream into engine commands.

- **Splitter (`splitter`).** Sorts each byte into header, data or image end.
- **Header decoder (`head_dec`).** Tells a query header from a candidate
  header or an end-of-database header.
- **Pixel register (`pixel_reg`).** Packs three data bytes into one 24-bit
  pixel. It hands the pixel to the engine over a valid/ready pair and
  refuses further bytes while a pixel is waiting.
- **Controller (`tcu_controller`).** An 8-state machine that sequences all
  of the above:

| State | What happens |
|---|---|
| RESET_PC | RESET line high until TRANSFER drops |
| WAIT_HDR | between images; decides what a header means |
| START | one-cycle engine start; pixel register cleared |
| WAIT_ENG | the engine clears its memories |
| IN_IMAGE | data bytes go to the pixel register |
| END_IMG | waits for the last pixel to be taken, then signals image end |
| FINISH | waits until the engine can stop, then ends the operation |
| DONE | results shown until the next query header |

A byte is reported as used (`byte_taken`) only when it has really gone
somewhere. That single rule is what stretches the port handshake when the
engine is slow.

## Indexing engine (`index_engine`)

The engine is a Moore controller (`engine_controller`, 12 states) with
small sub-modules. Each sub-module has its own three-state control: idle,
working, and ready. The controller raises a sub-module's `go` (an "act"
level). The sub-module does its work, raises `done`, and holds it until
`go` drops.

| State | Sub-module active | Cycles |
|---|---|---|
| MINIT | `mem_init` clears both histogram RAMs; ranker and label counter cleared | 49 per operation |
| Q_WAIT / C_WAIT | waiting for a pixel, an image end or (C_WAIT) finish | — |
| Q_HIST / C_HIST | `color_hist` adds one pixel to the query or candidate histogram | 7 |
| DIST | `distance_calc` walks the 48 words of both RAMs | 50 |
| RANK | `rank_sorter` inserts (distance, label) | 1 |
| C_CLEAR | `cand_mem_init` clears the candidate RAM | 49 |
| NEXT, CHECK | `index_counter` advances; the engine stops after 64 candidates | 2 |
| DONE | results stand | — |

With pixels offered back to back, the engine accepts one pixel every 9
cycles. A candidate of P pixels therefore takes about 9·P + 103 cycles. For
a 64×48 image that is about 27,750 cycles, or 4.4 ms at the 6.29 MHz core
clock.

The engine ranks each candidate as soon as its histogram is complete. It
never stores a distance per image, and there is no sorting pass at the end:
results are ready one cycle after the last distance.

### Histogram builder (`color_hist`, `rgb_separate`)

`rgb_separate` holds the accepted pixel and hands out one component at a
time. For each of R, G and B, `color_hist` does two things:

1. It reads the bin `{component, label}`.
2. One cycle later, because the RAM read is registered, it writes the bin
   back plus one.

The three histograms are built in sequence. Building them in parallel would
triple both the throughput and the area.

### RAM manager (`ram_manager`, `eab_ram`)

There are two single-port RAMs of 48 × DW bits: one for the query histogram
and one for the current candidate. Four requesters can drive them: the
whole-memory initialiser, the candidate clear, the histogram builder and the
distance calculator. The manager is purely combinational. For each RAM, a
4-to-1 multiplexer selects address, write enable and write data. Its 2-bit
select is decoded from the controller's activity signals, in this priority
order: initialise, clear, build, read for distance.

- The candidate clear can never reach the query RAM.
- The histogram builder reaches the query RAM only while the query is being
  built.
- Read data goes to every reader unchanged.

### Distance (`distance_calc`)

The distance unit issues address k to both RAMs in one cycle, and adds
`|Q[k] − C[k]|` to the sum in the next. The 48-word pass plus its pipeline
takes 50 cycles from `go` to `done`.

### Ranker with shared comparators (`rank_sorter`)

The ranker keeps the `RANKS` best (distance, label) pairs in registers.
Position 0 holds the smallest distance. A straightforward insertion list
compares the new distance twice at every position: with the entry above
(`above > new`) and with its own entry (`current > new`). The two tests
overlap: the "current" test of position k is exactly the "above" test of
position k+1.

So there is one comparator per position:

    gt[k] = position k is empty, or its distance > new distance

On an insert, all positions update at once, in one cycle:

| Condition | Position k does |
|---|---|
| gt[k−1] | takes the entry from position k−1 (shifts down) |
| gt[k] and not gt[k−1] | takes the new entry |
| otherwise | holds |

The entry pushed out of the last position is dropped. Because the test uses
strict `>`, an equal distance lands below the existing one. The result is
one comparator and one 2-way choice per position, rather than two
comparators.

### Label counter (`index_counter`)

The label counter numbers candidates 0, 1, 2 and so on. It raises `full`
after `MAX_CAND` (64) candidates, and the engine then ends the operation by
itself.

## Result display (`disp_led`, `led_hex`)

The `position` switch selects a rank; 0 is the best match. Once the
operation has ended, the two digits show that rank's label in decimal:
tens on `led0`, units on `led1`. Before that, or if the rank is still empty
because there were fewer candidates than ranks, both digits show a dash.

The segment outputs are active low, ordered `{dp, g, f, e, d, c, b, a}`.

## Clocks and reset

`clock_scaledown` divides `clock_sys` by 4 (`DIV_LOG2=2`) with a
free-running counter. The control unit, port interface, engine and display
run on this clock, which is 6.29 MHz for a 25.175 MHz board clock. The
divider keeps the engine's long arithmetic paths (the distance sum and the
ranker's compare-and-choose) within one core period on a slow FPGA, where
they would not fit in one 40 ns period of the board clock.

The divider has no reset on purpose. The core clock keeps running while
`reset_n` is held low, so the core leaves reset on a clock that is already
toggling, and the port synchronisers fill with real line values during
reset.

The VGA test and the port test run directly on `clock_sys`.

Timing of the reset and button inputs:

- `reset_n` is an asynchronous, active-low reset applied directly to every
  register. Its release is not synchronised, so it should come from a
  debounced button or a clean supervisor.
- `push_to_done_n` is active low and synchronised in the control unit.

## 64-colour VGA test (`vga_test`)

A VGA output with one bit each of R, G and B shows only 8 colours. This
test shows 64 colours by dithering over time.

- **Frame phase.** A counter `clock_rgb` steps 0, 1, 2, 0, … at the start
  of every vertical sync pulse.
- **Dither rule.** A 2-bit component value v is lit in a frame when
  v + phase ≥ 3. Level 3 is lit in all three frames, level 2 in two, level 1
  in one and level 0 in none. This is `rgb_gen`.
- **Refresh rate.** Dithering divides the refresh rate by three. The raster
  is therefore shortened from the standard 800 × 525 clocks to 500 × 271,
  which gives about 186 Hz. The eye then sees a steady average.
- **Sync timing.** `syncgen` produces a 400 × 240 visible area:
  - horizontal front porch 10, sync 60, back porch 30 clocks;
  - vertical front porch 10, sync 2, back porch 19 lines;
  - both syncs active low.
- **Test pattern.** A grid of all 64 colours: colour =
  `{vcount[7:5], hcount[8:6]}`.

## Parallel-port test (`parport_test`)

This test uses the same port interface as the processor. It acknowledges
every byte the PC sends and shows the last byte as two hexadecimal digits on
`pt_led0` and `pt_led1`. It is meant for checking a cable and the PC driver
before running the indexing processor.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `DW` | 12 | `top_proc`, engine | width of a histogram bin and of the distance |
| `RANKS` | 2 | `top_proc`, engine, ranker | number of best matches kept and selectable by `position` |
| `IDX_W` | 6 | `top_proc`, engine | label width; the engine takes `2**IDX_W` = 64 candidates |
| `WORDS`, `AW` | 48, 6 | RAM and sub-modules | histogram words (3 × 16) and address width |
| `DIV_LOG2` | 2 | `clock_scaledown` | core clock = clock_sys / 2^DIV_LOG2 |
| `H_TOTAL`, `V_TOTAL` | 500, 271 | `vga_test` | raster size in clocks and lines |

The defaults are the small configuration: 64×48 images, 12-bit data and two
ranks. A larger configuration (16-bit data, four ranks, images up to 128×96)
is obtained with `DW=16, RANKS=4`; the extra cost is in the distance unit,
the ranker and the two RAMs.

## Where this design departs from the original

- **Control unit state machine.** The original control unit was a 21-state
  machine. This one does the same job with 8 states, plus a splitter,
  decoder and pixel register.
- **Header encoding and handshake.** The header byte encoding, the
  four-phase handshake, and the valid/ready hand-off of pixels were not
  specified, and are this design's own.
- **Engine state machine.** The engine controller's 12 states are this
  design's own list. The original gives only their number and their role.
- **Gray-level converter.** The original planned a colour-to-gray converter
  for mixed databases and then removed it to save area. It is absent here.
- **Ranking overlap.** The original describes ranking as happening while the
  next histogram is built. Here ranking takes one cycle right after the
  distance, before the candidate RAM is cleared. There is still no
  end-of-database sort.
- **Saturation.** Saturation of bins and distances at 2^DW−1 is this
  design's choice. The original does not say what happens on overflow.
- **Divide ratio and VGA details.** The clock divide ratio of 4, the VGA
  porch and sync widths, and the VGA test pattern are assumptions. The
  original gives only the total raster sizes.
- **SRAM.** An external SRAM and the display of the ranked images
  themselves were future work in the original, and are not implemented.

## Files

`rtl/` holds one module per file.

- **Shared package.** `idx_pkg.sv` holds the constants, the header-kind
  enum and the quantiser.
- **Top level.** `top_proc.sv`.
- **Engine.** `index_engine.sv` and its sub-modules:
  - `engine_controller`
  - `rgb_separate`
  - `color_hist`
  - `eab_ram`
  - `ram_manager`
  - `mem_init`
  - `cand_mem_init`
  - `distance_calc`
  - `rank_sorter`
  - `index_counter`
- **Port and control unit.**
  - `ppi2pc`
  - `tcu`, which contains `splitter`, `head_dec`, `pixel_reg` and
    `tcu_controller`
- **Display.** `disp_led`, `led_hex`.
- **Clock.** `clock_scaledown`.
- **VGA test.** `vga_test`, built from `syncgen`, `clock_rgb` and `rgb_gen`.
- **Port test.** `parport_test`.

Three rules are also checked by concurrent assertions in the RTL, active in
any simulation run with assertions enabled:

- `ppi2pc`: a byte is taken only while one is offered, and ACK never rises
  while STROBE is low.
- `pixel_reg`: a waiting pixel holds until it is taken.
- `rank_sorter`: the list fills from the top and stays sorted.

`tb/` holds a self-checking testbench `tb_<module>.sv` per module.

- **Reference models.** Each testbench compares the module with values it
  computes independently, such as histograms and distances in a
  software-style model or the expected sync waveform.
- **Cycle counts.** Testbenches also check cycle counts where there is one
  to check: 9 cycles per pixel, 50-cycle distance, 49-cycle clears, and the
  raster totals.
- **Result line.** Each one prints `TB_RESULT checks=N failures=M`. A
  watchdog ends the run with a failure if it hangs.
- **PC model.** `pc_host.sv` is a behavioural model of the PC side of the
  port protocol.
- **`tb_top_proc`.** Runs three operations end to end through the port,
  with small images. It counts every mechanism and fails if one never
  occurs. The mechanisms are:
  - port stalls while the engine is busy;
  - restart by a new query header;
  - ending by header;
  - ending by push button;
  - ending by a full database;
  - distance saturation;
  - insertion at the top of the list;
  - insertion lower down;
  - candidates dropped from the list;
  - the dash display;
  - VGA sync activity.
- **`tb_top_full`.** Runs one complete operation at the default parameters:
  a 64×48 query and 64 candidates of 64×48, 599,171 bytes in all, until the
  full database ends it. It then checks both ranks against a reference
  model. It covers about 0.67 s of simulated time and runs in well under a
  minute.

## Simulating

Any testbench runs with plain Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      --top-module tb_top_proc -y rtl -y tb +libext+.sv -Irtl \
      rtl/idx_pkg.sv tb/tb_top_proc.sv
    ./obj_dir/Vtb_top_proc

Replace `tb_top_proc` with any `tb_<module>`. The testbenches use explicit
time units on their clocks, so `--timescale` only sets the default for
files that have none. For the larger configuration, override the
parameters on the `top_proc` instance (`DW=16, RANKS=4`). `tb_top_proc` instantiates the top without overrides; to run it
in the larger configuration, add the overrides to its `top_proc` instance
and change its `RANKS` and `DW` localparams to match, since its reference
model uses them.
