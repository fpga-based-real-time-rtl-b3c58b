# Hardware task profiler and deadline monitor

Timing a microsecond-long task from software is hard. A `clock_gettime()` call
costs a few hundred nanoseconds. On Linux, interrupts and preemption can land
between the start and end markers. Software clocks resolve to about 1 µs.

This design moves the stopwatch into the FPGA. Software brackets a task with
two 32-bit stores to a memory-mapped register: TASK_START and TASK_END. Each
store is timestamped with a free-running cycle counter at the clock edge that
accepts the bus write. At 50 MHz that is 20 ns resolution, with no software
timing code involved.

The logger does three more things:

- It keeps up to 256 timestamped events for software to read out later.
- It compares each task's start-to-end time with a programmable deadline, in
  the same cycle as the TASK_END write, and latches a sticky "deadline missed"
  flag.
- It sends the current task id and that flag straight to a VGA renderer with no
  frame buffer. A monitor shows which task ran last, and turns red when a
  deadline is missed.

The target is a Cyclone V SoC board (DE1-SoC). An ARM core running Linux
reaches the logger through the lightweight HPS-to-FPGA bridge at 0xFF200000.
This RTL covers only the FPGA fabric. The processor, the bridge and the bus
interconnect are vendor parts, so the top module exposes their Avalon-MM master
side as plain ports.

## Block structure

```
task_profiler_top
├── event_logger            Avalon-MM slave, register map, read path
│   ├── cycle_counter       32-bit free-running timestamp counter
│   ├── event_buffer        256 x 32-bit timestamps + 256 x 16-bit events
│   └── deadline_monitor    last_start_ts, start_outstanding, sticky miss flag
└── task_visualizer         640x480@60Hz VGA output
    ├── vga_counters        hcount/vcount, syncs, blank, pixel clock
    └── top_color_logic     pixel colour (combinational)
        └── digit_rom       8x8 glyphs for 0-9
```

`profiler_pkg` holds the event codes, register offsets, STATUS bit positions
and the RGB struct. The event logger and the visualizer talk through only two
signals, the "viz" conduit:

- `current_task_id[7:0]`
- `deadline_missed`

## Register map (Avalon-MM, word addressed, 32 bits)

| Offset | Byte addr  | Name           | Access | Meaning |
|--------|------------|----------------|--------|---------|
| 0      | 0xFF200000 | EVENT_WRITE    | W      | `[15:8]` event type, `[7:0]` task id. Captures an event. |
| 1      | 0xFF200004 | READ_TIMESTAMP | R      | Timestamp of the oldest unread entry |
| 2      | 0xFF200008 | READ_INFO      | R      | `[15:8]` type, `[7:0]` task id of that entry |
| 3      | 0xFF20000C | STATUS         | R/W    | Read: `[8:0]` entry count (0-256), `[16]` overflow, `[17]` full, `[18]` deadline missed. Write any value: drop the oldest entry. |
| 4      | 0xFF200010 | CONTROL        | W      | `[0]` clear all, `[1]` clear deadline-missed only |
| 5      | 0xFF200014 | DEADLINE       | W      | Deadline in cycles. 0 turns the monitor off. |

Event type codes:

- `0x01` is TASK_START.
- `0x02` is TASK_END.
- Any other code is stored and timestamped, but the monitor ignores it.

Bus timing:

- A write takes effect at the clock edge that ends its cycle.
- A read issued in cycle *t* returns `avs_readdata` in cycle *t+1*. The latency
  is fixed, there is no `waitrequest`, and the slave must be set up with a read
  latency of 1.
- Reads of the write-only offsets return 0.

Driver sequence: write CONTROL = 1, then DEADLINE. Bracket each task with two
EVENT_WRITE stores. To drain, read `STATUS & 0x1FF`, then for each entry read
offsets 1 and 2 and write offset 3.

## How an event is captured

In the cycle where `avs_write` is high and `avs_address` is 0, all of the
following happen at the same clock edge:

1. **Store.** If the buffer is not full, the counter value and
   `writedata[15:0]` are written at `wr_ptr` into the two arrays, and the entry
   count goes up.
2. **Full buffer.** If the buffer is full, the event is dropped and the sticky
   overflow flag is set. A dropped event is also invisible to the deadline
   monitor: a TASK_END arriving at a full buffer is not checked, and a dropped
   TASK_START does not change the task id. This matches the original logger,
   which gates all of its event handling on `!buffer_full`. Drain the buffer
   often enough to avoid it.
3. **TASK_START** (accepted): the monitor copies the counter into
   `last_start_ts`, sets `start_outstanding` and takes the task id as
   `current_task_id`.
4. **TASK_END** (accepted): the monitor computes
   `cycle_count - last_start_ts` modulo 2³². If a start is outstanding, the
   deadline is non-zero and the difference is **greater than** DEADLINE,
   `deadline_missed` is set. Either way `start_outstanding` is cleared. An END
   written exactly DEADLINE cycles after its START is on time. Because the
   subtraction is modulo 2³², the result is right even if the counter wraps in
   between.

The monitor tracks **one** outstanding start. A second TASK_START before the
END restarts the window, and the END is not matched by task id. Tasks whose
start/end brackets overlap are therefore not checked individually.

`current_task_id` is **held** after TASK_END until the next TASK_START. A task
lasts microseconds and a VGA frame 16.7 ms, so clearing the id at TASK_END
would leave the screen always showing task 0.

`deadline_missed` stays set until CONTROL[1] or CONTROL[0] is written.
CONTROL[0] ("clear all") does the following:

- empties the buffer and resets both pointers;
- clears the overflow flag, the miss flag and the outstanding start;
- sets `current_task_id` to 0;
- keeps DEADLINE and the cycle counter, so timestamps stay monotonic.

### Buffer and read-out

`event_buffer` is a circular FIFO. Its two arrays have no reset and a
registered read port, so each maps onto one 10-kbit block RAM:
256×32 + 256×16 = 12,288 bits. The read port always reads the entry at
`rd_ptr`. `event_logger` registers the read address, and in the next cycle
selects either that block-RAM output or a STATUS snapshot taken at the read.
Writing STATUS drops one entry; with an empty buffer the write does nothing.

## Display

`task_visualizer` computes each pixel's colour from the raster position, the
task id and the miss flag. It stores nothing per pixel.

- **Raster.** `vga_counters` counts the 50 MHz clock, two counts per pixel:
  `hcount` runs 0-1599 per line and `vcount` 0-524 lines per frame. Pixel
  column = `hcount/2`. `VGA_CLK = hcount[0]` is the 25 MHz pixel clock.
  Standard 640x480@60 timing: 16/96/48 horizontal and 10/2/33 vertical porch,
  sync and porch; both syncs active low. One frame is 840,000 cycles.
- **Colour priority** (`top_color_logic`, combinational):
  1. Blanking interval: black.
  2. `deadline_missed`: the whole screen is red, bright (FF0000) where
     `hcount[7]` = 0 and dark (600000) where it is 1. This gives vertical bands
     64 pixels wide.
  3. Digit: a 128×128 box centred at (320, 240), spanning x 256-383 and
     y 176-303. Each glyph pixel of the 8×8 `digit_rom` covers 16×16 screen
     pixels. Lit glyph pixels are white. The digit drawn is the task id; ids
     10 and up draw no digit.
  4. Background by task id: 0 grey 202020, 1 blue 2040C0, 2 green 20A040,
     3 orange E08020, 4 and up purple 8020C0.

The colour path is combinational from registers, so a new task id shows on the
next clock cycle after the EVENT_WRITE.

## What is the original design and what is filled in

These parts follow the published design:

- the register map, the STATUS and CONTROL bits and the event codes;
- the 32-bit counter at 50 MHz;
- the 256-entry split buffer;
- the single-cycle strict ">" deadline check, with DEADLINE = 0 meaning off;
- the sticky flag and holding the task id after TASK_END;
- the frame size, the colour table, the 16× centred digit and the red override
  toggling on `hcount[7]`.

These are choices made here, because the original does not specify them:

- one-cycle read latency and zero for write-only reads;
- what "clear all" clears (listed above);
- how overflow is set, and FIFO wrap-around;
- porch and sync timings and two counts per pixel. The original's counter block
  has 31 registers; this one has 21.
- the glyph shapes, white and the two red shades, and no digit for ids ≥ 10;
- synchronous active-high reset, with DEADLINE resetting to 0;
- `VGA_SYNC_N` tied low.

Results from the original hardware, which these sizes cover:

- A 10-second two-thread run logged 40 events: task 1 took 292 cycles, task 2
  took 1,372 cycles, and the deadline was 100,000 cycles (2 ms).
- 40 entries fit the 256-entry buffer.
- The run lasts 5×10⁸ cycles. The 32-bit counter wraps only after 2³² cycles,
  about 85.9 s.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
testbenches share the reference package `tb/glyph_ref_pkg.sv`, which holds the
expected glyphs as text art and a reference colour function.

| Testbench | What it checks |
|-----------|----------------|
| `tb_cycle_counter` | reset, count, wrap |
| `tb_event_buffer` | random traffic against a queue model; full, overflow, clear |
| `tb_deadline_monitor` | boundary ±1, DEADLINE = 0, END without START, counter wrap, random |
| `tb_event_logger` | whole register map over the bus against a model |
| `tb_vga_counters` | line, frame and sync lengths, in cycles |
| `tb_digit_rom` | every glyph bit |
| `tb_top_color_logic` | digit box and random pixels for many task ids |
| `tb_task_visualizer` | every pixel of three frames, with mid-frame changes |
| `tb_task_profiler_top` | end to end, default parameters |

`tb_task_profiler_top` runs the design end to end at its default parameters.
Phases:

1. It replays the two-thread measurement run, with periods shortened to
   5,000 and 10,000 cycles. It drains the buffer and checks 40 entries, exact
   execution times of 292 and 1,372 cycles, and the periods.
2. It holds a task for a whole frame, to draw the digit.
3. It forces a deadline miss and then clears it.
4. It shows the other background colours.
5. It disables the monitor (DEADLINE = 0).
6. It fills the buffer to overflow, then clears everything.

Throughout, every VGA pixel is compared with a reference renderer. The test
counts each mechanism and fails if one never occurred. It takes about a second.

Build and run any testbench with Verilator 5 from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_task_profiler_top rtl/profiler_pkg.sv tb/glyph_ref_pkg.sv \
  tb/tb_task_profiler_top.sv
./obj_dir/Vtb_task_profiler_top
```

## Changing it

- `event_logger #(.DEPTH(n))` changes the buffer size. The STATUS count field
  grows with `$clog2(n+1)`, and an assertion checks that it still fits below
  bit 16.
- `vga_counters` takes all porch and sync widths as parameters.
- `top_color_logic` takes the digit scale and centre as parameters.
- The colour table is a set of localparams in `top_color_logic`.
