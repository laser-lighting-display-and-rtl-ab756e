# Galvanometer laser projector with a swept-plane 3D scanner

A laser dot is steered by two galvanometer mirrors. Each mirror is driven by a 16-bit DAC, and
the whole picture is made of position commands sent at a fixed 20,000 commands per second. The
design has two uses for this projector:

* **Trace mode.** A PS/2 mouse draws a figure. Each click freezes the current cursor position into
  a small memory, either as a lit point or as a dark (blanked) move. The projector replays the
  stored points in an endless loop, with the live cursor as the last point, so the whole figure
  stays visible on the wall.
* **Sweep mode.** The Y mirror jumps between two levels fast enough that the dot draws a vertical
  stripe, which acts as a plane of light. The X mirror moves that stripe across the scene in
  steps. At each step a camera-side pipeline finds the stripe in the picture, turns every image
  row into one point, maps it through a 3x3 camera matrix, and stores it. It then tells the
  projector to move the plane on. The result is a point cloud of whatever the plane lit.

Everything is synchronous logic on one clock. The camera, the mouse's serial protocol, the
external point memory, the display and the analog galvo drivers are outside the RTL. They reach it
through plain ports.

## Structure

```
laser_scan_system                       top
├── laser_projector                     projector side
│   ├── divider (1350)                  20 kpps command enable
│   ├── mouse_xy                        mouse motion -> 12-bit cursor
│   ├── trace_loop                      record / replay figure
│   │   ├── divider (21600)             one trace point per 16 commands
│   │   ├── reset_bram                  clears the memory after reset
│   │   └── bram (128 x 25)             {x, y, laser} per point
│   ├── scan_sweep                      plane sweep FSM
│   │   ├── divider (16)                Y flip every 16 commands
│   │   └── scan_control                stop points along X
│   ├── projector_main                  trace / sweep mux
│   └── galvo_interface                 serial link to two DAC8871
└── swept_plane_scanner                 camera side
    ├── bwfilter                        grey -> black/white threshold
    ├── compare15                       15-frame vote per pixel
    ├── bram (512K x 1)                 voted frame
    ├── line_det                        stripe centre per row
    ├── point3d_zbt                     3x3 matrix, write to point memory
    └── main_fsm                        advance / vote / detect sequencer
```

`rtl/laser_pkg.sv` holds the shared widths and the types `trace_entry_t` ({x, y, laser}, 25 bits)
and `point3d_t` ({x, y, z}, 3 x 12 bits).

## The command clock and the DAC link

At the default 27 MHz clock, the 1350-count `divider` gives one `command_enable` pulse every
50 µs. On that pulse `galvo_interface` loads the X and Y words and shifts them out MSB first on
two data lines. Both DACs share one chip select, which is low for exactly 16 clocks, starting on
the clock after the enable. The DACs latch on the falling edge, so the serial clock is the
inverted system clock (`dac_sclk = ~clk`), and their reset is the inverted system reset. The laser
output changes together with the last data bit, so the beam switches at the moment the mirrors
receive their new target.

In trace mode the 12-bit cursor coordinates become DAC words by appending four zero bits. In sweep
mode the 16-bit words are used as they are.

## Trace mode: recording and replaying a figure

`trace_loop` keeps two addresses:

* `current_addr`, the slot of the live cursor;
* `loop_addr`, which walks 0 .. `current_addr` and wraps around.

The walk advances one slot every 21,600 clocks, which is 16 command periods. So each point is
held long enough for the mirrors to settle and be drawn.

A click does not write at once. Pressing the left button arms "lit" and pressing the right button
arms "dark". When the walk next reaches the cursor slot after the button is released, the
current mouse position and the armed laser bit are written there, and `current_addr` moves up by
one. So a point is always committed at a known moment in the loop. The cursor slot itself is
always shown lit. When the memory is full, `current_addr` stays on the last slot.

After reset, `reset_bram` holds the loop for 128 clocks while it writes zeros to every slot.

`mouse_xy` adds each signed 9-bit motion packet to the 12-bit position and stops at 0 and 4095.
Both axes are inverted, because the mirrors mirror the picture. The position starts in the
middle.

`projector_main` registers the chosen X, Y and laser values. A `laser_arm` input (a safety
switch) can blank the beam in trace mode.

## Sweep mode: the plane and its stop points

`scan_sweep` is an IDLE/SCAN machine.

* **IDLE.** The mirrors are held at the centre (0x8000, 0x8000) and the laser is off.
* **Entering SCAN.** `scan_start` starts a sweep: X goes to 0 and the laser comes on.
* **During SCAN.**
  * Y toggles between 0x2000 and 0xE000 every 16 command periods.
  * X steps by one per command period whenever `scan_control` allows it.
* **End of the sweep.** When X reaches 65534, that value is held for one more command period so
  that it reaches the mirrors. Then `scan_complete` pulses for one clock and the machine returns
  to IDLE.

`scan_control` is where the two halves meet. The X ramp stops each time its value equals
`{advance count, 11 ones}`, which is 2047, 4095, 6143 and so on. The advance count is a 5-bit
counter, and it is raised by each `advance_en` pulse from the scanner. Each stop therefore lasts
exactly as long as the camera side needs to process one plane position. The counter clears on
`scan_complete`. The split is set by `ADV_BITS` and `STOP_LSBS` (5 and 11 by default, giving 32
stops). Setting them to 4 and 12 gives 16 wider wedges.

There are two timing consequences:

* The sequencer sends an advance as soon as the scanner is switched on. If it is switched on
  before the sweep reaches its first stop, the first processed position is therefore the second
  stop.
* The counter has no upper limit and simply wraps around. If the camera side finished faster
  than the beam crosses one wedge, advances would pile up ahead of the sweep. At full size the
  camera side is far slower, so the sweep always waits at each stop.

A full sweep with no waiting takes 65,535 command periods, about 3.3 s.

## Camera side

**Threshold.** `bwfilter` compares each 8-bit grey pixel with `{threshold_sw, 4'b0000}` and outputs
0xFF when it is above, and 0x00 otherwise. The scanner reduces this to one bit. The filtered
image is also sent to `disp_pixel`, with a 10-pixel black border, for a monitor.

**Noise vote (`compare15`).** A single frame of a thin laser line is noisy. So each pixel of the
720 x 501 window is looked at on 15 successive frames. The unit follows the video raster
(`hcount`, `vcount`). It waits until the raster reaches its current pixel, adds that pixel's bit
to a count, and moves to the next pixel only after the 15th visit. On that visit it writes
`count > 10` into the one-bit frame memory.

This works on one pixel per frame, so the cost is large. A pass takes 15 frames per pixel,
overlapped so that consecutive pixels share frames: about 720 x 501 x 14 frames. At real video
rates (60 frames/s) that is about a day per stop. Only reduced windows are simulated. The unit uses an
enable/done handshake, and `comp15_done` stays high until the enable drops.

**Line detection (`line_det`).** For each row from 50 to 450, the unit reads columns 40 .. 680 of
the voted frame one per clock. It tracks the current run of white pixels and the longest run so
far, with its start. At the end of the row it outputs `start + length/2` as the stripe's x, with
the row as y, and pulses `line_pt_valid`. A row with no white pixel yields x = 0. Each row takes
642 clocks. Ties keep the first run.

**Matrix (`point3d_zbt`).** Each (x, y) point becomes (x, y, 1) and is multiplied by the 3x3
integer matrix `M11..M33`:

* X = M11·x + M12·y + M13
* Y = M21·x + M22·y + M23
* Z = M31·x + M32·y + M33

The three results are cut to 12 bits and packed into a 36-bit word. The word is written to
consecutive addresses of the external point memory, with `zbt_we` held for 3 clocks (the external
memory needs several clocks to accept a write). The default matrix is the identity. A real camera
calibration must be supplied through the parameters. No fixed-point scaling is applied, so
calibration values must be integers chosen for that.

**Sequencer (`main_fsm`).** While `scan_on` is high, it loops through:

1. pulse `advance_en`;
2. run `compare15` until done;
3. run `line_det` until done;
4. go back to step 1.

It returns to idle when the projector reports `scan_complete` or the switch goes off. `save_en`
is high the whole time the sequencer is out of idle. `point3d_zbt` therefore keeps its write
address running across all stops of one scan, and starts again at address 0 on the next scan.

The frame memory is shared between the vote and the detector. Its address comes from whichever
unit is active.

## Where this RTL departs from the source design or fills gaps

* **One clock.** The projector and scanner were built on two boards, each with its own clock
  (27 MHz, and the video clock). Here they share one clock, and `advance_en` and `scan_complete`
  are wired directly. A two-clock build needs a synchroniser on each of these signals.
* **Z row.** Z uses the full third row of the matrix (M31·x + M32·y + M33), like X and Y.
* **Line detection.** The detector is written from its description: longest run, midpoint, one
  point per row.
* **Stop count.** The source gives both a 5-bit advance count followed by 11 ones (32 stops) and a
  division of the sweep into 16 wedges. The explicit 5 + 11 split is the default. Parameters give
  the other.
* **Handshakes.** `compare15` and `line_det` hold their done flag until the sequencer drops the
  enable. The sequencer decodes its outputs from its state, so there is no extra clock of delay.
* **Trace memory write.** The write is a single clock.
* **Y-flip divider.** This divider counts command enables on the system clock, instead of being
  clocked by them.
* **Scan levels.** The centre and Y levels are 16-bit words: 0x8000, 0xE000 and 0x2000.

These are not implemented:

* the PS/2 serial decoder;
* button debouncing and power-on reset;
* the NTSC decoder;
* the external ZBT memory controller;
* the XVGA timing;
* a display of the stored point cloud.

The top's ports stand where they would connect. Inputs are assumed clean and synchronous.

## Verification

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
`tb/dac8871_model.sv` is a behavioural model of the DAC's serial input. It rejects frames that are
not exactly 16 bits long.

| testbench | what it covers |
|---|---|
| tb_divider | tick period at several sizes, enable gating, reset |
| tb_mouse_xy | random motion against a saturating model, inversion |
| tb_scan_control | stop points, advance, counter clear |
| tb_scan_sweep | defaults: centre hold, Y flip every 16 commands, ramp, stops, end pulse |
| tb_galvo_interface | 16-clock frames through two DAC models, laser timing |
| tb_bram, tb_reset_bram | read latency, write-first, clear sequence |
| tb_trace_loop | arm/commit, replay order, laser bits, step period, all 128 entries filled |
| tb_projector_main | mux and laser gating |
| tb_bwfilter | all pixel/threshold pairs |
| tb_compare15 | vote against a model on a 10 x 4 window |
| tb_line_det | default 720 x 501 frame, random stripes against a longest-run model |
| tb_point3d_zbt | non-identity matrix, addresses, 3-clock write hold |
| tb_main_fsm | state sequence, handshakes, stop on complete or switch off |
| tb_laser_projector | both modes through the DAC link (short command period) |
| tb_swept_plane_scanner | vote, detect and store on a 16 x 8 window |
| tb_laser_scan_system | whole system, reduced sizes: counts every mechanism |
| tb_laser_scan_system_full | whole system at defaults (see below) |

`tb_laser_scan_system` reduces the sizes: a 10-clock command period, four stops along X and a small camera window.
It runs trace recording and replay, a mode switch, and a full sweep in which the scanner advances
the plane at every stop. It counts each of these:

* memory clears, trace steps, stored points and dark points;
* sweep halts, advances, the end of the sweep and Y flips;
* vote passes, detection passes and stored 3D points.

It fails if any of them never happens.

`tb_laser_scan_system_full` uses every default (27 MHz, 1350-clock commands, 128-entry trace
memory). It records three points with the mouse, checks several replay loops word by word at
the DAC pins. It then starts a sweep, which must halt at X = 2047. From there the scanner switch
is turned on briefly 31 times. Each turn makes the scanner sequencer send one advance pulse over
the link. The sweep must move to the next stop each time, reach 65534, signal the end once, and
return to the centre with the laser off. This is 89 million clocks, under a minute in Verilator.
The camera side at full size is not simulated: one noise-vote pass over 720 x 501 pixels needs millions of
frames. The largest window simulated for the complete scanner is 16 x 8 pixels. Line detection alone is
simulated on the full 720 x 501 frame.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -I. rtl/laser_pkg.sv rtl/*.sv tb/dac8871_model.sv \
          tb/tb_laser_scan_system.sv --top-module tb_laser_scan_system
./obj_dir/Vtb_laser_scan_system
```

Run this from the directory that holds `rtl/` and `tb/`, because the testbenches include
`tb/tb_check.svh` by that path.

## Parameters worth changing

| parameter | default | meaning |
|---|---|---|
| `CMD_COUNT` | 1350 | clocks per galvo command (27 MHz / 20 kpps) |
| `LOOP_COUNT` | 21600 | clocks per trace point |
| `TRACE_LOGSIZE` | 7 | trace memory depth, log2 |
| `Y_FLIP_COUNT` | 16 | commands per Y level |
| `ADV_BITS`, `STOP_LSBS` | 5, 11 | stop points along X |
| `H_SIZE`, `V_SIZE` | 720, 501 | vote window |
| `FRAMES`, `WHITE_THRESH` | 15, 10 | frames per vote and the majority needed |
| `X_START..Y_STOP` | 40, 680, 50, 450 | detection window |
| `M11..M33` (point3d_zbt) | identity | camera matrix |
