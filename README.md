# CubeBot cube-solver logic

A Rubik's cube robot splits into three jobs. It must **see** the six faces,
**solve** the cube and **turn** it.

This RTL covers the seeing and turning, plus the hand-off between them:

- **Colour path.** A camera frame sits in memory. Logic reads it, samples the
  nine facelets of one face, and reduces each facelet to one of six colour
  codes. The time taken is fixed and does not depend on the image.
- **Move hand-off.** The main processor solves the cube in software. It writes
  the robot moves into a small encoding buffer. The buffer packs each move
  into one byte and stores the list in an on-chip memory, closed by an end
  marker.
- **Robot side.** The list travels to the robot controller as a framed serial
  packet. There, a packet receiver, a move sequencer and a stepper pulse
  generator turn it into gripper servo states and `step`/`dir` pulses. The
  motor is homed on a slot sensor before each list.

The processor, its bridges, the UART, the SDRAM controller, the VGA monitor,
the clock PLL, the servo driver chip and the camera are not part of this
RTL. Where they would connect, `cubebot_top` has ports.

```
             register window (csr_*)         parallel I/O words (pio*_)     move memory port (mem_*)
                     |                              |        ^                     |
          +----------+-----------+          +-------+--------+-------+             |
          | color_engine         |<-start---| status_flag_ctrl       |             |
 avm_* <--| pixel_fetch          |--busy--->|  control edges, state  |--irq        |
 (frame)  | edge_detect          |          |  machine, status word  |             |
          | rgb_average          |          +------------------------+             |
          | color_classifier     |--cells-->  cube_face_buffer --> pio2_colors      |
          +----------------------+                                                 |
          move_encode_buffer (csr 0x10-0x13) --bytes--> move_memory <--------------+

 rx_valid/rx_byte --> actuation_ctrl: packet_parser -> move_sequencer -> stepper_ctrl --> step, dir
                                                          |                 ^
                                                          +-> servo_state   +-- sensor_n
```

## Colour engine

`color_engine` handles one face per `start` pulse. The face is a square
region of interest. Its corner is (`roi_x0`, `roi_y0`) and it is split into
3x3 cells of `cell_size` pixels. The frame is 640x480 RGB565 with two bytes
per pixel, starting at `frame_base`.

The nine cells go through one datapath, one after another, in row-major
order:

1. **`pixel_fetch`** reads a `WIN` x `WIN` window (default 32x32) centred in
   the cell.
   - It is an Avalon-style read master with one read in flight.
   - Each pixel costs one issue cycle plus the memory latency. With a fixed
     latency, the time is therefore fixed.
2. **`edge_detect`** computes luma as (R + 2G + B) / 4.
   - Its gradient is |Y − Y_left| + |Y − Y_up|. It keeps a one-line buffer
     for the pixel above.
   - A pixel whose gradient exceeds `edge_thr` is marked as an edge.
   - The first row and first column have no neighbour on that side, so their
     term is zero.
3. **`rgb_average`** sums R, G and B over the pixels *not* marked as edges,
   and counts them.
   - After the last pixel, three shift-subtract dividers (`seq_divider`)
     produce the averages.
   - This takes a fixed SW + 2 cycles, where SW = 8 + 2·log2(WIN) + 1.
   - Glints, shadows and printed lines inside the window produce edges, so
     they drop out of the average. This is the noise filter.
4. **`color_classifier`** maps the average to a colour. The rules are tried
   in order and the first match wins:

| order | colour  | rule (all thresholds are registers)                          |
|-------|---------|---------------------------------------------------------------|
| 1     | white   | min(R,G,B) ≥ `white_min`                                      |
| 2     | yellow  | R ≥ `yellow_g_min`, G ≥ `yellow_g_min`, B ≤ `yellow_b_max`    |
| 3     | orange  | R ≥ `dom_min`, R ≥ B + `margin`, G ≥ `orange_g_min`           |
| 4     | red     | R ≥ `dom_min`, R ≥ B + `margin`, R ≥ G + `margin`             |
| 5     | blue    | B ≥ `dom_min`, B ≥ R + `margin`, B ≥ G + `margin`             |
| 6     | green   | G ≥ `dom_min`, G ≥ R + `margin`, G ≥ B + `margin`             |
| 7     | unknown | otherwise (code 7)                                            |

The colour codes are W=0, R=1, B=2, O=3, G=4, Y=5 and unknown=7.

Each cell result leaves on `cell_valid`, with its index, colour and average.
`face_done` follows cell 8. `face_cycles` records the cycle count from
`start` to `face_done`.

**Timing.** A face takes 9 × (WIN² × (L + 1) + about 25) cycles, where L is
the memory read latency. With L = 2 and WIN = 32 that is 27,874 cycles, or
0.56 ms at 50 MHz. The published system takes 14.8 ms per face, so this
engine fits that budget by a wide margin. It stays within the budget up to
about 24 cycles of latency per pixel. A larger window improves the averaging
at a linear cost in time, and WIN is a parameter.

**Engine registers** (word offsets 0x0-0x8 of the register window):

| word | contents                                                    | reset |
|------|-------------------------------------------------------------|-------|
| 0    | frame_base (byte address)                                   | 0 |
| 1    | roi_x0                                                      | 140 |
| 2    | roi_y0                                                      | 60 |
| 3    | cell_size                                                   | 120 |
| 4    | edge_thr                                                    | 24 |
| 5    | {white_min, dom_min, margin, orange_g_min}                  | {170, 100, 40, 70} |
| 6    | {yellow_g_min, yellow_b_max}                                | {150, 110} |
| 7    | face_cycles (read only)                                     | |
| 8    | {busy, current cell} (read only)                            | |

The threshold defaults are starting points for calibration under the actual
lighting.

## Processor interface

`cubebot_top` exposes the three ways the processor reaches the logic.

**Register window.** `csr_address` is 5 bits and addresses words. Read data
is valid one cycle after `csr_read`.

- Words 0x00-0x0F belong to the colour engine (see above).
- Words 0x10-0x13 belong to the move encoding buffer:

| word | write                                                         | read |
|------|---------------------------------------------------------------|------|
| 0x10 | append move: spin in [3:0] (signed, −3..+3), flips in [9:8], rotations in [18:16] | move count |
| 0x11 | commit: append the 0xFF end marker, raise moves-ready         | move count |
| 0x12 | clear the list                                                | move count |
| 0x13 | —                                                             | {ready[31], commit pending[30], overflow[29], queue empty[28], rejected[27:20], queue level[15:12], move count[7:0]} |

**Control word** `pio1_ctrl` (processor to logic). Only rising edges act.

| bit | meaning |
|-----|---------|
| 0 | scan start. Accepted only while the freeze bit is set and the engine is idle. Refused requests are counted. |
| 3:1 | face index the scan is stored under |
| 4 | freeze (the camera image is held still) |
| 5 | solution available (mirrored to the status word) |
| 6 | execution started |
| 7 | execution done |
| 8 | execution error |
| 9 | interrupt acknowledge |
| 10 | clear all faces and return to IDLE |

**Status word** `pio0_status` (logic to processor):

| bits | field |
|------|-------|
| 2:0 | system state: IDLE 0, SCANNING 1, READY 2, RUNNING 3, DONE 4, ERROR 5 |
| 5:3 | number of faces stored |
| 6 | engine busy |
| 7 | face done (since the last scan start) |
| 8 | solution flag |
| 9 | moves ready |
| 10 | interrupt pending (same as `irq`) |
| 11 | frozen |
| 19:12 | move count |
| 23:20 | cells done in the current scan |
| 29:24 | mask of stored faces |

The states move as follows:

- A scan moves IDLE or DONE to SCANNING.
- Moves-ready moves IDLE or SCANNING to READY.
- Execution started moves READY to RUNNING.
- Execution done moves RUNNING to DONE.
- An execution error moves any state to ERROR.
- Clear moves any state to IDLE.

`irq` is a level. Face done, moves-ready and an error each set it, and the
acknowledge bit clears it.

**Face colours.** `pio2_colors` shows the face selected by `pio2_sel`. Bit 31
is "stored", bits 30:28 are the face number and bits 26:0 are the nine
3-bit colours, with cell *i* at bits [3i+2:3i].

**Move memory** (`mem_*`) is the processor's 32-bit port on the 256-byte
move memory, with byte enables and one-cycle reads. Bytes are
little-endian. The encoding buffer writes through a second, byte-wide port,
which wins a same-byte collision.

## Move format and the encoding buffer

One robot move is one byte, `[SSS DD FFF]`:

- bits 7:5: spin of the cube in quarter turns, −3..+3 in two's complement
  (800 motor steps each).
- bits 4:3: number of flips, 0..3.
- bits 2:0: whole-cube rotations in eighth turns (400 steps each).

0xFF ends the list. The move with a spin of −1, 3 flips and 7 rotations
would also encode as 0xFF, so the buffer rejects that one combination and
writes 0xFF only as the marker.

`move_encode_buffer` checks the spin range on every append and rejects the
0xFF code. A rejected move is counted, and the overflow flag is set when the
memory is full.

Accepted codes go through an 8-entry first-word-fall-through queue
(`sync_fifo`) and drain into the memory at one byte per cycle. A commit waits
until the queue is empty, then writes 0xFF and raises moves-ready. Appends
are refused from the commit until a clear. The list holds up to 255 moves
plus the marker.

## Robot side

`actuation_ctrl` joins three blocks. In the published system these run as
robot-controller firmware; here they are logic.

**`packet_parser`** frames the byte stream `[0xAA][TYPE][LEN][LEN bytes][0xFF]`.

- The known types are 0x01 faces, 0x03 move list, 0x04 status and 0x05
  command.
- Its states are WAIT_START, READ_TYPE, READ_LEN, READ_DATA, WAIT_END and
  PROCESS.
- It abandons a packet and waits for the next 0xAA in three cases:
  - an unknown type;
  - a missing end byte;
  - `TIMEOUT_CYC` cycles with no byte inside a packet (1 ms at 50 MHz, about
    11 byte times at 115200 baud).
- Each abandoned packet increments `pkt_errors`.
- Data bytes stream out as they arrive. A consumer acts on them only at
  `pkt_valid`.

**`move_sequencer`** collects the bytes of a move-list packet and starts when
the packet completes. A list that arrives while one is running is dropped
and counted.

A run homes the motor first. Then each move executes in a fixed order:

1. **Flips.** For each flip: servos to partial grip, settle, release, settle.
2. **Spin.** Servos released, settle, then spin × 800 steps.
3. **Rotation.** Servos gripped, settle, rotation × 400 steps, release.

Parts with a zero count are skipped. The run stops at the 0xFF marker or at
the packet length. If homing fails, the list stops and `error` is set.

`servo_state` (released, partial or gripped) is the request for a servo
driver.

**`stepper_ctrl`** produces the pulses:

- A step is high for one delay and low for one delay.
- Moves use the fast delay (100 µs) except for the last 100 steps, which use
  the slow delay (700 µs) to approach the target gently.
- An N-step move takes 2·FAST·max(N−100, 0) + 2·SLOW·min(N, 100) cycles from
  the first step edge to `done`. At 50 MHz a quarter turn is 0.28 s.
- Homing steps forward at the slow rate. It samples the active-low slot
  sensor after each step, and once the slot is seen it continues 20 more
  steps (edge compensation) and sets position 0.
- With no slot within 1600 steps (half a turn), homing gives up with
  `align_err`.
- Position is tracked modulo 3200 steps.

## What follows the published design and what is this design's own

Taken from the published system:

- The set of custom blocks: colour engine, face buffer, move encoding buffer
  and status flag controller.
- The 640x480 RGB565 frame.
- The sequential nine-cell schedule and its stage order: edge detection,
  centre sampling, averaging, threshold classification.
- The 256-byte move memory.
- The PIO roles: a control word with freeze and solution flags, a status
  word, and a colour word.
- The system states idle, scanning, ready, running, done and error.
- The packet framing, type codes and receiver states.
- The move byte layout and end marker.
- The step counts (3200 per turn, 800 and 400) and the two pulse delays.
- Homing on an optical slot sensor with edge compensation and a 1600-step
  timeout.
- The three servo states.

This design's own choices:

- The window size and default region of interest.
- The exact classification rules and all threshold values.
- The register window layout and every bit position of the control and
  status words.
- The colour codes.
- The interrupt.
- The packet timeout length.
- The order of actions inside one move, which servo state each action uses,
  and the eighth-turn meaning of the rotation field.
- The 0.3 s servo settle time (`SETTLE_CYC`).
- The 100-step slow tail and the 20-step edge compensation.
- Reading each pulse delay as half a step period.
- The 50 MHz clock.

Departures to be aware of:

- **Face time.** The published system reports 14.8 ms per face, about
  1.6 ms per cell. This engine is much faster at its defaults (0.56 ms per
  face). Its time is equally fixed.
- **Move byte examples.** A few example move codes in the published material
  do not decode under the stated `[SSSDDFFF]` field layout. This design
  follows the field layout.
- **Move buffer size.** The move buffer is also described elsewhere as 4 KB.
  This design keeps the 256-byte address range, which fits the longest
  observed solution (24 moves) ten times over.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| cubebot_top | CLK_HZ | 50,000,000 | clock, used for the pulse delays |
| cubebot_top | WIN | 32 | sampling window side |
| cubebot_top | TIMEOUT_CYC | 50,000 | packet inactivity timeout |
| cubebot_top | SETTLE_CYC | 15,000,000 | servo settle time (0.3 s) |
| color_engine | IMG_W, IMG_H, GRID | 640, 480, 3 | frame and grid |
| stepper_ctrl | FAST_US, SLOW_US | 100, 700 | pulse delays |
| stepper_ctrl | STEPS_PER_REV, ALIGN_TIMEOUT, EDGE_COMP, SLOW_TAIL | 3200, 1600, 20, 100 | |
| move_sequencer | STEPS_90, STEPS_45 | 800, 400 | steps per quarter / eighth turn |
| move_encode_buffer | MEM_BYTES, FIFO_DEPTH | 256, 8 | |

## Simulation

The design uses one clock with an asynchronous active-low reset. Every file
holds one module, and the shared types are in `cubebot_pkg`.

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each testbench
compares against its own reference model, has a watchdog, and ends with a
`TB_RESULT checks=… failures=…` line. Run one with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
  rtl/cubebot_pkg.sv tb/tb_color_engine.sv --top-module tb_color_engine -Mdir obj -o sim
./obj/sim
```

There are two end-to-end testbenches:

- **`tb_cubebot_top`** runs the whole flow at reduced size: a 100 kHz clock,
  an 8x8 window and short timeouts. The flow is:
  1. A refused scan.
  2. Six face scans from a frame-buffer model, one with memory wait states.
     The 54 colours are checked.
  3. A random move list with a rejected move, committed and read back from
     the move memory.
  4. A bad packet and a stalled packet, then the list sent at serial pace.
     A second list is sent and dropped while the first runs.
  5. Homing, execution against a motor model, and clear.

  It counts every one of these mechanisms and fails if any never happened.
- **`tb_cubebot_full`** runs the same flow with every parameter at its
  default. It simulates about 171 million cycles, roughly 1.5 minutes in
  Verilator. It also checks the face time against the 14.8 ms budget and
  the fast and slow pulse widths at 50 MHz.

## Known warnings

Verilator reports some signals as unused, such as averages and counters that
only feed testbenches or the status word.

It also reports `rst_n` as both synchronous and asynchronous, because the
assertions use it in `disable iff`. The logic itself uses only the
asynchronous reset.
