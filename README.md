# Parallel line clipping subsystem

This design clips 2D line segments against a rectangular window. It splits the
work four ways: one processor per window edge, all running at once. Each
segment is written in parametric form,

    x = x0 + dx * t,   y = y0 + dy * t,   0 <= t <= 1,

so every window edge gives one inequality `P_i * t <= Q_i`:

| i | edge     | P_i  | Q_i            |
|---|----------|------|----------------|
| 1 | left     | -dx  | x0 - x_left    |
| 2 | right    |  dx  | x_right - x0   |
| 3 | bottom   | -dy  | y0 - y_bottom  |
| 4 | top      |  dy  | y_top - y0     |

The four crossing parameters `t_i = Q_i / P_i` do not depend on each other, so
four Geometry Processors (GP5, GP6, GP7, GP8) compute them in parallel. An
edge with `P_i < 0` is one where the line *enters* the window's half-plane. An
edge with `P_i > 0` is one where it *leaves*. The visible part runs from

    t0' = max(0, entering t_i)   to   t1' = min(1, leaving t_i)

and exists when `t0' <= t1'`. Its end points are `x0 + dx*t0'`, `x0 + dx*t1'`,
`y0 + dy*t0'` and `y0 + dy*t1'`, and these four are again computed in
parallel, one per GP. A whole segment costs each GP one subtraction, one
division, one multiplication and one addition. The schedule is 141 clock
cycles per segment.

## Segments parallel to an edge

When `dx = 0` (or `dy = 0`), `P_i` is zero and the division is undefined. The
design handles this by thinking of the segment as tilted by an infinitesimal
amount. The parameter of an edge the segment runs parallel to then becomes an
infinity:

* For the left and bottom edges, `t = -inf` if the segment lies on the inner
  side (`Q >= 0`), which never constrains `t0'`. Otherwise `t = +inf`, which
  forces `t0' > 1` and rejects the segment.
* For the right and top edges, `t = +inf` inside and `-inf` outside, with the
  same effect on `t1'`.
* A zero delta counts as positive when the candidates are sorted (see step 3).

So vertical and horizontal segments, and even a zero-length segment, go through
exactly the same steps as any other. In the word format, the infinities are
the largest and smallest 24-bit values.

## Steps of the algorithm and their timing

All four GPs step together. `plc_controller` holds the cycle budget of each
step and broadcasts the step that is running. Inside a step, each GP runs its
own microprogram on its ALUs (next section). An assertion checks that every
GP is idle when the next step opens.

| step | cycles | what each GP does |
|------|--------|-------------------|
| 1 | 1  | LR1 <= new coordinate (x for GP5/GP6, y for GP7/GP8) |
| 2 | 65 | LR3 = LR1 - LR2 (delta) and LR4 = Q in parallel (9 cycles). If delta = 0, TR1 <= +/-inf. Otherwise TR1 = Q / P (51 cycles) |
| 3 | 4  | if delta < 0, swap TR1 with the same-axis partner (GP5<->GP6, GP7<->GP8). GP5 and GP7 now hold entering candidates and GP6 and GP8 leaving ones |
| 4 | 7  | TR2 <= TR1 of the other axis (GP5<->GP7, GP6<->GP8). Then TR4 = max(TR1, TR2, 0) in GP5/GP7 or min(TR1, TR2, 1) in GP6/GP8, as two 3-cycle compares |
| 5 | 64 | take the partner's TR4 and test t0' <= t1'. If visible, TR3 = LR3 * TR4 and LR4 = LR2 + TR3 (51 + 9 cycles): GP5 gives x0', GP6 x1', GP7 y0', GP8 y1' |
| 6 | (1) | LR2 <= LR1, and {visible, LR4} goes into the GP's I/O buffer. This shares its cycle with step 1 of the next point |

A point accepted in cycle `c` has its result in the output buffers at the end
of cycle `c + 141`, and `out_valid` rises in cycle `c + 142`. Points that keep
coming are accepted every 141 cycles. Each step's budget is longer than the
work the GP does in it; the spare cycles are idle. The budgets are kept so that
the published schedule (1 + 65 + 4 + 7 + 64) is cycle-exact.

Points form line strips. Each new point closes a segment with the previous
one, because step 6 moves LR1 into LR2. A point offered with `in_first` starts
a new strip: it is loaded as both ends and produces no output.

## The GP microprogram

Each GP has a sequencer and a 12-word control store (`gp_sequencer`). The
controller's `step_first` pulse dispatches the GP to the entry word of steps
2..5, and that word already executes in the same cycle. A microprogram
counter then walks through the words until one marked `last` completes, or
an exit word finds its condition true. Steps 1 and 6 are fixed register
transfers and have no microprogram. There are four kinds of word:

* **ALU**: start ALU 0 (and ALU 1 in a dual word) in the word's first cycle.
  Wait for ALU 0 to finish, then write the result(s) to a register.
* **MOVE**: one cycle. If the condition holds, copy a source to a register.
* **EXIT**: one cycle. If the condition holds, the microprogram ends.
* **VIS**: one cycle. Set the visible flag to `!(a > b)`.

Sources are LR1..4, TR1..4, CR1, the exchange input, the constants 0 and 1,
`-LR3` and the parallel-edge infinity derived from Q in LR4. Conditions are
"always", "delta = 0", "delta < 0" and "not visible". The GP datapath
evaluates the condition; the sequencer only decides where to go next.

The store of a left-edge GP (in a right or top GP, MAX becomes MIN, 0 becomes
1, the divisor is `LR3`, and the VIS operands swap):

| addr | word | cycle done |
|------|------|-----------|
| 0 | ALU: LR3 = LR1 - LR2 and LR4 = LR2 - CR1 (dual) | 8 |
| 1 | MOVE if delta = 0: TR1 = infinity from LR4 | 9 |
| 2 | EXIT if delta = 0 | 10 |
| 3 | ALU: TR1 = LR4 / (-LR3), last | 61 |
| 4 | MOVE if delta < 0: TR1 = exchange, last (step 3) | 0 |
| 5 | MOVE: TR2 = exchange (step 4) | 0 |
| 6 | ALU: TR4 = max(TR1, TR2) | 3 |
| 7 | ALU: TR4 = max(TR4, 0), last | 6 |
| 8 | VIS: visible = !(TR4 > exchange) (step 5) | 0 |
| 9 | EXIT if not visible | 1 |
| 10 | ALU: TR3 = LR3 * TR4 | 52 |
| 11 | ALU: LR4 = LR2 + TR3, last | 61 |

The "cycle done" column counts from the step's first cycle. Each step ends
well inside its budget (65, 4, 7, 64), except step 4, which uses all 7
cycles. For that reason the entry word executes in the dispatch cycle, and
compares take 3 cycles.

## Number format

The ALUs work in 24-bit integer mode:

* Coordinates, deltas and Q are 24-bit two's-complement integers. Differences
  must fit in 24 bits, so keep `|coordinate| < 2^22`.
* `t` is fixed point with 22 fraction bits (1.0 = `0x400000`). Its range is
  about ±2; a quotient outside that range saturates to ±inf. This is harmless:
  only whether `t` falls below 0, inside [0, 1] or above 1 affects the result.
* Division truncates toward zero. The product `delta * t` is rounded half away
  from zero. A clipped end point is within about 2 units of the exact value.
  When `t0'` and `t1'` are less than about 1e-6 apart, the accept/reject
  decision can differ from exact arithmetic.

The published ALU also has a 32-bit floating-point mode. It is not built here,
because no format is specified for it.

## Modules

| file | role |
|------|------|
| `rtl/plc_pkg.sv` | word type, fixed-point constants, ALU opcodes, step encoding, cycle budgets |
| `rtl/plc_clipping_subsystem.sv` | top: controller, exchange network, four GPs; ports described below |
| `rtl/plc_controller.sv` | step controller shared by the GPs: table of step budgets, input handshake, step 6/step 1 overlap, output stall |
| `rtl/geometry_processor.sv` | one GP: LR1..4, TR1..4, CR1..4, `NUM_ALU` ALUs (two are used), microprogram sequencer, I/O buffer; `ROLE` 0..3 = left, right, bottom, top |
| `rtl/gp_sequencer.sv` | a GP's microprogram sequencer and its role-specific control store |
| `rtl/gp_alu.sv` | multi-cycle ALU: add/sub (9 cycles), mul/div (51), min/max (3), all saturating |
| `rtl/gp_exchange.sv` | register exchange between GPs, its pattern chosen by the step |
| `rtl/io_buffer.sv` | FIFO used as each GP's output I/O buffer |

### Top-level ports (`plc_clipping_subsystem`)

* `win_we`, `win_xl`, `win_xr`, `win_yb`, `win_yt`: write the window into
  CR1 of GP5..GP8. Write only while the subsystem is idle.
* `in_valid`, `in_ready`, `in_first`, `in_x`, `in_y`: one point per handshake.
* `out_valid`, `out_ready`, `out_visible`, `out_x0`, `out_y0`, `out_x1`,
  `out_y1`: one result per segment. When `out_visible` is 0 the segment is
  rejected and the coordinates mean nothing.
* `stalled`: high while step 6 waits for room in the output buffers.

Parameters: `NUM_ALU` (4 ALUs per GP; at least 2) and `BUF_DEPTH` (2 entries
per I/O buffer).

## Where this design departs from or adds to the published description

* The printed algorithm negates the quotient for all four edges and writes
  min for t0' and max for t1'. Both contradict the defining equations, which
  are followed here: `t_2 = Q_2/dx`, `t_4 = Q_4/dy`, `t0' = max(...)` and
  `t1' = min(...)`.
* A segment that only touches the window (`t0' = t1'`) is visible, and a
  segment lying exactly on an edge (`Q = 0`) is inside. Both follow the
  inclusive inequalities rather than the strict tests in the printed steps.
* The control is split in two. One step controller is shared by all four GPs
  and keeps them in lock-step. Each GP also has its own microprogram for the
  work inside a step. The microinstruction format and the store's contents
  are this design's own.
* These are this design's own choices: the valid/ready handshakes, the strip
  start flag, the window write port, the I/O buffer depth, the visible flag
  carried with each result, and stalling step 6 when the buffers are full.
* Only the 2D configuration with four GPs is built. The 3D extension would add
  two GPs for z and the edges `z_front` and `z_back`.
* Throughput: 141 cycles per segment is about 945 segments per 1/30 s at
  4 MHz. The published estimate is about 3800, roughly four times more. This
  design processes one segment at a time and does not reach it.
* The Matrix and Scaling subsystems around this one are not included. The
  input port stands for the Matrix Subsystem's output buffers, and the output
  port is where the Scaling Subsystem would connect.

## Testbenches

Each testbench is self-checking and ends with a `TB_RESULT checks=N failures=M`
line.

* `tb/tb_plc_clipping_subsystem.sv`: end to end at the default parameters.
  Random line strips are clipped against several windows, including small ones
  and ones with coordinates up to ±4,000,000. The testbench checks each result
  against exact clipping done in `real` arithmetic: the visibility must match,
  and the end points must be within ±3. In its first phase it also checks the
  141-cycle schedule: a latency of 142 cycles to `out_valid`, and consecutive
  points accepted 141 cycles apart. It counts vertical, horizontal and
  zero-length segments, swaps, rejections, trivially accepted and clipped
  segments, strip starts and output stalls, and fails if any of them never
  occurred.
* `tb/tb_geometry_processor.sv`: one left-edge GP and one top-edge GP. The
  testbench plays both the controller and the exchange network, and checks
  TR1, TR4 and the output after each step.
* `tb/tb_gp_sequencer.sv`: a left-edge and a top-edge sequencer against an
  ALU model, with random conditions. It checks the words each step completes,
  in order, and the cycle in which each step ends.
* `tb/tb_plc_frame.sv`: one 1/30 s frame at 4 MHz (133,333 cycles) with a
  point always waiting. It expects 945 segments out and checks each one.
* `tb/tb_gp_alu.sv`: every operation against a 64-bit integer model,
  including the saturation corners, and checks the exact latency of each.
* `tb/tb_plc_controller.sv`: the step schedule, overlapped step 6/step 1,
  strip starts and stalls.
* `tb/tb_gp_exchange.sv` and `tb/tb_io_buffer.sv`: the exchange patterns, and
  FIFO order, full and empty.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl rtl/plc_pkg.sv \
        rtl/gp_alu.sv rtl/io_buffer.sv rtl/gp_exchange.sv rtl/plc_controller.sv \
        rtl/gp_sequencer.sv rtl/geometry_processor.sv rtl/plc_clipping_subsystem.sv \
        tb/tb_plc_clipping_subsystem.sv --top-module tb_plc_clipping_subsystem
    ./obj_dir/Vtb_plc_clipping_subsystem

The end-to-end run takes well under a second. To change the arithmetic, edit
`plc_pkg.sv`: `WORD_W`, `T_FRAC`, the operation latencies and the step
budgets. The ALU checks at elaboration that the multiply/divide slot is long
enough for its 46-step divider.
