// plc_clipping_subsystem: parallel line clipping against a 2D window.
//
// Takes a stream of points forming line strips and, for each segment between
// consecutive points, decides whether any part of it lies in the window
// x_left <= x <= x_right, y_bottom <= y <= y_top and gives the end points of
// that visible part. The segment is written in parametric form
// (x, y) = (x0, y0) + t (dx, dy); each of four Geometry Processors (GP5..GP8,
// instances u_gp[0..3]) computes the parameter t_i where the line crosses one
// window boundary, all four in parallel. A register exchange sorts the four
// values into entering and leaving candidates, t0' = max(entering, 0) and
// t1' = min(leaving, 1), and the segment is visible when t0' <= t1'; the four
// GPs then compute x0', x1', y0', y1' in parallel. Segments parallel to an
// axis get t_i = +/-infinity and need no special path.
//
// Blocks: plc_controller (step controller), four geometry_processor (each with
// its ALUs, microprogram sequencer and I/O buffer), gp_exchange (register
// exchange network).
//
// Interface (choices of this design, the published subsystem is fed from
// and feeds other subsystems):
//   win_we loads the window (x_left, x_right, y_bottom, y_top) into CR1 of
//          GP5..GP8; write it while the subsystem is idle.
//   in_*   one point per handshake, coordinates as 24-bit integers whose
//          differences must fit 24 bits (|coordinate| < 2^22). in_first starts
//          a new strip: the point only becomes the previous point.
//   out_*  one result per segment; out_visible low means the segment is
//          rejected and the coordinates are meaningless.
// Timing: a point accepted in cycle c yields its segment's result in the
// GP I/O buffers at the end of cycle c+141; back-to-back points are accepted
// every 141 cycles. A full output buffer stalls the subsystem in step 6.
module plc_clipping_subsystem
  import plc_pkg::*;
#(
  parameter int unsigned NUM_ALU   = 4,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  // window
  input  logic  win_we,
  input  word_t win_xl,
  input  word_t win_xr,
  input  word_t win_yb,
  input  word_t win_yt,
  // points
  input  logic  in_valid,
  output logic  in_ready,
  input  logic  in_first,
  input  word_t in_x,
  input  word_t in_y,
  // clipped segments
  output logic  out_valid,
  input  logic  out_ready,
  output logic  out_visible,
  output word_t out_x0,
  output word_t out_y0,
  output word_t out_x1,
  output word_t out_y1,
  output logic  stalled
);

  step_e step;
  logic  step_first, load, load_first, shift;
  logic  out_space;
  word_t tr1 [4];
  word_t tr4 [4];
  word_t xch [4];
  word_t coord [4];
  word_t win [4];
  word_t pnt [4];
  logic  gp_space [4];
  logic  gp_valid [4];
  logic  gp_vis   [4];

  assign out_space = gp_space[0] && gp_space[1] && gp_space[2] && gp_space[3];

  plc_controller u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_first, .in_ready,
    .out_space,
    .step, .step_first, .load, .load_first, .shift, .stalled
  );

  gp_exchange u_xch (.step, .tr1, .tr4, .xch);

  assign win = '{win_xl, win_xr, win_yb, win_yt};
  assign pnt = '{in_x, in_x, in_y, in_y};

  for (genvar g = 0; g < 4; g++) begin : g_gp
    geometry_processor #(
      .ROLE(g), .NUM_ALU(NUM_ALU), .BUF_DEPTH(BUF_DEPTH)
    ) u_gp (
      .clk, .rst_n,
      .cr_we      (win_we),
      .cr_addr    (2'd0),
      .cr_data    (win[g]),
      .step, .step_first, .load, .load_first, .shift,
      .buf_in     (pnt[g]),
      .xch_in     (xch[g]),
      .tr1_out    (tr1[g]),
      .tr4_out    (tr4[g]),
      .out_space  (gp_space[g]),
      .out_valid  (gp_valid[g]),
      .out_ready  (out_valid && out_ready),
      .out_coord  (coord[g]),
      .out_visible(gp_vis[g])
    );
  end

  assign out_valid   = gp_valid[0];
  assign out_visible = gp_vis[0];
  assign out_x0      = coord[0];
  assign out_x1      = coord[1];
  assign out_y0      = coord[2];
  assign out_y1      = coord[3];

  // The four GPs run in lock-step and agree on every result.
  assert property (@(posedge clk) disable iff (!rst_n)
                   gp_valid[1] == gp_valid[0] && gp_valid[2] == gp_valid[0] && gp_valid[3] == gp_valid[0]);
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid |-> gp_vis[1] == gp_vis[0] && gp_vis[2] == gp_vis[0] && gp_vis[3] == gp_vis[0]);

endmodule
