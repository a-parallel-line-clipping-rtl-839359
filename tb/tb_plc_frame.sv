// tb_plc_frame: throughput of the clipping subsystem over one display frame.
//
// The published estimate is stated for a 4 MHz clock and a frame of 1/30 s,
// i.e. 133,333 cycles. This testbench feeds one long line strip with a point
// always waiting and the output always ready, runs for exactly one frame
// from the first point, and counts the segments whose results have come out.
// With 141 cycles per segment the count must be
//     1 + (FRAME - 143) / 141 = 945
// (the first segment ends 1 + 142 cycles after the strip start). Every result
// is also compared with exact clipping in real arithmetic (visibility must
// agree, end points within 3 units). The count is printed next to the
// published figure of about 3800 segments per frame, which this one-segment-
// at-a-time design does not reach.
module tb_plc_frame;
  import plc_pkg::*;

  localparam int CLOCK_HZ = 4_000_000;
  localparam int FRAME    = CLOCK_HZ / 30;
  localparam int WATCHDOG = FRAME + 1000;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  win_we = 1'b0;
  word_t win_xl = '0, win_xr = '0, win_yb = '0, win_yt = '0;
  logic  in_valid = 1'b0, in_first = 1'b0;
  word_t in_x = '0, in_y = '0;
  logic  in_ready;
  logic  out_valid, out_visible, stalled;
  logic  out_ready = 1'b1;
  word_t out_x0, out_y0, out_x1, out_y1;

  always #5 clk = ~clk;

  plc_clipping_subsystem dut (.*);

  localparam real XL = -1000.0, XR = 1000.0, YB = -700.0, YT = 900.0;

  typedef struct {
    bit  vis;
    bit  ambiguous;
    real x0, y0, x1, y1;
  } expect_t;

  expect_t exp_q[$];
  int      checks = 0, failures = 0, n_done = 0, n_vis = 0;
  int      cyc = 0, t0 = -1;
  int      px, py;
  bit      running = 1'b0;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic expect_t reference(int ax, int ay, int bx, int by);
    expect_t e;
    real p[4], q[4], tl, th, r;
    real dx = real'(bx - ax), dy = real'(by - ay);
    bit  rej = 1'b0;
    p = '{-dx, dx, -dy, dy};
    q = '{real'(ax) - XL, XR - real'(ax), real'(ay) - YB, YT - real'(ay)};
    tl = 0.0;
    th = 1.0;
    for (int i = 0; i < 4; i++) begin
      if (p[i] == 0.0) begin
        if (q[i] < 0.0) rej = 1'b1;
      end else begin
        r = q[i] / p[i];
        if (p[i] < 0.0) begin if (r > tl) tl = r; end
        else begin if (r < th) th = r; end
      end
    end
    e.vis = !rej && (tl <= th);
    e.ambiguous = !rej && (rabs(th - tl) < 1.0e-5);
    e.x0 = real'(ax) + dx * tl;
    e.y0 = real'(ay) + dy * tl;
    e.x1 = real'(ax) + dx * th;
    e.y1 = real'(ay) + dy * th;
    return e;
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // Source: a point is always offered; the next one is chosen once it is taken
  always @(posedge clk) begin
    if (running && in_valid && in_ready) begin
      if (t0 < 0) t0 = cyc;
      if (!in_first) exp_q.push_back(reference(px, py, int'(in_x), int'(in_y)));
      px = int'(in_x);
      py = int'(in_y);
      in_first <= 1'b0;
      in_x <= word_t'(rnd(-1500, 1500));
      in_y <= word_t'(rnd(-1500, 1500));
    end
  end

  // Sink
  always @(posedge clk) begin
    if (running && out_valid && out_ready && t0 >= 0 && cyc - t0 < FRAME) begin
      expect_t e;
      n_done++;
      e = exp_q.pop_front();
      if (!e.ambiguous) begin
        checks++;
        if (out_visible != e.vis ||
            (e.vis && (rabs(real'(out_x0) - e.x0) > 3.0 || rabs(real'(out_y0) - e.y0) > 3.0 ||
                       rabs(real'(out_x1) - e.x1) > 3.0 || rabs(real'(out_y1) - e.y1) > 3.0))) begin
          failures++;
          if (failures < 10) $display("FAIL segment %0d", n_done);
        end
        if (e.vis) n_vis++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    win_we = 1'b1;
    win_xl = word_t'(int'(XL)); win_xr = word_t'(int'(XR));
    win_yb = word_t'(int'(YB)); win_yt = word_t'(int'(YT));
    @(negedge clk);
    win_we = 1'b0;
    in_first = 1'b1;
    in_x = word_t'(rnd(-1500, 1500));
    in_y = word_t'(rnd(-1500, 1500));
    in_valid = 1'b1;
    running = 1'b1;
    wait (t0 >= 0);
    while (cyc - t0 < FRAME) @(negedge clk);
    checks++;
    if (n_done != 1 + (FRAME - 143) / int'(SEGMENT_CYCLES)) begin
      failures++;
      $display("FAIL: %0d segments in a frame, expected %0d", n_done, 1 + (FRAME - 143) / int'(SEGMENT_CYCLES));
    end
    checks++;
    if (n_vis == 0 || n_vis == n_done) failures++;  // both outcomes must occur
    $display("segments clipped in one 1/30 s frame at 4 MHz: %0d (%0d visible); published estimate about 3800",
             n_done, n_vis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
