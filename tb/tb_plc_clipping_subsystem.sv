// tb_plc_clipping_subsystem: end-to-end test of the clipping subsystem at its
// default parameters.
//
// Random line strips are clipped against several windows. Every segment is
// also clipped by a reference model in real arithmetic (the classic
// parametric test: for each boundary p*t <= q, reject when p = 0 and q < 0,
// else narrow [t0, t1]); the visibility decision must agree and visible end
// points must be within 3 units of the exact ones. Segments whose exact
// t0' and t1' are closer than 1e-5 are counted but not compared, as the
// fixed-point t cannot decide them.
//
// Timing: in the first phase the output is always ready and points come
// back-to-back; every result must appear 142 cycles after its point was
// accepted (141 cycles of clipping, then one cycle through the I/O buffer)
// and consecutive segment points must be accepted exactly 141 cycles apart.
// Later phases throttle the consumer to force output stalls.
//
// Each mechanism must occur at least once: vertical and horizontal segments
// (infinite t), swaps in step 3 (negative dx and dy), rejection, trivial
// acceptance, real clipping, single-point segments, new-strip points and
// output stalls.
module tb_plc_clipping_subsystem;
  import plc_pkg::*;

  localparam int unsigned WATCHDOG = 3_000_000;
  localparam int unsigned LATENCY  = SEGMENT_CYCLES + 1;

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

  typedef struct {
    bit  vis;
    bit  ambiguous;
    real x0, y0, x1, y1;
  } expect_t;

  expect_t     exp_q[$];
  longint      acc_q[$];
  int          checks = 0, failures = 0;
  longint      cyc = 0;
  int          phase = 0;
  longint      last_acc = -1;
  bit          last_acc_seg = 1'b0;
  int          n_out = 0;

  // mechanism counters
  int n_vert = 0, n_horz = 0, n_swapx = 0, n_swapy = 0, n_rej = 0, n_inside = 0;
  int n_clipped = 0, n_point = 0, n_first = 0, n_stall = 0, n_ambig = 0;

  real rxl, rxr, ryb, ryt;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Reference clipping of (ax, ay) -> (bx, by) in real arithmetic
  function automatic expect_t reference(int ax, int ay, int bx, int by);
    expect_t e;
    real p[4], q[4], t0, t1, r;
    real dx = real'(bx - ax), dy = real'(by - ay);
    bit  rej = 1'b0;
    p = '{-dx, dx, -dy, dy};
    q = '{real'(ax) - rxl, rxr - real'(ax), real'(ay) - ryb, ryt - real'(ay)};
    t0 = 0.0;
    t1 = 1.0;
    for (int i = 0; i < 4; i++) begin
      if (p[i] == 0.0) begin
        if (q[i] < 0.0) rej = 1'b1;
      end else begin
        r = q[i] / p[i];
        if (p[i] < 0.0) begin if (r > t0) t0 = r; end
        else begin if (r < t1) t1 = r; end
      end
    end
    e.vis = !rej && (t0 <= t1);
    e.ambiguous = !rej && (rabs(t1 - t0) < 1.0e-5);
    e.x0 = real'(ax) + dx * t0;
    e.y0 = real'(ay) + dy * t0;
    e.x1 = real'(ax) + dx * t1;
    e.y1 = real'(ay) + dy * t1;
    if (e.vis && t0 == 0.0 && t1 == 1.0) n_inside++;
    else if (e.vis) n_clipped++;
    else if (!e.ambiguous) n_rej++;
    return e;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  // Monitor: input acceptance and output comparison
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (!in_first) begin
        acc_q.push_back(cyc);
        if (phase == 0 && last_acc_seg)
          check(cyc - last_acc == longint'(SEGMENT_CYCLES),
                $sformatf("segment points accepted %0d cycles apart", cyc - last_acc));
      end
      last_acc     = cyc;
      last_acc_seg = !in_first;
    end
    if (rst_n && stalled) n_stall++;
    if (rst_n && out_valid && out_ready) begin
      expect_t e;
      longint  a;
      n_out++;
      if (exp_q.size() == 0) begin
        check(1'b0, "unexpected output");
      end else begin
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        if (phase == 0)
          check(cyc - a == longint'(LATENCY),
                $sformatf("latency %0d, expected %0d", cyc - a, LATENCY));
        if (e.ambiguous) begin
          n_ambig++;
        end else begin
          check(out_visible == e.vis,
                $sformatf("visible %0b, expected %0b", out_visible, e.vis));
          if (e.vis && out_visible) begin
            check(rabs(real'(out_x0) - e.x0) <= 3.0 && rabs(real'(out_y0) - e.y0) <= 3.0 &&
                  rabs(real'(out_x1) - e.x1) <= 3.0 && rabs(real'(out_y1) - e.y1) <= 3.0,
                  $sformatf("end points (%0d,%0d)-(%0d,%0d), expected (%.1f,%.1f)-(%.1f,%.1f)",
                            out_x0, out_y0, out_x1, out_y1, e.x0, e.y0, e.x1, e.y1));
          end
        end
      end
    end
  end

  // Consumer
  always @(negedge clk) begin
    if (phase == 0)      out_ready <= 1'b1;
    else if (phase == 1) out_ready <= (cyc % 1000) < 40;  // long pauses: the buffers fill
    else                 out_ready <= ($urandom_range(0, 99) < 15);
  end

  task automatic set_window(int xl, int xr, int yb, int yt);
    @(negedge clk);
    win_we = 1'b1;
    win_xl = word_t'(xl); win_xr = word_t'(xr);
    win_yb = word_t'(yb); win_yt = word_t'(yt);
    rxl = real'(xl); rxr = real'(xr); ryb = real'(yb); ryt = real'(yt);
    @(negedge clk);
    win_we = 1'b0;
  endtask

  task automatic send(int x, int y, bit first, bit gaps);
    if (gaps) repeat ($urandom_range(0, 3)) @(negedge clk);
    else @(negedge clk);
    in_valid = 1'b1;
    in_first = first;
    in_x = word_t'(x);
    in_y = word_t'(y);
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(0, hi - lo));
  endfunction

  // One strip of random points; scale sets the coordinate range
  task automatic strip(int len, int scale, bit gaps);
    int px, py, x, y, kind;
    px = rnd(-scale, scale);
    py = rnd(-scale, scale);
    send(px, py, 1'b1, gaps);
    n_first++;
    for (int k = 1; k < len; k++) begin
      kind = rnd(0, 99);
      x = rnd(-scale, scale);
      y = rnd(-scale, scale);
      if (kind < 15) x = px;                              // vertical
      else if (kind < 30) y = py;                         // horizontal
      else if (kind < 33) begin x = px; y = py; end       // single point
      else if (kind < 45) begin                           // inside the window
        x = rnd(int'(rxl), int'(rxr));
        y = rnd(int'(ryb), int'(ryt));
      end else if (kind < 50) x = int'(rxl);              // on a boundary
      if (x == px && y == py) n_point++;
      else if (x == px) n_vert++;
      else if (y == py) n_horz++;
      if (x < px) n_swapx++;
      if (y < py) n_swapy++;
      exp_q.push_back(reference(px, py, x, y));
      send(x, y, 1'b0, gaps);
      px = x;
      py = y;
    end
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    set_window(-1000, 1500, -800, 1200);

    // phase 0: timing, output always ready, back-to-back points
    phase = 0;
    for (int s = 0; s < 15; s++) strip(rnd(2, 6), 3000, 1'b0);
    drain();

    // phase 1: throttled consumer, gaps between points
    phase = 1;
    for (int s = 0; s < 60; s++) strip(rnd(2, 6), 3000, 1'b1);
    drain();

    // phase 2: other windows, large coordinates
    for (int w = 0; w < 4; w++) begin
      automatic int xl = rnd(-3_000_000, 0);
      automatic int yb = rnd(-3_000_000, 0);
      set_window(xl, xl + rnd(1, 3_000_000), yb, yb + rnd(1, 3_000_000));
      phase = 2;
      for (int s = 0; s < 40; s++) strip(rnd(2, 6), (s % 2 == 1) ? 4_000_000 : 3_500_000, 1'b1);
      drain();
    end

    // phase 3: a small window
    set_window(10, 20, -5, 5);
    for (int s = 0; s < 40; s++) strip(rnd(2, 6), 40, 1'b1);
    drain();

    $display("outputs %0d: vertical %0d horizontal %0d point %0d swap_x %0d swap_y %0d",
             n_out, n_vert, n_horz, n_point, n_swapx, n_swapy);
    $display("inside %0d clipped %0d rejected %0d ambiguous %0d first %0d stall-cycles %0d",
             n_inside, n_clipped, n_rej, n_ambig, n_first, n_stall);
    check(n_vert > 0,    "no vertical segment");
    check(n_horz > 0,    "no horizontal segment");
    check(n_point > 0,   "no single-point segment");
    check(n_swapx > 0,   "no x swap");
    check(n_swapy > 0,   "no y swap");
    check(n_inside > 0,  "no segment fully inside");
    check(n_clipped > 0, "no clipped segment");
    check(n_rej > 0,     "no rejected segment");
    check(n_first > 0,   "no strip start");
    check(n_stall > 0,   "no output stall");
    check(n_out > 0,     "no output");
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
