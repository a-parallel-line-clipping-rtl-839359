// tb_geometry_processor: self-checking test of a single Geometry Processor.
//
// Two GPs, one for the left boundary (GP5) and one for the top boundary
// (GP8), are driven through complete step sequences by the testbench, which
// plays both the controller (step, step_first, load, shift with the published
// budgets 1/65/4/7/64) and the exchange network (it supplies chosen values on
// xch_in). After each step it checks the GP's visible registers against
// values computed here with 64-bit integers:
//   after step 2, TR1 = t of its boundary (Q/P, or an infinity for a
//                 segment parallel to the boundary);
//   after step 3, TR1 = the supplied partner value when delta < 0;
//   after step 4, TR4 = max(TR1, supplied, 0) (left) / min(TR1, supplied, 1) (top);
//   after step 6, the I/O buffer holds {t0' <= t1', previous + delta * TR4}.
module tb_geometry_processor;
  import plc_pkg::*;

  localparam int unsigned WATCHDOG = 2_000_000;
  localparam longint MAXV = (longint'(1) <<< (WORD_W - 1)) - 1;
  localparam longint MINV = -(longint'(1) <<< (WORD_W - 1));
  localparam longint ONE  = longint'(1) <<< T_FRAC;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  cr_we = 1'b0;
  word_t cr_data [2];
  step_e step = STEP_IDLE;
  logic  step_first = 1'b0, load = 1'b0, load_first = 1'b0, shift = 1'b0;
  word_t buf_in [2];
  word_t xch_in [2];
  word_t tr1_out [2], tr4_out [2], out_coord [2];
  logic  out_space [2], out_valid [2], out_visible [2];
  logic  out_ready = 1'b0;
  int    checks = 0, failures = 0;
  int    n_par = 0, n_swap = 0, n_vis = 0, n_rej = 0;

  always #5 clk = ~clk;

  geometry_processor #(.ROLE(ROLE_LEFT)) u_left (
    .clk, .rst_n, .cr_we, .cr_addr(2'd0), .cr_data(cr_data[0]),
    .step, .step_first, .load, .load_first, .shift,
    .buf_in(buf_in[0]), .xch_in(xch_in[0]), .tr1_out(tr1_out[0]), .tr4_out(tr4_out[0]),
    .out_space(out_space[0]), .out_valid(out_valid[0]), .out_ready,
    .out_coord(out_coord[0]), .out_visible(out_visible[0])
  );

  geometry_processor #(.ROLE(ROLE_TOP)) u_top (
    .clk, .rst_n, .cr_we, .cr_addr(2'd0), .cr_data(cr_data[1]),
    .step, .step_first, .load, .load_first, .shift,
    .buf_in(buf_in[1]), .xch_in(xch_in[1]), .tr1_out(tr1_out[1]), .tr4_out(tr4_out[1]),
    .out_space(out_space[1]), .out_valid(out_valid[1]), .out_ready,
    .out_coord(out_coord[1]), .out_visible(out_visible[1])
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic longint sat(longint v);
    return v > MAXV ? MAXV : (v < MINV ? MINV : v);
  endfunction

  function automatic longint labs(longint v);
    return v < 0 ? -v : v;
  endfunction

  // t = q / p as fixed point, truncated toward zero, saturated
  function automatic longint tdiv(longint q, longint p);
    longint m = (labs(q) <<< T_FRAC) / labs(p);
    return sat(((q < 0) != (p < 0)) ? -m : m);
  endfunction

  // d * t rounded half away from zero
  function automatic longint tmul(longint d, longint t);
    longint m = (labs(d * t) + (longint'(1) <<< (T_FRAC - 1))) >>> T_FRAC;
    return ((d < 0) != (t < 0)) ? -m : m;
  endfunction

  // Run one step: step_first in its first cycle, then hold for the budget
  task automatic run_step(step_e s, int budget, word_t x0, word_t x1);
    @(negedge clk);
    step = s;
    step_first = 1'b1;
    xch_in[0] = x0;
    xch_in[1] = x1;
    @(negedge clk);
    step_first = 1'b0;
    repeat (budget - 1) @(negedge clk);
    step = STEP_IDLE;
    xch_in[0] = '0;
    xch_in[1] = '0;
  endtask

  task automatic one_segment(longint bl, longint bt, longint p0x, longint p1x, longint p0y, longint p1y,
                             longint xs, longint xm, longint xe);
    longint d[2], q[2], t[2], tr4e[2], want;
    bit     vis[2];
    // window and the two points (GP5 takes x, GP8 takes y)
    @(negedge clk);
    cr_we = 1'b1;
    cr_data[0] = word_t'(bl);
    cr_data[1] = word_t'(bt);
    @(negedge clk);
    cr_we = 1'b0;
    load = 1'b1;
    load_first = 1'b1;
    buf_in[0] = word_t'(p0x);
    buf_in[1] = word_t'(p0y);
    @(negedge clk);
    load_first = 1'b0;
    buf_in[0] = word_t'(p1x);
    buf_in[1] = word_t'(p1y);
    @(negedge clk);
    load = 1'b0;
    // expected values
    d[0] = p1x - p0x;  q[0] = p0x - bl;   // left: P1 = -dx
    d[1] = p1y - p0y;  q[1] = bt - p0y;   // top:  P4 = dy
    if (d[0] == 0) t[0] = (q[0] >= 0) ? MINV : MAXV;
    else           t[0] = tdiv(q[0], -d[0]);
    if (d[1] == 0) t[1] = (q[1] >= 0) ? MAXV : MINV;
    else           t[1] = tdiv(q[1], d[1]);
    if (d[0] == 0 || d[1] == 0) n_par++;
    // step 2
    run_step(STEP_T, STEP2_CYCLES, '0, '0);
    check(longint'(tr1_out[0]) == t[0], $sformatf("left t %0d, expected %0d", tr1_out[0], t[0]));
    check(longint'(tr1_out[1]) == t[1], $sformatf("top t %0d, expected %0d", tr1_out[1], t[1]));
    // step 3: the partner's t arrives on xch_in
    run_step(STEP_SIGN, STEP3_CYCLES, word_t'(xs), word_t'(xs + 7));
    if (d[0] < 0) begin t[0] = xs; n_swap++; end
    if (d[1] < 0) begin t[1] = xs + 7; n_swap++; end
    check(longint'(tr1_out[0]) == t[0], $sformatf("left TR1 after step 3 %0d, expected %0d", tr1_out[0], t[0]));
    check(longint'(tr1_out[1]) == t[1], $sformatf("top TR1 after step 3 %0d, expected %0d", tr1_out[1], t[1]));
    // step 4: the other axis's t arrives
    run_step(STEP_MINMAX, STEP4_CYCLES, word_t'(xm), word_t'(xm));
    tr4e[0] = t[0] > xm ? t[0] : xm;
    if (tr4e[0] < 0) tr4e[0] = 0;
    tr4e[1] = t[1] < xm ? t[1] : xm;
    if (tr4e[1] > ONE) tr4e[1] = ONE;
    check(longint'(tr4_out[0]) == tr4e[0], $sformatf("t0' %0d, expected %0d", tr4_out[0], tr4e[0]));
    check(longint'(tr4_out[1]) == tr4e[1], $sformatf("t1' %0d, expected %0d", tr4_out[1], tr4e[1]));
    // step 5: the partner's t1' / t0' arrives
    run_step(STEP_ENDPT, STEP5_CYCLES, word_t'(xe), word_t'(xe));
    vis[0] = tr4e[0] <= xe;
    vis[1] = xe <= tr4e[1];
    // step 6
    @(negedge clk);
    shift = 1'b1;
    @(negedge clk);
    shift = 1'b0;
    for (int g = 0; g < 2; g++) begin
      check(out_valid[g] && out_visible[g] == vis[g],
            $sformatf("GP%0d visible %0b valid %0b, expected %0b", g, out_visible[g], out_valid[g], vis[g]));
      if (vis[g]) begin
        want = sat((g == 0 ? p0x : p0y) + tmul(d[g], tr4e[g]));
        check(longint'(out_coord[g]) == want,
              $sformatf("GP%0d end point %0d, expected %0d", g, out_coord[g], want));
        n_vis++;
      end else begin
        n_rej++;
      end
    end
    out_ready = 1'b1;
    @(negedge clk);
    out_ready = 1'b0;
  endtask

  function automatic longint rc();
    return longint'($urandom_range(0, 8000)) - 4000;
  endfunction

  function automatic longint rt();
    return longint'($urandom_range(0, 32'(3 * ONE))) - ONE;
  endfunction

  initial begin
    cr_data = '{default: '0};
    buf_in  = '{default: '0};
    xch_in  = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // directed: vertical and horizontal, inside and outside
    one_segment(-100, 100, 0, 0, 0, 0, ONE / 4, ONE / 2, ONE);
    one_segment(-100, 100, -200, -200, 300, 300, ONE / 4, ONE / 2, ONE);
    one_segment(-100, 100, 50, -150, 200, -300, ONE / 4, ONE / 2, ONE);
    for (int i = 0; i < 150; i++) begin
      automatic longint p0x = rc();
      automatic longint p0y = rc();
      automatic longint p1x = rc();
      automatic longint p1y = rc();
      if (i % 7 == 0) p1x = p0x;
      if (i % 11 == 0) p1y = p0y;
      one_segment(rc(), rc(), p0x, p1x, p0y, p1y, rt(), rt(), rt());
    end
    check(n_par > 0 && n_swap > 0 && n_vis > 0 && n_rej > 0,
          $sformatf("coverage: parallel %0d swap %0d visible %0d rejected %0d", n_par, n_swap, n_vis, n_rej));
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
