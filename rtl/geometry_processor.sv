// geometry_processor: one Geometry Processor (GP) of the Clipping Subsystem.
//
// A GP holds four Local Registers LR1..LR4, four Temporary Registers
// TR1..TR4, four Curve Registers CR1..CR4, an Array Processing Unit of
// NUM_ALU arithmetic units (gp_alu), a microprogram sequencer with its
// control store (gp_sequencer) and an output I/O buffer (io_buffer).
// Four GPs, one per window boundary, clip a segment together. ROLE selects
// the boundary: 0 left (GP5, x), 1 right (GP6, x), 2 bottom (GP7, y),
// 3 top (GP8, y). CR1 holds that boundary's coordinate; LR1 receives the new
// point's x (roles 0, 1) or y (roles 2, 3) and LR2 keeps the previous one.
//
// What the GP does in each step of Algorithm PLC (ALU 0 and 1 are used;
// the algorithm never needs more than two at once):
//   step 1: LR1 <= coordinate (a first point of a strip also sets LR2).
//   step 2: LR3 = LR1 - LR2 (delta) and LR4 = Q (LR2 - CR1 for the left and
//           bottom boundaries, CR1 - LR2 for right and top) in parallel, 9
//           cycles. If delta is 0 the segment is parallel to the boundary and
//           TR1 becomes an infinity: -inf when the segment lies on the inner
//           side of the boundary (Q >= 0) and +inf otherwise for left/bottom,
//           the opposite for right/top. Else TR1 = Q / P with P = -delta for
//           left/bottom and P = delta for right/top, 51 cycles.
//   step 3: if delta < 0, TR1 is swapped with the same-axis partner, so GP5
//           and GP7 now hold the candidates for t0' (P < 0) and GP6 and GP8
//           those for t1' (P > 0). A zero delta counts as positive.
//   step 4: TR2 <= TR1 of the other axis, then TR4 = max(TR1, TR2, 0) (GP5,
//           GP7: t0') or min(TR1, TR2, 1) (GP6, GP8: t1'), two 3-cycle compares.
//   step 5: with the partner's TR4, test t0' <= t1'. If the segment is
//           visible, LR4 = LR2 + LR3 * TR4 (51 + 9 cycles): x0', x1', y0' or
//           y1' by role.
//   step 6: LR2 <= LR1 and {visible, LR4} goes into the I/O buffer.
// Steps 1 and 6 are fixed register transfers; steps 2..5 run from the
// control store, and TR3 holds the product LR3 * TR4 in step 5.
// Each step must end within the budget the controller gives it; an
// assertion checks that the GP is idle when a new step opens.
//
// Choices of this design: a boundary distance Q of exactly 0 counts as
// inside, and a segment with t0' = t1' (touching the window in one point) is
// visible. The exchange inputs come from gp_exchange. Window registers may be
// written with cr_we at any time; a write takes effect for the next segment.
module geometry_processor
  import plc_pkg::*;
#(
  parameter int unsigned ROLE      = ROLE_LEFT,
  parameter int unsigned NUM_ALU   = 4,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // curve register write port
  input  logic       cr_we,
  input  logic [1:0] cr_addr,
  input  word_t      cr_data,
  // from the controller
  input  step_e      step,
  input  logic       step_first,
  input  logic       load,
  input  logic       load_first,
  input  logic       shift,
  // coordinate from the preceding subsystem's buffer
  input  word_t      buf_in,
  // register exchange
  input  word_t      xch_in,
  output word_t      tr1_out,
  output word_t      tr4_out,
  // I/O buffer
  output logic       out_space,
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      out_coord,
  output logic       out_visible
);

  localparam bit UPPER = ROLE[0];  // right or top boundary

  initial assert (NUM_ALU >= 2 && ROLE <= 3) else $fatal(1, "geometry_processor: bad parameters");

  word_t  lr [1:4];
  word_t  tr [1:4];
  word_t  cr [1:4];
  logic   vis_q;  // t0' <= t1'

  // Array Processing Unit
  logic    alu_start [NUM_ALU];
  alu_op_e alu_op    [NUM_ALU];
  word_t   alu_a     [NUM_ALU];
  word_t   alu_b     [NUM_ALU];
  logic    alu_busy  [NUM_ALU];
  logic    alu_done  [NUM_ALU];
  word_t   alu_res   [NUM_ALU];

  for (genvar k = 0; k < NUM_ALU; k++) begin : g_alu
    gp_alu u_alu (
      .clk, .rst_n,
      .start (alu_start[k]),
      .op    (alu_op[k]),
      .a     (alu_a[k]),
      .b     (alu_b[k]),
      .busy  (alu_busy[k]),
      .done  (alu_done[k]),
      .result(alu_res[k])
    );
  end

  // Microprogram sequencer and control store
  uinstr_t ui;
  logic    ui_exec, ui_issue, ui_retire, ui_busy, cond_true;

  gp_sequencer #(.ROLE(ROLE)) u_seq (
    .clk, .rst_n,
    .step, .step_first,
    .alu_done (alu_done[0]),
    .cond_true,
    .uinstr   (ui),
    .exec     (ui_exec),
    .issue    (ui_issue),
    .retire   (ui_retire),
    .busy     (ui_busy)
  );

  function automatic word_t neg_sat(word_t v);
    return (v == NEG_INF) ? POS_INF : -v;
  endfunction

  // t_i of a segment parallel to this boundary, from Q
  function automatic word_t parallel_t(word_t q);
    if (UPPER) return q[WORD_W-1] ? NEG_INF : POS_INF;
    else       return q[WORD_W-1] ? POS_INF : NEG_INF;
  endfunction

  // Source operand selection
  function automatic word_t src(src_e s);
    unique case (s)
      S_LR1:     return lr[1];
      S_LR2:     return lr[2];
      S_LR3:     return lr[3];
      S_LR4:     return lr[4];
      S_TR1:     return tr[1];
      S_TR2:     return tr[2];
      S_TR3:     return tr[3];
      S_TR4:     return tr[4];
      S_CR1:     return cr[1];
      S_XCH:     return xch_in;
      S_ZERO:    return T_ZERO;
      S_ONE:     return T_ONE;
      S_NEG_LR3: return neg_sat(lr[3]);
      S_INF_LR4: return parallel_t(lr[4]);
      default:   return '0;
    endcase
  endfunction

  always_comb begin
    unique case (ui.cond)
      C_ALWAYS:   cond_true = 1'b1;
      C_LR3_ZERO: cond_true = lr[3] == '0;
      C_LR3_NEG:  cond_true = lr[3][WORD_W-1];
      C_NOT_VIS:  cond_true = !vis_q;
      default:    cond_true = 1'b0;
    endcase
  end

  always_comb begin
    for (int k = 0; k < NUM_ALU; k++) begin
      alu_start[k] = 1'b0;
      alu_op[k]    = ALU_ADD;
      alu_a[k]     = '0;
      alu_b[k]     = '0;
    end
    alu_start[0] = ui_issue;
    alu_op[0]    = ui.op0;
    alu_a[0]     = src(ui.a0);
    alu_b[0]     = src(ui.b0);
    alu_start[1] = ui_issue && ui.dual;
    alu_op[1]    = ui.op1;
    alu_a[1]     = src(ui.a1);
    alu_b[1]     = src(ui.b1);
  end

  // Register writes of the current word
  logic  w0_en, w1_en;
  word_t w0_val;

  assign w0_en  = ui_retire && (ui.kind == U_ALU || (ui.kind == U_MOVE && cond_true));
  assign w0_val = (ui.kind == U_ALU) ? alu_res[0] : src(ui.a0);
  assign w1_en  = ui_retire && ui.kind == U_ALU && ui.dual;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 1; j <= 4; j++) begin
        lr[j] <= '0;
        tr[j] <= '0;
        cr[j] <= '0;
      end
      vis_q <= 1'b0;
    end else begin
      if (cr_we) cr[int'(cr_addr) + 1] <= cr_data;
      // steps 6 and 1 (they may share a cycle)
      if (shift) lr[2] <= lr[1];
      if (load) begin
        lr[1] <= buf_in;
        if (load_first) lr[2] <= buf_in;
      end
      // steps 2..5, from the control store
      if (ui_retire && ui.kind == U_VIS) vis_q <= !(src(ui.a0) > src(ui.b0));
      if (w0_en) begin
        unique case (ui.d0)
          D_LR3: lr[3] <= w0_val;
          D_LR4: lr[4] <= w0_val;
          D_TR1: tr[1] <= w0_val;
          D_TR2: tr[2] <= w0_val;
          D_TR3: tr[3] <= w0_val;
          D_TR4: tr[4] <= w0_val;
          default: ;
        endcase
      end
      if (w1_en) begin
        unique case (ui.d1)
          D_LR3: lr[3] <= alu_res[1];
          D_LR4: lr[4] <= alu_res[1];
          D_TR1: tr[1] <= alu_res[1];
          D_TR2: tr[2] <= alu_res[1];
          D_TR3: tr[3] <= alu_res[1];
          D_TR4: tr[4] <= alu_res[1];
          default: ;
        endcase
      end
    end
  end

  assign tr1_out = tr[1];
  assign tr4_out = tr[4];

  // I/O buffer: {visible, LR4}
  logic [WORD_W:0] ob_data;

  io_buffer #(.WIDTH(WORD_W + 1), .DEPTH(BUF_DEPTH)) u_iobuf (
    .clk, .rst_n,
    .in_valid (shift),
    .in_ready (out_space),
    .in_data  ({vis_q, lr[4]}),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_data (ob_data)
  );

  assign out_visible = ob_data[WORD_W];
  assign out_coord   = word_t'(ob_data[WORD_W-1:0]);

  // Every step finishes within its budget: the GP is idle when the next opens.
  assert property (@(posedge clk) disable iff (!rst_n) step_first |-> !ui_busy)
    else $error("geometry_processor: step overran its cycle budget");
  // ALUs are only started when free; a dual word's ALUs finish together
  assert property (@(posedge clk) disable iff (!rst_n) alu_start[0] |-> !alu_busy[0])
    else $error("geometry_processor: ALU 0 started while busy");
  assert property (@(posedge clk) disable iff (!rst_n) alu_start[1] |-> !alu_busy[1])
    else $error("geometry_processor: ALU 1 started while busy");
  assert property (@(posedge clk) disable iff (!rst_n) ui_retire && ui.kind == U_ALU && ui.dual |-> alu_done[1])
    else $error("geometry_processor: dual word finished out of step");
  // Words only complete while executing, and a last word ends the microprogram
  assert property (@(posedge clk) disable iff (!rst_n) ui_retire |-> ui_exec)
    else $error("geometry_processor: word completed outside a microprogram");
  assert property (@(posedge clk) disable iff (!rst_n) ui_retire && ui.last |=> !ui_busy)
    else $error("geometry_processor: microprogram ran past its last word");
  assert property (@(posedge clk) disable iff (!rst_n) shift |-> out_space)
    else $error("geometry_processor: output buffer overflow");

endmodule
