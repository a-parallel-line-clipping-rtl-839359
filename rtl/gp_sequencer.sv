// gp_sequencer: microprogram sequencer and control store of one Geometry
// Processor.
//
// Each GP runs its share of Algorithm PLC from a small control store. The
// controller opens a step with step_first; the sequencer dispatches to that
// step's microprogram in the same cycle and steps a microprogram counter
// through it until a word marked last (or a taken exit) ends it. Steps 1 and 6
// are plain register transfers done by the GP itself and have no microprogram.
//
// Word kinds (see plc_pkg::uinstr_t):
//   U_ALU   start ALU 0 (and ALU 1 when dual) in the word's first cycle, wait
//           for ALU 0 to finish, then write the result(s); both ALUs of a dual
//           word run operations of the same latency.
//   U_MOVE  one cycle; when the condition holds, d0 <= a0.
//   U_EXIT  one cycle; when the condition holds, the microprogram ends.
//   U_VIS   one cycle; the visible flag <= !(a0 > b0).
// The datapath evaluates the word's condition and returns it as cond_true.
//
// The contents differ by ROLE (left/bottom take maxima and divide by -delta,
// right/top take minima and divide by delta). Cycles used, counting the
// step's first cycle as 0: step 2 ends in cycle 61 at most (budget 65),
// step 3 in cycle 0 (4), step 4 in cycle 6 (7), step 5 in cycle 61 (64).
module gp_sequencer
  import plc_pkg::*;
#(
  parameter int unsigned ROLE = ROLE_LEFT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  step_e   step,
  input  logic    step_first,
  input  logic    alu_done,   // ALU 0 finished
  input  logic    cond_true,  // condition of the current word holds
  output uinstr_t uinstr,     // current word
  output logic    exec,       // a word is executing in this cycle
  output logic    issue,      // start the ALU(s) of the current word
  output logic    retire,     // the current word completes in this cycle
  output logic    busy        // a microprogram is under way
);

  localparam bit UPPER = ROLE[0];  // right or top boundary

  localparam logic [3:0] ENTRY_T      = 4'd0;
  localparam logic [3:0] ENTRY_SIGN   = 4'd4;
  localparam logic [3:0] ENTRY_MINMAX = 4'd5;
  localparam logic [3:0] ENTRY_ENDPT  = 4'd8;

  function automatic uinstr_t alu1(alu_op_e op, src_e a, src_e b, dst_e d, logic last);
    uinstr_t u = '0;
    u.kind = U_ALU;
    u.cond = C_ALWAYS;
    u.op0  = op;
    u.a0   = a;
    u.b0   = b;
    u.d0   = d;
    u.last = last;
    return u;
  endfunction

  function automatic uinstr_t move(cond_e c, src_e a, dst_e d, logic last);
    uinstr_t u = '0;
    u.kind = U_MOVE;
    u.cond = c;
    u.a0   = a;
    u.d0   = d;
    u.last = last;
    return u;
  endfunction

  function automatic uinstr_t exit_if(cond_e c);
    uinstr_t u = '0;
    u.kind = U_EXIT;
    u.cond = c;
    return u;
  endfunction

  // Control store
  function automatic uinstr_t control_store(logic [3:0] addr);
    uinstr_t u = '0;
    unique case (addr)
      // step 2: LR3 = delta, LR4 = Q; TR1 = Q / P, or an infinity if delta = 0
      4'd0: begin
        u = alu1(ALU_SUB, S_LR1, S_LR2, D_LR3, 1'b0);
        u.dual = 1'b1;
        u.op1  = ALU_SUB;
        u.a1   = UPPER ? S_CR1 : S_LR2;
        u.b1   = UPPER ? S_LR2 : S_CR1;
        u.d1   = D_LR4;
      end
      4'd1: u = move(C_LR3_ZERO, S_INF_LR4, D_TR1, 1'b0);
      4'd2: u = exit_if(C_LR3_ZERO);
      4'd3: u = alu1(ALU_DIV, S_LR4, UPPER ? S_LR3 : S_NEG_LR3, D_TR1, 1'b1);
      // step 3: take the partner's t when delta < 0
      4'd4: u = move(C_LR3_NEG, S_XCH, D_TR1, 1'b1);
      // step 4: TR2 = other axis's t; TR4 = max(TR1, TR2, 0) or min(TR1, TR2, 1)
      4'd5: u = move(C_ALWAYS, S_XCH, D_TR2, 1'b0);
      4'd6: u = alu1(UPPER ? ALU_MIN : ALU_MAX, S_TR1, S_TR2, D_TR4, 1'b0);
      4'd7: u = alu1(UPPER ? ALU_MIN : ALU_MAX, S_TR4, UPPER ? S_ONE : S_ZERO, D_TR4, 1'b1);
      // step 5: visible = t0' <= t1'; if visible LR4 = LR2 + LR3 * TR4
      4'd8: begin
        u.kind = U_VIS;
        u.a0   = UPPER ? S_XCH : S_TR4;
        u.b0   = UPPER ? S_TR4 : S_XCH;
      end
      4'd9:  u = exit_if(C_NOT_VIS);
      4'd10: u = alu1(ALU_MUL, S_LR3, S_TR4, D_TR3, 1'b0);
      4'd11: u = alu1(ALU_ADD, S_LR2, S_TR3, D_LR4, 1'b1);
      default: u = exit_if(C_ALWAYS);
    endcase
    return u;
  endfunction

  logic [3:0] upc;
  logic       active;
  logic       issued;  // the current ALU word has started its ALU(s)
  logic [3:0] addr;
  logic       entry_ok;
  logic [3:0] entry;

  always_comb begin
    entry_ok = 1'b1;
    unique case (step)
      STEP_T:      entry = ENTRY_T;
      STEP_SIGN:   entry = ENTRY_SIGN;
      STEP_MINMAX: entry = ENTRY_MINMAX;
      STEP_ENDPT:  entry = ENTRY_ENDPT;
      default: begin
        entry    = '0;
        entry_ok = 1'b0;
      end
    endcase
  end

  assign addr   = step_first ? entry : upc;
  assign exec   = step_first ? entry_ok : active;
  assign uinstr = control_store(addr);
  assign issue  = exec && uinstr.kind == U_ALU && !issued;
  assign retire = exec && (uinstr.kind != U_ALU || (issued && alu_done));
  assign busy   = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc    <= '0;
      active <= 1'b0;
      issued <= 1'b0;
    end else if (retire) begin
      issued <= 1'b0;
      if (uinstr.last || (uinstr.kind == U_EXIT && cond_true)) begin
        active <= 1'b0;
      end else begin
        active <= 1'b1;
        upc    <= addr + 4'd1;
      end
    end else if (exec) begin
      active <= 1'b1;
      upc    <= addr;
      if (issue) issued <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) step_first |-> !active)
    else $error("gp_sequencer: microprogram still running when a new step opens");

endmodule
