// plc_pkg: types and constants shared by the parallel line clipping datapath.
//
// Number formats. Every register holds a WORD_W-bit two's-complement word.
// Coordinates, deltas (dx, dy) and boundary distances (Q_i) are plain integers.
// Line parameters t are fixed point with T_FRAC fraction bits, so t = 1.0 is
// 1 << T_FRAC. The largest and smallest words stand for +infinity and
// -infinity; a quotient that does not fit saturates to them, which is safe
// because only where t lies relative to [0, 1] matters to the clipper.
// The 24-bit word follows the integer mode of the Geometry Processor ALU;
// the fixed-point split of t is this design's choice.
//
// Step timing. Algorithm PLC runs in steps whose cycle budgets follow the
// published count of 141 cycles per segment: 1 (load), 65 (dx/dy, Q_i, t_i),
// 4 (sign rearrangement), 7 (t0', t1'), 64 (end points). Step 6 (shift and
// output) overlaps step 1 of the next segment. Operation latencies are
// 9 cycles for add/subtract and 51 for multiply/divide; the 3-cycle compare
// is this design's choice, made so that step 4 fits its 7 cycles.
package plc_pkg;

  localparam int unsigned WORD_W = 24;
  localparam int unsigned T_FRAC = 22;

  typedef logic signed [WORD_W-1:0] word_t;

  localparam word_t POS_INF = word_t'({1'b0, {(WORD_W-1){1'b1}}});
  localparam word_t NEG_INF = word_t'({1'b1, {(WORD_W-1){1'b0}}});
  localparam word_t T_ZERO  = '0;
  localparam word_t T_ONE   = word_t'(1) <<< T_FRAC;

  // Operation latencies in cycles
  localparam int unsigned ADD_CYCLES    = 9;
  localparam int unsigned MULDIV_CYCLES = 51;
  localparam int unsigned CMP_CYCLES    = 3;

  // Step budgets in cycles
  localparam int unsigned STEP1_CYCLES = 1;
  localparam int unsigned STEP2_CYCLES = 65;
  localparam int unsigned STEP3_CYCLES = 4;
  localparam int unsigned STEP4_CYCLES = 7;
  localparam int unsigned STEP5_CYCLES = 64;
  localparam int unsigned SEGMENT_CYCLES =
      STEP1_CYCLES + STEP2_CYCLES + STEP3_CYCLES + STEP4_CYCLES + STEP5_CYCLES;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,  // a + b, saturating
    ALU_SUB = 3'd1,  // a - b, saturating
    ALU_MUL = 3'd2,  // a * b / 2^T_FRAC, rounded, saturating (integer times t)
    ALU_DIV = 3'd3,  // a * 2^T_FRAC / b, truncated, saturating (Q / P as t)
    ALU_MIN = 3'd4,  // smaller of a, b
    ALU_MAX = 3'd5   // larger of a, b
  } alu_op_e;

  // Steps of Algorithm PLC as broadcast by the controller
  typedef enum logic [2:0] {
    STEP_IDLE  = 3'd0,
    STEP_LOAD  = 3'd1,  // step 1: load new coordinate into LR1
    STEP_T     = 3'd2,  // step 2: dx/dy, Q_i and t_i
    STEP_SIGN  = 3'd3,  // step 3: exchange t_i so signs read - + - +
    STEP_MINMAX= 3'd4,  // step 4: t0' and t1'
    STEP_ENDPT = 3'd5,  // step 5: visible end points
    STEP_SHIFT = 3'd6   // step 6: LR2 <= LR1 and output LR4
  } step_e;

  // Microinstructions of the GP control store (see gp_sequencer)
  typedef enum logic [3:0] {
    S_LR1, S_LR2, S_LR3, S_LR4, S_TR1, S_TR2, S_TR3, S_TR4,
    S_CR1, S_XCH, S_ZERO, S_ONE,
    S_NEG_LR3,  // -LR3, saturating
    S_INF_LR4   // the infinity t of a segment parallel to the boundary, from Q in LR4
  } src_e;

  typedef enum logic [2:0] {
    D_NONE, D_LR3, D_LR4, D_TR1, D_TR2, D_TR3, D_TR4
  } dst_e;

  typedef enum logic [1:0] {
    C_ALWAYS,   // unconditional
    C_LR3_ZERO, // delta is zero
    C_LR3_NEG,  // delta is negative
    C_NOT_VIS   // segment found invisible in step 5
  } cond_e;

  typedef enum logic [1:0] {
    U_ALU,   // start ALU 0 (and ALU 1 if dual), wait for ALU 0, write d0 (and d1)
    U_MOVE,  // if cond: d0 <= a0 (register transfer, one cycle)
    U_EXIT,  // if cond: end the step's microprogram here
    U_VIS    // visible flag <= !(a0 > b0)
  } ukind_e;

  typedef struct packed {
    ukind_e  kind;
    cond_e   cond;
    alu_op_e op0;
    src_e    a0;
    src_e    b0;
    dst_e    d0;
    logic    dual;
    alu_op_e op1;
    src_e    a1;
    src_e    b1;
    dst_e    d1;
    logic    last;  // the step's microprogram ends after this word
  } uinstr_t;

  // Role of a GP: which window boundary it owns.
  // GP5 left (x), GP6 right (x), GP7 bottom (y), GP8 top (y).
  localparam int unsigned ROLE_LEFT   = 0;
  localparam int unsigned ROLE_RIGHT  = 1;
  localparam int unsigned ROLE_BOTTOM = 2;
  localparam int unsigned ROLE_TOP    = 3;

endpackage
