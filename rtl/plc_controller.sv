// plc_controller: step sequencer of the Clipping Subsystem.
//
// Runs Algorithm PLC (parallel line clipping) over a stream of points. The
// four Geometry Processors execute each step of the algorithm together, so a
// single sequencer broadcasts the current step to all of them. Its table
// gives, for each step, its cycle budget and the step that follows. Within a
// step each GP runs its own microprogram (gp_sequencer); the controller only
// opens and closes the steps.
//
// Per segment (published budgets): step 1 load, 1 cycle; step 2 (deltas,
// Q_i, t_i) 65; step 3 (sign rearrangement) 4; step 4 (t0', t1') 7; step 5
// (end points) 64. Step 6 (shift LR2 <= LR1 and output LR4) takes one cycle
// that is also step 1 of the next point when one is waiting, so a point
// accepted in cycle c gives its result in cycle c+141 and a continuous
// stream runs at one segment per 141 cycles.
//
// Interface and choices of this design: a point is accepted (in_valid and
// in_ready high together) only in the idle state or in the step-6 cycle. A
// point marked in_first starts a new line strip: it is loaded as both end
// points and produces no segment. If the GPs' output buffers are full in the
// step-6 cycle (out_space low) the controller stalls in step 6 until there
// is room; that is the only stall.
module plc_controller
  import plc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // point input handshake
  input  logic  in_valid,
  input  logic  in_first,
  output logic  in_ready,
  // output buffers can take a result
  input  logic  out_space,
  // broadcast to the GPs
  output step_e step,        // step in progress
  output logic  step_first,  // first cycle of step 2..5
  output logic  load,        // step 1 this cycle: LR1 <= input
  output logic  load_first,  // the loaded point starts a new strip
  output logic  shift,       // step 6 this cycle: LR2 <= LR1, output LR4
  output logic  stalled      // in step 6 waiting for output space
);

  typedef struct packed {
    logic [6:0] budget;
    step_e      next;
  } cs_word_t;

  // Step table: budget and successor of each step
  function automatic cs_word_t control_store(step_e s);
    unique case (s)
      STEP_T:      return '{budget: 7'(STEP2_CYCLES), next: STEP_SIGN};
      STEP_SIGN:   return '{budget: 7'(STEP3_CYCLES), next: STEP_MINMAX};
      STEP_MINMAX: return '{budget: 7'(STEP4_CYCLES), next: STEP_ENDPT};
      STEP_ENDPT:  return '{budget: 7'(STEP5_CYCLES), next: STEP_SHIFT};
      default:     return '{budget: 7'd1, next: STEP_IDLE};
    endcase
  endfunction

  step_e      state;
  logic [6:0] cnt;         // cycles already spent in the current step
  cs_word_t   cs;
  logic       accept;

  assign cs         = control_store(state);
  assign in_ready   = (state == STEP_IDLE) || (state == STEP_SHIFT && out_space);
  assign accept     = in_valid && in_ready;
  assign load       = accept;
  assign load_first = accept && in_first;
  assign shift      = (state == STEP_SHIFT) && out_space;
  assign stalled    = (state == STEP_SHIFT) && !out_space;
  assign step       = accept ? STEP_LOAD : state;
  assign step_first = (state inside {STEP_T, STEP_SIGN, STEP_MINMAX, STEP_ENDPT}) && cnt == 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= STEP_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        STEP_IDLE, STEP_SHIFT: begin
          if (state == STEP_IDLE || out_space) begin
            if (accept && !in_first) state <= STEP_T;
            else                     state <= STEP_IDLE;
          end
          cnt <= '0;
        end
        default: begin
          if (cnt == cs.budget - 1) begin
            state <= cs.next;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      endcase
    end
  end

  // A result is never lost: step 6 only completes with room in the buffers.
  assert property (@(posedge clk) disable iff (!rst_n) shift |-> out_space);
  // No point is taken while a segment is being clipped.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state inside {STEP_T, STEP_SIGN, STEP_MINMAX, STEP_ENDPT}) |-> !in_ready);

endmodule
