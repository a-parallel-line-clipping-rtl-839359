// gp_exchange: register exchange network between the four GPs of the
// Clipping Subsystem.
//
// Registers of different GPs may be exchanged during a step. Algorithm PLC
// needs three patterns, chosen by the step being executed:
//   step 3 (sign rearrangement): each GP sees TR1 of its partner on the same
//          axis (GP5 <-> GP6, GP7 <-> GP8), so the two can swap t values;
//   step 4 (t0', t1'): each GP sees TR1 of the GP of the same kind on the
//          other axis (GP5 <-> GP7, GP6 <-> GP8), giving it both candidates;
//   step 5 (end points): each GP sees TR4 of its same-axis partner, so a GP
//          holding t0' also has t1' and all four can test t0' <= t1'.
// In every other step the network drives zero. Index 0..3 stands for
// GP5..GP8. Purely combinational.
module gp_exchange
  import plc_pkg::*;
(
  input  step_e step,
  input  word_t tr1 [4],
  input  word_t tr4 [4],
  output word_t xch [4]
);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      unique case (step)
        STEP_SIGN:   xch[i] = tr1[i ^ 1];
        STEP_MINMAX: xch[i] = tr1[i ^ 2];
        STEP_ENDPT:  xch[i] = tr4[i ^ 1];
        default:     xch[i] = '0;
      endcase
    end
  end

endmodule
