// tb_gp_exchange: self-checking test of the register exchange network.
//
// For every step and random register contents it checks which register each
// GP receives: the same-axis partner's TR1 in step 3 (GP5<->GP6, GP7<->GP8),
// the other axis's TR1 in step 4 (GP5<->GP7, GP6<->GP8), the same-axis
// partner's TR4 in step 5, and zero in the other steps.
module tb_gp_exchange;
  import plc_pkg::*;

  step_e step = STEP_IDLE;
  word_t tr1 [4];
  word_t tr4 [4];
  word_t xch [4];
  int    checks = 0, failures = 0;
  bit    finished = 1'b0;

  // partner tables, GP5..GP8 as 0..3
  localparam int SAME_AXIS [4] = '{1, 0, 3, 2};
  localparam int OTHER_AXIS[4] = '{2, 3, 0, 1};

  gp_exchange dut (.*);

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int s = 0; s < 7; s++) begin
        step = step_e'(s);
        for (int i = 0; i < 4; i++) begin
          tr1[i] = word_t'($urandom);
          tr4[i] = word_t'($urandom);
        end
        #1;
        for (int i = 0; i < 4; i++) begin
          word_t want;
          unique case (step)
            STEP_SIGN:   want = tr1[SAME_AXIS[i]];
            STEP_MINMAX: want = tr1[OTHER_AXIS[i]];
            STEP_ENDPT:  want = tr4[SAME_AXIS[i]];
            default:     want = '0;
          endcase
          checks++;
          if (xch[i] !== want) begin
            failures++;
            if (failures < 20) $display("FAIL step %s GP%0d: %h, expected %h", step.name(), i + 5, xch[i], want);
          end
        end
      end
    end
    finished = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    if (!finished) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
