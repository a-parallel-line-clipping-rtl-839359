// tb_plc_controller: self-checking test of the step sequencer.
//
// Feeds points (some starting a new strip, some with gaps, some
// back-to-back) and sometimes withholds output space. For each segment it
// checks the published schedule relative to the cycle c in which the point
// was accepted: step 2 opens at c+1, step 3 at c+66, step 4 at c+70,
// step 5 at c+77 and step 6 (shift) at c+141 plus any cycles stalled for
// output space. It also checks that no point is accepted while a segment is
// in steps 2..5, that a strip-start point opens no step, and that stalls
// happen only when output space is missing.
module tb_plc_controller;
  import plc_pkg::*;

  localparam int unsigned WATCHDOG = 200_000;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0, in_first = 1'b0, out_space = 1'b1;
  logic  in_ready;
  step_e step;
  logic  step_first, load, load_first, shift, stalled;
  int    checks = 0, failures = 0;
  longint cyc = 0;
  longint t_acc = -1;
  int     stall_cnt = 0;
  bit     in_seg = 1'b0;
  int     n_seg = 0, n_first = 0, n_stall = 0, n_b2b = 0;

  always #5 clk = ~clk;

  plc_controller dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  localparam int OFF_SIGN   = 1 + int'(STEP2_CYCLES);
  localparam int OFF_MINMAX = OFF_SIGN + int'(STEP3_CYCLES);
  localparam int OFF_ENDPT  = OFF_MINMAX + int'(STEP4_CYCLES);
  localparam int SEG        = int'(SEGMENT_CYCLES);

  function automatic int offset(step_e s);
    unique case (s)
      STEP_T:      return 1;
      STEP_SIGN:   return OFF_SIGN;
      STEP_MINMAX: return OFF_MINMAX;
      STEP_ENDPT:  return OFF_ENDPT;
      default:     return -1;
    endcase
  endfunction

  // Monitor at mid-cycle, when every signal has settled
  always @(negedge clk) begin
    if (rst_n) begin
      if (step_first) begin
        check(in_seg && int'(cyc - t_acc) == offset(step),
              $sformatf("step %s opened %0d cycles after the point", step.name(), cyc - t_acc));
      end
      if (stalled) begin
        check(!out_space, "stall with output space");
        stall_cnt++;
        n_stall++;
      end
      if (shift) begin
        check(in_seg && int'(cyc - t_acc) == SEG + stall_cnt,
              $sformatf("shift %0d cycles after the point, %0d stalled", cyc - t_acc, stall_cnt));
        in_seg = 1'b0;
        n_seg++;
      end
      if (in_seg && !shift && !stalled) check(!in_ready, "ready during a segment");
      if (load) begin
        check(in_valid && in_ready, "load without handshake");
        check(load_first == in_first, "load_first mismatch");
        if (in_first) begin
          n_first++;
        end else begin
          if (shift) n_b2b++;
          t_acc = cyc;
          stall_cnt = 0;
          in_seg = 1'b1;
        end
      end
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      // in_valid and out_space are changed just after a rising edge
      @(posedge clk);
      #1;
      in_valid = ($urandom_range(0, 99) < (i % 3 == 0 ? 100 : 20));
      in_first = ($urandom_range(0, 99) < 20);
      out_space = (i % 4 != 1) || ($urandom_range(0, 99) < 10);
      repeat ($urandom_range(1, 400)) begin
        @(posedge clk);
        #1;
        if (i % 4 == 1) out_space = ($urandom_range(0, 99) < 10);
        if ($urandom_range(0, 99) < 10) in_first = ($urandom_range(0, 99) < 20);
      end
    end
    in_valid = 1'b0;
    out_space = 1'b1;
    repeat (300) @(posedge clk);
    check(!in_seg, "segment never finished");
    check(n_seg > 10 && n_first > 0 && n_stall > 0 && n_b2b > 0,
          $sformatf("coverage: %0d segments, %0d strip starts, %0d stall cycles, %0d back-to-back",
                    n_seg, n_first, n_stall, n_b2b));
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
