// tb_gp_sequencer: self-checking test of the GP microprogram sequencer.
//
// Two sequencers, one for the left boundary and one for the top boundary,
// are driven through complete step sequences with the published budgets
// (65, 4, 7, 64 cycles for steps 2..5). The testbench models the ALU (done
// 9 cycles after an add/subtract starts, 51 after a multiply/divide, 3 after
// a compare, counting the start cycle as 1) and supplies the datapath
// conditions (delta zero, delta negative, segment invisible), which are
// chosen at random for each segment. For every step it checks:
//   - the words completed, in order, against the expected microprogram for
//     the role and conditions (operation, operands, destination);
//   - the cycle, counted from the step's first cycle, in which the last word
//     completes: step 2 cycle 10 (parallel) or 61, step 3 cycle 0, step 4
//     cycle 6, step 5 cycle 1 (invisible) or 61;
//   - that the sequencer is idle when the next step opens and that an ALU is
//     never started while busy.
module tb_gp_sequencer;
  import plc_pkg::*;

  localparam int unsigned WATCHDOG = 500_000;
  localparam int unsigned NSEG     = 300;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  step_e   step = STEP_IDLE;
  logic    step_first = 1'b0;
  bit      f_zero = 1'b0, f_neg = 1'b0, f_invis = 1'b0;
  int      checks = 0, failures = 0;
  longint  cyc = 0, t_step = 0;
  int      n_zero = 0, n_neg = 0, n_invis = 0;

  uinstr_t uinstr  [2];
  logic    exec    [2];
  logic    issue   [2];
  logic    retire  [2];
  logic    busy    [2];
  logic    alu_done[2];
  logic    cond_true[2];
  uinstr_t trace   [2][$];
  int      last_off[2];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_dut
    localparam int unsigned ROLE = (g == 0) ? ROLE_LEFT : ROLE_TOP;

    gp_sequencer #(.ROLE(ROLE)) u_seq (
      .clk, .rst_n, .step, .step_first,
      .alu_done (alu_done[g]),
      .cond_true(cond_true[g]),
      .uinstr   (uinstr[g]),
      .exec     (exec[g]),
      .issue    (issue[g]),
      .retire   (retire[g]),
      .busy     (busy[g])
    );

    always_comb begin
      unique case (uinstr[g].cond)
        C_ALWAYS:   cond_true[g] = 1'b1;
        C_LR3_ZERO: cond_true[g] = f_zero;
        C_LR3_NEG:  cond_true[g] = f_neg;
        C_NOT_VIS:  cond_true[g] = f_invis;
        default:    cond_true[g] = 1'b0;
      endcase
    end

    // ALU model
    int m_cnt = 0;
    bit m_busy = 1'b0;
    assign alu_done[g] = m_busy && m_cnt == 0;

    always @(posedge clk) begin
      if (rst_n && issue[g]) begin
        check(!m_busy, $sformatf("seq%0d: ALU started while busy", g));
        m_busy <= 1'b1;
        unique case (uinstr[g].op0)
          ALU_ADD, ALU_SUB: m_cnt <= int'(ADD_CYCLES) - 2;
          ALU_MUL, ALU_DIV: m_cnt <= int'(MULDIV_CYCLES) - 2;
          default:          m_cnt <= int'(CMP_CYCLES) - 2;
        endcase
      end else if (m_busy) begin
        if (m_cnt == 0) m_busy <= 1'b0;
        else m_cnt <= m_cnt - 1;
      end
      if (rst_n && retire[g]) begin
        trace[g].push_back(uinstr[g]);
        last_off[g] = int'(cyc - t_step);
      end
    end
  end

  // The fields that matter for each kind of word
  function automatic string sig(uinstr_t u);
    unique case (u.kind)
      U_ALU: return u.dual ?
        $sformatf("ALU %s %s,%s->%s | %s %s,%s->%s", u.op0.name(), u.a0.name(), u.b0.name(), u.d0.name(),
                  u.op1.name(), u.a1.name(), u.b1.name(), u.d1.name()) :
        $sformatf("ALU %s %s,%s->%s", u.op0.name(), u.a0.name(), u.b0.name(), u.d0.name());
      U_MOVE:  return $sformatf("MOVE if %s %s->%s", u.cond.name(), u.a0.name(), u.d0.name());
      U_EXIT:  return $sformatf("EXIT if %s", u.cond.name());
      U_VIS:   return $sformatf("VIS !(%s>%s)", u.a0.name(), u.b0.name());
      default: return "?";
    endcase
  endfunction

  function automatic uinstr_t w_alu(alu_op_e op, src_e a, src_e b, dst_e d);
    uinstr_t u = '0;
    u.kind = U_ALU;
    u.op0 = op;
    u.a0 = a;
    u.b0 = b;
    u.d0 = d;
    return u;
  endfunction

  function automatic uinstr_t w_move(cond_e c, src_e a, dst_e d);
    uinstr_t u = '0;
    u.kind = U_MOVE;
    u.cond = c;
    u.a0 = a;
    u.d0 = d;
    return u;
  endfunction

  function automatic uinstr_t w_exit(cond_e c);
    uinstr_t u = '0;
    u.kind = U_EXIT;
    u.cond = c;
    return u;
  endfunction

  // Run one step and compare both sequencers with the expected microprogram
  task automatic run_step(step_e s, int budget);
    uinstr_t exp_w [2][$];
    int      exp_end;
    for (int g = 0; g < 2; g++) begin
      automatic bit up = (g == 1);
      trace[g].delete();
      last_off[g] = -1;
      unique case (s)
        STEP_T: begin
          automatic uinstr_t u = w_alu(ALU_SUB, S_LR1, S_LR2, D_LR3);
          u.dual = 1'b1;
          u.op1 = ALU_SUB;
          u.a1 = up ? S_CR1 : S_LR2;
          u.b1 = up ? S_LR2 : S_CR1;
          u.d1 = D_LR4;
          exp_w[g].push_back(u);
          exp_w[g].push_back(w_move(C_LR3_ZERO, S_INF_LR4, D_TR1));
          exp_w[g].push_back(w_exit(C_LR3_ZERO));
          if (!f_zero) exp_w[g].push_back(w_alu(ALU_DIV, S_LR4, up ? S_LR3 : S_NEG_LR3, D_TR1));
        end
        STEP_SIGN: exp_w[g].push_back(w_move(C_LR3_NEG, S_XCH, D_TR1));
        STEP_MINMAX: begin
          exp_w[g].push_back(w_move(C_ALWAYS, S_XCH, D_TR2));
          exp_w[g].push_back(w_alu(up ? ALU_MIN : ALU_MAX, S_TR1, S_TR2, D_TR4));
          exp_w[g].push_back(w_alu(up ? ALU_MIN : ALU_MAX, S_TR4, up ? S_ONE : S_ZERO, D_TR4));
        end
        default: begin
          automatic uinstr_t u = '0;
          u.kind = U_VIS;
          u.a0 = up ? S_XCH : S_TR4;
          u.b0 = up ? S_TR4 : S_XCH;
          exp_w[g].push_back(u);
          exp_w[g].push_back(w_exit(C_NOT_VIS));
          if (!f_invis) begin
            exp_w[g].push_back(w_alu(ALU_MUL, S_LR3, S_TR4, D_TR3));
            exp_w[g].push_back(w_alu(ALU_ADD, S_LR2, S_TR3, D_LR4));
          end
        end
      endcase
    end
    unique case (s)
      STEP_T:      exp_end = f_zero ? 10 : 61;
      STEP_SIGN:   exp_end = 0;
      STEP_MINMAX: exp_end = 6;
      default:     exp_end = f_invis ? 1 : 61;
    endcase
    // drive the step (the caller is at a falling edge)
    check(!busy[0] && !busy[1], $sformatf("busy when step %s opens", s.name()));
    step = s;
    step_first = 1'b1;
    t_step = cyc;  // the count the next rising edge will see
    @(negedge clk);
    step_first = 1'b0;
    repeat (budget - 1) @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      check(trace[g].size() == exp_w[g].size(),
            $sformatf("seq%0d step %s: %0d words, expected %0d", g, s.name(), trace[g].size(), exp_w[g].size()));
      for (int k = 0; k < trace[g].size() && k < exp_w[g].size(); k++)
        check(sig(trace[g][k]) == sig(exp_w[g][k]),
              $sformatf("seq%0d step %s word %0d: %s, expected %s", g, s.name(), k,
                        sig(trace[g][k]), sig(exp_w[g][k])));
      check(last_off[g] == exp_end,
            $sformatf("seq%0d step %s ended in cycle %0d, expected %0d", g, s.name(), last_off[g], exp_end));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < NSEG; i++) begin
      f_zero  = ($urandom_range(0, 3) == 0);
      f_neg   = !f_zero && ($urandom_range(0, 1) == 1);
      f_invis = ($urandom_range(0, 1) == 1);
      if (f_zero) n_zero++;
      if (f_neg) n_neg++;
      if (f_invis) n_invis++;
      run_step(STEP_T, int'(STEP2_CYCLES));
      run_step(STEP_SIGN, int'(STEP3_CYCLES));
      run_step(STEP_MINMAX, int'(STEP4_CYCLES));
      run_step(STEP_ENDPT, int'(STEP5_CYCLES));
      step = STEP_IDLE;
      // sometimes leave a gap, as when the next point is late
      if (i % 3 == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
      else @(negedge clk);  // the load step
    end
    check(!busy[0] && !busy[1], "busy at the end");
    check(n_zero > 0 && n_neg > 0 && n_invis > 0 && n_invis < int'(NSEG),
          $sformatf("coverage: %0d parallel, %0d negative, %0d invisible", n_zero, n_neg, n_invis));
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
