// tb_gp_alu: self-checking test of one GP arithmetic unit.
//
// Runs directed edge cases and random operations of every kind and compares
// each result with a model written with 64-bit integers: saturating add and
// subtract, min, max, multiply by a fixed-point t rounded half away from
// zero, and divide giving a fixed-point t truncated toward zero, with
// saturation to the infinities. It also checks the latency of every
// operation (9 cycles add/subtract, 51 multiply/divide, 3 compare: done in
// the last cycle) and that `busy` covers the operation.
module tb_gp_alu;
  import plc_pkg::*;

  localparam int unsigned WATCHDOG = 200_000;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    start = 1'b0;
  alu_op_e op = ALU_ADD;
  word_t   a = '0, b = '0;
  logic    busy, done;
  word_t   result;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  gp_alu dut (.*);

  localparam longint MAXV = (longint'(1) <<< (WORD_W - 1)) - 1;
  localparam longint MINV = -(longint'(1) <<< (WORD_W - 1));

  function automatic longint sat(longint v);
    if (v > MAXV) return MAXV;
    if (v < MINV) return MINV;
    return v;
  endfunction

  function automatic longint labs(longint v);
    return v < 0 ? -v : v;
  endfunction

  function automatic longint model(alu_op_e o, longint x, longint y);
    longint m;
    unique case (o)
      ALU_ADD: return sat(x + y);
      ALU_SUB: return sat(x - y);
      ALU_MIN: return x < y ? x : y;
      ALU_MAX: return x > y ? x : y;
      ALU_MUL: begin
        m = (labs(x * y) + (longint'(1) <<< (T_FRAC - 1))) >>> T_FRAC;
        return sat(((x < 0) != (y < 0)) ? -m : m);
      end
      default: begin
        if (y == 0) return (x < 0) ? MINV : MAXV;
        m = (labs(x) <<< T_FRAC) / labs(y);
        return sat(((x < 0) != (y < 0)) ? -m : m);
      end
    endcase
  endfunction

  function automatic int latency(alu_op_e o);
    unique case (o)
      ALU_ADD, ALU_SUB: return ADD_CYCLES;
      ALU_MIN, ALU_MAX: return CMP_CYCLES;
      default:          return MULDIV_CYCLES;
    endcase
  endfunction

  task automatic run(alu_op_e o, longint x, longint y);
    int     k;
    longint want;
    bit     busy_ok = 1'b1;
    @(negedge clk);
    start = 1'b1;
    op = o;
    a = word_t'(x);
    b = word_t'(y);
    @(negedge clk);
    start = 1'b0;
    a = word_t'($urandom);  // operands need only be held in the start cycle
    b = word_t'($urandom);
    k = 1;
    while (!done && k < 100) begin
      if (!busy) busy_ok = 1'b0;
      @(negedge clk);
      k++;
    end
    want = model(o, x, y);
    checks++;
    if (k != latency(o) - 1 || !busy_ok || longint'(result) != want) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s(%0d, %0d): got %0d after %0d cycles, expected %0d after %0d",
                 o.name(), x, y, result, k + 1, want, latency(o));
    end
  endtask

  function automatic longint rword();
    int unsigned kind = $urandom_range(0, 3);
    int unsigned side = $urandom_range(0, 1);
    longint      near = longint'($urandom_range(0, 3));
    int unsigned sh   = $urandom_range(0, 22);
    word_t       w    = word_t'($urandom);
    unique case (kind)
      0: return longint'(w);
      1: return longint'($urandom_range(0, 2000)) - 1000;
      2: return (side == 1) ? MAXV - near : MINV + near;
      default: return longint'(w) >>> sh;
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // directed cases
    run(ALU_ADD, MAXV, 5);
    run(ALU_SUB, MINV, 1);
    run(ALU_SUB, 1000, -2000);
    run(ALU_DIV, 3, 4);
    run(ALU_DIV, -3, 4);
    run(ALU_DIV, 9, 4);           // 2.25 saturates
    run(ALU_DIV, 5, 0);
    run(ALU_DIV, -5, 0);
    run(ALU_DIV, 0, 7);
    run(ALU_DIV, MINV, MINV);
    run(ALU_MUL, 1000, 1 << (T_FRAC - 1));
    run(ALU_MUL, -1001, 1 << (T_FRAC - 1));
    run(ALU_MUL, MAXV, MAXV);
    run(ALU_MUL, MINV, 1 << T_FRAC);
    run(ALU_MIN, -4, 3);
    run(ALU_MAX, -4, 3);
    // random cases
    for (int i = 0; i < 1500; i++) begin
      run(alu_op_e'($urandom_range(0, 5)), rword(), rword());
    end
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
