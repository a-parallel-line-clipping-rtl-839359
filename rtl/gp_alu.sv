// gp_alu: one arithmetic unit of a Geometry Processor's Array Processing Unit.
//
// Performs one two-operand operation at a time on 24-bit words (see plc_pkg):
// saturating add and subtract on integers, min and max, multiply of an
// integer by a fixed-point t (result rounded to an integer), and divide of
// two integers giving a fixed-point t. Results that do not fit saturate to
// POS_INF / NEG_INF; a divide by zero returns the infinity with the sign of
// the dividend (zero divided by zero gives POS_INF). The GP never divides by
// zero, it tests for it first.
//
// Timing follows the published operation costs: an operation started in
// cycle c (start high) occupies cycles c .. c+LAT-1. Its result is on
// `result`, with a one-cycle `done` pulse, in its last cycle c+LAT-1, so the
// user writes it at the end of that cycle and may start the next operation
// in the same cycle. LAT is 9 for add/subtract and 51 for multiply/divide.
// The result then stays until the next operation ends.
// Compare (min/max) takes 3 cycles, a choice of this design. Multiply runs
// as a 24-step shift-and-add and divide as a 46-step restoring division;
// both finish inside their 51-cycle slot and the unit then waits out the
// slot. `start` is ignored while `busy`.
//
// The unit implements the integer mode of the published ALU only; its
// floating-point mode is not built.
module gp_alu
  import plc_pkg::*;
#(
  parameter int unsigned ADD_LAT    = ADD_CYCLES,
  parameter int unsigned MULDIV_LAT = MULDIV_CYCLES,
  parameter int unsigned CMP_LAT    = CMP_CYCLES
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output logic    busy,
  output logic    done,
  output word_t   result
);

  localparam int unsigned MAG_W  = WORD_W;           // |a| fits in 24 bits unsigned
  localparam int unsigned DIVN_W = WORD_W + T_FRAC;  // |a| << T_FRAC
  localparam int unsigned PROD_W = 2 * WORD_W;
  localparam int unsigned CNT_W  = 7;

  initial begin
    assert (ADD_LAT >= 3 && CMP_LAT >= 3) else $fatal(1, "latencies must be >= 3");
    assert (MULDIV_LAT >= DIVN_W + 3) else $fatal(1, "MULDIV_LAT too short for the divider");
  end

  alu_op_e            op_q;
  logic [CNT_W-1:0]   cnt;
  logic [6:0]         iter;
  logic               neg_q;       // sign of the multiply/divide result
  logic [MAG_W-1:0]   mag_b;       // |b|
  logic [DIVN_W-1:0]  divn;        // dividend, shifted left one bit per step
  logic [MAG_W-1:0]   rem;         // partial remainder, below |b|
  logic [DIVN_W-1:0]  quo;         // quotient
  logic [PROD_W-1:0]  prod;        // product magnitude
  logic [MAG_W-1:0]   mcand;       // |a| for the multiplier
  logic               div_by_zero;
  word_t              simple_q;    // add/sub/min/max result, ready at once
  word_t              res_next;

  function automatic logic [MAG_W-1:0] magnitude(word_t v);
    return v[WORD_W-1] ? MAG_W'(-v) : MAG_W'(v);
  endfunction

  function automatic word_t sat_add(logic signed [WORD_W:0] s);
    if (s > $signed({1'b0, POS_INF})) return POS_INF;
    if (s < $signed({1'b1, NEG_INF})) return NEG_INF;
    return word_t'(s);
  endfunction

  // Signed result from a magnitude and a sign, saturating.
  function automatic word_t sat_signed(logic [DIVN_W-1:0] m, logic neg);
    if (!neg) return (m > DIVN_W'(POS_INF)) ? POS_INF : word_t'(m);
    return (m > DIVN_W'(POS_INF) + 1) ? NEG_INF : word_t'(-m);
  endfunction

  logic [MAG_W:0]     rem_shift;
  logic [PROD_W-1:0]  prod_round;

  always_comb begin
    rem_shift  = {rem[MAG_W-1:0], divn[DIVN_W-1]};
    prod_round = prod + (PROD_W'(1) << (T_FRAC - 1));
    unique case (op_q)
      ALU_MUL: res_next = sat_signed(DIVN_W'(prod_round >> T_FRAC), neg_q);
      ALU_DIV: res_next = div_by_zero ? (neg_q ? NEG_INF : POS_INF) : sat_signed(quo, neg_q);
      default: res_next = simple_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q        <= ALU_ADD;
      cnt         <= '0;
      iter        <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      result      <= '0;
      neg_q       <= 1'b0;
      mag_b       <= '0;
      divn        <= '0;
      rem         <= '0;
      quo         <= '0;
      prod        <= '0;
      mcand       <= '0;
      div_by_zero <= 1'b0;
      simple_q    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        op_q <= op;
        busy <= 1'b1;
        unique case (op)
          ALU_ADD, ALU_SUB: cnt <= CNT_W'(ADD_LAT - 2);
          ALU_MIN, ALU_MAX: cnt <= CNT_W'(CMP_LAT - 2);
          default:          cnt <= CNT_W'(MULDIV_LAT - 2);
        endcase
        unique case (op)
          ALU_ADD: simple_q <= sat_add($signed({a[WORD_W-1], a}) + $signed({b[WORD_W-1], b}));
          ALU_SUB: simple_q <= sat_add($signed({a[WORD_W-1], a}) - $signed({b[WORD_W-1], b}));
          ALU_MIN: simple_q <= (a < b) ? a : b;
          ALU_MAX: simple_q <= (a > b) ? a : b;
          default: simple_q <= '0;
        endcase
        neg_q       <= a[WORD_W-1] ^ b[WORD_W-1];
        mag_b       <= magnitude(b);
        mcand       <= magnitude(a);
        divn        <= DIVN_W'(magnitude(a)) << T_FRAC;
        rem         <= '0;
        quo         <= '0;
        prod        <= '0;
        div_by_zero <= (b == '0);
        if (op == ALU_DIV && b == '0) neg_q <= a[WORD_W-1];
        iter        <= (op == ALU_DIV) ? 7'(DIVN_W) : (op == ALU_MUL) ? 7'(MAG_W) : 7'd0;
      end else if (busy) begin
        // iterative engines
        if (iter != 0) begin
          iter <= iter - 1'b1;
          if (op_q == ALU_DIV) begin
            divn <= divn << 1;
            if (rem_shift >= {1'b0, mag_b}) begin
              rem <= MAG_W'(rem_shift - {1'b0, mag_b});
              quo <= {quo[DIVN_W-2:0], 1'b1};
            end else begin
              rem <= MAG_W'(rem_shift);
              quo <= {quo[DIVN_W-2:0], 1'b0};
            end
          end else begin
            // shift-and-add, least significant multiplier bit first
            if (mag_b[MAG_W - int'(iter)]) prod <= prod + (PROD_W'(mcand) << (MAG_W - int'(iter)));
          end
        end
        if (cnt == 1) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= res_next;
        end
        cnt <= cnt - 1'b1;
      end
    end
  end

  // A multi-cycle engine must be finished by the end of its slot.
  assert property (@(posedge clk) disable iff (!rst_n) (busy && cnt == 1) |-> iter == 0)
    else $error("gp_alu: engine not finished at end of slot");

endmodule
