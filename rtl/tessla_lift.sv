// tessla_lift: a function lifted from values to streams.
//
// Applies OP to the latest values of streams a and b and emits the result
// whenever a or b has an event, once both have had one (signal semantics: an
// operand without an event at this timestamp keeps its last value). This is
// how time(return) - time(call) or runtime > threshold are evaluated over
// streams. Lifting is the specification language's; the operator set, the
// signal semantics and unsigned arithmetic are this implementation's choices.
// Compare operators give 1 or 0; LIFT_ZERO_IF gives 0 when a is non-zero and
// b otherwise (an if-then-else with a constant 0 branch).
//
// Timing: the output is combinational in the inputs' cycle; the held operand
// values update at the clock edge. clr forgets both operands.
module tessla_lift
  import rvmon_pkg::*;
#(
  parameter lift_op_e OP = LIFT_ADD
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  stream_t a,
  input  stream_t b,
  output stream_t y
);

  logic             a_def_q, b_def_q;
  logic [VAL_W-1:0] a_q, b_q;
  logic [VAL_W-1:0] av, bv;

  always_comb begin
    av      = a.valid ? a.value : a_q;
    bv      = b.valid ? b.value : b_q;
    y.valid = (a.valid || b.valid) && (a.valid || a_def_q) && (b.valid || b_def_q);
    unique case (OP)
      LIFT_ADD:     y.value = av + bv;
      LIFT_SUB:     y.value = av - bv;
      LIFT_GT:      y.value = VAL_W'(av > bv);
      LIFT_GE:      y.value = VAL_W'(av >= bv);
      LIFT_LT:      y.value = VAL_W'(av < bv);
      LIFT_LE:      y.value = VAL_W'(av <= bv);
      LIFT_EQ:      y.value = VAL_W'(av == bv);
      LIFT_MAX:     y.value = (av > bv) ? av : bv;
      LIFT_ZERO_IF: y.value = (av != '0) ? '0 : bv;
      default:      y.value = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_def_q <= 1'b0;
      b_def_q <= 1'b0;
      a_q     <= '0;
      b_q     <= '0;
    end else if (clr) begin
      a_def_q <= 1'b0;
      b_def_q <= 1'b0;
    end else begin
      if (a.valid) begin
        a_def_q <= 1'b1;
        a_q     <= a.value;
      end
      if (b.valid) begin
        b_def_q <= 1'b1;
        b_q     <= b.value;
      end
    end
  end

endmodule
