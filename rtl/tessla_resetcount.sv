// tessla_resetcount: resetcount(trigger, reset) - a counter with reset.
//
// Counts the events of trigger and returns to zero at a trigger event where
// reset holds a true (non-zero) value. It is built from operator nodes,
// recursively, as
//     count := if on(trigger, reset) then 0 else last(count, trigger) + 1
// with last() taken as 0 before the first count. The loop closes through
// last(), whose output comes from registers, so there is no combinational
// cycle. The counter's meaning follows the specification; the recursive
// construction is this implementation's.
//
// Timing: count has an event in the same cycle as each trigger event, once
// reset has had a value; its value is the new count.
module tessla_resetcount
  import rvmon_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  stream_t trigger,
  input  stream_t reset,
  output stream_t count
);

  stream_t prev, one, inc, rst_now;

  tessla_last #(.HAS_INIT(1'b1), .INIT('0)) u_prev (
    .clk, .rst_n, .clr, .v(count), .trigger(trigger), .y(prev)
  );

  tessla_const u_one (
    .clk, .rst_n, .clr, .value(VAL_W'(1)), .y(one)
  );

  tessla_lift #(.OP(LIFT_ADD)) u_inc (
    .clk, .rst_n, .clr, .a(prev), .b(one), .y(inc)
  );

  tessla_on u_rst_now (
    .clk, .rst_n, .clr, .trigger(trigger), .x(reset), .y(rst_now)
  );

  tessla_lift #(.OP(LIFT_ZERO_IF)) u_count (
    .clk, .rst_n, .clr, .a(rst_now), .b(inc), .y(count)
  );

endmodule
