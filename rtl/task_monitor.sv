// task_monitor: the runtime-verification monitor of the task use case.
//
// Watches one task through two observed events, its call and its return,
// and evaluates this stream specification, one node per operator:
//     runtime    := on(return, time(return) - time(call))
//     violations := resetcount(runtime, runtime <= threshold)
//     error      := violations >= ERR_LIMIT
//     overrun    := delay(on(call, threshold), return)
// runtime is the task's execution time in time base ticks, updated at each
// return. violations counts returns in a row whose runtime exceeded the
// threshold and drops to 0 at the first one that did not. error rises when
// ERR_LIMIT (3) violations in a row have been seen: the task's result was then
// missing three executions running. overrun pulses when a running task
// reaches its threshold without having returned, so it can be cancelled
// before it returns. The first three lines and the limit of three follow the
// specification; overrun is this design's addition, built from the delay
// operator, and error is kept as a level until clr.
//
// Interface: evt/now from the system observer; call_id, ret_id and threshold
// from the configuration; report pulses with each rise of error and each
// overrun. All outputs belong to the cycle of the event that caused them.
module task_monitor
  import rvmon_pkg::*;
#(
  parameter int unsigned ERR_LIMIT = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  obs_event_t       evt,
  input  logic [TS_W-1:0]  now,
  input  logic [ID_W-1:0]  call_id,
  input  logic [ID_W-1:0]  ret_id,
  input  logic [VAL_W-1:0] threshold,
  output stream_t          runtime,
  output stream_t          violations,
  output logic             error,
  output logic             overrun,
  output logic             report
);

  stream_t call_s, ret_s;
  stream_t t_call, t_ret, diff, thr, ok, lim, err_s, thr_call, ovr;

  always_comb begin
    call_s.valid = evt.valid && (evt.id == call_id);
    call_s.value = evt.value;
    ret_s.valid  = evt.valid && (evt.id == ret_id);
    ret_s.value  = evt.value;
  end

  tessla_time u_tcall (.x(call_s), .now(now), .y(t_call));
  tessla_time u_tret  (.x(ret_s),  .now(now), .y(t_ret));

  tessla_lift #(.OP(LIFT_SUB)) u_diff (
    .clk, .rst_n, .clr, .a(t_ret), .b(t_call), .y(diff)
  );

  tessla_on u_runtime (
    .clk, .rst_n, .clr, .trigger(ret_s), .x(diff), .y(runtime)
  );

  tessla_const u_thr (.clk, .rst_n, .clr, .value(threshold), .y(thr));

  tessla_lift #(.OP(LIFT_LE)) u_ok (
    .clk, .rst_n, .clr, .a(runtime), .b(thr), .y(ok)
  );

  tessla_resetcount u_count (
    .clk, .rst_n, .clr, .trigger(runtime), .reset(ok), .count(violations)
  );

  tessla_const u_lim (.clk, .rst_n, .clr, .value(VAL_W'(ERR_LIMIT)), .y(lim));

  tessla_lift #(.OP(LIFT_GE)) u_err (
    .clk, .rst_n, .clr, .a(violations), .b(lim), .y(err_s)
  );

  tessla_on u_thr_call (
    .clk, .rst_n, .clr, .trigger(call_s), .x(thr), .y(thr_call)
  );

  tessla_delay u_overrun (
    .clk, .rst_n, .clr, .now(now), .d(thr_call), .reset(ret_s), .y(ovr)
  );

  logic error_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         error_q <= 1'b0;
    else if (clr)                       error_q <= 1'b0;
    else if (err_s.valid && err_s.value[0]) error_q <= 1'b1;
  end

  always_comb begin
    error   = error_q || (err_s.valid && err_s.value[0]);
    overrun = ovr.valid;
    report  = (err_s.valid && err_s.value[0] && !error_q) || ovr.valid;
  end

endmodule
