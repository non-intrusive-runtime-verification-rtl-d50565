// tb_task_monitor: the task-runtime property on generated call/return
// traces. The testbench plays executions of one task (call, then return
// after a random runtime) interleaved with unrelated events, and computes
// independently: runtime = return time - call time at each return, the
// number of threshold violations in a row, the error level (three in a row)
// and the overrun pulse (threshold ticks after a call with no return yet).
// Runtimes are chosen around the threshold so that all outcomes occur; the
// threshold is rewritten once during the run.
module tb_task_monitor;
  import rvmon_pkg::*;
  localparam logic [7:0] CALL = 8'd2, RET = 8'd5;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  obs_event_t evt;
  logic [31:0] now = 32'd0, threshold = 32'd20;
  stream_t runtime, violations;
  logic error, overrun, report;
  int checks = 0, failures = 0;
  int n_viol = 0, n_ok = 0, n_err = 0, n_ovr = 0, n_clr_ok = 0;
  // reference state
  int call_t = -1, ref_cnt = 0, due = -1;
  logic ref_err = 0;

  task_monitor dut (.clk, .rst_n, .clr, .evt, .now, .call_id(CALL), .ret_id(RET),
                    .threshold, .runtime, .violations, .error, .overrun, .report);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one timestamp; kind 0 none, 1 call, 2 return, 3 other event
  task automatic tick(input int kind);
    logic exp_rt_v, exp_ovr, rise;
    int rt;
    evt = '0;
    evt.ts = now;
    if (kind != 0) begin
      evt.valid = 1'b1;
      evt.id    = (kind == 1) ? CALL : (kind == 2) ? RET : 8'd7;
      evt.value = $urandom;
      evt.addr  = $urandom;
    end
    // reference
    exp_ovr  = (due >= 0) && (int'(now) >= due);
    exp_rt_v = (kind == 2) && (call_t >= 0);
    rt       = int'(now) - call_t;
    rise     = 0;
    if (exp_rt_v) begin
      if (rt > int'(threshold)) begin ref_cnt++; n_viol++; end
      else begin ref_cnt = 0; n_ok++; end
      if (ref_cnt >= 3 && !ref_err) begin ref_err = 1; rise = 1; n_err++; end
    end
    #1;
    checks++;
    if (runtime.valid !== exp_rt_v || (exp_rt_v && runtime.value !== 32'(rt))) begin
      failures++;
      if (failures < 10) $display("t=%0d runtime %b %0d, expected %b %0d", now, runtime.valid, runtime.value, exp_rt_v, rt);
    end
    checks++;
    if (violations.valid !== exp_rt_v || (exp_rt_v && violations.value !== 32'(ref_cnt))) begin
      failures++;
      if (failures < 10) $display("t=%0d violations %b %0d, expected %0d", now, violations.valid, violations.value, ref_cnt);
    end
    checks++;
    if (error !== ref_err || overrun !== exp_ovr || report !== (rise || exp_ovr)) begin
      failures++;
      if (failures < 10) $display("t=%0d error %b/%b overrun %b/%b report %b", now, error, ref_err, overrun, exp_ovr, report);
    end
    if (exp_ovr) n_ovr++;
    @(posedge clk);
    // reference state update
    if (kind == 1) begin
      call_t = int'(now);
      due    = (threshold != 0) ? int'(now) + int'(threshold) : -1;
    end else if (kind == 2 || exp_ovr) begin
      due = -1;
    end
    #1;
    now = now + 1;
  endtask

  initial begin
    evt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    tick(0);
    tick(2);                                 // a return before any call: no runtime
    for (int e = 0; e < 60; e++) begin
      int len;
      if (e == 30) threshold = 32'd12;
      // runs of 4 long executions make errors; others mostly short
      len = ((e / 6) % 2 == 1) ? int'(threshold) + 1 + int'($urandom % 5)
                               : int'(threshold) - 5 + int'($urandom % 7);
      tick(1);
      for (int k = 1; k < len; k++) tick(($urandom % 6 == 0) ? 3 : 0);
      tick(2);
      repeat ($urandom % 4) tick(0);
      if (e == 40) begin
        // monitor clear: state back to reset
        clr = 1'b1; @(posedge clk); #1 clr = 1'b0;
        call_t = -1; ref_cnt = 0; ref_err = 0; due = -1; n_clr_ok++;
        // the constant nodes re-emit after clear
      end
    end
    checks++; if (n_viol < 5 || n_ok < 5 || n_err < 1 || n_ovr < 5 || n_clr_ok < 1) failures++;
    $display("violations=%0d within=%0d errors=%0d overruns=%0d", n_viol, n_ok, n_err, n_ovr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
