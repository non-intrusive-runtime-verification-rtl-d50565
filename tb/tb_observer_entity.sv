// tb_observer_entity: end-to-end run of the observer entity at its default
// size.
//
// Software-side setup goes through the management port: the event table
// gets a task's entry and exit instruction addresses (call, return), a
// watched variable (write), an interrupt vector and an address range, the
// monitor gets call/return obsIDs and a runtime threshold, then the time
// base and the observer are enabled. The testbench then plays a processor's
// bus traffic: executions of the task with chosen runtimes, unrelated fetches
// and accesses, and interrupt vectors, some colliding with transfers.
//
// Checked against a model kept by the testbench: every event leaving the
// system observer (obsID and timestamp, the timestamps from a copy of the
// time base rule), every runtime, the violation count, the error level,
// the number of overrun pulses, the alarm interrupt and the status and
// configuration read-back. Each mechanism - event match, deferred and
// dropped interrupt vector, runtime within and over the threshold, error,
// overrun, alarm and its clear, monitor clear, prescaled time base,
// disabled observer - must happen at least once.
module tb_observer_entity;
  import rvmon_pkg::*;
  localparam logic [31:0] TASK_ENTRY = 32'h4000_1000, TASK_EXIT = 32'h4000_10F8;
  localparam logic [31:0] VAR_ADDR = 32'h4001_0040, RANGE_BASE = 32'h8000_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_valid = 0, bus_write = 0, bus_fetch = 0, irq_valid = 0;
  logic [31:0] bus_addr = '0, bus_data = '0;
  logic [7:0]  irq_vec = '0;
  logic mg_sel = 0, mg_wr = 0, mg_ready;
  logic [11:0] mg_addr = '0;
  logic [31:0] mg_wdata = '0, mg_rdata;
  logic alarm_irq, error, overrun;
  obs_event_t evt_out;
  stream_t runtime_out;
  logic [31:0] violations;

  observer_entity dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_match = 0, n_irq_deferred = 0, n_irq_dropped = 0, n_within = 0, n_over = 0;
  int n_error = 0, n_overrun = 0, n_alarm = 0, n_alarm_clear = 0, n_mon_clear = 0;
  int n_prescaled = 0, n_disabled = 0, n_readback = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference time base -------------------------------------------
  int ref_ts = 0, ref_div = 0, ref_pre = 0;
  logic ref_en = 0, ref_obs = 0;
  always @(posedge clk) if (rst_n) begin
    if (ref_en) begin
      if (ref_div >= ref_pre) begin ref_div = 0; ref_ts++; end
      else ref_div++;
    end
  end

  // ---- expected event stream -------------------------------------------
  typedef struct { int id; int ts; } exp_evt_t;
  exp_evt_t exp_q [$];
  int       exp_rt_q [$];
  int       thr = 0;
  int       call_t = -1, viol = 0, exp_overruns = 0, seen_overruns = 0;
  logic     err_model = 0;

  // compare what leaves the observer and the monitor
  always @(negedge clk) if (rst_n) begin
    if (evt_out.valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected event id=%0d ts=%0d", evt_out.id, evt_out.ts);
      end else begin
        exp_evt_t e;
        e = exp_q.pop_front();
        if (evt_out.id != 8'(e.id) || evt_out.ts != 32'(e.ts)) begin
          failures++;
          $display("event id=%0d ts=%0d, expected id=%0d ts=%0d", evt_out.id, evt_out.ts, e.id, e.ts);
        end
      end
    end
    if (runtime_out.valid) begin
      int rt;
      checks++;
      rt = (exp_rt_q.size() != 0) ? exp_rt_q.pop_front() : -1;
      if (runtime_out.value != 32'(rt)) begin
        failures++; $display("runtime %0d, expected %0d", runtime_out.value, rt);
      end
      if (rt > thr) begin viol++; n_over++; end else begin viol = 0; n_within++; end
      if (viol >= 3 && !err_model) begin err_model = 1; n_error++; end
      checks++;
      if (violations != 32'(viol)) begin
        failures++; $display("violations %0d, expected %0d", violations, viol);
      end
    end
    checks++;
    if (error != err_model) begin
      failures++; $display("error %b, expected %b at ts %0d", error, err_model, ref_ts);
    end
    if (overrun) begin seen_overruns++; n_overrun++; end
  end

  // ---- bus and management drivers ----------------------------------------
  task automatic cyc();
    @(posedge clk); #1;
  endtask

  task automatic mg_write(input logic [11:0] a, input logic [31:0] d);
    mg_sel = 1; mg_wr = 1; mg_addr = a; mg_wdata = d;
    cyc();
    mg_sel = 0; mg_wr = 0;
    checks++; if (!mg_ready) begin failures++; $display("no ready"); end
  endtask

  task automatic mg_read(input logic [11:0] a, output logic [31:0] d);
    mg_sel = 1; mg_wr = 0; mg_addr = a;
    cyc();
    mg_sel = 0;
    d = mg_rdata;
  endtask

  // one bus transfer; exp_id >= 0 adds an expected event with the sample's time
  task automatic xfer(input logic f, input logic w, input logic [31:0] a,
                      input logic [31:0] d, input int exp_id);
    bus_valid = 1; bus_fetch = f; bus_write = w; bus_addr = a; bus_data = d;
    cyc();
    bus_valid = 0;
    if (exp_id >= 0 && ref_obs) begin
      exp_q.push_back('{exp_id, ref_ts});
      n_match++;
    end
  endtask

  task automatic idle(input int n);
    repeat (n) cyc();
  endtask

  // one execution of the task lasting rt time base ticks (prescale 0: cycles)
  task automatic run_task(input int rt);
    int t0;
    xfer(1, 0, TASK_ENTRY, 32'h9DE3_BF98, 0);
    t0 = ref_ts;
    call_t = t0;
    while (ref_ts + 1 < t0 + rt) begin
      case ($urandom % 5)
        0: xfer(1, 0, TASK_ENTRY + 32'(4 * (1 + $urandom % 8)), $urandom, -1);
        1: xfer(0, 1, VAR_ADDR, $urandom, 2);
        2: xfer(0, 0, VAR_ADDR, $urandom, -1);       // reads of the variable are not events
        default: idle(1);
      endcase
    end
    // the return fetch is sampled at the next edge, where the time becomes t0+rt
    while (ref_ts + 1 < t0 + rt) idle(1);
    xfer(1, 0, TASK_EXIT, 32'h81C7_E008, 1);
    if (ref_ts - t0 >= thr) exp_overruns++;
    exp_rt_q.push_back(ref_ts - t0);
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    cyc();
    // event table
    mg_write(12'h100, TASK_ENTRY);   mg_write(12'h104, 32'hFFFF_FFFF); mg_write(12'h108, {27'd0, 4'b0001, 1'b1});
    mg_write(12'h110, TASK_EXIT);    mg_write(12'h114, 32'hFFFF_FFFF); mg_write(12'h118, {27'd0, 4'b0001, 1'b1});
    mg_write(12'h120, VAR_ADDR);     mg_write(12'h124, 32'hFFFF_FFFF); mg_write(12'h128, {27'd0, 4'b0100, 1'b1});
    mg_write(12'h130, 32'h0000_0009); mg_write(12'h134, 32'hFFFF_FFFF); mg_write(12'h138, {27'd0, 4'b1000, 1'b1});
    mg_write(12'h140, RANGE_BASE);   mg_write(12'h144, 32'hFFFF_F000); mg_write(12'h148, {27'd0, 4'b0110, 1'b1});
    mg_write(REG_MONIDS, 32'h0000_0100);   // call obsID 0, return obsID 1
    thr = 40;
    mg_write(REG_THRESH, 32'(thr));
    mg_read(12'h114, d);  checks++; if (d != 32'hFFFF_FFFF) begin failures++; $display("check at line %0d failed", `__LINE__); end else n_readback++;
    mg_read(12'h148, d);  checks++; if (d != 32'h0000_000D) begin failures++; $display("check at line %0d failed", `__LINE__); end else n_readback++;
    mg_read(REG_MONIDS, d); checks++; if (d != 32'h100) begin failures++; $display("check at line %0d failed", `__LINE__); end else n_readback++;
    // observer disabled: traffic must not produce events
    mg_write(REG_CTRL, 32'h2); ref_en = 1;
    xfer(1, 0, TASK_ENTRY, 0, 0);
    xfer(0, 1, VAR_ADDR, 0, 2);
    idle(3);
    if (exp_q.size() == 0) n_disabled++;
    mg_write(REG_CTRL, 32'h3); ref_obs = 1;
    // ranges and interrupts
    xfer(0, 0, RANGE_BASE + 32'h10, 32'h1, 4);
    xfer(0, 1, RANGE_BASE + 32'hFFC, 32'h2, 4);
    xfer(0, 1, RANGE_BASE + 32'h1000, 32'h3, -1);   // outside the range
    xfer(1, 0, RANGE_BASE + 32'h20, 32'h4, -1);     // fetches not selected
    irq_valid = 1; irq_vec = 8'd9; cyc(); irq_valid = 0;
    exp_q.push_back('{3, ref_ts}); n_match++;
    // collision: vector waits one cycle behind a transfer
    irq_valid = 1; irq_vec = 8'd9;
    xfer(0, 0, 32'h4002_0000, 0, -1);
    irq_valid = 0;
    cyc();
    exp_q.push_back('{3, ref_ts}); n_match++; n_irq_deferred++;
    idle(2);
    // two vectors behind transfers: the second is dropped
    irq_valid = 1; irq_vec = 8'd9;
    xfer(0, 0, 32'h4002_0000, 0, -1);
    irq_vec = 8'd10;
    xfer(0, 0, 32'h4002_0004, 0, -1);
    irq_valid = 0;
    cyc();
    exp_q.push_back('{3, ref_ts}); n_match++;
    idle(2);
    mg_read(REG_STATUS, d);
    checks++; if (d[1] != 1'b1) begin failures++; $display("check at line %0d failed", `__LINE__); end else n_irq_dropped++;
    // task executions: within, three over in a row (error), within again
    run_task(25);
    run_task(38);
    run_task(40);
    idle(5);
    // the 40-tick run reached the threshold: an overrun, so the alarm is up
    checks++; if (!alarm_irq || seen_overruns != 1 || error) begin failures++; $display("alarm after first overrun"); end
    mg_write(REG_CMD, 32'h4);
    cyc();
    checks++; if (alarm_irq) begin failures++; $display("alarm not cleared"); end
    run_task(55);
    run_task(41);
    run_task(30);           // breaks the run of violations
    run_task(60);
    run_task(61);
    checks++; if (error || alarm_irq != (seen_overruns > 0)) begin failures++; $display("check at line %0d failed", `__LINE__); end
    run_task(70);           // third in a row: error
    idle(5);
    checks++; if (!error || !alarm_irq) begin failures++; $display("check at line %0d failed", `__LINE__); end else n_alarm++;
    mg_read(REG_STATUS, d);
    // alarm, error set; the overflow flag went with the earlier alarm clear
    checks++; if (d[2:0] != 3'b101) begin failures++; $display("status %b", d[2:0]); end
    mg_write(REG_CMD, 32'h4);   // clear alarm (error stays)
    cyc();
    checks++; if (alarm_irq || !error) begin failures++; $display("check at line %0d failed", `__LINE__); end else n_alarm_clear++;
    mg_write(REG_CMD, 32'h2);   // clear monitor: the pulse acts at the next edge
    cyc();
    err_model = 0; viol = 0; call_t = -1;
    checks++; if (error) begin failures++; $display("check at line %0d failed", `__LINE__); end else n_mon_clear++;
    // prescaled time base: one tick per 3 cycles, lower threshold
    mg_write(REG_PRESCALE, 32'd2); ref_pre = 2;
    thr = 10;
    mg_write(REG_THRESH, 32'(thr));
    for (int i = 0; i < 6; i++) begin
      run_task((i % 2 == 0) ? 6 + i : 11 + i);
      idle(1 + $urandom % 4);
    end
    n_prescaled++;
    // random tail
    for (int i = 0; i < 20; i++) begin
      run_task(3 + int'($urandom % 12));
      idle($urandom % 5);
    end
    idle(20);
    checks++; if (exp_q.size() != 0 || exp_rt_q.size() != 0) begin failures++; $display("%0d events, %0d runtimes never came", exp_q.size(), exp_rt_q.size()); end
    checks++; if (seen_overruns != exp_overruns) begin failures++; $display("overruns %0d, expected %0d", seen_overruns, exp_overruns); end
    $display("mechanisms: match=%0d irq_deferred=%0d irq_dropped=%0d within=%0d over=%0d error=%0d overrun=%0d alarm=%0d alarm_clear=%0d mon_clear=%0d prescaled=%0d disabled=%0d readback=%0d",
             n_match, n_irq_deferred, n_irq_dropped, n_within, n_over, n_error, n_overrun, n_alarm,
             n_alarm_clear, n_mon_clear, n_prescaled, n_disabled, n_readback);
    if (n_match == 0)        failures++;
    if (n_irq_deferred == 0) failures++;
    if (n_irq_dropped == 0)  failures++;
    if (n_within == 0)       failures++;
    if (n_over == 0)         failures++;
    if (n_error == 0)        failures++;
    if (n_overrun == 0)      failures++;
    if (n_alarm == 0)        failures++;
    if (n_alarm_clear == 0)  failures++;
    if (n_mon_clear == 0)    failures++;
    if (n_prescaled == 0)    failures++;
    if (n_disabled == 0)     failures++;
    if (n_readback == 0)     failures++;
    checks += 13;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
