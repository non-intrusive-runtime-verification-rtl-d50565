// observer_entity: a non-intrusive runtime-verification unit for an SoC.
//
// Plugged beside the processor on the SoC bus, it watches every bus transfer
// and interrupt vector without driving the bus, recognises configured events
// of interest, stamps them with its own time base, and feeds them to a
// hardware monitor that checks a timing property of the running software.
// The monitor here checks a task's execution time (see task_monitor) and
// raises an interrupt to the SoC when the task overran its threshold three
// returns in a row, or is running past its threshold.
//
// Blocks and connections follow the observer entity's block diagram:
//   bus_if          bus interfaces: snoop port in, bus samples out, alarm out
//   mgmt_if         management interface: register slave on the system bus
//   obs_config      configuration: event table and monitor settings
//   time_base       timestamp counter, run by the management interface
//   system_observer event detection, event tuple <obsID, a, v, t>
//   task_monitor    the monitor, built from stream-operator nodes
// The monitor's report goes back through the bus interfaces as alarm_irq.
//
// Timing from a bus transfer to the monitor: one cycle in bus_if, one in
// system_observer; the monitor's outputs are combinational in that cycle.
// evt_out, runtime_out, violations, error and overrun are brought out for
// tracing. Register map: see rvmon_pkg.
module observer_entity
  import rvmon_pkg::*;
#(
  parameter int unsigned NUM_EVT = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // snooped SoC bus
  input  logic              bus_valid,
  input  logic              bus_write,
  input  logic              bus_fetch,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [DATA_W-1:0] bus_data,
  input  logic              irq_valid,
  input  logic [VEC_W-1:0]  irq_vec,
  // management slave port
  input  logic              mg_sel,
  input  logic              mg_wr,
  input  logic [MAW-1:0]    mg_addr,
  input  logic [31:0]       mg_wdata,
  output logic [31:0]       mg_rdata,
  output logic              mg_ready,
  // to the SoC interrupt controller
  output logic              alarm_irq,
  // trace outputs
  output obs_event_t        evt_out,
  output stream_t           runtime_out,
  output logic [VAL_W-1:0]  violations,
  output logic              error,
  output logic              overrun
);

  bus_sample_t      sample;
  logic             obs_en, tb_en, tb_clear, mon_clear, alarm_clear;
  logic [15:0]      prescale;
  logic             cfg_we;
  logic [MAW-1:0]   cfg_addr, cfg_raddr;
  logic [31:0]      cfg_wdata, cfg_rdata;
  logic [TS_W-1:0]  ts, now;
  logic             irq_overflow, report;
  evt_cfg_t         evt_cfg [NUM_EVT];
  logic [ID_W-1:0]  call_id, ret_id;
  logic [VAL_W-1:0] threshold;
  obs_event_t       evt;
  stream_t          viol_s;
  logic [VAL_W-1:0] viol_q;

  bus_if u_bus_if (
    .clk, .rst_n,
    .bus_valid, .bus_write, .bus_fetch, .bus_addr, .bus_data,
    .irq_valid, .irq_vec,
    .sample,
    .report, .alarm_clear, .alarm_irq, .irq_overflow
  );

  mgmt_if u_mgmt_if (
    .clk, .rst_n,
    .sel(mg_sel), .wr(mg_wr), .addr(mg_addr), .wdata(mg_wdata),
    .rdata(mg_rdata), .ready(mg_ready),
    .obs_en, .tb_en, .prescale, .tb_clear, .mon_clear, .alarm_clear,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_raddr, .cfg_rdata,
    .ts, .status({error, irq_overflow, alarm_irq})
  );

  obs_config #(.NUM_EVT(NUM_EVT)) u_config (
    .clk, .rst_n,
    .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata),
    .raddr(cfg_raddr), .rdata(cfg_rdata),
    .evt_cfg, .call_id, .ret_id, .threshold
  );

  time_base #(.TS_W(TS_W), .PRESCALE_W(16)) u_time_base (
    .clk, .rst_n, .en(tb_en), .clear(tb_clear), .prescale, .ts
  );

  system_observer #(.NUM_EVT(NUM_EVT)) u_observer (
    .clk, .rst_n, .en(obs_en), .sample, .evt_cfg, .ts, .evt, .now
  );

  task_monitor #(.ERR_LIMIT(3)) u_monitor (
    .clk, .rst_n, .clr(mon_clear),
    .evt, .now, .call_id, .ret_id, .threshold,
    .runtime(runtime_out), .violations(viol_s), .error, .overrun, .report
  );

  // the violation count as a level for tracing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            viol_q <= '0;
    else if (mon_clear)    viol_q <= '0;
    else if (viol_s.valid) viol_q <= viol_s.value;
  end

  always_comb begin
    evt_out    = evt;
    violations = viol_s.valid ? viol_s.value : viol_q;
  end

endmodule
