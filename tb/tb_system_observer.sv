// tb_system_observer: random bus samples against a random-ish event table.
// A reference matcher in the testbench computes, for every sample, whether
// an event is due and which obsID wins (lowest matching index); the
// observer's output one cycle later must carry that obsID, the sample's
// address and data and the timestamp of the sample's cycle. With en low no
// event may leave. "now" must follow the time base with one cycle of delay.
module tb_system_observer;
  import rvmon_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  bus_sample_t sample = '0;
  evt_cfg_t evt_cfg [N];
  logic [31:0] ts = '0, now;
  obs_event_t evt;
  int checks = 0, failures = 0, events = 0;
  logic        exp_v;
  logic [7:0]  exp_id;
  bus_sample_t prev;
  logic [31:0] prev_ts;

  system_observer #(.NUM_EVT(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_match(input bus_sample_t s, input logic e,
                                    output logic v, output logic [7:0] id);
    v = 0; id = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (evt_cfg[i].en && evt_cfg[i].kind_mask[s.kind] &&
          ((s.addr & evt_cfg[i].mask) == (evt_cfg[i].addr & evt_cfg[i].mask))) begin
        v = 1; id = 8'(i);
      end
    end
    v = v && s.valid && e;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      evt_cfg[i].en        = (i != 5);
      evt_cfg[i].kind_mask = 4'(1 + i);
      evt_cfg[i].addr      = 32'h4000_0000 | 32'(i << 4);
      evt_cfg[i].mask      = (i < 4) ? 32'hFFFF_FFFF : 32'hFFFF_FF80;   // 4..7 cover a range
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      sample.valid = ($urandom % 4) != 0;
      sample.kind  = kind_e'($urandom % 4);
      sample.addr  = 32'h4000_0000 | ($urandom % 160);
      sample.data  = $urandom;
      en           = (c % 200) < 180;
      prev         = sample;
      prev_ts      = ts;
      ref_match(sample, en, exp_v, exp_id);
      @(posedge clk); #1;
      ts = ts + 32'($urandom % 2);
      checks++;
      if (evt.valid !== exp_v || now !== prev_ts ||
          (exp_v && (evt.id !== exp_id || evt.addr !== prev.addr ||
                     evt.value !== prev.data || evt.ts !== prev_ts))) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: evt v=%b id=%0d, expected v=%b id=%0d", c, evt.valid, evt.id, exp_v, exp_id);
      end
      if (exp_v) events++;
    end
    checks++; if (events < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
