// tb_tessla_last: last(v, trigger) must emit, at each trigger event, the
// value v had strictly before the current timestamp. One instance without
// an initial value (silent until v's first event) and one with INIT = 42.
module tb_tessla_last;
  import rvmon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  stream_t v, trigger, y0, y1;
  int checks = 0, failures = 0, outs = 0;
  logic v_def = 0;
  logic [31:0] v_prev = 0;

  tessla_last dut0 (.clk, .rst_n, .clr, .v, .trigger, .y(y0));
  tessla_last #(.HAS_INIT(1'b1), .INIT(32'd42)) dut1 (.clk, .rst_n, .clr, .v, .trigger, .y(y1));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0; trigger = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      clr           = (c == 700);
      trigger.valid = ($urandom % 2) == 0;
      trigger.value = $urandom;
      v.valid       = ($urandom % 3) == 0 && (c > 30);
      v.value       = $urandom;
      #1;
      checks += 2;
      if (y0.valid !== (trigger.valid && v_def) || (y0.valid && y0.value !== v_prev)) begin
        failures++;
        if (failures < 10) $display("c%0d no-init: %b %h exp %b %h", c, y0.valid, y0.value, trigger.valid && v_def, v_prev);
      end
      if (y1.valid !== trigger.valid || (y1.valid && y1.value !== (v_def ? v_prev : 32'd42))) begin
        failures++;
        if (failures < 10) $display("c%0d init: %b %h", c, y1.valid, y1.value);
      end
      if (y0.valid) outs++;
      @(posedge clk);
      if (clr) v_def = 0;
      else if (v.valid) begin v_def = 1; v_prev = v.value; end
      #1;
    end
    checks++; if (outs < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
