// tb_tessla_on: on(trigger, x) must emit x's current value (a same-time x
// event included) at every trigger event once x is defined, and nothing
// else.
module tb_tessla_on;
  import rvmon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  stream_t trigger, x, y;
  int checks = 0, failures = 0, outs = 0;
  logic x_def = 0;
  logic [31:0] x_v = 0;

  tessla_on dut (.clk, .rst_n, .clr, .trigger, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trigger = '0; x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 1000; c++) begin
      logic exp_v;
      clr           = (c == 600);
      trigger.valid = ($urandom % 3) == 0;
      trigger.value = $urandom;
      x.valid       = ($urandom % 4) == 0 && c > 20;
      x.value       = $urandom;
      if (x.valid) x_v = x.value;
      exp_v = trigger.valid && (x.valid || x_def);
      #1;
      checks++;
      if (y.valid !== exp_v || (exp_v && y.value !== x_v)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %b %h exp %b %h", c, y.valid, y.value, exp_v, x_v);
      end
      if (exp_v) outs++;
      @(posedge clk);
      if (clr) x_def = 0; else if (x.valid) x_def = 1;
      #1;
    end
    checks++; if (outs < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
