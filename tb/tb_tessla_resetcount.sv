// tb_tessla_resetcount: resetcount(trigger, reset) against a reference
// counter. trigger and reset events come together (as in the use case) or
// apart; at each trigger event the count must rise by one while reset's
// current value is false and be 0 while it is true.
module tb_tessla_resetcount;
  import rvmon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  stream_t trigger, reset, count;
  int checks = 0, failures = 0, max_seen = 0, zeros = 0;
  logic r_def = 0, r_v = 0;
  int cnt = 0;

  tessla_resetcount dut (.clk, .rst_n, .clr, .trigger, .reset, .count);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trigger = '0; reset = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int c = 0; c < 2000; c++) begin
      logic exp_v;
      trigger.valid = ($urandom % 2) == 0;
      trigger.value = $urandom;
      reset.valid   = trigger.valid ? (($urandom % 8) != 0) : (($urandom % 10) == 0);
      reset.value   = 32'(($urandom % 5) == 0);
      if (reset.valid) begin r_def = 1; r_v = reset.value[0]; end
      exp_v = trigger.valid && r_def;
      if (exp_v) begin
        if (r_v) cnt = 0;
        else cnt++;
      end
      #1;
      checks++;
      if (count.valid !== exp_v || (exp_v && count.value !== 32'(cnt))) begin
        failures++;
        if (failures < 10) $display("c%0d: count %b %0d, expected %b %0d", c, count.valid, count.value, exp_v, cnt);
      end
      if (cnt > max_seen) max_seen = cnt;
      if (exp_v && cnt == 0) zeros++;
      @(posedge clk); #1;
    end
    checks++; if (max_seen < 4 || zeros < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
