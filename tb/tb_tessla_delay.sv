// tb_tessla_delay: delay(d, reset) against a reference timer. Progress
// timestamps advance by 0 or 1 per cycle; random d events arm deadlines
// now+dt, random reset events cancel them. The node must fire exactly once,
// at the first timestamp >= the deadline, unless reset or re-armed.
module tb_tessla_delay;
  import rvmon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [31:0] now = 32'hFFFF_FF00;      // crosses the wrap of the counter
  stream_t d, reset, y;
  int checks = 0, failures = 0, fires = 0, cancels = 0;
  logic armed = 0;
  logic [31:0] due = 0;

  tessla_delay dut (.clk, .rst_n, .clr, .now, .d, .reset, .y);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; reset = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      logic exp_fire;
      logic [31:0] diff;
      d.valid     = ($urandom % 25) == 0;
      d.value     = $urandom % 12;
      reset.valid = ($urandom % 30) == 0;
      reset.value = 32'd1;
      clr         = (c == 1500);
      diff        = now - due;
      exp_fire    = armed && !diff[31];
      #1;
      checks++;
      if (y.valid !== exp_fire) begin
        failures++;
        if (failures < 10) $display("c%0d now=%0d due=%0d armed=%b: fire %b", c, now, due, armed, y.valid);
      end
      if (exp_fire) fires++;
      @(posedge clk);
      if (clr) armed = 0;
      else if (d.valid && d.value != 0) begin armed = 1; due = now + d.value; end
      else if (reset.valid || exp_fire) begin
        if (reset.valid && armed && !exp_fire) cancels++;
        armed = 0;
      end
      #1;
      now = now + 32'($urandom % 2);
    end
    checks++; if (fires < 20 || cancels < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
