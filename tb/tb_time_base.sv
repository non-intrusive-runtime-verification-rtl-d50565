// tb_time_base: checks the time base against a cycle-by-cycle reference.
// Runs with prescale 0 (one tick per cycle), 2 and 4, with enable gaps and a
// clear, comparing ts every cycle with a counter kept by the testbench.
module tb_time_base;
  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, clear = 1'b0;
  logic [15:0] prescale = '0;
  logic [31:0] ts;
  int checks = 0, failures = 0;
  int ref_ts = 0, ref_div = 0;

  time_base dut (.clk, .rst_n, .en, .clear, .prescale, .ts);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    if (clear) begin ref_ts = 0; ref_div = 0; end
    else if (en) begin
      if (ref_div >= int'(prescale)) begin ref_div = 0; ref_ts++; end
      else ref_div++;
    end
    #1;
    checks++;
    if (ts !== 32'(ref_ts)) begin
      failures++;
      $display("ts=%0d expected %0d", ts, ref_ts);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    repeat (20) step();
    if (ts != 32'd20) failures++;   // one tick per cycle at prescale 0
    checks++;
    prescale = 16'd2;
    repeat (30) step();
    en = 1'b0;
    repeat (5) step();
    en = 1'b1;
    prescale = 16'd4;
    repeat (23) step();
    clear = 1'b1;
    step();
    clear = 1'b0;
    checks++;
    if (ts != 0) failures++;
    repeat (12) step();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
