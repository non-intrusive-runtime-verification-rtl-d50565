// tb_tessla_const: the constant node must emit its value in the first cycle
// after reset, again after each change of the value and after clr, and be
// silent otherwise.
module tb_tessla_const;
  import rvmon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [31:0] value = 32'd7;
  stream_t y;
  int checks = 0, failures = 0;

  tessla_const dut (.clk, .rst_n, .clr, .value, .y);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ev(input logic v);
    #1;
    checks++;
    if (y.valid !== v || (v && y.value !== value)) begin
      failures++;
      $display("value %0d: y %b %0d, expected event %b", value, y.valid, y.value, v);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_ev(1);
    repeat (5) expect_ev(0);
    value = 32'd9;
    expect_ev(1);
    repeat (3) expect_ev(0);
    clr = 1'b1;
    @(posedge clk); #1 clr = 1'b0;
    expect_ev(1);
    expect_ev(0);
    for (int i = 0; i < 50; i++) begin
      logic [31:0] nv;
      nv = $urandom % 4;
      if (nv != value) begin value = nv; expect_ev(1); end
      else expect_ev(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
