// tb_bus_if: checks that every bus transfer and interrupt vector becomes a
// bus sample of the right kind one cycle later, that a vector colliding with
// a transfer waits one free cycle, that a second waiting vector sets the
// overflow flag, and that a report sets and alarm_clear clears the alarm.
module tb_bus_if;
  import rvmon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bus_valid = 0, bus_write = 0, bus_fetch = 0, irq_valid = 0;
  logic [31:0] bus_addr = '0, bus_data = '0;
  logic [7:0]  irq_vec = '0;
  logic report = 0, alarm_clear = 0, alarm_irq, irq_overflow;
  bus_sample_t sample;
  int checks = 0, failures = 0;

  bus_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic bv, input logic w, input logic f,
                       input logic [31:0] a, input logic [31:0] d,
                       input logic iv, input logic [7:0] vec);
    bus_valid = bv; bus_write = w; bus_fetch = f; bus_addr = a; bus_data = d;
    irq_valid = iv; irq_vec = vec;
    @(posedge clk); #1;
    bus_valid = 0; irq_valid = 0;
  endtask

  task automatic expect_sample(input logic v, input kind_e k, input logic [31:0] a,
                               input logic [31:0] d);
    checks++;
    if (sample.valid !== v || (v && (sample.kind !== k || sample.addr !== a ||
        (k != KIND_IRQ && sample.data !== d)))) begin
      failures++;
      $display("sample v=%b k=%0d a=%h d=%h, expected v=%b k=%0d a=%h d=%h",
               sample.valid, sample.kind, sample.addr, sample.data, v, k, a, d);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    expect_sample(0, KIND_READ, 0, 0);
    drive(1, 0, 1, 32'h4000_0100, 32'h9de3_bf98, 0, 0);
    expect_sample(1, KIND_FETCH, 32'h4000_0100, 32'h9de3_bf98);
    drive(1, 0, 0, 32'h4000_2000, 32'h1234, 0, 0);
    expect_sample(1, KIND_READ, 32'h4000_2000, 32'h1234);
    drive(1, 1, 0, 32'h4000_2004, 32'h5678, 0, 0);
    expect_sample(1, KIND_WRITE, 32'h4000_2004, 32'h5678);
    drive(0, 0, 0, 0, 0, 1, 8'h11);
    expect_sample(1, KIND_IRQ, 32'h11, 0);
    drive(0, 0, 0, 0, 0, 0, 0);
    expect_sample(0, KIND_READ, 0, 0);
    // collision: transfer first, vector next cycle
    drive(1, 1, 0, 32'h100, 32'h1, 1, 8'h05);
    expect_sample(1, KIND_WRITE, 32'h100, 32'h1);
    drive(0, 0, 0, 0, 0, 0, 0);
    expect_sample(1, KIND_IRQ, 32'h05, 0);
    checks++; if (irq_overflow) failures++;
    // a vector waits, another comes with a transfer: overflow, the older one survives
    drive(1, 0, 0, 32'h200, 32'h2, 1, 8'h06);
    drive(1, 0, 0, 32'h204, 32'h3, 1, 8'h07);
    expect_sample(1, KIND_READ, 32'h204, 32'h3);
    checks++; if (!irq_overflow) failures++;
    drive(0, 0, 0, 0, 0, 0, 0);
    expect_sample(1, KIND_IRQ, 32'h06, 0);
    drive(0, 0, 0, 0, 0, 0, 0);
    expect_sample(0, KIND_READ, 0, 0);
    // alarm
    checks++; if (alarm_irq) failures++;
    report = 1; @(posedge clk); #1 report = 0;
    repeat (3) @(posedge clk); #1;
    checks++; if (!alarm_irq) failures++;
    alarm_clear = 1; @(posedge clk); #1 alarm_clear = 0;
    checks++; if (alarm_irq || irq_overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
