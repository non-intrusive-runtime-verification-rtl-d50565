// tb_mgmt_if: register accesses through the management interface.
// Writes and reads back CTRL and PRESCALE, checks the command pulses are one
// cycle wide, that configuration addresses are forwarded to the
// configuration port (address, data, one-cycle cfg_we) and read from it, and
// that TIME and STATUS read the inputs.
module tb_mgmt_if;
  import rvmon_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sel = 0, wr = 0;
  logic [11:0] addr = '0;
  logic [31:0] wdata = '0, rdata, cfg_wdata, cfg_rdata;
  logic ready, obs_en, tb_en, tb_clear, mon_clear, alarm_clear, cfg_we;
  logic [15:0] prescale;
  logic [11:0] cfg_addr, cfg_raddr;
  logic [31:0] ts = 32'h0000_1234;
  logic [2:0]  status = 3'b101;
  int checks = 0, failures = 0;
  int pulses_tb = 0, pulses_mon = 0, pulses_alarm = 0, cfg_writes = 0;
  logic [11:0] last_cfg_addr;
  logic [31:0] last_cfg_data;

  mgmt_if dut (.*);

  // a stand-in register file behind the configuration port
  assign cfg_rdata = {20'hC0F1E, cfg_raddr};

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (tb_clear)    pulses_tb++;
    if (mon_clear)   pulses_mon++;
    if (alarm_clear) pulses_alarm++;
    if (cfg_we) begin
      cfg_writes++;
      last_cfg_addr = cfg_addr;
      last_cfg_data = cfg_wdata;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [11:0] a, input logic [31:0] d);
    sel = 1; wr = 1; addr = a; wdata = d;
    @(posedge clk); #1;
    sel = 0; wr = 0; addr = 12'hFFC; wdata = '0;
    checks++; if (!ready) begin failures++; $display("no ready on write %h", a); end
    @(posedge clk); #1;
  endtask

  task automatic read_check(input logic [11:0] a, input logic [31:0] exp);
    sel = 1; wr = 0; addr = a;
    @(posedge clk); #1;
    sel = 0; addr = 12'hFFC;
    checks++;
    if (!ready || rdata !== exp) begin
      failures++;
      $display("read %h = %h ready=%b, expected %h", a, rdata, ready, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (obs_en || tb_en || prescale != 0) begin failures++; $display("check at line %0d failed", `__LINE__); end
    write(REG_CTRL, 32'h3);
    checks++; if (!obs_en || !tb_en) begin failures++; $display("check at line %0d failed", `__LINE__); end
    read_check(REG_CTRL, 32'h3);
    write(REG_CTRL, 32'h2);
    checks++; if (obs_en || !tb_en) begin failures++; $display("check at line %0d failed", `__LINE__); end
    write(REG_PRESCALE, 32'hABCD_0007);
    read_check(REG_PRESCALE, 32'h0007);
    checks++; if (prescale != 16'd7) begin failures++; $display("check at line %0d failed", `__LINE__); end
    read_check(REG_TIME, 32'h1234);
    read_check(REG_STATUS, 32'h5);
    write(REG_CMD, 32'h7);
    checks++; if (pulses_tb != 1 || pulses_mon != 1 || pulses_alarm != 1) begin failures++; $display("check at line %0d failed", `__LINE__); end
    write(REG_CMD, 32'h2);
    checks++; if (pulses_tb != 1 || pulses_mon != 2 || pulses_alarm != 1) begin failures++; $display("check at line %0d failed", `__LINE__); end
    checks++; if (cfg_writes != 0) begin failures++; $display("check at line %0d failed", `__LINE__); end
    write(REG_THRESH, 32'd500);
    checks++; if (cfg_writes != 1 || last_cfg_addr != REG_THRESH || last_cfg_data != 32'd500) begin failures++; $display("check at line %0d failed", `__LINE__); end
    write(12'h127, 32'hDEAD_BEEF);   // byte address inside word 0x124
    checks++; if (cfg_writes != 2 || last_cfg_addr != 12'h124 || last_cfg_data != 32'hDEAD_BEEF) begin failures++; $display("check at line %0d failed", `__LINE__); end
    read_check(12'h118, {20'hC0F1E, 12'h118});
    read_check(REG_MONIDS, {20'hC0F1E, REG_MONIDS});
    checks++; if (cfg_writes != 2) begin failures++; $display("check at line %0d failed", `__LINE__); end      // reads write nothing
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
