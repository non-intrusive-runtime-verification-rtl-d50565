// tb_obs_config: fills the event table and the monitor settings through the
// write port with random values, then checks every field both on the
// parallel outputs and through the read port against a copy kept by the
// testbench. Addresses outside the table must read 0 and change nothing.
module tb_obs_config;
  import rvmon_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, we = 0;
  logic [11:0] addr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  evt_cfg_t evt_cfg [N];
  logic [7:0] call_id, ret_id;
  logic [31:0] threshold;
  logic [31:0] m_addr [N], m_mask [N];
  logic [4:0]  m_ctrl [N];
  int checks = 0, failures = 0;

  obs_config #(.NUM_EVT(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [11:0] a, input logic [31:0] d);
    we = 1; addr = a; wdata = d;
    @(posedge clk); #1;
    we = 0;
  endtask

  task automatic rd(input logic [11:0] a, input logic [31:0] exp);
    raddr = a; #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("read %h = %h expected %h", a, rdata, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      checks++; if (evt_cfg[i] != '0) failures++;
    end
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < N; i++) begin
        m_addr[i] = $urandom; m_mask[i] = $urandom; m_ctrl[i] = 5'($urandom);
        write(12'(REG_EVT_BASE + 16 * i), m_addr[i]);
        write(12'(REG_EVT_BASE + 16 * i + 4), m_mask[i]);
        write(12'(REG_EVT_BASE + 16 * i + 8), {$urandom, m_ctrl[i]});
      end
      write(REG_MONIDS, 32'hFFFF_0000 | {16'd0, 8'(round + 3), 8'(round)});
      write(REG_THRESH, 32'd1000 + 32'(round));
      // out of range: entry N and a hole in the small register block
      write(12'(REG_EVT_BASE + 16 * N), 32'hFFFF_FFFF);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (evt_cfg[i].addr !== m_addr[i] || evt_cfg[i].mask !== m_mask[i] ||
            evt_cfg[i].en !== m_ctrl[i][0] || evt_cfg[i].kind_mask !== m_ctrl[i][4:1]) begin
          failures++;
          $display("entry %0d differs", i);
        end
        rd(12'(REG_EVT_BASE + 16 * i), m_addr[i]);
        rd(12'(REG_EVT_BASE + 16 * i + 4), m_mask[i]);
        rd(12'(REG_EVT_BASE + 16 * i + 8), {27'd0, m_ctrl[i]});
        rd(12'(REG_EVT_BASE + 16 * i + 12), 32'd0);
      end
      checks++;
      if (call_id != 8'(round) || ret_id != 8'(round + 3) || threshold != 32'd1000 + 32'(round))
        failures++;
      rd(REG_MONIDS, {16'd0, 8'(round + 3), 8'(round)});
      rd(REG_THRESH, 32'd1000 + 32'(round));
      rd(12'(REG_EVT_BASE + 16 * N), 32'd0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
