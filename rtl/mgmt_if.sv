// mgmt_if: the observer entity's management interface.
//
// A small register slave on the system bus through which software sets up the
// observer: control bits, time base prescaler, command pulses, and - passed
// through to the configuration block - the event table and the monitor
// settings. It also lets software read the current time and a status word.
// That configuration goes through a management interface is the design's; the
// register map (see rvmon_pkg) and the access protocol are this
// implementation's choices.
//
// Interface: a request is sel with wr, addr, wdata held for one cycle; the
// access completes in the next cycle with ready high and, for reads, rdata
// valid. Command pulses (tb_clear, mon_clear, alarm_clear) and cfg_we are
// one cycle wide, in the cycle after the request.
module mgmt_if
  import rvmon_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  logic              wr,
  input  logic [MAW-1:0]    addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  output logic              ready,
  // control
  output logic              obs_en,
  output logic              tb_en,
  output logic [15:0]       prescale,
  output logic              tb_clear,
  output logic              mon_clear,
  output logic              alarm_clear,
  // configuration block port
  output logic              cfg_we,
  output logic [MAW-1:0]    cfg_addr,    // write address, with cfg_we
  output logic [31:0]       cfg_wdata,
  output logic [MAW-1:0]    cfg_raddr,   // read address, with the request
  input  logic [31:0]       cfg_rdata,
  // read-only status
  input  logic [TS_W-1:0]   ts,
  input  logic [2:0]        status
);

  logic [MAW-1:0] word_addr;
  logic           is_cfg;
  logic [31:0]    rd_local;

  always_comb begin
    word_addr = {addr[MAW-1:2], 2'b00};
    is_cfg    = is_cfg_addr(word_addr);
    cfg_raddr = word_addr;
    unique case (word_addr)
      REG_CTRL:     rd_local = {30'd0, tb_en, obs_en};
      REG_PRESCALE: rd_local = {16'd0, prescale};
      REG_TIME:     rd_local = 32'(ts);
      REG_STATUS:   rd_local = {29'd0, status};
      default:      rd_local = 32'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata       <= '0;
      ready       <= 1'b0;
      obs_en      <= 1'b0;
      tb_en       <= 1'b0;
      prescale    <= '0;
      tb_clear    <= 1'b0;
      mon_clear   <= 1'b0;
      alarm_clear <= 1'b0;
      cfg_we      <= 1'b0;
      cfg_wdata   <= '0;
      cfg_addr    <= '0;
    end else begin
      ready       <= sel;
      tb_clear    <= 1'b0;
      mon_clear   <= 1'b0;
      alarm_clear <= 1'b0;
      cfg_we      <= 1'b0;
      if (sel && wr) begin
        if (is_cfg) begin
          cfg_we    <= 1'b1;
          cfg_addr  <= word_addr;
          cfg_wdata <= wdata;
        end else begin
          unique case (word_addr)
            REG_CTRL: begin
              obs_en <= wdata[0];
              tb_en  <= wdata[1];
            end
            REG_CMD: begin
              tb_clear    <= wdata[0];
              mon_clear   <= wdata[1];
              alarm_clear <= wdata[2];
            end
            REG_PRESCALE: prescale <= wdata[15:0];
            default: ;
          endcase
        end
      end
      if (sel && !wr) rdata <= is_cfg ? cfg_rdata : rd_local;
    end
  end

endmodule
