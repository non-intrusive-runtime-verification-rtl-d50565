// obs_config: the observer entity's configuration store.
//
// Holds the set of events of interest - one entry per obsID, each an address,
// an address mask, a mask of bus-activity kinds and an enable - and the
// monitor's settings: which obsIDs mark a task's call and return, and the
// runtime threshold. Everything can be rewritten while the system runs, so
// events of interest can be set statically or dynamically. Storing the event
// set is the design's; the entry layout and the number of entries are this
// implementation's choices.
//
// Interface: a write (we, addr, wdata) takes effect at the clock edge; reads
// (raddr -> rdata) are combinational. Entry i sits at REG_EVT_BASE + 16*i:
// +0 address, +4 mask, +8 control ([0] enable, [4:1] kind mask, bit k+1 for
// kind_e value k). Everything resets to zero, i.e. no event enabled.
module obs_config
  import rvmon_pkg::*;
#(
  parameter int unsigned NUM_EVT = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [MAW-1:0]    addr,
  input  logic [31:0]       wdata,
  input  logic [MAW-1:0]    raddr,
  output logic [31:0]       rdata,
  output evt_cfg_t          evt_cfg [NUM_EVT],
  output logic [ID_W-1:0]   call_id,
  output logic [ID_W-1:0]   ret_id,
  output logic [VAL_W-1:0]  threshold
);

  localparam int unsigned IW = (NUM_EVT > 1) ? $clog2(NUM_EVT) : 1;

  // entry index and field of an address in the event region
  function automatic logic in_table(logic [MAW-1:0] a);
    return (a >= REG_EVT_BASE) && (int'(MAW'(a - REG_EVT_BASE)) < 16 * NUM_EVT);
  endfunction

  logic [MAW-1:0] woff, roff;
  always_comb begin
    woff = addr - REG_EVT_BASE;
    roff = raddr - REG_EVT_BASE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_EVT; i++) evt_cfg[i] <= '0;
      call_id   <= '0;
      ret_id    <= '0;
      threshold <= '0;
    end else if (we) begin
      if (addr == REG_MONIDS) begin
        call_id <= wdata[7:0];
        ret_id  <= wdata[15:8];
      end else if (addr == REG_THRESH) begin
        threshold <= wdata;
      end else if (in_table(addr)) begin
        for (int i = 0; i < NUM_EVT; i++) begin
          if (woff[IW+3:4] == IW'(i)) begin
            unique case (woff[3:2])
              2'd0: evt_cfg[i].addr <= wdata;
              2'd1: evt_cfg[i].mask <= wdata;
              2'd2: begin
                evt_cfg[i].en        <= wdata[0];
                evt_cfg[i].kind_mask <= wdata[4:1];
              end
              default: ;
            endcase
          end
        end
      end
    end
  end

  always_comb begin
    rdata = '0;
    if (raddr == REG_MONIDS) begin
      rdata = {16'd0, ret_id, call_id};
    end else if (raddr == REG_THRESH) begin
      rdata = threshold;
    end else if (in_table(raddr)) begin
      for (int i = 0; i < NUM_EVT; i++) begin
        if (roff[IW+3:4] == IW'(i)) begin
          unique case (roff[3:2])
            2'd0:    rdata = evt_cfg[i].addr;
            2'd1:    rdata = evt_cfg[i].mask;
            2'd2:    rdata = {27'd0, evt_cfg[i].kind_mask, evt_cfg[i].en};
            default: rdata = '0;
          endcase
        end
      end
    end
  end

endmodule
