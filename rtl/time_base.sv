// time_base: the observer entity's clock of record.
//
// A counter that advances by one every PRESCALE+1 system clock cycles while
// enabled; its value stamps every observed event (t_obs) and is the progress
// timestamp the monitor nodes run on. A synchronous clear restarts it at 0.
// That the observer needs a time base is the design's; the prescaler, the
// enable and the clear are this implementation's choices.
//
// Timing: ts changes on the clock edge after a tick; clear wins over counting.
module time_base #(
  parameter int unsigned TS_W       = 32,
  parameter int unsigned PRESCALE_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  clear,
  input  logic [PRESCALE_W-1:0] prescale,
  output logic [TS_W-1:0]       ts
);

  logic [PRESCALE_W-1:0] div_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= '0;
      ts    <= '0;
    end else if (clear) begin
      div_q <= '0;
      ts    <= '0;
    end else if (en) begin
      if (div_q >= prescale) begin
        div_q <= '0;
        ts    <= ts + 1'b1;
      end else begin
        div_q <= div_q + 1'b1;
      end
    end
  end

endmodule
