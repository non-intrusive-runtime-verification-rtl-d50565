// tessla_on: on(trigger, x) - sample a stream at another stream's events.
//
// At every event of trigger, emits the current value of x: x's event at the
// same timestamp if there is one, otherwise the last value x had. Nothing is
// emitted before x has had an event. Used so that a task's runtime is only
// updated when the task returns. The operator's purpose is the
// specification's; treating a same-time x event as current is this
// implementation's choice.
//
// Timing: combinational output; the held value updates at the clock edge.
module tessla_on
  import rvmon_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  stream_t trigger,
  input  stream_t x,
  output stream_t y
);

  logic             def_q;
  logic [VAL_W-1:0] x_q;

  always_comb begin
    y.valid = trigger.valid && (x.valid || def_q);
    y.value = x.valid ? x.value : x_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      def_q <= 1'b0;
      x_q   <= '0;
    end else if (clr) begin
      def_q <= 1'b0;
    end else if (x.valid) begin
      def_q <= 1'b1;
      x_q   <= x.value;
    end
  end

endmodule
