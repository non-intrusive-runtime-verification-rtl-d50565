// tessla_last: last(v, trigger) - the previous value of a stream.
//
// At every event of trigger, emits the value v had strictly before this
// timestamp; an event of v at the same timestamp is not yet seen. Because the
// output depends only on stored state, last() may close a recursive loop
// (count := last(count, trigger) + 1) without a combinational cycle - the
// reason the specification language allows recursion through it. With
// HAS_INIT set, v is taken to hold INIT before its first event (the
// language's default()); otherwise nothing is emitted until v has had an event.
//
// Timing: combinational output from registers; the stored value updates at
// the clock edge after each v event. clr returns to the initial state.
module tessla_last
  import rvmon_pkg::*;
#(
  parameter bit               HAS_INIT = 1'b0,
  parameter logic [VAL_W-1:0] INIT     = '0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  stream_t v,
  input  stream_t trigger,
  output stream_t y
);

  logic             def_q;
  logic [VAL_W-1:0] v_q;

  always_comb begin
    y.valid = trigger.valid && (def_q || HAS_INIT);
    y.value = def_q ? v_q : INIT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      def_q <= 1'b0;
      v_q   <= '0;
    end else if (clr) begin
      def_q <= 1'b0;
    end else if (v.valid) begin
      def_q <= 1'b1;
      v_q   <= v.value;
    end
  end

endmodule
