// tessla_const: a value turned into a signal stream.
//
// Emits an event carrying value in the first cycle after reset (or clr) and
// again whenever value changes, so that lifted functions always see the
// current constant or configured setting (a threshold written by software,
// the literal 3 of a specification) as a defined operand. Constants appear in
// the specifications; turning them into streams this way is this
// implementation's choice.
//
// Timing: combinational output from the input and one held copy.
module tessla_const
  import rvmon_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [VAL_W-1:0] value,
  output stream_t          y
);

  logic             sent_q;
  logic [VAL_W-1:0] v_q;

  always_comb begin
    y.valid = !sent_q || (value != v_q);
    y.value = value;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent_q <= 1'b0;
      v_q    <= '0;
    end else if (clr) begin
      sent_q <= 1'b0;
    end else begin
      sent_q <= 1'b1;
      v_q    <= value;
    end
  end

endmodule
