// tessla_delay: delay(d, reset) - a resettable timer stream.
//
// An event of d with value dt at timestamp t arms the node; it then emits a
// unit event (value 1) at the first progress timestamp >= t+dt, unless an
// event of reset arrives first, which disarms it. A new d event re-arms with
// the new deadline; d and reset at the same timestamp re-arm; dt = 0 arms
// nothing. Progress timestamps from the system observer advance by at most
// one per cycle, so the deadline is never skipped. Delaying and resetting are
// the specification language's; one pending deadline and the tie rules are
// this implementation's choices.
//
// Timing: the output is combinational from the registered deadline and now.
module tessla_delay
  import rvmon_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [TS_W-1:0] now,
  input  stream_t         d,
  input  stream_t         reset,
  output stream_t         y
);

  logic            armed_q;
  logic [TS_W-1:0] due_q;
  logic            fire;
  logic [TS_W-1:0] diff;

  always_comb begin
    // wrap-safe "now >= due"
    diff    = now - due_q;
    fire    = armed_q && !diff[TS_W-1];
    y.valid = fire;
    y.value = VAL_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed_q <= 1'b0;
      due_q   <= '0;
    end else if (clr) begin
      armed_q <= 1'b0;
    end else if (d.valid && d.value != '0) begin
      armed_q <= 1'b1;
      due_q   <= now + TS_W'(d.value);
    end else if (reset.valid || fire) begin
      armed_q <= 1'b0;
    end
  end

endmodule
