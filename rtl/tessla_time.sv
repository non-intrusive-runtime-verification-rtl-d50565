// tessla_time: the TeSSLa operator time(x).
//
// Produces, for each event of x, an event whose value is the event's
// timestamp. Monitor nodes evaluate one progress timestamp per clock cycle:
// "now" is that timestamp, and a stream's valid bit marks an event at it.
// Stateless and combinational: the output belongs to the same timestamp as
// the input. The operator is the specification language's; running one
// timestamp per cycle is this implementation's choice. The input's value is
// not used: only its timing matters.
module tessla_time
  import rvmon_pkg::*;
(
  input  stream_t         x,
  input  logic [TS_W-1:0] now,
  output stream_t         y
);

  always_comb begin
    y.valid = x.valid;
    y.value = VAL_W'(now);
  end

endmodule
