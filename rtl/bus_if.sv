// bus_if: the observer entity's bus interfaces.
//
// Captures all activity on the snooped SoC bus - transfers and interrupt
// vectors - into one registered bus sample per cycle for the system observer,
// and drives the alarm interrupt back to the SoC when the monitor reports.
// The observer never drives the bus it watches, so observation is
// non-intrusive.
//
// A transfer and an interrupt vector can arrive in the same cycle. The
// transfer is passed on first; the vector waits in a one-entry holding
// register and leaves in the next cycle with no transfer. A vector that
// arrives while another is still waiting is dropped and sets the sticky
// irq_overflow flag. The report sets a sticky alarm_irq, cleared by
// alarm_clear, which also clears irq_overflow. The bus protocol, the holding
// register and the alarm are this implementation's choices; capturing transfers and vectors is the design's.
//
// Timing: the sample appears one cycle after the bus activity (two for a
// vector that had to wait).
module bus_if
  import rvmon_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bus_valid,
  input  logic              bus_write,
  input  logic              bus_fetch,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [DATA_W-1:0] bus_data,
  input  logic              irq_valid,
  input  logic [VEC_W-1:0]  irq_vec,
  output bus_sample_t       sample,
  input  logic              report,
  input  logic              alarm_clear,
  output logic              alarm_irq,
  output logic              irq_overflow
);

  logic             pend_q;
  logic [VEC_W-1:0] pend_vec_q;
  logic             vec_in;       // a vector is available this cycle
  logic [VEC_W-1:0] vec_now;

  always_comb begin
    vec_in  = pend_q | irq_valid;
    vec_now = pend_q ? pend_vec_q : irq_vec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample       <= '0;
      pend_q       <= 1'b0;
      pend_vec_q   <= '0;
      alarm_irq    <= 1'b0;
      irq_overflow <= 1'b0;
    end else begin
      // sample path
      if (bus_valid) begin
        sample.valid <= 1'b1;
        sample.kind  <= bus_fetch ? KIND_FETCH : (bus_write ? KIND_WRITE : KIND_READ);
        sample.addr  <= bus_addr;
        sample.data  <= bus_data;
      end else if (vec_in) begin
        sample.valid <= 1'b1;
        sample.kind  <= KIND_IRQ;
        sample.addr  <= ADDR_W'(vec_now);
        sample.data  <= '0;
      end else begin
        sample.valid <= 1'b0;
      end
      // holding register for a vector that lost to a transfer
      if (alarm_clear) irq_overflow <= 1'b0;
      if (bus_valid) begin
        if (pend_q && irq_valid) begin
          irq_overflow <= 1'b1;           // keep the older vector
        end else if (irq_valid) begin
          pend_q     <= 1'b1;
          pend_vec_q <= irq_vec;
        end
      end else if (pend_q) begin
        // the waiting vector leaves now; a new one takes its place
        pend_q     <= irq_valid;
        pend_vec_q <= irq_vec;
      end
      // alarm
      if (report)           alarm_irq <= 1'b1;
      else if (alarm_clear) alarm_irq <= 1'b0;
    end
  end

endmodule
