// system_observer: detects events of interest on the observed bus.
//
// Every cycle the bus sample from the bus interfaces is compared with all
// entries of the event table in parallel. An entry matches when it is
// enabled, the sample's kind is set in its kind mask and the address agrees
// in every bit the entry's mask selects. The lowest matching entry's index is
// the obsID, and the event leaves as the tuple <obsID, a_obs, v_obs, t_obs>:
// the observed address, the observed value (data or instruction word) and the
// time base value of the cycle the sample was examined. Alongside, the same
// timestamp leaves every cycle as "now", the progress timestamp that tells
// the monitor no other event happened up to then. Event detection and the
// event tuple are the design's; the matching rule and the priority are this
// implementation's choices.
//
// Timing: one register stage; evt and now appear one cycle after the sample.
// While en is low no event is emitted (progress still is).
module system_observer
  import rvmon_pkg::*;
#(
  parameter int unsigned NUM_EVT = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  bus_sample_t     sample,
  input  evt_cfg_t        evt_cfg [NUM_EVT],
  input  logic [TS_W-1:0] ts,
  output obs_event_t      evt,
  output logic [TS_W-1:0] now
);

  logic [NUM_EVT-1:0] hit;
  logic               any_hit;
  logic [ID_W-1:0]    hit_id;

  always_comb begin
    for (int i = 0; i < NUM_EVT; i++) begin
      hit[i] = evt_cfg[i].en && evt_cfg[i].kind_mask[sample.kind] &&
               (((sample.addr ^ evt_cfg[i].addr) & evt_cfg[i].mask) == '0);
    end
    any_hit = 1'b0;
    hit_id  = '0;
    for (int i = NUM_EVT - 1; i >= 0; i--) begin
      if (hit[i]) begin
        any_hit = 1'b1;
        hit_id  = ID_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evt <= '0;
      now <= '0;
    end else begin
      now       <= ts;
      evt.valid <= en && sample.valid && any_hit;
      evt.id    <= hit_id;
      evt.addr  <= sample.addr;
      evt.value <= sample.data;
      evt.ts    <= ts;
    end
  end

endmodule
