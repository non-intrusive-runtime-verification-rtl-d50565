// rvmon_pkg: types and constants shared by the observer entity and its
// TeSSLa-style monitor.
//
// The observer entity watches a 32-bit SoC bus without taking part in it.
// Bus activity becomes a bus sample (kind, address, data); a matching sample
// becomes an event tuple <obsID, a_obs, v_obs, t_obs>. Monitor nodes pass
// streams to each other: one stream_t per stream per cycle, where "valid"
// marks an event at the current progress timestamp. The widths, the kind
// encoding and the register map are this design's choices.
package rvmon_pkg;

  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned TS_W    = 32;
  localparam int unsigned VAL_W   = 32;
  localparam int unsigned ID_W    = 8;
  localparam int unsigned VEC_W   = 8;
  localparam int unsigned MAW     = 12;   // management byte-address width

  // Kind of bus activity; one bit per kind in an event's kind mask.
  typedef enum logic [1:0] {
    KIND_FETCH = 2'd0,
    KIND_READ  = 2'd1,
    KIND_WRITE = 2'd2,
    KIND_IRQ   = 2'd3
  } kind_e;

  typedef struct packed {
    logic              valid;
    kind_e             kind;
    logic [ADDR_W-1:0] addr;   // bus address, or vector number for KIND_IRQ
    logic [DATA_W-1:0] data;
  } bus_sample_t;

  // evt_obsID = <a_obs, v_obs, t_obs>
  typedef struct packed {
    logic              valid;
    logic [ID_W-1:0]   id;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] value;
    logic [TS_W-1:0]   ts;
  } obs_event_t;

  // One entry of the event table.
  typedef struct packed {
    logic              en;
    logic [3:0]        kind_mask;
    logic [ADDR_W-1:0] addr;
    logic [ADDR_W-1:0] mask;
  } evt_cfg_t;

  // A TeSSLa stream as seen in one cycle (one progress timestamp).
  typedef struct packed {
    logic             valid;
    logic [VAL_W-1:0] value;
  } stream_t;

  typedef enum logic [3:0] {
    LIFT_ADD,
    LIFT_SUB,
    LIFT_GT,
    LIFT_GE,
    LIFT_LT,
    LIFT_LE,
    LIFT_EQ,
    LIFT_MAX,
    LIFT_ZERO_IF    // if a != 0 then 0 else b
  } lift_op_e;

  // Management register map (byte addresses).
  localparam logic [MAW-1:0] REG_CTRL     = 12'h000; // [0] observer enable, [1] time base enable
  localparam logic [MAW-1:0] REG_CMD      = 12'h004; // write 1: [0] clear time, [1] clear monitor, [2] clear alarm
  localparam logic [MAW-1:0] REG_PRESCALE = 12'h008; // time base ticks every PRESCALE+1 cycles
  localparam logic [MAW-1:0] REG_TIME     = 12'h00C; // current time (read only)
  localparam logic [MAW-1:0] REG_MONIDS   = 12'h010; // [7:0] call obsID, [15:8] return obsID
  localparam logic [MAW-1:0] REG_THRESH   = 12'h014; // runtime threshold, in time base ticks
  localparam logic [MAW-1:0] REG_STATUS   = 12'h018; // [0] alarm, [1] irq overflow, [2] error (read only)
  localparam logic [MAW-1:0] REG_EVT_BASE = 12'h100; // entry i at 0x100+16*i: +0 ADDR, +4 MASK, +8 CTRL

  function automatic logic is_cfg_addr(logic [MAW-1:0] a);
    return (a == REG_MONIDS) || (a == REG_THRESH) || (a >= REG_EVT_BASE);
  endfunction

endpackage
