// trace_scheduler: builds the trace line (r_active) for the current state.
//
// An HLS circuit is scheduled: in each FSM state only a few registers change.
// The scheduler therefore routes, per state, just those signals into the low
// slots of a trace line, with an optional ctrl slot that records the state
// number. The per-state routing is fixed when the circuit is compiled; it is
// given by hlsd_pkg::sched_src(state, slot), which a debug flow would
// generate for its own circuit. Unused slots read as zero.
//
// Interface: state and sig are sampled combinationally; line is a pure
// function of them (no clock, zero latency). Slot k occupies bits
// [k*SLOT_W +: SLOT_W]; slot 0 is the least significant.
//
// The scheduler and its output format follow the architecture description;
// the fixed slot width (every signal one slot, a wide value two slots) is
// this design's simplification.
module trace_scheduler
  import hlsd_pkg::*;
#(
  parameter int unsigned NUM_STATES = NUM_STATES_D,
  parameter int unsigned NUM_SIG    = NUM_SIG_D,
  parameter int unsigned SLOT_W     = SLOT_W_D,
  parameter int unsigned NUM_SLOTS  = NUM_SLOTS_D,
  localparam int unsigned STATE_W   = $clog2(NUM_STATES),
  localparam int unsigned TRACE_W   = SLOT_W * NUM_SLOTS
) (
  input  logic [STATE_W-1:0] state,
  input  logic [SLOT_W-1:0]  sig [NUM_SIG],
  output logic [TRACE_W-1:0] line
);

  // One slot multiplexer per slot position, selected by the state.
  for (genvar k = 0; k < NUM_SLOTS; k++) begin : g_slot
    logic [SLOT_W-1:0] per_state [NUM_STATES];
    for (genvar s = 0; s < NUM_STATES; s++) begin : g_state
      localparam int SRC = sched_src(s, k);
      if (SRC == SRC_CTRL) begin : g_ctrl
        assign per_state[s] = SLOT_W'(s);
      end else if (SRC >= 0 && SRC < int'(NUM_SIG)) begin : g_sig
        assign per_state[s] = sig[SRC];
      end else begin : g_none
        assign per_state[s] = '0;
      end
    end
    assign line[k*SLOT_W +: SLOT_W] = per_state[state];
  end

endmodule
