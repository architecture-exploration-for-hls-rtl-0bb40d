// state_recoder: forms the global state number that addresses the config RAM.
//
// An HLS circuit holds one FSM per hardware function. Each function's state
// register is recoded, at compile time, into a range of a single global state
// numbering (recode_state_i). At run time the function that is currently
// executing (current_func, derived from the circuit's current_state) selects
// which recoded value is the live one. The result addresses the config RAM,
// the trace scheduler and the freeze units' state compare.
//
// Interface: combinational multiplexer, zero latency. A select beyond the
// last input yields state 0, which this design treats as "idle".
//
// The multiplexer with inputs recode_state_0..n and output recode_state is
// from the architecture description; what exactly drives the select is this
// design's reading of it.
module state_recoder
  import hlsd_pkg::*;
#(
  parameter int unsigned NUM_FUNCS  = NUM_FUNCS_D,
  parameter int unsigned NUM_STATES = NUM_STATES_D,
  localparam int unsigned FSEL_W    = (NUM_FUNCS > 1) ? $clog2(NUM_FUNCS) : 1,
  localparam int unsigned STATE_W   = $clog2(NUM_STATES)
) (
  input  logic [FSEL_W-1:0]  current_func,
  input  logic [STATE_W-1:0] recode_state_in [NUM_FUNCS],
  output logic [STATE_W-1:0] recode_state
);

  always_comb begin
    recode_state = '0;
    for (int i = 0; i < int'(NUM_FUNCS); i++)
      if (current_func == FSEL_W'(i)) recode_state = recode_state_in[i];
  end

endmodule
