// hlsd_pkg: types, sizes and the host address map shared by the HLS debug
// overlay.
//
// The overlay sits beside an HLS-generated user circuit. A trace scheduler
// (built per circuit at compile time) turns the signals that are live in the
// current FSM state into one trace line. A small configuration RAM, written at
// run time by the host, says for every state how many words of that line to
// keep (0 = do not trace). A line packer squeezes the kept words into full
// trace-buffer lines, and up to C conditional freeze units can stop the trace
// buffer when a masked data compare hits in a chosen state.
//
// Sizes not given by the architecture description (line width, slot width,
// number of states, buffer depth) are this design's own choices and are
// collected here as defaults.
package hlsd_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_STATES_D = 256;  // global (recoded) FSM states
  localparam int unsigned SLOT_W_D     = 16;   // width of one scheduler slot
  localparam int unsigned NUM_SLOTS_D  = 8;    // slots per trace line
  localparam int unsigned TRACE_W_D    = SLOT_W_D * NUM_SLOTS_D; // 128
  localparam int unsigned NUM_SIG_D    = 16;   // traced user signals
  localparam int unsigned G_D          = 4;    // line packer granularity
  localparam int unsigned C_D          = 1;    // conditional freeze units
  localparam int unsigned DEPTH_D      = 1024; // trace buffer lines
  localparam int unsigned NUM_FUNCS_D  = 4;    // recode_state inputs

  // ----------------------------------------------------- comparator ops
  // Operators of a conditional freeze unit. All compares are unsigned on
  // the masked data; a sign test such as "a < 0" is an OP_EQ on the sign bit.
  typedef enum logic [2:0] {
    OP_OFF = 3'd0,  // unit disabled
    OP_EQ  = 3'd1,
    OP_NE  = 3'd2,
    OP_LT  = 3'd3,
    OP_LE  = 3'd4,
    OP_GT  = 3'd5,
    OP_GE  = 3'd6
  } cmp_op_e;

  // ------------------------------------------------------------ host bus
  // One request per cycle; read data returns on the next cycle.
  localparam int unsigned HADDR_W = 16;
  localparam int unsigned HDATA_W = 32;

  typedef struct packed {
    logic               we;
    logic               re;
    logic [HADDR_W-1:0] addr;
    logic [HDATA_W-1:0] wdata;
  } host_req_t;

  // Address map (word addresses).
  //   0x0000           control: bit0 trace_on (RW), bit1 clear (W, pulse)
  //   0x0001           status (R): bit0 frozen, bit1 wrapped,
  //                    bit2 any trigger, [31:16] write pointer
  //   0x1000 + s       config RAM entry for state s (W)
  //   0x2000 + 64u + k freeze unit u: k=0 op, 1 state,
  //                    2.. mask words, then target words (32 bits each, LS first)
  //   0x8000 + NW*l + j trace buffer line l, 32-bit word j (R), NW = words
  //                    per line rounded up to a power of two (4 for 128 bits)
  localparam logic [3:0] REGION_CTRL = 4'h0;
  localparam logic [3:0] REGION_CFG  = 4'h1;
  localparam logic [3:0] REGION_CFU  = 4'h2;
  localparam int unsigned CFU_STRIDE = 64;

  // ------------------------------------------------ default trace schedule
  // Source of slot k of the trace line in (global) state s. The trace
  // scheduler is generated per user circuit by the HLS debug flow; this
  // default reproduces the example schedule of eight states with signals
  // r1..r12 (indices 0..11) and a two-slot memory port mem (indices 12, 13),
  // repeated every eight states. SRC_CTRL puts the state number in the slot.
  localparam int SRC_NONE = -1;
  localparam int SRC_CTRL = -2;

  function automatic int sched_src(int s, int k);
    int r;
    r = SRC_NONE;
    case (s % 8)
      1: case (k) 0: r = SRC_CTRL; 1: r = 0;  2: r = 2;  default: ; endcase // ctrl r1 r3
      2: case (k) 0: r = 3;  1: r = 12; 2: r = 13; default: ; endcase      // r4 mem
      3: case (k) 0: r = SRC_CTRL; default: ; endcase                      // ctrl
      4: case (k) 0: r = SRC_CTRL; 1: r = 9; 2: r = 11; 3: r = 12; 4: r = 13;
                  default: ; endcase                                         // ctrl r10 r12 mem
      6: case (k) 0: r = 4;  1: r = 5;  2: r = 7;  default: ; endcase      // r5 r6 r8
      7: case (k) 0: r = 8;  default: ; endcase                            // r9
      default: ;                                                           // S0, S5: none
    endcase
    return r;
  endfunction

  // Number of slots filled in state s under the default schedule.
  function automatic int sched_slots(int s, int nslots);
    int n;
    n = 0;
    for (int k = 0; k < nslots; k++)
      if (sched_src(s, k) != SRC_NONE) n = k + 1;
    return n;
  endfunction

endpackage
