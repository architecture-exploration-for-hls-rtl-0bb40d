// cond_freeze_unit: one conditional buffer-freeze unit.
//
// The host loads four fields at run time: data_mask, target_value, state and
// op. Every cycle the unit masks the trace data of the current state with
// data_mask and, if the current state equals the configured one, compares the
// result with target_value under op (see hlsd_pkg::cmp_op_e). A hit sets a
// sticky trigger flag that stays set until the host clears it; the flag goes
// to the stop-write controller. Several units (parameter C at the top) let a
// condition be built from several compares, ORed together.
//
// Interface: cfg_we writes one 32-bit host word at cfg_addr: 0 op, 1 state,
// 2 .. 1+NW the words of data_mask, 2+NW .. 1+2*NW those of target_value,
// least significant word first (NW = TRACE_W/32). The inputs
// trace_data/state/valid are sampled at the clock edge; trigger rises one
// cycle after the matching input. clear drops the flag; op = OP_OFF (reset
// value) disables the unit.
//
// The four fields, the masking, the comparator and the set-only flag follow
// the architecture description; the list of operators, unsigned compare and
// the flag clear are this design's choices.
module cond_freeze_unit
  import hlsd_pkg::*;
#(
  parameter int unsigned TRACE_W    = TRACE_W_D,
  parameter int unsigned NUM_STATES = NUM_STATES_D,
  localparam int unsigned STATE_W   = $clog2(NUM_STATES),
  localparam int unsigned NW        = (TRACE_W + HDATA_W - 1) / HDATA_W,
  localparam int unsigned CA_W      = $clog2(2 + 2 * NW)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  // configuration
  input  logic               cfg_we,
  input  logic [CA_W-1:0]    cfg_addr,
  input  logic [HDATA_W-1:0] cfg_wdata,
  // observed trace
  input  logic               valid,
  input  logic [STATE_W-1:0] state,
  input  logic [TRACE_W-1:0] trace_data,
  output logic               trigger
);

  cmp_op_e            op;
  logic [STATE_W-1:0] tgt_state;
  logic [TRACE_W-1:0] data_mask;
  logic [TRACE_W-1:0] target_value;
  logic [NW*HDATA_W-1:0] mask_w, target_w;  // word-addressable copies

  assign data_mask    = mask_w[TRACE_W-1:0];
  assign target_value = target_w[TRACE_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op        <= OP_OFF;
      tgt_state <= '0;
      mask_w    <= '0;
      target_w  <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == CA_W'(0)) op <= cmp_op_e'(cfg_wdata[2:0]);
      if (cfg_addr == CA_W'(1)) tgt_state <= cfg_wdata[STATE_W-1:0];
      for (int j = 0; j < int'(NW); j++) begin
        if (cfg_addr == CA_W'(2 + j))      mask_w[j*HDATA_W +: HDATA_W]   <= cfg_wdata;
        if (cfg_addr == CA_W'(2 + NW + j)) target_w[j*HDATA_W +: HDATA_W] <= cfg_wdata;
      end
    end
  end

  // Comparator.
  logic [TRACE_W-1:0] masked;
  logic               hit;

  assign masked = trace_data & data_mask;

  always_comb begin
    unique case (op)
      OP_EQ:   hit = (masked == target_value);
      OP_NE:   hit = (masked != target_value);
      OP_LT:   hit = (masked <  target_value);
      OP_LE:   hit = (masked <= target_value);
      OP_GT:   hit = (masked >  target_value);
      OP_GE:   hit = (masked >= target_value);
      default: hit = 1'b0;
    endcase
  end

  // Sticky flag: once set, only the host clears it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   trigger <= 1'b0;
    else if (clear)                               trigger <= 1'b0;
    else if (valid && state == tgt_state && hit)  trigger <= 1'b1;
  end

endmodule
