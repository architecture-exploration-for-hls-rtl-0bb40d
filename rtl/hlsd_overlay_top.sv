// hlsd_overlay_top: run-time configurable debug overlay for an HLS circuit.
//
// Record-and-replay debug of an HLS circuit stores, every cycle, the values of
// the variables the user wants to see in an on-chip trace buffer. Here the
// instrumentation is built once; what is recorded is chosen at run time by
// writing a small table, so a new debug turn needs no recompile.
//
// Data path, one trace record per user-circuit clock:
//   user state --state_recoder--> global state s
//   s + user signals --trace_scheduler--> trace line (only what changes in s)
//   s --config_ram--> num_words (Variant B) or trace_enable (Variant A)
//   stage register: line, s, config entry
//   Variant B (G >= 1): line_packer keeps the num_words low words of the line
//     and packs them into full lines for trace_buffer.
//   Variant A (G = 0): the whole line is written when trace_enable is 1.
//   C cond_freeze_unit compare the staged line in their configured state; the
//   stop_write_controller ORs their triggers and freezes the trace_buffer.
//   C = 0 builds the cheapest overlay, selective tracing only: no freeze
//   units, the trigger is tied low and the buffer only stops when the host
//   switches tracing off.
//   comm_ctrl connects the host bus to all of the above.
//
// Selective variable tracing and selective function tracing both come down to
// config RAM contents: a state is traced with enough words for the variables
// wanted, and the states of a function are all traced or not.
//
// Timing: the trace line of the cycle in which the user circuit is in state
// s is staged one cycle later; with the packer it reaches the trace buffer
// when the line holding it is full (lp_full, at least two cycles later). The
// user circuit is only observed, never stalled.
//
// The structure follows the architecture description (Variant A and B, the
// packer granularity G, and C freeze units). Widths, depths, the staging
// register, the host bus and the default schedule are this design's choices.
module hlsd_overlay_top
  import hlsd_pkg::*;
#(
  parameter int unsigned G          = G_D,          // 0 selects Variant A
  parameter int unsigned C          = C_D,          // 0: no freeze units
  parameter int unsigned NUM_STATES = NUM_STATES_D,
  parameter int unsigned NUM_FUNCS  = NUM_FUNCS_D,
  parameter int unsigned NUM_SIG    = NUM_SIG_D,
  parameter int unsigned SLOT_W     = SLOT_W_D,
  parameter int unsigned NUM_SLOTS  = NUM_SLOTS_D,
  parameter int unsigned DEPTH      = DEPTH_D,
  localparam int unsigned TRACE_W   = SLOT_W * NUM_SLOTS,
  localparam int unsigned STATE_W   = $clog2(NUM_STATES),
  localparam int unsigned FSEL_W    = (NUM_FUNCS > 1) ? $clog2(NUM_FUNCS) : 1,
  localparam int unsigned CFG_W     = (G == 0) ? 1 : $clog2(G + 1),
  localparam int unsigned CU        = (C == 0) ? 1 : C  // unit-vector width
) (
  input  logic               clk,
  input  logic               rst_n,
  // observed user circuit
  input  logic [FSEL_W-1:0]  current_func,
  input  logic [STATE_W-1:0] recode_state_in [NUM_FUNCS],
  input  logic [SLOT_W-1:0]  user_sig [NUM_SIG],
  // host
  input  host_req_t          host_req,
  output logic [HDATA_W-1:0] host_rdata,
  output logic               host_rvalid,
  // status
  output logic               frozen
);

  localparam int unsigned AW   = $clog2(DEPTH);
  localparam int unsigned NWL  = (TRACE_W + HDATA_W - 1) / HDATA_W;
  localparam int unsigned CA_W = $clog2(2 + 2 * NWL);

  // ----------------------------------------------------------- host side
  logic               trace_on, clear;
  logic               cfg_we;
  logic [STATE_W-1:0] cfg_waddr;
  logic [CFG_W-1:0]   cfg_wdata;
  logic [CU-1:0]      cfu_we;
  logic [CA_W-1:0]    cfu_addr;
  logic [HDATA_W-1:0] cfu_wdata;
  logic [AW-1:0]      tb_raddr, tb_wptr;
  logic [TRACE_W-1:0] tb_rdata;
  logic               tb_wrapped;
  logic [CU-1:0]      trigger;
  logic               trace_buffer_disable;

  comm_ctrl #(
    .NUM_STATES(NUM_STATES), .CFG_W(CFG_W), .C(CU), .TRACE_W(TRACE_W), .DEPTH(DEPTH)
  ) u_comm (
    .clk, .rst_n,
    .req(host_req), .rdata(host_rdata), .rvalid(host_rvalid),
    .trace_on, .clear,
    .cfg_we, .cfg_waddr, .cfg_wdata,
    .cfu_we, .cfu_addr, .cfu_wdata,
    .tb_raddr, .tb_rdata, .tb_wptr, .tb_wrapped,
    .frozen(trace_buffer_disable), .any_trigger(|trigger)
  );

  // --------------------------------------------------- observation stage
  logic [STATE_W-1:0] recode_state;
  logic [TRACE_W-1:0] r_active;
  logic [CFG_W-1:0]   cfg_entry;

  state_recoder #(.NUM_FUNCS(NUM_FUNCS), .NUM_STATES(NUM_STATES)) u_recode (
    .current_func, .recode_state_in, .recode_state
  );

  trace_scheduler #(
    .NUM_STATES(NUM_STATES), .NUM_SIG(NUM_SIG), .SLOT_W(SLOT_W), .NUM_SLOTS(NUM_SLOTS)
  ) u_sched (
    .state(recode_state), .sig(user_sig), .line(r_active)
  );

  config_ram #(.NUM_STATES(NUM_STATES), .CFG_W(CFG_W)) u_cfg (
    .clk, .rst_n,
    .we(cfg_we), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .raddr(recode_state), .rdata(cfg_entry)
  );

  // Stage register: aligns the trace line and state with the synchronous
  // config RAM read.
  logic               valid_q;
  logic [STATE_W-1:0] state_q;
  logic [TRACE_W-1:0] line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      state_q <= '0;
      line_q  <= '0;
    end else begin
      valid_q <= trace_on && !clear;
      state_q <= recode_state;
      line_q  <= r_active;
    end
  end

  // ------------------------------------------------ freeze condition units
  for (genvar u = 0; u < C; u++) begin : g_cfu
    cond_freeze_unit #(.TRACE_W(TRACE_W), .NUM_STATES(NUM_STATES)) u_cfu (
      .clk, .rst_n, .clear,
      .cfg_we(cfu_we[u]), .cfg_addr(cfu_addr), .cfg_wdata(cfu_wdata),
      .valid(valid_q), .state(state_q), .trace_data(line_q),
      .trigger(trigger[u])
    );
  end
  if (C == 0) begin : g_no_freeze
    assign trigger = '0;
  end

  // ---------------------------------------------------- packing and buffer
  logic               tb_we;
  logic [TRACE_W-1:0] tb_wdata;
  logic               lp_full;

  if (G == 0) begin : g_variant_a
    assign tb_we    = valid_q && cfg_entry[0];
    assign tb_wdata = line_q;
    assign lp_full  = tb_we;
  end else begin : g_variant_b
    logic [CFG_W-1:0] num_words;
    assign num_words = valid_q ? cfg_entry : '0;

    line_packer #(.G(G), .TRACE_W(TRACE_W)) u_packer (
      .clk, .rst_n, .clear,
      .num_words, .trace_data(line_q),
      .lp_full, .packed_data(tb_wdata)
    );
    assign tb_we = lp_full;
  end

  stop_write_controller #(.C(CU), .WAIT_LINE(G != 0)) u_stop (
    .clk, .rst_n, .clear,
    .trigger, .lp_full,
    .trace_buffer_disable
  );

  trace_buffer #(.DEPTH(DEPTH), .TRACE_W(TRACE_W)) u_tbuf (
    .clk, .rst_n, .clear,
    .trace_buffer_disable,
    .we(tb_we), .wdata(tb_wdata),
    .raddr(tb_raddr), .rdata(tb_rdata),
    .wptr(tb_wptr), .wrapped(tb_wrapped)
  );

  assign frozen = trace_buffer_disable;

endmodule
