// comm_ctrl: communication and control logic between the host and the overlay.
//
// The debug host personalises the overlay between runs and reads the trace
// back afterwards, all through one simple word-addressed bus (hlsd_pkg
// host_req_t, map in hlsd_pkg). Writes are decoded into: the control register
// (trace_on, and a one-cycle clear of the trace buffer pointer, the line
// packer and the freeze flags), config RAM entries (one per state), and
// freeze-unit registers. Reads return status or one 32-bit word of a trace
// buffer line.
//
// Interface: at most one of we/re per cycle. A read returns rdata with
// rvalid one cycle after re (the trace buffer read is a synchronous block RAM
// read; the status word is registered to match). Writes take effect at the
// clock edge on which they are presented; clear is high for the cycle after
// the write.
//
// The architecture description names this block and its role only; the bus,
// the address map and the register layout are this design's own.
module comm_ctrl
  import hlsd_pkg::*;
#(
  parameter int unsigned NUM_STATES = NUM_STATES_D,
  parameter int unsigned CFG_W      = $clog2(G_D + 1),
  parameter int unsigned C          = C_D,
  parameter int unsigned TRACE_W    = TRACE_W_D,
  parameter int unsigned DEPTH      = DEPTH_D,
  localparam int unsigned STATE_W   = $clog2(NUM_STATES),
  localparam int unsigned AW        = $clog2(DEPTH),
  localparam int unsigned NWL       = (TRACE_W + HDATA_W - 1) / HDATA_W,
  localparam int unsigned WSEL_W    = (NWL > 1) ? $clog2(NWL) : 1,
  localparam int unsigned NW        = 1 << WSEL_W,       // words per line slot
  localparam int unsigned CA_W      = $clog2(2 + 2 * NWL)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  host_req_t          req,
  output logic [HDATA_W-1:0] rdata,
  output logic               rvalid,
  // control
  output logic               trace_on,
  output logic               clear,
  // config RAM write port
  output logic               cfg_we,
  output logic [STATE_W-1:0] cfg_waddr,
  output logic [CFG_W-1:0]   cfg_wdata,
  // freeze units
  output logic [C-1:0]       cfu_we,
  output logic [CA_W-1:0]    cfu_addr,
  output logic [HDATA_W-1:0] cfu_wdata,
  // trace buffer read port and status
  output logic [AW-1:0]      tb_raddr,
  input  logic [TRACE_W-1:0] tb_rdata,
  input  logic [AW-1:0]      tb_wptr,
  input  logic               tb_wrapped,
  input  logic               frozen,
  input  logic               any_trigger
);

  logic [3:0] region;
  logic       is_tb;
  assign region = req.addr[HADDR_W-1 -: 4];
  assign is_tb  = req.addr[HADDR_W-1];

  // ------------------------------------------------------------- writes
  assign cfg_we    = req.we && !is_tb && region == REGION_CFG;
  assign cfg_waddr = req.addr[STATE_W-1:0];
  assign cfg_wdata = req.wdata[CFG_W-1:0];

  localparam int unsigned UNIT_LSB = $clog2(CFU_STRIDE);
  assign cfu_addr  = req.addr[CA_W-1:0];
  assign cfu_wdata = req.wdata;
  always_comb begin
    for (int u = 0; u < int'(C); u++)
      cfu_we[u] = req.we && !is_tb && region == REGION_CFU
                  && req.addr[11:UNIT_LSB] == (12 - UNIT_LSB)'(u);
  end

  logic ctrl_we;
  assign ctrl_we = req.we && !is_tb && region == REGION_CTRL && req.addr[11:0] == 12'h000;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trace_on <= 1'b0;
      clear    <= 1'b0;
    end else begin
      clear <= ctrl_we && req.wdata[1];
      if (ctrl_we) trace_on <= req.wdata[0];
    end
  end

  // -------------------------------------------------------------- reads
  assign tb_raddr = AW'(req.addr[HADDR_W-2:0] >> WSEL_W);

  logic               rd_tb_q;
  logic [WSEL_W-1:0]  wsel_q;
  logic [HDATA_W-1:0] status_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid   <= 1'b0;
      rd_tb_q  <= 1'b0;
      wsel_q   <= '0;
      status_q <= '0;
    end else begin
      rvalid  <= req.re;
      rd_tb_q <= is_tb;
      wsel_q  <= req.addr[WSEL_W-1:0];
      status_q <= '0;
      if (region == REGION_CTRL && req.addr[11:0] == 12'h000)
        status_q <= HDATA_W'(trace_on);
      else if (region == REGION_CTRL && req.addr[11:0] == 12'h001)
        status_q <= {16'(tb_wptr), 13'd0, any_trigger, tb_wrapped, frozen};
    end
  end

  logic [NW*HDATA_W-1:0] tb_line;
  assign tb_line = (NW*HDATA_W)'(tb_rdata);
  assign rdata   = rd_tb_q ? tb_line[wsel_q*HDATA_W +: HDATA_W] : status_q;

  a_one_req: assert property (@(posedge clk) !(req.we && req.re))
    else $error("comm_ctrl: read and write in the same cycle");

endmodule
