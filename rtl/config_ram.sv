// config_ram: the run-time personalisation table of the debug overlay.
//
// One entry per global FSM state. In Variant A an entry is one bit,
// trace_enable: record this state's trace line or not. In Variant B an entry
// is num_words, how many G-th parts of the trace line the line packer keeps
// (0 = not traced). Selecting variables or functions to trace, between debug
// turns, is nothing more than rewriting this table from the host; the rest of
// the overlay is fixed at compile time.
//
// Interface: one write port (host side) and one read port addressed by the
// recoded state. Both are synchronous, as in an FPGA block RAM: rdata is the
// entry of the address presented on the previous clock edge. A write and a
// read of the same address in one cycle return the old entry. The table is
// cleared by reset so that nothing is traced until the host configures it;
// that reset is this design's choice (a vendor block RAM without reset would
// need the host to write every entry first).
module config_ram
  import hlsd_pkg::*;
#(
  parameter int unsigned NUM_STATES = NUM_STATES_D,
  parameter int unsigned CFG_W      = $clog2(G_D + 1),
  localparam int unsigned STATE_W   = $clog2(NUM_STATES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // host write port
  input  logic               we,
  input  logic [STATE_W-1:0] waddr,
  input  logic [CFG_W-1:0]   wdata,
  // lookup port
  input  logic [STATE_W-1:0] raddr,
  output logic [CFG_W-1:0]   rdata
);

  logic [CFG_W-1:0] mem [NUM_STATES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_STATES); i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end

endmodule
