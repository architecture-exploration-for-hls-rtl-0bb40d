// trace_buffer: circular on-chip memory that holds the most recent trace lines.
//
// While the user circuit runs, every line offered on the write port is stored
// at the write pointer, which then advances and wraps, so the buffer always
// holds the last DEPTH lines: the trace window. When trace_buffer_disable is
// high the buffer keeps its contents (a conditional freeze or the host has
// stopped recording) so the history leading up to an event is preserved.
// After the run the host reads the lines back through a separate read port.
//
// Interface: write when we && !trace_buffer_disable, at the rising edge.
// Read is synchronous: rdata holds the line at raddr one cycle later.
// wptr is the next line to be written; wrapped says the buffer has filled at
// least once, so the oldest line is at wptr (else at 0). clear resets wptr and
// wrapped, not the contents.
//
// The circular buffer and its disable input follow the architecture
// description; the depth and the read port are this design's choices.
module trace_buffer
  import hlsd_pkg::*;
#(
  parameter int unsigned DEPTH   = DEPTH_D,
  parameter int unsigned TRACE_W = TRACE_W_D,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               trace_buffer_disable,
  input  logic               we,
  input  logic [TRACE_W-1:0] wdata,
  input  logic [AW-1:0]      raddr,
  output logic [TRACE_W-1:0] rdata,
  output logic [AW-1:0]      wptr,
  output logic               wrapped
);

  logic [TRACE_W-1:0] mem [DEPTH];
  logic               wr;

  assign wr = we && !trace_buffer_disable;

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      wrapped <= 1'b0;
    end else if (clear) begin
      wptr    <= '0;
      wrapped <= 1'b0;
    end else if (wr) begin
      if (wptr == AW'(DEPTH - 1)) begin
        wptr    <= '0;
        wrapped <= 1'b1;
      end else begin
        wptr <= wptr + 1'b1;
      end
    end
  end

endmodule
