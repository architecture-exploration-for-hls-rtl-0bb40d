// stop_write_controller: turns freeze-unit triggers into trace_buffer_disable.
//
// The triggers of all C conditional freeze units are ORed: any one of them
// asks for the trace buffer to stop. With a line packer in the path, the trace
// data that caused the trigger may still sit in a partly filled packer line,
// so the controller waits for the packer's next full line (lp_full), lets that
// line be written, and disables the buffer from the following cycle on. With
// WAIT_LINE = 0 (no packer, Variant A) the line is written whole in the cycle
// it is compared, so the disable follows the trigger flag directly and no
// later line is written.
//
// Interface: with WAIT_LINE = 1 trace_buffer_disable is registered; with
// WAIT_LINE = 0 it is the registered flag ORed with the triggers. Either way it
// stays high until clear.
//
// The OR of the units and the use of lp_full follow the architecture
// description; the exact stop rule is this design's reading of it.
module stop_write_controller #(
  parameter int unsigned C         = hlsd_pkg::C_D,
  parameter bit          WAIT_LINE = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [C-1:0] trigger,
  input  logic         lp_full,
  output logic         trace_buffer_disable
);

  logic any_trigger;
  logic stop_now;
  logic disable_q;

  assign any_trigger = |trigger;
  assign stop_now    = any_trigger && (lp_full || !WAIT_LINE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        disable_q <= 1'b0;
    else if (clear)    disable_q <= 1'b0;
    else if (stop_now) disable_q <= 1'b1;
  end

  assign trace_buffer_disable = disable_q || (!WAIT_LINE && any_trigger);

endmodule
