// tb_overlay_economy: the end-to-end test for the cheapest overlay build:
// Variant A (G = 0, one-bit trace_enable per state) with no conditional
// freeze units (C = 0), so only selective variable and function tracing
// remain. The trigger value of the other end-to-end tests is still injected
// and must not freeze the buffer. 64-line buffer. See tb_overlay_env for the
// details; the environment prints the result and ends the run. The backstop
// below only fires if its own watchdog does not.
module tb_overlay_economy;
  tb_overlay_env #(.USE_DEFAULTS(1'b0), .G(0), .C(0), .DEPTH(64), .RUN1(1500), .RUN2(400)) env ();

  initial begin : backstop
    repeat (250000) @(posedge env.clk);
    $display("backstop expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
