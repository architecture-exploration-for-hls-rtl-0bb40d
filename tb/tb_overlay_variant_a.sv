// tb_overlay_variant_a: the end-to-end test for Variant A (G = 0: one-bit
// trace_enable per state, whole lines, no line packer) with two freeze
// units ORed and a 64-line buffer. See tb_overlay_env for the details; the
// environment prints the result and ends the run. The backstop below only
// fires if the environment's own watchdog somehow does not.
module tb_overlay_variant_a;
  tb_overlay_env #(.USE_DEFAULTS(1'b0), .G(0), .C(2), .DEPTH(64), .RUN1(1500), .RUN2(400)) env ();

  initial begin : backstop
    repeat (250000) @(posedge env.clk);
    $display("backstop expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
