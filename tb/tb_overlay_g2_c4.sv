// tb_overlay_g2_c4: the end-to-end test for Variant B with the finest-cost
// packer (G = 2: two 64-bit words per line) and four conditional freeze units
// whose triggers are ORed, with a 256-line buffer. Only the last unit holds
// the condition that hits; the other three hold conditions that never do,
// so the test also shows that idle units do not disturb the OR. See
// tb_overlay_env for the details; the environment prints the result and ends
// the run. The backstop below only fires if its own watchdog does not.
module tb_overlay_g2_c4;
  tb_overlay_env #(.USE_DEFAULTS(1'b0), .G(2), .C(4), .DEPTH(256), .RUN1(2500), .RUN2(600)) env ();

  initial begin : backstop
    repeat (250000) @(posedge env.clk);
    $display("backstop expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
