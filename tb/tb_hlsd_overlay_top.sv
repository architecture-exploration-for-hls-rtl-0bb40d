// tb_hlsd_overlay_top: end-to-end test of the overlay at its default
// parameters (Variant B, G = 4, one freeze unit, 1024-line buffer): two
// debug turns with run-time reconfiguration, freeze on a data condition and
// full read-back of the trace buffer. See tb_overlay_env for the details.
module tb_hlsd_overlay_top;
  tb_overlay_env env ();
endmodule
