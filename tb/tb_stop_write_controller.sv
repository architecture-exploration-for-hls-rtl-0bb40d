// tb_stop_write_controller: checks the OR of triggers and the stop rule of the
// stop-write controller for both the packer (WAIT_LINE = 1) and the direct
// (WAIT_LINE = 0) form, cycle by cycle against a reference model.
module tb_stop_write_controller;
  localparam int C = 3;
  logic clk = 0, rst_n = 0, clear = 0, lp_full = 0;
  logic [C-1:0] trigger = '0;
  logic dis_b, dis_a;
  int checks = 0, failures = 0;
  bit ref_b, ref_a_q;

  stop_write_controller #(.C(C), .WAIT_LINE(1'b1)) dut_b (
    .clk, .rst_n, .clear, .trigger, .lp_full, .trace_buffer_disable(dis_b));
  stop_write_controller #(.C(C), .WAIT_LINE(1'b0)) dut_a (
    .clk, .rst_n, .clear, .trigger, .lp_full, .trace_buffer_disable(dis_a));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  int n_stop_b = 0;
  initial begin
    ref_b = 0; ref_a_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // outputs reflect state after the last edge plus current inputs
      check(dis_b, ref_b, "WAIT_LINE=1 disable");
      check(dis_a, ref_a_q || (trigger != 0), "WAIT_LINE=0 disable");
      // model the edge that follows with the inputs now applied
      if ((cyc % 97) == 0) clear = 1; else clear = 0;
      trigger = ($urandom_range(0, 19) == 0) ? C'(1 << $urandom_range(0, C-1)) :
                (clear ? '0 : trigger);
      if ((cyc % 97) > 60) trigger = '0;
      lp_full = ($urandom_range(0, 3) == 0);
      #1;
      check(dis_a, ref_a_q || (trigger != 0), "WAIT_LINE=0 combinational");
      if (clear) begin ref_b = 0; ref_a_q = 0; end
      else begin
        if ((trigger != 0) && lp_full && !ref_b) n_stop_b++;
        if ((trigger != 0) && lp_full) ref_b = 1;
        if (trigger != 0) ref_a_q = 1;
      end
    end
    check(n_stop_b > 5, 1'b1, "stop events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
