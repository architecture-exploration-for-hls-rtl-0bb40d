// tb_state_recoder: checks that the recoded state is the input selected by
// current_func, for random inputs, with four functions (default) and with
// three, where the unused select value must give state 0.
module tb_state_recoder;
  logic [1:0] sel;
  logic [7:0] rin4 [4], rin3 [3];
  logic [7:0] out4, out3;
  int checks = 0, failures = 0;

  state_recoder #(.NUM_FUNCS(4), .NUM_STATES(256)) dut4 (
    .current_func(sel), .recode_state_in(rin4), .recode_state(out4));
  state_recoder #(.NUM_FUNCS(3), .NUM_STATES(256)) dut3 (
    .current_func(sel), .recode_state_in(rin3), .recode_state(out3));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel = 2'($urandom);
      foreach (rin4[k]) rin4[k] = 8'($urandom);
      foreach (rin3[k]) rin3[k] = 8'($urandom);
      #1;
      checks += 2;
      if (out4 !== rin4[sel]) begin
        failures++;
        $display("FAIL 4 funcs sel=%0d got %0d expected %0d", sel, out4, rin4[sel]);
      end
      if (out3 !== ((sel < 3) ? rin3[sel] : 8'd0)) begin
        failures++;
        $display("FAIL 3 funcs sel=%0d got %0d", sel, out3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
