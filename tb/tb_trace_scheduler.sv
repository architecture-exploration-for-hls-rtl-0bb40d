// tb_trace_scheduler: applies random signal values in every state and
// compares the trace line with the example schedule written out by hand
// below (slot 0 least significant; ctrl = state number):
//   S1 ctrl r1 r3 | S2 r4 mem | S3 ctrl | S4 ctrl r10 r12 mem | S6 r5 r6 r8
//   S7 r9 | S0, S5 nothing; repeating every eight states.
module tb_trace_scheduler;
  localparam int NS = 256, NSIG = 16, SW = 16, NSL = 8;
  logic [7:0]       state;
  logic [SW-1:0]    sig [NSIG];
  logic [SW*NSL-1:0] line;
  int checks = 0, failures = 0;

  trace_scheduler #(.NUM_STATES(NS), .NUM_SIG(NSIG), .SLOT_W(SW), .NUM_SLOTS(NSL)) dut (
    .state, .sig, .line);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // r(n) is signal n-1; mem is signals 12 (low) and 13 (high).
  function automatic logic [SW*NSL-1:0] expected(int s);
    logic [SW-1:0] sl [NSL];
    logic [SW-1:0] ctrl;
    ctrl = SW'(s);
    for (int k = 0; k < NSL; k++) sl[k] = '0;
    case (s % 8)
      1: begin sl[0] = ctrl; sl[1] = sig[0]; sl[2] = sig[2]; end
      2: begin sl[0] = sig[3]; sl[1] = sig[12]; sl[2] = sig[13]; end
      3: begin sl[0] = ctrl; end
      4: begin sl[0] = ctrl; sl[1] = sig[9]; sl[2] = sig[11]; sl[3] = sig[12]; sl[4] = sig[13]; end
      6: begin sl[0] = sig[4]; sl[1] = sig[5]; sl[2] = sig[7]; end
      7: begin sl[0] = sig[8]; end
      default: ;
    endcase
    return {sl[7], sl[6], sl[5], sl[4], sl[3], sl[2], sl[1], sl[0]};
  endfunction

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int s = 0; s < NS; s++) begin
        state = 8'(s);
        foreach (sig[i]) sig[i] = SW'($urandom);
        #1;
        checks++;
        if (line !== expected(s)) begin
          failures++;
          if (failures < 10) $display("FAIL state %0d: got %h expected %h", s, line, expected(s));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
