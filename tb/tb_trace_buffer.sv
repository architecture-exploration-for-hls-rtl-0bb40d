// tb_trace_buffer: writes random lines with random gaps and random disable
// periods into a 16-line buffer, checking the write pointer and wrap flag
// every cycle and the contents by reading every line back (one cycle read
// latency) against a circular-buffer model; also checks clear.
module tb_trace_buffer;
  localparam int D = 16, TW = 64;
  logic clk = 0, rst_n = 0, clear = 0, dis = 0, we = 0;
  logic [TW-1:0] wdata = '0, rdata;
  logic [3:0] raddr = '0, wptr;
  logic wrapped;
  logic [TW-1:0] model [D];
  int mptr = 0; bit mwrap = 0;
  int checks = 0, failures = 0, blocked = 0, wraps = 0;

  trace_buffer #(.DEPTH(D), .TRACE_W(TW)) dut (
    .clk, .rst_n, .clear, .trace_buffer_disable(dis), .we, .wdata,
    .raddr, .rdata, .wptr, .wrapped);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int l = 0; l < D; l++) begin
      raddr = 4'(l);
      @(negedge clk);
      if (mwrap || l < mptr) begin
        checks++;
        if (rdata !== model[l]) begin
          failures++;
          $display("FAIL line %0d got %h expected %h", l, rdata, model[l]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < 50; i++) begin
        we    = ($urandom_range(0, 2) != 0);
        dis   = ($urandom_range(0, 4) == 0);
        wdata = {$urandom, $urandom};
        @(posedge clk);
        if (we && dis) blocked++;
        if (we && !dis) begin
          model[mptr] = wdata;
          if (mptr == D - 1) begin mptr = 0; mwrap = 1; wraps++; end else mptr++;
        end
        @(negedge clk);
        checks++;
        if (wptr !== 4'(mptr) || wrapped !== mwrap) begin
          failures++;
          $display("FAIL wptr %0d/%0d wrapped %0b/%0b", wptr, mptr, wrapped, mwrap);
        end
      end
      we = 0;
      check_all();
      if (round % 5 == 4) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        mptr = 0; mwrap = 0;
        checks++;
        if (wptr !== 0 || wrapped !== 0) begin failures++; $display("FAIL clear"); end
      end
    end
    checks++;
    if (blocked == 0 || wraps == 0) begin failures++; $display("FAIL no disable/wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
