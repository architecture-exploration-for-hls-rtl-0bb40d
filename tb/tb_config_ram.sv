// tb_config_ram: checks the cleared table after reset, random writes, and
// that reads return the entry addressed on the previous clock edge (one cycle
// latency, read-before-write on the same address), against an array model.
module tb_config_ram;
  localparam int NS = 256, CW = 3;
  logic clk = 0, rst_n = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [CW-1:0] wdata = 0, rdata;
  logic [CW-1:0] model [NS];
  logic [CW-1:0] exp_q;
  int checks = 0, failures = 0;

  config_ram #(.NUM_STATES(NS), .CFG_W(CW)) dut (
    .clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the table reads as zero after reset
    for (int s = 0; s < NS; s++) begin
      raddr = 8'(s);
      @(negedge clk);
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL entry %0d not cleared", s); end
    end
    exp_q = '0;
    for (int i = 0; i < 5000; i++) begin
      we    = ($urandom_range(0, 1) == 1);
      waddr = 8'($urandom);
      wdata = CW'($urandom);
      raddr = (i % 3 == 0) ? waddr : 8'($urandom);
      exp_q = model[raddr];          // old value: read before write
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("FAIL read %0d got %0d expected %0d", raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
