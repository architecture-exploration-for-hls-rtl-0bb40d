// tb_comm_ctrl: exercises the host register interface. Checks the decoding
// of writes to the control register, config RAM and two freeze units, the
// one-cycle clear pulse, the status word, and 32-bit reads of trace lines
// from a small line memory modelled here with a one-cycle read latency.
module tb_comm_ctrl;
  import hlsd_pkg::*;
  localparam int NS = 256, CW = 3, C = 2, TW = 128, D = 64;
  logic clk = 0, rst_n = 0;
  host_req_t req;
  logic [31:0] rdata;
  logic rvalid, trace_on, clear, cfg_we;
  logic [7:0] cfg_waddr;
  logic [CW-1:0] cfg_wdata;
  logic [C-1:0] cfu_we;
  logic [3:0] cfu_addr;
  logic [31:0] cfu_wdata;
  logic [5:0] tb_raddr, tb_wptr;
  logic [TW-1:0] tb_rdata;
  logic tb_wrapped, frozen, any_trigger;
  logic [TW-1:0] lines [D];
  int checks = 0, failures = 0;

  comm_ctrl #(.NUM_STATES(NS), .CFG_W(CW), .C(C), .TRACE_W(TW), .DEPTH(D)) dut (
    .clk, .rst_n, .req, .rdata, .rvalid, .trace_on, .clear,
    .cfg_we, .cfg_waddr, .cfg_wdata, .cfu_we, .cfu_addr, .cfu_wdata,
    .tb_raddr, .tb_rdata, .tb_wptr, .tb_wrapped, .frozen, .any_trigger);

  always #5 clk = ~clk;
  always_ff @(posedge clk) tb_rdata <= lines[tb_raddr];   // block RAM model

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle();
    req = '0;
  endtask

  task automatic hwrite(logic [15:0] a, logic [31:0] d, output bit seen_cfg,
                        output logic [C-1:0] seen_cfu);
    req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    #1;
    seen_cfg = cfg_we && cfg_waddr == a[7:0] && cfg_wdata == d[CW-1:0];
    seen_cfu = cfu_we;
    if (cfu_we != 0) chk(cfu_addr == a[3:0] && cfu_wdata == d, "cfu address/data");
    @(negedge clk);
    idle();
  endtask

  task automatic hread(logic [15:0] a, output logic [31:0] d);
    req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
    @(negedge clk);
    idle();
    chk(rvalid, "rvalid one cycle after re");
    d = rdata;
    #1;
  endtask

  initial begin
    bit sc; logic [C-1:0] su; logic [31:0] d;
    idle();
    foreach (lines[i]) lines[i] = {$urandom, $urandom, $urandom, $urandom};
    tb_wptr = 6'd37; tb_wrapped = 1; frozen = 0; any_trigger = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!trace_on && !clear, "reset values");
    // config RAM writes
    for (int i = 0; i < 100; i++) begin
      logic [7:0] s; s = 8'($urandom);
      hwrite(16'h1000 | 16'(s), $urandom, sc, su);
      chk(sc && su == 0, "config write decoded");
    end
    // freeze unit writes
    for (int u = 0; u < C; u++)
      for (int k = 0; k < 10; k++) begin
        hwrite(16'h2000 + 16'(64 * u + k), $urandom, sc, su);
        chk(!sc && su == C'(1 << u), "freeze unit write decoded");
      end
    // control: trace on, then clear pulse
    hwrite(16'h0000, 32'h1, sc, su);
    chk(!sc && su == 0 && trace_on && !clear, "trace_on set");
    hwrite(16'h0000, 32'h3, sc, su);
    chk(trace_on && clear, "clear pulse high");
    @(negedge clk);
    chk(!clear, "clear pulse one cycle");
    hread(16'h0000, d);
    chk(d == 32'h1, "control readback");
    hread(16'h0001, d);
    chk(d == {16'd37, 13'd0, 1'b1, 1'b1, 1'b0}, "status word");
    // trace buffer reads: line l word j at 0x8000 + 4l + j
    for (int i = 0; i < 200; i++) begin
      int l, j;
      l = $urandom_range(0, D - 1); j = $urandom_range(0, 3);
      hread(16'h8000 + 16'(4 * l + j), d);
      chk(d == lines[l][32*j +: 32], "trace word read");
    end
    hwrite(16'h0000, 32'h0, sc, su);
    chk(!trace_on, "trace_on cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
