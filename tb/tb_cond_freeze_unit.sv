// tb_cond_freeze_unit: configures the unit through its word-wide register
// port with random masks, targets, states and operators, then applies random
// trace data and checks the trigger flag cycle by cycle against a model:
// it rises one cycle after a matching input and stays set until clear.
module tb_cond_freeze_unit;
  import hlsd_pkg::*;
  localparam int TW = 128, NS = 256, NW = TW / 32;
  logic clk = 0, rst_n = 0, clear = 0, cfg_we = 0, valid = 0;
  logic [3:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic [7:0] state = '0;
  logic [TW-1:0] data = '0;
  logic trigger;
  int checks = 0, failures = 0, hits = 0;

  cond_freeze_unit #(.TRACE_W(TW), .NUM_STATES(NS)) dut (
    .clk, .rst_n, .clear, .cfg_we, .cfg_addr, .cfg_wdata,
    .valid, .state, .trace_data(data), .trigger);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [31:0] d);
    cfg_addr = 4'(a); cfg_wdata = d; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic bit cmp(int op, logic [TW-1:0] a, logic [TW-1:0] b);
    case (op)
      1: return a == b;
      2: return a != b;
      3: return a < b;
      4: return a <= b;
      5: return a > b;
      6: return a >= b;
      default: return 0;
    endcase
  endfunction

  initial begin
    logic [TW-1:0] mask, tgt;
    int op, st;
    bit flag;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cfg = 0; cfg < 60; cfg++) begin
      op   = cfg % 7;
      st   = $urandom_range(0, 7);
      mask = {$urandom, $urandom, $urandom, $urandom};
      if (cfg % 3 == 0) mask = TW'(32'h8000_0000) << 96;     // sign bit of the top word
      tgt  = {$urandom, $urandom, $urandom, $urandom} & mask;
      wr(0, 32'(op));
      wr(1, 32'(st));
      for (int j = 0; j < NW; j++) wr(2 + j, mask[j*32 +: 32]);
      for (int j = 0; j < NW; j++) wr(2 + NW + j, tgt[j*32 +: 32]);
      clear = 1; @(negedge clk); clear = 0;
      flag = 0;
      for (int i = 0; i < 100; i++) begin
        valid = ($urandom_range(0, 5) != 0);
        state = 8'($urandom_range(0, 7));
        data  = {$urandom, $urandom, $urandom, $urandom};
        if ($urandom_range(0, 9) == 0) data = (data & ~mask) | tgt;   // force an equal value
        if (valid && state == 8'(st) && cmp(op, data & mask, tgt)) begin
          if (!flag) hits++;
          flag = 1;
        end
        @(negedge clk);
        checks++;
        if (trigger !== flag) begin
          failures++;
          $display("FAIL cfg %0d op %0d cycle %0d: trigger %0b expected %0b", cfg, op, i, trigger, flag);
        end
      end
      valid = 0;
    end
    checks++;
    if (hits < 20) begin failures++; $display("FAIL only %0d triggers", hits); end
    $display("%0d configurations triggered", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
