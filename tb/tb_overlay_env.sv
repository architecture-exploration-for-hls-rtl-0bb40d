// tb_overlay_env: end-to-end bench for hlsd_overlay_top, used by the
// full-size Variant B test (USE_DEFAULTS = 1, the top's own parameters) and
// by the Variant A test (G = 0).
//
// A small model of an HLS user circuit (four functions, 64 states each,
// sixteen 16-bit signals) runs beside the overlay. The host, through the
// overlay's bus, personalises it twice:
//   debug turn 1: functions 0..2 traced, function 3 not (selective function
//     tracing); per-state word counts from the schedule, with one state class
//     cut short (selective variable tracing); freeze when r10 = 0xBEEF in
//     state 68 (last freeze unit; the others hold conditions that never hit).
//     The run is long enough for the circular buffer to wrap, then the
//     trigger value is injected and the buffer must freeze.
//   debug turn 2: clear, only function 3 traced, no freeze condition.
// After each run the whole buffer is read back and compared, line by line,
// with an independent model of the trace stream (scheduler table written out
// here, word queue for the packer, circular buffer with freeze rule).
// Mechanisms counted, each must occur: overflow spills in the packer, buffer
// wrap, freeze, lines dropped after the freeze, records of untraced states,
// records of an untraced function, and the reconfiguration between turns.
// With C = 0 (no freeze units) the trigger value is still injected and the
// buffer must not freeze.
module tb_overlay_env #(
  parameter bit USE_DEFAULTS = 1'b1,
  parameter int G            = 4,
  parameter int C            = 1,
  parameter int DEPTH        = 1024,
  parameter int RUN1         = 6000,
  parameter int RUN2         = 1500
);
  import hlsd_pkg::*;

  localparam int NS = 256, NF = 4, NSIG = 16, SW = 16, NSL = 8;
  localparam int TW = SW * NSL;
  localparam int WW = (G == 0) ? TW : TW / G;
  localparam int NWL = TW / 32;
  localparam int TRIG_STATE = 68;       // function 1, an S4-type state
  localparam logic [15:0] TRIG_VAL = 16'hBEEF;

  logic clk = 0, rst_n = 0;
  logic [1:0]  current_func;
  logic [7:0]  recode_state_in [NF];
  logic [15:0] user_sig [NSIG];
  host_req_t   host_req;
  logic [31:0] host_rdata;
  logic        host_rvalid, frozen;

  if (USE_DEFAULTS) begin : g_default
    hlsd_overlay_top dut (
      .clk, .rst_n, .current_func, .recode_state_in, .user_sig,
      .host_req, .host_rdata, .host_rvalid, .frozen);
  end else begin : g_param
    hlsd_overlay_top #(.G(G), .C(C), .DEPTH(DEPTH)) dut (
      .clk, .rst_n, .current_func, .recode_state_in, .user_sig,
      .host_req, .host_rdata, .host_rvalid, .frozen);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  // ------------------------------------------------------------ reference
  function automatic logic [TW-1:0] exp_line(int s, logic [15:0] sg [NSIG]);
    logic [15:0] sl [NSL];
    for (int k = 0; k < NSL; k++) sl[k] = '0;
    case (s % 8)
      1: begin sl[0] = 16'(s); sl[1] = sg[0]; sl[2] = sg[2]; end
      2: begin sl[0] = sg[3]; sl[1] = sg[12]; sl[2] = sg[13]; end
      3: begin sl[0] = 16'(s); end
      4: begin sl[0] = 16'(s); sl[1] = sg[9]; sl[2] = sg[11]; sl[3] = sg[12]; sl[4] = sg[13]; end
      6: begin sl[0] = sg[4]; sl[1] = sg[5]; sl[2] = sg[7]; end
      7: begin sl[0] = sg[8]; end
      default: ;
    endcase
    return {sl[7], sl[6], sl[5], sl[4], sl[3], sl[2], sl[1], sl[0]};
  endfunction

  function automatic int slots_used(int s);
    case (s % 8)
      1, 2, 6: return 3;
      3, 7:    return 1;
      4:       return 5;
      default: return 0;
    endcase
  endfunction

  // model state
  int          cfg [NS];
  bit          m_on = 0, m_frozen = 0, m_pending = 0;
  logic [WW-1:0] q[$];
  logic [TW-1:0] mbuf [DEPTH];
  int          mptr = 0;
  bit          mwrap = 0;
  // freeze unit model: unit C-1 is the live one
  int          f_state = -1;
  logic [TW-1:0] f_mask, f_tgt;

  // mechanism counters
  int n_spill = 0, n_wrap = 0, n_freeze = 0, n_dropped = 0, n_untraced = 0;
  int n_func_off = 0, n_lines = 0, n_reconfig = 0;

  task automatic model_write(logic [TW-1:0] l);
    if (m_frozen) begin
      n_dropped++;
      return;
    end
    mbuf[mptr] = l;
    n_lines++;
    if (mptr == DEPTH - 1) begin mptr = 0; mwrap = 1; n_wrap++; end else mptr++;
    if (m_pending) begin m_frozen = 1; n_freeze++; end
  endtask

  task automatic model_record(int s, logic [15:0] sg [NSIG]);
    logic [TW-1:0] l;
    int nw;
    if (!m_on) return;
    l  = exp_line(s, sg);
    nw = cfg[s];
    if (s == f_state && (l & f_mask) == f_tgt) m_pending = 1;
    if (nw == 0) n_untraced++;
    if (G == 0) begin
      if (nw != 0) model_write(l);
    end else begin
      if ((q.size() % G) + nw > G) n_spill++;
      for (int k = 0; k < nw; k++) q.push_back(l[k*WW +: WW]);
      if (q.size() >= G) begin
        logic [TW-1:0] pl;
        for (int i = 0; i < G; i++) pl[i*WW +: WW] = q.pop_front();
        model_write(pl);
      end
    end
  endtask

  // ------------------------------------------------------ user and host
  // One clock cycle: the current inputs are recorded by the model, then the
  // clock advances to the next falling edge.
  task automatic step();
    model_record(int'(recode_state_in[current_func]), user_sig);
    @(negedge clk);
    cycles++;
    host_req = '0;
  endtask

  task automatic user_idle();
    current_func = 0;
    foreach (recode_state_in[i]) recode_state_in[i] = 8'(64 * i);   // state 0 of each
    foreach (user_sig[i]) user_sig[i] = '0;
  endtask

  task automatic user_random(bit inject);
    if ($urandom_range(0, 3) == 0) current_func = 2'($urandom);
    foreach (recode_state_in[i]) recode_state_in[i] = 8'(64 * i + $urandom_range(0, 63));
    foreach (user_sig[i]) user_sig[i] = 16'($urandom);
    if (user_sig[9] == TRIG_VAL) user_sig[9] = ~TRIG_VAL;
    if (inject) begin
      current_func = 2'd1;
      recode_state_in[1] = 8'(TRIG_STATE);
      user_sig[9] = TRIG_VAL;
    end
  endtask

  task automatic hwrite(logic [15:0] a, logic [31:0] d);
    host_req = '{we: 1'b1, re: 1'b0, addr: a, wdata: d};
    step();
    if (a == 16'h0000) begin
      m_on = d[0];
      if (d[1]) begin
        q.delete(); mptr = 0; mwrap = 0; m_frozen = 0; m_pending = 0;
      end
    end
  endtask

  task automatic hread(logic [15:0] a, output logic [31:0] d);
    host_req = '{we: 1'b0, re: 1'b1, addr: a, wdata: '0};
    step();
    chk(host_rvalid, "read data valid one cycle after the request");
    d = host_rdata;
  endtask

  task automatic config_unit(int u, int op, int st, logic [TW-1:0] m, logic [TW-1:0] t);
    logic [15:0] base;
    base = 16'h2000 + 16'(64 * u);
    hwrite(base + 0, 32'(op));
    hwrite(base + 1, 32'(st));
    for (int j = 0; j < NWL; j++) hwrite(base + 16'(2 + j), m[32*j +: 32]);
    for (int j = 0; j < NWL; j++) hwrite(base + 16'(2 + NWL + j), t[32*j +: 32]);
  endtask

  task automatic config_states(bit [3:0] funcs_on, bit cut_s4);
    for (int s = 0; s < NS; s++) begin
      int nw;
      if (G == 0) nw = (slots_used(s) > 0) ? 1 : 0;
      else        nw = (slots_used(s) * SW + WW - 1) / WW;
      if (G != 0 && nw > G) nw = G;
      if (cut_s4 && G != 0 && (s % 8) == 4 && s / 64 == 2) nw = 1;   // keep ctrl+r10 only
      if (!funcs_on[s / 64]) nw = 0;
      cfg[s] = nw;
      hwrite(16'h1000 + 16'(s), 32'(nw));
    end
  endtask

  task automatic read_back(string tag);
    logic [31:0] d;
    int lines_to_check;
    hread(16'h0001, d);
    chk(d[0] == m_frozen, {tag, ": frozen flag"});
    chk(d[1] == mwrap, {tag, ": wrapped flag"});
    chk(int'(d[31:16]) == mptr, {tag, ": write pointer"});
    if (int'(d[31:16]) != mptr) $display("  wptr %0d model %0d", d[31:16], mptr);
    lines_to_check = mwrap ? DEPTH : mptr;
    for (int l = 0; l < lines_to_check; l++) begin
      logic [TW-1:0] got;
      for (int j = 0; j < NWL; j++) begin
        hread(16'h8000 + 16'(NWL * l + j), d);
        got[32*j +: 32] = d;
      end
      chk(got == mbuf[l], {tag, ": trace line contents"});
      if (got != mbuf[l] && failures < 20) $display("  line %0d got %h exp %h", l, got, mbuf[l]);
    end
    $display("%s: %0d lines checked, write pointer %0d, wrapped %0b, frozen %0b",
             tag, lines_to_check, mptr, mwrap, m_frozen);
  endtask

  initial begin
    logic [TW-1:0] m, t;
    host_req = '0;
    user_idle();
    repeat (3) @(negedge clk);
    rst_n = 1;
    step();

    // ---------------- debug turn 1
    config_states(4'b0111, 1'b1);
    // units other than the last: a condition that can never hit (S5 lines are 0)
    for (int u = 0; u < C - 1; u++) config_unit(u, 1, 5, '1, TW'(1));
    m = '0; m[16 +: 16] = 16'hFFFF;                 // slot 1 = r10 in S4 states
    t = '0; t[16 +: 16] = TRIG_VAL;
    if (C > 0) begin                                // C = 0: nothing to arm
      config_unit(C - 1, 1, TRIG_STATE, m, t);
      f_state = TRIG_STATE; f_mask = m; f_tgt = t;
    end
    hwrite(16'h0000, 32'h1);                         // trace on
    for (int i = 0; i < RUN1; i++) begin
      user_random(i == RUN1 - 100);
      if (recode_state_in[current_func] / 64 == 3) n_func_off++;
      step();
    end
    user_idle();
    repeat (4) step();
    chk(frozen == (C > 0), "buffer frozen after the trigger (only with units)");
    hwrite(16'h0000, 32'h0);                         // trace off
    repeat (4) step();
    read_back("turn 1");

    // ---------------- debug turn 2: personalise again, no recompile
    hwrite(16'h0000, 32'h2);                         // clear
    step();
    chk(frozen == 1'b0, "clear releases the freeze");
    n_reconfig++;
    f_state = -1;
    if (C > 0) config_unit(C - 1, 0, 0, '0, '0);     // freeze unit off
    config_states(4'b1000, 1'b0);
    hwrite(16'h0000, 32'h1);
    for (int i = 0; i < RUN2; i++) begin
      user_random(1'b0);
      current_func = 2'($urandom_range(2, 3));
      step();
    end
    user_idle();
    repeat (4) step();
    chk(frozen == 1'b0, "no freeze without a condition");
    hwrite(16'h0000, 32'h0);
    repeat (4) step();
    read_back("turn 2");

    $display("mechanisms: spills=%0d wraps=%0d freezes=%0d dropped_after_freeze=%0d untraced_records=%0d untraced_function_records=%0d reconfigurations=%0d lines=%0d",
             n_spill, n_wrap, n_freeze, n_dropped, n_untraced, n_func_off, n_reconfig, n_lines);
    if (G != 0) chk(n_spill > 0, "packer overflow used");
    chk(n_wrap > 0, "buffer wrapped");
    chk(n_freeze == (C > 0 ? 1 : 0), "exactly one freeze (none without units)");
    if (C > 0) chk(n_dropped > 0, "lines dropped while frozen");
    chk(n_untraced > 0, "untraced states seen");
    chk(n_func_off > 0, "untraced function seen");
    chk(n_reconfig > 0, "reconfigured between turns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
